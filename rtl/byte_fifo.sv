// byte_fifo: synchronous first-in first-out buffer for the byte streams of
// the functional ports (UART and SPI receive/transmit buffers).
//
// A write is taken when wr_valid is high and the FIFO is not full (wr_ready);
// the oldest byte is shown on rd_data with rd_valid high and is removed when
// rd_ready is high in the same cycle. Read data is available the cycle after
// it is written (no fall-through). DEPTH must be a power of two; its value
// (16) is this design's choice.
module byte_fifo #(
  parameter int DEPTH = 16,
  parameter int W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] wr_data,
  input  logic         wr_valid,
  output logic         wr_ready,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  input  logic         rd_ready
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  wire do_wr = wr_valid && wr_ready;
  wire do_rd = rd_valid && rd_ready;

  assign wr_ready = (wptr - rptr) != (AW+1)'(DEPTH);
  assign rd_valid = wptr != rptr;
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end
endmodule
