// uart_tx: UART transmitter for the host port of the level-i IC.
//
// Takes a byte when valid and ready are both high and sends it as one start
// bit, eight data bits least significant first and one stop bit, each bit
// CLKS_PER_BIT clocks long. ready is high while the transmitter is idle. The
// 8N1 framing and the default bit time are this design's choices.
module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int CNTW = $clog2(CLKS_PER_BIT + 1);

  logic [CNTW-1:0] cnt;
  logic [3:0]      bitn;      // bits still to send after the current one
  logic [8:0]      sh;        // remaining data bits and stop bit
  logic            busy;

  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      bitn <= '0;
      sh   <= '1;
      busy <= 1'b0;
      txd  <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy <= 1'b1;
        txd  <= 1'b0;                      // start bit
        sh   <= {1'b1, data};
        bitn <= 4'd9;
        cnt  <= CNTW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bitn == 0) begin
      busy <= 1'b0;
    end else begin
      txd  <= sh[0];
      sh   <= {1'b1, sh[8:1]};
      bitn <= bitn - 1'b1;
      cnt  <= CNTW'(CLKS_PER_BIT - 1);
    end
  end
endmodule
