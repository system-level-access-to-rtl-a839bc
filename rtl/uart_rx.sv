// uart_rx: UART receiver for the host port of the level-i IC.
//
// Frame: one start bit (0), eight data bits least significant first, one
// stop bit (1); no parity. The line is synchronised with two flip-flops, a
// falling edge starts a frame, every bit is sampled in its middle, and a
// received byte is presented on data with a one-cycle valid pulse after the
// middle of the stop bit. A frame whose stop bit is 0 is dropped, and the
// receiver waits for the line to return high before it looks for the next
// start bit. The 8N1
// framing and the default bit time (868 clocks, 115200 baud at 100 MHz) are
// this design's choices.
module uart_rx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  localparam int CNTW = $clog2(CLKS_PER_BIT + 1);

  logic [1:0]      sync;
  logic [CNTW-1:0] cnt;
  logic [3:0]      bitn;      // 0: start, 1..8: data, 9: stop
  logic            busy;
  logic [7:0]      sh;
  logic            brk;       // framing error seen: wait for the line to go high

  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      cnt   <= '0;
      bitn  <= '0;
      busy  <= 1'b0;
      sh    <= '0;
      brk   <= 1'b0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      if (!busy) begin
        if (rx) brk <= 1'b0;
        if (!rx && !brk) begin
          busy <= 1'b1;
          bitn <= '0;
          cnt  <= CNTW'(CLKS_PER_BIT / 2);
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        cnt <= CNTW'(CLKS_PER_BIT - 1);
        if (bitn == 0) begin
          if (rx) busy <= 1'b0;           // glitch, not a start bit
          bitn <= 4'd1;
        end else if (bitn <= 4'd8) begin
          sh   <= {rx, sh[7:1]};
          bitn <= bitn + 1'b1;
        end else begin
          busy <= 1'b0;
          if (rx) begin
            data  <= sh;
            valid <= 1'b1;
          end else begin
            brk <= 1'b1;
          end
        end
      end
    end
  end
endmodule
