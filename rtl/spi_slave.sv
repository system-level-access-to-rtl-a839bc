// spi_slave: functional port of the level-i+1 IC, facing the SPI master of
// the level-i IC.
//
// Same framing as spi_master: mode 0, 9-bit frames, valid bit first, then the
// byte most significant bit first. SCLK, CS_N and MOSI are oversampled with
// two-flop synchronisers, so SCLK must be at most clk/8. When CS_N falls the
// slave latches the byte it has to return (tx_valid/tx_data) and drives its
// valid bit; it shifts MOSI in on each rising SCLK edge and presents the next
// MISO bit after each falling edge. When CS_N rises after nine bits, a
// received byte with valid = 1 is delivered with an rx_valid pulse, and a
// returned byte that was sent is removed with a tx_take pulse. irq is high
// while a byte waits to be returned. The framing and irq are this design's
// choices.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_take,
  output logic       irq
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [8:0] ish, osh;
  logic [3:0] nbits;
  logic       sent;      // the frame carries a returned byte

  wire sclk_rise = sclk_s[1] && !sclk_s[2];
  wire sclk_fall = !sclk_s[1] && sclk_s[2];
  wire cs_fall   = !cs_s[1] && cs_s[2];
  wire cs_rise   = cs_s[1] && !cs_s[2];
  wire active    = !cs_s[1];

  assign irq = tx_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_s   <= '0;
      cs_s     <= '1;
      mosi_s   <= '0;
      ish      <= '0;
      osh      <= '0;
      nbits    <= '0;
      sent     <= 1'b0;
      miso     <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      tx_take  <= 1'b0;
    end else begin
      sclk_s   <= {sclk_s[1:0], sclk};
      cs_s     <= {cs_s[1:0], cs_n};
      mosi_s   <= {mosi_s[0], mosi};
      rx_valid <= 1'b0;
      tx_take  <= 1'b0;
      if (cs_fall) begin
        osh   <= {tx_valid, tx_data};
        miso  <= tx_valid;
        sent  <= tx_valid;
        nbits <= '0;
      end else if (active && sclk_rise) begin
        ish   <= {ish[7:0], mosi_s[1]};
        nbits <= nbits + 1'b1;
      end else if (active && sclk_fall) begin
        osh  <= {osh[7:0], 1'b0};
        miso <= osh[7];
      end else if (cs_rise) begin
        if (nbits == 4'd9) begin
          rx_data  <= ish[7:0];
          rx_valid <= ish[8];
          tx_take  <= sent;
        end
      end
    end
  end
endmodule
