// spi_master: functional port of the level-i IC towards the next IC.
//
// SPI mode 0 (SCLK idle low, data driven while SCLK is low and sampled on the
// rising edge). Every transfer is one 9-bit frame in each direction, most
// significant bit first: a valid bit, then a byte. The master starts a frame
// when rx_allow is high (the receive register can take a byte) and either it
// has a byte to send (tx_valid) or the slave signals pending return data
// (irq). The byte to send is taken (tx_take pulse) at the start of the frame
// and sent with valid = 1; otherwise the frame carries valid = 0. At the end
// of the frame a returned byte whose valid bit is set is delivered with an
// rx_valid pulse. SCLK is clk / (2 * HALF_PERIOD); MISO is sampled at the end
// of the high phase, after a two-flop synchroniser, so the slave may be
// clocked independently. The 9-bit framing, the irq line and the default
// rate are this design's choices.
module spi_master #(
  parameter int HALF_PERIOD = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_take,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic       rx_allow,
  input  logic       irq,
  output logic       sclk,
  output logic       cs_n,
  output logic       mosi,
  input  logic       miso
);
  localparam int CW = $clog2(2 * HALF_PERIOD + 1);

  typedef enum logic [2:0] {M_IDLE, M_LOW, M_HIGH, M_END, M_GAP} mstate_e;

  mstate_e       st;
  logic [CW-1:0] cnt;
  logic [3:0]    bitn;
  logic [8:0]    osh, ish;
  logic [1:0]    miso_s, irq_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= M_IDLE;
      cnt      <= '0;
      bitn     <= '0;
      osh      <= '0;
      ish      <= '0;
      miso_s   <= '0;
      irq_s    <= '0;
      sclk     <= 1'b0;
      cs_n     <= 1'b1;
      mosi     <= 1'b0;
      tx_take  <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      miso_s   <= {miso_s[0], miso};
      irq_s    <= {irq_s[0], irq};
      tx_take  <= 1'b0;
      rx_valid <= 1'b0;
      unique case (st)
        M_IDLE: if (rx_allow && (tx_valid || irq_s[1])) begin
          osh     <= {tx_valid, tx_data};
          mosi    <= tx_valid;
          tx_take <= tx_valid;
          cs_n    <= 1'b0;
          bitn    <= 4'd8;
          cnt     <= CW'(HALF_PERIOD - 1);
          st      <= M_LOW;
        end
        M_LOW: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            sclk <= 1'b1;
            cnt  <= CW'(HALF_PERIOD - 1);
            st   <= M_HIGH;
          end
        end
        M_HIGH: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            sclk <= 1'b0;
            ish  <= {ish[7:0], miso_s[1]};
            cnt  <= CW'(HALF_PERIOD - 1);
            if (bitn == 0) st <= M_END;
            else begin
              bitn <= bitn - 1'b1;
              mosi <= osh[bitn - 1'b1];
              st   <= M_LOW;
            end
          end
        end
        M_END: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            cs_n     <= 1'b1;
            mosi     <= 1'b0;
            rx_data  <= ish[7:0];
            rx_valid <= ish[8];
            cnt      <= CW'(2 * HALF_PERIOD);
            st       <= M_GAP;
          end
        end
        M_GAP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else          st  <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
