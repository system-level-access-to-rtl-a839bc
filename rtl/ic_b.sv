// ic_b: the level-i+1 IC that holds the instruments of the benchmarks.
//
// SPI -> spi_slave -> receive FIFO -> access_ctrl (EXT = 0) -> transmit FIFO
// -> spi_slave -> SPI. The controller interprets the bytes it receives as
// control and data commands and operates bench_net, N flat SIB-gated
// instruments of 8, 16 and 32 bits. Read data goes back through the transmit
// FIFO; spi_irq tells the level-i IC that bytes are waiting. overflow is a
// sticky flag set when a byte arrives while the receive FIFO is full. All
// instrument values are brought out on inst_val (layout as in bench_net).
module ic_b
  import ijtag_pkg::*;
#(
  parameter int N_INSTR    = 150,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       spi_sclk,
  input  logic                       spi_cs_n,
  input  logic                       spi_mosi,
  output logic                       spi_miso,
  output logic                       spi_irq,
  output logic                       overflow,
  output logic [bench_bits(N_INSTR)-1:0] inst_val
);
  logic [7:0] srx_data, crx_data, ctx_data, stx_data;
  logic       srx_valid, srx_ready, crx_valid, crx_ready;
  logic       ctx_valid, ctx_ready, stx_valid, stx_take;
  logic       cap, sh, upd, tdi, tdo;

  spi_slave u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .rx_data(srx_data), .rx_valid(srx_valid),
    .tx_data(stx_data), .tx_valid(stx_valid), .tx_take(stx_take), .irq(spi_irq));

  byte_fifo #(.DEPTH(FIFO_DEPTH)) u_rxq (
    .clk, .rst_n, .wr_data(srx_data), .wr_valid(srx_valid), .wr_ready(srx_ready),
    .rd_data(crx_data), .rd_valid(crx_valid), .rd_ready(crx_ready));

  always_ff @(posedge clk) begin
    if (!rst_n)                       overflow <= 1'b0;
    else if (srx_valid && !srx_ready) overflow <= 1'b1;
  end

  access_ctrl #(.N(N_INSTR), .EXT(1'b0), .HW_IRQ(1'b0)) u_ctrl (
    .clk, .rst_n,
    .rx_data(crx_data), .rx_valid(crx_valid), .rx_ready(crx_ready),
    .tx_data(ctx_data), .tx_valid(ctx_valid), .tx_ready(ctx_ready),
    .net_capture(cap), .net_shift(sh), .net_update(upd), .net_tdi(tdi), .net_tdo(tdo),
    .irq(1'b0), .stream_busy(1'b0), .busy());

  byte_fifo #(.DEPTH(FIFO_DEPTH)) u_txq (
    .clk, .rst_n, .wr_data(ctx_data), .wr_valid(ctx_valid), .wr_ready(ctx_ready),
    .rd_data(stx_data), .rd_valid(stx_valid), .rd_ready(stx_take));

  bench_net #(.N(N_INSTR)) u_net (
    .clk, .rst_n, .capture(cap), .shift(sh), .update(upd), .tdi, .tdo,
    .inst_val, .sib_open());
endmodule
