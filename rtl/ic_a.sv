// ic_a: the level-i IC, which passes commands from the host to the next IC
// and returns that IC's answers.
//
// Host -> uart_rx -> receive FIFO -> access_ctrl (EXT = 1) -> transmit FIFO
// -> uart_tx -> host. The controller operates bridge_net, whose instruments
// iA..iD connect the scan world to spi_master: a byte written into iA is sent
// to the next IC, a byte returned by the next IC lands in iB and raises iC,
// and writing iD frees iB again. With HW_IRQ = 1 the controller reads iB on
// its own whenever iC is set (interrupt-driven); with HW_IRQ = 0 the host
// polls iC and reads iB with ordinary commands (polling-driven). The FIFO
// depth, UART bit time and SPI rate are this design's choices.
module ic_a #(
  parameter bit HW_IRQ            = 1'b1,
  parameter int UART_CLKS_PER_BIT = 868,
  parameter int SPI_HALF_PERIOD   = 4,
  parameter int FIFO_DEPTH        = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic spi_sclk,
  output logic spi_cs_n,
  output logic spi_mosi,
  input  logic spi_miso,
  input  logic spi_irq,
  output logic uart_overflow
);
  import ijtag_pkg::*;

  logic [7:0] urx_data, crx_data, ctx_data, utx_data;
  logic       urx_valid, urx_ready, crx_valid, crx_ready;
  logic       ctx_valid, ctx_ready, utx_valid, utx_ready;
  logic       cap, sh, upd, tdi, tdo;
  logic [7:0] send_data, recv_data;
  logic       send_valid, send_take, recv_valid, recv_free, flag;

  uart_rx #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_urx (
    .clk, .rst_n, .rxd(uart_rxd), .data(urx_data), .valid(urx_valid));

  byte_fifo #(.DEPTH(FIFO_DEPTH)) u_rxq (
    .clk, .rst_n, .wr_data(urx_data), .wr_valid(urx_valid), .wr_ready(urx_ready),
    .rd_data(crx_data), .rd_valid(crx_valid), .rd_ready(crx_ready));

  always_ff @(posedge clk) begin
    if (!rst_n)                       uart_overflow <= 1'b0;
    else if (urx_valid && !urx_ready) uart_overflow <= 1'b1;
  end

  access_ctrl #(.N(BR_N), .EXT(1'b1), .HW_IRQ(HW_IRQ)) u_ctrl (
    .clk, .rst_n,
    .rx_data(crx_data), .rx_valid(crx_valid), .rx_ready(crx_ready),
    .tx_data(ctx_data), .tx_valid(ctx_valid), .tx_ready(ctx_ready),
    .net_capture(cap), .net_shift(sh), .net_update(upd), .net_tdi(tdi), .net_tdo(tdo),
    .irq(flag), .stream_busy(send_valid), .busy());

  byte_fifo #(.DEPTH(FIFO_DEPTH)) u_txq (
    .clk, .rst_n, .wr_data(ctx_data), .wr_valid(ctx_valid), .wr_ready(ctx_ready),
    .rd_data(utx_data), .rd_valid(utx_valid), .rd_ready(utx_ready));

  uart_tx #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_utx (
    .clk, .rst_n, .data(utx_data), .valid(utx_valid), .ready(utx_ready), .txd(uart_txd));

  bridge_net u_net (
    .clk, .rst_n, .capture(cap), .shift(sh), .update(upd), .tdi, .tdo,
    .send_data, .send_valid, .send_take,
    .recv_data, .recv_valid, .recv_free, .flag);

  spi_master #(.HALF_PERIOD(SPI_HALF_PERIOD)) u_spi (
    .clk, .rst_n,
    .tx_data(send_data), .tx_valid(send_valid), .tx_take(send_take),
    .rx_data(recv_data), .rx_valid(recv_valid), .rx_allow(recv_free),
    .irq(spi_irq), .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));
endmodule
