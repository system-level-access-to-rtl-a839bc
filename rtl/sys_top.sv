// sys_top: a two-level system giving a host access to the instruments of a
// chip that it can only reach through another chip.
//
// The host talks UART to ic_a (level i); ic_a talks SPI to ic_b (level i+1),
// which holds N_INSTR instruments. A host access to ic_b is wrapped: a
// control command selecting iA in ic_a, then a data command whose payload is
// the complete command sequence for ic_b. ic_a streams that payload byte by
// byte over SPI; ic_b executes it and returns read data over SPI into ic_a's
// iB register, from where it reaches the host either by itself
// (HW_IRQ = 1, interrupt-driven) or when the host polls iC and reads iB
// (HW_IRQ = 0, polling-driven). Both chips share one clock here; the SPI
// slave oversamples its inputs, so separate clocks would also work.
module sys_top #(
  parameter int N_INSTR           = 150,
  parameter bit HW_IRQ            = 1'b1,
  parameter int UART_CLKS_PER_BIT = 868,
  parameter int SPI_HALF_PERIOD   = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic uart_overflow,
  output logic spi_overflow
);
  logic sclk, cs_n, mosi, miso, irq;

  ic_a #(.HW_IRQ(HW_IRQ), .UART_CLKS_PER_BIT(UART_CLKS_PER_BIT),
         .SPI_HALF_PERIOD(SPI_HALF_PERIOD)) u_ic_a (
    .clk, .rst_n, .uart_rxd, .uart_txd,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .spi_irq(irq),
    .uart_overflow);

  ic_b #(.N_INSTR(N_INSTR)) u_ic_b (
    .clk, .rst_n,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .spi_irq(irq),
    .overflow(spi_overflow), .inst_val());
endmodule
