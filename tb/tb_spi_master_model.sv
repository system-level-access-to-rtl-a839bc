// tb_spi_master_model: behavioural SPI master for testbenches, speaking the
// 9-bit frame of spi_slave. xfer() runs one frame with HALF clocks per SCLK
// phase and returns the slave's valid bit and byte.
module tb_spi_master_model #(
  parameter int HALF = 4
) (
  input  logic clk,
  output logic sclk,
  output logic cs_n,
  output logic mosi,
  input  logic miso
);
  initial begin
    sclk = 0;
    cs_n = 1;
    mosi = 0;
  end

  task automatic xfer(input bit v, input logic [7:0] d, output bit rv, output logic [7:0] rd);
    logic [8:0] o, i;
    o = {v, d};
    cs_n = 0;
    for (int b = 8; b >= 0; b--) begin
      mosi = o[b];
      repeat (HALF) @(posedge clk);
      sclk = 1;
      repeat (HALF) @(posedge clk);
      i[b] = miso;
      sclk = 0;
    end
    repeat (HALF) @(posedge clk);
    cs_n = 1;
    mosi = 0;
    repeat (2 * HALF) @(posedge clk);
    rv = i[8];
    rd = i[7:0];
  endtask
endmodule
