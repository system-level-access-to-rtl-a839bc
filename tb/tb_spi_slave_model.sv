// tb_spi_slave_model: behavioural SPI slave for testbenches, speaking the
// 9-bit frame of spi_master (mode 0, valid bit then byte, MSB first).
// Bytes pushed into ret_q are returned one per frame; irq is high while
// ret_q is not empty. Received valid bytes are appended to got_q.
module tb_spi_slave_model (
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  output logic irq
);
  byte unsigned ret_q[$], got_q[$];
  logic [8:0] osh, ish;
  int nbits;
  bit sent;
  int frames = 0;

  assign irq = ret_q.size() > 0;
  initial miso = 1'b0;

  always @(negedge cs_n) begin
    sent  = ret_q.size() > 0;
    osh   = {sent, sent ? ret_q[0] : 8'h00};
    miso  = osh[8];
    nbits = 0;
  end
  always @(posedge sclk) if (!cs_n) begin
    ish = {ish[7:0], mosi};
    nbits++;
  end
  always @(negedge sclk) if (!cs_n) begin
    osh  = {osh[7:0], 1'b0};
    miso = osh[8];
  end
  always @(posedge cs_n) begin
    frames++;
    if (nbits == 9) begin
      if (ish[8]) got_q.push_back(ish[7:0]);
      if (sent) void'(ret_q.pop_front());
    end
  end
endmodule
