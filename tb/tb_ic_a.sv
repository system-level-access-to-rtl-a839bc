// tb_ic_a: the level-i chip on its own, with a behavioural SPI slave in
// place of the next chip, built twice: interrupt-driven and polling-driven.
// Checks that a wrapped payload arrives byte for byte on SPI, that bytes the
// slave returns reach the host by themselves (interrupt build) or through
// polling iC and reading iB (polling build), and that a poll with nothing
// pending reads 0.
module tb_ic_a;
  import tb_cmd_pkg::*;
  import ijtag_pkg::*;
  localparam int CPB = 4;   // UART faster than SPI: the send register fills up
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd [2], txd [2], sclk [2], cs_n [2], mosi [2], miso [2], irq [2], ovf [2];

  ic_a #(.HW_IRQ(1'b1), .UART_CLKS_PER_BIT(CPB)) d0 (
    .clk, .rst_n, .uart_rxd(rxd[0]), .uart_txd(txd[0]), .spi_sclk(sclk[0]), .spi_cs_n(cs_n[0]),
    .spi_mosi(mosi[0]), .spi_miso(miso[0]), .spi_irq(irq[0]), .uart_overflow(ovf[0]));
  ic_a #(.HW_IRQ(1'b0), .UART_CLKS_PER_BIT(CPB)) d1 (
    .clk, .rst_n, .uart_rxd(rxd[1]), .uart_txd(txd[1]), .spi_sclk(sclk[1]), .spi_cs_n(cs_n[1]),
    .spi_mosi(mosi[1]), .spi_miso(miso[1]), .spi_irq(irq[1]), .uart_overflow(ovf[1]));
  tb_spi_slave_model s0 (.sclk(sclk[0]), .cs_n(cs_n[0]), .mosi(mosi[0]), .miso(miso[0]), .irq(irq[0]));
  tb_spi_slave_model s1 (.sclk(sclk[1]), .cs_n(cs_n[1]), .mosi(mosi[1]), .miso(miso[1]), .irq(irq[1]));

  int checks = 0, failures = 0;
  bq_t rq0, rq1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(int w, bq_t q);
    foreach (q[i]) begin
      logic [9:0] fr;
      fr = {1'b1, q[i], 1'b0};
      for (int b = 0; b < 10; b++) begin
        rxd[w] = fr[b];
        repeat (CPB) @(posedge clk);
      end
    end
  endtask

  initial forever begin
    logic [7:0] b;
    @(negedge txd[0]);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd[0]; end
    repeat (CPB) @(posedge clk);
    rq0.push_back(b);
  end
  initial forever begin
    logic [7:0] b;
    @(negedge txd[1]);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd[1]; end
    repeat (CPB) @(posedge clk);
    rq1.push_back(b);
  end

  task automatic read_reg(int idx, output byte unsigned b);
    bq_t q;
    int t = 0;
    add_ctrl(q, idx, 1'b0);
    add_data(q, 0);
    send(1, q);
    while (rq1.size() == 0 && t < 20000) begin @(posedge clk); t++; end
    b = rq1.size() > 0 ? rq1.pop_front() : 8'hxx;
    check(t < 20000, "answer to a register read");
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t pay;
    byte unsigned ret[$];
    rxd[0] = 1; rxd[1] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // forward a payload on both builds
    for (int i = 0; i < 9; i++) pay.push_back(8'($urandom()));
    fork
      send(0, wrap(pay));
      send(1, wrap(pay));
    join
    for (int t = 0; t < 5000 && (s0.got_q.size() < pay.size() || s1.got_q.size() < pay.size()); t++)
      @(posedge clk);
    repeat (400) @(posedge clk);
    check(s0.got_q == pay, "interrupt build forwarded the payload");
    check(s1.got_q == pay, "polling build forwarded the payload");
    // return path, interrupt build
    for (int i = 0; i < 4; i++) begin
      ret.push_back(8'($urandom()));
      s0.ret_q.push_back(ret[i]);
    end
    wait (rq0.size() == 4);
    check(rq0 == ret, "returned bytes delivered without host action");
    // return path, polling build
    begin
      byte unsigned f, b;
      read_reg(BR_IC, f);
      check(f == 8'h00, "idle poll reads 0");
      s1.ret_q.push_back(8'hc3);
      s1.ret_q.push_back(8'h7e);
      repeat (200) @(posedge clk);
      read_reg(BR_IC, f);
      check(f == 8'h01, "poll sees the flag");
      read_reg(BR_IB, b);
      check(b == 8'hc3, "first byte read from iB");
      repeat (200) @(posedge clk);
      read_reg(BR_IC, f);
      check(f == 8'h01, "second byte arrived after the acknowledge");
      read_reg(BR_IB, b);
      check(b == 8'h7e, "second byte read from iB");
      repeat (200) @(posedge clk);
      read_reg(BR_IC, f);
      check(f == 8'h00, "flag clear when drained");
    end
    check(rq0.size() == 4 && !ovf[0] && !ovf[1], "nothing extra");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
