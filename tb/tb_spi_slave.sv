// tb_spi_slave: spi_slave driven by a behavioural master. Checks received
// bytes and their valid bit, returned bytes, the tx_take pulse per sent
// byte, irq, and that frames with valid = 0 deliver nothing.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk, cs_n, mosi, miso, rx_valid, tx_valid, tx_take, irq;
  logic [7:0] rx_data, tx_data;

  spi_slave dut (.*);
  tb_spi_master_model #(.HALF(4)) mst (.clk, .sclk, .cs_n, .mosi, .miso);

  int checks = 0, failures = 0;
  byte unsigned rcvd[$], retq[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && rx_valid) rcvd.push_back(rx_data);
    if (rst_n && tx_take) void'(retq.pop_front());
  end
  assign tx_valid = retq.size() > 0;
  assign tx_data  = retq.size() > 0 ? retq[0] : 8'h00;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rv;
    logic [7:0] rd;
    byte unsigned exp_rx[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!irq, "no irq when nothing to return");
    for (int i = 0; i < 12; i++) begin
      bit v;
      logic [7:0] d;
      byte unsigned r;
      bit had;
      v = $urandom_range(0, 1);
      d = 8'($urandom());
      had = retq.size() > 0;
      r = had ? retq[0] : 8'h00;
      if (i == 3 || i == 7) begin
        retq.push_back(8'($urandom()));
        retq.push_back(8'($urandom()));
        repeat (2) @(posedge clk);
        check(irq, "irq while bytes wait");
        had = 1;
        r = retq[0];
      end
      if (v) exp_rx.push_back(d);
      mst.xfer(v, d, rv, rd);
      repeat (4) @(posedge clk);
      check(rv == had, $sformatf("frame %0d return valid bit", i));
      if (had) check(rd == r, $sformatf("frame %0d returned %02x expected %02x", i, rd, r));
    end
    check(rcvd == exp_rx, "received bytes");
    check(retq.size() == 0 && !irq, "all returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
