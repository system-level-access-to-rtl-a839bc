// tb_spi_master: spi_master against a behavioural slave. Checks that sent
// bytes arrive in order, that returned bytes are delivered when the slave
// raises irq, that frames without data carry valid = 0, that no frame starts
// while rx_allow is low, and the frame length (9 SCLK periods).
module tb_spi_master;
  localparam int HALF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] tx_data, rx_data;
  logic tx_valid, tx_take, rx_valid, rx_allow, irq, sclk, cs_n, mosi, miso;

  spi_master #(.HALF_PERIOD(HALF)) dut (.*);
  tb_spi_slave_model slv (.sclk, .cs_n, .mosi, .miso, .irq);

  int checks = 0, failures = 0;
  byte unsigned sent[$], rcvd[$], ret[$];
  int sclk_rises = 0, cs_falls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge sclk) sclk_rises++;
  always @(negedge cs_n) cs_falls++;
  always @(posedge clk) if (rst_n && rx_valid) rcvd.push_back(rx_data);

  // byte source
  byte unsigned src[$];
  always @(posedge clk) begin
    if (tx_take) begin
      sent.push_back(src[0]);
      void'(src.pop_front());
    end
  end
  assign tx_valid = src.size() > 0;
  assign tx_data  = src.size() > 0 ? src[0] : 8'h00;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rx_allow = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // send only
    for (int i = 0; i < 10; i++) src.push_back(8'($urandom()));
    wait (src.size() == 0);
    wait (cs_n == 1 && slv.got_q.size() == 10);
    repeat (20) @(posedge clk);
    check(slv.got_q == sent, "bytes received by the slave");
    check(sclk_rises == 9 * cs_falls, "nine clocks per frame");
    // return only
    for (int i = 0; i < 6; i++) begin
      ret.push_back(8'($urandom()));
      slv.ret_q.push_back(ret[i]);
    end
    t0 = cs_falls;
    wait (rcvd.size() == 6);
    repeat (50) @(posedge clk);
    check(rcvd == ret, "bytes returned by the slave");
    check(slv.got_q.size() == 10, "return frames carry no data");
    check(cs_falls - t0 == 6, $sformatf("six return frames, saw %0d", cs_falls - t0));
    // rx_allow low blocks every frame
    rx_allow = 0;
    src.push_back(8'h42);
    slv.ret_q.push_back(8'h99);
    t0 = cs_falls;
    repeat (500) @(posedge clk);
    check(cs_falls == t0, "no frame while rx_allow is low");
    rx_allow = 1;
    wait (rcvd.size() == 7);
    repeat (50) @(posedge clk);
    check(rcvd[6] == 8'h99 && slv.got_q[10] == 8'h42, "full-duplex frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
