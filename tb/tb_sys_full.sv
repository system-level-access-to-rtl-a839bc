// tb_sys_full: one complete host access through the two-chip system at its
// default size (150 instruments in the far chip, 868-clock UART bit,
// interrupt-driven return path).
//
// The host writes instruments 1 (8 bits), 74 (16 bits) and 150 (32 bits) in
// one wrapped access, then reads the three back in a second access and
// checks the seven returned bytes (scan order: instrument 150 first, each
// least significant byte first).
module tb_sys_full;
  import tb_cmd_pkg::*;

  localparam int CPB = 868;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd = 1, txd, ovf_u, ovf_s;

  sys_top dut (.clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd),
               .uart_overflow(ovf_u), .spi_overflow(ovf_s));

  int checks = 0, failures = 0;
  bq_t rq;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(bq_t q);
    foreach (q[i]) begin
      logic [9:0] fr;
      fr = {1'b1, q[i], 1'b0};
      for (int b = 0; b < 10; b++) begin
        rxd = fr[b];
        repeat (CPB) @(posedge clk);
      end
    end
  endtask

  initial forever begin
    logic [7:0] b;
    @(negedge txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = txd;
    end
    repeat (CPB) @(posedge clk);
    rq.push_back(b);
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t q, expq;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // write
    add_ctrl(q, 1, 1'b1);
    add_ctrl(q, 74, 1'b1);
    add_ctrl(q, 150, 1'b1);
    add_data(q, 7);
    q.push_back(8'h78); q.push_back(8'h56); q.push_back(8'h34); q.push_back(8'h12); // 150
    q.push_back(8'hcd); q.push_back(8'hab);                                         // 74
    q.push_back(8'h5a);                                                             // 1
    send(wrap(q));
    // read back
    q.delete();
    add_ctrl(q, 150, 1'b0);
    add_ctrl(q, 1, 1'b0);
    add_ctrl(q, 74, 1'b0);
    add_data(q, 0);
    send(wrap(q));
    expq = '{8'h78, 8'h56, 8'h34, 8'h12, 8'hcd, 8'hab, 8'h5a};
    wait (rq.size() == expq.size());
    foreach (expq[i])
      check(rq[i] == expq[i], $sformatf("byte %0d: got %02x expected %02x", i, rq[i], expq[i]));
    repeat (20 * CPB) @(posedge clk);
    check(rq.size() == expq.size(), "no extra bytes");
    check(!ovf_u && !ovf_s, "no overflow");
    $display("done at cycle %0t", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
