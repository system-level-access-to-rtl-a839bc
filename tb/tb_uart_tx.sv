// tb_uart_tx: sends random bytes and decodes the serial line independently,
// checking the start bit, the data bits, the stop bit and the frame length
// of 10 bit times.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] data;
  logic valid, ready, txd;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(txd == 1'b1, "idle line high");
    repeat (30) begin
      logic [7:0] b, got;
      int t0, t1;
      b = 8'($urandom());
      @(negedge clk);
      data = b; valid = 1;
      @(posedge clk);
      t0 = int'($time);              // the start bit begins at this edge
      #1 valid = 0;
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("byte %02x sent as %02x", b, got));
      wait (ready); t1 = int'($time);
      check((t1 - t0) / 10 >= 10 * CPB - 1 && (t1 - t0) / 10 <= 10 * CPB + 1,
            $sformatf("frame took %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
