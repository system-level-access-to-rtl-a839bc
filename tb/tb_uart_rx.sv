// tb_uart_rx: drives 8N1 frames with random bytes and random idle gaps and
// checks every received byte; a frame with a broken stop bit must be dropped.
module tb_uart_rx;
  localparam int CPB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd = 1;
  logic [7:0] data;
  logic valid;
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned got[$];

  always @(posedge clk) if (rst_n && valid) got.push_back(data);

  task automatic send(logic [7:0] b, bit stop);
    logic [9:0] fr;
    fr = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = fr[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1;
    repeat (CPB + $urandom_range(0, 5)) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned sent[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    repeat (40) begin
      byte unsigned b;
      b = 8'($urandom());
      if ($urandom_range(0, 7) == 0) send(b, 1'b0);     // framing error: dropped
      else begin
        send(b, 1'b1);
        sent.push_back(b);
      end
    end
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++;
      $display("FAIL: received %0d bytes, sent %0d good frames", got.size(), sent.size());
    end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin
        failures++;
        $display("FAIL: byte %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
