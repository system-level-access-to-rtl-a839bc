// tb_byte_fifo: random pushes and pops against a queue model; checks order,
// the full and empty flags and that a push into a full FIFO is refused.
module tb_byte_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] wr_data, rd_data;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  byte_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned model[$];
  int n_full = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (rd_valid != (model.size() > 0) || wr_ready != (model.size() < DEPTH) ||
          (rd_valid && rd_data != model[0])) begin
        failures++;
        $display("FAIL: size %0d rd_valid %0d wr_ready %0d data %02x", model.size(), rd_valid, wr_ready, rd_data);
      end
      if (!wr_ready) n_full++;
      wr_valid = $urandom_range(0, 1);
      wr_data  = 8'($urandom());
      rd_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && model.size() < DEPTH + (rd_valid && rd_ready ? 1 : 0) && wr_ready) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
