// tb_bench_net: a 4-instrument flat network (8, 16, 32, 8 bits) driven scan
// by scan. Random SIB patterns are opened with a configuration scan, random
// data is shifted through the active path, and the test checks the path
// length, the captured (read-back) bits, the written instrument values and
// that the SIBs close again.
module tb_bench_net;
  import tb_cmd_pkg::*;
  localparam int N = 4;
  localparam int TOT = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic capture, shift, update, tdi, tdo;
  logic [TOT-1:0] inst_val;
  logic [N-1:0] sib_open;
  bench_net #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [1:N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input bit din[$], output bit dout[$]);
    dout.delete();
    @(negedge clk); capture = 1;
    @(negedge clk); capture = 0;
    foreach (din[i]) begin
      shift = 1; tdi = din[i];
      #1 dout.push_back(tdo);
      @(negedge clk);
    end
    shift = 0;
    update = 1;
    @(negedge clk); update = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; shift = 0; update = 0; tdi = 0;
    for (int k = 1; k <= N; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (30) begin
      bit scr [1:N];
      bit din[$], dout[$], expo[$];
      logic [31:0] w [1:N];
      for (int k = 1; k <= N; k++) begin
        scr[k] = $urandom_range(0, 1);
        w[k] = $urandom() & 32'((64'd1 << blen(k)) - 1);
      end
      // configuration scan: SIB N is nearest tdo
      din.delete();
      for (int k = N; k >= 1; k--) din.push_back(scr[k]);
      scan(din, dout);
      for (int k = 1; k <= N; k++) check(sib_open[k-1] == scr[k], "SIB opened");
      // data scan
      din.delete(); expo.delete();
      for (int k = N; k >= 1; k--) begin
        din.push_back(1'b0); expo.push_back(scr[k]);
        if (scr[k]) for (int b = 0; b < blen(k); b++) begin
          din.push_back(w[k][b]); expo.push_back(model[k][b]);
        end
      end
      scan(din, dout);
      check(dout == expo, "captured bits along the active path");
      for (int k = 1; k <= N; k++) if (scr[k]) model[k] = w[k];
      for (int k = 1; k <= N; k++)
        check((64'(inst_val >> boff(k)) & ((64'd1 << blen(k)) - 1)) == 64'(model[k]),
              $sformatf("instrument %0d value", k));
      check(sib_open == '0, "closed after the data scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
