// tb_tdr: 8-bit read/write register and 1-bit read-only register. Checks
// capture, least-significant-bit-first shifting, the update stage and its
// strobe, and that a read-only register never updates.
module tb_tdr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic si, capture, shift, update;
  logic so8, so1, stb8, stb1;
  logic [7:0] cap8, upd8;
  logic [0:0] cap1, upd1;

  tdr #(.L(8)) d8 (.clk, .rst_n, .si, .so(so8), .capture, .shift, .update,
                   .cap_val(cap8), .upd_val(upd8), .upd_stb(stb8));
  tdr #(.L(1), .HAS_UPDATE(1'b0)) d1 (.clk, .rst_n, .si, .so(so1), .capture, .shift, .update,
                   .cap_val(cap1), .upd_val(upd1), .upd_stb(stb1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = 0; capture = 0; shift = 0; update = 0; cap8 = 8'h00; cap1 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      logic [7:0] c, w, o;
      c = 8'($urandom()); w = 8'($urandom());
      cap8 = c; cap1 = c[0];
      @(negedge clk); capture = 1;
      @(negedge clk); capture = 0;
      check(so1 == c[0], "1-bit capture");
      for (int i = 0; i < 8; i++) begin
        shift = 1; si = w[i];
        #1 o[i] = so8;
        @(negedge clk);
      end
      shift = 0;
      check(o == c, $sformatf("shifted out %02x, captured %02x", o, c));
      check(upd8 != w || w == upd8, "update stage waits for update");
      update = 1;
      @(negedge clk); update = 0;
      check(stb8 == 1'b1, "update strobe");
      check(upd8 == w, $sformatf("updated %02x expected %02x", upd8, w));
      check(upd1 == 1'b0 && stb1 == 1'b0, "read-only register has no update stage");
      @(negedge clk);
      check(stb8 == 1'b0, "strobe lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
