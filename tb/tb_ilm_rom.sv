// tb_ilm_rom: both length tables against the length rules, including
// out-of-range indices.
module tb_ilm_rom;
  import ijtag_pkg::*;
  logic [IW-1:0] idx;
  logic [LW-1:0] len_b, len_r;
  ilm_rom #(.N(150), .KIND(0)) rb (.idx, .len(len_b));
  ilm_rom #(.N(4), .KIND(1)) rr (.idx, .len(len_r));

  int checks = 0, failures = 0;
  initial begin
    int exp_r [5] = '{0, 9, 8, 1, 1};
    for (int i = 0; i <= 160; i++) begin
      int eb;
      idx = IW'(i);
      #1;
      eb = (i >= 1 && i <= 150) ? (i % 3 == 1 ? 8 : i % 3 == 2 ? 16 : 32) : 0;
      checks++;
      if (len_b != LW'(eb)) begin failures++; $display("FAIL: bench %0d -> %0d", i, len_b); end
      checks++;
      if (len_r != LW'(i <= 4 ? exp_r[i] : 0)) begin failures++; $display("FAIL: bridge %0d -> %0d", i, len_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
