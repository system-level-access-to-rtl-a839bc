// tb_sib: a SIB with a 3-bit shift register as its segment. Checks that the
// closed SIB is a one-bit path, that an update of 1 opens it and splices the
// segment in ahead of the SIB bit (path 4 bits), that the segment only sees
// enables while open, and that capture loads the SIB's own state.
module tb_sib;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic si, capture, shift, update, so, seg_si, seg_so, seg_capture, seg_shift, seg_update, open_o;
  sib dut (.*);

  logic [2:0] seg;
  always_ff @(posedge clk) if (seg_shift) seg <= {seg_si, seg[2:1]};
  assign seg_so = seg[0];

  int checks = 0, failures = 0;
  int seg_updates = 0;
  always @(posedge clk) if (seg_update) seg_updates++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one scan: capture, shift n bits of din (bit 0 first), update; returns so bits
  task automatic scan(input int n, input logic [15:0] din, output logic [15:0] dout);
    @(negedge clk); capture = 1;
    @(negedge clk); capture = 0;
    for (int i = 0; i < n; i++) begin
      shift = 1; si = din[i];
      #1 dout[i] = so;
      @(negedge clk);
    end
    shift = 0;
    update = 1;
    @(negedge clk); update = 0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] o;
    si = 0; capture = 0; shift = 0; update = 0; seg = 3'b000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!open_o, "closed after reset");
    scan(1, 16'h1, o);                      // open
    check(o[0] == 1'b0, "captured closed state");
    check(open_o, "opened by update");
    check(seg_updates == 0, "segment not updated while closed");
    scan(4, 16'b1010, o);                   // first bit ends in the SIB (0), then seg = 101
    check(o[0] == 1'b1, "captured open state first out");
    check(!open_o, "closed again by last bit");
    check(seg == 3'b101, $sformatf("segment shifted in, got %b", seg));
    check(seg_updates == 1, "segment updated in the closing scan");
    scan(1, 16'h0, o);
    check(seg == 3'b101, "closed segment holds its value");
    check(!capture || !seg_capture, "no capture pass-through when closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
