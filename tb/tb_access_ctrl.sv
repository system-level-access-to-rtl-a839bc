// tb_access_ctrl: access_ctrl (EXT = 0) operating a small bench_net.
//
// Sends control/data commands as byte streams with random gaps, takes the
// returned bytes with random back-pressure, and checks the returned bytes
// and every instrument value against a reference model. Also checks that a
// data command costs exactly two scans (2*N + selected length shift clocks)
// and, without gaps, 7 + 2*N + selected length clocks in all.
module tb_access_ctrl;
  import tb_cmd_pkg::*;

  localparam int N = 6;
  localparam int TOT = 56 * (N / 3);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] rx_data, tx_data;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic cap, sh, upd, tdi, tdo, busy;
  logic [TOT-1:0] inst_val;

  access_ctrl #(.N(N)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_ready, .tx_data, .tx_valid, .tx_ready,
    .net_capture(cap), .net_shift(sh), .net_update(upd), .net_tdi(tdi), .net_tdo(tdo),
    .irq(1'b0), .stream_busy(1'b0), .busy);

  bench_net #(.N(N)) net (
    .clk, .rst_n, .capture(cap), .shift(sh), .update(upd), .tdi, .tdo,
    .inst_val, .sib_open());

  int checks = 0, failures = 0;
  bq_t inq, outq;
  bit gaps = 1, bp = 1;
  logic [31:0] model [1:N];
  int shifts = 0, updates = 0, stalls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // byte feeder
  always_ff @(posedge clk) begin
    if (rx_valid && rx_ready) void'(inq.pop_front());
  end
  always_comb begin
    rx_valid = 1'b0;
    rx_data  = 8'h00;
    if (inq.size() > 0 && !gate_off) begin
      rx_valid = 1'b1;
      rx_data  = inq[0];
    end
  end
  logic gate_off, bp_off;
  always_ff @(posedge clk) begin
    gate_off <= gaps && ($urandom_range(0, 3) == 0);
    bp_off   <= bp && ($urandom_range(0, 2) == 0);
    if (tx_valid && tx_ready) outq.push_back(tx_data);
    if (sh) shifts <= shifts + 1;
    if (upd) updates <= updates + 1;
    if (busy && tx_valid && !tx_ready) stalls <= stalls + 1;
  end
  assign tx_ready = !bp_off;

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 6) begin
      @(posedge clk);
      if (inq.size() == 0 && !busy && !tx_valid) quiet++;
      else quiet = 0;
    end
  endtask

  // One access: ops[i] = {idx, wr, value}
  typedef struct { int idx; bit wr; logic [31:0] val; } op_t;

  task automatic access(op_t ops[$]);
    bq_t q, expq;
    int sel_len = 0;
    int s0, u0;
    foreach (ops[i]) add_ctrl(q, ops[i].idx, ops[i].wr);
    // payload and expected return, in scan order (highest index first)
    begin
      bq_t pay;
      for (int k = N; k >= 1; k--)
        foreach (ops[i]) if (ops[i].idx == k) begin
          sel_len += blen(k);
          for (int b = 0; b < blen(k) / 8; b++) begin
            if (ops[i].wr) pay.push_back(byte'(ops[i].val >> (8 * b)));
            else           expq.push_back(byte'(model[k] >> (8 * b)));
          end
        end
      add_data(q, pay.size());
      foreach (pay[i]) q.push_back(pay[i]);
    end
    foreach (ops[i]) if (ops[i].wr) model[ops[i].idx] = ops[i].val & ((64'd1 << blen(ops[i].idx)) - 1);
    outq.delete();
    s0 = shifts; u0 = updates;
    foreach (q[i]) inq.push_back(q[i]);
    wait_idle();
    check(outq.size() == expq.size(), $sformatf("returned %0d bytes, expected %0d", outq.size(), expq.size()));
    foreach (expq[i]) if (i < outq.size())
      check(outq[i] == expq[i], $sformatf("byte %0d: got %02x expected %02x", i, outq[i], expq[i]));
    check(shifts - s0 == 2 * N + sel_len, $sformatf("shift clocks %0d, expected %0d", shifts - s0, 2 * N + sel_len));
    check(updates - u0 == 2, "two scans per data command");
    for (int k = 1; k <= N; k++)
      check(inst_val[boff(k) +: 32] == (model[k] & ((64'd1 << blen(k)) - 1)) ||
            blen(k) < 32 && inst_val[boff(k) +: 8] == model[k][7:0] && (blen(k) == 8 || inst_val[boff(k) +: 16] == model[k][15:0]),
            $sformatf("instrument %0d value", k));
  endtask


  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_t ops[$];
    for (int k = 1; k <= N; k++) model[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write two instruments in one access
    ops = '{'{1, 1'b1, 32'h5a}, '{3, 1'b1, 32'hdeadbeef}};
    access(ops);
    // the documented example: write i1, read i3
    ops = '{'{1, 1'b1, 32'h3c}, '{3, 1'b0, 32'h0}};
    access(ops);
    // write all, then read all
    ops.delete();
    for (int k = 1; k <= N; k++) ops.push_back('{k, 1'b1, $urandom()});
    access(ops);
    ops.delete();
    for (int k = 1; k <= N; k++) ops.push_back('{k, 1'b0, 32'h0});
    access(ops);
    // reading does not disturb: read again
    access(ops);
    // random mixes
    repeat (20) begin
      ops.delete();
      for (int k = 1; k <= N; k++)
        if ($urandom_range(0, 1)) ops.push_back('{k, 1'(($urandom_range(0, 1))), $urandom()});
      if (ops.size() == 0) ops.push_back('{2, 1'b0, 0});
      access(ops);
    end
    // exact timing without gaps or back-pressure: read i2 (16 bits)
    gaps = 0; bp = 0;
    begin
      bq_t q;
      int t0, t1;
      add_ctrl(q, 2, 1'b0);
      add_data(q, 0);
      outq.delete();
      foreach (q[i]) inq.push_back(q[i]);
      wait (inq.size() == 0); t0 = int'($time);   // last header byte taken
      @(negedge busy); t1 = int'($time);
      check((t1 - t0) / 10 == 7 + 2 * N + 16, $sformatf("access took %0d clocks, expected %0d", (t1 - t0) / 10, 7 + 2 * N + 16));
      wait_idle();
      check(outq.size() == 2 && outq[0] == model[2][7:0] && outq[1] == model[2][15:8], "timed read data");
    end
    // a payload that no instrument takes is discarded
    begin
      bq_t q;
      add_ctrl(q, 4, 1'b0);
      add_data(q, 3);
      q.push_back(8'h11); q.push_back(8'h22); q.push_back(8'h33);
      outq.delete();
      foreach (q[i]) inq.push_back(q[i]);
      wait_idle();
      check(outq.size() == 1 && outq[0] == model[4][7:0], "read with discarded payload");
      check(!busy && inq.size() == 0, "payload drained");
    end
    check(stalls > 0, "output back-pressure seen while busy");
    $display("stall clocks: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
