// tb_sys_top: end-to-end test of the two-chip system, run on two builds side
// by side: interrupt-driven (HW_IRQ = 1) and polling-driven (HW_IRQ = 0),
// each with 6 instruments in the far chip, a 16-clock UART bit and the
// default SPI rate.
//
// A host model sends wrapped command sequences over the UART and collects
// the answers. It writes and reads single instruments, all instruments, and
// runs the BASTION-style sequence (write all, read all, then write and read
// each instrument), checking every returned byte against a reference model.
// On the polling build the host polls iC and reads iB itself. The test counts
// how often each mechanism of the design occurs and fails if one never does:
// interrupt service, waiting for the send register, automatic acknowledge,
// polls answered "empty" and "ready", return frames on SPI and payload stalls
// in the far chip's controller.
module tb_sys_top;
  import tb_cmd_pkg::*;
  import ijtag_pkg::*;

  localparam int N = 6;
  localparam int CPB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd0 = 1, rxd1 = 1, txd0, txd1;
  logic ovf_u0, ovf_s0, ovf_u1, ovf_s1;

  sys_top #(.N_INSTR(N), .HW_IRQ(1'b1), .UART_CLKS_PER_BIT(CPB)) u_hw (
    .clk, .rst_n, .uart_rxd(rxd0), .uart_txd(txd0), .uart_overflow(ovf_u0), .spi_overflow(ovf_s0));
  sys_top #(.N_INSTR(N), .HW_IRQ(1'b0), .UART_CLKS_PER_BIT(CPB)) u_pl (
    .clk, .rst_n, .uart_rxd(rxd1), .uart_txd(txd1), .uart_overflow(ovf_u1), .spi_overflow(ovf_s1));

  int checks = 0, failures = 0;
  bq_t rq0, rq1;
  logic [31:0] model [1:N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- host UART ----------------
  task automatic send(int w, bq_t q);
    foreach (q[i]) begin
      logic [9:0] fr;
      fr = {1'b1, q[i], 1'b0};
      for (int b = 0; b < 10; b++) begin
        if (w == 0) rxd0 = fr[b]; else rxd1 = fr[b];
        repeat (CPB) @(posedge clk);
      end
    end
  endtask

  initial forever begin
    logic [7:0] b;
    @(negedge txd0);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = txd0;
    end
    repeat (CPB) @(posedge clk);
    rq0.push_back(b);
  end
  initial forever begin
    logic [7:0] b;
    @(negedge txd1);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = txd1;
    end
    repeat (CPB) @(posedge clk);
    rq1.push_back(b);
  end

  task automatic get_byte(int w, output byte unsigned b);
    int t = 0;
    while ((w == 0 ? rq0.size() : rq1.size()) == 0 && t < 200000) begin
      @(posedge clk);
      t++;
    end
    if (t >= 200000) begin
      check(0, "no byte returned");
      b = 0;
    end else if (w == 0) b = rq0.pop_front();
    else                 b = rq1.pop_front();
  endtask

  // ---------------- mechanism counters ----------------
  int n_irq = 0, n_wait = 0, n_ack = 0, n_poll_empty = 0, n_poll_ready = 0;
  int n_ret = 0, n_pstall = 0;
  always_ff @(posedge clk) begin
    if (u_hw.u_ic_a.u_ctrl.state == S_IDLE && u_hw.u_ic_a.u_ctrl.irq_start) n_irq <= n_irq + 1;
    if (u_hw.u_ic_a.u_ctrl.state == S_WAIT && u_hw.u_ic_a.send_valid) n_wait <= n_wait + 1;
    if (u_pl.u_ic_a.u_net.id_stb && u_pl.u_ic_a.u_net.id_val[0]) n_ack <= n_ack + 1;
    if (u_hw.u_ic_b.stx_take || u_pl.u_ic_b.stx_take) n_ret <= n_ret + 1;
    if (u_hw.u_ic_b.u_ctrl.state == S_DAT_SH && u_hw.u_ic_b.u_ctrl.need_byte &&
        !u_hw.u_ic_b.u_ctrl.rx_valid) n_pstall <= n_pstall + 1;
  end

  // ---------------- accesses ----------------
  typedef struct { int idx; bit wr; logic [31:0] val; } op_t;

  // Build the far-chip command for ops, send it wrapped, collect the answer.
  task automatic access(int w, op_t ops[$]);
    bq_t q, pay, expq;
    foreach (ops[i]) add_ctrl(q, ops[i].idx, ops[i].wr);
    for (int k = N; k >= 1; k--)
      foreach (ops[i]) if (ops[i].idx == k)
        for (int b = 0; b < blen(k) / 8; b++)
          if (ops[i].wr) pay.push_back(byte'(ops[i].val >> (8 * b)));
          else           expq.push_back(byte'(model[k] >> (8 * b)));
    add_data(q, pay.size());
    foreach (pay[i]) q.push_back(pay[i]);
    foreach (ops[i]) if (ops[i].wr) model[ops[i].idx] = ops[i].val;
    send(w, wrap(q));
    foreach (expq[i]) begin
      byte unsigned b;
      if (w == 0) get_byte(0, b);
      else        poll_read(b);
      check(b == expq[i], $sformatf("chip %0d byte %0d: got %02x expected %02x", w, i, b, expq[i]));
    end
  endtask

  // Polling: read iC until it is set, then read iB (which also acknowledges).
  task automatic poll_read(output byte unsigned b);
    byte unsigned f;
    bq_t q;
    int tries = 0;
    add_ctrl(q, BR_IC, 1'b0);
    add_data(q, 0);
    do begin
      send(1, q);
      get_byte(1, f);
      if (f == 8'h00) n_poll_empty++;
      else            n_poll_ready++;
      check(f == 8'h00 || f == 8'h01, "polled flag byte is 0 or 1");
      tries++;
    end while (f != 8'h01 && tries < 50);
    q.delete();
    add_ctrl(q, BR_IB, 1'b0);
    add_data(q, 0);
    send(1, q);
    get_byte(1, b);
  endtask

  function automatic logic [31:0] mask(int k, logic [31:0] v);
    return v & 32'((64'd1 << blen(k)) - 1);
  endfunction

  task automatic run_all(int w);
    op_t ops[$];
    for (int k = 1; k <= N; k++) model[k] = 0;
    // the documented example: write i1 and i3, then write i1 / read i3
    ops = '{'{1, 1'b1, 32'ha5}, '{3, 1'b1, 32'hdeadbeef}};
    access(w, ops);
    ops = '{'{1, 1'b1, 32'h3c}, '{3, 1'b0, 32'h0}};
    access(w, ops);
    ops = '{'{1, 1'b0, 32'h0}};
    access(w, ops);
    // BASTION-style sequence
    ops.delete();
    for (int k = 1; k <= N; k++) ops.push_back('{k, 1'b1, mask(k, $urandom())});
    access(w, ops);
    ops.delete();
    for (int k = 1; k <= N; k++) ops.push_back('{k, 1'b0, 32'h0});
    access(w, ops);
    for (int k = 1; k <= N; k++) begin
      ops = '{'{k, 1'b1, mask(k, $urandom())}};
      access(w, ops);
      ops = '{'{k, 1'b0, 32'h0}};
      access(w, ops);
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    run_all(0);
    // polling build: a poll with nothing pending reads iC = 0
    begin
      bq_t q;
      byte unsigned f;
      add_ctrl(q, BR_IC, 1'b0);
      add_data(q, 0);
      send(1, q);
      get_byte(1, f);
      check(f == 8'h00, "idle poll reads 0");
      if (f == 8'h00) n_poll_empty++;
    end
    run_all(1);
    repeat (200) @(posedge clk);
    check(rq0.size() == 0 && rq1.size() == 0, "no extra bytes returned");
    check(!ovf_u0 && !ovf_s0 && !ovf_u1 && !ovf_s1, "no buffer overflow");
    $display("interrupt services %0d, send-register waits %0d, acknowledges (polling build) %0d",
             n_irq, n_wait, n_ack);
    $display("polls empty %0d, polls ready %0d, SPI return frames %0d, payload stalls %0d",
             n_poll_empty, n_poll_ready, n_ret, n_pstall);
    check(n_irq > 0, "interrupt service happened");
    check(n_wait > 0, "waited for the send register");
    check(n_ack > 0, "automatic acknowledge happened");
    check(n_poll_empty > 0, "a poll found no data");
    check(n_poll_ready > 0, "a poll found data");
    check(n_ret > 0, "return frames on SPI");
    check(n_pstall > 0, "far controller waited for payload");
    check(n_ack == n_poll_ready, "one acknowledge per byte read by polling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
