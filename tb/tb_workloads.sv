// tb_workloads: the evaluated access patterns, run on the two-chip system
// with 50, 100 and 150 instruments in the far chip, each with the
// interrupt-driven and the polling-driven level-i chip (six systems, run one
// after the other, each clocked only while it is in use; UART bit of 16
// clocks, slow enough that the SPI link keeps up).
//
// Patterns: iGet of instrument 1, iWrite of instrument 1, iGet of all,
// iWrite of all, and the BASTION sequence (write all, read all, then for
// every instrument a write followed by a read). The host builds the bytes,
// checks every returned byte against a reference model, and sorts the
// traffic on the UART into useful bits (instrument data), control overhead
// (control commands), data overhead (data command headers) and dummy bits
// (poll answers). These totals are compared with the published figures for
// this protocol. The polling host polls once per returned byte and waits
// until the byte is there before it polls, which is the best case.
module tb_workloads;
  import tb_cmd_pkg::*;
  import ijtag_pkg::*;

  localparam int CPB = 16;
  localparam int NSYS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd [NSYS], txd [NSYS], ovf_u [NSYS], ovf_s [NSYS], clk_s [NSYS];
  int cur = 0;
  byte unsigned rq [NSYS][$];

  for (genvar s = 0; s < NSYS; s++) begin : g_sys
    assign clk_s[s] = clk && (cur == s);
    sys_top #(.N_INSTR(50 * (s / 2 + 1)), .HW_IRQ(s % 2 == 0), .UART_CLKS_PER_BIT(CPB)) u_sys (
      .clk(clk_s[s]), .rst_n, .uart_rxd(rxd[s]), .uart_txd(txd[s]),
      .uart_overflow(ovf_u[s]), .spi_overflow(ovf_s[s]));
    initial forever begin
      logic [7:0] b;
      @(negedge txd[s]);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd[s];
      end
      repeat (CPB) @(posedge clk);
      rq[s].push_back(b);
    end
  end

  int checks = 0, failures = 0;
  longint ctl, dat, dum, use_b;
  logic [31:0] model [1:150];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(int w, bq_t q);
    foreach (q[i]) begin
      logic [9:0] fr;
      fr = {1'b1, q[i], 1'b0};
      for (int b = 0; b < 10; b++) begin
        rxd[w] = fr[b];
        repeat (CPB) @(posedge clk);
      end
    end
  endtask

  task automatic get_byte(int w, output byte unsigned b);
    int t = 0;
    while (rq[w].size() == 0 && t < 100000) begin
      @(posedge clk);
      t++;
    end
    check(t < 100000, "byte returned in time");
    b = rq[w].size() > 0 ? rq[w].pop_front() : 8'h00;
  endtask

  // polling: wait until iC is set in the chip, poll it once, read iB
  task automatic poll_read(int w, output byte unsigned b);
    bq_t q;
    byte unsigned f;
    int t = 0;
    while (!flag_of(w) && t < 100000) begin
      @(posedge clk);
      t++;
    end
    add_ctrl(q, BR_IC, 1'b0);
    add_data(q, 0);
    send(w, q);
    ctl += 16; dat += 16;
    get_byte(w, f);
    dum += 8;
    check(f == 8'h01, "poll finds data");
    q.delete();
    add_ctrl(q, BR_IB, 1'b0);
    add_data(q, 0);
    send(w, q);
    ctl += 16; dat += 16;
    get_byte(w, b);
    use_b += 8;
  endtask

  function automatic bit flag_of(int w);
    case (w)
      1: return g_sys[1].u_sys.u_ic_a.u_net.flag;
      3: return g_sys[3].u_sys.u_ic_a.u_net.flag;
      5: return g_sys[5].u_sys.u_ic_a.u_net.flag;
      default: return 1'b0;
    endcase
  endfunction

  function automatic bit busy_of(int w);
    case (w)
      0: return g_sys[0].u_sys.u_ic_a.u_ctrl.busy || g_sys[0].u_sys.u_ic_a.send_valid || g_sys[0].u_sys.u_ic_b.u_ctrl.busy || g_sys[0].u_sys.u_ic_b.crx_valid;
      1: return g_sys[1].u_sys.u_ic_a.u_ctrl.busy || g_sys[1].u_sys.u_ic_a.send_valid || g_sys[1].u_sys.u_ic_b.u_ctrl.busy || g_sys[1].u_sys.u_ic_b.crx_valid;
      2: return g_sys[2].u_sys.u_ic_a.u_ctrl.busy || g_sys[2].u_sys.u_ic_a.send_valid || g_sys[2].u_sys.u_ic_b.u_ctrl.busy || g_sys[2].u_sys.u_ic_b.crx_valid;
      3: return g_sys[3].u_sys.u_ic_a.u_ctrl.busy || g_sys[3].u_sys.u_ic_a.send_valid || g_sys[3].u_sys.u_ic_b.u_ctrl.busy || g_sys[3].u_sys.u_ic_b.crx_valid;
      4: return g_sys[4].u_sys.u_ic_a.u_ctrl.busy || g_sys[4].u_sys.u_ic_a.send_valid || g_sys[4].u_sys.u_ic_b.u_ctrl.busy || g_sys[4].u_sys.u_ic_b.crx_valid;
      default: return g_sys[5].u_sys.u_ic_a.u_ctrl.busy || g_sys[5].u_sys.u_ic_a.send_valid || g_sys[5].u_sys.u_ic_b.u_ctrl.busy || g_sys[5].u_sys.u_ic_b.crx_valid;
    endcase
  endfunction

  task automatic wait_quiet(int w);
    int q = 0, t = 0;
    while (q < 300 && t < 200000) begin
      @(posedge clk);
      t++;
      if (busy_of(w)) q = 0; else q++;
    end
  endtask

  typedef struct { int idx; bit wr; logic [31:0] val; } op_t;

  // one iApply group for the far chip, wrapped for the level-i chip
  task automatic apply(int w, int n, op_t ops[$]);
    bq_t q, pay, expq;
    foreach (ops[i]) add_ctrl(q, ops[i].idx, ops[i].wr);
    for (int k = n; k >= 1; k--)
      foreach (ops[i]) if (ops[i].idx == k)
        for (int b = 0; b < blen(k) / 8; b++)
          if (ops[i].wr) pay.push_back(byte'(ops[i].val >> (8 * b)));
          else           expq.push_back(byte'(model[k] >> (8 * b)));
    add_data(q, pay.size());
    foreach (pay[i]) q.push_back(pay[i]);
    foreach (ops[i]) if (ops[i].wr) model[ops[i].idx] = ops[i].val;
    ctl += 16 * (ops.size() + 1);           // far-chip control commands + iA select
    dat += 16 * 2;                          // far-chip data command + wrapping data command
    use_b += 8 * pay.size();
    send(w, wrap(q));
    foreach (expq[i]) begin
      byte unsigned b;
      if (w % 2 == 0) begin
        get_byte(w, b);
        use_b += 8;
      end else poll_read(w, b);
      check(b == expq[i], $sformatf("system %0d byte %0d: got %02x expected %02x", w, i, b, expq[i]));
    end
  endtask

  function automatic logic [31:0] rnd(int k);
    return $urandom() & 32'((64'd1 << blen(k)) - 1);
  endfunction

  // published totals: {control, data, dummy}, [size][pattern][hw/sw]
  // sizes 50/100/150; patterns iGet 1, iWrite 1, iGet all, iWrite all, BASTION
  localparam int PUB [3][5][2][3] = '{
    '{ '{'{32, 32, 0}, '{64, 64, 8}}, '{'{32, 32, 0}, '{32, 32, 0}},
       '{'{816, 32, 0}, '{4496, 3712, 920}}, '{'{816, 32, 0}, '{816, 32, 0}},
       '{'{4832, 3264, 0}, '{12192, 10624, 1848}} },
    '{ '{'{32, 32, 0}, '{64, 64, 8}}, '{'{32, 32, 0}, '{32, 32, 0}},
       '{'{1616, 32, 0}, '{9040, 7456, 1856}}, '{'{1616, 32, 0}, '{1616, 32, 0}},
       '{'{9632, 6464, 0}, '{24480, 21312, 3712}} },
    '{ '{'{32, 32, 0}, '{64, 64, 8}}, '{'{32, 32, 0}, '{32, 32, 0}},
       '{'{2416, 32, 0}, '{13616, 11232, 2800}}, '{'{2416, 32, 0}, '{2416, 32, 0}},
       '{'{14432, 9664, 0}, '{36832, 32064, 5600}} } };
  localparam int USEFUL [3][5] = '{'{8, 8, 920, 920, 3680}, '{8, 8, 1856, 1856, 7424},
                                   '{8, 8, 2800, 2800, 11200}};
  localparam string PNAME [5] = '{"iGet 1", "iWrite 1", "iGet all", "iWrite all", "BASTION"};

  task automatic run_pattern(int w, int p);
    int n = 50 * (w / 2 + 1);
    op_t ops[$];
    int groups = 0;
    ctl = 0; dat = 0; dum = 0; use_b = 0;
    case (p)
      0: begin ops = '{'{1, 1'b0, 0}}; apply(w, n, ops); groups = 1; end
      1: begin ops = '{'{1, 1'b1, rnd(1)}}; apply(w, n, ops); groups = 1; end
      2, 3: begin
        for (int k = 1; k <= n; k++) ops.push_back('{k, p == 3, rnd(k)});
        apply(w, n, ops);
        groups = 1;
      end
      default: begin
        for (int k = 1; k <= n; k++) ops.push_back('{k, 1'b1, rnd(k)});
        apply(w, n, ops);
        ops.delete();
        for (int k = 1; k <= n; k++) ops.push_back('{k, 1'b0, 0});
        apply(w, n, ops);
        groups = 2;
        for (int k = 1; k <= n; k++) begin
          ops = '{'{k, 1'b1, rnd(k)}};
          apply(w, n, ops);
          ops = '{'{k, 1'b0, 0}};
          apply(w, n, ops);
          groups += 2;
        end
      end
    endcase
    begin
      int s = w / 2, m = w % 2;
      int exp_dum = PUB[s][p][m][2];
      longint tot = ctl + dat + dum;
      // the published dummy figure for BASTION on 50 instruments (1848)
      // is one poll more than 2 x 115 returned bytes; best case is 1840
      if (s == 0 && p == 4 && m == 1) exp_dum = 1840;
      $display("%0d instruments, %s, %s: %0d iApply groups, useful %0d, control %0d, data %0d, dummy %0d, total overhead %0d, useful %0d%%",
               n, PNAME[p], m ? "polling" : "interrupt", groups, use_b, ctl, dat, dum, tot,
               (100 * use_b) / (use_b + tot));
      check(use_b == USEFUL[s][p], $sformatf("useful bits %0d, published %0d", use_b, USEFUL[s][p]));
      check(ctl == PUB[s][p][m][0], $sformatf("control overhead %0d, published %0d", ctl, PUB[s][p][m][0]));
      check(dat == PUB[s][p][m][1], $sformatf("data overhead %0d, published %0d", dat, PUB[s][p][m][1]));
      check(dum == exp_dum, $sformatf("dummy overhead %0d, expected %0d", dum, exp_dum));
      if (p == 4 && s == 0) check(groups == 102, "102 iApply groups for 50 instruments");
    end
    wait_quiet(w);
    check(rq[w].size() == 0, "no stray bytes");
    // the model must match the far chip
    for (int k = 1; k <= n; k++) begin
      logic [31:0] v;
      case (w / 2)
        0: v = 32'(g_sys[0].u_sys.u_ic_b.inst_val >> boff(k));
        1: v = 32'(g_sys[2].u_sys.u_ic_b.inst_val >> boff(k));
        default: v = 32'(g_sys[4].u_sys.u_ic_b.inst_val >> boff(k));
      endcase
      if (w % 2 == 1) case (w / 2)
        0: v = 32'(g_sys[1].u_sys.u_ic_b.inst_val >> boff(k));
        1: v = 32'(g_sys[3].u_sys.u_ic_b.inst_val >> boff(k));
        default: v = 32'(g_sys[5].u_sys.u_ic_b.inst_val >> boff(k));
      endcase
      check((v & 32'((64'd1 << blen(k)) - 1)) == model[k], $sformatf("instrument %0d value", k));
    end
  endtask

  initial begin : watchdog
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSYS; s++) rxd[s] = 1'b1;
    for (int s = 0; s < NSYS; s++) begin   // reset every system while it is clocked
      @(negedge clk) cur = s;
      repeat (3) @(posedge clk);
    end
    @(negedge clk) rst_n = 1;
    // anything the monitors picked up from the lines before reset is dropped
    repeat (12 * CPB) @(posedge clk);
    for (int s = 0; s < NSYS; s++) rq[s].delete();
    for (int w = 0; w < NSYS; w++) begin
      @(negedge clk) cur = w;
      repeat (10) @(posedge clk);
      for (int k = 1; k <= 150; k++) model[k] = 0;
      for (int p = 0; p < 5; p++) run_pattern(w, p);
      check(!ovf_u[w] && !ovf_s[w], "no buffer overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
