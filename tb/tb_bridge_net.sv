// tb_bridge_net: the level-i bridge network driven scan by scan. Writes a
// byte into iA and checks the send handshake, delivers a received byte and
// reads iC and iB through the scan path, then writes iD and checks that the
// flag clears and the next byte can be received.
module tb_bridge_net;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic capture, shift, update, tdi, tdo;
  logic [7:0] send_data, recv_data;
  logic send_valid, send_take, recv_valid, recv_free, flag;
  bridge_net dut (.*);

  int checks = 0, failures = 0;
  localparam int LEN [1:4] = '{9, 8, 1, 1};

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

  // access instruments sel (1..4) with write values wv; returns the bits of
  // every selected instrument, highest instrument first, LSB first
  task automatic access(input bit sel [1:4], input logic [8:0] wv [1:4], output bit rbits[$]);
    bit din[$], dout[$];
    int p;
    for (int k = 4; k >= 1; k--) din.push_back(sel[k]);
    scan(din, dout);
    din.delete();
    for (int k = 4; k >= 1; k--) begin
      din.push_back(1'b0);
      if (sel[k]) for (int b = 0; b < LEN[k]; b++) din.push_back(wv[k][b]);
    end
    scan(din, dout);
    check(dout.size() == din.size(), "path length");
    rbits.delete();
    p = 0;
    for (int k = 4; k >= 1; k--) begin
      p++;
      if (sel[k]) for (int b = 0; b < LEN[k]; b++) begin
        rbits.push_back(dout[p]);
        p++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sel [1:4];
    logic [8:0] wv [1:4];
    bit rb[$];
    capture = 0; shift = 0; update = 0; tdi = 0;
    send_take = 0; recv_valid = 0; recv_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!send_valid && !flag && recv_free, "idle after reset");
    // send a byte through iA
    sel = '{1, 0, 0, 0};
    wv = '{9'h1a7, 0, 0, 0};
    access(sel, wv, rb);
    @(negedge clk);
    check(send_valid && send_data == 8'ha7, "iA byte offered to the port");
    send_take = 1;
    @(negedge clk); send_take = 0;
    check(!send_valid, "taken by the port");
    // iA written with the valid bit clear offers nothing
    wv = '{9'h055, 0, 0, 0};
    access(sel, wv, rb);
    @(negedge clk);
    check(!send_valid, "no offer without the valid bit");
    // poll iC: empty
    sel = '{0, 0, 1, 0};
    access(sel, wv, rb);
    check(rb.size() == 1 && rb[0] == 1'b0, "iC reads 0 before data arrives");
    // a byte arrives
    @(negedge clk); recv_data = 8'h3d; recv_valid = 1;
    @(negedge clk); recv_valid = 0;
    check(flag && !recv_free, "flag set on arrival");
    sel = '{0, 1, 1, 0};
    access(sel, wv, rb);
    // order: iC (instrument 3) first, then iB
    check(rb.size() == 9 && rb[0] == 1'b1, "iC reads 1");
    begin
      logic [7:0] b;
      for (int i = 0; i < 8; i++) b[i] = rb[1 + i];
      check(b == 8'h3d, $sformatf("iB reads %02x", b));
    end
    check(flag, "flag stays until acknowledged");
    // acknowledge through iD
    sel = '{0, 0, 0, 1};
    wv = '{0, 0, 0, 9'h1};
    access(sel, wv, rb);
    @(negedge clk);
    check(!flag && recv_free, "iD clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
