// bridge_net: the IEEE 1687 network of the level-i IC (IC A) that moves bytes
// between the scan world and the functional port towards the next IC.
//
// Four SIB-gated instruments, scan order tdi -> iA, SIB1, iB, SIB2, iC, SIB3,
// iD, SIB4 -> tdo:
//   iA (9 bits, write): bits 7:0 are the byte to send, bit 8 tells the
//      functional port that the byte is valid. An update with bit 8 set makes
//      send_valid high until the port takes the byte (send_take).
//   iB (8 bits, read): the last byte received from the next IC.
//   iC (1 bit, read):  flag, set when a byte has arrived in iB.
//   iD (1 bit, write): writing 1 acknowledges that iB was consumed; this
//      clears iC and lets the port receive the next byte.
// flag doubles as the interrupt of the interrupt-driven controller, and
// send_valid as its "send register busy" input. The instrument lengths and
// roles follow the description of the bridge hardware; the chain order and
// the clearing of the data-available bit by the port are this design's
// choices.
module bridge_net (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture,
  input  logic       shift,
  input  logic       update,
  input  logic       tdi,
  output logic       tdo,
  // functional side: send path
  output logic [7:0] send_data,
  output logic       send_valid,
  input  logic       send_take,
  // functional side: receive path
  input  logic [7:0] recv_data,
  input  logic       recv_valid,
  output logic       recv_free,
  output logic       flag
);
  logic [4:0] chain;
  logic [3:0] s_si, s_so, s_cap, s_sh, s_upd;

  assign chain[0] = tdi;
  assign tdo      = chain[4];

  for (genvar g = 0; g < 4; g++) begin : g_sib
    sib u_sib (
      .clk, .rst_n,
      .si(chain[g]), .capture, .shift, .update, .so(chain[g+1]),
      .seg_si(s_si[g]), .seg_so(s_so[g]),
      .seg_capture(s_cap[g]), .seg_shift(s_sh[g]), .seg_update(s_upd[g]),
      .open_o()
    );
  end

  // iA: send register
  logic [8:0] ia_val;
  logic       ia_stb;
  tdr #(.L(9), .HAS_UPDATE(1'b1)) u_ia (
    .clk, .rst_n, .si(s_si[0]), .so(s_so[0]),
    .capture(s_cap[0]), .shift(s_sh[0]), .update(s_upd[0]),
    .cap_val({send_valid, send_data}), .upd_val(ia_val), .upd_stb(ia_stb)
  );

  // iB: received byte
  logic [7:0] rx_byte;
  tdr #(.L(8), .HAS_UPDATE(1'b0)) u_ib (
    .clk, .rst_n, .si(s_si[1]), .so(s_so[1]),
    .capture(s_cap[1]), .shift(s_sh[1]), .update(s_upd[1]),
    .cap_val(rx_byte), .upd_val(), .upd_stb()
  );

  // iC: data-arrived flag
  tdr #(.L(1), .HAS_UPDATE(1'b0)) u_ic (
    .clk, .rst_n, .si(s_si[2]), .so(s_so[2]),
    .capture(s_cap[2]), .shift(s_sh[2]), .update(s_upd[2]),
    .cap_val(flag), .upd_val(), .upd_stb()
  );

  // iD: consumed acknowledge
  logic [0:0] id_val;
  logic       id_stb;
  tdr #(.L(1), .HAS_UPDATE(1'b1)) u_id (
    .clk, .rst_n, .si(s_si[3]), .so(s_so[3]),
    .capture(s_cap[3]), .shift(s_sh[3]), .update(s_upd[3]),
    .cap_val(1'b0), .upd_val(id_val), .upd_stb(id_stb)
  );

  assign send_data = ia_val[7:0];
  assign recv_free = !flag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      send_valid <= 1'b0;
      flag       <= 1'b0;
      rx_byte    <= '0;
    end else begin
      if (ia_stb && ia_val[8]) send_valid <= 1'b1;
      else if (send_take)      send_valid <= 1'b0;
      if (recv_valid && !flag) begin
        rx_byte <= recv_data;
        flag    <= 1'b1;
      end else if (id_stb && id_val[0]) begin
        flag <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) recv_valid |-> !flag);
endmodule
