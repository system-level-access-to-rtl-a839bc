// bench_net: the IEEE 1687 network of the level-i+1 IC (IC B) used for the
// benchmarks: N instruments connected flat, each behind its own SIB.
//
// Scan order from tdi to tdo: instrument 1, SIB 1, instrument 2, SIB 2, ...,
// instrument N, SIB N. Instrument k is (8 << ((k-1) mod 3)) bits long, so the
// lengths repeat 8, 16, 32. Each instrument is a loop-back register: capture
// reads back what the last update wrote, so written data can be read again.
// All instrument values are brought out on inst_val, instrument 1 in the
// lowest bits (offset of instrument k = 56*((k-1)/3) + {0,8,24}[(k-1) mod 3]),
// and the SIB states on sib_open. Scan controls are single-cycle enables.
module bench_net
  import ijtag_pkg::*;
#(
  parameter int N = 150
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    capture,
  input  logic                    shift,
  input  logic                    update,
  input  logic                    tdi,
  output logic                    tdo,
  output logic [bench_bits(N)-1:0] inst_val,
  output logic [N-1:0]            sib_open
);
  logic [N:0] chain;   // chain[k]: scan out of segment k (chain[0] = tdi)

  assign chain[0] = tdi;
  assign tdo      = chain[N];

  for (genvar g = 0; g < N; g++) begin : g_seg
    localparam int LEN = 8 << (g % 3);
    logic           i_si, i_so, i_cap, i_sh, i_upd;
    logic [LEN-1:0] val;

    sib u_sib (
      .clk, .rst_n,
      .si(chain[g]), .capture, .shift, .update, .so(chain[g+1]),
      .seg_si(i_si), .seg_so(i_so),
      .seg_capture(i_cap), .seg_shift(i_sh), .seg_update(i_upd),
      .open_o(sib_open[g])
    );

    tdr #(.L(LEN), .HAS_UPDATE(1'b1)) u_inst (
      .clk, .rst_n,
      .si(i_si), .so(i_so),
      .capture(i_cap), .shift(i_sh), .update(i_upd),
      .cap_val(val), .upd_val(val), .upd_stb()
    );

    assign inst_val[bench_off(g) +: LEN] = val;
  end
endmodule
