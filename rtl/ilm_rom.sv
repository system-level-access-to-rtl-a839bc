// ilm_rom: instrument length memory.
//
// Returns the length in bits of instrument idx (1-based). The table is fixed
// when the design is built: KIND = 0 gives the benchmark network, where the
// lengths repeat 8, 16, 32 bits (instrument 1 is 8 bits, 2 is 16, 3 is 32,
// 4 is 8, ...); KIND = 1 gives the bridge network iA = 9, iB = 8, iC = 1,
// iD = 1. An index outside 1..N reads 0. Purely combinational.
module ilm_rom
  import ijtag_pkg::*;
#(
  parameter int N    = 150,
  parameter int KIND = 0
) (
  input  logic [IW-1:0] idx,
  output logic [LW-1:0] len
);
  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic [LW-1:0] rom [N];
  logic [IW-1:0] off;

  for (genvar g = 0; g < N; g++) begin : g_rom
    assign rom[g] = (KIND == 0) ? bench_len(g + 1) : bridge_len(g + 1);
  end

  always_comb begin
    off = idx - IW'(1);
    if (idx >= IW'(1) && idx <= IW'(N)) len = rom[off[AW-1:0]];
    else                                len = '0;
  end
endmodule
