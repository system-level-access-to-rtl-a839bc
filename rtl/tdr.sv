// tdr: instrument test data register (the scan-facing side of an on-chip
// instrument).
//
// L shift bits; capture loads cap_val, shift moves the register one bit
// towards so (bit 0 leaves first, si enters at bit L-1), update copies the
// shift stage into upd_val and pulses upd_stb for one cycle. With
// HAS_UPDATE = 0 the register is read-only: no update stage is built and
// upd_val stays 0. The enables arrive already gated by the owning SIB.
module tdr #(
  parameter int L          = 8,
  parameter bit HAS_UPDATE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         si,
  output logic         so,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic [L-1:0] cap_val,
  output logic [L-1:0] upd_val,
  output logic         upd_stb
);
  logic [L-1:0] sr;

  logic [L:0] shifted;

  assign shifted = {si, sr};
  assign so      = sr[0];

  always_ff @(posedge clk) begin
    if (!rst_n)       sr <= '0;
    else if (capture) sr <= cap_val;
    else if (shift)   sr <= shifted[L:1];
  end

  if (HAS_UPDATE) begin : g_upd
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        upd_val <= '0;
        upd_stb <= 1'b0;
      end else begin
        upd_stb <= update;
        if (update) upd_val <= sr;
      end
    end
  end else begin : g_noupd
    assign upd_val = '0;
    assign upd_stb = 1'b0;
  end
endmodule
