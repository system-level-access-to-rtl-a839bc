// sib: IEEE 1687 segment insertion bit, synchronous form.
//
// The SIB holds one shift bit and one update bit. While the update bit is 0
// the segment below is bypassed and the scan path through the SIB is one bit
// long; while it is 1 the segment is spliced in ahead of the SIB's own bit,
// so the order on the path is: si -> segment -> SIB bit -> so. Capture loads
// the shift bit with the current update bit, update copies the shift bit into
// the update bit. The segment's capture/shift/update enables are the host's
// enables gated by the update bit as it was before the edge, so an update
// that closes the SIB still updates the segment in the same operation.
//
// The scan controls are single-cycle enables on the system clock instead of
// a TCK and TAP controller; this is this design's choice.
module sib (
  input  logic clk,
  input  logic rst_n,
  input  logic si,
  input  logic capture,
  input  logic shift,
  input  logic update,
  output logic so,
  // segment side
  output logic seg_si,
  input  logic seg_so,
  output logic seg_capture,
  output logic seg_shift,
  output logic seg_update,
  output logic open_o
);
  logic sr, upd;

  assign so          = sr;
  assign seg_si      = si;
  assign seg_capture = capture && upd;
  assign seg_shift   = shift   && upd;
  assign seg_update  = update  && upd;
  assign open_o      = upd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr  <= 1'b0;
      upd <= 1'b0;
    end else begin
      if (capture)      sr  <= upd;
      else if (shift)   sr  <= upd ? seg_so : si;
      if (update)       upd <= sr;
    end
  end

  // Only one scan operation at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({capture, shift, update}));
endmodule
