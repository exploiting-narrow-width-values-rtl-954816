// varf_write_augment: Register Write stage value augmentation.
//
// The 64-bit value to be written is widened to 68 bits and split into two
// 34-bit halves. The lower half is always bits[33:0]. The upper half is
// selected by the narrow flag: for a narrow value it is a duplicate of
// bits[33:0], so the value can be placed in either partition; for a regular
// value it is bits[63:34] under four zero padding bits. This follows the
// document's datapath figure exactly; only the port names are this design's.
// Purely combinational.
//
// Ports: wdata (64 in), narrow (1 in), upper (34 out, to the left half),
// lower (34 out, to the right half).
module varf_write_augment
  import varf_pkg::*;
(
  input  logic [XLEN-1:0]   wdata,
  input  logic              narrow,
  output logic [HALF_W-1:0] upper,
  output logic [HALF_W-1:0] lower
);

  always_comb begin
    lower = wdata[HALF_W-1:0];
    if (narrow) upper = wdata[HALF_W-1:0];
    else        upper = {{PAD_W{1'b0}}, wdata[XLEN-1:HALF_W]};
  end

endmodule
