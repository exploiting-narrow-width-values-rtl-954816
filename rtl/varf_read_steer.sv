// varf_read_steer: Execute-stage pair of read multiplexers for one read port.
//
// Rebuilds the 64-bit operand from the two 34-bit partition outputs and the
// two narrow flag bits read with them:
//   flags {left,right} = 11 : regular value, {left[29:0], right[33:0]}
//   flags 01                : narrow value in the right half, sign-extended
//   flags 10                : narrow value in the left half, sign-extended
//   flags 00                : register never written, reads as zero
// The low mux picks bits[33:0] from the right or the left half; the high mux
// picks bits[63:34] from the left half's low 30 bits or from the sign bit
// (bit 33) of the half that holds the narrow value. The mux pair and the
// sign extension follow the document's partitioned register file figure; the
// zero result for flags 00 is this design's choice (both halves are gated
// off then, so they read zero). Purely combinational.
//
// Ports: left, right (34 in), flags (halves_t in), data (64 out).
module varf_read_steer
  import varf_pkg::*;
(
  input  logic [HALF_W-1:0] left,
  input  logic [HALF_W-1:0] right,
  input  halves_t           flags,
  output logic [XLEN-1:0]   data
);

  logic [HALF_W-1:0]  low;
  logic [UPPER_W-1:0] high;

  always_comb begin
    // low mux picks bits[33:0], high mux picks bits[63:34]
    unique case (flags)
      2'b11: begin
        low  = right;
        high = left[UPPER_W-1:0];
      end
      2'b10: begin
        low  = left;
        high = {UPPER_W{left[HALF_W-1]}};
      end
      2'b01: begin
        low  = right;
        high = {UPPER_W{right[HALF_W-1]}};
      end
      default: begin
        low  = '0;
        high = '0;
      end
    endcase
    data = {high, low};
  end

endmodule
