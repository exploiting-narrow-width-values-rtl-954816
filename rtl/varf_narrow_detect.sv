// varf_narrow_detect: narrow-width detection on a functional-unit result.
//
// A 64-bit result is narrow when it can be held as a 34-bit two's-complement
// number, that is when bits[63:33] are all zeros or all ones (leading zeros
// or leading ones). The document takes this flag from the leading-0/1
// detection logic already inside the functional units; here it is written as
// a standalone combinational check with the same meaning, so it can sit next
// to any unit. Purely combinational, no clock.
//
// Ports: result (64 bits in), narrow (1 bit out).
module varf_narrow_detect
  import varf_pkg::*;
(
  input  logic [XLEN-1:0] result,
  output logic            narrow
);

  logic [XLEN-HALF_W:0] top_bits;   // bits[63:33], 31 bits

  always_comb begin
    top_bits = result[XLEN-1:HALF_W-1];
    narrow   = (&top_bits) | ~(|top_bits);
  end

endmodule
