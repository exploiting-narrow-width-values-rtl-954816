// varf_ctrl_id: register-id placement control (ID-VARF), the document's
// preferred scheme.
//
// For every write port in the Register Write stage it decides which halves
// of the register file the value is written into, which is also the flag
// pair stored with it. A regular value writes both halves (flags 11). A
// narrow value goes to the right half when the physical register id is even
// (flags 01) and to the left half when it is odd (flags 10). The rule is the
// document's; it needs no state, so the module is one small combinational
// function per port. An idle port gives 00 (no write).
//
// Ports: per write port valid, narrow flag and physical register id in;
// halves_t write enables out.
module varf_ctrl_id
  import varf_pkg::*;
#(
  parameter int unsigned NUM_WR = 8,
  parameter int unsigned ID_W   = $clog2(NREGS)
) (
  input  logic            wr_valid  [NUM_WR],
  input  logic            wr_narrow [NUM_WR],
  input  logic [ID_W-1:0] wr_preg   [NUM_WR],
  output halves_t         wr_halves [NUM_WR]
);

  always_comb begin
    for (int p = 0; p < NUM_WR; p++) begin
      if (!wr_valid[p])       wr_halves[p] = '{left: 1'b0, right: 1'b0};
      else if (!wr_narrow[p]) wr_halves[p] = '{left: 1'b1, right: 1'b1};
      else if (wr_preg[p][0]) wr_halves[p] = '{left: 1'b1, right: 1'b0};
      else                    wr_halves[p] = '{left: 1'b0, right: 1'b1};
    end
  end

endmodule
