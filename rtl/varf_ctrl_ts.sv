// varf_ctrl_ts: thermal-sensor placement control (TS-VARF).
//
// Each half of the register file has a sensor in its middle giving a
// temperature reading every cycle. In the Register Write stage a narrow
// value is written into the half whose reading is lower; a regular value
// writes both halves. All narrow writes of one cycle see the same readings
// and so go to the same half. Comparing the two readings and the rule for
// regular values are the document's; the reading format (unsigned code,
// larger is hotter) and the tie rule (equal readings pick the right half)
// are this design's choices. Combinational; the readings are expected to be
// already synchronised to the clock.
//
// Ports: per write port valid and narrow flag in; temp_left, temp_right in;
// halves_t write enables out.
module varf_ctrl_ts
  import varf_pkg::*;
#(
  parameter int unsigned NUM_WR = 8,
  parameter int unsigned TEMP_W = 10
) (
  input  logic              wr_valid  [NUM_WR],
  input  logic              wr_narrow [NUM_WR],
  input  logic [TEMP_W-1:0] temp_left,
  input  logic [TEMP_W-1:0] temp_right,
  output halves_t           wr_halves [NUM_WR]
);

  logic left_cooler;

  always_comb begin
    left_cooler = temp_left < temp_right;
    for (int p = 0; p < NUM_WR; p++) begin
      if (!wr_valid[p])       wr_halves[p] = '{left: 1'b0, right: 1'b0};
      else if (!wr_narrow[p]) wr_halves[p] = '{left: 1'b1, right: 1'b1};
      else if (left_cooler)   wr_halves[p] = '{left: 1'b1, right: 1'b0};
      else                    wr_halves[p] = '{left: 1'b0, right: 1'b1};
    end
  end

endmodule
