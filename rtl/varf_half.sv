// varf_half: one 34-bit partition of the value-aware register file.
//
// Holds NREGS entries of 34 data bits and one narrow flag bit. The flag
// column is written on every register write (1 when this half takes the
// value, 0 when the value went only to the other half); the data columns are
// written only when this half takes the value, so the other half's data
// bitlines stay idle. On a read the flag is read first and gates the data
// wordline, as the AND gate in the document's figure does: an entry whose
// flag is 0 is not accessed and reads as zero. rd_active reports each read
// that fired the data wordline, for activity accounting.
//
// Structure and gating follow the document. The port counts, the flag reset
// to 0 on rst_n and the flop-array storage are this design's choices; the
// data columns are not reset, since a cleared flag hides them.
//
// Timing: writes take effect at the rising edge; reads are combinational
// from the address (the Register Read stage) and return the value before a
// same-cycle write. Two write ports must not name the same entry in one
// cycle, which register renaming guarantees.
module varf_half
  import varf_pkg::*;
#(
  parameter int unsigned N_ENTRIES = NREGS,
  parameter int unsigned NUM_RD    = 16,
  parameter int unsigned NUM_WR    = 8,
  localparam int unsigned ID_W     = $clog2(N_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write ports (Register Write stage)
  input  logic              wr_en    [NUM_WR],  // a register write on this port
  input  logic              wr_take  [NUM_WR],  // this half takes the value (new flag)
  input  logic [ID_W-1:0]   wr_addr  [NUM_WR],
  input  logic [HALF_W-1:0] wr_data  [NUM_WR],
  // read ports (Register Read stage)
  input  logic              rd_en    [NUM_RD],
  input  logic [ID_W-1:0]   rd_addr  [NUM_RD],
  output logic [HALF_W-1:0] rd_data  [NUM_RD],
  output logic              rd_flag  [NUM_RD],
  output logic              rd_active[NUM_RD]
);

  logic [HALF_W-1:0] data_q [N_ENTRIES];
  logic              flag_q [N_ENTRIES];

  // flag column
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ENTRIES; e++) flag_q[e] <= 1'b0;
    end else begin
      for (int p = 0; p < NUM_WR; p++)
        if (wr_en[p]) flag_q[wr_addr[p]] <= wr_take[p];
    end
  end

  // data columns: written only by the ports whose value this half takes
  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_WR; p++)
      if (wr_en[p] && wr_take[p]) data_q[wr_addr[p]] <= wr_data[p];
  end

  // read: the flag gates the data wordline
  always_comb begin
    for (int r = 0; r < NUM_RD; r++) begin
      rd_flag[r]   = rd_en[r] && flag_q[rd_addr[r]];
      rd_active[r] = rd_flag[r];
      rd_data[r]   = rd_flag[r] ? data_q[rd_addr[r]] : '0;
    end
  end

  // renaming never gives two write ports the same register in one cycle
  for (genvar a = 0; a < NUM_WR; a++) begin : g_chk_a
    for (genvar b = a + 1; b < NUM_WR; b++) begin : g_chk_b
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
          !(wr_en[a] && wr_en[b] && wr_addr[a] == wr_addr[b]))
        else $error("varf_half: write ports %0d and %0d both write entry %0d", a, b, wr_addr[a]);
    end
  end

endmodule
