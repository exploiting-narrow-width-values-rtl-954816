// varf_ctrl_ac: access-counter placement control (AC-VARF).
//
// Each half of the register file keeps a counter of its accesses, reads and
// writes. A narrow value written in the Register Write stage goes to the
// half whose counter is lower; a regular value writes both halves. Write
// ports are served in port order within a cycle, each seeing the counts
// raised by the lower-numbered ports, so several narrow writes in one cycle
// are spread over both halves. The counters then add this cycle's writes and
// the read accesses reported by the halves (reads whose wordline fired).
//
// The document simulates unbounded counters and notes that real ones must be
// reset now and then to avoid saturation. Here both counters are CNT_W bits
// and, when either would overflow, both are halved: this keeps their order
// and roughly their difference. The halving rule, the tie rule (equal counts
// pick the right half) and the in-cycle port order are this design's
// choices. Counters reset to zero.
//
// Ports: clk, rst_n; per write port valid and narrow flag in; rd_left_cnt,
// rd_right_cnt (read accesses this cycle) in; halves_t write enables out;
// cnt_left, cnt_right (current counts) out. Write decisions are
// combinational; the counters update on the rising clock edge.
module varf_ctrl_ac
  import varf_pkg::*;
#(
  parameter int unsigned NUM_WR = 8,
  parameter int unsigned NUM_RD = 16,
  parameter int unsigned CNT_W  = 32,
  localparam int unsigned RC_W  = $clog2(NUM_RD + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid  [NUM_WR],
  input  logic             wr_narrow [NUM_WR],
  input  logic [RC_W-1:0]  rd_left_cnt,
  input  logic [RC_W-1:0]  rd_right_cnt,
  output halves_t          wr_halves [NUM_WR],
  output logic [CNT_W-1:0] cnt_left,
  output logic [CNT_W-1:0] cnt_right
);

  logic [CNT_W:0] run_l, run_r;     // running counts, one spare bit
  logic [CNT_W:0] nxt_l, nxt_r;

  always_comb begin
    run_l = {1'b0, cnt_left};
    run_r = {1'b0, cnt_right};
    for (int p = 0; p < NUM_WR; p++) begin
      wr_halves[p] = '{left: 1'b0, right: 1'b0};
      if (wr_valid[p]) begin
        if (!wr_narrow[p])      wr_halves[p] = '{left: 1'b1, right: 1'b1};
        else if (run_l < run_r) wr_halves[p] = '{left: 1'b1, right: 1'b0};
        else                    wr_halves[p] = '{left: 1'b0, right: 1'b1};
      end
      run_l = run_l + (CNT_W+1)'(wr_halves[p].left);
      run_r = run_r + (CNT_W+1)'(wr_halves[p].right);
    end
    nxt_l = run_l + (CNT_W+1)'(rd_left_cnt);
    nxt_r = run_r + (CNT_W+1)'(rd_right_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_left  <= '0;
      cnt_right <= '0;
    end else if (nxt_l[CNT_W] || nxt_r[CNT_W]) begin
      cnt_left  <= nxt_l[CNT_W:1];
      cnt_right <= nxt_r[CNT_W:1];
    end else begin
      cnt_left  <= nxt_l[CNT_W-1:0];
      cnt_right <= nxt_r[CNT_W-1:0];
    end
  end

endmodule
