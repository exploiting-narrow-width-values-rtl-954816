// varf_regfile: thermal-aware value-aware integer register file (VARF).
//
// Most integer results fit in 34 bits. This register file stores such a
// narrow value in only one of two 34-bit partitions and leaves the other
// partition's data bitlines idle, which cuts access power. To keep the two
// partitions at a similar temperature, a placement controller spreads the
// narrow values over both halves instead of always using the same one. The
// default controller is the register-id scheme (even physical register to
// the right half, odd to the left); the access-counter and thermal-sensor
// schemes can be chosen with SCHEME.
//
// Pipeline, one entry per write port and per read port:
//   Execute        : wb_result is checked for narrow width (varf_narrow_detect).
//   EXE/WB latch   : result, narrow flag, register id and valid are registered.
//   Register Write : varf_write_augment forms the 34-bit upper and lower
//                    halves; the controller picks the halves (= flag pair);
//                    both varf_half arrays are written at the clock edge.
//   Register Read  : both halves are read; each half's flag gates its data.
//   RR/EX latch    : the two 34-bit outputs and the two flags are registered.
//   Execute        : varf_read_steer rebuilds the 64-bit operand (rd_data).
// So a result presented in cycle t is in the array after the edge ending
// cycle t+1, and a read address presented in cycle t gives rd_data in cycle
// t+1. A read in the cycle of a write to the same register returns the old
// value; forwarding is the job of the bypass network outside.
//
// Port counts are not given by the document: 16 read and 8 write ports are
// assumed for its 8-issue core, with 512 physical integer registers from its
// processor table. wr_halves and rd_halves expose the per-port partition
// activity (which halves were written or read) for power/thermal accounting.
// cnt_left/cnt_right are the access counters and are zero unless SCHEME is
// SCHEME_AC; temp_left/temp_right are the two thermal sensor readings and are
// ignored unless SCHEME is SCHEME_TS.
module varf_regfile
  import varf_pkg::*;
#(
  parameter scheme_e     SCHEME    = SCHEME_ID,
  parameter int unsigned N_ENTRIES = NREGS,
  parameter int unsigned NUM_RD    = 16,
  parameter int unsigned NUM_WR    = 8,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned TEMP_W    = 10,
  localparam int unsigned ID_W     = $clog2(N_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // results from the functional units (end of Execute)
  input  logic              wb_valid  [NUM_WR],
  input  logic [ID_W-1:0]   wb_preg   [NUM_WR],
  input  logic [XLEN-1:0]   wb_result [NUM_WR],
  // operand reads (Register Read), data one cycle later (Execute)
  input  logic              rd_en     [NUM_RD],
  input  logic [ID_W-1:0]   rd_addr   [NUM_RD],
  output logic              rd_valid  [NUM_RD],
  output logic [XLEN-1:0]   rd_data   [NUM_RD],
  // thermal sensor readings, larger is hotter (thermal-sensor scheme)
  input  logic [TEMP_W-1:0] temp_left,
  input  logic [TEMP_W-1:0] temp_right,
  // partition activity
  output halves_t           wr_halves [NUM_WR],  // Register Write stage
  output halves_t           rd_halves [NUM_RD],  // Register Read stage
  output logic [CNT_W-1:0]  cnt_left,
  output logic [CNT_W-1:0]  cnt_right
);

  localparam int unsigned RC_W = $clog2(NUM_RD + 1);

  // ---------------------------------------------------------------- Execute
  logic ex_narrow [NUM_WR];
  for (genvar p = 0; p < NUM_WR; p++) begin : g_detect
    varf_narrow_detect u_detect (.result(wb_result[p]), .narrow(ex_narrow[p]));
  end

  // ----------------------------------------------------------- EXE/WB latch
  logic              rw_valid  [NUM_WR];
  logic              rw_narrow [NUM_WR];
  logic [ID_W-1:0]   rw_preg   [NUM_WR];
  logic [XLEN-1:0]   rw_result [NUM_WR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_WR; p++) rw_valid[p] <= 1'b0;
    end else begin
      for (int p = 0; p < NUM_WR; p++) rw_valid[p] <= wb_valid[p];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_WR; p++) begin
      rw_narrow[p] <= ex_narrow[p];
      rw_preg[p]   <= wb_preg[p];
      rw_result[p] <= wb_result[p];
    end
  end

  // --------------------------------------------------------- Register Write
  logic [HALF_W-1:0] rw_upper [NUM_WR];
  logic [HALF_W-1:0] rw_lower [NUM_WR];
  for (genvar p = 0; p < NUM_WR; p++) begin : g_augment
    varf_write_augment u_augment (
      .wdata (rw_result[p]),
      .narrow(rw_narrow[p]),
      .upper (rw_upper[p]),
      .lower (rw_lower[p])
    );
  end

  // read accesses per half this cycle (for the access counters)
  logic [RC_W-1:0] rd_left_cnt, rd_right_cnt;

  if (SCHEME == SCHEME_AC) begin : g_ctrl_ac
    varf_ctrl_ac #(.NUM_WR(NUM_WR), .NUM_RD(NUM_RD), .CNT_W(CNT_W)) u_ctrl (
      .clk, .rst_n,
      .wr_valid    (rw_valid),
      .wr_narrow   (rw_narrow),
      .rd_left_cnt (rd_left_cnt),
      .rd_right_cnt(rd_right_cnt),
      .wr_halves   (wr_halves),
      .cnt_left    (cnt_left),
      .cnt_right   (cnt_right)
    );
  end else if (SCHEME == SCHEME_TS) begin : g_ctrl_ts
    varf_ctrl_ts #(.NUM_WR(NUM_WR), .TEMP_W(TEMP_W)) u_ctrl (
      .wr_valid  (rw_valid),
      .wr_narrow (rw_narrow),
      .temp_left (temp_left),
      .temp_right(temp_right),
      .wr_halves (wr_halves)
    );
    assign cnt_left  = '0;
    assign cnt_right = '0;
  end else begin : g_ctrl_id
    varf_ctrl_id #(.NUM_WR(NUM_WR), .ID_W(ID_W)) u_ctrl (
      .wr_valid (rw_valid),
      .wr_narrow(rw_narrow),
      .wr_preg  (rw_preg),
      .wr_halves(wr_halves)
    );
    assign cnt_left  = '0;
    assign cnt_right = '0;
  end

  logic wr_take_l [NUM_WR];
  logic wr_take_r [NUM_WR];
  always_comb begin
    for (int p = 0; p < NUM_WR; p++) begin
      wr_take_l[p] = wr_halves[p].left;
      wr_take_r[p] = wr_halves[p].right;
    end
  end

  // ---------------------------------------------------------- Register Read
  logic [HALF_W-1:0] rr_data_l [NUM_RD];
  logic [HALF_W-1:0] rr_data_r [NUM_RD];
  logic              rr_flag_l [NUM_RD];
  logic              rr_flag_r [NUM_RD];
  logic              rr_act_l  [NUM_RD];
  logic              rr_act_r  [NUM_RD];

  varf_half #(.N_ENTRIES(N_ENTRIES), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) u_left (
    .clk, .rst_n,
    .wr_en    (rw_valid),
    .wr_take  (wr_take_l),
    .wr_addr  (rw_preg),
    .wr_data  (rw_upper),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (rr_data_l),
    .rd_flag  (rr_flag_l),
    .rd_active(rr_act_l)
  );

  varf_half #(.N_ENTRIES(N_ENTRIES), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) u_right (
    .clk, .rst_n,
    .wr_en    (rw_valid),
    .wr_take  (wr_take_r),
    .wr_addr  (rw_preg),
    .wr_data  (rw_lower),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (rr_data_r),
    .rd_flag  (rr_flag_r),
    .rd_active(rr_act_r)
  );

  always_comb begin
    rd_left_cnt  = '0;
    rd_right_cnt = '0;
    for (int r = 0; r < NUM_RD; r++) begin
      rd_halves[r] = '{left: rr_act_l[r], right: rr_act_r[r]};
      rd_left_cnt  = rd_left_cnt  + RC_W'(rr_act_l[r]);
      rd_right_cnt = rd_right_cnt + RC_W'(rr_act_r[r]);
    end
  end

  // ------------------------------------------------------------ RR/EX latch
  logic [HALF_W-1:0] ex_data_l [NUM_RD];
  logic [HALF_W-1:0] ex_data_r [NUM_RD];
  halves_t           ex_flags  [NUM_RD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_RD; r++) rd_valid[r] <= 1'b0;
    end else begin
      for (int r = 0; r < NUM_RD; r++) rd_valid[r] <= rd_en[r];
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < NUM_RD; r++) begin
      ex_data_l[r] <= rr_data_l[r];
      ex_data_r[r] <= rr_data_r[r];
      ex_flags[r]  <= '{left: rr_flag_l[r], right: rr_flag_r[r]};
    end
  end

  // ---------------------------------------------------------------- Execute
  for (genvar r = 0; r < NUM_RD; r++) begin : g_steer
    varf_read_steer u_steer (
      .left (ex_data_l[r]),
      .right(ex_data_r[r]),
      .flags(ex_flags[r]),
      .data (rd_data[r])
    );
  end

endmodule
