// tb_varf_regfile: end-to-end self-checking test of the value-aware register
// file, with the three placement schemes (register id, access counter,
// thermal sensor) side by side at reduced size: 64 registers, 4 read ports,
// 2 write ports, 8-bit access counters (so they halve often).
//
// All three instances see the same writes and reads. A reference model
// keeps the 64-bit value of every register, which any read must return
// whatever the scheme, and per scheme the flag pair of every register and
// the placement decision it expects (even/odd id; cooler sensor; lower
// access count with the in-cycle port order and halving). It checks:
//   - rd_data and rd_valid one cycle after rd_en, equal to the value last
//     written, or zero for a register never written;
//   - wr_halves in the Register Write stage, one cycle after wb_valid;
//   - rd_halves (which partitions a read accesses) in the Register Read stage;
//   - the access counters of the AC instance.
// It counts each mechanism (narrow write to the left, to the right, regular
// write, gated read of an unwritten register, reads of each flag pair,
// counter halving, narrow value overwriting a regular one and back) and
// fails if one never happened.
module tb_varf_regfile;
  import varf_pkg::*;
  localparam int N      = 64;
  localparam int NUM_RD = 4;
  localparam int NUM_WR = 2;
  localparam int CNT_W  = 8;
  localparam int TEMP_W = 10;
  localparam int ID_W   = $clog2(N);
  localparam int NS     = 3;        // 0 = ID, 1 = AC, 2 = TS
  localparam int CYCLES = 4000;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              wb_valid  [NUM_WR];
  logic [ID_W-1:0]   wb_preg   [NUM_WR];
  logic [XLEN-1:0]   wb_result [NUM_WR];
  logic              rd_en     [NUM_RD];
  logic [ID_W-1:0]   rd_addr   [NUM_RD];
  logic [TEMP_W-1:0] temp_left, temp_right;

  logic              rd_valid  [NS][NUM_RD];
  logic [XLEN-1:0]   rd_data   [NS][NUM_RD];
  halves_t           wr_halves [NS][NUM_WR];
  halves_t           rd_halves [NS][NUM_RD];
  logic [CNT_W-1:0]  cnt_left  [NS];
  logic [CNT_W-1:0]  cnt_right [NS];

  localparam scheme_e SCH [NS] = '{SCHEME_ID, SCHEME_AC, SCHEME_TS};

  for (genvar s = 0; s < NS; s++) begin : g_dut
    varf_regfile #(
      .SCHEME(SCH[s]), .N_ENTRIES(N), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR),
      .CNT_W(CNT_W), .TEMP_W(TEMP_W)
    ) dut (
      .clk, .rst_n, .wb_valid, .wb_preg, .wb_result, .rd_en, .rd_addr,
      .rd_valid (rd_valid[s]),
      .rd_data  (rd_data[s]),
      .temp_left, .temp_right,
      .wr_halves(wr_halves[s]),
      .rd_halves(rd_halves[s]),
      .cnt_left (cnt_left[s]),
      .cnt_right(cnt_right[s])
    );
  end

  always #5 clk = ~clk;

  // ------------------------------------------------------------ reference
  logic [XLEN-1:0] m_val  [N];
  logic [1:0]      m_flag [NS][N];
  int              m_cl = 0, m_cr = 0;          // AC reference counters
  // write pipeline: stage 1 = this cycle's inputs, stage 2 = Register Write
  logic            s2_valid [NUM_WR];
  logic [ID_W-1:0] s2_preg  [NUM_WR];
  logic [XLEN-1:0] s2_val   [NUM_WR];
  // reads of the previous cycle
  logic            p_en     [NUM_RD];
  logic [XLEN-1:0] p_expect [NUM_RD];

  int checks = 0, failures = 0;
  int n_wr_left [NS], n_wr_right [NS], n_wr_reg = 0;
  int n_rd_flags [NS][4];
  int n_halve = 0, n_narrow_over_reg = 0, n_reg_over_narrow = 0;
  int n_ts_left = 0, n_ts_right = 0;

  function automatic logic [XLEN-1:0] gen_value();
    logic [XLEN-1:0] v;
    int unsigned w;
    v = {$urandom, $urandom};
    case ($urandom % 10)
      0, 1, 2: w = XLEN;                   // regular (almost always)
      3:       w = 33 + $urandom % 4;      // around the 34-bit boundary
      default: w = 1 + $urandom % HALF_W;  // narrow
    endcase
    if (w < XLEN) begin
      v = v & ((64'd1 << w) - 1);
      if (v[w-1]) v = v | ~((64'd1 << w) - 1);
    end
    return v;
  endfunction

  function automatic bit is_narrow(logic [XLEN-1:0] v);
    return $signed(v) >= -(64'sd1 <<< 33) && $signed(v) < (64'sd1 <<< 33);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  initial begin
    #(10 * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_h [NS][NUM_WR];
    int rl, rr, rdl, rdr;
    for (int s = 0; s < NS; s++) begin
      n_wr_left[s] = 0; n_wr_right[s] = 0;
      for (int f = 0; f < 4; f++) n_rd_flags[s][f] = 0;
      for (int e = 0; e < N; e++) m_flag[s][e] = 2'b00;
    end
    for (int e = 0; e < N; e++) m_val[e] = '0;
    for (int p = 0; p < NUM_WR; p++) begin
      wb_valid[p] = 0; wb_preg[p] = '0; wb_result[p] = '0; s2_valid[p] = 0; s2_preg[p] = '0; s2_val[p] = '0;
    end
    for (int r = 0; r < NUM_RD; r++) begin rd_en[r] = 0; rd_addr[r] = '0; p_en[r] = 0; p_expect[r] = '0; end
    temp_left = 10'd330; temp_right = 10'd330;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk);
      // ---- drive this cycle
      wb_preg[0] = ID_W'($urandom);
      wb_preg[1] = ID_W'($urandom);
      if (wb_preg[1] == wb_preg[0]) wb_preg[1] = wb_preg[0] + 1'b1;
      for (int p = 0; p < NUM_WR; p++) begin
        wb_valid[p]  = (i < 3000) && (($urandom % 4) != 0);
        wb_result[p] = gen_value();
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]   = ($urandom % 4) != 0;
        rd_addr[r] = ID_W'($urandom);
      end
      if (i % 7 == 0) begin
        temp_left  = TEMP_W'(320 + $urandom % 40);
        temp_right = (i % 3 == 0) ? temp_left : TEMP_W'(320 + $urandom % 40);
      end
      #1;
      // ---- outputs of the reads issued last cycle (Execute stage)
      for (int s = 0; s < NS; s++)
        for (int r = 0; r < NUM_RD; r++) begin
          checks++;
          if (rd_valid[s][r] !== p_en[r]) fail($sformatf("scheme %0d port %0d rd_valid", s, r));
          if (p_en[r]) begin
            checks++;
            if (rd_data[s][r] !== p_expect[r])
              fail($sformatf("scheme %0d port %0d rd_data %h expected %h", s, r, rd_data[s][r], p_expect[r]));
          end
        end
      // ---- Register Read stage: partition activity of this cycle's reads
      rdl = 0; rdr = 0;
      for (int s = 0; s < NS; s++)
        for (int r = 0; r < NUM_RD; r++) begin
          logic [1:0] ef;
          ef = rd_en[r] ? m_flag[s][rd_addr[r]] : 2'b00;
          checks++;
          if (rd_halves[s][r] !== ef)
            fail($sformatf("scheme %0d port %0d rd_halves %b expected %b", s, r, rd_halves[s][r], ef));
          if (rd_en[r]) n_rd_flags[s][m_flag[s][rd_addr[r]]]++;
          if (s == 1) begin rdl += int'(ef[1]); rdr += int'(ef[0]); end
        end
      // ---- Register Write stage: placement decisions
      checks++;
      if (cnt_left[1] !== CNT_W'(m_cl) || cnt_right[1] !== CNT_W'(m_cr))
        fail($sformatf("AC counters %0d/%0d expected %0d/%0d", cnt_left[1], cnt_right[1], m_cl, m_cr));
      rl = m_cl; rr = m_cr;
      for (int p = 0; p < NUM_WR; p++) begin
        for (int s = 0; s < NS; s++) exp_h[s][p] = 2'b00;
        if (s2_valid[p]) begin
          if (!is_narrow(s2_val[p])) begin
            for (int s = 0; s < NS; s++) exp_h[s][p] = 2'b11;
          end else begin
            exp_h[0][p] = s2_preg[p][0] ? 2'b10 : 2'b01;
            exp_h[1][p] = (rl < rr) ? 2'b10 : 2'b01;
            exp_h[2][p] = (temp_left < temp_right) ? 2'b10 : 2'b01;
          end
        end
        rl += int'(exp_h[1][p][1]);
        rr += int'(exp_h[1][p][0]);
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (wr_halves[s][p] !== exp_h[s][p])
            fail($sformatf("scheme %0d port %0d wr_halves %b expected %b", s, p, wr_halves[s][p], exp_h[s][p]));
        end
      end
      rl += rdl; rr += rdr;
      if (rl >= (1 << CNT_W) || rr >= (1 << CNT_W)) begin rl /= 2; rr /= 2; n_halve++; end
      // ---- expected read results for next cycle (before this cycle's writes)
      for (int r = 0; r < NUM_RD; r++) begin
        p_en[r]     = rd_en[r];
        p_expect[r] = m_val[rd_addr[r]];
      end
      // ---- commit the Register Write stage at the coming edge
      @(posedge clk);
      m_cl = rl; m_cr = rr;
      for (int p = 0; p < NUM_WR; p++)
        if (s2_valid[p]) begin
          if (is_narrow(s2_val[p]) && m_flag[0][s2_preg[p]] == 2'b11) n_narrow_over_reg++;
          if (!is_narrow(s2_val[p]) && m_flag[0][s2_preg[p]] inside {2'b01, 2'b10}) n_reg_over_narrow++;
          m_val[s2_preg[p]] = s2_val[p];
          for (int s = 0; s < NS; s++) begin
            m_flag[s][s2_preg[p]] = exp_h[s][p];
            if (exp_h[s][p] == 2'b10) n_wr_left[s]++;
            if (exp_h[s][p] == 2'b01) n_wr_right[s]++;
          end
          if (exp_h[0][p] == 2'b11) n_wr_reg++;
          if (exp_h[2][p] == 2'b10) n_ts_left++;
          if (exp_h[2][p] == 2'b01) n_ts_right++;
        end
      for (int p = 0; p < NUM_WR; p++) begin
        s2_valid[p] = wb_valid[p];
        s2_preg[p]  = wb_preg[p];
        s2_val[p]   = wb_result[p];
      end
    end

    // ---- every mechanism must have happened
    for (int s = 0; s < NS; s++) begin
      $display("scheme %0d: narrow writes left=%0d right=%0d; reads with flags 00/01/10/11 = %0d/%0d/%0d/%0d",
               s, n_wr_left[s], n_wr_right[s], n_rd_flags[s][0], n_rd_flags[s][1], n_rd_flags[s][2], n_rd_flags[s][3]);
      checks++;
      if (n_wr_left[s] == 0 || n_wr_right[s] == 0) fail($sformatf("scheme %0d never used both halves", s));
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (n_rd_flags[s][f] == 0) fail($sformatf("scheme %0d never read flags %0d", s, f));
      end
    end
    $display("regular writes=%0d, counter halvings=%0d, narrow over regular=%0d, regular over narrow=%0d",
             n_wr_reg, n_halve, n_narrow_over_reg, n_reg_over_narrow);
    checks++;
    if (n_wr_reg == 0 || n_halve == 0 || n_narrow_over_reg == 0 || n_reg_over_narrow == 0
        || n_ts_left == 0 || n_ts_right == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
