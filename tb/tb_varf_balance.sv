// tb_varf_balance: access-balance workload for the three placement schemes.
//
// Three register files at the default size (512 registers, 16 read ports,
// 8 write ports) run the same traffic, one per scheme (register id, access
// counter, thermal sensor). The traffic follows integer code: 97% of the
// results fit in 34 bits, about 3/4 of the ports are busy each cycle, and
// destination registers are allocated at random as a renamer would.
//
// For the thermal-sensor instance the testbench closes the loop with a
// first-order heating model per half, evaluated every cycle:
//   T += K_HEAT * accesses_of_the_half - K_COOL * (T - T_AMB)
// and feeds T back as a 10-bit code in half-kelvin steps. The constants are
// chosen only so that the halves warm by roughly 15 K; they are not
// calibrated to any process.
//
// It reports, per scheme, the share of data-half writes and reads going to
// each half, and checks that:
//   - every read returns the value last written (all three instances);
//   - each scheme sends between 40% and 60% of all data-half accesses to
//     the left half;
//   - the thermal-sensor loop ends with the two halves within 1 K.
// For reference, a file that put every narrow value in the right half would
// give the left half only a few percent of the accesses.
module tb_varf_balance;
  import varf_pkg::*;
  localparam int N      = NREGS;
  localparam int NUM_RD = 16;
  localparam int NUM_WR = 8;
  localparam int ID_W   = $clog2(N);
  localparam int NS     = 3;
  localparam int CYCLES = 6000;
  localparam real T_AMB  = 318.0;
  localparam real K_HEAT = 0.02;
  localparam real K_COOL = 0.01;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            wb_valid  [NUM_WR];
  logic [ID_W-1:0] wb_preg   [NUM_WR];
  logic [XLEN-1:0] wb_result [NUM_WR];
  logic            rd_en     [NUM_RD];
  logic [ID_W-1:0] rd_addr   [NUM_RD];
  logic [9:0]      temp_left = 10'd636, temp_right = 10'd636;

  logic            rd_valid  [NS][NUM_RD];
  logic [XLEN-1:0] rd_data   [NS][NUM_RD];
  halves_t         wr_halves [NS][NUM_WR];
  halves_t         rd_halves [NS][NUM_RD];
  logic [31:0]     cnt_left  [NS];
  logic [31:0]     cnt_right [NS];

  localparam scheme_e SCH [NS] = '{SCHEME_ID, SCHEME_AC, SCHEME_TS};
  localparam string   NAME [NS] = '{"ID", "AC", "TS"};

  for (genvar s = 0; s < NS; s++) begin : g_dut
    varf_regfile #(.SCHEME(SCH[s])) dut (
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

  logic [XLEN-1:0] m_val [N];
  logic            p_en     [NUM_RD];
  logic [XLEN-1:0] p_expect [NUM_RD];
  logic            s2_valid [NUM_WR];
  logic [ID_W-1:0] s2_preg  [NUM_WR];
  logic [XLEN-1:0] s2_val   [NUM_WR];
  longint wl [NS], wr [NS], rl [NS], rr [NS];
  real t_l = T_AMB, t_r = T_AMB;
  int checks = 0, failures = 0;

  function automatic logic [XLEN-1:0] gen_value();
    logic [XLEN-1:0] v;
    int unsigned w;
    v = {$urandom, $urandom};
    w = (($urandom % 100) < 3) ? XLEN : 1 + $urandom % HALF_W;
    if (w < XLEN) begin
      v = v & ((64'd1 << w) - 1);
      if (v[w-1]) v = v | ~((64'd1 << w) - 1);
    end
    return v;
  endfunction

  initial begin
    #(10 * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc_l, acc_r;
    for (int s = 0; s < NS; s++) begin wl[s] = 0; wr[s] = 0; rl[s] = 0; rr[s] = 0; end
    for (int e = 0; e < N; e++) m_val[e] = '0;
    for (int p = 0; p < NUM_WR; p++) begin
      wb_valid[p] = 0; wb_preg[p] = '0; wb_result[p] = '0; s2_valid[p] = 0; s2_preg[p] = '0; s2_val[p] = '0;
    end
    for (int r = 0; r < NUM_RD; r++) begin rd_en[r] = 0; rd_addr[r] = '0; p_en[r] = 0; p_expect[r] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk);
      // distinct destination registers in one cycle: one per bank of 64
      for (int p = 0; p < NUM_WR; p++) begin
        wb_valid[p]  = ($urandom % 4) != 0;
        wb_preg[p]   = ID_W'(p * (N / NUM_WR) + $urandom % (N / NUM_WR));
        wb_result[p] = gen_value();
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]   = ($urandom % 4) != 0;
        rd_addr[r] = ID_W'($urandom);
      end
      #1;
      // reads issued last cycle
      for (int s = 0; s < NS; s++)
        for (int r = 0; r < NUM_RD; r++)
          if (p_en[r]) begin
            checks++;
            if (!rd_valid[s][r] || rd_data[s][r] !== p_expect[r]) begin
              failures++;
              if (failures < 20) $display("FAIL %s port %0d data %h expected %h", NAME[s], r, rd_data[s][r], p_expect[r]);
            end
          end
      // partition activity of this cycle
      for (int s = 0; s < NS; s++) begin
        for (int p = 0; p < NUM_WR; p++) begin
          wl[s] += longint'(wr_halves[s][p].left);
          wr[s] += longint'(wr_halves[s][p].right);
        end
        for (int r = 0; r < NUM_RD; r++) begin
          rl[s] += longint'(rd_halves[s][r].left);
          rr[s] += longint'(rd_halves[s][r].right);
        end
      end
      // heating model of the thermal-sensor instance
      acc_l = 0; acc_r = 0;
      for (int p = 0; p < NUM_WR; p++) begin acc_l += int'(wr_halves[2][p].left); acc_r += int'(wr_halves[2][p].right); end
      for (int r = 0; r < NUM_RD; r++) begin acc_l += int'(rd_halves[2][r].left); acc_r += int'(rd_halves[2][r].right); end
      t_l = t_l + K_HEAT * acc_l - K_COOL * (t_l - T_AMB);
      t_r = t_r + K_HEAT * acc_r - K_COOL * (t_r - T_AMB);
      for (int r = 0; r < NUM_RD; r++) begin
        p_en[r]     = rd_en[r];
        p_expect[r] = m_val[rd_addr[r]];
      end
      @(posedge clk);
      temp_left  <= 10'(int'(t_l * 2.0));
      temp_right <= 10'(int'(t_r * 2.0));
      for (int p = 0; p < NUM_WR; p++)
        if (s2_valid[p]) m_val[s2_preg[p]] = s2_val[p];
      for (int p = 0; p < NUM_WR; p++) begin
        s2_valid[p] = wb_valid[p];
        s2_preg[p]  = wb_preg[p];
        s2_val[p]   = wb_result[p];
      end
    end

    for (int s = 0; s < NS; s++) begin
      real tot, share;
      tot = real'(wl[s] + wr[s] + rl[s] + rr[s]);
      share = real'(wl[s] + rl[s]) / tot;
      $display("%s-VARF: write_right=%0.3f read_right=%0.3f write_left=%0.3f read_left=%0.3f (left share %0.3f)",
               NAME[s], real'(wr[s]) / tot, real'(rr[s]) / tot, real'(wl[s]) / tot, real'(rl[s]) / tot, share);
      $display("   raw counts: write_left=%0d write_right=%0d read_left=%0d read_right=%0d", wl[s], wr[s], rl[s], rr[s]);
      checks++;
      if (share < 0.40 || share > 0.60) begin
        failures++;
        $display("FAIL %s-VARF accesses not balanced", NAME[s]);
      end
    end
    $display("AC-VARF access counters: left=%0d right=%0d", cnt_left[1], cnt_right[1]);
    checks++;
    if (cnt_left[1] == 0 || cnt_right[1] == 0) begin
      failures++;
      $display("FAIL AC-VARF counters idle");
    end
    $display("TS-VARF model temperatures: left=%0.2f K right=%0.2f K", t_l, t_r);
    checks++;
    if (t_l - t_r > 1.0 || t_r - t_l > 1.0) begin
      failures++;
      $display("FAIL TS-VARF halves differ by more than 1 K");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
