// tb_varf_regfile_full: the register file at its default size (512
// registers, 16 read ports, 8 write ports, register-id placement) taken
// through complete write/read traffic.
//
// Phase 1 writes every one of the 512 registers once, 8 per cycle, with a
// value mix in which 97% of the values are narrow (fit in 34 bits) and the
// rest are full 64-bit values. Phase 2 reads all 512 back, 16 per cycle, and
// checks each against the written value, one cycle after the read. Phase 3
// runs random rewrites and reads for 2000 cycles with the same mix,
// checking every read. Throughout it counts how many data-half accesses
// (writes and reads whose wordline fired) go to each partition and checks
// that the register-id rule splits them evenly: the left share must lie
// between 45% and 55%.
module tb_varf_regfile_full;
  import varf_pkg::*;
  localparam int N      = NREGS;
  localparam int NUM_RD = 16;
  localparam int NUM_WR = 8;
  localparam int ID_W   = $clog2(N);

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            wb_valid  [NUM_WR];
  logic [ID_W-1:0] wb_preg   [NUM_WR];
  logic [XLEN-1:0] wb_result [NUM_WR];
  logic            rd_en     [NUM_RD];
  logic [ID_W-1:0] rd_addr   [NUM_RD];
  logic            rd_valid  [NUM_RD];
  logic [XLEN-1:0] rd_data   [NUM_RD];
  logic [9:0]      temp_left = '0, temp_right = '0;
  halves_t         wr_halves [NUM_WR];
  halves_t         rd_halves [NUM_RD];
  logic [31:0]     cnt_left, cnt_right;

  varf_regfile dut (.*);

  always #5 clk = ~clk;

  logic [XLEN-1:0] m_val [N];
  logic            p_en     [NUM_RD];
  logic [XLEN-1:0] p_expect [NUM_RD];
  int checks = 0, failures = 0;
  longint acc_left = 0, acc_right = 0;
  int n_narrow = 0, n_regular = 0;

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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accounting and read checking, sampled at the falling edge, before the
  // stimulus of the next cycle is applied
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NUM_WR; p++) begin
      acc_left  += longint'(wr_halves[p].left);
      acc_right += longint'(wr_halves[p].right);
    end
    for (int r = 0; r < NUM_RD; r++) begin
      acc_left  += longint'(rd_halves[r].left);
      acc_right += longint'(rd_halves[r].right);
      if (p_en[r]) begin
        checks++;
        if (!rd_valid[r] || rd_data[r] !== p_expect[r]) begin
          failures++;
          if (failures < 20) $display("FAIL port %0d data %h expected %h", r, rd_data[r], p_expect[r]);
        end
      end
    end
  end

  task automatic idle_inputs();
    for (int p = 0; p < NUM_WR; p++) wb_valid[p] = 1'b0;
    for (int r = 0; r < NUM_RD; r++) rd_en[r] = 1'b0;
  endtask

  // drive one cycle; values take effect in the model two edges later
  task automatic cycle(bit do_wr, int base, bit do_rd, int rbase, bit rnd);
    logic [ID_W-1:0] ids [NUM_WR];
    @(negedge clk);
    #1;
    for (int p = 0; p < NUM_WR; p++) begin
      ids[p]       = rnd ? ID_W'(($urandom % (N / NUM_WR)) * NUM_WR + p) : ID_W'(base + p);
      wb_valid[p]  = do_wr;
      wb_preg[p]   = ids[p];
      wb_result[p] = gen_value();
    end
    for (int r = 0; r < NUM_RD; r++) begin
      rd_en[r]   = do_rd;
      rd_addr[r] = rnd ? ID_W'($urandom) : ID_W'(rbase + r);
      p_en[r]    = do_rd;
      p_expect[r] = m_val[rd_addr[r]];
    end
    // the model sees a write after the Register Write edge, two edges away
    fork
      begin
        logic [ID_W-1:0] wid [NUM_WR];
        logic [XLEN-1:0] wv  [NUM_WR];
        logic            we  [NUM_WR];
        for (int p = 0; p < NUM_WR; p++) begin wid[p] = ids[p]; wv[p] = wb_result[p]; we[p] = do_wr; end
        repeat (2) @(posedge clk);
        for (int p = 0; p < NUM_WR; p++)
          if (we[p]) begin
            m_val[wid[p]] = wv[p];
            if ($signed(wv[p]) >= -(64'sd1 <<< 33) && $signed(wv[p]) < (64'sd1 <<< 33)) n_narrow++;
            else n_regular++;
          end
      end
    join_none
  endtask

  initial begin
    real share;
    for (int e = 0; e < N; e++) m_val[e] = '0;
    for (int r = 0; r < NUM_RD; r++) begin p_en[r] = 1'b0; p_expect[r] = '0; rd_addr[r] = '0; end
    for (int p = 0; p < NUM_WR; p++) begin wb_preg[p] = '0; wb_result[p] = '0; end
    idle_inputs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase 1: write all registers
    for (int b = 0; b < N; b += NUM_WR) cycle(1'b1, b, 1'b0, 0, 1'b0);
    @(negedge clk); #1 idle_inputs(); for (int r = 0; r < NUM_RD; r++) p_en[r] = 1'b0;
    repeat (3) @(posedge clk);
    // phase 2: read all registers back
    for (int b = 0; b < N; b += NUM_RD) cycle(1'b0, 0, 1'b1, b, 1'b0);
    // phase 3: random traffic
    for (int i = 0; i < 2000; i++) cycle(1'b1, 0, 1'b1, 0, 1'b1);
    @(negedge clk); #1 idle_inputs(); for (int r = 0; r < NUM_RD; r++) p_en[r] = 1'b0;
    repeat (3) @(posedge clk);

    share = real'(acc_left) / real'(acc_left + acc_right);
    $display("values written: narrow=%0d regular=%0d", n_narrow, n_regular);
    $display("partition accesses: left=%0d right=%0d left share=%0.3f", acc_left, acc_right, share);
    checks++;
    if (share < 0.45 || share > 0.55) begin
      failures++;
      $display("FAIL: accesses not balanced between the halves");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
