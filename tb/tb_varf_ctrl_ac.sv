// tb_varf_ctrl_ac: self-checking test of access-counter placement. A
// cycle-accurate reference keeps its own two counters: ports are served in
// order, a narrow value goes to the half with the lower running count (ties
// to the right), regular values count on both halves, read accesses are
// added at the end of the cycle, and both counters halve when one would
// overflow. CNT_W is reduced to 8 so that halving happens often. It also
// checks that the narrow writes end up balanced between the halves.
module tb_varf_ctrl_ac;
  import varf_pkg::*;
  localparam int NUM_WR = 8;
  localparam int NUM_RD = 16;
  localparam int CNT_W  = 8;
  localparam int RC_W   = $clog2(NUM_RD + 1);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             wr_valid  [NUM_WR];
  logic             wr_narrow [NUM_WR];
  logic [RC_W-1:0]  rd_left_cnt, rd_right_cnt;
  halves_t          wr_halves [NUM_WR];
  logic [CNT_W-1:0] cnt_left, cnt_right;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_halve = 0;
  int m_l = 0, m_r = 0;   // reference counters

  varf_ctrl_ac #(.NUM_WR(NUM_WR), .NUM_RD(NUM_RD), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rl, rr;
    logic [1:0] expect_h;
    for (int p = 0; p < NUM_WR; p++) begin wr_valid[p] = 0; wr_narrow[p] = 0; end
    rd_left_cnt = '0; rd_right_cnt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_WR; p++) begin
        wr_valid[p]  = ($urandom % 4) != 0;
        wr_narrow[p] = ($urandom % 32) != 0;   // mostly narrow
      end
      // reads biased to the right half for a while, then to the left
      rd_left_cnt  = RC_W'((i / 500) % 2 == 0 ? $urandom % 3 : $urandom % 9);
      rd_right_cnt = RC_W'((i / 500) % 2 == 0 ? $urandom % 9 : $urandom % 3);
      #1;
      checks++;
      if (cnt_left !== CNT_W'(m_l) || cnt_right !== CNT_W'(m_r)) begin
        failures++;
        $display("FAIL cycle %0d counters %0d/%0d expected %0d/%0d", i, cnt_left, cnt_right, m_l, m_r);
      end
      rl = m_l; rr = m_r;
      for (int p = 0; p < NUM_WR; p++) begin
        if (!wr_valid[p])       expect_h = 2'b00;
        else if (!wr_narrow[p]) expect_h = 2'b11;
        else if (rl < rr)       expect_h = 2'b10;
        else                    expect_h = 2'b01;
        rl += int'(expect_h[1]);
        rr += int'(expect_h[0]);
        case (expect_h) 2'b01: n_right++; 2'b10: n_left++; default: ; endcase
        checks++;
        if (wr_halves[p] !== expect_h) begin
          failures++;
          $display("FAIL cycle %0d port %0d got %b expected %b", i, p, wr_halves[p], expect_h);
        end
      end
      rl += int'(rd_left_cnt);
      rr += int'(rd_right_cnt);
      if (rl >= (1 << CNT_W) || rr >= (1 << CNT_W)) begin
        rl = rl / 2; rr = rr / 2; n_halve++;
      end
      m_l = rl; m_r = rr;
    end
    // balance: narrow writes should be split close to half/half
    checks++;
    if (n_left == 0 || n_right == 0 || n_halve == 0) begin
      failures++;
      $display("FAIL coverage left=%0d right=%0d halvings=%0d", n_left, n_right, n_halve);
    end
    $display("narrow writes left=%0d right=%0d, counter halvings=%0d", n_left, n_right, n_halve);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
