// tb_varf_half: self-checking test of one register file partition, reduced
// to 32 entries, 4 read and 2 write ports. A reference array of data and
// flags is kept in the testbench; random writes (taking or not taking the
// value) and reads are driven, and every read checks the gated data, the
// flag and the activity bit. Reads return the value before a same-cycle
// write. Reset clears all flags.
module tb_varf_half;
  import varf_pkg::*;
  localparam int N      = 32;
  localparam int NUM_RD = 4;
  localparam int NUM_WR = 2;
  localparam int ID_W   = $clog2(N);

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              wr_en    [NUM_WR];
  logic              wr_take  [NUM_WR];
  logic [ID_W-1:0]   wr_addr  [NUM_WR];
  logic [HALF_W-1:0] wr_data  [NUM_WR];
  logic              rd_en    [NUM_RD];
  logic [ID_W-1:0]   rd_addr  [NUM_RD];
  logic [HALF_W-1:0] rd_data  [NUM_RD];
  logic              rd_flag  [NUM_RD];
  logic              rd_active[NUM_RD];

  logic [HALF_W-1:0] m_data [N];
  logic              m_flag [N];
  int checks = 0, failures = 0;
  int n_gated = 0, n_hit = 0, n_clear = 0;

  varf_half #(.N_ENTRIES(N), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [HALF_W-1:0] expect_d;
    for (int e = 0; e < N; e++) begin m_flag[e] = 1'b0; m_data[e] = '0; end
    for (int p = 0; p < NUM_WR; p++) begin wr_en[p] = 0; wr_take[p] = 0; wr_addr[p] = '0; wr_data[p] = '0; end
    for (int r = 0; r < NUM_RD; r++) begin rd_en[r] = 0; rd_addr[r] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_addr[0] = ID_W'($urandom);
      wr_addr[1] = ID_W'($urandom);
      if (wr_addr[1] == wr_addr[0]) wr_addr[1] = wr_addr[0] + 1'b1;
      for (int p = 0; p < NUM_WR; p++) begin
        wr_en[p]   = ($urandom % 2) != 0;
        wr_take[p] = ($urandom % 3) != 0;
        wr_data[p] = {$urandom, $urandom};
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]   = ($urandom % 4) != 0;
        rd_addr[r] = ID_W'($urandom);
      end
      #1;
      for (int r = 0; r < NUM_RD; r++) begin
        expect_d = (rd_en[r] && m_flag[rd_addr[r]]) ? m_data[rd_addr[r]] : '0;
        checks++;
        if (rd_data[r] !== expect_d || rd_flag[r] !== (rd_en[r] && m_flag[rd_addr[r]])
            || rd_active[r] !== rd_flag[r]) begin
          failures++;
          $display("FAIL cycle %0d port %0d addr %0d got %h/%b expected %h/%b", i, r, rd_addr[r],
                   rd_data[r], rd_flag[r], expect_d, m_flag[rd_addr[r]]);
        end
        if (rd_en[r] && !m_flag[rd_addr[r]]) n_gated++;
        if (rd_en[r] &&  m_flag[rd_addr[r]]) n_hit++;
      end
      @(posedge clk);
      for (int p = 0; p < NUM_WR; p++)
        if (wr_en[p]) begin
          if (!wr_take[p] && m_flag[wr_addr[p]]) n_clear++;
          m_flag[wr_addr[p]] = wr_take[p];
          if (wr_take[p]) m_data[wr_addr[p]] = wr_data[p];
        end
    end
    if (n_gated == 0 || n_hit == 0 || n_clear == 0) failures++;
    $display("reads gated=%0d hit=%0d, flags cleared=%0d", n_gated, n_hit, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
