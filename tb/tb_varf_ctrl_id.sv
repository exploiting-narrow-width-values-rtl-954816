// tb_varf_ctrl_id: self-checking test of register-id placement. Random
// valid/narrow/id patterns on all 8 ports; expected halves: idle 00,
// regular 11, narrow with even id 01 (right), narrow with odd id 10 (left).
module tb_varf_ctrl_id;
  import varf_pkg::*;
  localparam int NUM_WR = 8;
  localparam int ID_W   = 9;

  logic            wr_valid  [NUM_WR];
  logic            wr_narrow [NUM_WR];
  logic [ID_W-1:0] wr_preg   [NUM_WR];
  halves_t         wr_halves [NUM_WR];
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_both = 0;

  varf_ctrl_id #(.NUM_WR(NUM_WR), .ID_W(ID_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_h;
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < NUM_WR; p++) begin
        wr_valid[p]  = ($urandom % 8) != 0;
        wr_narrow[p] = ($urandom % 4) != 0;
        wr_preg[p]   = ID_W'($urandom);
      end
      #1;
      for (int p = 0; p < NUM_WR; p++) begin
        if (!wr_valid[p])            expect_h = 2'b00;
        else if (!wr_narrow[p])      expect_h = 2'b11;
        else if (wr_preg[p] % 2 == 0) expect_h = 2'b01;
        else                         expect_h = 2'b10;
        case (expect_h) 2'b01: n_right++; 2'b10: n_left++; 2'b11: n_both++; default: ; endcase
        checks++;
        if (wr_halves[p] !== expect_h) begin
          failures++;
          $display("FAIL port %0d id=%0d narrow=%b got %b expected %b", p, wr_preg[p], wr_narrow[p], wr_halves[p], expect_h);
        end
      end
    end
    if (n_left == 0 || n_right == 0 || n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
