// tb_varf_ctrl_ts: self-checking test of thermal-sensor placement. Random
// readings (often equal, to hit the tie rule) and port patterns; expected:
// narrow values go to the half with the strictly lower reading, else to the
// right half; regular values to both; idle ports to none.
module tb_varf_ctrl_ts;
  import varf_pkg::*;
  localparam int NUM_WR = 8;
  localparam int TEMP_W = 10;

  logic              wr_valid  [NUM_WR];
  logic              wr_narrow [NUM_WR];
  logic [TEMP_W-1:0] temp_left, temp_right;
  halves_t           wr_halves [NUM_WR];
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_tie = 0;

  varf_ctrl_ts #(.NUM_WR(NUM_WR), .TEMP_W(TEMP_W)) dut (.*);

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
      temp_left  = TEMP_W'(300 + $urandom % 60);
      temp_right = (i % 5 == 0) ? temp_left : TEMP_W'(300 + $urandom % 60);
      if (temp_left == temp_right) n_tie++;
      for (int p = 0; p < NUM_WR; p++) begin
        wr_valid[p]  = ($urandom % 8) != 0;
        wr_narrow[p] = ($urandom % 4) != 0;
      end
      #1;
      for (int p = 0; p < NUM_WR; p++) begin
        if (!wr_valid[p])                  expect_h = 2'b00;
        else if (!wr_narrow[p])            expect_h = 2'b11;
        else if (int'(temp_left) < int'(temp_right)) expect_h = 2'b10;
        else                               expect_h = 2'b01;
        case (expect_h) 2'b01: n_right++; 2'b10: n_left++; default: ; endcase
        checks++;
        if (wr_halves[p] !== expect_h) begin
          failures++;
          $display("FAIL port %0d tl=%0d tr=%0d got %b expected %b", p, temp_left, temp_right, wr_halves[p], expect_h);
        end
      end
    end
    if (n_left == 0 || n_right == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
