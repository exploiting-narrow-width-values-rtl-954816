// tb_varf_read_steer: self-checking test of the Execute-stage read muxes.
// Random half contents with every flag pair; expected operand computed with
// signed arithmetic: 11 -> {left[29:0], right}, 01 -> right sign-extended,
// 10 -> left sign-extended, 00 -> zero.
module tb_varf_read_steer;
  import varf_pkg::*;

  logic [HALF_W-1:0] left, right;
  halves_t           flags;
  logic [XLEN-1:0]   data;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  varf_read_steer dut (.left, .right, .flags, .data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] expect_d;
    longint sl, sr;
    for (int i = 0; i < 4000; i++) begin
      left  = {$urandom, $urandom};
      right = {$urandom, $urandom};
      flags = halves_t'(i % 4);
      #1;
      sl = longint'($signed(left));
      sr = longint'($signed(right));
      case (i % 4)
        3: expect_d = {left[29:0], right};
        1: expect_d = sr;
        2: expect_d = sl;
        default: expect_d = 64'd0;
      endcase
      seen[i % 4]++;
      checks++;
      if (data !== expect_d) begin
        failures++;
        $display("FAIL l=%h r=%h flags=%b got %h expected %h", left, right, flags, data, expect_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
