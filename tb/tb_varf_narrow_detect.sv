// tb_varf_narrow_detect: self-checking test of the narrow-width detector.
// Drives random 64-bit results of random significant widths (including the
// 34/35-bit boundary, both signs) and compares the narrow flag with an
// independent check: the value equals the sign extension of its low 34 bits.
module tb_varf_narrow_detect;
  import varf_pkg::*;

  logic [XLEN-1:0] result;
  logic            narrow;
  int checks = 0, failures = 0;
  int n_narrow = 0, n_regular = 0;

  varf_narrow_detect dut (.result, .narrow);

  function automatic logic [XLEN-1:0] rand_value(int unsigned width);
    logic [XLEN-1:0] v;
    v = {$urandom, $urandom};
    if (width < XLEN) begin
      // keep width bits, sign-extend from bit width-1
      v = v & ((64'd1 << width) - 1);
      if (v[width-1]) v = v | ~((64'd1 << width) - 1);
    end
    return v;
  endfunction

  task automatic check(logic [XLEN-1:0] v);
    logic expect_n;
    result = v;
    #1;
    expect_n = ($signed(v) == $signed({{(XLEN-HALF_W){v[HALF_W-1]}}, v[HALF_W-1:0]}));
    checks++;
    if (narrow !== expect_n) begin
      failures++;
      $display("FAIL value=%h narrow=%b expected=%b", v, narrow, expect_n);
    end
    if (expect_n) n_narrow++; else n_regular++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // boundary values
    check(64'd0);
    check('1);
    check(64'h0000_0001_FFFF_FFFF);   // largest positive 34-bit
    check(64'h0000_0002_0000_0000);   // 2^33, needs 35 bits
    check(64'hFFFF_FFFE_0000_0000);   // most negative 34-bit
    check(64'hFFFF_FFFD_FFFF_FFFF);   // one below it
    check(64'h8000_0000_0000_0000);
    check(64'h7FFF_FFFF_FFFF_FFFF);
    for (int i = 0; i < 4000; i++) check(rand_value(1 + ($urandom % XLEN)));
    for (int i = 0; i < 1000; i++) check(rand_value(33 + ($urandom % 4)));
    if (n_narrow == 0 || n_regular == 0) begin
      failures++;
      $display("FAIL: a class of value was never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
