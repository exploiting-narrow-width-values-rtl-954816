// tb_varf_write_augment: self-checking test of the Register Write stage
// augmentation. For random values and both flag settings it checks the two
// 34-bit halves against the rule: lower = bits[33:0]; upper = bits[33:0]
// when narrow, else four zero bits above bits[63:34].
module tb_varf_write_augment;
  import varf_pkg::*;

  logic [XLEN-1:0]   wdata;
  logic              narrow;
  logic [HALF_W-1:0] upper, lower;
  int checks = 0, failures = 0;

  varf_write_augment dut (.wdata, .narrow, .upper, .lower);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [67:0] expect68;
    for (int i = 0; i < 4000; i++) begin
      wdata  = {$urandom, $urandom};
      narrow = i[0];
      #1;
      if (narrow) expect68 = {wdata[33:0], wdata[33:0]};
      else        expect68 = {4'b0000, wdata[63:0]};
      checks++;
      if ({upper, lower} !== expect68) begin
        failures++;
        $display("FAIL wdata=%h narrow=%b got %h_%h expected %h", wdata, narrow, upper, lower, expect68);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
