// b2c_tb: exhaustive self-checking test of the B2C unit.
//
// Applies all 256 values of A, one every 50 ns, and compares the 9-bit output
// with -A computed from the sign-extended operand in the testbench. It also
// counts the two boundary cases the 9-bit width exists for: A = -128 (giving
// +128) and A = 0 (giving 0). A watchdog ends the run as a failure if it
// does not finish in time.
module b2c_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS      = 50;
  localparam int unsigned WATCHDOG_NS  = 300 * STEP_NS;

  int checks = 0, failures = 0;
  logic [OP_W-1:0]  a;
  logic [NEG_W-1:0] s;

  b2c dut (.a(a), .s(s));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_min = 0, seen_zero = 0;
    for (int i = 0; i < 256; i++) begin
      int exp_v;
      a = i[OP_W-1:0];
      #(STEP_NS);
      exp_v = -int'($signed(a));
      checks++;
      if (s !== exp_v[NEG_W-1:0]) begin
        failures++;
        $display("FAIL a=%0d s=%0d expected %0d", $signed(a), $signed(s), exp_v);
      end
      if (a == 8'h80) seen_min++;
      if (a == 8'h00) seen_zero++;
    end
    checks++;
    if (seen_min == 0 || seen_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
