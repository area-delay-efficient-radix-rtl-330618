// becs_type2_tb: exhaustive self-checking test of the type-2 Booth
// encoder-cum-selector (first partial product, B-1 = 0).
//
// For every A and every {B1, B0} it checks the 10-bit partial product against
// d * A with d = -2*B1 + B0, i.e. one of 0, +1, -2, -1, and counts how often
// each digit occurred. -A is computed in the testbench. A watchdog bounds
// the run.
module becs_type2_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned WATCHDOG_NS = 2000 * STEP_NS;

  int checks = 0, failures = 0;
  int digit_count [4]; // index d + 2, d in -2..1

  logic [OP_W-1:0]  a;
  logic [NEG_W-1:0] a_neg;
  logic [1:0]       b;
  pp_t              pp;

  becs_type2 dut (.a(a), .a_neg(a_neg), .b(b), .pp(pp));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (digit_count[i]) digit_count[i] = 0;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 4; k++) begin
        int av, d, exp_v, neg_v;
        a     = i[OP_W-1:0];
        av    = int'($signed(a));
        neg_v = -av;
        a_neg = neg_v[NEG_W-1:0];
        b     = k[1:0];
        d     = -2 * k[1] + k[0];
        exp_v = d * av;
        #(STEP_NS);
        checks++;
        digit_count[d+2]++;
        if (pp !== exp_v[PP_W-1:0]) begin
          failures++;
          $display("FAIL a=%0d b=%b pp=%0d expected %0d", av, b, $signed(pp), exp_v);
        end
      end
    end
    foreach (digit_count[i]) begin
      checks++;
      if (digit_count[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
