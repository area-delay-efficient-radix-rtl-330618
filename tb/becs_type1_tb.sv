// becs_type1_tb: exhaustive self-checking test of the type-1 Booth
// encoder-cum-selector.
//
// For every A (256 values) and every 3-bit group (8 codes) it drives A, -A
// (computed here, independent of the B2C unit) and the group, and checks the
// 10-bit partial product against d * A, where d = -2*g2 + g1 + g0 is the
// radix-4 Booth digit. It counts how often each digit 0, +1, +2, -1, -2 was
// applied and fails if any never was. A watchdog bounds the run.
module becs_type1_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned WATCHDOG_NS = 3000 * STEP_NS;

  int checks = 0, failures = 0;
  int digit_count [5]; // index d + 2

  logic [OP_W-1:0]  a;
  logic [NEG_W-1:0] a_neg;
  logic [2:0]       grp;
  pp_t              pp;

  becs_type1 dut (.a(a), .a_neg(a_neg), .grp(grp), .pp(pp));

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
      for (int g = 0; g < 8; g++) begin
        int av, d, exp_v, neg_v;
        a     = i[OP_W-1:0];
        av    = int'($signed(a));
        neg_v = -av;
        a_neg = neg_v[NEG_W-1:0];
        grp   = g[2:0];
        d     = -2 * g[2] + g[1] + g[0];
        exp_v = d * av;
        #(STEP_NS);
        checks++;
        digit_count[d+2]++;
        if (pp !== exp_v[PP_W-1:0]) begin
          failures++;
          $display("FAIL a=%0d grp=%b pp=%0d expected %0d", av, grp, $signed(pp), exp_v);
        end
      end
    end
    foreach (digit_count[i]) begin
      checks++;
      if (digit_count[i] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never applied", i - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
