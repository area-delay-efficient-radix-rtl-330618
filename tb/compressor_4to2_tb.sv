// compressor_4to2_tb: exhaustive self-checking test of the 4:2 compressor.
//
// For all 32 input combinations it checks the arithmetic identity
// x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout), and that cout is the
// same for cin = 0 and cin = 1 (no horizontal ripple). A watchdog bounds
// the run.
module compressor_4to2_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned WATCHDOG_NS = 100 * STEP_NS;

  int checks = 0, failures = 0;
  logic x1, x2, x3, x4, cin, sum, carry, cout;

  compressor_4to2 dut (.*);

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_c0;
      for (int c = 0; c < 2; c++) begin
        int in_sum, out_sum;
        {x4, x3, x2, x1} = v[3:0];
        cin = c[0];
        #(STEP_NS);
        in_sum  = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
        out_sum = int'(sum) + 2 * (int'(carry) + int'(cout));
        checks++;
        if (in_sum != out_sum) begin
          failures++;
          $display("FAIL in=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
                   x4, x3, x2, x1, cin, sum, carry, cout);
        end
        if (c == 0) cout_c0 = cout;
        else begin
          checks++;
          if (cout != cout_c0) begin
            failures++;
            $display("FAIL cout depends on cin for inputs %b", v[3:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
