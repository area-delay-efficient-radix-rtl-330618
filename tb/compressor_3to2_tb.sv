// compressor_3to2_tb: exhaustive self-checking test of the 3:2 compressor
// with carry-in and carry-out.
//
// For all 16 input combinations it checks x1 + x2 + x3 + cin =
// sum + 2 * (carry + cout), and that cout does not depend on cin. A watchdog
// bounds the run.
module compressor_3to2_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned WATCHDOG_NS = 100 * STEP_NS;

  int checks = 0, failures = 0;
  logic x1, x2, x3, cin, sum, carry, cout;

  compressor_3to2 dut (.*);

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic cout_c0;
      for (int c = 0; c < 2; c++) begin
        int in_sum, out_sum;
        {x3, x2, x1} = v[2:0];
        cin = c[0];
        #(STEP_NS);
        in_sum  = int'(x1) + int'(x2) + int'(x3) + int'(cin);
        out_sum = int'(sum) + 2 * (int'(carry) + int'(cout));
        checks++;
        if (in_sum != out_sum) begin
          failures++;
          $display("FAIL in=%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
                   x3, x2, x1, cin, sum, carry, cout);
        end
        if (c == 0) cout_c0 = cout;
        else begin
          checks++;
          if (cout != cout_c0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
