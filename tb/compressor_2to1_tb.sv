// compressor_2to1_tb: exhaustive self-checking test of the 2-to-1 compressor
// (full adder): x1 + x2 + cin = sum + 2 * cout for all 8 input combinations.
// A watchdog bounds the run.
module compressor_2to1_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned WATCHDOG_NS = 100 * STEP_NS;

  int checks = 0, failures = 0;
  logic x1, x2, cin, sum, cout;

  compressor_2to1 dut (.*);

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, x2, x1} = v[2:0];
      #(STEP_NS);
      checks++;
      if (int'(x1) + int'(x2) + int'(cin) != int'(sum) + 2 * int'(cout)) begin
        failures++;
        $display("FAIL x1=%b x2=%b cin=%b -> sum=%b cout=%b", x1, x2, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
