// booth_mult8x8_random_tb: random-vector test of the 8x8 Booth multiplier,
// 1000 operand pairs applied at 50 ns intervals.
//
// Operands come from $urandom; each 15-bit output is compared with A * B
// reduced to 15 bits (which is exact for every pair but (-128) * (-128)).
// The operation is combinational, so each result is checked one step after
// its operands are applied. A watchdog bounds the run.
module booth_mult8x8_random_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned N_VECTORS   = 1000;
  localparam int unsigned STEP_NS     = 50;
  localparam int unsigned WATCHDOG_NS = (N_VECTORS + 10) * STEP_NS;

  int checks = 0, failures = 0;
  logic [OP_W-1:0]   a, b;
  logic [PROD_W-1:0] p;

  booth_mult8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < int'(N_VECTORS); n++) begin
      int ref_v;
      a = OP_W'($urandom);
      b = OP_W'($urandom);
      #(STEP_NS);
      ref_v = int'($signed(a)) * int'($signed(b));
      checks++;
      if (p !== ref_v[PROD_W-1:0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d p=%h expected %h", $signed(a), $signed(b), p, ref_v[PROD_W-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
