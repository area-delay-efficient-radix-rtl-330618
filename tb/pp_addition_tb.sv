// pp_addition_tb: self-checking test of the partial product addition unit.
//
// Drives random and extreme 10-bit partial products and checks the 15-bit
// output against (PP0 + 4 PP1 + 16 PP2 + 64 PP3) mod 2^15, each PP read as a
// signed number. A watchdog bounds the run.
module pp_addition_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned N_RANDOM    = 50000;
  localparam int unsigned WATCHDOG_NS = (N_RANDOM + 300) * STEP_NS;

  int checks = 0, failures = 0;
  pp_t               pp [NUM_PP];
  logic [PROD_W-1:0] product;

  pp_addition dut (.pp(pp), .product(product));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    int ref_v;
    #(STEP_NS);
    ref_v = 0;
    for (int j = 0; j < int'(NUM_PP); j++) ref_v += int'($signed(pp[j])) * (1 << (2 * j));
    checks++;
    if (product !== ref_v[PROD_W-1:0]) begin
      failures++;
      $display("FAIL pp=%h %h %h %h got %h expected %h",
               pp[3], pp[2], pp[1], pp[0], product, ref_v[PROD_W-1:0]);
    end
  endtask

  initial begin
    pp_t corner [4] = '{10'h000, 10'h3FF, 10'h200, 10'h1FF};
    for (int c = 0; c < 256; c++) begin
      for (int j = 0; j < int'(NUM_PP); j++) pp[j] = corner[(c >> (2 * j)) & 3];
      apply_and_check();
    end
    for (int n = 0; n < int'(N_RANDOM); n++) begin
      for (int j = 0; j < int'(NUM_PP); j++) pp[j] = pp_t'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
