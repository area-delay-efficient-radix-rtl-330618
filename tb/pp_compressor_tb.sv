// pp_compressor_tb: self-checking test of the compressor module.
//
// Drives random 10-bit partial products (plus all-zero, all-one and extreme
// words) and checks that P4..P0 together with the two rows for columns 5..14
// sum, modulo 2^15, to PP0 + 4 PP1 + 16 PP2 + 64 PP3 with each PP taken as a
// signed number. It also checks that P4..P0 alone equal the low five bits of
// that sum, since those columns must leave the module fully resolved.
// A watchdog bounds the run.
module pp_compressor_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS     = 10;
  localparam int unsigned N_RANDOM    = 50000;
  localparam int unsigned WATCHDOG_NS = (N_RANDOM + 300) * STEP_NS;

  int checks = 0, failures = 0;
  pp_t                pp [NUM_PP];
  logic [ADD_LSB-1:0] p_lo;
  logic [ADD_W-1:0]   row_s, row_c;

  pp_compressor dut (.pp(pp), .p_lo(p_lo), .row_s(row_s), .row_c(row_c));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    int ref_v, got_v;
    #(STEP_NS);
    ref_v = 0;
    for (int j = 0; j < int'(NUM_PP); j++) ref_v += int'($signed(pp[j])) * (1 << (2 * j));
    got_v = int'(p_lo) + ((int'(row_s) + int'(row_c)) << ADD_LSB);
    checks++;
    if (got_v[PROD_W-1:0] !== ref_v[PROD_W-1:0]) begin
      failures++;
      $display("FAIL pp=%h %h %h %h got %h expected %h",
               pp[3], pp[2], pp[1], pp[0], got_v[PROD_W-1:0], ref_v[PROD_W-1:0]);
    end
    checks++;
    if (p_lo !== ref_v[ADD_LSB-1:0]) failures++;
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
