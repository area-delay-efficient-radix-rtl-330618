// cla_csla_tb: exhaustive self-checking test of the 10-bit CLA-CSLA adder.
//
// Applies every pair of 10-bit operands with both carry-in values (2^21
// vectors) and compares {cout, sum} with x + y + cin. It counts how many
// vectors made each segment above the lowest one receive a carry of 1 (the
// multiplexer picking the LACG-1/SG-1 results) and fails if some segment
// never did. A watchdog bounds the run.
module cla_csla_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH       = 10;
  localparam int unsigned STEP_NS     = 1;
  localparam int unsigned WATCHDOG_NS = (1 << (2 * WIDTH + 1)) * STEP_NS + 1000;

  int checks = 0, failures = 0;
  int seg_cin_hits [3];  // carry into bits 2, 5 and 8
  localparam int SEG_LSB [3] = '{2, 5, 8};

  logic [WIDTH-1:0] x, y, sum;
  logic             cin, cout;

  cla_csla dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seg_cin_hits[i]) seg_cin_hits[i] = 0;
    for (int i = 0; i < (1 << WIDTH); i++) begin
      for (int j = 0; j < (1 << WIDTH); j++) begin
        for (int c = 0; c < 2; c++) begin
          int ref_v;
          x   = i[WIDTH-1:0];
          y   = j[WIDTH-1:0];
          cin = c[0];
          #(STEP_NS);
          ref_v = i + j + c;
          checks++;
          if ({cout, sum} !== ref_v[WIDTH:0]) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d = %0d, got %0d", i, j, c, ref_v, {cout, sum});
          end
          foreach (SEG_LSB[s]) begin
            int lo_mask, lo_sum;
            lo_mask = (1 << SEG_LSB[s]) - 1;
            lo_sum  = (i & lo_mask) + (j & lo_mask) + c;
            if ((lo_sum >> SEG_LSB[s]) & 1) seg_cin_hits[s]++;
          end
        end
      end
    end
    foreach (seg_cin_hits[s]) begin
      checks++;
      if (seg_cin_hits[s] == 0) failures++;
    end
    $display("segment carry-in = 1 counts: %0d %0d %0d",
             seg_cin_hits[0], seg_cin_hits[1], seg_cin_hits[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
