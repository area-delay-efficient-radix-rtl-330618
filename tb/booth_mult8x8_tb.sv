// booth_mult8x8_tb: exhaustive end-to-end test of the radix-4 8x8 Booth
// multiplier at its default configuration.
//
// All 65,536 operand pairs are applied, one every 50 ns. For each the 15-bit
// output is compared with the product computed in the testbench: sign-extended
// it must equal A * B exactly, except for (-128) * (-128) whose value +16384
// does not fit in 15 bits; there the output must be the 15-bit wrap of it.
// The test also counts how often each mechanism of the datapath was exercised
// and fails if one never was:
//   - every Booth digit in every encoder-cum-selector (type-2: 0, +1, -1, -2;
//     type-1: 0, +1, +2, -1, -2),
//   - the B2C unit producing +128 (A = -128 with a negative digit),
//   - a horizontal carry-out of 1 in the 4:2 compressor chain,
//   - each upper segment of the final CLA-CSLA adder selecting its
//     carry-in-1 results,
//   - the single out-of-range product.
// A watchdog bounds the run.
module booth_mult8x8_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import booth_pkg::*;

  localparam int unsigned STEP_NS     = 50;
  localparam int unsigned WATCHDOG_NS = (65536 + 100) * STEP_NS;

  int checks = 0, failures = 0;
  int digit_count [NUM_PP][5]; // [encoder][digit + 2]
  int b2c_plus128 = 0, comp_cout = 0, wraps = 0;
  int seg_sel1 [3];
  localparam int SEG_LSB [3] = '{2, 5, 8};

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
    foreach (digit_count[i, d]) digit_count[i][d] = 0;
    foreach (seg_sel1[s]) seg_sel1[s] = 0;
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int av, bv, ref_v, got_v;
        logic [OP_W:0] bx; // B with B-1 = 0 appended
        logic [ADD_W-1:0] rs, rc;
        a = ia[OP_W-1:0];
        b = ib[OP_W-1:0];
        #(STEP_NS);
        av    = int'($signed(a));
        bv    = int'($signed(b));
        ref_v = av * bv;
        got_v = int'($signed(p));
        checks++;
        if (ref_v == 16384) begin
          wraps++;
          if (got_v != -16384) begin
            failures++;
            $display("FAIL a=%0d b=%0d p=%0d expected wrap to -16384", av, bv, got_v);
          end
        end else if (got_v != ref_v) begin
          failures++;
          if (failures < 20) $display("FAIL a=%0d b=%0d p=%0d expected %0d", av, bv, got_v, ref_v);
        end

        // Mechanism counters.
        bx = {b, 1'b0};
        for (int i = 0; i < int'(NUM_PP); i++) begin
          int d;
          d = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
          digit_count[i][d+2]++;
          if (a == 8'h80 && d < 0) b2c_plus128++;
        end
        if (|dut.u_ppa.u_comp.col_cout[PROD_W-2:6]) comp_cout++;
        rs = dut.u_ppa.row_s;
        rc = dut.u_ppa.row_c;
        foreach (SEG_LSB[s]) begin
          int lo_mask;
          lo_mask = (1 << SEG_LSB[s]) - 1;
          if ((((int'(rs) & lo_mask) + (int'(rc) & lo_mask)) >> SEG_LSB[s]) & 1) seg_sel1[s]++;
        end
      end
    end

    for (int i = 0; i < int'(NUM_PP); i++) begin
      for (int d = -2; d <= 2; d++) begin
        if (i == 0 && d == 2) continue; // +2 cannot occur with B-1 = 0
        checks++;
        if (digit_count[i][d+2] == 0) begin
          failures++;
          $display("FAIL encoder %0d never applied digit %0d", i, d);
        end
      end
    end
    checks++;
    if (digit_count[0][4] != 0) failures++;
    checks++;
    if (b2c_plus128 == 0) failures++;
    checks++;
    if (comp_cout == 0) failures++;
    foreach (seg_sel1[s]) begin
      checks++;
      if (seg_sel1[s] == 0) failures++;
    end
    checks++;
    if (wraps != 1) failures++;
    $display("mechanisms: b2c(+128)=%0d compressor_cout=%0d seg_carry1=%0d/%0d/%0d wraps=%0d",
             b2c_plus128, comp_cout, seg_sel1[0], seg_sel1[1], seg_sel1[2], wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
