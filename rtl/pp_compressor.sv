// pp_compressor: compressor module of the partial product addition unit.
//
// The four 10-bit partial products PP_j carry weight 4^j, so PP_j occupies
// product columns 2j..2j+9. Each is sign-extended up to column 14, the top
// column of the 15-bit product. Column heights are then 1, 1, 2, 2, 3, 3 and
// 4 for columns 6..14, which is served by exactly:
//   columns 0, 1   : passed through as product bits P0, P1
//   columns 2, 3   : two 2-to-1 compressors (full adders) with a carry that
//                    ripples 2 -> 3 -> 4; their sums are P2 and P3
//   columns 4, 5   : two 3:2 compressors; the column-4 sum is P4
//   columns 6..14  : nine 4:2 compressors
// The 3:2 and 4:2 compressors are chained through cin/cout, and cout never
// depends on cin, so the chain does not ripple. Each compressor also produces
// a carry of double weight that lands in the next column. Columns 5..14 thus
// hold exactly two bits each: the sum of their own compressor and the carry of
// the compressor below. They leave as two 10-bit rows for the final adder.
// Carries out of column 14 have weight 2^15 and are dropped, as the product
// is 15 bits wide. The compressor counts (nine 4:2, two 3:2, two 2-to-1) are
// the published ones; this column assignment is the one they imply.
//
// Interface: pp[0..3] in; p_lo = P4..P0, row_s and row_c = the two rows for
// columns 5..14 (bit 0 is column 5). Purely combinational.
module pp_compressor
  import booth_pkg::*;
(
  input  pp_t                pp [NUM_PP],
  output logic [ADD_LSB-1:0] p_lo,
  output logic [ADD_W-1:0]   row_s,
  output logic [ADD_W-1:0]   row_c
);

  // Bit of the sign-extended partial product j in product column col.
  function automatic logic ext_bit(input pp_t v, input int j, input int col);
    int idx;
    idx = col - 2 * j;
    if (idx < 0) return 1'b0;
    if (idx > int'(PP_W) - 1) idx = int'(PP_W) - 1;
    return v[idx];
  endfunction

  // Per-column results.
  logic [PROD_W-1:0] col_sum;   // sum bit of each column's compressor
  logic [PROD_W-1:0] col_carry; // double-weight carry (to next column's row)
  logic [PROD_W-1:0] col_cout;  // horizontal carry into next column's compressor

  assign p_lo[0] = pp[0][0];
  assign p_lo[1] = pp[0][1];
  assign col_sum[1:0]   = '0;
  assign col_carry[1:0] = '0;
  assign col_cout[1:0]  = '0;

  // Columns 2 and 3: 2-to-1 compressors, carry ripples upward.
  for (genvar c = 2; c < 4; c++) begin : g_c21
    compressor_2to1 u_c21 (
      .x1  (ext_bit(pp[0], 0, c)),
      .x2  (ext_bit(pp[1], 1, c)),
      .cin (col_cout[c-1]),
      .sum (col_sum[c]),
      .cout(col_cout[c])
    );
    assign col_carry[c] = 1'b0;
    assign p_lo[c]      = col_sum[c];
  end

  // Columns 4 and 5: 3:2 compressors.
  for (genvar c = 4; c < 6; c++) begin : g_c32
    compressor_3to2 u_c32 (
      .x1   (ext_bit(pp[0], 0, c)),
      .x2   (ext_bit(pp[1], 1, c)),
      .x3   (ext_bit(pp[2], 2, c)),
      .cin  (col_cout[c-1]),
      .sum  (col_sum[c]),
      .carry(col_carry[c]),
      .cout (col_cout[c])
    );
  end
  assign p_lo[4] = col_sum[4];

  // Columns 6..14: 4:2 compressors.
  for (genvar c = 6; c < int'(PROD_W); c++) begin : g_c42
    compressor_4to2 u_c42 (
      .x1   (ext_bit(pp[0], 0, c)),
      .x2   (ext_bit(pp[1], 1, c)),
      .x3   (ext_bit(pp[2], 2, c)),
      .x4   (ext_bit(pp[3], 3, c)),
      .cin  (col_cout[c-1]),
      .sum  (col_sum[c]),
      .carry(col_carry[c]),
      .cout (col_cout[c])
    );
  end

  // Two rows for columns 5..14.
  for (genvar c = ADD_LSB; c < int'(PROD_W); c++) begin : g_rows
    assign row_s[c-ADD_LSB] = col_sum[c];
    assign row_c[c-ADD_LSB] = col_carry[c-1];
  end

endmodule
