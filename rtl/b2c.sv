// b2c: binary to two's complement unit. Produces the 9-bit value -A of the
// 8-bit two's-complement operand A (so -(-128) = +128 is representable).
//
// Bit k of -A is A[k] inverted whenever any lower bit of A is one. The unit
// therefore needs the prefix OR of A[k-1:0]; it is built as a shallow tree of
// 2-input NOR gates on bit pairs followed by NAND gates, so that each output
// passes one NOR rank, one NAND rank (plus inverters) and one XOR. The top bit uses the
// simplified form S8 = ~A7 & ~X, where X means "A[6:0] is all zero": since the
// sign extension of A equals A7, S8 is one exactly when A is positive. That
// simplification is the published one; the exact NOR/NAND arrangement of the
// lower bits is this design's own.
//
// Interface: a[7:0] in, s[8:0] = -a out. Purely combinational.
module b2c
  import booth_pkg::*;
(
  input  logic [OP_W-1:0]  a,
  output logic [NEG_W-1:0] s
);

  // First level: NOR of bit pairs (true when both bits are zero).
  logic n01, n23, n45;
  // any_lo[k]: some bit of a[k-1:0] is one (prefix OR), k = 1..7.
  logic [OP_W-1:0] any_lo;
  // x: a[6:0] is all zero.
  logic x;

  always_comb begin
    n01 = ~(a[0] | a[1]);
    n23 = ~(a[2] | a[3]);
    n45 = ~(a[4] | a[5]);

    any_lo[0] = 1'b0;
    any_lo[1] = a[0];
    any_lo[2] = ~n01;
    any_lo[3] = ~(n01 & ~a[2]);
    any_lo[4] = ~(n01 & n23);
    any_lo[5] = ~(n01 & n23 & ~a[4]);
    any_lo[6] = ~(n01 & n23 & n45);
    any_lo[7] = ~(n01 & n23 & n45 & ~a[6]);
    x = ~any_lo[7];

    s[0] = a[0];
    for (int k = 1; k < OP_W; k++) begin
      s[k] = a[k] ^ any_lo[k];
    end
    // S8 = ~A7 & ~X: the sign extension of A equals A7.
    s[OP_W] = ~(a[OP_W-1] | x);
  end

endmodule
