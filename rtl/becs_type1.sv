// becs_type1: Booth encoder-cum-selector, type 1. Forms one radix-4 partial
// product PP_i (i = 1..3) as a 10-bit two's-complement word.
//
// Encoder: from the group {B[2i+1], B[2i], B[2i-1]} it derives four active-high
// selects P (+A), Q (+2A), R (-2A) and S (-A). All four are written as 2-input
// NOR gates over shared terms: the NAND and the OR of the two low group bits,
// their XOR in the form NAND(OR, NAND), and B[2i+1] and its complement.
// Codes 000 and 111 leave all selects low and the partial product is zero.
//
// Selector: a first rank of 2-input NAND gates combines each select with its
// candidate word (A, A<<1, -A, -A<<1). The candidates are *not* widened to 10
// bits before this rank; instead the NAND outputs are sign-extended, which is
// equivalent because a widened operand bit equals its sign bit. The shift by
// one is done by appending a constant 1 at the LSB of the NAND outputs, which
// is what a NAND with a 0 input would give. A second rank of 4-input NAND gates
// merges the four words. Encoder equations, NAND-NAND selection, late width
// equalisation and the appended 1 follow the published circuit.
//
// Interface: a = A, a_neg = -A (from the B2C unit), grp = {B[2i+1], B[2i],
// B[2i-1]}; pp = selected partial product. Purely combinational.
module becs_type1
  import booth_pkg::*;
(
  input  logic [OP_W-1:0]  a,
  input  logic [NEG_W-1:0] a_neg,
  input  logic [2:0]       grp,
  output pp_t              pp
);

  booth_sel_t sel;
  logic lo_or, lo_nand, lo_xor_n, hi_n;

  // Encoder.
  always_comb begin
    lo_or    = grp[0] | grp[1];
    lo_nand  = ~(grp[0] & grp[1]);
    lo_xor_n = ~(lo_or & lo_nand);   // XNOR of the two low bits
    hi_n     = ~grp[2];
    sel.p    = ~(lo_xor_n | grp[2]); // 001, 010 -> +A
    sel.q    = ~(lo_nand  | grp[2]); // 011      -> +2A
    sel.r    = ~(lo_or    | hi_n);   // 100      -> -2A
    sel.s    = ~(lo_xor_n | hi_n);   // 101, 110 -> -A
  end

  // First NAND rank at natural widths.
  logic [OP_W-1:0]  n_p;  // ~(P & A),      8 bits
  logic [OP_W:0]    n_q;  // ~(Q & 2A),     9 bits, LSB appended 1
  logic [NEG_W-1:0] n_s;  // ~(S & -A),     9 bits
  logic [NEG_W:0]   n_r;  // ~(R & -2A),   10 bits, LSB appended 1

  always_comb begin
    n_p = ~(a & {OP_W{sel.p}});
    n_q = {~(a & {OP_W{sel.q}}), 1'b1};
    n_s = ~(a_neg & {NEG_W{sel.s}});
    n_r = {~(a_neg & {NEG_W{sel.r}}), 1'b1};
  end

  // Width equalisation after the first rank, then the NAND4 rank.
  pp_t w_p, w_q, w_s, w_r;
  always_comb begin
    w_p = {{(PP_W-OP_W){n_p[OP_W-1]}}, n_p};
    w_q = {{(PP_W-OP_W-1){n_q[OP_W]}}, n_q};
    w_s = {{(PP_W-NEG_W){n_s[NEG_W-1]}}, n_s};
    w_r = n_r;
    pp  = ~(w_p & w_q & w_s & w_r);
  end

endmodule
