// becs_type2: Booth encoder-cum-selector, type 2. Forms the least significant
// radix-4 partial product PP0 as a 10-bit two's-complement word.
//
// The group for PP0 is {B1, B0, B-1} with B-1 = 0, so only the values 0, +A,
// -2A and -A can occur and +2A never does. Only three selects are needed:
// P = ~B1 & B0 (+A), R = B1 & ~B0 (-2A) and S = B1 & B0 (-A), each a 2-input
// NOR of (possibly inverted) inputs. Selection is the same NAND-NAND scheme as
// in type 1: a 2-input NAND rank at natural width, sign extension of the NAND
// outputs to 10 bits, the -2A shift done by appending a 1 at the LSB, and a
// 3-input NAND rank. The reduced input set (no zero input, no +2A leg) is the
// published idea; the gate-level arrangement is this design's reading of it.
//
// Interface: a = A, a_neg = -A, b = {B1, B0}; pp = PP0. Purely combinational.
module becs_type2
  import booth_pkg::*;
(
  input  logic [OP_W-1:0]  a,
  input  logic [NEG_W-1:0] a_neg,
  input  logic [1:0]       b,
  output pp_t              pp
);

  logic sel_p, sel_r, sel_s;

  always_comb begin
    sel_p = ~(b[1] | ~b[0]);  // 01 -> +A
    sel_r = ~(~b[1] | b[0]);  // 10 -> -2A
    sel_s = ~(~b[1] | ~b[0]); // 11 -> -A
  end

  logic [OP_W-1:0]  n_p;
  logic [NEG_W-1:0] n_s;
  logic [NEG_W:0]   n_r;
  pp_t w_p, w_s;

  always_comb begin
    n_p = ~(a & {OP_W{sel_p}});
    n_s = ~(a_neg & {NEG_W{sel_s}});
    n_r = {~(a_neg & {NEG_W{sel_r}}), 1'b1};
    w_p = {{(PP_W-OP_W){n_p[OP_W-1]}}, n_p};
    w_s = {{(PP_W-NEG_W){n_s[NEG_W-1]}}, n_s};
    pp  = ~(w_p & w_s & n_r);
  end

endmodule
