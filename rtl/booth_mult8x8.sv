// booth_mult8x8: parallel radix-4 8x8 Booth multiplier, 15-bit product.
//
// A (multiplicand) and B (multiplier) are 8-bit two's-complement numbers.
// The product P = A * B is formed in one combinational pass:
//   1. the B2C unit computes -A (9 bits);
//   2. one type-2 encoder-cum-selector forms PP0 from B1, B0 (B-1 = 0), and
//      three type-1 encoder-cum-selectors form PP1..PP3 from the overlapping
//      groups {B3,B2,B1}, {B5,B4,B3}, {B7,B6,B5}; each PP_i is one of
//      0, +-A, +-2A as a 10-bit word;
//   3. the partial product addition unit (compressor module and 10-bit
//      CLA-CSLA) adds PP0 + 4 PP1 + 16 PP2 + 64 PP3.
// The product is 15 bits wide, as published. Every product of two 8-bit
// two's-complement numbers fits in 15 bits except (-128) * (-128) = +16384,
// which needs 16; for that one input pair the output wraps to -16384.
// There is no clock and no register: the output follows the inputs after the
// combinational delay. The architecture follows the published design; the
// wrap of the single out-of-range product is a consequence of its width.
//
// Interface: a, b in; p out.
module booth_mult8x8
  import booth_pkg::*;
(
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] p
);

  logic [NEG_W-1:0] a_neg;
  pp_t              pp [NUM_PP];

  b2c u_b2c (
    .a(a),
    .s(a_neg)
  );

  becs_type2 u_becs0 (
    .a    (a),
    .a_neg(a_neg),
    .b    (b[1:0]),
    .pp   (pp[0])
  );

  for (genvar i = 1; i < int'(NUM_PP); i++) begin : g_becs
    becs_type1 u_becs (
      .a    (a),
      .a_neg(a_neg),
      .grp  (b[2*i+1 -: 3]),
      .pp   (pp[i])
    );
  end

  pp_addition u_ppa (
    .pp     (pp),
    .product(p)
  );

endmodule
