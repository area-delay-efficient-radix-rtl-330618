// pp_addition: partial product addition unit of the Booth multiplier.
//
// Adds the four radix-4 partial products with their weights 1, 4, 16, 64 and
// returns the 15-bit product. The compressor module resolves product bits
// P4..P0 directly and reduces columns 5..14 to two 10-bit rows; the 10-bit
// CLA-CSLA adder (carry-in 0) adds those rows into P14..P5. The adder's
// carry-out has weight 2^15 and lies outside the 15-bit product, so it is left
// unconnected. This compressor-plus-single-adder structure, replacing a tree
// of three adders, is the published one.
//
// Interface: pp[0..3] in, product out. Purely combinational.
module pp_addition
  import booth_pkg::*;
(
  input  pp_t               pp [NUM_PP],
  output logic [PROD_W-1:0] product
);

  logic [ADD_LSB-1:0] p_lo;
  logic [ADD_W-1:0]   row_s, row_c, p_hi;

  pp_compressor u_comp (
    .pp   (pp),
    .p_lo (p_lo),
    .row_s(row_s),
    .row_c(row_c)
  );

  cla_csla #(
    .WIDTH(ADD_W)
  ) u_add (
    .x   (row_s),
    .y   (row_c),
    .cin (1'b0),
    .sum (p_hi),
    .cout()
  );

  assign product = {p_hi, p_lo};

endmodule
