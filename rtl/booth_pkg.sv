// booth_pkg: widths and types shared by the radix-4 8x8 Booth multiplier.
//
// The multiplier takes two 8-bit two's-complement operands and forms a 15-bit
// product from four radix-4 partial products. Each partial product is a
// 10-bit two's-complement word, wide enough for -2A when A = -128. The final
// carry-propagate adder covers product columns 5..14; columns 0..4 leave the
// compressor module already resolved. The operand, partial-product and
// product widths are the ones of the published design; the select-signal
// struct and its field names follow the P/Q/R/S naming of the encoder.
package booth_pkg;

  localparam int unsigned OP_W    = 8;            // width of A and B
  localparam int unsigned NEG_W   = OP_W + 1;     // width of -A (holds +128)
  localparam int unsigned PP_W    = OP_W + 2;     // width of one partial product
  localparam int unsigned NUM_PP  = OP_W / 2;     // radix-4 partial products
  localparam int unsigned PROD_W  = 2 * OP_W - 1; // product width
  localparam int unsigned ADD_LSB = 5;            // first column of the final adder
  localparam int unsigned ADD_W   = PROD_W - ADD_LSB; // final adder width (10)

  typedef logic [PP_W-1:0] pp_t;

  // Booth select signals, active high, at most one set at a time:
  //   p selects +A, q selects +2A, r selects -2A, s selects -A.
  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic s;
  } booth_sel_t;

endpackage
