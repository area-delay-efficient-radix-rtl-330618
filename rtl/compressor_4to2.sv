// compressor_4to2: 4:2 compressor with a horizontal carry-in and carry-out.
//
// Five bits of one column weight (x1..x4 and cin) are reduced to a sum bit of
// the same weight and two bits of double weight (carry and cout), so that
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// cout depends on x1..x3 only, never on cin, so when the compressors of a row
// are chained through cin/cout the carry does not ripple: each cout is the
// majority of x1..x3 and is ready as soon as the inputs are. cout is formed as
// a NAND-NAND multiplexer steered by x1 ^ x2, and carry as a multiplexer
// steered by the XOR of all four inputs. The published work gives this block's
// role and delay target; the gate equations here are this design's own.
//
// Interface: x1..x4, cin in; sum, carry, cout out. Purely combinational.
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic x12, x123, xall;

  always_comb begin
    x12   = x1 ^ x2;
    x123  = x12 ^ x3;
    xall  = x123 ^ x4;
    cout  = ~(~(x12 & x3) & ~(~x12 & x1)); // majority(x1, x2, x3)
    sum   = xall ^ cin;
    carry = xall ? cin : x4;
  end

endmodule
