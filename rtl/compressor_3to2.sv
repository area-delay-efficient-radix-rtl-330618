// compressor_3to2: 3-to-2 compressor with a horizontal carry-in and carry-out.
//
// Four bits of one column weight (x1..x3 and cin) are reduced to a sum bit of
// the same weight and two bits of double weight, carry and cout:
//   x1 + x2 + x3 + cin = sum + 2 * (carry + cout).
// As in the 4:2 compressor, cout is the majority of x1..x3 and does not depend
// on cin, so a chain of compressors does not ripple. The remaining parity is
// combined with cin in a half adder. It is the 4:2 compressor with its fourth
// input removed. Having a carry-in and carry-out follows the published block;
// the gate equations are this design's own.
//
// Interface: x1..x3, cin in; sum, carry, cout out. Purely combinational.
module compressor_3to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic x12, x123;

  always_comb begin
    x12   = x1 ^ x2;
    x123  = x12 ^ x3;
    cout  = ~(~(x12 & x3) & ~(~x12 & x1)); // majority(x1, x2, x3)
    sum   = x123 ^ cin;
    carry = x123 & cin;
  end

endmodule
