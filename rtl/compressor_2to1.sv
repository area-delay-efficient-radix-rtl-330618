// compressor_2to1: 2-to-1 compressor, built as a full adder.
//
// Used in the two low columns of the partial-product array that hold only two
// partial-product bits. The two bits and the carry rippling in from the column
// below are added; sum is a finished product bit and cout goes to the next
// column: x1 + x2 + cin = sum + 2 * cout. Building it from a full adder is
// the published choice; the equations are the textbook full adder.
//
// Interface: x1, x2, cin in; sum, cout out. Purely combinational.
module compressor_2to1 (
  input  logic x1,
  input  logic x2,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic x12;

  always_comb begin
    x12  = x1 ^ x2;
    sum  = x12 ^ cin;
    cout = (x1 & x2) | (x12 & cin);
  end

endmodule
