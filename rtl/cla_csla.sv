// cla_csla: carry-lookahead carry-select adder with shared lookahead logic.
//
// The operands are split into segments (bits [1:0], [4:2], [7:5], [9:8] at the
// default width of 10). Every segment computes its sums for both possible
// carry-ins and a 2-to-1 multiplexer picks one with the carry arriving from
// the segment below. The two carry-in cases share their logic:
//   PG block : p = x ^ y, g = x & y for every bit.
//   LACG-0   : carries with segment carry-in 0, in sum-of-products lookahead
//              form, c0[k] = g[k] | p[k]g[k-1] | ... | p[k]..p[lo+1]g[lo].
//   LACG-1   : carries with segment carry-in 1, derived from LACG-0 by adding
//              a single product term, c1[k] = c0[k] | p[k]p[k-1]..p[lo],
//              instead of a second independent lookahead network.
//   SG-0/1   : s0[k] = p[k] ^ c0[k-1], s1[k] = p[k] ^ c1[k-1]; at the segment
//              LSB these are p and ~p.
//   mux      : selects sum bits and the segment carry-out.
// The shared LACG-1 formulation and the block structure are the published
// ones; the segment boundaries are this design's choice (a 2-bit segment at
// the bottom, then 3-bit segments as in the published 3-bit segment analysis).
//
// Interface: x, y, cin in; sum, cout out. Purely combinational.
module cla_csla #(
  parameter int unsigned WIDTH  = 10, // adder width
  parameter int unsigned SEG0_W = 2,  // width of the lowest segment
  parameter int unsigned SEG_W  = 3   // width of every further segment
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // Lowest bit of the segment that holds bit k.
  function automatic int seg_lo(input int k);
    if (k < int'(SEG0_W)) return 0;
    return int'(SEG0_W) + ((k - int'(SEG0_W)) / int'(SEG_W)) * int'(SEG_W);
  endfunction

  // SEG_TOP[k] is set when bit k is the top bit of its segment.
  function automatic logic [WIDTH-1:0] seg_tops();
    logic [WIDTH-1:0] t;
    for (int k = 0; k < int'(WIDTH); k++)
      t[k] = (k == int'(WIDTH) - 1) || (seg_lo(k + 1) == k + 1);
    return t;
  endfunction
  localparam logic [WIDTH-1:0] SEG_TOP = seg_tops();

  logic [WIDTH-1:0] p, g;     // PG block
  logic [WIDTH-1:0] c0, c1;   // LACG-0, LACG-1
  logic [WIDTH-1:0] s0, s1;   // SG-0, SG-1

  always_comb begin
    p = x ^ y;
    g = x & y;
  end

  // LACG-0 and LACG-1, and SG-0 and SG-1, one generate block per bit. Walking
  // from bit k down to the segment LSB, prop holds p[k]..p[j+1], so each
  // g[j] & prop is one product term of the lookahead sum.
  for (genvar k = 0; k < int'(WIDTH); k++) begin : g_bit
    localparam int LO = seg_lo(k);

    always_comb begin
      logic prop, carry;
      prop  = 1'b1;
      carry = 1'b0;
      for (int j = k; j >= LO; j--) begin
        carry = carry | (g[j] & prop);
        prop  = prop & p[j];
      end
      c0[k] = carry;
      c1[k] = carry | prop;   // c1 = c0 | p[k]..p[lo]
    end

    if (k == LO) begin : g_seg_lsb
      assign s0[k] = p[k];
      assign s1[k] = ~p[k];
    end else begin : g_seg_mid
      assign s0[k] = p[k] ^ c0[k-1];
      assign s1[k] = p[k] ^ c1[k-1];
    end
  end

  // Carry-select multiplexers. csel is the carry into the current segment;
  // at each segment's top bit it is replaced by that segment's selected
  // carry-out.
  always_comb begin
    logic csel;
    csel = cin;
    for (int k = 0; k < int'(WIDTH); k++) begin
      sum[k] = csel ? s1[k] : s0[k];
      if (SEG_TOP[k]) begin
        csel = csel ? c1[k] : c0[k];
      end
    end
    cout = csel;
  end

endmodule
