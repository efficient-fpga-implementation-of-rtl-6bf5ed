// gpc_6_0_7_5 - generalized parallel counter (6,0,7;5) in one slice.
//
// Counts six bits of weight 4 (b) and seven bits of weight 1 (a) and returns
// their weighted sum as a 5-bit number {cout, s}:
//   {cout, s} = popcount(a) + 4 * popcount(b),  0 .. 31.
// a[0] enters through the carry-in of the slice; a[6:1] go to LUT0 and LUT1,
// b[5:0] to LUT2 and LUT3; the four LUTs drive the carry4 chain, whose four
// sum bits are s[3:0] and whose final carry is cout (weight 16). This routing
// is the one of the design; the LUT contents are this implementation's own:
// each LUT pair splits its six bits into two halves of three, counts each
// half (a 2-bit count X, Y), and feeds the chain with p = X ^ Y and g = X, so
// the chain adds X + Y at weights 1,2 (a) and 4,8 (b), plus a[0].
// When the counter is chained, a[0] is the cout of the counter one nibble
// below, which is what lets it fit in a single slice. Combinational.
module gpc_6_0_7_5 (
  input  logic [6:0] a,     // weight-1 bits, a[0] is the carry-in
  input  logic [5:0] b,     // weight-4 bits
  output logic [3:0] s,     // sum bits 0..3
  output logic       cout   // sum bit 4 (carry out of the slice)
);
  logic [1:0] xa, ya, xb, yb;   // 2-bit counts of each group of three
  logic [3:0] p, g, co;

  always_comb begin
    xa = 2'(a[1]) + 2'(a[2]) + 2'(a[3]);
    ya = 2'(a[4]) + 2'(a[5]) + 2'(a[6]);
    xb = 2'(b[0]) + 2'(b[1]) + 2'(b[2]);
    yb = 2'(b[3]) + 2'(b[4]) + 2'(b[5]);
    // LUT0..LUT3: propagate and generate of the per-stage addition X + Y
    p = {xb[1] ^ yb[1], xb[0] ^ yb[0], xa[1] ^ ya[1], xa[0] ^ ya[0]};
    g = {xb[1],         xb[0],         xa[1],         xa[0]};
  end

  carry4 u_carry4 (
    .ci (a[0]),
    .p  (p),
    .g  (g),
    .o  (s),
    .co (co)
  );

  assign cout = co[3];
endmodule
