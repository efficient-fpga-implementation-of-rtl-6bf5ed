// gpc_7_3 - generalized parallel counter (7;3), the top counter of a chain
// with an odd number of digits.
//
// Counts seven bits of weight 1 and returns the 3-bit sum {s2, s1, s0} =
// popcount(a), 0 .. 7. It is the lower half of the (6,0,7;5) counter: a[0]
// enters through the carry-in, a[6:1] go to two LUTs that feed stages 0 and 1
// of the carry chain, and the carry out of stage 1 is the weight-4 output.
// Stages 2 and 3 of the slice are unused. The design uses a (7;3) counter in
// place of a (6,0,7;5) at the most significant digit when the digit count is
// odd, to save LUTs; how the (7;3) is built from the slice is this
// implementation's choice. Combinational.
module gpc_7_3 (
  input  logic [6:0] a,   // weight-1 bits, a[0] is the carry-in
  output logic [2:0] s    // popcount of a
);
  logic [1:0] xa, ya;
  logic [3:0] p, g, o, co;

  always_comb begin
    xa = 2'(a[1]) + 2'(a[2]) + 2'(a[3]);
    ya = 2'(a[4]) + 2'(a[5]) + 2'(a[6]);
    p  = {2'b00, xa[1] ^ ya[1], xa[0] ^ ya[0]};
    g  = {2'b00, xa[1], xa[0]};
  end

  carry4 u_carry4 (
    .ci (a[0]),
    .p  (p),
    .g  (g),
    .o  (o),
    .co (co)
  );

  assign s = {co[1], o[1:0]};
endmodule
