// adder_6_2 - the 6-2 adder: adds six W-bit numbers and returns the result
// as two (W+2)-bit numbers whose sum is the total.
//
// Two gpc_chain instances share the work. The even chain takes the six bits
// of every even position (0, 2, 4, ...), the odd chain those of every odd
// position (1, 3, 5, ...); each returns one binary number. The odd chain's
// result is shifted left by one to restore its weight. Because every counter
// gets its carry-in from the one below, each (6,0,7;5) counter occupies one
// slice. For an even W both chains have W/2 digits; for an odd W the even
// chain has one digit more and ends in a (7;3) counter.
//   y[0] + y[1] = x[0] + ... + x[5]   (exact, no overflow)
// The even chain's result needs at most W+1 bits and the odd chain's W+2,
// so both outputs are W+2 bits wide. The chain carry-ins are tied to 0 (this
// implementation's choice). Combinational. Requires W >= 2.
module adder_6_2 #(
  parameter int unsigned W = 16                // width of each input
) (
  input  logic [W-1:0] x [6],                  // six addends
  output logic [W+1:0] y [2]                   // two-row result
);
  localparam int unsigned KE = (W + 1) / 2;    // digits of the even chain
  localparam int unsigned KO = W / 2;          // digits of the odd chain

  logic [5:0]    col_e [KE];
  logic [5:0]    col_o [KO];
  logic [2*KE:0] sum_e;
  logic [2*KO:0] sum_o;

  always_comb begin
    for (int j = 0; j < int'(KE); j++)
      for (int i = 0; i < 6; i++)
        col_e[j][i] = x[i][2*j];
    for (int j = 0; j < int'(KO); j++)
      for (int i = 0; i < 6; i++)
        col_o[j][i] = x[i][2*j+1];
  end

  gpc_chain #(.K(KE)) u_even (.col(col_e), .cin(1'b0), .sum(sum_e));
  gpc_chain #(.K(KO)) u_odd  (.col(col_o), .cin(1'b0), .sum(sum_o));

  assign y[0] = (W+2)'(sum_e);
  assign y[1] = (W+2)'({sum_o, 1'b0});

  initial assert (W >= 2) else $error("adder_6_2: W must be at least 2");
endmodule
