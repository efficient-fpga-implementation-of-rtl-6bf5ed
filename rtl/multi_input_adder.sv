// multi_input_adder - sums M unsigned N-bit numbers in one combinational pass.
//
// The M inputs go through adder_tree_6_2, a tree of 6-2 adders built from
// chained (6,0,7;5) counters, which leaves two rows; a row_adder (ripple
// carry on the slice carry chain) adds those into the result. The result is
// the exact sum, N + clog2(M) bits wide. Defaults N = 64, M = 512 are the
// largest size evaluated for the design; N = 16, 32, 64 and M from 16 to 512
// are the evaluated range. There is no clock, register or handshake: the
// design is a single-cycle combinational circuit, and any pipelining is left
// to the user. Requires N >= 2 and M >= 2.
module multi_input_adder #(
  parameter int unsigned N = 64,     // bits per input
  parameter int unsigned M = 512     // number of inputs
) (
  input  logic [N-1:0]                      x [M],
  output logic [mia_pkg::sum_width(N, M)-1:0] sum
);
  import mia_pkg::*;

  localparam int unsigned WT = width_at(N, M, num_levels(M));
  localparam int unsigned WS = sum_width(N, M);

  logic [WT-1:0] rows [2];
  logic [WT:0]   total;

  adder_tree_6_2 #(.N(N), .M(M)) u_tree (.x(x), .y(rows));

  row_adder #(.W(WT)) u_row_adder (.a(rows[0]), .b(rows[1]), .s(total));

  // the exact sum never exceeds WS bits, so the top bits of total are zero
  assign sum = total[WS-1:0];
endmodule
