// row_adder - the row adder (2-1 adder): a ripple-carry adder of two W-bit
// numbers built on the slice carry chain.
//
// Each bit position uses one LUT that forms p = a ^ b and g = a; the carry4
// blocks, cascaded cout to cin, ripple the carry through ceil(W/4) slices and
// produce the sum bits. The top sum bit is the carry out of position W-1.
//   s = a + b,  W+1 bits, exact.
// Its delay grows linearly with W, which on an FPGA still beats a carry
// look-ahead adder for the widths used here because the carry path is
// dedicated logic. The choice g = a is this implementation's. Combinational.
module row_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  localparam int unsigned NB = (W + 3) / 4;    // number of carry4 blocks
  localparam int unsigned WP = 4 * NB;         // padded width

  logic [WP-1:0] p, g, o, co;
  logic [NB:0]   c;

  always_comb begin
    p = '0;
    g = '0;
    p[W-1:0] = a ^ b;
    g[W-1:0] = a;
  end

  assign c[0] = 1'b0;
  for (genvar k = 0; k < NB; k++) begin : g_c4
    carry4 u_carry4 (
      .ci (c[k]),
      .p  (p[4*k +: 4]),
      .g  (g[4*k +: 4]),
      .o  (o[4*k +: 4]),
      .co (co[4*k +: 4])
    );
    assign c[k+1] = co[4*k+3];
  end

  assign s = {co[W-1], o[W-1:0]};
endmodule
