// carry4 - the 4-bit carry chain of one FPGA logic slice.
//
// A slice holds four 6-input LUTs and one 4-stage carry chain. LUT i hands
// the chain a propagate bit p[i] and a generate bit g[i]. Each stage forms
//   o[i]   = p[i] ^ c(i)              (sum bit)
//   co[i]  = p[i] ? c(i) : g[i]       (carry out of stage i)
// where c(0) = ci and c(i) = co[i-1]. co[3] is the slice's cout, which feeds
// the ci of the next slice when chains are cascaded.
//
// The set of ports (p, g, ci, o, co) follows the slice model of the design;
// the stage equations are those of the Xilinx 7 Series CARRY4 (multiplexer
// selected by p, XOR for the sum), which this model assumes. Purely
// combinational, no clock.
module carry4 (
  input  logic       ci,   // carry into stage 0 (cin)
  input  logic [3:0] p,    // propagate from LUT0..LUT3
  input  logic [3:0] g,    // generate from LUT0..LUT3
  output logic [3:0] o,    // sum bits o0..o3
  output logic [3:0] co    // carry out of each stage, co[3] = cout
);
  always_comb begin
    logic c;
    c = ci;
    for (int i = 0; i < 4; i++) begin
      o[i]  = p[i] ^ c;
      co[i] = p[i] ? c : g[i];
      c     = co[i];
    end
  end
endmodule
