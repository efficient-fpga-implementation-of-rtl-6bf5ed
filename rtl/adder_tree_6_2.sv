// adder_tree_6_2 - the tree of 6-2 adders that reduces M rows of N bits to
// two rows whose sum is the sum of all inputs.
//
// Levels are planned by mia_pkg. At a level with six or more rows, rows
// 6a..6a+5 feed 6-2 adder a, whose two outputs become rows 2a and 2a+1 of the
// next level; the rows left over follow them unchanged (zero-extended).
// With M = 2*3^h this is the h-level tree of the design, every 6-2 adder of
// level l+1 taking the outputs of three adders of level l. Where the row
// count does not fit, the left-over rows are finally reduced by 2-1 (row)
// adders: a level with three to five rows adds them in pairs. (The method
// as first described cuts M down to 2*3^h with 2-1 adders before the 6-2
// tree; this greedy plan is used instead because it keeps the cost in
// proportion to M, as the published slice counts do. Both agree for
// M = 2*3^h.) Grouping consecutive rows is this design's choice. Bit i of a
// level's output is bit i of the next level's input, so the carry chains of
// successive levels overlap and the delay grows as O(log M + N).
// Output rows are WT = mia_pkg::width_at(N, M, num_levels(M)) bits wide.
// Combinational. Requires N >= 2 and M >= 2.
module adder_tree_6_2 #(
  parameter int unsigned N  = 64,                                  // input width
  parameter int unsigned M  = 512,                                 // number of inputs
  parameter int unsigned WT = mia_pkg::width_at(N, M, mia_pkg::num_levels(M))
) (
  input  logic [N-1:0]  x [M],
  output logic [WT-1:0] y [2]
);
  import mia_pkg::*;

  localparam int unsigned L = num_levels(M);

  for (genvar l = 0; l < int'(L); l++) begin : g_lvl
    localparam int unsigned RI = rows_at(M, l);
    localparam int unsigned WI = width_at(N, M, l);
    localparam int unsigned RO = rows_at(M, l + 1);
    localparam int unsigned WO = width_at(N, M, l + 1);

    logic [WI-1:0] ri [RI];   // rows entering this level
    logic [WO-1:0] ro [RO];   // rows leaving it

    if (l == 0) begin : g_src
      assign ri = x;
    end else begin : g_src
      assign ri = g_lvl[l-1].ro;
    end

    if (level_is_6_2(RI)) begin : g_62
      localparam int unsigned NA = RI / 6;
      for (genvar a = 0; a < int'(NA); a++) begin : g_add
        logic [WI-1:0] xi [6];
        logic [WI+1:0] yo [2];
        for (genvar i = 0; i < 6; i++) begin : g_in
          assign xi[i] = ri[6*a + i];
        end
        adder_6_2 #(.W(WI)) u_adder (.x(xi), .y(yo));
        assign ro[2*a]     = yo[0];
        assign ro[2*a + 1] = yo[1];
      end
      for (genvar t = 0; t < int'(RI - 6*NA); t++) begin : g_pass
        assign ro[2*NA + t] = WO'(ri[6*NA + t]);
      end
    end else begin : g_21
      localparam int unsigned NA = RI / 2;
      for (genvar a = 0; a < int'(NA); a++) begin : g_add
        row_adder #(.W(WI)) u_adder (.a(ri[2*a]), .b(ri[2*a + 1]), .s(ro[a]));
      end
      if (RI % 2 == 1) begin : g_pass
        assign ro[NA] = WO'(ri[RI-1]);
      end
    end
  end

  if (L == 0) begin : g_out
    assign y[0] = WT'(x[0]);
    assign y[1] = WT'(x[1]);
  end else begin : g_out
    assign y = g_lvl[L-1].ro;
  end

  initial begin
    assert (N >= 2) else $error("adder_tree_6_2: N must be at least 2");
    assert (M >= 2) else $error("adder_tree_6_2: M must be at least 2");
    assert (WT == width_at(N, M, L)) else $error("adder_tree_6_2: WT must not be overridden");
  end
endmodule
