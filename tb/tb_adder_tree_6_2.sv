// tb_adder_tree_6_2 - checks two trees: M = 54, N = 16, the pure three-level
// 6-2 tree (54 = 2*3^3), and M = 16, N = 15, where odd widths and left-over
// rows bring in (7;3) counters and 2-1 adders. The two output rows must add
// up to the sum of all inputs; the row count of each level is also checked
// against the hand-worked plan (54 -> 18 -> 6 -> 2, 16 -> 8 -> 4 -> 2).
module tb_adder_tree_6_2;
  timeunit 1ns; timeprecision 1ps;
  import mia_pkg::*;

  localparam int unsigned NA = 16, MA = 54;
  localparam int unsigned NB = 15, MB = 16;
  localparam int unsigned WA = width_at(NA, MA, num_levels(MA));
  localparam int unsigned WB = width_at(NB, MB, num_levels(MB));

  logic [NA-1:0] xa [MA];
  logic [WA-1:0] ya [2];
  logic [NB-1:0] xb [MB];
  logic [WB-1:0] yb [2];
  int checks = 0, failures = 0;

  adder_tree_6_2 #(.N(NA), .M(MA)) dut_a (.x(xa), .y(ya));
  adder_tree_6_2 #(.N(NB), .M(MB)) dut_b (.x(xb), .y(yb));

  task automatic check();
    longint ra, rb;
    #1;
    ra = 0; rb = 0;
    foreach (xa[i]) ra += longint'(xa[i]);
    foreach (xb[i]) rb += longint'(xb[i]);
    checks += 2;
    if (longint'(ya[0]) + longint'(ya[1]) != ra) begin
      failures++;
      $display("FAIL M=%0d rows %0d + %0d expected %0d", MA, ya[0], ya[1], ra);
    end
    if (longint'(yb[0]) + longint'(yb[1]) != rb) begin
      failures++;
      $display("FAIL M=%0d rows %0d + %0d expected %0d", MB, yb[0], yb[1], rb);
    end
  endtask

  initial begin
    // tree plans worked out by hand
    checks += 4;
    if (num_levels(MA) != 3 || rows_at(MA, 1) != 18 || rows_at(MA, 2) != 6) failures++;
    if (num_levels(MB) != 3 || rows_at(MB, 1) != 8 || rows_at(MB, 2) != 4) failures++;
    if (count_6_2(MA) != 13 || count_2_1(MA) != 0) failures++;
    if (count_6_2(MB) != 3 || count_2_1(MB) != 2) failures++;

    foreach (xa[i]) xa[i] = '1;
    foreach (xb[i]) xb[i] = '1;
    check();
    foreach (xa[i]) xa[i] = '0;
    foreach (xb[i]) xb[i] = '0;
    check();
    for (int t = 0; t < 2000; t++) begin
      foreach (xa[i]) xa[i] = NA'($urandom);
      foreach (xb[i]) xb[i] = NB'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
