// tb_adder_6_2 - checks the 6-2 adder at W = 16 (even: two chains of four
// (6,0,7;5) counters) and W = 15 (odd: the even chain ends in a (7;3)).
// The two output rows must add up to the sum of the six inputs; random,
// all-ones and all-zeros inputs are used.
module tb_adder_6_2;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] xe [6];
  logic [17:0] ye [2];
  logic [14:0] xo [6];
  logic [16:0] yo [2];
  int checks = 0, failures = 0;

  adder_6_2 #(.W(16)) dut_e (.x(xe), .y(ye));
  adder_6_2 #(.W(15)) dut_o (.x(xo), .y(yo));

  task automatic check();
    longint re, ro;
    #1;
    re = 0; ro = 0;
    for (int i = 0; i < 6; i++) begin
      re += longint'(xe[i]);
      ro += longint'(xo[i]);
    end
    checks += 2;
    if (longint'(ye[0]) + longint'(ye[1]) != re) begin
      failures++;
      $display("FAIL W=16 rows %0d + %0d expected %0d", ye[0], ye[1], re);
    end
    if (longint'(yo[0]) + longint'(yo[1]) != ro) begin
      failures++;
      $display("FAIL W=15 rows %0d + %0d expected %0d", yo[0], yo[1], ro);
    end
  endtask

  initial begin
    foreach (xe[i]) xe[i] = '1;
    foreach (xo[i]) xo[i] = '1;
    check();
    foreach (xe[i]) xe[i] = '0;
    foreach (xo[i]) xo[i] = '0;
    check();
    for (int t = 0; t < 5000; t++) begin
      foreach (xe[i]) xe[i] = 16'($urandom);
      foreach (xo[i]) xo[i] = 15'($urandom);
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
