// tb_gpc_6_0_7_5 - exhaustive check of the (6,0,7;5) counter: for all 2^13
// input patterns {cout, s} must equal popcount(a) + 4 * popcount(b).
module tb_gpc_6_0_7_5;
  timeunit 1ns; timeprecision 1ps;

  logic [6:0] a;
  logic [5:0] b;
  logic [3:0] s;
  logic       cout;
  int checks = 0, failures = 0;

  gpc_6_0_7_5 dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      int expect_sum;
      {b, a} = 13'(v);
      #1;
      expect_sum = 0;
      for (int i = 0; i < 7; i++) expect_sum += int'(a[i]);
      for (int i = 0; i < 6; i++) expect_sum += 4 * int'(b[i]);
      checks++;
      if ({cout, s} !== 5'(expect_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%b b=%b got %0d expected %0d", a, b, {cout, s}, expect_sum);
      end
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
