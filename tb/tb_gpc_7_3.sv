// tb_gpc_7_3 - exhaustive check of the (7;3) counter: s = popcount(a).
module tb_gpc_7_3;
  timeunit 1ns; timeprecision 1ps;

  logic [6:0] a;
  logic [2:0] s;
  int checks = 0, failures = 0;

  gpc_7_3 dut (.a(a), .s(s));

  initial begin
    for (int v = 0; v < 128; v++) begin
      int expect_sum;
      a = 7'(v);
      #1;
      expect_sum = 0;
      for (int i = 0; i < 7; i++) expect_sum += int'(a[i]);
      checks++;
      if (s !== 3'(expect_sum)) begin
        failures++;
        $display("FAIL a=%b got %0d expected %0d", a, s, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
