// tb_row_adder - checks the ripple-carry row adder at W = 16 (whole carry4
// blocks) and W = 13 (last block partly used) against a + b, with random
// operands and the carry-through cases (all ones plus one, all ones twice).
module tb_row_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a16, b16;
  logic [16:0] s16;
  logic [12:0] a13, b13;
  logic [13:0] s13;
  int checks = 0, failures = 0;

  row_adder #(.W(16)) dut16 (.a(a16), .b(b16), .s(s16));
  row_adder #(.W(13)) dut13 (.a(a13), .b(b13), .s(s13));

  task automatic check();
    #1;
    checks += 2;
    if (s16 !== 17'(a16) + 17'(b16)) begin
      failures++;
      $display("FAIL W=16 %0d + %0d got %0d", a16, b16, s16);
    end
    if (s13 !== 14'(a13) + 14'(b13)) begin
      failures++;
      $display("FAIL W=13 %0d + %0d got %0d", a13, b13, s13);
    end
  endtask

  initial begin
    a16 = '1; b16 = 16'd1; a13 = '1; b13 = 13'd1; check();
    a16 = '1; b16 = '1;    a13 = '1; b13 = '1;    check();
    a16 = '0; b16 = '0;    a13 = '0; b13 = '0;    check();
    for (int t = 0; t < 5000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
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
