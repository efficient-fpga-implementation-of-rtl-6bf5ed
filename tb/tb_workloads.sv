// tb_workloads - runs the multi-input adder at the sizes it was evaluated at:
// n = 16 bits with m = 16, 32, 54, 64, 128 and 162 inputs, n = 32 with
// m = 16 and 54, and n = 64 with m = 16 (64 x 512, the largest size, is run
// by tb_multi_input_adder; the others are left out to keep the build short). Every instance gets all-ones inputs (the largest
// sum) and random inputs and is compared with a plain sum; the tree plan
// (levels, 6-2 adders, 2-1 adders) of each size is printed.
module tb_workloads;
  timeunit 1ns; timeprecision 1ps;
  import mia_pkg::*;

  localparam int unsigned NCFG = 9;
  localparam int unsigned CFG_N [NCFG] = '{16, 16, 16, 16, 16, 16, 32, 32, 64};
  localparam int unsigned CFG_M [NCFG] = '{16, 32, 54, 64, 128, 162, 16, 54, 16};
  localparam int unsigned NVEC = 40;

  int checks = 0, failures = 0, done = 0;

  for (genvar c = 0; c < int'(NCFG); c++) begin : g_cfg
    localparam int unsigned N  = CFG_N[c];
    localparam int unsigned M  = CFG_M[c];
    localparam int unsigned WS = sum_width(N, M);

    logic [N-1:0]  x [M];
    logic [WS-1:0] s;

    multi_input_adder #(.N(N), .M(M)) dut (.x(x), .sum(s));

    initial begin
      logic [WS-1:0] r;
      $display("n=%0d m=%0d: %0d levels, %0d 6-2 adders, %0d 2-1 adders, %0d-bit sum",
               N, M, num_levels(M), count_6_2(M), count_2_1(M), WS);
      for (int t = 0; t < int'(NVEC); t++) begin
        foreach (x[i]) x[i] = (t == 0) ? '1 : N'({$urandom, $urandom});
        #1;
        r = '0;
        foreach (x[i]) r += WS'(x[i]);
        checks++;
        if (s !== r) begin
          failures++;
          $display("FAIL n=%0d m=%0d got %h expected %h", N, M, s, r);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == int'(NCFG));
    #1;
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
