// tb_multi_input_adder - end-to-end test of the multi-input adder at its
// default size, N = 64 bits and M = 512 inputs, with no parameter changed.
//
// The adder is fed all-zero, all-one and random inputs (some of them sparse)
// and its result is compared with a plain sum. The default tree plan is
// 512 -> 172 -> 60 -> 20 -> 8 -> 4 -> 2 rows, with row widths 64, 66, 68, ...
// The test also watches signals inside the tree and counts each mechanism.
// Every count must be non-zero:
//   chain_carry  a carry passed from the first (6,0,7;5) counter of a chain
//                to the second
//   gpc_7_3      the (7;3) counter at the top of a 33-digit chain (level 1,
//                66-bit rows, bit 64) received a one
//   pass_down    rows left over at a 6-2 level (inputs 510, 511) were non-zero
//   level_2_1    the 2-1 adder level (4 rows -> 2) added two non-zero rows
//   top_bit      the sum reached the top bit of the output
module tb_multi_input_adder;
  timeunit 1ns; timeprecision 1ps;
  import mia_pkg::*;

  localparam int unsigned N  = 64, M = 512;
  localparam int unsigned WS = sum_width(N, M);

  logic [N-1:0]  x [M];
  logic [WS-1:0] sum;

  int checks = 0, failures = 0;
  int n_chain_carry = 0, n_gpc73 = 0, n_pass_down = 0, n_level_2_1 = 0, n_top_bit = 0;

  multi_input_adder dut (.x(x), .sum(sum));

  task automatic check();
    logic [WS-1:0] r;
    #1;
    r = '0;
    foreach (x[i]) r += WS'(x[i]);
    checks++;
    if (sum !== r) begin
      failures++;
      $display("FAIL got %h expected %h", sum, r);
    end
    if (dut.u_tree.g_lvl[0].g_62.g_add[0].u_adder.u_even.carry[1]) n_chain_carry++;
    for (int i = 0; i < 6; i++)
      if (dut.u_tree.g_lvl[1].ri[i][64]) begin n_gpc73++; break; end
    if (x[510] != '0 || x[511] != '0) n_pass_down++;
    if (dut.u_tree.g_lvl[5].ri[0] != '0 && dut.u_tree.g_lvl[5].ri[1] != '0) n_level_2_1++;
    if (sum[WS-1]) n_top_bit++;
  endtask

  initial begin
    checks++;
    if (num_levels(M) != 6 || rows_at(M, 1) != 172 || rows_at(M, 5) != 4 ||
        count_6_2(M) != 127 || count_2_1(M) != 2 || width_at(N, M, 6) != 75) begin
      failures++;
      $display("FAIL tree plan differs from the hand-worked one");
    end
    foreach (x[i]) x[i] = '0;
    check();
    foreach (x[i]) x[i] = '1;
    check();
    for (int t = 0; t < 400; t++) begin
      foreach (x[i]) x[i] = {$urandom, $urandom};
      // sparse vectors now and then, so small sums are tested too
      if (t % 10 == 0) foreach (x[i]) x[i] &= {N{1'($urandom)}};
      check();
    end
    $display("mechanisms: chain_carry=%0d gpc_7_3=%0d pass_down=%0d level_2_1=%0d top_bit=%0d",
             n_chain_carry, n_gpc73, n_pass_down, n_level_2_1, n_top_bit);
    checks += 5;
    if (n_chain_carry == 0) failures++;
    if (n_gpc73 == 0)       failures++;
    if (n_pass_down == 0)   failures++;
    if (n_level_2_1 == 0)   failures++;
    if (n_top_bit == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
