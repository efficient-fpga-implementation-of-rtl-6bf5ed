// tb_gpc_chain - checks chains of 8 digits (four (6,0,7;5) counters) and of
// 5 digits (two (6,0,7;5) and a top (7;3)) against
//   sum = cin + sum_j popcount(col[j]) * 4^j
// with random columns, all-ones and all-zeros columns, and both carry-ins.
module tb_gpc_chain;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned KA = 8;
  localparam int unsigned KB = 5;

  logic [5:0]      col_a [KA];
  logic [5:0]      col_b [KB];
  logic            cin_a, cin_b;
  logic [2*KA:0]   sum_a;
  logic [2*KB:0]   sum_b;
  int checks = 0, failures = 0;

  gpc_chain #(.K(KA)) dut_a (.col(col_a), .cin(cin_a), .sum(sum_a));
  gpc_chain #(.K(KB)) dut_b (.col(col_b), .cin(cin_b), .sum(sum_b));

  function automatic longint ref_sum(logic [5:0] c [], logic ci);
    longint r = longint'(ci);
    for (int j = 0; j < c.size(); j++)
      r += longint'($countones(c[j])) << (2*j);
    return r;
  endfunction

  task automatic check();
    logic [5:0] ca [], cb [];
    longint ra, rb;
    #1;
    ca = new[KA]; cb = new[KB];
    foreach (col_a[j]) ca[j] = col_a[j];
    foreach (col_b[j]) cb[j] = col_b[j];
    ra = ref_sum(ca, cin_a);
    rb = ref_sum(cb, cin_b);
    checks += 2;
    if (longint'(sum_a) != ra) begin
      failures++;
      $display("FAIL K=%0d got %0d expected %0d", KA, sum_a, ra);
    end
    if (longint'(sum_b) != rb) begin
      failures++;
      $display("FAIL K=%0d got %0d expected %0d", KB, sum_b, rb);
    end
  endtask

  initial begin
    foreach (col_a[j]) col_a[j] = '1;
    foreach (col_b[j]) col_b[j] = '1;
    cin_a = 1; cin_b = 1;
    check();
    foreach (col_a[j]) col_a[j] = '0;
    foreach (col_b[j]) col_b[j] = '0;
    cin_a = 0; cin_b = 0;
    check();
    for (int t = 0; t < 3000; t++) begin
      foreach (col_a[j]) col_a[j] = 6'($urandom);
      foreach (col_b[j]) col_b[j] = 6'($urandom);
      cin_a = 1'($urandom); cin_b = 1'($urandom);
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
