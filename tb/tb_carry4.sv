// tb_carry4 - exhaustive check of the slice carry chain model.
// With p = x ^ y and g = x the chain must add: {co[3], o} = x + y + ci, and
// co[i] must be the carry out of the low i+1 bits. A second sweep sets every
// p to 1 with any g and checks that the carry-in propagates to every stage.
module tb_carry4;
  timeunit 1ns; timeprecision 1ps;

  logic       ci;
  logic [3:0] p, g, o, co;
  int checks = 0, failures = 0;

  carry4 dut (.ci(ci), .p(p), .g(g), .o(o), .co(co));

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          int total;
          ci = c[0]; p = 4'(x) ^ 4'(y); g = 4'(x);
          #1;
          total = x + y + c;
          checks++;
          if ({co[3], o} !== 5'(total)) begin
            failures++;
            $display("FAIL add x=%0d y=%0d ci=%0d got %0d", x, y, c, {co[3], o});
          end
          for (int i = 0; i < 4; i++) begin
            int low;
            low = (x % (1 << (i+1))) + (y % (1 << (i+1))) + c;
            checks++;
            if (co[i] !== (low >= (1 << (i+1)))) begin
              failures++;
              $display("FAIL carry[%0d] x=%0d y=%0d ci=%0d", i, x, y, c);
            end
          end
        end
    for (int gg = 0; gg < 16; gg++)
      for (int c = 0; c < 2; c++) begin
        ci = c[0]; p = 4'hf; g = 4'(gg);
        #1;
        checks++;
        if (co !== {4{c[0]}} || o !== {4{~c[0]}}) begin
          failures++;
          $display("FAIL propagate g=%0d ci=%0d co=%b o=%b", gg, c, co, o);
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
