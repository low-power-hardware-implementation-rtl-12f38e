// tb_limits_calculator: for random alphas in [0, C] and all label pairs,
// checks L and H against max/min formulas of the SMO box constraint.
`timescale 1ns/1ps
module tb_limits_calculator;
  logic signed [15:0] alpha_i, alpha_j, c, lo, hi;
  logic y_i, y_j;
  int checks = 0, failures = 0;

  limits_calculator dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int ai, input int aj, input bit yi, input bit yj, input int cc);
    int el, eh;
    alpha_i = 16'(ai); alpha_j = 16'(aj); y_i = yi; y_j = yj; c = 16'(cc);
    #1;
    if (yi != yj) begin
      el = (aj - ai > 0) ? aj - ai : 0;
      eh = (cc + aj - ai < cc) ? cc + aj - ai : cc;
    end else begin
      el = (aj + ai - cc > 0) ? aj + ai - cc : 0;
      eh = (aj + ai < cc) ? aj + ai : cc;
    end
    checks++;
    if (int'(lo) != el || int'(hi) != eh) begin
      failures++;
      $display("FAIL: ai=%0d aj=%0d yi=%0d yj=%0d C=%0d: L=%0d H=%0d expected %0d %0d", ai, aj, yi, yj, cc, lo, hi, el, eh);
    end
  endtask

  initial begin
    one(0, 0, 0, 0, 256); one(0, 0, 0, 1, 256); one(256, 256, 1, 1, 256); one(256, 0, 0, 1, 256);
    one(100, 100, 0, 1, 256); one(200, 100, 1, 1, 256);
    for (int i = 0; i < 4000; i++) begin
      int cc;
      cc = int'($urandom_range(1, 4096));
      one(int'($urandom_range(0, cc)), int'($urandom_range(0, cc)), 1'($urandom), 1'($urandom), cc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
