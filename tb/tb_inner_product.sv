// tb_inner_product: random sequences of clear (load init) and enable (add
// a*b) cycles; the accumulator must follow the reference: truncated product,
// saturating add, clear has priority, hold when neither is asserted.
`timescale 1ns/1ps
module tb_inner_product;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  always #5 clk = ~clk;
  word_t init = 0, a = 0, b = 0, acc;
  int checks = 0, failures = 0;

  inner_product dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m = 0;
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = (i % 4 == 0) ? 32767 : 3000;
      @(negedge clk);
      clr = ($urandom_range(0, 9) == 0);
      en = ($urandom_range(0, 3) != 0);
      init = word_t'(int'($urandom_range(0, 2 * r)) - r);
      a = word_t'(int'($urandom_range(0, 2 * r)) - r);
      b = word_t'(int'($urandom_range(0, 2 * r)) - r);
      if (clr) m = int'(init);
      else if (en) m = addsat(m, tm_ref(int'(a), int'(b)));
      @(posedge clk); #1;
      checks++;
      if (int'(acc) != m) begin failures++; $display("FAIL: acc %0d exp %0d", acc, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
