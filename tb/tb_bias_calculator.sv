// tb_bias_calculator: random operands for all four combinations of the
// in-bounds flags. b_new must equal b1 (alpha_i_new inside (0,C)), else b2
// (alpha_j_new inside), else the average of b1 and b2, computed here with
// the same word arithmetic. The done latency must be 3 cycles for a single
// equation and 6 for the average.
`timescale 1ns/1ps
module tb_bias_calculator;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  always #5 clk = ~clk;
  word_t e_i, e_j, d_alpha_i, d_alpha_j, kii, kij, kjj, b_old, b_new;
  logic y_i, y_j, in_i, in_j;
  int checks = 0, failures = 0;

  bias_calculator dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int r);
    return int'($urandom_range(0, 2 * r)) - r;
  endfunction

  initial begin
    {e_i, e_j, d_alpha_i, d_alpha_j, kii, kij, kjj, b_old} = '0;
    {y_i, y_j, in_i, in_j} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int b1, b2, exp_b, exp_lat, cyc, r;
      r = (it % 2) ? 2000 : 32767;
      @(negedge clk);
      e_i = word_t'(rnd(r)); e_j = word_t'(rnd(r)); d_alpha_i = word_t'(rnd(r)); d_alpha_j = word_t'(rnd(r));
      kii = word_t'(rnd(r)); kij = word_t'(rnd(r)); kjj = word_t'(rnd(r)); b_old = word_t'(rnd(r));
      y_i = 1'($urandom); y_j = 1'($urandom); in_i = it[0]; in_j = it[1];
      b1 = addsat(addsat(addsat(int'(e_i), ysign(tm_ref(int'(d_alpha_i), int'(kii)), y_i)),
                         ysign(tm_ref(int'(d_alpha_j), int'(kij)), y_j)), int'(b_old));
      b2 = addsat(addsat(addsat(int'(e_j), ysign(tm_ref(int'(d_alpha_i), int'(kij)), y_i)),
                         ysign(tm_ref(int'(d_alpha_j), int'(kjj)), y_j)), int'(b_old));
      if (in_i) begin exp_b = b1; exp_lat = 3; end
      else if (in_j) begin exp_b = b2; exp_lat = 3; end
      else begin exp_b = (b1 + b2) >>> 1; exp_lat = 6; end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (int'(b_new) != exp_b) begin failures++; $display("FAIL: b_new %0d exp %0d (in %0d%0d)", b_new, exp_b, in_i, in_j); end
      if (cyc != exp_lat) begin failures++; $display("FAIL: latency %0d exp %0d", cyc, exp_lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
