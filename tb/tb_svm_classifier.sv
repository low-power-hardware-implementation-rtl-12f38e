// tb_svm_classifier: loads random models with 0..NSV support vectors through
// the load ports and classifies random test vectors. The score must equal
// the reference -b + sum alpha*y*(x . sv) (truncated products, saturated
// sums, in the hardware's order), class = (score >= 0), and valid_out must
// rise exactly nsv*N + 1 cycles after start (16 cycles for the full model).
// A start while busy must be ignored. Also counts both class outcomes.
`timescale 1ns/1ps
module tb_svm_classifier;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 3, NSV = 5, SVA = 4, AA = 3;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  word_t x_test [N];
  logic busy, class_out, valid_out;
  word_t score;
  logic ld_sv_we = 0, ld_ay_we = 0, ld_y = 0, ld_b_we = 0;
  logic [SVA-1:0] ld_sv_addr = 0;
  logic [AA-1:0] ld_ay_addr = 0;
  word_t ld_sv_data = 0, ld_alpha = 0, ld_b = 0;
  logic [AA:0] ld_nsv = 0;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, lat16 = 0;
  int sv [NSV*N], al [NSV], yy [NSV], bq, nsv;

  svm_classifier #(.N(N), .NSV(NSV)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_model(input int n, input int r);
    nsv = n;
    for (int k = 0; k < NSV * N; k++) begin
      @(negedge clk);
      sv[k] = int'($urandom_range(0, 2 * r)) - r;
      ld_sv_we = 1; ld_sv_addr = SVA'(k); ld_sv_data = word_t'(sv[k]);
    end
    @(negedge clk);
    ld_sv_we = 0;
    for (int k = 0; k < NSV; k++) begin
      @(negedge clk);
      al[k] = $urandom_range(0, r); yy[k] = $urandom_range(0, 1);
      ld_ay_we = 1; ld_ay_addr = AA'(k); ld_alpha = word_t'(al[k]); ld_y = yy[k][0];
    end
    @(negedge clk);
    ld_ay_we = 0;
    bq = int'($urandom_range(0, 2 * r)) - r;
    ld_b_we = 1; ld_b = word_t'(bq); ld_nsv = (AA + 1)'(n);
    @(negedge clk);
    ld_b_we = 0;
  endtask

  task automatic classify(input int r);
    int xs [N], f, dot, cyc;
    for (int d = 0; d < N; d++) begin xs[d] = int'($urandom_range(0, 2 * r)) - r; x_test[d] = word_t'(xs[d]); end
    f = sat16(-longint'(bq));
    for (int k = 0; k < nsv; k++) begin
      dot = 0;
      for (int d = 0; d < N; d++) dot = addsat(dot, tm_ref(xs[d], sv[k * N + d]));
      f = addsat(f, tm_ref(ysign(al[k], yy[k][0]), dot));
    end
    start = 1;
    @(negedge clk);
    // a second start while busy must be ignored
    for (int d = 0; d < N; d++) x_test[d] = word_t'($urandom);
    start = (nsv > 0);
    cyc = 1;
    while (!valid_out) begin
      @(negedge clk);
      start = 0;
      cyc++;
      if (cyc > 100) break;
    end
    start = 0;
    checks += 3;
    if (int'(score) != f) begin failures++; $display("FAIL: score %0d exp %0d nsv=%0d", score, f, nsv); end
    if (class_out != (f >= 0)) begin failures++; $display("FAIL: class"); end
    if (cyc != nsv * N + 1) begin failures++; $display("FAIL: latency %0d exp %0d", cyc, nsv * N + 1); end
    if (cyc == 16) lat16++;
    if (class_out) n_pos++; else n_neg++;
    // the ignored second start must not produce another result
    @(negedge clk);
    checks++;
    if (valid_out || busy) begin failures++; $display("FAIL: extra activity after result"); end
  endtask

  initial begin
    for (int d = 0; d < N; d++) x_test[d] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 60; m++) begin
      int r;
      r = (m % 3 == 2) ? 32767 : 1500;
      load_model(m % (NSV + 1), r);
      for (int t = 0; t < 20; t++) classify(r);
    end
    checks += 3;
    if (lat16 == 0) begin failures++; $display("FAIL: 16-cycle case never seen"); end
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL: one class never produced"); end
    if (lat16 < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
