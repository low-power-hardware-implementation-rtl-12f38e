// tb_smo_trainer: complete SMO trainer (controller, processing unit, memory
// interface, main memory). Training sets are written through the host port
// (request held until grant), alphas cleared, and training started. A
// software model runs the same pair sweep with the same word arithmetic;
// after training every alpha, b, the pass count, the converged flag and the
// counts of changed and rejected pairs must match it exactly. On separable
// data the trained model must also classify its own training points
// correctly (sign of sum alpha y K - b), and host reads of the alphas must
// work after training. One run uses a pass limit that stops training early.
`timescale 1ns/1ps
module tb_smo_trainer;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 64, N = 3, IDXW = 6;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  logic [IDXW:0] n_points = 0;
  logic [15:0] max_passes = 0, passes;
  word_t c = 0, b;
  logic busy, done, converged, pair_changed, pair_skipped;
  int checks = 0, failures = 0, chg_cnt = 0, skp_cnt = 0, conv_runs = 0, limit_runs = 0;
  int xm [RM*RN], am [RM], ym [RM], bm;

  smo_trainer #(.M(M), .N(N), .IDXW(IDXW)) dut (.*);

  always @(posedge clk) begin
    if (pair_changed) chg_cnt++;
    if (pair_skipped) skp_cnt++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_access(input bank_e bank, input int addr, input bit we, input int wdata, output int rdata);
    @(negedge clk);
    host_req = MEM_REQ_IDLE;
    host_req.req = 1; host_req.we = we; host_req.bank = bank;
    host_req.addr = MAXIDX'(addr); host_req.wdata = word_t'(wdata);
    #1;
    while (!host_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    host_req = MEM_REQ_IDLE;
    rdata = int'(host_rsp.rdata);
  endtask

  task automatic train(input int n, input int cc, input int maxp, input bit separable);
    int rd_unused, ref_passes, ref_chg, ref_skp, nchg, s, correct;
    bit ref_conv;
    // data set
    for (int k = 0; k < n; k++) begin
      ym[k] = $urandom_range(0, 1);
      for (int d = 0; d < N; d++)
        xm[k * N + d] = separable ? ((ym[k] ? -150 : 150) + int'($urandom_range(0, 200)) - 100)
                                  : int'($urandom_range(0, 600)) - 300;
      am[k] = 0;
      for (int d = 0; d < N; d++) host_access(BANK_X, k * N + d, 1, xm[k * N + d], rd_unused);
      host_access(BANK_Y, k, 1, ym[k], rd_unused);
      host_access(BANK_A, k, 1, 0, rd_unused);
    end
    // software model of the whole training run
    bm = 0; ref_passes = 0; ref_chg = 0; ref_skp = 0; s = 1; ref_conv = 0;
    if (n < 2) ref_conv = 1;
    else begin
      forever begin
        nchg = 0;
        for (int i = 0; i < n; i++) begin
          int r;
          r = smo_step_ref(xm, am, ym, n, cc, i, (i + s) % n, bm);
          if (r == 1) nchg++;
          if (r == 2) ref_skp++;
        end
        ref_chg += nchg;
        ref_passes++;
        if (nchg == 0) begin ref_conv = 1; break; end
        if (ref_passes >= maxp) break;
        s = (s == n - 1) ? 1 : s + 1;
      end
    end
    // hardware run
    @(negedge clk);
    chg_cnt = 0; skp_cnt = 0;
    n_points = (IDXW + 1)'(n); max_passes = 16'(maxp); c = word_t'(cc); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 5;
    if (int'(passes) != ref_passes) begin failures++; $display("FAIL: passes %0d ref %0d", passes, ref_passes); end
    if (converged != ref_conv) begin failures++; $display("FAIL: converged %0d ref %0d", converged, ref_conv); end
    if (int'(b) != bm) begin failures++; $display("FAIL: b %0d ref %0d", int'(b), bm); end
    if (chg_cnt != ref_chg) begin failures++; $display("FAIL: changed pairs %0d ref %0d", chg_cnt, ref_chg); end
    if (skp_cnt != ref_skp) begin failures++; $display("FAIL: rejected pairs %0d ref %0d", skp_cnt, ref_skp); end
    for (int k = 0; k < n; k++) begin
      int av;
      host_access(BANK_A, k, 0, 0, av);
      checks++;
      if (av != am[k]) begin failures++; $display("FAIL: alpha[%0d] %0d ref %0d", k, av, am[k]); end
    end
    if (ref_conv) conv_runs++; else limit_runs++;
    if (separable && ref_conv && n >= 2) begin
      correct = 0;
      for (int k = 0; k < n; k++) begin
        int e, f;
        e = eref(xm, am, ym, n, k, bm);
        f = e + (ym[k] ? -256 : 256);      // f - b
        if ((f >= 0) == (ym[k] == 0)) correct++;
      end
      checks++;
      if (correct != n) begin failures++; $display("FAIL: %0d of %0d training points correct", correct, n); end
    end
    $display("run n=%0d C=%0d: passes %0d conv %0d changed %0d rejected %0d b %0d", n, cc, passes, converged, chg_cnt, skp_cnt, int'(b));
  endtask

  initial begin
    host_req = MEM_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    train(12, 256, 50, 1);
    train(32, 256, 50, 1);
    train(64, 512, 50, 1);
    train(40, 64, 3, 0);     // overlapping data, stopped by the pass limit
    train(1, 256, 5, 1);
    checks += 2;
    if (conv_runs == 0) begin failures++; $display("FAIL: no converged run"); end
    if (limit_runs == 0) begin failures++; $display("FAIL: no limited run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
