// tb_learned_function: random training sets (features, labels, alphas with
// many zeros) in a behavioural memory with random grant delays. For random
// points t the error E_t = sum alpha_k y_k K(x_k, x_t) - b - y_t must match a
// reference that uses the same word arithmetic (truncated products,
// saturated sums). The skipping of zero alphas is checked by the number of
// X-bank reads, which must equal N times the number of non-zero alphas.
`timescale 1ns/1ps
module tb_learned_function;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 3, IDXW = 6, M = 64;
  logic clk = 0, rst_n = 0, start = 0, done, y_t = 0;
  always #5 clk = ~clk;
  logic [IDXW-1:0] idx_t = 0;
  logic [IDXW:0] n_points = 0;
  word_t b = 0, err;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  int checks = 0, failures = 0, xreads = 0;

  learned_function #(.N(N), .IDXW(IDXW)) dut (.*);
  tb_mem_model #(.DEPTH(256)) mem (.clk(clk), .req(mreq), .rsp(mrsp));

  always @(posedge clk) if (mreq.req && mrsp.gnt && mreq.bank == BANK_X) xreads++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int n, t, e, f, kacc, nz, bb;
      bit yt;
      n = (it < 5) ? it : $urandom_range(1, M);
      for (int k = 0; k < M * N; k++) mem.x[k] = word_t'(int'($urandom_range(0, 1200)) - 600);
      for (int k = 0; k < M; k++) begin
        mem.y[k] = 1'($urandom_range(0, 1));
        mem.a[k] = ($urandom_range(0, 2) == 0) ? word_t'($urandom_range(1, 600)) : '0;
      end
      t = (n > 0) ? $urandom_range(0, n - 1) : 0;
      yt = 1'($urandom_range(0, 1));
      bb = int'($urandom_range(0, 1000)) - 500;
      f = 0; nz = 0;
      for (int k = 0; k < n; k++) begin
        if (mem.a[k] == 0) continue;
        nz++;
        kacc = 0;
        for (int d = 0; d < N; d++) kacc = addsat(kacc, tm_ref(int'(mem.x[k * N + d]), int'(mem.x[t * N + d])));
        f = addsat(f, ysign(tm_ref(int'(mem.a[k]), kacc), mem.y[k]));
      end
      e = sat16(longint'(sat16(longint'(f) - bb)) - (yt ? -256 : 256));
      @(negedge clk);
      xreads = 0;
      idx_t = IDXW'(t); y_t = yt; b = word_t'(bb); n_points = (IDXW + 1)'(n); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (int'(err) != e) begin failures++; $display("FAIL: err %0d exp %0d (n=%0d)", err, e, n); end
      if (xreads != nz * N) begin failures++; $display("FAIL: %0d X reads, %0d non-zero alphas", xreads, nz); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
