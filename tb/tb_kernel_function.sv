// tb_kernel_function: random feature vectors in a behavioural memory with
// random grant delays; for random pairs (i, j) the three kernels k_ii, k_jj,
// k_ij must equal the reference (truncated products, saturated sums, in
// feature order). With no wait states the unit must finish in N + 2 cycles.
`timescale 1ns/1ps
module tb_kernel_function;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 3, IDXW = 6, M = 64;
  logic clk = 0, rst_n = 0, start = 0, done;
  always #5 clk = ~clk;
  logic [IDXW-1:0] idx_i = 0, idx_j = 0;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  word_t kii, kjj, kij;
  int checks = 0, failures = 0;

  kernel_function #(.N(N), .IDXW(IDXW)) dut (.*);
  tb_mem_model #(.DEPTH(256)) mem (.clk(clk), .req(mreq), .rsp(mrsp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int i, input int j, input int range, output int cycles);
    int eii, ejj, eij, xi, xj;
    eii = 0; ejj = 0; eij = 0;
    for (int d = 0; d < N; d++) begin
      xi = int'(mem.x[i * N + d]); xj = int'(mem.x[j * N + d]);
      eii = addsat(eii, tm_ref(xi, xi));
      ejj = addsat(ejj, tm_ref(xj, xj));
      eij = addsat(eij, tm_ref(xi, xj));
    end
    @(negedge clk);
    idx_i = IDXW'(i); idx_j = IDXW'(j); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 3;
    if (int'(kii) != eii) begin failures++; $display("FAIL: kii %0d exp %0d", kii, eii); end
    if (int'(kjj) != ejj) begin failures++; $display("FAIL: kjj %0d exp %0d", kjj, ejj); end
    if (int'(kij) != eij) begin failures++; $display("FAIL: kij %0d exp %0d (range %0d)", kij, eij, range); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int range;
      range = (it % 3 == 0) ? 32767 : (it % 3 == 1) ? 2048 : 300;  // large values saturate
      for (int k = 0; k < M * N; k++) mem.x[k] = word_t'(int'($urandom_range(0, 2 * range)) - range);
      run($urandom_range(0, M - 1), $urandom_range(0, M - 1), range, cyc);
    end
    // no wait states: force the model to grant immediately
    for (int it = 0; it < 20; it++) begin
      force mem.wait_q = 0;
      run(it, 63 - it, 300, cyc);
      release mem.wait_q;
      checks++;
      if (cyc != N + 2) begin failures++; $display("FAIL: latency %0d exp %0d", cyc, N + 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
