// tb_smo_processing_unit: the processing unit runs on the real memory
// interface and main memory, preloaded with random small training sets.
// Consecutive SMO steps on random pairs (i, j) are compared with a software
// step using the same word arithmetic: both alphas in memory, the threshold
// b, the changed flag and the eta/limits rejection pulse must match exactly
// after every step. All three outcomes (updated, unchanged, rejected) must
// occur.
`timescale 1ns/1ps
module tb_smo_processing_unit;
  import svm_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 3, IDXW = 6, M = 64;
  logic clk = 0, rst_n = 0, clear = 0, start = 0, done, changed, skipped_eta;
  always #5 clk = ~clk;
  logic [IDXW-1:0] idx_i = 0, idx_j = 0;
  logic [IDXW:0] n_points = 0;
  word_t c = 0, b;
  mem_req_t mreq [3];
  mem_rsp_t mrsp [3];
  int checks = 0, failures = 0, n_upd = 0, n_unch = 0, n_rej = 0, skip_pulses = 0;
  int xm [RM*RN], am [RM], ym [RM], bm;

  logic              x_we, a_we, y_we, y_wdata, y_rdata;
  logic [MAXIDX-1:0] x_waddr, x_raddr1, x_raddr2, a_addr, y_addr;
  word_t             x_wdata, x_rdata1, x_rdata2, a_wdata, a_rdata;

  smo_processing_unit #(.N(N), .IDXW(IDXW)) dut (.*);
  smo_memory_interface #(.NC(3)) mif (.clk, .rst_n, .req(mreq), .rsp(mrsp), .*);
  smo_main_memory #(.M(M), .N(N)) mem (.*);

  always @(posedge clk) if (skipped_eta) skip_pulses++;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 12; set++) begin
      int n, cc;
      n = $urandom_range(4, (set % 3 == 0) ? M : 16);
      cc = (set % 2) ? 256 : 64;
      for (int k = 0; k < M; k++) begin
        ym[k] = $urandom_range(0, 1);
        // two loose clusters so that steps make progress
        for (int d = 0; d < N; d++) xm[k * N + d] = (ym[k] ? -200 : 200) + int'($urandom_range(0, 400)) - 200;
        am[k] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, cc) : 0;
      end
      if (set == 0) for (int d = 0; d < N; d++) xm[1 * N + d] = xm[0 * N + d];   // identical points: eta = 0
      for (int k = 0; k < M * N; k++) mem.x_mem[k] = word_t'(xm[k]);
      for (int k = 0; k < M; k++) begin mem.a_mem[k] = word_t'(am[k]); mem.y_mem[k] = ym[k][0]; end
      @(negedge clk);
      clear = 1; c = word_t'(cc); n_points = (IDXW + 1)'(n);
      @(negedge clk);
      clear = 0;
      bm = 0;
      for (int st = 0; st < 40; st++) begin
        int i, j, r, sp;
        i = $urandom_range(0, n - 1);
        j = $urandom_range(0, n - 1);
        if (set == 0 && st == 0) begin i = 0; j = 1; end
        r = smo_step_ref(xm, am, ym, n, cc, i, j, bm);
        sp = skip_pulses;
        idx_i = IDXW'(i); idx_j = IDXW'(j); start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        checks += 4;
        if (changed != (r == 1)) begin failures++; $display("FAIL: changed=%0d ref=%0d (set %0d step %0d)", changed, r, set, st); end
        if ((skip_pulses - sp) != (r == 2 ? 1 : 0)) begin failures++; $display("FAIL: skipped_eta pulses %0d ref=%0d", skip_pulses - sp, r); end
        if (int'(b) != bm) begin failures++; $display("FAIL: b=%0d ref=%0d", b, bm); end
        if (int'(mem.a_mem[i]) != am[i] || int'(mem.a_mem[j]) != am[j]) begin
          failures++; $display("FAIL: alphas %0d %0d ref %0d %0d", mem.a_mem[i], mem.a_mem[j], am[i], am[j]);
        end
        if (r == 0) n_unch++; else if (r == 1) n_upd++; else n_rej++;
      end
    end
    checks++;
    if (n_upd == 0 || n_unch == 0 || n_rej == 0) begin
      failures++; $display("FAIL: outcomes upd=%0d unch=%0d rej=%0d", n_upd, n_unch, n_rej);
    end
    $display("outcomes: updated %0d unchanged %0d rejected %0d", n_upd, n_unch, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
