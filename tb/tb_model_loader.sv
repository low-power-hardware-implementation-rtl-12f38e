// tb_model_loader: random alphas (mostly zero), labels and features in a
// behavioural memory with random grant delays. The loader must write the
// support vectors (alpha != 0) in point order into consecutive classifier
// slots (features, alpha, label), then b and the vector count; alphas of
// zero must be skipped without reading their features. More than NSV
// support vectors must set overflow and keep only the first NSV.
`timescale 1ns/1ps
module tb_model_loader;
  import svm_pkg::*;
  localparam int N = 3, NSV = 5, IDXW = 6, SVA = 4, AA = 3, M = 64;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [IDXW:0] n_points = 0;
  word_t b = 0;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic busy, done, overflow, ld_sv_we, ld_ay_we, ld_y, ld_b_we;
  logic [AA:0] n_sv, ld_nsv;
  logic [SVA-1:0] ld_sv_addr;
  logic [AA-1:0] ld_ay_addr;
  word_t ld_sv_data, ld_alpha, ld_b;
  int checks = 0, failures = 0, xreads = 0, ovf_seen = 0;
  int csv [NSV*N], cal [NSV], cy [NSV], cb, cn, bwrites;

  model_loader #(.N(N), .NSV(NSV), .IDXW(IDXW)) dut (.*);
  tb_mem_model #(.DEPTH(256)) mem (.clk(clk), .req(mreq), .rsp(mrsp));

  always @(posedge clk) begin
    if (mreq.req && mrsp.gnt && mreq.bank == BANK_X) xreads++;
    if (ld_sv_we) csv[ld_sv_addr] = int'(ld_sv_data);
    if (ld_ay_we) begin cal[ld_ay_addr] = int'(ld_alpha); cy[ld_ay_addr] = int'(ld_y); end
    if (ld_b_we) begin cb = int'(ld_b); cn = int'(ld_nsv); bwrites++; end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int n, nz, slot, bb, p;
      bit ok;
      n = (it < 3) ? it : $urandom_range(1, M);
      p = (it % 2) ? 2 : 12;    // one point in p is a support vector
      for (int k = 0; k < M * N; k++) mem.x[k] = word_t'($urandom);
      for (int k = 0; k < M; k++) begin
        mem.y[k] = 1'($urandom_range(0, 1));
        mem.a[k] = ($urandom_range(0, p - 1) == 0) ? word_t'($urandom_range(1, 30000)) : '0;
      end
      for (int k = 0; k < NSV * N; k++) csv[k] = -99999;
      for (int k = 0; k < NSV; k++) begin cal[k] = -99999; cy[k] = -1; end
      bwrites = 0;
      bb = int'($urandom_range(0, 60000)) - 30000;
      @(negedge clk);
      xreads = 0;
      n_points = (IDXW + 1)'(n); b = word_t'(bb); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      // expected contents
      nz = 0; slot = 0; ok = 1;
      for (int k = 0; k < n; k++) begin
        if (mem.a[k] == 0) continue;
        nz++;
        if (slot < NSV) begin
          if (cal[slot] != int'(mem.a[k]) || cy[slot] != int'(mem.y[k])) ok = 0;
          for (int d = 0; d < N; d++) if (csv[slot * N + d] != int'(mem.x[k * N + d])) ok = 0;
          slot++;
        end
      end
      checks += 5;
      if (!ok) begin failures++; $display("FAIL: table contents (it %0d)", it); end
      if (int'(n_sv) != slot || cn != slot) begin failures++; $display("FAIL: n_sv %0d ld_nsv %0d exp %0d", n_sv, cn, slot); end
      if (overflow != (nz > NSV)) begin failures++; $display("FAIL: overflow %0d with %0d SVs", overflow, nz); end
      if (bwrites != 1 || cb != bb) begin failures++; $display("FAIL: bias write"); end
      if (xreads != slot * N) begin failures++; $display("FAIL: %0d X reads for %0d stored SVs", xreads, slot); end
      if (overflow) ovf_seen++;
    end
    checks++;
    if (ovf_seen == 0) begin failures++; $display("FAIL: overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
