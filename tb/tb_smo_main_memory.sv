// tb_smo_main_memory: fills the three banks, then reads them back through
// every read port (two X reads per cycle) and checks the registered read
// timing and contents against a model.
`timescale 1ns/1ps
module tb_smo_main_memory;
  import svm_pkg::*;
  localparam int M = 64, N = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic x_we = 0, a_we = 0, y_we = 0, y_wdata = 0, y_rdata;
  logic [MAXIDX-1:0] x_waddr = 0, x_raddr1 = 0, x_raddr2 = 0, a_addr = 0, y_addr = 0;
  word_t x_wdata = 0, a_wdata = 0, x_rdata1, x_rdata2, a_rdata;
  int checks = 0, failures = 0;
  int xm[M*N], am[M], ym[M];

  smo_main_memory dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < M * N; k++) begin
      @(negedge clk);
      xm[k] = int'($urandom_range(0, 65535)) - 32768;
      x_we = 1; x_waddr = MAXIDX'(k); x_wdata = word_t'(xm[k]);
      if (k < M) begin
        am[k] = int'($urandom_range(0, 65535)) - 32768; ym[k] = int'($urandom_range(0, 1));
        a_we = 1; a_addr = MAXIDX'(k); a_wdata = word_t'(am[k]);
        y_we = 1; y_addr = MAXIDX'(k); y_wdata = ym[k][0];
      end else begin a_we = 0; y_we = 0; end
    end
    @(negedge clk);
    x_we = 0; a_we = 0; y_we = 0;
    for (int i = 0; i < 500; i++) begin
      int r1, r2, p;
      r1 = int'($urandom_range(0, M * N - 1)); r2 = int'($urandom_range(0, M * N - 1)); p = int'($urandom_range(0, M - 1));
      @(negedge clk);
      x_raddr1 = MAXIDX'(r1); x_raddr2 = MAXIDX'(r2); a_addr = MAXIDX'(p); y_addr = MAXIDX'(p);
      @(negedge clk);
      x_raddr1 = 0; x_raddr2 = 0;    // data must be the registered value of the previous address
      checks += 4;
      if (int'(x_rdata1) != xm[r1]) begin failures++; $display("FAIL: x1"); end
      if (int'(x_rdata2) != xm[r2]) begin failures++; $display("FAIL: x2"); end
      if (int'(a_rdata) != am[p]) begin failures++; $display("FAIL: a"); end
      if (y_rdata != ym[p][0]) begin failures++; $display("FAIL: y"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
