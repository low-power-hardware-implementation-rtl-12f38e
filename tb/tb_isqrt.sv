// tb_isqrt: checks the sequential square root against floor(sqrt(v)) found
// by search, for corner and random radicands, and checks that each result
// arrives IW/2 + 1 cycles after the start cycle.
`timescale 1ns/1ps
module tb_isqrt;
  localparam int IW = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, busy;
  logic [IW-1:0] radicand = '0;
  logic [IW/2-1:0] root;
  int checks = 0, failures = 0;

  isqrt #(.IW(IW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sqrt(input longint v);
    longint lo = 0, hi = 1 << 16;
    while (lo < hi) begin
      longint mid = (lo + hi + 1) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  task automatic one(input logic [IW-1:0] v);
    int cyc = 0;
    @(negedge clk);
    radicand = v; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(root) != ref_sqrt(longint'(v))) begin
      failures++; $display("FAIL: sqrt(%0d) = %0d, expected %0d", v, root, ref_sqrt(longint'(v)));
    end
    checks++;
    if (cyc != IW / 2 + 1) begin failures++; $display("FAIL: latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4); one(255); one(256); one({IW{1'b1}});
    for (int i = 0; i < 200; i++) one(IW'($urandom));
    for (int i = 0; i < 50; i++) one(IW'($urandom_range(0, 5000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
