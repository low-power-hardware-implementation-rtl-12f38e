// tb_fx_divider: checks quo = trunc((num * 256) / den), saturated to 16 bits,
// for corner and random operands (including a zero divisor) and the W + F + 1
// cycle latency from the start cycle to done.
`timescale 1ns/1ps
module tb_fx_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, busy;
  logic signed [15:0] num = 0, den = 0, quo;
  int checks = 0, failures = 0;

  fx_divider dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int n, input int d);
    longint q;
    int cyc;
    if (d == 0) q = 32767;
    else begin
      longint an, ad;
      an = (n < 0) ? -n : n; ad = (d < 0) ? -d : d;
      q = (an * 256) / ad;
      if (q > 32767) q = 32767;
      if ((n < 0) != (d < 0)) q = -q;
    end
    @(negedge clk);
    num = 16'(n); den = 16'(d); start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (longint'(quo) != q) begin failures++; $display("FAIL: %0d / %0d = %0d, expected %0d", n, d, quo, q); end
    if (cyc != 16 + 8 + 1) begin failures++; $display("FAIL: latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(256, 256); one(-512, 256); one(512, -128); one(100, 0); one(-32768, 1); one(1, 32767); one(0, -5);
    for (int i = 0; i < 300; i++) one(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    for (int i = 0; i < 300; i++) one(int'($urandom_range(0, 2000)) - 1000, int'($urandom_range(1, 3000)) - 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
