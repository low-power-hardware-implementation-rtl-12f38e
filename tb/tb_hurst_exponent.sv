// tb_hurst_exponent: random and patterned epochs of D = 256 samples. The
// reference builds MAV = (sum |x|) >> 8, the cumulative deviation
// Y_t = sum_{i<=t}(x_i - MAV), R = ||max Y| - |min Y|| and checks
// hurst = isqrt(R). busy must stay high for D + 1 cycles after each epoch and
// the result must come D + RW/2 + 4 cycles after the last sample.
`timescale 1ns/1ps
module tb_hurst_exponent;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0] sample = 0;
  logic sample_valid = 0, epoch_end = 0, busy, hurst_valid;
  logic [14:0] hurst;
  int checks = 0, failures = 0;

  hurst_exponent dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rsqrt(input longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return int'(r);
  endfunction

  task automatic epoch(input int amp, input int period, input int offs);
    int x[D], sumabs, mav, y, ymax, ymin, am, an, r, e, cyc, busy_cyc;
    for (int n = 0; n < D; n++) begin
      x[n] = int'($urandom_range(0, 2 * amp)) - amp + offs;
      if (period > 0) x[n] = (((n / period) % 2) ? amp : -amp) + offs;
      if (x[n] > 127) x[n] = 127;
      if (x[n] < -128) x[n] = -128;
    end
    sumabs = 0;
    foreach (x[n]) sumabs += (x[n] < 0) ? -x[n] : x[n];
    mav = sumabs / D;
    y = 0; ymax = 0; ymin = 0;
    for (int n = 0; n < D; n++) begin
      y += x[n] - mav;
      if (n == 0 || y > ymax) ymax = y;
      if (n == 0 || y < ymin) ymin = y;
    end
    am = (ymax < 0) ? -ymax : ymax;
    an = (ymin < 0) ? -ymin : ymin;
    r = (am > an) ? am - an : an - am;
    e = rsqrt(r);
    for (int n = 0; n < D; n++) begin
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL: busy during input"); end
      sample = 8'(x[n]); sample_valid = 1; epoch_end = (n == D - 1);
    end
    @(negedge clk);
    sample_valid = 0; epoch_end = 0;
    cyc = 1; busy_cyc = 0;
    while (!hurst_valid && cyc < 2000) begin
      if (busy) busy_cyc++;
      @(negedge clk); cyc++;
    end
    checks += 3;
    if (hurst != 15'(e)) begin failures++; $display("FAIL: hurst=%0d expected %0d (R=%0d)", hurst, e, r); end
    if (busy_cyc != D + 1) begin failures++; $display("FAIL: busy for %0d cycles", busy_cyc); end
    if (cyc != D + 15 + 4) begin failures++; $display("FAIL: latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    epoch(0, 0, 0); epoch(100, 2, 0); epoch(127, 0, 0); epoch(20, 16, 50); epoch(64, 64, -30);
    for (int i = 0; i < 10; i++)
      epoch(int'($urandom_range(0, 127)), int'($urandom_range(0, 40)), int'($urandom_range(0, 100)) - 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
