// tb_fractal_dimension: random epochs of D = 256 samples; the simplified
// Higuchi value sum_m isqrt(min(255, A_m >> 8)), with A_m the sum of
// |x(n) - x(n-5)| over n >= 5, n mod 5 = m, is computed here and compared.
// Epochs follow each other without a gap, as in the real stream.
`timescale 1ns/1ps
module tb_fractal_dimension;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0] sample = 0;
  logic sample_valid = 0, epoch_end = 0, fd_valid;
  logic [7:0] fd;
  int checks = 0, failures = 0;
  int expq[$];

  fractal_dimension dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rsqrt(input int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && fd_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: extra result"); end
    else begin
      int e;
      e = expq.pop_front();
      if (fd != 8'(e)) begin failures++; $display("FAIL: fd=%0d expected %0d", fd, e); end
    end
  end

  task automatic epoch(input int amp, input int period);
    int x[D], acc[5], s;
    for (int n = 0; n < D; n++) begin
      x[n] = int'($urandom_range(0, 2 * amp)) - amp;
      if (period > 0) x[n] = ((n / period) % 2) ? amp : -amp;
    end
    foreach (acc[m]) acc[m] = 0;
    for (int n = 5; n < D; n++) acc[n % 5] += (x[n] > x[n-5]) ? x[n] - x[n-5] : x[n-5] - x[n];
    s = 0;
    foreach (acc[m]) s += rsqrt((acc[m] / D > 255) ? 255 : acc[m] / D);
    expq.push_back(s);
    for (int n = 0; n < D; n++) begin
      @(negedge clk);
      sample = 8'(x[n]); sample_valid = 1; epoch_end = (n == D - 1);
    end
    @(negedge clk);
    sample_valid = 0; epoch_end = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    epoch(0, 0); epoch(127, 0); epoch(127, 2); epoch(100, 1); epoch(3, 0); epoch(60, 7);
    for (int i = 0; i < 10; i++) epoch(int'($urandom_range(0, 127)), int'($urandom_range(0, 4)));
    repeat (100) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
