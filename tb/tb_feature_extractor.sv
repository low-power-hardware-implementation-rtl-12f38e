// tb_feature_extractor: streams epochs through the extractor with the
// ready/valid handshake and compares each feature vector (fractal dimension,
// Hurst, coastline) with values computed here from the same samples. Counts
// the back-pressure stalls, which must occur.
`timescale 1ns/1ps
module tb_feature_extractor;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0] sample = 0;
  logic sample_valid = 0, sample_ready, feat_valid, epoch_last;
  logic [7:0] fd; logic [14:0] hurst; logic [19:0] cl;
  int checks = 0, failures = 0, stalls = 0, lasts = 0;
  int efd[$], ehu[$], ecl[$];

  feature_extractor dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    if (epoch_last) lasts++;
    if (feat_valid) begin
      int a, b, c;
      checks++;
      a = efd.pop_front(); b = ehu.pop_front(); c = ecl.pop_front();
      if (fd != 8'(a) || hurst != 15'(b) || cl != 20'(c)) begin
        failures++;
        $display("FAIL: got %0d/%0d/%0d expected %0d/%0d/%0d", fd, hurst, cl, a, b, c);
      end
    end
  end

  task automatic epoch(input int amp, input int period);
    int x[D], acc[5], s, sumabs, mav, y, ymax, ymin, am, an, r, c;
    for (int n = 0; n < D; n++) begin
      x[n] = int'($urandom_range(0, 2 * amp)) - amp;
      if (period > 0) x[n] = ((n / period) % 2) ? amp : -amp;
    end
    foreach (acc[m]) acc[m] = 0;
    for (int n = 5; n < D; n++) acc[n % 5] += (x[n] > x[n-5]) ? x[n] - x[n-5] : x[n-5] - x[n];
    s = 0;
    foreach (acc[m]) s += rsqrt((acc[m] / D > 255) ? 255 : acc[m] / D);
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
    c = 0;
    for (int n = 1; n < D; n++) c += (x[n] > x[n-1]) ? x[n] - x[n-1] : x[n-1] - x[n];
    efd.push_back(s); ehu.push_back(rsqrt(r)); ecl.push_back(c);
    for (int n = 0; n < D; n++) begin
      @(negedge clk);
      sample = 8'(x[n]); sample_valid = 1;
      while (!sample_ready) begin stalls++; @(negedge clk); end
    end
    @(negedge clk);
    sample_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    epoch(3, 0); epoch(100, 2); epoch(127, 0); epoch(50, 9);
    for (int i = 0; i < 4; i++) epoch(int'($urandom_range(0, 127)), int'($urandom_range(0, 5)));
    repeat (400) @(posedge clk);
    checks += 3;
    if (efd.size() != 0) begin failures++; $display("FAIL: %0d vectors missing", efd.size()); end
    if (stalls == 0) begin failures++; $display("FAIL: no back-pressure seen"); end
    if (lasts != 8) begin failures++; $display("FAIL: %0d epoch ends", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
