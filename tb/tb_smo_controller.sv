// tb_smo_controller: a behavioural model of the processing unit answers each pair after a random
// delay and reports "changed" according to a script. Checked: clear_b pulses
// at start, the pair order of the sweep (i = 0..n-1, j = (i + s) mod n with
// s = 1..n-1 advancing per pass, never i == j), stopping on the first pass
// without changes (converged, pass count), stopping at max_passes when every
// pass changes something (not converged), and the immediate finish for fewer
// than two points.
`timescale 1ns/1ps
module tb_smo_controller;
  localparam int IDXW = 6;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [IDXW:0] n_points = 0;
  logic [15:0] max_passes = 0, passes;
  logic clear_b, pu_start, pu_done = 0, pu_changed = 0, busy, done, converged;
  logic [IDXW-1:0] pu_i, pu_j;
  int checks = 0, failures = 0;
  int quiet_from;       // passes >= quiet_from report no change
  int cur_pass, cur_i, n_cur, clears, pairs;

  smo_controller #(.IDXW(IDXW)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (clear_b) clears++;

  // behavioural processing unit with pair-order checking
  initial begin
    forever begin
      @(posedge clk);
      if (pu_start) begin
        int s, ej;
        s = 1 + (cur_pass % (n_cur - 1));
        ej = (cur_i + s) % n_cur;
        checks++;
        if (int'(pu_i) != cur_i || int'(pu_j) != ej) begin
          failures++; $display("FAIL: pair (%0d,%0d) expected (%0d,%0d) pass %0d", pu_i, pu_j, cur_i, ej, cur_pass);
        end
        pairs++;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        #1;
        pu_done = 1;
        pu_changed = (cur_pass < quiet_from) && (cur_i == n_cur / 2);
        @(posedge clk); #1;
        pu_done = 0; pu_changed = 0;
        cur_i++;
        if (cur_i == n_cur) begin cur_i = 0; cur_pass++; end
      end
    end
  end

  task automatic run(input int n, input int maxp, input int quiet);
    int exp_passes;
    bit exp_conv;
    @(negedge clk);
    n_cur = n; quiet_from = quiet; cur_pass = 0; cur_i = 0; clears = 0; pairs = 0;
    n_points = (IDXW + 1)'(n); max_passes = 16'(maxp); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    if (n < 2) begin exp_passes = 0; exp_conv = 1; end
    else begin
      int mp;
      mp = (maxp < 1) ? 1 : maxp;
      if (quiet < mp) begin exp_passes = quiet + 1; exp_conv = 1; end
      else begin exp_passes = mp; exp_conv = 0; end
    end
    checks += 4;
    if (int'(passes) != exp_passes) begin failures++; $display("FAIL: passes %0d expected %0d (n=%0d max=%0d quiet=%0d)", passes, exp_passes, n, maxp, quiet); end
    if (converged != exp_conv) begin failures++; $display("FAIL: converged %0d expected %0d", converged, exp_conv); end
    if (pairs != ((n < 2) ? 0 : exp_passes * n)) begin failures++; $display("FAIL: %0d pairs", pairs); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after done"); end
    checks++;
    if (clears != 1) begin failures++; $display("FAIL: clear_b pulses %0d", clears); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 5, 0);
    run(1, 5, 0);
    run(2, 5, 0);
    run(5, 20, 7);      // converges in the 8th pass
    run(5, 4, 100);     // stops at the pass limit
    run(64, 3, 100);
    run(64, 10, 2);
    run(3, 0, 100);     // limit 0 behaves as one pass
    for (int k = 0; k < 30; k++) run($urandom_range(2, 40), $urandom_range(1, 12), $urandom_range(0, 14));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
