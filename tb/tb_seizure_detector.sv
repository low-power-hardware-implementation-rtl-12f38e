// tb_seizure_detector: end-to-end test of the seizure detector at its default
// parameters (D = 256, M = 64, NSV = 5).
//
// Synthetic EEG: "normal" epochs are low-amplitude noise, "seizure" epochs a
// large fast oscillation plus noise. Phase A stores 24 labelled epochs,
// trains, and then classifies 8 fresh epochs, checking each decision against
// the epoch's true class and the 16-cycle classifier latency. Every epoch's
// three features are checked against a reference computed here from the
// samples. Phase B clears the set and stores 64 randomly labelled epochs
// (plus one that must be refused because the set is full), so training hits
// the pass limit and yields more support vectors than the classifier holds.
// Each mechanism (input stall, set full, pair update, pair rejection,
// convergence, pass-limit stop, zero-alpha skipping, support-vector overflow,
// both decisions) must occur at least once.
`timescale 1ns/1ps
module tb_seizure_detector;
  localparam int D = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0] sample;
  logic sample_valid, sample_ready, train_mode, epoch_label, train_start, clear_points;
  logic [15:0] max_passes;
  logic [7:0] fd; logic [14:0] hurst; logic [19:0] cl; logic feat_valid;
  logic seizure, seizure_valid; logic signed [15:0] score;
  logic [6:0] n_points; logic training, train_done, converged; logic [15:0] passes;
  logic signed [15:0] bias; logic model_ready; logic [3:0] n_sv; logic sv_overflow, points_full;
  logic [15:0] pairs_changed, pairs_skipped;

  seizure_detector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference features ----------------
  function automatic int isqrt_ref(input longint v);
    int r = 0;
    while (longint'(r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  int exp_fd[$], exp_hu[$], exp_cl[$], exp_cls[$];

  task automatic ref_features(input logic signed [7:0] x[D]);
    int acc[5], fdv, sumabs, mav, y, ymax, ymin, am, an, r, clv;
    foreach (acc[m]) acc[m] = 0;
    for (int n = 5; n < D; n++) acc[n % 5] += (x[n] > x[n-5]) ? x[n] - x[n-5] : x[n-5] - x[n];
    fdv = 0;
    foreach (acc[m]) begin
      int l = acc[m] / D;
      if (l > 255) l = 255;
      fdv += isqrt_ref(l);
    end
    sumabs = 0;
    for (int n = 0; n < D; n++) sumabs += (x[n] < 0) ? -x[n] : x[n];
    mav = sumabs / D;
    y = 0; ymax = 0; ymin = 0;
    for (int n = 0; n < D; n++) begin
      y += x[n] - mav;
      if (n == 0 || y > ymax) ymax = y;
      if (n == 0 || y < ymin) ymin = y;
    end
    am = ymax < 0 ? -ymax : ymax;
    an = ymin < 0 ? -ymin : ymin;
    r  = am > an ? am - an : an - am;
    clv = 0;
    for (int n = 1; n < D; n++) clv += (x[n] > x[n-1]) ? x[n] - x[n-1] : x[n-1] - x[n];
    exp_fd.push_back(fdv);
    exp_hu.push_back(isqrt_ref(r));
    exp_cl.push_back(clv);
  endtask

  // ---------------- stimulus ----------------
  int stalls = 0;
  task automatic send_epoch(input bit seiz);
    logic signed [7:0] x[D];
    for (int n = 0; n < D; n++) begin
      int noise = int'($urandom_range(0, 6)) - 3;
      if (seiz) x[n] = 8'(((n / 2) % 2 ? 100 : -100) + noise);
      else      x[n] = 8'(noise);
    end
    ref_features(x);
    // inputs change at the falling edge; ready is stable until the next rise
    for (int n = 0; n < D; n++) begin
      @(negedge clk);
      sample = x[n];
      sample_valid = 1'b1;
      while (!sample_ready) begin stalls++; @(negedge clk); end
    end
    @(negedge clk);
    sample_valid = 1'b0;
  endtask

  // feature and decision checker
  int lat16_seen = 0, fv_seen = 0, dec_seen = 0, lat_bad = 0, n_seiz_out = 0, n_norm_out = 0;
  longint fv_cycle, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (feat_valid) begin
      fv_seen++;
      fv_cycle = cyc;
      if (exp_fd.size() > 0) begin
        int efd, ehu, ecl;
        efd = exp_fd.pop_front(); ehu = exp_hu.pop_front(); ecl = exp_cl.pop_front();
        check(fd == 8'(efd) && hurst == 15'(ehu) && cl == 20'(ecl),
              $sformatf("features got %0d/%0d/%0d exp %0d/%0d/%0d", fd, hurst, cl, efd, ehu, ecl));
      end else check(0, "unexpected feature vector");
    end
    if (seizure_valid) begin
      dec_seen++;
      check(cyc - fv_cycle == longint'(n_sv) * 3 + 1, $sformatf("classifier latency %0d", cyc - fv_cycle));
      if (n_sv == 5 && cyc - fv_cycle == 16) lat16_seen++;
      if (seizure) n_seiz_out++; else n_norm_out++;
      if (exp_cls.size() > 0) begin
        int e;
        e = exp_cls.pop_front();
        if (e >= 0) check(seizure == e[0], $sformatf("decision %0d expected %0d (score %0d)", seizure, e, score));
      end
    end
  end

  task automatic wait_training(output bit ok);
    int t = 0;
    ok = 0;
    while (!train_done && t < 20_000_000) begin @(posedge clk); t++; end
    ok = train_done;
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit conv_seen = 0, maxpass_seen = 0, full_seen = 0, ovf_seen = 0, skip_zero_seen = 0;
  bit changed_seen = 0, rejected_seen = 0;

  initial begin : main
    bit ok;
    sample = 0; sample_valid = 0; train_mode = 1; epoch_label = 0; train_start = 0; clear_points = 0; max_passes = 32;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---------- phase A: clean training set ----------
    for (int e = 0; e < 24; e++) begin
      epoch_label <= e[0];
      send_epoch(e[0]);
    end
    repeat (400) @(posedge clk);
    check(n_points == 24, $sformatf("stored %0d points", n_points));
    train_start <= 1; @(posedge clk); train_start <= 0;
    wait_training(ok);
    check(ok, "phase A training finished");
    $display("phase A: passes=%0d converged=%0d n_sv=%0d b=%0d changed=%0d skipped=%0d",
             passes, converged, n_sv, int'(bias), pairs_changed, pairs_skipped);
    check(model_ready, "model ready");
    check(n_sv >= 2, "at least two support vectors");
    if (converged) conv_seen = 1;
    if (n_sv < n_points) skip_zero_seen = 1;
    if (pairs_changed > 0) changed_seen = 1;
    if (pairs_skipped > 0) rejected_seen = 1;

    train_mode <= 0;
    @(posedge clk);
    for (int e = 0; e < 8; e++) begin
      bit s;
      s = ($urandom_range(0, 1) == 1);
      exp_cls.push_back(int'(s));
      send_epoch(s);
    end
    repeat (600) @(posedge clk);
    check(dec_seen == 8, $sformatf("decisions %0d", dec_seen));

    // ---------- phase B: noisy, over-full training set ----------
    clear_points <= 1; @(posedge clk); clear_points <= 0;
    train_mode <= 1;
    @(posedge clk);
    check(n_points == 0, "training set cleared");
    for (int e = 0; e < 65; e++) begin
      bit s;
      s = ($urandom_range(0, 1) == 1);
      epoch_label <= ($urandom_range(0, 1) == 1);
      send_epoch(s);
      if (points_full) full_seen = 1;
    end
    repeat (400) @(posedge clk);
    check(n_points == 64, $sformatf("set holds %0d points", n_points));
    max_passes <= 3;
    train_start <= 1; @(posedge clk); train_start <= 0;
    wait_training(ok);
    check(ok, "phase B training finished");
    $display("phase B: passes=%0d converged=%0d n_sv=%0d overflow=%0d changed=%0d skipped=%0d",
             passes, converged, n_sv, sv_overflow, pairs_changed, pairs_skipped);
    if (!converged && passes == 3) maxpass_seen = 1;
    if (sv_overflow) ovf_seen = 1;
    check(n_sv == 5 || !sv_overflow, "overflow leaves the classifier full");
    // classify a few epochs with the noisy model: decisions arrive, values unchecked
    train_mode <= 0;
    for (int e = 0; e < 3; e++) begin exp_cls.push_back(-1); send_epoch(e[0]); end
    repeat (600) @(posedge clk);
    check(dec_seen == 11, $sformatf("decisions %0d", dec_seen));

    // ---------- mechanisms ----------
    $display("mechanisms: stalls=%0d full=%0d updated=%0d rejected=%0d converged=%0d maxpass=%0d zero_skip=%0d overflow=%0d seizure_out=%0d normal_out=%0d",
             stalls, full_seen, changed_seen, rejected_seen, conv_seen, maxpass_seen, skip_zero_seen, ovf_seen, n_seiz_out, n_norm_out);
    check(stalls > 0, "input stall happened");
    check(full_seen, "training set full happened");
    check(changed_seen, "pair update happened");
    check(rejected_seen, "pair rejection happened");
    check(conv_seen, "convergence happened");
    check(maxpass_seen, "pass-limit stop happened");
    check(skip_zero_seen, "zero-alpha skipping happened");
    check(ovf_seen, "support-vector overflow happened");
    check(n_seiz_out > 0 && n_norm_out > 0, "both decisions happened");
    check(lat16_seen > 0, "16-cycle decision with a full model");
    check(fv_seen == 24 + 8 + 65 + 3, $sformatf("feature vectors %0d", fv_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
