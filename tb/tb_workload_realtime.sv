// tb_workload_realtime: the detector in its intended use, at default
// parameters: samples arrive paced as from an EEG channel, a training set of
// labelled inter-ictal and ictal epochs is collected and trained on chip, and
// then an inter-ictal epoch followed by an ictal epoch is replayed (the
// two-epoch demonstration), followed by further random epochs of both kinds.
//
// Pacing: real time is 256 samples/s, i.e. one sample every 390625 cycles of
// a 100 MHz clock; the test uses one sample every SPACING = 400 cycles, which
// already exceeds the extractor's longest busy period (the Hurst second pass
// plus square root, about D + 19 cycles), so the result carries over to any
// slower rate. Checked: no sample is ever stalled; every feature vector is
// ready before the next sample arrives; every epoch is classified correctly;
// the decision follows the feature vector by nsv*N + 1 cycles (16 with a full
// model). Synthetic signals: inter-ictal = slow low-amplitude triangle wave
// (4 Hz, +-15) plus noise; ictal = fast high-amplitude rhythm (16 Hz, +-80)
// plus noise, each with a random phase.
`timescale 1ns/1ps
module tb_workload_realtime;
  localparam int D = 256;
  localparam int SPACING = 400;

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

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_wave(input int n, input int period, input int amp);
    int p;
    p = n % period;
    // rises from -amp to +amp over half a period, then falls back
    return (p < period / 2) ? -amp + (4 * amp * p) / period : 3 * amp - (4 * amp * p) / period;
  endfunction

  // ---------------- paced stimulus ----------------
  int stalls = 0;
  longint cyc = 0, last_sample_cyc = 0;
  always @(posedge clk) cyc++;

  task automatic send_epoch(input bit ictal);
    int ph;
    ph = $urandom_range(0, 63);
    for (int n = 0; n < D; n++) begin
      int v;
      v = ictal ? tri_wave(n + ph, 16, 80) : tri_wave(n + ph, 64, 15);
      v += int'($urandom_range(0, 6)) - 3;
      @(negedge clk);
      sample = 8'(v);
      sample_valid = 1'b1;
      while (!sample_ready) begin stalls++; @(negedge clk); end
      @(negedge clk);
      sample_valid = 1'b0;
      last_sample_cyc = cyc;
      repeat (SPACING - 2) @(negedge clk);
    end
  endtask

  // feature and decision monitor
  int exp_cls [$];
  int n_fv = 0, n_dec = 0, lat16 = 0, max_feat_lat = 0, correct = 0;
  longint fv_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (feat_valid) begin
      n_fv++;
      fv_cyc = cyc;
      if (int'(cyc - last_sample_cyc) > max_feat_lat) max_feat_lat = int'(cyc - last_sample_cyc);
    end
    if (seizure_valid) begin
      n_dec++;
      check(cyc - fv_cyc == longint'(n_sv) * 3 + 1, $sformatf("decision latency %0d", cyc - fv_cyc));
      if (cyc - fv_cyc == 16) lat16++;
      if (exp_cls.size() > 0) begin
        int e;
        e = exp_cls.pop_front();
        check(seizure == e[0], $sformatf("epoch %0d: decision %0d expected %0d (score %0d)", n_dec, seizure, e, score));
        if (seizure == e[0]) correct++;
      end else check(0, "unexpected decision");
    end
  end

  initial begin : main
    int ntrain;
    sample = 0; sample_valid = 0; train_mode = 1; epoch_label = 0; train_start = 0; clear_points = 0;
    max_passes = 50;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // training set: 16 labelled epochs, classes interleaved at random
    ntrain = 16;
    for (int e = 0; e < ntrain; e++) begin
      bit ictal;
      ictal = (e < 2) ? e[0] : 1'($urandom_range(0, 1));
      @(negedge clk);
      epoch_label = ictal;
      send_epoch(ictal);
    end
    repeat (SPACING) @(posedge clk);
    check(n_points == 7'(ntrain), $sformatf("stored %0d training points", n_points));
    @(negedge clk);
    train_start = 1;
    @(negedge clk);
    train_start = 0;
    while (!train_done) @(negedge clk);
    $display("training: passes=%0d converged=%0d n_sv=%0d overflow=%0d b=%0d", passes, converged, n_sv, sv_overflow, int'(bias));
    check(model_ready, "model not ready after training");
    check(n_sv > 0, "no support vectors");

    // two-epoch replay, then more epochs of both kinds
    @(negedge clk);
    train_mode = 0;
    exp_cls.push_back(0); send_epoch(0);
    exp_cls.push_back(1); send_epoch(1);
    for (int e = 0; e < 8; e++) begin
      bit ictal;
      ictal = 1'($urandom_range(0, 1));
      exp_cls.push_back(int'(ictal));
      send_epoch(ictal);
    end
    repeat (SPACING) @(posedge clk);

    check(stalls == 0, $sformatf("%0d samples stalled at the paced rate", stalls));
    check(max_feat_lat < SPACING, $sformatf("feature vector %0d cycles after the last sample", max_feat_lat));
    check(n_dec == 10, $sformatf("%0d decisions for 10 epochs", n_dec));
    check(n_fv == ntrain + 10, $sformatf("%0d feature vectors", n_fv));
    if (n_sv == 5) check(lat16 == n_dec, "16-cycle latency not seen for every decision");
    $display("replay: %0d of %0d epochs correct, feature latency %0d cycles, 16-cycle decisions %0d",
             correct, n_dec, max_feat_lat, lat16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
