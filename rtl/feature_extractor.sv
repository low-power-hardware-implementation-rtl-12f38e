// feature_extractor: the three per-epoch EEG features used by the detector.
//
// Samples (8-bit signed integers: the source design found fraction bits of no
// use) stream in; every D samples close an epoch. Three units work on the same
// stream in parallel: fractal_dimension (Higuchi, k = 5), hurst_exponent
// (range of cumulative deviation, square-rooted) and coastline (sum of
// absolute first differences). When all three have produced their value for
// an epoch, feat_valid pulses for one cycle with the whole vector.
//
// Interface: epoch_last marks the cycle in which an epoch's last sample is
// accepted. sample_ready is low while the Hurst unit re-reads its epoch
// buffer (D cycles after each epoch); at the EEG rate (256 samples/s) against
// a MHz clock this never delays real data. The ready/valid back-pressure is
// this design's own. Latency: feat_valid follows the last sample of an epoch
// by about D + 20 cycles, set by the Hurst unit.
module feature_extractor #(
  parameter int unsigned XW   = 8,
  parameter int unsigned D    = 256,
  parameter int unsigned FDW  = 8,
  parameter int unsigned RW   = 30,
  parameter int unsigned HW   = RW / 2,
  parameter int unsigned CLW  = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] sample,
  input  logic                 sample_valid,
  output logic                 sample_ready,
  output logic [FDW-1:0]       fd,
  output logic [HW-1:0]        hurst,
  output logic [CLW-1:0]       cl,
  output logic                 feat_valid,
  output logic                 epoch_last      // the epoch's last sample is taken now
);
  localparam int unsigned CW = $clog2(D);

  logic [CW-1:0] cnt_q;
  logic          h_busy, acc, epoch_end;
  logic          fd_v, h_v, cl_v;
  logic          got_fd_q, got_h_q, got_cl_q;

  assign sample_ready = !h_busy;
  assign acc          = sample_valid && sample_ready;
  assign epoch_end    = (cnt_q == CW'(D-1));
  assign epoch_last   = acc && epoch_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (acc) cnt_q <= cnt_q + 1'b1;   // wraps after D samples
  end

  fractal_dimension #(.XW(XW), .K(5), .D(D), .LW(8), .FW(FDW)) u_fd (
    .clk, .rst_n, .sample, .sample_valid(acc), .epoch_end, .fd, .fd_valid(fd_v)
  );

  hurst_exponent #(.XW(XW), .D(D), .MAVW(10), .RW(RW), .HW(HW)) u_hurst (
    .clk, .rst_n, .sample, .sample_valid(acc), .epoch_end, .busy(h_busy),
    .hurst, .hurst_valid(h_v)
  );

  coastline #(.XW(XW), .CLW(CLW)) u_cl (
    .clk, .rst_n, .sample, .sample_valid(acc), .epoch_end, .cl, .cl_valid(cl_v)
  );

  // Join the three results of an epoch.
  logic all_in;
  assign all_in = (got_fd_q || fd_v) && (got_h_q || h_v) && (got_cl_q || cl_v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_fd_q   <= 1'b0;
      got_h_q    <= 1'b0;
      got_cl_q   <= 1'b0;
      feat_valid <= 1'b0;
    end else begin
      feat_valid <= all_in;
      if (all_in) begin
        got_fd_q <= 1'b0;
        got_h_q  <= 1'b0;
        got_cl_q <= 1'b0;
      end else begin
        if (fd_v) got_fd_q <= 1'b1;
        if (h_v)  got_h_q  <= 1'b1;
        if (cl_v) got_cl_q <= 1'b1;
      end
    end
  end
endmodule
