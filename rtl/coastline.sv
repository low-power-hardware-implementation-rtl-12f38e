// coastline: coastline (line-length) feature of one EEG epoch.
//
// CL = sum over the epoch of |x[i+1] - x[i]|. Seizures are fast repetitive
// discharges, so the epoch's total up-and-down excursion grows. One adder and
// one subtract/absolute-value stage per sample; the accumulator is bounded to
// CLW = 20 bits (saturating) as in the source design. Each epoch starts fresh:
// its first sample is not differenced against the previous epoch (own choice).
//
// Interface: sample/sample_valid once per sample, epoch_end together with the
// epoch's last sample. cl_valid pulses one cycle after that last sample, with
// cl holding the epoch's value until the next epoch ends.
module coastline #(
  parameter int unsigned XW  = 8,
  parameter int unsigned CLW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] sample,
  input  logic                 sample_valid,
  input  logic                 epoch_end,
  output logic [CLW-1:0]       cl,
  output logic                 cl_valid
);
  logic signed [XW-1:0] prev_q;
  logic                 have_prev_q;
  logic [CLW-1:0]       acc_q;

  logic [XW:0]  absdiff;
  logic [CLW:0] acc_next;
  always_comb begin
    logic signed [XW:0] diff;
    diff     = (XW+1)'(sample) - (XW+1)'(prev_q);
    absdiff  = diff[XW] ? (XW+1)'(-diff) : (XW+1)'(diff);
    acc_next = (CLW+1)'(acc_q) + (have_prev_q ? (CLW+1)'(absdiff) : '0);
    if (acc_next[CLW]) acc_next = {1'b0, {CLW{1'b1}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q      <= '0;
      have_prev_q <= 1'b0;
      acc_q       <= '0;
      cl          <= '0;
      cl_valid    <= 1'b0;
    end else begin
      cl_valid <= 1'b0;
      if (sample_valid) begin
        if (epoch_end) begin
          cl          <= acc_next[CLW-1:0];
          cl_valid    <= 1'b1;
          acc_q       <= '0;
          have_prev_q <= 1'b0;
        end else begin
          acc_q       <= acc_next[CLW-1:0];
          prev_q      <= sample;
          have_prev_q <= 1'b1;
        end
      end
    end
  end
endmodule
