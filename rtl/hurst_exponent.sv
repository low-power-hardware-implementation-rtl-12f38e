// hurst_exponent: simplified Hurst-exponent feature of one EEG epoch.
//
// The classic rescaled-range estimate is H = ln(R/S)/ln(T). Following the
// source design's optimisations, the division by the standard deviation S and
// by the constant ln(T) are removed and ln() is replaced by a square root,
// leaving  hurst = isqrt(R).
// R is the range of the cumulative deviation of the samples from their mean
// absolute value (MAV):  Y_t = sum_{i<=t} (x_i - MAV),
//                        R   = | |max_t Y_t| - |min_t Y_t| |.
// Pass 1 (while samples arrive): samples are written into an epoch buffer and
// |x| is accumulated; MAV = sum|x| >> log2(D), limited to MAVW = 10 bits.
// Pass 2 (after the epoch, one sample per cycle, D cycles): the buffer is read
// back to build Y_t and its extremes. R is bounded to RW = 30 bits. The epoch
// buffer and the two-pass schedule are this design's own; widths follow the
// source design.
//
// Interface: sample/sample_valid, epoch_end with the last sample. busy is high
// during pass 2, when no sample may be presented. hurst_valid pulses
// D + RW/2 + 4 cycles after the cycle of the last sample.
module hurst_exponent #(
  parameter int unsigned XW   = 8,
  parameter int unsigned D    = 256,
  parameter int unsigned MAVW = 10,
  parameter int unsigned RW   = 30,
  parameter int unsigned HW   = RW / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] sample,
  input  logic                 sample_valid,
  input  logic                 epoch_end,
  output logic                 busy,
  output logic [HW-1:0]        hurst,
  output logic                 hurst_valid
);
  localparam int unsigned SH = $clog2(D);
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned SW = XW + SH + 1;      // |x| sum width
  localparam int unsigned YW = XW + SH + 4;      // cumulative deviation width

  typedef enum logic [2:0] {H_FILL, H_PASS2, H_RANGE, H_SQRT, H_WAIT} h_state_e;
  h_state_e state_q;

  logic signed [XW-1:0] buf_q [D];
  logic [AW-1:0]        wr_idx_q, rd_idx_q;
  logic [SW-1:0]        sumabs_q;
  logic [MAVW-1:0]      mav_q;
  logic signed [YW-1:0] y_q, ymax_q, ymin_q;
  logic [RW-1:0]        r_q;
  logic                 sq_start, sq_done, sq_busy;
  logic [RW/2-1:0]      sq_root;

  isqrt #(.IW(RW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(r_q),
    .root(sq_root), .done(sq_done), .busy(sq_busy)
  );

  assign sq_start = (state_q == H_SQRT);
  assign busy     = (state_q == H_PASS2) || (state_q == H_RANGE);

  logic [XW-1:0] absx;
  assign absx = sample[XW-1] ? XW'(-sample) : XW'(sample);

  logic [SW-1:0] sum_fin;
  assign sum_fin = sumabs_q + SW'(absx);

  function automatic logic [MAVW-1:0] mav_of(input logic [SW-1:0] s);
    logic [SW-1:0] m;
    m = s >> SH;
    return (m > SW'({MAVW{1'b1}})) ? {MAVW{1'b1}} : m[MAVW-1:0];
  endfunction

  logic signed [YW-1:0] y_next;
  assign y_next = y_q + YW'(buf_q[rd_idx_q]) - $signed(YW'(mav_q));

  logic [YW-1:0] amax, amin, rdiff;
  always_comb begin
    amax  = ymax_q[YW-1] ? YW'(-ymax_q) : YW'(ymax_q);
    amin  = ymin_q[YW-1] ? YW'(-ymin_q) : YW'(ymin_q);
    rdiff = (amax >= amin) ? amax - amin : amin - amax;
  end

  always_ff @(posedge clk) begin
    if (sample_valid && state_q != H_PASS2 && state_q != H_RANGE) buf_q[wr_idx_q] <= sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= H_FILL;
      wr_idx_q    <= '0;
      rd_idx_q    <= '0;
      sumabs_q    <= '0;
      mav_q       <= '0;
      y_q         <= '0;
      ymax_q      <= '0;
      ymin_q      <= '0;
      r_q         <= '0;
      hurst       <= '0;
      hurst_valid <= 1'b0;
    end else begin
      hurst_valid <= 1'b0;
      // pass 1 runs in every state except pass 2
      if (sample_valid && !busy) begin
        if (epoch_end) begin
          mav_q    <= mav_of(sum_fin);
          sumabs_q <= '0;
          wr_idx_q <= '0;
          rd_idx_q <= '0;
          y_q      <= '0;
          state_q  <= H_PASS2;
        end else begin
          sumabs_q <= sum_fin;
          wr_idx_q <= wr_idx_q + 1'b1;
        end
      end
      case (state_q)
        H_PASS2: begin
          y_q <= y_next;
          if (rd_idx_q == '0) begin
            ymax_q <= y_next;
            ymin_q <= y_next;
          end else begin
            if (y_next > ymax_q) ymax_q <= y_next;
            if (y_next < ymin_q) ymin_q <= y_next;
          end
          rd_idx_q <= rd_idx_q + 1'b1;
          if (rd_idx_q == AW'(D-1)) state_q <= H_RANGE;
        end
        H_RANGE: begin
          r_q     <= (rdiff > YW'({RW{1'b1}})) ? {RW{1'b1}} : RW'(rdiff);
          state_q <= H_SQRT;
        end
        H_SQRT: state_q <= H_WAIT;
        H_WAIT: if (sq_done) begin
          hurst       <= HW'(sq_root);
          hurst_valid <= 1'b1;
          state_q     <= H_FILL;
        end
        default: ;
      endcase
    end
  end
endmodule
