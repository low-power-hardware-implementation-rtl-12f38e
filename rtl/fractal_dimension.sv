// fractal_dimension: hardware-friendly Higuchi fractal dimension (k = 5).
//
// Higuchi's curve length L_m(k) sums |x(m+ik) - x(m+(i-1)k)| over the epoch for
// each start offset m = 1..k. Here a K-deep delay line supplies x(n-K); each
// new sample adds |x(n) - x(n-K)| to accumulator (n mod K), i.e. the five
// accumulators are fed in turn by sample index, as in the source design. At
// the end of the epoch the division by D-m is done by a right shift of
// log2(D) and each L_m is limited to LW = 8 bits (both from the source
// design). The constant divisions by N-1 and by ln(1/k) are dropped and each
// ln() is replaced by a square root (source design's optimisation), so
//     fd = sum_{m} isqrt(L_m).
// The five square roots share one sequential isqrt unit; fd_valid comes
// K*(LW/2 + 1) + 1 cycles after the last sample. The L_m values are latched, so
// the next epoch may start immediately.
//
// Interface: sample/sample_valid, epoch_end with the last sample of an epoch.
module fractal_dimension #(
  parameter int unsigned XW = 8,
  parameter int unsigned K  = 5,
  parameter int unsigned D  = 256,     // epoch length (power of two)
  parameter int unsigned LW = 8,       // width of each L_m
  parameter int unsigned FW = 8        // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] sample,
  input  logic                 sample_valid,
  input  logic                 epoch_end,
  output logic [FW-1:0]        fd,
  output logic                 fd_valid
);
  localparam int unsigned SH  = $clog2(D);
  localparam int unsigned AW  = XW + 1 + SH;      // accumulator width
  localparam int unsigned KW  = $clog2(K);
  localparam int unsigned CW  = $clog2(D + 1);

  logic signed [XW-1:0] dline_q [K];
  logic [AW-1:0]        acc_q   [K];
  logic [LW-1:0]        lm_q    [K];
  logic [KW-1:0]        phase_q;
  logic [CW-1:0]        nseen_q;                   // samples seen, saturates at K

  // Square-root sequencing.
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} sq_state_e;
  sq_state_e      sq_state_q;
  logic [KW-1:0]  sq_idx_q;
  logic [FW-1:0]  sum_q;
  logic           sq_start, sq_done, sq_busy;
  logic [LW/2-1:0] sq_root;

  isqrt #(.IW(LW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(lm_q[sq_idx_q]),
    .root(sq_root), .done(sq_done), .busy(sq_busy)
  );

  logic [XW:0] absdiff;
  always_comb begin
    logic signed [XW:0] diff;
    diff    = (XW+1)'(sample) - (XW+1)'(dline_q[K-1]);
    absdiff = diff[XW] ? (XW+1)'(-diff) : (XW+1)'(diff);
  end

  // L_m = acc >> log2(D), saturated to LW bits.
  function automatic logic [LW-1:0] scale_l(input logic [AW-1:0] a);
    logic [AW-1:0] s;
    s = a >> SH;
    return (s > AW'({LW{1'b1}})) ? {LW{1'b1}} : s[LW-1:0];
  endfunction

  assign sq_start = (sq_state_q == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        dline_q[i] <= '0;
        acc_q[i]   <= '0;
        lm_q[i]    <= '0;
      end
      phase_q    <= '0;
      nseen_q    <= '0;
      sq_state_q <= S_IDLE;
      sq_idx_q   <= '0;
      sum_q      <= '0;
      fd         <= '0;
      fd_valid   <= 1'b0;
    end else begin
      fd_valid <= 1'b0;
      if (sample_valid) begin
        // delay line: dline_q[K-1] is x(n-K) when sample is x(n)
        dline_q[0] <= sample;
        for (int i = 1; i < K; i++) dline_q[i] <= dline_q[i-1];
        if (epoch_end) begin
          for (int i = 0; i < K; i++) begin
            logic [AW-1:0] fin;
            fin = acc_q[i];
            if (KW'(i) == phase_q && nseen_q >= CW'(K)) fin = acc_q[i] + AW'(absdiff);
            lm_q[i]  <= scale_l(fin);
            acc_q[i] <= '0;
          end
          phase_q    <= '0;
          nseen_q    <= '0;
          sq_state_q <= S_START;
          sq_idx_q   <= '0;
          sum_q      <= '0;
        end else begin
          if (nseen_q >= CW'(K)) acc_q[phase_q] <= acc_q[phase_q] + AW'(absdiff);
          else                   nseen_q <= nseen_q + 1'b1;
          phase_q <= (phase_q == KW'(K-1)) ? '0 : phase_q + 1'b1;
        end
      end
      // square roots of the latched L_m, one after another
      case (sq_state_q)
        S_START: sq_state_q <= S_WAIT;
        S_WAIT: if (sq_done) begin
          if (sq_idx_q == KW'(K-1)) begin
            fd         <= sum_q + FW'(sq_root);
            fd_valid   <= 1'b1;
            sq_state_q <= S_IDLE;
          end else begin
            sum_q      <= sum_q + FW'(sq_root);
            sq_idx_q   <= sq_idx_q + 1'b1;
            sq_state_q <= S_START;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
