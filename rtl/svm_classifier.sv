// svm_classifier: low-power linear SVM classifier (seizure / no seizure).
//
//   f(x) = sum_i alpha_i * y_i * (x . sv_i) - b,   class = (f >= 0)
// summed over the support vectors only (alpha = 0 points are never stored:
// computation skipping). Following the source design the model sits in three
// tables (support vectors, NSV*N words; alphas; one-bit labels) whose
// addresses come from a small FSM. For each support vector the classifier
// block forms alpha*y with a sign flip (XOR in sign-magnitude), and
// accumulates x_test . sv_i one feature per cycle (one word per table read);
// the inner-product block (one multiplier, one adder) then adds
// alpha*y * (x_test . sv_i) to the result. The last feature's product is
// added on the fly so the per-vector dot product costs exactly N cycles.
//
// Timing: start is taken in cycle 0 and the first table address is issued in
// that same cycle; valid_out rises nsv*N + 1 cycles later. With the default
// NSV = 5 support vectors and N = 3 features this is 16 cycles, the latency
// the source design reports; NSV itself is this design's choice.
// Interface: x_test is sampled with start (ignored while busy). The model is
// loaded through the ld_* ports (support-vector word k*N + d, alpha and label
// of vector k, bias b, count nsv); nsv = 0 gives f = -b.
module svm_classifier
  import svm_pkg::*;
#(
  parameter int unsigned N   = 3,
  parameter int unsigned NSV = 5,
  parameter int unsigned SVA = $clog2(NSV * N),
  parameter int unsigned AA  = (NSV > 1) ? $clog2(NSV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  word_t          x_test [N],
  input  logic           start,
  output logic           busy,
  output logic           class_out,
  output logic           valid_out,
  output word_t          score,
  // model loading
  input  logic           ld_sv_we,
  input  logic [SVA-1:0] ld_sv_addr,
  input  word_t          ld_sv_data,
  input  logic           ld_ay_we,
  input  logic [AA-1:0]  ld_ay_addr,
  input  word_t          ld_alpha,
  input  logic           ld_y,
  input  logic           ld_b_we,
  input  word_t          ld_b,
  input  logic [AA:0]    ld_nsv
);
  localparam int unsigned DW = $clog2(N + 1);

  word_t         xq [N];
  word_t         b_q;
  logic [AA:0]   nsv_q;
  logic          run_q;
  logic [AA:0]   sv_q;            // issue stage: vector index
  logic [DW-1:0] d_q;             // issue stage: feature index
  logic [SVA-1:0] sv_addr_q;
  // read stage (one cycle behind the issue stage)
  logic          v1_q, first1_q, last1_q, final1_q;
  logic [DW-1:0] d1_q;
  word_t         dacc_q, ay_q;

  logic  issue, take, ld_nsv_ok;
  assign ld_nsv_ok = (nsv_q != '0);
  assign take      = start && !run_q;
  assign issue     = (take && ld_nsv_ok) || run_q;
  assign busy      = run_q || v1_q;

  // ---- model tables ----
  word_t sv_rdata, alpha_rdata;
  logic  y_rdata;

  classifier_rom #(.DW(W), .DEPTH(NSV * N), .AW(SVA)) u_sv_rom (
    .clk, .raddr(sv_addr_q), .rdata(sv_rdata),
    .we(ld_sv_we), .waddr(ld_sv_addr), .wdata(ld_sv_data)
  );
  classifier_rom #(.DW(W), .DEPTH(NSV), .AW(AA)) u_alpha_rom (
    .clk, .raddr(AA'(sv_q)), .rdata(alpha_rdata),
    .we(ld_ay_we), .waddr(ld_ay_addr), .wdata(ld_alpha)
  );
  classifier_rom #(.DW(1), .DEPTH(NSV), .AW(AA)) u_y_rom (
    .clk, .raddr(AA'(sv_q)), .rdata(y_rdata),
    .we(ld_ay_we), .waddr(ld_ay_addr), .wdata(ld_y)
  );

  // ---- classifier block ----
  word_t ay_now, ay_use, prod, dsum;
  assign ay_now = mul_y(alpha_rdata, y_rdata);
  assign ay_use = first1_q ? ay_now : ay_q;

  truncated_multiplier #(.W(W), .F(F)) u_dot_mul (.a(xq[d1_q]), .b(sv_rdata), .p(prod));
  assign dsum = add_sat(first1_q ? '0 : dacc_q, prod);

  // ---- inner-product block ----
  word_t acc;
  inner_product u_ip (
    .clk, .rst_n, .clr(take), .init(sub_sat('0, b_q)),
    .en(v1_q && last1_q), .a(ay_use), .b(dsum), .acc
  );

  assign score     = acc;
  assign class_out = !acc[W-1];

  // ---- address-generating FSM ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N; d++) xq[d] <= '0;
      b_q       <= '0;
      nsv_q     <= '0;
      run_q     <= 1'b0;
      sv_q      <= '0;
      d_q       <= '0;
      sv_addr_q <= '0;
      v1_q      <= 1'b0;
      first1_q  <= 1'b0;
      last1_q   <= 1'b0;
      final1_q  <= 1'b0;
      d1_q      <= '0;
      dacc_q    <= '0;
      ay_q      <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (ld_b_we) begin
        b_q   <= ld_b;
        nsv_q <= ld_nsv;
      end
      if (take) begin
        for (int d = 0; d < N; d++) xq[d] <= x_test[d];
        if (!ld_nsv_ok) valid_out <= 1'b1;     // empty model: f = -b
      end
      // issue stage
      v1_q <= issue;
      if (issue) begin
        first1_q <= (d_q == '0);
        last1_q  <= (d_q == DW'(N - 1));
        final1_q <= (d_q == DW'(N - 1)) && (sv_q == nsv_q - 1'b1);
        d1_q     <= d_q;
        if (d_q == DW'(N - 1)) begin
          d_q  <= '0;
          sv_q <= sv_q + 1'b1;
          run_q <= (sv_q != nsv_q - 1'b1);
          if (sv_q == nsv_q - 1'b1) sv_q <= '0;
        end else begin
          d_q   <= d_q + 1'b1;
          run_q <= 1'b1;
        end
        sv_addr_q <= (d_q == DW'(N - 1) && sv_q == nsv_q - 1'b1) ? '0 : sv_addr_q + 1'b1;
      end
      // read stage
      if (v1_q) begin
        dacc_q <= dsum;
        if (first1_q) ay_q <= ay_now;
        if (final1_q) valid_out <= 1'b1;
      end
    end
  end
endmodule
