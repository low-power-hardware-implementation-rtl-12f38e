// learned_function: SVM output and training error for one training point t.
//
//   E_t = sum_k alpha_k * y_k * K(x_k, x_t) - b - y_t     (linear kernel)
//
// The FSM follows the source design: read alpha_k; if it is zero the point is
// skipped (computation skipping: most alphas are zero); otherwise compute the
// kernel K(x_k, x_t) feature by feature, read y_k and update the running sum.
// A single truncated multiplier and adder are shared by the kernel products
// and by the alpha_k * K product, since the two steps are sequential.
// Multiplying by y_k is a sign flip. Every memory access goes through the
// memory interface (request held until grant, data one cycle later).
// Run time: about 4 cycles per zero alpha and 2N + 6 per non-zero alpha.
//
// Interface: pulse start with idx_t, y_t, b and n_points (points 0..n-1 are
// summed); done pulses once with err valid (held).
module learned_function
  import svm_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned IDXW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IDXW-1:0] idx_t,
  input  logic            y_t,
  input  word_t           b,
  input  logic [IDXW:0]   n_points,
  output mem_req_t        mreq,
  input  mem_rsp_t        mrsp,
  output word_t           err,
  output logic            done
);
  localparam int unsigned DW = $clog2(N + 1);

  typedef enum logic [2:0] {
    LF_IDLE, LF_RD_ALPHA, LF_WT_ALPHA, LF_RD_X, LF_WT_X, LF_RD_Y, LF_WT_Y, LF_FINISH
  } lf_state_e;

  lf_state_e       state_q;
  logic [IDXW:0]   k_q;
  logic [IDXW-1:0] t_q;
  logic            yt_q;
  logic [DW-1:0]   d_q;
  logic [IDXW:0]   n_q;
  word_t           b_q, alpha_q, kacc_q, f_q;
  word_t           mul_a, mul_b, mul_p;

  truncated_multiplier #(.W(W), .F(F)) u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  // shared multiplier: kernel products while reading X, alpha*K at the end
  always_comb begin
    if (state_q == LF_WT_X) begin
      mul_a = mrsp.rdata;
      mul_b = mrsp.rdata2;
    end else begin
      mul_a = alpha_q;
      mul_b = kacc_q;
    end
  end

  always_comb begin
    mreq = MEM_REQ_IDLE;
    unique case (state_q)
      LF_RD_ALPHA: begin mreq.req = 1'b1; mreq.bank = BANK_A; mreq.addr = MAXIDX'(k_q); end
      LF_RD_X: begin
        mreq.req   = 1'b1;
        mreq.bank  = BANK_X;
        mreq.addr  = MAXIDX'(k_q) * MAXIDX'(N) + MAXIDX'(d_q);
        mreq.addr2 = MAXIDX'(t_q) * MAXIDX'(N) + MAXIDX'(d_q);
      end
      LF_RD_Y: begin mreq.req = 1'b1; mreq.bank = BANK_Y; mreq.addr = MAXIDX'(k_q); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= LF_IDLE;
      k_q     <= '0;
      t_q     <= '0;
      yt_q    <= 1'b0;
      d_q     <= '0;
      n_q     <= '0;
      b_q     <= '0;
      alpha_q <= '0;
      kacc_q  <= '0;
      f_q     <= '0;
      err     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        LF_IDLE: if (start) begin
          t_q     <= idx_t;
          yt_q    <= y_t;
          b_q     <= b;
          n_q     <= n_points;
          k_q     <= '0;
          f_q     <= '0;
          state_q <= (n_points == '0) ? LF_FINISH : LF_RD_ALPHA;
        end
        LF_RD_ALPHA: if (mrsp.gnt) state_q <= LF_WT_ALPHA;
        LF_WT_ALPHA: if (mrsp.rvalid) begin
          alpha_q <= mrsp.rdata;
          if (mrsp.rdata == '0) begin                       // skip
            k_q     <= k_q + 1'b1;
            state_q <= (k_q + 1'b1 == n_q) ? LF_FINISH : LF_RD_ALPHA;
          end else begin
            d_q     <= '0;
            kacc_q  <= '0;
            state_q <= LF_RD_X;
          end
        end
        LF_RD_X: if (mrsp.gnt) state_q <= LF_WT_X;
        LF_WT_X: if (mrsp.rvalid) begin
          kacc_q  <= add_sat(kacc_q, mul_p);
          d_q     <= d_q + 1'b1;
          state_q <= (d_q == DW'(N - 1)) ? LF_RD_Y : LF_RD_X;
        end
        LF_RD_Y: if (mrsp.gnt) state_q <= LF_WT_Y;
        LF_WT_Y: if (mrsp.rvalid) begin
          f_q     <= add_sat(f_q, mul_y(mul_p, mrsp.rdata[0]));
          k_q     <= k_q + 1'b1;
          state_q <= (k_q + 1'b1 == n_q) ? LF_FINISH : LF_RD_ALPHA;
        end
        LF_FINISH: begin
          // E = f - b - y, with y = +/-1.0
          err     <= sub_sat(sub_sat(f_q, b_q), yt_q ? -ONE : ONE);
          done    <= 1'b1;
          state_q <= LF_IDLE;
        end
        default: state_q <= LF_IDLE;
      endcase
    end
  end
endmodule
