// smo_processing_unit: one SMO step on a selected pair of Lagrange multipliers.
//
// Given the indices (i, j) chosen by the SMO controller, the unit
//   1. caches alpha_i, alpha_j, y_i, y_j in the register file,
//   2. runs the kernel unit (k_ii, k_jj, k_ij),
//   3. runs the learned-function unit twice for the errors E_i and E_j,
//   4. forms the box limits L, H and eta = 2k_ij - k_ii - k_jj; a pair with
//      eta >= 0 or L >= H is left unchanged,
//   5. alpha_j_new = clip(alpha_j - y_j (E_i - E_j) / eta, L, H),
//   6. alpha_i_new = alpha_i + y_i y_j (alpha_j - alpha_j_new), clipped to
//      [0, C]; if |alpha_j_new - alpha_j| <= EPS the pair is left unchanged,
//   7. runs the bias calculator for the new threshold b,
//   8. writes both new alphas back to the alpha bank.
// The sequencing FSM is the processing controller: it triggers each sub-unit
// and moves data between them. Steps 1-8 follow the SMO algorithm of the
// source design; step order inside the FSM, the unchanged-pair rules and the
// sequential divider are this design's choices. The new-alpha formula is
// Platt's (alpha_j - y_j(E_i - E_j)/eta with eta < 0).
//
// Memory clients: mreq[0] controller loads/writes, mreq[1] kernel unit,
// mreq[2] learned function. Interface: pulse start with idx_i/idx_j; done
// pulses once, with changed = 1 if the alphas were updated. clear resets b.
// A step takes roughly 2*(M*4 + SV*(2N+6)) + 60 cycles for M points.
module smo_processing_unit
  import svm_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned IDXW = 6,
  parameter int unsigned EPS  = 0        // smallest alpha change that counts
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            start,
  input  logic [IDXW-1:0] idx_i,
  input  logic [IDXW-1:0] idx_j,
  input  logic [IDXW:0]   n_points,
  input  word_t           c,
  output mem_req_t        mreq [3],
  input  mem_rsp_t        mrsp [3],
  output logic            done,
  output logic            changed,
  output word_t           b,
  output logic            skipped_eta      // pulse: pair rejected by eta/limits
);
  typedef enum logic [3:0] {
    P_IDLE, P_RD_REQ, P_RD_WAIT, P_KERNEL, P_ERR_I, P_ERR_J, P_CHECK,
    P_DIV, P_ALPHA_I, P_BIAS, P_WB_I, P_WB_J, P_DONE
  } pu_state_e;

  pu_state_e       state_q;
  logic [1:0]      rd_step_q;      // 0: alpha_i, 1: alpha_j, 2: y_i, 3: y_j
  logic [IDXW-1:0] i_q, j_q;
  logic            changed_q, sub_start_q;

  rf_t    rf, rf_wd;
  rf_we_t rf_we;

  smo_register_file u_rf (.clk, .rst_n, .clear, .we(rf_we), .wdata(rf_wd), .q(rf));
  assign b = rf.b;

  // ---------------- sub-units ----------------
  word_t kii, kjj, kij, lf_err, lo, hi, quo, b_new;
  logic  k_done, lf_done, div_done, div_busy, b_done;
  logic  lf_target_j;

  kernel_function #(.N(N), .IDXW(IDXW)) u_kernel (
    .clk, .rst_n, .start(sub_start_q && state_q == P_KERNEL), .idx_i(i_q), .idx_j(j_q),
    .mreq(mreq[1]), .mrsp(mrsp[1]), .kii, .kjj, .kij, .done(k_done)
  );

  assign lf_target_j = (state_q == P_ERR_J);
  learned_function #(.N(N), .IDXW(IDXW)) u_lf (
    .clk, .rst_n, .start(sub_start_q && (state_q == P_ERR_I || state_q == P_ERR_J)),
    .idx_t(lf_target_j ? j_q : i_q), .y_t(lf_target_j ? rf.y_j : rf.y_i), .b(rf.b),
    .n_points, .mreq(mreq[2]), .mrsp(mrsp[2]), .err(lf_err), .done(lf_done)
  );

  limits_calculator u_lim (
    .alpha_i(rf.alpha_i), .alpha_j(rf.alpha_j), .y_i(rf.y_i), .y_j(rf.y_j), .c, .lo, .hi
  );

  word_t eta;
  assign eta = sub_sat(sub_sat(add_sat(kij, kij), kii), kjj);

  fx_divider #(.W(W), .F(F)) u_div (
    .clk, .rst_n, .start(sub_start_q && state_q == P_DIV),
    .num(sub_sat(rf.e_i, rf.e_j)), .den(eta), .quo, .done(div_done), .busy(div_busy)
  );

  logic in_i, in_j;
  assign in_i = (rf.alpha_i_new > 0) && (rf.alpha_i_new < c);
  assign in_j = (rf.alpha_j_new > 0) && (rf.alpha_j_new < c);

  bias_calculator u_bias (
    .clk, .rst_n, .start(sub_start_q && state_q == P_BIAS),
    .e_i(rf.e_i), .e_j(rf.e_j),
    .d_alpha_i(sub_sat(rf.alpha_i_new, rf.alpha_i)), .d_alpha_j(sub_sat(rf.alpha_j_new, rf.alpha_j)),
    .y_i(rf.y_i), .y_j(rf.y_j), .kii, .kij, .kjj, .in_i, .in_j, .b_old(rf.b),
    .b_new, .done(b_done)
  );

  // ---------------- datapath of steps 5 and 6 ----------------
  word_t aj_new, aj_clip, ai_new, ai_clip, daj;
  always_comb begin
    aj_new  = sub_sat(rf.alpha_j, mul_y(quo, rf.y_j));
    aj_clip = (aj_new > hi) ? hi : (aj_new < lo) ? lo : aj_new;
    ai_new  = add_sat(rf.alpha_i, mul_y(sub_sat(rf.alpha_j, rf.alpha_j_new), rf.y_i ^ rf.y_j));
    ai_clip = (ai_new < 0) ? '0 : (ai_new > c) ? c : ai_new;
    daj     = sub_sat(rf.alpha_j_new, rf.alpha_j);
    if (daj < 0) daj = sub_sat('0, daj);
  end

  // ---------------- controller memory port ----------------
  always_comb begin
    mreq[0] = MEM_REQ_IDLE;
    unique case (state_q)
      P_RD_REQ: begin
        mreq[0].req  = 1'b1;
        mreq[0].bank = rd_step_q[1] ? BANK_Y : BANK_A;
        mreq[0].addr = MAXIDX'(rd_step_q[0] ? j_q : i_q);
      end
      P_WB_I: begin
        mreq[0].req   = 1'b1;
        mreq[0].we    = 1'b1;
        mreq[0].bank  = BANK_A;
        mreq[0].addr  = MAXIDX'(i_q);
        mreq[0].wdata = rf.alpha_i_new;
      end
      P_WB_J: begin
        mreq[0].req   = 1'b1;
        mreq[0].we    = 1'b1;
        mreq[0].bank  = BANK_A;
        mreq[0].addr  = MAXIDX'(j_q);
        mreq[0].wdata = rf.alpha_j_new;
      end
      default: ;
    endcase
  end

  // ---------------- register-file writes ----------------
  always_comb begin
    rf_we = '0;
    rf_wd = rf;
    unique case (state_q)
      P_RD_WAIT: if (mrsp[0].rvalid) begin
        unique case (rd_step_q)
          2'd0: begin rf_we.alpha_i = 1'b1; rf_wd.alpha_i = mrsp[0].rdata; end
          2'd1: begin rf_we.alpha_j = 1'b1; rf_wd.alpha_j = mrsp[0].rdata; end
          2'd2: begin rf_we.y_i = 1'b1;     rf_wd.y_i = mrsp[0].rdata[0]; end
          default: begin rf_we.y_j = 1'b1;  rf_wd.y_j = mrsp[0].rdata[0]; end
        endcase
      end
      P_ERR_I: if (lf_done) begin rf_we.e_i = 1'b1; rf_wd.e_i = lf_err; end
      P_ERR_J: if (lf_done) begin rf_we.e_j = 1'b1; rf_wd.e_j = lf_err; end
      P_DIV: if (div_done) begin rf_we.alpha_j_new = 1'b1; rf_wd.alpha_j_new = aj_clip; end
      P_ALPHA_I: begin rf_we.alpha_i_new = 1'b1; rf_wd.alpha_i_new = ai_clip; end
      P_BIAS: if (b_done) begin rf_we.b = 1'b1; rf_wd.b = b_new; end
      default: ;
    endcase
  end

  // ---------------- processing controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= P_IDLE;
      rd_step_q   <= '0;
      i_q         <= '0;
      j_q         <= '0;
      changed_q   <= 1'b0;
      sub_start_q <= 1'b0;
      done        <= 1'b0;
      changed     <= 1'b0;
      skipped_eta <= 1'b0;
    end else begin
      done        <= 1'b0;
      skipped_eta <= 1'b0;
      sub_start_q <= 1'b0;
      unique case (state_q)
        P_IDLE: if (start) begin
          i_q       <= idx_i;
          j_q       <= idx_j;
          rd_step_q <= '0;
          changed_q <= 1'b0;
          state_q   <= P_RD_REQ;
        end
        P_RD_REQ: if (mrsp[0].gnt) state_q <= P_RD_WAIT;
        P_RD_WAIT: if (mrsp[0].rvalid) begin
          rd_step_q <= rd_step_q + 1'b1;
          if (rd_step_q == 2'd3) begin
            state_q     <= P_KERNEL;
            sub_start_q <= 1'b1;
          end else state_q <= P_RD_REQ;
        end
        P_KERNEL: if (k_done) begin state_q <= P_ERR_I; sub_start_q <= 1'b1; end
        P_ERR_I:  if (lf_done) begin state_q <= P_ERR_J; sub_start_q <= 1'b1; end
        P_ERR_J:  if (lf_done) state_q <= P_CHECK;
        P_CHECK: begin
          if (eta >= 0 || lo >= hi) begin
            skipped_eta <= 1'b1;
            state_q     <= P_DONE;
          end else begin
            state_q     <= P_DIV;
            sub_start_q <= 1'b1;
          end
        end
        P_DIV: if (div_done) state_q <= P_ALPHA_I;
        P_ALPHA_I: begin
          if (daj <= word_t'(EPS)) state_q <= P_DONE;
          else begin
            changed_q   <= 1'b1;
            state_q     <= P_BIAS;
            sub_start_q <= 1'b1;
          end
        end
        P_BIAS: if (b_done) state_q <= P_WB_I;
        P_WB_I: if (mrsp[0].gnt) state_q <= P_WB_J;
        P_WB_J: if (mrsp[0].gnt) state_q <= P_DONE;
        P_DONE: begin
          done    <= 1'b1;
          changed <= changed_q;
          state_q <= P_IDLE;
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end
endmodule
