// bias_calculator: new SMO threshold b after a pair update.
//
//   b1 = E_i + y_i*da_i*k_ii + y_j*da_j*k_ij + b   (forces E_i_new = 0)
//   b2 = E_j + y_i*da_i*k_ij + y_j*da_j*k_jj + b   (forces E_j_new = 0)
//   b_new = b1 if 0 < alpha_i_new < C, else b2 if 0 < alpha_j_new < C,
//           else (b1 + b2) / 2
// As in the source design two multipliers serve both equations: the first
// multiplies da_i by k_ii (for b1) or k_ij (for b2) into register A, the
// second da_j by k_ij or k_jj into register B, both in the same cycle; the
// label products are sign flips (XOR in sign-magnitude). b1 is kept in its
// own register when both b1 and b2 are needed. b1 has priority when both
// conditions hold. Timing: 2 cycles per equation plus one: done comes 3, 3 or
// 6 cycles after start (b1 only, b2 only, average).
//
// Interface: pulse start with all inputs valid; hold them until done. done
// pulses once with b_new valid (held).
module bias_calculator
  import svm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t e_i,
  input  word_t e_j,
  input  word_t d_alpha_i,
  input  word_t d_alpha_j,
  input  logic  y_i,
  input  logic  y_j,
  input  word_t kii,
  input  word_t kij,
  input  word_t kjj,
  input  logic  in_i,      // 0 < alpha_i_new < C
  input  logic  in_j,      // 0 < alpha_j_new < C
  input  word_t b_old,
  output word_t b_new,
  output logic  done
);
  typedef enum logic [2:0] {B_IDLE, B1_MUL, B1_ADD, B2_MUL, B2_ADD, B_AVG} b_state_e;

  b_state_e state_q;
  logic     both_q;          // average of b1 and b2 required
  word_t    a_q, bb_q, b1_q;
  word_t    m1_k, m2_k, m1_p, m2_p;

  // operand selection for the two multipliers
  assign m1_k = (state_q == B1_MUL) ? kii : kij;
  assign m2_k = (state_q == B1_MUL) ? kij : kjj;

  truncated_multiplier #(.W(W), .F(F)) u_m1 (.a(d_alpha_i), .b(m1_k), .p(m1_p));
  truncated_multiplier #(.W(W), .F(F)) u_m2 (.a(d_alpha_j), .b(m2_k), .p(m2_p));

  word_t sum_e;
  assign sum_e = add_sat(add_sat(add_sat((state_q == B1_ADD) ? e_i : e_j, a_q), bb_q), b_old);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= B_IDLE;
      both_q  <= 1'b0;
      a_q     <= '0;
      bb_q    <= '0;
      b1_q    <= '0;
      b_new   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        B_IDLE: if (start) begin
          both_q  <= !in_i && !in_j;
          state_q <= (in_i || !in_j) ? B1_MUL : B2_MUL;
        end
        B1_MUL, B2_MUL: begin
          a_q     <= mul_y(m1_p, y_i);
          bb_q    <= mul_y(m2_p, y_j);
          state_q <= (state_q == B1_MUL) ? B1_ADD : B2_ADD;
        end
        B1_ADD: begin
          b1_q <= sum_e;
          if (both_q) state_q <= B2_MUL;
          else begin
            b_new   <= sum_e;
            done    <= 1'b1;
            state_q <= B_IDLE;
          end
        end
        B2_ADD: begin
          if (both_q) begin
            b1_q    <= sum_e;            // hold b2 while averaging
            bb_q    <= b1_q;
            state_q <= B_AVG;
          end else begin
            b_new   <= sum_e;
            done    <= 1'b1;
            state_q <= B_IDLE;
          end
        end
        B_AVG: begin
          b_new   <= word_t'(($signed({b1_q[W-1], b1_q}) + $signed({bb_q[W-1], bb_q})) >>> 1);
          done    <= 1'b1;
          state_q <= B_IDLE;
        end
        default: state_q <= B_IDLE;
      endcase
    end
  end
endmodule
