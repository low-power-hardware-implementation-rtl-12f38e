// smo_controller: chooses the pairs of Lagrange multipliers for SMO training.
//
// The source design keeps the pair-selection heuristic outside the processing
// unit so any heuristic can be used, and iterates until convergence or an
// iteration limit. This controller uses a simple sweep: in pass p every point
// i = 0..n-1 is paired with j = (i + s) mod n, where the stride s runs through
// 1..n-1 from pass to pass so that every pair is eventually visited. A pass
// in which the processing unit changes no alpha means convergence; otherwise
// training stops after max_passes passes (a run-time setting sampled at
// start; 0 acts as 1). The heuristic and the pass limit are this design's
// choices.
//
// Interface: pulse start with n_points and max_passes valid. With fewer than
// two points nothing is trained and done follows two cycles later with
// converged set. clear_b pulses after start to zero the threshold. Each pair
// is handed over with a pu_start pulse and must be answered by pu_done. done
// pulses at the end; converged and passes hold until the next start.
module smo_controller #(
  parameter int unsigned IDXW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IDXW:0]   n_points,
  input  logic [15:0]     max_passes,
  output logic            clear_b,
  output logic            pu_start,
  output logic [IDXW-1:0] pu_i,
  output logic [IDXW-1:0] pu_j,
  input  logic            pu_done,
  input  logic            pu_changed,
  output logic            busy,
  output logic            done,
  output logic            converged,
  output logic [15:0]     passes
);
  typedef enum logic [2:0] {C_IDLE, C_ISSUE, C_WAIT, C_ENDPASS, C_EMPTY} c_state_e;

  c_state_e      state_q;
  logic [IDXW:0] n_q, i_q, s_q;
  logic [15:0]   nchg_q, max_q;

  // j = (i + s) mod n, with i, s < n
  logic [IDXW+1:0] jsum;
  assign jsum = {1'b0, i_q} + {1'b0, s_q};
  assign pu_i = i_q[IDXW-1:0];
  assign pu_j = (jsum >= {1'b0, n_q}) ? IDXW'(jsum - {1'b0, n_q}) : IDXW'(jsum);
  assign busy = (state_q != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= C_IDLE;
      n_q       <= '0;
      i_q       <= '0;
      s_q       <= '0;
      nchg_q    <= '0;
      max_q     <= '0;
      clear_b   <= 1'b0;
      pu_start  <= 1'b0;
      done      <= 1'b0;
      converged <= 1'b0;
      passes    <= '0;
    end else begin
      clear_b  <= 1'b0;
      pu_start <= 1'b0;
      done     <= 1'b0;
      unique case (state_q)
        C_IDLE: if (start) begin
          n_q       <= n_points;
          max_q     <= max_passes;
          i_q       <= '0;
          s_q       <= (IDXW+1)'(1);
          nchg_q    <= '0;
          passes    <= '0;
          converged <= 1'b0;
          clear_b   <= 1'b1;
          // fewer than two points: nothing to train; finish one cycle
          // later so the cleared threshold is visible with done
          state_q   <= (n_points < (IDXW+1)'(2)) ? C_EMPTY : C_ISSUE;
        end
        C_ISSUE: begin
          pu_start <= 1'b1;
          state_q  <= C_WAIT;
        end
        C_WAIT: if (pu_done) begin
          if (pu_changed) nchg_q <= nchg_q + 1'b1;
          if (i_q == n_q - 1'b1) state_q <= C_ENDPASS;
          else begin
            i_q     <= i_q + 1'b1;
            state_q <= C_ISSUE;
          end
        end
        C_ENDPASS: begin
          passes <= passes + 1'b1;
          if (nchg_q == '0 || passes + 1'b1 >= max_q) begin
            converged <= (nchg_q == '0);
            done      <= 1'b1;
            state_q   <= C_IDLE;
          end else begin
            i_q     <= '0;
            nchg_q  <= '0;
            s_q     <= (s_q == n_q - 1'b1) ? (IDXW+1)'(1) : s_q + 1'b1;
            state_q <= C_ISSUE;
          end
        end
        C_EMPTY: begin
          converged <= 1'b1;
          done      <= 1'b1;
          state_q   <= C_IDLE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end
endmodule
