// model_loader: installs a freshly trained model in the classifier.
//
// After SMO training the alphas sit in the trainer's memory next to the
// training set. The loader walks points 0..n-1 through the trainer's host
// port: it reads alpha_k and, only when alpha_k != 0 (a support vector),
// reads the label and the N features and writes them into the classifier's
// tables at the next free slot. Finally it writes the threshold b and the
// number of support vectors. If the training produced more than NSV support
// vectors the extra ones are dropped and overflow is set. The source design
// does not describe how a trained model reaches the classifier; this unit is
// this design's own.
//
// Interface: pulse start (with b valid until done); done pulses at the end.
// Memory accesses follow the memory-interface protocol (hold until gnt, data
// one cycle later).
module model_loader
  import svm_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned NSV  = 5,
  parameter int unsigned IDXW = 6,
  parameter int unsigned SVA  = $clog2(NSV * N),
  parameter int unsigned AA   = (NSV > 1) ? $clog2(NSV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [IDXW:0]  n_points,
  input  word_t          b,
  output mem_req_t       mreq,
  input  mem_rsp_t       mrsp,
  output logic           busy,
  output logic           done,
  output logic           overflow,
  output logic [AA:0]    n_sv,
  // classifier load port
  output logic           ld_sv_we,
  output logic [SVA-1:0] ld_sv_addr,
  output word_t          ld_sv_data,
  output logic           ld_ay_we,
  output logic [AA-1:0]  ld_ay_addr,
  output word_t          ld_alpha,
  output logic           ld_y,
  output logic           ld_b_we,
  output word_t          ld_b,
  output logic [AA:0]    ld_nsv
);
  localparam int unsigned DW = $clog2(N + 1);

  typedef enum logic [2:0] {L_IDLE, L_RD_A, L_WT_A, L_RD_Y, L_WT_Y, L_RD_X, L_WT_X, L_FIN} l_state_e;

  l_state_e      state_q;
  logic [IDXW:0] k_q, n_q;
  logic [DW-1:0] d_q;
  word_t         alpha_q;

  assign busy = (state_q != L_IDLE);

  always_comb begin
    mreq = MEM_REQ_IDLE;
    unique case (state_q)
      L_RD_A: begin mreq.req = 1'b1; mreq.bank = BANK_A; mreq.addr = MAXIDX'(k_q); end
      L_RD_Y: begin mreq.req = 1'b1; mreq.bank = BANK_Y; mreq.addr = MAXIDX'(k_q); end
      L_RD_X: begin
        mreq.req   = 1'b1;
        mreq.bank  = BANK_X;
        mreq.addr  = MAXIDX'(k_q) * MAXIDX'(N) + MAXIDX'(d_q);
        mreq.addr2 = mreq.addr;
      end
      default: ;
    endcase
  end

  always_comb begin
    ld_sv_we   = (state_q == L_WT_X) && mrsp.rvalid;
    ld_sv_addr = SVA'(n_sv) * SVA'(N) + SVA'(d_q);
    ld_sv_data = mrsp.rdata;
    ld_ay_we   = (state_q == L_WT_Y) && mrsp.rvalid;
    ld_ay_addr = AA'(n_sv);
    ld_alpha   = alpha_q;
    ld_y       = mrsp.rdata[0];
    ld_b_we    = (state_q == L_FIN);
    ld_b       = b;
    ld_nsv     = n_sv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= L_IDLE;
      k_q      <= '0;
      n_q      <= '0;
      d_q      <= '0;
      alpha_q  <= '0;
      n_sv     <= '0;
      overflow <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        L_IDLE: if (start) begin
          k_q      <= '0;
          n_q      <= n_points;
          n_sv     <= '0;
          overflow <= 1'b0;
          state_q  <= (n_points == '0) ? L_FIN : L_RD_A;
        end
        L_RD_A: if (mrsp.gnt) state_q <= L_WT_A;
        L_WT_A: if (mrsp.rvalid) begin
          alpha_q <= mrsp.rdata;
          if (mrsp.rdata == '0 || n_sv == (AA+1)'(NSV)) begin
            if (mrsp.rdata != '0) overflow <= 1'b1;
            k_q     <= k_q + 1'b1;
            state_q <= (k_q + 1'b1 == n_q) ? L_FIN : L_RD_A;
          end else state_q <= L_RD_Y;
        end
        L_RD_Y: if (mrsp.gnt) state_q <= L_WT_Y;
        L_WT_Y: if (mrsp.rvalid) begin
          d_q     <= '0;
          state_q <= L_RD_X;
        end
        L_RD_X: if (mrsp.gnt) state_q <= L_WT_X;
        L_WT_X: if (mrsp.rvalid) begin
          if (d_q == DW'(N - 1)) begin
            n_sv    <= n_sv + 1'b1;
            k_q     <= k_q + 1'b1;
            state_q <= (k_q + 1'b1 == n_q) ? L_FIN : L_RD_A;
          end else begin
            d_q     <= d_q + 1'b1;
            state_q <= L_RD_X;
          end
        end
        L_FIN: begin
          done    <= 1'b1;
          state_q <= L_IDLE;
        end
        default: state_q <= L_IDLE;
      endcase
    end
  end
endmodule
