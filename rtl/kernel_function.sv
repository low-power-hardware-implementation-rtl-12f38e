// kernel_function: linear-kernel unit of the SMO processing unit.
//
// For the selected pair (i, j) it computes the self and cross kernels
//   k_ii = x_i . x_i,  k_jj = x_j . x_j,  k_ij = x_i . x_j
// at the same time with three multiply-add units (truncated multipliers, sums
// saturated to the word), as the source design does. Its own small
// controller walks the N features: each cycle it asks the memory interface
// for feature d of both points in one dual read of the X bank (word address
// point*N + d), and accumulates the returned pair one cycle after the grant.
// Requests and accumulation overlap, so with no contention the unit finishes
// N + 2 cycles after start.
//
// Interface: pulse start with idx_i/idx_j valid; done pulses once with the
// three kernels valid (held until the next start).
module kernel_function
  import svm_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned IDXW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IDXW-1:0] idx_i,
  input  logic [IDXW-1:0] idx_j,
  output mem_req_t        mreq,
  input  mem_rsp_t        mrsp,
  output word_t           kii,
  output word_t           kjj,
  output word_t           kij,
  output logic            done
);
  localparam int unsigned DW = $clog2(N + 1);

  logic            busy_q;
  logic [DW-1:0]   req_d_q, rsp_d_q;
  logic [IDXW-1:0] i_q, j_q;
  word_t           p_ii, p_jj, p_ij;

  truncated_multiplier #(.W(W), .F(F)) u_mii (.a(mrsp.rdata),  .b(mrsp.rdata),  .p(p_ii));
  truncated_multiplier #(.W(W), .F(F)) u_mjj (.a(mrsp.rdata2), .b(mrsp.rdata2), .p(p_jj));
  truncated_multiplier #(.W(W), .F(F)) u_mij (.a(mrsp.rdata),  .b(mrsp.rdata2), .p(p_ij));

  always_comb begin
    mreq       = MEM_REQ_IDLE;
    mreq.bank  = BANK_X;
    mreq.req   = busy_q && (req_d_q < DW'(N));
    mreq.addr  = MAXIDX'(i_q) * MAXIDX'(N) + MAXIDX'(req_d_q);
    mreq.addr2 = MAXIDX'(j_q) * MAXIDX'(N) + MAXIDX'(req_d_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      req_d_q <= '0;
      rsp_d_q <= '0;
      i_q     <= '0;
      j_q     <= '0;
      kii     <= '0;
      kjj     <= '0;
      kij     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          busy_q  <= 1'b1;
          req_d_q <= '0;
          rsp_d_q <= '0;
          i_q     <= idx_i;
          j_q     <= idx_j;
          kii     <= '0;
          kjj     <= '0;
          kij     <= '0;
        end
      end else begin
        if (mreq.req && mrsp.gnt) req_d_q <= req_d_q + 1'b1;
        if (mrsp.rvalid) begin
          kii     <= add_sat(kii, p_ii);
          kjj     <= add_sat(kjj, p_jj);
          kij     <= add_sat(kij, p_ij);
          rsp_d_q <= rsp_d_q + 1'b1;
          if (rsp_d_q == DW'(N - 1)) begin
            busy_q <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end
endmodule
