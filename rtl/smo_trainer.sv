// smo_trainer: SMO (sequential minimal optimisation) SVM training accelerator.
//
// Three parts, as in the source design: the SMO controller picks pairs of
// Lagrange multipliers, the SMO processing unit optimises each pair
// analytically, and the on-chip main memory holds the training set (features,
// labels, alphas), reached through the memory interface. The threshold b
// lives in the processing unit's register file and is brought out.
//
// Host port (memory-interface client 0, highest priority): before training
// the host writes every point's N features (X bank, address k*N + d), its
// label (1 = -1) and alpha = 0; after training it reads the alphas back.
// Interface: pulse start with n_points; done pulses when training ends;
// converged/passes tell how. All arithmetic is 16-bit fixed point, 8 fraction
// bits; c is the penalty parameter C in that format.
module smo_trainer
  import svm_pkg::*;
#(
  parameter int unsigned M          = 64,
  parameter int unsigned N          = 3,
  parameter int unsigned IDXW       = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mem_req_t      host_req,
  output mem_rsp_t      host_rsp,
  input  logic          start,
  input  logic [IDXW:0] n_points,
  input  logic [15:0]   max_passes,
  input  word_t         c,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [15:0]   passes,
  output word_t         b,
  output logic          pair_changed,   // pulse per updated pair
  output logic          pair_skipped    // pulse per pair rejected by eta/limits
);
  mem_req_t req [4];
  mem_rsp_t rsp [4];
  mem_req_t pu_req [3];
  mem_rsp_t pu_rsp [3];

  logic            clear_b, pu_start, pu_done, pu_changed;
  logic [IDXW-1:0] pu_i, pu_j;

  smo_controller #(.IDXW(IDXW)) u_ctrl (
    .clk, .rst_n, .start, .n_points, .max_passes, .clear_b, .pu_start, .pu_i, .pu_j,
    .pu_done, .pu_changed, .busy, .done, .converged, .passes
  );

  smo_processing_unit #(.N(N), .IDXW(IDXW)) u_pu (
    .clk, .rst_n, .clear(clear_b), .start(pu_start), .idx_i(pu_i), .idx_j(pu_j),
    .n_points, .c, .mreq(pu_req), .mrsp(pu_rsp), .done(pu_done), .changed(pu_changed),
    .b, .skipped_eta(pair_skipped)
  );

  assign pair_changed = pu_done && pu_changed;

  assign req[0] = host_req;
  assign req[1] = pu_req[0];
  assign req[2] = pu_req[1];
  assign req[3] = pu_req[2];
  assign host_rsp  = rsp[0];
  assign pu_rsp[0] = rsp[1];
  assign pu_rsp[1] = rsp[2];
  assign pu_rsp[2] = rsp[3];

  logic              x_we, a_we, y_we, y_wdata, y_rdata;
  logic [MAXIDX-1:0] x_waddr, x_raddr1, x_raddr2, a_addr, y_addr;
  word_t             x_wdata, x_rdata1, x_rdata2, a_wdata, a_rdata;

  smo_memory_interface #(.NC(4)) u_mif (
    .clk, .rst_n, .req, .rsp,
    .x_we, .x_waddr, .x_wdata, .x_raddr1, .x_raddr2, .x_rdata1, .x_rdata2,
    .a_we, .a_addr, .a_wdata, .a_rdata, .y_we, .y_addr, .y_wdata, .y_rdata
  );

  smo_main_memory #(.M(M), .N(N)) u_mem (
    .clk, .x_we, .x_waddr, .x_wdata, .x_raddr1, .x_raddr2, .x_rdata1, .x_rdata2,
    .a_we, .a_addr, .a_wdata, .a_rdata, .y_we, .y_addr, .y_wdata, .y_rdata
  );
endmodule
