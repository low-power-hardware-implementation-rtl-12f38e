// seizure_detector: EEG seizure detection with on-chip SVM training.
//
// Data path: 8-bit EEG samples -> feature_extractor (per epoch of D samples:
// fractal dimension, Hurst, coastline) -> feature vector of N = 3 words ->
// either the training set (training mode) or the linear SVM classifier
// (detection mode).
//  * Training mode (train_mode = 1): each epoch's feature vector is stored,
//    with epoch_label (1 = seizure, stored as y = +1; sampled with the
//    epoch's last sample), as the next training
//    point in the SMO trainer's memory (alpha = 0), up to M points. A
//    train_start pulse runs SMO training on the stored points; when it ends
//    the model loader copies the support vectors and b into the classifier
//    and model_ready rises. A new train_start retrains on the same points;
//    clear_points empties the training set.
//  * Detection mode (train_mode = 0, model_ready = 1): each epoch's vector is
//    classified; seizure_valid pulses 16 cycles later (nsv*N + 1 cycles) with
//    the decision.
// Each feature is brought into the 16-bit, 8-fraction-bit word by a fixed
// shift (FD_SH, HU_SH, CL_SH: positive = right, negative = left) and
// saturation, chosen so that typical features land between about 0.5 and 5
// and use the word's range; a constant scale does not
// change which side of a linear boundary a point falls on. The shift amounts,
// the store sequencer and the model loader are this design's own; the
// feature, training and classification blocks follow the source design.
// Status counters count events for observation.
module seizure_detector
  import svm_pkg::*;
#(
  parameter int unsigned D          = 256,
  parameter int unsigned M          = 64,
  parameter int unsigned NSV        = 5,
  parameter int          FD_SH      = -4,      // feature shifts: > 0 right,
  parameter int          HU_SH      = -2,      // < 0 left (see header)
  parameter int          CL_SH      = 3,
  parameter int unsigned C_PARAM    = 256       // C = 1.0
) (
  input  logic             clk,
  input  logic             rst_n,
  // EEG input
  input  logic signed [7:0] sample,
  input  logic             sample_valid,
  output logic             sample_ready,
  // control
  input  logic             train_mode,
  input  logic             epoch_label,
  input  logic             train_start,
  input  logic             clear_points,
  input  logic [15:0]      max_passes,       // SMO pass limit, sampled at train_start
  // features of the last epoch
  output logic [7:0]       fd,
  output logic [14:0]      hurst,
  output logic [19:0]      cl,
  output logic             feat_valid,
  // detection
  output logic             seizure,
  output logic             seizure_valid,
  output logic signed [15:0] score,
  // training status
  output logic [$clog2(M):0] n_points,
  output logic             training,
  output logic             train_done,
  output logic             converged,
  output logic [15:0]      passes,
  output logic signed [15:0] bias,
  output logic             model_ready,
  output logic [$clog2(NSV):0] n_sv,
  output logic             sv_overflow,
  output logic             points_full,
  output logic [15:0]      pairs_changed,
  output logic [15:0]      pairs_skipped
);
  localparam int unsigned N    = 3;
  localparam int unsigned IDXW = $clog2(M);
  localparam int unsigned SVA  = $clog2(NSV * N);
  localparam int unsigned AA   = (NSV > 1) ? $clog2(NSV) : 1;

  // ---------------- features ----------------
  logic epoch_last, label_q;
  feature_extractor #(.XW(8), .D(D), .FDW(8), .RW(30), .HW(15), .CLW(20)) u_fe (
    .clk, .rst_n, .sample, .sample_valid, .sample_ready, .fd, .hurst, .cl, .feat_valid,
    .epoch_last
  );

  function automatic word_t scale(input logic [31:0] v, input int sh);
    logic [31:0] s;
    s = (sh < 0) ? v << (-sh) : v >> sh;
    return (s > 32'h7fff) ? word_t'(16'h7fff) : word_t'(s[15:0]);
  endfunction

  word_t fvec [N];
  assign fvec[0] = scale(32'(fd), FD_SH);
  assign fvec[1] = scale(32'(hurst), HU_SH);
  assign fvec[2] = scale(32'(cl), CL_SH);

  // ---------------- training-set store sequencer ----------------
  typedef enum logic [2:0] {T_IDLE, T_WX, T_WY, T_WA} st_state_e;
  st_state_e     st_q;
  word_t         svec_q [N];
  logic          slabel_q;
  logic [1:0]    sd_q;
  logic [IDXW:0] npts_q;
  mem_req_t      st_req, ld_req, host_req;
  mem_rsp_t      host_rsp;

  assign n_points    = npts_q;
  assign points_full = (npts_q == (IDXW+1)'(M));

  always_comb begin
    st_req = MEM_REQ_IDLE;
    unique case (st_q)
      T_WX: begin
        st_req.req = 1'b1; st_req.we = 1'b1; st_req.bank = BANK_X;
        st_req.addr  = MAXIDX'(npts_q) * MAXIDX'(N) + MAXIDX'(sd_q);
        st_req.wdata = svec_q[sd_q];
      end
      T_WY: begin
        st_req.req = 1'b1; st_req.we = 1'b1; st_req.bank = BANK_Y;
        st_req.addr = MAXIDX'(npts_q); st_req.wdata = {15'd0, !slabel_q};
      end
      T_WA: begin
        st_req.req = 1'b1; st_req.we = 1'b1; st_req.bank = BANK_A;
        st_req.addr = MAXIDX'(npts_q); st_req.wdata = '0;
      end
      default: ;
    endcase
  end

  // ---------------- trainer and loader ----------------
  logic  tr_busy, tr_done, tr_start, ld_busy, ld_done, pc_pulse, ps_pulse;
  word_t b_w;

  assign tr_start = train_start && !tr_busy && !ld_busy && st_q == T_IDLE;

  smo_trainer #(.M(M), .N(N), .IDXW(IDXW)) u_trainer (
    .clk, .rst_n, .host_req, .host_rsp, .start(tr_start), .n_points(npts_q), .max_passes,
    .c(word_t'(C_PARAM)), .busy(tr_busy), .done(tr_done), .converged, .passes, .b(b_w),
    .pair_changed(pc_pulse), .pair_skipped(ps_pulse)
  );
  assign bias = b_w;

  // the store sequencer and the loader never run at the same time
  assign host_req = ld_busy ? ld_req : st_req;

  logic           ld_sv_we, ld_ay_we, ld_y, ld_b_we;
  logic [SVA-1:0] ld_sv_addr;
  logic [AA-1:0]  ld_ay_addr;
  word_t          ld_sv_data, ld_alpha, ld_b;
  logic [AA:0]    ld_nsv;

  model_loader #(.N(N), .NSV(NSV), .IDXW(IDXW), .SVA(SVA), .AA(AA)) u_loader (
    .clk, .rst_n, .start(tr_done), .n_points(npts_q), .b(b_w), .mreq(ld_req), .mrsp(host_rsp),
    .busy(ld_busy), .done(ld_done), .overflow(sv_overflow), .n_sv,
    .ld_sv_we, .ld_sv_addr, .ld_sv_data, .ld_ay_we, .ld_ay_addr, .ld_alpha, .ld_y,
    .ld_b_we, .ld_b, .ld_nsv
  );

  // ---------------- classifier ----------------
  logic cls_start, cls_busy;
  assign cls_start = feat_valid && !train_mode && model_ready;

  svm_classifier #(.N(N), .NSV(NSV), .SVA(SVA), .AA(AA)) u_cls (
    .clk, .rst_n, .x_test(fvec), .start(cls_start), .busy(cls_busy),
    .class_out(seizure), .valid_out(seizure_valid), .score,
    .ld_sv_we, .ld_sv_addr, .ld_sv_data, .ld_ay_we, .ld_ay_addr, .ld_alpha, .ld_y,
    .ld_b_we, .ld_b, .ld_nsv
  );

  assign training = tr_busy || ld_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= T_IDLE;
      for (int d = 0; d < N; d++) svec_q[d] <= '0;
      slabel_q      <= 1'b0;
      label_q       <= 1'b0;
      sd_q          <= '0;
      npts_q        <= '0;
      model_ready   <= 1'b0;
      train_done    <= 1'b0;
      pairs_changed <= '0;
      pairs_skipped <= '0;
    end else begin
      train_done <= ld_done;
      if (epoch_last) label_q <= epoch_label;
      if (ld_done)  model_ready <= 1'b1;
      if (tr_start) begin
        model_ready   <= 1'b0;
        pairs_changed <= '0;
        pairs_skipped <= '0;
      end
      if (pc_pulse) pairs_changed <= pairs_changed + 1'b1;
      if (ps_pulse) pairs_skipped <= pairs_skipped + 1'b1;
      unique case (st_q)
        T_IDLE: begin
          if (clear_points && !training) npts_q <= '0;
          else if (feat_valid && train_mode && !training && !points_full) begin
            for (int d = 0; d < N; d++) svec_q[d] <= fvec[d];
            slabel_q <= label_q;
            sd_q     <= '0;
            st_q     <= T_WX;
          end
        end
        T_WX: if (host_rsp.gnt) begin
          if (sd_q == 2'(N - 1)) st_q <= T_WY;
          sd_q <= sd_q + 1'b1;
        end
        T_WY: if (host_rsp.gnt) st_q <= T_WA;
        T_WA: if (host_rsp.gnt) begin
          npts_q <= npts_q + 1'b1;
          st_q   <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end
endmodule
