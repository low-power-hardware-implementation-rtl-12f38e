// svm_pkg: types and constants shared by the SVM training accelerator, the
// classifier and the seizure-detection top.
//
// All SVM arithmetic uses 16-bit signed fixed-point words with F fractional
// bits (the 16-bit word length follows the source design; the split of 8
// integer and 8 fraction bits is this design's choice). A label y is one bit:
// 1 means y = -1 (a sign bit, so multiplying by y is an XOR on the sign), 0
// means y = +1.
//
// The training memory has three banks (X features, alpha, label). Clients of
// the memory interface talk through mem_req_t / mem_rsp_t: a request is held
// until it is granted; read data comes back one cycle after the grant with
// rvalid set.
package svm_pkg;

  localparam int unsigned W      = 16;   // data word
  localparam int unsigned F      = 8;    // fraction bits
  localparam int unsigned MAXIDX = 12;   // address width carried in requests

  typedef logic signed [W-1:0] word_t;

  typedef enum logic [1:0] {BANK_X = 2'd0, BANK_A = 2'd1, BANK_Y = 2'd2} bank_e;

  typedef struct packed {
    logic              req;
    logic              we;
    bank_e             bank;
    logic [MAXIDX-1:0] addr;   // X: word address, A/Y: point index
    logic [MAXIDX-1:0] addr2;  // X only: second read address
    word_t             wdata;
  } mem_req_t;

  typedef struct packed {
    logic  gnt;
    logic  rvalid;
    word_t rdata;
    word_t rdata2;
  } mem_rsp_t;

  localparam mem_req_t MEM_REQ_IDLE = '{req: 1'b0, we: 1'b0, bank: BANK_X,
                                        addr: '0, addr2: '0, wdata: '0};

  localparam word_t ONE = word_t'(1 << F);

  // Values cached by the SMO processing unit's register file.
  typedef struct packed {
    word_t alpha_i;
    word_t alpha_j;
    logic  y_i;
    logic  y_j;
    word_t b;
    word_t alpha_i_new;
    word_t alpha_j_new;
    word_t e_i;
    word_t e_j;
  } rf_t;

  // One write enable per cached value.
  typedef struct packed {
    logic alpha_i;
    logic alpha_j;
    logic y_i;
    logic y_j;
    logic b;
    logic alpha_i_new;
    logic alpha_j_new;
    logic e_i;
    logic e_j;
  } rf_we_t;

  // Saturate a wide signed value to one word.
  function automatic word_t sat_w(input logic signed [2*W+1:0] v);
    if (v > $signed({{(W+2){1'b0}}, {1'b0, {(W-1){1'b1}}}}))
      return {1'b0, {(W-1){1'b1}}};
    else if (v < -$signed({{(W+2){1'b0}}, 1'b1, {(W-1){1'b0}}}))
      return {1'b1, {(W-1){1'b0}}};
    else
      return v[W-1:0];
  endfunction

  // Saturating add and subtract of two words.
  function automatic word_t add_sat(input word_t a, input word_t b);
    return sat_w((2*W+2)'(a) + (2*W+2)'(b));
  endfunction

  function automatic word_t sub_sat(input word_t a, input word_t b);
    return sat_w((2*W+2)'(a) - (2*W+2)'(b));
  endfunction

  // Multiply by a label: y = 1 (i.e. -1) negates.
  function automatic word_t mul_y(input word_t a, input logic y);
    return y ? sub_sat('0, a) : a;
  endfunction

endpackage
