// smo_main_memory: on-chip training memory of the SMO accelerator.
//
// Keeping the training set on chip (rather than in external memory) is what
// lets the accelerator run at low power. The memory is split into three banks
// so that different clients can use them in the same cycle:
//   X bank     M*N words, feature d of point k at address k*N + d; one write
//              port and two read ports (a kernel reads x_i[d] and x_j[d]
//              together);
//   alpha bank M words, one read/write port;
//   label bank M bits (1 = label -1), one read/write port.
// Reads are registered: data appears the cycle after the address. Contents
// are not reset; the loader writes every point (alpha = 0) before training.
// The bank split and port counts are this design's choices.
module smo_main_memory
  import svm_pkg::*;
#(
  parameter int unsigned M = 64,
  parameter int unsigned N = 3
) (
  input  logic              clk,
  // X bank
  input  logic              x_we,
  input  logic [MAXIDX-1:0] x_waddr,
  input  word_t             x_wdata,
  input  logic [MAXIDX-1:0] x_raddr1,
  input  logic [MAXIDX-1:0] x_raddr2,
  output word_t             x_rdata1,
  output word_t             x_rdata2,
  // alpha bank
  input  logic              a_we,
  input  logic [MAXIDX-1:0] a_addr,
  input  word_t             a_wdata,
  output word_t             a_rdata,
  // label bank
  input  logic              y_we,
  input  logic [MAXIDX-1:0] y_addr,
  input  logic              y_wdata,
  output logic              y_rdata
);
  localparam int unsigned XD = M * N;
  localparam int unsigned XA = $clog2(XD);
  localparam int unsigned PA = $clog2(M);

  word_t x_mem [XD];
  word_t a_mem [M];
  logic  y_mem [M];

  always_ff @(posedge clk) begin
    if (x_we) x_mem[XA'(x_waddr)] <= x_wdata;
    x_rdata1 <= x_mem[XA'(x_raddr1)];
    x_rdata2 <= x_mem[XA'(x_raddr2)];
  end

  always_ff @(posedge clk) begin
    if (a_we) a_mem[PA'(a_addr)] <= a_wdata;
    a_rdata <= a_mem[PA'(a_addr)];
  end

  always_ff @(posedge clk) begin
    if (y_we) y_mem[PA'(y_addr)] <= y_wdata;
    y_rdata <= y_mem[PA'(y_addr)];
  end
endmodule
