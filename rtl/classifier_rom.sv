// classifier_rom: one model memory of the SVM classifier.
//
// The classifier keeps its trained model in three read-only tables: the
// support vectors (depth NSV*N words), their alphas (depth NSV words) and
// their labels (depth NSV, one bit). This module is one such table: a
// registered read port (data the cycle after the address) and a write port
// used only to load the model after training. The source design describes
// the tables as ROMs; the load port is this design's addition so that a model
// produced by the on-chip trainer can be installed. Contents are not reset.
module classifier_rom #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 15,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
