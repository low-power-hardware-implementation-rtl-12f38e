// smo_register_file: operand cache of the SMO processing unit.
//
// The values of the pair being optimised (alpha_i, alpha_j, y_i, y_j, the
// threshold b, the new alphas and the errors E_i, E_j) are kept in registers
// so the processing sub-units read them without going back to the main
// memory, as in the source design. Each field has its own write enable and is
// written at the clock edge; q shows the registered values. clear zeroes all
// fields (used at the start of training so that b starts at 0); reset does
// the same.
module smo_register_file
  import svm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  rf_we_t we,
  input  rf_t    wdata,
  output rf_t    q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (clear) q <= '0;
    else begin
      if (we.alpha_i)     q.alpha_i     <= wdata.alpha_i;
      if (we.alpha_j)     q.alpha_j     <= wdata.alpha_j;
      if (we.y_i)         q.y_i         <= wdata.y_i;
      if (we.y_j)         q.y_j         <= wdata.y_j;
      if (we.b)           q.b           <= wdata.b;
      if (we.alpha_i_new) q.alpha_i_new <= wdata.alpha_i_new;
      if (we.alpha_j_new) q.alpha_j_new <= wdata.alpha_j_new;
      if (we.e_i)         q.e_i         <= wdata.e_i;
      if (we.e_j)         q.e_j         <= wdata.e_j;
    end
  end
endmodule
