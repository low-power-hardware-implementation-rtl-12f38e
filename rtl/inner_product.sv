// inner_product: multiply-accumulate with one multiplier and one adder.
//
// The classifier's final stage: acc <= acc + a*b each cycle en is high, where
// a is alpha*y of a support vector and b its dot product with the test
// vector. clr loads acc with init instead (the classifier starts from -b).
// The multiplier is the truncated fixed-point multiplier; the sum saturates
// to the word. clr has priority over en. acc is a register.
module inner_product
  import svm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  word_t init,
  input  logic  en,
  input  word_t a,
  input  word_t b,
  output word_t acc
);
  word_t p;

  truncated_multiplier #(.W(W), .F(F)) u_mul (.a, .b, .p);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= init;
    else if (en)  acc <= add_sat(acc, p);
  end
endmodule
