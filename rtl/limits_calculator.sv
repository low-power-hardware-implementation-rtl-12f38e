// limits_calculator: box bounds L and H for the new alpha_j of an SMO step.
//
// With labels of opposite sign, alpha_j - alpha_i is conserved and
//   L = max(0, alpha_j - alpha_i),   H = min(C, C + alpha_j - alpha_i);
// with equal labels alpha_j + alpha_i is conserved and
//   L = max(0, alpha_j + alpha_i - C), H = min(C, alpha_j + alpha_i).
// As in the source design only two adders are used: the first forms
// alpha_j -/+ alpha_i, the second adds +/-C to it; the signs of alpha_i and
// of C come from the XOR of the label bits (C's sign is the inverse of
// alpha_i's), and two multiplexers pick L from {0, sum} and H from {C, sum}
// depending on the sign of the sum that decides L. Combinational.
// Labels are sign bits (1 = -1). Sums saturate to the word.
module limits_calculator
  import svm_pkg::*;
(
  input  word_t alpha_i,
  input  word_t alpha_j,
  input  logic  y_i,
  input  logic  y_j,
  input  word_t c,
  output word_t lo,
  output word_t hi
);
  logic  diff_lbl;
  word_t add1, add2;

  always_comb begin
    diff_lbl = y_i ^ y_j;
    add1 = diff_lbl ? sub_sat(alpha_j, alpha_i) : add_sat(alpha_j, alpha_i);
    add2 = diff_lbl ? add_sat(add1, c)          : sub_sat(add1, c);
    if (diff_lbl) begin
      lo = (add1 > 0) ? add1 : '0;
      hi = (add1 > 0) ? c    : add2;
    end else begin
      lo = (add2 > 0) ? add2 : '0;
      hi = (add2 > 0) ? c    : add1;
    end
  end
endmodule
