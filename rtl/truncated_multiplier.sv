// truncated_multiplier: low-power signed fixed-point multiplier.
//
// Multipliers dominate the power of the SVM datapath, so a truncated multiplier
// is used: the partial-product columns below weight 2^DROP are never formed,
// a constant 2^(DROP-1) stands in for their average, and the product is cut
// to the W-bit word with F fraction bits (truncated accumulation follows in
// the callers). Operands are taken as sign and magnitude: the magnitudes are
// multiplied and the sign is the XOR of the operand signs. The result
// saturates at +/-(2^(W-1)-1). The source design uses a published signed
// truncated multiplier whose optimised partial-product matrix is not
// reproduced here; the column-dropping scheme and DROP = 6 are this design's
// choices. Purely combinational.
module truncated_multiplier #(
  parameter int unsigned W    = 16,
  parameter int unsigned F    = 8,
  parameter int unsigned DROP = 6        // dropped columns, DROP <= F
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] p
);
  localparam int unsigned PW = 2 * W;

  logic [W-1:0]  mag_a, mag_b;
  logic [PW-1:0] sum;
  logic [PW-1:0] mag_p;
  logic          neg;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];
    // truncated partial-product matrix
    sum = (DROP > 0) ? PW'(1) << (DROP - 1) : '0;
    for (int i = 0; i < W; i++) begin
      logic [PW-1:0] pp;
      pp  = mag_b[i] ? (PW'(mag_a) << i) : '0;
      pp  = pp & ~((PW'(1) << DROP) - 1'b1);
      sum = sum + pp;
    end
    mag_p = sum >> F;
    if (mag_p > PW'({(W-1){1'b1}})) mag_p = PW'({(W-1){1'b1}});
    p = neg ? -$signed(W'(mag_p)) : $signed(W'(mag_p));
  end
endmodule
