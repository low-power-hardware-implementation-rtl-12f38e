// fx_divider: sequential signed fixed-point divider, quo = (num << F) / den.
//
// Needed by the SMO alpha update, which divides an error difference by eta.
// Restoring division on magnitudes, one quotient bit per clock: a result takes
// W + F cycles after start. The sign is the XOR of the operand signs, the
// quotient truncates toward zero and saturates to +/-(2^(W-1)-1); a zero
// divisor gives the saturated value. The divider structure is this design's
// choice (the source design does not describe one).
//
// Interface: pulse start with num/den valid; done pulses once with quo valid.
module fx_divider #(
  parameter int unsigned W = 16,
  parameter int unsigned F = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic signed [W-1:0] quo,
  output logic                done,
  output logic                busy
);
  localparam int unsigned NW = W + F;          // dividend width
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] dvd_q;       // shifts out the dividend, shifts in the quotient
  logic [W:0]    rem_q;
  logic [W-1:0]  dvs_q;
  logic          neg_q;
  logic [CW-1:0] cnt_q;

  logic [W:0] rem_sh;
  assign rem_sh = {rem_q[W-1:0], dvd_q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd_q <= '0;
      rem_q <= '0;
      dvs_q <= '0;
      neg_q <= 1'b0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      quo   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvd_q <= NW'(num[W-1] ? W'(-num) : W'(num)) << F;
          dvs_q <= den[W-1] ? W'(-den) : W'(den);
          neg_q <= num[W-1] ^ den[W-1];
          rem_q <= '0;
          cnt_q <= CW'(NW);
          busy  <= 1'b1;
        end
      end else begin
        if (rem_sh >= {1'b0, dvs_q}) begin
          rem_q <= rem_sh - {1'b0, dvs_q};
          dvd_q <= {dvd_q[NW-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh;
          dvd_q <= {dvd_q[NW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          logic [NW-1:0] q;
          logic [W-1:0]  m;
          q = {dvd_q[NW-2:0], (rem_sh >= {1'b0, dvs_q})};
          if (dvs_q == '0 || q > NW'({(W-1){1'b1}})) m = {1'b0, {(W-1){1'b1}}};
          else m = q[W-1:0];
          quo  <= neg_q ? -$signed(m) : $signed(m);
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
