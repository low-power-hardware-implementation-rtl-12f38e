// isqrt: sequential integer square root, root = floor(sqrt(radicand)).
//
// The feature extractor replaces every natural logarithm by a square root,
// which is far cheaper in hardware and has a similar compressive shape. This
// unit computes it digit by digit (the classic restoring method on pairs of
// radicand bits), one root bit per clock: done rises IW/2 + 1 cycles after the
// cycle in which start is high. The method is this design's choice; only the use of a square root
// comes from the source design.
//
// Interface: pulse start with radicand valid; done pulses for one cycle with
// root valid (root holds until the next start). start while busy is ignored.
module isqrt #(
  parameter int unsigned IW = 30            // radicand width, even
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IW-1:0]     radicand,
  output logic [IW/2-1:0]   root,
  output logic              done,
  output logic              busy
);
  localparam int unsigned RW = IW / 2;
  localparam int unsigned CW = $clog2(RW + 1);

  logic [IW-1:0]  rad_q;
  logic [RW+1:0]  rem_q;
  logic [RW-1:0]  root_q;
  logic [CW-1:0]  cnt_q;

  logic [RW+1:0]  rem_shift, trial;
  always_comb begin
    rem_shift = {rem_q[RW-1:0], rad_q[IW-1 -: 2]};
    trial     = {root_q, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q  <= '0;
      rem_q  <= '0;
      root_q <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad_q  <= radicand;
          rem_q  <= '0;
          root_q <= '0;
          cnt_q  <= CW'(RW);
          busy   <= 1'b1;
        end
      end else begin
        rad_q <= rad_q << 2;
        if (rem_shift >= trial) begin
          rem_q  <= rem_shift - trial;
          root_q <= {root_q[RW-2:0], 1'b1};
        end else begin
          rem_q  <= rem_shift;
          root_q <= {root_q[RW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign root = root_q;
endmodule
