// farrow_horner: the variable-multiplier part of a Farrow structure.
//
// Evaluates y = sum_m v_m d^m by Horner's rule,
//     acc = v_{NB-1};  acc = ((acc * d) >>> D_W) + v_m  for m = NB-2 .. 0,
// which needs NB-1 multipliers by the fractional delay d (nine for the
// Lagrange set, three for the cubic least-squares set). d is unsigned Q0.D_W,
// so d in [0, 1). Each product is truncated (floor) back to the fractional
// format of the sub-filter outputs; the accumulator keeps GUARD extra integer
// bits so that the partial sums cannot overflow.
//
// Interface: v[m] are the sub-filter outputs (v[0] multiplies d^0); y has the
// same fractional bits as v. Purely combinational.
module farrow_horner
  import farrow_pkg::*;
#(
  parameter farrow_kind_e KIND  = FARROW_LAGRANGE,
  parameter int unsigned  GUARD = 4,
  localparam int unsigned NB    = num_branches(KIND),
  localparam int unsigned BW    = branch_width(KIND),
  localparam int unsigned AW    = BW + GUARD
) (
  input  logic signed [BW-1:0] v [NB],
  input  frac_delay_t          d,
  output logic signed [AW-1:0] y
);

  localparam int unsigned PW = AW + D_W + 1;

  logic signed [PW-1:0] prod;

  always_comb begin
    y    = AW'(v[NB-1]);
    prod = '0;
    for (int m = NB - 2; m >= 0; m--) begin
      prod = PW'(y) * $signed({1'b0, d});
      y    = AW'(prod >>> D_W) + AW'(v[m]);
    end
  end

endmodule
