// farrow_branch: one fixed-coefficient sub-filter C_m of a Farrow structure.
//
// Computes v_m = sum_{n=0}^{NUM_TAPS-1} c_m(n) * x(k-n) from the NUM_TAPS most
// recent input samples, fully in parallel and purely combinationally (the
// source design processes each sample in a single clock cycle). The
// coefficients c_m(n) are constants taken from farrow_pkg::farrow_coef for the
// approach KIND and the polynomial power M; zero coefficients cost nothing
// after synthesis.
//
// Interface: taps[n] is x(k-n) (taps[0] is the newest sample); v is the full
// precision sum, with coef_frac(KIND) fractional bits. No clock, no latency.
module farrow_branch
  import farrow_pkg::*;
#(
  parameter farrow_kind_e KIND = FARROW_LAGRANGE,
  parameter int unsigned  M    = 1,
  localparam int unsigned CW   = coef_width(KIND),
  localparam int unsigned BW   = branch_width(KIND)
) (
  input  adc_sample_t          taps [NUM_TAPS],
  output logic signed [BW-1:0] v
);

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_row_t [NUM_TAPS];

  function automatic coef_row_t make_coefs();
    coef_row_t c;
    for (int unsigned n = 0; n < NUM_TAPS; n++) c[n] = coef_t'(farrow_coef(KIND, M, n));
    return c;
  endfunction

  // Evaluated once at elaboration.
  localparam coef_row_t COEFS = make_coefs();

  always_comb begin
    v = '0;
    for (int unsigned n = 0; n < NUM_TAPS; n++)
      v += BW'(COEFS[n]) * BW'(taps[n]);
  end

endmodule
