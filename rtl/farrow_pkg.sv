// farrow_pkg: types, sizes and coefficient generators shared by the Farrow
// clock-skew correction filter and its FPGA test structure.
//
// The Farrow structure replaces a bank of fractional-delay FIR filters by a
// polynomial in the fractional delay d:  h(n; d) = sum_m c_m(n) d^m.
// The base filter is a ninth-order Lagrange interpolator (10 taps, n = 0..9)
// centred on an integer delay DINT = 4, so the total delay is DINT + d with
// d in [0, 1):
//     h(n; d) = prod_{k != n} (DINT + d - k) / (n - k)
// Two coefficient sets are provided:
//   FARROW_LAGRANGE  the exact expansion of h(n; d) in powers of d, ten
//                    sub-filters C0..C9, coefficients Q11.28 (39 bits).
//   FARROW_LSP       the least-squares cubic fit of h(n; d) over d in [0, 1],
//                    four sub-filters C0..C3, coefficients Q2.10 (12 bits).
// Both sets are computed here at elaboration time with exact integer
// arithmetic, then rounded (half away from zero) to the fixed-point grid, so
// no coefficient table is stored anywhere.
//
// Lagrange: writing prod_{k != n} (d + DINT - k) = sum_j a_j(n) d^j with
// integer a_j and den(n) = prod_{k != n} (n - k), c_j(n) = a_j(n) / den(n).
// LSP: the continuous least-squares fit onto 1, d, d^2, d^3 over [0, 1] has
// the Hilbert normal matrix H_ik = 1/(i+k+1), whose inverse is an integer
// matrix. Then c_i(n) = sum_k Hinv_ik * sum_j a_j(n) / ((k+j+1) den(n)).
// Multiplying by LCM(1..13) = 360360 keeps every term an integer.
//
// The word lengths (8-bit ADCs, 39/28 and 12/10 coefficient formats, ten taps)
// follow the source design. The d format, the output format and the integer
// delay value are this design's choices.
package farrow_pkg;

  typedef enum logic {
    FARROW_LAGRANGE = 1'b0,
    FARROW_LSP      = 1'b1
  } farrow_kind_e;

  // Datapath sizes
  localparam int unsigned ADC_W    = 8;   // ADC sample width (signed)
  localparam int unsigned NUM_TAPS = 10;  // ninth-order Lagrange base filter
  localparam int unsigned DINT     = 4;   // integer part of the filter delay
  localparam int unsigned D_W      = 16;  // fractional delay d, unsigned Q0.16
  localparam int unsigned OUT_W    = 16;  // corrected sample width (signed)
  localparam int unsigned OUT_FRAC = 8;   // fractional bits of the corrected sample

  localparam longint      LSP_LCM      = 360360;  // LCM(1..13)

  typedef logic signed [ADC_W-1:0] adc_sample_t;
  typedef logic        [D_W-1:0]   frac_delay_t;
  typedef logic signed [OUT_W-1:0] out_sample_t;

  // Per-approach sizes
  function automatic int unsigned num_branches(farrow_kind_e kind);
    return (kind == FARROW_LAGRANGE) ? 10 : 4;
  endfunction

  function automatic int unsigned coef_width(farrow_kind_e kind);
    return (kind == FARROW_LAGRANGE) ? 39 : 12;
  endfunction

  function automatic int unsigned coef_frac(farrow_kind_e kind);
    return (kind == FARROW_LAGRANGE) ? 28 : 10;
  endfunction

  // Width of one sub-filter output: product width plus log2 of the tap count.
  function automatic int unsigned branch_width(farrow_kind_e kind);
    return ADC_W + coef_width(kind) + 4;
  endfunction

  // a_j(n): coefficient of d^j in prod_{k != n} (d + DINT - k)
  function automatic longint lagrange_num(int unsigned j, int unsigned n);
    longint poly [NUM_TAPS+1];
    longint next [NUM_TAPS+1];
    int unsigned len;
    for (int i = 0; i <= NUM_TAPS; i++) poly[i] = 0;
    poly[0] = 1;
    len = 1;
    for (int k = 0; k < NUM_TAPS; k++) begin
      if (k != int'(n)) begin
        for (int i = 0; i <= NUM_TAPS; i++) next[i] = 0;
        for (int i = 0; i < int'(len); i++) begin
          next[i]   += poly[i] * (longint'(DINT) - longint'(k));
          next[i+1] += poly[i];
        end
        for (int i = 0; i <= NUM_TAPS; i++) poly[i] = next[i];
        len++;
      end
    end
    return (j <= NUM_TAPS) ? poly[j] : 0;
  endfunction

  // den(n) = prod_{k != n} (n - k)
  function automatic longint lagrange_den(int unsigned n);
    longint p = 1;
    for (int k = 0; k < NUM_TAPS; k++)
      if (k != int'(n)) p *= (longint'(n) - longint'(k));
    return p;
  endfunction

  // round(num * 2^frac / den), half away from zero
  function automatic longint round_div(longint num, longint den, int unsigned frac);
    longint an = (num < 0) ? -num : num;
    longint ad = (den < 0) ? -den : den;
    longint q  = ((an << frac) * 2 + ad) / (2 * ad);
    return (((num < 0) != (den < 0)) && (num != 0)) ? -q : q;
  endfunction

  // Inverse of the 4x4 Hilbert matrix
  function automatic longint hilbert4_inv(int unsigned i, int unsigned k);
    longint t [16] = '{  16,  -120,   240,  -140,
                       -120,  1200, -2700,  1680,
                        240, -2700,  6480, -4200,
                       -140,  1680, -4200,  2800};
    return t[i*4 + k];
  endfunction

  // Quantised coefficient c_m(n) of the chosen approach, as an integer
  // scaled by 2^coef_frac(kind).
  function automatic longint farrow_coef(farrow_kind_e kind, int unsigned m, int unsigned n);
    longint num;
    if (kind == FARROW_LAGRANGE) begin
      return round_div(lagrange_num(m, n), lagrange_den(n), coef_frac(kind));
    end
    num = 0;
    for (int j = 0; j < NUM_TAPS; j++)
      for (int k = 0; k < 4; k++)
        num += lagrange_num(j, n) * hilbert4_inv(m, k) * (LSP_LCM / (longint'(k) + longint'(j) + 1));
    return round_div(num, lagrange_den(n) * LSP_LCM, coef_frac(kind));
  endfunction

endpackage
