// skew_correction_filter: clock-skew correction for a two-channel
// time-interleaved ADC (TIADC).
//
// The skew is modelled as a delay of a fraction d of the per-channel period on
// the signal ADC2 converts: ADC2 sample n is x(nT + T/2 - dT) instead of
// x(nT + T/2). The correction delays ADC1 by the same fraction with a Farrow
// filter (total delay DINT + d, so out1 = x((k - DINT - d)T)) and delays ADC2
// by the integer DINT only (out2 = x((k - DINT)T + T/2 - dT)), so after
// correction the two channels are again exactly half a period apart and can
// be interleaved. d is an input (Q0.16) and can change at run time; no
// coefficients are recomputed.
//
// Interface: adc1/adc2 are signed 8-bit samples taken on the same tick; out1
// and out2 are signed OUT_W-bit samples with OUT_FRAC fractional bits (ADC2 is
// only shifted into that format). Both outputs are combinational from the
// current inputs and the delay-line registers; ce advances both delay lines.
// Register count: 9 x 8 (Farrow taps) + DINT x 8 (integer delay) = 104.
module skew_correction_filter
  import farrow_pkg::*;
#(
  parameter farrow_kind_e KIND = FARROW_LAGRANGE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  adc_sample_t adc1,
  input  adc_sample_t adc2,
  input  frac_delay_t d,
  output out_sample_t out1,
  output out_sample_t out2
);

  adc_sample_t adc2_delayed;

  farrow_filter #(.KIND(KIND)) u_farrow (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (ce),
    .x_in (adc1),
    .d    (d),
    .y    (out1)
  );

  integer_delay #(.W(ADC_W), .DELAY(DINT)) u_dint (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (ce),
    .x_in (adc2),
    .y    (adc2_delayed)
  );

  assign out2 = out_sample_t'(adc2_delayed) <<< OUT_FRAC;

endmodule
