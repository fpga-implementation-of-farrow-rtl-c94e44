// farrow_filter: Farrow fractional-delay filter for one ADC channel.
//
// Delays the input stream by DINT + d samples (DINT = 4, d in [0, 1)) with a
// ten-tap Lagrange-based Farrow structure: a tap delay line, NB fixed
// sub-filters C_0..C_{NB-1} (farrow_branch) that all see the same taps, and a
// Horner chain of multipliers by d (farrow_horner). The result is rounded
// (half up) to OUT_FRAC fractional bits and saturated to OUT_W bits.
//
// Timing: the newest sample x_in feeds the taps directly, so y is a
// combinational function of x_in and the nine registered past samples; on a
// rising clk edge with ce high, x_in is shifted into the delay line. This
// gives the single-cycle, fully parallel processing of the source design, and
// its register count: nine 8-bit taps. ce stands for the slow filter clock of
// the source design (here a clock enable). rst_n (asynchronous, active low)
// clears the delay line.
module farrow_filter
  import farrow_pkg::*;
#(
  parameter farrow_kind_e KIND = FARROW_LAGRANGE,
  localparam int unsigned NB   = num_branches(KIND),
  localparam int unsigned BW   = branch_width(KIND),
  localparam int unsigned GUARD = 4,
  localparam int unsigned AW   = BW + GUARD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  adc_sample_t x_in,
  input  frac_delay_t d,
  output out_sample_t y
);

  localparam int unsigned SHIFT = coef_frac(KIND) - OUT_FRAC;

  adc_sample_t          hist [NUM_TAPS-1];  // x(k-1) .. x(k-9)
  adc_sample_t          taps [NUM_TAPS];
  logic signed [BW-1:0] v    [NB];
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] rounded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TAPS - 1; i++) hist[i] <= '0;
    end else if (ce) begin
      hist[0] <= x_in;
      for (int i = 1; i < NUM_TAPS - 1; i++) hist[i] <= hist[i-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int i = 1; i < NUM_TAPS; i++) taps[i] = hist[i-1];
  end

  for (genvar m = 0; m < NB; m++) begin : g_branch
    farrow_branch #(.KIND(KIND), .M(m)) u_branch (
      .taps(taps),
      .v   (v[m])
    );
  end

  farrow_horner #(.KIND(KIND), .GUARD(GUARD)) u_horner (
    .v  (v),
    .d  (d),
    .y  (acc)
  );

  // Round half up to OUT_FRAC fractional bits, then saturate to OUT_W bits.
  localparam logic signed [AW-1:0] HALF   = AW'(1) <<< (SHIFT - 1);
  localparam logic signed [AW-1:0] MAXOUT = AW'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [AW-1:0] MINOUT = -AW'(1 << (OUT_W - 1));

  always_comb begin
    rounded = (acc + HALF) >>> SHIFT;
    if (rounded > MAXOUT)      y = out_sample_t'(MAXOUT);
    else if (rounded < MINOUT) y = out_sample_t'(MINOUT);
    else                       y = out_sample_t'(rounded);
  end

endmodule
