// farrow_filter_tb: checks the Farrow filter with both coefficient sets.
//
// A random 8-bit stream is clocked in with an irregular clock enable while d
// is changed at random. After every change the output (Q.8) is compared with a
// floating-point model of the filter built from independently recomputed
// coefficients, clamped to the saturating output range: within 1 LSB for the Lagrange set, 1.5 LSB for the cubic set
// (whose 10-bit format makes the Horner truncations larger). The Lagrange
// output is also compared with the ideal Lagrange interpolator (1 LSB), and
// with d = 0 it must be exactly the input delayed by four samples. The delay
// line must advance only when ce is high.
module farrow_filter_tb;
  import farrow_pkg::*;
  import farrow_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  adc_sample_t x_in = '0;
  frac_delay_t d = '0;
  out_sample_t yl, ys;

  farrow_filter #(.KIND(FARROW_LAGRANGE)) u_l (.clk, .rst_n, .ce, .x_in, .d, .y(yl));
  farrow_filter #(.KIND(FARROW_LSP))      u_s (.clk, .rst_n, .ce, .x_in, .d, .y(ys));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real hist [10];   // hist[0] = x_in (current), hist[n] = n-th previous accepted sample

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real clamp(real r);
    if (r > 32767.0 / 256.0) return 32767.0 / 256.0;
    if (r < -128.0) return -128.0;
    return r;
  endfunction

  task automatic check_outputs(input string tag);
    real dr = real'(d) / 65536.0;
    real gl = real'(yl) / 256.0, gs = real'(ys) / 256.0;
    real rl, rs, ri;
    hist[0] = real'(x_in);
    rl = farrow_out(0, dr, hist);
    rs = farrow_out(1, dr, hist);
    ri = lagrange_out(dr, hist);
    // the output saturates at the limits of signed Q8.8
    rl = clamp(rl); rs = clamp(rs); ri = clamp(ri);
    check(gl - rl <= 1.0/256 && rl - gl <= 1.0/256, $sformatf("%s Lagrange %f vs %f", tag, gl, rl));
    check(gs - rs <= 1.5/256 && rs - gs <= 1.5/256, $sformatf("%s LSP %f vs %f", tag, gs, rs));
    check(gl - ri <= 1.0/256 && ri - gl <= 1.0/256, $sformatf("%s ideal %f vs %f", tag, gl, ri));
    if (d == 0) check(yl == out_sample_t'(hist[4] * 256.0), $sformatf("%s d=0 not a pure delay", tag));
  endtask

  initial begin
    build_tables();
    for (int n = 0; n < 10; n++) hist[n] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      // new inputs between edges
      x_in = adc_sample_t'($urandom);
      if (t % 7 == 0) d = frac_delay_t'($urandom);
      if (t % 50 == 3) d = '0;
      if (t % 50 == 20) d = '1;
      ce = ($urandom_range(0, 3) != 0);
      #1 check_outputs($sformatf("t=%0d", t));
      @(posedge clk);
      if (ce) for (int n = 9; n > 0; n--) hist[n] = hist[n-1];
      #1 x_in = adc_sample_t'($urandom);
      ce = 1'b0;
      #1 check_outputs($sformatf("t=%0d after edge", t));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
