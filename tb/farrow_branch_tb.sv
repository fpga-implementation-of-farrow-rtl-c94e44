// farrow_branch_tb: checks Farrow sub-filters against coefficients recomputed
// in floating point (farrow_ref_pkg). Four instances are tested: Lagrange C1
// and C9 (39-bit coefficients) and least-squares C0 and C2 (12-bit). Each gets
// random and extreme 8-bit tap vectors; the output must equal
// sum_n round(c_m(n) 2^frac) x(k-n) exactly.
module farrow_branch_tb;
  import farrow_pkg::*;
  import farrow_ref_pkg::*;

  localparam int unsigned BWL = branch_width(FARROW_LAGRANGE);
  localparam int unsigned BWS = branch_width(FARROW_LSP);

  adc_sample_t taps [NUM_TAPS];
  logic signed [BWL-1:0] vl1, vl9;
  logic signed [BWS-1:0] vs0, vs2;

  farrow_branch #(.KIND(FARROW_LAGRANGE), .M(1)) u_l1 (.taps(taps), .v(vl1));
  farrow_branch #(.KIND(FARROW_LAGRANGE), .M(9)) u_l9 (.taps(taps), .v(vl9));
  farrow_branch #(.KIND(FARROW_LSP),      .M(0)) u_s0 (.taps(taps), .v(vs0));
  farrow_branch #(.KIND(FARROW_LSP),      .M(2)) u_s2 (.taps(taps), .v(vs2));

  int checks = 0, failures = 0;

  function automatic longint expect_v(bit is_lsp, int m);
    longint s = 0;
    for (int n = 0; n < 10; n++) s += coef_q(is_lsp, m, n) * longint'(taps[n]);
    return s;
  endfunction

  task automatic check_all(input string tag);
    #1;
    checks += 4;
    if (longint'(vl1) != expect_v(0, 1)) begin failures++; $display("FAIL %s L1 %0d %0d", tag, vl1, expect_v(0, 1)); end
    if (longint'(vl9) != expect_v(0, 9)) begin failures++; $display("FAIL %s L9 %0d %0d", tag, vl9, expect_v(0, 9)); end
    if (longint'(vs0) != expect_v(1, 0)) begin failures++; $display("FAIL %s S0 %0d %0d", tag, vs0, expect_v(1, 0)); end
    if (longint'(vs2) != expect_v(1, 2)) begin failures++; $display("FAIL %s S2 %0d %0d", tag, vs2, expect_v(1, 2)); end
  endtask

  initial begin
    // single impulses expose each coefficient
    for (int p = 0; p < NUM_TAPS; p++) begin
      for (int n = 0; n < NUM_TAPS; n++) taps[n] = (n == p) ? 8'sd1 : 8'sd0;
      check_all($sformatf("impulse %0d", p));
    end
    // extremes
    for (int n = 0; n < NUM_TAPS; n++) taps[n] = -8'sd128;
    check_all("all -128");
    for (int n = 0; n < NUM_TAPS; n++) taps[n] = (n % 2) ? 8'sd127 : -8'sd128;
    check_all("alternating");
    // random
    for (int t = 0; t < 300; t++) begin
      for (int n = 0; n < NUM_TAPS; n++) taps[n] = adc_sample_t'($urandom);
      check_all($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
