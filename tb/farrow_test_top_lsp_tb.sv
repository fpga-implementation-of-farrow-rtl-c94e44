// farrow_test_top_lsp_tb: runs the filter test structure with the cubic
// least-squares coefficient set (four sub-filters, 12-bit coefficients) and
// a short debounce time. Every corrected ADC1 sample must lie within 1.5
// output LSBs of a floating-point model built from independently recomputed
// coefficients, and within 2 ADC LSBs of the ideal Lagrange interpolator;
// ADC2 must be the input delayed by four samples; both comparators must match
// the stored results for the whole run, at one sample per 16 clock cycles.
module farrow_test_top_lsp_tb;
  import farrow_pkg::*;
  import farrow_ref_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned DIV   = 16;
  localparam real         DFRAC = 19661.0 / 65536.0;

  logic clk = 1'b0, rst_n = 1'b0, sw_reset = 1'b0, sw_enable = 1'b0;
  logic [3:0]  clk_div;
  logic [7:0]  addr;
  logic        done;
  adc_sample_t adc1_sample, adc2_sample;
  out_sample_t farrow_out1, farrow_out2, sim_out1, sim_out2;
  logic        cmp_strobe;
  logic [1:0]  cmp_ok;
  logic [15:0] compares, mismatches1, mismatches2;

  farrow_test_top #(.KIND(FARROW_LSP), .DEBOUNCE_CYCLES(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_match = 0;
  logic [7:0] x1 [DEPTH];
  logic [7:0] x2 [DEPTH];
  int cycle = 0, last_strobe = -1;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  always @(negedge clk) begin
    if (cmp_strobe) begin
      automatic int k = int'(addr);
      automatic real xs [10];
      automatic real got = real'(farrow_out1) / 256.0;
      automatic real rs, ri;
      for (int n = 0; n < 10; n++) xs[n] = (k - n < 0) ? 0.0 : real'($signed(x1[k-n]));
      rs = farrow_out(1, DFRAC, xs);
      ri = lagrange_out(DFRAC, xs);
      check(got - rs <= 1.5 / 256 && rs - got <= 1.5 / 256, $sformatf("k=%0d LSP %f vs %f", k, got, rs));
      check(got - ri <= 2.0 && ri - got <= 2.0, $sformatf("k=%0d vs ideal %f %f", k, got, ri));
      check(farrow_out2 == ((k >= 4) ? (out_sample_t'($signed(x2[k-4])) <<< 8) : '0), "ADC2 path");
      if (last_strobe >= 0) check(cycle - last_strobe == DIV, "sample spacing");
      last_strobe = cycle;
    end
    if ($past(cmp_strobe)) begin
      check(cmp_ok == 2'b11, $sformatf("comparators %b", cmp_ok));
      if (cmp_ok == 2'b11) n_match++;
    end
  end

  initial begin
    build_tables();
    $readmemh("rtl/adc1_in.hex", x1);
    $readmemh("rtl/adc2_in.hex", x2);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    sw_enable = 1'b1;
    while (!done) @(posedge clk);
    repeat (2 * DIV) @(posedge clk);
    check(compares == 16'(DEPTH) && mismatches1 == 0 && mismatches2 == 0,
          $sformatf("counts %0d %0d %0d", compares, mismatches1, mismatches2));
    check(n_match == DEPTH, $sformatf("matches %0d", n_match));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DEPTH * DIV + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
