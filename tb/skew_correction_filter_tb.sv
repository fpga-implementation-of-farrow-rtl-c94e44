// skew_correction_filter_tb: two-channel TIADC clock-skew correction.
//
// A sine is sampled by two model ADC channels at 1 GS/s each, 60 MHz input,
// the input of ADC2 delayed by d of its period, both quantised to 8 bits. For several skew
// values d (changed at run time) the corrected ADC1 output must match the
// ideal Lagrange interpolation of its samples within 1 LSB (Q8.8) and the
// ADC2 output must be its input four samples earlier exactly. After the
// filter settles, the two outputs must be samples of the true sine taken
// exactly half a period apart, (k-4-d)T for ADC1 and (k-4-d)T + T/2 for ADC2,
// within 2 ADC LSBs: the skew is removed.
module skew_correction_filter_tb;
  import farrow_pkg::*;
  import farrow_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  adc_sample_t adc1 = '0, adc2 = '0;
  frac_delay_t d = '0;
  out_sample_t out1, out2;
  skew_correction_filter dut (.clk, .rst_n, .ce, .adc1, .adc2, .d, .out1, .out2);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real h1 [10];
  adc_sample_t a2 [$];
  localparam real PI = 3.14159265358979;
  localparam real FIN_T = 0.06;  // input frequency times the channel period

  function automatic adc_sample_t quant(real v);
    real r = $floor(v * 127.0 * 0.9 + 0.5);
    return adc_sample_t'(int'(r));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    automatic real dv [4] = '{0.1, 0.3, 0.55, 0.9};
    for (int n = 0; n < 10; n++) h1[n] = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      d = frac_delay_t'(int'(dv[s] * 65536.0));
      for (int k = 0; k < 100; k++) begin
        automatic real dr = real'(d) / 65536.0;
        automatic real ref1, got1, truth;
        @(negedge clk);
        adc1 = quant($sin(2.0 * PI * FIN_T * real'(k)));
        adc2 = quant($sin(2.0 * PI * FIN_T * (real'(k) + 0.5 - dr)));
        ce = 1'b1;
        #1;
        h1[0] = real'(adc1);
        ref1 = lagrange_out(dr, h1);
        got1 = real'(out1) / 256.0;
        check(got1 - ref1 <= 1.0 / 256 && ref1 - got1 <= 1.0 / 256,
              $sformatf("d=%f k=%0d out1 %f ideal %f", dr, k, got1, ref1));
        check(out2 == ((a2.size() >= 4) ? out_sample_t'(a2[a2.size()-4]) <<< 8 : '0),
              $sformatf("d=%f k=%0d out2 %0d", dr, k, out2));
        if (k >= 10) begin
          truth = 127.0 * 0.9 * $sin(2.0 * PI * FIN_T * (real'(k) - 4.0 - dr));
          check(got1 - truth <= 2.0 && truth - got1 <= 2.0,
                $sformatf("d=%f k=%0d ADC1 off the grid: %f vs %f", dr, k, got1, truth));
          truth = 127.0 * 0.9 * $sin(2.0 * PI * FIN_T * (real'(k) - 4.0 - dr + 0.5));
          check(real'(out2) / 256.0 - truth <= 2.0 && truth - real'(out2) / 256.0 <= 2.0,
                $sformatf("d=%f k=%0d ADC2 off the grid: %f vs %f", dr, k, real'(out2) / 256.0, truth));
        end
        @(posedge clk);
        for (int n = 9; n > 0; n--) h1[n] = h1[n-1];
        a2.push_back(adc2);
      end
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
