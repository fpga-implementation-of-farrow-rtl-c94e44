// tiadc_sfdr_tb: spur suppression of the skew correction over input frequency.
//
// A 2 GS/s two-channel TIADC (two 1 GS/s 8-bit channels, the input of ADC2
// delayed by d = 0.3 of its period) digitises a full-scale sine at about 60,
// 100, 150, 200 and 250 MHz (rounded to a whole number of cycles in the
// 512-sample record). The two channels are interleaved before and after
// correction, with the Lagrange and with the cubic least-squares coefficient
// set. The mismatch spur sits at fs/2 - fin; a single-bin DFT measures tone and
// spur power. Checks: the spur drops by more than 30 dB with either set for
// every input from 100 MHz to 250 MHz, and by more than 20 dB at 60 MHz.
module tiadc_sfdr_tb;
  import farrow_pkg::*;

  localparam int  N   = 256;  // samples per channel in the record
  localparam int  WARM = 16;  // filter fill before recording
  localparam real PI  = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  adc_sample_t adc1 = '0, adc2 = '0;
  frac_delay_t d = 16'd19661;
  out_sample_t l1, l2, s1, s2;

  skew_correction_filter #(.KIND(FARROW_LAGRANGE)) u_lag (.clk, .rst_n, .ce, .adc1, .adc2, .d, .out1(l1), .out2(l2));
  skew_correction_filter #(.KIND(FARROW_LSP))      u_lsp (.clk, .rst_n, .ce, .adc1, .adc2, .d, .out1(s1), .out2(s2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real zr [2*N];
  real zl [2*N];
  real zs [2*N];

  function automatic adc_sample_t quant(real v);
    real r = $floor(v * 127.0 + 0.5);
    return adc_sample_t'(int'(r));
  endfunction

  function automatic real bin_power(real z [2*N], int b);
    real re = 0.0, im = 0.0;
    for (int i = 0; i < 2 * N; i++) begin
      re = re + z[i] * $cos(2.0 * PI * real'(b) * real'(i) / real'(2 * N));
      im = im - z[i] * $sin(2.0 * PI * real'(b) * real'(i) / real'(2 * N));
    end
    return re * re + im * im + 1.0e-12;
  endfunction

  initial begin
    automatic int tone_bin [5] = '{15, 26, 38, 51, 64};   // fin = bin * 2 GHz / 512
    automatic real dr = 19661.0 / 65536.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (tone_bin[f]) begin
      automatic real fn = real'(tone_bin[f]) / real'(2 * N);   // cycles per interleaved sample
      automatic real raw_db, lag_db, lsp_db;
      for (int k = 0; k < N + WARM; k++) begin
        @(negedge clk);
        adc1 = quant($sin(2.0 * PI * fn * real'(2 * k)));
        adc2 = quant($sin(2.0 * PI * fn * (real'(2 * k) + 1.0 - 2.0 * dr)));
        ce = 1'b1;
        #1;
        if (k >= WARM) begin
          zr[2*(k-WARM)] = real'(adc1);  zr[2*(k-WARM)+1] = real'(adc2);
          zl[2*(k-WARM)] = real'(l1) / 256.0;  zl[2*(k-WARM)+1] = real'(l2) / 256.0;
          zs[2*(k-WARM)] = real'(s1) / 256.0;  zs[2*(k-WARM)+1] = real'(s2) / 256.0;
        end
        @(posedge clk);
      end
      raw_db = 10.0 * $log10(bin_power(zr, tone_bin[f]) / bin_power(zr, N - tone_bin[f]));
      lag_db = 10.0 * $log10(bin_power(zl, tone_bin[f]) / bin_power(zl, N - tone_bin[f]));
      lsp_db = 10.0 * $log10(bin_power(zs, tone_bin[f]) / bin_power(zs, N - tone_bin[f]));
      $display("fin = %5.1f MHz: tone/spur raw %5.1f dB, Lagrange %5.1f dB, LSP %5.1f dB",
               fn * 2000.0, raw_db, lag_db, lsp_db);
      checks += 2;
      if (lag_db - raw_db < ((tone_bin[f] >= 26) ? 30.0 : 20.0)) begin failures++; $display("FAIL Lagrange improvement"); end
      if (lsp_db - raw_db < ((tone_bin[f] >= 26) ? 30.0 : 20.0)) begin failures++; $display("FAIL LSP improvement"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
