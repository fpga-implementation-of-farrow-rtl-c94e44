// farrow_test_top_tb: end-to-end test of the Farrow filter test structure at
// its default parameters (Lagrange coefficient set, d = 0.3, 256-word ROMs,
// clock divided by 16, 500,000-cycle switch debounce).
//
// The testbench works the expected filter outputs out on its own: it reads the
// ADC sample files, evaluates the ideal ninth-order Lagrange fractional-delay
// filter h(n) = prod_{k!=n} (4 + d - k)/(n - k) in floating point, and requires
// each corrected ADC1 sample to be within one output LSB (2^-8) of it; the
// ADC2 path must equal the input delayed by four samples exactly. It also
// checks the on-chip comparators (both must report a match), the sample rate
// (one sample per 16 clock cycles) and that every control mechanism happens:
// a bouncing switch that is rejected, a pause by the enable switch, the end of
// a run, and a restart through the reset switch.
module farrow_test_top_tb;
  import farrow_pkg::*;

  localparam int unsigned DEPTH    = 256;
  localparam int unsigned DIV      = 16;
  localparam int unsigned DEBOUNCE = 500_000;
  localparam real         DFRAC    = 19661.0 / 65536.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sw_reset = 1'b0;
  logic sw_enable = 1'b0;

  logic [3:0]  clk_div;
  logic [7:0]  addr;
  logic        done;
  adc_sample_t adc1_sample, adc2_sample;
  out_sample_t farrow_out1, farrow_out2, sim_out1, sim_out2;
  logic        cmp_strobe;
  logic [1:0]  cmp_ok;
  logic [15:0] compares, mismatches1, mismatches2;

  farrow_test_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_bounce_rejected = 0, n_pause = 0, n_done = 0, n_restart = 0, n_match = 0;

  logic [7:0] x1 [DEPTH];
  logic [7:0] x2 [DEPTH];
  real h [10];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic real sample1(int k);
    return (k < 0) ? 0.0 : real'($signed(x1[k]));
  endfunction

  // Checks done on every comparator strobe, sampled on the falling edge
  // before the rising edge that performs the comparison.
  int last_strobe = -1;
  int cycle = 0;
  bit check_rate = 1'b0;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (cmp_strobe) begin
      automatic int k = int'(addr);
      automatic real ref1 = 0.0;
      automatic real got1 = real'(farrow_out1) / 256.0;
      for (int n = 0; n < 10; n++) ref1 += h[n] * sample1(k - n);
      check((got1 - ref1 <= 1.0 / 256.0) && (ref1 - got1 <= 1.0 / 256.0),
            $sformatf("ADC1 sample %0d: got %f, ideal %f", k, got1, ref1));
      check(farrow_out2 == ((k >= 4) ? (out_sample_t'($signed(x2[k-4])) <<< 8) : '0),
            $sformatf("ADC2 sample %0d: got %0d", k, farrow_out2));
      check(sim_out1 == farrow_out1 && sim_out2 == farrow_out2,
            $sformatf("stored result differs at %0d", k));
      check(adc1_sample == x1[k] && adc2_sample == x2[k], $sformatf("ROM data at %0d", k));
      if (check_rate && last_strobe >= 0 && k != 0)
        check(cycle - last_strobe == DIV, $sformatf("sample spacing %0d cycles", cycle - last_strobe));
      last_strobe = cycle;
    end
  end

  // After each strobe the comparators must report a match on both channels.
  always @(negedge clk) begin
    if (dut.fir_ce === 1'b0 && $past(cmp_strobe)) begin
      check(cmp_ok == 2'b11, $sformatf("comparators report %b", cmp_ok));
      if (cmp_ok == 2'b11) n_match++;
    end
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic run_to_done();
    int guard = 0;
    while (!done && guard < DEPTH * DIV * 4) begin
      @(posedge clk);
      guard++;
    end
    check(done, "run did not finish");
    wait_cycles(DIV * 2);
    check(compares == 16'(DEPTH), $sformatf("compares = %0d", compares));
    check(mismatches1 == 0 && mismatches2 == 0,
          $sformatf("mismatches %0d %0d", mismatches1, mismatches2));
    check(addr == 8'(DEPTH - 1), "final address");
    if (done) n_done++;
  endtask

  initial begin
    $readmemh("rtl/adc1_in.hex", x1);
    $readmemh("rtl/adc2_in.hex", x2);
    for (int n = 0; n < 10; n++) begin
      h[n] = 1.0;
      for (int k = 0; k < 10; k++)
        if (k != n) h[n] = h[n] * (4.0 + DFRAC - real'(k)) / real'(n - k);
    end

    wait_cycles(5);
    rst_n = 1'b1;
    wait_cycles(5);

    // A bouncing enable switch: pulses shorter than the debounce time.
    for (int i = 0; i < 6; i++) begin
      sw_enable = ~sw_enable;
      wait_cycles(DEBOUNCE / 4 + i * 1000);
    end
    sw_enable = 1'b0;
    wait_cycles(DEBOUNCE / 2);
    check(compares == 0 && addr == 0, "bouncing switch started the test");
    if (compares == 0 && addr == 0) n_bounce_rejected++;

    // Clean enable: the run starts after the debounce time.
    sw_enable = 1'b1;
    wait_cycles(DEBOUNCE - 100);
    check(compares == 0, "enable acted before the debounce time");
    wait_cycles(DEBOUNCE / 10);
    check(compares != 0, "enable did not start the test");

    // Pause half way through the run and make sure nothing advances.
    while (addr < 8'(DEPTH / 2)) @(posedge clk);
    check_rate = 1'b1;
    sw_enable = 1'b0;
    wait_cycles(DEBOUNCE + 10);
    check_rate = 1'b0;
    begin
      automatic logic [7:0] held = addr;
      automatic logic [15:0] held_c = compares;
      wait_cycles(DEBOUNCE / 5);
      check(addr == held && compares == held_c, "test advanced while disabled");
      if (addr == held) n_pause++;
    end
    sw_enable = 1'b1;
    wait_cycles(DEBOUNCE + 10);
    last_strobe = -1;
    check_rate = 1'b1;
    run_to_done();

    // Restart through the reset switch.
    sw_reset = 1'b1;
    wait_cycles(DEBOUNCE + 10);
    check(addr == 0 && !done && compares == 0, "reset switch did not restart the test");
    if (addr == 0 && !done) n_restart++;
    last_strobe = -1;
    sw_reset = 1'b0;
    wait_cycles(DEBOUNCE + 10);
    run_to_done();

    check(n_match == 2 * DEPTH, $sformatf("matching comparisons %0d", n_match));
    check(n_bounce_rejected > 0, "bounce rejection never happened");
    check(n_pause > 0, "pause never happened");
    check(n_done == 2, "runs finished");
    check(n_restart > 0, "restart never happened");
    $display("mechanisms: bounce_rejected=%0d pause=%0d done=%0d restart=%0d matches=%0d",
             n_bounce_rejected, n_pause, n_done, n_restart, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_cycles(12 * DEBOUNCE);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
