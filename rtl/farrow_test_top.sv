// farrow_test_top: on-chip test structure for the Farrow clock-skew
// correction filter of a two-channel time-interleaved ADC.
//
// Four ROMs hold a pre-computed test vector set: the samples of ADC1 and ADC2
// (a sine digitised by two 8-bit ADCs, the input of ADC2 delayed by d of its period,
// with white noise) and the outputs the correction filter is expected to give
// for them. An address counter walks the ROMs once; the samples go through the
// skew correction filter and two comparators check each filter output against
// the stored expected value. cmp_ok reads 2'b11 while both channels match.
//
// Timing: a prescaler divides clk by 2**DIV_LOG2 into the sample clock. Half a
// sample period after each address update the ROMs are read (inverted sample
// clock); on the next sample-clock edge the comparators sample the filter
// outputs, the filter delay lines advance and the address increments. So one
// sample is processed per 2**DIV_LOG2 clk cycles, ROM_DEPTH samples per run.
//
// Control: two board switches, each through a debounce circuit. sw_reset high
// holds the test in reset and restarts it; sw_enable high lets it run, low
// pauses it between samples. rst_n is the power-on reset (asynchronous, active
// low). The ROM contents must have been generated for the same KIND and D_CODE
// as the parameters here. The sizes of the prescaler, the debounce time and
// the ROM depth are this design's choices; the structure follows the source.
// A simulation assertion checks that both comparators count alike; it is
// disabled during power-on reset, which is why lint tools may report rst_n as
// used both synchronously and asynchronously.
module farrow_test_top
  import farrow_pkg::*;
#(
  parameter farrow_kind_e KIND            = FARROW_LAGRANGE,
  parameter frac_delay_t  D_CODE          = 16'd19661,  // d = 0.3
  parameter int unsigned  ROM_DEPTH       = 256,
  parameter int unsigned  DIV_LOG2        = 4,
  parameter int unsigned  DEBOUNCE_CYCLES = 500_000,
  parameter string        ADC1_IN_FILE    = "rtl/adc1_in.hex",
  parameter string        ADC2_IN_FILE    = "rtl/adc2_in.hex",
  parameter string        ADC1_OUT_FILE   = (KIND == FARROW_LAGRANGE) ? "rtl/adc1_out_lagrange.hex"
                                                                      : "rtl/adc1_out_lsp.hex",
  parameter string        ADC2_OUT_FILE   = "rtl/adc2_out.hex",
  localparam int unsigned AW              = (ROM_DEPTH > 1) ? $clog2(ROM_DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sw_reset,
  input  logic                sw_enable,
  // monitor outputs (the signals observed with the on-chip logic analyser)
  output logic [DIV_LOG2-1:0] clk_div,
  output logic [AW-1:0]       addr,
  output logic                done,
  output adc_sample_t         adc1_sample,
  output adc_sample_t         adc2_sample,
  output out_sample_t         farrow_out1,
  output out_sample_t         farrow_out2,
  output out_sample_t         sim_out1,
  output out_sample_t         sim_out2,
  output logic                cmp_strobe,
  output logic [1:0]          cmp_ok,
  output logic [15:0]         compares,
  output logic [15:0]         mismatches1,
  output logic [15:0]         mismatches2
);

  logic reset_db, enable_db;
  logic test_rst_n;
  logic fir_tick, rom_tick;
  logic running, loaded, rom_rd, fir_ce;
  logic [15:0] compares2;

  // ---- switch inputs ------------------------------------------------------
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_reset (
    .clk(clk), .rst_n(rst_n), .sw(sw_reset), .q(reset_db)
  );
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_enable (
    .clk(clk), .rst_n(rst_n), .sw(sw_enable), .q(enable_db)
  );

  // Registered reset for the filter and ROM registers (power-on or switch).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) test_rst_n <= 1'b0;
    else        test_rst_n <= !reset_db;
  end

  // ---- timing -------------------------------------------------------------
  prescaler #(.DIV_LOG2(DIV_LOG2)) u_prescaler (
    .clk(clk), .rst_n(rst_n), .clear(reset_db),
    .div(clk_div), .fir_tick(fir_tick), .rom_tick(rom_tick)
  );

  assign running = enable_db && !done && !reset_db;
  assign rom_rd  = rom_tick && running && !loaded;
  assign fir_ce  = fir_tick && running && loaded;

  // loaded: the ROM outputs hold a sample not yet taken by the filter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        loaded <= 1'b0;
    else if (reset_db) loaded <= 1'b0;
    else if (rom_rd)   loaded <= 1'b1;
    else if (fir_ce)   loaded <= 1'b0;
  end

  address_counter #(.DEPTH(ROM_DEPTH)) u_addr (
    .clk(clk), .rst_n(rst_n), .clear(reset_db), .inc(fir_ce),
    .addr(addr), .done(done)
  );

  // ---- test data ----------------------------------------------------------
  rom #(.DEPTH(ROM_DEPTH), .WIDTH(ADC_W), .INIT_FILE(ADC1_IN_FILE)) u_rom_adc1 (
    .clk(clk), .rst_n(test_rst_n), .en(rom_rd), .addr(addr), .data(adc1_sample)
  );
  rom #(.DEPTH(ROM_DEPTH), .WIDTH(ADC_W), .INIT_FILE(ADC2_IN_FILE)) u_rom_adc2 (
    .clk(clk), .rst_n(test_rst_n), .en(rom_rd), .addr(addr), .data(adc2_sample)
  );
  rom #(.DEPTH(ROM_DEPTH), .WIDTH(OUT_W), .INIT_FILE(ADC1_OUT_FILE)) u_rom_out1 (
    .clk(clk), .rst_n(test_rst_n), .en(rom_rd), .addr(addr), .data(sim_out1)
  );
  rom #(.DEPTH(ROM_DEPTH), .WIDTH(OUT_W), .INIT_FILE(ADC2_OUT_FILE)) u_rom_out2 (
    .clk(clk), .rst_n(test_rst_n), .en(rom_rd), .addr(addr), .data(sim_out2)
  );

  // ---- device under test --------------------------------------------------
  skew_correction_filter #(.KIND(KIND)) u_filter (
    .clk(clk), .rst_n(test_rst_n), .ce(fir_ce),
    .adc1(adc1_sample), .adc2(adc2_sample), .d(D_CODE),
    .out1(farrow_out1), .out2(farrow_out2)
  );

  // ---- validation ---------------------------------------------------------
  comparator #(.W(OUT_W), .CNT_W(16)) u_cmp1 (
    .clk(clk), .rst_n(rst_n), .clear(reset_db), .sample(fir_ce),
    .a(farrow_out1), .b(sim_out1),
    .eq(cmp_ok[0]), .compares(compares), .mismatches(mismatches1)
  );
  comparator #(.W(OUT_W), .CNT_W(16)) u_cmp2 (
    .clk(clk), .rst_n(rst_n), .clear(reset_db), .sample(fir_ce),
    .a(farrow_out2), .b(sim_out2),
    .eq(cmp_ok[1]), .compares(compares2), .mismatches(mismatches2)
  );

  assign cmp_strobe = fir_ce;

  // Both comparators see the same strobe, so their counts must agree.
  a_counts_agree: assert property (@(posedge clk) disable iff (!rst_n) compares2 == compares)
    else $error("farrow_test_top: comparator counts differ");

endmodule
