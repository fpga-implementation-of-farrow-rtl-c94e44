// prescaler_tb: divide-by-16 prescaler. fir_tick must come every 16 cycles,
// rom_tick exactly 8 cycles after each fir_tick, div must count, and a clear
// must restart the phase.
module prescaler_tb;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [3:0] div;
  logic fir_tick, rom_tick;
  prescaler #(.DIV_LOG2(4)) dut (.clk, .rst_n, .clear, .div, .fir_tick, .rom_tick);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0, last_fir = -1, last_rom = -1, n_fir = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      if (cyc == 300) clear = 1'b1;
      if (cyc == 301) clear = 1'b0;
      if (cyc >= 301 && cyc < 317) check(div == 4'(cyc - 301), $sformatf("div after clear %0d", div));
      if (cyc < 300) check(div == 4'(cyc), "div count");
      if (fir_tick) begin
        if (last_fir >= 0 && cyc < 300) check(cyc - last_fir == 16, "fir period");
        if (cyc > 301) check(cyc == 316 || cyc - last_fir == 16, "fir phase after clear");
        last_fir = cyc; n_fir++;
      end
      if (rom_tick) begin
        check(last_fir < 0 ? cyc == 7 : (cyc - last_fir == 8 || cyc == 308), "rom phase");
        last_rom = cyc;
      end
      check(!(fir_tick && rom_tick), "ticks together");
    end
    check(n_fir >= 30, "too few fir ticks");
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
