// comparator_tb: random equal and unequal pairs with random strobes. eq must
// reflect the last sampled pair; the comparison and mismatch counts (4-bit
// here, to reach saturation) must follow a model and saturate at 15; clear
// must zero everything.
module comparator_tb;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sample = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic eq;
  logic [3:0] compares, mismatches;
  comparator #(.W(16), .CNT_W(4)) dut (.clk, .rst_n, .clear, .sample, .a, .b, .eq, .compares, .mismatches);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit meq = 0;
  int mc = 0, mm = 0;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (eq != meq || compares != 4'(mc) || mismatches != 4'(mm)) begin
        failures++;
        $display("FAIL t=%0d eq=%b c=%0d m=%0d exp %b %0d %0d", t, eq, compares, mismatches, meq, mc, mm);
      end
      a = 16'($urandom);
      b = ($urandom_range(0, 3) == 0) ? a ^ (16'd1 << $urandom_range(0, 15)) : a;
      sample = ($urandom_range(0, 1) == 1);
      clear = (t % 100 == 99);
      @(posedge clk);
      if (clear) begin meq = 0; mc = 0; mm = 0; end
      else if (sample) begin
        meq = (a == b);
        if (mc < 15) mc++;
        if (a != b && mm < 15) mm++;
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
