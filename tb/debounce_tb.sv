// debounce_tb: 20-cycle debounce. Bounces shorter than 20 cycles must never
// reach q; a clean edge must appear on q exactly 22 clock edges after the
// switch changes (two synchroniser stages plus 20 stable cycles).
module debounce_tb;
  logic clk = 1'b0, rst_n = 1'b0, sw = 1'b0, q;
  debounce #(.STABLE_CYCLES(20)) dut (.clk, .rst_n, .sw, .q);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic edge_test(input logic lvl);
    int n = 0;
    // bounces
    for (int b = 0; b < 5; b++) begin
      sw = lvl; repeat ($urandom_range(1, 15)) @(negedge clk);
      checks++; if (q == lvl) begin failures++; $display("FAIL bounce reached q"); end
      sw = !lvl; repeat ($urandom_range(1, 15)) @(negedge clk);
      checks++; if (q == lvl) begin failures++; $display("FAIL bounce reached q"); end
    end
    repeat (25) @(negedge clk);
    sw = lvl;
    while (q != lvl && n < 100) begin @(posedge clk); n++; #1; end
    checks++;
    if (n != 22) begin failures++; $display("FAIL edge to q took %0d edges", n); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      edge_test(1'b1);
      @(negedge clk);
      edge_test(1'b0);
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
