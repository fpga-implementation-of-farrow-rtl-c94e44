// integer_delay_tb: random stream with an irregular clock enable; the output
// must be the input accepted DELAY enabled edges earlier (zero after reset).
module integer_delay_tb;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [7:0] x_in = '0, y;
  integer_delay #(.W(8), .DELAY(4)) dut (.clk, .rst_n, .ce, .x_in, .y);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  initial begin
    repeat (4) q.push_back(8'h00);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (y !== q[0]) begin failures++; $display("FAIL t=%0d y=%h exp=%h", t, y, q[0]); end
      x_in = 8'($urandom);
      ce = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (ce) begin q.push_back(x_in); void'(q.pop_front()); end
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
