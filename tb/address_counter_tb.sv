// address_counter_tb: depth-10 counter driven by random increments. The
// address must follow a model count, stop at 9 and raise done on the next
// increment, and return to 0 on clear.
module address_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, inc = 1'b0;
  logic [3:0] addr;
  logic done;
  address_counter #(.DEPTH(10)) dut (.clk, .rst_n, .clear, .inc, .addr, .done);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_done = 0, n_clear = 0;
  int ma = 0;
  bit md = 0;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      checks++;
      if (addr != 4'(ma) || done != md) begin
        failures++; $display("FAIL t=%0d addr=%0d done=%b exp %0d %b", t, addr, done, ma, md);
      end
      inc = ($urandom_range(0, 1) == 1);
      clear = (t % 60 == 59);
      @(posedge clk);
      if (clear) begin ma = 0; md = 0; n_clear++; end
      else if (inc && !md) begin
        if (ma == 9) begin md = 1; n_done++; end else ma++;
      end
    end
    checks++;
    if (n_done == 0 || n_clear == 0) failures++;
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
