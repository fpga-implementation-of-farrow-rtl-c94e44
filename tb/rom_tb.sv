// rom_tb: reads the ADC1 test-data ROM in random order with random enables.
// The registered output must show, one clock after an enabled read, the word
// the testbench itself loaded from the same file, and must hold otherwise.
module rom_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] addr = '0, data;
  logic [7:0] golden [256];
  rom #(.DEPTH(256), .WIDTH(8), .INIT_FILE("rtl/adc1_in.hex")) dut (.clk, .rst_n, .en, .addr, .data);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] expect_d = '0;
  initial begin
    $readmemh("rtl/adc1_in.hex", golden);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      checks++;
      if (data !== expect_d) begin failures++; $display("FAIL t=%0d data=%h exp=%h", t, data, expect_d); end
      addr = (t < 256) ? 8'(t) : 8'($urandom);
      en = (t < 256) || ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (en) expect_d = golden[addr];
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
