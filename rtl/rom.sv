// rom: synchronous read-only memory holding pre-computed test data.
//
// DEPTH words of WIDTH bits, loaded at start-up from the hex file INIT_FILE
// (one word per line). The read is registered: on a rising clk edge with en
// high, data takes the word at addr. In the test structure en is the tick of
// the inverted slow clock, half a sample period before the filter clock, so the
// data is stable when the filter samples it. rst_n (asynchronous, active low)
// clears the output register only; the contents are fixed.
module rom #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned WIDTH     = 8,
  parameter string       INIT_FILE = "rtl/adc1_in.hex",
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data <= '0;
    else if (en) data <= mem[addr];
  end

endmodule
