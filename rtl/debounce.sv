// debounce: switch debounce circuit.
//
// The raw switch level is first synchronised to clk with two flip-flops. The
// debounced output q follows the synchronised level only after it has differed
// from q for STABLE_CYCLES consecutive clk cycles; any bounce back restarts the
// count. With the default of 500,000 cycles a 50 MHz clock gives 10 ms. q
// changes STABLE_CYCLES + 2 cycles after a clean switch edge. rst_n
// (asynchronous, active low) sets q and the synchroniser to 0.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 500_000,
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sw,
  output logic q
);

  logic          sync1, sync2;
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
      count <= '0;
      q     <= 1'b0;
    end else begin
      sync1 <= sw;
      sync2 <= sync1;
      if (sync2 == q) begin
        count <= '0;
      end else if (count == CW'(STABLE_CYCLES - 1)) begin
        count <= '0;
        q     <= sync2;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
