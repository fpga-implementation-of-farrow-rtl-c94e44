// prescaler: divides the board clock into the slow, synchronised rates that
// pace the filter test.
//
// A free-running DIV_LOG2-bit counter divides clk by 2**DIV_LOG2 per bit:
// div[i] is clk / 2**(i+1). The slowest output, div[DIV_LOG2-1], is the sample
// clock (FIRCLK); its inverse is InvClk, which clocks the ROMs. Because the
// whole design runs on clk, the two edges are delivered as one-cycle enables:
//   fir_tick  high in the clk cycle before the rising edge of the sample clock
//   rom_tick  high in the clk cycle before its falling edge (InvClk rising)
// so there are 2**DIV_LOG2 clk cycles per sample and the ROM is read half a
// sample period ahead of the filter. clear (synchronous) restarts the phase.
module prescaler #(
  parameter int unsigned DIV_LOG2 = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  output logic [DIV_LOG2-1:0] div,
  output logic                fir_tick,
  output logic                rom_tick
);

  localparam logic [DIV_LOG2-1:0] ALL_ONES  = '1;
  localparam logic [DIV_LOG2-1:0] HALF_LAST = ALL_ONES >> 1;

  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (clear) cnt <= '0;
    else            cnt <= cnt + 1'b1;
  end

  assign div      = cnt;
  assign fir_tick = (cnt == ALL_ONES) && !clear;
  assign rom_tick = (cnt == HALF_LAST) && !clear;

  initial assert (DIV_LOG2 >= 2) else $error("prescaler: DIV_LOG2 must be at least 2");

endmodule
