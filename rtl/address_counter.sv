// address_counter: ROM address generator of the filter test structure.
//
// addr starts at 0 and advances by one on each rising clk edge with inc high
// (once per sample period). After the last address (DEPTH-1) has been used,
// the counter holds and raises done, so every ROM word is presented exactly
// once per run. clear (synchronous) restarts a run; rst_n is the asynchronous
// power-on reset.
module address_counter #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          done
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      done <= 1'b0;
    end else if (clear) begin
      addr <= '0;
      done <= 1'b0;
    end else if (inc && !done) begin
      if (addr == LAST) done <= 1'b1;
      else              addr <= addr + 1'b1;
    end
  end

endmodule
