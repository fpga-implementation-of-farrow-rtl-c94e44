// comparator: validation comparator of the filter test structure.
//
// On a rising clk edge with sample high it compares the filter output a with
// the expected (pre-simulated) value b and registers the result: eq is 1 when
// they are equal. It also counts the comparisons made and the mismatches seen
// since the last clear, saturating at their maximum. eq is 0 until the first
// comparison. clear is synchronous, rst_n asynchronous (active low).
module comparator #(
  parameter int unsigned W   = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             sample,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic             eq,
  output logic [CNT_W-1:0] compares,
  output logic [CNT_W-1:0] mismatches
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eq         <= 1'b0;
      compares   <= '0;
      mismatches <= '0;
    end else if (clear) begin
      eq         <= 1'b0;
      compares   <= '0;
      mismatches <= '0;
    end else if (sample) begin
      eq <= (a == b);
      if (compares != CNT_MAX) compares <= compares + 1'b1;
      if (a != b && mismatches != CNT_MAX) mismatches <= mismatches + 1'b1;
    end
  end

endmodule
