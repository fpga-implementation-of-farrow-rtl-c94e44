// integer_delay: fixed integer delay line for one ADC channel.
//
// Delays the input stream by DELAY samples. In the skew correction filter it
// gives the uncorrected channel (ADC2) the same integer delay DINT that the
// Farrow filter adds to the corrected channel (ADC1), so both outputs stay
// aligned. Like the Farrow filter, the output is taken straight from the last
// register: on a rising clk edge with ce high, x_in enters the line and the
// oldest sample moves to y. DELAY registers of W bits; DELAY = 0 is a wire.
// rst_n (asynchronous, active low) clears the line.
module integer_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [W-1:0] x_in,
  output logic [W-1:0] y
);

  if (DELAY == 0) begin : g_wire
    assign y = x_in;
  end else begin : g_line
    logic [W-1:0] line [DELAY];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) line[i] <= '0;
      end else if (ce) begin
        line[0] <= x_in;
        for (int i = 1; i < int'(DELAY); i++) line[i] <= line[i-1];
      end
    end

    assign y = line[DELAY-1];
  end

endmodule
