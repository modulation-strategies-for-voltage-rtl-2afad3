// sample_filter: three-sample input qualifier used on the matrix converter's
// asynchronous inputs (voltage polarity, IGBT voltage comparators).
//
// Every bit is sampled each clock. When the last three samples of a bit are
// equal, that value is loaded into the output register; otherwise the output
// keeps its value. A change at the input thus appears at the output four
// clocks later, and pulses shorter than three clocks are ignored.
module sample_filter #(
  parameter int         WIDTH      = 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] s0, s1, s2;

  always_ff @(posedge clk) begin
    if (reset) begin
      s0 <= RESET_VALUE;
      s1 <= RESET_VALUE;
      s2 <= RESET_VALUE;
      q  <= RESET_VALUE;
    end else begin
      s0 <= d;
      s1 <= s0;
      s2 <= s1;
      for (int i = 0; i < WIDTH; i++)
        if (s0[i] == s1[i] && s1[i] == s2[i]) q[i] <= s2[i];
    end
  end

endmodule
