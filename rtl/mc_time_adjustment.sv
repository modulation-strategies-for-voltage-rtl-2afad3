// mc_time_adjustment: turns the five pattern times of the matrix converter
// modulator into compare thresholds for the saw carrier.
//
// The carrier counts 0..p and back, and one switching period is the up ramp
// followed by the mirrored down ramp. On each ramp the saw value s selects
// the part of the pattern; the thresholds c1 <= c2 <= c3 <= c4 <= c5 split
// 0..p into six parts: two active vectors and a zero vector with the first
// rectifier vector, then a zero vector and two active vectors with the
// second rectifier vector. With the times T1 = T_INPUT_1, T11, T12, T21,
// T22 and P = p + 1:
//   standard order (v_i1, v_i2, v0 | v0, v_i2, v_i1):
//     c1 = T11, c2 = T11 + T12, c3 = T1, c4 = P - T21 - T22, c5 = P - T21
//   optimized pattern and odd sum of the two sector numbers
//   (v_i2, v_i1, v0 | v0, v_i1, v_i2):
//     c1 = T12, c2 = T12 + T11, c3 = T1, c4 = P - T21 - T22, c5 = P - T22
// Over a full period this gives the sequence of the switching pattern
// tables: half of the first rectifier vector's time, all of the second
// one's in the middle, and the other half at the end, with the zero vector
// split around the rectifier change. c4 and c5 are limited at 0.
//
// Timing: the calculation takes one clock, so output_data_enable follows
// input_data_enable one clock later (enable_routing) and is withdrawn by the
// modulator's data_ack, which is passed back as input_data_ack.
// The threshold formulas are this design's reading of the pattern tables.
module mc_time_adjustment (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] period_now,
  input  logic        optimized,
  input  logic [15:0] t_input_1,
  input  logic [15:0] t_11,
  input  logic [15:0] t_12,
  input  logic [15:0] t_21,
  input  logic [15:0] t_22,
  input  logic [7:0]  sector_in,
  input  logic        input_data_enable,
  output logic        input_data_ack,
  output logic [16:0] value1,
  output logic [16:0] value2,
  output logic [16:0] value3,
  output logic [16:0] value4,
  output logic [16:0] value5,
  output logic [7:0]  sector_out,
  output logic        output_data_enable,
  input  logic        data_ack
);

  logic       swap;
  logic [4:0] sector_sum;

  assign sector_sum = 5'(sector_in[7:4]) + 5'(sector_in[3:0]);
  assign swap       = optimized && sector_sum[0];

  function automatic logic [16:0] sub_sat(input logic [16:0] a, input logic [16:0] b);
    return (a > b) ? a - b : 17'd0;
  endfunction

  // adjustment
  always_ff @(posedge clk) begin
    logic [16:0] p1;
    if (reset) begin
      value1     <= '0;
      value2     <= '0;
      value3     <= '0;
      value4     <= '0;
      value5     <= '0;
      sector_out <= '0;
    end else begin
      p1 = 17'(period_now) + 17'd1;
      value1     <= swap ? 17'(t_12) : 17'(t_11);
      value2     <= 17'(t_11) + 17'(t_12);
      value3     <= 17'(t_input_1);
      value4     <= sub_sat(p1, 17'(t_21) + 17'(t_22));
      value5     <= sub_sat(p1, swap ? 17'(t_22) : 17'(t_21));
      sector_out <= sector_in;
    end
  end

  // enable_routing
  always_ff @(posedge clk) begin
    if (reset || data_ack) output_data_enable <= 1'b0;
    else                   output_data_enable <= input_data_enable;
  end

  assign input_data_ack = data_ack;

endmodule
