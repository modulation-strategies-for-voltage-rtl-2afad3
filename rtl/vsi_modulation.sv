// vsi_modulation: common-voltage injection of the VSI modulator.
//
// The host writes three phase references v1..v3 (two's complement, in saw
// counts; the DC half voltage V_DC corresponds to half the saw period). The
// unit adds the common voltage v0 of the chosen method:
//   sinus modulation (SM):       v0 = 0
//   space vector modulation:     v0 = -(max(v) + min(v)) / 2
//   new method (NewM):           v0 = V_DC - max(v)
// NewM clamps the phase with the highest reference to +V_DC, so that half
// bridge does not switch for a third of the output period. The result is
// turned into a compare level for the saw carrier, level = v + v0 + V_DC
// with V_DC = (p + 1) / 2, limited to 0 .. p + 1 (0: lower IGBT always on,
// p + 1: upper IGBT always on). For the clamp of NewM to be exact, p should
// be odd.
//
// Timing: the calculation is a two-stage pipeline (max/min, then levels), so
// pwm_data_enable_in is passed to the PWM units two clocks later
// (enable_tunneling). The PWM units' acknowledge is passed back to the
// control unit and clears the pipelined enable.
//
// The method register arrives with its own handshake and is taken while in
// programming mode or while no PWM data request is pending. Method code 3
// is treated as SM. The level offset and clamping are choices of this
// design; the three common-voltage equations are the source's.
module vsi_modulation
  import vsi_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               programming_mode,
  input  logic [1:0]         modulation_method_in,
  input  logic               modulation_enable,
  output logic               modulation_ack,
  input  logic [15:0]        period_now,
  input  logic signed [15:0] pwm_u_in,
  input  logic signed [15:0] pwm_v_in,
  input  logic signed [15:0] pwm_w_in,
  input  logic               pwm_data_enable_in,
  output logic               pwm_data_ack_out,
  output logic [16:0]        pwm_u_value,
  output logic [16:0]        pwm_v_value,
  output logic [16:0]        pwm_w_value,
  output logic               pwm_data_enable_out,
  input  logic               pwm_data_ack_in
);

  logic [1:0]         method;
  logic signed [17:0] s1_v [3];
  logic signed [17:0] s1_max, s1_min, s1_half, s1_top;
  logic               en_d1, en_d2;

  // new_settings
  always_ff @(posedge clk) begin
    if (reset) begin
      method         <= MOD_SM;
      modulation_ack <= 1'b0;
    end else begin
      modulation_ack <= 1'b0;
      if (modulation_enable && !modulation_ack &&
          (programming_mode || !pwm_data_enable_in)) begin
        method         <= modulation_method_in;
        modulation_ack <= 1'b1;
      end
    end
  end

  // computation, stage 1: register the references, find max and min
  always_ff @(posedge clk) begin
    logic signed [17:0] a, b, c;
    if (reset) begin
      for (int i = 0; i < 3; i++) s1_v[i] <= '0;
      s1_max  <= '0;
      s1_min  <= '0;
      s1_half <= '0;
      s1_top  <= '0;
    end else begin
      a = 18'(pwm_u_in);
      b = 18'(pwm_v_in);
      c = 18'(pwm_w_in);
      s1_v[0] <= a;
      s1_v[1] <= b;
      s1_v[2] <= c;
      s1_max  <= (a >= b) ? ((a >= c) ? a : c) : ((b >= c) ? b : c);
      s1_min  <= (a <= b) ? ((a <= c) ? a : c) : ((b <= c) ? b : c);
      s1_half <= $signed({1'b0, 17'((17'(period_now) + 17'd1) >> 1)});
      s1_top  <= $signed({1'b0, 17'(period_now) + 17'd1});
    end
  end

  // computation, stage 2: common voltage and compare levels
  function automatic logic [16:0] to_level(input logic signed [17:0] x,
                                           input logic signed [17:0] top);
    if (x < 0)        return '0;
    else if (x > top) return top[16:0];
    else              return x[16:0];
  endfunction

  always_ff @(posedge clk) begin
    logic signed [17:0] v0;
    if (reset) begin
      pwm_u_value <= '0;
      pwm_v_value <= '0;
      pwm_w_value <= '0;
    end else begin
      unique case (method)
        MOD_SVM:  v0 = -((s1_max + s1_min) >>> 1);
        MOD_NEWM: v0 = s1_half - s1_max;
        default:  v0 = '0;
      endcase
      pwm_u_value <= to_level(s1_v[0] + v0 + s1_half, s1_top);
      pwm_v_value <= to_level(s1_v[1] + v0 + s1_half, s1_top);
      pwm_w_value <= to_level(s1_v[2] + v0 + s1_half, s1_top);
    end
  end

  // enable_tunneling
  always_ff @(posedge clk) begin
    if (reset || pwm_data_ack_in) begin
      en_d1 <= 1'b0;
      en_d2 <= 1'b0;
    end else begin
      en_d1 <= pwm_data_enable_in;
      en_d2 <= en_d1 && pwm_data_enable_in;
    end
  end

  assign pwm_data_enable_out = en_d2 && pwm_data_enable_in;
  assign pwm_data_ack_out    = pwm_data_ack_in;

endmodule
