// vsi_pulse_blocking: last stage before the VSI gate outputs. While
// programming mode or pulse blocking is on, all six gate signals are forced
// to 0 (IGBT off); otherwise the PWM units' signals are passed through one
// register stage. Outputs are registered, so a block takes effect one clock
// after the request.
module vsi_pulse_blocking (
  input  logic clk,
  input  logic reset,
  input  logic programming_mode,
  input  logic pulse_blocking,
  input  logic u_down_in,
  input  logic u_up_in,
  input  logic v_down_in,
  input  logic v_up_in,
  input  logic w_down_in,
  input  logic w_up_in,
  output logic u_down_out,
  output logic u_up_out,
  output logic v_down_out,
  output logic v_up_out,
  output logic w_down_out,
  output logic w_up_out
);

  always_ff @(posedge clk) begin
    if (reset || programming_mode || pulse_blocking) begin
      {u_down_out, u_up_out, v_down_out, v_up_out, w_down_out, w_up_out} <= '0;
    end else begin
      {u_down_out, u_up_out, v_down_out, v_up_out, w_down_out, w_up_out} <=
        {u_down_in, u_up_in, v_down_in, v_up_in, w_down_in, w_up_in};
    end
  end

endmodule
