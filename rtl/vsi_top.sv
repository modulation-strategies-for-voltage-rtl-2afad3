// vsi_top: modulator for a two-level three-phase voltage source inverter.
//
// The host sets the three phase voltage references, the saw carrier, the
// modulation method (sinus, space vector or the new method that clamps the
// highest phase to the positive rail), the dead time and the operating
// modes through 16-bit registers on the Avalon port. The modulation unit
// adds the method's common voltage, three PWM units compare the result with
// a symmetric saw carrier and insert dead times, and the pulse blocking unit
// switches all gates off in programming mode, on pulse blocking, and - in
// safe mode - after a driver error.
//
// Units: vsi_avalon_decoder (registers, commands, status), saw_generator,
// vsi_modulation, three vsi_pwm_unit, vsi_pulse_blocking and
// vsi_error_handling. Settings flow from the decoder to the units with
// enable/acknowledge handshakes; the three PWM units load in lockstep, so
// their acknowledges are combined with AND.
//
// ERRORS_ACTIVE_LOW inverts errors_in for drivers that report an error with
// a 0; the error handling works with active-high errors. Gate outputs are 1
// for "IGBT on". From a host write of new PWM values plus the PWM DATA
// ENABLE command, the new duty cycle appears at the start of the next carrier
// period.
module vsi_top
  import avalon_pkg::*;
#(
  parameter bit ERRORS_ACTIVE_LOW = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  avalon_req_t avalon_req,
  output logic [15:0] avalon_data_read,
  input  logic [5:0]  errors_in,
  output logic        error_confirm,
  output logic        igbt_u_up,
  output logic        igbt_u_down,
  output logic        igbt_v_up,
  output logic        igbt_v_down,
  output logic        igbt_w_up,
  output logic        igbt_w_down
);

  logic programming_mode, pulse_blocking, dead_time_on, saw_restart;
  logic [15:0] saw_period;
  logic [7:0]  saw_divider;
  logic saw_data_enable, saw_ack;
  logic signed [15:0] dec_u, dec_v, dec_w;
  logic dec_pwm_enable, dec_pwm_ack;
  logic [1:0] method;
  logic method_enable, method_ack;
  logic [7:0] dead_time_value;
  logic dead_time_enable, dead_time_ack;
  logic pc_confirm, pc_error_interrupt;
  logic [5:0] error_flags;
  logic [15:0] saw, period_now;
  logic saw_sync;
  logic [16:0] lvl_u, lvl_v, lvl_w;
  logic pwm_enable, pwm_ack;
  logic [2:0] pwm_acks, dt_acks;
  logic u_up, u_down, v_up, v_down, w_up, w_down;

  vsi_avalon_decoder u_decoder (
    .clk, .reset, .avalon_req, .avalon_data_read,
    .programming_mode, .pulse_blocking, .dead_time_on, .saw_restart,
    .saw_period, .saw_frequency_divider(saw_divider),
    .saw_data_enable, .saw_data_ack(saw_ack),
    .pwm_u_value(dec_u), .pwm_v_value(dec_v), .pwm_w_value(dec_w),
    .pwm_data_enable(dec_pwm_enable), .pwm_data_ack(dec_pwm_ack),
    .modulation_method(method), .modulation_enable(method_enable),
    .modulation_ack(method_ack),
    .dead_time_value, .dead_time_enable, .dead_time_ack,
    .pc_confirm, .pc_error_interrupt, .pc_error_flag_register(error_flags)
  );

  saw_generator #(.LOAD_AT_SYNC(1'b1)) u_saw (
    .clk, .reset, .internal_reset(saw_restart), .programming_mode,
    .saw_period, .saw_frequency_divider(saw_divider), .saw_data_enable,
    .saw_ack, .saw_out(saw), .period_now, .saw_sync
  );

  vsi_modulation u_modulation (
    .clk, .reset, .programming_mode,
    .modulation_method_in(method), .modulation_enable(method_enable),
    .modulation_ack(method_ack), .period_now,
    .pwm_u_in(dec_u), .pwm_v_in(dec_v), .pwm_w_in(dec_w),
    .pwm_data_enable_in(dec_pwm_enable), .pwm_data_ack_out(dec_pwm_ack),
    .pwm_u_value(lvl_u), .pwm_v_value(lvl_v), .pwm_w_value(lvl_w),
    .pwm_data_enable_out(pwm_enable), .pwm_data_ack_in(pwm_ack)
  );

  vsi_pwm_unit u_pwm_u (
    .clk, .reset, .programming_mode, .saw_sync, .saw_input(saw),
    .pwm_value_in(lvl_u), .pwm_data_enable(pwm_enable), .pwm_data_ack(pwm_acks[0]),
    .dead_time_value_in(dead_time_value), .dead_time_enable, .dead_time_ack(dt_acks[0]),
    .dead_time_on_in(dead_time_on), .igbt_up(u_up), .igbt_down(u_down)
  );
  vsi_pwm_unit u_pwm_v (
    .clk, .reset, .programming_mode, .saw_sync, .saw_input(saw),
    .pwm_value_in(lvl_v), .pwm_data_enable(pwm_enable), .pwm_data_ack(pwm_acks[1]),
    .dead_time_value_in(dead_time_value), .dead_time_enable, .dead_time_ack(dt_acks[1]),
    .dead_time_on_in(dead_time_on), .igbt_up(v_up), .igbt_down(v_down)
  );
  vsi_pwm_unit u_pwm_w (
    .clk, .reset, .programming_mode, .saw_sync, .saw_input(saw),
    .pwm_value_in(lvl_w), .pwm_data_enable(pwm_enable), .pwm_data_ack(pwm_acks[2]),
    .dead_time_value_in(dead_time_value), .dead_time_enable, .dead_time_ack(dt_acks[2]),
    .dead_time_on_in(dead_time_on), .igbt_up(w_up), .igbt_down(w_down)
  );

  assign pwm_ack       = &pwm_acks;
  assign dead_time_ack = &dt_acks;

  vsi_pulse_blocking u_blocking (
    .clk, .reset, .programming_mode, .pulse_blocking,
    .u_down_in(u_down), .u_up_in(u_up), .v_down_in(v_down), .v_up_in(v_up),
    .w_down_in(w_down), .w_up_in(w_up),
    .u_down_out(igbt_u_down), .u_up_out(igbt_u_up), .v_down_out(igbt_v_down),
    .v_up_out(igbt_v_up), .w_down_out(igbt_w_down), .w_up_out(igbt_w_up)
  );

  vsi_error_handling u_errors (
    .clk, .reset,
    .errors_in(ERRORS_ACTIVE_LOW ? ~errors_in : errors_in),
    .pc_confirm, .error_confirm_out(error_confirm),
    .pc_error_flag_register(error_flags), .pc_error_interrupt
  );

endmodule
