// mc_top: indirect space vector modulator for a three-phase to three-phase
// matrix converter with nine bidirectional switches (18 IGBTs).
//
// The host computes, once per control period, the sector numbers of the
// virtual rectifier (input current) and virtual inverter (output voltage)
// and five pattern times in saw counts, and writes them through the Avalon
// port. mc_time_adjustment turns the times into compare thresholds for the
// chosen switching pattern, mc_modulator compares them with the symmetric
// saw carrier and looks up which input phase each output phase is joined
// to, and mc_commutation moves each output phase between input phases with
// four step voltage commutation or two step current commutation, so that
// input phases are never shorted and the load current is never cut.
// mc_voltage_current_direction supplies the input voltage polarities (from
// the host) and the output current signs (from IGBT voltage comparators);
// mc_error_handling captures driver errors, which block the pulses in safe
// mode.
//
// Buses of 18 bits: [8:0] input-side IGBTs, [17:9] output-side IGBTs, each
// in the mc_pkg switch bit order (AU bit 8 ... CW bit 0). voltage_in is
// {V_WU, V_VW, V_UV}. The driver connector carries inverted error and
// comparator lines; INPUTS_ACTIVE_LOW = 1 inverts errors_in and comp_in.
// Gate outputs are 1 for "IGBT on".
module mc_top
  import avalon_pkg::*;
#(
  parameter bit INPUTS_ACTIVE_LOW = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  avalon_req_t avalon_req,
  output logic [15:0] avalon_data_read,
  input  logic [17:0] errors_in,
  input  logic [17:0] comp_in,
  input  logic [2:0]  voltage_in,
  output logic [17:0] gates
);

  logic programming_mode, pulse_blocking, optimized, four_step, saw_restart;
  logic [15:0] saw_period;
  logic [7:0]  saw_divider;
  logic saw_data_enable, saw_ack;
  logic [15:0] t_in1, t11, t12, t21, t22;
  logic [7:0]  sector, sector_adj;
  logic times_enable, times_ack;
  logic [7:0] dead_time_value;
  logic dead_time_enable, dead_time_ack;
  logic pc_confirm, pc_error_interrupt;
  logic [8:0] err1, err2;
  logic [15:0] saw, period_now;
  logic saw_sync;
  logic [16:0] v1, v2, v3, v4, v5;
  logic out_enable, data_ack;
  logic [8:0] sw;
  logic v_uv, v_vw, v_wu;
  logic [2:0] i_pos, i_neg, four_step_active;
  logic [8:0] gate_I, gate_O;
  logic [17:0] errors, comps;

  assign errors = INPUTS_ACTIVE_LOW ? ~errors_in : errors_in;
  assign comps  = INPUTS_ACTIVE_LOW ? ~comp_in   : comp_in;

  mc_avalon_decoder u_decoder (
    .clk, .reset, .avalon_req, .avalon_data_read,
    .programming_mode, .pulse_blocking, .optimized, .four_step, .saw_restart,
    .saw_period, .saw_frequency_divider(saw_divider),
    .saw_data_enable, .saw_data_ack(saw_ack),
    .t_input_1(t_in1), .t_11(t11), .t_12(t12), .t_21(t21), .t_22(t22),
    .sector, .times_data_enable(times_enable), .times_data_ack(times_ack),
    .dead_time_value, .dead_time_enable, .dead_time_ack,
    .pc_confirm, .pc_error_interrupt,
    .pc_error_flag_register1(err1), .pc_error_flag_register2(err2)
  );

  saw_generator #(.LOAD_AT_SYNC(1'b0)) u_saw (
    .clk, .reset, .internal_reset(saw_restart), .programming_mode,
    .saw_period, .saw_frequency_divider(saw_divider), .saw_data_enable,
    .saw_ack, .saw_out(saw), .period_now, .saw_sync
  );

  mc_time_adjustment u_time_adjustment (
    .clk, .reset, .period_now, .optimized,
    .t_input_1(t_in1), .t_11(t11), .t_12(t12), .t_21(t21), .t_22(t22),
    .sector_in(sector), .input_data_enable(times_enable), .input_data_ack(times_ack),
    .value1(v1), .value2(v2), .value3(v3), .value4(v4), .value5(v5),
    .sector_out(sector_adj), .output_data_enable(out_enable), .data_ack
  );

  mc_modulator u_modulator (
    .clk, .reset, .optimized, .saw, .programming_mode, .saw_sync,
    .value1(v1), .value2(v2), .value3(v3), .value4(v4), .value5(v5),
    .sector(sector_adj), .output_data_enable(out_enable), .data_ack, .sw
  );

  mc_commutation u_commutation (
    .clk, .reset, .programming_mode, .pulse_blocking, .four_step, .sw,
    .v_uv, .v_vw, .v_wu, .i_positive(i_pos), .i_negative(i_neg),
    .dead_time_value, .dead_time_enable, .dead_time_ack,
    .gate_I, .gate_O, .four_step_active
  );

  mc_voltage_current_direction u_direction (
    .clk, .reset, .programming_mode, .pulse_blocking,
    .V_UV_input(voltage_in[0]), .V_VW_input(voltage_in[1]), .V_WU_input(voltage_in[2]),
    .comp_I(comps[8:0]), .comp_O(comps[17:9]), .gate_I, .gate_O,
    .V_UV(v_uv), .V_VW(v_vw), .V_WU(v_wu), .i_positive(i_pos), .i_negative(i_neg)
  );

  mc_error_handling u_errors (
    .clk, .reset, .errors_in1(errors[8:0]), .errors_in2(errors[17:9]), .pc_confirm,
    .pc_error_flag_register1(err1), .pc_error_flag_register2(err2), .pc_error_interrupt
  );

  assign gates = {gate_O, gate_I};

endmodule
