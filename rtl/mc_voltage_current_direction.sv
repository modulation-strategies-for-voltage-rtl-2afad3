// mc_voltage_current_direction: polarity inputs for the matrix converter's
// commutation.
//
// Input line-to-line voltage polarities V_UV, V_VW, V_WU (1 = positive, set
// by the host's control program through a parallel port) are qualified with
// a three-sample filter: a value is taken once it has been the same for
// three clock samples.
//
// For each output phase Y a mc_current_decoder finds the output current
// sign. The connected input phase is taken from the actual gate signals:
// input phase X counts as connected when either IGBT of switch YX is on.
// comp_I / comp_O are the comparator outputs of the input-side and
// output-side IGBTs in the mc_pkg switch bit order. i_positive /
// i_negative: bit 0 phase A, 1 B, 2 C.
module mc_voltage_current_direction
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       programming_mode,
  input  logic       pulse_blocking,
  input  logic       V_UV_input,
  input  logic       V_VW_input,
  input  logic       V_WU_input,
  input  logic [8:0] comp_I,
  input  logic [8:0] comp_O,
  input  logic [8:0] gate_I,
  input  logic [8:0] gate_O,
  output logic       V_UV,
  output logic       V_VW,
  output logic       V_WU,
  output logic [2:0] i_positive,
  output logic [2:0] i_negative
);

  logic [8:0] connected;
  assign connected = gate_I | gate_O;

  sample_filter #(.WIDTH(3)) u_voltage_filter (
    .clk, .reset,
    .d({V_WU_input, V_VW_input, V_UV_input}),
    .q({V_WU, V_VW, V_UV})
  );

  for (genvar y = 0; y < 3; y++) begin : g_phase
    mc_current_decoder u_decoder (
      .clk, .reset, .programming_mode, .pulse_blocking,
      .U(connected[sw_idx(y, 0)]), .V(connected[sw_idx(y, 1)]), .W(connected[sw_idx(y, 2)]),
      .comp_U_I(comp_I[sw_idx(y, 0)]), .comp_U_O(comp_O[sw_idx(y, 0)]),
      .comp_V_I(comp_I[sw_idx(y, 1)]), .comp_V_O(comp_O[sw_idx(y, 1)]),
      .comp_W_I(comp_I[sw_idx(y, 2)]), .comp_W_O(comp_O[sw_idx(y, 2)]),
      .I_positive(i_positive[y]), .I_negative(i_negative[y])
    );
  end

endmodule
