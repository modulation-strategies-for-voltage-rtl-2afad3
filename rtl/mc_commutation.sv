// mc_commutation: safe commutation of the nine bidirectional switches of the
// matrix converter.
//
// For each output phase Y (A, B, C) a four step (voltage based) and a two
// step (current based) commutation unit follow the modulator's switch
// references of that phase in parallel. internal_four_step_set: per phase,
// the method chosen by the host (four_step) is taken in programming mode or
// while neither unit of that phase is commutating and both show the same
// connected input phase (so the hand-over never moves the output); a force_4step from the
// two step unit (current sign unknown) switches that phase to the four step
// unit until its commutation is over. method_choosing: the chosen unit's
// gates are passed to the outputs, or all zeros in programming mode or
// pulse blocking. Outputs are registered.
//
// gate_I / gate_O are the input-side and output-side IGBTs, in the mc_pkg
// switch bit order. The dead time value (commutation step length) reaches
// all six units with one enable; they load in lockstep in programming mode
// and their acknowledges are combined with AND. four_step_active shows the
// method in use per phase (bit 0 A, 1 B, 2 C).
module mc_commutation
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       programming_mode,
  input  logic       pulse_blocking,
  input  logic       four_step,
  input  logic [8:0] sw,
  input  logic       v_uv,
  input  logic       v_vw,
  input  logic       v_wu,
  input  logic [2:0] i_positive,
  input  logic [2:0] i_negative,
  input  logic [7:0] dead_time_value,
  input  logic       dead_time_enable,
  output logic       dead_time_ack,
  output logic [8:0] gate_I,
  output logic [8:0] gate_O,
  output logic [2:0] four_step_active
);

  logic [2:0] fs_I [3], fs_O [3], ts_I [3], ts_O [3];
  logic [2:0] fs_no_com, ts_no_com, force_4step;
  logic [5:0] acks;

  for (genvar y = 0; y < 3; y++) begin : g_phase
    mc_four_step_commutation u_four (
      .clk, .reset, .programming_mode,
      .input_U(sw[sw_idx(y, 0)]), .input_V(sw[sw_idx(y, 1)]), .input_W(sw[sw_idx(y, 2)]),
      .v_uv, .v_vw, .v_wu,
      .dead_time_value_in(dead_time_value), .dead_time_enable,
      .dead_time_ack(acks[2*y]),
      .gate_I(fs_I[y]), .gate_O(fs_O[y]), .no_com(fs_no_com[y])
    );
    mc_two_step_commutation u_two (
      .clk, .reset, .programming_mode,
      .input_U(sw[sw_idx(y, 0)]), .input_V(sw[sw_idx(y, 1)]), .input_W(sw[sw_idx(y, 2)]),
      .i_positive(i_positive[y]), .i_negative(i_negative[y]),
      .dead_time_value_in(dead_time_value), .dead_time_enable,
      .dead_time_ack(acks[2*y+1]),
      .gate_I(ts_I[y]), .gate_O(ts_O[y]), .no_com(ts_no_com[y]),
      .force_4step(force_4step[y])
    );
  end

  assign dead_time_ack = &acks;

  // internal_four_step_set
  always_ff @(posedge clk) begin
    if (reset) begin
      four_step_active <= 3'b111;
    end else begin
      for (int y = 0; y < 3; y++) begin
        if (force_4step[y])
          four_step_active[y] <= 1'b1;
        else if (programming_mode ||
                 (fs_no_com[y] && ts_no_com[y] &&
                  (fs_I[y] | fs_O[y]) == (ts_I[y] | ts_O[y])))
          four_step_active[y] <= four_step;
      end
    end
  end

  // method_choosing
  always_ff @(posedge clk) begin
    if (reset) begin
      gate_I <= '0;
      gate_O <= '0;
    end else begin
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++) begin
          gate_I[sw_idx(y, x)] <= !(programming_mode || pulse_blocking) &&
                                  (four_step_active[y] ? fs_I[y][x] : ts_I[y][x]);
          gate_O[sw_idx(y, x)] <= !(programming_mode || pulse_blocking) &&
                                  (four_step_active[y] ? fs_O[y][x] : ts_O[y][x]);
        end
    end
  end

endmodule
