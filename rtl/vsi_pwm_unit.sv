// vsi_pwm_unit: pulse width modulation and dead time for one half bridge of
// the VSI.
//
// The compare level (0 .. p+1, from the modulation unit) is compared with
// the saw carrier: compared = (saw_input < pwm_value); the upper IGBT is on
// while compared is 1, the lower one while it is 0.
//
// New levels are taken with the enable/acknowledge handshake at the start of
// a carrier period (saw_sync) or at once in programming mode (new_values).
// The dead time value n is taken with its own handshake only in programming
// mode, and the dead_time_on setting is copied only while programming mode
// is on (DEAD_TIME_new_settings). Acknowledges are one-clock pulses.
//
// Dead time generator: a four-state machine (upper on, dead time towards
// lower, lower on, dead time towards upper). When compared changes, both
// IGBTs are off for n + 1 clocks before the other one is turned on, i.e.
// T_DT = (n + 1) / f_clk. If compared returns during the dead time, the
// previous IGBT is turned on again. With dead time off the outputs follow
// compared and its inverse one clock later. After reset both IGBTs are off
// and the machine waits for a dead time towards the lower IGBT.
module vsi_pwm_unit (
  input  logic        clk,
  input  logic        reset,
  input  logic        programming_mode,
  input  logic        saw_sync,
  input  logic [15:0] saw_input,
  input  logic [16:0] pwm_value_in,
  input  logic        pwm_data_enable,
  output logic        pwm_data_ack,
  input  logic [7:0]  dead_time_value_in,
  input  logic        dead_time_enable,
  output logic        dead_time_ack,
  input  logic        dead_time_on_in,
  output logic        igbt_up,
  output logic        igbt_down
);

  typedef enum logic [1:0] {UP_ON, DT_TO_DOWN, DOWN_ON, DT_TO_UP} dt_state_e;

  logic [16:0] pwm_value;
  logic [7:0]  dead_time_value;
  logic        dead_time_on;
  logic        compared;
  dt_state_e   state;
  logic [7:0]  cnt;

  // new_values
  always_ff @(posedge clk) begin
    if (reset) begin
      pwm_value    <= '0;
      pwm_data_ack <= 1'b0;
    end else begin
      pwm_data_ack <= 1'b0;
      if (pwm_data_enable && !pwm_data_ack && (programming_mode || saw_sync)) begin
        pwm_value    <= pwm_value_in;
        pwm_data_ack <= 1'b1;
      end
    end
  end

  // DEAD_TIME_new_settings
  always_ff @(posedge clk) begin
    if (reset) begin
      dead_time_value <= '0;
      dead_time_on    <= 1'b0;
      dead_time_ack   <= 1'b0;
    end else begin
      dead_time_ack <= 1'b0;
      if (programming_mode) begin
        dead_time_on <= dead_time_on_in;
        if (dead_time_enable && !dead_time_ack) begin
          dead_time_value <= dead_time_value_in;
          dead_time_ack   <= 1'b1;
        end
      end
    end
  end

  assign compared = ({1'b0, saw_input} < pwm_value);

  // DEAD_TIME_generator
  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= DT_TO_DOWN;
      cnt       <= '0;
      igbt_up   <= 1'b0;
      igbt_down <= 1'b0;
    end else if (!dead_time_on) begin
      state     <= compared ? UP_ON : DOWN_ON;
      cnt       <= '0;
      igbt_up   <= compared;
      igbt_down <= !compared;
    end else begin
      unique case (state)
        UP_ON: begin
          igbt_up   <= compared;
          igbt_down <= 1'b0;
          if (!compared) begin
            state <= DT_TO_DOWN;
            cnt   <= '0;
          end
        end
        DOWN_ON: begin
          igbt_up   <= 1'b0;
          igbt_down <= !compared;
          if (compared) begin
            state <= DT_TO_UP;
            cnt   <= '0;
          end
        end
        DT_TO_DOWN: begin
          igbt_up   <= 1'b0;
          igbt_down <= 1'b0;
          if (compared) begin
            state   <= UP_ON;
            igbt_up <= 1'b1;
          end else if (cnt >= dead_time_value) begin
            state     <= DOWN_ON;
            igbt_down <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        DT_TO_UP: begin
          igbt_up   <= 1'b0;
          igbt_down <= 1'b0;
          if (!compared) begin
            state     <= DOWN_ON;
            igbt_down <= 1'b1;
          end else if (cnt >= dead_time_value) begin
            state   <= UP_ON;
            igbt_up <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (reset)
                                       !(igbt_up && igbt_down));

endmodule
