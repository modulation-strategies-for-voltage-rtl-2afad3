// saw_generator: symmetric saw (triangle) carrier for the PWM and matrix
// converter modulators.
//
// A prescaler (frequency_dividing) produces a clock enable every d+1 clocks.
// On each enable the counter steps 0, 1, ..., p, p, p-1, ..., 0 and then
// starts again, so one carrier period is 2(p+1)(d+1) clocks and
// f_saw = f_clk / (2(p+1)(d+1)), where p is the period value and d the
// divider value. saw_sync is a one-clock pulse when a new period starts
// (the counter leaves the bottom of the triangle); the modulators load new
// values on it.
//
// New period and divider values arrive with the enable/acknowledge handshake
// saw_data_enable / saw_ack. They are taken at the start of a carrier period
// or at once in programming mode; with LOAD_AT_SYNC = 0 (matrix converter
// variant) only in programming mode. saw_ack is a one-clock pulse.
// internal_reset restarts the carrier at the bottom of a new period; it also
// emits saw_sync. period_now is the period value in use.
//
// The ramp shape, the repeated end values and the internal_reset behaviour
// are choices of this design; the frequency formula is the source's.
module saw_generator #(
  parameter int  PERIOD_W     = 16,
  parameter int  DIVIDER_W    = 8,
  parameter bit  LOAD_AT_SYNC = 1'b1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 internal_reset,
  input  logic                 programming_mode,
  input  logic [PERIOD_W-1:0]  saw_period,
  input  logic [DIVIDER_W-1:0] saw_frequency_divider,
  input  logic                 saw_data_enable,
  output logic                 saw_ack,
  output logic [PERIOD_W-1:0]  saw_out,
  output logic [PERIOD_W-1:0]  period_now,
  output logic                 saw_sync
);

  logic [DIVIDER_W-1:0] divider_now;
  logic [DIVIDER_W-1:0] div_cnt;
  logic                 clk_enable;
  logic [PERIOD_W-1:0]  cnt;
  logic                 rising;
  logic                 new_period;

  assign clk_enable = (div_cnt >= divider_now);
  assign new_period = clk_enable && !rising && (cnt == '0);

  // frequency_dividing
  always_ff @(posedge clk) begin
    if (reset || internal_reset) div_cnt <= '0;
    else if (clk_enable)         div_cnt <= '0;
    else                         div_cnt <= div_cnt + 1'b1;
  end

  // generator and sync
  always_ff @(posedge clk) begin
    if (reset) begin
      cnt      <= '0;
      rising   <= 1'b1;
      saw_sync <= 1'b0;
    end else if (internal_reset) begin
      cnt      <= '0;
      rising   <= 1'b1;
      saw_sync <= 1'b1;
    end else begin
      saw_sync <= new_period;
      if (clk_enable) begin
        if (rising) begin
          if (cnt >= period_now) begin
            rising <= 1'b0;
            cnt    <= period_now;     // top value is held for one step
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else if (cnt == '0) begin
          rising <= 1'b1;             // bottom value is held for one step
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  // programming
  always_ff @(posedge clk) begin
    if (reset) begin
      period_now  <= '0;
      divider_now <= '0;
      saw_ack     <= 1'b0;
    end else begin
      saw_ack <= 1'b0;
      if (saw_data_enable && !saw_ack &&
          (programming_mode || (LOAD_AT_SYNC && new_period))) begin
        period_now  <= saw_period;
        divider_now <= saw_frequency_divider;
        saw_ack     <= 1'b1;
      end
    end
  end

  assign saw_out = cnt;

endmodule
