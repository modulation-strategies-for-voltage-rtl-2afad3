// mc_two_step_commutation: two step current commutation for one output
// phase of the matrix converter.
//
// With a known output current sign only the IGBTs that carry that sign are
// used: the input-side IGBT SI for positive current (towards the load), the
// output-side IGBT SO for negative current. In steady state the connected
// input phase has only that IGBT on, or both when the sign is undecided.
// A commutation from phase 1 to phase 2 is
//   positive current: SI1 + SI2 on, then SI2 alone
//   negative current: SO1 + SO2 on, then SO2 alone
// As only IGBTs of one current direction are on, the two input phases are
// never short-circuited. Each step lasts n + 1 clocks (dead time value n),
// so a commutation takes 2(n + 1) clocks; no_com is high while none runs.
// A commutation starts only once the steady-state gates already match the
// current sign, so one IGBT changes per step.
//
// If the current sign is undecided when a new reference arrives, the unit
// cannot commutate: it raises force_4step for one clock, takes the new phase
// as connected and leaves the commutation to the four step unit.
//
// phase_decoding, dead_time_settings and the step counter are as in the four
// step unit. Gate outputs are registered (bit 0 U, 1 V, 2 W). The steady
// state with a single IGBT and the step sequence are this design's reading
// of the method's description.
module mc_two_step_commutation (
  input  logic       clk,
  input  logic       reset,
  input  logic       programming_mode,
  input  logic       input_U,
  input  logic       input_V,
  input  logic       input_W,
  input  logic       i_positive,
  input  logic       i_negative,
  input  logic [7:0] dead_time_value_in,
  input  logic       dead_time_enable,
  output logic       dead_time_ack,
  output logic [2:0] gate_I,
  output logic [2:0] gate_O,
  output logic       no_com,
  output logic       force_4step
);

  typedef enum logic [1:0] {IDLE, STEP1, STEP2} ts_state_e;

  ts_state_e  state;
  logic [1:0] cur, nxt_phase;
  logic       dir_pos;
  logic [2:0] ref_onehot;
  logic       ref_valid;
  logic [1:0] ref_phase;
  logic [7:0] dead_time_value;
  logic [7:0] cnt;
  logic       step_done;
  logic       known;
  logic [2:0] gate_I_next, gate_O_next;
  logic       steady_ok;

  assign known = i_positive ^ i_negative;

  // phase_decoding
  assign ref_onehot = {input_W, input_V, input_U};
  always_comb begin
    ref_valid = 1'b1;
    unique case (ref_onehot)
      3'b001:  ref_phase = 2'd0;
      3'b010:  ref_phase = 2'd1;
      3'b100:  ref_phase = 2'd2;
      default: begin ref_phase = 2'd0; ref_valid = 1'b0; end
    endcase
  end

  // dead_time_settings
  always_ff @(posedge clk) begin
    if (reset) begin
      dead_time_value <= '0;
      dead_time_ack   <= 1'b0;
    end else begin
      dead_time_ack <= 1'b0;
      if (programming_mode && dead_time_enable && !dead_time_ack) begin
        dead_time_value <= dead_time_value_in;
        dead_time_ack   <= 1'b1;
      end
    end
  end

  // counter
  assign step_done = (cnt >= dead_time_value);
  always_ff @(posedge clk) begin
    if (reset || state == IDLE || step_done) cnt <= '0;
    else                                     cnt <= cnt + 1'b1;
  end

  // the registered gates already show the single IGBT of the current sign
  assign steady_ok = i_positive ? (gate_I[cur] && !gate_O[cur])
                                : (gate_O[cur] && !gate_I[cur]);

  // commutation
  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= IDLE;
      cur         <= 2'd0;
      nxt_phase   <= 2'd0;
      dir_pos     <= 1'b0;
      force_4step <= 1'b0;
    end else begin
      force_4step <= 1'b0;
      unique case (state)
        IDLE:
          if (ref_valid && ref_phase != cur) begin
            if (!known) begin
              force_4step <= 1'b1;
              cur         <= ref_phase;
            end else if (steady_ok) begin
              nxt_phase <= ref_phase;
              dir_pos   <= i_positive;
              state     <= STEP1;
            end
          end
        STEP1: if (step_done) state <= STEP2;
        STEP2: if (step_done) begin
          state <= IDLE;
          cur   <= nxt_phase;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    gate_I_next = '0;
    gate_O_next = '0;
    unique case (state)
      IDLE: begin
        gate_I_next[cur] = !i_negative || !known;
        gate_O_next[cur] = !i_positive || !known;
      end
      STEP1: begin
        gate_I_next[cur]       = dir_pos;
        gate_O_next[cur]       = !dir_pos;
        gate_I_next[nxt_phase] = dir_pos;
        gate_O_next[nxt_phase] = !dir_pos;
      end
      default: begin
        gate_I_next[nxt_phase] = dir_pos;
        gate_O_next[nxt_phase] = !dir_pos;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      gate_I <= '0;
      gate_O <= '0;
    end else begin
      gate_I <= gate_I_next;
      gate_O <= gate_O_next;
    end
  end

  assign no_com = (state == IDLE);

endmodule
