// mc_four_step_commutation: four step voltage commutation for one output
// phase of the matrix converter.
//
// Each bidirectional switch between the output phase and input phase X is
// two IGBTs: the input-side IGBT SI_X conducts current towards the output,
// the output-side IGBT SO_X current back to the input. In steady state both
// IGBTs of the connected input phase are on, so either current sign has a
// path.
//
// phase_decoding: input_U/V/W is the modulator's reference; only a one-hot
// reference that differs from the connected phase starts a commutation from
// phase 1 (connected) to phase 2 (new). commutation: with v12 = v1 - v2,
// sampled at the start, the four steps are
//   v12 > 0:  SI2 on, SI1 off, SO2 on, SO1 off
//   v12 <= 0: SO2 on, SO1 off, SI2 on, SI1 off
// so that SI1 and SO2 (v12 > 0) or SI2 and SO1 (v12 < 0), which would short
// the two input phases, are never on together, and a current path exists
// for both current signs at every step. Each step lasts n + 1 clocks, n being
// the dead time value (a simple counter); a commutation therefore takes
// 4(n + 1) clocks, after which a new reference is accepted. no_com is high
// while no commutation runs. Polarity inputs: v_uv = 1 means v_U > v_V,
// likewise v_vw and v_wu.
//
// The dead time value is taken with an enable/acknowledge handshake in
// programming mode only. Gate outputs are registered (bit 0 U, 1 V, 2 W).
// After reset the phase is connected to input U. The step order is this
// design's reading of the voltage-based rule; the rule itself is the
// source's.
module mc_four_step_commutation (
  input  logic       clk,
  input  logic       reset,
  input  logic       programming_mode,
  input  logic       input_U,
  input  logic       input_V,
  input  logic       input_W,
  input  logic       v_uv,
  input  logic       v_vw,
  input  logic       v_wu,
  input  logic [7:0] dead_time_value_in,
  input  logic       dead_time_enable,
  output logic       dead_time_ack,
  output logic [2:0] gate_I,
  output logic [2:0] gate_O,
  output logic       no_com
);

  typedef enum logic [2:0] {IDLE, STEP1, STEP2, STEP3, STEP4} fs_state_e;

  fs_state_e  state;
  logic [1:0] cur, nxt_phase;
  logic [2:0] ref_onehot;
  logic       ref_valid;
  logic [1:0] ref_phase;
  logic       v12_pos;
  logic [7:0] dead_time_value;
  logic [7:0] cnt;
  logic       step_done;
  logic [2:0] gate_I_next, gate_O_next;

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

  // sign of v(from) - v(to) from the line-to-line polarities
  function automatic logic polarity(input logic [1:0] from, input logic [1:0] to,
                                    input logic uv, input logic vw, input logic wu);
    unique case ({from, to})
      {2'd0, 2'd1}: return uv;
      {2'd1, 2'd0}: return !uv;
      {2'd1, 2'd2}: return vw;
      {2'd2, 2'd1}: return !vw;
      {2'd2, 2'd0}: return wu;
      {2'd0, 2'd2}: return !wu;
      default:      return 1'b0;
    endcase
  endfunction

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

  // commutation
  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= IDLE;
      cur       <= 2'd0;
      nxt_phase <= 2'd0;
      v12_pos   <= 1'b0;
    end else begin
      unique case (state)
        IDLE:
          if (ref_valid && ref_phase != cur) begin
            nxt_phase <= ref_phase;
            v12_pos   <= polarity(cur, ref_phase, v_uv, v_vw, v_wu);
            state     <= STEP1;
          end
        STEP1: if (step_done) state <= STEP2;
        STEP2: if (step_done) state <= STEP3;
        STEP3: if (step_done) state <= STEP4;
        STEP4: if (step_done) begin
          state <= IDLE;
          cur   <= nxt_phase;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // cases: map the generic switches SI1/SO1/SI2/SO2 onto U, V, W
  always_comb begin
    logic si1, so1, si2, so2;
    si1 = 1'b1; so1 = 1'b1; si2 = 1'b0; so2 = 1'b0;
    unique case (state)
      STEP1: if (v12_pos) begin si1 = 1; so1 = 1; si2 = 1; so2 = 0; end
             else         begin si1 = 1; so1 = 1; si2 = 0; so2 = 1; end
      STEP2: if (v12_pos) begin si1 = 0; so1 = 1; si2 = 1; so2 = 0; end
             else         begin si1 = 1; so1 = 0; si2 = 0; so2 = 1; end
      STEP3: if (v12_pos) begin si1 = 0; so1 = 1; si2 = 1; so2 = 1; end
             else         begin si1 = 1; so1 = 0; si2 = 1; so2 = 1; end
      STEP4: begin si1 = 0; so1 = 0; si2 = 1; so2 = 1; end
      default: ;
    endcase
    gate_I_next = '0;
    gate_O_next = '0;
    gate_I_next[cur] = si1;
    gate_O_next[cur] = so1;
    if (state != IDLE) begin
      gate_I_next[nxt_phase] = si2;
      gate_O_next[nxt_phase] = so2;
    end
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
