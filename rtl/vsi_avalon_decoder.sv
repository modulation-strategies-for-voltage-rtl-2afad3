// vsi_avalon_decoder: control unit of the VSI modulator. It holds the
// shadow registers written by the host over the Avalon port, executes the
// commands of the command register, keeps the interrupt (status) register
// and hands new settings to the other units with enable/acknowledge
// handshakes.
//
// Registers (number = Avalon address bits 4..1): 0 command (write), 1
// interrupt (read), 2 modulation method, 3 dead time, 4 saw period, 5 saw
// frequency divider, 6 error flags (read), 10..12 PWM values of phases U, V,
// W (two's complement). Reads are combinational.
//
// Handshakes: writing the modulation or dead time register raises
// modulation_enable / dead_time_enable at once; the saw and PWM registers
// are only offered to their units by the SAW DATA ENABLE and PWM DATA ENABLE
// commands. An enable stays high until the unit's one-clock acknowledge; the
// acknowledge also sets the matching "loaded" flag, which a new request
// clears. A write to a register whose enable is still high is refused and
// sets that register's writing error flag.
//
// Commands switch pulse blocking, programming mode, safe mode and dead time
// generation at once. Entering programming mode blocks the pulses (done in
// the pulse blocking unit); leaving it restarts the saw carrier
// (saw_restart) so that operation starts on a fresh period. In safe mode a
// driver error turns pulse blocking on. ERROR CONFIRMATION sends a one-clock
// pc_confirm to the error handling unit and clears the writing error flags.
//
// Choices of this design: reset state (pulses blocked, programming mode on,
// everything else off), refusing the write that causes a writing error,
// clearing writing errors with ERROR CONFIRMATION, the saw restart, and
// issuing the confirmation regardless of safe mode.
module vsi_avalon_decoder
  import avalon_pkg::*;
  import vsi_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  avalon_req_t        avalon_req,
  output logic [15:0]        avalon_data_read,
  // global modes
  output logic               programming_mode,
  output logic               pulse_blocking,
  output logic               dead_time_on,
  output logic               saw_restart,
  // saw generator
  output logic [15:0]        saw_period,
  output logic [7:0]         saw_frequency_divider,
  output logic               saw_data_enable,
  input  logic               saw_data_ack,
  // PWM values (through the modulation unit)
  output logic signed [15:0] pwm_u_value,
  output logic signed [15:0] pwm_v_value,
  output logic signed [15:0] pwm_w_value,
  output logic               pwm_data_enable,
  input  logic               pwm_data_ack,
  // modulation method
  output logic [1:0]         modulation_method,
  output logic               modulation_enable,
  input  logic               modulation_ack,
  // dead time
  output logic [7:0]         dead_time_value,
  output logic               dead_time_enable,
  input  logic               dead_time_ack,
  // error handling
  output logic               pc_confirm,
  input  logic               pc_error_interrupt,
  input  logic [5:0]         pc_error_flag_register
);

  logic safe_mode;
  logic saw_loaded, dt_loaded, pwm_loaded, mod_loaded;
  logic saw_wr_err, pwm_wr_err, mod_wr_err, dt_wr_err;
  logic [15:0] interrupt_register;

  logic       wr;
  logic [3:0] idx;
  assign wr  = avalon_req.chip_select && avalon_req.write_enable;
  assign idx = reg_index(avalon_req.address);

  always_comb begin
    interrupt_register          = '0;
    interrupt_register[IRQ_SL]  = saw_loaded;
    interrupt_register[IRQ_DTL] = dt_loaded;
    interrupt_register[IRQ_PVL] = pwm_loaded;
    interrupt_register[IRQ_ML]  = mod_loaded;
    interrupt_register[IRQ_PB]  = pulse_blocking;
    interrupt_register[IRQ_PM]  = programming_mode;
    interrupt_register[IRQ_DE]  = pc_error_interrupt;
    interrupt_register[IRQ_SE]  = saw_wr_err;
    interrupt_register[IRQ_PVE] = pwm_wr_err;
    interrupt_register[IRQ_ME]  = mod_wr_err;
    interrupt_register[IRQ_DTE] = dt_wr_err;
    interrupt_register[IRQ_SM]  = safe_mode;
    interrupt_register[IRQ_DTO] = dead_time_on;
  end

  // avalon_com, read side
  always_comb begin
    avalon_data_read = '0;
    if (avalon_req.chip_select) begin
      unique case (idx)
        REG_INTERRUPT:   avalon_data_read = interrupt_register;
        REG_MODULATION:  avalon_data_read = {14'd0, modulation_method};
        REG_DEAD_TIME:   avalon_data_read = {8'd0, dead_time_value};
        REG_SAW_PERIOD:  avalon_data_read = saw_period;
        REG_SAW_DIVIDER: avalon_data_read = {8'd0, saw_frequency_divider};
        REG_ERROR:       avalon_data_read = {10'd0, pc_error_flag_register};
        REG_PWM_U:       avalon_data_read = pwm_u_value;
        REG_PWM_V:       avalon_data_read = pwm_v_value;
        REG_PWM_W:       avalon_data_read = pwm_w_value;
        default:         avalon_data_read = '0;
      endcase
    end
  end

  // avalon_com write side, command_control and the *_registers handshakes
  always_ff @(posedge clk) begin
    if (reset) begin
      programming_mode      <= 1'b1;
      pulse_blocking        <= 1'b1;
      safe_mode             <= 1'b0;
      dead_time_on          <= 1'b0;
      saw_restart           <= 1'b0;
      saw_period            <= '0;
      saw_frequency_divider <= '0;
      saw_data_enable       <= 1'b0;
      pwm_u_value           <= '0;
      pwm_v_value           <= '0;
      pwm_w_value           <= '0;
      pwm_data_enable       <= 1'b0;
      modulation_method     <= MOD_SM;
      modulation_enable     <= 1'b0;
      dead_time_value       <= '0;
      dead_time_enable      <= 1'b0;
      pc_confirm            <= 1'b0;
      saw_loaded            <= 1'b0;
      dt_loaded             <= 1'b0;
      pwm_loaded            <= 1'b0;
      mod_loaded            <= 1'b0;
      saw_wr_err            <= 1'b0;
      pwm_wr_err            <= 1'b0;
      mod_wr_err            <= 1'b0;
      dt_wr_err             <= 1'b0;
    end else begin
      saw_restart <= 1'b0;
      pc_confirm  <= 1'b0;

      // acknowledges end the requests
      if (saw_data_ack)   begin saw_data_enable   <= 1'b0; saw_loaded <= 1'b1; end
      if (pwm_data_ack)   begin pwm_data_enable   <= 1'b0; pwm_loaded <= 1'b1; end
      if (modulation_ack) begin modulation_enable <= 1'b0; mod_loaded <= 1'b1; end
      if (dead_time_ack)  begin dead_time_enable  <= 1'b0; dt_loaded  <= 1'b1; end

      if (wr) begin
        unique case (idx)
          REG_COMMAND: begin
            unique case (avalon_req.data_write[3:0])
              CMD_BLOCK_PULSES:   pulse_blocking   <= 1'b1;
              CMD_UNBLOCK_PULSES: pulse_blocking   <= 1'b0;
              CMD_PROG_MODE_ON:   programming_mode <= 1'b1;
              CMD_PROG_MODE_OFF: begin
                programming_mode <= 1'b0;
                saw_restart      <= programming_mode;
              end
              CMD_SAW_DATA_EN: if (!saw_data_enable) begin
                saw_data_enable <= 1'b1;
                saw_loaded      <= 1'b0;
              end
              CMD_PWM_DATA_EN: if (!pwm_data_enable) begin
                pwm_data_enable <= 1'b1;
                pwm_loaded      <= 1'b0;
              end
              CMD_SAFE_MODE_ON:   safe_mode    <= 1'b1;
              CMD_SAFE_MODE_OFF:  safe_mode    <= 1'b0;
              CMD_ERROR_CONFIRM: begin
                pc_confirm <= 1'b1;
                saw_wr_err <= 1'b0;
                pwm_wr_err <= 1'b0;
                mod_wr_err <= 1'b0;
                dt_wr_err  <= 1'b0;
              end
              CMD_DEAD_TIME_ON:   dead_time_on <= 1'b1;
              CMD_DEAD_TIME_OFF:  dead_time_on <= 1'b0;
              default: ;
            endcase
          end
          REG_MODULATION:
            if (modulation_enable) mod_wr_err <= 1'b1;
            else begin
              modulation_method <= avalon_req.data_write[1:0];
              modulation_enable <= 1'b1;
              mod_loaded        <= 1'b0;
            end
          REG_DEAD_TIME:
            if (dead_time_enable) dt_wr_err <= 1'b1;
            else begin
              dead_time_value  <= avalon_req.data_write[7:0];
              dead_time_enable <= 1'b1;
              dt_loaded        <= 1'b0;
            end
          REG_SAW_PERIOD:
            if (saw_data_enable) saw_wr_err <= 1'b1;
            else saw_period <= avalon_req.data_write;
          REG_SAW_DIVIDER:
            if (saw_data_enable) saw_wr_err <= 1'b1;
            else saw_frequency_divider <= avalon_req.data_write[7:0];
          REG_PWM_U:
            if (pwm_data_enable) pwm_wr_err <= 1'b1;
            else pwm_u_value <= avalon_req.data_write;
          REG_PWM_V:
            if (pwm_data_enable) pwm_wr_err <= 1'b1;
            else pwm_v_value <= avalon_req.data_write;
          REG_PWM_W:
            if (pwm_data_enable) pwm_wr_err <= 1'b1;
            else pwm_w_value <= avalon_req.data_write;
          default: ;
        endcase
      end

      // safe mode: a driver error blocks the pulses
      if (safe_mode && pc_error_interrupt) pulse_blocking <= 1'b1;
    end
  end

  // a handshake request is only withdrawn by its acknowledge
  property p_hold(en, ack);
    @(posedge clk) disable iff (reset) en && !ack |=> en;
  endproperty
  a_saw_hold: assert property (p_hold(saw_data_enable, saw_data_ack));
  a_pwm_hold: assert property (p_hold(pwm_data_enable, pwm_data_ack));
  a_mod_hold: assert property (p_hold(modulation_enable, modulation_ack));
  a_dt_hold:  assert property (p_hold(dead_time_enable, dead_time_ack));

endmodule
