// mc_avalon_decoder: control unit of the matrix converter (MC) modulator.
// It holds the shadow registers written by the host over the Avalon port,
// executes commands, keeps the interrupt (status) register and hands new
// settings to the other units with enable/acknowledge handshakes.
//
// Registers (number = Avalon address bits 4..1): 0 command (write), 1
// interrupt (read), 3 dead time (commutation step length), 4 saw period, 5
// saw frequency divider, 6 and 7 error registers of the input-side and
// output-side transistors (read), 10..14 the five pattern times
// T_INPUT_1, T_INPUT_1_X_T_OUTPUT_1, .._1_X_.._2, .._2_X_.._1, .._2_X_.._2,
// 15 sector register ([7:4] rectifier sector, [3:0] inverter sector, 1..6).
//
// Writing the dead time register raises dead_time_enable at once; saw values
// and the times/sector set are offered only by the SAW DATA ENABLE and TIMES
// DATA ENABLE commands. An enable stays high until the one-clock
// acknowledge, which sets the matching "loaded" flag. Writing a register
// whose enable is high is refused and sets its writing error flag.
//
// Commands: pulse blocking on/off, programming mode on/off, saw and times
// data enable, optimized pattern on/off (accepted only in programming mode),
// error confirmation (one-clock pc_confirm, also clears the writing error
// flags), four step / two step commutation (taken by the commutation unit
// after the running commutation), safe mode on/off. In safe mode a driver
// error turns pulse blocking on. Leaving programming mode restarts the saw
// carrier (saw_restart).
//
// Choices of this design: reset state (pulses blocked, programming mode on,
// four step commutation, other modes off), refusing the write that causes a
// writing error, the saw restart, and confirming regardless of the error
// inputs.
module mc_avalon_decoder
  import avalon_pkg::*;
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  avalon_req_t avalon_req,
  output logic [15:0] avalon_data_read,
  output logic        programming_mode,
  output logic        pulse_blocking,
  output logic        optimized,
  output logic        four_step,
  output logic        saw_restart,
  output logic [15:0] saw_period,
  output logic [7:0]  saw_frequency_divider,
  output logic        saw_data_enable,
  input  logic        saw_data_ack,
  output logic [15:0] t_input_1,
  output logic [15:0] t_11,
  output logic [15:0] t_12,
  output logic [15:0] t_21,
  output logic [15:0] t_22,
  output logic [7:0]  sector,
  output logic        times_data_enable,
  input  logic        times_data_ack,
  output logic [7:0]  dead_time_value,
  output logic        dead_time_enable,
  input  logic        dead_time_ack,
  output logic        pc_confirm,
  input  logic        pc_error_interrupt,
  input  logic [8:0]  pc_error_flag_register1,
  input  logic [8:0]  pc_error_flag_register2
);

  logic safe_mode;
  logic saw_loaded, dt_loaded, times_loaded;
  logic saw_wr_err, times_wr_err, dt_wr_err;
  logic [15:0] interrupt_register;
  logic       wr;
  logic [3:0] idx;

  assign wr  = avalon_req.chip_select && avalon_req.write_enable;
  assign idx = reg_index(avalon_req.address);

  always_comb begin
    interrupt_register          = '0;
    interrupt_register[IRQ_SL]  = saw_loaded;
    interrupt_register[IRQ_DTL] = dt_loaded;
    interrupt_register[IRQ_TL]  = times_loaded;
    interrupt_register[IRQ_FS]  = four_step;
    interrupt_register[IRQ_PB]  = pulse_blocking;
    interrupt_register[IRQ_PM]  = programming_mode;
    interrupt_register[IRQ_DE]  = pc_error_interrupt;
    interrupt_register[IRQ_SE]  = saw_wr_err;
    interrupt_register[IRQ_TE]  = times_wr_err;
    interrupt_register[IRQ_OO]  = optimized;
    interrupt_register[IRQ_DTE] = dt_wr_err;
    interrupt_register[IRQ_SM]  = safe_mode;
  end

  always_comb begin
    avalon_data_read = '0;
    if (avalon_req.chip_select) begin
      unique case (idx)
        REG_INTERRUPT:   avalon_data_read = interrupt_register;
        REG_DEAD_TIME:   avalon_data_read = {8'd0, dead_time_value};
        REG_SAW_PERIOD:  avalon_data_read = saw_period;
        REG_SAW_DIVIDER: avalon_data_read = {8'd0, saw_frequency_divider};
        REG_ERROR1:      avalon_data_read = {7'd0, pc_error_flag_register1};
        REG_ERROR2:      avalon_data_read = {7'd0, pc_error_flag_register2};
        REG_T_IN1:       avalon_data_read = t_input_1;
        REG_T_11:        avalon_data_read = t_11;
        REG_T_12:        avalon_data_read = t_12;
        REG_T_21:        avalon_data_read = t_21;
        REG_T_22:        avalon_data_read = t_22;
        REG_SECTOR:      avalon_data_read = {8'd0, sector};
        default:         avalon_data_read = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      programming_mode      <= 1'b1;
      pulse_blocking        <= 1'b1;
      optimized             <= 1'b0;
      four_step             <= 1'b1;
      safe_mode             <= 1'b0;
      saw_restart           <= 1'b0;
      saw_period            <= '0;
      saw_frequency_divider <= '0;
      saw_data_enable       <= 1'b0;
      t_input_1             <= '0;
      t_11                  <= '0;
      t_12                  <= '0;
      t_21                  <= '0;
      t_22                  <= '0;
      sector                <= '0;
      times_data_enable     <= 1'b0;
      dead_time_value       <= '0;
      dead_time_enable      <= 1'b0;
      pc_confirm            <= 1'b0;
      saw_loaded            <= 1'b0;
      dt_loaded             <= 1'b0;
      times_loaded          <= 1'b0;
      saw_wr_err            <= 1'b0;
      times_wr_err          <= 1'b0;
      dt_wr_err             <= 1'b0;
    end else begin
      saw_restart <= 1'b0;
      pc_confirm  <= 1'b0;

      if (saw_data_ack)   begin saw_data_enable   <= 1'b0; saw_loaded   <= 1'b1; end
      if (times_data_ack) begin times_data_enable <= 1'b0; times_loaded <= 1'b1; end
      if (dead_time_ack)  begin dead_time_enable  <= 1'b0; dt_loaded    <= 1'b1; end

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
              CMD_TIMES_DATA_EN: if (!times_data_enable) begin
                times_data_enable <= 1'b1;
                times_loaded      <= 1'b0;
              end
              CMD_OPTIMIZED_ON:  if (programming_mode) optimized <= 1'b1;
              CMD_OPTIMIZED_OFF: if (programming_mode) optimized <= 1'b0;
              CMD_ERROR_CONFIRM: begin
                pc_confirm   <= 1'b1;
                saw_wr_err   <= 1'b0;
                times_wr_err <= 1'b0;
                dt_wr_err    <= 1'b0;
              end
              CMD_FOUR_STEP:     four_step <= 1'b1;
              CMD_TWO_STEP:      four_step <= 1'b0;
              CMD_SAFE_MODE_ON:  safe_mode <= 1'b1;
              CMD_SAFE_MODE_OFF: safe_mode <= 1'b0;
              default: ;
            endcase
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
          REG_T_IN1:
            if (times_data_enable) times_wr_err <= 1'b1;
            else t_input_1 <= avalon_req.data_write;
          REG_T_11:
            if (times_data_enable) times_wr_err <= 1'b1;
            else t_11 <= avalon_req.data_write;
          REG_T_12:
            if (times_data_enable) times_wr_err <= 1'b1;
            else t_12 <= avalon_req.data_write;
          REG_T_21:
            if (times_data_enable) times_wr_err <= 1'b1;
            else t_21 <= avalon_req.data_write;
          REG_T_22:
            if (times_data_enable) times_wr_err <= 1'b1;
            else t_22 <= avalon_req.data_write;
          REG_SECTOR:
            if (times_data_enable) times_wr_err <= 1'b1;
            else sector <= avalon_req.data_write[7:0];
          default: ;
        endcase
      end

      if (safe_mode && pc_error_interrupt) pulse_blocking <= 1'b1;
    end
  end

  property p_hold(en, ack);
    @(posedge clk) disable iff (reset) en && !ack |=> en;
  endproperty
  a_saw_hold:   assert property (p_hold(saw_data_enable, saw_data_ack));
  a_times_hold: assert property (p_hold(times_data_enable, times_data_ack));
  a_dt_hold:    assert property (p_hold(dead_time_enable, dead_time_ack));

endmodule
