// mc_error_handling: driver error capture of the matrix converter modulator.
//
// errors_in1 are the (active-high) error lines of the nine input-side IGBT
// drivers, errors_in2 those of the output-side ones, in the mc_pkg switch bit
// order (AU bit 8 ... CW bit 0), the order of the host's error registers 1
// and 2. error_register: a bit of a register is set when its input has been
// 1 for three consecutive clock samples and stays set until a one-clock
// pc_confirm clears both registers; errors still present set them again.
// pc_interrupt: pc_error_interrupt is 1 while any bit is set (registered).
module mc_error_handling (
  input  logic       clk,
  input  logic       reset,
  input  logic [8:0] errors_in1,
  input  logic [8:0] errors_in2,
  input  logic       pc_confirm,
  output logic [8:0] pc_error_flag_register1,
  output logic [8:0] pc_error_flag_register2,
  output logic       pc_error_interrupt
);

  logic [17:0] s0, s1, s2;

  always_ff @(posedge clk) begin
    if (reset) begin
      s0 <= '0;
      s1 <= '0;
      s2 <= '0;
      pc_error_flag_register1 <= '0;
      pc_error_flag_register2 <= '0;
    end else begin
      s0 <= {errors_in2, errors_in1};
      s1 <= s0;
      s2 <= s1;
      if (pc_confirm) begin
        pc_error_flag_register1 <= '0;
        pc_error_flag_register2 <= '0;
      end else begin
        pc_error_flag_register1 <= pc_error_flag_register1 | (s0[8:0]  & s1[8:0]  & s2[8:0]);
        pc_error_flag_register2 <= pc_error_flag_register2 | (s0[17:9] & s1[17:9] & s2[17:9]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) pc_error_interrupt <= 1'b0;
    else       pc_error_interrupt <= |{pc_error_flag_register1, pc_error_flag_register2};
  end

endmodule
