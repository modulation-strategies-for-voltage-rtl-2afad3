// vsi_error_handling: driver error capture of the VSI modulator.
//
// errors_in carries one active-high error line per IGBT driver (bit 0 U
// down, 1 U up, 2 V down, 3 V up, 4 W down, 5 W up). Every error seen at
// the input is stored in pc_error_flag_register (safety_input), which the
// host reads as the error register; pc_error_interrupt is high while any
// flag is set (pc_interrupt).
//
// Confirmation: a one-clock pc_confirm from the control unit clears the
// register and raises error_confirm_out, the drivers' error-confirmation
// line. error_confirm_out stays high until no error is present at the input
// any more (the drivers have released their flags) and then drops. Errors
// that are still present set the register again. All outputs are registered.
//
// The bit order and holding error_confirm_out until the inputs are quiet
// are choices of this design. Drivers that signal an error with a 0 (such
// as the converter used with this modulator) need the input inverted by
// the top level.
module vsi_error_handling (
  input  logic       clk,
  input  logic       reset,
  input  logic [5:0] errors_in,
  input  logic       pc_confirm,
  output logic       error_confirm_out,
  output logic [5:0] pc_error_flag_register,
  output logic       pc_error_interrupt
);

  // safety_input and confirmation
  always_ff @(posedge clk) begin
    if (reset) begin
      pc_error_flag_register <= '0;
      error_confirm_out      <= 1'b0;
    end else if (pc_confirm) begin
      pc_error_flag_register <= '0;
      error_confirm_out      <= 1'b1;
    end else begin
      pc_error_flag_register <= pc_error_flag_register | errors_in;
      if (error_confirm_out && errors_in == '0) error_confirm_out <= 1'b0;
    end
  end

  // pc_interrupt
  always_ff @(posedge clk) begin
    if (reset) pc_error_interrupt <= 1'b0;
    else       pc_error_interrupt <= |pc_error_flag_register;
  end

endmodule
