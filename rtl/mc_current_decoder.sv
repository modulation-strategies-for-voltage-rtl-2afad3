// mc_current_decoder: output current sign of one matrix converter output
// phase, from the IGBT voltage comparators.
//
// Each bidirectional switch has two comparators: comp_X_I is 1 when the
// voltage across the input-side IGBT of input phase X exceeds the IGBT's
// threshold (current flows through that IGBT: positive output current),
// comp_X_O likewise for the output-side IGBT (negative current).
//
// input_safety: the six comparator signals are qualified with a three-sample
// filter (sample_filter). compare_current: if exactly one input phase is
// connected (U, V, W from the actual gate signals) and neither programming
// mode nor pulse blocking is on, the connected phase's pair decides:
// (1,0) positive, (0,1) negative; (0,0) undecided and (1,1), a detection
// error, also give undecided. During a commutation (two phases connected)
// the sign is undecided. Outputs are registered: a comparator change shows
// at I_positive / I_negative four clocks later.
module mc_current_decoder (
  input  logic clk,
  input  logic reset,
  input  logic programming_mode,
  input  logic pulse_blocking,
  input  logic U,
  input  logic V,
  input  logic W,
  input  logic comp_U_I,
  input  logic comp_U_O,
  input  logic comp_V_I,
  input  logic comp_V_O,
  input  logic comp_W_I,
  input  logic comp_W_O,
  output logic I_positive,
  output logic I_negative
);

  logic [5:0] comp_signal;   // {W_O, W_I, V_O, V_I, U_O, U_I}

  sample_filter #(.WIDTH(6)) u_input_safety (
    .clk, .reset,
    .d({comp_W_O, comp_W_I, comp_V_O, comp_V_I, comp_U_O, comp_U_I}),
    .q(comp_signal)
  );

  // compare_current
  always_ff @(posedge clk) begin
    logic ci, co;
    if (reset) begin
      I_positive <= 1'b0;
      I_negative <= 1'b0;
    end else begin
      unique case ({W, V, U})
        3'b001:  begin ci = comp_signal[0]; co = comp_signal[1]; end
        3'b010:  begin ci = comp_signal[2]; co = comp_signal[3]; end
        3'b100:  begin ci = comp_signal[4]; co = comp_signal[5]; end
        default: begin ci = 1'b0;           co = 1'b0;           end
      endcase
      if (programming_mode || pulse_blocking) begin
        ci = 1'b0;
        co = 1'b0;
      end
      I_positive <= ci && !co;
      I_negative <= co && !ci;
    end
  end

endmodule
