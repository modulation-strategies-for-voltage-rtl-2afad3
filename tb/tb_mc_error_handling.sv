// tb_mc_error_handling: random error pulses on the 18 driver lines. A bit
// must be set only by an input that stayed 1 for three clock samples (one
// clock after the third sample), stay
// set until a confirmation, and be set again by errors still present; the
// interrupt follows "any bit set". A reference model runs alongside.
module tb_mc_error_handling;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0] e1 = 0, e2 = 0, r1, r2;
  logic confirm = 0, irq;

  mc_error_handling dut (
    .clk, .reset, .errors_in1(e1), .errors_in2(e2), .pc_confirm(confirm),
    .pc_error_flag_register1(r1), .pc_error_flag_register2(r2), .pc_error_interrupt(irq)
  );

  // model: run length of ones per input; a run of three sets the bit on
  // the following clock edge
  int run [18];
  logic [17:0] model, pending;
  bit model_irq;
  int sets = 0, confirms = 0;

  always @(posedge clk) begin
    logic [17:0] e;
    if (reset) begin
      model = 0;
      pending = 0;
      foreach (run[i]) run[i] = 0;
      model_irq = 0;
    end else begin
      model_irq = (model != 0);
      e = {e2, e1};
      if (confirm) begin model = 0; confirms++; end
      else begin
        if ((pending & ~model) != 0) sets++;
        model |= pending;
      end
      for (int i = 0; i < 18; i++) begin
        run[i] = e[i] ? run[i] + 1 : 0;
        pending[i] = (run[i] >= 3);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 2000; i++) begin
      // short glitches, longer errors and occasional confirmations
      for (int b = 0; b < 18; b++) begin
        bit v;
        v = (b < 9) ? e1[b] : e2[b - 9];
        if (v) v = ($urandom_range(0, 3) != 0);
        else   v = ($urandom_range(0, 40) == 0);
        if (b < 9) e1[b] = v; else e2[b - 9] = v;
      end
      confirm = ($urandom_range(0, 30) == 0);
      @(posedge clk); #1;
      checks++;
      if ({r2, r1} !== model) begin
        failures++;
        $display("FAIL: registers %b expected %b", {r2, r1}, model);
      end
    end
    checks++;
    if (sets < 10 || confirms < 10) begin failures++; $display("FAIL: too few events"); end
    e1 = 0; e2 = 0; confirm = 1;
    @(posedge clk); #1 confirm = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (irq || r1 != 0 || r2 != 0) begin failures++; $display("FAIL: not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interrupt: registered "any bit set"
  always @(posedge clk) if (!reset) begin
    #2;
    checks++;
    if (irq !== model_irq) begin failures++; $display("FAIL: interrupt %b expected %b", irq, model_irq); end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
