// tb_vsi_error_handling: error pulses on single driver lines must be stored
// in the flag register and raise the interrupt; a confirmation clears the
// register and holds error_confirm_out until the inputs are quiet; errors
// still present are stored again.
module tb_vsi_error_handling;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [5:0] errors_in = 0, flags;
  logic pc_confirm = 0, confirm_out, irq;
  vsi_error_handling dut (
    .clk, .reset, .errors_in, .pc_confirm, .error_confirm_out(confirm_out),
    .pc_error_flag_register(flags), .pc_error_interrupt(irq)
  );

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [5:0] model;
    repeat (2) @(posedge clk); #1 reset = 0;
    tick(2);
    check(flags == 0 && !irq && !confirm_out, "clear after reset");
    model = 0;
    for (int i = 0; i < 6; i++) begin
      errors_in = 6'(1 << i);
      tick();
      errors_in = 0;
      model |= 6'(1 << i);
      tick(2);
      check(flags == model, $sformatf("flag %0d stored, flags=%b", i, flags));
      check(irq, "interrupt raised");
    end
    // confirmation with quiet inputs
    pc_confirm = 1; tick(); pc_confirm = 0;
    check(flags == 0 && confirm_out, "confirm clears register and raises confirm line");
    tick(2);
    check(!confirm_out && !irq, "confirm line drops when inputs are quiet");
    // confirmation while an error persists
    errors_in = 6'b000100;
    tick(3);
    pc_confirm = 1; tick(); pc_confirm = 0;
    tick(3);
    check(confirm_out, "confirm line held while the driver still reports an error");
    check(flags == 6'b000100 && irq, "persisting error stored again");
    errors_in = 0;
    tick(2);
    check(!confirm_out, "confirm line released after the driver cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
