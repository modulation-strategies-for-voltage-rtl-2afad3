// tb_vsi_pulse_blocking: random gate inputs and mode signals; the outputs
// must equal the inputs of the previous clock unless programming mode or
// pulse blocking was on, in which case they must be 0.
module tb_vsi_pulse_blocking;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pm = 0, pb = 0;
  logic [5:0] din = 0, dout;
  vsi_pulse_blocking dut (
    .clk, .reset, .programming_mode(pm), .pulse_blocking(pb),
    .u_down_in(din[0]), .u_up_in(din[1]), .v_down_in(din[2]), .v_up_in(din[3]),
    .w_down_in(din[4]), .w_up_in(din[5]),
    .u_down_out(dout[0]), .u_up_out(dout[1]), .v_down_out(dout[2]), .v_up_out(dout[3]),
    .w_down_out(dout[4]), .w_up_out(dout[5])
  );

  initial begin
    logic [5:0] exp_out;
    int blocked = 0, passed = 0;
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 400; i++) begin
      din = 6'($urandom);
      pm  = ($urandom_range(0, 5) == 0);
      pb  = ($urandom_range(0, 3) == 0);
      exp_out = (pm || pb) ? 6'd0 : din;
      if (pm || pb) blocked++; else passed++;
      @(posedge clk); #1;
      checks++;
      if (dout !== exp_out) begin
        failures++;
        $display("FAIL: in=%b pm=%b pb=%b out=%b", din, pm, pb, dout);
      end
    end
    checks++;
    if (blocked == 0 || passed == 0) failures++;
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
