// tb_mc_voltage_current_direction: the polarity inputs must reach the
// outputs after the three-sample filter and ignore short glitches; the
// current sign of each output phase must be decided from the comparators of
// the input phase whose IGBTs are on, for random connections of all three
// outputs.
module tb_mc_voltage_current_direction;
  import mc_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 0, pb = 0;
  logic [2:0] vin = 0, vout;
  logic [8:0] ci = 0, co = 0, gi = 0, go = 0;
  logic [2:0] ip, ineg;

  mc_voltage_current_direction dut (
    .clk, .reset, .programming_mode(pm), .pulse_blocking(pb),
    .V_UV_input(vin[0]), .V_VW_input(vin[1]), .V_WU_input(vin[2]),
    .comp_I(ci), .comp_O(co), .gate_I(gi), .gate_O(go),
    .V_UV(vout[0]), .V_VW(vout[1]), .V_WU(vout[2]), .i_positive(ip), .i_negative(ineg)
  );

  initial begin
    int pos = 0, neg = 0;
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 300; i++) begin
      int x [3];
      logic [2:0] eip, ein, old_v;
      old_v = vout;
      vin = ~vout;
      @(posedge clk); #1 vin = old_v;     // one-clock glitch
      repeat (4) @(posedge clk); #1;
      check(vout == old_v, "polarity glitch ignored");
      vin = 3'($urandom);
      gi = 0; go = 0;
      for (int y = 0; y < 3; y++) begin
        int r;
        x[y] = $urandom_range(0, 2);
        r = $urandom_range(0, 2);   // IGBTs on: SI only, SO only, or both
        gi[sw_idx(y, x[y])] = (r != 1);
        go[sw_idx(y, x[y])] = (r != 0);
      end
      ci = 9'($urandom); co = 9'($urandom);
      repeat (6) @(posedge clk); #1;
      check(vout == vin, $sformatf("polarity %b expected %b", vout, vin));
      for (int y = 0; y < 3; y++) begin
        logic a, b;
        a = ci[sw_idx(y, x[y])];
        b = co[sw_idx(y, x[y])];
        eip[y] = a && !b;
        ein[y] = b && !a;
      end
      check(ip == eip && ineg == ein,
            $sformatf("signs %b/%b expected %b/%b", ip, ineg, eip, ein));
      pos += $countones(eip);
      neg += $countones(ein);
    end
    check(pos > 30 && neg > 30, "both signs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
