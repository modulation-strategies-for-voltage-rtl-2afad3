// tb_vsi_modulation: random phase references for all three methods.
// A reference model computes the common voltage (SM: 0, SVM: -(max+min)/2,
// NewM: V_DC - max) and the clamped compare levels; the unit's levels must
// match when its pwm_data_enable_out is raised. Also checked: the enable is
// passed on two clocks late and dropped by the acknowledge, NewM puts the
// largest phase at the full level, and a method change is refused while a
// data request is pending outside programming mode.
module tb_vsi_modulation;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 1;
  logic [1:0] method_in = 0;
  logic mod_en = 0, mod_ack;
  logic [15:0] period = 16'd499;
  logic signed [15:0] vu = 0, vv = 0, vw = 0;
  logic en_in = 0, ack_out, en_out, ack_in = 0;
  logic [16:0] lu, lv, lw;

  vsi_modulation dut (
    .clk, .reset, .programming_mode(pm), .modulation_method_in(method_in),
    .modulation_enable(mod_en), .modulation_ack(mod_ack), .period_now(period),
    .pwm_u_in(vu), .pwm_v_in(vv), .pwm_w_in(vw), .pwm_data_enable_in(en_in),
    .pwm_data_ack_out(ack_out), .pwm_u_value(lu), .pwm_v_value(lv), .pwm_w_value(lw),
    .pwm_data_enable_out(en_out), .pwm_data_ack_in(ack_in)
  );

  function automatic int clamp(input int x, input int top);
    return x < 0 ? 0 : (x > top ? top : x);
  endfunction

  task automatic set_method(input logic [1:0] m);
    method_in = m; mod_en = 1;
    do @(posedge clk); while (!mod_ack);
    #1 mod_en = 0;
  endtask

  int per_method[3];

  task automatic one_sample(input logic [1:0] m);
    int a, b, c, mx, mn, half, top, v0, eu, ev, ew, lat;
    a = $urandom_range(0, 600) - 300;
    b = $urandom_range(0, 600) - 300;
    c = $urandom_range(0, 600) - 300;
    if ($urandom_range(0, 3) == 0) a = $urandom_range(0, 1400) - 700;  // overmodulation
    vu = 16'(a); vv = 16'(b); vw = 16'(c);
    mx = a > b ? (a > c ? a : c) : (b > c ? b : c);
    mn = a < b ? (a < c ? a : c) : (b < c ? b : c);
    top = int'(period) + 1;
    half = top / 2;
    case (m)
      1: v0 = -((mx + mn) >>> 1);
      2: v0 = half - mx;
      default: v0 = 0;
    endcase
    eu = clamp(a + v0 + half, top);
    ev = clamp(b + v0 + half, top);
    ew = clamp(c + v0 + half, top);
    en_in = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!en_out && lat < 10);
    check(lat == 2, $sformatf("enable passed on after %0d clocks", lat));
    check(lu == 17'(eu) && lv == 17'(ev) && lw == 17'(ew),
          $sformatf("method %0d refs %0d %0d %0d: levels %0d %0d %0d expected %0d %0d %0d",
                    m, a, b, c, lu, lv, lw, eu, ev, ew));
    if (m == 2)
      check((a == mx ? lu : (b == mx ? lv : lw)) == 17'(top), "NewM clamps the largest phase");
    per_method[m]++;
    ack_in = 1;
    #0 check(ack_out, "acknowledge passed back");
    @(posedge clk); #1;
    ack_in = 0; en_in = 0;
    check(!en_out, "enable dropped after acknowledge");
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int k = 0; k < 3; k++) begin
      pm = 1;
      set_method(2'(k));
      @(posedge clk); #1 pm = 0;
      for (int i = 0; i < 40; i++) one_sample(2'(k));
    end
    // method change refused while a data request is pending
    en_in = 1; method_in = 2'd1; mod_en = 1;
    repeat (6) @(posedge clk);
    #1 check(!mod_ack, "method change waits for the pending data request");
    ack_in = 1; @(posedge clk); #1 ack_in = 0; en_in = 0;
    do @(posedge clk); while (!mod_ack);
    #1 mod_en = 0;
    one_sample(2'd1);
    for (int k = 0; k < 3; k++) check(per_method[k] >= 40, "each method exercised");
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
