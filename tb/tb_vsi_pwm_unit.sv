// tb_vsi_pwm_unit: one PWM unit driven by a saw generator.
// Checks: the level handshake (one-clock acknowledge, new level used only
// from the next carrier start outside programming mode), the dead time
// handshake, that both IGBTs are never on together, that with dead time the
// gap between one IGBT turning off and the other turning on is exactly n + 1
// clocks, that each IGBT is only on while the comparison allows it, and the
// on-time per carrier period: 2*L*(d+1) - (n+1) clocks for the upper IGBT.
// Without dead time the outputs follow the comparison one clock later.
module tb_vsi_pwm_unit;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int P = 15, D = 1;
  logic pm = 1;
  logic [15:0] saw, period_now;
  logic saw_sync, saw_en = 0, saw_ack;
  logic [16:0] level_in = 0;
  logic pwm_en = 0, pwm_ack, dt_en = 0, dt_ack, dt_on = 0;
  logic [7:0] dt_in = 0;
  logic up, down;

  saw_generator saw_gen (
    .clk, .reset, .internal_reset(1'b0), .programming_mode(pm),
    .saw_period(16'(P)), .saw_frequency_divider(8'(D)), .saw_data_enable(saw_en),
    .saw_ack, .saw_out(saw), .period_now, .saw_sync
  );

  vsi_pwm_unit dut (
    .clk, .reset, .programming_mode(pm), .saw_sync, .saw_input(saw),
    .pwm_value_in(level_in), .pwm_data_enable(pwm_en), .pwm_data_ack(pwm_ack),
    .dead_time_value_in(dt_in), .dead_time_enable(dt_en), .dead_time_ack(dt_ack),
    .dead_time_on_in(dt_on), .igbt_up(up), .igbt_down(down)
  );

  // reference comparison with the level that the unit should be using
  logic [16:0] ref_level = 0;
  logic        ref_c, ref_c_d;
  assign ref_c = ({1'b0, saw} < ref_level);
  int n_now = 0;
  logic saw_sync_d = 0;
  always @(posedge clk) saw_sync_d <= saw_sync;
  bit dt_mode = 0;

  // gap and legality monitor
  int  off_run = 0;
  bit  last_was_up = 0, have_last = 0;
  int  up_count = 0, gaps = 0;
  always @(posedge clk) if (!reset && !pm) begin
    ref_c_d <= ref_c;
    if (up && down) begin failures++; $display("FAIL: shoot-through"); end
    if (up) up_count++;
    if (dt_mode) begin
      if (!up && !down) off_run++;
      else begin
        if (have_last && off_run > 0 && (up != last_was_up)) begin
          checks++; gaps++;
          if (off_run != n_now + 1) begin
            failures++;
            $display("FAIL: dead gap %0d clocks, expected %0d", off_run, n_now + 1);
          end
        end
        off_run = 0;
        last_was_up = up;
        have_last = 1;
      end
    end else if (have_last) begin
      checks++;
      if (up !== ref_c_d || down !== !ref_c_d) begin
        failures++;
        $display("FAIL: no dead time: up=%b down=%b expected %b", up, down, ref_c_d);
      end
    end
  end

  task automatic send_level(input logic [16:0] l);
    int waited = 0;
    level_in = l; pwm_en = 1;
    do begin @(posedge clk); #1; waited++; end while (!pwm_ack && waited < 1000);
    pwm_en = 0;
    check(pwm_ack, "level acknowledged");
    @(posedge clk); #1;
    check(!pwm_ack, "level acknowledge is one clock long");
  endtask

  task automatic send_dead_time(input logic [7:0] n, input bit on);
    dt_in = n; dt_on = on; dt_en = 1;
    do @(posedge clk); while (!dt_ack);
    #1 dt_en = 0;
    @(posedge clk); #1;
    check(!dt_ack, "dead time acknowledge is one clock long");
  endtask

  task automatic wait_sync();
    do @(posedge clk); while (!saw_sync);
  endtask

  // count upper on-clocks over one carrier period
  task automatic measure(input logic [16:0] l, input int n);
    int c0, expect_up;
    wait_sync(); wait_sync();
    c0 = up_count;
    wait_sync();
    expect_up = 2 * int'(l) * (D + 1) - (n + 1);
    if (l == 0) expect_up = 0;
    if (l >= P + 1) expect_up = 2 * (P + 1) * (D + 1);
    if (expect_up < 0) expect_up = 0;
    check(up_count - c0 == expect_up,
          $sformatf("level %0d: upper on %0d clocks, expected %0d", l, up_count - c0, expect_up));
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    saw_en = 1;
    do @(posedge clk); while (!saw_ack);
    #1 saw_en = 0;
    // dead time setting is refused outside programming mode
    pm = 0;
    dt_in = 8'd9; dt_en = 1;
    repeat (10) @(posedge clk);
    check(!dt_ack, "dead time not taken outside programming mode");
    dt_en = 0; pm = 1;
    #1;
    // phase 1: with dead time
    n_now = 3;
    send_dead_time(8'(n_now), 1);
    send_level(17'd6);
    ref_level = 6;
    @(posedge clk); #1 pm = 0; dt_mode = 1;
    measure(17'd6, n_now);
    for (int i = 0; i < 10; i++) begin
      logic [16:0] l;
      l = 17'($urandom_range(3, P - 2));
      // outside programming mode the new level waits for the carrier start
      wait_sync();
      @(posedge clk); #1;
      level_in = l; pwm_en = 1;
      @(posedge clk); #1;
      check(!pwm_ack, "level not taken in the middle of a period");
      do begin @(posedge clk); #1; end while (!pwm_ack);
      pwm_en = 0;
      check(saw_sync_d, "level taken at the carrier start");
      ref_level = l;
      measure(l, n_now);
    end
    // full and zero levels
    send_level(17'd0); ref_level = 0; measure(17'd0, n_now);
    send_level(17'(P + 1)); ref_level = P + 1; measure(17'(P + 1), n_now);
    check(gaps > 10, "dead time gaps observed");
    // phase 2: no dead time
    @(posedge clk); #1 pm = 1; dt_mode = 0; have_last = 0;
    send_dead_time(8'd0, 0);
    level_in = 17'd5; pwm_en = 1;
    do @(posedge clk); while (!pwm_ack);
    #1 pwm_en = 0; ref_level = 5;
    @(posedge clk); #1 pm = 0;
    repeat (2) @(posedge clk);
    have_last = 1;
    measure(17'd5, -1);
    for (int i = 0; i < 5; i++) begin
      logic [16:0] l;
      l = 17'($urandom_range(1, P));
      wait_sync(); #1;
      level_in = l; pwm_en = 1;
      do begin @(posedge clk); #1; end while (!pwm_ack);
      pwm_en = 0; ref_level = l;
      measure(l, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
