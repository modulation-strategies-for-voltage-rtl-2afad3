// tb_mc_top: the matrix converter modulator driven over its Avalon port.
// The host sets the saw carrier and the commutation step length, then sends
// random sectors and pattern times each control period, with both
// switching patterns and both commutation methods. A load model feeds the
// IGBT voltage comparators (active low) from the gates and a chosen output
// current sign, and the input voltage polarities from chosen input
// voltages.
// Checked every clock: no output joins a higher- to a lower-voltage input
// through SI and SO (short), and a current path exists for the current's
// sign once that sign has been decided. Checked in the middle of every pattern part: each output is joined
// to the input given by the switching pattern table for the saw position.
// Also: gates off in programming mode, with pulse blocking and after a
// driver error in safe mode; error registers; forced four step
// commutation when the current sign is undecided.
module tb_mc_top;
  import avalon_pkg::*;
  import mc_pkg::*;
  import mc_pattern_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int P = 199, D = 0, N = 3;
  localparam int MARGIN = 4 * (N + 1) + 8;

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic [17:0] errors_in = '1, comp_in;
  logic [2:0] voltage_in;
  logic [17:0] gates;
  logic [8:0] gi, go;
  assign gi = gates[8:0];
  assign go = gates[17:9];

  mc_top dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd), .errors_in, .comp_in,
    .voltage_in, .gates
  );

  // load model
  int va [3] = '{300, 200, 100};
  logic [2:0] ip = 3'b111, ineg = 3'b000;
  assign voltage_in = {va[2] > va[0], va[1] > va[2], va[0] > va[1]};
  always_comb begin
    logic [17:0] c;
    c = '0;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++) begin
        c[sw_idx(y, x)]     = gi[sw_idx(y, x)] && ip[y] && !ineg[y];
        c[9 + sw_idx(y, x)] = go[sw_idx(y, x)] && ineg[y] && !ip[y];
      end
    comp_in = ~c;
  end

  // a sign is checked once stable for 8 clocks (3-sample filter, decoder
  // and gate registers); a voltage pair whose polarity changed in the last
  // 40 clocks is not checked for shorts (real polarities change slowly)
  logic [2:0] ip_h [8], in_h [8];
  int va_old [3];
  int pol_age [3][3];
  always @(posedge clk) begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if ((va[a] > va[b]) != (va_old[a] > va_old[b])) pol_age[a][b] = 0;
        else if (pol_age[a][b] < 1000) pol_age[a][b]++;
    va_old = va;
    for (int k = 7; k > 0; k--) begin ip_h[k] <= ip_h[k - 1]; in_h[k] <= in_h[k - 1]; end
    ip_h[0] <= ip;
    in_h[0] <= ineg;
  end

  bit monitor_on = 0;
  always @(posedge clk) if (!reset && monitor_on) begin
    for (int y = 0; y < 3; y++) begin
      logic any_i, any_o, st_p, st_n;
      any_i = 0; any_o = 0; st_p = ip[y] && !ineg[y]; st_n = ineg[y] && !ip[y];
      for (int k = 0; k < 8; k++) begin
        st_p &= ip_h[k][y] && !in_h[k][y];
        st_n &= in_h[k][y] && !ip_h[k][y];
      end
      for (int a = 0; a < 3; a++) begin
        any_i |= gi[sw_idx(y, a)];
        any_o |= go[sw_idx(y, a)];
        for (int b = 0; b < 3; b++)
          if (a != b && va[a] > va[b] && pol_age[a][b] >= 40 && gi[sw_idx(y, a)] && go[sw_idx(y, b)]) begin
            failures++;
            $display("FAIL: short on output %0d, inputs %0d/%0d at %0t", y, a, b, $time);
          end
      end
      if ((st_p && !any_i) || (st_n && !any_o)) begin
        failures++;
        $display("FAIL: no current path on output %0d at %0t", y, $time);
      end
    end
  end

  task automatic wr(input logic [3:0] r, input logic [15:0] d);
    req = '{address: 16'({r, 1'b0}), data_write: d, read_enable: 0, write_enable: 1,
            chip_select: 1};
    @(posedge clk); #1;
    req = '0;
    @(posedge clk); #1;
  endtask

  task automatic rdreg(input logic [3:0] r, output logic [15:0] d);
    req = '{address: 16'({r, 1'b0}), data_write: 0, read_enable: 1, write_enable: 0,
            chip_select: 1};
    #1 d = rd;
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic cmd(input mc_cmd_e c);
    wr(REG_COMMAND, 16'(c));
  endtask

  task automatic wait_flag(input int b);
    logic [15:0] v;
    int n = 0;
    do begin rdreg(REG_INTERRUPT, v); n++; end while (!v[b] && n < 2000);
    check(v[b], $sformatf("interrupt flag %0d set", b));
  endtask

  task automatic wait_sync();
    do @(posedge clk); while (!dut.u_saw.saw_sync);
  endtask

  int checked_points = 0, forced = 0;
  logic [2:0] fsa_d;
  always @(posedge clk) if (!reset) begin
    fsa_d <= dut.u_commutation.four_step_active;
    for (int y = 0; y < 3; y++)
      if (dut.u_commutation.four_step_active[y] && !fsa_d[y] && !dut.four_step) forced++;
  end

  function automatic int part_time(input int mx);
    return ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(MARGIN, mx);
  endfunction

  // one control period: new sectors and times, then a full carrier period
  // of checks
  task automatic control_period(input bit opt);
    int r, k, t [5], c [5];
    bit swap;
    r = $urandom_range(1, 6); k = $urandom_range(1, 6);
    // each part of the pattern is empty or at least MARGIN counts wide, so
    // that every commutation ends inside its part
    t[1] = part_time(35); t[2] = part_time(35);                         // T11, T12
    t[0] = t[1] + t[2] + part_time(30);                                 // T_INPUT_1
    t[3] = part_time(35); t[4] = part_time(35);                         // T21, T22
    swap = opt && ((r + k) % 2 == 1);
    c[0] = swap ? t[2] : t[1];
    c[1] = t[1] + t[2];
    c[2] = t[0];
    c[3] = P + 1 - t[3] - t[4];
    c[4] = P + 1 - (swap ? t[4] : t[3]);
    wr(REG_T_IN1, 16'(t[0])); wr(REG_T_11, 16'(t[1])); wr(REG_T_12, 16'(t[2]));
    wr(REG_T_21, 16'(t[3])); wr(REG_T_22, 16'(t[4]));
    wr(REG_SECTOR, 16'({4'(r), 4'(k)}));
    cmd(CMD_TIMES_DATA_EN);
    wait_flag(IRQ_TL);
    wait_sync();
    repeat (2 * (P + 1) * (D + 1) - 2) begin
      int s, part, near;
      @(posedge clk); #1;
      s = int'(dut.u_saw.saw_out);
      part = 5;
      for (int j = 4; j >= 0; j--) if (s < c[j]) part = j;
      near = 1000;
      for (int j = 0; j < 5; j++) begin
        int dd;
        dd = s - c[j];
        if (dd < 0) dd = -dd;
        if (dd < near) near = dd;
      end
      if (near >= MARGIN && s >= MARGIN) begin
        for (int y = 0; y < 3; y++) begin
          int x;
          logic [2:0] joined;
          x = entry_input(r, k, pattern_column(opt, r, k, part), y);
          for (int a = 0; a < 3; a++) joined[a] = gi[sw_idx(y, a)] || go[sw_idx(y, a)];
          check(joined == 3'(1 << x),
                $sformatf("%0t opt=%0d sectors %0d/%0d saw %0d part %0d output %0d: joined %b, table %0d",
                          $time, opt, r, k, s, part, y, joined, x));
        end
        checked_points++;
      end
    end
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(posedge clk); #1 reset = 0;
    wr(REG_SAW_PERIOD, 16'(P));
    wr(REG_SAW_DIVIDER, 16'(D));
    cmd(CMD_SAW_DATA_EN);
    wait_flag(IRQ_SL);
    wr(REG_DEAD_TIME, 16'(N));
    wait_flag(IRQ_DTL);
    cmd(CMD_UNBLOCK_PULSES);
    repeat (50) @(posedge clk); #1;
    check(gates == 0, "gates off in programming mode");
    for (int mode = 0; mode < 4; mode++) begin
      bit opt, two;
      opt = mode[0]; two = mode[1];
      cmd(CMD_PROG_MODE_ON);
      cmd(opt ? CMD_OPTIMIZED_ON : CMD_OPTIMIZED_OFF);
      cmd(two ? CMD_TWO_STEP : CMD_FOUR_STEP);
      rdreg(REG_INTERRUPT, v);
      check(v[IRQ_OO] == opt && v[IRQ_FS] == !two, "pattern and method flags");
      cmd(CMD_PROG_MODE_OFF);
      repeat (8) @(posedge clk);
      monitor_on = 1;
      for (int i = 0; i < 8; i++) begin
        // input voltages and current signs change slowly: between periods,
        // a reversing current passes through the undecided state
        va = '{$urandom_range(0, 1000), $urandom_range(0, 1000), $urandom_range(0, 1000)};
        ip = ip | ineg; ineg = ip;
        repeat (8) @(posedge clk);
        for (int y = 0; y < 3; y++) begin
          int q;
          q = $urandom_range(0, 4);
          ip[y] = (q < 2) || (q == 4);
          ineg[y] = (q >= 2);
        end
        control_period(opt);
      end
      monitor_on = 0;
    end
    check(checked_points > 1000, $sformatf("pattern points checked: %0d", checked_points));
    check(forced > 0, "forced four step commutation seen");
    // pulse blocking
    cmd(CMD_BLOCK_PULSES);
    repeat (3) @(posedge clk); #1;
    check(gates == 0, "gates off with pulse blocking");
    cmd(CMD_UNBLOCK_PULSES);
    repeat (3) @(posedge clk); #1;
    check(gates != 0, "gates back on");
    // driver errors (active low)
    errors_in[sw_idx(1, 2)] = 0;        // input-side IGBT of switch BW
    errors_in[9 + sw_idx(0, 0)] = 0;    // output-side IGBT of switch AU
    repeat (6) @(posedge clk); #1;
    errors_in = '1;
    rdreg(REG_ERROR1, v); check(v == 16'(1 << sw_idx(1, 2)), $sformatf("error register 1 %h", v));
    rdreg(REG_ERROR2, v); check(v == 16'(1 << sw_idx(0, 0)), $sformatf("error register 2 %h", v));
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DE], "driver error flag");
    check(gates != 0, "no blocking without safe mode");
    cmd(CMD_ERROR_CONFIRM);
    do rdreg(REG_INTERRUPT, v); while (v[IRQ_DE]);
    cmd(CMD_SAFE_MODE_ON);
    errors_in[sw_idx(2, 1)] = 0;
    repeat (8) @(posedge clk); #1;
    check(gates == 0, "safe mode: a driver error blocks the pulses");
    errors_in = '1;
    cmd(CMD_ERROR_CONFIRM);
    do rdreg(REG_INTERRUPT, v); while (v[IRQ_DE]);
    cmd(CMD_UNBLOCK_PULSES);
    repeat (3) @(posedge clk); #1;
    check(gates != 0, "pulses released after confirmation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
