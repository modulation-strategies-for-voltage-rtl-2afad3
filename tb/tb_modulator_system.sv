// tb_modulator_system: end-to-end test of the whole modulator system at its
// default parameters. Two host programs run at the same time, each on its
// own ISA bus (I/O writes and reads through the ISA-to-Avalon bridges):
//
// VSI host: sets saw, dead time and method in programming mode, then sends
// random three-phase references each carrier period with SM, SVM and NewM;
// provokes a writing error, a driver error (reported, then in safe mode
// blocking the pulses) and confirms the errors. The upper IGBT on-time of
// every phase and period is compared with the level expected from the
// method; no leg may have both IGBTs on.
//
// MC host: sets saw and commutation step length, then sends random sectors
// and pattern times each control period, with the normal and optimized
// patterns and four step and two step commutation; a load model drives the
// comparators and the voltage polarities. Checked: no input short, a
// current path for a decided current sign, and every output joined to the
// input that the switching pattern table gives for the saw position.
//
// Each mechanism is counted (programming mode, pulse blocking, handshake
// waits for the carrier start, dead time gaps, each modulation method,
// writing errors, error confirmation, safe mode blocking, four step, two
// step and forced four step commutations, both MC patterns); the test fails
// if one of them never happened.
module tb_modulator_system;
  import mc_pkg::*;
  import mc_pattern_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [23:0] BASE = 24'h000300;

  // ISA buses
  logic [23:0] a [2] = '{24'h0, 24'h0};
  logic [15:0] d_in [2] = '{16'h0, 16'h0};
  logic [15:0] d_out [2];
  logic d_oe [2], iocs16 [2];
  logic aen [2] = '{1'b0, 1'b0};
  logic ior [2] = '{1'b1, 1'b1};
  logic iow [2] = '{1'b1, 1'b1};

  logic [5:0] vsi_errors_in = 6'h3F;
  logic vsi_confirm;
  logic [5:0] vsi_gates;
  logic [17:0] mc_errors_in = '1, mc_comp_in;
  logic [2:0] mc_voltage_in;
  logic [17:0] mc_gates;

  modulator_system dut (
    .clk, .reset,
    .vsi_isa_a(a[0]), .vsi_isa_d_in(d_in[0]), .vsi_isa_d_out(d_out[0]),
    .vsi_isa_d_oe(d_oe[0]), .vsi_isa_aen(aen[0]), .vsi_isa_ior(ior[0]),
    .vsi_isa_iow(iow[0]), .vsi_iocs16(iocs16[0]),
    .vsi_errors_in, .vsi_error_confirm(vsi_confirm), .vsi_gates,
    .mc_isa_a(a[1]), .mc_isa_d_in(d_in[1]), .mc_isa_d_out(d_out[1]),
    .mc_isa_d_oe(d_oe[1]), .mc_isa_aen(aen[1]), .mc_isa_ior(ior[1]),
    .mc_isa_iow(iow[1]), .mc_iocs16(iocs16[1]),
    .mc_errors_in, .mc_comp_in, .mc_voltage_in, .mc_gates
  );

  // ---------------------------------------------------------------- ISA host
  task automatic isa_wr(input int bus, input logic [3:0] r, input logic [15:0] v);
    a[bus] = BASE + 24'({r, 1'b0});
    d_in[bus] = v;
    #20 iow[bus] = 0;
    #100 iow[bus] = 1;
    #30 a[bus] = 24'h0;
    #40;
  endtask

  task automatic isa_rd(input int bus, input logic [3:0] r, output logic [15:0] v);
    a[bus] = BASE + 24'({r, 1'b0});
    #20 ior[bus] = 0;
    #60 v = d_out[bus];
    if (!d_oe[bus] || iocs16[bus]) begin
      failures++;
      $display("FAIL: ISA read not driven on bus %0d", bus);
    end
    ior[bus] = 1;
    #20 a[bus] = 24'h0;
    #20;
  endtask

  task automatic wait_flag(input int bus, input int b);
    logic [15:0] v;
    int n = 0;
    do begin isa_rd(bus, 4'h1, v); n++; end while (!v[b] && n < 2000);
    check(v[b], $sformatf("bus %0d interrupt flag %0d set", bus, b));
  endtask

  // -------------------------------------------------------------- counters
  int n_pm_exit [2], n_pb_seen [2], n_waits [2], n_gaps, n_method [3], n_write_err,
      n_confirm, n_safe_block [2], n_four, n_two, n_forced, n_pattern [2], n_points;

  always @(posedge clk) if (!reset) begin
    if (dut.u_vsi.u_decoder.saw_restart) n_pm_exit[0]++;
    if (dut.u_mc.u_decoder.saw_restart) n_pm_exit[1]++;
    if (vsi_confirm && !$past(vsi_confirm)) n_confirm++;
  end

  // ---------------------------------------------------------------- VSI side
  localparam int VP = 99, VD = 0, VN = 4;
  logic [2:0] vup, vdown;
  assign vdown = {vsi_gates[4], vsi_gates[2], vsi_gates[0]};
  assign vup   = {vsi_gates[5], vsi_gates[3], vsi_gates[1]};

  int v_up_cnt [3];
  int v_off_run [3];
  logic [2:0] v_last_up;
  always @(posedge clk) if (!reset) begin
    if ((vup & vdown) != 0) begin failures++; $display("FAIL: VSI shoot-through"); end
    for (int i = 0; i < 3; i++) begin
      if (vup[i]) v_up_cnt[i]++;
      if (!vup[i] && !vdown[i]) v_off_run[i]++;
      else begin
        if (v_off_run[i] == VN + 1 && vup[i] != v_last_up[i]) n_gaps++;
        v_off_run[i] = 0;
        v_last_up[i] = vup[i];
      end
    end
  end

  int v_pwm_en_run;
  always @(posedge clk) if (!reset) begin
    if (dut.u_vsi.u_decoder.pwm_data_enable) v_pwm_en_run++;
    else begin
      if (v_pwm_en_run > 2) n_waits[0]++;
      v_pwm_en_run = 0;
    end
  end

  function automatic int vsi_level(input int m, input int x0, input int x1, input int x2,
                                   input int x);
    int mx, mn, half, v0, l;
    mx = x0 > x1 ? (x0 > x2 ? x0 : x2) : (x1 > x2 ? x1 : x2);
    mn = x0 < x1 ? (x0 < x2 ? x0 : x2) : (x1 < x2 ? x1 : x2);
    half = (VP + 1) / 2;
    v0 = (m == 1) ? -((mx + mn) >>> 1) : (m == 2) ? half - mx : 0;
    l = x + v0 + half;
    return l < 0 ? 0 : (l > VP + 1 ? VP + 1 : l);
  endfunction

  function automatic int vsi_up_time(input int l);
    int t;
    if (l >= VP + 1) return 2 * (VP + 1) * (VD + 1);
    // a low pulse no longer than the dead time never turns the lower IGBT
    // on, and the upper one returns at once
    if (2 * (VP + 1 - l) * (VD + 1) <= VN + 1) return 2 * l * (VD + 1);
    t = 2 * l * (VD + 1) - (VN + 1);
    return t < 0 ? 0 : t;
  endfunction

  task automatic vsi_sync();
    do @(posedge clk); while (!dut.u_vsi.u_saw.saw_sync);
  endtask

  task automatic vsi_program();
    logic [15:0] v;
    isa_rd(0, 4'h1, v);
    check(v[5] && v[4], "VSI starts in programming mode with pulses blocked");
    isa_wr(0, 4'h4, 16'(VP));
    isa_wr(0, 4'h5, 16'(VD));
    isa_wr(0, 4'h0, 16'h5);               // saw data enable
    wait_flag(0, 0);
    isa_wr(0, 4'h3, 16'(VN));
    wait_flag(0, 1);
    isa_wr(0, 4'h0, 16'hA);               // dead time on
    isa_wr(0, 4'h0, 16'h2);               // unblock pulses
    for (int m = 0; m < 3; m++) begin
      isa_wr(0, 4'h0, 16'h3);             // programming mode on
      isa_wr(0, 4'h2, 16'(m));
      wait_flag(0, 3);
      isa_wr(0, 4'h0, 16'h4);             // programming mode off
      for (int k = 0; k < 5; k++) begin
        int x [3], c0 [3];
        x[0] = $urandom_range(0, 80) - 40;
        x[1] = $urandom_range(0, 80) - 40;
        x[2] = -x[0] - x[1];
        isa_wr(0, 4'hA, 16'(x[0])); isa_wr(0, 4'hB, 16'(x[1])); isa_wr(0, 4'hC, 16'(x[2]));
        isa_wr(0, 4'h0, 16'h6);           // PWM data enable
        if (k == 2) begin
          isa_wr(0, 4'hA, 16'd7);         // write while the request is pending
          isa_rd(0, 4'h1, v);
          if (v[8]) n_write_err++;
        end
        wait_flag(0, 2);
        vsi_sync(); vsi_sync();
        c0 = v_up_cnt;
        vsi_sync();
        for (int i = 0; i < 3; i++) begin
          int e;
          e = vsi_up_time(vsi_level(m, x[0], x[1], x[2], x[i]));
          check(v_up_cnt[i] - c0[i] == e,
                $sformatf("VSI method %0d phase %0d: up %0d clocks, expected %0d",
                          m, i, v_up_cnt[i] - c0[i], e));
        end
        n_method[m]++;
      end
    end
    // pulse blocking
    isa_wr(0, 4'h0, 16'h1);
    repeat (3) @(posedge clk); #1;
    check(vsi_gates == 0, "VSI pulse blocking");
    if (vsi_gates == 0) n_pb_seen[0]++;
    isa_wr(0, 4'h0, 16'h2);
    // driver error, reported only
    vsi_errors_in = 6'b111011;
    repeat (4) @(posedge clk);
    vsi_errors_in = 6'h3F;
    isa_rd(0, 4'h6, v); check(v == 16'b000100, "VSI error register");
    isa_wr(0, 4'h0, 16'h9);                // error confirmation
    do isa_rd(0, 4'h1, v); while (v[6]);
    check(!v[8], "VSI writing error cleared by the confirmation");
    // safe mode
    isa_wr(0, 4'h0, 16'h7);
    vsi_errors_in = 6'b011111;
    repeat (6) @(posedge clk); #1;
    check(vsi_gates == 0, "VSI safe mode blocks on a driver error");
    if (vsi_gates == 0) n_safe_block[0]++;
    vsi_errors_in = 6'h3F;
    isa_wr(0, 4'h0, 16'h9);
    do isa_rd(0, 4'h1, v); while (v[6]);
    isa_wr(0, 4'h0, 16'h2);
    vsi_sync(); vsi_sync();
    check(v_up_cnt[0] > 0, "VSI running again");
  endtask

  // ----------------------------------------------------------------- MC side
  localparam int MP = 199, MD = 0, MN = 3;
  localparam int MARGIN = 4 * (MN + 1) + 8;
  logic [8:0] gi, go;
  assign gi = mc_gates[8:0];
  assign go = mc_gates[17:9];

  int va [3] = '{300, 200, 100};
  logic [2:0] ip = 3'b111, ineg = 3'b000;
  assign mc_voltage_in = {va[2] > va[0], va[1] > va[2], va[0] > va[1]};
  always_comb begin
    logic [17:0] c;
    c = '0;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++) begin
        c[sw_idx(y, x)]     = gi[sw_idx(y, x)] && ip[y] && !ineg[y];
        c[9 + sw_idx(y, x)] = go[sw_idx(y, x)] && ineg[y] && !ip[y];
      end
    mc_comp_in = ~c;
  end

  logic [2:0] ip_h [8], in_h [8];
  int va_old [3];
  int pol_age [3][3];
  bit mc_monitor = 0;
  int joined_prev [3];
  logic [2:0] fsa_d;
  always @(posedge clk) begin
    for (int p = 0; p < 3; p++)
      for (int q = 0; q < 3; q++)
        if ((va[p] > va[q]) != (va_old[p] > va_old[q])) pol_age[p][q] = 0;
        else if (pol_age[p][q] < 1000) pol_age[p][q]++;
    va_old = va;
    for (int k = 7; k > 0; k--) begin ip_h[k] <= ip_h[k - 1]; in_h[k] <= in_h[k - 1]; end
    ip_h[0] <= ip;
    in_h[0] <= ineg;
  end

  always @(posedge clk) if (!reset && mc_monitor) begin
    fsa_d <= dut.u_mc.u_commutation.four_step_active;
    for (int y = 0; y < 3; y++) begin
      logic any_i, any_o, st_p, st_n;
      int single;
      any_i = 0; any_o = 0; single = -1;
      st_p = ip[y] && !ineg[y]; st_n = ineg[y] && !ip[y];
      for (int k = 0; k < 8; k++) begin
        st_p &= ip_h[k][y] && !in_h[k][y];
        st_n &= in_h[k][y] && !ip_h[k][y];
      end
      for (int p = 0; p < 3; p++) begin
        any_i |= gi[sw_idx(y, p)];
        any_o |= go[sw_idx(y, p)];
        for (int q = 0; q < 3; q++)
          if (p != q && va[p] > va[q] && pol_age[p][q] >= 40 &&
              gi[sw_idx(y, p)] && go[sw_idx(y, q)]) begin
            failures++;
            $display("FAIL: MC short on output %0d at %0t", y, $time);
          end
      end
      if ((st_p && !any_i) || (st_n && !any_o)) begin
        failures++;
        $display("FAIL: MC no current path on output %0d at %0t", y, $time);
      end
      // a finished commutation: the output moved to another single input
      begin
        logic [2:0] j;
        for (int p = 0; p < 3; p++) j[p] = gi[sw_idx(y, p)] || go[sw_idx(y, p)];
        case (j)
          3'b001: single = 0;
          3'b010: single = 1;
          3'b100: single = 2;
          default: single = -1;
        endcase
      end
      if (single >= 0 && joined_prev[y] >= 0 && single != joined_prev[y]) begin
        if (dut.u_mc.u_commutation.four_step_active[y]) n_four++;
        else n_two++;
      end
      if (single >= 0) joined_prev[y] = single;
      if (dut.u_mc.u_commutation.four_step_active[y] && !fsa_d[y] && !dut.u_mc.four_step)
        n_forced++;
    end
  end

  int m_times_en_run;
  always @(posedge clk) if (!reset) begin
    if (dut.u_mc.u_decoder.times_data_enable) m_times_en_run++;
    else begin
      if (m_times_en_run > 4) n_waits[1]++;
      m_times_en_run = 0;
    end
  end

  task automatic mc_sync();
    do @(posedge clk); while (!dut.u_mc.u_saw.saw_sync);
  endtask

  function automatic int part_time(input int mx);
    return ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(MARGIN, mx);
  endfunction

  task automatic mc_period(input bit opt);
    int r, k, t [5], c [5];
    bit swap;
    r = $urandom_range(1, 6); k = $urandom_range(1, 6);
    t[1] = part_time(35); t[2] = part_time(35);
    t[0] = t[1] + t[2] + part_time(30);
    t[3] = part_time(35); t[4] = part_time(35);
    swap = opt && ((r + k) % 2 == 1);
    c[0] = swap ? t[2] : t[1];
    c[1] = t[1] + t[2];
    c[2] = t[0];
    c[3] = MP + 1 - t[3] - t[4];
    c[4] = MP + 1 - (swap ? t[4] : t[3]);
    for (int i = 0; i < 5; i++) isa_wr(1, 4'(4'hA + i), 16'(t[i]));
    isa_wr(1, 4'hF, 16'({4'(r), 4'(k)}));
    isa_wr(1, 4'h0, 16'h6);               // times data enable
    wait_flag(1, 2);
    mc_sync();
    repeat (2 * (MP + 1) * (MD + 1) - 2) begin
      int s, part, near;
      @(posedge clk); #1;
      s = int'(dut.u_mc.u_saw.saw_out);
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
          for (int p = 0; p < 3; p++) joined[p] = gi[sw_idx(y, p)] || go[sw_idx(y, p)];
          check(joined == 3'(1 << x),
                $sformatf("MC opt=%0d sectors %0d/%0d saw %0d output %0d: joined %b, table %0d",
                          opt, r, k, s, y, joined, x));
        end
        n_points++;
      end
    end
    n_pattern[opt]++;
  endtask

  task automatic mc_program();
    logic [15:0] v;
    isa_rd(1, 4'h1, v);
    check(v[5] && v[4] && v[3], "MC starts in programming mode, blocked, four step");
    isa_wr(1, 4'h4, 16'(MP));
    isa_wr(1, 4'h5, 16'(MD));
    isa_wr(1, 4'h0, 16'h5);
    wait_flag(1, 0);
    isa_wr(1, 4'h3, 16'(MN));
    wait_flag(1, 1);
    isa_wr(1, 4'h0, 16'h2);
    repeat (20) @(posedge clk); #1;
    check(mc_gates == 0, "MC gates off in programming mode");
    if (mc_gates == 0) n_pb_seen[1]++;
    for (int mode = 0; mode < 4; mode++) begin
      bit opt, two;
      opt = mode[0]; two = mode[1];
      isa_wr(1, 4'h0, 16'h3);
      isa_wr(1, 4'h0, opt ? 16'h7 : 16'h8);
      isa_wr(1, 4'h0, two ? 16'hB : 16'hA);
      isa_wr(1, 4'h0, 16'h4);
      repeat (8) @(posedge clk);
      foreach (joined_prev[y]) joined_prev[y] = -1;
      mc_monitor = 1;
      for (int i = 0; i < 5; i++) begin
        va = '{$urandom_range(0, 1000), $urandom_range(0, 1000), $urandom_range(0, 1000)};
        ip = ip | ineg; ineg = ip;
        repeat (8) @(posedge clk);
        for (int y = 0; y < 3; y++) begin
          int q;
          q = $urandom_range(0, 4);
          ip[y] = (q < 2) || (q == 4);
          ineg[y] = (q >= 2);
        end
        mc_period(opt);
      end
      mc_monitor = 0;
    end
    // safe mode and driver error
    isa_wr(1, 4'h0, 16'hD);
    mc_errors_in[9 + sw_idx(2, 1)] = 0;
    repeat (8) @(posedge clk); #1;
    check(mc_gates == 0, "MC safe mode blocks on a driver error");
    if (mc_gates == 0) n_safe_block[1]++;
    mc_errors_in = '1;
    isa_rd(1, 4'h7, v); check(v == 16'(1 << sw_idx(2, 1)), "MC error register 2");
    isa_wr(1, 4'h0, 16'h9);
    do isa_rd(1, 4'h1, v); while (v[6]);
    isa_wr(1, 4'h0, 16'h2);
    repeat (4) @(posedge clk); #1;
    check(mc_gates != 0, "MC running again");
  endtask

  initial begin
    repeat (5) @(posedge clk); #1 reset = 0;
    repeat (5) @(posedge clk);
    fork
      vsi_program();
      mc_program();
    join
    check(n_pm_exit[0] >= 3 && n_pm_exit[1] >= 4, "programming mode left on both modulators");
    check(n_pb_seen[0] > 0 && n_pb_seen[1] > 0, "pulse blocking seen on both");
    check(n_waits[0] > 0 && n_waits[1] > 0, "handshakes waited for the carrier start");
    check(n_gaps > 20, $sformatf("VSI dead time gaps: %0d", n_gaps));
    check(n_method[0] > 0 && n_method[1] > 0 && n_method[2] > 0, "SM, SVM and NewM used");
    check(n_write_err > 0, "writing error");
    check(n_confirm > 0, "error confirmation line");
    check(n_safe_block[0] > 0 && n_safe_block[1] > 0, "safe mode blocking on both");
    check(n_four > 0 && n_two > 0 && n_forced > 0,
          $sformatf("commutations: four step %0d, two step %0d, forced %0d", n_four, n_two, n_forced));
    check(n_pattern[0] > 0 && n_pattern[1] > 0, "normal and optimized MC patterns");
    check(n_points > 500, $sformatf("MC pattern points checked: %0d", n_points));
    $display("mechanisms: pm_exit %0d/%0d waits %0d/%0d gaps %0d methods %0d/%0d/%0d werr %0d confirm %0d safe %0d/%0d four %0d two %0d forced %0d patterns %0d/%0d",
             n_pm_exit[0], n_pm_exit[1], n_waits[0], n_waits[1], n_gaps, n_method[0], n_method[1],
             n_method[2], n_write_err, n_confirm, n_safe_block[0], n_safe_block[1], n_four, n_two,
             n_forced, n_pattern[0], n_pattern[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
