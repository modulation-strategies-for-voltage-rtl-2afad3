// tb_mc_sine_workload: the matrix converter modulator at the operating
// points of the converter measurements. The input is a 50 Hz three-phase
// voltage with rectifier modulation degree M_i = 1 and unity input power
// factor, and three output settings are run:
//   35 Hz, M_o = 1.15, optimized pattern, four step commutation
//   20 Hz, M_o = 1.0,  optimized pattern, two step commutation
//   45 Hz, M_o = 0.9,  standard pattern,  two step commutation
//
// Acting as the host program, the testbench computes for each control step
// the rectifier and inverter sectors and the ISVM duty cycles, and writes
// the five pattern times and the sector register. With M_o = v_o/(v_DC/2),
// the inverter degree is m = M_o*sqrt(3)/2:
//   d_r1 = sin(60deg - a_i), d_r2 = sin(a_i), d_i1 = m sin(60deg - a_o),
//   d_i2 = m sin(a_o)
// where a_i and a_o are the angles within the sectors. Each step is
// quasi-static: the input voltages and the output current are held for the
// step's carrier periods. A switch model turns the gates into output
// voltages. A positive current flows through any switch whose input-side
// IGBT is on, and the output takes the highest such input voltage; a
// negative current likewise uses the output-side IGBTs and takes the
// lowest. The IGBT voltage comparators are fed from that model.
//
// Checked for every step: the average output line-to-line voltages over one
// carrier period follow the sine the modulator should synthesise,
//   u_AB = 1.5 V_in m cos(a + 30deg), u_BC and u_CA shifted by 120deg,
// within the error that commutation delays and rounding can cause. A
// current path must always exist for the current's sign. Also reported: the
// largest error and the commutations of each kind.
module tb_mc_sine_workload;
  import avalon_pkg::*;
  import mc_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int P = 999, D = 0, N = 1;
  localparam int STEPS = 72;                // control steps per output period
  localparam real PI = 3.14159265358979;
  localparam real DEG = PI / 180.0;
  localparam real VIN = 1000.0;             // input phase voltage amplitude
  localparam real TOL = 0.03 * VIN;         // allowed line-voltage error

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic [17:0] comp_in;
  logic [2:0] voltage_in;
  logic [17:0] gates;
  logic [8:0] gi, go;
  assign gi = gates[8:0];
  assign go = gates[17:9];

  mc_top dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd), .errors_in('1), .comp_in,
    .voltage_in, .gates
  );

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // converter model
  real vin [3];
  real iout [3];
  real vout [3];
  logic [2:0] has_path;
  localparam real ILIM = 0.05;
  assign voltage_in = {vin[2] > vin[0], vin[1] > vin[2], vin[0] > vin[1]};
  always_comb begin
    logic [17:0] c;
    c = '0;
    for (int y = 0; y < 3; y++) begin
      int best;
      best = -1;
      has_path[y] = 1'b0;
      for (int x = 0; x < 3; x++) begin
        if (iout[y] >= 0.0 && gi[sw_idx(y, x)] && (best < 0 || vin[x] > vin[best])) best = x;
        if (iout[y] < 0.0 && go[sw_idx(y, x)] && (best < 0 || vin[x] < vin[best])) best = x;
      end
      vout[y] = 0.0;
      if (best >= 0) begin
        has_path[y] = 1'b1;
        vout[y] = vin[best];
        c[sw_idx(y, best)]     = iout[y] > ILIM;
        c[9 + sw_idx(y, best)] = iout[y] < -ILIM;
      end
    end
    comp_in = ~c;     // the comparator lines are active low
  end

  bit measuring = 0;
  real acc [3];
  int no_path = 0;
  always @(posedge clk) if (!reset && measuring) begin
    for (int y = 0; y < 3; y++) begin
      acc[y] += vout[y];
      if (!has_path[y]) no_path++;
    end
  end

  int four_steps = 0, two_steps = 0;
  logic [2:0] fs_idle_d, ts_idle_d;
  always @(posedge clk) if (!reset) begin
    for (int y = 0; y < 3; y++) begin
      if (!dut.u_commutation.fs_no_com[y] && fs_idle_d[y] && dut.u_commutation.four_step_active[y])
        four_steps++;
      if (!dut.u_commutation.ts_no_com[y] && ts_idle_d[y] && !dut.u_commutation.four_step_active[y])
        two_steps++;
    end
    fs_idle_d <= dut.u_commutation.fs_no_com;
    ts_idle_d <= dut.u_commutation.ts_no_com;
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

  function automatic int ticks(input real d);
    return $rtoi($floor(d * real'(P) + 0.5));
  endfunction

  real max_err = 0.0;

  task automatic run_point(input real f_out, input real mo, input bit opt, input bit four);
    real m;
    m = mo * $sqrt(3.0) / 2.0;
    cmd(CMD_PROG_MODE_ON);
    cmd(opt ? CMD_OPTIMIZED_ON : CMD_OPTIMIZED_OFF);
    cmd(four ? CMD_FOUR_STEP : CMD_TWO_STEP);
    cmd(CMD_PROG_MODE_OFF);
    for (int k = 0; k < STEPS; k++) begin
      real ang_o, ang_i, ai, ao, dr1, dr2, di1, di2, per;
      int r, s;
      ang_o = 360.0 * real'(k) / real'(STEPS) + 7.0;
      ang_i = ang_o * 50.0 / f_out;
      ang_i = ang_i - 360.0 * $floor(ang_i / 360.0);
      for (int x = 0; x < 3; x++) vin[x] = VIN * $cos((ang_i - 120.0 * real'(x)) * DEG);
      // load current lags the output voltage by 30 degrees
      for (int y = 0; y < 3; y++) iout[y] = $cos((ang_o - 30.0 - 120.0 * real'(y)) * DEG);
      r = $rtoi($floor((ang_i + 30.0) / 60.0)) % 6;
      ai = ang_i + 30.0 - 60.0 * real'(r);
      s = $rtoi($floor(ang_o / 60.0)) % 6;
      ao = ang_o - 60.0 * real'(s);
      dr1 = $sin((60.0 - ai) * DEG);
      dr2 = $sin(ai * DEG);
      di1 = m * $sin((60.0 - ao) * DEG);
      di2 = m * $sin(ao * DEG);
      wr(REG_T_IN1, 16'(ticks(dr1 / (dr1 + dr2))));
      wr(REG_T_11, 16'(ticks(dr1 * di1)));
      wr(REG_T_12, 16'(ticks(dr1 * di2)));
      wr(REG_T_21, 16'(ticks(dr2 * di1)));
      wr(REG_T_22, 16'(ticks(dr2 * di2)));
      wr(REG_SECTOR, 16'({4'(r + 1), 4'(s + 1)}));
      cmd(CMD_TIMES_DATA_EN);
      wait_flag(IRQ_TL);
      wait_sync();
      wait_sync();
      acc = '{0.0, 0.0, 0.0};
      measuring = 1;
      wait_sync();
      measuring = 0;
      per = real'(2 * (P + 1) * (D + 1));
      for (int y = 0; y < 3; y++) begin
        real meas, want, err;
        meas = (acc[y] - acc[(y + 1) % 3]) / per;
        want = 1.5 * VIN * m * $cos((ang_o + 30.0 - 120.0 * real'(y)) * DEG);
        err = meas - want;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        check(err <= TOL, $sformatf("%0.0f Hz step %0d line %0d: %0.1f, expected %0.1f",
                                    f_out, k, y, meas, want));
      end
    end
  endtask

  initial begin
    vin = '{VIN, -VIN / 2.0, -VIN / 2.0};
    iout = '{1.0, -0.5, -0.5};
    repeat (3) @(posedge clk); #1 reset = 0;
    repeat (3) @(posedge clk); #1;
    wr(REG_SAW_PERIOD, 16'(P));
    wr(REG_SAW_DIVIDER, 16'(D));
    cmd(CMD_SAW_DATA_EN);
    wait_flag(IRQ_SL);
    wr(REG_DEAD_TIME, 16'(N));
    wait_flag(IRQ_DTL);
    cmd(CMD_UNBLOCK_PULSES);
    run_point(35.0, 1.15, 1'b1, 1'b1);
    run_point(20.0, 1.0, 1'b1, 1'b0);
    run_point(45.0, 0.9, 1'b0, 1'b0);
    check(no_path == 0, $sformatf("%0d clocks without a current path", no_path));
    check(four_steps > 0 && two_steps > 0,
          $sformatf("commutations: four step %0d, two step %0d", four_steps, two_steps));
    $display("largest line-voltage error %0.1f (limit %0.1f); commutations four step %0d two step %0d",
             max_err, TOL, four_steps, two_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
