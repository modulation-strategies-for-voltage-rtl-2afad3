// tb_vsi_top: the VSI modulator driven over its Avalon port as the host
// program would: saw, dead time and method are set in programming mode,
// then random phase references are sent each carrier period. For every
// period the upper IGBT on-time of each phase is compared with the level
// expected from the method's common voltage (2*L*(d+1) - (n+1) clocks);
// no leg may ever have both IGBTs on. Also checked: gates off in
// programming mode and pulse blocking, NewM keeping the largest phase's
// upper IGBT on for the whole period, driver errors (active low) shown in
// the error register, pulse blocking by an error in safe mode, and the
// confirmation line.
module tb_vsi_top;
  import avalon_pkg::*;
  import vsi_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int P = 99, D = 0, N = 4;

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic [5:0] errors_in = 6'h3F;
  logic confirm;
  logic [2:0] up, down;

  vsi_top dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd), .errors_in,
    .error_confirm(confirm), .igbt_u_up(up[0]), .igbt_u_down(down[0]),
    .igbt_v_up(up[1]), .igbt_v_down(down[1]), .igbt_w_up(up[2]), .igbt_w_down(down[2])
  );

  always @(posedge clk) if (!reset && ((up & down) != 0)) begin
    failures++;
    $display("FAIL: shoot-through up=%b down=%b", up, down);
  end

  int up_cnt [3];
  always @(posedge clk) for (int i = 0; i < 3; i++) if (up[i]) up_cnt[i]++;

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

  task automatic cmd(input vsi_cmd_e c);
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

  // some gate is on within one carrier period (dead time gaps are short)
  task automatic check_active(input string msg);
    logic seen = 0;
    repeat (2 * (P + 1) * (D + 1)) begin @(posedge clk); seen |= ((up | down) != 0); end
    #1 check(seen, msg);
  endtask

  function automatic int level(input int m, input int a, input int b, input int c, input int x);
    int mx, mn, half, v0, l;
    mx = a > b ? (a > c ? a : c) : (b > c ? b : c);
    mn = a < b ? (a < c ? a : c) : (b < c ? b : c);
    half = (P + 1) / 2;
    v0 = (m == 1) ? -((mx + mn) >>> 1) : (m == 2) ? half - mx : 0;
    l = x + v0 + half;
    return l < 0 ? 0 : (l > P + 1 ? P + 1 : l);
  endfunction

  function automatic int up_time(input int l);
    int t;
    if (l >= P + 1) return 2 * (P + 1) * (D + 1);
    // a low pulse no longer than the dead time never turns the lower IGBT
    // on, and the upper one returns at once
    if (2 * (P + 1 - l) * (D + 1) <= N + 1) return 2 * l * (D + 1);
    t = 2 * l * (D + 1) - (N + 1);
    return t < 0 ? 0 : t;
  endfunction

  task automatic run_method(input int m, input int periods);
    logic [15:0] v;
    cmd(CMD_PROG_MODE_ON);
    wr(REG_MODULATION, 16'(m));
    wait_flag(IRQ_ML);
    cmd(CMD_PROG_MODE_OFF);
    for (int k = 0; k < periods; k++) begin
      int a, b, c, c0 [3];
      a = $urandom_range(0, 80) - 40;
      b = $urandom_range(0, 80) - 40;
      c = -a - b;
      wr(REG_PWM_U, 16'(a)); wr(REG_PWM_V, 16'(b)); wr(REG_PWM_W, 16'(c));
      cmd(CMD_PWM_DATA_EN);
      wait_flag(IRQ_PVL);
      // the values are in use from the next carrier start; measure the
      // period after it
      wait_sync();
      wait_sync();
      c0 = up_cnt;
      wait_sync();
      for (int i = 0; i < 3; i++) begin
        int l, e;
        l = level(m, a, b, c, i == 0 ? a : (i == 1 ? b : c));
        e = up_time(l);
        check(up_cnt[i] - c0[i] == e,
              $sformatf("method %0d refs %0d %0d %0d phase %0d: up %0d clocks, expected %0d",
                        m, a, b, c, i, up_cnt[i] - c0[i], e));
        if (m == 2 && l == P + 1)
          check(up_cnt[i] - c0[i] == 2 * (P + 1) * (D + 1), "NewM clamps a phase");
      end
    end
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(posedge clk); #1 reset = 0;
    repeat (3) @(posedge clk); #1;
    check(up == 0 && down == 0, "gates off after reset");
    wr(REG_SAW_PERIOD, 16'(P));
    wr(REG_SAW_DIVIDER, 16'(D));
    cmd(CMD_SAW_DATA_EN);
    wait_flag(IRQ_SL);
    wr(REG_DEAD_TIME, 16'(N));
    wait_flag(IRQ_DTL);
    cmd(CMD_DEAD_TIME_ON);
    cmd(CMD_UNBLOCK_PULSES);
    repeat (300) @(posedge clk); #1;
    check(up == 0 && down == 0, "gates off in programming mode");
    for (int m = 0; m < 3; m++) run_method(m, 6);
    // pulse blocking
    cmd(CMD_BLOCK_PULSES);
    repeat (3) @(posedge clk); #1;
    check(up == 0 && down == 0, "gates off with pulse blocking");
    cmd(CMD_UNBLOCK_PULSES);
    check_active("gates back on");
    // driver error without safe mode: reported only
    errors_in = 6'b110111;   // V up reports an error (active low)
    repeat (3) @(posedge clk); #1;
    errors_in = 6'h3F;
    rdreg(REG_ERROR, v); check(v == 16'b001000, $sformatf("error register %b", v));
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DE], "driver error flag");
    check_active("no blocking without safe mode");
    cmd(CMD_ERROR_CONFIRM);
    check(confirm, "confirmation line raised");
    repeat (3) @(posedge clk); #1;
    check(!confirm, "confirmation line released");
    rdreg(REG_ERROR, v); check(v == 0, "error register cleared");
    // driver error in safe mode blocks the pulses
    cmd(CMD_SAFE_MODE_ON);
    errors_in = 6'b111110;
    repeat (6) @(posedge clk); #1;
    check(up == 0 && down == 0, "safe mode: driver error blocks pulses");
    rdreg(REG_INTERRUPT, v); check(v[IRQ_PB], "pulse blocking flag");
    errors_in = 6'h3F;
    cmd(CMD_ERROR_CONFIRM);
    // the host waits for the driver error flag to drop before unblocking
    do rdreg(REG_INTERRUPT, v); while (v[IRQ_DE]);
    cmd(CMD_UNBLOCK_PULSES);
    check_active("pulses released after confirmation");
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
