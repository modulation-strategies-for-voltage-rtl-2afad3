// tb_vsi_avalon_decoder: register and command behaviour of the VSI control
// unit. Avalon writes and reads are driven directly; the units' acknowledges
// are given by the testbench after a random delay. Checked: reset state,
// every command, register read-back, the enable/acknowledge handshakes with
// their "loaded" flags, writing errors on writes to busy registers and their
// clearing by ERROR CONFIRMATION, pc_confirm, the saw restart on leaving
// programming mode, and pulse blocking by a driver error in safe mode.
module tb_vsi_avalon_decoder;
  import avalon_pkg::*;
  import vsi_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic pm, pb, dto, restart;
  logic [15:0] period;
  logic [7:0] div, dtv;
  logic saw_en, saw_ack = 0, pwm_en, pwm_ack = 0, mod_en, mod_ack = 0, dt_en, dt_ack = 0;
  logic signed [15:0] pu, pv, pw;
  logic [1:0] method;
  logic confirm, err_irq = 0;
  logic [5:0] err_flags = 0;

  vsi_avalon_decoder dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd),
    .programming_mode(pm), .pulse_blocking(pb), .dead_time_on(dto), .saw_restart(restart),
    .saw_period(period), .saw_frequency_divider(div), .saw_data_enable(saw_en),
    .saw_data_ack(saw_ack), .pwm_u_value(pu), .pwm_v_value(pv), .pwm_w_value(pw),
    .pwm_data_enable(pwm_en), .pwm_data_ack(pwm_ack), .modulation_method(method),
    .modulation_enable(mod_en), .modulation_ack(mod_ack), .dead_time_value(dtv),
    .dead_time_enable(dt_en), .dead_time_ack(dt_ack), .pc_confirm(confirm),
    .pc_error_interrupt(err_irq), .pc_error_flag_register(err_flags)
  );

  int restarts = 0, confirms = 0;
  always @(posedge clk) if (!reset) begin
    if (restart) restarts++;
    if (confirm) confirms++;
  end

  task automatic wr(input logic [3:0] r, input logic [15:0] d);
    req = '{address: 16'({r, 1'b0}), data_write: d, read_enable: 0, write_enable: 1,
            chip_select: 1};
    @(posedge clk); #1;
    req = '0;
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

  task automatic ack(ref logic a);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    #1 a = 1;
    @(posedge clk); #1 a = 0;
    @(posedge clk); #1;
  endtask

  function automatic bit irq_bit(input logic [15:0] v, input int b);
    return v[b];
  endfunction

  initial begin
    logic [15:0] v, d;
    repeat (3) @(posedge clk); #1 reset = 0;
    rdreg(REG_INTERRUPT, v);
    check(v == 16'h0030 && pm && pb, $sformatf("reset state %h", v));

    // mode commands
    cmd(CMD_UNBLOCK_PULSES); check(!pb, "unblock pulses");
    cmd(CMD_BLOCK_PULSES);   check(pb, "block pulses");
    cmd(CMD_DEAD_TIME_ON);   rdreg(REG_INTERRUPT, v); check(dto && v[IRQ_DTO], "dead time on");
    cmd(CMD_DEAD_TIME_OFF);  check(!dto, "dead time off");
    cmd(CMD_SAFE_MODE_ON);   rdreg(REG_INTERRUPT, v); check(v[IRQ_SM], "safe mode on");
    cmd(CMD_SAFE_MODE_OFF);  rdreg(REG_INTERRUPT, v); check(!v[IRQ_SM], "safe mode off");

    // modulation register handshake and writing error
    wr(REG_MODULATION, 16'd2);
    check(mod_en && method == 2'd2, "modulation request");
    wr(REG_MODULATION, 16'd1);
    rdreg(REG_INTERRUPT, v);
    check(v[IRQ_ME] && method == 2'd2, "write to busy modulation register refused");
    ack(mod_ack);
    rdreg(REG_INTERRUPT, v);
    check(!mod_en && v[IRQ_ML], "modulation loaded");
    rdreg(REG_MODULATION, d); check(d == 16'd2, "modulation read-back");

    // dead time register
    d = 16'($urandom_range(0, 255));
    wr(REG_DEAD_TIME, d);
    check(dt_en && dtv == d[7:0], "dead time request");
    wr(REG_DEAD_TIME, 16'd3);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DTE], "dead time writing error");
    ack(dt_ack);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DTL] && !dt_en, "dead time loaded");
    rdreg(REG_DEAD_TIME, v); check(v == {8'd0, d[7:0]}, "dead time read-back");

    // saw registers: offered only by command
    wr(REG_SAW_PERIOD, 16'd1234);
    wr(REG_SAW_DIVIDER, 16'd7);
    check(!saw_en && period == 16'd1234 && div == 8'd7, "saw registers written");
    cmd(CMD_SAW_DATA_EN);
    check(saw_en, "saw request by command");
    wr(REG_SAW_PERIOD, 16'd99);
    rdreg(REG_INTERRUPT, v);
    check(v[IRQ_SE] && period == 16'd1234, "saw writing error");
    ack(saw_ack);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_SL] && !saw_en, "saw loaded");

    // PWM registers
    for (int i = 0; i < 5; i++) begin
      logic [15:0] a, b, c;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      wr(REG_PWM_U, a); wr(REG_PWM_V, b); wr(REG_PWM_W, c);
      cmd(CMD_PWM_DATA_EN);
      rdreg(REG_INTERRUPT, v);
      check(pwm_en && !v[IRQ_PVL], "PWM request clears loaded flag");
      check(pu == a && pv == b && pw == c, "PWM values held");
      wr(REG_PWM_V, 16'h1111);
      check(pv == b, "PWM write refused while busy");
      ack(pwm_ack);
      rdreg(REG_INTERRUPT, v); check(v[IRQ_PVL] && v[IRQ_PVE], "PWM loaded and writing error");
      rdreg(REG_PWM_W, d); check(d == c, "PWM read-back");
    end

    // error confirmation clears writing errors and sends pc_confirm
    cmd(CMD_ERROR_CONFIRM);
    check(confirm, "pc_confirm pulse");
    rdreg(REG_INTERRUPT, v);
    check(!v[IRQ_SE] && !v[IRQ_PVE] && !v[IRQ_ME] && !v[IRQ_DTE], "writing errors cleared");
    check(confirms == 1, $sformatf("pc_confirm one clock long (%0d)", confirms));

    // leaving programming mode restarts the carrier
    cmd(CMD_PROG_MODE_OFF);
    @(posedge clk); #1;
    check(!pm && restarts == 1, "programming mode off with restart");
    cmd(CMD_PROG_MODE_OFF);
    @(posedge clk); #1;
    check(restarts == 1, "no restart when already out of programming mode");
    cmd(CMD_PROG_MODE_ON); check(pm, "programming mode on");
    cmd(CMD_PROG_MODE_OFF);

    // driver errors: reported, and they block the pulses only in safe mode
    cmd(CMD_UNBLOCK_PULSES);
    err_irq = 1; err_flags = 6'b010010;
    @(posedge clk); #1;
    rdreg(REG_INTERRUPT, v);
    check(v[IRQ_DE] && !pb, "driver error reported, pulses stay on without safe mode");
    rdreg(REG_ERROR, v); check(v == 16'b010010, "error flag register read");
    cmd(CMD_SAFE_MODE_ON);
    @(posedge clk); #1;
    check(pb, "safe mode blocks pulses on a driver error");
    cmd(CMD_UNBLOCK_PULSES);
    @(posedge clk); #1;
    check(pb, "pulses stay blocked while the error is present in safe mode");
    err_irq = 0; err_flags = 0;
    cmd(CMD_UNBLOCK_PULSES);
    check(!pb, "pulses released after the error is gone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
