// tb_mc_avalon_decoder: register and command behaviour of the matrix
// converter control unit, with Avalon accesses driven directly and the
// units' acknowledges given after random delays. Checked: reset state, all
// commands, read-back of every register, the handshakes and "loaded"
// flags, writing errors and their clearing, the optimized pattern command
// being refused outside programming mode, the saw restart, and pulse
// blocking by a driver error in safe mode.
module tb_mc_avalon_decoder;
  import avalon_pkg::*;
  import mc_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic pm, pb, opt, fs, restart;
  logic [15:0] period, ti1, t11, t12, t21, t22;
  logic [7:0] div, sector, dtv;
  logic saw_en, saw_ack = 0, t_en, t_ack = 0, dt_en, dt_ack = 0;
  logic confirm, err_irq = 0;
  logic [8:0] e1 = 0, e2 = 0;

  mc_avalon_decoder dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd), .programming_mode(pm),
    .pulse_blocking(pb), .optimized(opt), .four_step(fs), .saw_restart(restart),
    .saw_period(period), .saw_frequency_divider(div), .saw_data_enable(saw_en),
    .saw_data_ack(saw_ack), .t_input_1(ti1), .t_11(t11), .t_12(t12), .t_21(t21),
    .t_22(t22), .sector, .times_data_enable(t_en), .times_data_ack(t_ack),
    .dead_time_value(dtv), .dead_time_enable(dt_en), .dead_time_ack(dt_ack),
    .pc_confirm(confirm), .pc_error_interrupt(err_irq),
    .pc_error_flag_register1(e1), .pc_error_flag_register2(e2)
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

  task automatic cmd(input mc_cmd_e c);
    wr(REG_COMMAND, 16'(c));
  endtask

  task automatic ack(ref logic a);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    #1 a = 1;
    @(posedge clk); #1 a = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [15:0] v, d;
    logic [15:0] t [5];
    repeat (3) @(posedge clk); #1 reset = 0;
    rdreg(REG_INTERRUPT, v);
    check(pm && pb && fs && !opt && v[IRQ_PM] && v[IRQ_PB] && v[IRQ_FS] && !v[IRQ_OO],
          $sformatf("reset state %h", v));

    cmd(CMD_UNBLOCK_PULSES); check(!pb, "unblock pulses");
    cmd(CMD_BLOCK_PULSES);   check(pb, "block pulses");
    cmd(CMD_TWO_STEP);       rdreg(REG_INTERRUPT, v); check(!fs && !v[IRQ_FS], "two step");
    cmd(CMD_FOUR_STEP);      rdreg(REG_INTERRUPT, v); check(fs && v[IRQ_FS], "four step");
    cmd(CMD_OPTIMIZED_ON);   rdreg(REG_INTERRUPT, v); check(opt && v[IRQ_OO], "optimized on");
    cmd(CMD_OPTIMIZED_OFF);  check(!opt, "optimized off");
    cmd(CMD_SAFE_MODE_ON);   rdreg(REG_INTERRUPT, v); check(v[IRQ_SM], "safe mode on");
    cmd(CMD_SAFE_MODE_OFF);  rdreg(REG_INTERRUPT, v); check(!v[IRQ_SM], "safe mode off");

    // dead time
    d = 16'($urandom_range(0, 255));
    wr(REG_DEAD_TIME, d);
    check(dt_en && dtv == d[7:0], "dead time request");
    wr(REG_DEAD_TIME, 16'd1);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DTE] && dtv == d[7:0], "dead time writing error");
    ack(dt_ack);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DTL] && !dt_en, "dead time loaded");
    rdreg(REG_DEAD_TIME, v); check(v == {8'd0, d[7:0]}, "dead time read-back");

    // saw
    wr(REG_SAW_PERIOD, 16'd777); wr(REG_SAW_DIVIDER, 16'd3);
    rdreg(REG_SAW_PERIOD, v); check(v == 16'd777, "saw period read-back");
    rdreg(REG_SAW_DIVIDER, v); check(v == 16'd3, "divider read-back");
    cmd(CMD_SAW_DATA_EN); check(saw_en, "saw request");
    wr(REG_SAW_DIVIDER, 16'd9);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_SE] && div == 8'd3, "saw writing error");
    ack(saw_ack);
    rdreg(REG_INTERRUPT, v); check(v[IRQ_SL] && !saw_en, "saw loaded");

    // times and sector
    for (int i = 0; i < 6; i++) begin
      logic [7:0] s;
      foreach (t[j]) t[j] = 16'($urandom_range(0, 4000));
      s = {4'($urandom_range(1, 6)), 4'($urandom_range(1, 6))};
      wr(REG_T_IN1, t[0]); wr(REG_T_11, t[1]); wr(REG_T_12, t[2]);
      wr(REG_T_21, t[3]); wr(REG_T_22, t[4]); wr(REG_SECTOR, 16'(s));
      check(!t_en, "times wait for the command");
      cmd(CMD_TIMES_DATA_EN);
      rdreg(REG_INTERRUPT, v);
      check(t_en && !v[IRQ_TL], "times request clears loaded flag");
      check(ti1 == t[0] && t11 == t[1] && t12 == t[2] && t21 == t[3] && t22 == t[4] &&
            sector == s, "times and sector held");
      rdreg(REG_T_21, v); check(v == t[3], "time read-back");
      rdreg(REG_SECTOR, v); check(v == 16'(s), "sector read-back");
      wr(REG_T_12, 16'd5);
      check(t12 == t[2], "times write refused while busy");
      ack(t_ack);
      rdreg(REG_INTERRUPT, v); check(v[IRQ_TL] && v[IRQ_TE], "times loaded, writing error");
    end

    // error confirmation
    cmd(CMD_ERROR_CONFIRM);
    @(posedge clk); #1;
    rdreg(REG_INTERRUPT, v);
    check(confirms == 1 && !v[IRQ_TE] && !v[IRQ_SE] && !v[IRQ_DTE], "confirmation");

    // programming mode
    cmd(CMD_PROG_MODE_OFF);
    @(posedge clk); #1;
    check(!pm && restarts == 1, "programming mode off restarts the saw");
    cmd(CMD_OPTIMIZED_ON);
    check(!opt, "optimized pattern refused outside programming mode");
    cmd(CMD_PROG_MODE_ON); check(pm, "programming mode on");
    cmd(CMD_OPTIMIZED_ON); check(opt, "optimized pattern in programming mode");
    cmd(CMD_PROG_MODE_OFF);

    // driver errors
    cmd(CMD_UNBLOCK_PULSES);
    e1 = 9'h101; e2 = 9'h0F0; err_irq = 1;
    @(posedge clk); #1;
    rdreg(REG_ERROR1, v); check(v == 16'h0101, "error register 1");
    rdreg(REG_ERROR2, v); check(v == 16'h00F0, "error register 2");
    rdreg(REG_INTERRUPT, v); check(v[IRQ_DE] && !pb, "driver error reported, no blocking");
    cmd(CMD_SAFE_MODE_ON);
    @(posedge clk); #1;
    check(pb, "safe mode blocks pulses on a driver error");
    err_irq = 0; e1 = 0; e2 = 0;
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
