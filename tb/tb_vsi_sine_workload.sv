// tb_vsi_sine_workload: the VSI modulator running the operating point of
// the inverter measurements: modulation degree M = 0.9, 240 carrier periods
// per output period (12 kHz switching for a 50 Hz output), with sinus
// modulation, space vector modulation and the new method in turn.
//
// Like the host program, the testbench computes three sine references per
// step, writes them over the Avalon port with PWM DATA ENABLE, and measures
// the carrier period in which they are in use. Per phase it checks the
// upper IGBT on-time against the method's level (independent model), and
// that the line-to-line on-time difference - what the load sees - equals
// 2(d+1)(v_x - v_y) whatever the method, since the common voltage cancels.
// Per method it counts the carrier periods in which a leg does not switch
// and the gate edges: SM and SVM must switch every leg in every period at
// M = 0.9, NewM must hold each leg for about a third of the output period
// and save about a third of the edges. No leg may have both IGBTs on.
module tb_vsi_sine_workload;
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
  localparam int STEPS = 240;               // carrier periods per output period
  localparam real M = 0.9;
  localparam real PI = 3.14159265358979;
  localparam int PERIOD_CLK = 2 * (P + 1) * (D + 1);

  avalon_req_t req = '0;
  logic [15:0] rd;
  logic confirm;
  logic [2:0] up, down;

  vsi_top dut (
    .clk, .reset, .avalon_req(req), .avalon_data_read(rd), .errors_in(6'h3F),
    .error_confirm(confirm), .igbt_u_up(up[0]), .igbt_u_down(down[0]),
    .igbt_v_up(up[1]), .igbt_v_down(down[1]), .igbt_w_up(up[2]), .igbt_w_down(down[2])
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && ((up & down) != 0)) begin
    failures++;
    $display("FAIL: shoot-through up=%b down=%b", up, down);
  end

  int up_cnt [3];
  int edges [3];
  logic [2:0] up_d = '0;
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (up[i]) up_cnt[i]++;
      if (up[i] && !up_d[i]) edges[i]++;
    end
    up_d <= up;
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
    if (l >= P + 1) return PERIOD_CLK;
    if (2 * (P + 1 - l) * (D + 1) <= N + 1) return 2 * l * (D + 1);
    t = 2 * l * (D + 1) - (N + 1);
    return t < 0 ? 0 : t;
  endfunction

  int held [3][3];      // [method][phase]: carrier periods without switching
  int edge_sum [3];     // [method]: upper-gate turn-on edges in the measured periods

  task automatic run_method(input int m);
    cmd(CMD_PROG_MODE_ON);
    wr(REG_MODULATION, 16'(m));
    wait_flag(IRQ_ML);
    cmd(CMD_PROG_MODE_OFF);
    for (int k = 0; k < STEPS; k++) begin
      int v [3], c0 [3], e0 [3], t [3];
      real wt;
      wt = 2.0 * PI * real'(k) / real'(STEPS);
      for (int i = 0; i < 3; i++)
        v[i] = $rtoi($floor(M * real'((P + 1) / 2) * $sin(wt - 2.0 * PI * real'(i) / 3.0) + 0.5));
      wr(REG_PWM_U, 16'(v[0])); wr(REG_PWM_V, 16'(v[1])); wr(REG_PWM_W, 16'(v[2]));
      cmd(CMD_PWM_DATA_EN);
      wait_flag(IRQ_PVL);
      wait_sync();
      wait_sync();
      c0 = up_cnt;
      e0 = edges;
      wait_sync();
      for (int i = 0; i < 3; i++) begin
        int l;
        t[i] = up_cnt[i] - c0[i];
        l = level(m, v[0], v[1], v[2], v[i]);
        check(t[i] == up_time(l),
              $sformatf("method %0d step %0d phase %0d: up %0d clocks, expected %0d",
                        m, k, i, t[i], up_time(l)));
        if (t[i] == 0 || t[i] == PERIOD_CLK) held[m][i]++;
        edge_sum[m] += edges[i] - e0[i];
      end
      // line-to-line: common voltage cancels unless a level was clamped
      // or a pulse was absorbed by the dead time
      begin
        for (int i = 0; i < 3; i++) begin
          int j, la, lb;
          j = (i + 1) % 3;
          la = level(m, v[0], v[1], v[2], v[i]);
          lb = level(m, v[0], v[1], v[2], v[j]);
          if (la > 0 && la < P + 1 && lb > 0 && lb < P + 1 &&
              2 * (P + 1 - la) * (D + 1) > N + 1 && 2 * (P + 1 - lb) * (D + 1) > N + 1 &&
              2 * la * (D + 1) > N + 1 && 2 * lb * (D + 1) > N + 1)
            check(t[i] - t[j] == 2 * (D + 1) * (v[i] - v[j]),
                  $sformatf("method %0d step %0d line %0d-%0d: %0d clocks, expected %0d",
                            m, k, i, j, t[i] - t[j], 2 * (D + 1) * (v[i] - v[j])));
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    repeat (3) @(posedge clk); #1;
    wr(REG_SAW_PERIOD, 16'(P));
    wr(REG_SAW_DIVIDER, 16'(D));
    cmd(CMD_SAW_DATA_EN);
    wait_flag(IRQ_SL);
    wr(REG_DEAD_TIME, 16'(N));
    wait_flag(IRQ_DTL);
    cmd(CMD_DEAD_TIME_ON);
    cmd(CMD_UNBLOCK_PULSES);
    for (int m = 0; m < 3; m++) run_method(m);
    for (int i = 0; i < 3; i++) begin
      check(held[0][i] == 0, $sformatf("SM: phase %0d held for %0d periods", i, held[0][i]));
      check(held[1][i] == 0, $sformatf("SVM: phase %0d held for %0d periods", i, held[1][i]));
      check(held[2][i] >= STEPS / 3 - 4 && held[2][i] <= STEPS / 3 + 4,
            $sformatf("NewM: phase %0d held for %0d of %0d periods", i, held[2][i], STEPS));
    end
    check(edge_sum[0] == 3 * STEPS && edge_sum[1] == 3 * STEPS,
          $sformatf("SM/SVM edges %0d/%0d", edge_sum[0], edge_sum[1]));
    check(edge_sum[2] * 3 <= edge_sum[0] * 2 + 12,
          $sformatf("NewM edges %0d against SM %0d", edge_sum[2], edge_sum[0]));
    $display("held periods SM %0d/%0d/%0d SVM %0d/%0d/%0d NewM %0d/%0d/%0d; edges SM %0d SVM %0d NewM %0d",
             held[0][0], held[0][1], held[0][2], held[1][0], held[1][1], held[1][2],
             held[2][0], held[2][1], held[2][2], edge_sum[0], edge_sum[1], edge_sum[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
