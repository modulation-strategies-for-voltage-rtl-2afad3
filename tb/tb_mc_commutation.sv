// tb_mc_commutation: the nine-switch commutation unit with random switch
// references, line voltage polarities, output current signs and method
// choice. Checked every clock: no input-side IGBT of a higher-voltage phase
// together with an output-side IGBT of a lower-voltage phase on the same
// output (a short), and a conducting path for the current sign of every
// output (a reversing current passes through the undecided state, as the
// real one does while crossing zero). After each reference has settled, every output must be joined to
// the referenced input only: both IGBTs with four step commutation, the
// IGBT of the current sign with two step commutation. Programming mode and
// pulse blocking must switch every gate off. Four step, two step and forced
// four step commutations are counted and must all occur. A second phase
// changes the method at random moments during commutations, with queued
// references, to test the hand-over between the two units.
module tb_mc_commutation;
  import mc_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 1, pb = 0, four_step = 1;
  logic [8:0] sw;
  logic uv = 0, vw = 0, wu = 0;
  logic [2:0] ip = 3'b111, ineg = 0;
  logic [7:0] dt_in = 0;
  logic dt_en = 0, dt_ack;
  logic [8:0] gi, go;
  logic [2:0] fsa;

  mc_commutation dut (
    .clk, .reset, .programming_mode(pm), .pulse_blocking(pb), .four_step, .sw,
    .v_uv(uv), .v_vw(vw), .v_wu(wu), .i_positive(ip), .i_negative(ineg),
    .dead_time_value(dt_in), .dead_time_enable(dt_en), .dead_time_ack(dt_ack),
    .gate_I(gi), .gate_O(go), .four_step_active(fsa)
  );

  int conn [3] = '{0, 0, 0};
  always_comb begin
    sw = '0;
    for (int y = 0; y < 3; y++) sw[sw_idx(y, conn[y])] = 1'b1;
  end

  int va [3];
  function automatic void set_voltages();
    for (int i = 0; i < 3; i++) va[i] = $urandom_range(0, 1000);
    uv = va[0] > va[1];
    vw = va[1] > va[2];
    wu = va[2] > va[0];
  endfunction

  // current signs of the last clocks; the path check uses a sign only
  // once it has been stable long enough to pass the gate registers
  logic [2:0] ip_h [4], in_h [4];
  always @(posedge clk) begin
    for (int k = 3; k > 0; k--) begin ip_h[k] <= ip_h[k - 1]; in_h[k] <= in_h[k - 1]; end
    ip_h[0] <= ip;
    in_h[0] <= ineg;
  end

  bit monitor_on = 0;
  always @(posedge clk) if (!reset && monitor_on) begin
    for (int y = 0; y < 3; y++) begin
      logic any_i, any_o;
      any_i = 0; any_o = 0;
      for (int a = 0; a < 3; a++) begin
        any_i |= gi[sw_idx(y, a)];
        any_o |= go[sw_idx(y, a)];
        for (int b = 0; b < 3; b++)
          if (a != b && va[a] > va[b] && gi[sw_idx(y, a)] && go[sw_idx(y, b)]) begin
            failures++;
            $display("FAIL: short on output %0d between inputs %0d and %0d", y, a, b);
          end
      end
      if (((ip[y] && ip_h[0][y] && ip_h[1][y] && ip_h[2][y] && ip_h[3][y]) && !any_i) ||
          ((ineg[y] && in_h[0][y] && in_h[1][y] && in_h[2][y] && in_h[3][y]) && !any_o)) begin
        failures++;
        $display("FAIL: no current path on output %0d (ip=%b in=%b)", y, ip[y], ineg[y]);
      end
    end
  end

  int n_four = 0, n_two = 0, n_forced = 0;
  logic [2:0] fsa_d;
  always @(posedge clk) if (!reset && !pm) begin
    fsa_d <= fsa;
    for (int y = 0; y < 3; y++)
      if (fsa[y] && !fsa_d[y] && !four_step) n_forced++;
  end

  task automatic settle_check(input int n);
    repeat (4 * (n + 1) + 6) @(posedge clk);
    #1;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++) begin
        logic ei, eo;
        if (x != conn[y]) begin ei = 0; eo = 0; end
        else if (fsa[y] || !(ip[y] ^ ineg[y])) begin ei = 1; eo = 1; end
        else begin ei = ip[y]; eo = ineg[y]; end
        check(gi[sw_idx(y, x)] == ei && go[sw_idx(y, x)] == eo,
              $sformatf("settled output %0d input %0d: I=%b O=%b expected %b/%b (fsa=%b)",
                        y, x, gi[sw_idx(y, x)], go[sw_idx(y, x)], ei, eo, fsa));
      end
  endtask

  initial begin
    int n;
    set_voltages();
    repeat (3) @(posedge clk); #1 reset = 0;
    n = 3;
    dt_in = 8'(n); dt_en = 1;
    do @(posedge clk); while (!dt_ack);
    #1 dt_en = 0;
    repeat (3) @(posedge clk); #1;
    check(gi == 0 && go == 0, "programming mode: all gates off");
    pm = 0;
    repeat (4) @(posedge clk);
    monitor_on = 1;
    for (int i = 0; i < 200; i++) begin
      // method and current signs change only between references
      if (i % 25 == 0) four_step = ~four_step;
      // a current reversal passes through the undecided region
      ip = ip | ineg; ineg = ip;
      repeat (6) @(posedge clk);
      for (int y = 0; y < 3; y++) begin
        int r;
        r = $urandom_range(0, 7);
        ip[y]   = (r < 3) || (r == 6);
        ineg[y] = (r >= 3 && r < 6) || (r == 6);
      end
      repeat (3) @(posedge clk);
      set_voltages();
      for (int y = 0; y < 3; y++)
        if ($urandom_range(0, 2) != 0) conn[y] = (conn[y] + $urandom_range(1, 2)) % 3;
      if (four_step) n_four++;
      else if (ip != ~ineg) n_two++;
      settle_check(n);
    end
    // method changes at random moments while commutations run, with
    // references arriving back to back: the hand-over between the two
    // units must never move or short an output
    for (int i = 0; i < 300; i++) begin
      int w;
      set_voltages();
      for (int y = 0; y < 3; y++)
        if ($urandom_range(0, 2) != 0) conn[y] = (conn[y] + $urandom_range(1, 2)) % 3;
      w = $urandom_range(0, 4 * (n + 1) + 4);
      repeat (w) @(posedge clk);
      #1 if ($urandom_range(0, 1) == 1) four_step = ~four_step;
      if ($urandom_range(0, 1) == 1) begin
        repeat ($urandom_range(0, 4 * (n + 1))) @(posedge clk);
        #1 for (int y = 0; y < 3; y++)
          if ($urandom_range(0, 2) == 0) conn[y] = (conn[y] + $urandom_range(1, 2)) % 3;
      end
      repeat (4 * (n + 1) + 8) @(posedge clk);
      if ($urandom_range(0, 3) == 0) begin
        // a current reversal through the undecided region
        ip = ip | ineg; ineg = ip;
        repeat (6) @(posedge clk);
        #1 for (int y = 0; y < 3; y++) begin
          int r;
          r = $urandom_range(0, 7);
          ip[y]   = (r < 3) || (r == 6);
          ineg[y] = (r >= 3 && r < 6) || (r == 6);
        end
      end
      settle_check(n);
    end
    monitor_on = 0;
    pb = 1;
    repeat (2) @(posedge clk); #1;
    check(gi == 0 && go == 0, "pulse blocking: all gates off");
    pb = 0; pm = 1;
    repeat (2) @(posedge clk); #1;
    check(gi == 0 && go == 0, "programming mode: all gates off");
    check(n_four > 0 && n_two > 0 && n_forced > 0,
          $sformatf("four step %0d, two step %0d, forced %0d", n_four, n_two, n_forced));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
