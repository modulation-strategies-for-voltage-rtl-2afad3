// tb_mc_four_step_commutation: random commutations of one output phase
// between the three input phases with random line voltage polarities and
// dead times. Each clock the gates are checked for a short of two input
// phases (with v1 > v2: SI1 together with SO2) and for a current path of
// both signs (at least one SI and one SO on). Each commutation must pass
// through the four expected gate states, each held n + 1 clocks, and end
// with both IGBTs of the new phase on and all others off. References that
// are not one-hot, or equal to the connected phase, must start nothing.
module tb_mc_four_step_commutation;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 1;
  logic [2:0] in_ref = 3'b001;
  logic uv = 0, vw = 0, wu = 0;
  logic [7:0] dt_in = 0;
  logic dt_en = 0, dt_ack;
  logic [2:0] gi, go;
  logic no_com;

  mc_four_step_commutation dut (
    .clk, .reset, .programming_mode(pm), .input_U(in_ref[0]), .input_V(in_ref[1]),
    .input_W(in_ref[2]), .v_uv(uv), .v_vw(vw), .v_wu(wu), .dead_time_value_in(dt_in),
    .dead_time_enable(dt_en), .dead_time_ack(dt_ack), .gate_I(gi), .gate_O(go), .no_com
  );

  // input phase voltages chosen by the testbench; polarities follow them
  int va [3];
  function automatic void set_voltages();
    for (int i = 0; i < 3; i++) va[i] = $urandom_range(0, 1000);
    uv = va[0] > va[1];
    vw = va[1] > va[2];
    wu = va[2] > va[0];
  endfunction

  // per clock: no short, current path for both signs
  always @(posedge clk) if (!reset && !pm) begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if (a != b && va[a] > va[b] && gi[a] && go[b]) begin
          failures++;
          $display("FAIL: short between inputs %0d and %0d (gi=%b go=%b)", a, b, gi, go);
        end
    if (gi == 0 || go == 0) begin
      failures++;
      $display("FAIL: no current path gi=%b go=%b", gi, go);
    end
  end

  task automatic set_dead_time(input int n);
    pm = 1;
    dt_in = 8'(n); dt_en = 1;
    do @(posedge clk); while (!dt_ack);
    #1 dt_en = 0; pm = 0;
  endtask

  int cur = 0;

  task automatic commutate(input int to, input int n);
    logic [2:0] e_i [4], e_o [4];
    bit pos;
    int held;
    pos = va[cur] > va[to];
    // expected gate states after each of the four steps
    for (int s = 0; s < 4; s++) begin e_i[s] = 3'(1 << cur); e_o[s] = 3'(1 << cur); end
    if (pos) begin
      e_i[0][to] = 1;
      e_i[1][to] = 1; e_i[1][cur] = 0;
      e_i[2][to] = 1; e_i[2][cur] = 0; e_o[2][to] = 1;
    end else begin
      e_o[0][to] = 1;
      e_o[1][to] = 1; e_o[1][cur] = 0;
      e_o[2][to] = 1; e_o[2][cur] = 0; e_i[2][to] = 1;
    end
    e_i[3] = 3'(1 << to); e_o[3] = 3'(1 << to);
    in_ref = 3'(1 << to);
    // the gates change two clocks after the reference (state, then register)
    @(posedge clk); @(posedge clk); #1;
    for (int s = 0; s < 3; s++) begin
      held = 0;
      while (gi == e_i[s] && go == e_o[s] && held < 300) begin
        @(posedge clk); #1; held++;
      end
      check(held == n + 1, $sformatf("step %0d (v12>0=%0d) held %0d clocks, expected %0d, gi=%b go=%b",
                                     s + 1, pos, held, n + 1, gi, go));
    end
    check(gi == e_i[3] && go == e_o[3],
          $sformatf("final state gi=%b go=%b, expected %b/%b", gi, go, e_i[3], e_o[3]));
    repeat (n + 2) @(posedge clk);
    #1 check(no_com, "commutation finished");
    cur = to;
  endtask

  initial begin
    int commutations = 0;
    set_voltages();
    repeat (3) @(posedge clk); #1 reset = 0;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      int n;
      n = (k == 0) ? 0 : $urandom_range(1, 12);
      set_dead_time(n);
      repeat (3) @(posedge clk); #1;
      check(gi == 3'(1 << cur) && go == 3'(1 << cur), "steady state: both IGBTs of one phase");
      for (int i = 0; i < 12; i++) begin
        int to;
        to = (cur + $urandom_range(1, 2)) % 3;
        set_voltages();
        commutate(to, n);
        commutations++;
        // invalid references and the connected phase start nothing
        in_ref = ($urandom_range(0, 1) == 0) ? 3'b000 : 3'b011;
        repeat (4) @(posedge clk); #1;
        check(no_com && gi == 3'(1 << cur) && go == 3'(1 << cur), "invalid reference ignored");
        in_ref = 3'(1 << cur);
        repeat (3) @(posedge clk); #1;
        check(no_com, "connected phase starts nothing");
      end
    end
    check(commutations == 72, "all commutations done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
