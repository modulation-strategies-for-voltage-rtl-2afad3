// tb_mc_two_step_commutation: random commutations of one output phase with
// a known current sign and random dead times. Checked every clock: no
// input-side IGBT of one phase together with an output-side IGBT of another
// phase (a short). Per commutation: first both IGBTs of the current's
// direction (old and new phase) for n + 1 clocks, then the new phase's IGBT
// alone; the steady state uses only the IGBT of the current sign. With an
// undecided current sign a new reference must give a one-clock force_4step
// and move the connected phase without a two step sequence.
module tb_mc_two_step_commutation;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 1;
  logic [2:0] in_ref = 3'b001;
  logic ip = 1, ineg = 0;
  logic [7:0] dt_in = 0;
  logic dt_en = 0, dt_ack;
  logic [2:0] gi, go;
  logic no_com, force4;

  mc_two_step_commutation dut (
    .clk, .reset, .programming_mode(pm), .input_U(in_ref[0]), .input_V(in_ref[1]),
    .input_W(in_ref[2]), .i_positive(ip), .i_negative(ineg), .dead_time_value_in(dt_in),
    .dead_time_enable(dt_en), .dead_time_ack(dt_ack), .gate_I(gi), .gate_O(go), .no_com,
    .force_4step(force4)
  );

  int forces = 0;
  always @(posedge clk) if (!reset && !pm) begin
    if (force4) forces++;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if (a != b && gi[a] && go[b]) begin
          failures++;
          $display("FAIL: short gi=%b go=%b", gi, go);
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
    logic [2:0] both, single;
    int held;
    both = 3'((1 << cur) | (1 << to));
    single = 3'(1 << to);
    in_ref = 3'(1 << to);
    @(posedge clk); @(posedge clk); #1;
    held = 0;
    while ((ip ? (gi == both && go == 0) : (go == both && gi == 0)) && held < 300) begin
      @(posedge clk); #1; held++;
    end
    check(held == n + 1, $sformatf("both IGBTs held %0d clocks, expected %0d", held, n + 1));
    check(ip ? (gi == single && go == 0) : (go == single && gi == 0),
          $sformatf("new phase alone: gi=%b go=%b", gi, go));
    repeat (n + 2) @(posedge clk);
    #1 check(no_com, "commutation finished");
    cur = to;
  endtask

  initial begin
    int f0;
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int k = 0; k < 5; k++) begin
      int n;
      n = (k == 0) ? 0 : $urandom_range(1, 10);
      set_dead_time(n);
      for (int i = 0; i < 12; i++) begin
        int to;
        ip = $urandom_range(0, 1);
        ineg = !ip;
        repeat (3) @(posedge clk); #1;
        check(ip ? (gi == 3'(1 << cur) && go == 0) : (go == 3'(1 << cur) && gi == 0),
              $sformatf("steady state with known sign gi=%b go=%b", gi, go));
        to = (cur + $urandom_range(1, 2)) % 3;
        commutate(to, n);
      end
    end
    // undecided sign: both IGBTs of the phase, and force_4step on a new reference
    for (int i = 0; i < 6; i++) begin
      int to;
      {ip, ineg} = ($urandom_range(0, 1) == 0) ? 2'b00 : 2'b11;
      repeat (3) @(posedge clk); #1;
      check(gi == 3'(1 << cur) && go == 3'(1 << cur), "undecided sign: both IGBTs on");
      f0 = forces;
      to = (cur + $urandom_range(1, 2)) % 3;
      in_ref = 3'(1 << to);
      repeat (4) @(posedge clk); #1;
      check(forces == f0 + 1, "one force_4step pulse");
      check(no_com && gi == 3'(1 << to) && go == 3'(1 << to), "phase handed over to four step");
      cur = to;
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
