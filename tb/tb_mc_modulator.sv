// tb_mc_modulator: checks the switching states of the ISVM modulator
// against the switching pattern lookup table for every rectifier and
// inverter sector, both patterns and all six parts of the carrier period.
// The table is held as text in mc_pattern_pkg. Also checked: thresholds
// are taken only at the carrier start outside programming mode, the
// acknowledge is one clock long, and a sector outside 1..6 gives no switch.
module tb_mc_modulator;
  import mc_pkg::*;
  import mc_pattern_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask


  logic opt = 0, pm = 1, sync = 0, en = 0, ack;
  logic [15:0] saw = 0;
  logic [16:0] v [5];
  logic [7:0] sector = 0;
  logic [8:0] sw;

  mc_modulator dut (
    .clk, .reset, .optimized(opt), .saw, .programming_mode(pm), .saw_sync(sync),
    .value1(v[0]), .value2(v[1]), .value3(v[2]), .value4(v[3]), .value5(v[4]),
    .sector, .output_data_enable(en), .data_ack(ack), .sw
  );

  // expected switch word of a table entry
  function automatic logic [8:0] entry_sw(input int r, input int k, input int col);
    logic [8:0] w;
    w = '0;
    for (int y = 0; y < 3; y++) w[sw_idx(y, entry_input(r, k, col, y))] = 1'b1;
    return w;
  endfunction

  task automatic load(input logic [7:0] s);
    sector = s; en = 1;
    do @(posedge clk); while (!ack);
    #1 en = 0;
    @(posedge clk); #1;
    check(!ack, "acknowledge one clock long");
  endtask

  // saw positions inside each of the six parts for thresholds 10..50
  int part_saw [6] = '{5, 15, 25, 35, 45, 55};

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 5; i++) v[i] = 17'(10 * (i + 1));
    for (int o = 0; o < 2; o++) begin
      opt = o[0];
      for (int r = 1; r <= 6; r++)
        for (int k = 1; k <= 6; k++) begin
          load({4'(r), 4'(k)});
          for (int part = 0; part < 6; part++) begin
            saw = 16'(part_saw[part]);
            @(posedge clk); @(posedge clk); #1;
            check(sw == entry_sw(r, k, pattern_column(opt, r, k, part)),
                  $sformatf("opt=%0d sectors %0d/%0d part %0d: sw=%b", opt, r, k, part, sw));
          end
        end
    end
    // random saw positions with random thresholds, normal pattern
    opt = 0;
    for (int i = 0; i < 100; i++) begin
      int t [5];
      int s, part, r, k;
      t[0] = $urandom_range(0, 100);
      for (int j = 1; j < 5; j++) t[j] = t[j - 1] + $urandom_range(0, 100);
      for (int j = 0; j < 5; j++) v[j] = 17'(t[j]);
      r = $urandom_range(1, 6); k = $urandom_range(1, 6);
      load({4'(r), 4'(k)});
      s = $urandom_range(0, 510);
      saw = 16'(s);
      part = 5;
      for (int j = 4; j >= 0; j--) if (s < t[j]) part = j;
      @(posedge clk); @(posedge clk); #1;
      check(sw == entry_sw(r, k, pattern_column(0, r, k, part)),
            $sformatf("random: s=%0d part %0d sectors %0d/%0d", s, part, r, k));
    end
    // illegal sector gives no switch
    load(8'h70);
    @(posedge clk); @(posedge clk); #1;
    check(sw == 0, "illegal sector switches nothing");
    // outside programming mode the data wait for the carrier start
    pm = 0;
    sector = 8'h11; en = 1;
    repeat (5) @(posedge clk);
    #1 check(!ack, "no load in the middle of a period");
    sync = 1;
    @(posedge clk); #1 sync = 0;
    check(ack, "load at the carrier start");
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
