// tb_mc_time_adjustment: random pattern times, sectors, periods and both
// patterns. The thresholds must equal the reference formulas (with the
// swap of the active vectors for the optimized pattern and an odd sector
// sum, and limiting at 0), one clock after the inputs; the enable must
// follow one clock later and drop on the modulator's acknowledge, which is
// passed back to the control unit.
module tb_mc_time_adjustment;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [15:0] period = 0, t1 = 0, t11 = 0, t12 = 0, t21 = 0, t22 = 0;
  logic opt = 0, en_in = 0, ack_out, en_out, ack_in = 0;
  logic [7:0] sec_in = 0, sec_out;
  logic [16:0] c1, c2, c3, c4, c5;

  mc_time_adjustment dut (
    .clk, .reset, .period_now(period), .optimized(opt), .t_input_1(t1), .t_11(t11),
    .t_12(t12), .t_21(t21), .t_22(t22), .sector_in(sec_in), .input_data_enable(en_in),
    .input_data_ack(ack_out), .value1(c1), .value2(c2), .value3(c3), .value4(c4),
    .value5(c5), .sector_out(sec_out), .output_data_enable(en_out), .data_ack(ack_in)
  );

  function automatic int limit0(input int x);
    return x < 0 ? 0 : x;
  endfunction

  initial begin
    int swaps = 0;
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 300; i++) begin
      int p, a, b, c, d, e, r, k;
      bit sw;
      p = $urandom_range(10, 2000);
      a = $urandom_range(0, p / 4); b = $urandom_range(0, p / 4);
      c = $urandom_range(0, p / 2);
      d = $urandom_range(0, p / 4); e = $urandom_range(0, p / 4);
      if (i % 10 == 0) begin d = p; e = p; end   // limiting at 0
      r = $urandom_range(1, 6); k = $urandom_range(1, 6);
      opt = $urandom_range(0, 1);
      sw = opt && ((r + k) % 2 == 1);
      if (sw) swaps++;
      period = 16'(p); t11 = 16'(a); t12 = 16'(b); t1 = 16'(c); t21 = 16'(d); t22 = 16'(e);
      sec_in = {4'(r), 4'(k)};
      en_in = 1;
      @(posedge clk); #1;
      check(en_out, "enable one clock later");
      check(c1 == 17'(sw ? b : a) && c2 == 17'(a + b) && c3 == 17'(c) &&
            c4 == 17'(limit0(p + 1 - d - e)) && c5 == 17'(limit0(p + 1 - (sw ? e : d))),
            $sformatf("thresholds %0d %0d %0d %0d %0d for p=%0d T=%0d,%0d,%0d,%0d,%0d swap=%0d",
                      c1, c2, c3, c4, c5, p, c, a, b, d, e, sw));
      check(sec_out == sec_in, "sector passed on");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 ack_in = 1;
      #0 check(ack_out, "acknowledge passed back");
      en_in = 0;
      @(posedge clk); #1 ack_in = 0;
      check(!en_out, "enable dropped by the acknowledge");
    end
    check(swaps > 20, "swapped pattern exercised");
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
