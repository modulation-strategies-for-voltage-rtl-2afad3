// tb_saw_generator: checks the carrier of saw_generator against a reference
// model written from the frequency formula f_saw = f_clk / (2(p+1)(d+1)):
// the triangle sequence 0..p,p..0, the period length in clocks, the sync
// pulse, loading at the period start versus in programming mode, the
// acknowledge, and the internal restart. Also checks the programming-mode-
// only variant (LOAD_AT_SYNC = 0).
module tb_saw_generator;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        internal_reset = 0, programming_mode = 0;
  logic [15:0] saw_period = 0;
  logic [7:0]  saw_div = 0;
  logic        saw_en = 0, saw_ack, saw_sync;
  logic [15:0] saw_out, period_now;
  logic        ack2, sync2;
  logic [15:0] out2, pnow2;

  saw_generator dut (
    .clk, .reset, .internal_reset, .programming_mode, .saw_period,
    .saw_frequency_divider(saw_div), .saw_data_enable(saw_en), .saw_ack,
    .saw_out, .period_now, .saw_sync
  );
  saw_generator #(.LOAD_AT_SYNC(1'b0)) dut_mc (
    .clk, .reset, .internal_reset(1'b0), .programming_mode, .saw_period,
    .saw_frequency_divider(saw_div), .saw_data_enable(saw_en), .saw_ack(ack2),
    .saw_out(out2), .period_now(pnow2), .saw_sync(sync2)
  );

  // request new values, wait for the acknowledge, return cycles waited
  task automatic load(input logic [15:0] p, input logic [7:0] d, output int waited);
    saw_period = p; saw_div = d; saw_en = 1; waited = 0;
    do begin @(posedge clk); #1; waited++; end while (!saw_ack && waited < 100000);
    saw_en = 0;
  endtask

  // measure one period between two sync pulses and compare with the model
  task automatic measure(input int p, input int d);
    int n, idx, expected_val, errs;
    while (!saw_sync) begin @(posedge clk); #1; end
    n = 0; errs = 0;
    // after the sync pulse the counter has just left the bottom
    do begin
      // reference: step index within the period
      idx = n / (d + 1);
      expected_val = (idx <= p) ? idx : (2 * p + 1 - idx);
      if (n < 2 * (p + 1) * (d + 1) && saw_out != 16'(expected_val)) errs++;
      @(posedge clk); #1; n++;
    end while (!saw_sync && n < 200000);
    check(n == 2 * (p + 1) * (d + 1),
          $sformatf("period p=%0d d=%0d: %0d clocks, expected %0d", p, d, n, 2*(p+1)*(d+1)));
    check(errs == 0, $sformatf("triangle sequence p=%0d d=%0d: %0d mismatches", p, d, errs));
  endtask

  initial begin
    int w, maxv;
    repeat (3) @(posedge clk); #1 reset = 0;
    // programming mode: loads at once
    programming_mode = 1;
    load(16'd9, 8'd0, w);
    check(w <= 2, "load in programming mode is immediate");
    check(period_now == 9 && pnow2 == 9, "period_now after load");
    programming_mode = 0;
    measure(9, 0);
    measure(9, 0);
    // peak value
    maxv = 0;
    repeat (40) begin @(posedge clk); #1; if (saw_out > maxv) maxv = saw_out; end
    check(maxv == 9, "peak equals period value");
    // outside programming mode: the VSI variant loads at the period start
    load(16'd4, 8'd2, w);
    check(saw_sync || dut.cnt == 0, "load happens at the start of a period");
    check(period_now == 4, "VSI variant took the new period");
    check(pnow2 == 9, "MC variant ignores loads outside programming mode");
    measure(4, 2);
    measure(4, 2);
    // internal restart
    repeat (7) @(posedge clk); #1 internal_reset = 1; @(posedge clk); #1 internal_reset = 0;
    check(saw_sync && saw_out == 0, "internal reset restarts the carrier with a sync");
    measure(4, 2);
    programming_mode = 1;
    load(16'd20, 8'd1, w);
    programming_mode = 0;
    measure(20, 1);
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
