// tb_sample_filter: random input bits with runs of different lengths. A
// reference model keeps the last three samples per bit and loads the output
// when they agree; the filter must match it every clock, so runs shorter
// than three clocks never reach the output and longer ones appear four
// clocks after the change (three samples, then the output register).
module tb_sample_filter;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] d = 0, q;
  sample_filter #(.WIDTH(4), .RESET_VALUE(4'b0101)) dut (.clk, .reset, .d, .q);

  logic [3:0] h0, h1, h2, model;
  int loads = 0, ignored = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 checks++;
    if (q !== 4'b0101) begin failures++; $display("FAIL: reset value %b", q); end
    reset = 0;
    h0 = 4'b0101; h1 = 4'b0101; h2 = 4'b0101; model = 4'b0101;
    for (int i = 0; i < 3000; i++) begin
      // each bit toggles with low probability, giving runs of 1 .. many clocks
      for (int b = 0; b < 4; b++) if ($urandom_range(0, 3) == 0) d[b] = ~d[b];
      @(posedge clk);
      // the output is loaded from the stored samples, then d is stored
      for (int b = 0; b < 4; b++)
        if (h0[b] == h1[b] && h1[b] == h2[b]) begin
          if (model[b] != h2[b]) loads++;
          model[b] = h2[b];
        end else ignored++;
      h2 = h1; h1 = h0; h0 = d;
      #1 checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: q=%b expected %b", q, model);
      end
    end
    checks++;
    if (loads < 50 || ignored < 50) begin failures++; $display("FAIL: too few events"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
