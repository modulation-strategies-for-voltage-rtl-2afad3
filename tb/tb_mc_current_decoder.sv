// tb_mc_current_decoder: random connections and comparator states held for
// several clocks. After the filter and register delay the sign must follow
// the connected phase's comparator pair ((1,0) positive, (0,1) negative,
// otherwise undecided), be undecided with no or two connected phases and
// in programming mode or pulse blocking; comparator glitches of one or two
// clocks must not change the result.
module tb_mc_current_decoder;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pm = 0, pb = 0;
  logic [2:0] conn = 0;
  logic [5:0] comp = 0;   // {W_O, W_I, V_O, V_I, U_O, U_I}
  logic ip, ineg;

  mc_current_decoder dut (
    .clk, .reset, .programming_mode(pm), .pulse_blocking(pb),
    .U(conn[0]), .V(conn[1]), .W(conn[2]),
    .comp_U_I(comp[0]), .comp_U_O(comp[1]), .comp_V_I(comp[2]), .comp_V_O(comp[3]),
    .comp_W_I(comp[4]), .comp_W_O(comp[5]), .I_positive(ip), .I_negative(ineg)
  );

  function automatic logic [1:0] expected();
    int x;
    if (pm || pb) return 2'b00;
    case (conn)
      3'b001: x = 0;
      3'b010: x = 1;
      3'b100: x = 2;
      default: return 2'b00;
    endcase
    case ({comp[2*x], comp[2*x+1]})
      2'b10: return 2'b10;
      2'b01: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  initial begin
    int pos = 0, neg = 0;
    repeat (3) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 400; i++) begin
      logic [1:0] e;
      logic [5:0] held;
      case ($urandom_range(0, 5))
        0: conn = 3'b000;
        1: conn = 3'b011;
        default: conn = 3'(1 << $urandom_range(0, 2));
      endcase
      comp = 6'($urandom);
      pm = ($urandom_range(0, 9) == 0);
      pb = ($urandom_range(0, 9) == 0);
      repeat (5) @(posedge clk); #1;
      e = expected();
      check({ip, ineg} == e, $sformatf("conn=%b comp=%b pm=%b pb=%b: sign %b%b expected %b",
                                       conn, comp, pm, pb, ip, ineg, e));
      if (e == 2'b10) pos++;
      if (e == 2'b01) neg++;
      // a short glitch on all comparators changes nothing
      held = comp;
      comp = ~comp;
      repeat ($urandom_range(1, 2)) @(posedge clk);
      #1 comp = held;
      repeat (5) @(posedge clk); #1;
      check({ip, ineg} == e, "glitch ignored");
    end
    check(pos > 20 && neg > 20, "both signs seen");
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
