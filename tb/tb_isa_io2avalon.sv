// tb_isa_io2avalon: drives ISA I/O cycles into the bridge and checks the
// Avalon side: address decoding against the base address and AEN, iocs16,
// one-clock write pulses carrying the ISA data and address, the number of
// clocks from the end of the write strobe to the write pulse, and read data
// returned onto the ISA bus while IOR is low.
module tb_isa_io2avalon;
  import avalon_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [23:0] isa_a = 0;
  logic [15:0] isa_d_in = 0, isa_d_out, avalon_data_read;
  logic isa_d_oe, isa_aen = 0, isa_ior = 1, isa_iow = 1, iocs16;
  avalon_req_t req;

  isa_io2avalon #(.BASE_ADDR(24'h000300)) dut (
    .avalon_clk(clk), .isa_reset(reset), .isa_a, .isa_d_in, .isa_d_out, .isa_d_oe,
    .isa_aen, .isa_ior, .isa_iow, .iocs16, .avalon_req(req), .avalon_data_read
  );

  // a register file behind the bridge: reads return 0xA500 + address
  assign avalon_data_read = 16'hA500 | req.address;

  int   pulses;
  logic [15:0] last_addr, last_data;
  int   last_pulse_time;
  always @(posedge clk) if (!reset && req.write_enable) begin
    pulses++;
    last_addr = req.address;
    last_data = req.data_write;
    last_pulse_time = $time;
    if (!req.chip_select) begin failures++; $display("FAIL: write pulse without chip select"); end
  end

  task automatic isa_write(input logic [23:0] a, input logic [15:0] d, input bit aen,
                           output int strobe_end);
    isa_a = a; isa_aen = aen; isa_d_in = d;
    #13 isa_iow = 0;
    #70 isa_iow = 1; strobe_end = $time;
    #20 isa_a = 24'h0; isa_d_in = 16'hDEAD; isa_aen = 0;
    #100;
  endtask

  initial begin
    int t_end, p0;
    pulses = 0;
    repeat (3) @(posedge clk); #1 reset = 0;
    // decoding
    isa_a = 24'h000306; #1;
    check(req.chip_select && !iocs16, "base address selects, iocs16 low");
    check(req.address == 16'h0006, "five low address bits passed");
    isa_a = 24'h000326; #1;
    check(!req.chip_select && iocs16, "address outside the window is ignored");
    isa_a = 24'h000306; isa_aen = 1; #1;
    check(!req.chip_select, "DMA cycle (AEN high) is ignored");
    isa_aen = 0; isa_a = 0; #1;
    // writes
    for (int i = 0; i < 8; i++) begin
      logic [4:0]  lo;
      logic [15:0] d;
      lo = 5'($urandom_range(0, 31));
      d  = 16'($urandom);
      p0 = pulses;
      isa_write(24'h000300 | 24'(lo), d, 0, t_end);
      check(pulses == p0 + 1, "exactly one write pulse per ISA write");
      check(last_addr == 16'(lo) && last_data == d,
            $sformatf("write address/data %h/%h, got %h/%h", lo, d, last_addr, last_data));
      check(last_pulse_time > t_end && last_pulse_time <= t_end + 40,
            $sformatf("write pulse %0d ns after strobe end", last_pulse_time - t_end));
    end
    p0 = pulses;
    isa_write(24'h000400, 16'h1234, 0, t_end);
    check(pulses == p0, "write outside the window gives no pulse");
    isa_write(24'h000302, 16'h1234, 1, t_end);
    check(pulses == p0, "write with AEN high gives no pulse");
    // reads
    isa_a = 24'h00030A; #10 isa_ior = 0; #20;
    check(req.read_enable && isa_d_oe && isa_d_out == 16'hA50A, "read data on the ISA bus");
    isa_ior = 1; #1;
    check(!req.read_enable && !isa_d_oe, "read released with IOR high");
    isa_a = 24'h00020A; #10 isa_ior = 0; #20;
    check(!req.read_enable && !isa_d_oe, "read outside the window not driven");
    isa_ior = 1;
    #50;
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
