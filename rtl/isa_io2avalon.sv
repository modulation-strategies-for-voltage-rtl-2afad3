// isa_io2avalon: bridge from the ISA I/O bus of the host CPU board to the
// Avalon slave port of a modulator.
//
// Decoding: an I/O cycle (isa_aen low) whose address matches BASE_ADDR in
// bits 23..5 selects the modulator. avalon_chip_select is then raised and
// iocs16 is pulled low (active low) so that the host performs a 16-bit
// transfer. The five lowest ISA address bits are passed onto the Avalon
// address, the upper Avalon address bits are zero.
//
// Read: while isa_ior is low in a selected cycle, avalon_read_enable is high
// and the modulator's avalon_data_read is driven onto the ISA data lines
// (isa_d_out with output enable isa_d_oe; the tri-state pad is outside).
//
// Write: isa_iow is brought into the avalon_clk domain with two flip-flops.
// While the synchronised strobe is low in a selected cycle, address and data
// are captured; its rising edge (the end of the ISA write strobe) produces a
// one-clock avalon_write_enable with the captured data and address, two to
// three avalon_clk cycles after the strobe ends.
//
// Design choices beyond the source description: the strobe is synchronised
// rather than used as a clock; isa_reset clears the bridge's registers; the
// data bus is split into in/out/enable because a two-state simulation has no
// tri-state value.
module isa_io2avalon
  import avalon_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR = 24'h000300  // I/O base of the modulator
) (
  input  logic              avalon_clk,
  input  logic              isa_reset,
  input  logic [23:0]       isa_a,
  input  logic [15:0]       isa_d_in,
  output logic [15:0]       isa_d_out,
  output logic              isa_d_oe,
  input  logic              isa_aen,
  input  logic              isa_ior,     // active low
  input  logic              isa_iow,     // active low
  output logic              iocs16,      // active low
  output avalon_req_t       avalon_req,
  input  logic [15:0]       avalon_data_read
);

  logic       selected;
  logic [2:0] iow_sync;           // [0] first stage, [1] synchronised, [2] previous
  logic       cap_valid;
  logic [4:0] cap_addr;
  logic [15:0] cap_data;
  logic       wr_pulse;
  logic [4:0] wr_addr;
  logic [15:0] wr_data;

  assign selected = !isa_aen && (isa_a[23:5] == BASE_ADDR[23:5]);
  assign iocs16   = !selected;

  always_ff @(posedge avalon_clk) begin
    if (isa_reset) begin
      iow_sync  <= 3'b111;
      cap_valid <= 1'b0;
      cap_addr  <= '0;
      cap_data  <= '0;
      wr_pulse  <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      iow_sync <= {iow_sync[1:0], isa_iow};
      wr_pulse <= 1'b0;
      if (!iow_sync[1]) begin
        // strobe low: keep the latest address and data of a selected cycle
        if (selected) begin
          cap_valid <= 1'b1;
          cap_addr  <= isa_a[4:0];
          cap_data  <= isa_d_in;
        end
      end else if (!iow_sync[2]) begin
        // rising edge of the synchronised strobe
        wr_pulse  <= cap_valid;
        wr_addr   <= cap_addr;
        wr_data   <= cap_data;
        cap_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    avalon_req.read_enable  = selected && !isa_ior;
    avalon_req.write_enable = wr_pulse;
    avalon_req.chip_select  = selected || wr_pulse;
    avalon_req.address      = {11'd0, wr_pulse ? wr_addr : isa_a[4:0]};
    avalon_req.data_write   = wr_data;
  end

  assign isa_d_out = avalon_data_read;
  assign isa_d_oe  = selected && !isa_ior;

endmodule
