// modulator_system: the two modulators as they sit on the FPGA board, each
// behind its own ISA I/O-to-Avalon bridge. The VSI modulator
// (isa_io2avalon + vsi_top) drives a two-level inverter; the matrix
// converter modulator (isa_io2avalon + mc_top) drives a matrix converter.
// They are independent designs placed side by side, each with its own ISA
// port and converter signals; they share only the clock and reset.
//
// The ISA data bus of each bridge is split into isa_d_in, isa_d_out and an
// output enable for an external tri-state pad. Both bridges decode I/O base
// 0x300 by default (one modulator is fitted to a board at a time); set
// VSI_BASE / MC_BASE apart to use both on one bus.
module modulator_system
  import avalon_pkg::*;
#(
  parameter logic [23:0] VSI_BASE = 24'h000300,
  parameter logic [23:0] MC_BASE  = 24'h000300
) (
  input  logic        clk,
  input  logic        reset,
  // VSI modulator: ISA port
  input  logic [23:0] vsi_isa_a,
  input  logic [15:0] vsi_isa_d_in,
  output logic [15:0] vsi_isa_d_out,
  output logic        vsi_isa_d_oe,
  input  logic        vsi_isa_aen,
  input  logic        vsi_isa_ior,
  input  logic        vsi_isa_iow,
  output logic        vsi_iocs16,
  // VSI modulator: converter
  input  logic [5:0]  vsi_errors_in,
  output logic        vsi_error_confirm,
  output logic [5:0]  vsi_gates,        // {W up, W down, V up, V down, U up, U down}
  // MC modulator: ISA port
  input  logic [23:0] mc_isa_a,
  input  logic [15:0] mc_isa_d_in,
  output logic [15:0] mc_isa_d_out,
  output logic        mc_isa_d_oe,
  input  logic        mc_isa_aen,
  input  logic        mc_isa_ior,
  input  logic        mc_isa_iow,
  output logic        mc_iocs16,
  // MC modulator: converter
  input  logic [17:0] mc_errors_in,
  input  logic [17:0] mc_comp_in,
  input  logic [2:0]  mc_voltage_in,
  output logic [17:0] mc_gates
);

  avalon_req_t vsi_req, mc_req;
  logic [15:0] vsi_rd, mc_rd;

  isa_io2avalon #(.BASE_ADDR(VSI_BASE)) u_vsi_bridge (
    .avalon_clk(clk), .isa_reset(reset), .isa_a(vsi_isa_a), .isa_d_in(vsi_isa_d_in),
    .isa_d_out(vsi_isa_d_out), .isa_d_oe(vsi_isa_d_oe), .isa_aen(vsi_isa_aen),
    .isa_ior(vsi_isa_ior), .isa_iow(vsi_isa_iow), .iocs16(vsi_iocs16),
    .avalon_req(vsi_req), .avalon_data_read(vsi_rd)
  );

  vsi_top u_vsi (
    .clk, .reset, .avalon_req(vsi_req), .avalon_data_read(vsi_rd),
    .errors_in(vsi_errors_in), .error_confirm(vsi_error_confirm),
    .igbt_u_up(vsi_gates[1]), .igbt_u_down(vsi_gates[0]),
    .igbt_v_up(vsi_gates[3]), .igbt_v_down(vsi_gates[2]),
    .igbt_w_up(vsi_gates[5]), .igbt_w_down(vsi_gates[4])
  );

  isa_io2avalon #(.BASE_ADDR(MC_BASE)) u_mc_bridge (
    .avalon_clk(clk), .isa_reset(reset), .isa_a(mc_isa_a), .isa_d_in(mc_isa_d_in),
    .isa_d_out(mc_isa_d_out), .isa_d_oe(mc_isa_d_oe), .isa_aen(mc_isa_aen),
    .isa_ior(mc_isa_ior), .isa_iow(mc_isa_iow), .iocs16(mc_iocs16),
    .avalon_req(mc_req), .avalon_data_read(mc_rd)
  );

  mc_top u_mc (
    .clk, .reset, .avalon_req(mc_req), .avalon_data_read(mc_rd),
    .errors_in(mc_errors_in), .comp_in(mc_comp_in), .voltage_in(mc_voltage_in),
    .gates(mc_gates)
  );

endmodule
