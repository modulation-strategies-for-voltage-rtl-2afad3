// avalon_pkg: the Avalon slave request bundle that the ISA bridge hands to a
// modulator, and a helper that turns the bridge's byte address into the
// register number the modulators decode.
//
// The ISA bridge drives the five lowest ISA address bits onto the Avalon
// address. Transfers are 16 bits wide, so bit 0 carries no information and
// the register number is address[4:1]; this matches a host that writes
// register n at I/O address base + 2*n.
package avalon_pkg;

  typedef struct packed {
    logic [15:0] address;       // byte address, bits 15..5 are zero
    logic [15:0] data_write;    // data of a write cycle
    logic        read_enable;   // a read cycle is in progress
    logic        write_enable;  // one clock pulse per write cycle
    logic        chip_select;   // the address falls into the modulator's window
  } avalon_req_t;

  localparam avalon_req_t AVALON_IDLE = '{default: '0};

  function automatic logic [3:0] reg_index(input logic [15:0] address);
    return address[4:1];
  endfunction

endpackage
