// mc_pkg: register map, command codes, interrupt flag positions and the
// switch numbering of the matrix converter (MC) modulator.
//
// A bidirectional switch joins output phase Y (A, B, C) to input phase X
// (U, V, W). All 9-bit switch vectors in this design use the bit order of
// the error registers: AU is bit 8, BU 7, CU 6, AV 5, BV 4, CV 3, AW 2,
// BW 1 and CW 0, i.e. bit 8 - (3*X + Y) with U=0, V=1, W=2 and A=0, B=1, C=2.
package mc_pkg;

  localparam logic [3:0] REG_COMMAND     = 4'h0;
  localparam logic [3:0] REG_INTERRUPT   = 4'h1;
  localparam logic [3:0] REG_DEAD_TIME   = 4'h3;
  localparam logic [3:0] REG_SAW_PERIOD  = 4'h4;
  localparam logic [3:0] REG_SAW_DIVIDER = 4'h5;
  localparam logic [3:0] REG_ERROR1      = 4'h6;  // input-side transistors
  localparam logic [3:0] REG_ERROR2      = 4'h7;  // output-side transistors
  localparam logic [3:0] REG_T_IN1       = 4'hA;  // d'r1 * p
  localparam logic [3:0] REG_T_11        = 4'hB;  // dr1 * di1 * p
  localparam logic [3:0] REG_T_12        = 4'hC;  // dr1 * di2 * p
  localparam logic [3:0] REG_T_21        = 4'hD;  // dr2 * di1 * p
  localparam logic [3:0] REG_T_22        = 4'hE;  // dr2 * di2 * p
  localparam logic [3:0] REG_SECTOR      = 4'hF;  // [7:4] rectifier, [3:0] inverter

  typedef enum logic [3:0] {
    CMD_BLOCK_PULSES   = 4'h1,
    CMD_UNBLOCK_PULSES = 4'h2,
    CMD_PROG_MODE_ON   = 4'h3,
    CMD_PROG_MODE_OFF  = 4'h4,
    CMD_SAW_DATA_EN    = 4'h5,
    CMD_TIMES_DATA_EN  = 4'h6,
    CMD_OPTIMIZED_ON   = 4'h7,
    CMD_OPTIMIZED_OFF  = 4'h8,
    CMD_ERROR_CONFIRM  = 4'h9,
    CMD_FOUR_STEP      = 4'hA,
    CMD_TWO_STEP       = 4'hB,
    CMD_SAFE_MODE_ON   = 4'hD,
    CMD_SAFE_MODE_OFF  = 4'hE
  } mc_cmd_e;

  localparam int IRQ_SL  = 0;   // saw loaded
  localparam int IRQ_DTL = 1;   // dead time loaded
  localparam int IRQ_TL  = 2;   // times loaded
  localparam int IRQ_FS  = 3;   // four step commutation on
  localparam int IRQ_PB  = 4;   // pulse blocking
  localparam int IRQ_PM  = 5;   // programming mode
  localparam int IRQ_DE  = 6;   // driver error
  localparam int IRQ_SE  = 7;   // saw writing error
  localparam int IRQ_TE  = 8;   // times writing error
  localparam int IRQ_OO  = 9;   // optimized pattern on
  localparam int IRQ_DTE = 10;  // dead time writing error
  localparam int IRQ_SM  = 12;  // safe mode

  // bit of switch (output phase y, input phase x) in a 9-bit switch vector
  function automatic int sw_idx(input int y, input int x);
    return 8 - (3 * x + y);
  endfunction

endpackage
