// vsi_pkg: register map, command codes, interrupt flag positions and the
// modulation method encoding of the voltage source inverter (VSI) modulator.
// All numbers are those of the modulator's register description; the host
// writes register n at I/O address base + 2*n.
package vsi_pkg;

  // register numbers (Avalon address bits 4..1)
  localparam logic [3:0] REG_COMMAND     = 4'h0;
  localparam logic [3:0] REG_INTERRUPT   = 4'h1;
  localparam logic [3:0] REG_MODULATION  = 4'h2;
  localparam logic [3:0] REG_DEAD_TIME   = 4'h3;
  localparam logic [3:0] REG_SAW_PERIOD  = 4'h4;
  localparam logic [3:0] REG_SAW_DIVIDER = 4'h5;
  localparam logic [3:0] REG_ERROR       = 4'h6;
  localparam logic [3:0] REG_PWM_U       = 4'hA;
  localparam logic [3:0] REG_PWM_V       = 4'hB;
  localparam logic [3:0] REG_PWM_W       = 4'hC;

  // command register codes (bits 3..0)
  typedef enum logic [3:0] {
    CMD_BLOCK_PULSES   = 4'h1,
    CMD_UNBLOCK_PULSES = 4'h2,
    CMD_PROG_MODE_ON   = 4'h3,
    CMD_PROG_MODE_OFF  = 4'h4,
    CMD_SAW_DATA_EN    = 4'h5,
    CMD_PWM_DATA_EN    = 4'h6,
    CMD_SAFE_MODE_ON   = 4'h7,
    CMD_SAFE_MODE_OFF  = 4'h8,
    CMD_ERROR_CONFIRM  = 4'h9,
    CMD_DEAD_TIME_ON   = 4'hA,
    CMD_DEAD_TIME_OFF  = 4'hB
  } vsi_cmd_e;

  // interrupt register bit positions
  localparam int IRQ_SL  = 0;   // saw loaded
  localparam int IRQ_DTL = 1;   // dead time loaded
  localparam int IRQ_PVL = 2;   // PWM values loaded
  localparam int IRQ_ML  = 3;   // modulation loaded
  localparam int IRQ_PB  = 4;   // pulse blocking
  localparam int IRQ_PM  = 5;   // programming mode
  localparam int IRQ_DE  = 6;   // driver error
  localparam int IRQ_SE  = 7;   // saw writing error
  localparam int IRQ_PVE = 8;   // PWM writing error
  localparam int IRQ_ME  = 9;   // modulation writing error
  localparam int IRQ_DTE = 10;  // dead time writing error
  localparam int IRQ_SM  = 11;  // safe mode
  localparam int IRQ_DTO = 12;  // dead time on

  // modulation method register (bits 1..0)
  typedef enum logic [1:0] {
    MOD_SM   = 2'b00,   // sinus modulation: values pass unchanged
    MOD_SVM  = 2'b01,   // space vector modulation
    MOD_NEWM = 2'b10    // new method: top phase clamped to +V_DC
  } vsi_mod_e;

endpackage
