// Shared definitions of the Virtual-JTAG LED / dip-switch test logic.
//
// The user logic behind the Virtual JTAG node is addressed through a 2-bit
// virtual instruction register. The four codes below are the ones the
// design defines: 00 selects the bypass register, 01 reads the switches,
// 10 updates the LEDs and 11 is unused and behaves as bypass. The widths of
// the two data registers (8-bit data register, 2-bit bypass register) are
// also those of the design; they are given here as the defaults that the
// modules take for their parameters.
package jtag_led_pkg;

  // Width of the virtual instruction register (ir_in).
  localparam int unsigned IR_WIDTH = 2;

  // Default width of the LED / switch data register DR1.
  localparam int unsigned DATA_WIDTH_DEFAULT = 8;

  // Default width of the bypass register DR0.
  localparam int unsigned BYPASS_WIDTH_DEFAULT = 2;

  // Virtual instruction codes.
  typedef enum logic [IR_WIDTH-1:0] {
    INSTR_BYPASS = 2'b00,  // shift through the bypass register
    INSTR_KEY    = 2'b01,  // capture the dip switches and shift them out
    INSTR_LED    = 2'b10,  // shift a new LED pattern in, apply it at Update-DR
    INSTR_UNUSED = 2'b11   // not used: behaves as bypass
  } vir_instr_e;

endpackage
