// hmpid_jtag_top - JTAG loop-back test of bidirectional communication
// between a host and the FPGA through a Virtual JTAG node.
//
// A host scans an 8-bit pattern into the node with the LED instruction
// (10); the pattern appears on the eight LED outputs of 'connect'. Those
// outputs are wired straight back to the eight switch inputs, so a following
// scan with the switch-read instruction (01) returns the same pattern on
// tdo. Bits 0 and 1 of the pattern also drive the two board LEDs, ACCESS_LED
// and TRIG_LED. Instructions 00 and 11 are bypass.
//
// The Virtual JTAG megafunction itself (the FPGA vendor's JTAG hub and its
// TAP-state decoding) is not part of this RTL: its outputs are the inputs of
// this module and tdo goes back to it. Only the state flags that the user
// logic needs are brought in (Capture-DR, Shift-DR, Update-DR, Update-IR);
// the other flags of the megafunction (Exit1/Pause/Exit2-DR, Capture-IR) and
// its ir_out input are left unconnected, as in the design.
//
// The active-low reset input of the user logic is driven through an
// inverter from 'locked', a signal of the surrounding firmware named after a
// clock generator's lock flag. Wired this way, the data registers are
// cleared on each rising tck edge while locked is high and run while it is
// low; the polarity of that signal is not defined here, so a board whose
// lock flag is high in operation needs the inverter removed. All timing is
// that of 'connect': a single clock domain, tck.
//
// The connections follow the design's schematic; the port names in lower
// case and the 8-bit grouping of the LED / switch wires are own choices.
module hmpid_jtag_top
  import jtag_led_pkg::*;
(
  // From the Virtual JTAG megafunction
  input  logic                tck,
  input  logic                tdi,
  input  logic [IR_WIDTH-1:0] ir_in,
  input  logic                virtual_state_cdr,
  input  logic                virtual_state_sdr,
  input  logic                virtual_state_udr,
  input  logic                virtual_state_uir,
  // To the Virtual JTAG megafunction
  output logic                tdo,
  // Firmware lock signal; high holds the data registers cleared
  input  logic                locked,
  // Board LEDs
  output logic                access_led,  // LED bit 0
  output logic                trig_led     // LED bit 1
);

  logic                          aclr;
  logic [DATA_WIDTH_DEFAULT-1:0] leds;

  // Reset inverter between the lock signal and the active-low reset.
  assign aclr = ~locked;

  connect #(
    .DATA_WIDTH   (DATA_WIDTH_DEFAULT),
    .BYPASS_WIDTH (BYPASS_WIDTH_DEFAULT)
  ) u_connect (
    .tck   (tck),
    .tdi   (tdi),
    .aclr  (aclr),
    .ir_in (ir_in),
    .v_sdr (virtual_state_sdr),
    .v_udr (virtual_state_udr),
    .v_cdr (virtual_state_cdr),
    .v_uir (virtual_state_uir),
    .s     (leds),   // LED outputs looped back as switch inputs
    .d     (leds),
    .tdo   (tdo)
  );

  assign access_led = leds[0];
  assign trig_led   = leds[1];

endmodule
