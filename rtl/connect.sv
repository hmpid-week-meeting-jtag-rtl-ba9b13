// connect - data registers of a Virtual-JTAG node that reads eight dip
// switches and drives eight LEDs.
//
// The JTAG hub in the FPGA hands this module the test clock (tck), the
// serial input (tdi), the current virtual instruction (ir_in) and one-cycle
// flags telling which state the TAP is in (v_cdr Capture-DR, v_sdr Shift-DR,
// v_udr Update-DR, v_uir Update-IR). Everything is sampled on the rising
// edge of tck.
//
//   ir_in = 01 (KEY)    : at Capture-DR the switch inputs s are loaded into
//                         the data register DR1; during Shift-DR DR1 shifts
//                         towards bit 0 with tdi entering at the top, so the
//                         switches leave on tdo LSB first.
//   ir_in = 10 (LED)    : DR1 shifts the same way; at Update-DR it is copied
//                         to the LED register, so the LEDs do not flicker
//                         while a pattern is shifted through DR1.
//   ir_in = 00, 11      : the 2-bit bypass register DR0 shifts instead;
//                         tdo shows DR0[0], so data reappears on tdo two
//                         shifts after it entered.
//
// tdo is combinational from the selected register's bit 0. aclr is an
// active-low reset, synchronous to tck, that clears DR0 and DR1; the LED
// register is not cleared by it and powers up as all zeros.
//
// Register behaviour, instruction codes and widths follow the design. Own
// choices: the LED register is written on the rising tck edge at which
// v_udr is high (the design names only the Update-DR flag as the moment of
// the copy), code 11 also routes DR0 to tdo so that it is a complete
// bypass, and the switch and LED pins are grouped into 8-bit vectors s and
// d. v_uir is accepted for the interface but no register needs it.
module connect
  import jtag_led_pkg::*;
#(
  parameter int unsigned DATA_WIDTH   = DATA_WIDTH_DEFAULT,
  parameter int unsigned BYPASS_WIDTH = BYPASS_WIDTH_DEFAULT
) (
  input  logic                  tck,    // test clock from the JTAG hub
  input  logic                  tdi,    // serial data in
  input  logic                  aclr,   // synchronous reset, active low
  input  logic [IR_WIDTH-1:0]   ir_in,  // virtual instruction
  input  logic                  v_sdr,  // TAP in Shift-DR
  input  logic                  v_udr,  // TAP in Update-DR
  input  logic                  v_cdr,  // TAP in Capture-DR
  input  logic                  v_uir,  // TAP in Update-IR (unused)
  input  logic [DATA_WIDTH-1:0] s,      // dip-switch inputs
  output logic [DATA_WIDTH-1:0] d,      // LED outputs
  output logic                  tdo     // serial data out
);

  vir_instr_e instr;
  assign instr = vir_instr_e'(ir_in);

  logic [BYPASS_WIDTH-1:0] dr0;                // bypass register
  logic [DATA_WIDTH-1:0]   dr1;                // switch / LED data register
  logic [DATA_WIDTH-1:0]   data_out = '0;      // LED register, power-up zero

  // Shift and capture of the two data registers.
  always_ff @(posedge tck) begin
    if (!aclr) begin
      dr0 <= '0;
      dr1 <= '0;
    end else begin
      unique case (instr)
        INSTR_KEY: begin
          if (v_cdr)      dr1 <= s;
          else if (v_sdr) dr1 <= {tdi, dr1[DATA_WIDTH-1:1]};
        end
        INSTR_LED: begin
          if (v_sdr)      dr1 <= {tdi, dr1[DATA_WIDTH-1:1]};
        end
        INSTR_BYPASS, INSTR_UNUSED: begin
          if (v_sdr)      dr0 <= {tdi, dr0[BYPASS_WIDTH-1:1]};
        end
      endcase
    end
  end

  // LED register: takes the shifted pattern at Update-DR of an LED scan.
  always_ff @(posedge tck) begin
    if (v_udr && instr == INSTR_LED) data_out <= dr1;
  end

  assign d   = data_out;
  assign tdo = (instr == INSTR_KEY || instr == INSTR_LED) ? dr1[0] : dr0[0];

  // Only one TAP state flag can be active at a time.
  always_ff @(posedge tck) begin
    a_one_state: assert (3'(v_cdr) + 3'(v_sdr) + 3'(v_udr) + 3'(v_uir) <= 3'd1)
      else $error("connect: more than one TAP state flag active");
  end

  logic unused_uir;
  assign unused_uir = v_uir;

endmodule
