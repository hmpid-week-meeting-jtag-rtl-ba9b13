// vjtag_model - behavioural model of the FPGA vendor's Virtual JTAG
// megafunction, for simulation only.
//
// The real megafunction sits between the device's JTAG pins and the user
// logic: it runs the IEEE 1149.1 TAP state machine, routes a virtual
// instruction into ir_in and flags the TAP state the user logic's data
// register is in. This model keeps that interface but simplifies the
// addressing: an IR scan on the pins loads the virtual instruction
// directly (IR_WIDTH bits, taken at Update-IR), and the virtual state flags
// are raised for every DR scan. At Capture-IR the shift register loads
// ir_out, which is then shifted out on the pin tdo.
//
// Pin side: jtck, jtms, jtdi in, jtdo out (combinational, no falling-edge
// retiming). User side: the megafunction's own port names. The TAP moves on
// the rising edge of jtck; the state flags decode the current state, so
// user logic sees a flag high at the rising edge that leaves that state.
module vjtag_model #(
  parameter int unsigned IR_WIDTH = 2
) (
  input  logic                jtck,
  input  logic                jtms,
  input  logic                jtdi,
  output logic                jtdo,
  output logic                tck,
  output logic                tdi,
  input  logic                tdo,
  output logic [IR_WIDTH-1:0] ir_in,
  input  logic [IR_WIDTH-1:0] ir_out,
  output logic                virtual_state_cdr,
  output logic                virtual_state_sdr,
  output logic                virtual_state_e1dr,
  output logic                virtual_state_pdr,
  output logic                virtual_state_e2dr,
  output logic                virtual_state_udr,
  output logic                virtual_state_cir,
  output logic                virtual_state_uir
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e                state = TLR;
  logic [IR_WIDTH-1:0] ir_sr = '0;
  logic [IR_WIDTH-1:0] ir_reg = '0;

  always_ff @(posedge jtck) begin
    unique case (state)
      TLR:    state <= jtms ? TLR    : RTI;
      RTI:    state <= jtms ? SEL_DR : RTI;
      SEL_DR: state <= jtms ? SEL_IR : CAP_DR;
      CAP_DR: state <= jtms ? EX1_DR : SH_DR;
      SH_DR:  state <= jtms ? EX1_DR : SH_DR;
      EX1_DR: state <= jtms ? UPD_DR : PA_DR;
      PA_DR:  state <= jtms ? EX2_DR : PA_DR;
      EX2_DR: state <= jtms ? UPD_DR : SH_DR;
      UPD_DR: state <= jtms ? SEL_DR : RTI;
      SEL_IR: state <= jtms ? TLR    : CAP_IR;
      CAP_IR: state <= jtms ? EX1_IR : SH_IR;
      SH_IR:  state <= jtms ? EX1_IR : SH_IR;
      EX1_IR: state <= jtms ? UPD_IR : PA_IR;
      PA_IR:  state <= jtms ? EX2_IR : PA_IR;
      EX2_IR: state <= jtms ? UPD_IR : SH_IR;
      UPD_IR: state <= jtms ? SEL_DR : RTI;
    endcase
    if (state == CAP_IR) ir_sr <= ir_out;
    if (state == SH_IR)  ir_sr <= {jtdi, ir_sr[IR_WIDTH-1:1]};
    if (state == UPD_IR) ir_reg <= ir_sr;
    if (state == TLR)    ir_reg <= '0;
  end

  assign tck   = jtck;
  assign tdi   = jtdi;
  assign ir_in = ir_reg;
  assign jtdo  = (state == SH_IR) ? ir_sr[0] : tdo;

  assign virtual_state_cdr  = (state == CAP_DR);
  assign virtual_state_sdr  = (state == SH_DR);
  assign virtual_state_e1dr = (state == EX1_DR);
  assign virtual_state_pdr  = (state == PA_DR);
  assign virtual_state_e2dr = (state == EX2_DR);
  assign virtual_state_udr  = (state == UPD_DR);
  assign virtual_state_cir  = (state == CAP_IR);
  assign virtual_state_uir  = (state == UPD_IR);

endmodule
