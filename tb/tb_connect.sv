// Self-checking testbench of 'connect', the LED / dip-switch data registers
// of the Virtual-JTAG node.
//
// The testbench plays the part of the JTAG hub: it drives the TAP-state
// flags in the order a real data-register scan produces them (one
// Capture-DR cycle, N Shift-DR cycles, one Exit1-DR cycle, one Update-DR
// cycle) and checks tdo bit by bit and the LED outputs. Inputs change on the
// falling edge of tck and outputs are checked just before the rising edge.
// Expected values come from a small reference model of the three registers
// (bypass, data, LED) kept here. Directed cases cover power-up, reset, the
// 2-shift bypass latency, the switch read, LED update only at Update-DR,
// partial scans and code 11; a random phase then mixes all of them.
module tb_connect;
  import jtag_led_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned BW = 2;

  logic          tck = 1'b0;
  logic          tdi = 1'b0, aclr = 1'b1;
  logic [1:0]    ir_in = 2'b00;
  logic          v_sdr = 1'b0, v_udr = 1'b0, v_cdr = 1'b0, v_uir = 1'b0;
  logic [W-1:0]  s = '0;
  logic [W-1:0]  d;
  logic          tdo;

  int checks = 0, failures = 0;

  // Reference model
  logic [BW-1:0] m_dr0;
  logic [W-1:0]  m_dr1;
  logic [W-1:0]  m_led = '0;

  connect #(.DATA_WIDTH(W), .BYPASS_WIDTH(BW)) dut (.*);

  always #5 tck = ~tck;

  initial begin : watchdog
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // One tck cycle with the given flags; model updated on the same edge.
  task automatic cycle(input bit cdr, input bit sdr, input bit udr, input bit uir,
                       input bit din);
    v_cdr = cdr; v_sdr = sdr; v_udr = udr; v_uir = uir; tdi = din;
    @(posedge tck);
    if (!aclr) begin
      m_dr0 = '0; m_dr1 = '0;
    end else begin
      case (ir_in)
        2'b01: if (cdr) m_dr1 = s; else if (sdr) m_dr1 = {din, m_dr1[W-1:1]};
        2'b10: if (sdr) m_dr1 = {din, m_dr1[W-1:1]};
        default: if (sdr) m_dr0 = {din, m_dr0[BW-1:1]};
      endcase
    end
    if (udr && ir_in == 2'b10) m_led = m_dr1;
    @(negedge tck);
    v_cdr = 0; v_sdr = 0; v_udr = 0; v_uir = 0;
  endtask

  function automatic logic model_tdo();
    return (ir_in == 2'b01 || ir_in == 2'b10) ? m_dr1[0] : m_dr0[0];
  endfunction

  task automatic set_ir(input logic [1:0] ir);
    ir_in = ir;
    cycle(0, 0, 0, 1, 0);  // Update-IR
  endtask

  // Full DR scan of n bits; returns what came out on tdo, LSB first.
  task automatic scan(input logic [31:0] bits, input int n, output logic [31:0] got);
    logic [W-1:0] led_before;
    got = '0;
    led_before = d;
    cycle(1, 0, 0, 0, 0);                       // Capture-DR
    for (int i = 0; i < n; i++) begin
      got[i] = tdo;
      check(tdo === model_tdo(), $sformatf("tdo bit %0d ir=%b", i, ir_in));
      cycle(0, 1, 0, 0, bits[i]);               // Shift-DR
      check(d === led_before, "LEDs changed while shifting");
    end
    cycle(0, 0, 0, 0, 0);                       // Exit1-DR
    cycle(0, 0, 1, 0, 0);                       // Update-DR
    check(d === m_led, $sformatf("LEDs after update ir=%b: %h vs %h", ir_in, d, m_led));
  endtask

  logic [31:0] got;

  initial begin
    @(negedge tck);
    // Power-up value of the LEDs
    check(d === 8'h00, "LEDs not zero at power-up");

    // Reset
    aclr = 0; cycle(0, 0, 0, 0, 0); aclr = 1;

    // Bypass (00): data reappears two shifts later, after two reset zeros
    set_ir(2'b00);
    scan(32'b1011_0111, 8, got);
    check(got[7:0] === 8'b1101_1100, $sformatf("bypass latency: got %b", got[7:0]));

    // Switch read (01): switches come out LSB first
    s = 8'hA5;
    set_ir(2'b01);
    scan(32'h3C, 8, got);
    check(got[7:0] === 8'hA5, $sformatf("switch read %h", got[7:0]));
    check(d === 8'h00, "switch read touched LEDs");

    // LED update (10): tdo shows the tdi bits of the previous scan
    set_ir(2'b10);
    scan(32'h5E, 8, got);
    check(got[7:0] === 8'h3C, $sformatf("LED scan out %h", got[7:0]));
    check(d === 8'h5E, $sformatf("LEDs %h", d));

    // Update-DR under the switch instruction leaves the LEDs alone
    set_ir(2'b01);
    s = 8'h0F;
    scan(32'hFF, 8, got);
    check(d === 8'h5E, "LEDs changed by switch instruction");

    // Partial LED scan of 3 bits
    set_ir(2'b10);
    scan(32'b101, 3, got);
    check(d === {3'b101, 5'b11111}, $sformatf("partial scan LEDs %b", d));

    // Code 11 behaves as bypass
    set_ir(2'b11);
    scan(32'b0110_1001, 8, got);
    check(got[7:2] === 6'b101001, $sformatf("code 11 bypass %b", got[7:0]));
    check(d === {3'b101, 5'b11111}, "code 11 touched LEDs");

    // Reset clears the data register but not the LEDs
    aclr = 0; cycle(0, 0, 0, 0, 0); aclr = 1;
    set_ir(2'b10);
    scan(32'hC3, 8, got);
    check(got[7:0] === 8'h00, "DR1 not cleared by reset");
    check(d === 8'hC3, "LEDs after reset+update");

    // Random mix
    for (int k = 0; k < 300; k++) begin
      s = 8'($urandom);
      if ($urandom_range(0, 19) == 0) begin
        aclr = 0; cycle(0, 0, 0, 0, 0); aclr = 1;
      end
      set_ir(2'($urandom));
      scan($urandom, $urandom_range(1, 12), got);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
