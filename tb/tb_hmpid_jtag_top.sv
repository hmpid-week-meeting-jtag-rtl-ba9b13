// End-to-end testbench of hmpid_jtag_top, the JTAG LED / switch loop-back.
//
// A model of the Virtual JTAG megafunction (vjtag_model) turns pin-level
// TCK/TMS/TDI activity into the signals the top expects, so every
// operation here is a real TAP sequence: IR scans select the virtual
// instruction, DR scans move data. The testbench acts as the host: it
// writes random LED patterns, reads them back through the switch
// instruction (the LEDs are wired to the switches), checks the two board
// LEDs, runs bypass scans with code 00 and 11 and checks their two-shift
// latency, raises the lock signal (inverted into the active-low reset of
// the user logic) to clear the data registers, and
// checks that the LEDs never change while a pattern is shifting. Each of
// these mechanisms is counted, and one that never happened is a failure.
// The top runs with its default (and only) configuration.
module tb_hmpid_jtag_top;

  logic       jtck = 1'b0, jtms = 1'b1, jtdi = 1'b0;
  logic       jtdo;
  logic       locked = 1'b1;
  logic       access_led, trig_led;

  logic       tck, tdi, tdo;
  logic [1:0] ir_in;
  logic       cdr, sdr, e1dr, pdr, e2dr, udr, cir, uir;

  int checks = 0, failures = 0;
  int n_led_update = 0, n_switch_read = 0, n_bypass = 0, n_unused = 0;
  int n_reset = 0, n_hold = 0, n_loopback = 0;

  vjtag_model #(.IR_WIDTH(2)) u_vjtag (
    .jtck, .jtms, .jtdi, .jtdo,
    .tck, .tdi, .tdo, .ir_in, .ir_out(2'b00),
    .virtual_state_cdr(cdr), .virtual_state_sdr(sdr), .virtual_state_e1dr(e1dr),
    .virtual_state_pdr(pdr), .virtual_state_e2dr(e2dr), .virtual_state_udr(udr),
    .virtual_state_cir(cir), .virtual_state_uir(uir)
  );

  hmpid_jtag_top dut (
    .tck, .tdi, .ir_in,
    .virtual_state_cdr(cdr), .virtual_state_sdr(sdr),
    .virtual_state_udr(udr), .virtual_state_uir(uir),
    .tdo, .locked, .access_led, .trig_led
  );

  always #5 jtck = ~jtck;

  initial begin : watchdog
    repeat (200000) @(posedge jtck);
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

  // One TCK cycle: drive on the falling edge, TAP moves on the rising edge.
  task automatic clk(input bit tms, input bit din);
    jtms = tms; jtdi = din;
    @(posedge jtck);
    @(negedge jtck);
  endtask

  task automatic tap_reset();
    repeat (5) clk(1, 0);
    clk(0, 0);                                  // Run-Test/Idle
  endtask

  task automatic scan_ir(input logic [1:0] ir);
    clk(1, 0); clk(1, 0); clk(0, 0); clk(0, 0); // Sel-DR, Sel-IR, Cap-IR, Shift-IR
    clk(0, ir[0]);
    clk(1, ir[1]);                              // -> Exit1-IR
    clk(1, 0); clk(0, 0);                       // Update-IR, Run-Test/Idle
  endtask

  // DR scan of n bits from Run-Test/Idle; returns tdo bits LSB first.
  // While shifting, the board LEDs must hold their value.
  task automatic scan_dr(input logic [31:0] bits, input int n, output logic [31:0] got);
    logic [1:0] led0;
    bit held = 1;
    got  = '0;
    led0 = {trig_led, access_led};
    clk(1, 0); clk(0, 0); clk(0, 0);            // Sel-DR, Cap-DR, Shift-DR
    for (int i = 0; i < n; i++) begin
      got[i] = jtdo;
      clk(i == n - 1, bits[i]);
      if ({trig_led, access_led} !== led0) held = 0;
    end
    check(held, "board LEDs changed while shifting");
    if (held) n_hold++;
    clk(1, 0); clk(0, 0);                       // Update-DR, Run-Test/Idle
  endtask

  logic [31:0] got;
  logic [7:0]  pat, last_led;
  logic [31:0] bits;
  logic [1:0]  prev_bypass;  // last two bits shifted into the bypass register

  initial begin
    @(negedge jtck);
    tap_reset();
    last_led = 8'h00;
    check({trig_led, access_led} === 2'b00, "board LEDs not dark at power-up");

    // Data registers cleared while locked is high, running once it is low
    clk(0, 0); clk(0, 0);
    locked = 1'b0;
    n_reset++;
    prev_bypass = 2'b00;

    for (int k = 0; k < 400; k++) begin
      int op;
      op = (k < 4) ? k : $urandom_range(0, 4);
      unique case (op)
        0: begin  // write LEDs, then read them back through the switches
          pat = 8'($urandom);
          scan_ir(2'b10);
          scan_dr({24'h0, pat}, 8, got);
          check({trig_led, access_led} === pat[1:0],
                $sformatf("board LEDs %b after writing %h", {trig_led, access_led}, pat));
          last_led = pat;
          if ({trig_led, access_led} === pat[1:0]) n_led_update++;
          scan_ir(2'b01);
          bits = $urandom;
          scan_dr(bits, 8, got);
          check(got[7:0] === pat, $sformatf("read back %h, wrote %h", got[7:0], pat));
          if (got[7:0] === pat) n_loopback++;
          n_switch_read++;
        end
        1, 3: begin  // bypass with code 00 or 11: two-shift latency
          int n;
          bit ok;
          logic [1:0] code;
          code = (op == 1) ? 2'b00 : 2'b11;
          n = $urandom_range(3, 20);
          bits = $urandom;
          scan_ir(code);
          scan_dr(bits, n, got);
          ok = got[0] === prev_bypass[0] && got[1] === prev_bypass[1];
          check(ok, "bypass: first two bits are not the register's old contents");
          for (int i = 2; i < n; i++) begin
            check(got[i] === bits[i-2], $sformatf("bypass code %b bit %0d", code, i));
            if (got[i] !== bits[i-2]) ok = 0;
          end
          prev_bypass = {bits[n-1], bits[n-2]};
          if (ok) begin
            if (op == 1) n_bypass++; else n_unused++;
          end
          check({trig_led, access_led} === last_led[1:0], "bypass touched the LEDs");
        end
        2: begin  // read switches only
          scan_ir(2'b01);
          scan_dr($urandom, 8, got);
          check(got[7:0] === last_led, $sformatf("switch read %h, LEDs %h", got[7:0], last_led));
          n_switch_read++;
        end
        4: begin  // pulse the lock signal: data registers cleared
          locked = 1'b1;
          clk(0, 0);
          locked = 1'b0;
          prev_bypass = 2'b00;
          // An LED scan now shifts out the cleared data register
          scan_ir(2'b10);
          pat = 8'($urandom);
          scan_dr({24'h0, pat}, 8, got);
          check(got[7:0] === 8'h00, $sformatf("data register not cleared: %h", got[7:0]));
          last_led = pat;
          if (got[7:0] === 8'h00) n_reset++;
          check({trig_led, access_led} === pat[1:0], "board LEDs after reset and write");
        end
        default: ;
      endcase
    end

    $display("mechanisms: led_update=%0d switch_read=%0d loopback=%0d bypass00=%0d bypass11=%0d reset=%0d led_hold=%0d",
             n_led_update, n_switch_read, n_loopback, n_bypass, n_unused, n_reset, n_hold);
    check(n_led_update > 0,  "no LED update");
    check(n_switch_read > 0, "no switch read");
    check(n_loopback > 0,    "no loop-back match");
    check(n_bypass > 0,      "no bypass scan");
    check(n_unused > 0,      "no scan with code 11");
    check(n_reset > 1,       "no reset through the lock signal");
    check(n_hold > 0,        "no LED hold check");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
