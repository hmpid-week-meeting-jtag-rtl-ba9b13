# JTAG LED / switch loop-back node

This design is a minimal test of two-way communication between a host PC
and an FPGA over the device's JTAG port. It uses no extra pins or UART. A
user data register sits behind the FPGA vendor's *Virtual JTAG*
megafunction. Through it the host can:

* **write** an 8-bit pattern that drives eight LED outputs, and
* **read** eight switch inputs.

In this test setup the eight LED outputs are wired straight back to the
eight switch inputs. A pattern written with the LED instruction therefore
comes back unchanged with the switch instruction, which proves that both
directions work. Bits 0 and 1 of the pattern also light two board LEDs,
`access_led` and `trig_led`.

## Files

| file | contents |
|---|---|
| `rtl/jtag_led_pkg.sv` | instruction codes (`vir_instr_e`), register widths |
| `rtl/connect.sv` | the user data registers: bypass, switch/LED shift register, LED holding register |
| `rtl/hmpid_jtag_top.sv` | top: `connect`, reset inverter, LED-to-switch loop-back, board LED outputs |
| `tb/tb_connect.sv` | self-checking unit test of `connect` |
| `tb/vjtag_model.sv` | simulation model of the Virtual JTAG megafunction (TAP state machine) |
| `tb/tb_hmpid_jtag_top.sv` | end-to-end test: pin-level JTAG scans through the model into the top |

## How the host talks to the node

The Virtual JTAG megafunction runs the standard JTAG TAP state machine for
the user logic. It outputs the test clock `tck` and the serial input `tdi`,
plus a 2-bit virtual instruction `ir_in`. It also outputs one flag per TAP
state (`virtual_state_cdr`, `_sdr`, `_udr`, `_uir`, …), each high while
the TAP is in that state. The user logic samples all of these on the rising
edge of `tck` and returns one serial bit on `tdo`.

| `ir_in` | name | register between `tdi` and `tdo` | effect |
|---|---|---|---|
| `00` | BYPASS | DR0, 2 bits | data reappears on `tdo` two shifts later |
| `01` | KEY    | DR1, 8 bits | Capture-DR loads the switches; Shift-DR sends them out, bit 0 first |
| `10` | LED    | DR1, 8 bits | Shift-DR shifts a new pattern in; Update-DR copies DR1 to the LEDs |
| `11` | unused | DR0, 2 bits | same as BYPASS |

DR1 shifts towards bit 0: `tdi` enters at bit 7 and `tdo` is bit 0.
After a full 8-bit scan, DR1 holds the eight bits that were shifted in.
Bit *i* of DR1 is the *i*-th bit sent, so the host sends and receives LSB
first. A shorter scan leaves the old upper bits in the lower positions.

### Why the LEDs have their own register

DR1 changes on every Shift-DR clock. If the LEDs were driven straight from
DR1, they would flicker through every intermediate value while a pattern
shifts in. The LEDs are therefore driven by a separate 8-bit register,
loaded from DR1 only at Update-DR and only when the instruction is `10`. An
Update-DR under any other instruction leaves the LEDs as they were. The
testbenches check that the LEDs never change during a shift.

### A typical exchange

1. IR scan `10`, then an 8-bit DR scan of pattern `P`. At Update-DR the
   LEDs show `P`, so `access_led = P[0]` and `trig_led = P[1]`.
2. IR scan `01`, then an 8-bit DR scan. At Capture-DR, DR1 loads the
   switch inputs. Through the loop-back these equal `P`, and `P` comes out
   on `tdo`, LSB first.

## Reset and power-up

* `connect.aclr` is **active low and synchronous to `tck`**. It clears DR0
  and DR1 but not the LED register.
* The LED register powers up as `8'h00`. It is written as a declaration
  initialiser (an FPGA power-up value), so Verilator's lint reports
  PROCASSINIT on it.
* In the top, `aclr` is the **inverse of the `locked` input**, as the
  design's schematic draws it. The data registers are therefore held
  cleared while `locked` is **high** and run while it is low. The port is
  named after the lock flag of the firmware the node was added to, but
  nothing here fixes that signal's polarity. If your lock flag is high
  during normal operation, remove the inverter in `hmpid_jtag_top`.

## Interfaces

`connect` (parameters `DATA_WIDTH = 8`, `BYPASS_WIDTH = 2`):
`tck, tdi, aclr, ir_in[1:0], v_sdr, v_udr, v_cdr, v_uir` in, switches
`s[7:0]` in, LEDs `d[7:0]` out, `tdo` out. `tdo` is combinational: bit 0 of
DR1 for codes `01`/`10`, bit 0 of DR0 otherwise. `v_uir` is part of the
interface but no register uses it. An immediate assertion checks that at
most one state flag is high in any cycle.

`hmpid_jtag_top` (no parameters): the Virtual JTAG outputs `tck`, `tdi`,
`ir_in`, `virtual_state_cdr/sdr/udr/uir` in; `tdo` out; `locked` in;
`access_led` and `trig_led` out. The megafunction's other state flags
(Exit1/Pause/Exit2-DR, Capture-IR) and its `ir_out` input have no
connection. To use the node in an FPGA, instantiate the vendor's Virtual
JTAG megafunction with a 2-bit instruction register and wire it to these
ports. Put the board LED pins in your constraints file (in the original
board they are `PIN_AB5` for ACCESS_LED and `PIN_AA5` for TRIG_LED).

## Where this RTL makes its own choices

* **LED register timing.** It is an ordinary `tck` register enabled by
  `v_udr` and instruction `10`, so it loads on the rising `tck` edge that
  leaves Update-DR. The original description only ties the copy to the
  Update-DR flag, not to a clock edge.
* **Code `11`.** It is defined as "not used, same as bypass", and DR0
  shifts under it. The original output multiplexer, however, sent DR0 to
  `tdo` only for code `00`, so with code `11` the shifted bits never
  reached `tdo`. This RTL routes DR0 to `tdo` for `11` as well, making it
  a true bypass.
* **Bypass length.** The bypass register is 2 bits, as designed, not the
  1 bit of the IEEE 1149.1 BYPASS register. The host sees two bits of
  delay.
* **Vectors.** The switch and LED pins are grouped as `s[7:0]` and `d[7:0]`
  (bit *i* = pin *i*) instead of sixteen single-bit ports.

## Simulating

Verilator 5 with timing support:

```sh
# unit test of the data registers
verilator --binary --timing --assert -Wno-fatal \
  rtl/jtag_led_pkg.sv rtl/connect.sv tb/tb_connect.sv \
  --top-module tb_connect -o tb_connect && ./obj_dir/tb_connect

# end-to-end test through a TAP model
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/jtag_led_pkg.sv tb/tb_hmpid_jtag_top.sv \
  --top-module tb_hmpid_jtag_top -o tb_top && ./obj_dir/tb_top
```

Each test ends with a line `TB_RESULT checks=N failures=M`.

* **`tb_connect`** drives the state flags in the order a DR scan produces
  them: Capture, N × Shift, Exit1, Update. It compares `tdo` bit by bit
  and the LEDs against a small reference model. Directed cases cover:
  power-up, reset, the two-shift bypass latency, the switch read, LED
  update only under `10`, partial scans and code `11`. A random phase then
  mixes 300 scans.
* **`tb_hmpid_jtag_top`** drives only the JTAG pins (TCK/TMS/TDI) of
  `vjtag_model`. It runs 400 operations: LED writes with read-back through
  the loop-back, switch reads, bypass scans with `00` and `11`, and resets
  through `locked`. It counts each of these and fails if one never
  happened.

`vjtag_model` is a simplification. An IR scan on the pins loads the 2-bit
virtual instruction directly. The real megafunction instead reaches it
through the vendor's JTAG hub, using USER0/USER1 instructions. The model
also sends `tdo` back to the pin without the falling-edge retiming of a
real TAP. Neither change affects the user logic, which only sees `tck`,
`tdi`, `ir_in` and the state flags.

## Limits

* The Virtual JTAG megafunction, the JTAG cable and the host program are
  not part of this RTL. Neither is the rest of the firmware that provides
  `locked`.
* The host's side of the exchange was a Tcl/Tk program that opens the
  cable, writes the LED pattern and reads the switch value. The end-to-end
  testbench replays that exchange at pin level.
