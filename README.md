# JTAG-controlled bias lines for a reconfigurable antenna

A reconfigurable patch antenna changes its resonances and radiation pattern
when p-i-n diodes between its patches are switched on or off. Each diode needs
a DC bias line, and something has to drive those lines on command. Here an FPGA
does that job, and the commands come in over a JTAG port. The FPGA holds an
IEEE 1149.1 test access port (TAP) wrapped around a small device with four
input pins and four output pins. The four output pins are the diode bias lines.
A host PC uses a JTAG cable to load the EXTEST instruction and shift a 4-bit
configuration into the output boundary-scan cells. The update stage of those
cells then holds the lines at that value until the next command.

The four lines match the four quadrant diodes of a four-patch antenna, so one
write selects one of its 16 configurations. Written as a string `b3 b2 b1 b0`,
configuration `0101` (host value 5) biases the second and fourth lines. `1111`
(value 15) biases all four.

## Structure

```
             +-------------------------------------------------------------+
 TCK,TMS ----> tap_controller --ctrl--+-----------+-------------+          |
 TRSTN       |                        |           |             |          |
 TDI --------+-------------------> inst_reg   bypass_reg   boundary_scan_reg
             |                     | bypass      |          | a -> tologic (core)
             |                     | mode_in     |          | fromlogic -> y (pins)
             |                     | mode_out ---+--------->|          |
             |                  tdo_ir        tdo_byp      tdo_bs      |
             |                     +-----------> tdo_driver <-+        |
             +-------------------------------------|-------------------+
                                                  TDO
```

| File | Role |
|---|---|
| `rtl/jtag_pkg.sv` | TAP state encoding, instruction codes, the `tap_ctrl_t` strobe bundle |
| `rtl/tap_controller.sv` | 16-state TAP state machine and its strobes |
| `rtl/inst_reg.sv` | 2-bit instruction register and decoder |
| `rtl/bypass_reg.sv` | 1-bit bypass register |
| `rtl/bsc_cell.sv` | one boundary-scan cell (capture/shift flop, update flop, mode mux) |
| `rtl/boundary_scan_reg.sv` | 4 input cells + 4 output cells in one chain |
| `rtl/tdo_driver.sv` | TDO source selection, falling-edge retiming, tristate |
| `rtl/jtag_top.sv` | the complete controller |

The device's own core logic is outside `jtag_top`. The core inputs come out on
`tologic` and the core outputs go back in on `fromlogic`. To get the bring-up
configuration, where the core passes its inputs straight to its outputs,
connect `fromlogic = tologic`. The testbench does exactly that.

## Instructions

The instruction register is 2 bits wide and resets to BYPASS.

| Code | Instruction | bypass | mode_in | mode_out | Effect on pins |
|---|---|---|---|---|---|
| `11` | BYPASS (reset value) | 1 | 0 | 0 | `y = fromlogic`, `tologic = a`; the 1-bit bypass register sits between TDI and TDO |
| `01` | SAMPLE/PRELOAD | 0 | 0 | 0 | pins untouched; a DR scan reads `{a, fromlogic}` and preloads the cells |
| `00` | EXTEST | 0 | 0 | 1 | `y` is driven from the output cells: **this is how the antenna is set** |
| `10` | INTEST | 0 | 1 | 1 | `y` and `tologic` are both driven from the cells |

In Capture-IR the instruction shift register loads `10`, so the first bit
shifted out is 0 and the second is 1. This is the parameter `CAPTURE` of
`inst_reg`. IEEE 1149.1 requires the opposite order (a 1 nearest TDO). The
value here follows the original register. If the host software checks the
capture pattern, the parameter can be changed.

## The data register and what a write looks like

The boundary-scan register has 8 cells. Bits 7..4 are the input cells. They
capture the pins `a` and, under INTEST, drive `tologic`. Bits 3..0 are the
output cells. They capture `fromlogic` and, under EXTEST or INTEST, drive `y`.
TDI enters bit 7 and bit 0 comes out first on TDO.

Setting the antenna to configuration `v` (4 bits) from Run-Test/Idle goes like
this:

1. IR scan, once: TMS `1,1,0,0`, then shift `00` (EXTEST) with TMS `0,1`, then
   TMS `1,0`.
2. DR scan, per configuration: TMS `1,0,0`, then shift 8 bits `{4'b0000, v}`
   LSB first (TMS high on the last bit), then TMS `1,0`.

The bias lines change on the falling TCK inside Update-DR. They do not change
while the bits are shifting. If EXTEST is loaded after a SAMPLE/PRELOAD scan,
the preloaded value appears on the lines as soon as the instruction updates.

## Clocking and timing

Everything runs on TCK.

* The state, the capture/shift flops and the bypass flop change on the
  **rising** edge.
* The instruction and the update stage of the boundary-scan cells change on
  the **falling** edge inside Update-IR / Update-DR.
* TDO, its enable, and the internal reset `resetn` (low in
  Test-Logic-Reset) change on the **falling** edge. A host that drives on the
  falling edge and samples on the rising edge therefore sees stable TDO data.
* TDO is high impedance outside Shift-IR and Shift-DR. `tdo_oe` shows the
  enable.
* TRSTN resets asynchronously. Five TCKs with TMS high also reach
  Test-Logic-Reset. Both restore BYPASS, so the pins go back to the core, and
  both clear the update stage.

The original controller made ClockIR and ClockDR by gating TCK in the Capture
and Shift states. This RTL uses clock enables instead. The registers still
load on the same rising edge that the gated clock would have produced.
UpdateIR and UpdateDR were registered pulses that rose on the falling edge.
Here they are state decodes that the registers act on at that same falling
edge.

## Where this RTL departs from the original controller

* **Gated clocks** are replaced by clock enables (see above). Behaviour at the
  pins is the same.
* **TDO source order** follows the block diagram of the TDO driver: the
  instruction register is chosen whenever the TAP is not in Shift-DR. The
  original code gave the bypass flop priority, which would also have put it on
  TDO during an IR scan under BYPASS.
* **The first TDO bit of a DR scan** is the captured bit. The original code
  selected with a ShiftDR that was itself registered on the falling edge. As a
  result, it sent one IR bit first.
* **The boundary-scan register holds under BYPASS.** Its shift and update
  enables are masked while BYPASS is active, so a bypass scan cannot overwrite
  preloaded bias values. The original code clocked it on every DR scan.
* **Update flops and the TDO flop are reset.** The original code had no reset
  on them. With the reset, the lines start at 0 (all diodes off) if EXTEST is
  loaded before any write.
* **Instruction decode** is taken from the original instruction register.
  EXTEST is `00` and `01` is SAMPLE/PRELOAD. One description of the original
  bring-up calls `01` EXTEST, and that does not agree with its own decoder.
* Bidirectional and tristate boundary-scan cells are not implemented, because
  the device has only plain inputs and outputs.
* The four board-level pins `clock_chp`, `clock_out`, `fake_gnd` and
  `fake_vcc` of the original FPGA top level are not included. Their function
  is not known.

The analog side is outside this RTL: the 100 Ω series resistors,
quarter-wave bias lines, radial stubs, 47 pF capacitors, the GaAs p-i-n
diodes, and the antennas themselves. So are the host program and the JTAG
cable.

Two assertions in `jtag_top` check the protocol during simulation. The first
checks that the instruction changes only in Update-IR. The second checks that
TDO is enabled exactly in Shift-IR and Shift-DR.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `jtag_top`, `boundary_scan_reg` | `N_IN` | 4 | input pins / input cells |
| `jtag_top`, `boundary_scan_reg` | `N_OUT` | 4 | output pins / output cells = bias lines |
| `inst_reg` | `CAPTURE` | `2'b10` | value loaded in Capture-IR |

The instruction width (2) and the codes are in `jtag_pkg`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_tap_controller`: drives random TMS for 3000 cycles against an
  independent table of the state graph. It checks every strobe, that all 16
  states are visited, that five TMS=1 reset from every state, and the
  asynchronous TRSTN.
* `tb_inst_reg`: checks the capture pattern on `tdo_ir`, the shift order, that
  the instruction changes only on update, and the decode of all four codes.
* `tb_bypass_reg`: checks that capture loads 0, the one-cycle delay, and hold.
* `tb_boundary_scan_reg`: captures random pins, reads them back bit by bit,
  shifts new values in, and checks both output multiplexers for random modes.
* `tb_tdo_driver`: checks source selection, the falling-edge retiming, and the
  output enable.
* `tb_jtag_top`: runs end to end at the default size. The testbench acts as the
  host. It reads the IR capture pattern, runs a BYPASS scan, does
  SAMPLE/PRELOAD, and then uses EXTEST to write the antenna configurations
  `0010 0110 1010 1100`, 15, 5 and all 16 values. It checks that the lines
  change on the falling edge in Update-DR. The run also covers Pause-DR and
  Pause-IR, INTEST (a stimulus is applied to the core and its response is
  shifted back out), a TMS-only reset in the middle of a scan, and TDO release.
  It counts each of these mechanisms and fails if any one never happened.

* `tb_jtag_chain`: two controllers share one JTAG port. A single IR scan puts
  the first in BYPASS and the second in EXTEST. 9-bit DR scans then set the
  second device's lines to all 16 values while the first keeps its pins on
  its core. This is the multi-device use that the tristate TDO and the bypass
  register exist for.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/jtag_pkg.sv tb/tb_jtag_top.sv \
          --top-module tb_jtag_top
./obj_dir/Vtb_jtag_top
```
