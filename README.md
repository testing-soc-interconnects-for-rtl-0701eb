# Signal-integrity testing of SoC interconnects through IEEE 1149.1 boundary scan

On a large system-on-chip, a long on-chip wire between two cores can work correctly in
most cases and still fail now and then. Coupling to its neighbours, process variation or
a resistive defect can make an edge arrive late, or put a glitch on a quiet line. The
usual boundary-scan interconnect test (EXTEST) finds stuck-at, open and short faults, but
it samples the wire only once per pattern, long after the edge. It cannot see *when* the
edge arrived.

This design adds a small **integrity loss sensor (ILS)** to every boundary-scan cell that
receives an interconnect. The sensor watches the wire right after each pattern is
launched. It raises a sticky flag if a transition arrives outside an *acceptable delay
region* (ADR). One new instruction, **EX-SITEST**, loads those flags into the boundary
register so they can be shifted out on TDO. The five JTAG pins and the TAP state machine
stay as IEEE 1149.1 defines them. Patterns can also be sent in compressed form. The tester
overlaps consecutive patterns and pulses TMS after only *d* shifts, so no decompressor is
needed on chip.

All files are SystemVerilog (IEEE 1800-2017). Everything is synthesizable except the
sensor, which is a timed behavioural model of a transistor circuit.

## Blocks

| file | role |
|---|---|
| `rtl/jtag_pkg.sv` | opcodes, TAP state enum, `bs_ctrl_t` (capture/shift/update/mode/si bundle) |
| `rtl/tap_controller.sv` | standard 16-state TAP controller |
| `rtl/instruction_register.sv` | 4-bit IR and decoder; EX-SITEST = EXTEST + `si` |
| `rtl/bsc.sv` | standard boundary scan cell (shift stage FF1, update stage FF2, Mode mux) |
| `rtl/ils_sensor.sv` | **behavioural model** of the delay violation sensor |
| `rtl/obsc.sv` | observation cell = standard cell + sensor + sticky flag F |
| `rtl/bidir_cell.sv` | cells of a bidirectional pin: enable cell, data cell, observation cell |
| `rtl/bs_wrapper.sv` | boundary-scan ring of one core (receiving, bidirectional, sending pins) |
| `rtl/si_soc_top.sv` | four-core example SoC: one TAP, one chain through four rings |

## The sensor and its window (`ils_sensor`)

The sensor builds a window signal `b` from its clock: `b = NAND(clk, clk delayed and
inverted)`. So `b` is 0 for `ADR_PS` picoseconds after each rising clock edge, and 1 for
the rest of the period. An edge of the watched signal `a` while `b = 0` is on time. Any
edge while `b = 1` drives `c` to 1. That covers a late edge and both edges of a glitch.
`c` stays at 1 until the next window begins, which precharges the sensor again. In
silicon the window width is an inverter delay tuned at design time. Here it is the
parameter `ADR_PS`, 400 ps by default. That default is a choice: it accepts an edge
0.2 ns after the clock and rejects one 0.5 ns after it.

The model uses `#` delays, so it needs a simulator with timing support (`verilator
--timing`). Synthesis tools read it as a plain combinational process, so it has no
meaning in a netlist. A real implementation puts the analog cell in its place.

## The observation cell (`obsc`)

```
          +-----+----+  F   sel=0
 pin ---->| ILS | FF |------|0\
   |      +-----+----+      |  |--> FF1 (D1) --> scan_out --> FF2 --> |1\
   |   +--|0\               |  |                                      |  |--> core_in
   +---|  |  |--------------|1/                              pin --> |0/
 scan_in-|1/  shift                                                  mode
          sel = ~si | shift
```

`sel` follows this truth table:

| si | shift | sel | effect |
|---|---|---|---|
| 1 | 0 | 0 | Capture-DR under EX-SITEST: FF1 takes the flag F |
| 1 | 1 | 1 | Shift-DR: normal scan chain, the flag moves towards TDO |
| 0 | x | 1 | EXTEST / SAMPLE / normal: the cell is a standard cell |

The flag F is set asynchronously by the sensor pulse. It is cleared on the same rising
TCK edge that copies it into FF1. F keeps recording while `si = 0`: `si` only decides
whether F is read out. That is what lets patterns be applied under EXTEST and the flags
be read once at the end (see below). TRST_N clears F on a TCK edge.

**Window edge.** IEEE 1149.1 launches patterns from the update stages on the *falling*
TCK edge (Update-DR). So the cell feeds the sensor with inverted TCK, and the acceptable
delay region starts at the moment the sending cell changes the wire. The ADR is therefore
measured from the launch edge. It includes the sending cell's clock-to-output delay and
the skew of TCK between the two cores.

## The test flow

1. The IR is loaded with EXTEST or EX-SITEST. Both put every cell in test mode, so the
   sending cells drive the wires from their update stages.
2. Each pattern is shifted in and applied on Update-DR. The sensors at the far end watch
   the edges it causes.
3. The flags are read under EX-SITEST. Capture-DR copies every F into its cell and clears
   it. Shift-DR then brings the flags out on TDO, one per TCK.

How often step 3 runs is the tester's trade-off between test time and detail:

* **method 1**: read after every pattern. Runs entirely under EX-SITEST, where the
  read-out of pattern *k* shares its shifts with the shifting-in of pattern *k+1*.
* **method 2**: read once per victim line, after its group of patterns.
* **method 3**: apply everything under EXTEST, then switch to EX-SITEST and read once.

A flag says that *some* late edge reached that line since the last read. It does not say
which pattern caused it. Finer methods narrow that down.

Flags are cleared whenever they are captured under EX-SITEST, and 1149.1 always passes
Capture-DR between two Update-DR states. A flow that applies all patterns under EX-SITEST
and reads once at the end would therefore lose all but the last pattern's flags. This is
why methods 2 and 3 apply their patterns under EXTEST.

## Pattern compression without a decompressor

A pattern of *l* bits normally costs *l* shifts. Test patterns for crosstalk often have
many don't-care bits, and the tail of one pattern can match the head of the next. After
pattern V<sub>i</sub> has been applied, the shift register still holds it. Shifting only
*d* new bits moves the old contents *d* places towards TDO. If those old bits agree with
V<sub>i+1</sub> wherever V<sub>i+1</sub> cares, the tester only needs to shift the *d*
new bits and then pulse TMS to reach Update-DR. The tester keeps one number *d* per
pattern. The stream costs Σd shifts instead of *l·n*. The compression rate is
`(l·n − Σd) / (l·n)`.

One detail of the hardware makes this work. Between two Update-DR states the TAP always
passes Capture-DR, and a standard sending cell would capture the core output there,
overwriting the pattern. The sending cells in this design (`bsc` with
`CAPTURE_OUT = 1`) capture the value they **drive**. In test mode that is their update
stage, so the chain keeps the applied pattern across Capture-DR. In normal mode the
driven value is the core output, so SAMPLE behaves as usual. Observation cells do
overwrite their bits at capture (with the pin value, or with F under EX-SITEST). A tester
must treat those chain positions as unknown when it looks for an overlap. In the example
SoC the sending cells of core i are the first cells after TDI, so an *n*-line pattern
never needs more than *n* shifts.

## The example SoC (`si_soc_top`)

Four cores, i, j, l and k, each sit in a `bs_wrapper` ring. The wires are:

| wires | count (parameter) | cells at the driving end | cells at the receiving end |
|---|---|---|---|
| i → j | `N_IJ` = 32 | standard | observation |
| j ↔ l | `N_JL` = 2 | bidirectional group | bidirectional group (both ends observe) |
| l → k | `N_LK` = 2 | standard | observation |
| k → l | `N_KL` = 1 | standard | observation |

The chain is TDI → ring i → ring j → ring l → ring k → TDO. It is
`2·N_IJ + 6·N_JL + 2·N_LK + 2·N_KL` = 82 bits at the defaults. Inside a ring the order is
receiving cells, then bidirectional groups (enable, data, observation), then sending
cells, each starting from index 0. Reading all flags of the i → j wires takes 50 shifts at
the defaults, because 18 cells of rings j, l and k sit between them and TDO.

The cores and the wires are not in the RTL. Both sides of every ring are ports
(`*_core_*` and `*_pin_*`), and an integration connects `i_pin_out` to `j_pin_in` through
the real wires. A bidirectional pad is also outside: `*_pin_bd_out`/`*_pin_bd_oe` go to
the pad driver and `*_pin_bd_in` comes back from the pad.

Instruction codes (4-bit IR): EXTEST `0000`, SAMPLE/PRELOAD `0001`, EX-SITEST `0010`,
BYPASS `1111` (also after reset and for unused codes). There is no IDCODE register.

## Timing

* TAP state, FF1 of every cell, the IR shift stage and the bypass register change on the
  rising edge of TCK.
* The update stages (FF2, IR update) change on the falling edge of TCK, in Update-DR or
  Update-IR.
* TDO changes on the falling edge and is enabled in Shift-IR and Shift-DR.
* The TAP's state strobes are used as clock enables on a single TCK. The update and
  capture clocks are not gated.
* The sensor window opens on the falling TCK edge and lasts `ADR_PS`. A flag set by a
  late edge during one TCK period is ready at the next rising edge.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a `TB_RESULT` line.
`tb_si_soc_top` is the end-to-end test at the default sizes. It drives only the JTAG pins
and has two parts:

* **A timing model of the wires.** Edges normally arrive 100 ps after launch, or 50 ps at
  the driving end of a bidirectional wire. The model has three defects:
  * i → j line 5 is slow (1200 ps).
  * Line 3 is a crosstalk victim of lines 2 and 4. It gets a glitch when it is quiet and
    both neighbours switch the same way. Its edge is delayed to 1500 ps when it switches
    against both neighbours.
  * Bidirectional line 1 reaches its far end after 1500 ps.
* **A tester.** It keeps its own model of all 82 cells and compares every TDO bit, every
  pin and every core input after each update with that model.

The testbench runs the following workloads:

* maximum-aggressor pattern sets (12 vectors per victim: positive and negative glitch,
  rising and falling delay, rising and falling speed-up) for 8, 16 and 32 lines, each with
  read-out methods 1, 2 and 3, all compressed;
* a pseudo-random set with 75 % don't-care bits;
* BYPASS and SAMPLE/PRELOAD.

After every method-3 maximum-aggressor run, exactly lines 3 and 5 are reported. The test
counts each mechanism (bypass, sample, EX-SITEST capture, pattern overlap, each defect
type occurring and being reported, each read-out method) and fails if any count is zero.
It needs about 82 000 TCK cycles and runs in a few seconds.

Compression rates measured with this scheme (the tester finds the smallest overlap
greedily):

| pattern set | n = 8 | n = 16 | n = 32 |
|---|---|---|---|
| maximum aggressor | 28.8 % | 29.2 % | 29.1 % |
| pseudo-random, 75 % don't care (own set) | – | – | 33.7 % |

These are lower than the 37–64 % reported for the original scheme. Part of the gap is the
read-back rule above: only what the chain really holds after Capture-DR can be reused.
Another part is that the original deterministic and pseudo-random pattern sets are not
available here.

Read-out cost per read is 50 shift cycles at the defaults. The original count is *n*
(8 / 16 / 32) per read, for a chain that holds only the observed cells. The number of
reads is the same: 12n for method 1, n for method 2 and 1 for method 3.

## Where this design departs from, or adds to, the original scheme

* **Sending cells capture the driven value** (`CAPTURE_OUT = 1`). The original standard
  cell captures the core output. The change keeps the pattern overlap valid across
  Capture-DR.
* **The sensor window is opened by the falling TCK edge.** The original sensor is drawn
  with TCK at its input. The falling edge matches the Update-DR launch of 1149.1.
* **Flags keep recording outside EX-SITEST.** Patterns for read-out methods 2 and 3 are
  applied under EXTEST. Applying them under EX-SITEST would clear the flags at every
  Capture-DR.
* **No gated clocks.** ClockDR and UpdateDR are drawn as clocks in the original cell.
  Here they are enables.
* **Own choices:** opcodes, IR width, chain order, ring order, wire counts, the ADR value
  and reset of all cell state on TRST_N. The pattern compression itself is tester
  software. Only its hardware side, stopping after *d* shifts, is exercised here.
* **Not included:** the cores, the wires, the tri-state pads, chip-edge cells that do not
  belong to an interconnect, and an IDCODE register.

## Simulating

All modules use `timeunit 1ps`. The package must be read first:

```
verilator --binary --timing --top-module tb_si_soc_top -Irtl -y rtl -y tb +libext+.sv \
          rtl/jtag_pkg.sv tb/tb_si_soc_top.sv -o sim
./obj_dir/sim
```

Replace `tb_si_soc_top` with any other testbench in `tb/` (`tb_bsc`, `tb_obsc`,
`tb_ils_sensor`, `tb_bidir_cell`, `tb_bs_wrapper`, `tb_tap_controller`,
`tb_instruction_register`).

The end-to-end testbench mirrors the top's default sizes in its own localparams
(`N_IJ`, `N_JL`, `N_LK`, `N_KL`). Change both together, and keep `N_IJ ≥ 6`, because the
built-in defects sit on lines 3 and 5. To use the rings in another SoC, instantiate
`bs_wrapper` per core with its pin counts and chain the `scan_in`/`scan_out` ports. Feed
all rings the `bs_ctrl_t` bundle built from the TAP as in `si_soc_top`.
