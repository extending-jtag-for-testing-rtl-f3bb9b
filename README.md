# Signal-integrity testing of SoC interconnects through JTAG

Long on-chip interconnects between cores suffer from crosstalk. A victim
wire coupled to switching neighbours (aggressors) sees glitches and
delayed edges. A standard IEEE 1149.1 boundary scan can find stuck-at,
open and short faults on such wires. It cannot find these signal-integrity
faults, because at least 2.5 TCK cycles pass between applying a stimulus
and capturing the response, and because each pair of test vectors has to
be scanned in bit by bit.

This RTL extends the boundary scan in three ways:

* The cells that drive the interconnects **generate the test patterns
  themselves**. The tester scans in only an initial value and a one-hot
  "victim-select" word. After that, each Update-DR produces the next
  pattern of the maximum-aggressor fault model.
* The cells at the receiving end contain **sticky noise (ND) and skew (SD)
  flags**. Analog detectors set these flags while the patterns run.
* **Two new instructions** control it all through the unchanged five-pin
  JTAG port. `G_SITEST` generates the patterns and `O_SITEST` reads the
  flags.

The result is that test-application time grows linearly with the number
of wires n. A bus that scans in every pattern grows as n².

## The maximum-aggressor patterns

For each victim wire, the maximum-aggressor (MA) model uses six faults:
positive glitches Pg0/Pg1, negative glitches Ng0/Ng1, rising skew Rs and
falling skew Fs. Each fault needs a pair of vectors. In every fault all
aggressors switch together. The victim either holds its value (glitch
faults) or switches in the opposite direction (skew faults).

If the vectors are put in the right order, the six faults form two chains
of four vectors (five wires, victim in the middle):

```
start 00000 --Pg0--> 11011 --Fs--> 00100 --Pg1--> 11111
start 11111 --Ng1--> 00100 --Rs--> 11011 --Ng0--> 00000
```

Each aggressor toggles on every step. The victim toggles only on the
middle step. So one victim needs just three clocks of a toggle circuit:
the aggressors toggle every time, and the victim toggles every second
time. After three steps every wire holds the complement of its start
value. The next victim therefore starts from the other initial value and
gets the other three faults. Running the whole rotation once from
`0…0` and once from `1…1` gives every wire all six faults.

A single chain that flowed straight from Pg1 into Ng1 would not work. The
victim would then not toggle at half the aggressor rate.

## Pattern generation cell (`rtl/pgbsc.sv`)

This is a standard boundary-scan cell with three additions:

| element | function |
|---|---|
| feedback mux before FF2 | with SI=1, FF2 loads its own complement, so every FF2 clock toggles the wire |
| FF3 | a toggle flip-flop clocked by UpdateDR: UpdateDR divided by two |
| clock mux of FF2 | FF2 is clocked by FF3 when `Q1 AND SI`, otherwise by UpdateDR |

FF1 holds this cell's bit of the victim-select word. This gives three
modes:

| mode | Q1 | SI | wire toggles on |
|---|---|---|---|
| victim | 1 | 1 | every second UpdateDR |
| aggressor | 0 | 1 | every UpdateDR |
| normal | – | 0 | (standard cell) |

In this RTL every flip-flop runs on TCK, and ClockDR and UpdateDR act as
clock enables. The derived FF2 clock becomes the enable "UpdateDR while
Q3 = 0", which is the TCK edge on which FF3 rises. FF3 is preset to 1
whenever SI = 0 and whenever FF1 is clocked. So after every
victim-select shift, the victim toggles on the second of the next three
UpdateDRs, as the chains above require.

Two choices in the instruction decoder (`rtl/ir_decoder.sv`) make the
cell usable through a real TAP controller. **Both are choices of this
implementation.**

* Reaching Update-DR always means passing through Capture-DR, where
  ClockDR would normally overwrite FF1 with the core output and destroy
  the victim-select word. Under `G_SITEST`, ClockDR is therefore
  suppressed in Capture-DR. A pattern is applied with the TAP path
  Select-DR → Capture-DR → Exit1-DR → Update-DR.
* Every DR scan also ends with an Update-DR, including the scan that
  shifts the victim-select word. Under `G_SITEST`, an Update-DR that ends
  a scan which visited Shift-DR is not passed to the cells. Only scans
  without a shift apply patterns, so every victim gets exactly three.

Moving to the next victim takes a one-bit DR scan that shifts in a 0. The
one-hot bit then moves one cell along the chain (`10000` → `01000`). The
cell in front of the first PGBSC must hold 0 for this to work. The test
procedure below ensures it.

## Observation cell and the detectors

Each interconnect ends in an observation cell (`rtl/obsc.sv`). The cell
has an **ND flip-flop** and an **SD flip-flop**. Each one is set to 1 by
its detector and holds until TRST. Both record only while CE = 1.

FF1 is fed through a mux controlled by `sel = NOT SI OR ShiftDR`:

| SI | ShiftDR | sel | FF1 loads |
|---|---|---|---|
| 1 | 0 | 0 | ND flip-flop if ND/SD‾ = 1, else SD flip-flop (Capture-DR) |
| 1 | 1 | 1 | previous cell (Shift-DR) |
| 0 | – | 1 | standard capture/shift |

So under `O_SITEST`, Capture-DR loads one flag per wire into the chain,
and Shift-DR brings the flags out on TDO. The two detectors are analog.
They are provided as behavioural models for simulation, not synthesis:

* `rtl/nd_cell.sv`: the noise detector, a sense amplifier. It samples the
  received voltage (a 12-bit millivolt code in this model). Its output
  falls to 0 when the voltage exceeds V_Hthr (default 1980 mV) and stays
  0 until the voltage drops below V_Hmin (default 1620 mV). The falling
  edge sets the ND flip-flop. The thresholds are example values for a
  1.8 V line.
* `rtl/sd_cell.sv`: the skew detector. A delay line on the launching clock
  defines a skew-immune window (default 5 ns). The model emits a pulse
  when the received signal changes later than that window after the
  clock's rising edge, and the pulse sets the SD flip-flop. The real cell
  makes this comparison with an inverter chain and a NOR gate. The model
  reproduces the behaviour, not the circuit.

A real chip would replace these two models with the transistor-level
cells.

## Instructions

The instruction register is 3 bits long, captures `001`, and selects
BYPASS after reset. The opcodes are choices of this implementation.

| instruction | code | Mode | SI | CE | use |
|---|---|---|---|---|---|
| EXTEST | 000 | 1 | 0 | 0 | standard interconnect test |
| SAMPLE/PRELOAD | 001 | 0 | 0 | 0 | load the initial value into the PGBSC FF2s |
| G_SITEST | 010 | 1 | 1 | 1 | generate patterns, detectors armed |
| O_SITEST | 011 | 1 | 1 | 0 | read the ND flags, then the SD flags |
| BYPASS | 111 (and unused codes) | 0 | 0 | 0 | one-bit bypass |

ND/SD‾ is set to 1 at every Update-IR. Under `O_SITEST` it is
complemented at every Update-DR. So the first read-out scan returns the
ND flags and the second returns the SD flags. The detectors are off
(CE = 0) during the read-out. This matters because the `O_SITEST`
Update-DRs still update the cells: the PGBSCs are in SI mode and toggle
the wires. With the detectors off, this toggling cannot change the stored
results.

## Running a test

`rtl/si_jtag_top.sv` connects everything. It has one TAP controller, the
decoder, a bypass register, and one boundary register running:

```
TDI -> M standard cells (core i inputs) -> N PGBSCs (core i outputs, drive the wires)
    -> N OBSCs (core j inputs, with ND/SD detectors) -> K standard cells (core j outputs) -> TDO
```

The defaults are N = 32 wires and M = K = 2. M = 0 and K = 0 are allowed.
The cores and the wires are outside the module, and their pins are
ports:

* `iut_tx`: the driven ends of the wires.
* `iut_rx` and `iut_rx_mv`: the received logic level and voltage.
* `sys_clk`: the clock the skew window is measured from. In the
  testbenches this is TCK, because patterns are launched by Update-DR.

The tester runs the following sequence (TCK counts start and end in
Run-Test/Idle, with IR length 3 and a boundary register of L bits):

```
for init in 0...0, 1...1:
    load SAMPLE/PRELOAD; DR scan with init in every PGBSC          9 + (L+5)
    load G_SITEST                  (wires switch to init)           9
    DR scan: one-hot victim-select, 1 in the first PGBSC            L+5
    repeat N times:
        3 x (Select-DR, Capture-DR, Exit1-DR, Update-DR, Idle)     15
        1-bit DR scan shifting in 0 (next victim)                    6
load O_SITEST; DR scan -> ND flags; DR scan -> SD flags             9 + 2(L+5)
```

With M = K = 0, the OBSCs are the N cells nearest TDO. An N-bit scan then
reads all the flags, and the initial value and victim-select word also
need only N-bit scans. Pattern generation then takes 46N + 56 TCK:

| N | 8 | 16 | 32 |
|---|---|---|---|
| TCK, all 12N patterns, both initial values | 424 | 792 | 1528 |
| read-out shift cycles, flags read once | 16 | 32 | 64 |
| read-out shift cycles, flags read after each initial value | 32 | 64 | 128 |

The source design's own count for the generation phase is 32N + 8 (264,
520 and 1032 TCK). That count does not include the instruction loads and
TAP navigation that the numbers above include. The read-out shift cycles
(2N and 4N) agree with the source. Scanning in every pattern instead
would take 12N(N + 4) cycles: 1152, 3840 and 13824.

The flags can also be read after every pattern step. This costs far more
time but shows which transition caused each violation. The flags are
sticky, so each read shows every violation so far. An `O_SITEST` scan also
passes through the PGBSC FF1s, and its Update-DR toggles the PGBSCs, so
the tester restores the state like this:

1. After the pattern, load `O_SITEST` and do the two N-bit reads. Shift
   the victim-select word in during both reads. The two Update-DRs toggle
   the aggressors twice, so the wires end up as they were, and the
   victim's PGBSC does not toggle.
2. Load `G_SITEST` again.
3. If the next update is the victim's third pattern, first shift the
   victim-select word in once more under `G_SITEST`. This puts the
   divide-by-two flip-flop back in the right phase.

Read this way, there are 6N pattern steps, and each read takes 2N shift
cycles, so read-out takes 12N² shift cycles: 768, 3072 and 12288. The
source design counts 24N² (1536, 6144 and 24576) because it assumes one
read after each of the 12 vectors per victim. Here the pairs share
vectors, so there are only 6N steps. Each update after a read also starts
from Run-Test/Idle, which adds 6N TCK to generation (472, 888 and 1720).

To clear the flags, assert TRST. Test-Logic-Reset reached through TMS
does not clear them.

## Timing and reset conventions

* All test logic, including the update stages, acts on the rising edge of
  TCK that leaves a state. The IEEE 1149.1 standard updates on the
  falling edge in Update-DR. In this RTL the update happens half a cycle
  later.
* TDO is combinational from the last stage during Shift-IR and Shift-DR,
  and 0 otherwise. There is no falling-edge TDO register and no high
  impedance.
* TRST (`trst_n`) resets the TAP asynchronously. The cells' FF1, FF2 and
  FF3 reset while the controller is in Test-Logic-Reset. The ND and SD
  flip-flops are clocked by the detector outputs and cleared only by
  TRST.
* The detectors run asynchronously to TCK.

## Where this RTL goes beyond the source design

The following are this implementation's own choices. The design itself
leaves them open.

* The opcodes, the IR length, and the use of BYPASS.
* The chain order.
* The Mode value under `G_SITEST` and `O_SITEST`.
* Suppressing ClockDR in Capture-DR and the post-shift Update-DR under
  `G_SITEST`.
* The FF3 preset.
* Clearing the flags with TRST.
* Synchronous enables in place of gated clocks.
* The detector models' thresholds, window and pulse width.

One SI signal drives both cell types. Because of that, the PGBSCs also
toggle under `O_SITEST`.

## Files and simulation

| file | contents |
|---|---|
| `rtl/si_jtag_pkg.sv` | TAP states, opcodes, control bundle `bsc_ctrl_t` |
| `rtl/tap_controller.sv` | 1149.1 state machine |
| `rtl/ir_decoder.sv` | instruction register and decoder |
| `rtl/std_bsc.sv`, `rtl/pgbsc.sv`, `rtl/obsc.sv` | boundary-scan cells |
| `rtl/nd_cell.sv`, `rtl/sd_cell.sv` | behavioural detector models |
| `rtl/si_jtag_top.sv` | the architecture |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_si_jtag_top.sv` | end-to-end test at the default size |
| `tb/tb_si_workloads.sv`, `tb/si_workload_run.sv` | N = 8, 16, 32 with M = K = 0, three read-out schemes |

The end-to-end test works entirely through the JTAG pins:

* It models 32 wires, one with a glitch on Pg1 and one that arrives
  30 ns late.
* It runs the full procedure and checks all 6N patterns that reach the
  wires.
* It reads both sets of flags, which must flag exactly those two wires.
* It also exercises BYPASS, EXTEST and TRST.
* It counts the TCK cycles and how often each mechanism occurs.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one
with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/si_jtag_pkg.sv tb/tb_si_jtag_top.sv \
          --top-module tb_si_jtag_top -Mdir obj_top
./obj_top/Vtb_si_jtag_top
```

Replace the testbench name to run another. `rtl/si_jtag_pkg.sv` must come
first because the other files import it.

The cells, the TAP controller and the decoder are synthesizable. The top
and the SD model are not, because the top instantiates the behavioural
detector models. For synthesis, replace the models with the real
detector cells or bring `nd_c` and `sd_c` out as ports. The ND model
contains an intended latch, its hysteresis.
