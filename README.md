# RTCE: real-time co-emulation of a power grid and its communication network

A smart grid has two halves that act on each other. Electrical transients are
measured and reported over a communication network, and commands come back
over the same network to open breakers. If you want to see how a network delay
or a broken link changes the course of a fault, both halves have to run
together in real time.

This design puts the fast half, the electromagnetic-transient (EMT)
emulation of the power grid, into FPGA logic. It runs at a fixed 20 µs
time-step. The grid is split into areas, one FPGA board per area. The areas
are joined by long transmission lines. A line's travel time lets neighbouring
boards compute the same step in parallel and swap a handful of numbers over a
point-to-point serial link once per step.

The logic also does the measurement side that needs no packets. After every
step a *transient measurement unit* (TMU) for each bus records the bus voltage,
the load current and a local-truncation-error (LTE) estimate. It tests them
against thresholds and writes the result into a block memory. The
communication half works through two memories:

- The concentrators (TDCs) and the super concentrator (STDC) run as processor
  software. They read the measurement memory at the reporting rate.
- They write breaker and topology commands into a command memory.
- The power emulation takes a new command at the next step boundary.

The RTL here is the programmable-logic part of such a four-board emulator. The
processor software, the Ethernet and TCP/IP stack, the DMA engine and the
serial-link IP cores are not included. Their ports are brought out instead.

```
                +--------------------------- rtce_board (one power area) ----------------------------+
  src_inj  ---> | companion_bank --+                                                                   |
  cfg_*    ---> |                  +--> matrix_solver --> v --> tmu_sampler --> measurement memory ----|--> meas_*
                | tline_end -------+       ^  (G^-1 J)          (lte_unit,                             |
  cmd_*    ---> | ctrl_cmd_mem (set, breaker mask)               abnormal_detector)                   |
                |      ^                                                                               |
                | emt_step_ctrl (sequencing, overrun)      aurora_framer x2 <---> ax_tx_* / ax_rx_*    |
                +----------------------------------------------------------------------------------------+
  rtce_top: four boards (areas of 6, 3, 12, 9 buses); the eight link ports form a ring outside.
```

## One time-step

Everything on a board is sequenced by `emt_step_ctrl`. A timer ticks every
`STEP_CYCLES` = 2000 clocks, which is 20 µs at 100 MHz. Each tick runs the
step below. Each phase is started with a one-clock pulse and ends with the
unit's `done` pulse.

| phase | unit | work | clocks |
|---|---|---|---|
| LATCH | ctrl_cmd_mem | take the command in force (matrix set, breaker mask) | 1 |
| LOAD | matrix_solver | J ← source injections | 1 |
| CB_INJ | companion_bank | add each branch's history current to J | NB_BR+1 |
| TL_INJ | tline_end | add each line end's history current to J | NL+1 |
| SOLVE | matrix_solver | v = G⁻¹·J, one multiply-accumulate per clock | N·N+1 |
| CB_UPD | companion_bank | branch currents, new histories, bus load currents | NB_BR+1 |
| TL_UPD | tline_end | outgoing traveling-wave terms | NL+1 |
| SEND | aurora_framer | one frame per link (waits if the last one is still going out) | ≥1 |
| WAIT_RX | — | stall until every link has delivered the neighbour's frame | link latency |
| HIST | tline_end | store the received terms; line histories of the next step | NL+1 |
| TMU | tmu_sampler | LTE, threshold flags and records, one bus per clock | N+1 |

In the table, NL = 2 links × 15 = 30 line ends. Without the wait, a step takes
19 + 2·NB_BR + 3·NL + N·N + N clocks. At the default sizes that is 215, 185,
329 and 263 clocks for the 6-, 3-, 12- and 9-bus areas. The wait adds the link
latency, which is about 95 clocks for a 0.95 µs link. Either way the step uses
only a fraction of its 2000-clock budget.

`step_latency` reports the clocks each step took, and `rx_wait` the part spent
in WAIT_RX. Sometimes a tick arrives while the previous step is still running,
for example when a link stalls. Then `overrun` is set, which is sticky, and
`overruns` counts the event. The late step's successor starts as soon as the
late step ends, so the board catches up instead of dropping a step.

## Numbers

All electrical quantities are signed fixed point: 32 bits, 20 of them
fraction bits (`rtce_pkg::fx_t`). That gives a range of about ±2048 per unit
and a resolution of about 1e-6. Products are rounded (`fx_mul`). The format
is this design's choice. The reference design exchanges 64-bit
floating-point words between boards, and the link word here is also 64 bits
wide (see below). Keep per-unit values well inside the range: conductances of
a few hundred and inverses near 1 are comfortable.

## The power solver

### Companion branches (`companion_bank`)

Every lumped R, L or C branch is integrated with the trapezoidal rule. It
becomes a conductance `geq` in parallel with a history current `ih`:

    i(n)  = geq·(va − vb) + ih(n−1)
    L:  ih(n) =   i(n) + geq·(va − vb)     geq = Δt / 2L
    C:  ih(n) = −(i(n) + geq·(va − vb))    geq = 2C / Δt
    R:  ih(n) = 0                          geq = 1/R

The conductances are part of the nodal matrix. The bank only streams the
history currents into J, and after the solution it computes the new
histories. It also sums, per bus, the current of every branch that goes to
ground, which is the bus load current `i_shunt` that the TMU measures. A
branch whose breaker bit is 0 carries no current and keeps no history. Up to
`NB_BR` = 32 branches can be used.

### Nodal solution (`matrix_solver`)

The conductance matrix of an area changes only when the topology changes, for
example when a fault is applied or a breaker opens. So the processor computes
the inverse matrix for each topology it will need and loads it, up to `NSET`
= 4 of them. The command memory's word 0 selects which inverse is in force.

Per step, the solver does one matrix-vector product with a single
multiply-accumulate unit. That takes N·N+1 clocks: 145 clocks for the largest
area, 12×12. J is built through an accumulate port, where `(a, b, val)`
subtracts val at node a and adds it at node b, with node 0 as ground. The
branch bank and the line ends share this port, through a multiplexer on the
board.

Storing inverses is this design's choice. It makes a topology change a
software task: the processor recomputes an inverse and loads it before it
selects it. Solving the matrix on chip would make topology changes
independent of software, at the cost of more logic and a longer step.

### Lines between boards (`tline_end`)

A line of surge impedance Z whose travel time is D steps looks, from its end
k, like a conductance 1/Z in parallel with a current source:

    Ik(n+1) = −s_m(n+1−D)       with   s(n) = (2/Z)·v(n) + I(n)

Here s_m is the term of the far end m. Each end therefore sends its own s once
per step and uses the far end's s from D steps ago. The far end is on the
neighbouring board. As long as D ≥ 1, neither board needs the other's
*present* result, so all boards solve their step in parallel. This is the
reason the grid can be split at its long lines.

`tline_end` holds `NL` = 30 ends, 15 per link. It keeps a delay memory of
`DLY_STEPS` = 32 received terms per end. Until D terms have arrived, the
history current is zero.

The line model is lossless, and all lines share one travel time. Both are this
design's simplifications. A line with its own length needs its own D, which
means a per-end read pointer.

## The fast links (`aurora_framer`)

Each board has two links, one to each neighbour in a ring. Board g's link 0
is wired to board g+1's link 1. Line end k of link 0 on board g and line end k
of link 1 on board g+1 are the two ends of one line.

Every step, each link carries one AXI4-Stream frame of 15 words. This is the
user side of a framing serial-link core. Each 64-bit word is laid out as:

    [63:56] word index   [55:32] step count (low 24 bits)   [31:0] value

`tlast` marks the last word. The receiver stores the words by position and
raises `rx_full` after the last one. It then holds `tready` low until the
step controller has used the frame. A board that runs ahead therefore cannot
overwrite data that is still needed: the link's flow control pushes back on
it. A frame of the wrong length, or with words out of order, sets the sticky
`link_err`.

The boards are kept in step by the data itself. Each board waits in WAIT_RX
for its neighbours' frames. All boards share one `run` and reset, so their
timers start together. When a board uses a frame, it compares the frame's step
count with its own. A difference means a frame was lost or repeated, and it
also sets `link_err`. The board test feeds it one such frame.

## Watching the grid: TMUs, LTE and thresholds (`tmu_sampler`, `lte_unit`, `abnormal_detector`)

After the solution, `tmu_sampler` visits the buses one per clock. For each bus
it takes three values and writes one record of four words into the
measurement memory:

- **V:** the bus voltage.
- **I:** the load current.
- **LTE:** the LTE estimate of the bus voltage.

The fourth word of the record is the status word:

    word 4b+3 = {valid, held lte/oc/ov, present lte/oc/ov, step[24:0]}

**The LTE estimate.** The truncation error of step n, for a method of order p
with error constant C, is C·Δt^(p+1)·(p+1)! times the divided difference over
the last p+2 points. With a constant Δt this is exactly C times the (p+1)-th
backward difference. So `lte_unit` keeps the last p+1 voltages of every bus
and computes the estimate with adders only. It then multiplies by C.

- The defaults are p = 2 and C = −1/12, the trapezoidal rule.
- A second mode, for equipment solved by predictor and corrector, gives
  C/(1−C)·(x − x_pred). The board models no nonlinear equipment, so
  `tmu_sampler` uses only the first mode. The second mode is tested on its
  own, for a board that adds an iterative solver.

For a smooth 60 Hz waveform of amplitude 1 the estimate is about 4e-8,
which is below the resolution of the number format. A switching event gives
an LTE several orders of magnitude larger, in the step where it happens.

**Thresholds.** `abnormal_detector` compares |LTE|, |I| and |V| with three
programmable thresholds. Each test raises its own flag, so software can tell a
transient seen only in the LTE from a lasting over-current. The thresholds
reset to the largest value, which means nothing is flagged until they are
set.

**Held flags.** Software reads the records only at the reporting rate of
60 Hz, which is once every 833 steps. An LTE spike lasts one step, so a reader
would almost always miss it. The record therefore has *held* flag bits. A flag
raised at a bus stays set there for `FLAG_HOLD` = 834 steps. The *present*
bits show only the last step. The hold is this design's addition: it is what
lets a slow reader see every event.

The board also shows the flags at once on `abnormal`, `abn_bus` and
`abn_kind`, for logic that wants to react within a step.

## Steering the grid (`ctrl_cmd_mem`)

The processor writes commands into a small memory:

- Word 0 is the matrix set, which selects the topology.
- Word 1 is the breaker mask, one bit per branch, where 1 means closed.

At the start of every step, LATCH copies the words into the solver and the
branch bank, so a command never takes effect half-way through a step.
`topo_changed` pulses when the new command differs from the old one. After
reset the set is 0 and all breakers are closed.

A breaker operation takes two actions:

- Clear its bit in the mask. This stops the branch's history current.
- Select a matrix set whose inverse was computed without that branch.

The processor must do both.

## What is outside the RTL

These parts of a full co-emulator are software or vendor cores. They are not
part of this RTL:

- **The processors** run the transmission-level network (per-path delays and
  losses, taken from a network simulator), the TDC and STDC programs, and
  IEC 61850 messaging over TCP/IP.
- **The Ethernet MAC/PCS and the DMA engine.** The measurement and command
  memories are the boundary. `meas_addr`/`meas_rdata` is a passive read port
  with one clock of latency. The `cmd_*` signals are a write/read port.
- **The serial-link cores, transceivers and fibres.** `ax_tx_*`/`ax_rx_*` is
  their AXI4-Stream user side.
- **Generator, transformer and machine models.** Their Norton current
  injections enter per bus through `src_inj`, one value per step.

## Configuration map

All tables are loaded through `cfg_we/cfg_tgt/cfg_addr/cfg_data`, per board.
Values are in the fixed-point format.

| target (`cfg_tgt`) | address | content |
|---|---|---|
| 0 `CFG_GINV` | set·N·N + row·N + col | inverse conductance matrix entries |
| 1 `CFG_BRANCH` | b·4 + {0,1,2,3} | node a, node b (0 = ground), kind (0 R, 1 L, 2 C), geq |
| 2 `CFG_LINE` | e·2 + {0,1} | bus of line end e (0 = unused), 1/Z. Ends 0..14 on link 0, 15..29 on link 1 |
| 3 `CFG_THRESH` | 0, 1, 2 | thresholds for \|V\|, \|I\|, \|LTE\| |

The matrix loaded for a topology must include every branch's geq, as well as
the 1/Z of every line end at its bus.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NB` | 4 | boards (power areas) in `rtce_top` |
| `N_AREA` | {6, 3, 12, 9} | buses per area: the largest network matrices of the four areas |
| `NMAX` | 12 | width of the per-board bus arrays in `rtce_top` |
| `STEP_CYCLES` | 2000 | clocks per time-step: 20 µs at 100 MHz |
| `NLPL` | 15 | words per link frame, which is line ends per link |
| `NB_BR` | 32 | companion branches per board |
| `NSET` | 4 | stored inverse matrices (topologies) per board |
| `DLY_STEPS` | 32 | line travel time in steps |
| `SAMPLE_DIV` | 1 | record every n-th step (1: the TMU rate equals the step rate) |
| `FLAG_HOLD` | 834 | steps a flag stays in the held bits (one 60 Hz period) |

The first five follow the reference design: four areas, matrices of at most
6, 3, 12 and 9, a 20 µs step at 100 MHz, and fifteen words per exchange. The
others are this design's choices.

## Testing

Each unit has a self-checking testbench in `tb/`, named `tb_<unit>`. Each
compares the unit against values computed independently in the testbench,
often with real arithmetic. Each testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **`tb_rtce_board`** runs a two-bus area with its links looped back. It
  compares voltages, currents and line terms with a floating-point model of
  the same circuit, step by step.
- **`tb_rtce_top`** runs all four boards with every parameter at its default,
  for 8600 steps (172 ms of grid time). On a recent machine this takes under a
  minute.
  - **Grid stand-in:** each area is a chain of buses with loads, a 60 Hz
    source and a line to the next area.
  - **Matrices:** the testbench inverts the matrices itself.
  - **Links:** a link model with 0.95 µs latency closes the ring.
  - **Concentrators:** the testbench models them as described below.

Concentrator model in `tb_rtce_top`:

- Every 833 steps, each TDC reads its board's records.
- The records reach it 1 ms later.
- A TDC that sees a held flag reports to the STDC, 5 ms later.
- For an over-current, the STDC's breaker command reaches the board 5 ms
  after that.

`tb_rtce_top` runs two scenarios in sequence:

1. **Over-current fault.** A load is added at bus 7 of area 3. The LTE flag
   appears within two steps. The over-current flag stays set until the
   breaker opens, 26.3 ms after the fault. Afterwards the load current is
   zero.
2. **Fault with a broken network link.** The breaker is reclosed. The same
   fault is applied again, but with that area's path to the STDC rerouted and
   taking 80 ms. The breaker now opens 95.3 ms after the fault. The test
   checks that the fault lasts longer than in the first scenario.

Along the way, one link is held for 4000 clocks. This makes a board overrun
its step and the links push back. The test counts every mechanism and fails
if one never happened:

- steps, neighbour waits, backpressure and overruns;
- topology changes;
- LTE and over-current flags;
- TDC reports and STDC commands.

It also checks that the step time grows with the matrix size, and that there
are no link errors.

The network delays in these scenarios are example values, and so is the
chain-of-buses grid. They show the mechanism; they do not reproduce a
particular grid.

### Running a test

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rtce_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rtce_pkg.sv tb/tb_rtce_top.sv
./obj_dir/Vtb_rtce_top
```

Replace `tb_rtce_top` with any other testbench name. Run the commands from
the directory that holds `rtl/` and `tb/`.

## Where this design departs from the reference, and how far to trust it

- **Number format.** Fixed point here, 64-bit floating point in the reference
  exchange. A large grid with a wide range of impedances needs its
  per-unit scaling checked against the ±2048 range, or a wider `FX_W`.
- **Equipment models.** Only R, L and C branches and lossless lines are
  modelled in logic. Machines and transformers enter as current injections
  computed elsewhere. The per-board step latencies of the reference (8.7 to
  16.2 µs) include such models. The 2 to 3 µs measured here do not.
- **Topology changes** rely on inverses loaded beforehand, at most `NSET` per
  board.
- **LTE** is estimated for bus voltages, with a constant step. The
  variable-step divided-difference form reduces to this. The LTE of other
  state variables, such as branch currents, is not computed.
- **Threshold tests are done in logic**, with held flags for a slow reader.
  In the reference, the concentrator compares the values it reads. Software
  can still do that from the V, I and LTE words.
- **The link ring, word layout, backpressure rule and overrun handling** are
  this design's choices.
- **The scenarios** in `tb_rtce_top` use a stand-in grid and assumed network
  delays. The fault is applied after 18 ms of grid time, not after seconds.
- **Verification.** Every unit and the whole four-board system have been
  simulated with Verilator, and the RTL is accepted by a second
  SystemVerilog front end and synthesises with Yosys. It has not been built
  for or run on an FPGA, so timing closure at 100 MHz is unverified. The
  single multiply-accumulate units and the table memories are written to map
  onto DSP and block-RAM resources.

## Files

| file | content |
|---|---|
| `rtl/rtce_pkg.sv` | number format, configuration targets, branch kinds, link word, flag struct |
| `rtl/rtce_top.sv` | four boards side by side, all ports per board |
| `rtl/rtce_board.sv` | one area: all units below wired together |
| `rtl/emt_step_ctrl.sv` | step timer and phase sequencer, latency and overrun reporting |
| `rtl/companion_bank.sv` | trapezoidal R/L/C branches, bus load currents |
| `rtl/matrix_solver.sv` | stored inverses, J accumulation, v = G⁻¹J |
| `rtl/tline_end.sv` | traveling-wave line ends with delay memory |
| `rtl/aurora_framer.sv` | frame send/receive on the AXI4-Stream side of a link |
| `rtl/tmu_sampler.sv` | TMUs and measurement memory |
| `rtl/lte_unit.sv` | LTE estimator |
| `rtl/abnormal_detector.sv` | threshold tests |
| `rtl/ctrl_cmd_mem.sv` | control-command memory |
| `tb/axis_link_model.sv` | link model with latency, a hold input and a step-skew input, used by the board and top tests |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus board and system |
