# Delay-fault testable 32-bit domino ALU

Timing-only defects are hard to catch in a fast datapath: a resistive via or
a weak transistor makes one gate slower, the result is still right at a
relaxed tester clock, and the part fails later in the field or at full
speed. This ALU catches such defects with a slow tester. Its critical path is
compound domino logic (CDL), and every dynamic gate has an extra n-MOS
*footer* transistor. In NORMAL mode the footers are always on. In TEST mode an
on-chip DFT block switches off the footers of one section of the datapath a
fixed time after that section's clock phase opens. A section that has not
finished evaluating by then keeps its precharged value. The ALU then produces
a wrong result, and an ordinary logic comparison at the outputs sees it.

The window's opening edge is the system clock edge. Its closing edge comes
from an inverter delay chain on chip. Detection therefore depends on the
delay between the two edges, not on the clock frequency. The tester can run
the ALU at 200 MHz and still detect a defect of about 60 ps in a datapath
built for 1.5 GHz.

This repository holds synthesizable SystemVerilog for the ALU and its DFT
logic. Delay annotations let an event-driven simulator reproduce the
evaluation windows, and a defect of chosen size can be injected into any
test section.

## The datapath and its clock phases

```
 A,B ──► input FF ─► latch (open CLK=0) ─► A_bus/B_bus ──┬─► arithmetic unit ──────► phase latch ─┐
 AD  ──► input FF ─► 5:32 decode ─► latch (open CLK=0)   │   section 1 (footer TEST_CLK1)         │
              │                                          │   section 2 (footer TEST_CLK2)         ▼
              ├─► NORMAL controls                        └─► logic unit ┐                  ALU MUX + sum
              └─► T/N, CTRL1, CTRL2 ─► DFT logic                        ├─► LU MUX ─► latch ─► section 3
                                        │                shifter ───────┘   (footer TEST_CLK3)
                                        └─► TEST_CLK1..3 (footers)               │
                                                                 op latch (open CLK=0) ─► ALU_op[31:0]
```

The ALU evaluates on both clock phases.

| phase | what evaluates | test section | footer |
|---|---|---|---|
| CLK = 1 | adder front-end MUX, PG unit, carry-merge levels 1-2 (CDL stages 1-3) | 1 | TEST_CLK1 |
| CLK = 1 | carry-merge levels 3-5 (CDL stages 4-6) | 2 | TEST_CLK2 |
| CLK = 0 | sum XOR and ALU MUX (CDL stages 7-8) | 3 | TEST_CLK3 |

The logic unit, shifter and decoder are static logic off the critical path.
They have no footers and are not delay-tested.

Operands and the instruction are sampled at a rising edge k. Latches that
open while CLK=0 put them on the buses, so the buses never change while the
domino gates evaluate. Sections 1 and 2 evaluate from rising edge k+1. A latch
that is open while CLK=1 hands the half-sums and carries to section 3, which
evaluates in the following CLK=0 phase. The op latch is open while CLK=0 and
closes at rising edge k+2. It holds `alu_op` from there until the next falling
edge.

**Latency is two cycles, with one instruction per cycle.** Each section
precharges to zero in its idle phase. A domino output can only rise during
evaluation, and only while its footer is on.

## Evaluation windows and the safety margin

The DFT logic produces one footer signal per section. Each is the inverted
clock of that section's phase, delayed by an inverter chain:

| signal | falls after | default | nominal section finish | margin |
|---|---|---|---|---|
| TEST_CLK1 | CLK rise | 230 ps | 170 ps (section 1) | 60 ps |
| TEST_CLK2 | CLK rise | 390 ps | 330 ps (sections 1+2) | 60 ps |
| TEST_CLK3 | /CLK rise | 170 ps | 110 ps (section 3) | 60 ps |

The three delays are the published values of a 0.18 µm implementation, and
each includes a safety margin of about 60 ps. The margin keeps good parts from
being rejected under process, voltage and temperature spread. The nominal
section delays are those windows less the margin. A defect that adds more
than 60 ps to a section under test is detected. A smaller one escapes.

The TEST_CLK2 window is counted from the CLK edge, like TEST_CLK1, so it also
covers section 1's delay. Testing one section at a time then gives a
diagnosis pattern:

| defect in | fails test code 28 (S1) | 29 (S2) | 30 (S3) |
|---|---|---|---|
| section 1 | yes | yes | no |
| section 2 | no | yes | no |
| section 3 | no | no | yes |

In NORMAL mode at 1.5 GHz (333 ps half period), sections 1 and 2 end only
3 ps before the falling edge closes the phase latch. Any slowdown of those
sections therefore fails at speed. Section 3 has 223 ps of slack before the
op latch closes. At 200 MHz in NORMAL mode, no defect below about 2 ns is
visible. This is the test escape the footers remove.

## DFT logic (`dft_logic`)

- **Input MUXes.** Two 2:1 input MUXes select VDD or the clock: node A takes
  CLK and node B takes /CLK. In NORMAL mode both sit at VDD, so the delay chain
  is static and adds no clock load.
- **Delay chain.** Node A feeds one inverter, which gives the TEST_CLK1 tap.
  Two more inverters give the TEST_CLK2 tap, so the two signals share the first
  inverter. Node B feeds one inverter, which gives the TEST_CLK3 tap. Every tap
  has an odd number of inversions, so every footer signal is the inverted
  clock.
- **Output MUXes.** Three output MUXes pass either VDD or their tap. The mode
  lines select them:

| T/N | CTRL1 | CTRL2 | mode |
|---|---|---|---|
| 0 | x | x | NORMAL: all footers on |
| 1 | 0 | 0 | section 1 under test, others at VDD |
| 1 | 0 | 1 | section 2 under test |
| 1 | 1 | 0 | section 3 under test |
| 1 | 1 | 1 | reserved; all footers on in this design |

The delays live on the inverters as `assign #(DELAY_PS)` annotations. They
are 230 ps, then 80 + 80 ps for the shared chain, and 170 ps behind node B.
The MUXes have zero delay. A synthesis tool sees plain inverters and MUXes.
In silicon the delay comes from transistor sizing.

## Instruction set

`AD[4:0]` is decoded 5:32. The code values are this design's own choice.

| code | operation | | code | operation |
|---|---|---|---|---|
| 0 | A + B | | 6 | A << B[4:0] |
| 1 | A − B | | 7 | A >> B[4:0] (logical) |
| 2 | A & B | | 8 | A >>> B[4:0] (arithmetic) |
| 3 | A \| B | | 28 | TEST section 1: A + B |
| 4 | A ^ B | | 29 | TEST section 2: A + B |
| 5 | ~(A \| B) | | 30 | TEST section 3: A + B |
| | | | 31 | TEST reserved: A + B |

All other codes select nothing in the ALU MUX, and the result is 0.

A TEST code clears every NORMAL control and runs an addition through the
tested path. The mode lines come from the controls of the CLK=1 phase. So the
TEST_CLK3 window of an instruction is set by the instruction that follows it.
**Hold a section-3 TEST code for at least two consecutive cycles.** In
practice the whole test vector set runs under one code.

## How timing is modelled

The RTL is logic-level, and it carries just enough timing for the windows to
mean something:

- `cdl_section` stands for a whole group of CDL stages.
  - Its logic function is computed with zero delay.
  - One lumped inertial delay, `DELAY_PS + FAULT_PS`, follows the start of its
    evaluation phase.
  - A latch models the dynamic nodes with their keepers. It clears during
    precharge, follows the delayed function while the footer is on, and holds
    otherwise.
  - Charge sharing, slopes and keeper fights are not modelled.
- A delay defect is an extra section delay. `S1_FAULT_PS`, `S2_FAULT_PS` and
  `S3_FAULT_PS` on `dft_alu32` inject one; all are 0 in a good part.
  Physically the defect is a resistance in series with an evaluation
  transistor. Mapping a resistance to a delay is left to circuit simulation.
- All files use `timeunit 1ps`. Simulate with `--timing`.

Lint tools may report "no latch detected" (Verilator NOLATCH) for latches
whose enable is the clock. These latches are intentional: every phase
boundary in a two-phase domino datapath is a latch.

## Carry merge tree

The 32-bit adder is a radix-2 Kogge-Stone prefix tree. It has five merge
levels, so that the PG stage plus the tree fill the six CLK=1 CDL stages. The
carry-in (1 for subtraction) is folded into bit 0's generate. The front-end
MUX passes B or ~B. Levels 1-2 belong to section 1 and levels 3-5 to
section 2 (`S1_LEVELS`). The sum XOR sits in section 3 with the ALU MUX. The
tree type and the split are this design's choices; the design description
names only a "carry merge tree".

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dft_alu32` | `WIDTH` | 32 | datapath width (`alu_pkg::ALU_WIDTH`) |
| | `TCLK1/2/3_DELAY_PS` | 230 / 390 / 170 | footer window delays |
| | `S1/2/3_DELAY_PS` | 170 / 160 / 110 | nominal section delays |
| | `S1/2/3_FAULT_PS` | 0 | injected delay defect per section |
| `arithmetic_unit` | `S1_LEVELS` | 2 | carry-merge levels in section 1 |

The TEST clock must have a half period longer than the longest window
(390 ps). The NORMAL clock must have a half period of at least 331 ps, which
is 1.5 GHz.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/alu_pkg.sv tb/tb_dft_alu32.sv \
          --top-module tb_dft_alu32 -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_dft_alu32` | Five ALUs: a good one, one with a 100 ps defect in each section, one with a 40 ps defect in section 1. It runs NORMAL at speed (all operations checked), NORMAL at 200 MHz (every defect escapes) and each TEST code at 200 MHz (the diagnosis pattern above; the 40 ps defect escapes). It counts every mechanism. |
| `tb_dft_alu32_full` | Default-parameter ALU: all operations at 1.5 GHz, all TEST codes at 200 MHz, and the measured footer windows (230/390/170 ps). |
| `tb_fault_sweep` | Sweeps the defect size per section and checks the smallest detected defect, with and without the footers. |
| `tb_<block>` | One self-checking test per block. |

All of these pass with the default parameters. Each block test also fails when one essential detail of its block is broken, for example a swapped footer, a dropped carry-in or an inverted latch polarity. The sweep reports, per section: with the footers, 70 ps is the smallest swept defect detected (the margin is 60 ps); at speed without the footers, 20 ps for sections 1-2 and 250 ps for section 3; at 200 MHz without the footers, none.

## Where this design goes beyond or departs from the description

- **Inferred, not stated:** the opcode values and the set of logic and shift
  operations; the latch polarities at every phase boundary; the Kogge-Stone
  tree and how its levels split between sections 1 and 2.
- **Reserved mode (T/N=1, CTRL=11):** described only as "low power stress
  testing". Here it leaves all footers on. Each 3:1 output MUX has a third
  input that is not identified, and it is not built.
- **Output-stage latches:** built as plain latches, not in CDL.
- **Not built, because they are not logic:**
  - the dual-supply low-power NORMAL mode;
  - the analog behaviour of the footers (stack height, slopes).
- **Not built:** the two alternative TEST_CLK generators. One uses an
  inverter chain with a NAND gate. The other uses current-starved inverters
  with an external bias voltage. They were only compared with the MUX-based
  design.
- **Defect thresholds:** the lumped section delays do not reproduce the
  per-stage detection numbers measured in transistor-level simulation.
  - With the footers, this model detects anything above the 60 ps margin in
    every section.
  - Without them, at speed, sections 1-2 have almost no slack and section 3
    has 223 ps.
  - The published non-DFT thresholds are larger for stages 1-3 (about 330 ps)
    than this model gives. They come from gate-level slack that a per-section
    lumped delay does not capture.
