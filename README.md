# Fault emulation with hardware fault dropping

Fault simulation asks, for every modelled fault of a circuit, whether a given
test detects it. Software fault simulators spend most of their time on
sequential circuits with long test sequences. This design moves the work into
logic that can be put on an FPGA. The circuit under test (CUT) runs as real
hardware, with a fault-injection multiplexer on each of its nets. An LFSR
generates the test vectors. An unmodified copy of the circuit, the *golden
device* (GOLD), runs beside it on the same vectors. A comparator checks the
two output words in every clock. The first mismatch proves that the fault is
detected. The controller then drops the rest of that fault's test at once and
moves on to the next fault. This is *fault dropping* in hardware. For faults
that are found early it cuts the emulated cycles by a large factor.

The example circuit is the ISCAS'89 benchmark **s27**: 4 inputs, 1 output,
3 flip-flops and 17 nets, giving 34 stuck-at faults. Everything except the
CUT, the GOLD copy and `cut_pkg` is generic, and works for any circuit once
those three are generated for it.

## How a run proceeds

`emu_fsm` runs this loop. Its three indices are held in three `counter`
instances: vector, sequence and fault.

```
for fault f in 0 .. num_faults-1:
    load the LFSR with the seed                  (ST_RESET_LFSR, 1 clock)
    for sequence s in 0 .. num_seq-1:
        reset CUT and GOLD                       (ST_RESET_CUT, 1 clock)
        for vector v in 0 .. seq_len-1:          (ST_EMULATE, 1 clock each)
            apply the LFSR state to CUT and GOLD
            if their outputs differ: detected at (s, v); leave both loops
            else: clock CUT, GOLD and the LFSR one step
    offer the report for f                       (ST_REPORT, until accepted)
```

Points that matter when reading the waveforms or the code:

* **The comparison happens in the same cycle.** Outputs are combinational
  (Mealy) functions of the present vector and state. The verdict for vector
  `v` is therefore known before the clock edge that would apply it. A
  detecting vector is never clocked into the circuits, and detection costs
  no extra cycle.
* **A detection ends the whole test of that fault.** It does not end only
  the current sequence. The remaining sequences are skipped as well.
* **The LFSR is reloaded once per fault, not once per sequence.** Every
  fault therefore sees the same vector stream. Sequence `s` is the stretch
  of that stream from vector `s*seq_len` on, and the CUT and GOLD are reset
  at each sequence boundary.
* **Cycle cost per fault**, if the host takes each report at once:
  * undetected fault: `1 + num_seq*(1 + seq_len) + 1` clocks;
  * fault detected at `(s, v)`: `1 + s*(1 + seq_len) + 1 + (v + 1) + 1` clocks.
* **Emulated cycles.** `cycles` counts the clocks spent in `ST_EMULATE`
  since the last start, which is the number of vectors applied. It is the
  figure of merit of fault dropping: it can be compared with
  `num_faults * num_seq * seq_len` for an emulator without fault dropping.
  At one vector per clock the run takes about `cycles / f_clk` seconds.

A combinational circuit is handled by the same loop. Use `num_seq = 1` and
give all its vectors in one sequence, since it has no state to reset.

## Fault injection

Every net of the CUT passes through a `fault_point`. This is a 2:1
multiplexer that replaces the net by a shared `stuck` value when its select
line is high. The fault point sits on the stem of the net, so every load of
the net sees the fault. Fan-out branches have no fault points of their own.
A `fault_decoder` drives the select lines from a fault-point index. It is
built as a small tree: a first level decodes the upper index bits into group
enables, and one decoder per group of 4 points decodes the rest. On an FPGA
the second-level decoders can sit next to the nets they serve. A fault is
therefore active in the same clock in which the fault counter holds its
number. Nothing has to be shifted into a chain. The price is area: after
coarse synthesis `s27_cut` has 66 cells against 17 for `s27_gold`, about
four times as many.

`cut_top` turns the fault counter value `f` into the CUT's controls:

| fault number `f` | fault point | stuck value |
|---|---|---|
| `f < 34` | `f >> 1` | `f[0]` (0 = stuck-at-0, 1 = stuck-at-1) |
| `f >= 34` or not running | none | the CUT is fault-free |

The fault-point indices of s27 are:

| index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| net | G0 | G1 | G2 | G3 | G5 | G6 | G7 | G8 | G9 | G10 | G11 | G12 | G13 | G14 | G15 | G16 | G17 |

G0–G3 are the inputs (`pi[3:0] = {G3,G2,G1,G0}`), G17 is the output, and
G5, G6 and G7 are the flip-flop outputs. A fault on G5, G6 or G7 forces the
value the flip-flop presents to the logic, not the stored bit.

## Stimulus generator

`lfsr` is a chain of `lfsr_stage` cells. Each stage has three parts:

* a flip-flop with a clock enable;
* a multiplexer in front of it that loads the `seed` bit while `reset` is
  high, and otherwise takes the previous stage's bit XOR `result`;
* at its output, an AND with the stage's feedback coefficient, whose result
  is XORed into a mod-2 sum that runs along the chain.

The sum at the end of the chain feeds stage 0. The next state is:

```
q'[0] = ^(q & poly) ^ result[0]
q'[i] = q[i-1]      ^ result[i]        (i > 0)
```

Seed and polynomial are run-time inputs, so the host can try other
generators without re-synthesis. With `result = 0` the register is a
pattern generator, and this is how the top uses it. Its width equals the
CUT's input count, and its state is the test vector. With circuit outputs
on `result` the same module is a multiple-input signature register. That is
the response analyser of an emulator without a golden copy. It is kept and
tested, but the top does not use it. A load needs `enable` as well as
`reset`, because the seed passes through the same enabled flip-flop. For 4
bits, `poly = 4'b1001` (x⁴ + x³ + 1) has the full period of 15.

## Three-valued option (`THREE_VALUED = 1`)

A real circuit without a reset powers up in an unknown state. The two-valued
CUT and GOLD pretend that the state is 0. With `THREE_VALUED = 1` the top
builds `cut_top_tv` and `tv_cmp` instead of `cut_top` and `cmp`. Every
signal of the two circuits is then a pair of wires (`tv_pkg`):

| code | value |
|---|---|
| `2'b01` | 0 |
| `2'b10` | 1 |
| `2'b00` | X (unknown) |
| `2'b11` | unused |

The gates are redefined on the two rails:

* AND: `{a1&b1, a0|b0}`
* OR: `{a1|b1, a0&b0}`
* NOT: swap the two rails.

X therefore propagates pessimistically, but a controlling input still gives
a known output. The reset at the start of a sequence puts the flip-flops
into X, and the test sequence itself has to initialise the circuit. The test
vectors stay two-valued, and nothing outside the CUT wrapper and the
comparator changes. The comparator counts a detection only where both
outputs are known and different, because an X proves nothing. With the same
stimulus, fewer s27 faults are detected in this mode than in the two-valued
one. That is expected: the two-valued mode credits detections that depend on
an assumed power-up state.

## Host interface

`host_if` is a plain register port, and the top's ports are the same
signals:

| write addr | register | read addr | value |
|---|---|---|---|
| 0 | LFSR seed | 0–4 | registers read back |
| 1 | feedback polynomial | 5 | `{done, busy}` in bits 1:0 |
| 2 | number of faults | 6 | emulated cycles |
| 3 | sequences per fault | | |
| 4 | vectors per sequence | | |
| 5 | bit 0 = 1: start | | |

* Writes are ignored while a run is busy.
* `done` stays set until the next start.
* A count of 0 behaves like 1.
* Reads are combinational.

Reports leave on a valid/ready stream (`rep_valid`, `rep_ready`, `rep_data`),
one per fault, in fault order. Each report holds `fe_pkg::report_t`:

* the fault number;
* `detected`;
* the sequence and vector of detection (0 if the fault was not detected).

A report stays stable until it is accepted. If `rep_ready` is held low, the
emulation pauses.

## Module map

```
fault_emulator             top; parameter THREE_VALUED (default 0)
├── host_if                host registers, report stream
├── emu_fsm                run loop, report, emulated-cycle counter
├── counter  x3            vector, sequence and fault indices
├── lfsr                   test-vector generator
│   └── lfsr_stage xN
├── cut_top                (THREE_VALUED = 0)
│   ├── s27_cut            fault_decoder + 17 fault_point
│   └── s27_gold
├── cmp
├── cut_top_tv             (THREE_VALUED = 1)
│   ├── s27_cut_tv         fault_decoder + 17 tv_fault_point
│   └── s27_gold_tv
└── tv_cmp
packages: cut_pkg (CUT sizes), fe_pkg (widths, config, report, states),
          tv_pkg (three-valued logic)
```

Resets: the environment uses an asynchronous active-low `rst_n`. The
circuits under test are reset synchronously by the controller, and only as
part of the algorithm. After synthesis (coarse, word-level), the two-valued
top has about 217 cells and 200 flip-flop bits. Most of them are the 16-bit
counters and the 32-bit cycle counter.

## Using another circuit

Only three parts depend on the circuit:

1. `cut_pkg`: input, output and fault-point counts.
2. A fault-injected netlist in the style of `s27_cut`: every net through a
   `fault_point`, with selects from a `fault_decoder`.
3. A plain netlist like `s27_gold`.

`cut_top` instantiates the two netlists by name. The counters are 16 bits
wide (`fe_pkg::CNT_W`), which allows up to 65 535 faults, sequences and
vectors per sequence. `cycles` is 32 bits wide. The sizes of the benchmark
runs the approach was measured with are well inside these limits:

| benchmark | faults | sequences × length | actual cycles per fault | total emulated cycles |
|---|---|---|---|---|
| s15850 | 12 314 | 200 × 200 | 25 521 | 3.1·10⁸ |
| s5378 | 5 150 | 80 × 100 | 2 896 | 1.5·10⁷ |

Those benchmark netlists are not included here. The example circuit
shipped is s27.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints a final `TB_RESULT checks=N failures=M` line. The reference models in
`tb/s27_ref_pkg.sv` are independent of the RTL:

* a gate-by-gate evaluation of s27 with an optional forced net, in two-valued
  and three-valued logic;
* a software LFSR.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cut_pkg.sv rtl/fe_pkg.sv rtl/tv_pkg.sv tb/s27_ref_pkg.sv \
  tb/tb_fault_emulator.sv --top-module tb_fault_emulator -Mdir obj -o sim
./obj/sim
```

`tb_fault_emulator` drives the top at its default parameters through the
host port. It runs three configurations: the full fault list, a short test
with 4 fault numbers beyond the list, and another polynomial. It predicts
every report, and checks:

* the clock count of every fault;
* the emulated-cycle register;
* the status register.

It also checks that each mechanism happened at least once:

* a fault dropped on detection;
* a fault surviving the whole test;
* a detection after a CUT reset;
* report back-pressure;
* a refused configuration write.

`tb_fault_emulator_tv` does the same with `THREE_VALUED = 1`.

`tb_fault_emulator_workloads` runs s27 with the test lengths of the
benchmark experiments (sequences × vectors per sequence), checking every
report as above. It prints the average emulated cycles per fault. With
fault dropping these come out well below the full test length:

| test shape | vectors per fault | emulated per fault (s27, 34 faults) |
|---|---|---|
| 80 × 100 | 8 000 | 2 121 |
| 200 × 200 | 40 000 | 5 921 |
| 80 × 50 | 4 000 | 598 |
| 10 × 400 | 4 000 | 625 |
| 40 × 100 | 4 000 | 950 |
| 40 × 400 | 16 000 | 3 767 |
| 20 × 200 | 4 000 | 956 |
| 20 000 × 1 | 20 000 | 8 237 |

The averages are dominated by the few s27 faults that the 4-bit LFSR never
detects, because those faults run the whole test.

The testbenches use only two-state values, and the designs reset or load
everything that they read.

## What follows the original description and what is chosen here

These parts follow the original description:

* the block structure: host interface, controller, three counters, one
  stimulus LFSR, CUT wrapper with a faulty CUT and a golden copy, and a
  parallel comparator;
* the per-fault, per-sequence and per-vector loop with fault dropping;
* multiplexer fault points activated by distributed decoders;
* the LFSR stage structure;
* the three-valued option, which changes only the CUT, the GOLD and the
  comparator.

These parts are chosen here:

* the s27 example and its stem-only fault list;
* the fault numbering;
* the two-level decoder split;
* all widths;
* one-clock reset states;
* resetting two-valued flip-flops to 0 and three-valued ones to X;
* the report format;
* the host register map and handshake. The original host protocol was left
  undefined.
* the dual-rail code;
* the rule that X never counts as a detection.

Where the loop description was ambiguous, a detection here ends all
remaining sequences of the fault, not only the current one. The rate of one
vector per clock matches the published emulation times.

Not included:

* the host software;
* the tools that generate the fault-injected netlist and wrapper;
* the signature-analysis flow of an emulator without fault dropping. Its
  LFSR mode is present in `lfsr`.
* shift-register fault injection, which was only an alternative to the
  multiplexer scheme.
