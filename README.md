# BILBO self-test with STAR-EDT pattern compaction and session scheduling

This design is an on-chip test engine for four small datapath circuits: a
1-bit full adder, a 32-bit ripple-carry adder, a 32-bit magnitude comparator
and a 32-bit ALU. Each circuit has a fixed list of stuck-at faults that can
be injected. BILBO registers (Built-In Logic Block Observers) generate
pseudo-random test patterns. A STAR-EDT engine then picks, out of that
stream, a *small* set of patterns that together detect every injected
fault. It keeps only "parent" patterns. A phase shifter re-creates each
parent's "children" from it, so the children never need storing. A
scheduler tests the circuits in three sessions, so that the two pattern
generators are shared.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It uses one
clock and a synchronous active-low reset.

## Block map

```
                       seed1[63:0]               seed2[2:0]
                            |                         |
 scan_in -> [BILBO register 1, 64 bit] -so-> [BILBO register 2, 3 bit] -> scan_out
               |  q1 (pattern)                    |  q2 (pattern)
      +--------+---------+---------------+        |
      |                  |               |        |
 star_edt(RCA)   star_edt(comparator)  star_edt(ALU)   star_edt(full adder)
  session 1          session 2          session 3          session 1
      ^                  ^               ^                  ^
      +---------- test_scheduler: modes of both registers, run/clear ---+
```

| File | Role |
|---|---|
| `rtl/bist_pkg.sv` | shared types: BILBO modes, circuit ids, ALU opcodes, LFSR tap masks, the `stuck()` fault primitive |
| `rtl/bilbo_reg.sv` | the four-mode BILBO register |
| `rtl/full_adder_cut.sv`, `rca32_cut.sv`, `mag_comp32_cut.sv`, `alu32_cut.sv` | circuits under test, each with a `fault_en` vector |
| `rtl/cut_unit.sv` | picks one circuit by parameter and maps a pattern onto its inputs |
| `rtl/fault_sim.sv` | grades one pattern against every fault in parallel |
| `rtl/phase_shifter.sv` | derives the child patterns of a parent |
| `rtl/star_edt.sv` | the cluster engine for one circuit |
| `rtl/test_scheduler.sv` | the three-session controller |
| `rtl/bist_top.sv` | the whole design |

## BILBO register

`bilbo_reg` has two control inputs, `{b1,b2}`:

| b1 b2 | mode | next state |
|---|---|---|
| 0 0 | reset | all zeros |
| 0 1 | scan | `{si, q[W-1:1]}`; `so = q[0]` |
| 1 0 | PRPG / MISR | `z ^ {fb, q[W-1:1]}` |
| 1 1 | register | `z` |

In mode 10 the feedback bit `fb` is the XNOR of the stages picked by `TAPS`.
With `z = 0` the register is a pattern generator. With a response on `z` it
is a signature register.

Because the feedback is an XNOR, the all-zero state left by reset is a
normal state. The lock-up state is all ones. In the published schematic the
feedback comes from Q0 and the inverted Q1. That is what the 2- and 3-bit
masks do, so the 3-bit generator steps 000, 100, 110, 011, 101, 010, 001 and
repeats. Wider registers need more taps to reach the full period of
2^W - 1, so the 64-bit register uses x^64+x^63+x^61+x^60+1 (stages 0, 1, 3
and 4). The tap masks in `bist_pkg::lfsr_taps` were checked to be maximal
length for widths 2, 3, 4, 8, 16, 32 and 64.

## Circuits under test and their faults

Every circuit has one enable bit per fault. With `fault_en = 0` the module is
the fault-free circuit, and with one bit set it is that faulty circuit. So
one module gives both the good copy and every faulty copy. The fault counts
and stuck-at polarities are those of the published method. The fault *sites*
are this design's own: they sit where pseudo-random operands reach them.

| Circuit | Faults | Sites |
|---|---|---|
| full adder | 1 s-a-1, 1 s-a-0 | carry out s-a-1; half-sum `a^b` s-a-0 |
| ripple-carry adder | 2 s-a-1, 3 s-a-0 | carry into bit 1 s-a-1, sum[5] s-a-1; carry into bit 3, sum[0], carry out s-a-0 |
| magnitude comparator | 4 s-a-1, 3 s-a-0 | greater[31], less[30], equal[29], `eq` output s-a-1; greater[30], equal[31], `lt` output s-a-0 |
| ALU | 8 s-a-1, 2 s-a-0 | adder carries into bits 2 and 9, AND[4], OR[6], XOR[3], NOR[7], y[0], y[31] s-a-1; carry into bit 5, y[16] s-a-0 |

How a pattern drives each circuit (`cut_unit`):
- The 32-bit circuits take `a = pattern[63:32]` and `b = pattern[31:0]`.
- The ALU also takes its 3-bit opcode from `pattern[2:0]`, so these bits are
  shared with `b`.
- The full adder takes `{a, b, cin} = pattern[2:0]`.

The ALU's operations are ADD, SUB, AND, OR, XOR, NOR, shift left by one and
shift right by one. The published method names only a "32-bit ALU", so this
operation set is an assumption.

The ripple-carry adder's response includes its carry out, so it is 33 bits
wide.

## How the STAR-EDT engine chooses patterns

This is the core of the design. `star_edt` grades one pattern per clock while
`pat_valid` is high. Grading a pattern takes four steps:

1. **Fault simulation.** `fault_sim` applies the pattern to a fault-free copy
   of the circuit and to one faulty copy per fault. A fault is detected when
   its copy's response differs in any bit. If the pattern detects at least
   one fault, it is a *parent*.
2. **Cluster.** `phase_shifter` derives `NCHILD = 4` children. Child k is
   the pattern with bit `W-1-k` inverted. For the 3-bit generator the index
   wraps round (`W-1-(k mod W)`). The pattern plus its children is the *test
   cluster*.
3. **Cluster fault simulation.** The engine has five `fault_sim` instances
   that grade the whole cluster in the same cycle. The OR of their detection
   masks is the set of faults the cluster detects, and `cl_count` reports its
   size.
4. **Selection.** A parent is kept when its cluster detects a fault that is
   not yet covered. The parent goes into a store of `NF` entries, its
   cluster's faults are added to `covered`, and `n_kept` counts up.

When `covered` is all ones, `all_detected` rises and the engine ignores
further patterns. The kept parents are the compressed test set. A tester
needs only the parents, because the phase shifter regenerates the children
from them.

Notes on the selection:
- It is greedy: it takes patterns in the order the generator makes them.
  It finds a small set but does not promise the smallest possible one.
- A pattern that detects nothing is never kept, even when its children
  detect faults.
- The store cannot overflow: every kept parent adds at least one fault, so
  at most `NF` parents are kept.

Timing: the engine samples the pattern on a rising edge. The cluster report
for that pattern (`cl_valid`, `cl_parent`, `cl_count`, `cl_kept`) and the
updated `covered` and `n_kept` are valid after the same edge. `clear` (or a
low `rst_n`) empties the store and the coverage.

Cost: for a circuit with `NF` faults and 4 children, one engine holds
5 x (NF + 1) copies of the circuit. For the ALU that is 55 ALU copies. The
price buys grading a whole cluster every clock.

## Test sessions

`test_scheduler` runs three sessions in this order:

| Session | Circuits | Pattern source |
|---|---|---|
| 1 | ripple-carry adder and full adder, in parallel | register 1 and register 2 |
| 2 | magnitude comparator | register 1 |
| 3 | ALU | register 1 |

Each session has three phases:
1. **RESET**, one cycle: mode 00, and the session's engines are cleared.
2. **LOAD**, one cycle: mode 11 with the seed on `z`.
3. **RUN**: mode 10 with `z = 0`, so there is a new pattern every clock. The
   first pattern graded is the seed itself.

RUN ends as soon as all engines of the session report full coverage, or
after `MAX_PAT = 256` patterns. In session 1 the engine that finishes first
stops grading and waits for the other one.

Register 2 holds its value in sessions 2 and 3. The registers have no hold
mode, so holding is done by loading their own outputs back (mode 11 with
`z = q`).

After session 3 the scheduler sits in FIN with `done` high. Releasing
`start` takes it back to idle. While idle or finished, `scan_en` shifts the
67-bit chain `scan_in -> register 1 -> register 2 -> scan_out`, one bit per
clock, starting with register 2's Q0.

## Top-level interface (`bist_top`)

- Inputs: `clk`, `rst_n`, `start`, `seed1[63:0]`, `seed2[2:0]`, `scan_en`,
  `scan_in`.
- Status: `session` (1-3, 0 outside a session), `busy`, `done`,
  `session_patterns` (patterns in the current or last session).
- Per-circuit results, indexed 0 RCA, 1 full adder, 2 comparator, 3 ALU:
  - `covered_*`: the mask of faults detected
  - `all_detected`
  - `n_kept`: the number of compressed patterns
  - `n_graded`: the number of patterns graded
  - the last cluster's report: `cl_valid`, `cl_parent`, `cl_count`,
    `cl_kept`
- Stored parents are read back with `rd_idx` on `rd_pattern_rca`, `_fa`,
  `_cmp` and `_alu`.

Parameters: `MAX_PAT` (256) and `NCHILD` (4).

Result with seeds `4E55EAAAB9999600` and `010`, at default parameters: all
faults of all four circuits are detected in 52 clock cycles.

| Circuit | Faults | Patterns graded | Compressed patterns |
|---|---|---|---|
| full adder | 2 | 1 | 1 |
| ripple-carry adder | 5 | 8 | 3 |
| comparator | 7 | 3 | 2 |
| ALU | 10 | 31 | 6 |

The published results report 2, 1, 3 and 1 compressed patterns (for the
full adder, ripple-carry adder, comparator and ALU). These are not
comparable one to one, because the fault sites and the ALU's operations
differ.

## Where this design departs from, or goes beyond, the published method

- The **fault sites**, the **ALU operation set**, the **pattern-to-input
  mapping** and the **comparator output encoding** (gt, eq, lt) are this
  design's own.
- **Four children per parent, and children that invert one bit** are read
  from published waveforms: with an all-zero parent the children start
  1000..., 0100..., 0010..., 0001.... Some other waveform values do not
  clearly follow this rule, so treat the child rule as a best reading.
- **Fault simulation in hardware**, one cluster per clock, and the **greedy
  keep rule** are implementation choices. The method itself only asks for
  fault simulation and a minimum set of clusters.
- **Fault count of the ripple-carry adder.** The published text gives 5
  faults (2 s-a-1, 3 s-a-0) but its summary table says 3. This design uses
  5.
- **Session phases, pattern budget, seed loading, idle hold and scan-chain
  order** belong to this design. The published schedule gives only which
  circuits share a session, and a total test time of 2.213 ns. That time is
  a simulator time, not a cycle count, so it cannot be compared with this
  design.
- **Tap masks beyond Q0/Q1** for the 64-bit register are standard primitive
  polynomials, chosen here.
- **Not included:** the plain BILBO test that the method is compared
  against, in which a MISR signature of a faulty and of a fault-free copy
  are compared at the end of a run. The register's MISR mode is built and
  tested, but the top level does not use it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/bist_ref_pkg.sv`
holds reference models of the four circuits and their faults. These use
plain arithmetic and comparison operators. The adder faults are modelled by
splitting the sum at the faulty carry.

| Testbench | What it checks |
|---|---|
| `tb_bilbo_reg` | the exact 3-bit sequence and period; 8-bit reset, scan in/out, load; every non-lock-up state once per period; MISR against a software signature |
| `tb_full_adder_cut`, `tb_rca32_cut`, `tb_mag_comp32_cut`, `tb_alu32_cut` | fault-free results against operators; each fault against its model; one hand-worked vector per fault |
| `tb_fault_sim` | good responses and detection masks of all four circuits against the models |
| `tb_phase_shifter` | child rule at widths 64 and 3 |
| `tb_star_edt` | three engines compared every cycle with a software copy of the selection rule, including the one-cycle latency, gaps in `pat_valid`, and stored patterns read back; a hand-worked full-adder case |
| `tb_test_scheduler` | phase and mode sequence, session order, early session end, budget stop after exactly `MAX_PAT` patterns, scan, restart |
| `tb_bist_top` | the full design at default parameters; see below |

`tb_bist_top` recomputes every session independently and checks:
- the BILBO pattern streams;
- patterns graded, patterns kept, coverage and the stored patterns of each
  circuit;
- that each session grades only its own circuits;
- the final register states, by scanning them out.

A second run seeds register 1 with its lock-up state (all ones), so its
pattern never changes. The sessions that cannot reach full coverage must
then stop after exactly 256 patterns, and the results must again match the
reference.

It also requires every mechanism to occur at least once: all four BILBO
modes, all three sessions, parent and non-parent patterns, kept clusters,
rejected parents, a session ending on full coverage and a session ending
on the budget.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bist_pkg.sv tb/bist_ref_pkg.sv tb/tb_bist_top.sv \
    --top-module tb_bist_top -o sim
obj_dir/sim
```

Swap in any other testbench name the same way. `-Wno-fatal` lets the width-extension warnings that the testbenches' 64-bit `check` task causes go through.

## Changing the design

- **Another circuit under test:** add a module with a `fault_en` port, add
  an entry to `cut_e`, extend `cut_in_w`, `cut_out_w` and `cut_nfaults`, and
  add a branch to `cut_unit`. Responses up to 33 bits fit as they are;
  widen `RESP_W` for more.
- **More children per cluster:** change `NCHILD`. Each extra child adds one
  `fault_sim` instance per engine.
- **Longer runs:** raise `MAX_PAT`. The pattern counter is 16 bits wide.
