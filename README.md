# Circular BIST with state skipping

In circular built-in self-test every flip-flop of a circuit is replaced by a
BIST cell, and the cells are joined into one ring. During the test each cell
loads the XOR of its normal next-state value and the output of the cell before
it. The ring therefore does two jobs at once: it compacts the circuit's
response into its state, and that state is the next test pattern. One pattern
is applied per clock, in a single test session, at little more hardware than a
scan chain.

The weak point is the pattern sequence. During the test the circuit is an
autonomous state machine: every state has exactly one successor. The sequence
from the seed can fall into a short loop (a *limit cycle*) and keep repeating
the same few patterns. It can also miss, for structural reasons, every state
that detects some fault.

*State skipping* repairs the sequence with a little extra logic on the ring's
interconnect. An AND gate recognises one particular state *p*. When it fires,
XOR gates in front of some flip-flops complement bits of the next state. The
ring then lands in a chosen state instead of its normal successor *s*. The
extra gates sit between one cell's output and the next cell's chain input,
never on the functional Z-to-D path, so system timing is unchanged.

This repository holds synthesizable SystemVerilog for:
- the BIST cell;
- the ring with generic, parameter-driven state-skipping logic;
- the test controller;
- a separate signature register for observation points.

It also holds self-checking testbenches for each of them.

## Block structure

```
                      cbist_ss_top
 start, rst_n ──► bist_controller ──T1,T2 / mode──┬──────────────┐
                                                  ▼              ▼
 z[N] (circuit next state) ──► circular_chain ──► q[N]     obs_misr ◄── obs[]
                               ├ cbist_cell × N   (to circuit)  │
                               └ skip_decoder                   ▼
                                         scan_out = Q_N      misr_sig
```

The functional circuit is not part of this RTL. Its combinational next-state
logic connects to the top through `z` (in) and `q` (out). Nodes chosen as
observation points come in on `obs`. In system operation the chain simply acts
as the circuit's state register.

| file | what it is |
|---|---|
| `rtl/cbist_pkg.sv` | `bist_mode_e`: the four {T1,T2} modes |
| `rtl/cbist_cell.sv` | one BIST cell with a state-skipping input |
| `rtl/skip_decoder.sv` | the state-skipping decode logic (ANDs and per-bit XOR terms) |
| `rtl/circular_chain.sv` | N cells in a ring plus the decoder |
| `rtl/bist_controller.sv` | the Reset → BIST → Shift test sequence |
| `rtl/obs_misr.sv` | MISR that compacts observation points |
| `rtl/cbist_ss_top.sv` | everything wired together |

## The BIST cell and its modes

Each cell is a D flip-flop with this input:

```
D = (Z & T1) ^ ((Q_prev ^ (skip & T1)) & T2)
```

| T1 T2 | mode | D |
|---|---|---|
| 0 0 | Reset | 0 |
| 0 1 | Shift | Q_prev |
| 1 0 | Normal | Z |
| 1 1 | BIST | Z ^ Q_prev ^ skip |

- `Q_prev` is the previous cell's output. Cell 1 takes Q_N.
- `skip` is this cell's output from the state-skipping decoder.
- `skip` is gated by T1, so it acts only in BIST mode. A shift through the
  ring is never disturbed.
- The cell has no reset pin. The initial state is set by one cycle of Reset
  mode, so the seed is all zeros.

## State skipping

### How a skip is specified

`skip_decoder` holds K skips. Each skip is three N-bit masks, where bit i
stands for flip-flop Q_{i+1}:

| mask | meaning |
|---|---|
| `CARE[k]` | the flip-flops that appear as literals in the decoding cube *d* |
| `VALUE[k]` | the value each of those flip-flops must have (0 means an inverted literal) |
| `FLIP[k]` | the flip-flops whose next value is complemented when skip k fires |

How it computes:
- Skip k fires when `((state ^ VALUE[k]) & CARE[k]) == 0`. In hardware this
  is one AND gate over the cared bits.
- Each cell's skip input is the XOR of `FLIP[k][i]` over all firing skips.
  In hardware that is one XOR gate per (skip, flipped bit) pair.
- `skip_hit[k]` reports each firing. The testbenches use it to count skips.

### How the masks are chosen

The masks come from a design-time procedure. It is not part of the RTL, but
you need it to fill in the parameters for a real circuit:

1. Fault-simulate the ring's state sequence from the seed until the last *m*
   states have detected no new fault.
2. Among those *m* states and the ATPG test cubes of the faults still
   undetected, pick the state *s* and cube *c* with the smallest Hamming
   distance. Let *p* be the state just before *s*.
3. `FLIP` = the bits where *s* differs from *c*. Bits where *c* is "don't
   care" are not flipped.
4. The cube *d* must match *p* and no earlier state, so the sequence up to *p*
   stays unchanged. This keeps every fault already detected and needs no
   re-simulation. Build a conflict matrix:
   - one row per earlier state;
   - a 1 in each column where that state differs from *p*.

   A minimum set of columns that covers every row gives the literals of *d*,
   at *p*'s values. That sets `CARE` and `VALUE`.
5. Repeat until coverage is sufficient. Each round adds one skip (K + 1).

A smaller *m* gives more skip logic and a shorter test. A larger *m* gives the
opposite.

Because *d* has as few literals as possible, a fault in the skip logic is
caught by the test itself:
- If an AND input is stuck so that its literal drops out, the cube also
  matches some earlier state.
- If the AND output is stuck at 0, the skip never happens.

Either way the state sequence changes, and so does the signature.

### The default configuration: a 4-bit worked example

The parameter defaults describe this example. States are written Q1 Q2 Q3 Q4.
Normal sequence from the all-zero seed:

```
0000 1011 1100 0111 1010 1101 | 0101 0110 1001 ...
                          p=1101, s=0101
```

The target cube is c = 001X. *s* differs from *c* in Q2 and Q3, so
`FLIP = 4'b0110`. Conflict matrix of the five states before *p*, against
*p* = 1101:

```
0000 → 1101     1011 → 0110     1100 → 0001     0111 → 1010     1010 → 0111
```

Columns 3 and 4 cover all five rows. That gives d = XX01, meaning Q3 = 0 and
Q4 = 1, so `CARE = 4'b1100` and `VALUE = 4'b1000`. The hardware is one AND of
~Q3 and Q4, driving XOR gates in front of flip-flops 2 and 3. With it, the
ring goes 1101 → 0011 instead of 1101 → 0101.

In the example's own circuit the plain ring ends in a two-state limit cycle
(0110 ↔ 1001). With the skip it runs through a 12-state cycle instead. The
testbenches check both sequences.

Note that a cube also fires on *later* states that happen to match it. That
is real hardware behaviour: the testbench reference models include it.

## Test session and signature

`bist_controller` drives one test session:
- In IDLE, mode is Normal.
- A `start` pulse gives 1 Reset cycle, then `TEST_LEN` BIST cycles, then N
  Shift cycles.
- After that, `done` rises and mode returns to Normal.

How to read the results:
- **Chain signature.** This is the ring state at the end of BIST. During the
  N Shift cycles the ring rotates once. `scan_out` (= Q_N) presents the
  signature serially, Q_N first and Q_1 last. After the rotation the
  signature is back in place in `q` for one cycle. Then Normal mode loads the
  functional `z` again.
- **Observation-point signature.** Observation points go into `obs_misr`,
  never into the ring. That way they do not change the state sequence the
  skips were designed against. The MISR is an internal-XOR LFSR:
  - width `MISR_W`;
  - feedback polynomial `MISR_POLY`, with bit j the coefficient of x^j;
  - observation point j enters bit j.

  Reset mode clears it, BIST mode compacts, and the other modes hold. Read it
  on `misr_sig` after the test.

Timing:
- Everything is single-clock and rising-edge.
- `rst_n` is synchronous and active-low. It resets only the controller's
  state, not the chain or the MISR.
- `mode`, `busy`, `unloading` and `skip_hit` decode combinationally from
  registers.
- A whole session takes 1 + TEST_LEN + N cycles.

## Parameters of `cbist_ss_top`

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | chain length (number of flip-flops in the circuit) |
| `K` | 1 | number of state skips |
| `CARE`, `VALUE`, `FLIP` | `{4'b1100}`, `{4'b1000}`, `{4'b0110}` | skip masks, `logic [K-1:0][N-1:0]`, element k is skip k |
| `TEST_LEN` | 50000 | BIST cycles per session |
| `NUM_OBS` | 1 | observation points, 1 … `MISR_W` |
| `MISR_W`, `MISR_POLY` | 16, `16'h1021` | MISR width and polynomial (x^16 + x^12 + x^5 + 1) |

When you change `N` you must also give masks of the new width. The defaults
are 4-bit literals.

The same RTL was run at the chain sizes of the usual ISCAS'89 sequential
benchmarks: 17 to 700 flip-flops, with 1 to 6 observation points and 50 000
patterns. It needs nothing beyond setting these parameters. For a real
benchmark you would also need its netlist, attached to `z`/`q`/`obs`, and the
skip masks from the procedure above.

## What is the method's and what is this implementation's choice

These parts follow the method directly:
- the cell's gate structure and mode encoding;
- the ring connection;
- skips as AND-decoded cubes that drive XORs on the chain side;
- the 4-bit example's cube and flip bits;
- a separate MISR for observation points;
- 50 000 patterns as the test length.

These are choices made here, where the method says nothing:
- the controller's sequence and its start/done handshake;
- the all-zero seed, loaded through Reset mode;
- unloading the signature by rotating the ring;
- combining overlapping skips by XOR;
- the MISR's width, polynomial, structure and behaviour in each mode;
- the synchronous controller reset.

There is no on-chip comparison with a known-good signature: the signature is
output for a tester to check. How the circuit's primary inputs are held
during the test is left to the wrapper around the circuit.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle
watchdog. Run any of them with plain Verilator from the repository root, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cbist_pkg.sv tb/tb_cbist_ss_top.sv --top-module tb_cbist_ss_top
./obj_dir/Vtb_cbist_ss_top
```

| testbench | what it checks |
|---|---|
| `tb_cbist_cell` | all 32 input combinations of the cell, from both old Q values, against the mode table |
| `tb_skip_decoder` | all 16 states on three configurations: the default cube, a single AND of Q3·Q4 flipping Q2, and two overlapping skips that combine by XOR |
| `tb_circular_chain` | the 4-bit example with and without the skip, state by state; the single-AND skip taking 1011 to 1100 instead of 1000; Normal load, Shift rotation, Shift ignoring the skip, Reset |
| `tb_bist_controller` | the mode on every cycle of two sessions (1 Reset, `TEST_LEN` BIST, N Shift), start ignored while busy, done |
| `tb_obs_misr` | 16-bit and 8-bit/3-input MISRs against a bit-level model under random inputs, hold and clear |
| `tb_cbist_ss_top` | the top at its defaults, end to end (see below) |
| `tb_workloads` | one 50 000-pattern session at each benchmark chain size, against a reference model (see below) |

`tb_cbist_ss_top` runs the top with every parameter at its default:
- It runs Normal operation, then two full 50 000-pattern sessions.
- The example circuit is modelled by `example_cut_model`.
- The ring state and the MISR are compared with a reference model on every
  cycle.
- The serial unload and the repeatability of the session are checked.
- It counts that each mechanism occurred: Reset seeding, BIST, state skips,
  escape from the limit cycle, Shift unload, Normal operation and MISR
  compaction.

`tb_workloads` runs one 50 000-pattern session at each of the chain sizes 17,
18, 24, 25, 32, 34, 54, 91, 199, 247 and 700, with the matching number of
observation points:
- The circuit is a synthetic nonlinear stand-in, `synth_cut_model`.
- Two skips per size are designed at elaboration by constant functions in
  `workload_run`, using the procedure above:
  - simulate the ring from the seed;
  - take p at BIST cycle 40, and later at cycle 90;
  - make the target cube s with two bits complemented;
  - choose cube d by a greedy column cover of the conflict matrix.

  The cubes come out with 2 to 5 literals, even for the 700-bit chain.
- Each size is compared cycle by cycle with a reference.
- It checks that the ring equals a skip-free reference up to p.
- It checks that each skip fires for the first time exactly at its p.

`tb_workloads` spends about a minute and a half in Verilator's elaboration,
while it designs the skips. Every testbench then simulates in a few seconds.

To use the design on your own circuit:
1. Set `N`.
2. Attach the next-state logic to `z` and `q`.
3. Run the skip-insertion procedure with your fault simulator and ATPG.
4. Pass the resulting masks as `CARE`/`VALUE`/`FLIP`, with element k of each
   array belonging to skip k.
