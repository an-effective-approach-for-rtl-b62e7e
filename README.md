# MSIC built-in self-test

Scan-based built-in self-test spends much of its power on switching: pseudo-random
patterns toggle about half of the scan flip-flops on every shift and every new vector.
The multiple single input change (MSIC) generator keeps the randomness of an LFSR but
applies it slowly. One LFSR seed is spread over all scan chains, and a Johnson counter
supplies the part that changes from vector to vector. A Johnson codeword differs from the
next in one bit. So, while the seed is held, every scan chain sees exactly one changed bit
between consecutive test vectors.

This repository holds synthesizable SystemVerilog for:

- the MSIC generator;
- the BIST around it (test controller, input isolation, MISR response analyzer);
- two related single-input-change and weighted generators: a scalable SIC counter and an
  accumulator-based weighted pattern generator.

The circuit under test is not included. Its scan and primary I/O are ports of the top
module `msic_bist_top`.

## How an MSIC vector is formed

Take M scan chains of length L, an LFSR whose state is the seed S, and an L-bit Johnson
counter whose state is the codeword J (`J[0]` is its first stage). The XOR network
(`msic_xor_network`) forms an M x L matrix:

    x[i][k] = S[i] XOR J[k]        i = chain, k = shift clock

In shift clock k (`col = k`, k = 0..L-1), chain i is given `x[i][k]`. After L clocks,
chain i holds the whole codeword J, inverted if `S[i] = 1`. The chain is then captured,
and the Johnson counter takes one step:

    000..0 -> 100..0 -> 110..0 -> ... -> 111..1 -> 011..1 -> ... -> 000..1 -> 000..0
    (written J[0] first; period 2L)

Only one bit of J changes per step, and XOR with a fixed `S[i]` keeps it that way. So
vector n+1 differs from vector n in exactly one position of every chain. The LFSR steps to
a new seed after the Johnson counter has gone round once (2L vectors). At that point every
chain changes in many positions at once, but only once per 2L vectors.

The low P bits of the same seed drive the circuit's primary inputs. They stay constant
while the seed is held.

`msic_tpg` combines these parts: `msic_lfsr`, `johnson_counter`, `gray_converter` and
`msic_xor_network`. `scan_in` is the column selected by `col`. `tpc_vec` is the whole
matrix. `pi` is the seed's low bits.

### Reconfigurable Johnson counter

`johnson_counter` has two modes, chosen by `rj_mode`:

- `rj_mode = 1`: counting mode. The first stage takes the inverted last stage.
- `rj_mode = 0`: shift-register mode. The first stage takes the serial input `init`, so
  any start codeword can be loaded in L clocks.

The controller uses shift-register mode at the start of every run to clear the counter.

### Gray-coded codewords

With `code_sel = CODE_GRAY`, the codeword is passed through a Gray code converter before
the XOR network (`g[0] = J[0]`, `g[i] = J[i-1] XOR J[i]`). A Gray-coded Johnson word has
one or two ones, at the edges of the run of ones in J. Consecutive Gray-coded words differ
in two bits, not one, so the single-input-change property holds only in Johnson mode.
Gray mode is a run-wide option; it is not switched clock by clock.

## Test sequence and timing (`bist_controller`)

| state   | clocks             | what happens |
|---------|--------------------|--------------|
| IDLE    | until `bist_start` | inputs isolated to the system; the MISR is cleared on start |
| INIT    | L                  | Johnson counter in shift mode, shifting in zeros; LFSR reloaded with its first seed |
| SHIFT   | L                  | `cut_se = 1`, `col = 0..L-1`; MISR folds the scan outputs (not in the first window, whose contents are from before the test) |
| CAPTURE | 1                  | `cut_se = 0`; the circuit captures; MISR folds the primary outputs; Johnson counter steps; every 2L vectors the LFSR steps |
| UNLOAD  | L                  | after the last vector, the final responses are shifted out into the MISR |
| CHECK   | 1                  | signature compared with `golden_sig` |
| DONE    | until start falls  | `bist_done`, with `pass` or `fail` |

SHIFT and CAPTURE repeat NSEEDS x 2L times. A test-per-scan run takes
`L + NSEEDS*2L*(L+1) + L + 1` clocks from the clock that samples `bist_start` to
`bist_done`. At the defaults (L = 8, NSEEDS = 255) that is 36 737 clocks for
4 080 vectors.

**Test-per-clock** (`mode = MODE_PER_CLOCK`) replaces SHIFT/CAPTURE with one state. In it,
`cut_tpc_valid` is high and the whole M x L matrix is presented on `cut_tpc_vec`. The
Johnson counter steps every clock, and the MISR folds the primary outputs every clock. The
run takes `L + NSEEDS*2L + 1` clocks (4 089 at the defaults).

The MISR (`misr_ora`) is 16 bits wide with polynomial x^16 + x^12 + x^3 + x + 1. Its input
is the M scan outputs during shifting and the Q primary outputs at capture, zero-extended.
The expected signature has to be supplied from outside (`golden_sig`), for example from a
fault-free simulation.

## Scalable SIC counter (`scalable_sic_counter`)

For scan chains much longer than the number of bits that must change, an L-bit Johnson
counter is wasteful. This generator instead produces M-bit Johnson codewords serially,
from two small counters:

- A K-bit **adder** register holds the codeword number a (0..2M-1). It steps at every
  rising edge of scan enable.
- While SE is low, multiplexers load a K-bit **subtractor** from the adder side with
  `SHIFT_LEN-M+a` (for a <= M) or `SHIFT_LEN-M+(a-M)` (for a > M), together with a
  polarity bit that is set when a > M.
- While SE is high, the subtractor counts down, and
  `M_Johnson = polarity XOR (count != 0)` is shifted into an **M-bit shift register**.

After a window of SHIFT_LEN shift clocks, the shift register holds Johnson codeword a: the
same value an M-bit Johnson counter has after a steps. Consecutive vectors therefore again
differ in one bit.

The adder / subtractor / SE-multiplexer / shift-register structure is the published one.
The load values and the polarity bit are this implementation's way of making that
structure produce exact Johnson codewords. In the top, the counter shares `cut_se`, and its
register is brought out on `sic_codeword`.

## Accumulator-based weighted patterns (`accumulator_cell`, `weighted_pattern_gen`)

A full adder passes its carry straight through (Cout = Cin) whenever its two operand bits
differ. The weighted generator is built on that property. Each cell has:

- a full adder;
- an A flip-flop holding the sum, fed back to the adder;
- a B flip-flop.

Both flip-flops have active-high asynchronous set and reset:

| Set[i] | Reset[i] | A[i]        | B[i] | carry             | weight of A[i] |
|--------|----------|-------------|------|-------------------|----------------|
| 1      | 0        | 1           | 0    | Cout = Cin        | 1              |
| 0      | 1        | 0           | 1    | Cout = Cin        | 0              |
| 0      | 0        | A + B + Cin | kept | full adder        | 0.5            |

Forced cells are transparent to the carry. The free cells therefore keep working as one
shorter accumulator (A <= A + B + cin over the free bits).

A session counter and decoding logic drive Set and Reset:

- Each session starts with one forcing clock, which loads B with `B_INIT` (A gets its
  inverse).
- SESS_LEN pattern clocks follow, using the session's masks `ONE_MASK[s]` and
  `ZERO_MASK[s]`. `run` marks these pattern clocks.
- After NSESS sessions the counter wraps.

The defaults (4 sessions of 16 patterns, B = 0xB5, the masks) are examples to be replaced
by weights chosen for the circuit under test. In the top, the generator free-runs from
reset and drives `wpg_pattern`.

The cells use flip-flops with both asynchronous set and reset. Some synthesis front ends
reject that form, and a target library without such flip-flops needs an equivalent.

## Modules

| module | role |
|--------|------|
| `msic_pkg` | enums `test_mode_e`, `code_sel_e`, `bist_state_e` |
| `msic_bist_top` | top: controller, MSIC generator, isolation, MISR; scalable SIC counter and weighted generator beside them |
| `bist_controller` | sequencing above |
| `msic_tpg` | MSIC generator |
| `msic_lfsr` | W-bit Fibonacci LFSR, shifting right, taps on bits 0, 2, 3, 4 (period 255 for W = 8), with reload |
| `johnson_counter` | reconfigurable Johnson counter |
| `gray_converter` | Johnson to Gray code |
| `msic_xor_network` | seed x codeword matrix |
| `input_isolation` | system inputs / generator multiplexer |
| `misr_ora` | MISR, compare, pass/fail |
| `scalable_sic_counter` | counter-based SIC generator |
| `accumulator_cell`, `weighted_pattern_gen` | weighted pattern generator |

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| M | 8 | scan chains |
| L | 8 | scan chain length, also the Johnson counter length |
| W | 8 | LFSR width (M, P <= W) |
| P | 8 | primary inputs |
| Q | 8 | primary outputs |
| R | 16 | MISR width |
| NSEEDS | 255 | seeds per run |
| SIC_M | 8 | scalable SIC register width |
| WPG_N | 8 | weighted generator width |

Everything runs on one clock with an asynchronous active-low reset `rst_n`. The published
scheme draws a separate test clock for the Johnson and SIC counters; here those are clock
enables.

## What is the published scheme and what is chosen here

These parts follow the published scheme:

- the seed-XOR-Johnson construction and the loading of one codeword per chain;
- the reconfigurable Johnson counter with Init and RJ-Mode;
- the Gray code converter;
- the blocks of the scalable SIC counter;
- the accumulator cell (full adder, flip-flops with asynchronous set/reset, carry
  transparency when A differs from B) and the register B / adder / register A / session
  counter / logic arrangement;
- the BIST block set.

These are choices made here:

- all widths and counts;
- the LFSR polynomial;
- seed and Johnson step rates (one Johnson step per vector, one seed per 2L vectors);
- Gray code as a whole-run option;
- the controller's states and timing;
- the MISR polynomial and the external golden signature;
- how the scalable SIC counter's counts map to codewords;
- the weighted generator's session tables and its forcing clock;
- how the Init/RJ-Mode inputs are combined at the Johnson counter's first stage.

The published description also shows an 8-bit generator output trace. Its values are not
reproduced: the same value appears there with two different successors, so it is not the
state sequence of an 8-bit register.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_msic_tpg \
        -y rtl -y tb +libext+.sv rtl/msic_pkg.sv tb/tb_msic_tpg.sv
    ./obj_dir/Vtb_msic_tpg

    verilator --binary --timing --assert -Wno-fatal --top-module tb_msic_bist_top \
        -y rtl -y tb +libext+.sv rtl/msic_pkg.sv tb/cut_fn_pkg.sv tb/tb_msic_bist_top.sv
    ./obj_dir/Vtb_msic_bist_top

`tb/tb_msic_bist_top.sv` is the end-to-end test at the default sizes. It also needs
`tb/cut_fn_pkg.sv` on the command line, ahead of the testbench. It connects a behavioural
scan circuit (`tb/scan_cut_model.sv`: 8 chains of 8 flip-flops with fixed mixing logic)
and runs four complete tests:

- test-per-scan with Johnson codewords;
- test-per-scan with Gray codewords;
- test-per-clock;
- test-per-scan with a stuck-at fault in the circuit, which must fail.

For each run it computes the expected signature with its own model of the whole test, and
it checks the verdict and the clock count. Monitors in the testbench check:

- the one-bit-per-chain change between consecutive vectors;
- the scalable SIC codewords;
- input isolation;
- the weighted bits.

It runs in well under a second.

`tb/tb_msic_switching.sv` measures what the scheme is for. At the default sizes, over 64
seeds x 16 vectors, it counts bit changes entering the chains and flip-flops that differ
between consecutive vectors. It compares MSIC patterns with pseudo-random scan patterns
from a 16-bit LFSR:

| source        | shift transitions | vector transitions |
|---------------|-------------------|--------------------|
| MSIC          | 7 168             | 7 680 (one per chain per vector) |
| pseudo-random | 28 732            | 31 143             |
