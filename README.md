# Test evaluation chip

This is RTL for a test vehicle used to compare test techniques on real silicon.
The usual problem with such experiments is that every test set needs its own
known-good response. That makes very long tests, such as an exhaustive test of
a 24-input circuit, impossible to check from a tester. This chip avoids the
problem by putting **four identical copies** of each circuit-under-test (CUT)
on the die. Every copy gets the same input vector, and the chip compares copies
2, 3 and 4 against copy 1. A manufacturing defect is very unlikely to hit all
four copies in the same way, so any disagreement counts as a failure.

Each test is then reduced to a few numbers per CUT type:

- how many vectors passed before the first failure;
- how many vectors failed.

Two separate checks produce these numbers:

- a **sampling** check: do the latched outputs of the copies agree?
- a **stability** check: did any output move during a window after sampling,
  when it should have been quiet? A move there points to a delay fault.

## CUTs

| # | name      | inputs | outputs | in this RTL |
|---|-----------|--------|---------|-------------|
| 0 | MULT6SQ   | 12 | 6  | `mult6sq`: 6x6 multiplier; the upper half of its product is squared by a second 6x6 multiplier; 6 MSBs out |
| 1 | RB_ROBUST | 24 | 12 | external ports |
| 2 | RB_SIMPLE | 24 | 12 | external ports |
| 3 | RB_STD    | 24 | 12 | external ports |
| 4 | MULT12O12 | 24 | 12 | `mult12o12`: 12x12 multiplier from four 6x6 partial products; 12 MSBs out |

The three RB circuits are slices of someone else's control logic, and their
logic function is not available. The top therefore brings out their gated
inputs, `rb_cut_in[k]`, and takes the outputs of their four copies,
`rb_cut_out[k][copy]`. A real circuit can be attached there, or a model as in
the end-to-end testbench. Everything around them is built:
- enables;
- clock and window generation;
- observers;
- counters.

The multipliers are plain AND-array / full-adder structures (`mult6x6`,
`full_adder`), so their gates look like what a test generator would see.

## Data source and the exhaustive tests

`data_source` is a single 24-bit register clocked by `CLK`. It feeds every CUT
type through `cut_enable_gate` (one enable per type, `CUTENT`). `SRCMODE`
selects how it is loaded:

| SRCMODE | mode          | behaviour |
|---------|---------------|-----------|
| 00 | direct        | load `DIN` every clock (tester-supplied test sets) |
| 01 | shifted pairs | load `{0, DIN[23:1]}`, then `DIN`. The tester holds `DIN` for two clocks. This gives a scan-like vector pair; the first vector of the pair is masked |
| 10 | pseudo-random | Fibonacci LFSR, x^24+x^7+x^2+x+1, period 2^24-1 |
| 11 | hold          | keep the vector |

The LFSR shifts stage i into stage i+1. MULT6SQ is wired to the even stages
only. Two consecutive states therefore present, on those 12 bits, every ordered
pair of 12-bit vectors. That is an exhaustive test of all transitions of the
12-input CUT, called the "N^2 exhaustive" test. The all-zero vector, which the
LFSR never produces, is applied in direct mode.

`SRCTSTO` is the OR of every gated CUT input. A walking-1 pattern on `DIN`,
with one `CUTENT` bit set at a time, checks the source and the enables.
`DOUT23` shows the MSB of the register.

### The mask pipeline

Each vector carries a mask bit. The bit is set when `MASKF` is low, and for the
first half of a shifted pair. The mask travels with the vector:
1. It is registered with the vector.
2. The output clock latches it next to the response.
3. At the counters it gates both error signals.

Masked vectors are still applied and compared, so `CPASSF` and `PPASSF` still
show them, but they are never counted. `RESET` clears the pair phase and the
mask asynchronously. The vector register itself is initialised by loading it.

## Clocking: three ways to time a test

`clock_gen` has one instance per CUT type. It makes the output (sampling)
clock and the checking window `CP`, which also appears on `PSWINOUT`:

| ATSPEEDT | DCENT | mode | sample clock | window `CP` |
|---|---|---|---|---|
| 1 | x | at speed   | `CLK` (one vector per cycle; each edge launches a new vector and samples the previous one) | 0 |
| 0 | 1 | pulse      | `~CLK`: launch on the rising edge, sample on the falling edge; the high time of `CLK` is the test time | `~CLK` |
| 0 | 0 | self-timed | `CLK` through the type's `delay_line` | open from the delayed edge until the next `CLK` rise |

With `PTEN` high, the window is forced from the `PTWIN` pin instead. This is
used to test the checkers themselves.

`delay_line` and `ring_oscillator` are **behavioural models** because they are
analog in nature:
- Their delays are parameters on the top: `MULT_DELAY_NS` for both
  multipliers (30 ns), `RB_ROBUST_DELAY_NS`, `RB_SIMPLE_DELAY_NS` (8.2 ns) and
  `RB_STD_DELAY_NS` (8.3 ns) for the RB types, and `RING_HALF_PERIOD_NS`.
- The oscillator runs when `SRSEL = 111111` and then appears on `DOUT23`, so
  the speed of a die can be measured.
- The mode multiplexers are plain gates. A silicon version would need
  glitch-free clock switching.

## Response observer: compare, check stability, scan

`response_observer` has one instance per type, with width 6 for MULT6SQ and
12 for the others. It works as follows:

1. A register latches the outputs of all four copies on the sample clock.
2. Copy 1 is XORed with copies 2-4, and the results are ORed together. This
   gives `CPASSF[t]`, and it is what makes very long tests checkable.
3. Every raw output, not the latched one, also drives a `stability_checker`.
   Each checker has two set-only latches: `Y1` remembers "was 1" and `Y2`
   remembers "was 0". `ERROR = Y1 & Y2` rises when an output moves both ways
   inside the window.
   - Outside the window the latches follow the data, which resets them.
   - The ERRORs are ORed to give `PPASSF[t]`.
4. The window ends at the same `CLK` edge where the counters count. A small
   flop therefore holds the stability error until that edge has read it.
5. With `EVSE` high, the 4×W sample bits become one scan chain:
   `EVSI[t]` → copy 1 bit 0 … copy 4 bit W-1 → `EVSO[t]`. The chain is used to
   load and read the comparators when testing the support logic.

The original chip also had test-mode multiplexers into the stability
checkers' data inputs. These are **not** built: no source for that data is
defined among the pins. The window multiplexer (`PTEN`/`PTWIN`) is built.

## Failure counters

`failure_counters` has one block per CUT type and counts on `CLK`. It holds
five LFSR counters, each starting from the all-zero state:

| counter | bits | counts |
|---|---|---|
| `first_samp` | 24 | vectors before the first sampling failure (stopped by latch `a`) |
| `first_stab` | 24 | vectors before the first stability failure (stopped by latch `c`) |
| `tot_samp`   | 16 | sampling failures |
| `tot_stab`   | 16 | stability failures |
| `tot_only`   | 16 | stability failures without a sampling failure |

LFSR counters are used because they are small; the tester maps each state back
to a count. The three totals freeze together when any of them reaches its last
state before wrapping, which is 65,534 counts. Freezing them together keeps
their ratios meaningful. `ANYFULLF` is low while any type's totals are frozen.

The counters are read, and reset, through a 100-bit scan chain per type
(`FCSE`, `FCSI[t]` → `FCSO[t]`). Bit 0 is next to `FCSI`:

    a, b, first_samp[0..23], tot_samp[0..15], c, d, first_stab[0..23],
    tot_stab[0..15], tot_only[0..15]

Scanning in zeros starts a new test. `b` and `d` are scan-only bits in this
RTL.

Note that a first-failure count reads "test length" if nothing failed. The
24-bit counter wraps after 2^24-1 clocks, so for a full 2^24 exhaustive run the
tester must tell "no failure" apart from a wrapped count. The total counters
saturate at 65,534 counts, so a badly broken die in a 2^24-vector run freezes
early. `ANYFULLF` tells the tester this happened.

## Signature register (MULT12O12 only)

`signature_register` takes the 48 latched outputs of the four MULT12O12
copies. Input 12·c+i is copy c, bit i.

- **Serial** (`SRSERF=0`): `SRSEL` picks one output bit. The bit feeds an LFSR
  of 12/16/24/48 stages, chosen by `SRMODE` 00/01/10/11.
- **Parallel** (`SRSERF=1`): the register forms 4×12, 3×16, 2×24 or 1×48 MISRs,
  chosen by `SRMODE` 00/01/10/11. In 4×12 mode each copy has its own MISR.
- **Scan** (`SRSEL=111xxx`): one 48-bit chain `SRSI` → `SRSO`, used to seed the
  register and to read final or intermediate signatures.

The feedback polynomials are this design's choice. They are primitive
polynomials for each length and are defined in `testchip_pkg`.

## Other pins

- `PAROUT`: a `nand_tree` over all 59 input pins, for parametric (input
  threshold) testing.
  - The chain begins with the inverted first pin, so raising the pins one at
    a time from `FCSE` upward toggles the output at every step.
  - The pin order is this design's choice.
- `CPOUT`: the clock reference, which is `CLK`.

## What is not here

- The logic of RB_ROBUST, RB_SIMPLE and RB_STD (see above).
- The vendor test-point array and its test access port, which the chip carried
  next to this logic. It is third-party logic and is not described in enough
  detail to build.
- The stability-checker data multiplexers (see above).
- Pads, real delay lines and a real ring oscillator. The RTL models the last
  two.

## Files

| file | contents |
|---|---|
| `rtl/testchip_pkg.sv` | modes, polynomials, LFSR counter steps, CUT numbering |
| `rtl/test_chip.sv` | top: the 5 CUT types × 4 copies and all support logic |
| `rtl/data_source.sv`, `cut_enable_gate.sv` | vector source and enables |
| `rtl/clock_gen.sv`, `delay_line.sv`, `ring_oscillator.sv` | clocking; the last two are models |
| `rtl/mult6x6.sv`, `full_adder.sv`, `mult6sq.sv`, `mult12o12.sv` | the buildable CUTs |
| `rtl/stability_checker.sv`, `response_observer.sv` | on-chip checking |
| `rtl/failure_counters.sv`, `signature_register.sv`, `nand_tree.sv` | result capture and pin test |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/test_chip_tb.sv` | end-to-end test of the top at its default parameters |
| `tb/test_chip_exh_tb.sv`, `tb/test_chip_sig_tb.sv` | the exhaustive and signature-analysis test sets on the top |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/testchip_pkg.sv \
        tb/test_chip_tb.sv --top-module test_chip_tb -Mdir obj_top
    ./obj_top/Vtest_chip_tb

To run another testbench, replace `test_chip_tb` with its name. Linting needs
`--timing` because of the two delay models.

`test_chip_tb` runs the full chip at its default parameters, for about 75,000
clocks and a few seconds of wall time. It attaches a model of the RB circuits
whose copies carry planted defects:
- a copy with one output bit inverted;
- a copy whose outputs arrive late;
- a copy that glitches late in the window.

It exercises, and counts, each mechanism:
- the source test;
- pseudo-random vectors at speed, with a 4×12 MISR signature checked against a
  model and read out by scan;
- the evaluator scan;
- pulse and self-timed counter runs, compared field by field with a model of
  the counters (first-failure counts, the three totals, masked vectors);
- shifted pairs;
- counter saturation with `ANYFULLF`;
- the ring oscillator;
- the NAND tree;
- reset;
- the window widths on `PSWINOUT`: the `CLK` high time in pulse mode and
  the delay-line delay in self-timed mode, which is how a die's delay lines
  are measured;
- the `PTEN`/`PTWIN` checker test: the window is held open while the inputs
  change, every moving CUT type must flag `PPASSF`, and closing the window
  clears the flags.

Two more full-chip benches run complete test sets at the default parameters:

| bench | run | vectors | time |
|---|---|---|---|
| `tb/test_chip_exh_tb.sv` | the whole pseudo-random/exhaustive test: all 2^24-1 LFSR states at speed, then the all-zero vector | 16.8M | about 1 minute |
| `tb/test_chip_sig_tb.sv` | the whole signature-analysis test on MULT12O12 | 12.8M | about 1 minute |

`test_chip_exh_tb` checks that no failure is flagged and that `DOUT23`
follows the LFSR. It then reads all five counter chains. The first-failure
counters show the wrap described above.

`test_chip_sig_tb` covers:
- each parallel MISR grouping for 64k vectors;
- each serial LFSR length on each of the 48 outputs for 64k vectors.

Every final and intermediate signature is checked against a clock-accurate
model. Intermediate signatures are read without disturbing the run: the
source is held and the register is rotated once through `SRSO` → `SRSI`.

The unit testbenches are exhaustive where the input space allows it:
- `mult6x6` and `mult6sq` over all 4096 inputs;
- MULT12O12 with 50,000 random operands plus corner cases;
- the data source over one full LFSR period, including a check that the
  even stages produce every ordered pair of 12-bit vectors (except 0,0)
  exactly once.
