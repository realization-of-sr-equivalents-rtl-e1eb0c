# SR-equivalent generalized shift registers for secure scan paths

A scan chain turns every flip-flop of a chip into one long shift register. That
makes testing easy, and it also lets anyone with the test pins read out or load
secret state, such as a cipher key. One defence keeps the scan chain's
behaviour at the pins exactly that of a shift register: a bit shifted in at `x`
comes out at `z` exactly k clocks later. Inside, though, the chain is built
from a different circuit, so its flip-flops hold values that an outsider
cannot control or interpret without knowing the structure. This RTL implements
that idea with *generalized shift registers* (GSRs). It provides:

* generic k-stage GSRs of two kinds, feed-forward (GF²SR) and feedback (GFSR),
  whose extra logic is given as truth tables;
* an elaboration-time synthesis step that turns any GSR into an
  *SR-equivalent* one, meaning z(t+k) = x(t) for every t;
* the seven 3-stage example circuits R1…R7 written out gate by gate;
* a top level that places all of them side by side as serial lanes.

The construction follows H. Fujiwara and K. Fujiwara, "Realization of
SR-Equivalents Using Generalized Shift Registers for Secure Scan Design",
IEICE Trans. Inf. & Syst., E99-D(8), 2016. Where this RTL makes its own choices,
they are listed in [Design choices](#design-choices-not-taken-from-the-method).

## The three kinds of serial path

All circuits have one serial input `x`, one serial output `z` and k flip-flops
`y1…yk` (`y[0]…y[K-1]` in the RTL). The flip-flops shift once per rising clock
edge.

**Shift register.** y1 ⇐ x, y(i+1) ⇐ yi, z = yk. Its state is the last k
inputs, which is exactly the information a scan attack uses.

**SR-equivalent circuit.** Any circuit with z(t+k) = x(t) for all t. The
example R1 is

    y1 ⇐ x     y2 ⇐ y1     y3 ⇐ y1 ⊕ y2     z = y2 ⊕ y3

Its output is x delayed by 3 clocks, but y3 holds x(t) ⊕ x(t+1) instead of a
plain input bit.

**GF²SR (generalized feed-forward shift register).** Each link of the chain
XORs in an arbitrary function of the signals *upstream* of it:

    y1     ⇐ x  ⊕ f0
    y(i+1) ⇐ yi ⊕ fi(x, y1 … y(i-1))
    z       = yk ⊕ fk(x, y1 … y(k-1))

Because information only moves forward, the output is the delayed input
scrambled by the inputs that followed it:

    z(t+k) = x(t) ⊕ f(x(t+1), …, x(t+k))

**GFSR (generalized feedback shift register).** Each link XORs in a function of
the stages *downstream* of it:

    y1     ⇐ x  ⊕ f0(y1 … yk)
    y(i+1) ⇐ yi ⊕ fi(y(i+1) … yk)
    z       = yk ⊕ fk                  (fk is a constant)

Here the delayed input is scrambled by the state at the moment it entered:

    z(t+k) = x(t) ⊕ f(y1(t), …, yk(t))

A GSR of either kind has k+1 functions with 0, 1, …, k inputs, so it is fully
described by 1 + 2 + … + 2^k = 2^(k+1) − 1 truth-table bits.

## Making a GSR SR-equivalent

This is the central step of the design. A GF²SR or GFSR scrambles what passes
through it, so a tester cannot use it as a plain shift register. The fix adds
the scrambling term a second time, so that the two copies cancel.

### Feed-forward: add g to the output (`sreq_gf2sr`)

The error term f(x(t+1) … x(t+k)) is a function of *later* inputs. At time t+k
those inputs are no longer visible as inputs. They are, however, encoded in
the current state: y1(t+k) is x(t+k−1) ⊕ f0, y2(t+k) is x(t+k−2) ⊕ (a function
of x(t+k−1)), and so on. The map from the last k inputs to the state is
triangular and therefore one-to-one. So f can be rewritten as a function
g(x, y1 … yk) of the *current* input and state, and XORing g into the output
cancels the error:

    z' = z ⊕ g(x, y)   ⇒   z'(t+k) = x(t)

g never depends on yk. So `fk ⊕ g` is still a legal output function, and the
result is again a GF²SR. Only the output function changes; the state sequence
is untouched.

Worked example, R3 → R6:

| circuit | next state | output |
|---|---|---|
| R3 | y1 ⇐ x, y2 ⇐ ¬y1, y3 ⇐ y2 ⊕ x·y1 | z = ¬y3 |

Simulating R3 symbolically for three clocks gives z(t+3) = x(t) ⊕ x(t+2)·x(t+1).
At t+3 the state holds y1 = x(t+2) and y2 = ¬x(t+1), so the error term is
y1·¬y2. R6 is R3 with z = ¬y3 ⊕ y1·¬y2, which makes z(t+3) = x(t).

### Feedback: add f to the input (`sreq_gfsr`)

In a GFSR the error f(y(t)) depends on the state when x(t) enters. The same
term is XORed into the input, so that the first stage loads x ⊕ f0(y) ⊕ f(y).
The circuit then delivers (x(t) ⊕ f(y(t))) ⊕ f(y(t)) = x(t). The new input
function f0 ⊕ f is still a function of y1…yk, so the result is again a GFSR.
Here the state sequence changes too.

Worked example, R5 → R7: R5 is y1 ⇐ ¬x, y2 ⇐ y1 ⊕ y2·¬y3, y3 ⇐ y2, z = ¬y3,
with z(t+3) = x(t) ⊕ y1(t)·¬y2(t). R7 feeds x ⊕ y1·¬y2 into R5's input.

### Special case: a single extra function

If a GF²SR's only extra logic is its output function, then g equals that
function, and the synthesized circuit is a plain shift register. The same
holds for a GFSR whose only extra logic is its input function. The
testbenches check both cases.

### How many SR-equivalent GSRs exist

An attacker who guesses the structure wins, so security is measured by the
size of the class of possible structures. There are 2^(2^(k+1)−1) − 1
non-trivial k-stage GSRs of each kind. The SR-equivalent ones are in one-to-one
correspondence with the (k−1)-stage GSRs: append a stage, then compensate. So
there are 2^(2^k−1) − 1 of them. For k = 2 this means 8 of the 128 tables give
an SR-equivalent circuit (7, plus the plain shift register).
`tb/gsr_class_tb.sv` confirms this by simulating all 128 tables of each kind.
It also checks the correspondence itself for GF²SRs. Appending a stage to a
(k−1)-stage GF²SR leaves its table vector unchanged apart from zero-extension:
the old output function now feeds the new last stage, and the new output
function is 0. Synthesizing the 8 one-stage GF²SRs this way gives 8 distinct
tables, and they are exactly the 8 SR-equivalent ones found by simulation.
At k = 3 the same testbench counts on the clock-by-clock model instead of on
circuit instances. It finds 128 = 2^(2^3−1) distinct SR-equivalent tables of
each kind: those made from the 128 two-stage GF²SRs, and the synthesized
images of all 32768 three-stage GFSRs.

## Truth-table encoding

The generic modules take `K` and a vector `F` of 2^(K+1)−1 bits holding the
tables of f0…fK. Bit 0 of a table's address is the lowest-numbered input.

| kind | f_i reads | table of f_i starts at bit | address |
|---|---|---|---|
| GF²SR | x, y1 … y(i−1) | 2^i − 1 | {y(i−1) … y1, x} |
| GFSR | y(i+1) … yK | 2^(K+1) − 2^(K−i+1) | {yK … y(i+1)} |

`F = 0` is a plain shift register. `gsr_pkg` holds the tables of R1…R7
(`R1_TABLE` … `R7_TABLE`), for example `R3_TABLE = 15'b111111111000110`.

The compensation is computed by constant functions in `gsr_pkg`.
`gf2sr_sreq_table` runs the GF²SR through all 2^(K+1) input windows of
length K+1. `gfsr_sreq_table` runs the GFSR from all 2^K states. This is the
bit-level form of symbolic simulation. It costs about 2^(K+1)·K² steps at
elaboration, and `gsr_pkg::MAX_K = 8` bounds it. The plain `gf2sr`/`gfsr`
modules have no such limit.

## Modules

```
secure_scan_gsr_top          11 independent lanes, state kept internal
├─ sr_equiv_r1               R1, SR-equivalent
├─ gf2sr_r2, gf2sr_r3        GF²SR examples R2, R3
├─ gfsr_r4, gfsr_r5          GFSR examples R4, R5
├─ sreq_gf2sr_r6 ─ gf2sr_r3  R6 = R3 + output term y1·¬y2
├─ sreq_gfsr_r7  ─ gfsr_r5   R7 = R5 + input term y1·¬y2
├─ gf2sr                     generic GF²SR (default table R3)
├─ gfsr                      generic GFSR (default table R5)
├─ sreq_gf2sr ─ gf2sr        generic synthesis (default source R3, gives R6)
└─ sreq_gfsr  ─ gfsr         generic synthesis (default source R5, gives R7)
gsr_pkg                      tables, constant functions, lane enum
```

Every circuit module has the ports `clk`, `rst_n` (asynchronous, active low),
`x`, `z` and `y[K-1:0]`. `z` is combinational from the state (and, for a GF²SR
whose fK reads x, from x). The latency from x to z is K clocks.

`secure_scan_gsr_top` has the ports `clk`, `rst_n`, `scan_in[10:0]` and
`scan_out[10:0]`. The lane numbers are `gsr_pkg::lane_e`: R1…R7 on lanes 0…6,
then the generic GF²SR, GFSR and the two syntheses on lanes 7…10. No state
leaves the top. At the pins, the SR-equivalent lanes cannot be told apart from
3-stage shift registers.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches compare against values
derived independently of the RTL:

* **R1…R7** (`*_r?_tb`): the closed forms of the symbolic-simulation tables.
  For example, R5's y2(t+3) = ¬x(t+1) ⊕ ¬x(t)·¬y1(t) ⊕ ¬x(t)·y2(t)·¬y3(t).
* **`gf2sr_tb`, `gfsr_tb`**: K = 1…5 with random tables, checked against a
  loop-based reference model (`tb/gsr_model_monitor.sv`). They also check that
  an SR-equivalent table gives z(t) = x(t−3), and that the default table does
  not.
* **`sreq_gf2sr_tb`, `sreq_gfsr_tb`**: random source tables for K = 1, 2, 3,
  4, 5 and 8, each checked for z(t) = x(t−K). They also check that the K = 3
  default matches the hand-built R6/R7 bit for bit, and that single-function
  sources collapse to a shift register.
* **`secure_scan_gsr_top_tb`**: the whole top at its only configuration, with
  a reset in mid-stream. It counts each mechanism (SR-equivalent delivery,
  GSR deviation, the R6 and R7 compensation terms being active, reset) and
  fails if any of them never occurred.
* **`gsr_class_tb`**: the class-size counts described above, exhaustive on
  circuit instances at k = 2 and on the model at k = 3.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gsr_pkg.sv \
    tb/secure_scan_gsr_top_tb.sv --top-module secure_scan_gsr_top_tb
./obj_dir/Vsecure_scan_gsr_top_tb
```

Every testbench finishes in well under a second of simulation. The
class-size testbench takes about 10 s to compile.

## Design choices not taken from the method

* **Reset and clocking.** The method specifies only "k clock cycles". Here all
  flip-flops shift on the rising edge with no shift enable. An asynchronous
  active-low reset clears them. After reset each output is its fk evaluated
  on an all-zero state, for example 1 for R3 and R5.
* **State ports.** The circuit modules bring out `y` so that a testbench, or
  the functional logic of a real scan design, can reach the flip-flops. The
  top keeps them internal.
* **R2 and R4.** Only drawings exist for these two examples. They are taken to
  use the same AND/XOR gates as R3 and R5 (which have the same drawing plus
  inverters, and full equations), without the inverters. This gives
  z(t+3) = x(t) ⊕ x(t+2)x(t+1) for R2, and
  z(t+3) = x(t) ⊕ y1y2 ⊕ y2y3 (at t) for R4.
* **Truth-table encoding and MAX_K.** Both are this implementation's own. The
  method treats the functions as arbitrary and finds the compensation by hand.
* **Lanes side by side.** The top only collects the circuits. It is not a chip
  scan architecture: no scan cells, no mode multiplexers and no functional
  logic are modelled, because the method does not describe them.
* **Class-size results.** These are checked on circuit instances only at
  k = 2. At k = 3 each kind already has 32768 tables, so that count is made on
  the model in `gsr_pkg`.

## Trust and limits

All circuit equations of R1, R3, R5, R6 and R7 follow the published symbolic
simulation tables and pass checks derived from them. The generic modules agree
with the hand-built ones and with an independent reference model for K up to
5, and the synthesis was exercised up to K = 8. Faults injected into each
module (a dropped XOR term, a swapped gate input, a missing inverter, a
skipped compensation) are caught by its testbench. The truth-table lookups
synthesize to small ROMs or multiplexers. The only size parameter is K, 3 in
every published example and the default here.
