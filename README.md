# Serial pseudorandom-to-binary code converter with a set/reset load path

A pseudorandom absolute position encoder reads its position from a single
code track. The track carries a maximal-length pseudorandom binary sequence
(an m-sequence) of period 2^n − 1, and any n consecutive bits of it form a
word that occurs only once on the disk. One reading head sees the n-bit word
of the sector under it. That word is not a usable number, so a converter
turns it into the sector number p, in natural binary.

The serial "Fibonacci" converter does this with a shift register. The word is
loaded into an LFSR that generates the *inverse* of the disk's sequence, so
each clock steps the register back along the disk by one sector. A counter
counts the clock edges until the register holds the word of the zero sector
(the *reference word*). The count is then the position p.

This RTL implements the improved form of that converter. In the usual form,
every flip-flop has a 2-to-1 AND-OR selector on its D input. The selector
chooses between the shifted bit and the bit of the next word to load. Here the
selector is gone. The shifted bit drives D directly, and the next word is
written through the flip-flops' asynchronous set and reset pins. The clocked
path is then clock-to-Q, the feedback XOR gates, and setup. Two gate levels
come out of every clock period.

## Files

| file | what it is |
|---|---|
| `rtl/fib_conv_pkg.sv` | default resolutions, polynomials and reference words |
| `rtl/sr_dff.sv` | D flip-flop with active-low asynchronous set and reset (one FF_i) |
| `rtl/inv_mseq_generator.sv` | the N-stage inverse-sequence LFSR with the set/reset load gating |
| `rtl/gamma_logic.sv` | reference-word detector (NAND1), all-zero detector (NAND0), `gamma` |
| `rtl/pulse_counter.sv` | clock-pulse counter, cleared by `gamma` |
| `rtl/output_register.sv` | result register P1..PN |
| `rtl/fib_pr_converter.sv` | top level: the complete converter |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fib_pr_converter_n6` |

## Conventions

**Bit order.** A word Y1 Y2 … Yn is stored in a vector `[N-1:0]` with Y1 in
the MSB. Flip-flop FF_i therefore holds bit `N-i`, and words print in the
order they are read from the disk.

**Polynomial.** The generator polynomial
P_n(X) = X^n + c_{n−1}X^{n−1} + … + c_1X + 1 is the parameter `COEFF`, with
bit j holding c_j. Bit 0 is the constant term and is always 1. Each c_j = 1
adds one XOR gate to the feedback loop. The number k of such gates sets the
length of the critical path.

**Position.** Sector p is the sector whose word takes exactly p clock steps to
reach the reference word. Sector 0 carries the reference word itself.

## The shift register and its feedback

On each clock edge FF_i takes the value of FF_{i+1}, and FF_N takes the
feedback bit

    f = Q1 xor ( xor of Q_{j+1} over all j with c_j = 1 )

The default configuration is n = 8 with P8 = X^8 + X^6 + X^5 + X^2 + 1, so
k = 3 and f = Q1 ⊕ Q3 ⊕ Q6 ⊕ Q7. Only this set of taps reproduces the
published example trajectory, in which the word 01100011 becomes the reference
word 10100000 after nine clocks:

    01100011 → 11000110 → 10001101 → 00011010 → 00110101 →
    01101010 → 11010100 → 10101000 → 01010000 → 10100000     (p = 9)

The code disk carries the direct sequence, which is the register's sequence
run backwards. Stepping that direct sequence p times from the reference word
gives the word of sector p. The testbenches build their disk model this way.

## The load path and the `gamma` signal

`gamma` = 1 means "keep converting". It is the AND of two NAND gates.

* **NAND1** sees every flip-flop output, inverted where the reference word has
  a 0. Its output is 0 exactly when the register holds the reference word.
* **NAND0** sees every flip-flop output inverted. Its output is 0 only in the
  all-zero state. An LFSR cannot leave that state, and it can only occur at
  power-up.

Every flip-flop receives

    S = not(Y_i) or gamma        R = Y_i or gamma        (both active low)

* While `gamma` = 1, both pins are inactive and the flip-flop is a plain D
  flip-flop.
* While `gamma` = 0, exactly one pin is active, and the flip-flop is forced to
  Y_i. Q equals R in every case.

This is the part that is hardest to follow. The load is asynchronous, and
`gamma` is itself computed from the flip-flops it loads. A conversion
therefore ends in a short self-timed pulse:

1. A clock edge brings the register to the reference word.
2. NAND1 drops `gamma` to 0.
3. The set/reset pins force the next word Y into the register at once,
   without waiting for a clock edge.
4. The register no longer holds the reference word, so `gamma` returns to 1.
5. The next clock edge already shifts the new word.

A conversion of sector p therefore takes exactly **p clock cycles**. The
load costs no clock cycle of its own. With a clocked load it would take
p + 1 cycles.

Two cases keep `gamma` low for longer:

* **Position 0.** If the word under the head is the reference word, `gamma`
  stays 0. The register then follows Y through the set/reset pins. As soon as
  the disk moves, the new word is in the register, `gamma` rises, and
  conversion resumes.
* **Power-up.** An all-zero register makes NAND0 pull `gamma` low. A word is
  loaded in the same way, so no reset input is needed. The first result after
  power-up belongs to an arbitrary start state and should be discarded.

The top level exposes `gamma`. A falling edge marks a fresh result on `p`.

## Counter and output register

The counter adds one on every clock edge. It has an asynchronous active-low
clear driven by `gamma`. The output register is clocked by the falling edge
of `gamma` and takes the count present at that instant, which is p. The
counter clears on the same edge. In simulation the non-blocking assignments
order the two correctly. In hardware, this requires the counter's
clear-to-output delay to exceed the output register's hold time, as it does
with ordinary counter and register parts.

At position 0, `gamma` never falls again, so the falling-edge capture would
keep showing the previous result. This design adds a small flag for that
case. The flag samples `gamma` on the clock, and if `gamma` was low at a clock
edge it clears the output register asynchronously. `p` then reads 0 while the
disk rests at the zero sector, and stays 0 until the next conversion finishes.
In normal operation the `gamma` pulse is far shorter than a clock period and
the flag never sets.

## Timing and hardware notes

* **Critical path.** clock-to-Q, then k XOR gates, then setup. In the
  selector-based form, an AND and an OR gate are added in front of every D
  input.
* **Reported speed-up.** In a 74LVC discrete-logic build, the published
  results list the maximum clock as:
  * selector-based form: 28.98 MHz, for both k = 1 and k = 3;
  * this form: 81.30 MHz for k = 1 (n = 6) and 45.66 MHz for k = 3 (n = 8).

  RTL simulation has no gate delays, so these numbers cannot be checked here.
* **Combinational loop.** The design has one intentional loop: flip-flop
  outputs → NAND1/NAND0 → `gamma` → set/reset pins. Lint tools report `gamma`
  and the set/reset nets as "used both synchronously and asynchronously". This
  is the design's mechanism, not an error.
  * Static timing analysis needs that loop broken or constrained.
  * The `gamma` pulse must be wide enough to meet the flip-flops' set/reset
    minimum pulse width. It lasts about one flip-flop set/reset delay plus
    two gate delays.
* **Input stability.** The word `y` is sampled at the end of a conversion. It
  should not change during the few nanoseconds of the load pulse. A reading
  head that updates its word in step with the disk, rather than at random
  instants, avoids a torn load.
* **Synthesis.** `sr_dff` needs a flip-flop with both an asynchronous set and
  an asynchronous reset. Some synthesis front ends infer that from the
  three-edge `always_ff`, and some do not; a library DFFSR cell can then be
  instantiated in its place. The other modules are ordinary synchronous logic.
* **Resolution.** Any n works if `COEFF` is a primitive polynomial of degree N
  and `REF_WORD` is non-zero. The counter has N bits, and the largest position
  is 2^N − 2.

## Configurations

| N | polynomial | k | reference word | sectors | where tested |
|---|---|---|---|---|---|
| 8 (default) | X^8 + X^6 + X^5 + X^2 + 1 | 3 | 10100000 | 255 | `tb_fib_pr_converter` |
| 6 | X^6 + X^5 + 1 | 1 | 111110 | 63 | `tb_fib_pr_converter_n6` |

The 8-bit polynomial and reference word, and the example above, follow the
published design. For the 6-bit converter only k = 1 is given. The polynomial
X^6 + X^5 + 1 and the reference word 111110 are this design's own choice. Any
primitive one-tap polynomial and any non-zero reference word work equally
well.

## Departures and additions

* **Asynchronous load.** The load through asynchronous set/reset follows the
  published scheme. Saving the clock cycle of the load is a consequence of
  that scheme. The published text also describes the function as unchanged
  from the clocked form. The result values are unchanged; only the cycle
  count per conversion drops by one.
* **Own choices.** The published design does not detail these parts:
  * the counter structure (up counter, asynchronous clear);
  * the output register clocking (falling edge of `gamma`);
  * the position-0 flag;
  * the `state` observation port, and the `at_ref`/`all_zero` outputs of
    `gamma_logic`.
* **Not included.** The selector-based converter used as the comparison
  baseline is not included. Neither are the code disk and reading head, which
  the testbenches model.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>`, and each has a
watchdog. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
        rtl/fib_conv_pkg.sv tb/tb_fib_pr_converter.sv --top-module tb_fib_pr_converter
    ./obj_dir/Vtb_fib_pr_converter

Simulate with random initial values (`+verilator+rand+reset+2`) to exercise
power-up from an arbitrary state.

* **`tb_fib_pr_converter`** runs the 8-bit converter at its default
  parameters. It converts all 255 sectors in a shuffled order, the published
  example (01100011 → 9), and the farthest sector, 254. It also rests at and
  leaves sector 0, and forces the all-zero state once. Every result is
  checked, along with its cycle count (p cycles). Each of these mechanisms is
  counted, and one that never occurred is a failure.
* **`tb_fib_pr_converter_n6`** does the same for the 6-bit configuration.
* **The module testbenches** check:
  * the flip-flop's two write paths;
  * the LFSR against the example trajectory and its full period (255 and 63);
  * the detector over every state;
  * the counter's asynchronous clear;
  * the result register's capture and position-0 behaviour.
