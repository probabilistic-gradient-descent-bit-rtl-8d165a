# FM-PGDBF: a bit-flipping LDPC decoder without a maximum finder

NAND flash pages are protected by long, high-rate LDPC codes, and the
controller has to correct the hard-read page fast and cheaply. Bit-flipping
(BF) decoders are the cheapest LDPC decoders: every bit and every parity check
is a tiny unit, messages are single bits, and a fully parallel decoder does one
iteration per clock cycle.

Among BF decoders, the *gradient descent* family (GDBF) gives each bit an
integer **energy** and flips the bits whose energy is the largest in the
whole word. Its probabilistic variant (PGDBF) flips each of those bits only with
probability p0. That small dose of randomness lets the decoder escape the
error patterns on which a deterministic decoder keeps oscillating. Both need a
**maximum finder**: a tree of compare-and-select units over all N energies.
That tree is the longest path in the circuit and a large part of its logic.

This design, the flash-memory adapted PGDBF (**FM-PGDBF**), drops the maximum
finder. The maximum energy of iteration k is *predicted offline*, by
simulating the decoder, and stored as a short sequence of thresholds.
The decoder walks through the sequence circularly, so a sequence of length
L serves any number of iterations. Each bit compares its own energy with the
current threshold, so a small comparator per bit replaces the global tree. A
threshold that is sometimes wrong is harmless, and can even help: like the
random bits, it shakes the decoder out of trapping sets.

This repository holds synthesizable SystemVerilog for the complete decoder,
a reference model, and testbenches.

## The decoding rule

The code is a regular LDPC code with N bits and M checks. Each bit is in DV
checks and each check covers DC bits. The channel word is y, and the current
decisions are v, with v = y at the start. One iteration is:

```
c_m   = XOR of v_n over the DC bits of check m          (1 = check unsatisfied)
E_n   = (v_n xor y_n) + sum of c_m over the DV checks of bit n      0 .. DV+1
T_k   = THR_SEQ[k mod L]                                 offline threshold
v_n  ^= (E_n >= T_k) and R_n(k)                          R_n(k) ~ Bernoulli(p0)
```

Decoding stops when every check is satisfied, which is success, or after
IT_MAX iterations, which is failure. The energy counts how many of the
bit's checks are unsatisfied. It adds 1 if the bit already differs from what
was read. A high energy means the bit is probably wrong.

## Architecture

```
           y (N bits)                         start
               |                                |
   +-----------v-----------+   syndrome   +-----v--------+
   |  N x vnu              |------------->| decoder_ctrl |--> ready, done, success, iters
   |  y_n, v_n registers   |<-- load -----|  FSM, OR-M   |
   |  energy, >= compare   |<-- iter -----|  iteration   |
   +--+--------------^-----+              |  counter     |
      | v (N)        | c (DV per bit)     +--------------+
   +--v--------------+-----+       thr    +---------------------+
   |  Tanner-graph wiring  |   <----------| threshold_sequencer |  L-entry ROM, index mod L
   |  M x cnu (DC-XOR)     |              +---------------------+
   +-----------------------+       r (N)  +---------------------+
                               <----------| random_generator    |  S-bit rotating register
                                          +---------------------+
```

| module | what it is |
|---|---|
| `fm_pgdbf_decoder` | top: instantiates everything and builds the Tanner graph from the QC structure |
| `vnu` | one per bit: y_n and v_n registers, energy adder, threshold comparator, flip |
| `cnu` | one per check: DC-input XOR |
| `threshold_sequencer` | constant threshold sequence and its circular index |
| `random_generator` | Bernoulli(p0) bits for all VNUs from an S-bit rotating register |
| `decoder_ctrl` | start/done handshake, zero-syndrome detection, iteration counter, It_max |
| `fm_pgdbf_pkg` | shared types, circulant shift rules, default thresholds, reset-pattern hash |

All nodes update together (flooding schedule). The loop
v -> XOR -> energy adder -> compare -> AND -> v is the only register-to-register
path through the datapath. It has no dependence on N, and that is the point of
the architecture.

### Timing

* A `start` pulse while `ready` loads y into every VNU. The iteration counter
  and the threshold index are cleared.
* In each following cycle, the controller first looks at the syndrome of the
  current decisions. If it is zero, or if IT_MAX iterations have been done,
  `done` pulses. Otherwise the cycle is one iteration: the VNUs flip, the
  threshold index advances, and the random register rotates.
* A frame that needs k iterations raises `done` k+1 cycles after the start
  cycle. One iteration costs one clock (n_c = 1), so the throughput is
  N * f_clk / (k + 2) bits per second, counting the load cycle and the final
  check cycle.
* `x_hat`, `success` and `iters` stay valid until the next `start`. A
  `start` while busy is a protocol error, and an assertion flags it.
  Reset is asynchronous and active low.

### The Tanner graph of a quasi-cyclic code

H is a DV x DC array of Z x Z circulant permutation matrices, so
N = DC*Z and M = DV*Z. Block (i, j) is the identity rotated by s(i, j):
check i*Z + r is wired to bit j*Z + ((r + s(i,j)) mod Z). The wiring is
generated at elaboration time, and three shift rules are available
(`SHIFT_MODE`):

* `SHIFT_ARRAY` (default): s = i*j mod Z. It has no 4-cycles as long as
  Z > (DV-1)(DC-1).
* `SHIFT_MULT`: s = b^i * a^j mod Z. With DV=3, DC=5, Z=31, a=2, b=5 this is the
  well-known (155,64) Tanner code.
* `SHIFT_TABLE`: an explicit table `SHIFT_TAB[i*DC + j]`, with up to 256
  circulants. Use it for a production code.

### The random generator

Drawing N fresh Bernoulli bits every cycle would cost far more than the
decoder. Instead, an S-bit register (S = M/2 by default) holds a fixed pattern
with about p0*S ones, rotates by one position per iteration, and VNU n reads
bit n mod S. The pattern comes from a hash of (`RG_SEED`, bit index), so it
is a reset constant. The register keeps rotating from frame to frame. The
randomness is therefore only pseudo-randomness: bits n and n+S always receive
the same value, and the sequence repeats every S iterations.

### The threshold sequence

`THR_SEQ` is a parameter, a packed array of up to 16 entries of 4 bits, of
which the first L are used. Entry k mod L is the threshold of iteration k. It
is a ROM, not a register file. The default, for L = 8, is

```
{DV, DV, DV, DV-1, DV, DV-1, DV, DV-1}     e.g. 4 4 4 3 4 3 4 3 for DV = 4
```

Mostly, this flips the bits that see all their checks unsatisfied, and now
and then lowers the bar by one. **These values are a placeholder.** The
sequence is meant to come from Monte Carlo simulation of the code that is
actually used, at the channel error rate of interest. Recalibrate it whenever
the code or p0 changes. In a short exploration on the default code, a few
hand-picked sequences ({4,4,3}, {4,3}, {4,3,3} and the default) gave similar
frame error rates. A constant threshold of DV was much worse, because it
stalls as soon as no bit reaches DV.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `DV`, `DC`, `Z` | 4, 8, 162 | column weight, row weight, circulant size; N = 1296, M = 648, rate 1/2 |
| `SHIFT_MODE`, `SHIFT_A`, `SHIFT_B`, `SHIFT_TAB` | `SHIFT_ARRAY`, 2, 5, 0 | circulant shift rule |
| `L`, `THR_SEQ` | 8, see above | threshold sequence |
| `S` | DV*Z/2 = 324 | random register length (M/2) |
| `P0_PERMILLE`, `RG_SEED` | 700, 1 | p0 = 0.7 and the seed of the reset pattern |
| `IT_MAX` | 300 | maximum number of iterations |

Thresholds are 4 bits wide, so DV can be at most 14.

## What is taken from the published algorithm and what is not

The following follow the published FM-PGDBF decoder:

* the energy function;
* the `>=` comparison with an offline threshold;
* the circular use of a short threshold sequence;
* the AND with a Bernoulli(p0) bit;
* the flooding architecture, with one iteration per clock;
* a random generator of M/2 register bits;
* IT_MAX = 300;
* the default code shape: (4,8)-regular, N = 1296.

The following are this design's own choices:

* **Circulant shifts.** The code matrices of the published results are not
  available, and the i*j rule is a generic substitute. Its error-correction
  performance is not that of an optimised code.
* **Threshold values and L = 8.** See above.
* **p0 = 0.7.**
* **Structure of the random generator.** The published decoder reuses an
  existing low-cost PGDBF generator of M/2 bits without describing it. The
  rotating register with fan-out n mod S is a plausible reconstruction, not
  a copy.
* **Handshake, reset and port list.** These include the syndrome output and
  the convention of one extra cycle for the final check.

The NAND flash array that delivers y is outside the decoder.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cnu` | all 256 inputs of an 8-input check against a counted parity |
| `tb_vnu` | load, energy for random check/decision combinations, the `>=` and random-bit rule, hold, load priority |
| `tb_threshold_sequencer` | circular index, wrap, restart, default sequence for DV = 4 |
| `tb_random_generator` | reset pattern, density of ones close to p0, rotation direction, r[n] = bit n mod S, period S |
| `tb_decoder_ctrl` | handshake, iteration enable, counter, success exit, It_max exit, one-cycle done |
| `tb_fm_pgdbf_decoder` | end to end on the (155,64) Tanner code, It_max = 60 |
| `tb_fm_pgdbf_full` | end to end with every parameter at its default (N = 1296) |
| `tb_fm_pgdbf_codes` | end to end on four other shapes: (3,6) and (3,12) with N = 1296; (4,16) with N = 1296; (4,28) with N = 2212 |

The end-to-end tests send an all-zero codeword through a binary symmetric
channel with crossover probabilities of 0.1% to 3%. Some frames get heavy
error patterns instead. Every frame is compared with a bit-accurate
reference model in `tb/pgdbf_ref_model.svh`, which is written with plain loops
over adjacency lists. The comparison covers:

* the decisions;
* success;
* the iteration count;
* the exact latency, k+1 cycles.

An all-zero codeword loses no generality, because the update rule depends
only on v xor y and on the checks.

Each end-to-end test also demands that every mechanism occurs at least once:

* exit without iterating;
* correction after iterating;
* exit at It_max;
* a candidate bit held back by its random bit;
* a flip at a lowered threshold;
* a wrap of the threshold sequence.

A heavy frame that converges to a codeword other than the sent one is counted
and reported. It is not an error.

To run a test with Verilator (5.x):

```
verilator --binary --timing --assert --top-module tb_fm_pgdbf_full \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fm_pgdbf_pkg.sv tb/tb_fm_pgdbf_full.sv
./obj_dir/Vtb_fm_pgdbf_full
```

Building the full-size decoder takes about 20 s. Its 24 frames simulate in
well under a second.

### How far to trust it

* The RTL agrees cycle for cycle with an independent model of the algorithm,
  on six code shapes, including the default configuration.
* The frame error rates of the default configuration are **not** those of the
  published decoder, because the code and the thresholds differ. At 1% raw bit
  error rate, the default configuration fails on a few percent of frames (about
  3.5% in a 200-frame run); at 2%, on about a third. Before relying on these numbers, supply the real
  circulant table (`SHIFT_TABLE`) and a calibrated `THR_SEQ`.
* No timing closure or FPGA implementation has been done. A first-pass
  generic synthesis of the default decoder gives about 2,900 flip-flops:
  2 x 1296 in the VNUs, 324 in the random register, and a few for control.
  There is no maximum-finder tree.
