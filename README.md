# Three-dimensional multiple slice turbo codec (3D-MSTC)

A turbo code for interactive links that need a very low frame error rate
with short frames: a frame of 4096 bits is protected by **three** duobinary
8-state convolutional codes instead of the usual two. The third code gets only
a small share of the parity bits. That raises the minimum distance, and with
it the error floor drops, while the code still converges almost as well as a
two-dimensional one. Each code dimension is cut into **P slices** that are
encoded and decoded independently. The interleavers are built so that P
decoders can work on the P slices at once, on P single-port memory banks,
with no access conflicts. An address counter and a barrel shifter are all the
interleaver hardware needed.

This repository holds synthesizable SystemVerilog for the encoder and the
parallel decoder, plus a self-checking testbench for every block. It follows
a published code construction and decoding schedule, "Design of
Three-Dimensional Multiple Slice Turbo Codes". The points where this RTL makes
its own choices are listed in [What is this design's own](#what-is-this-designs-own).

Default configuration: N = 2048 symbols (4096 bits) per frame, P = 8 slices of
M = 256 symbols, code rate 1/2, puncturing period h = 32, 10 decoding
iterations with the hybrid extended serial schedule (25 subiterations).
The puncturing period and the choice between the hybrid and the plain
extended serial schedule are run-time inputs.

## Frame, slices and banks

A frame holds N = M·P duobinary symbols, and each symbol has two bits (A, B).
In natural order, symbol `j` is stored in **bank `j / M` at address `j mod M`**.
There are P banks, and each memory of the design (frame, LLRs, extrinsic
values, decisions) uses this same layout.

The code has three dimensions, each made of P slices of M symbols:

* **Dimension 0** reads the frame in natural order. Slice `r` at time `t` is
  symbol `M·r + t`.
* **Dimensions 1 and 2** read it through an interleaver. At time `t`:
  * every slice reads the **same address** `PiT(t) = (alpha·t + beta(t mod 4)) mod M`;
  * slice `r` takes the word of **bank `(A(t mod P) + r) mod P`**.

  So the natural-order index of interleaved index `k = M·r + t` is
  `Pi(k) = ((A(t mod P) + r) mod P)·M + PiT(t)`.

This structure is what makes the parallel hardware work. At every `t`, each
bank is read exactly once, at one common address. A barrel shifter
(`mstc_rotator`) rotated by `A(t mod P)` then routes the P words to the P
slice processors. The shifter is applied in reverse to write results back.
The interleaver rules are:

* `alpha` is odd, so it is prime to M. Each `beta(i)` is a multiple of 4, so
  `PiT` is a bijection.
* `A` is a permutation of `0..P-1` and repeats with period P. Any P consecutive
  symbols of a slice therefore come from P different banks. Irregular `A`
  tables give better codes than linear ones.

Both interleaved dimensions use the same address generator (`mstc_addr_gen`),
each with its own parameter set (`ilv_cfg_t`: alpha, beta[4], rot[P]). The
parameters are run-time inputs, so one build serves any interleaver of this
family.

On top of the permutation, the two bits of a symbol are exchanged (A,B → B,A):

* at even indices in dimension 1;
* at odd indices in dimension 2.

M is even, so the parity of the index is the parity of `t`. The decoder
applies the same exchange to the two systematic LLRs and to the extrinsic
values of symbols 01 and 10.

## Constituent code and circular slices

Each slice is coded by an 8-state duobinary recursive systematic code of rate
2/3: two input bits in, one parity bit out per symbol. With state
`{s3,s2,s1}`:

```
s1' = s1 ^ s3 ^ A ^ B      s2' = s1 ^ B      s3' = s2 ^ B      Y = A ^ B ^ s1 ^ s2
```

The slices are **circular** (tail-biting): each ends in the state it started
from, so no tail bits are needed and all slices have the same length. The
encoder (`mstc_crsc_enc`) needs two passes per slice:

1. Run from state 0 and record the final state S0.
2. Load the circulation state Sc, the solution of `Sc = G^M·Sc xor S0`, where
   `G` is the zero-input state transition. The hardware checks all 8
   candidates. Then encode again and output the parity.

The state transition has period 7, so **M must not be a multiple of 7**.

## Asymmetric puncturing

The three dimensions make three parity bits y1, y2, y3 per symbol. For rate
1/2, one of the three is dropped for every symbol (`mstc_puncturer`). The
pattern has period h and runs over the parity bit's index in its own
dimension:

| h | P1 (y1) | P2 (y2) | P3 (y3) |
|---|---------|---------|---------|
| 1 | 1 | 1 | 0 (plain 2D code) |
| 3 | 011 | 101 | 110 (all dimensions protected equally) |
| power of two ≥ 4 | 0 at position 0 | 0 at position h/2 | 1 only at positions 0 and h/2 |

For h = 8 this gives P1 = 01111111, P2 = 11110111 and P3 = 10001000. The
period is a run-time input (`h` on the puncturer, `punct_h` on the encoder and
on `mstc3d_top`): 1, 3 or a power of two up to 128. The encoder samples it at
`start`, so each frame can use its own period. With h = 32 (the value of the
evaluated code), dimensions 1 and 2 lose one parity bit in 32, and the
third dimension keeps only 2 in 32. A larger h moves the code toward a 2D code
that converges faster. A smaller h gives a higher minimum distance.

## Encoder (`mstc_encoder`)

1. **Load.** Write the frame into P banks of 2-bit words, one address of all
   banks per cycle.
2. **Encode.** After `start`, the three dimensions are coded one after the
   other on the same hardware. For each dimension:
   * the address generator steps `t = 0..M-1`;
   * every bank is read at `PiT(t)`;
   * the rotator hands bank `(A+r) mod P` to slice encoder `r`;
   * the symbol is swapped if required.

   Each dimension takes two passes (circular encoding) and one bubble cycle
   between them.
3. **Output.** During the second pass of each dimension, `out_valid` carries
   P parity bits per cycle, for indices `M·r + out_t` of that dimension's
   order, with their keep flags. In dimension 0 it also carries the
   systematic symbols.

`done` comes `6·(M+1)+1` cycles after `start`, which is 1543 cycles for
M = 256.

## Decoder (`mstc_decoder`)

### Memories

All memories are split into P single-port banks with the layout above.

| memory | contents per word | access |
|--------|-------------------|--------|
| intrinsic, **2 copies** (ping-pong) | systematic LLRs `la, lb` (2×6 bits) | interleaved: address `PiT(t)`, rotated |
| | parity LLRs of the 3 dimensions (3×6 bits), 0 where punctured | straight: bank r, address t |
| extrinsic, **2 memories** | 3 log-ratios of symbols 01, 10, 11 against 00 (3×8 bits) | interleaved |
| decisions | decided symbol (2 bits) | interleaved write, natural read |
| boundary metrics | α_M and β_0 of every slice and dimension (registers) | per SISO |

The systematic and parity LLRs sit in separate banks. That way the parity
read (address `t`) never competes with the interleaved systematic read
(address `PiT(t)`). One intrinsic copy is loaded through the `ld_*` port
while the other is being decoded. `ld_ready` falls when both copies hold
frames.

### Subiteration

A subiteration decodes one dimension. All P SISOs (`mstc_siso`) run in lock
step, and a subiteration takes **2·M + 4 cycles**:

1. **Load phase (M cycles).** For `t = 0..M-1`:
   * read the systematic LLRs and both extrinsic memories at `PiT(t)`;
   * rotate the words to the SISOs;
   * add the extrinsic memories that hold *other* dimensions (saturated) to
     form the a priori;
   * apply the symbol swap;
   * feed the SISO together with the parity LLR of the current dimension.

   The SISO stores the inputs and runs the forward recursion as they arrive.
2. **Backward phase (M + 4 cycles).** The SISOs run backwards and produce, for
   each `t` in descending order, the extrinsic values and a hard decision. The
   extrinsic is un-swapped, multiplied by the scaling factor of this
   subiteration (Q4, 16 = 1.0), rotated back, and written at the same
   addresses `PiT(t)` into the extrinsic memory chosen by the scheduler. The
   decisions go to the decision memory.

### The SISO

The SISO is max-log-MAP on the 8-state duobinary trellis (32 branches per
step). The branch metric is `gamma(s,u) = apr(u) + A·la + B·lb + Y(s,u)·lp`,
with LLRs positive for a 1.

* **Metrics.** State metrics are 14 bits and are renormalised each step
  against state 0.
* **Extrinsic output.** For each symbol value u, the output is
  `Lambda(u) - Lambda(00)`. Here `Lambda(u)` is the best
  `alpha + parity term + beta` over all branches labelled u, so the a priori
  and systematic parts are removed. The result is saturated to 8 bits.
* **Circular trellis.** The slice is circular, but its start state is unknown
  to the decoder. The SISO starts its recursions from boundary metrics that
  the decoder keeps per slice and dimension: the final α and β of the previous
  decoding of that slice, or zero at the start of a frame.

### Hybrid extended serial schedule (`mstc_hes_sched`)

**Extended serial (ES).** Dimensions 0, 1, 2 are decoded in turn, and each
uses the extrinsic of the other two. That needs two extrinsic values per
symbol, hence two extrinsic memories.

**Hybrid (HES), the default.** The third dimension carries few parity bits,
so its extrinsic is unreliable early on:

* during the first half of the iterations it is not decoded at all, and the
  decoder alternates between dimensions 0 and 1 only;
* afterwards it is decoded with a scaling factor that grows from 0.2 to 1.0.

Dimensions 0 and 1 use a factor growing from 0.7 to 1.0. With 10 iterations:

| iteration | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|-----------|---|---|---|---|---|---|---|---|---|---|
| dims 0, 1 (Q4) | 11 | 12 | 12 | 13 | 13 | 14 | 14 | 15 | 15 | 16 |
| dim 2 (Q4), HES | – | – | – | – | – | 3 | 6 | 10 | 13 | 16 |

HES therefore takes J = 5·2 + 5·3 = **25 subiterations**, and ES
(`hybrid = 0`) takes 30. The iteration count is the parameter `NIT`; the
ramps are computed from it. For a budget of 20 subiterations, the one used to
compare codes at equal decoding effort, build with `NIT = 8`: HES then takes
8·2 + 4 = 20, with third-dimension factors 3, 7, 12, 16.

**Extrinsic memory assignment.** The two memories are shared by three
dimensions through tags. Each memory carries the number of the dimension
whose extrinsic it holds. A subiteration of dimension d:

* reads every memory tagged with another dimension;
* writes into the memory tagged d if there is one, otherwise an empty one,
  otherwise the one written least recently.

In the 2-dimension phase, this keeps dimension 0 and dimension 1 in their own
memories. In the ES phase, the memory overwritten is always the one whose
content the next two subiterations no longer need.

### Decoder timing and throughput

A frame takes `J·(2M+4) + M + 1` cycles from its first subiteration to
`frame_done`. With the defaults that is 25·516 + 257 = **13157 cycles per
4096-bit frame**: 62 Mbit/s at 200 MHz, or 31 Mbit/s at 100 MHz. The target
of the original design is 100 Mbit/s at 200 MHz (and 50 Mbit/s at 100 MHz).
That target assumes SISOs that accept one symbol per cycle (sliding-window
SISOs). This SISO keeps the forward metrics of a whole slice (M words of
8×14 bits per SISO) and spends M cycles forward and M cycles backward.
Reaching the target would take a windowed SISO that overlaps the two
recursions.

## What is this design's own

The source fixes the code structure (slices, interleaver formulas, barrel
shifter, bit swap, puncturing construction, two intrinsic copies and two
extrinsic memories, the HES/ES schedules and their scaling ranges). It does
not fix the following, and this RTL chooses:

* **Interleaver parameters.** The optimised alpha/beta/A of the evaluated
  (2048, 256, 8) code are not available. The defaults in `mstc_pkg`
  (`DEF_ILV1`, `DEF_ILV2`) follow the rules above but are only examples. Error
  rates measured with them are not those of the optimised code (see
  *Error rates* below).
* **The trellis.** Feedback 1+D+D³, parity 1+D²+D³, with B also entering the
  2nd and 3rd cells. The source only specifies an 8-state duobinary rate-2/3
  circular code.
* **Puncturing positions.** The written rule and the example patterns in the
  source disagree on where P2 has its zero. This RTL uses position h/2, which
  is the only reading that drops exactly one parity bit per symbol.
* **Run-time puncturing period.** The source compares several periods but
  does not say whether one circuit must support them all. Here h is an
  input, sampled per frame, so one build covers every row of the table.
* **Scaling.** The values for dimensions 0 and 1 in HES use the ES ramp
  0.7 → 1.0, because the optimised set is not given. All ramps are linear and
  rounded to Q4.
* **Fixed-point widths.** Channel 6, extrinsic 8 and metric 14 bits; the
  reference design was only simulated in floating point.
* **The SISO organisation** (whole-slice, two phases), the boundary-metric
  carry-over for circular slices, the memory-tag scheme, and all handshakes.
  Reset is asynchronous and active low.
* **Memories.** They are written as synchronous single-port arrays
  (`mstc_ram`), not as process-specific SRAM macros.

**Not built:**
* the partial serial (PS/HPS) decoding structures, an alternative the source
  offers for frames above about 10 kbit;
* the 2D 8-state and 16-state comparison codes;
* depuncturing and demodulation, which are left to whatever feeds the
  `ld_*` port.

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_mstc_addr_gen` | addresses, rotations and swap flags against the closed formula over whole 2048-symbol frames; bijectivity; P consecutive symbols of a slice from P banks |
| `tb_mstc_rotator` | both directions and their inverse relation |
| `tb_mstc_crsc_enc` | parity against a shift-register reference whose circular start state is found by exhaustive search; the slice ends where it started |
| `tb_mstc_puncturer` | patterns for h = 1, 3, 4, 8, 16, 32, 64 against the table above; exactly one parity bit dropped per symbol for h > 1 |
| `tb_mstc_encoder` | every parity bit, keep flag and systematic output of random full-size frames; frame time |
| `tb_mstc_siso` | decisions on clean and noisy slices; extrinsic alone identifies symbols with erased systematic bits; a-priori-only decoding; output order; 2M+2 latency |
| `tb_mstc_hes_sched` | dimension order, J = 25 (HES) / 30 (ES), scaling values, extrinsic read/write selection; a second sequencer with NIT = 8 gives J = 20 (HES) and 24 (ES) |
| `tb_mstc_decoder` | 3 frames of 512 symbols (clean, noisy ES, noisy HES) decoded without errors; ping-pong loading; subiteration counts; cycle count |
| `tb_mstc3d_top` | full-size end to end: 4 random 4096-bit frames (puncturing periods 32, 32, 8 and 3; the second frame on the ES schedule) through the RTL encoder, a noisy channel model (about 7% of symbols wrong before decoding) and the RTL decoder, all decoded without error. It also counts changes of the puncturing period, punctured bits, swaps, non-zero circulation states, loads during decoding, load back-pressure, skipped and decoded third-dimension subiterations, the ES frame and corrected errors, and requires each to occur |
| `tb_mstc3d_awgn` | error rates of the full-size codec over a QPSK/AWGN channel (Box-Muller noise, 6-bit LLRs): HES at Eb/N0 = 0.6, 1.0 and 1.45 dB, ES at 1.0 dB, and h = 3 against h = 64 at 1.45 dB, 20 frames each; a second codec with NIT = 8 (J = 20) in parallel; decoding time per frame; limits on FER and BER (see below) |

The reference models are in `tb/tb_mstc_ref_pkg.sv`. They are written
independently of the RTL: the trellis is in shift-register form, circular
states are found by search, and the interleaver is computed on whole-frame
indices. The channel model adds approximately Gaussian noise (a sum of
uniform variables) to ±12 and clips to 6 bits.

### Error rates

`tb_mstc3d_awgn` sends BPSK per coded bit (QPSK) with noise variance
1/(2·R·Eb/N0), R = 1/2, and quantises the channel LLR as round(10·y) clipped to ±31.
Results over eight seeds, 20 frames per point:

| Eb/N0 | uncoded BER | decoded BER | frames in error |
|-------|-------------|-------------|-----------------|
| 0.6 dB | 0.14 | about 0.14 (no convergence) | 19–20 of 20 |
| 1.0 dB | 0.13 | 1e-4 to 1e-2 | 1–5 of 20 |
| 1.45 dB | 0.12 | 0 to 7e-5 | 0–2 of 20, each with 2–6 bit errors |

The same testbench also runs the other schedule and other puncturing
periods, which are run-time inputs of the same build:

| run | decoded BER | frames in error |
|-----|-------------|-----------------|
| ES, h = 32, 1.0 dB | 7e-3 to 3e-2 | 2–9 of 20 |
| ES, h = 3, 1.45 dB | 3e-2 to 8e-2 | 4–9 of 20 |
| ES, h = 64, 1.45 dB | 2e-5 to 2e-4 | 1–6 of 20 |

A second codec built with `NIT = 8` (J = 20 with HES) decodes the same
channel values in parallel. At 1.0 dB it reaches a BER of 5e-3 to 2e-2.
At 1.45 dB it reaches 0 to 6e-5, with at most 2 of 20 frames in error.

HES beat ES at 1.0 dB in every seed, while using 25 subiterations instead
of 30. The regular h = 3 code has not converged by 1.45 dB, while h = 64
has. This is the trade the puncturing period controls: a lighter third
dimension converges earlier, at the cost of minimum distance.

The published code reaches an FER below 1e-6 at 1.45 dB with a
floating-point decoder. This build does not. The few remaining frame errors
have very few wrong bits, which is the signature of low-weight codewords.
They most likely come from the example interleaver parameters, which are not
the optimised ones. The cost of the 6-bit channel quantisation was not
measured separately.

The testbench limits are set from these measurements:

* 1.0 dB, HES: at most 10 of 20 frames wrong, and BER below a fifth of the
  uncoded BER;
* 1.45 dB, HES: at most 5 of 20 frames wrong, and BER below 1e-3;
* HES has at most 1.25 times the bit errors of ES at 1.0 dB;
* h = 3 has more than ten times the bit errors of h = 64, and h = 64 stays
  below BER 1e-3.
* the `NIT = 8` codec meets the 1.45 dB limits as well.

They catch a broken decoder but do not certify the published performance.

## Simulating

Verilator 5, from the repository root. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mstc3d_top \
    rtl/mstc_pkg.sv tb/tb_mstc_ref_pkg.sv tb/tb_mstc3d_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench; `-Irtl -Itb` lets
Verilator find the modules. The full-size end-to-end run takes well under a
second. The error-rate run (`tb_mstc3d_awgn`, 120 frames through two
decoders) takes about 15 seconds. Pass `+verilator+seed+N` to the simulation
to draw different frames and noise.

To change the configuration:

* `M`, `P` and `NIT` are parameters of `mstc3d_top`. M must be a multiple
  of 4 and not a multiple of 7; P at most 16.
* The puncturing period is the `punct_h` input: 1, 3 or a power of two up to
  128.
* The interleaver parameters are the `cfg1`/`cfg2` inputs.
* The widths are in `mstc_pkg`.

## Files

| file | content |
|------|---------|
| `rtl/mstc_pkg.sv` | widths, types, trellis, puncturing and scaling functions, example interleavers |
| `rtl/mstc_addr_gen.sv` | interleaver address generator |
| `rtl/mstc_rotator.sv` | barrel shifter (shuffle network) |
| `rtl/mstc_ram.sv` | single-port bank |
| `rtl/mstc_crsc_enc.sv` | circular slice encoder |
| `rtl/mstc_puncturer.sv` | puncturing patterns |
| `rtl/mstc_encoder.sv` | 3D-MSTC encoder |
| `rtl/mstc_siso.sv` | max-log-MAP SISO |
| `rtl/mstc_hes_sched.sv` | HES/ES subiteration sequencer |
| `rtl/mstc_decoder.sv` | parallel turbo decoder |
| `rtl/mstc3d_top.sv` | encoder and decoder |
| `tb/` | testbenches and reference package |
