# Parallel gold sequence generators for an LLR descrambler

A linear feedback shift register (LFSR) produces one pseudorandom bit per clock.
A receiver that descrambles 64-QAM symbols needs six sequence bits per symbol,
so a one-bit generator forces the soft bits (LLRs) into a serial stream or
needs a buffer that pre-computes the sequence. This design avoids both. It
moves the LFSR M samples forward in each clock. It does this with one
constant GF(2) matrix applied to the register, so M sequence bits come out
every clock. No memory and no control logic are needed.

The RTL contains:

* `prsg_par`: the M-output pseudorandom sequence generator.
* `gsg`: the gold sequence generator GSG_M. It is built from two `prsg_par`
  instances, for the degree-25 polynomials x^25+x^3+1 and x^25+x^3+x^2+x+1.
* `descrambler` and `sign_toggler`: one symbol of LLRs is descrambled per
  clock.
* `scrambler`: the bit-domain counterpart. It sits on the successive
  interference cancellation (SIC) re-encoding path.
* `mimo_detector_top`: the descrambling section of a 2x2 MIMO detector, with
  four channel lanes and the scrambler.

## Jumping M samples per clock

The sequence follows the recurrence

    c(n+K) = sum_{k<K} a_k * c(n+k)   (mod 2)

The register holds a window of K consecutive samples, `state[k] = c(n+k)`.
One serial step is `state <- A * state`. Here A is the companion matrix: rows
0..K-2 shift, and row K-1 is the tap vector `a`. M steps are `A^M`, so the
register can be loaded with `A^M * state` in a single clock and now holds
`c(n+M) .. c(n+M+K-1)`.

Each row of `A^M` is a mask. Bit i of the next state is the XOR of the
register bits where row i has a one. This is the **feedback mask stack**. A
second, **forward mask stack** B has M rows. Row r is row 0 of `A^r`, the
mask that picks c(n+r) out of the window. So the outputs are
`data_out[r] = c(Mn + r)`.

For M <= K, the structure is simple:

* Every B row selects a single register bit. The outputs are just
  `state[0..M-1]`.
* Rows i < K-M of `A^M` select `state[i+M]`. This is plain wiring.
* Only the last M rows cost XOR gates.

For the default K = 25 and M = 6 with x^25+x^3+1:

| next bit  | source                          |
|-----------|---------------------------------|
| 0 .. 18   | `state[6] .. state[24]`         |
| 19        | `state[0] ^ state[3]`  (c(n+25)) |
| 20        | `state[1] ^ state[4]`           |
| ...       | ...                             |
| 24        | `state[5] ^ state[8]`  (c(n+30)) |

For x^25+x^3+x^2+x+1, rows 19..24 are four-input XORs:
`state[j]^state[j+1]^state[j+2]^state[j+3]` for j = 0..5.

The forward stack can also give a constant output delay. Parameter `DELAY`
uses rows of `A^(DELAY+r)`, so `data_out[r] = c(Mn+DELAY+r)`. This costs a few
XOR gates and no registers. In `gsg`, `DELAY0` and `DELAY1` set the relative
phase of the two sequences of the gold pair. Both default to 0.

When M gets close to K, or exceeds it, feedback bits feed further feedback
bits. The rows of `A^M` then grow denser, and the B rows stop being plain
selections. `prsg_par` does not special-case any of this. Both mask stacks
are computed at elaboration time by constant functions (`mask_a`, `mask_b`)
from `TAPS` and `M`. Any degree, polynomial and M >= 1 works, including
M > K. Synthesis turns each masked reduction XOR into the few gates it needs.

## Gold sequence generator (`gsg`)

A gold sequence is `d(n) = x0(n) xor x1(n)`. It is the sum of a preferred pair
of maximal-length sequences. `gsg` runs two `prsg_par` instances with the
same M and XORs their M outputs bit by bit. The ports keep the customary names:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `srstb`     | in  | 1     | asynchronous active-low reset; clears both registers |
| `sclk`      | in  | 1     | clock |
| `seed_in`   | in  | 1     | load `dataseed0`/`dataseed1` at the next edge (wins over `din_valid`) |
| `din_valid` | in  | 1     | this cycle's outputs are consumed; both registers step M samples at the edge |
| `dataseed0` | in  | 25    | initial state of the upper generator, bit k = x0(k) |
| `dataseed1` | in  | 25    | initial state of the lower generator, bit k = x1(k) |
| `data_out`  | out | M     | `d(Mn+r)` on bit r (with the default zero delays), combinational from the registers |

Timing: after `seed_in`, the first M bits are already on `data_out`. Each
clock with `din_valid` high consumes M bits. N bits therefore take N/M clocks.
With the seeds 4195033 and 33554431, 72 bits take 72, 36, 18 and 12 clocks for
M = 1, 2, 4 and 6. The area cost is about one register per sequence plus a few
XOR gates per extra output.

A reset register is all zeros, and an all-zero LFSR stays at zero. The
generator must be seeded before use, with a nonzero seed. An assertion in
`prsg_par` checks that the seed is nonzero.

## Descrambler lanes (`descrambler`, `sign_toggler`)

Scrambling XORs each coded bit with the gold sequence. On soft values the
inverse is a sign flip: an LLR whose sequence bit is 1 is negated.
`sign_toggler` does this for six LLRs in parallel. The LLRs are 8-bit two's
complement, and -128 saturates to +127.

A `descrambler` lane takes one symbol's LLRs per clock. That is 2, 4 or 6 LLRs
on a 6 x 8-bit bus, bit LLR 0 first. The lane draws the same number of
sequence bits from a parallel generator and registers the toggled result.
Timing is one symbol per clock with a latency of one clock. Positions above
the modulation order are driven to zero. The generator steps only on
`in_valid`, so idle cycles do not disturb the sequence.

* **Control lane** (`DATA_CH = 0`): QPSK only, with one GSG_2.
* **Data lane** (`DATA_CH = 1`): QPSK, 16-QAM or 64-QAM, chosen by
  `mod_order`. The helper `gsg_multirate` holds GSG_2, GSG_4 and GSG_6, seeds
  all three together, and steps and outputs only the one that matches the
  modulation order. Keep `mod_order` constant from `seed_in` to the end of a
  codeword. Seed a lane only while its `in_valid` is low (asserted).

## Detector top (`mimo_detector_top`)

| lane | channel | modulation            | generator(s)          |
|------|---------|-----------------------|-----------------------|
| 0    | PCICH   | QPSK                  | GSG_2                 |
| 1    | PDCCH   | QPSK                  | GSG_2                 |
| 2    | PDSCH0  | QPSK / 16-QAM / 64-QAM | GSG_2 / GSG_4 / GSG_6 |
| 3    | PDSCH1  | QPSK / 16-QAM / 64-QAM | GSG_2 / GSG_4 / GSG_6 |

The lanes are fed by the symbol demapper (`dm_valid`, `dm_llr`). Their outputs
go to the channel decoder (`llr_valid`, `llr_out`). Each lane has its own
`seed_in`/`dataseed0`/`dataseed1`, and the two data lanes have `pdsch_mod`.
The SIC path's `scrambler` takes one symbol's worth of interleaved bits per
clock (`enc_*`). It returns them XORed with its own gold sequence, one clock
later (`scr_*`). It uses the same `gsg_multirate` generator as a data lane.

All lanes share one bus format. As a result, LLR positions 2..5 of the two
control lanes are always zero.

The rest of the detector is not part of this RTL:

* the lattice decoder: Alamouti decoder, beam decoder, MMSE operator, buffer
  and SIC operator;
* the symbol demapper;
* the turbo encoder, rate matcher, block interleaver and symbol mapper of the
  SIC path.

Their algorithms are not specified here, so the top brings the connections
to them out as ports. There is no latency model of those blocks either.

## Design choices beyond the published architecture

The structure of the generator is the published one: the shift register
array, the feedback mask stack `A^M`, the forward mask stack B, two generators
XORed into a gold sequence, the polynomials, the 25-bit seeds, and one GSG per
modulation order in the descrambler. The following are this implementation's
own choices:

* Seed bit order (bit k = first-sample k). With a different convention the
  seeds are bit-reversed, or map to a different phase.
* Reset clears the registers asynchronously. `seed_in` has priority over
  `din_valid`.
* `din_valid` acts as an input that both marks output cycles and advances the
  generator.
* `data_out` of `gsg` is combinational. The lane and scrambler outputs are
  registered.
* LLRs are read as 8 bits each, with negation as the toggle and saturation of
  -128.
* A data lane holds three separate generators instead of one shared register.
* The scrambler on the SIC path is an XOR with the same kind of generator. The
  published design only names this block.
* The output delay `DELAY` and the phase offsets `DELAY0`/`DELAY1` default
  to 0, because no offset values are specified.
* Lane numbering, the per-lane seed ports and the valid-only handshake (no
  back-pressure).

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The reference is a bit-serial LFSR model written straight from the recurrence
(`tb/tb_ref_pkg.sv`). It shares no code with the matrix-based RTL.

| testbench | what it does |
|-----------|--------------|
| `tb_prsg_par` | M = 1, 6 and 30 (M > K), and M = 6 with DELAY = 40, with random advance and mid-run reseed |
| `tb_gsg` | 72-bit run on GSG_1/2/4/6, checking 72/36/18/12 clocks, then 3,000 bits with random gaps, then a GSG_6 with phase offsets 3 and 100 |
| `tb_sign_toggler` | all 256 LLR values, toggled and not |
| `tb_descrambler` | data lane through all three modulation orders and a control lane, random gaps, one-clock latency |
| `tb_scrambler` | all three modulation orders |
| `tb_mimo_detector_top` | top at defaults: mode switches, reseeds, gaps and saturation, then one transaction per channel configuration (288, 4,800, 33,120, 33,120 LLRs), checking 144/2,400/5,520/5,520 clocks |
| `tb_table2_workload` | 2,400 transactions on every lane at once, about 13.2 M clocks; every LLR and every transaction length is checked |

Running a test with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/gsg_pkg.sv tb/tb_ref_pkg.sv tb/tb_gsg.sv --top-module tb_gsg
    ./obj_dir/Vtb_gsg

To run another test, replace `tb_gsg` with its name. The 2,400-transaction
workload runs in about 20 s.

## Changing it

* Another polynomial pair or degree: set `K`, `TAPS0` and `TAPS1` on `gsg`
  (or `TAPS` on `prsg_par`). Bit k of a tap vector is the coefficient of x^k,
  and x^K is implied. Also update `GSG_K` and the tap constants in `gsg_pkg`
  if the lanes should follow.
* Another parallelism: set `M`. Nothing else changes, and M > K is allowed.
* Another LLR width: change `LLR_W` in `gsg_pkg`.
