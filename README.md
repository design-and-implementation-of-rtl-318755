# Parallel sliding-window turbo decoder for IEEE 802.16e duo-binary CTC

This is synthesizable SystemVerilog for a turbo decoder aimed at the
convolutional turbo code (CTC) of IEEE 802.16e (WiMax). It reaches high
throughput by splitting each code block across several identical
processing elements (PEs) that run at the same time. Each PE runs a
sliding-window max-log-MAP decoder. Its memories therefore grow with the
window length, not with the block length. The path metrics are allowed to
wrap around, so no normalisation subtraction sits in the recursion loops.
All PEs share one interleaver. It computes a single address per step and
derives the addresses of every other PE from it, with no address ROM.

Defaults: 4 PEs, blocks of up to 2400 couples (4800 bits), window length
L = 10, 1 to 15 iterations set at run time. With these defaults, a
2400-couple block takes `2 * iterations * 636` cycles to decode. For
4 iterations that is 5088 cycles, or about 470 Mbit/s at a 500 MHz clock.

The design follows a published architecture for a combined WiMax/LTE turbo
decoder. The section "Where this RTL departs from or adds to the
architecture" lists what is this implementation's own choice and what is
missing.

## The code being decoded

The duo-binary code encodes pairs of bits, called couples (A, B). Each
component encoder is an 8-state recursive code:

- feedback polynomial 1+D+D^3
- parity polynomials 1+D^2+D^3 (Y) and 1+D^3 (W)

One trellis step takes one couple and emits one parity pair (Y, W). Every
state has four branches in and four branches out. The state is
s = {s1,s2,s3}, and the register equations used throughout are:

```
fb = A ^ B ^ s1 ^ s3
next state = {fb, s1 ^ B, s2 ^ B}
Y = fb ^ s2 ^ s3,   W = fb ^ s3
```

They are defined once, in `turbo_pkg::trellis_next` and
`turbo_pkg::trellis_par`. All recursion, LLR and reference code is built
from these two functions. To change the reading of the encoder, change
only these two functions.

The second encoder sees the block through the CTC interleaver, in two steps:

1. A and B are exchanged in every couple with an even index.
2. Interleaved position j takes couple P(j):

```
P(j) = (P0*j + 1 + D(j mod 4)) mod N,   D = {0, N/2+P1, P2, N/2+P3}
```

## Soft values

| quantity | width | meaning |
|---|---|---|
| channel LLR (A, B, Y1, W1, Y2, W2) | 6 bit signed | positive means '1' is more likely |
| symbol LLR (a priori / extrinsic) | 8 bit signed, 4 per couple | one per couple value 00, 01, 10, 11; the largest is always 0 |
| gamma (branch metric) | 10 bit signed, 16 per step | indexed {a,b,y,w} |
| path metric | 12 bit, wrapping | 8 per step |

The decoder is max-log-MAP, so scaling all channel LLRs by a constant does
not change its decisions.

## Decoding flow (`turbo_decoder_top`)

```
            coded-input banks 0..NPE-1            LLR memory D (natural order)
 in_rec --> [A B Y1 W1 Y2 W2 per couple]          LLR memory I (interleaved order)
                    |   ^ rotated bank reads             ^   |
                    v   |                                |   v
              PE 0 .. PE NPE-1  (sw_map_pe, lockstep) ---+---> decisions
                    ^
            parallel_interleaver (one address per step + bank rotation)
```

A block of N couples is split into NPE sub-blocks of K = N/NPE couples.
Memory bank b holds sub-block b, and PE p decodes sub-block p. The same PEs
act as both component decoders. Each iteration has two halves:

| half | PE p at step k works on | reads a priori from | writes extrinsic to |
|---|---|---|---|
| natural (decoder 1) | couple pK+k: A, B, Y1, W1 | memory D at (p, k) | memory I at the couple's interleaved position |
| interleaved (decoder 2) | interleaved position pK+k: A/B of couple P(pK+k), swapped when that index is even; Y2, W2 | memory I at (p, k) | memory D at P(pK+k); hard decision also written |

Reads are always in order from the PE's own bank. Writes go to scattered
addresses. Each fetched step carries a tag with its write-back address and
its swap flag. The tag travels through the PE with the step and comes out
with the step's LLRs, so the top needs no address buffer.

The interleaver gives the NPE PEs distinct banks at every step. As a
result, all NPE writes of a cycle hit different banks, and `bank_mem`
asserts that this holds.

Top-level sequence:

1. `start` latches N, P0..P3 and the iteration count.
2. Load: N couples are accepted on `in_valid` while `in_ready` is high.
   Memory D is cleared at the same time, so the first a priori values are 0.
3. Sweep: K cycles step the interleaver to fill its inverse-address table.
4. Decode: each half-iteration takes K + 3L + 6 cycles.
5. Output: N cycles stream `out_dec` (the decided couple {a,b}) and
   `out_llr` (the final extrinsic symbol LLRs) in natural order.
6. `done` pulses after the last output.

Record n of the input stream carries:
- A, B, Y1, W1 of couple n;
- Y2, W2 of the second encoder at interleaved position n.

Constraints on the configuration:
- N must be a multiple of 4*NPE and of NPE*L.
- P0 must be odd, smaller than N and coprime to N.
- P0..P3 must make P a permutation. For the standard's parameter sets this
  holds.

## The parallel interleaver (`parallel_interleaver`)

This block is the least obvious part of the design.

**(bank, bit) arithmetic.** Every couple index x is held as
(bank, bit) = (x / K, x mod K). Adding two such pairs mod N is simple:
- add the bit parts, and subtract K with a carry when the sum reaches K;
- add the bank parts plus the carry, in log2(NPE) bits, where NPE is a
  power of two.

No divider or multiplier is needed.

**Setup.** At `setup`, P0 and the four constants 1+D(c) are each reduced
mod N. Each is then split into a (bank, bit) pair by repeated subtraction
of K. This takes at most 5*NPE+2 cycles.

**Serial addresses.** An accumulator holds P0*k mod N and adds P0 each
step. The first PE's address is that accumulator plus the constant for
k mod 4.

**Other PEs for free.** Take position j + mK, which is PE m at the same
step. Because K is a multiple of 4, it uses the same offset D. Its address
is therefore P(j) + m*P0*K mod N: the same bit address, with bank
`bank0 + m*P0 mod NPE`. So the banks of all PEs are a fixed offset vector
rotated by the first PE's bank. Because P0 is odd, these banks are always
all different.

**Swap flag.** The natural index is even exactly when the bit address is
even, because K is even.

**Inverse addresses.** The natural half must write each result to the
couple's interleaved position, which needs P^-1. While forward addresses
are generated (in the initial sweep and in every interleaved half), the
block records one entry per step: for the single PE whose forward bank is
0, it stores `deint[bit] = (that PE, k)`. The table has K entries.

Later, at step k, PE p's couple pK+k came from interleaved position
`((m0 + p*P0) mod NPE)*K + k0`, where `(m0, k0) = deint[k]`. This uses the
fact that every odd number is its own inverse mod 2, 4 and 8, which is why
NPE is limited to 2, 4 or 8. The interleaver storage is one table of
N/NPE entries. More PEs therefore means a smaller table.

**LTE.** `qpp_interleaver` produces LTE QPP addresses
P(i) = (f1*i + f2*i^2) mod N serially, from the recursions
P(i+1) = P(i) + g(i) and g(i+1) = g(i) + 2*f2 (all mod N). It sits in the
top beside the decoder with its own ports. The decoder datapath itself is
duo-binary only (see departures below).

## Processing element (`sw_map_pe`)

Each PE contains:
- a branch metric unit (`bmu`);
- a circular gamma memory of 5L steps (`gamma_mem`);
- one forward unit (`alpha_unit`);
- a circular alpha memory of 3L steps (`alpha_mem`);
- two backward units (`beta_unit`);
- a 4-stage LLR unit (`llr_unit`).

One trellis step is processed per cycle. Cycle 0 is the first cycle after
`start`, and window w is steps wL .. wL+L-1.

| cycles | unit | work |
|---|---|---|
| t | BMU | fetch step t, store its 16 gammas and its tag |
| 2L + t | alpha | process step t, store alpha_t |
| (w+2)L .. (w+3)L-1 | beta unit (w mod 2) | train: steps (w+2)L-1 down to (w+1)L, starting from all-zero metrics |
| (w+3)L .. (w+4)L-1 | same beta unit | steps wL+L-1 down to wL; each step's alpha_t, beta_{t+1} and gamma_t go to the LLR unit |

While one beta unit trains on window w+1, the other delivers window w. The
last window of a sub-block has nothing beyond it to train on, so its beta
unit starts from all-zero metrics at the sub-block end.

LLRs leave in reverse step order inside each window. The last one leaves
K + 3L + 4 cycles after `start`, and `done` follows one cycle later.

Memory sizes:
- A gamma is written at cycle t and last read before cycle t + 4L, so 5L
  entries are enough.
- An alpha vector lives for at most 2L cycles. The memory keeps the 3L
  entries of the original sizing.

All read and write addresses are step mod depth. They are kept as running
counters, so no divider is needed.

## Wrapping metrics and the quadrant rule

Path metrics grow without bound. They are kept in 12 bits and allowed to
wrap:

- **Recursion units.** The alpha and beta units compare two metrics by the
  sign of their 12-bit difference (`mod_max`). This is correct while the
  metrics of one step are less than 2^11 apart. With the widths above the
  spread stays far below that.
- **Converting to ordinary numbers.** Where metrics must become ordinary
  numbers, `quadrant_detect` looks at the top two bits of all eight metrics
  of a step. Whichever quadrant of the circle holds none of them decides
  how to extend to 13 bits:

| free quadrant | extension |
|---|---|
| 00 or 11 | zero (the metrics straddle the unsigned midpoint) |
| 01 or 10 | sign (the metrics straddle zero) |

Where the rule is applied:
- The alpha memory stores this one extension bit with each 8-metric
  vector.
- The LLR unit computes the bit for the incoming beta vector.

Alpha and beta then carry different unknown offsets, but each offset is
common to its whole vector. Both offsets therefore cancel in the final
subtraction of the largest LLR.

## LLR unit (`llr_unit`)

The LLR unit is a four-stage pipeline:

1. Extend beta. Register alpha, beta and gamma.
2. Form the 32 branch sums alpha(s) + gamma + beta(next).
3. For each couple value, take the best of its 8 branches (Lambda).
4. Compute the extrinsic value `Lambda - gamma[{ab,0,0}]`. This removes the
   a priori and systematic part. Then subtract the largest of the four,
   saturate to -128, and take the hard decision as argmax Lambda, choosing
   the lowest value on a tie.

## Where this RTL departs from or adds to the architecture

Choices made here:

- **Widths.** All widths are this implementation's choice. The window
  length L = 10 is a parameter. It matches a gamma memory of
  5L x 16 x 10 bits = 8000 bits per PE.
- **Extension rule.** Zero versus sign extension follows the quadrant
  rule. Some descriptions say "extended by ones" instead of zero-extended.
- **Edge metrics.** Sub-block edges start from all-zero (equiprobable)
  metrics. No boundary metrics are exchanged between PEs or iterations.
- **No tail-biting.** The circular (tail-biting) start state of 802.16e is
  not handled: edges are simply equiprobable.
- **Added sequencing.** The following are additions: the load and output
  streams, the clearing of memory D, the initial K-cycle sweep that fills
  the inverse table before the first natural half, the step tags, and the
  top-level FSM.
- **Metric storage.** Path metrics are stored at the same 12 bits that
  the recursion uses, not narrower. The alpha memory adds one extension
  flag per stored vector. Metrics grow by one bit only where they are
  summed in the LLR unit.
- **Clock rate.** No timing was checked here. Throughput figures quoted
  at 500 MHz are cycle counts scaled to that clock.
- **Block lengths.** A block must split into whole windows. Partial windows
  are not supported.

Not built:

- **No LTE decoding.** The LTE code would need one-level lookahead to share
  the radix-4 recursion. That transformation was never completed in the
  original work, so only the QPP address generator is provided.
- **No encoders.** The encoders are transmitter-side. A behavioural encoder
  exists only in the testbench reference package.

## Verification

Each RTL module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/turbo_ref_pkg.sv` holds the integer
reference models:
- the component encoder;
- the CTC address formula;
- a windowed max-log-MAP that uses the same window split as the PE.

| testbench | what it checks |
|---|---|
| `turbo_decoder_top_tb` | default parameters. Encodes random blocks (240, 2400 and 480 couples; clean and noisy; 1, 2 and 4 iterations), decodes them, and compares every decision and extrinsic LLR with a reference turbo decoder run per sub-block. Checks the decode cycle count and that the clean block has no errors. Counts A/B swaps, bank rotation, inverse lookups, beta training, last-window starts, use of both beta units, wrapped alpha vectors and iterations; each must occur |
| `turbo_decoder_ber_tb` | bit error rate on BPSK / AWGN at 0.5 to 2.0 dB, 2 and 4 iterations, against uncoded BPSK (table below) |
| `turbo_decoder_npe_tb` | the decoder built with 2 PEs (1200 couples) and with 8 PEs (2400 couples, 300 per PE), exact against the reference, decode time |
| `sw_map_pe_tb` | exact extrinsic LLRs and decisions against the windowed reference, every step output once, latency |
| `llr_unit_tb` | exact LLRs and decisions from random metrics with wrapped beta, 4-cycle latency |
| `alpha_unit_tb`, `beta_unit_tb` | 1200 steps each, metrics equal to an unbounded recursion mod 2^12 |
| `quadrant_detect_tb`, `alpha_mem_tb` | extension restores true metric differences anywhere on the circle |
| `parallel_interleaver_tb` | every forward address and swap flag, every inverse address, setup time |
| `qpp_interleaver_tb` | full LTE blocks N = 40, 1008, 6144 against the closed formula |
| `gamma_mem_tb`, `bank_mem_tb`, `bmu_tb` | against model arrays or sums |

In the 2400-couple noisy test (4 iterations) all couples are decoded
correctly. With 1 iteration, a 480-couple block at the same noise level
still has a few errors.

Bit error rate from `turbo_decoder_ber_tb`. Blocks are 2400 couples, rate
1/3 without puncturing, 6-bit channel values, and 96000 bits per point:

| Eb/N0 | uncoded BPSK | 2 iterations | 4 iterations |
|---|---|---|---|
| 0.5 dB | 6.6e-2 | 1.2e-1 | 8.1e-2 |
| 1.0 dB | 5.6e-2 | 3.4e-2 | 2.1e-3 |
| 1.5 dB | 4.5e-2 | 4.7e-3 | 7.3e-5 |
| 2.0 dB | 3.8e-2 | 2.7e-4 | 9.4e-5 |

The 4-iteration values at 1.5 and 2.0 dB come from only 7 and 9 errors.
They sit at a small error floor. Its likely causes are the all-zero edge
metrics and the missing tail-biting start state. Rates below about 1e-5
would need many more blocks.

To run a testbench with plain Verilator, list the packages first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv $(ls rtl/*.sv | grep -v turbo_pkg) \
  tb/turbo_decoder_top_tb.sv --top-module turbo_decoder_top_tb
./obj_dir/Vturbo_decoder_top_tb
```

For a unit testbench, replace the last file and the top module name. The
full-size end-to-end test runs in well under a second.

## Changing it

- **Number of PEs.** `NPE` can be 2, 4 or 8. `K_MAX` is the bank depth;
  N_MAX = NPE * K_MAX.
- **Window length.** `WIN_LEN` sets the gamma and alpha memory depths and
  the schedule. Block sizes must be multiples of NPE*WIN_LEN.
- **Widths.** Change the widths in `turbo_pkg`. Keep the bound on the
  metric spread in mind: it must stay below 2^(MW-1) for the wrap-safe
  compare, and below two quadrants for the extension.
- **Interleaver parameters.** P0..P3 are run-time inputs. Load the
  standard's values for each block size.
