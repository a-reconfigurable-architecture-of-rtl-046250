# Turbo codec core for MIMO-HSDPA

HSDPA protects each downlink transport block with a rate-1/3 turbo code.
Decoding that code is the most demanding part of the receiver. It is iterative:
two soft-input soft-output (SISO) decoders pass reliability values back and
forth. Each pass walks the whole trellis forward and backward. This core holds:

- a **turbo encoder**: two 8-state recursive systematic convolutional (RSC)
  encoders and a block interleaver. An output switch sends the three coded
  bits of each step out on one serial line;
- a **turbo decoder**: two max-log-MAP SISO decoders. Each one uses three
  state-metric recursion units (forward, backward and dummy-backward) that
  work in parallel, so a block costs about one trellis step per clock cycle;
- a **hybrid last-level cache**: a conventional tag/data store plus a second
  tag/data store for blocks that keep missing. A Bloom filter and a priority
  heap choose which blocks go into that second store.

The core handles every block size from 40 to 5114 bits, with all sizes at
their defaults. Everything is synthesizable SystemVerilog (IEEE 1800-2017).
The architecture follows a published reconfigurable turbo-decoder design for
MIMO-HSDPA, which targeted a Cyclone V FPGA at 214.37 MHz. Where that
description leaves details open, this RTL makes its own choices. They are
listed in the last section of this file.

## Block map

```
turbo_codec_top
├── turbo_encoder
│   ├── block_interleaver      pi(k) address generator
│   └── rsc_encoder x2         RSC1 (natural order), RSC2 (interleaved order)
├── output_switch              S, P1, P2 of each step onto one serial line
├── turbo_decoder
│   ├── block_interleaver      fills the pi(k) table while a block loads
│   └── siso_decoder x2        SISO 1 / SISO 2
│       ├── state_metric_unit x3   forward, dummy-backward, backward
│       └── llr_unit               extrinsic output
└── hybrid_llc
    ├── bloom_filter           counting Bloom filter of missed addresses
    └── priority_heap          priorities of the retained lines
turbo_pkg                      widths, types, trellis functions
```

The encoder, the decoder and the cache sit side by side in the top level, and
all their ports are brought out. The channel lies between encoder and decoder:
modulation, radio, demodulation to LLRs. The published design places the cache
in the decoding system to ease memory bandwidth, but it does not say which
accesses go through it. The cache therefore has its own request port and its
own port to the next memory level.

## The code

- Constituent code: the 3GPP RSC, with feedback polynomial 1 + D² + D³ and
  feed-forward polynomial 1 + D + D³. A state is `{s1,s2,s3}`, where s1 is the
  newest bit. For input u, the feedback bit is `a = u ^ s2 ^ s3`, the parity
  is `a ^ s1 ^ s3`, and the next state is `{a, s1, s2}`. The functions
  `rsc_fb`, `rsc_parity` and `rsc_next` in `turbo_pkg` are used by both the
  encoder and the decoder.
- No trellis termination: both encoders start in state 0, and no tail bits
  are sent. The decoder starts its backward recursion at the end of the block
  from all-equal metrics.
- Interleaver: the K bits are written row by row into a matrix of 20 rows and
  C = ceil(K/20) columns, then read out column by column. Positions at or
  beyond K are skipped. The k-th interleaved bit is therefore the bit with
  natural index pi(k). `block_interleaver` walks this read order and visits
  one matrix position per clock. A skipped position shows up as a one-cycle
  gap (`valid` low), and at most 19 positions are skipped per block. This is
  not the 3GPP prime-permutation interleaver, so the code is not
  bit-compatible with a 3GPP UE.

## Encoder timing

`turbo_encoder` first stores the whole block, because RSC2 needs bits from
anywhere in it. The sequence is:

1. A `start` pulse carries `k_len`.
2. K bits arrive on `in_valid`/`in_bit`; the encoder takes them while
   `in_ready` is high.
3. K triples (`out_sys`, `out_p1`, `out_p2`) leave in order, one per cycle
   except at the interleaver gaps. `out_last` marks the final triple.
   A triple waits while `out_ready` is low. The wait holds the interleaver
   and both RSC registers.

With `out_ready` held high, the output phase takes at most K + 19 cycles.

`output_switch` takes one triple at a time and sends S, then P1, then P2 on
one line, with a valid/ready handshake on both sides. It accepts the triple
in the cycle its P2 bit leaves. At one bit per clock it therefore asks for a
new triple every third cycle. The top level brings out this serial stream
(`enc_data_*`).

## Decoder

### Soft values

All soft values are log-likelihood ratios, LLR = log P(1)/P(0), so a positive
value means 1.

| quantity | width | notes |
|---|---|---|
| channel LLR (S', P1', P2') | 6 bit signed | input ports |
| extrinsic LLR | 8 bit signed | saturated to ±127 |
| gsys = Ls + La | 10 bit signed | systematic + a-priori |
| state metric | 14 bit signed | normalised every step |
| a-posteriori output | 11 bit signed | Ls + Le1 + Le2 |

The branch metric of a trellis step is `gamma = u·gsys + p·lp`, where u is the
input bit, p is the branch's parity bit and lp is the parity LLR. Using 0/1
weights instead of ±½ adds the same constant to every branch of a step. The
max operations cancel that constant.

Each recursion step subtracts the new metric of state 0 from all eight
metrics. Outputs depend only on metric differences, so this normalisation
changes no output. The metric spread stays far inside 14 bits.

### Max-log recursions (`state_metric_unit`, `llr_unit`)

The forward recursion is `alpha_{k+1}(s) = max (alpha_k(s') + gamma_k(s',s))`.
The backward recursion is `beta_k(s') = max (beta_{k+1}(s) + gamma_k(s',s))`.
One `state_metric_unit` computes all eight add-compare-select operations of
one step in a single combinational stage. A parameter selects the direction.

`llr_unit` computes the extrinsic value of a step as the difference of two
maxima of `alpha_k(s') + p·lp + beta_{k+1}(s)`: one over the u=1 branches, one
over the u=0 branches. The systematic and a-priori terms are left out, so the
result is already the extrinsic part of the a-posteriori LLR.

### Sliding-window schedule (`siso_decoder`)

This is the part that needs the most care. The block is split into
N = ceil(K/W) windows of W = 32 steps; the last window may be shorter. Time is
split into periods of W cycles. In period p the three units work on three
different windows:

| unit | window | direction | starts from | produces |
|---|---|---|---|---|
| forward | p | k ascending | its own result of period p-1 (state 0 at k=0) | alpha_k, stored in window bank p mod 2 |
| dummy-backward | p+1 | k descending | all-equal metrics | beta at the start of window p+1 |
| backward | p-1 | k descending | dummy result of period p-1, or all-equal at the block end | beta_k, and with the stored alpha, the extrinsic Le_k |

Example for N = 4 (F = forward, D = dummy, B = backward; the number is the
window):

```
period   0     1     2     3     4
F        0     1     2     3     -
D        1     2     3     -     -
B        -     0     1     2     3
```

Each window runs through the dummy unit one period before the backward unit
needs its starting value. That value comes from a full window of warm-up
steps. The alpha buffer holds two windows (2 × 32 × 8 metrics), so forward
results are kept for exactly one period.

A block takes (N+1)·W cycles: one step per clock, plus one window of latency.
Extrinsic values leave in reverse order within each window, on
`ext_valid`/`ext_addr`/`ext_val`. The user writes them into memory by address.

The three units read branch values through three separate ports (`addr_*`
out, `br_*` in), and the data must arrive in the same cycle. In the decoder
these ports are combinational reads of the block memories.

### Iterations (`turbo_decoder`)

The block memories are:

- channel values: `ls`, `p1`, `p2`;
- extrinsic values: `e1` (SISO 1 output, natural order) and `e2` (SISO 2
  output, stored de-interleaved in natural order);
- the interleaver table `pi`.

An iteration has two halves:

- **SISO 1** works in natural order. It reads `gsys = ls[k] + e2[k]` and
  `lp = p1[k]`, and writes `e1[k]`.
- **SISO 2** works in interleaved order. It reads
  `gsys = ls[pi(k)] + e1[pi(k)]` and `lp = p2[k]`, and writes `e2[pi(k)]`.
  Writing through pi is the de-interleaver.

No memory is read and written in the same half-iteration. After `n_iter`
iterations, each bit's a-posteriori value `L = ls + e1 + e2` goes to the hard
decision (`out_bit = L > 0`). The bits leave in natural order, one per cycle.

A block goes through these phases:

| phase | cycles |
|---|---|
| load (the pi table is built at the same time) | K, plus up to 19 while the table finishes |
| each half-iteration | (N+1)·32 + 1 |
| output | K |

The phases do not overlap.

**Handshake:**

1. A `start` pulse carries `k_len` and `n_iter` (1..15; 0 counts as 1).
2. K triples arrive on `in_valid`; the decoder takes them while `in_ready` is
   high.
3. After the iterations, the outputs come on `out_valid`/`out_idx`/
   `out_bit`/`out_llr`, with `out_last` on the last bit.

`busy` covers the whole block, and `iter_count` counts finished iterations.

### Throughput

Take K = 5114 with 5 iterations. The iterations take 51 530 cycles, and a
whole block with load and output takes 61 764 cycles. At the 214.37 MHz
reported for the published FPGA implementation, that is 21.27 Mb/s while
iterating and 17.75 Mb/s per block. With 6 iterations the block figure is
15.2 Mb/s. The published decoder figure is 21.37 Mb/s, so it is reached only
if load and output overlap the iterations, which this RTL does not do. The
13.5 Mb/s system figure is met. The clock frequency itself has not been
checked for this RTL.

## Hybrid last-level cache (`hybrid_llc`)

The cache handles reads only, one request at a time, and each line holds one
word. Its parts are:

- **Main store**: direct-mapped, `SETS` = 64 lines, with tag, data and valid
  bit.
- **Retention store**: fully associative, `NRET` = 8 lines.
- **Bloom filter**: 256 saturating 3-bit counters and two XOR-fold hashes.
  Every miss increments both counters of the missed address. A query returns
  the smaller of the two counters, which over-estimates how often the address
  has missed, or is 0 if it never has.
- **Priority heap**: one priority per retention slot. Its root is the
  lowest-priority slot, and an empty slot counts as priority 0. The root is
  found with a comparator tree in the same cycle; there are no multi-cycle
  heap sift operations.

A request is served as follows:

1. The address is looked up in both stores in the cycle after it is accepted.
2. On a hit, the data comes back in that cycle, and `resp_hit_main` or
   `resp_hit_ret` says which store hit. A hit in the retention store raises
   that line's priority by one.
3. On a miss, the address goes into the Bloom filter, and the cache fetches
   the word from the next level (`mem_req_*`, `mem_resp_*`).
4. The refill overwrites the main-store line. If that line held a valid
   block, the cache compares the victim's Bloom count with the heap's lowest
   priority. If the count is higher, the victim moves into the root slot with
   the count as its priority. Otherwise it is dropped.
5. The answer leaves in the refill cycle.

So blocks that keep conflicting in the main store end up in the retention
store. `n_retained` counts the victims that were kept.

## Simulation

Each testbench compares the RTL against behavioural models written separately
from it. For the turbo code the models are in `tb/turbo_ref_pkg.sv`:

- a shift-register RSC;
- a matrix interleaver;
- a max-log-MAP decoder on plain integers with the same window schedule.

The decoder must match that model bit for bit. The cache testbenches carry
their own integer models of the filter, the heap and the replacement rule.

| testbench | what it checks |
|---|---|
| `tb_rsc_encoder`, `tb_block_interleaver`, `tb_turbo_encoder` | parity and state; pi(k) for K = 40…5114; S/P1/P2 streams, with and without backpressure; cycle bounds |
| `tb_output_switch` | serial order S, P1, P2; last marker; one bit per clock |
| `tb_state_metric_unit`, `tb_llr_unit` | ACS and extrinsic results on random metrics, including saturation |
| `tb_siso_decoder` | extrinsic values bit-exact for K = 20…5114; cycle count (N+1)·W |
| `tb_turbo_decoder` | bit-exact a-posteriori values; correction of noisy blocks; iteration cycle count |
| `tb_bloom_filter`, `tb_priority_heap`, `tb_hybrid_llc` | filter counters, heap root, and the cache policy against an integer model with a random-latency memory |
| `tb_turbo_codec_top` | end to end at default sizes (K = 40, 333, 5114): encode, serialise under random backpressure, noisy channel, decode, and cache traffic; each mechanism must occur |
| `tb_decoder_throughput` | phase cycle counts and the throughput figures above |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/tb_turbo_codec_top.sv \
  --top-module tb_turbo_codec_top -o sim && ./obj_dir/sim
```

The RTL also carries concurrent assertions, which verilator checks when given
`--assert`:

- the interleaver, the encoder and the cache's refill request hold their
  offer until it is taken;
- a cache answer names exactly one source;
- the SISO recursion units never address a step beyond the block.
- the two SISO decoders never run at the same time;
- decoding starts only after the interleaver table is complete.

Each testbench ends with `TB_RESULT checks=N failures=M`. All of them finish
in well under a second of simulation time.

## Choices made in this RTL

The published description gives:

- the encoder structure: two RSCs with an interleaver, block sizes 40–5114;
- the decoder structure: two SISO decoders, interleaver, de-interleaver and
  slicer;
- max-log-MAP with forward, backward and dummy-backward units in parallel, at
  one trellis step per clock;
- the cache's parts: two tag/data blocks, a Bloom filter, a heap, a compare
  stage and tri-state output buffers.

This RTL chose:

- the RSC polynomials (standard 3GPP) and no trellis termination;
- the row/column interleaver (20 rows) instead of the 3GPP one;
- all widths; window length 32 (must be a power of two); the initial forward
  metrics (0 / −256);
- extrinsic saturation at ±127, and no extrinsic scaling;
- the iteration count as an input, with no early stopping;
- non-overlapped load, decode and output phases;
- that the two SISO decoders take turns on shared memories;
- the decision variable `ls + e1 + e2`;
- the S, P1, P2 order on the serial output, and all valid/ready handshakes;
- all cache sizes, the read-only single-word-line organisation, the counting
  Bloom filter, the replacement rule, and multiplexers in place of tri-state
  buffers;
- the cache's connection to the decoder, which is left open.

Not provided, because only their names are given:

- the other stages of the HS-DSCH transmit chain: CRC attachment, code-block
  segmentation, hybrid-ARQ, physical-channel segmentation, HS-DSCH
  interleaving, 16-QAM constellation rearrangement, physical-channel mapping;
- any adaptation of the cache to QPSK, 16-QAM or 64-QAM.
