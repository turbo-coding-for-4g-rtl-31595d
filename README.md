# Parallel-window turbo codec with a collision-free interleaver

A turbo decoder gets its speed from running several MAP (maximum a-posteriori)
decoders at once. Each one works on its own window of the received block. The
hard part is memory access. After each half-iteration every window must write
its extrinsic value into a position chosen by the interleaver. If two windows
need the same memory bank in the same cycle, one must wait. This design avoids
that stall in two ways:

1. **A collision-free interleaver.** It is built so that, at every step, the P
   windows always address P different banks. No window ever waits, and each
   bank can be a small single-port memory.
2. **A decoding schedule** in which every extrinsic value goes back to the
   location its a-priori value came from. The first decoder reads and writes
   in natural order. The second reads in interleaved order and writes in
   deinterleaved order. So if interleaving is collision-free, deinterleaving is
   too, and one extrinsic memory serves both decoders.

The codec uses the 8-state constituent code of the UMTS (3GPP) turbo code
with rate 1/3. Blocks are not terminated (no tail bits). Block sizes run from
32 to 432 bits, set per block. The decoder uses max-log-MAP. The default
configuration has 4 parallel windows and 4 banks per memory, and windows of up
to 108 steps (N = 432).

## Structure

```
turbo_codec_top
├── turbo_encoder            rate-1/3 PCCC encoder
│   ├── cf_addr_gen          interleaver addresses
│   └── rsc_encoder ×2       C1 (natural order), C2 (interleaved order)
└── turbo_decoder            iterative decoder and controller
    ├── cf_addr_gen          interleaver addresses for the second half-iteration
    ├── sp_ram ×4P           banks: extrinsic+decision, ys, y1p, y2p
    ├── bank_xbar ×2         window <-> bank routing (extrinsic, ys)
    └── siso_window ×P       max-log-MAP window processors
turbo_pkg                    trellis functions, widths, controller phases
```

The encoder and the decoder are independent paths that share only clock and
reset. The channel, the modulation and the demapping to soft values lie
outside the core.

## The collision-free interleaver (`cf_addr_gen`)

Linear position `n` of a block of N = P·L symbols lives in bank `n / L`, at
address `n % L`. So bank b holds window b of the natural order. Write the block
row by row into a P × L matrix: row b is bank b.

In the interleaved order, window k handles positions `k·L .. k·L+L-1`, and at
step t all P windows handle their t-th symbol together. The permutation reads
the matrix column by column. Each column is cyclically shifted by its own
index before it is read. With `t = g·P + r` (0 ≤ r < P), window k at step t
takes:

```
bank(k, t)    = (r − k) mod P
address(k, t) = g·P + k
```

For a fixed t the banks `(r − k) mod P` differ for all k, so the access never
collides. The addresses are computed on the fly from an addition and a modulo,
with no permutation table. With P a power of two both are bit selections.

Worked example with N = 16 and P = L = 4. The matrix rows are 0–3, 4–7, 8–11
and 12–15. The interleaved windows are:

| window | step 0 | step 1 | step 2 | step 3 |
|--------|-------:|-------:|-------:|-------:|
| W0     | 0      | 4      | 8      | 12     |
| W1     | 13     | 1      | 5      | 9      |
| W2     | 10     | 14     | 2      | 6      |
| W3     | 7      | 11     | 15     | 3      |

At step 0 the windows touch 0, 13, 10 and 7, which lie in banks 0, 3, 2 and 1:
all different. Without the shifts (plain column reading), all four windows
would address one and the same bank at every step.

The square construction needs L = P. For longer windows this design repeats it
on each group of P columns, so **L must be a multiple of P**. With P = 4 the
block size must therefore be a multiple of 16.

Any permutation inside a row keeps the property, since it stays in the same
bank. So does any reordering of the rows' shift amounts, as long as the shifts
stay distinct. A production interleaver would add such permutations for better
spreading. This generator does not: it produces the plain cyclic-shift pattern.
The regular pattern spreads poorly, which shows in the error rates below.

## Decoding schedule (`turbo_decoder`)

Memories. Each of these is P single-port banks of L words:

| memory    | word                      | written            | read                                    |
|-----------|---------------------------|--------------------|-----------------------------------------|
| ys        | systematic soft value     | load               | both halves (routed by `bank_xbar`)     |
| y1p       | C1 parity soft value      | load               | half 1, window k from bank k            |
| y2p       | C2 parity, interleaved j  | load               | half 2, window k from bank k            |
| extrinsic | {hard decision, extrinsic}| both halves, output| both halves (routed by `bank_xbar`)     |

How one iteration runs:

| half | window k, step t reads                                  | writes extrinsic to        |
|------|---------------------------------------------------------|----------------------------|
| 1 (D1) | ys, a-priori at bank k / address t; y1p bank k / t    | bank k / address t         |
| 2 (D2) | ys, a-priori at `bank(k,t)` / `address(k,t)`; y2p bank k / t | `bank(k,t)` / `address(k,t)` |

A half-iteration first reads (the forward pass of every window) and then
writes (the backward pass). So a bank never has to read and write in the same
cycle. Each extrinsic word also stores that position's hard decision. After
the last iteration, the decisions written by D2 (in deinterleaved order) are
read out in natural order.

Timing, for a block with window length L and I iterations:

| phase              | cycles                                                    |
|--------------------|-----------------------------------------------------------|
| load               | N = P·L (one soft triple per cycle)                       |
| one half-iteration | 2L + 3: start, L reads, last read data, L write-backs, hand-over |
| first output bit   | I·2·(2L+3) + 1 after the last input                       |
| output             | N (one bit per cycle, natural order)                      |

At N = 432 (L = 108) that is 438 cycles per iteration. A new block is accepted
once the previous one has been read out; blocks do not overlap.

`bank_xbar` routes each window to the bank it names and back. It raises
`collision` (and fails an assertion) if two windows ever name one bank. The
interleaver guarantees this never happens, so there is no stall logic.

## The window processor (`siso_window`)

Max-log-MAP over the 8-state trellis. The branch metric of a transition with
input bit u and parity bit p is `u·(sys + apr) + p·par`. LLRs are
`log P(1)/P(0)`, so positive means one.

- **Forward pass**, one step per input. It stores the branch-metric inputs and
  the current forward metrics α in local memories, then updates α.
- **Backward pass**, one step per cycle from t = L−1 to 0. It updates β and
  forms the LLR as the best transition with u = 1 minus the best with u = 0.
  It outputs the extrinsic value (LLR − sys − apr) and the hard decision
  (LLR > 0).

So a window takes 2L cycles and gives its first extrinsic value L cycles after
its first input.

- **Start states.** Window 0 starts its forward recursion in state 0, because
  both encoders start there. The other windows start from equal metrics.
  Every backward recursion starts from equal metrics, because blocks are not
  terminated. No training steps are run past window edges.
- **Fixed point.** Channel values are 6 bits, extrinsic values 8 bits
  (saturated), and state metrics 12 bits. State metrics are normalised each
  step by subtracting their maximum and are then saturated. The extrinsic
  values are not scaled.

## Encoder (`turbo_encoder`, `rsc_encoder`)

Each constituent encoder has feedback 1 + D² + D³ and parity 1 + D + D³. The
encoder first buffers the N information bits in P banks. It then puts out one
triple (s, c1, c2) per cycle. C1 encodes bit j; C2 encodes the interleaved bit
at `bank(k,t)`, `address(k,t)` for j = k·L + t. This is the order in which the
decoder's second half-iteration reads, so `y2p[j]` is fed to the decoder as
position j.

## Interfaces

Everything is synchronous to `clk`, with an active-low asynchronous `rst_n`.

- Encoder: while `enc_in_ready` is high, give one bit per cycle with
  `enc_in_valid`. `enc_win_len` (L) is sampled with the first bit. One cycle
  after the N-th bit, `enc_out_valid` is high for N consecutive cycles with
  `enc_out_s/c1/c2` and `enc_out_pos`. There is no back-pressure.
- Decoder: while `dec_in_ready` is high, give one triple
  (`dec_in_ys`, `dec_in_y1p`, `dec_in_y2p`, 6-bit signed) per cycle.
  `dec_win_len` and `dec_n_iter` (0 counts as 1) are sampled with the first
  triple. The decided bits come out as `dec_out_valid`, `dec_out_bit` and
  `dec_out_pos`.
- Status outputs:
  - `dec_half_done` pulses at the end of each half-iteration.
  - `dec_xbar_perm` is high while a non-identity routing is in use.
  - `dec_collision` should never be seen high.
- A punctured position can be given to the decoder as soft value 0. No
  puncturer or depuncturer is included.

Parameters: `P` (windows = banks, default 4) and `WMAX` (largest window,
default 108). The widths are in `turbo_pkg`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. The reference models are in
`tb/turbo_ref_pkg.sv`, written separately from the RTL:

- a trellis built from the polynomials;
- an interleaver built from the matrix description;
- an integer max-log-MAP with the same fixed-point rules;
- the whole parallel schedule.

| testbench            | what it shows |
|----------------------|---------------|
| `tb_rsc_encoder`     | impulse response, random streams, init/enable |
| `tb_cf_addr_gen`     | the 16-entry example above; bijection, no collision and match to the reference at P = 4, L = 108 and at P = 3, L = 12 |
| `tb_sp_ram`          | read latency, write, hold |
| `tb_bank_xbar`       | routing of random permutations, identity flag, collision flag |
| `tb_siso_window`     | bit-exact extrinsic values and decisions for random windows of length 1–108, output order and timing |
| `tb_turbo_encoder`   | N = 32, 64, 432 and a 2-bank instance against the reference encoder |
| `tb_turbo_decoder`   | bit-exact decisions against the reference schedule, 1–5 iterations, N = 32–432, latency formula |
| `tb_turbo_decoder_scaled` | the same bit-exact comparison for decoders with 2 windows (L ≤ 8) and 8 windows (L ≤ 16), using the helper `dec_harness` |
| `tb_turbo_codec_top` | end to end at the default size: encode, channel, decode; checks encoder output, decoder output (bit-exact and error-free without noise), both latencies, and that half-iterations, permuted routing, corrected channel errors, smallest and largest blocks and several iterations all occur, with no collision |
| `tb_ber_432`         | bit error rate, N = 432, rate 1/3, BPSK/AWGN, 8 iterations, 6 blocks per point |

Results of `tb_ber_432` (2592 bits per point, so only a coarse estimate):

| Eb/N0  | channel BER | decoded BER |
|--------|-------------|-------------|
| 0.5 dB | 0.185       | 0.078       |
| 1.0 dB | 0.172       | 0.046       |
| 1.5 dB | 0.157       | 0.011       |
| 2.0 dB | 0.150       | 0.0027      |

A well-designed turbo code of this size and rate reaches about 1e-5 near
2 dB. This design falls short of that for three reasons:

- the interleaver is the plain cyclic-shift pattern, without the extra
  row permutations;
- window edges start from equal metrics;
- the extrinsic values are not scaled.

All three are places to improve it; the architecture stays the same.

To simulate, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv \
    rtl/*.sv tb/tb_turbo_codec_top.sv --top-module tb_turbo_codec_top -o sim
./obj_dir/sim
```

Every testbench runs in under a second.

## Where this design departs from, or goes beyond, the original architecture

- **Interleaver.** The original adds an inter-row permutation (that of the
  UMTS interleaver) and a random-like intra-row permutation. Their details
  are not available, so only the cyclic-shift base pattern is built. The
  window length L must be a multiple of P.
- **Memories.** The banks are single-port, which suffices for this schedule.
  The original chip is reported to use 66 two-port SRAM macros (36 kbit in
  total). That memory plan is not reproduced.
- **Throughput and latency.** The original core is reported at 80.7 Mbit/s,
  under 10 µs latency, 170.9 MHz in 0.18 µm. This design does not overlap
  load, decoding and output. At 170.9 MHz a 432-bit block takes 5.1 µs to
  decode with 2 iterations and 10.3 µs with 4 (plus 2.5 µs each for load and
  output).
- **Chosen here, not specified by the original:**
  - fixed-point widths;
  - window edge handling;
  - the iteration count, set at run time;
  - where the hard decision is taken (second decoder, last iteration);
  - the handshakes;
  - the generalisation of the interleaver to windows longer than P.
- **Not included:**
  - puncturing for rates 1/2, 2/3 and 3/4, whose patterns are not specified;
  - the pad ring.
