# Wave-pipelined ARA-LDPC codec (8-bit words, 1024-bit blocks)

This is a small rate-1/2 error-correcting codec built around an
Accumulate-Repeat-Accumulate (ARA) code, a subclass of LDPC codes. ARA codes
are attractive for deep-space links because their encoder is cheap. For a
fixed code, the whole accumulate / puncture / repeat / interleave / accumulate
chain collapses into a handful of XOR gates. Here those gates are operated as
a *wave pipeline*: there is no pipeline register inside the logic. New data is
launched every clock while the previous word is still in flight, and
throughput is bounded by the spread of path delays, not by the longest path.
The receiving side is an iterative hard-decision (majority-vote) LDPC decoder
that works on the code's Tanner graph.

The design follows the paper *Analysis of Wave-Pipelined Architecture of
ARA-LDPC Codes*. It takes that paper's code matrix, word length, block size
and decoding algorithm. The handshakes, framing, iteration limit and several
smaller decisions are this implementation's own; they are listed in
[Own choices and departures](#own-choices-and-departures).

## The code

Each 8-bit message word `m[7:0]` becomes a 16-bit systematic codeword
`c[15:0] = {p[7:0], m[7:0]}`. The generator matrix is `G = [I | P]`, with the
parity part

| message bit | feeds parity bits |
|---|---|
| m0 | p1 p3 p5 p6 p7 |
| m1 | p1 p3 |
| m2 | p2 p4 p5 |
| m3 | p2 p4 p5 p6 p7 |
| m4 | p3 p7 |
| m5 | p3 |
| m6 | p0 p1 p2 p3 |
| m7 | p4 p5 p6 p7 |

so `p[j]` is the XOR of all `m[i]` listed against it. The parity-check matrix
is `H = [Pᵀ | I]`. Check node `f_j` covers the message bits feeding `p[j]`,
plus `c[8+j]` itself. Every valid codeword satisfies `c·Hᵀ = 0`. The Tanner
graph has 16 bit nodes and 8 check nodes. For example, `f0 = {c6, c8}` and
`f1 = {c0, c1, c6, c9}`. Bit node `c3` joins checks `f2 f4 f5 f6 f7`, and each
parity bit `c8..c15` joins exactly one check.

`rtl/ara_pkg.sv` holds `P` (`P_ROW`) and derives `H` rows and columns from it
with the functions `h_row(j)` and `h_col(i)`. To use a different code of the
same shape, change `P_ROW`. Everything else, including the decoder wiring, is
generated from it.

**How much this code can correct.** Message bit m5 feeds only p3, so
`m = 0x20` gives a codeword of weight 2. The minimum distance is therefore 2:
the code *detects* any single error but cannot correct all of them. With the
majority-vote decoder below, a single flipped bit in c1, c2 or c4 is repaired
in one iteration. A single error anywhere else leaves the decoder oscillating
until the iteration limit, and the word comes out flagged `converged = 0`.
Treat the `converged` flag as the primary error indication.

## Encoder: the wave pipeline

`ara_wp_encoder` has exactly one register stage: the 8-bit input word and a
valid flag. Behind it sits `ara_parity_network`, a flat XOR network that
computes `p = m·P`. Nothing is registered inside the network. The codeword
leaves as `{parity, registered message}`.

* Latency: one clock from `in_valid`/`in_msg` to `out_valid`/`out_cw`.
* Throughput: one word per clock, with no back-pressure. A launched wave
  cannot be stopped, so the consumer must accept every word.
* Register count: one input register only, rather than a register between
  each pair of the stages a conventional pipeline would have. This is where
  the area and power advantage of the wave-pipelined form comes from.

What RTL cannot show is the part that makes a wave pipeline work physically.
Buffers are inserted into the short paths of the XOR network so that all
paths from the input register to the outputs have nearly equal delay. The
clock period can then be shorter than the longest path, with several words in
flight at once. Those buffers have no logic function, so they are not in the
RTL, and a synthesis tool would remove them as redundant. Delay balancing
belongs to place-and-route (keep/dont-touch buffer cells, or relative
placement) for the target technology. Logically, and in simulation, the
encoder is simply "register, then combinational parity".

The encoder is the composition of outer accumulator → puncturing (periodic
patterns such as X0, 0X, 00X) → repeat-by-3 → interleaver → inner
accumulator → puncturing. It is implemented through its generator matrix
rather than stage by stage. The individual interleaver permutation and
puncturing alignment that produce this particular `P` are not available, and
for a fixed code the flat XOR form is also the smallest and best balanced.

## Decoder: majority-vote message passing

`ara_hd_decoder` builds the Tanner graph fully in parallel: 8 `ara_check_node`
and 16 `ara_bit_node` instances, connected by masks generated from `H`. Each
clock performs one decoding iteration.

1. Every bit node presents its current estimate. At the start this is the
   received bit.
2. Every check node computes its parity. For each connected bit node it also
   returns the value that bit should have if all the others are right: the
   XOR of the other connected bits, i.e. `parity ^ bit`. If all 8 parities
   are 0 (`c·Hᵀ = 0`), decoding stops and the word is delivered with
   `converged = 1`.
3. Otherwise, every bit node replaces its estimate with the majority of its
   received bit and its check messages. A tie (possible with an even number
   of votes, e.g. the parity bits, which have 2) keeps the received bit.
   Decoding then goes back to step 2.

The second stop rule is the iteration limit. After `MAX_ITER` (default 8)
updates with the syndrome still non-zero, the current estimate is delivered
with `converged = 0`.

**Interface and timing.** The input side is valid/ready: `in_valid`,
`in_ready`, `in_cw`. The output side is valid/ready too: `out_valid`,
`out_ready`, `out_msg`, `out_cw`, `out_converged`, `out_iters`. `out_msg` is
`out_cw[7:0]`, since the code is systematic. A word that needs `k` updates
shows `out_valid` exactly `k + 2` clocks after it is taken:

* 2 clocks for a clean word;
* 3 clocks for a one-iteration repair;
* `MAX_ITER + 2` clocks for a word that hits the limit.

The result is held until `out_ready`, and an assertion checks that it stays
stable. A new word can be taken in the same clock the previous result is
accepted. The decoder therefore sustains one clean word every 2 clocks.

## Block framing

The codec moves one word at a time. A block is 1024 message bits, i.e. 128
words, or 2048 code bits. `ara_block_framer` counts words that move and flags
the first (`sob`) and last (`eob`) word of every block. It also exposes the
word index and a wrapping count of completed blocks. The top level has one
framer on the encoder output and one on the decoder output, the latter
advancing only when a result is accepted.

## Top level: `ara_ldpc_top`

Both ends of the link sit side by side and share only `clk` and `rst_n`
(synchronous, active low).

| group | signals |
|---|---|
| encoder in | `enc_in_valid`, `enc_in_msg[7:0]` |
| encoder out | `enc_out_valid`, `enc_out_cw[15:0]`, `enc_out_sob`, `enc_out_eob`, `enc_word_idx[6:0]`, `enc_blocks[15:0]` |
| decoder in | `dec_in_valid`, `dec_in_ready` (out), `dec_in_cw[15:0]` |
| decoder out | `dec_out_valid`, `dec_out_ready` (in), `dec_out_msg[7:0]`, `dec_out_cw[15:0]`, `dec_out_converged`, `dec_out_iters[3:0]`, `dec_out_sob`, `dec_out_eob`, `dec_word_idx[6:0]`, `dec_blocks[15:0]` |

Parameters: `BLOCK_WORDS = 128` (1024-bit blocks of 8-bit words) and
`MAX_ITER = 8`.

After coarse synthesis the whole top is about 210 word-level cells and 95
flip-flops. The encoder alone uses 9 flip-flops (8 data plus valid) and about 17
word-level cells.

## Files

| file | contents |
|---|---|
| `rtl/ara_pkg.sv` | sizes, types, `P_ROW`, `h_row`, `h_col`, `parity_of` |
| `rtl/ara_parity_network.sv` | combinational parity generator |
| `rtl/ara_wp_encoder.sv` | wave-pipelined encoder |
| `rtl/ara_check_node.sv` | check node: parity and extrinsic responses |
| `rtl/ara_bit_node.sv` | bit node: majority vote |
| `rtl/ara_hd_decoder.sv` | iterative decoder with both stop rules |
| `rtl/ara_block_framer.sv` | 1024-bit block framing |
| `rtl/ara_ldpc_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench computes its expected values independently of the RTL, from
the generator matrix written out bit by bit. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_ara_pkg`: the derived `H` rows and columns match the listed Tanner-graph
  connections; `parity_of` is checked for all 256 words; every codeword
  satisfies every check.
* `tb_ara_parity_network`: all 256 messages.
* `tb_ara_wp_encoder`: 600 words, back to back and then with gaps. It checks
  the one-clock latency, one word per clock, the codeword and `c·Hᵀ = 0`.
* `tb_ara_check_node`, `tb_ara_bit_node`: worked Tanner-graph examples, plus
  exhaustive or random inputs, covering bit nodes of degree 1, 2, 3 and 5
  (ties included).
* `tb_ara_hd_decoder`: all 256 clean codewords, all 4096 single-error words
  and 1000 random words. It uses random input gaps and output back-pressure,
  against a reference model of the algorithm, and checks result, converged
  flag, iteration count and the `k + 2` latency. A final burst of clean
  words must be taken every 2 clocks.
* `tb_ara_ldpc_top`: end to end at the default parameters. Two full 1024-bit
  blocks are encoded, the first back to back and the second with gaps. They
  pass a channel that leaves words clean, flips a repairable bit or flips an
  unrepairable one, and are then decoded under back-pressure. The testbench
  checks codewords, decoded words, original messages for clean and repaired
  words, and block framing on both sides. It also requires that back-to-back
  encoding, encoder gaps, block ends, clean acceptance, correction, the
  iteration-limit stop and output stalls each happen at least once.

To run one, for example the top-level test, with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/ara_pkg.sv tb/tb_ara_ldpc_top.sv --top-module tb_ara_ldpc_top
    ./obj_dir/Vtb_ara_ldpc_top

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ara_pkg.sv rtl/ara_ldpc_top.sv`.
The package must be listed first; modules are found through `-y rtl`.

## Own choices and departures

* **H matrix**: taken as `[Pᵀ | I]`, the systematic form implied by `G`. It
  reproduces every Tanner-graph connection given for the code.
* **Signal order**: bit `i` of the codeword vector is `c_i`, and parity
  occupies the upper byte.
* **Encoder handshake**: the valid flag and synchronous reset are additions.
  The wave-pipelined encoder is specified with only its 8 input flip-flops.
  There is no back-pressure.
* **Decoder schedule and stop rules**: one iteration per clock, fully
  parallel, with the syndrome tested before each update. `MAX_ITER = 8` is
  a chosen value.
* **Tie rule**: a tie in a bit node keeps the received bit. A rule that
  flips on ties would repair more single errors (those in the parity bits),
  but is not used.
* **Decoder interface**: valid/ready handshakes and the `converged` and
  `iters` outputs are additions.
* **Block framing**: the framer's counters and flags are additions. Only the
  block and word sizes are given.
* **Not built**:
  * the delay-equalising buffers (physical, see above);
  * a stage-by-stage accumulate/repeat/interleave/accumulate encoder (its
    interleaver permutation is unknown);
  * the sequential and 2- and 3-stage pipelined encoders that the
    wave-pipelined one was compared against;
  * soft-decision decoders (Min-Sum, Sum-Product), mentioned only as
    alternatives.
