# Multi-stage threshold decoding (MTD) codec for a rate-0.8 convolutional code

A 100 Gb/s optical link needs an error-correcting code that adds at most
about 20 % redundancy and still gives more than 10 dB of coding gain at bit
error rates of 10^-12 and below. This design uses a high-rate
*self-orthogonal convolutional code* and decodes it with *multi-stage
threshold decoding* (MTD). MTD is iterative, soft-decision bit flipping
built from little more than shift registers, XOR gates and small adders. Each
information bit is checked by J parity checks that share no other bit, so a
simple weighted majority vote over those checks decides whether the bit should
be flipped. The vote is repeated over the block until nothing changes. A light
outer parity-check code then fixes the few bits the vote cannot move.

The RTL implements the whole chain for the main configuration of the scheme:

* code: type-2 self-orthogonal convolutional code (SOCC:TP2) with m = 8
  information sequences, n = 2 parity sequences and J = 12 orthogonal checks
  per bit (6 from each parity sequence), so the rate is 8/10 and the minimum
  distance is 13. Tail-biting termination with blocks of K = 10506 columns
  (105 060 code bits);
* outer code: one even-parity bit after every 50 information bits of each
  sequence, which gives an overall rate of 0.8 × 50/51 = 78.4 %;
* decoder: CMTDF (weighted-bit-flipping MTD and soft MTD alternating, with
  feedback), optional two-step decoding (2SD), parity-check (PC) decoding, and
  2 × 5 checksum elements working in parallel.

## The code

Information arrives as columns of 8 bits, one bit per information sequence
u_0..u_7. Parity sequence p carries

    v_p(i) = XOR over k = 0..7 and a = 0..5 of u_k(i - TAP[k][p][a])

where `TAP[k][p][a]` is the a-th tap of information sequence k into parity
sequence p (`mtd_pkg::TAP`). The code is *self-orthogonal*: for each ordered
pair of parity sequences (p1, p2), all differences g1 - g2 between a tap of
G[k][p1] and a tap of G[k][p2] are distinct, taken over all k. As a result,
the 12 parity checks that contain a given information bit have no other bit
in common. This property is what makes a majority vote over those checks a
sound decision rule.

The published scheme defines the code only by how many taps each set has
({6, 6} for every sequence, span up to 5000). The tap positions in this
design are its own. A greedy search gives each new tap the smallest value
that keeps the code self-orthogonal, and the result is multiplied by 5. The
largest tap is 1880, well inside the 5000-stage span. Because of the ×5 scaling,
two taps of one set are always at least 5 apart (`MIN_TAP_SPACING`), and the
parallel decoder relies on that (see below). To change the code, edit
`TAP`, `MAX_TAP` and `MIN_TAP_SPACING` together. Every orthogonality and
spacing property must still hold, because no hardware checks them.

*Tail biting.* The encoder's shift registers start the block already holding
the block's last bits, so the code has no tail and every index is taken
modulo K. `socc_encoder` stores the block and reads it circularly, which gives
the same result as preloaded shift registers.

## How the decoder works

A block of K columns of 6-bit soft samples is stored first (negative means 1,
magnitude means reliability). Then, for every information bit u_k(i):

1. **Syndrome register.** For each parity check, s_p(t) is the received hard
   parity bit XORed with the hard information bits the encoder used for it.
   It is computed once per block by `syndrome_weight_unit` and kept up to date
   afterwards.
2. **Difference register (DR).** One bit d per information bit, initially 0.
   It records whether the current decision differs from the received hard
   bit. The decoded bit is hard(y_u) XOR d.
3. **Checksum.** The checksum-threshold element (`cse`) forms

       L = sum over the 12 checks c of  w_c · (1 - 2 s_c)  +  |y_u| · (1 - 2 d)

   A check that is satisfied votes for the current decision with its weight.
   A failed check votes against it. The bit's own sample votes for the
   received value while d = 0.
4. **Flip.** If L < 0, the bit is flipped: d is inverted, and so are all 12
   syndrome bits that contain it. After the flip, the checksum of that bit is
   exactly -L > 0. Each flip moves the decision closer, in Euclidean
   distance, to the received samples.

Only the check weights w_c differ between the two component decoders:

* **SMTD** (soft MTD): w = |y_v|, the magnitude of the check's parity sample.
* **WMTD** (weighted bit flipping): w = the smallest magnitude of all 49
  samples in the check (1 parity + 48 information samples). It is computed
  once per block, next to the syndrome.

**CMTDF schedule** (`cmtdf_ctrl`). One *pass* visits every information bit
of the block once. WMTD passes repeat until a pass flips nothing (or
MAX_PHASE passes), then SMTD passes do the same. If any pass of this round
flipped a bit, the schedule feeds back to WMTD. The step ends after a round
with no flip at all, or after MAX_ITER passes.

**Two-step decoding (2SD)**, selected per block with `two_step`. A first CMTDF
step runs with parity sequence 1 switched off, so each bit is judged by 6
checks only. A second step then uses all 12 checks. Fewer checks tolerate
more noise at first, and the full set then cleans up.

**Parity-check decoding** (`pc_decoder`). After the last pass, each
information sequence is streamed through in groups of 51 bits (50 data bits
and their parity bit). The checksum of each bit is recomputed with the final
state. If a group's parity fails, the bit with the smallest |L|, which is the
least confident decision, is flipped. This repairs bits that were received
wrong with high confidence but whose checks are weak. MTD alone cannot move
such a bit, because its own sample outvotes the checks.

### Parallel checksum elements

A pass processes 10 information bits per clock:

* Bits u_k(i) .. u_k(i+4) of one sequence share no syndrome, because no two
  taps of a set are closer than 5. So `NW = 5` CSEs decode them in the same
  cycle, and their flips go to disjoint syndrome bits.
* Tail biting lets decoding start anywhere. A second set of CSEs works
  `K/NSET = 5253` positions further on. Each set only touches syndromes in
  [i, i + 4 + 1880], so the two windows never overlap.

A pass therefore takes ceil(5253/5) × 8 = 8408 cycles instead of 84 048.
`NW` may not exceed `MIN_TAP_SPACING`, and K/NSET must exceed
MAX_TAP + NW - 1. Elaboration-time assertions enforce both.

## Interfaces and timing

`mtd_codec_top` holds two independent halves, and all streams use valid/ready
with one column per cycle:

| side | ports | content |
|---|---|---|
| transmit in | `tx_valid/tx_ready/tx_bits[7:0]` | information columns |
| transmit out | `cw_valid/cw_ready/cw_info[7:0]/cw_par[1:0]/cw_last` | code columns, blocks of K |
| receive in | `rx_valid/rx_ready/rx_yu[8]/rx_yv[2]`, `two_step` | 6-bit soft samples, blocks of K |
| receive out | `dec_valid/dec_ready/dec_bits[7:0]/dec_last` | decoded information, PC columns removed (10 300 per block) |
| status | `iter_count`, `pc_flips`, `ev_*` pulses | passes used, PC corrections, events |

Transmit: `pc_encoder` lowers `tx_ready` for one cycle after every 50 columns
while it inserts the parity column. `socc_encoder` first takes K columns, then
emits K code columns.

Receive (`mtd_decoder`), in cycles, for a block that needs P passes:

| phase | cycles |
|---|---|
| load | K = 10 506 (one column per cycle) |
| syndrome and weight init | K, plus 1 to start the schedule |
| each pass | ceil(K/NSET/NW) × 8 + 2 = 8410 |
| hand-over, PC decoding | 1 + K × 8 + 1 = 84 050 |
| output | K cycles, 206 of them idle (PC columns) |

At 4.8 dB a block needs about 25 passes, so decoding takes about 305 000
cycles per 82 400 information bits. The decoder takes the next block only
after the current block's output has been sent.

## Files

| file | what it is |
|---|---|
| `rtl/mtd_pkg.sv` | sizes, soft-sample types, the tap table, `hard()`/`mag()` |
| `rtl/mtd_codec_top.sv` | top: transmit and receive halves |
| `rtl/pc_encoder.sv` | parity column after every 50 columns |
| `rtl/socc_encoder.sv` | tail-biting SOCC:TP2 encoder |
| `rtl/mtd_decoder.sv` | block memories, syndrome register, DR, parallel CSEs, PC pass, output |
| `rtl/syndrome_weight_unit.sv` | initial syndrome bit and WMTD weight of one check |
| `rtl/cse.sv` | checksum-threshold element |
| `rtl/cmtdf_ctrl.sv` | WMTD/SMTD/feedback and 2SD schedule |
| `rtl/pc_decoder.sv` | parity check and least-reliable-bit search per 51-bit group |
| `tb/tb_ref_pkg.sv` | reference PC insertion, reference encoder, BPSK/noise channel |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_ebn0` |

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
A watchdog ends any run that hangs.
The RTL also carries concurrent assertions: offered output columns hold
until taken, passes start only when idle, and pass results arrive only while
a pass is outstanding. Build with `--assert` to check them.

* `tb_cse`, `tb_syndrome_weight_unit`: random vectors against integer models.
* `tb_pc_encoder`: random handshake gaps; data order, group parity, one stall
  per group.
* `tb_pc_decoder`: 300 groups; flip exactly on odd parity, at the first
  minimum.
* `tb_cmtdf_ctrl`: scripted pass results; exact mode sequence, feedbacks,
  phase and step limits, 2SD masking.
* `tb_socc_encoder`: two full blocks against the reference encoder; output
  takes exactly K cycles.
* `tb_mtd_decoder`: full-size blocks. A noise-free block must decode with no
  flips, with the cycle count matching the table above. A block with about 1 %
  wrong-sign samples must be corrected completely. A block with four
  confidently wrong bits must be fixed by PC decoding. A 2SD block is also run.
* `tb_mtd_codec_top`: end to end at the default parameters through both
  halves, for three blocks. It requires every mechanism to occur: PC-encoder
  stall, WMTD and SMTD passes, feedback, flips, masked 2SD passes and PC
  flips. Runtime is a few seconds.
* `tb_workload_ebn0`: Gaussian-like noise at Eb/N0 = 4.8 dB (channel BER
  about 1.4 %). Three blocks with CMTDF + PC decoded with no errors, in 25.3
  passes on average. Two blocks with 2SD + PC left 2 wrong bits out of
  164 800.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/mtd_pkg.sv tb/tb_ref_pkg.sv tb/tb_mtd_codec_top.sv \
        --top-module tb_mtd_codec_top
    ./obj_dir/Vtb_mtd_codec_top

Replace the last file and the top-module name to run another testbench.

## Choices made here, and limits

The published scheme defines the code structure, the checksum, both weight
rules, the CMTDF and 2SD schedules, the PC code with n1 = 50, and the two
kinds of CSE parallelism. The following are this design's own:

* **Tap positions** (see above). Error-rate results therefore belong to this
  code, not to the published one. Its structure ({6, 6}, J = 12) is the same.
* **6-bit soft samples** with 5-bit magnitudes, and a 10-bit checksum. The
  scheme is specified with real-valued samples.
* **Block storage** in arrays read through counters, instead of shift
  registers clocked once per bit. The decisions are the same.
* **Pass limits**: MAX_ITER = 32 per step and MAX_PHASE = 16 per phase. Only
  averages are published (about 23 passes for CMTDF at 4.8 dB, 90 for 2SD at
  4.2 dB on another code).
* **Oscillation.** At 4.8 dB, some blocks end up with one bit whose WMTD and
  SMTD checksums have opposite signs. WMTD flips it and SMTD flips it back, so
  the "round without flips" rule never fires and the block runs to MAX_ITER.
  The decoded output was still correct in every such case observed. The
  published stop rule does not address this case.
* **2SD** masks parity sequence 1 (`JS_PAR`). With a {6, 6} code, half of the
  checks are switched off in either case.
* **Unspecified details:** even parity in the PC code, ties resolved toward the
  earlier bit, no flip when L = 0, and a recomputed |L| for PC decoding.
* **PC decoding runs one bit per cycle.** It takes about as long as 10 passes
  and is the obvious next thing to parallelise.
* **No pipelining.** Each bit update (12 syndrome reads, the adder tree, 12
  syndrome writes) happens in one combinational cycle. A fast implementation
  would pipeline this and bank the syndrome memory. The published scheme does
  not describe that level.

Not built: the other codes the scheme was evaluated with (J = 8 and J = 10 at
m = 8, n = 2; the m = 12, n = 3 code with tap sets {2, 2, 6} used for 2SD; the
rate-1/2 codes). Each needs a different package, and its tap positions are
not published. No throughput target is given either: at the default
parallelism the decoder delivers about 0.27 information bits per clock cycle.
That is far below a 100 Gb/s line rate at any realistic clock, so reaching it
would need many decoder instances or much wider CSE sets. As a data point,
2SD on this J = 12 code at 4.2 dB left residual errors even with 128 passes
per step. That operating point is published only for the m = 12, n = 3 code.
