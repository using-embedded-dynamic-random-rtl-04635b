# Iterative read channel that trades buffer memory for energy

A read channel with iterative detection and decoding spends most of its
silicon on memory and most of its energy on the detector, the post-processor
and the LDPC decoder. This RTL builds such a channel around two ideas. Both
use memory to save energy, which pays off when the memory is dense embedded
DRAM:

1. **Conditional post-processing.** A dominant-error-event post-processor
   helps the first detection/decoding round. Here it does not run on every
   sector. The LDPC decoder runs first, straight after the detector. Only when
   that decoding fails are the stored channel samples and detector decisions
   post-processed, and the sector is decoded again. Almost every sector
   decodes on the first try, so the post-processor is almost always idle. The
   price is a frame buffer that holds the 6-bit samples and the 1-bit
   decisions of one sector.
2. **A multi-sector buffer in front of the LDPC decoder.** The number of
   decoding iterations changes from sector to sector. A buffer of *m* sectors
   between the detector and the decoder absorbs the sectors that take longer
   than one sector time. The decoder can therefore run at a lower supply
   voltage, sized for *N_r* iterations per sector time instead of the maximum
   of 24. The source analysis gives N_r = 14, 10, 7, 6 and 4 for m = 2 to 6.
   The RTL uses m = 4 and N_r = 7 by default.

Both ideas sit on a *recursive* channel. One detector, one post-processor and
one LDPC decoder serve every channel iteration of a sector. An input buffer of
d = 5 sectors keeps samples from being lost while a difficult sector holds the
units.

The architecture, sizes and word lengths follow the paper by N. Xie, T. Zhang
and E. F. Haratsch, *Using Embedded Dynamic Random Access Memory to Reduce
Energy Consumption of Magnetic Recording Read Channel*. That paper describes
the channel at block level. The insides of every block below, the
parity-check matrix and all interfaces are this design's own. The sections
on each block say which is which.

## Data flow

```
 adc_sample ─► equalizer ─► input sector buffer ─► SOVA detector ─► decoder sector buffer
               (10-tap FIR,   (d = 5 sectors,        (2-state,         (m = 4 sectors of
                3-tap whiten)  6-bit samples)         1 + 0.75D)        {y, hd, llr})
                                                        ▲    │                 │
                                       a-priori (ext)  │    │ extrinsic       ▼
                                                        │    └────────► LDPC decoder ─► out_bit
                                                        │                ▲      │
                              post-processing frame ────┴── post-       │      │ extrinsic
                              buffer {y, hd} (1 sector)     processor ──┘      │
                                                            (erasures)  ◄──────┘
```

All blocks are in `rtl/`. The constants they share are in `rc_pkg`.

| Module | Role |
|---|---|
| `read_channel_top` | Wires the blocks and holds the channel controller (the two stages below) |
| `equalizer` | 10-tap FIR filter and 3-tap whitening filter, with programmable 6-bit taps |
| `sector_fifo` | Whole-sector FIFO. It is used three times: input buffer, decoder buffer and post-processing frame buffer |
| `sova_detector` | Soft-output Viterbi detector with register exchange and a-priori input |
| `post_processor` | Detects dominant error events with two interleaved 64-bit parity checks |
| `ldpc_decoder` | Layered sum-product decoder for the rate-8/9 QC-LDPC code |

## The channel controller

This is the part that is hardest to follow. It lives in `read_channel_top`
as two state machines that run at the same time. They share the single SOVA
detector.

**Detection stage** (`A_IDLE → A_FEED → A_DRAIN`). It starts when the input
buffer holds a whole sector, the decoder buffer has a free slot and the
decoding stage does not want the detector. It reads the sector's samples in
order and feeds them to the SOVA. The a-priori input is zero. After the
samples it feeds `SOVA_DEPTH − 1` zero samples to flush the detector. Each
decision is written to the decoder buffer as {sample, hard decision, soft
output}. A delay line aligns the sample with its decision. When all N words
are written, the input-buffer slot is released.

**Decoding stage** (`B_IDLE → B_LOAD → B_DEC …`). It takes the oldest sector
from the decoder buffer. In one pass it loads the soft outputs into the LDPC
decoder's channel memory and the {sample, decision} pairs into the
post-processing frame buffer. Then it frees the decoder-buffer slot and
decodes. After each decoding:

* **Success:** stream the N hard decisions out (`B_OUT`).
* **First failure:** run the post-processor (`B_PP`). Every position it
  reports is written into the decoder as a zero LLR, which sets that soft
  output's magnitude to zero. Then decode again. This is the only time the
  post-processor runs.
* **Later failures, while fewer than `CH_ITERS` = 4 rounds have run:** ask for
  the detector (`B_SREQ`). The stage waits until the detection stage is
  between sectors, then takes the detector. It runs the SOVA again over the
  stored samples, with the decoder's extrinsic values (APP minus channel LLR)
  as a-priori input. It writes the detector's extrinsic output (soft output
  minus a-priori) back as the new channel LLRs, and decodes again from fresh
  messages.
* **Otherwise:** give up. The sector still goes out, with `sec_ok = 0`.

`sec_done` closes every sector. It reports the number of extra channel
iterations (0 to 3) and the total number of LDPC iterations. When the total
exceeds `NR_BUDGET`, the sector would have overrun its slot on a decoder run
at a scaled supply voltage. Such a sector is counted in `cnt_dec_overflow`.
The supply itself is not logic, so it is not modelled.

Sectors are lost in only one place: the input buffer. If all d slots are full
when a sector's first sample arrives, the whole sector is dropped and
`cnt_in_overflow` counts its samples. The decoder buffer and the frame buffer
never overflow, because each stage waits for room. Assertions check this.

## LDPC code and decoder

The code has rate 8/9 and is regular with column weight 4. A 512-byte sector
gives a 4608-bit codeword and 512 checks. The RTL builds the parity-check
matrix from 4 × 36 circulant permutation matrices of size Z = 128. Check
`r·Z + i` connects to bit `c·Z + (i + r·c) mod Z` for block column
c = 0…35. This shift rule is this design's own choice; the paper does not
give the matrix. For Z = 128 it leaves no 4-cycles, because
(r₁−r₂)(c₁−c₂) ≤ 105 < 128. Check rows of one block row touch disjoint
bits.

The decoder uses the sum-product algorithm in log domain with a layered
schedule. The four block rows are processed in turn. Every check takes two
passes over its 36 bits:

* **Pass 1:** Q = APP − R_old. Accumulate S = Σ φ(|Q|) and the parity of
  the bits with Q > 0.
* **Pass 2:** R = ±φ(S − φ(|Q|)). The sign is positive, meaning bit 1, when
  the other bits hold an odd number of ones. Write R, and write
  APP = Q + R.

Fixed point:

* LLRs have a least significant bit of 0.5. Positive means bit 1.
* Channel LLRs and messages are 6 bits. APP values are 8 bits.
* φ(x) = −ln tanh(x/2) goes to 2⁻¹² resolution through
  `PHI_FWD[q] = min(16383, round(4096·φ(q/2)))`.
* It comes back through thresholds `PHI_THR[k−1]`, the largest a with
  round(2·φ(a/4096)) ≥ k.

Decoding stops after the first iteration in which every check was satisfied
and no hard decision changed. The final decisions are then a codeword. If
that never happens, decoding stops after 24 iterations. Per-check and per-bit
"valid" flags stand in for clearing the message memory at each start.

Timing is 72 cycles per check and 36,865 cycles per iteration at full size,
plus 2 cycles per decoding.

## SOVA detector

The target 1 + 0.75D has memory one, so the trellis has two states. The
noiseless samples are ±14 and ±2 (8·x_k + 6·x_{k−1}).

* **Branch metric:** (y − ŷ)² >> 3. When the bit disagrees with the
  a-priori sign, 2·|La| is added. The sum saturates at 255.
* **Path metrics:** 9 bits, renormalised every step.
* **Memories:** each state keeps 16 survivor bits and a 5-bit reliability per
  bit, updated by register exchange. Where survivor and competitor differ,
  the reliability becomes min(reliability, metric difference).

The soft output is the reliability of the bit that leaves the best state's
register, shifted right by 1 and signed. The detector gives one decision per
sample, one cycle after the sample 15 positions later.

The paper specifies a "modified register-exchange" SOVA with 9-bit path
metrics and 6-bit soft output. The update rule, the depth and all scaling
here are this design's own.

## Post-processor

Each 128-bit segment of the sector carries two interleaved 64-bit
single-parity checks, one over its even positions and one over its odd
positions. The post-processor treats errors of one, two or three consecutive
bits as the dominant events. Their parity signatures differ:

| Event | Checks it violates |
|---|---|
| 1 bit | the check of its position |
| 2 bits | both checks |
| 3 bits | the check of its middle bit |

The post-processor reads each segment once from the frame buffer. From the
decisions it computes both syndromes. For every start position and event
length it also computes the weight metric
`Σ(2·r_k·g_k − g_k²) >> 4`, saturated to 10 bits, where r is the residual and
g is the change of the noiseless sample that the event causes. It keeps the
best metric per event class. For a violated segment it emits the positions of
the best event that matches the syndrome.

It takes 135 cycles per segment, plus one per emitted position.

The paper fixes the interleaved 64-bit SPC codes, the 10-bit metric and the
"zero the soft output" action. The event set and the metric are this
design's own.

**Assumption:** the write path places the two parities in every 128-bit
segment of the codeword. The testbenches build codewords that satisfy the
LDPC checks and all segment parities.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| Sector | 4096 user bits, 4608 coded bits | paper (512 bytes, rate 8/9) |
| Column weight, block rows × columns | 4, 4 × 36 | paper (weight), derived (36) |
| Circulant size `Z` | 128 | derived; shifts r·c mod Z are this design's |
| LDPC iterations `LDPC_ITERS` | 24 | paper |
| Channel rounds `CH_ITERS` | 4 | paper |
| Input buffer `D_SECTORS` | 5 | paper |
| Decoder buffer `M_SECTORS` | 4 (paper studies 2 to 6) | paper range, choice of 4 |
| Iteration budget `NR_BUDGET` | 7 | paper (N_r for m = 4) |
| Word lengths | sample 6, path metric 9, soft 6, tap 6, PP metric 10, message 6 | paper |
| APP width, LLR scale, SOVA depth 16, metric shifts | — | this design |

## Where this RTL departs from the paper

* **Throughput.** The paper's units reach 2 Gb/s each. These blocks are
  serial: the SOVA and the post-processor handle about one bit per cycle. The
  LDPC decoder needs 36,865 cycles per iteration, several hundred times too
  slow for 2 Gb/s at any realistic clock. The paper's decoder architecture is
  in a reference it cites and is not reproduced.
* **Voltage scaling and eDRAM** are physical. There is one clock domain. The
  buffers are plain arrays with no refresh. The memories of the LDPC decoder
  read asynchronously.
* **Parity-check matrix, SPC placement and user-bit mapping** are not given by
  the paper. The output is the whole 4608-bit codeword.
* **Whitening filter.** It runs on the sample stream with programmable taps.
  The detector keeps the plain 1 + 0.75D target.
* **Turbo exchange.** How soft information passes between detector and
  decoder in later rounds, and the restart of decoding from zero messages,
  are not specified by the paper.

## Simulation

Every testbench checks itself and prints
`TB_RESULT checks=N failures=M`. Each has a cycle watchdog.

| Testbench | What it covers |
|---|---|
| `tb_equalizer` | Random taps and data against a reference model; 2-cycle latency |
| `tb_sector_fifo` | Fill, whole-sector drop on overflow, wrap-around, read latency |
| `tb_sova_detector` | Decisions on a noisy 1 + 0.75D channel, exact latency, soft sign, a-priori following |
| `tb_post_processor` | Injected 1/2/3-bit events found at the right positions; cycle count |
| `tb_ldpc_decoder` | Full-size code: up to 40 flipped bits corrected, cycle count per iteration, failure after 24 iterations |
| `tb_read_channel_top` | Z = 32, d = 2, m = 1. Clean, bursty and noisy sectors, then a random sector with timed traffic. It checks every output sector and that post-processing, channel iterations, decoding overflow, input overflow and detector hand-over each occur |
| `tb_read_channel_full` | Top at its default parameters: three 4608-bit sectors end to end |

`tb_code_pkg` builds the parity-check matrix independently of the RTL. It
produces random codewords by Gaussian elimination.

To build and run one testbench with Verilator, list the package files first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rc_pkg.sv tb/tb_code_pkg.sv rtl/equalizer.sv rtl/sector_fifo.sv \
  rtl/sova_detector.sv rtl/post_processor.sv rtl/ldpc_decoder.sv \
  rtl/read_channel_top.sv tb/tb_read_channel_top.sv \
  --top-module tb_read_channel_top -o sim
./obj_dir/sim
```

Every run takes seconds. The full-size run simulates about 200,000 cycles.
