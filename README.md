# 2 Gb/s four-way parallel DA equalizer and Golay channel estimator for 60 GHz single-carrier links

Indoor 60 GHz links that lose line of sight see echoes that arrive tens of
symbols after the direct path. At 2 Gb/s this inter-symbol interference has
to be removed by an equalizer that decides four BPSK symbols in every clock
(500 MHz) at low power. This RTL implements such a receiver baseband test
chip:

* a **hybrid equalizer**: a 6-tap linear pre-cursor equalizer (LE), an
  8-tap *sub*-DFE (S-DFE) and a 24-tap *main* DFE (M-DFE), 38 taps in all.
  Every filter is built as distributed arithmetic (DA): look-up tables of
  precomputed partial sums, kept in flip-flops, instead of multipliers;
* **adjustable tap allocation**: the four 6-tap groups of the main DFE can
  be moved anywhere up to 72 symbols after the main cursor;
* a **Golay channel estimator** that measures the channel impulse response
  (64 taps) from a preamble of a complementary Golay pair, through a
  four-way parallel pulse compressor;
* the **test environment on the same chip**: a sequence generator, a 72-tap
  channel emulator, a noise generator, a bit-error-rate tester and a
  configuration scan chain.

The estimate can be used as the DFE taps directly. This works because the
main DFE output is subtracted at the LE *input*, not at its output, so no
extra computation is needed. When an estimate completes, the equalizer
tables reload by themselves.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Shared types and
constants are in `rtl/eq60_pkg.sv`.

## Signal flow and number formats

```
 seq_gen ──x──> chan_emu ──+──> r ──┬──> equalizer ──xhat──> bert
   (PRBS / Golay)  (72 taps)  │         │   (LE + M-DFE + S-DFE)   ^
                    awgn_gen ─┘         └──> chan_est ── h_est ────┘ (DFE taps, optional)
                                             (Golay correlator + CE memory)
 cfg_scan ── all coefficients, offsets, modes
```

| quantity | format (this design's choice) |
|---|---|
| symbols / decisions | 1 bit: 1 = +1, 0 = −1 (BPSK) |
| coefficients (channel, LE, DFE, estimate) | 8-bit signed, 64 = 1.0 |
| received sample r, LE input u | 12-bit signed, saturated |
| LE output z | 16-bit signed, ⌊Σ w·u / 64⌋, saturated |
| Golay correlator output | 12 + 7 = 19 bits |

Four samples form a block; lane `p` of block `c` is sample `4c+p`.

The equalizer computes, for symbol `k`:

```
u(n)    = sat12( r(n) − Σ_{g=0..3} Σ_{j=1..6} h[L+6g+j] · x̂(n − off[g] − j) )   main DFE at the LE input
z(k)    = sat16( ⌊ Σ_{i=1..6} w_i · u(k+i−1) / 64 ⌋ )                            LE (5 samples look-ahead)
x̂(k)    = [ z(k) − Σ_{l=1..8} h_l · x̂(k−l) ≥ 0 ]                                 sub-DFE and slicer
```

With the default `off[g] = 8 + 6g`, the main DFE covers lags 9..32. The
sub-DFE covers lags 1..8 and the LE the five pre-cursors.

## The single-clock feedback loop

The hardest constraint is the loop. Decision `k` needs `z(k)`. That needs
`u(k+5)`, which needs every decision up to the smallest main-DFE lag before
it (`k+5−9 = k−4`). With four decisions per clock, `x̂(k−4)` is a decision of
the previous clock. So the whole path has to fit between two clock edges:

registered decisions → main DFE (LUT read + adder) → subtract from `r` →
LE (48 bit-plane LUT reads + shifted adder tree) → 15 speculative sub-DFE
reads and slicers → selection chain → decision register

That is why the minimum main-DFE offset is clamped to 8 (`A+P−2`). It is
also why every filter is a table look-up rather than a multiplier chain.

Each clock, `equalizer.sv` forms four new LE inputs, `u(4c+5..4c+8)`. The
five older ones that the LE still needs sit in a 5-entry history, `uh`. The
received samples are delayed by two registers so that `r` and the decisions
line up.

Latency: a block on `r` at clock `b` appears on `xhat` after clock edge
`b+4`.

## Distributed-arithmetic tables (`da_lut`)

A 6-tap FIR whose inputs are ±1 has only 64 possible outputs. `da_lut`
stores them: word `a` = Σ_j ±c_j, with the sign given by address bit `j`.

* **Storage.** The table is a flip-flop array cleared at reset.
* **Filling.** A fill engine walks all 2^K addresses, one per clock, so
  reloading takes 64 clocks for K = 6 and 256 for K = 8. `busy` is high
  meanwhile.
* **Reading.** Each read port is a plain multiplexer on the array. All
  parallel lanes read one shared table instead of holding copies.

How each block uses it:

* **M-DFE** (`mdfe.sv`): four tables of 64 words, one per 6-tap group,
  each with four read ports (one per lane). This replaces sixteen tables.
  Each group's six addresses are taken from the 72-deep decision history
  through multiplexers set by the group offset.
* **Channel emulator** (`chan_emu.sv`): twelve 64-word tables give 72
  taps on the transmitted symbols.
* **LE** (`le_da.sv`): the inputs are 12-bit numbers, not ±1, so the table
  is *unipolar* (word = Σ of the selected w_i). It is addressed by each
  bit plane of the six inputs: 12 planes × 4 lanes = 48 read ports on one
  64-word table. The plane results are shifted and added, and the sign
  plane is subtracted (two's complement).

## Loop-unrolled sub-DFE (`sdfe.sv`)

Lane `p` needs the `p` decisions made earlier in the *same* clock, which are
not known yet. Instead of waiting, it looks up all 2^p possibilities in a
single 256-word table addressed by the eight previous decisions:
1 + 2 + 4 + 8 = 15 reads. Each read has its own subtractor and slicer.

A multiplexer chain then resolves the lanes in order. Lane 0's decision
selects among lane 1's two candidates, lanes 0..1 select among lane 2's
four, and so on. The chain is four multiplexer levels deep, not four
slicer-plus-filter delays.

## Adjustable tap allocation

`cfg.mdfe_off[g]` (7 bits) sets the first lag of main-DFE group `g`
minus one. The group then cancels lags `off+1 .. off+6`. Offsets are
clamped to 8..66, so lag 72 is the furthest that can be reached.

Groups may be placed anywhere in that range, for example on a late echo.
The end-to-end test moves group 3 to lags 45..50 to cancel an echo 50
symbols late. When the DFE taps come from the channel estimate, each
group's taps are read from the estimate at the same lags.

## Golay channel estimator

**Preamble** (`seq_gen.sv`): `[Ga tail 64 | Ga 128 | Ga head 64 | Gb tail 64 | Gb 128 | Gb head 64]`,
512 symbols. Each 128-symbol sequence carries a 64-symbol cyclic prefix and
suffix. Inside the windows the correlator therefore sees a periodic
sequence. Because the periodic autocorrelations of a complementary pair add
up to 256·δ, the sum is exact:

```
256 · h_t = ca(191 + t) + cb(447 + t),   t = 0..63   (sample indices from the first preamble symbol)
```

This holds for any channel of up to 64 taps.

**Pulse compressor** (`golay_cell.sv`, `golay_corr.sv`). A Golay pair of
length 2^7 can be correlated with 7 add/subtract stages instead of 128
multiply-accumulates. Stage `i` forms

```
a' = a + W_i · b(k − D_i)
b' = a − W_i · b(k − D_i)
```

with delays D = [1 8 2 4 16 32 64] and weights W = [−1 −1 −1 −1 +1 −1 −1].
These are the 128-symbol sequences of IEEE 802.15.3c single-carrier mode.
The transmitter sends the time-reversed sequences, so the cascade is
exactly their matched filter.

With four samples per clock, a delay D is split into two parts:

* `D div 4` whole blocks, read from a circular buffer by address
  arithmetic (data never moves);
* `D mod 4` lanes, a *swap and selective shift*: the first `D mod 4` lanes
  come from the older block, the rest from the newer one.

Each stage is registered, so the correlator latency is 7 clocks.

**Control** (`chan_est.sv`): a main FSM counts correlator output blocks
after `start` and issues `start_a` and `start_b`. FSM_A then writes the 64
Ga correlation samples into the 64-word CE memory; FSM_B adds the 64 Gb
samples to them. The memory is read rounded, `(sum+128)>>8`, and saturated
to 8 bits.

`done` rises 135 clocks (512/4 + 7) after the clock in which the first
preamble block was on `r`.

## Transmitter, noise and BERT

* **`seq_gen`**: PRBS-15 (x^15 + x^14 + 1, seeded with all ones), four bits
  per clock. A `tx_start` pulse inserts the preamble. The PRBS resumes where
  it stopped.
* **`chan_emu`**: `r(n) = Σ_{t=0..71} c_t · x(n−t)`. The main cursor is
  `c_5`, so `c_0..c_4` are pre-cursors for the LE.
* **`awgn_gen`**: four xorshift32 generators, one per lane. Summing the
  four bytes of each state gives a bell-shaped value, which is centred and
  scaled by `amp/256`. The standard deviation is about `0.58·amp`, where
  64 is one symbol amplitude.
* **`bert`**: compares the decisions with the transmitted symbols delayed
  by 29 symbols (6 clocks × 4 + the 5-symbol main-cursor offset). It uses
  saturating 32-bit bit and error counters, with `clr` and `en`.

## Top level (`eq60_top.sv`) and configuration

All settings are in one packed struct, `cfg_t` (923 bits):

* 72 emulator taps
* 32 DFE taps
* 6 LE taps
* 4 group offsets
* noise amplitude
* `use_ce`
* `ce_main`, the index of the main cursor in the estimate

The struct is loaded through `cfg_scan`. Shift bit 0 first while `scan_en`
is high, then pulse `cfg_update`. The chain can be read back on `scan_out`.
Reset defaults give a working link: an ideal channel, a pass-through LE,
zero DFE taps and nominal offsets.

| control | effect |
|---|---|
| `lut_load` | rebuild every DA table from the active configuration (`lut_busy` while filling, 256 clocks) |
| `tx_start` | send a preamble; the estimator starts when it reaches `r` |
| `use_ce = 1` | DFE tap `h_l` = estimate at `ce_main + l` (following the group offsets); tables refill automatically on `ce_done` |
| `eq_clr` | restart the equalizer state without touching the tables |
| `bert_clr`, `bert_en` | BERT counters |

Timing: `seq_gen` output at clock `t`, received sample at `t+2`,
decisions at `t+6`.

## Departures from the original design description, and gaps

* **Word lengths.** All widths (8-bit coefficients, 12-bit samples,
  16-bit LE output) are this design's choice.
* **LE taps.** The LE taps are always loaded through the scan chain. The
  MMSE or frequency-domain calculation of them is not built.
* **Correlator structure.** The original architecture draws separate Ga
  and Gb correlators, each of memory-based cells. Here one seven-stage
  cascade produces both correlations, and each cell keeps a single
  register buffer.
* **In-burst estimation.** Only the preamble is used for estimation.
  Training sequences inside data bursts are not handled.
* **Unspecified logic.** Preamble layout, PRBS polynomial, noise
  generator, BERT, scan format and estimator FSM details are not specified
  in the original; they are this design's own.
* **Sub-DFE retiming.** The sub-DFE reads its table with the registered
  decisions directly. The original places a multiplexer after the table
  for the newest decision, which is the same function, retimed.
* **Single-cycle loop.** The whole feedback loop is closed in one clock.
  The original block diagram draws a register after the main-DFE
  subtraction and another before the slicer. Here the decision register is
  the only one in the loop, because with five samples of LE look-ahead and
  a first main-DFE lag of 9 there is exactly one clock to spare. Whether
  the loop meets 500 MHz depends on the technology; no timing analysis was
  done.
* **BERT reference.** The original diagram gives the BERT its own sequence
  generator. Here the BERT reuses the transmitter's sequence, delayed by
  the link latency.
* **Main-DFE indexing.** The main DFE's tap `h_{L+m}` acts on the decision
  `L+m` symbols back, which places its taps after the sub-DFE's.
* **Not part of this RTL.** The ADC, timing and frequency estimation and
  correction, debug logic, pads and clocking are not included.

## Verification

Every block has a self-checking testbench in `tb/` that compares it with a
reference model written independently in the testbench. The equalizer
testbench, for instance, runs a symbol-by-symbol model of the three
equations above.

| testbench | what it checks |
|---|---|
| `tb_da_lut` | bipolar/unipolar contents, 3 read ports, 64-clock fill, reset clear |
| `tb_mdfe`, `tb_le_da`, `tb_sdfe` | each filter against direct arithmetic, random taps, clamped offsets, extreme inputs |
| `tb_equalizer` | bit-exact decisions against the reference model, moved groups, 4-clock latency |
| `tb_seq_gen` | PRBS recurrence across frames, preamble content, `pre`/`sof` |
| `tb_chan_emu` | 72-tap convolution, reload, 64-clock fill |
| `tb_awgn_gen` | silence at amp 0, mean and standard deviation (all lanes and each lane), scaling with amp, shape, lane independence |
| `tb_bert` | counts with random errors, `en` and `clr` |
| `tb_golay_cell`, `tb_golay_corr` | stage arithmetic for delays 1..64; brute-force 128-tap correlation with the 7-clock latency |
| `tb_chan_est` | exact taps for random 48- and 20-tap channels, completion at 135 clocks, restart |
| `tb_cfg_scan` | reset defaults, shift, update, read-back |
| `tb_eq60_top` | the whole chip at full size (below) |
| `tb_eq60_nlos` | a long-delay-spread channel on the whole chip (below) |

`tb_eq60_top` runs the chip at its default parameters through five
phases:

1. the ideal channel;
2. a multipath channel with pre-cursors and an echo at lag 50, cancelled
   by moving a main-DFE group (no errors);
3. the same channel with the DFE off (about 14 % errors);
4. noise added (about 15 % errors);
5. the switch to estimated taps: a preamble is sent, the estimate equals
   the emulator taps exactly, the tables reload themselves and the link is
   error-free again.

`tb_eq60_top` counts each mechanism (scan, table fill, tap move, preamble, estimate,
automatic reload, mode switch, error cases) and fails if any never occurs.

`tb_eq60_nlos` is a long-delay-spread workload, also at full size. Its
channel has echo clusters reaching 58 symbols. With the main-DFE groups
placed on the far clusters and taps taken from the on-chip estimate, 8000
bits are decoded without error. With the groups left at lags 9..32,
errors remain (about 3 %). With noise added, the error rate is reported.
Note that a DFE whose feedback taps together far outweigh the direct path
may not recover from a restart (error propagation), so the channels in the
tests keep the echo energy moderate.

### Simulating

With Verilator 5 (the package must come first):

```sh
verilator --binary --timing rtl/eq60_pkg.sv $(ls rtl/*.sv | grep -v eq60_pkg) \
          tb/tb_eq60_top.sv --top-module tb_eq60_top -o sim
./obj_dir/sim
```

Replace `tb_eq60_top` with any other testbench name. Every testbench ends
by printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog. Each
one runs in seconds.
