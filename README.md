# 60 GHz single-carrier BPSK equalizer test chip, 2 Gb/s

Indoor 60 GHz links that lose line of sight see impulse responses that run
for dozens of symbols. At 2 Gb/s BPSK, a receiver must cancel inter-symbol
interference (ISI) reaching about 72 symbols back, on a power budget of a
few milliwatts. This RTL builds such a receiver baseband around one idea:
every FIR filter in it, and every tap it implements, is made with
**distributed arithmetic (DA)**. No multipliers are used. The filter
coefficients are folded into small look-up tables (LUTs) ahead of time,
during the gap between the preamble and the data. During the data, each
filter only reads its tables and adds the results.

The design is the digital part of a test chip. It contains:

* an equalizer with 38 taps in three parts:
  * a 6-tap linear equalizer (LE);
  * an 8-tap "sub" decision-feedback equalizer (S-DFE) for the first eight post-cursors;
  * a 24-tap "main" DFE (M-DFE) whose taps can be moved across a 72-symbol span;
* a Golay-sequence channel estimator;
* the on-chip test transmitter that feeds them, made of:
  * a PRBS or preamble generator;
  * a 72-tap channel emulator;
  * a noise generator;
* a bit-error-rate tester (BERT);
* a scan chain, an initialisation bus and a debug port, through which an external tester (for example an FPGA) drives the chip.

The datapath is four symbols wide (P = 4). At a 500 MHz clock that gives
2 Gb/s. Lane p of a clock always holds symbol 4q+p.

## Number formats

* A symbol is one bit: 0 means +1 and 1 means −1. The arithmetic uses (1 − 2b) throughout.
* Received samples `r` are 4-bit signed.
* The emulator output `c`, the noise `n`, the M-DFE output `y` and the emulator LUT words are in quarter-`r` LSBs.
* The LE input `e` is 6 bits in half-`r` LSBs.
* The LE output `z` is 10 bits.
* The M-DFE output `y` is 9 bits.

The 4/6/9/10-bit widths are those of the reference design. The LUT word
widths and the scaling between stages are this implementation's own.

## The equalizer loop (`equalizer`, `le`, `mdfe`, `sdfe`, `tap_delay_line`)

For symbol k the loop computes:

```
y_k = sat9( sum_{n=0..23} h_{L+1+n} (1 - 2 u_{k-L-D_n}) )         M-DFE, L = 8
e_k = sat6( ((r_k << 2) - y_k) >>> 1 )                            -> Register#1
z_k = sat10( (sum_{m=1..6} w_m e_{k-m}) >>> 2 )                   LE -> Register#2
u_k = ( z_k - sum_{i=1..8} g_i (1 - 2 u_{k-i}) ) < 0              S-DFE + slicer
```

The hard part is the feedback. A decision must be ready for the next
symbol, yet four symbols are decided in every clock. Two mechanisms handle
this:

* **The S-DFE is unrolled.** Its eight taps address a single 256-word LUT
  directly, because BPSK decisions are single bits. Lane 0 of a block
  already knows all eight previous decisions. Lane 1 still lacks lane 0's
  decision, so it computes both possible outcomes. Lane 2 computes four
  and lane 3 computes eight: 15 LUT reads and 15 comparisons (`z < C(K)`)
  in all. A multiplexer chain then resolves lane 0, 1, 2 and 3 in order,
  each lane choosing among its candidates by the decisions already made.
  The LUT is one flip-flop array with 15 read ports.
* **The M-DFE works on old decisions only.** It reads decisions at least
  nine symbols old. They are therefore all settled two clocks earlier, and
  the loop can be pipelined. Register#1 holds `e`, and Register#2 holds
  `z`. The loop r → e → z → u → y → e takes two clocks, as in the
  reference design. The reference figure places Register#2 after the
  S-DFE subtraction. Here the subtraction is folded into the unrolled
  compare, so Register#2 holds `z` itself. The loop timing is the same.

**DA in the M-DFE.** The 24 taps are split into four groups of six. Each
group is one 64-word LUT whose address is the six decisions of that
group. Word K of LUT j is

    C_j(K) = sum_{i=1..6} h_{L+6j+i} (1 - 2 b_i(K)),   K = sum_i b_i 2^(i-1).

The four lanes read the same tables through four ports each, with
time-shifted addresses. This takes 4 multi-ported memories instead of 16
copies.

**DA in the LE.** The input `e` is a 6-bit number, not a bit, so the LE
processes it bit-plane by bit-plane. Plane b of the last six samples
addresses a 64-word table whose word K is `sum_m w_m b_m(K)`. The six
plane results are shifted and added, and the sign plane is subtracted.

**Movable taps (`tap_delay_line`).** M-DFE tap n does not have to sit
next to tap n−1. A 2-bit offset per tap (scan chain) sets
D_0 = off_0 and D_n = D_{n−1} + 1 + off_n. The sum is capped at 63, so
the last tap can reach symbol 8 + 1 + 63 = 72. This lets a small number
of taps cover clusters of echoes far apart in the impulse response. In
hardware terms each tap address is picked by a 4-input multiplexer from
a group of four delay flip-flops that follows the previous tap. Here the
history is one shift register, and the multiplexers are index
arithmetic on it.

**Latency.** The decisions for the r block presented at clock c leave
`x_hat` at clock c + 3 (`EQ_LAT`). The clock enable `en` freezes the
whole loop.

## Channel estimator (`chan_est`, `golay_corr`)

The preamble carries 128-symbol complementary Golay sequences a and b.
Their autocorrelations sum to a delta, so correlating the received a part
with a and the received b part with b, then adding, gives the channel
impulse response without side lobes. The preamble is laid out as four
64-symbol segments of `a` followed by four of `b`: Post, Pre, Post, Pre.
Only the middle 128 symbols of each half are kept, so each kept window is
one full circular period, with its own prefix in front of it.

Each correlator runs the Golay recursion on its buffer in place of the
delta:

```
A_n(i) = A_{n-1}(i - D_n) + C_n B_{n-1}(i)
B_n(i) = A_{n-1}(i - D_n) - C_n B_{n-1}(i)     (i mod 128), n = 1..7
```

That takes 7 × 128 add-subtract pairs, not 128 × 128 multiply-adds.
* **Storage.** Each correlator keeps A and B as four banks of 32 words,
  one bank per lane. Four butterflies run per clock, and a stage takes 32
  clocks.
* **Delays.** The circular delay D_n is never a data move. A pointer into
  A advances by D_n, and a sample's physical place is its logical index
  minus the pointer. When D_n is a multiple of 4 this moves whole rows.
  When it is 1 or 2 (mod 4), it rotates which bank a lane reads and
  shifts the row for the wrapped lanes. This is the reference design's
  "pointer management" in place of a swap-and-shift.
* **Generator vectors.** The delays and signs are D = {1, 8, 2, 4, 16, 32, 64}
  and C = {−, −, −, −, +, −, −}.
* **Transmitted sequences.** The transmitter sends the circular time
  reverses of the recursion outputs, so the recursion acts as their
  matched filter.

The two results are added into a 128-word CE memory,
`h_est(k) = 256 · h_k`. This is exact whenever `r` is not clipped.
Correlator B starts 64 blocks after A. The estimate is complete 371 clocks
after the first preamble block.

## Test transmitter (`transmitter`, `seq_gen`, `chan_emu`, `awgn_gen`)

* **`seq_gen`** produces either PRBS-15 (x^15 + x^14 + 1, seed all ones)
  or the Golay preamble, four symbols per clock. The BERT uses a second
  copy of it.
* **`chan_emu`** computes `c_k = sum_{m=1..72} h_m x_{k−m}` with the same
  DA structure as the M-DFE: 12 LUTs of 64 words, 4 read ports each.
* **`awgn_gen`** gives approximately Gaussian noise, one xorshift32
  generator per lane. It sums the four bytes of each output and removes
  the mean. The result is scaled by the 8-bit `noise_sigma` and shifted
  right by 7. The standard deviation is about 1.155 · sigma quarter-r
  LSBs.
* **Quantizer.** `r = sat4((c + n + 2) >>> 2)`. The first r block leaves
  3 clocks after `start` (`TX_LAT`).

## Control and observation (`scan_chain`, `mem_init`, `debug_if`, `bert`, `eq60_top`)

* **Scan chain.** It carries `cfg_t`, 89 bits, shifted in LSB first and
  applied on `scan_update`. The fields are:
  * `mode`: data or CE;
  * 24 two-bit tap offsets;
  * `noise_sigma`;
  * `ber_delay`;
  * `ber_nbits`.

  `scan_out` returns the previous contents.
* **Init bus.** It writes LUT words, not coefficients. The tables are
  computed off chip with the formulas above, and the MMSE LE taps are also
  computed off chip. `init_sel` picks the target: 0 emulator, 1 M-DFE,
  2 LE, 3 S-DFE. `init_addr` is `{lut, word}`, and the bus is registered
  once.
* **Debug port.** `dbg_addr` 0–127 reads the CE memory. Address 128 is
  the compared bit count, 129 the error count, and 130 the status
  `{ce_done, ce_busy, bert_done}`. The data is registered.
* **BERT.** It regenerates the PRBS, advancing on each valid decision
  block. It compares decision 4j+p with reference symbol
  4j+p−`ber_delay`, skips the first 64 symbols, and raises `bert_done`
  after `ber_nbits` symbols.
* **`start` in data mode.** It restarts the transmitter and the BERT.
* **`start` in CE mode.** It sends the preamble, and the channel
  estimator starts TX_LAT clocks later. The equalizer's clock enable is
  held low in CE mode.

To equalize a channel `h` (quarter-r units) whose main tap is `h_M`, with
the LE used as a plain one-symbol pass-through:
* **LE:** w_1 = 8, all other LE taps zero.
* **S-DFE:** g_i = h_{M+i}.
* **M-DFE:** tap n = h_{M+9+D_n}.
* **BERT:** `ber_delay` = (M + 1) + 4·(TX_LAT + EQ_LAT − 1).

With a precursor-cancelling LE whose main weight is w_j, make these
changes:
* The decision delay becomes M + j. It replaces M + 1 in `ber_delay`.
* The S-DFE takes the post-cursors of the combined response.
* The M-DFE taps move to h_{M+j+8+D_n}.

`tb_eq60_top` works through the pass-through case. `tb_ber_workloads`
works through the precursor case.

## Files

| file | contents |
|---|---|
| `rtl/eq_pkg.sv` | constants, widths, `cfg_t`, init-bus types, Golay generator function |
| `rtl/eq60_top.sv` | chip top |
| `rtl/transmitter.sv`, `seq_gen.sv`, `chan_emu.sv`, `awgn_gen.sv` | test transmitter |
| `rtl/equalizer.sv`, `le.sv`, `sdfe.sv`, `mdfe.sv`, `tap_delay_line.sv`, `da_lut.sv` | equalizer |
| `rtl/chan_est.sv`, `golay_corr.sv` | channel estimator |
| `rtl/bert.sv`, `scan_chain.sv`, `mem_init.sv`, `debug_if.sv` | test and control |
| `tb/tb_<block>.sv` | one self-checking testbench per module |
| `tb/tb_ber_workloads.sv`, `tb/tb_ce_workload.sv` | BER and channel-estimation workloads on the full chip |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/eq_pkg.sv tb/tb_eq60_top.sv --top-module tb_eq60_top -Mdir obj -o sim
./obj/sim
```

`tb_eq60_top` runs the whole chip at its default size, using only its
pins:
* **Channel.** It uses a five-path channel. Two post-cursors fall in the
  S-DFE span. Two later echoes are reached by M-DFE taps placed with
  non-zero offsets.
* **Loading.** It loads every LUT over the init bus and configures
  through the scan chain, checking the read-back.
* **Channel estimation.** It runs CE mode and reads all 128 estimate
  words through the debug port. It checks them exactly.
* **Equalizer setup.** It computes the equalizer tables from that read-back
  estimate, not from the known channel, which is the flow a real link
  follows.
* **Data runs.**
  * Without noise, every decision must equal the sent symbol and the BERT
    must show 0 errors in 16,000 symbols.
  * With noise at sigma 3 (about 4 errors per 10^4), the error count must
    be non-zero and below 5 %.
* **Second CE run.** It switches back to CE mode for a second exact
  estimate.
* **Mechanism counts.** It counts each mechanism and fails if any never
  happened:
  * mode switches;
  * tap offsets;
  * noise;
  * S-DFE speculation that changes a decision;
  * M-DFE subtraction;
  * equalizer stall;
  * scan, init and debug accesses.

`tb_ber_workloads` measures BER on the full chip.
* **Single-path AWGN.** The chip uses one channel tap, noise on, and the
  DFEs zeroed. A decision is wrong exactly when noise pushes the
  quantized `r` across zero. The noise distribution (four uniform bytes,
  scaled) is known exactly, so the testbench computes the expected error
  count by convolution. It checks the BERT against it at four noise
  levels, −1.8 to 5.8 dB Eb/N0, for example 2.75e-3 measured against
  2.73e-3 predicted.
* **Four-path channel.** Its last echo is 70 symbols after the main tap,
  at the edge of the equalizer's reach. The M-DFE taps are spread with
  offsets so that tap 23 lands on it. The run must be error-free without
  noise, and about 3.7 % BER is measured at 3.3 dB.
* **Strong precursor.** On a channel with a precursor at 10/16 of the
  main tap, the testbench compares a pass-through LE with a three-tap
  precursor-cancelling LE, w = (3, −5, 8).
  * The second setting moves the decision delay to 5 symbols.
  * Its S-DFE table then holds the combined channel-plus-LE response,
    `f_j = sum_m w_m h_{j−m} / 8`.
  * Both settings are error-free without noise.
  * At sigma 4 the LE cuts the BER from 6.0 % to 1.7 %.

`tb_ce_workload` estimates a dense 19-tap profile spread over 60
symbols. Rounding `r` to 4 bits is then the only error source. The RMS
error of the 128 estimate words comes out at 4.0 LSBs, against
sqrt(256/12) ≈ 4.6 predicted, and every word must lie within 40 LSBs of
256·h_k.

One limit is built into the preamble rather than into this RTL. Each
kept window is preceded by a 64-symbol copy of its tail. Taps 65–72 can
be set in the emulator and cancelled by the M-DFE, but their estimates
include symbols sent before the preamble.

The unit testbenches compare each block with a direct model:
* equalizer: a symbol-by-symbol loop with plain multiply-adds, and its 3-clock latency;
* channel estimator: the exact correlation sums and 256·h, and its 371-clock completion;
* the other modules likewise.

## How this departs from the reference design, and what is missing

* **Numeric details.** The reference gives the structure, the tap counts,
  the LUT split and the datapath widths. The following are this design's
  own choices:
  * the LUT word widths and the scaling between stages;
  * the PRBS polynomial;
  * the Golay delay and sign vectors, and the preamble segment order;
  * the noise generator;
  * every bus, scan and debug format.
* **LE output width.** It is 10 bits, the width printed with the
  equalizer diagram. One caption elsewhere gives 11.
* **Correlation start.** Each correlation starts only once its
  128-symbol window is fully buffered. It runs one recursion stage at a
  time, with four butterflies per clock. The reference timing diagram
  starts the correlation while the window is still arriving.
* **Memories.** The channel estimator memories are flip-flop arrays, not
  SRAM cells.
* **Not built:**
  * the LUT-word calculation and the MMSE LE coefficient calculation,
    which are off chip, as in the reference;
  * the ADC, synchronisation, frequency and timing loops, which are not
    part of the test chip;
  * clocking and pads.
* **Not verified:**
  * clock rate, power and area, which need a real implementation flow;
  * the BER-versus-SNR curves, which were spot-checked at one noise level
    only.
