# Combined continuum / spectral-line delay and multiplier system

One set of digital hardware serves a 27-antenna radio interferometer in two
very different ways. In **continuum** work it multiplies the signals of every
antenna pair and integrates the products (cross power). In **spectral-line**
work the same multipliers act as a lag correlator: each antenna's sample
stream is replayed from a RAM several times, each time against a copy of itself
shifted by a growing lag. After a Fourier transform, the lag products give the
frequency channels. A slow sample rate leaves time for more replays, so
narrower bands get more channels from the same multipliers.

This RTL models the whole digital chain at the bit level, with one 100 MHz
clock:

```
sampler -> delay card -> recirculator card -> cabling (mode) -> multiplier module
 3-level    0..16383 x 10 ns   pass-through or            4 modules, 8 products per
 samples    per signal         tau_0 / tau_m replay       antenna pair, 14-bit
                                                          integrators -> 12-bit results
```

## Signals

Every sampler output is a 3-level sample (+1, 0, −1) carried on two wires:
one says "+1", the other says "−1" (`corr_pkg::tri_t`). The delay and
recirculator hardware handles each wire as an independent bit stream, and the
multipliers recombine them. Per antenna and per 50 MHz system there are four
signals: right and left polarization, each as sine and cosine components
(RS, RC, LS, LC). There are two systems:

- system AC carries IF channels A (R) and C (L);
- system BD carries IF channels B (R) and D (L).

## Delay line (`delay_card`, `delay_line` and its four stages)

One delay card delays both wires of one signal by the same program. The
program word holds:

- `coarse`: 0 or 8192 bits;
- `mid`: 9 bits, 0..511 words of 16 bits (160 ns each);
- `slot40`: 2 bits, 0..3 × 40 ns;
- `slot10`: 2 bits, 0..3 × 10 ns;
- a stand-by bit.

That gives a delay of 0..16383 × 10 ns.

Inside one delay line:

1. **Input multiplexer.** Selects the sampler, the pseudo-random test
   signal, a second sampler (13-antenna option) or a spare input.
2. **`delay_deserializer`.** Turns the 100 MHz stream into 16-bit words at
   6.25 MHz.
3. **`delay_bulk_fixed`.** Inserts 0 or 512 words.
4. **`delay_bulk_var`.** A circular buffer that is 513..1024 words long.
5. **`delay_serializer`.** Rebuilds the 100 MHz stream. It picks its output
   bit from the current and previous word, at an offset of
   `4*slot40 + slot10`.

Total delay = **8257 clocks + programmed delay**. The 8257 clocks are fixed:
one minimum pass through the variable stage, plus the conversion registers.
Only the differences between antennas matter, so the fixed part cancels.

Stand-by holds the output at 0 and stops the stages. This is the power-saving
state used for cosine logic in line modes.

`prn_source` is the test signal: a 23-bit maximal-length LFSR
(x^23 + x^18 + 1) mapped to 3-level samples. `restart` makes every delay
card in a system see the same sequence, which is what a system self-test
needs.

## Recirculator (`recirc_card`, `recirc_control`, `recirc_slice`)

This is the heart of the line mode and the least obvious part.

**Storage and cycles.** Each recirculated wire has a 10240-bit RAM, organized
as 256 words of 40 bits. Time is cut into 400 ns cycles of 40 clocks, and each
cycle has four slots:

- slot 0: a finished 40-bit input word moves to the write register;
- slot 1: read one word for the undelayed stream τ0;
- slot 2: read one word for the delayed stream τm;
- slot 3: write.

The reads come before the write. At N = 1 a word can therefore still be read
in the cycle that overwrites it.

**Input.** A one-of-N selector keeps every N-th 100 MHz bit. N = 2^`log2n` =
100 MHz / sample rate, from 1 to 256. The selected bits are packed 40 to a
word and written at address A.

**Flow.** `recirc_control` runs three states:

- **START** waits while `blank` (data invalid) is high.
- **FILL** writes the first 10240 bits.
- **RUN** plays back-to-back *passes*. A pass that begins with write pointer A
  works as follows:
  - It reads 8192 bits for τ0 starting at A* = A + N·Ls (bit address, modulo
    10240).
  - It reads 8192 bits for τm starting at A* − L, so τm is τ0 delayed by L
    samples.
  - After the pass, L increases by the lag step Ls. L returns to 0 when it
    reaches N·Ls. N·Ls is limited to the 2048-bit lag range.
  - While a pass replays, writing goes on, so each group of N passes moves on
    to fresher data.

**Pass timing.** A pass lasts 207 cycles (8280 clocks):

- 2 cycles prefetch the first words, including one word of look-back that
  the lag taps need;
- 8192 clocks carry data, marked by `tau_valid`, with `lag_m` = L.

If `blank` rose during a pass, the card returns to START when the pass ends.
It then refills with data from after the blanking, so no window ever mixes
data from both sides of a blank.

**Continuum.** The card does not recirculate. It passes all four inputs
through in 2 clocks.

## Multiplier modules (`multiplier_module`, `mult_driver`, `lag_generator`, `mult_integrator`, `integ_timer`)

A module holds 8 multipliers for every antenna pair (351 pairs for 27
antennas) and 4 driver-board multipliers per antenna. Each multiplier feeds a
`mult_integrator`:

- The 3-level product is counted as 0, 1 or 2 (that is, 1 + a·b).
- One integration is 8192 bits long and uses a 14-bit counter.
- At the dump, the top 12 bits go to a result register, which holds them for
  readout while the next integration runs.
- A window in which every product is +1 counts 16384, which wraps to 0. This
  overflow is accepted; real data cannot reach it.

**Continuum.** The eight cells of pair (A, B) form the following products in
module 1:

| Cell | Module 1 |
|------|----------|
| 1 | RS_A·RS_B |
| 2 | LS_A·LS_B |
| 3 | RS_A·LS_B |
| 4 | LS_A·RS_B |
| 5 | RS_A·RC_B |
| 6 | LS_A·LC_B |
| 7 | RS_A·LC_B |
| 8 | LS_A·RC_B |

Module 2 gets the cosine and sine inputs exchanged, so it forms the cosine
column (RC_A·RC_B and so on). Modules 3 and 4 do the same for system BD.

The driver cells form each antenna's self products, or sine × cosine
products. `self_sel` chooses between them per cell.

**Line.**

- `lag_generator` delays τm by `base + k` bits for k = 0..3. With
  `oversample`, the delay is twice that.
- Cells 1–4 of a pair multiply τ0 of the first antenna by the four taps of
  the second.
- Cells 5–8 multiply the first antenna's taps by the second antenna's τ0,
  which gives the negative lags.
- The driver cells form each antenna's auto products, τ0 × tap k.

**Blanking.** `integ_timer` applies blanking synchronously, so every
integration is exactly 8192 bits.

- Continuum windows run freely from the end of blank. A blank discards the
  window in progress.
- Line windows follow `tau_valid`, and `res_lag` reports the lag M that the
  results belong to.

`dump` and `dump_count` mark new results.

## Duty-cycle integrators (`duty_integrator`)

Four counters, each programmable to any single line at the recirculator
inputs: one wire ("+1" or "−1") of one signal of one antenna. Each counts the
clocks on which its line is 1 during a whole data-valid period (blank low).
A shared counter counts the bits of that period (V_s). When blank rises, the
counts and V_s are latched and `duty_done` pulses. The ratio of a count to
V_s is the duty cycle of that sampler line, and from it the sampler
threshold level.

## Modes and cabling (`module_router`)

| `mode` | option | modules M1..M4 get | lag bases |
|---|---|---|---|
| continuum | – | AC, AC(cos), BD, BD(cos) | – |
| single band | 0..3 = A, B, C, D | the chosen channel in all four | 0, 4, 8, 12 |
| dual band | 0..5 = AB, AC, AD, BC, BD, CD | the AC-system channel into M1, M2, the BD-system channel into M3, M4 (AC and BD: first into M1, M2, second across the inter-system cable into M3, M4) | 0, 4, 0, 4 |
| four band | – | A, C, B, D | 0 each |
| polarization | 0 = A/C, 1 = B/D | RR, RL, LR, LL | 0 each |

In line modes only the sine signal is recirculated. τ0 comes from the card
named first and τm from the second. Lags per module pass = 4, and a full
cycle of N passes covers lags 0..N·Ls.

## Using the top (`combined_system`)

Parameter `NANT` is the number of antennas (default 27).

Inputs:

- sampler outputs `samp[system][antenna][RS,RC,LS,LC]` and `samp_alt`, one
  sample per clock;
- delay programs `dly_prog[system][antenna][signal]`, taken on `dly_load`,
  with the input source `dly_src[system]`;
- `blank`, `mode`, `option`;
- `log2n` (N) and `ls` (lag step Ls);
- `oversample` and `self_sel`.

Reading results:

- Cross results: set `rd_module` and `rd_addr = pair*8 + cell`, then read
  `rd_data`. Pairs are numbered (0,1), (0,2), …, (1,2), …
- Driver results: set `auto_addr = antenna*4 + k`, then read `auto_data`.
- Duty-cycle integrators: set `duty_sel[k] = 2*((system*NANT + antenna)*4
  + signal) + wire`, where wire 0 is "+1" and 1 is "−1". Read
  `duty_count[k]` and `duty_vs` after `duty_done`.

Control inputs that were a separate controller's job are ports of the top.
Change `mode`, `log2n` and `ls` while `blank` is high. In line mode, keep
`blank` low long enough for the recirculators to fill (10240·N clocks) and
run.

## Simulation

Each testbench prints `TB_RESULT checks=… failures=…`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
  rtl/corr_pkg.sv tb/tb_combined_system.sv --top-module tb_combined_system -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_delay_line` | delays 0 to 16383 against the input history, and stand-by |
| `tb_delay_card` | both wires, all four sources, and that the program register loads only on its strobe |
| `tb_prn_source` | the sequence against a reference, restart, the full 2^23−1 period, and the ±1 balance |
| `tb_recirc_card` | window length, τm = τ0 delayed by L, the lag sequence, pass start addresses, refill after blank, and N = 1 and N = 4 |
| `tb_lag_generator` | tap delays |
| `tb_mult_integrator` | integration, clear and overflow |
| `tb_integ_timer` | window timing in both modes |
| `tb_multiplier_module` | every cross and driver result against software correlations, in line mode (normal and oversampled) and continuum |
| `tb_duty_integrator` | counts and V_s over random data-valid periods, and reselection during blank |
| `tb_module_router` | every mode and option |
| `tb_combined_system` | end to end with 3 antennas (see below) |
| `tb_combined_system_full` | the default 27-antenna system (no parameter overrides): one continuum integration, then a switch to single band and its first passes |

The end-to-end test (`tb_combined_system`) feeds the test signal through
delays chosen so that only known antenna pairs line up. It then checks:

- where the correlation peaks appear, in continuum and in line modes;
- overflow and stand-by;
- a blank restart of the recirculators;
- N = 2;
- dual-band cabling;
- the mode switches between them;
- the duty-cycle counts.

It counts each of these mechanisms.

At the default size, verilator needs about ten minutes to build
`tb_combined_system_full`, because it generates a large C++ model. The
three-antenna test builds in seconds and runs in about a second.

## How this departs from the original hardware

- **One clock domain.** The 25 and 6.25 MHz card clocks are clock enables.
  The MOS shift registers of the delay stages are circular RAMs, and the
  variable stage uses a read offset instead of duty-cycle tricks.
- **Fixed delay latency.** The delay line adds a fixed 8257-clock latency
  that the original range does not mention.
- **Result readout.** Results are read by address rather than shifted out
  serially.
- **This design's own choices**, not specified by the original description:
  - the test-signal generator;
  - the recirculator's slot order and pass length (207 cycles);
  - its restart-after-blank rule;
  - the module lag bases;
  - the option numbering (taken from the order of the option lists).
- **Not included:**
  - the analog summation of delay outputs on the mother boards;
  - the controller computer and its interface;
  - the self-test / self-healing sequencing, although the test-signal input,
    the restart and blank are there to support it;
  - the summing of 12-bit results into long integrations.
- **Self products.** The redundant self multipliers of the driver board are
  modelled as four cells per antenna per module, each selectable between self
  and sine × cosine. There is no spare-switching.
