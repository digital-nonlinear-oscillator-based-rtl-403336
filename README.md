# Tunable digital nonlinear oscillator TRNG with a worst-case entropy selector

A digital nonlinear oscillator (DNO) is a handful of FPGA lookup tables wired
into asynchronous feedback loops. Sampled by a flip-flop, its output is a
cheap and fast source of true random bits. Its weakness is spread. How good
the bits are depends on routing delays that the place-and-route tool chooses
and the designer cannot control. Two copies of the same netlist in different
places on the chip can give very different entropy.

This design tackles that spread in hardware. The oscillator's excitation loop
is built from inverting 4:1 multiplexers. The select lines do not change the
logic, but they pick one of 64 physical routing paths, so one oscillator
becomes 64 slightly different random sources. A small state machine, the
**Maximum Worst-Case Entropy Selector (MWCES)**, tries each setting in turn,
estimates how likely its most frequent output pattern is, and keeps the
setting where that pattern is least likely. Every placed copy of the
oscillator therefore tunes itself.

Around this core the repository also provides:

- the fixed (non-tunable) oscillator, and the older fix for spread: two copies
  XORed together;
- an 8-bit LFSR whitener;
- an acquisition path that stores a sequence in on-chip RAM and sends it to a
  host over an RS232 line.

```
                 sel[5:0]
        +--------------------+
        v                    |
  +-----------+   +------+   |   +-------+
  | NMUX ring |-->| NL   |-z-+-->| D  FF |--raw--+--> LFSR whitener --> rnd
  | (64 freq.)|phi| osc. |   |   +-------+       |
  +-----------+   +------+   |                   +--> MWCES (sample_i)
        tunable_dno          +---- srcsel_o <---------+   best setting
                                                           applied when done
  ring osc --> NL osc --> FF --+
                               XOR --> dual        any stream --> RAM --> UART
  ring osc --> NL osc --> FF --+
        dno_c x 2
```

## The oscillators

All oscillator files are **behavioural models**. They cannot be synthesized.
On an FPGA these circuits are combinational loops that the designer places
by hand. They work because of analog effects: finite edge rates, unequal
routing delays and noise. An event-driven simulator can only imitate them.
Each gate in the models has an *inertial delay*: after any input change the
gate waits its delay, then takes the value its inputs have at that moment.
Pulses shorter than the delay are swallowed. Each delay has three parts:

- a nominal value;
- a fixed per-instance offset drawn from `SEED`, which stands for one
  particular placement;
- fresh random jitter of a few picoseconds at every event, which stands for
  electronic noise.

All delays are in nanoseconds. The delay values are this design's own
estimates of LUT plus routing delay. They were not measured.

### Nonlinear oscillator (`nl_oscillator`)

Three XOR-type gates form two feedback loops. A three-input XOR joins the
loops and also takes the excitation `phi`. The wiring used here is:

```
x = XNOR(z, phi)      y = XNOR(x, z)      z = XOR3(x, y, phi)
```

This wiring is a reconstruction that matches the published description:
three XOR/XNOR gates in loops, with two loops meeting in an XOR3. It may
differ from the published netlist. With `phi = 0` the loops have no stable
state and run freely. With `phi = 1` they can settle. The excitation
therefore keeps releasing and holding the oscillation, which turns the
jitter into phase noise at the output. The real circuit is chaotic in
continuous time. This model shows the same kind of behaviour, an irregular
forced output, but not the same dynamics.

### Excitation: fixed ring and tunable NMUX ring

- **`ring_oscillator`** is a three-inverter ring. Together with
  `nl_oscillator` it forms **`dno_c`**, the fixed oscillator.
- **`nmux_ring`** replaces each inverter with an inverting 4:1 multiplexer.
  All four data inputs of a multiplexer come from the previous stage, so
  logically it is still a three-stage ring. Each of the four wires has its
  own delay, though. Two select bits per stage (stage 0 in `sel[1:0]`)
  choose among them, which gives 4^3 = 64 ring frequencies. Together with
  `nl_oscillator` it forms **`tunable_dno`**.

The tunable oscillator uses seven logic gates. On an FPGA each gate is one
LUT: three multiplexers, three XOR gates, and a buffer in front of the
sampling flip-flop.

### Sampling (`sync_sampler`)

The oscillator output passes through one transparent buffer (the "dummy
LUT" of the placed layout) into a single D flip-flop on the system clock.
There is deliberately no two-flop synchronizer. Metastability and timing
uncertainty at this flip-flop are part of the entropy. The reference clock
is 400 MHz. `valid_o` rises on the first clock after reset.

## The Maximum Worst-Case Entropy Selector (`mwces`)

This is the part that needs the most explanation.

### What it estimates

Take a source's output in K-bit symbols. Let p_H be the probability of its
most frequent symbol. The worst-case entropy (min-entropy) of the source is
−log2 p_H. Both this bound and the best case possible for the same p_H
fall as p_H rises. So among several sources, the one with the smallest p_H
is the best bet for high entropy, even when its exact entropy is unknown.
Estimating p_H accurately would need very long sequences. Ranking sources
only needs the comparison to come out right, which is much cheaper.

The selector ranks sources with a race. Keep one counter per possible K-bit
symbol, 2^K counters in all, and feed symbols in until one counter reaches
2^L. The number of symbols T this takes is about 2^L / p_H. A biased source
overflows quickly; a uniform source takes the longest. The source with the
largest T wins.

### How it runs

The sources are scanned one after the other. `srcsel_o` names the source
under test and `sample_i` carries its current sampled bit. In this design
`srcsel_o` drives the oscillator's `sel` directly. In other uses it could
drive a multiplexer over parallel sources.

| State | Cycles | Action |
|---|---|---|
| BUILD_SYM | K | shift K sampled bits into the symbol, first bit ending up most significant |
| COUNT_SYM | 1 | increment the symbol's counter and the total count; note overflow if the counter was at 2^L − 1 |
| CHECK_TIME | 1 | after an overflow: if total ≥ best, record this source and its total; clear all counters |
| UPDATE_SRC | 1 | next source, or STOP after the last one |
| STOP | — | `done_o` high, `best_src_o` and `best_cnt_o` valid |

Without an overflow, COUNT_SYM returns to BUILD_SYM. Each symbol therefore
costs K + 1 clocks, and each source costs 2 clocks more. T always lies
between 2^L and 2^K·(2^L − 1) + 1, so the total and best counters are
K + L bits wide and can never wrap. With the defaults (64 settings, K = 3,
L = 8) one scan takes at most 64 × (2041 × 4 + 2) = 522,624 clocks, or
1.3 ms at 400 MHz.

Details that matter when using or changing the selector:

- **Ties** go to the later source, because the comparison is "greater than or
  equal". The published pseudo-code uses "greater than" and would keep the
  earlier source. The two differ only on exact ties.
- **No settling time** after a source change. The first bit of each new
  setting is sampled one clock after `sel` changes, so it was produced under
  the old setting. Over thousands of symbols per source this is negligible.
  It is the same in the published state machine.
- **Control is `en` only.** While `en` is low the selector stays cleared.
  Raising `en` starts a scan. `done_o` stays high until `en` falls. To
  re-tune, for example after a temperature change, drop `en` for one clock
  and raise it again.
- The symbol counters are a 2^K × L array, which maps to LUT RAM or
  flip-flops. Two assertions check that `srcsel_o` stays in range and that
  `done_o` holds.

### Choosing K and L

K and L are set when the design is built. Larger values rank sources more
reliably but cost more. The storage is 2^K·L counter bits plus two
(K + L)-bit counts. For example, at K = 3, L = 8 that is 64 + 22 = 86 bits.
The published method picks (K, L) offline. It simulates groups of sources
that resemble the real ones, then takes the cheapest (K, L) for which the
entropy of the selected source is within a set tolerance of the best source
in the group. With a 1 % tolerance and the 64-setting oscillator, that gave
K = 3, L = 8, the defaults here.

As a size check, at K = 3, L = 8 and 16 sources, yosys maps this selector to
112 flip-flops. The published Vivado result for the same case is 109.

## Post-processing

- **`lfsr_whitener`** XORs each bit with the output of an 8-bit Fibonacci
  LFSR built on the primitive polynomial x^8 + x^6 + x^5 + x^4 + 1. It is
  seeded with 0x01 and advances only on valid bits. This is the minimal
  whitening that lets the fixed oscillator pass the NIST SP 800-22 suite. In
  the top it whitens the tuned stream, and only after tuning has finished.
- **`xor_combiner`** XORs the bits of two fixed oscillators sampled on the
  same clock edge. This halves the bias (2:1 lossy compression) and keeps
  the output rate equal to the sampling rate. `N_IN` generalises it to more
  inputs. The output is registered.

## Acquisition: `acq_buffer` and `uart_tx`

For off-line analysis, one of four streams is captured into on-chip RAM at
full rate. The RAM is then read out over a serial line.

- The capture length is set at run time in bytes. A value of 0 means the
  full depth. The default depth is 131072 bytes (1,048,576 bits), enough for
  a one-million-bit test sequence.
- Bits are packed first-bit-most-significant.
- Read-out uses a valid/ready handshake, checked by an assertion.
- `done_o` pulses once after the last byte has been handed over.
- A consumer that is always ready gets one byte every 3 clocks.
- `uart_tx` sends 8N1, LSB first. `CLKS_PER_BIT` = 3472 gives 115200 baud
  from a 400 MHz clock. At that rate one 125,000-byte sequence takes about
  11 s.

These two blocks are this design's own simple implementation of "store in
RAM, send over RS232". Only that function comes from the published design.

## Top level (`dno_trng_top`)

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | sampling clock (from a PLL outside this module); synchronous active-low reset |
| `tune_en_i` → `tune_done_o` | run the selector; `dno_sel_o` shows the setting in use; `best_sel_o`, `best_cnt_o` show the result |
| `raw_valid_o`, `raw_bit_o` | sampled bit of the tunable oscillator, every clock |
| `rnd_valid_o`, `rnd_bit_o` | whitened bit, valid once tuning is done |
| `dual_valid_o`, `dual_bit_o`, `fixed_bits_o` | XOR of the two fixed oscillators, and their separate bits |
| `acq_start_i`, `acq_src_i`, `acq_len_i` | start a capture: source 0 whitened, 1 raw tuned, 2 dual XOR, 3 one fixed oscillator |
| `acq_busy_o`, `acq_done_o`, `uart_txd_o` | capture status and the serial line |

While the selector is scanning, `dno_sel_o` follows the scan. Once
`tune_done_o` rises, it switches to the winner and stays there. Parameters:
`K`, `L`, `ACQ_DEPTH`, `CLKS_PER_BIT`, and `SEED`, which sets the simulated
placement of all three oscillators.

For an FPGA build, the oscillator models must be replaced by hand-placed LUT
instances with the same ports. The selector, sampler, whitener, combiner,
buffer and UART are synthesizable as written.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The testbenches check against
independent reference models:

- `tb_mwces` runs the selector at three sizes, including the default,
  against a software model of the algorithm. It checks the source index on
  every clock, the exact cycle at which `done_o` rises, the winner and its
  count.
- `tb_mwces_markov` runs the selector on its tuning benchmark: 100 groups
  of 10 two-state Markov-chain sources, with transition probability drawn
  from 0.3 ± 20 %, at K = 2, L = 9. Every group matches the replay. The mean
  10-bit entropy of the chosen sources is within 0.2 % of the best source in
  each group (0.9614 against 0.9633 bit per bit; the average source gives
  0.9248). The test fails if this loss exceeds 1 %.
- `tb_acq_megabit` fills the default-size capture memory at one bit per
  clock. It stores exactly one million bits, then the full 1,048,576, and
  reads every byte back.
- `tb_dno_trng_top` runs the whole design at small sizes (K = 2, L = 4,
  64-byte RAM, 8 clocks per bit). A shared checker (`trng_checker`) records
  every sampled bit and replays the selection on it. It also checks the
  whitened and XOR streams bit by bit, decodes the serial line, and compares
  each received byte with the captured stream. It counts each mechanism and
  fails if any never happened: symbol overflows, setting switches, re-tuning,
  and all four capture sources.
- `tb_dno_trng_top_full` runs the same checks with every parameter at its
  default: a full 64-setting scan at K = 3, L = 8, then two acquisitions sent
  at 3472 clocks per bit. Tuning takes about 340,000 clocks. The whole run is
  about 1.2 ms of simulated time and well under a minute of wall-clock
  time.
- The oscillator testbenches check the models against their own delay
  formulas and equations:
  - ring periods must fall within the computed bounds for every one of the
    64 settings;
  - the nonlinear core's gate equations must hold at each output event;
  - the core must run freely with `phi = 0` and come to rest with
    `phi = 1`;
  - sampled outputs must toggle and give both bit values;
  - two placements must not track each other.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb -Irtl \
    rtl/trng_pkg.sv tb/tb_mwces.sv --top-module tb_mwces
./obj_dir/Vtb_mwces
```

The `ZERODLY` warnings on the oscillator models are expected: their delays
are computed at run time and are always positive.

## How far to trust it

- **Exact and checked:** the selector's algorithm, timing and counter widths;
  the LFSR polynomial; the XOR combiner; the sampler structure.
- **This design's own choices:** the acquisition RAM, the UART format and
  baud rate, the top-level ports and stream codes, the whitener seed, and
  gating the whitened stream on `tune_done_o`.
- **Models only:** the oscillators. Their wiring follows the published
  structure, but the exact gate connections of the nonlinear core are a
  reconstruction. The delays are estimates. The entropy they produce in
  simulation says nothing about the entropy of a real FPGA implementation.
  The ranking the selector produces in simulation is therefore a test of the
  logic, not of the oscillator.
- **Not included:**
  - the PLL that makes the 400 MHz clock;
  - the host software that stores the sequences;
  - the offline statistics: entropy and redundancy figures, decorrelation
    time, NIST tests, and the (K, L) choice.
