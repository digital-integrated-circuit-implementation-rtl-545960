# SiRPA acoustic detector: identification and classification stages in SystemVerilog

This RTL listens to a 44.1 kHz audio stream and decides, window by window,
whether it sounds like a gunshot, a chainsaw or background. It targets a
battery-powered sensor node that guards a protected forest against illegal
hunting and logging, so the architecture aims at the lowest possible
energy, not at speed. The design runs at well under 1 MHz. Each expensive
arithmetic unit is built once and time-shared across the work.

The processing chain follows the SiRPA ("acoustic pattern recognition
system") architecture. The *identification stage* turns audio into a
stream of discrete symbols:

```
 audio 44.1 kHz      8 band energies        3D vector         symbol          class
 ───────────────► filter_bank ──────► dim_reduction ──────► symbol_gen ──────► hmm_classifier ──►
 (Q5.19 samples)  one vector / 128     y = W(x - mu)       nearest of 16     3 HMMs, forward
                  samples = 344.5 Hz   34 clocks           centroids (L1)    algorithm, argmax
                         ▲                   ▲                  ▲                  ▲
                         └──────── coef_regs ◄── spi_slave ─────┴──── model memories
```

The *classification stage* then scores windows of symbols against one
hidden Markov model (HMM) per class. Every coefficient is programmable
after fabrication through an SPI port: the filters, the projection, the
centroids and the HMMs.

## Number format

Every datapath word is a signed two's-complement **Q5.19** number: 24 bits,
5 integer bits (sign included) and 19 fractional bits. One LSB is
1.9e-6, and the range is [-16, 16). The published design chose this
format after checking it against a floating-point C model. It reports
an error of at most 4 % at the filter bank output.

This RTL adds two rules of its own:

- A product is truncated by an arithmetic shift right of 19.
- Every stored result saturates at the range limits instead of wrapping.

The helpers `sat`, `mul_full` and `mul_q` live in `rtl/sirpa_pkg.sv`.

## The filter bank: one IIR filter serving fourteen

This is the heart of the design and the least obvious part.

**The filter.** Each band split uses a quadrature-mirror pair: a low-pass
and a high-pass filter. Both are third-order Cauer IIR filters of the form

```
H(z) = G · (b01 + b11 z^-1)/(1 + a11 z^-1) · (b02 + b12 z^-1 + b22 z^-2)/(1 + a12 z^-1 + a22 z^-2)
```

`iir_qmf` evaluates one step of this filter combinationally. It uses a
first-order and a second-order section in transposed direct form II.
That takes eight multipliers, and the gain G must be folded into b01 and
b11 when the coefficients are programmed. The filter's state is three
words: s0 for the first section, and s1 and s2 for the second.

```
y1 = b01·x + s0          s0' = b11·x  − a11·y1
y  = b02·y1 + s1         s1' = b12·y1 − a12·y + s2
                         s2' = b22·y1 − a22·y
```

**The cascade.** Seven dyads (band splits) are chained. Dyad k filters its
input with the LP and the HP filter and keeps every second output of each.
The HP output becomes a band. The LP output feeds dyad k+1 at half the
rate. The last dyad's LP output is the lowest band. With 44.1 kHz input:

| band | source | pass band (Hz) | decimated samples per frame |
|---|---|---|---|
| 7 | dyad 1 HP | 11025 – 22050 | 64 |
| 6 | dyad 2 HP | 5513 – 11025 | 32 |
| 5 | dyad 3 HP | 2756 – 5513 | 16 |
| 4 | dyad 4 HP | 1378 – 2756 | 8 |
| 3 | dyad 5 HP | 689 – 1378 | 4 |
| 2 | dyad 6 HP | 345 – 689 | 2 |
| 1 | dyad 7 HP | 172 – 345 | 1 |
| 0 | dyad 7 LP | 0 – 172 | 1 |

A *frame* is 128 input samples. The bank emits one energy vector per
frame, which is 344.53125 Hz.

**Time sharing.** Every dyad uses the same two coefficient sets. So only
one `iir_qmf` exists. The FSM in `filter_bank` hands it the coefficient
set, the state words and the input of the dyad that is due, one filter
step per clock. All 14 filters keep their state in a register bank of
7 × 2 × 3 words of 24 bits.

**Schedule.** Let n be the sample's index inside the frame (0..127):

- Dyad k (0-based) has a new input when the low k bits of n are all ones.
- Dyad k keeps its outputs when the low k+1 bits of n are all ones.

So dyad 0 runs on every sample, dyad 1 on every second sample, and so on.
The frame closes exactly on sample 127, where all seven dyads run. Per
sample the FSM does this:

```
accept sample ─► [LP k=0][HP k=0] ─► (kept?) [LP k=1][HP k=1] ─► ... ─► (n = 127) [close frame]
```

The worst case is sample 127. It takes 1 clock to accept, 14 filter steps
and 1 clock to close the frame: **16 clocks**. The bank therefore needs a
clock of at least 16 × 44.1 kHz = 705.6 kHz. At the intended ~750 kHz
there is a small margin. `in_ready` is low while the FSM works. A sample
offered then is lost, and `overrun` flags it.

**Energy.** `band_energy` squares every kept band sample and adds it to
that band's accumulator. At frame close it divides by the band's sample
count (a shift) and saturates the result to Q5.19. It then clears the
accumulators. The published design only calls this "an averaging rule".
The mean of squares is this implementation's reading.

## Dimensional reduction: 8D → 3D in 34 clocks

`dim_reduction` computes y = W (x − mu). Here x is the 8-band energy
vector, mu a programmable mean and W a programmable 3 × 8 matrix. It has
one subtracter, one multiplier and one adder, and works one element per
clock:

| clock (input taken in clock 0) | work |
|---|---|
| 1 – 8 | xc[i] = x[i] − mu[i], saturated |
| 9 – 32 | acc += W[d][i] · xc[i], row by row; each row's sum is truncated to Q5.19 and saturated |
| 33 | results registered |
| 34 | `out_valid` high |

At 749 kHz those 34 clocks take 45 µs. A new energy vector arrives only
every 2.9 ms, so the stage is idle almost all the time.

## Symbol generator

`symbol_gen` is combinational. It computes the L1 (Manhattan) distance
from the 3D vector to each of 16 programmable centroids in parallel. A
binary tree of compare-and-select nodes then keeps the smaller distance
and its index at each level. The root gives the symbol, and also its
distance as `min_dist`. On a tie the lower index wins. This tree replaces
the recursive kd-tree search of the software version. The top registers
the symbol one clock after the projection.

## HMM classifier

`hmm_classifier` holds three models, one per class. The classes are
gunshot, chainsaw, and a third that stands for background. The symbol
stream is cut into consecutive windows of 32 symbols. Three `hmm_forward`
engines run in lock step on the same symbols. Each computes the forward
algorithm for its model λ = ⟨A, B, π⟩:

```
alpha_1(j)   = pi_j · B[j][o_1]
alpha_t+1(j) = ( Σ_i alpha_t(i) · A[i][j] ) · B[j][o_t+1]
P(O | λ)     = Σ_j alpha_T(j)
```

The published classifier uses a floating-point unit and microcoded
control. This implementation stays in Q5.19 fixed point, so it has to
avoid underflow. After each symbol the engine shifts all alpha values left
by the same k bits, which brings their sum S into [0.5, 1). The engine
counts the total shift K. At the end of the window:

```
log2 P = log2(S) − K,   log2(S) ≈ −1 + (S·2 − 1)     (error < 0.09)
```

The score is a signed 24-bit number with 8 fractional bits. A model whose
alpha values all become zero cannot produce the window and scores the most
negative value. The class is the model with the highest score, the lower
index winning a tie. Each engine time-shares:

- one multiplier;
- one adder;
- one read port into its 128-word model memory.

A symbol takes 22 clocks. The class appears 24 clocks after the window's
last symbol is taken.

## Programming over SPI

SPI uses mode 0 (SCLK idle low, data sampled on the rising edge), MSB
first, with 40-bit frames while CS_N is low:

| bits | 39 | 38:24 | 23:0 |
|---|---|---|---|
| field | 1 = read, 0 = write | word address | data (write) / returned on MISO (read) |

SCLK, CS_N and MOSI are sampled with the system clock. SCLK must stay
high and low for at least 4 system clocks each. A frame cut short by CS_N
is dropped. Word addresses:

| address | content |
|---|---|
| 0 – 7 | LP coefficient set: b01 b11 a11 b02 b12 b22 a12 a22 |
| 8 – 15 | HP coefficient set, same order |
| 16 – 23 | mean mu[0..7] |
| 24 – 47 | W[d][i] at 24 + 8d + i |
| 48 – 95 | centroid k, dimension d at 48 + 3k + d |
| 256 + 128m + … | HMM m: π[j] at j, A[i][j] at 4 + 4i + j, B[j][o] at 20 + 16j + o |

After reset the coefficient file is all zero, so the chain outputs zeros
until it is programmed. The HMM memories have no reset and must be
written before use. No coefficient values are built in. The original
values come from the system's training and are not part of this RTL.

## Top-level interface (`sirpa_top`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock (≥ 16 × audio rate), asynchronous active-low reset |
| `sample_valid`, `sample`, `sample_ready`, `overrun` | audio input, one Q5.19 word per sample |
| `spi_sclk`, `spi_cs_n`, `spi_mosi`, `spi_miso` | coefficient programming |
| `band_valid`, `band_idx`, `band_x` | every decimated band sample, for observation |
| `energy_valid`, `energy[8]` | band energies, once per frame |
| `proj_valid`, `proj[3]` | projected vector, 34 clocks after the energies |
| `symbol_valid`, `symbol` | symbol, one clock after the projection |
| `class_valid`, `class_id`, `class_scores[3]` | class and log2 scores, once per 32 symbols |

Sizes live in `rtl/sirpa_pkg.sv`:

- `N_BANDS`, `N_LEVELS`, `N_DIMS`, `N_CENT`;
- `N_MODELS`, `N_HMM_ST`, `OBS_LEN`.

The lower-level modules also take them as parameters.

## How far it follows the published design, and where it departs

The following come from the published design:

- the Q5.19 word;
- the 8-band dyadic bank of third-order QMF Cauer IIR filters, with one
  time-shared filter, an FSM and a state register bank;
- the output rate of 344.53125 Hz and the 705.6 kHz minimum clock;
- the sequential projection with one subtracter, adder and multiplier,
  taking 34 clocks;
- the combinational L1 nearest-centroid tree;
- three HMMs scored by the forward algorithm;
- SPI programmability of all coefficients.

This implementation's own choices:

- **Filter structure:** the sections use transposed direct form II with
  8 multipliers and 5 adders. The published structure is credited with
  9 adders.
- **State bank size:** 42 words. That is what 14 filters of three state
  words need. The published text speaks of a "24 register bank", which
  is read here as a bank of 24-bit registers.
- **Arithmetic:** products are truncated, results saturate, and the energy
  is the mean of squares.
- **Sizes:** the dyad schedule, the band numbering, 16 centroids and the
  tie rules are this design's.
- **Projection datapath:** one adder and one multiplier, following the
  published "only a subtracter, an adder and a multiplier". Another
  passage of the same description speaks of two adders and two
  multipliers.
- **SPI:** the frame format, the address map and the reset contents are
  this design's.
- **HMM stage:** the fixed-point arithmetic with power-of-two
  renormalisation replaces floating point, a plain FSM replaces
  microcode, and the result is log2 rather than ln. The 4 hidden states
  and the 32-symbol non-overlapping windows are also this design's. The
  published classifier was itself still under test, so this stage is the
  least anchored part of the RTL.

Outside this RTL:

- the analog AGC and antialias filter;
- the ADC and its interface (samples enter as parallel words);
- the serial link and RAM of the FPGA test board.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches
compare against an independent integer model in `tb/sirpa_ref_pkg.sv`.
That model writes the filter bank as the textbook recursive cascade, not
as the RTL's schedule.

| testbench | what it establishes |
|---|---|
| `tb_iir_qmf` | 6000 random filter steps bit-exact, saturation, unity DC gain of a half-band Butterworth pair |
| `tb_band_energy` | mean squares of 12 frames, clearing, saturation, 1-clock valid |
| `tb_filter_bank` | every band sample and energy of 7 frames bit-exact with two coefficient sets, at 16 clocks per sample; longest busy time 15 clocks; overrun |
| `tb_dim_reduction` | 300 random projections bit-exact incl. saturation; latency exactly 34 clocks |
| `tb_symbol_gen` | 4000 random queries incl. exact hits and ties |
| `tb_spi_slave` | random writes, reads, aborted frames |
| `tb_coef_regs` | read port and all parallel views, reset |
| `tb_hmm_classifier` | 30 windows: scores bit-exact with the fixed-point model and within 0.15 of floating-point log2 P, class, latency, impossible windows |
| `tb_fb_impulse` | accuracy of the fixed-point bank against a double-precision cascade for an impulsive input: relative STD error per band from 0.001 % (band 7) to 0.11 % (band 0) with the Butterworth pair, required below 4 % |
| `tb_id_accuracy` | accuracy of the bank and the 8D-to-3D projection against a double-precision model on synthetic chainsaw-like, gunshot-like and background audio (36 frames): relative STD error at most 0.04 % per band energy and 0.03 % per projected dimension, required below 4 % |
| `tb_sirpa_top` | whole chain at default sizes: SPI programming and read-back, 64 frames of varied audio, every energy, vector, symbol and the two window classes checked; each stage's latency; overrun |

The testbenches need no external data. They end with a line
`TB_RESULT checks=N failures=M`. The bit-exact checks prove that the RTL
does what this README describes. They cannot show recognition quality,
because the trained coefficients, centroids and models of the original
system are not available.

## Simulating

With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sirpa_pkg.sv tb/sirpa_ref_pkg.sv tb/tb_sirpa_top.sv --top-module tb_sirpa_top
./obj_dir/Vtb_sirpa_top
```

Replace `tb_sirpa_top` by any other testbench to run it alone. The
end-to-end run takes about ten seconds. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/sirpa_pkg.sv rtl/sirpa_top.sv`.
