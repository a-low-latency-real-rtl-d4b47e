# Deep-parallel real-time PAM-4 receiver

A PAM-4 link at 1.25 GBd carries 2.5 Gbit/s. The receiver logic here runs at
156.25 MHz, so every clock it must handle 8 symbols (32 ADC samples at 4
samples per symbol). The usual way to do that is to parallelise only the
data-hungry parts and keep the stateful algorithms serial: the
synchroniser and the adaptive equaliser then work on a buffered frame, and
the frame buffer adds a frame's worth of latency.

This design parallelises all the way down instead. Every stage, including
the header correlator and the LMS equaliser with its coefficient update,
works on all P symbols of a clock in the same cycle. Nothing is buffered
beyond a handful of words, and a symbol leaves the receiver a fixed,
small number of cycles after it arrives. Three ideas make this possible:

1. **One shared sample window.** A single register chain shows the last
   P+S+N-2 samples every cycle (S header length, N equaliser taps). The P
   header correlators and the P equaliser lanes all read from this window,
   so no stage waits for another to reorder data.
2. **Parallel synchronisation beside the data path.** The P correlators
   find the header and its lane offset once. From then on the data path
   only needs that offset, so the correlator latency does not add to the
   data latency.
3. **Look-ahead LMS.** The P lanes share one set of coefficients. In each
   cycle, the products error × sample of all P lanes are summed into one
   coefficient update. No lane's error is thrown away, so training takes P
   times fewer clock cycles than with a single error per clock.

Operating point (the parameter defaults): P = 8 lanes, OSR = 4, a 4-tap
symbol-spaced equaliser with the main tap at position 1, a 128-symbol
header, and 80000-symbol frames. The first 8000 symbols after the header
are a training sequence.

## Data path

```
in_adc[32] ─► norm_ds ─► realloc ─┬─► p_sync ─► (det, lane)
                                   │                 │
                                   └────────────► aligner ─► p_dd_lms_dae ─► demap ─► out_bits
                                                     │            ▲                     │
                                                  rx_ctrl ── ts_rom (training)       ber_calc
```

| Stage | Module | Cycles |
|---|---|---|
| Sample selection and normalisation | `norm_ds` | 3 |
| Shared window | `realloc` | 1 |
| Equaliser window selection | `aligner` | 1 |
| Equaliser | `p_dd_lms_dae` | 4 + log2 N = 6 |
| Gray de-mapping | `demap` | 1 |
| Bit-error counting | `ber_calc` | 3 + log2 P = 6 |
| Header correlation (side path) | `p_sync` | 2 + log2 S = 9 |

`pam4_rx_top` wires these together. `pam4_rx_pkg` holds the number formats,
the PAM-4 levels and thresholds, the Gray mapping and the PRBS-15 helpers.
The helper modules are `adder_tree` (a pipelined sum), `pfir` (one parallel
FIR lane), `delay_line` and `prbs_gen`.

## Sample selection and normalisation (`norm_ds`)

Each clock brings 32 offset-binary ADC codes, index 0 the oldest. For each
symbol, one of the 4 samples is kept (`ds_phase`). The ADC offset is then
subtracted (`norm_offset`), and the result is scaled by a Q8.8 gain
(`norm_gain`) into a 16-bit Q2.13 sample, saturating. The PAM-4 levels
become ±8192 and ±2731. Phase, offset and gain are run-time inputs: a
controller or a fixed strap sets them. This design does not recover the
sampling phase or estimate the gain itself.

## The shared window (`realloc`)

The window is `win[j] = x(m - (W-P) + j)`, where W = P+S+N-2 and x(m) is
the newest sample. It is stored as ceil(W/P) word registers (18 at the
defaults), shifting by one word per valid clock. Lane k of a parallel
filter reads the slice `win[k .. k+len-1]`, so the P filters get their
successive inputs in the same cycle with no extra delay.

## Synchronisation and alignment (`p_sync`, `aligner`)

`p_sync` computes, for each lane offset k = 0..P-1, the correlation
`sum_j h_j * win[k+j]` over the S-symbol header. The weights h_j are the
header's levels as the integers -3, -1, +1, +3, so the multiplications are
small. The products are registered, and each lane sums them in a
pipelined adder tree of log2 S levels. A registered peak detector then
reports the strongest lane above `sync_threshold`. The peak detector is one cycle more
than the 1 + log2 S usually counted for this correlator; it costs nothing
on the data path.

The aligner latches the lane of the first detection. From then on it
selects the P+N-1 samples each equaliser word needs:
`aw[j] = win[lane + BASE + j]`, with BASE = CURSOR+S+1-N-P. This places
the main tap on the symbol being decided, and symbol 0 of each word on the
first symbol of a frame word. Detection takes 9 cycles, so the first word
the equaliser sees is data word 8 of the frame. `rx_ctrl` starts its word
counter there.

The index arithmetic needs S+1+CURSOR >= N+P. It also needs P to divide
S, the training length and the frame length.

## Equaliser (`p_dd_lms_dae`)

Lane k computes `y_k = sum_i c_i * x(k-i)`, decides the nearest PAM-4
level, and forms `e_k = d_k - y_k`. The reference d_k is the training
symbol from `ts_rom` during training, and the lane's own decision
afterwards (decision-directed mode). The coefficient update is

```
c_i += 2mu * sum_{k=0}^{P-1} e_k * x_k(-i)
```

It is applied once per clock with all P errors of one word. The samples
that go with each error reach the update through a delay line of 2+log2 N
cycles, so every product pairs an error with exactly the samples that
produced it. The update therefore acts on errors that are D = 6 cycles old
(look-ahead delay). With the small step used, this does not destabilise
the loop.

Fixed point:
- Samples are Q2.13.
- Filter coefficients are Q1.14. They are stored in 24-bit accumulators
  with 8 extra fraction bits, so that updates smaller than one
  coefficient LSB are not lost.
- 2mu = 2^-7 is a shift. It stands for a step of mu ≈ 0.004.
- Every sum saturates.
- After reset or `clear`, the main tap is 1.0 and the others are 0.

Pipeline: input register, products, log2 N adder levels, decision and
error, then output register. `err_ok` flags a word whose P errors are all
below `ERR_TH` (1/8 of the outer level) in magnitude.

## Frame control (`rx_ctrl`, `ts_rom`)

A frame is laid out as S header symbols, then TS_LEN training symbols,
then payload, and frames repeat. After lock, `rx_ctrl` counts frame words
and does four things:
- It addresses the training ROM.
- It enables adaptation.
- It keeps the reference on the training symbols until the equaliser has
  converged. Converged means 64 consecutive words with `err_ok`, or the
  end of the training sequence, whichever comes first.
- It flags payload words for the output and the BER counter.

Decision-directed mode is kept in later frames, because one training
sequence at start-up is enough.

`ts_rom` is 1000 words × 8 symbols. It is filled at start-up by stepping
PRBS-15 (x^15 + x^14 + 1) from seed 0x2B3D, two bits per symbol, Gray
mapped.

## Output and BER (`demap`, `ber_calc`)

`demap` turns each symbol into two bits with Gray mapping: 00, 01, 11 and
10 for the levels -1, -1/3, +1/3 and +1. Lane k's bits are at
`out_bits[2k+1:2k]`. `out_payload` marks payload words.

`ber_calc` compares each payload word with a PRBS-15 reference. The
reference is restarted from seed 0x7FFF at the start of every frame's
payload. `ber_calc` accumulates bits compared and bit errors in 48-bit
counters. `clear` zeroes them, and words already in flight are discarded.

The header uses the same PRBS from seed 0x1ACE. All three seeds are this
design's choice: a real link must use the same sequences at the
transmitter.

## Latency

In the end-to-end test, the bits of a symbol appear **13 cycles** after the
ADC word that holds it:
- 3 cycles of normalisation;
- 1 cycle of window register;
- 1 cycle waiting for the next word, which holds the post-cursor sample
  the main tap needs;
- 1 cycle of alignment;
- 6 cycles of equaliser;
- 1 cycle of de-map.

The BER counters follow 6 cycles later.

The estimate usually quoted for this architecture at these parameters is
35 cycles. That estimate charges the shared window with
ceil((P+S+2N-3)/P)+1 = 19 cycles of caching, as if the data had to wait
for the whole header window. Here the equaliser reads only the samples it
needs, and synchronisation runs beside the data path. A serial-filter
design with a frame memory needs thousands of cycles in comparison,
because it must buffer a whole frame.

## Interface

Inputs:

| Signal | Meaning |
|---|---|
| `clk` | Clock |
| `rst_n` | Asynchronous reset, active low |
| `clear` | Synchronous restart: new header search, start coefficients, training mode, counters zeroed |
| `in_valid` | ADC words valid; the words must then arrive without gaps |
| `in_adc[32]` | 10-bit ADC codes |
| `ds_phase` | Which of the 4 samples per symbol is kept |
| `norm_offset` | ADC code of zero |
| `norm_gain` | Normalisation gain, Q8.8 |
| `sync_threshold` | Header detection threshold (26 bits) |

Outputs:

| Signal | Meaning |
|---|---|
| `out_valid`, `out_bits[16]`, `out_payload` | Recovered bits of each word, and whether the word is payload |
| `eq_sample[8]`, `eq_error[8]` | Equalised samples and errors, Q2.13 |
| `locked`, `sync_lane`, `sync_peak` | Lock status, lane offset, peak correlation |
| `dd_mode`, `frame_cnt` | Decision-directed mode, frames since lock |
| `coef[4]` | Equaliser taps, Q1.14 |
| `bit_cnt`, `err_cnt` | BER counters |

For a clean header at full scale the correlation is about
S × 8192 × 2.5 ≈ 2.6 M. The testbenches set the threshold to a fraction of
that.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Examples with Verilator 5:

```
verilator --binary --timing -Wno-fatal -j 0 --top-module tb_pam4_rx_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pam4_rx_pkg.sv tb/tb_pam4_model_pkg.sv tb/tb_pam4_rx_full.sv
./obj_dir/Vtb_pam4_rx_full
```

`-y rtl -y tb` lets Verilator find each module in the file of the same
name; only the two packages have to be listed. The full-frame test runs in
well under a second. In it, the equaliser reaches decision-directed mode
at frame word 138, some 130 cycles after adaptation starts (the training
budget is 1000 words), and recovers all 143744 payload bits without error.

The testbenches are:
- `tb_pam4_rx_full`: one full 80000-symbol frame with all parameters at
  their defaults.
- `tb_pam4_rx_top`: 3200-symbol frames, 4 frames, with a restart in the
  middle. It checks lock, the switch to decision-directed mode, every
  payload bit, the BER counters, the taps, the 13-cycle latency, frame
  wrap-around and restart.
- One testbench per block, named `tb_<module>`. Each compares the block
  with its own model.

`tb_pam4_model_pkg` holds the test-side models:
- a PRBS generator;
- the frame builder;
- a channel with taps 0.1, 1.0, 0.25 and 0.05;
- noise;
- ADC quantisation.

The other three samples of each symbol carry a distorted copy, so a wrong
phase selection is visible.

## Departures and limits

- **Coefficient update.** The look-ahead update applies all P products
  against the same, D-cycle-old coefficients. A sequential chain, where
  lane k+1 sees lane k's update, was not built.
- **Step size.** The step is a power of two (2mu = 2^-7, mu = 0.0039)
  instead of exactly 0.004.
- **This design's own choices.** These are not specified by the reference
  architecture:
  - normalisation as offset, gain and saturation;
  - the header and training sequences (PRBS-15 with the seeds above) and
    the Gray mapping;
  - the convergence rule (64 words below 1/8 of full scale);
  - all number formats;
  - the `clear` restart.
- **Unused training words.** The first 8 training words pass while the
  header is still being detected, and are not used for training.
- **Not built.** The ADC, its SerDes interface and the transmitter. The
  receiver's input is the 32-sample parallel word such an interface
  delivers. Timing closure at 156.25 MHz has not been analysed. The 16×16
  products and the 8×4 update products are the critical paths to watch.
- **Re-acquisition.** The receiver locks once. It re-acquires only after
  `clear`, and does not re-check the header in later frames.
