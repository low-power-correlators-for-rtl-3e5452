# Multiplierless correlator for LDACS spectrum sensing

An aircraft radio that wants to use an LDACS (L-band Digital Aeronautical
Communication System) channel first has to find out whether a ground station or
another aircraft is already transmitting in it. The reliable way to tell is to
look for the known synchronisation pattern every LDACS frame carries: correlate
the received I/Q samples with that pattern and look for a sharp peak. Done
directly, a 376-sample complex correlation needs over a thousand multipliers.
This design needs none.

The idea: the sync pattern is quantised to a handful of levels (here 3 bits per
I and Q component, levels -4..+3). For every incoming sample, one small
**shift-add block** computes the sample times *every* level, using only shifts
and additions. Every tap of the correlator then just **selects** the product it
needs, with its stored sync coefficient as the multiplexer select. The taps sit
in a transposed direct-form filter, so one shared set of products serves all
376 taps in the same clock, and the filter delivers one correlation result per
input sample.

The same correlator serves two roles, chosen by a software-controlled bit:
**spectrum sensing** (does this channel carry an LDACS frame?) and **receiver
synchronisation** (where does the frame start, so the FFT can be aligned?).

The architecture follows the multiplierless LDACS correlator described in
"Low-Power Correlators for Efficient Spectrum Sensing in Aeronautical-LDACS
Communication Systems". Widths, handshakes, the register map and the detection
hardware are this implementation's choices; they are listed below.

## What is computed

With received samples `r[n] = I[n] + jQ[n]` and the stored sequence
`s[k] = sI[k] + j sQ[k]`, `k = 0..375`:

- **RL mode** (reverse link, the default):
  `C[n] = sum_{k=0}^{375} r[n-375+k] * conj(s[k])`.
  The peak appears when the last sync sample `r[n] = s[375]` arrives.
- **FL mode** (forward link): taps 1..75 contribute zero and the result is
  taken from chain stage 225 instead of the end:
  `C[n] = sum_{k in {0, 76..225}} r[n-225+k] * conj(s[k])`.
  Forward-link sync symbols are matched individually rather than as the whole
  reverse-link tile, so only part of the chain is used.

Per tap, `r * conj(s)` expands to

    re = I*sI + Q*sQ
    im = Q*sI - I*sQ

so each tap needs four products, all of which are already available from the
two shift-add blocks (one fed with I, one with Q).

## The datapath, stage by stage

```
 I ──► shift_add ──► prod_i[0..7] ─┐           ┌── sync_i[k], sync_q[k] (sync_coef_bank)
 Q ──► shift_add ──► prod_q[0..7] ─┤           │
                                   ▼           ▼
                     tap_mux k: pick I*sI, Q*sQ, Q*sI, I*sQ ; form re/im ; register
                                   │
                     add_delay_chain: z[k] <= z[k-1] + tap[k]
                                   │
                     C_out = fl_mode ? z[225] : z[375]
```

1. **Shift-add** (`shift_add`). For each 3-bit code `c` it forms
   `x * signed(c)` from shifted copies of `x`: `3x = x + 2x`, `-4x = -(4x)`
   and so on. The eight 19-bit products are registered. Two instances, one per
   component.
2. **Tap multiplexers** (`tap_mux`, 376 instances). The coefficient codes
   `sI[k]` and `sQ[k]` index the product arrays. The tap adds the selected
   products into its real and imaginary terms and registers them. This
   register is the pipeline step that keeps the long fan-out of the shared
   products off the adder chain's critical path. Taps 1..75 have one more
   select input that forces the term to zero in FL mode.
3. **Add-delay chain** (`add_delay_chain`). Stage `k` registers
   `z[k-1] + tap[k]`. A term added at stage `k` passes through `375-k` more
   registers before it reaches the end, so tap 0 pairs with the oldest sample
   of the window and tap 375 with the newest. That is why `s[0]` is loaded into
   tap 0. Accumulators are 29 bits: the full-scale sum `2 * 2^15 * 4 * 376`
   fits without overflow, so no rounding or saturation is needed anywhere.
4. **Output select**. The `fl_mode` bit (registered to line up with the chain)
   picks stage 375 or stage 225. The select is combinational.

### Timing

- Throughput: one result per input sample. `in_valid` may have gaps. A valid
  bit travels with the sample through the three register stages, so nothing
  moves while no sample arrives.
- Latency: a result is valid three clocks after the sample it ends on. For a
  sync sequence entered on consecutive clocks, the peak is in the output
  register 377 clocks after the first sync sample was taken: 375 sample steps
  plus the shift-add, tap and chain registers. The reference design quotes
  376 cycles for its latency.

### Loading the sync sequence

The 376 coefficient pairs sit in a shift register (`sync_coef_bank`). Each
load step shifts all pairs one tap down and puts the new pair into tap 375.
Writing `s[0]` first and `s[375]` last leaves `s[k]` in tap `k`. After reset
all coefficients are zero and the correlator outputs zero. The LDACS sync
sequence itself is not part of this RTL. Software derives it from the standard,
quantises it to 3 bits per component and loads it.

## Frame decision

`peak_detector` splits the correlator output into windows of 4950 samples, the
length of one reduced reverse-link frame. For each sample it forms the
magnitude `|re| + |im|`, which needs no multiplier. It tracks the largest
magnitude, where that magnitude occurred, and the largest of all the other
values. At the end of the window it declares a frame when

    peak * 100 > runner_up * 133

that is, when the peak is more than 1.33 times every other value in the
window. The report (`detected`, peak index 0..4949, peak magnitude) appears one
clock after the window's last sample. Equal maxima keep the first one.

## The subsystem: `ldacs_sense_top`

`ldacs_sense_top` wires the correlator into its place in the receiver: after the
channeliser, which keeps four LDACS channels open at once.

- A 4:1 selector feeds one channeliser output (`ch_valid`, `ch_i`, `ch_q`) to
  the correlator.
- The frame detector watches the correlator output.
- A small register port lets software choose the mode, the link type and the
  channel, and load the coefficients.

Register map (`reg_we`, `reg_addr`, `reg_wdata`; `reg_rdata` is combinational):

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0 | CTRL   | rw | bit 0 `sync_mode` (0 sense, 1 synchronise), bit 1 `fl_mode` (0 RL, 1 FL), bits 9:8 channel. Every write empties the correlator chain and starts a new window. |
| 1 | COEF   | rw | bits 2:0 `sI`, bits 10:8 `sQ`. Every write shifts this pair into the sequence. |
| 2 | STATUS | ro | bits 12:0 peak index, bit 16 detected, bits 25:24 channel of the last report (kept across CTRL writes until the next report) |
| 3 | COUNT  | ro | number of COEF writes since reset |

Outputs:

- Sense mode: `sense_valid` pulses at every window end, with `sense_detected`,
  `sense_channel` and `sense_peak_idx`.
- Sync mode: `sync_strobe` pulses only when a frame is found. `sense_peak_idx`
  then gives the frame position within the window, which is the timing the FFT
  stage needs.
- `corr_valid`, `corr_re` and `corr_im` give the raw correlation.

A CTRL write restarts the window with the next correlator output. Samples still
in the three front pipeline stages at that moment count in the new window. To
start a window on a known sample, pause the channel's valid for four clocks
around the write, as the testbenches do.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `SAMPLE_W` | 16 | I/Q input width, two's complement |
| `COEF_W` | 3 | bits per quantised sync component |
| `N_TAPS` | 376 | sync sequence length, taps 0..375 |
| `FL_ZERO_FIRST`, `FL_ZERO_LAST` | 1, 75 | taps forced to zero in FL mode |
| `FL_OUT_TAP` | 225 | chain stage read in FL mode |
| `NUM_CH` | 4 | channeliser outputs to choose from |
| `WINDOW` | 4950 | detection window in samples |
| `RATIO_NUM` / `RATIO_DEN` | 133 / 100 | peak-to-runner-up threshold |

Defaults live in `rtl/ldacs_corr_pkg.sv` (as `CORR_*`). Every module also
takes them as parameters. Synthesised with generic cells, the default top has
about 17.5k flip-flop bits (coefficients, tap registers, control) plus the
adder-chain registers, 2 x 376 x 29 = 21,808 bits, which generic synthesis
maps onto memory cells.

## How far to trust it, and where it departs

Verified in simulation:

- Every correlator output, in RL and FL mode, with and without input gaps,
  matches a direct-form reference model computed in the testbench (7,500
  compared values at full size).
- The detector's decisions, indices and magnitudes match a model, including
  values just above and exactly at the 1.33 threshold.
- End to end at default parameters: RL and FL frames found at the right
  position, noise-only windows rejected, the sync strobe working, channel
  switching, and stalls on the input.
- A workload run with frames at 10, 0, -5 and -10 dB SNR per sample. All
  frames are found at 0 dB and above. At -10 dB, 3 of 4 were found in the run
  recorded here, and noise-only windows gave no false detection.

Choices made where the source gives no detail:

- Coefficient quantisation is 3 bits per component. The source says more
  quantisation levels than earlier work but gives no number. Change `COEF_W`
  to trade accuracy against the size of the shift-add block and the
  multiplexers: the number of products is `2^COEF_W`.
- Inputs are two's complement. The source calls them 16-bit signed
  fixed-point.
- In FL mode, tap 0 still contributes, because only taps 1..75 get the zero
  select. This follows the source literally.
- Latency is 377 cycles rather than the quoted 376 (see Timing).
- The magnitude measure, the serial coefficient loading, the register map, the
  restart behaviour and the form of the sense and sync outputs are all this
  design's own.
- Reset is synchronous and active high, and clears every register.

Not included: the channeliser, channel filter, RF front-end interface, partial
reconfiguration controller, DMA engines, FFT/IFFT, modulation and coding
stages, and the processor software that chooses the channel. The correlator
connects to them only through the ports above.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ldacs_corr_pkg.sv tb/tb_ldacs_sense_top.sv --top-module tb_ldacs_sense_top
./obj_dir/Vtb_ldacs_sense_top
```

| testbench | what it exercises | size |
|-----------|-------------------|------|
| `tb_ldacs_sense_top` | whole subsystem, all modes and mechanisms | defaults |
| `tb_snr_sweep` | detection at 10/0/-5/-10 dB and on noise | defaults |
| `tb_mless_corr` | correlator against a reference model, latency | defaults |
| `tb_add_delay_chain` | chain arithmetic, clear, hold | 8 taps |
| `tb_peak_detector` | window decision and threshold edge cases | 64-sample window |
| `tb_tap_mux`, `tb_shift_add`, `tb_sync_coef_bank`, `tb_ctrl_regs` | the leaf blocks | defaults |

Each runs in well under a second.
