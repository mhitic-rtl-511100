# MHITIC — an 8-channel, 1 ns, multi-hit time-to-digital converter in SystemVerilog

A time-to-digital converter (TDC) reports *when* an edge arrived on an input.
The usual way is to let the edge latch a fast counter. The counter then cannot
take a second edge until the first has been handled, so two close hits cannot
be told apart. This design turns that around. A delay line locked to the
reference clock gives 16 phases of the clock, and each input is **sampled** at
all 16 phases, every period. That gives a 16-sample picture of each input per
period, one sample per bin of about 1 ns. The picture is not stored. It is reduced at
once to the position of the first leading and the first trailing edge it
contains (10 bits), and written to memory only if there was an edge.
The result is a converter that:
- records up to 32 hits per channel;
- resolves hits one clock period (16 bins) apart;
- has a 23-bit range: 19 coarse-counter bits and 4 fine bits, about 8 ms at 1 ns per bin.

The RTL follows the block structure of the published MHITIC chip: 8 channels
plus a common start/stop input, a 16-stage delay line, a 19-bit coarse counter,
32-entry channel RAMs, a data processor, a priority-encoded read-out and a
512-word output FIFO. Many details were not published and were chosen here:
the hit-code layout, the word format, the hand-over of the samples into the
clock domain, when read-out may start, and the daisy-chain signals. Each such
choice is listed under "Where this design chooses" below.

## Time base

Let `D` be the stage delay (`TAP_DELAY_PS`, 962 ps by default) and `T = 16·D` the clock
period (65 MHz). Tap `i` of the delay line rises `i·D` after the clock edge, for i = 0..15.
Time zero is the clock edge that ends reset, when the coarse counter reads 0.

- An input edge at time `t` is measured as **bin `ceil(t / D)`**. Period `k` covers bins
  `16k .. 16k+15`. Bin `16k+i` is the interval `(kT+(i-1)D, kT+iD]`.
- Position 0 of a period therefore catches an edge that arrived in the last
  stage of the period before. The last sample of each period is kept for this.
- A hit time is `{coarse[18:0], position[3:0]}`, 23 bits. All arithmetic on times is
  modulo 2^23.

## Acquisition path (per input, every clock)

```
input ─► sampling_cells ─16─► transition_detect ─10─► channel_ram (32 × 29 bit)
           ▲ taps[15:0]          ▲ edge_sel              ▲ coarse count of that period
       delay_chain            (common input: → common_hit_register instead)
```

1. **Sampling cells.** Sixteen flip-flops, flop `i` clocked by tap `i`. The
   16 samples are moved into the clock domain in two halves:
   - samples 0–7 are copied on tap 8, when they have settled and flop 0 has
     not yet been overwritten;
   - samples 8–15 are copied on the next clock edge.

   The word seen in cycle `k+1` therefore holds period `k`. This two-half
   hand-over is what keeps every sample one full period old without a race;
   the real chip's sampler is full-custom and its hand-over was not published.
2. **Transition detect.** The word is prefixed with the last sample of the previous
   period. A 0→1 step from phase `i-1` to phase `i` is a leading edge at position
   `i`; a 1→0 step is a trailing edge. Only the first edge of each kind in a
   period is kept. This is where the 16-bin double-hit resolution comes from:
   a second pulse inside the same period is lost, a pulse in the next period
   is not. `edge_sel` keeps leading edges, trailing edges or both. The 10-bit code is
   `{lead_v, trail_v, lead_pos[3:0], trail_pos[3:0]}`.
3. **Storage.** When the code holds an edge, `{coarse count of that period, code}`
   (29 bits) goes into the channel's RAM. The coarse counter supplies
   `count_prev`, its value one cycle earlier, which lines up with the word.
   An edge reaches the RAM two clock edges after the end of its period.
   A full RAM drops further hits and sets a sticky `ch_overflow` bit.
4. **Common input.** It has the same sampler and detector but records only its
   leading edge, into the **common hit register** (23 bits plus `com_valid`).
   A later common hit overwrites it.

## Read-out path

```
channel RAMs ─► readout_interface (priority encoder) ─► data_processor ─► readout_interface ─► output_fifo ─► bus
```

- **Zero skipping.** A priority encoder over the RAMs' empty flags picks the lowest
  non-empty channel, so empty channels cost no cycles. Its head entry goes to the
  data processor, and the result is written to the FIFO in the same cycle.
- **Data processor.** This block is combinational. Each stored edge gives an absolute time
  `{coarse, pos}`, and the result depends on the mode:
  - common start (`common_stop=0`): `hit − common`;
  - common stop: `common − hit`;
  - `dp_enable=0`: the absolute time, unchanged. This is used to look at the
    delay line alone.
- **Word format** (27 bits): `{channel[2:0], trailing, time[22:0]}`, one word per edge.
  An entry with both edges becomes two words, leading first. While the trailing
  word is pending, its channel is held.
- **Rate.** One word per clock. With `dp_enable=1` nothing is read until a
  common hit has been seen. A full FIFO stops the read-out, so the RAMs act as
  a buffer. Hits that arrive faster than one word per clock for long enough
  fill a RAM and are then dropped.
- **Output FIFO and multi-chip bus.** The FIFO holds 512 words and shows the
  oldest word with no read latency. Chips are daisy-chained by priority:
  - `pri_out = pri_in | !fifo_empty`, passed on to the next chip;
  - a chip drives the bus (`dout_valid`) and obeys `rd` only when it holds data
    and `pri_in` is low.

  A board controller reading the shared bus therefore reads only chips that
  hold data, in chain order.

### The common register and event timing

The common register holds one time, and the read-out uses it when a word is
*read*, not when the hit was stored. All hits of an event must therefore
leave the RAMs before the next common hit arrives. Otherwise they are measured
against the new one. The benches space events by 16–32 clock periods for this
reason. In common-stop mode, channel hits wait in the RAMs (up to 32 each)
until the stop arrives. `clear` empties RAMs and FIFO and forgets the common
hit between events.

## The delay-line model

`delay_chain` is a **behavioural model**. The real part is an analog chain of
current-starved buffers, regulated so that the 16 stages span one clock period.
The model is a chain of `assign #delay` buffers. Its stage delay is the
parameter `TAP_DELAY_PS`, and the clock period must be `16·TAP_DELAY_PS`.
The regulation loop is not modelled. `STAGE_ERR_PS[i]` adds a fixed error to
the stage that drives tap `i`, and the last bin takes up the difference. This
stage mismatch is the cause of the converter's differential non-linearity.
All errors are zero by default. Everything else is synthesizable RTL. The
sampling flip-flops each have their own clock, which is what the method needs.

## Parameters (top `mhitic_top`)

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 8 | measuring channels |
| `RAM_DEPTH` | 32 | hits held per channel |
| `FIFO_DEPTH` | 512 | words in the output buffer |
| `TAP_DELAY_PS` | 962 | stage delay of the model (65 MHz clock); 1008 gives 62 MHz, 500 the fastest setting (125 MHz) |
| `STAGE_ERR_PS` | all 0 | per-stage mismatch, model only |

Fixed in `mhitic_pkg`: 16 taps, 4 fine bits, 19 coarse bits, 23-bit times,
10-bit hit code, 27-bit output word. All defaults are the published chip's figures,
except the word and entry widths, which follow from the chosen encoding.

## Where this design chooses

Published and followed:
- the block diagram;
- 8 channels plus a common channel;
- 16 delay stages;
- a 19-bit coarse counter and a 23-bit range;
- 32 hits per channel and a 10-bit hit code;
- a 512-word FIFO;
- leading, trailing or both edges;
- common start or stop, with the processor able to be disabled;
- zero skipping by priority encoding;
- sparse multi-chip read-out.

Chosen here:
- the code layout and the first-edge-per-period rule;
- the two-half hand-over of the samples into the clock domain;
- dropping hits when a RAM is full, with a sticky flag;
- lowest channel first;
- two words for a two-edge entry;
- read-out waits for a common hit when the processor is enabled;
- the common input records its leading edge only;
- results wrap modulo 2^23;
- the `pri_in`/`pri_out` chain;
- a synchronous active-high `rst`;
- the `clear` input;
- a single clock for both RAM ports and for the FIFO.

Not modelled:
- the delay-line regulation loop;
- analog effects other than a fixed per-stage error;
- power;
- the board-level bus protocol.

## Verification

Every block has a self-checking bench in `tb/` that compares against values
worked out independently. Each bench ends with `TB_RESULT checks=N failures=M`.

- `tb_mhitic_top` runs the whole chip at its default sizes. It drives
  picosecond-timed pulses and predicts every output word from the edge times,
  using the bin formula above. Six phases cover:
  - common start and common stop;
  - processor disabled;
  - leading-only and trailing-only recording;
  - a double hit within one period, and hits in consecutive periods;
  - RAM overflow;
  - FIFO full with back-pressure;
  - daisy-chain hold;
  - clear.

  Each mechanism is counted and must occur at least once.
- `tb_camac_board`: four chips on one daisy-chained bus (32 channels). It checks
  that only one chip drives the bus, that chips are read strictly in chain
  order, and that every hit comes back.
- `tb_dnl_code_density`: a code-density DNL measurement with a ±19% stage mismatch.
  - Processor disabled: the DNL repeats every 16 codes and follows the stage
    errors (peak about 19%).
  - Processor enabled: start and hit phases are random, so the errors average
    out (peak about 2.5%).

  Both runs are compared with closed-form predictions.
- `tb_interval_sweep`: intervals of 22–40 ns in 70 ps steps, 200 measurements
  each. The mean is `X/D`, and the standard deviation is `sqrt(f(1−f))` ≤ 0.5 LSB
  (measured rms error 0.41 LSB). It also measures intervals of 1 µs to 8 ms
  across the full range.
- `tb_fast_sampler`: the same sweep with the stage delay at 500 ps. That is
  the shortest stage delay the original line supports: a 2 Gsample/s sampler
  with a 125 MHz clock.

Simulate any bench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/mhitic_pkg.sv tb/tb_mhitic_top.sv --top-module tb_mhitic_top
./obj_dir/Vtb_mhitic_top
```

Run times: the end-to-end and board benches take well under a second, the
interval sweep about 11 s, and the DNL bench about 15 s. Verilator has only two
states, so every register read by the logic is reset.

## Files

- `rtl/mhitic_pkg.sv`: constants and types.
- `rtl/delay_chain.sv`: the behavioural delay line.
- `rtl/sampling_cells.sv`, `rtl/transition_detect.sv`, `rtl/coarse_counter.sv`: the acquisition path.
- `rtl/channel_ram.sv`, `rtl/common_hit_register.sv`: storage.
- `rtl/data_processor.sv`, `rtl/readout_interface.sv`, `rtl/output_fifo.sv`: the read-out path.
- `rtl/mhitic_top.sv`: the chip.
- `tb/`: one bench per block, plus the four system-level benches above.
