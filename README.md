# eDP receiver with video clock frequency error compensation

A DisplayPort / embedded DisplayPort (eDP 1.2) sink has to rebuild a pixel
clock that the link never carries. The source sends only two numbers,
M and N, and the pixel clock is `f_video = (M/N) * f_link_symbol`. The pixels
cross from the recovered link clock to that rebuilt clock through a FIFO.
If M is slightly wrong, the FIFO's write and read pointers drift apart.
M can be wrong because it is rounded, because it is updated only now and
then, or because the source uses spread-spectrum clocking. Once the drift
is large enough, the FIFO overflows or reads stale data, and the panel
shows the picture shifted vertically.

This RTL is the digital part of a four-lane eDP receiver built around two
ideas:

* **Direct all-digital video clock synthesis.** The video clock is cut
  out of the CDR's 16-phase half-rate clock by a fractional divider. There
  is no second PLL. A delta-sigma modulator merged with a binary divider
  turns N/M into a 9-bit integer part Q and a 4-bit fraction F, and the
  dithering makes the long-run average exact.
* **FIFO-based frequency error compensation.** Once per line, a monitor
  measures the distance between the write and read pointers of the
  one-line FIFO. When the distance leaves a band around half a line, a
  gain-control block adds a correction k to the (filtered) M. The clock
  is then nudged faster or slower, by at most about 0.4 %.

Around these sit the other digital parts of the receiver:

* the digital halves of the per-lane all-digital CDRs: phase detector,
  deserializer, loop filter and DCO code decoder;
* the logical PHY: lane control, symbol alignment, 8b/10b, de-skew,
  descrambling and link quality counters;
* the link layer: un-framing, attribute and pixel un-packing, half-rate
  FIFO writes and video timing generation;
* link training with fast, skipped and self-recovering modes;
* the AUX channel receiver and reply transmitter.

## Block map

```
ser_in[l] ─ bbpd_deser ─┬─ dlf ─ dcr_decoder ─► DCO codes (dcr_row/col/fine)   x4 lanes
                        │   (UP/DN to DCO proportional path: dco_up/dco_dn)
                        └─ 10-bit words
 ch_ctrl ─ byte_align ─ dec8b10b ─ lane_deskew ─ descrambler ─ stream_unframer
   │                        └─ link_quality           ├─ msa_unpacker ─► M, N, timing
   └─ link_train_ctrl (TPS1/TPS2, self-recovery, IRQ) └─ pixel_unpacker ─ half_rate_writer
                                                                              │
 m_filter ─ (+k) ─ video_clk_synth ─► vclk          line_fifo (2560 x 30, 4 banks)
     ▲               (dsm_divider, int_divider,               │
     │                mp_aligner, phase_selector)     video_timing_gen ─► hsync vsync de pix[2]
 gain_control ◄── fifo_monitor ◄── write / read pixel counts
 aux_ch_rx / aux_ch_tx (16 MHz oversampled Manchester-II)
```

`rtl/edp_rx_top.sv` wires all of them together. `rtl/dp_pkg.sv` holds the
shared types: `sym_t` is a decoded symbol, `msa_t` the main-stream
attributes, `lt_state_t` the training states, and the package also holds
the control-symbol codes.

## The video clock synthesizer

This is the least conventional part. It also needs the most care in
simulation, because its output edges are taken straight from the 16
phases `mp[15:0]` of the 1.35 GHz (HBR) or 810 MHz (RBR) half-rate clock.

* **`dsm_divider`** works out `16 * CLK_MULT * PIX_PER_CLK * N / M`.
  - The result is in units of 1/16 of a recovered-clock period.
    `CLK_MULT = 5` is the ratio of the half-rate clock to the link symbol
    clock.
  - The divider is a sequential restoring divider, one quotient bit per
    clock. M and N change only in blanking, so a slow divider is enough.
  - The 13-bit quotient is `{Q[8:0], F[3:0]}`. The remainder is added to
    an accumulator once per output period, and a carry raises that
    period's ratio by one LSB. This is a first-order delta-sigma
    modulator.
  - A Q below 4 is replaced by 16.
* **`int_divider`** divides `mp[0]` by Q.
  - A 2/3 prescaler comes first. It divides by 3 once per output period
    when Q is odd.
  - A counter of Q/2 prescaler periods follows. The output is reset at
    Q/4 and set at Q/2, which gives a duty cycle within half an input
    period of 50 %.
* **`video_clk_synth`** adds F to a 4-bit phase accumulator every output
  period. A carry out of the accumulator adds one whole cycle to the next
  Q.
* **`mp_aligner`** re-times the divided clock onto each of the 16 phases
  through two flops. The result is 16 copies, each 1/16 of a period
  apart.
* **`phase_selector`** turns the phase into two 4-bit thermometer codes
  and selects one of the 16 copies with two cascaded 4:1 multiplexers.
  The selection register is clocked once per output period, from the
  `mp[0]`-retimed output, so it changes only while the selected copies
  are quiet.

The output is therefore a clock whose periods are Q or Q+1/16 multiples
of the half-rate period, chosen so the average is exact. Period jitter is
bounded by one phase step: 46 ps at HBR. Example:

* 270 MHz × 10376/32768 = 85.4956 MHz, which is 15.79 half-rate
  periods.
* The ratio word alternates between 15 + 12/16 and 15 + 13/16.

## The compensation loop

```
 M (MSA) ─ m_filter ─ M' ─(+)─ M'' ─ synthesizer ─ vclk ─ FIFO read
                           ▲ k                              │
                     gain_control ◄─ up/dn ─ fifo_monitor ◄──┘ (write count from link clock)
```

* **`m_filter`** keeps a moving average of the received M with weight
  1/4.
  - A value that differs from the current one by more than M/32 is
    ignored.
  - It is accepted only after it has arrived REJ_MAX times in a row. A
    new N restarts the filter.
* **`fifo_monitor`** brings the write pixel count of the current line
  into the video clock domain through a request/acknowledge handshake.
  - At each line start it compares the pointer distance with half a line
    (`hwidth/2`). Outside ±TOL it raises `up` (the write pointer is
    running away, so the clock must go faster) or `dn`.
  - It also flags overflow (the distance exceeds the depth) and underflow
    (the distance reaches zero while reading).
* **`gain_control`** adds or subtracts a step from k.
  - The step doubles on each repeated decision in the same direction, up
    to `STEP << MAX_LVL`, and drops back to `STEP` when the direction
    reverses.
  - k is clamped to ±M/256, which keeps the clock change below 0.5 %.

This loop is a bang-bang loop with a dead band. In the end-to-end test, M
is sent 0.2 % high, and k walks down to the clamp within a few lines,
then back up as the distance recovers. The FIFO never under- or
overflows. It does not settle on one k: it circles the needed value. A
smoother gain law fits in `gain_control` without touching the rest.

## Line FIFO and half-rate writes

* **`line_fifo`** holds one line of 2560 pixels × 30 bits. That is
  enough for a 2560×1600 panel at 10 bits per colour. The memory is four
  banks interleaved by address. Each link clock can write up to four
  consecutive pixels, one per lane, and each video clock reads two.
  Reading starts when half the line has been written.
* **`half_rate_writer`** puts a 16-pixel elastic buffer in front of the
  memory. In half-rate mode it writes four pixels only on every other
  link clock, which halves the memory's write rate. The link delivers at
  most two pixels per clock on average, so the buffer never fills;
  `eb_ovf` reports if it does.
* **`video_timing_gen`** is a 17-state machine: four horizontal phases
  (sync, back porch, active, front porch) times four vertical phases,
  plus idle. It produces `hsync`, `vsync`, `de` and two pixels per clock
  from the main-stream attributes.

## Link training and self-recovery

`link_train_ctrl` has three modes, set by `lt_mode`:

* full training: clock recovery on TPS1, then channel equalization on
  TPS2;
* fast training: clock recovery only;
* no training: the CDRs lock on the video stream itself.

In normal operation, the DCO code of each lane is stored.

If synchronization is lost, the controller has two responses:

* **With `self_rec` set**, it reloads the stored codes into the loop
  filters and restarts alignment (`RECOVER` state). Only if the link does
  not come back within `REC_TIME` link clocks does it raise an IRQ.
* **Without `self_rec`**, it sends the usual IRQ pulse on HPD right
  away, and the source retrains.

Loss of sync means any of:

* a lane lost symbol lock;
* the lanes lost alignment;
* `ERR_LIM` decode errors within 64 link clocks.

A lane's CDR counts as locked once its loop-filter error has stayed
within `LOCK_TH` for 64 clocks.

**IRQ pulse length.** An IRQ pulse must last 0.5 to 1 ms. `IRQ_LEN`
counts link clocks and defaults to 135 000: that is 0.5 ms at 2.7 Gb/s
(270 MHz) and 0.83 ms at 1.62 Gb/s (162 MHz), so one value serves both
link rates. The end-to-end test measures the pulse.

## CDR digital part and logical PHY

* **`bbpd_deser`** has one instance per lane. It samples the data on two
  opposite phases of the half-rate clock and the edges on the two phases
  between them, which gives two bits per half-rate period.
  - An XOR of neighbouring data and edge samples gives the bang-bang
    up/down decisions. They go straight to the DCO as the proportional
    path.
  - The samples are deserialized to 10-bit words on the divide-by-5 link
    symbol clock. Bit 0 is the first bit received.
* **`dlf`** forms the sum of the ten decisions, scales it by `2^-alpha`
  and accumulates it.
  - A first-order delta-sigma modulator dithers the 11-bit integer part.
  - It can be loaded with a stored code (self-recovery) and frozen.
* **`dcr_decoder`** splits the 11-bit code into 31-bit row and column
  thermometer codes plus one fine bit, for the DCO's resistor bank.
* **`ch_ctrl`** handles lane swap, polarity inversion and bit-order
  reversal.
* **`byte_align`** finds K28.5 at any of the 10 offsets. It locks after 2
  equal hits, and moves only after 4 hits at a new offset.
* **`dec8b10b`** is the standard decoder, with code and disparity error
  flags.
* **`lane_deskew`** measures the arrival of BS on each lane and delays
  the early lanes. The source skews lanes by 2 symbols each; up to 16
  clocks are covered.
* **`descrambler`** is the 16-bit LFSR `x^16+x^5+x^4+x^3+1`. SR symbols
  reset it to FFFF, or to FFFE with `alt_seed` (eDP).
* **`link_quality`** counts symbol errors per lane and checks PRBS7 bit
  errors.

## Link layer and AUX

* **`stream_unframer`** follows the control symbols:
  - BS/BE mark blanking;
  - SS/SE mark secondary data;
  - FS/FE mark stuffing.

  It passes active bytes, drops stuffing, and reports VB-ID and the end
  of each line.
* **`msa_unpacker`** collects the attribute packet across 1, 2 or 4
  lanes. It outputs M, N, the totals, the starts, the sync widths and
  polarities, the active size, and MISC0.
* **`pixel_unpacker`** rebuilds RGB pixels at 6, 8 or 10 bits per colour,
  for any lane count. It uses a bit collector per lane, and the
  components are left-aligned to 10 bits.
* **`aux_ch_rx`** receives Manchester-II data at 1 Mb/s with 16×
  oversampling.
  - A glitch filter removes pulses shorter than 3 samples.
  - The pre-charge zeros are measured, and a moving average of the
    half-bit period tracks the transmitter's rate. Offsets of ±30 % are
    handled.
  - Data bits are the second half-bit level, sampled at 1/2 and 3/2 of a
    half bit. A mid-bit edge re-centres the sampling.
* **`aux_ch_tx`** sends replies from the same 16 MHz clock, 8 clocks per
  half bit.
  - A reply is 28 zeros, the sync end (two bit periods high, two low),
    the bytes MSB first, and STOP (the same pattern as the sync end).
  - `byte_req` asks for each next byte.
  - `tx_en` drives the pad for the length of the transaction.

## Clocks and crossings

| clock | source | logic |
|---|---|---|
| `dco_clk[l][3:0]` | per-lane DCO, half rate, quadrature | phase detector and deserializer |
| `clk_ls` | lane 0 divided by 5 | logical PHY, link layer, FIFO write |
| `mp[15:0]` | 16 phases of lane 0's half-rate clock | synthesizer |
| `vclk` | synthesizer | FIFO read, timing generator, compensation |
| `aux_clk` | 16 MHz | AUX receiver |

* The lane words are re-registered on `clk_ls`. That assumes all lanes
  run from one source clock. `lane_deskew` removes the remaining symbol
  skew.
* M, N and the attributes are quasi-static. They cross into the video
  domain by taking two equal consecutive samples.
* Start and flush cross through two flops. The write count uses the
  monitor's handshake.
* Resets are asserted asynchronously and released synchronously.

## What is not here

The following parts are analog or outside this receiver. Their digital
interfaces are ports of the top:

* the DCO and its resistor bank;
* the 8-to-16 phase interpolator;
* the equalizer;
* the AUX/HPD drivers and pads;
* the bandgap and LDO;
* the TCON and EDID.

Also not built:

* HDCP and the audio path, which are not part of the eDP receiver;
* the DPCD register file and the AUX transaction layer. The AUX
  receiver and transmitter move bytes, but nothing interprets requests
  or builds replies. Configuration comes in on top-level ports such as `lt_mode`, `tp_sel`, `lane_cnt`, `alt_seed`,
  `half_rate` and `comp_en`.

Limits at the default sizes:

* 2560×1600 at 60 Hz needs 8.36 Gb/s of payload at 24 bits per pixel.
  Four lanes at 2.7 Gb/s carry 8.64 Gb/s. At 30 bits per pixel the format
  needs reduced blanking.
* A 4096-pixel line (4K) does not fit the 2560-pixel FIFO.

## Simulating

Every block has a self-checking testbench, `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. Link-level
benches share the 8b/10b encoder and scrambler models in
`tb/tb_dp_pkg.sv`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
  --top-module tb_edp_rx_top rtl/dp_pkg.sv tb/tb_edp_rx_top.sv
./obj_dir/Vtb_edp_rx_top
```

`tb_edp_rx_top` runs the top with every parameter at its default. It
models the source at bit level:

* 46 ps simulation steps give the 16 clock phases of a 2.7 Gb/s lane;
* four lanes with 8b/10b, scrambling and inter-lane skew;
* a small 96×10 frame with 64×6 active pixels;
* M sent 0.2 % high;
* an AUX sender running 10 % fast.

It goes through the following phases, and counts each mechanism it
exercises:

* A: full training, compensation, AUX bytes received and an AUX reply
  sent;
* B: a bit slip that is recovered by self-recovery without an IRQ;
* C: the same with self-recovery off, so an IRQ pulse is sent (its
  length is measured) and the link retrains;
* D: fast training with half-rate FIFO writes;
* E: no training;
* F: compensation off with a larger M error, which must produce an
  underflow.

The run simulates about 0.8 ms, most of it the 0.5 ms IRQ pulse, in under 10 s.

The unit benches check rates and latencies where the design defines
them:

* `tb_video_clk_synth` measures the average output period against M/N;
* `tb_int_divider` measures exact periods and duty cycle for Q from 4 to 40, plus large Q up to 511;
* `tb_aux_ch_rx` checks ±20 % and ±30 % bit rates;
* `tb_aux_ch_tx` loops the transmitter into the receiver and checks that
  a transaction takes exactly 16 × (36 + 8n) clocks;
* `tb_descrambler` checks the known FFFF sequence `FF 17 C0 14 B2 E7 02
  82`;
* `tb_dec8b10b` checks all 256 data bytes and the 12 control codes, plus code and disparity errors.
