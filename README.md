# 36-channel multi-phase-clock TDC for an FPGA

This design is a time-to-digital converter (TDC) for photon detectors read
out by discriminators. Each input is sampled by sixteen flip-flops, clocked
by 420 MHz clocks spaced 22.5 degrees apart. A clock period of 2.381 ns is
thus cut into sixteen bins of 148.8 ps. The time of arrival (ToA) of a
pulse is the bin where the sampled pattern turns from 0 to 1. Its
time over threshold (ToT) is the number of bins until it turns back to 0.
The scheme uses only clocks and flip-flops. There are no carry-chain delay
lines, so the bin width follows the clock. It does not drift with process,
voltage or temperature the way delay-line TDCs do.

There are 36 channels:
- 34 photon channels;
- channel 34, the trigger channel;
- channel 35, a spare.

The hits go through a small data-acquisition (DAQ) chain:
1. A merger combines the channels into one stream.
2. A trigger matcher keeps only hits near a trigger (zero suppression).
3. An event buffer holds the readout words.
4. A byte sender passes them to a USB bridge chip.

A calibration trigger output can start an external pulse generator. Its
pulses are fed back into a channel, and that is how the bin widths of the
real chip are measured.

```
clk80_in ─► tdc_clocking ─► clk210, clk_ph[7:0] (420 MHz, 0..157.5°)
hit_in[35:0] ─► tdc_core ─ 36 × tdc_channel ─ tdc_sampling_ffs ─► tdc_sync_logic ─► tdc_hit_encoder
                    │ coarse counter
                    ▼
                 tdc_daq: tdc_hit_merger ─► tdc_trigger_matcher ─► tdc_fifo (events) ─► tdc_usb_tx ─► USB bridge
                          trigger = channel 34  or  tdc_cal_pulser (trig_out to the pulse generator)
```

## Clocks

`tdc_clocking` models three PLLs fed from an 80 MHz board clock:
- PLL_0 makes 210 MHz and 420 MHz at 0°.
- PLL_1 makes 420 MHz at 22.5° to 135°.
- PLL_2 makes 420 MHz at 157.5°.

These eight clocks are used on both edges. The falling edge of the k·22.5°
clock is the (k+8)·22.5° sample, which gives the sixteen phases. The PLLs
are vendor primitives, so `tdc_pll_model` is a behavioural model and not
synthesizable:
- It has ideal phases and no jitter.
- It locks after 8 reference cycles.
- All outputs are phase-aligned from the lock edge.

On an FPGA, replace `tdc_clocking` with the vendor's clocking primitives.
Keep the same ports. A synthesis tool ignores the model's delays, so
`tdc_top` synthesised with the model has constant clocks and optimises down
to nothing. Synthesise `tdc_core` and `tdc_daq` on their own to see the real
logic: about 6000 flip-flops for the 36 channels, plus the DAQ's FIFO
memories.

`rst_n` also holds the PLLs. The logic leaves reset eight 210 MHz cycles
after every PLL has locked. The sampling and synchronising flip-flops have
no reset of their own, and the delay flushes their power-up contents before
the encoders look at them.

## One channel: from sixteen samples to a 32-bit word

Moving the samples safely into one clock domain is the delicate part.

`tdc_sampling_ffs` holds 16 flip-flops:
- `smp[k]` is sampled on the rising edge of `clk_ph[k]`;
- `smp[k+8]` is sampled on its falling edge.

Sample j is therefore taken at j·148.8 ps after the 0° edge.

`tdc_sync_logic` moves the samples into the 0° domain:
- The early half (samples 0–7) is taken twice at the next 0° edge.
- Each late sample (8–15) is first captured by its own clock's next rising
  edge, which lands in the second half of the period. From there it goes
  to the 0° domain.

Every hop takes at least half a period (1.19 ns). The two halves come out
aligned, as one 16-bit pattern per 420 MHz period.

Two consecutive patterns form one 32-bit word at 210 MHz: bit i is bin i,
and bit 0 is the oldest. The 210 MHz edge at time 2jT carries the
samples of periods 2j−4 and 2j−3.

On silicon this only works if the paths are placed and timed by hand. This
RTL has the logical structure, not the placement.

## Encoder: ToA, ToT and overflow

`tdc_hit_encoder` sees one 32-bit word per 210 MHz cycle and also keeps the
last bit of the previous word.
- A rise is a 0→1 step and a fall is a 1→0 step.
- A timestamp is `{coarse, bin}`: a 24-bit count of 210 MHz cycles plus 5
  bits of bin.
- A hit is reported at the cycle of its falling edge. It carries:
  - `toa` (29 bits);
  - `tot` (8 bits, in bins);
  - `tot_ovf`;
  - the channel number.
- A pulse still high `TOT_MAX` = 255 bins (37.9 ns) after its leading edge
  is reported at once with `tot` = 255 and `tot_ovf` set. Its fall is then
  ignored.
- At most one pulse is reported per word (4.76 ns). If a second short pulse
  falls in the same word, it is merged into the first.

The maximum rate is therefore one hit per channel per 4.76 ns (210 MHz).
That is well above the 50 MHz per-channel rate asked of this kind of TDC.
The encoder bench runs a 50 MHz pulse train (one pulse every 19.9 ns) with no loss.

Timestamps carry a fixed pipeline offset: on an ideal channel, toa = true
bin − 255. Only differences matter, and the trigger's timestamp has the
same offset.

## DAQ and event building

`tdc_hit_merger`:
- queues up to `CH_DEPTH` = 4 hits per channel (a `tdc_fifo` each);
- takes one hit per cycle, round-robin;
- drops and counts hits when a queue is full (`n_hits_dropped`).

The trigger channel is masked out of the data stream. Its time is the
trigger time.

`tdc_trigger_matcher` is the event builder, and its timing is the part to
understand before changing parameters:

- **Hits arrive late and out of order.** A hit is reported at its falling
  edge, up to 255 bins after its ToA, and the merger interleaves the
  channels. So every hit sits in a 256-entry hit buffer. The head of the
  buffer is judged only when the current time is `LATENCY` bins past its ToA
  ("released"). With `LATENCY` = 1024 bins (152 ns), any trigger that could
  want the hit has been queued by then. `LATENCY` must cover:
  - the channel pipeline (~256 bins);
  - the longest ToT (255 bins);
  - the time spent in the merger;
  - and `WIN_PRE`.
- **The window.** A hit at time h belongs to the trigger at time T if
  `T − WIN_PRE ≤ h ≤ T + WIN_POST`. The default is 100 bins on each side,
  ±14.9 ns.
- **Events.**
  - With no event open, the oldest queued trigger (queue of 4) opens one
    and a header word is sent.
  - Released hits that are too early are dropped.
  - Released hits in the window are sent.
  - Hits not yet released, or after the window, are written back to the
    tail of the buffer. They do not block hits of the window queued behind
    them. When a new hit is arriving, it has the buffer's write port first.
    A full buffer writes the head back in the same cycle it reads it, so an
    open event still closes while the merger is pressing.
  - Once the time is past `T + WIN_POST + LATENCY`, one last pass over the
    buffer is made, and a trailer closes the event.
- **Suppression.** With no event open, released hits are dropped. A hit in
  two overlapping windows is sent with the first event only.
- **Trigger drops.** Triggers beyond the 4-deep queue are dropped and
  counted (`n_trig_dropped`).

`tdc_fifo` (1024 × 64 bit) is the event buffer. `tdc_usb_tx` sends each
word as 8 bytes, least significant first, using an FT245-style synchronous
FIFO interface: `usb_txe_n` high means the bridge is full, and `usb_wr_n`
is the byte strobe. A stalled USB side fills the event buffer, then stalls
the matcher, and then the merger queues fill and hits are dropped.

Readout words, 64 bits each (`tdc_pkg`):

| word | [63:60] | fields |
|---|---|---|
| header | 0xA | evt_no [59:36], trigger time [28:0] |
| hit | 0x1 | ch [46:41], tot_ovf [40], tot [39:32], toa [28:0] |
| trailer | 0xE | evt_no [59:36], number of hits [35:20] |

## Calibration

The real bins are not 148.8 ps each: routing skew makes them vary, by up
to about 180 ps in a typical channel. They are measured with an external
pulse generator:
1. `tdc_cal_pulser` drives `trig_out` every `cal_period` cycles, through
   an LVDS-to-TTL converter, into the generator's trigger input.
2. The generator returns a pulse with a programmable delay to a channel.
3. With `trig_sel` = 1, the matcher uses the time of the `trig_out` edge
   (`{coarse, 0}`) as the trigger, so each event holds the delayed pulse.
4. Stepping the delay by 10 ps over one clock period gives how often each
   bin is hit, and from that its width.

The correction itself is applied offline and is not part of the RTL.

## Parameters (top-level defaults)

| parameter | default | meaning |
|---|---|---|
| N_CH (package) | 36 | 34 photon channels, trigger (34), spare (35) |
| TOT_MAX | 255 | ToT saturation, bins |
| CH_DEPTH | 4 | per-channel hit queue |
| WIN_PRE / WIN_POST | 100 / 100 | trigger window, bins |
| LATENCY | 1024 | hit hold time before matching, bins |
| EVT_DEPTH | 1024 | event buffer, 64-bit words |
| CAL_WIDTH | 8 | trig_out width, 210 MHz cycles |

## Where this design departs from, or adds to, its source

These are taken from the source:
- the clock plan: 80 MHz in, 210 MHz, 420 MHz at 22.5° steps from three PLLs;
- 34 + 2 channels;
- ToA and ToT;
- a triggered, zero-suppressed DAQ with USB output;
- the calibration trigger to a pulse generator.

These are this design's own, because the source does not give them:
- the synchroniser structure;
- the word packing;
- the encoder's rules (one pulse per word, report at fall, ToT limit);
- the coarse counter width;
- the merger;
- the window and latency scheme;
- the readout word format;
- the USB bridge interface;
- all queue depths.

The source speaks of "16 phase-shifted copies" of the clock. Here those are
eight clocks used on both edges.

Not covered by the RTL:
- the input-path delay equalisation and hand placement that make the bins
  close to uniform;
- bin-width variation itself, since simulated bins are ideal;
- the offline calibration.

## Simulating

Every file is in `rtl/` and `tb/`; `tdc_pkg.sv` comes first. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tdc_pkg.sv tb/tb_tdc_top.sv --top tb_tdc_top
./obj_dir/Vtb_tdc_top
```

Each bench prints `TB_RESULT checks=N failures=M`. Each block has its own
bench (`tb/tb_<module>.sv`), with pulse edges placed mid-bin so that
expected times are exact.

`tb_tdc_top` runs the whole design at default parameters: clocks from the
PLL models, all 36 channels, and readout through a USB bridge model
(`tb_usb_host_model`, 30 % busy). It covers:
- triggered events with random hits around each trigger, compared as sets
  of (channel, ToT, overflow, ToA − trigger);
- a ToT overflow;
- suppression of hits outside the window;
- a trigger burst that overflows the trigger queue;
- a 35-channel 50 MHz flood that overflows the merger queues;
- calibration-mode events driven by `trig_out`;
- USB stalls.

It counts each of these and fails if any never happened.

`tb_tdc_cal_scan` runs a calibration scan, also at default parameters:
- A model pulse generator answers each `trig_out` with a pulse on channel
  0, delayed by 1 ns + d.
- d steps from 0 to 3000 ps in 10 ps steps, one event per step.

From the bin of each event, the bench derives how many steps each bin
spans, i.e. its width. It checks these points:
- the bin moves by 0 or 1 per step;
- every bin is 140–150 ps wide (ideal 148.8 ps);
- all 16 bins of a period are hit.

This is the same measurement that gives the real bin widths on hardware.

The fine timing depends on the simulator's handling of events at
picosecond resolution. All files use `timescale 1ps/1fs`.
