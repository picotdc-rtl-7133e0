# A 64-channel, 3 ps time-to-digital converter core

This is the digital core of a time-to-digital converter (TDC) for particle-physics detectors. It time-stamps the edges of 64 hit signals in bins of 3.05 ps and keeps the hits that fall into a trigger window. It packs them into 32-bit frames and sends them out on one or four byte-wide ports.

The core does not measure time finely itself. An analog timing macro does that, and it is not part of this RTL:
- a delay-locked loop (DLL) of 64 taps spans one period of the 1.28 GHz clock, 12.2 ps per tap;
- a resistive interpolator adds 4 points between neighbouring taps;
- together they give 256 phases per 781.25 ps cycle;
- every channel's hit signal is sampled by a flip-flop on each phase.

The core receives those 256 sampled bits per channel on every 1.28 GHz cycle. From then on, everything is synchronous logic on a single clock. The core:
- finds the first level change in each cycle's samples, which gives a fine time;
- adds the cycle count, which gives the full time stamp;
- buffers the hits per channel;
- matches them against triggers;
- builds events;
- streams the events out.

## Time stamps

A time stamp has 26 bits, with one LSB = 781.25 ps / 256 = 3.05 ps:

| bits  | field         | counts                                            |
|-------|---------------|---------------------------------------------------|
| 25:13 | coarse (13)   | periods of the 40 MHz reference (25 ns)           |
| 12:8  | medium (5)    | 1.28 GHz cycles inside the period (0..31)         |
| 7:2   | DLL tap (6)   | 12.2 ps taps                                      |
| 1:0   | interpolation (2) | quarter taps                                  |

The top 18 bits are one free-running counter of 1.28 GHz cycles (`now`). It overflows naturally every 2^18 × 781.25 ps = 204.8 µs. All time arithmetic is done modulo 2^18 cycles (or 2^26 bins): window tests, rejection of old hits and time over threshold. Distances are therefore only meaningful below half the range.

## Clocking and the time base (`time_base`)

There is one clock, `clk`, the 1.28 GHz output of the PLL.
- **320 MHz logic.** Edge processing, buffers, matching and event building are clock-enabled with `ce320`, one cycle in four.
- **Input sampling.** The trigger, event reset and bunch-crossing reset are synchronous to the 40 MHz reference. They are sampled once per 25 ns period, at `ce40`.
- **Trigger timing.** A trigger is passed on to the event builder one period later. It carries the count, the event number and the bunch number of the moment it was sampled.
- **Bunch counter.** It counts 40 MHz periods, wraps after a programmable maximum (default 3563, the LHC orbit) and loads a programmable value on a bunch-crossing reset.
- **Event counter.** It counts triggers and is cleared by an event reset.

## The channel pipeline (`tdc_channel`)

Each of the 64 channels is a chain of five blocks:

1. **`hit_decoder`.** It registers the 256 samples. Registering them is the standard-cell flip-flop that resolves metastability after the custom capture flip-flop. It then compares each sample with the one before it, the first with the last sample of the previous cycle. The first position where the level changes is the fine time; its direction says rising or falling.
   - A channel accepts at most one edge per 1.28 GHz cycle. A second change in the same cycle is ignored and flagged on `multi`.
   - The latency is two cycles.
2. **`derandomizer`.** A 4-entry FIFO absorbs bursts: edges arrive at up to 1.28 GHz but leave at 320 MHz. A burst of four edges in consecutive cycles always fits. An edge that finds the FIFO full is dropped and `lost` pulses.
3. **`edge_processor`.** It applies the edge mode:
   - rising only;
   - rising and falling, each its own hit;
   - falling only;
   - leading edge plus time over threshold (TOT). The leading edge is held until the next trailing edge, and one hit with leading time and TOT = trailing − leading is emitted.
4. **`channel_buffer`.** It stores up to 64 hits in time order. The matcher reads it at an offset from the head as well as at the head. That is what makes overlapping trigger windows possible: a hit is not removed when it is read out.
5. **`trigger_matcher`.** It searches this channel's buffer for the current trigger window (next section).

## Trigger matching — the hard part

A trigger selects the hits in a window [trigger time − latency, + window length). Latency and length are given in 1.28 GHz cycles. Windows of successive triggers may overlap, so one hit can belong to several events. The design handles this as follows:

- **Trigger FIFO (`event_builder`).** Each trigger is stored with its window start in a 16-deep FIFO. If the FIFO is full, the trigger is dropped and a flag is set, reported in the next trailer and in the status bytes.
- **Waiting for the window to close.** The head trigger is processed once its window has ended, plus `MARGIN` = 64 cycles. Hits that were inside the window may still be in the decoder, derandomizer or edge processor when the window ends. The margin has to cover that pipeline.
- **Searching.** `start` goes to all 64 matchers at once, and each walks its own buffer from the head:
  - hits older than the window are removed;
  - hits inside the window are offered to the event builder and stay in the buffer;
  - the first hit after the window, or the end of the buffer, ends the search, and the matcher raises `done`.
- **Why hits stay.** Because windows start in trigger order and the buffer is in time order, a hit kept for this window is either needed by a later window or removed by the next search.
- **Between searches.** The matcher keeps the buffer from filling with hits no trigger will claim. It removes head hits older than `reject_before`:
  - with triggers waiting, this is the window start of the oldest waiting trigger;
  - with no triggers waiting, it is now − latency − MARGIN.
- **Relative time.** With it set, the time sent is the hit time minus the window start, in 3.05 ps bins.
- **Untriggered mode.** The matcher offers every buffered hit at once.

Throughput: each matcher offers one hit per 320 MHz cycle, and the event builder takes one frame per 320 MHz cycle in total.

## Events and frames (`event_builder`, `tdc_pkg`)

For every trigger the builder writes:
1. up to two headers, each enabled separately;
2. the matched hits, channel by channel in increasing channel order, one frame per 320 MHz cycle. A channel is skipped as soon as it reports `done` with nothing to offer.
3. a trailer.

Port assignment:
- **Four-port mode.** Channel group g (channels 16g…16g+15) goes to port g. Headers and trailers go to all four ports, each trailer carrying the hit count of its own port.
- **Single-port mode.** Everything goes to port 0. A group-separator frame precedes the hits of each group, because a data frame has room for only 4 channel bits.
- **Untriggered mode.** Hits are taken round-robin over the channels, with the same port and separator rules and no headers or trailers.

A frame is written only when every port it goes to has room. Back-pressure stalls the matchers, and behind them the channel buffers fill. Hits are lost only at the derandomizer or channel-buffer inputs, and such a loss is flagged.

32-bit frames, most significant bit first:

| frame | layout |
|---|---|
| hit | `0`, channel (4), edge (1: rising), time (26) |
| leading + TOT, 16/11 | `0`, channel (4), leading (16), TOT (11) |
| leading + TOT, 19/8 | `0`, channel (4), leading (19), TOT (8) |
| header 1 | `1000`, event number (12), `0000`, bunch number (12) |
| header 2 | `1001`, 10 zeros, trigger time in 1.28 GHz cycles (18) |
| trailer | `1010`, event number (12), flags (4), hit count (12) |
| group separator | `1011`, 26 zeros, group (2) |
| idle | `D0D0D0D0` |

How the leading + TOT fields are filled:
- The leading field is a programmable slice of the 26-bit time: shift right by `lead_shift`, then saturate to the field width.
- The TOT field is filled the same way with `tot_shift`.
- With relative time, 16 bits at 3 ps cover 200 ns, and 19 bits cover 1.6 µs.

Trailer flags: bit 0 means hits were lost in a channel of this port since the last trailer; bit 1 means a trigger was lost.

## Readout ports (`readout_port`)

Each of the four ports has a 512-frame FIFO and sends one byte per strobe, most significant byte first.
- **Byte rate.** 320, 160, 80 or 40 MHz, derived by counting 4, 8, 16 or 32 cycles of the 1.28 GHz clock.
- **Bandwidth.** Four ports at 320 MHz give 10.24 Gbit/s. One port at 40 MHz gives 320 Mbit/s.
- **Idle.** With an empty FIFO the port sends the idle frame, so the link never stops.
- **Framing.** `frame_start` marks the first byte of every frame. The receiver needs it because the idle frame is the same byte repeated.

The differential output drivers are analog and not part of the RTL.

## Configuration and status over I²C (`i2c_slave`, `config_registers`)

**Bus protocol (`i2c_slave`).**
- The I²C target has device address `0x2A`. It oversamples SCL and SDA with the core clock, so any bus speed far below that clock works, including 1 Mbit/s.
- A write sends a 16-bit register address, high byte first, then data bytes, and the address auto-increments.
- A read returns bytes from the current address, also auto-incrementing.

**Register map (`config_registers`).**

| addresses | content |
|---|---|
| 0–347 | configuration (read/write) |
| 348–669 | delay adjustment for the timing macro, output on `delay_adjust` |
| 670–969 | status (read only) |

The first 19 configuration bytes drive the core. The rest are stored but have no function here. Their layout is listed at the top of `config_registers.sv`:
- mode bits: triggered, relative, edge mode, TOT format, single port, port rate;
- header enables and shifts;
- latency and window, 16 bits each, LSB first;
- bunch counter maximum and reset value;
- 64 channel enables.

Reset values: untriggered, rising edges, four ports at 320 MHz, header 1 on, all channels on.

Status bytes:

| byte | content |
|---|---|
| 0–1 | event number |
| 2–3 | bunch number |
| 4–11 | FIFO level of each port (2 bytes each) |
| 12, bit 0 | trigger lost |
| 13–20 | per channel: hits lost, sticky |
| 21–28 | per channel: more than one edge in a cycle, sticky |

## Top level (`picotdc_top`)

The top wires together:
- the I²C target and registers;
- the time base;
- 64 channels;
- the event builder;
- four readout ports.

Its ports:
- `clk`, 1.28 GHz, and `rst_n`, asynchronous;
- `samples[64]`, 256 bits each, from the timing macro;
- `trigger`, `evt_rst`, `bx_rst`;
- the I²C pins: `scl`, `sda_in`, and `sda_oe` (high pulls SDA low);
- `ro_data[4]`, `ro_strobe`, `ro_frame_start`;
- `delay_adjust`, to the timing macro.

Parameters, all at their real sizes by default:
- `PHASES` = 256
- `DERAND` = 4
- `BUF_DEPTH` = 64
- `TRIG_DEPTH` = 16
- `RO_DEPTH` = 512
- `MARGIN` = 64
- `I2C_ADDR`

## What is not here, and where this design chooses for itself

**Not in the RTL.** These parts are analog or physical:
- the PLL (40 MHz to 1.28 GHz);
- the hit receivers and their programmable glitch filter;
- the DLL and the resistive interpolator;
- the fine-phase drivers and the capture flip-flops;
- the output drivers, pads and package.

The RTL starts from the sampled bits and ends at the output bytes.

**Source facts followed:**
- 64 channels;
- 256 bins per 781.25 ps;
- the 13/5/6/2-bit time stamp;
- one edge per 1.28 GHz cycle;
- a 4-hit derandomizer at 1.28 GHz;
- buffering and matching at 320 MHz per channel;
- triggered mode with latency, window and overlap, and untriggered mode;
- rising / both / TOT edge modes;
- the 16/11 and 19/8 leading + TOT formats;
- up to two headers, trailers and group separators;
- the idle frame `D0D0D0D0`;
- 1 or 4 byte ports at 40–320 MHz;
- I²C with 348 configuration, 322 delay-adjust and 300 status bytes;
- a bunch counter with arbitrary overflow and reset.

**Own choices**, each also noted in the file it concerns:
- the depths of the channel buffer, trigger FIFO and readout FIFO;
- the matching margin;
- the fields inside headers, trailers and separators, beyond their type codes;
- the configuration byte layout and the status map;
- the I²C device address and addressing;
- the byte order and framing signals on the ports;
- the falling-only edge mode;
- TOT pairing and saturation;
- the reference for relative time (the window start).

**Departures and gaps:**
- **Trigger and resets.** They are handled only as synchronous 40 MHz signals. An asynchronous option exists in the original chip but is not built.
- **Time-stamp width.** The time stamp is 26 bits throughout. One statement of the source calls the leading time "25 bits", but its field table adds up to 26.
- **Lower-resolution and 32-channel modes.** These appear in the original power figures but are not described. Only the full-resolution 64-channel mode is built; channels can be disabled.
- **Delay adjustment.** The 322 delay-adjust bytes are stored and passed out unchanged. Their meaning belongs to the analog macro.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one:
- prints `TB_RESULT checks=N failures=M`;
- stops itself with a watchdog.

With Verilator 5, list the package first:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/tdc_pkg.sv $(ls rtl/*.sv | grep -v tdc_pkg) tb/tb_picotdc_top.sv \
    --top-module tb_picotdc_top -Mdir obj_top
./obj_top/Vtb_picotdc_top
```

Replace `tb_picotdc_top` with any other testbench, e.g. `tb_trigger_matcher` or `tb_event_builder`. Modules that a testbench does not use are simply ignored. To lint, run the same file list with `--lint-only -Wall --top-module picotdc_top`.

**`tb_picotdc_top`** runs the whole core at its default size, with no parameter overrides: 64 channels × 256 phases. It takes a few seconds.
- A hit generator draws edge trains per channel in 3.05 ps bins and converts them to phase samples.
- The test configures the chip over I²C, sends triggers and deserializes all four ports.
- It compares every frame with a reference built from the edge lists.
- Phase A: triggered, four ports, both edges, two headers, overlapping windows.
- Phase B: single port with separators, leading + TOT, relative time, 160 MHz byte rate.
- Phase C: untriggered streaming.
- Phase D: a burst that overflows a derandomizer; the loss must appear in the trailer and in the status bytes read back over I²C.
- It counts how often each mechanism occurred (events, overlaps, separators, TOT hits, relative hits, streamed hits, losses, idle frames) and fails if any never did.

**Block testbenches.** These override sizes where a smaller block tests faster:
- `tb_channel_buffer`: 16 entries;
- `tb_readout_port`: 32 entries;
- `tb_event_builder`: a 4-deep trigger FIFO.

They check the rates given above in cycles: one edge per 1.28 GHz cycle, one hit per 320 MHz cycle, and the byte period per rate setting.

## Synthesis note

The RTL is written to be synthesizable. Memories are plain arrays: the channel buffers, the FIFOs and the register file. Yosys 0.63, reading the code through its slang front end, hits an internal assertion in its FSM extraction pass on the event builder's state register. Run `synth` with `-nofsm`, or skip `fsm`, for that module. The other modules go through coarse synthesis unchanged. The whole top is large: 64 channels, each with a 256-phase decoder.
