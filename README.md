# 64-channel 3 ps / 12 ps time-to-digital converter

This RTL measures when the edges of 64 digital hit signals occur. It records
each edge as a 26-bit time stamp with 3.05 ps bins (or 12.2 ps bins in the
low-resolution mode), which gives a range of 204.8 µs. The chip keeps the
hits in per-channel buffers. It can send every hit, or only the hits that
fall inside a latency/window around a trigger. The data leave as 32-bit
frames on one or four byte-wide ports, and everything is configured over
I2C.

The analog parts are outside the RTL: the PLL, the differential receivers
and the line drivers. The DLL, the resistive interpolator and the glitch
filter are behavioural models with delays. Everything after the capture
flip-flops is synthesizable and runs on one 1.28 GHz clock.

## How a time stamp is formed

| bits | field | unit |
|---|---|---|
| 25:13 | coarse count | 25 ns (40 MHz) |
| 12:8 | medium count | 781.25 ps (1.28 GHz) |
| 7:2 | DLL tap | 12.2 ps (781.25 ps / 64) |
| 1:0 | interpolation step | 3.05 ps (tap / 4) |

1. **DLL** (`dll`) and **interpolator** (`res_interp`) produce 256 phase
   clocks, evenly spread over one 781.25 ps period. Both are models: ideal
   delays with no locking loop.
2. **Capture** (`capture_ffs`): the hit is the *data* input of 256
   flip-flop pairs, and each pair is clocked by its own phase. The first
   flip-flop stands for the optimised master/slave cell. The second, a
   standard cell on the same phase, resolves metastability. A register on
   `clk` then retimes all 256 samples. A sample from the cycle after clock
   edge k is visible after edge k+2.
3. **Decoding** (`hit_decoder`) compares the newest sample with the level
   held from the previous cycle to detect an edge. The fine code is the
   number of samples that still show the old level. Counting samples instead
   of searching for a transition means an isolated "bubble" costs at most
   one bin. In 12 ps mode only every fourth phase is counted and the two low
   bits read 00. The 18-bit counter time is appended, minus the two-cycle
   capture latency.
4. **Counter** (`time_counter`): an 18-bit free-running counter (13 coarse +
   5 medium bits) that simply wraps. It also gives the 320 MHz enable
   (`cnt[1:0]==3`) and the 40 MHz enable (`cnt[4:0]==31`).

All times are therefore modulo 2^26 bins. Every comparison, such as a window
test or a TOT, is a wrapping subtraction.

## Per-channel path

```
hit -> glitch_filter -> capture_ffs -> hit_decoder -> derandomizer (4)
    -> tot_builder -> channel_buffer (64) -> trigger_matcher -> group_merge
```

- **glitch_filter**: an inertial delay of (code+1) × 781.25 ps, so 0.78 to
  12.5 ns. Shorter pulses disappear.
- **derandomizer**: a 4-entry FIFO written at 1.28 GHz and read on the
  320 MHz enable. A hit that finds it full is dropped and counted. That
  channel's flag is then set in the status bytes.
- **tot_builder**:
  - Format A sends leading and/or trailing edges.
  - Format B keeps the leading edge. The next trailing edge then gives a
    "leading + time-over-threshold" entry.
- **channel_buffer**: a 64-entry circular buffer. Its read port takes an
  offset from the head, so the matcher can look past hits that it must keep.
- **trigger_matcher** (the hardest part):
  - Each trigger time T goes into an 8-deep queue.
  - The window is [T − latency, T − latency + window), counted in 1.28 GHz
    cycles.
  - The matcher scans the buffer from the head:
    - A hit before the window is removed. It is only skipped if the scan has
      already moved past the head.
    - A hit inside the window is sent but kept, because a later,
      overlapping window may need it too.
    - The first hit after the window ends the event: the matcher sends an
      end marker and restarts the scan for the next trigger.
  - If the buffer runs dry, the event ends 48 cycles after the window closes.
    Those 48 cycles cover the pipeline from pin to buffer.
  - With no trigger pending, hits older than latency + 16 cycles are
    discarded.
  - Untriggered mode sends everything.
  - Output formatting:
    - Absolute or window-relative time.
    - For format B, a programmable left shift chooses which bits fill the
      16-bit or 19-bit leading field and the 11-bit or 8-bit TOT field.
      A TOT too large for its field saturates.

## Frames and readout

Every word is 32 bits and goes out most significant byte first.

| frame | layout |
|---|---|
| data, format A | `0, channel[3:0], edge, time[25:0]` (edge 1 = leading) |
| data, format B | `0, channel[3:0], leading[15:0], tot[10:0]` or `leading[18:0], tot[7:0]` |
| header 1 | `1000, event_id[15:0], bx_id[11:0]` |
| header 2 (optional) | `1001, 10'b0, trigger_time[17:0]` |
| trailer | `1010, event_id[11:0], data_frame_count[15:0]` |
| group separator | `1011, 26'b0, group[1:0]` |
| idle | `0xD0D0D0D0` |

The idle pattern and the field widths of the data frames follow the
original chip. The header, trailer and separator contents are this design's
own.

- **group_merge** combines 16 channels into one group.
  - Triggered mode: it passes channel 0's frames up to its end marker, then
    channel 1's, and so on, and finally one end marker for the group.
  - Untriggered mode: it works round-robin.
  - When the chip switches into triggered mode, it restarts at channel 0.
- **readout_ctrl** (one per port) keeps an 8-deep queue of events:
  - For each event it sends header 1, then header 2 if enabled.
  - Then it sends each served group's frames. A separator goes before each
    group in single-port mode.
  - Then it sends the trailer.
  - With four ports, port g serves group g. With one port, port 0 serves all
    four groups and the other ports stay idle.
- **readout_port** sends one byte per slot at 320, 160, 80 or 40 MHz (rate
  code 0–3). Between frames it sends the idle frame. `frame_start` marks the
  first byte of every frame.
- **trigger_ctrl**:
  - Accepts the rising edge of `trigger`, or a channel-0 leading edge when
    channel-0 triggering is enabled.
  - Time-stamps the trigger with the counter and numbers the events.
  - Counts triggers that arrive while any queue is full.
- **bx_counter** counts 40 MHz periods, wraps after a programmable maximum,
  and is cleared by `bx_rst`.

Four ports at 320 MHz carry 10.24 Gbit/s, which is about 4 M hits/s per
channel in format B. One port at 40 MHz carries 320 Mbit/s.

## Configuration

The I2C target has 7-bit address 0x5A and a 16-bit register address that
auto-increments. Reads use a repeated START.

| address | contents |
|---|---|
| 0x000–0x15B | 348 configuration bytes (map in `rtl/picotdc_top.sv`) |
| 0x200–0x341 | 322 delay-adjust bytes |
| 0x400–0x52B | 300 status bytes, read-only |

- Reset values: untriggered mode, leading and trailing edges, 3 ps bins,
  four ports at full rate, all channels enabled, BX maximum 3563.
- The delay-adjust bytes are stored but drive nothing, because their effect
  on the DLL is not modelled.
- The pulse generator (`pulse_gen`) makes pulses of programmable period and
  width in clock cycles. It replaces the hit of every channel in its mask.

## Departures and limits

- The time stamp is 26 bits, laid out as in the data-frame table above.
  Elsewhere the original chip's description speaks of a "25-bit" leading
  time. This RTL keeps the 26-bit layout.
- The DLL, interpolator and glitch filter are ideal models. They have no
  jitter, no nonlinearity and no calibration, so the delay-adjust registers
  have no effect.
- Buffer depths (64-entry channel buffer, 8-entry trigger and event queues),
  the 48-cycle window-close margin and the register map are this design's
  own choices.
- Not modelled: the PLL, the LVDS receivers, the line drivers, and the
  2.56 GHz clock option.
- A channel decodes at most one edge per 1.28 GHz cycle. Shorter pulses are
  expected to be removed by the glitch filter.

## Simulation

Every module is in `rtl/<name>.sv`, with shared types in `rtl/tdc_pkg.sv`.
Every testbench is `tb/tb_<name>.sv`. Testbenches include
`tb/tb_util.svh`, so run them from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -I. -Irtl -y rtl \
  rtl/tdc_pkg.sv rtl/trigger_matcher.sv tb/tb_trigger_matcher.sv \
  --top-module tb_trigger_matcher -Mdir obj -o sim && obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog.

There are two end-to-end testbenches. Both configure the chip over I2C,
drive analog-timed pulses and decode the byte ports back into frames.

- `tb_picotdc_top` uses 64 phases per period, about 1 minute.
- `tb_picotdc_full` uses the default 256 phases, several minutes.

They run eight phases:

1. Untriggered mode.
2. The glitch filter.
3. 12 ps bins.
4. Triggered readout with overlapping windows, two headers and relative
   time.
5. Single-port leading + TOT readout triggered by channel 0.
6. The pulse generator.
7. A derandomizer overflow, read back from the status bytes.
8. A slower port rate.

They count each of these mechanisms. Every measured time must lie at one
constant offset from the true pulse time, within a few bins.
