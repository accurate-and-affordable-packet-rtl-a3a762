# Packet-train tester for 1 and 10 Gb/s Ethernet

This design measures a network path or a device under test (a switch, a
router) with **packet trains**. It sends N Ethernet frames back-to-back. Each
frame carries a sequence number and the time it was sent. The same tester, or a
second one elsewhere with the same GPS time, receives the train and reports:

- **throughput** (capacity), from how far apart the frames arrive;
- **one-way delay**, mean, minimum and maximum;
- **jitter**;
- **loss** and **reordering**.

At 10 Gb/s a minimum-size frame lasts about 67 ns. Software timestamps taken in
an operating-system kernel are off by microseconds, which is more than the
quantity being measured. Here both timestamps are taken in logic, in the clock
cycle in which the frame's first beat crosses the MAC interface. One time
counter serves both directions, and a GPS pulse-per-second (PPS) keeps it on
true time.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Testbenches run on
plain Verilator.

## Block structure

```
             AXI4-Lite (processor)
                   |
              +----------+   cfg, filter, calibration, start/arm/stop
              | axil_regs|------------------------------------------+
              +----------+<---- results, counters, time, rate ---+  |
                                                                 |  |
 pps_in --> timestamp_counter --timestamp--+--------------+      |  |
              ^   | pps_irq, pps_ts        |              |      |  |
              |   v                        v              v      |  |
   rate <- drift_correction      packet_generator   packet_receiver
   (or software rate)                 |  m_axis_tx       ^ s_axis_rx
                                      v                  |   records
                                  TX MAC ... link / DUT ... RX MAC
                                                         |
                                                  net_params_calc
                                               (owd_calibration, udiv64)
```

| Module | Job |
|---|---|
| `packet_train_tester` | Top level. Wires the blocks together and brings out the AXI4-Lite, both AXI4-Streams, `pps_in` and `pps_irq`. |
| `packet_generator` | Builds and sends the train. Puts the sequence number and transmit time into each frame. |
| `packet_receiver` | Timestamps incoming frames, filters them, and emits one record per accepted frame. |
| `net_params_calc` | Accumulates the records of one train, then divides to get the results. |
| `owd_calibration` | Subtracts the latency of the MAC, transceiver and PHY chain, a linear function of frame size. |
| `udiv64` | Sequential 64-bit divider used by `net_params_calc`. |
| `timestamp_counter` | Variable-rate nanosecond counter. Captures the time at each PPS edge. |
| `drift_correction` | Integral controller that trims the counter rate so that one GPS second reads as 1e9 ns. |
| `axil_regs` | Register file for the processor. |
| `ptt_pkg` | Shared types (`pkt_cfg_t`, `rx_rec_t`, `results_t`) and frame offsets. |

The MACs, PHYs, transceivers, GPS receiver and the processor are not part of
this RTL. The tester's ports are the AXI4-Stream sides of the MACs, the
AXI4-Lite slave and the PPS input.

## Configurations

| | default (1 Gb/s) | 10 Gb/s |
|---|---|---|
| `DATA_W` | 32 | 256 |
| clock | 100 MHz | 156.25 MHz |
| `NOMINAL_NS_Q32` (ns per clock, 8.32) | 10.0 | 6.4 (rounded to 27487790694) |
| timestamp resolution | 10 ns | 6.4 ns on average |
| stream bandwidth | 3.2 Gb/s | 40 Gb/s |

The stream is wider than the line in both cases. The MAC's `tready` therefore
sets the pace, and the generator never starves it.

## Test frame

Every frame is Ethernet II / IPv4 / UDP. The addresses, UDP ports, frame size
and train length come from registers. Byte offsets, all fields big-endian:

| bytes | field |
|---|---|
| 0-5, 6-11 | destination MAC, source MAC |
| 12-13 | EtherType 0x0800 |
| 14-33 | IPv4 header: IHL 5, DF, TTL 64, protocol 17, ID 0, checksum computed |
| 34-41 | UDP header: ports, length, checksum 0 |
| 42-45 | sequence number, 0 for the first frame of a train |
| 46-53 | transmit timestamp, ns |
| 54- | zero padding |

The frame size excludes preamble and FCS, and is clamped to 60..1514 bytes. On
the stream, byte k of a beat is `tdata[8k+7:8k]`. `tkeep` marks the valid bytes
of the last beat.

## What is measured, and when the clocks are read

This is the part that determines whether the numbers can be trusted.

**Timestamp points.** Both timestamps are taken at the same point: the clock
edge at which the MAC interface accepts the frame's **first beat**.

- The generator samples the time at the handshake of beat 0. It writes that
  value into bytes 46-53, which always fall in a later beat. This needs
  `DATA_W` ≤ 368.
- The receiver samples the time when beat 0 arrives.

A delay therefore includes whatever the MACs, transceivers and PHYs add, plus
the wire time of the frame. `owd_calibration` exists to remove that part (see
below).

**Throughput** is the packet-train capacity estimate:

```
throughput_bps = 8e9 * (bytes of frames 1..N-1) / (t_rx(last) - t_rx(first))
```

The timestamps mark frame starts. The time between the first and the last
start covers the N-1 frames before the last, so the last frame's bytes are
left out. Frame bytes exclude preamble and FCS. The per-frame overhead on the
wire is 24 bytes: 8 of preamble, 4 of FCS and 12 of inter-frame gap. A
back-to-back train at line rate R therefore reads:

```
R * S / (S + 24)
```

For 60-byte frames at 1 Gb/s that is 714.3 Mb/s. For 1514 bytes it is
984.4 Mb/s.

**Delay** is `rx_ts - tx_ts`, minus the calibration, for each frame. The mean
uses signed division, which truncates toward zero.

**Jitter** is the mean of |delay(i) - delay(i-1)| over consecutive received
frames.

**Loss** is `train_len - received`.

**Out of order** counts frames whose sequence number is not above the highest
one seen so far.

**End of a measurement.** A measurement ends in one of two ways:

- `train_len` frames have arrived; or
- software sets the CTRL stop bit. This is needed when frames were lost.

Three divisions then run one after another on a single shared divider. Results
are valid at the 200th clock edge after the end. The calculator accepts one
record per clock at most, which is the most the receiver can produce. It
ignores records while it is not armed.

**Receiver filter.** A frame counts only if all of these hold:

- it is IPv4 carrying UDP;
- it is at least 54 bytes long;
- for each enabled rule, its field equals the configured one. The rules are
  destination MAC, source IP, destination IP and destination UDP port. The
  comparison values are the generator's own settings. A remote receiver is
  programmed with the sender's values.

Other frames increment `RX_DROPPED`. The record of an accepted frame is valid
in the second clock after its last beat. The receiver never back-pressures
(`tready` = 1).

## Time base and drift correction

`timestamp_counter` adds `rate`, in ns per clock, to a 64.32-bit fixed-point
accumulator. The integer part is the timestamp. At 100 MHz the nominal rate is
10.0, so the time steps 10 ns per clock. A rate of 6.4 gives 6.4 ns on average
at 156.25 MHz.

`pps_in` goes through a two-flop synchronizer. On its rising edge the time is
captured in `pps_ts`, and `pps_irq` pulses for one clock, three clocks after
the input edge.

`drift_correction` runs at each PPS:

```
err  = (pps_ts(k) - pps_ts(k-1)) - PPS_PERIOD_NS
sum += err
rate = NOMINAL - (sum << GAIN_SHIFT)
```

The first PPS after reset only records the reference time.

One LSB of `rate` is 2^-32 ns per clock. At 1e8 clocks per second that is
0.023 ns per second. `GAIN_SHIFT = 5` gives a loop gain of about 0.75, and the
loop is stable for gains below 2. Scale the shift when the clock or the PPS
period changes. For example, a 100 µs test period at 100 MHz needs 18.
`locked` is set when the last error is within ±2 ns.

**Software rate mode.** When bit 31 of `SW_RATE_HI` is set, the counter uses
a rate written by software instead of the logic loop. This is for systems where
the processor runs the correction itself: it reads `PPS_TS` on each `pps_irq`
and writes back the rate. `PPS_ERR` and `locked` are computed in both modes.

The correction adjusts frequency only. The counter starts at 0 after reset and
is never set to an absolute time of day. Two testers agree on rate through
their PPS inputs, but for one-way delay between two sites their counters must
also be started on the same PPS edge. This design does not provide that step.

## Delay calibration

The transmit and receive chain adds a latency that grows linearly with frame
size. Fit a straight line to delays measured in loopback, and subtract the
ideal frame time 8·(S+24) ns at 1 Gb/s (0.8·(S+24) ns at 10 Gb/s). This gives
`offset + slope·S`, which `owd_calibration` removes from every delay:

```
owd_cal = owd - CAL_OFFSET - (CAL_SLOPE * len) >>> 16     (ns; slope in 16.16 ns/byte)
```

Example: 1 Gb/s loopback delays of 1890 ns at 60 B and 20798 ns at 1514 B give
a slope of about 5.0 ns/B and an offset of about 918 ns. With those two
coefficients, the other measured sizes land within 10 ns of the ideal frame
time (`tb_owd_calibration`). Both coefficients are 0 after reset, so
calibration starts switched off.

## Register map (AXI4-Lite, 32-bit, byte addresses)

| addr | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | W | bit0 start train, bit1 arm measurement, bit2 stop (self-clearing) |
| 0x04 | STATUS | R | bit0 generator busy, bit1 measuring, bit2 results valid, bit3 PPS locked |
| 0x08/0x0C | DST_MAC_HI/LO | RW | [15:0] = MAC[47:32] / MAC[31:0]; reset 02:00:00:00:00:02 |
| 0x10/0x14 | SRC_MAC_HI/LO | RW | reset 02:00:00:00:00:01 |
| 0x18/0x1C | SRC_IP / DST_IP | RW | reset 10.0.0.1 / 10.0.0.2 |
| 0x20 | PORTS | RW | [31:16] source, [15:0] destination UDP port; reset 5000/5001 |
| 0x24 | FRAME_SIZE | RW | bytes, reset 60 |
| 0x28 | TRAIN_LEN | RW | N, reset 100 |
| 0x2C | FILT_EN | RW | bit0 dst MAC, bit1 src IP, bit2 dst IP, bit3 dst port; reset all on |
| 0x30/0x34 | CAL_OFFSET / CAL_SLOPE | RW | ns signed / ns per byte 16.16 signed |
| 0x38/0x3C | SW_RATE_HI/LO | RW | bit31 software rate mode, rate[39:32] / rate[31:0] |
| 0x40-0x48 | RX_COUNT, LOST, OUT_OF_ORDER | R | |
| 0x4C/0x50 | THR_HI/LO | R | throughput, bit/s |
| 0x54-0x5C | OWD_MEAN, OWD_MIN, OWD_MAX | R | ns, signed, low 32 bits |
| 0x60/0x64 | JITTER, DISPERSION | R | ns |
| 0x68-0x70 | TX_FRAMES, RX_FRAMES, RX_DROPPED | R | counters |
| 0x74/0x78 | TIME_HI/LO | R | reading HI latches LO for a consistent 64-bit sample |
| 0x7C | PPS_ERR | R | last second's error, ns |
| 0x80/0x84 | RATE_HI/LO | R | rate in use |
| 0x88/0x8C | PPS_TS_HI/LO | R | time at the last PPS |

A typical measurement:

1. Write the frame and filter settings.
2. Write CTRL = 2 to arm the measurement, then CTRL = 1 to start the train. On
   a receive-only tester, arm only.
3. Poll STATUS bit 2, or write CTRL = 4 if frames may have been lost.
4. Read the results.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/ptt_pkg.sv tb/tb_packet_train_tester.sv --top-module tb_packet_train_tester
./obj_dir/Vtb_packet_train_tester
```

To run another bench, replace the testbench file and the top module name.

| testbench | what it shows |
|---|---|
| `tb_packet_generator` | 32- and 256-bit generators. Every frame field is checked, and the IPv4 checksum must sum to 0xFFFF. The timestamp must equal the time of the first-beat handshake. A train must take exactly N·⌈S/bytes-per-beat⌉ clocks. Beats must be held under back-pressure. |
| `tb_packet_receiver` | 32- and 256-bit receivers. Records and receive times are checked, including record latency. Each filter rule must reject its frame, and a disabled rule must let it pass. |
| `tb_timestamp_counter` | Counter steps at 10 ns and 6.4 ns. PPS interrupt timing and the captured time. |
| `tb_drift_correction` | A 3000 ppm fast oscillator against a shortened PPS. The error must fall from 300 ns to within ±2 ns, with lock inside 12 periods. |
| `tb_owd_calibration` | Random vectors against a reference model, plus the 1 Gb/s loopback calibration example. |
| `tb_net_params_calc` | Full, lossy/reordered/stopped and 10 Gb/s-spaced trains against results computed in the testbench. Result latency is checked. |
| `tb_axil_regs` | All registers, the three write-channel orderings, byte strobes, control pulses and the latched time read. |
| `tb_packet_train_tester` | End to end through a link model (`tb/ptt_link_model.sv`) with a shortened PPS. Covers a clean train, loss, filter drop, reordering, the stop bit, calibration, drift lock and software rate mode. Each mechanism must occur at least once. |
| `tb_packet_train_tester_full` | Default parameters, 1 Gb/s: trains of 100 and 1000 frames of 60, 64, 128, 256, 512, 1024 and 1514 bytes. Throughput must be within 0.2 % of R·S/(S+24) and delay within 30 ns of the link model's. |
| `tb_packet_train_tester_10g` | The same 14 trains with `DATA_W=256`, 6.4 ns per clock and a 10 Gb/s link. |

The link model paces the transmit side to the wire rate by holding `tready`
low between frames. It returns each frame after a fixed latency, and can drop,
corrupt or reorder chosen frames. It is behavioural, not a MAC.

## Limits and departures from the original system

- **Where the computation runs.** In the 1 Gb/s system-on-chip arrangement this
  design follows, the network parameters and the drift correction were
  computed by software on the processor. Here both are logic. The drift loop
  can be handed back to software through `SW_RATE`.
- **What was only a function.** The parameter calculator, the drift law's gain
  and the delay calibration were described by their function only. Their
  arithmetic, widths and end conditions are this design's own. The same holds
  for the frame layout, the filter rules, the jitter definition and the
  register map.
- **10 Gb/s time base.** The original 10 Gb/s system took its time base (a DDS
  corrected by PPS) and its receive path from an existing framework. Here the
  same `timestamp_counter` and `packet_receiver` serve at 10 Gb/s.
- **No buffering.** There are no FIFOs between the MACs and these blocks. The
  receiver relies on the MAC stream never needing back-pressure.
- **Register widths.** Delays, jitter and dispersion are read back as 32 bits
  (±2.1 s). The calculator keeps 64 bits internally.
- **Throughput overflow.** The numerator 8e9 × bytes overflows 64 bits beyond
  about 2.3 GB per train: roughly 1.5 million maximum-size frames.
- **Absolute time.** The time counter cannot be loaded with a time of day (see
  above).
