# JEM-EUSO clock and time-synchronisation logic

The JEM-EUSO focal surface is read out by many independent boards: PDMs
(photo-detector modules) grouped under 18 Cluster Control Boards (CCBs). An air
shower can trigger two CCBs at once. The two data blocks can only be merged if
both boards agree on "when" to within one GTU (gate time unit, 2.5 µs). The
event must also be tied to absolute UTC time to within a few microseconds.

This RTL solves both problems with a single counter that every board keeps
in lock-step. A central clock board (CLK board) generates the 400 kHz GTU
clock and sends it to every CCB. Each board counts GTU edges in a 24-bit
counter. One command, *Time-sync*, clears every counter at the same GTU edge,
so from then on the CLK board and all CCBs hold the same number.

Time-tagging then works at three points:
- **L1 trigger.** When a CCB ships a data block, it stamps the block with its
  own GTU number.
- **L2 trigger.** When a CCB raises its second-level trigger, the CLK board
  latches its own GTU number for that line.
- **Absolute time.** The CLK board ties GTU time to UTC, using the GPS
  pulse-per-second (PPS) and the NMEA time sentence. When GPS fails it uses
  the ISS/JEM station time instead.

The same board also measures, for every event, the dead time and the live time
since the previous event. From these the exposure of a flux measurement can be
computed in two independent ways.

Everything here is synthesizable SystemVerilog. It covers the whole CLK board
logic plus the GTU-keeping part of each CCB. The top module is
`tsync_system`.

## Block map

```
tsync_system
├── clk_board                     one per instrument
│   ├── gtu_timing_gen            40 MHz -> GTU clock, 100 kHz and 3.125 kHz ticks
│   ├── time_sync_ctrl            Time-sync pulse, one GTU long, GTU-aligned
│   ├── gtu_counter               24-bit CLK-board GTU counter
│   ├── clock_fanout              N_CCB registered GTU/Time-sync lines, per-line enable
│   ├── l2_trigger_unit           L2 lines -> pattern, GTU latches, IDAQ trigger/busy
│   ├── live_dead_counter         dead time t_m and live time t_ev
│   ├── uart_rx / nmea_parser     GPS sentences -> UTC, position, satellites
│   ├── uart_tx                   commands to the GPS module
│   └── time_stamp_unit           UTC second + GTU-in-second, PPS gate, ISS fall-back
└── ccb_gtu_tagger [N_CCB]        per CCB: GTU counter and data-block header
```

`tsync_pkg` holds the widths and the record types: `time_stamp_t`,
`gps_info_t`, `event_rec_t` and `ccb_hdr_t`. All logic runs on one 40 MHz
clock `clk`, with a synchronous active-low reset `rst_n`. The GTU "clock" and
the slow ticks are clock enables in that domain. The only other "clock" in the
design is the GTU line. It is sent to the CCBs as data and re-sampled there.

## GTU time base

`gtu_timing_gen` divides the 40 MHz clock by 100, giving the 400 kHz GTU clock
`gtu_clk_o` with a 50 % duty cycle. It also gives a one-clock strobe
`gtu_tick_o` at each rising GTU edge. From the same chain it makes two slow
ticks:
- the 100 kHz dead-time tick (GTU / 4);
- the 3.125 kHz live-time tick (GTU / 128).

The three ticks therefore never drift against each other.

## Time-sync: keeping every GTU counter equal

This is the part that needs the most care. Every counter in the system must
load zero **at the same GTU edge**.

1. A Time-sync request can come from either of two places:
   - the command input `cmd_time_sync_i`, or
   - the end of every dead time, when `sync_after_dead_i` is set. This
     restarts acquisition from GTU 0 after each data transfer to the IDAQ/CPU.
2. `time_sync_ctrl` remembers the request until the next `gtu_tick`. It then
   raises Time-sync for exactly one GTU period. A request that arrives in the
   same clock as a GTU tick is served at the following tick. Requests that
   arrive while a pulse is running are queued, and each one yields its own
   pulse.
3. On the CLK board, `gtu_counter` sees Time-sync high at the GTU edge that
   ends the pulse. It loads zero there and counts on from that edge.
4. `clock_fanout` registers the GTU clock and Time-sync onto one line per CCB.
   Both signals take the same path, so they keep their relative timing.
5. At each CCB, `ccb_gtu_tagger` synchronises both lines with two flops. It
   samples Time-sync **at the falling edge of the GTU line**, half a GTU away
   from any rising edge. If the sample is high, the CCB counter loads zero at
   the next rising GTU edge. That is the same edge at which the CLK board
   loads zero.

Sampling half a period away from the edge matters. If Time-sync were sampled
at the rising edge, a few clocks of skew between the Time-sync and GTU lines
could put one CCB a whole GTU off. With mid-period sampling the scheme
tolerates up to half a GTU (1.25 µs) of skew between the two lines of one CCB.
Skew between different CCBs simply shifts when each CCB sees the edge. It does
not change which edge it counts.

`clock_fanout` has a per-line enable so that an unused line can be held low.
The active mask only changes while the GTU clock is low, so switching a line
never cuts a GTU pulse short. A CCB whose line is off stops counting. It is
realigned by the next Time-sync.

All GTU counters are 24 bits wide. At the expected trigger rate of 0.1 Hz,
10 s pass between triggers (4 000 000 GTU). The counter wraps only after
2^24 GTU = 41.9 s. If it does wrap, a sticky `wrap_o` flag is set, and
Time-sync clears it.

## CCB data-block header

A PDM data block normally holds consecutive GTUs, half before and half after
the L1 trigger GTU. For slow events it may instead hold every 10th or 100th
GTU. On each rising edge of `l1_i`, `ccb_gtu_tagger` latches its GTU count and
emits `ccb_hdr_t`:

| field       | bits | meaning |
|-------------|------|---------|
| `trig_gtu`  | 24   | GTU number of the L1 trigger |
| `first_gtu` | 24   | GTU number of the first sample: `trig_gtu - trig_pos * step` |
| `n_gtu`     | 8    | number of GTUs in the block (`cfg_n_gtu_i`) |
| `trig_pos`  | 8    | position of the trigger GTU in the block (`cfg_trig_pos_i`) |
| `step`      | 8    | sampling step in GTUs, 1 = consecutive (`cfg_step_i`) |

`hdr_valid_o` strobes 4 clocks after the L1 edge. The 8-bit field widths are
assumed. `first_gtu` is a convenience field; the reconstruction needs only the
other four.

## L2 triggers, trigger pattern and the IDAQ exchange

`l2_trigger_unit` receives the L2 line of every CCB through a two-flop
synchroniser and an edge detector. The L2 triggers of one event can arrive
from different CCBs a few GTUs apart, so the first edge opens a window of
`trig_window_i` clocks. During the window:
- every line that rises is OR-ed into the pattern register;
- the CLK-board GTU count at that line's edge is latched into
  `l2_gtu[line]`.

The arrival-time difference between CCBs can therefore be read straight from
the record.

At the end of the window the unit does three things:
- it raises the trigger to IDAQ (`trig_idaq_o`) for `TRIG_LEN` clocks;
- it strobes an internal event signal;
- it goes **dead**.

It stays dead until the IDAQ busy reply (`busy_idaq_i`) has risen and fallen
again. If busy does not rise within `BUSY_TIMEOUT` clocks (1 ms by default),
the unit returns to idle and sets the sticky `busy_timeout_o`. The whole
instrument is stopped during the dead time. L2 edges arriving then are not
recorded; they are only counted in `lost_trig_o`.

Latency: an L2 edge reaches the unit after 3 clocks. `trig_idaq_o` rises
`trig_window_i + 1` clocks after that.

## Absolute time: PPS, UTC and the ISS fall-back

`time_stamp_unit` holds the time of day as two parts:
- `sod`, the UTC second of day (17 bits);
- `gtu_in_sec`, the GTU edges since that second began (19 bits, 2.5 µs
  resolution).

The time is built up as follows:

- **Second marks.** Each PPS edge is a second mark. At a mark, `sod` is
  advanced by one as a prediction and flagged *unconfirmed*, and
  `gtu_in_sec` restarts.
- **PPS gate.** Each PPS edge also opens a gate of 900 ms (`GATE_CYC`). The
  GPS module sends its NMEA sentence some 300 ms after the PPS. A GGA
  sentence is about 75 characters, which takes roughly 160 ms at 4800 baud,
  so it is complete well inside the gate. The first valid UTC received in the
  gate replaces the prediction, and the second is marked *confirmed*. A UTC
  time outside the gate is ignored. A sentence with a bad checksum leaves the
  time predicted but unconfirmed.
- **GPS loss.** If no PPS arrives for 1.5 s (`PPS_TIMEOUT`), GPS is declared
  lost (`gps_ok_o` low). The marks and seconds then come from the ISS/JEM
  input: a 1 Hz strobe `iss_sec_i` with the second of day `iss_sod_i`. The
  next PPS switches back to GPS. `force_iss_i` selects ISS time by hand.
- **Calibration.** The number of 40 MHz clocks between consecutive PPS edges
  is reported on `cal_o` with `cal_valid_o`. Nominally it is 40 000 000, so
  the deviation measures the board oscillator against GPS.

When an event is triggered, the current `time_stamp_t` goes into the event
record. It holds `sod`, `gtu_in_sec`, the source (GPS or ISS) and the
confirmed flag. An event's arrival time is:

    UTC = sod + gtu_in_sec × 2.5 µs
          (+ (CCB trig_gtu − CLK l2_gtu) GTUs and the trigger position in the
             block, to place a particular GTU of the data)

`nmea_parser` takes the bytes from `uart_rx` (4800 baud, 8N1, sampled at mid
bit). It accepts `$xxGGA` sentences and checks the XOR checksum. It keeps, as
BCD:
- UTC hhmmss;
- latitude ddmm and longitude dddmm, each with four decimals of minutes and
  a hemisphere flag;
- fix quality;
- number of satellites.

The time is also converted to seconds of day. Fields are collected into a
shadow record and copied out only when the checksum matches. Commands to the
GPS module (for example `$PSRF…` configuration strings) are sent byte by byte
through `gps_cmd_data_i` / `gps_cmd_valid_i` / `gps_cmd_ready_o` and `uart_tx`.

## Live and dead time

For a flux measurement the live time of a run must be known. Two counters
measure, for every event:

- **t_m, the dead time.** It counts 100 kHz ticks (10 µs resolution) while
  the unit is dead, from the trigger to the end of IDAQ busy. It is 18 bits
  wide and saturates at 2.62 s with a flag. Its value appears on `t_m_o` with
  `t_m_valid_o` when busy ends.
- **t_ev, the time since the previous event.** It counts 3.125 kHz ticks
  (320 µs resolution) while the unit is *not* dead. It is 18 bits wide and
  saturates at 83.9 s.

Because t_ev stops during dead time, the two counters partition the run:
T_CPU = Σ (t_ev + t_m). The live time can be taken either as T_CPU − Σ t_m
or as Σ t_ev. Comparing the two checks the board clock against the CPU run
timer.

## Event record

One clock after each trigger, `clk_board` places an `event_rec_t` on `evt_o`,
together with `evt_pattern_o` and `evt_l2_gtu_o[N_CCB]`:

| field       | bits | meaning |
|-------------|------|---------|
| `evt_num`   | 32   | event number since reset (starts at 0) |
| `gtu_count` | 24   | CLK-board GTU counter at the trigger |
| `ts`        | 38   | `time_stamp_t`: sod, gtu_in_sec, src, confirmed |
| `t_ev`, `t_ev_ovf` | 18+1 | live time before this event |
| `t_m_prev`, `t_m_ovf` | 18+1 | dead time of the previous event |

The dead time of an event is known only when its own busy ends. The record
therefore carries the previous event's dead time, and `t_m_o` gives the
current one as soon as it is known.

`evt_valid_o` stays high until `evt_ack_i`. If a record has not been taken by
the next event, it is overwritten and `evt_overrun_o` is set. This parallel
valid/ack port stands in for the serial link to the IDAQ board.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_CCB` | 18 | `tsync_system`, `clk_board` | number of CCBs (GTU lines, L2 lines, taggers) |
| `SYS_HZ` | 40 000 000 | both | system clock |
| `GTU_HZ` | 400 000 | both | GTU clock; `SYS_HZ/GTU_HZ` must be an integer |
| `BAUD` | 4800 | both | GPS UART rate |
| `TRIG_LEN` | 4 | `clk_board` | IDAQ trigger pulse, clocks |
| `BUSY_TIMEOUT` | `SYS_HZ/1000` | `clk_board` | clocks to wait for IDAQ busy |
| `GTU_W`, `LT_W`, `SOD_W`, `SUBSEC_W` | 24, 18, 17, 19 | `tsync_pkg` | counter widths |

Run-time settings are `trig_window_i` (L2 pattern window, in clocks),
`fanout_en_i`, `force_iss_i`, `sync_after_dead_i`, and the CCB header
configuration `cfg_n_gtu_i`, `cfg_trig_pos_i` and `cfg_step_i`. The header
configuration is common to all CCBs in the top.

Synthesised with the defaults, the top is about 1 350 cells and 3 800
flip-flops, with no memories and no latches.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=… failures=…` and stops itself through a watchdog.
`tb/gps_model.sv` is a behavioural GPS module: it produces PPS pulses and
serial NMEA sentences. `tb/tb_nmea_pkg.sv` builds GGA sentences with correct
(or deliberately wrong) checksums.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/tsync_pkg.sv tb/tb_nmea_pkg.sv tb/tb_tsync_full.sv --top-module tb_tsync_full
./obj_dir/Vtb_tsync_full
```

To run another testbench, substitute its name. The package files are always
listed first.

- **`tb_tsync_full`** runs the whole system at the real sizes and rates:
  18 CCBs, 40 MHz, 400 kHz and 4800 baud. It covers one complete operation:
  1. Time-sync, after which all 18 CCB counters match the CLK board;
  2. PPS, then a GGA sentence 300 ms later that confirms the second;
  3. an L1 header;
  4. L2 triggers from two CCBs one GTU apart;
  5. a 20 ms IDAQ busy.

  It then checks every field of the record. This takes about 19 million
  clocks, roughly half a minute of simulation.
- **`tb_tsync_system`** is the end-to-end test with time scaled down by 100.
  It makes each mechanism happen and counts it:
  - Time-sync and alignment;
  - a masked line;
  - headers with steps 1, 10 and 100;
  - multi-CCB patterns;
  - lost L2 triggers;
  - busy timeout;
  - UTC confirmation in the gate;
  - a checksum error;
  - calibration;
  - the switch to ISS time;
  - record overrun;
  - a GPS command;
  - live/dead time;
  - automatic Time-sync after dead time.
- **`tb_trigger_interval`** runs the counting chain at its real rates for
  one trigger interval at 0.1 Hz. The chain is the 40 MHz divider, the 24-bit
  GTU counter and the 18-bit live/dead counters. The interval is 10 s of live
  time followed by 20 ms of dead time. It checks that the GTU counter reads
  4 000 000 with no wrap, that t_ev = 31 250 and that t_m = 2 000. It covers
  4×10^8 clocks and takes about three minutes.
- **Block testbenches** check the blocks one at a time, with cycle-exact
  timing where a rate or latency is defined. Examples: the tick periods, the
  Time-sync start and length, counter wrap, the fan-out enable changing only
  while the GTU clock is low, UART bit timing, and parser output for random
  sentences.

## Choices made in this design

The following are not fixed by the original system description and were
chosen here:

- **Number of CCBs.** `N_CCB = 18`. The instrument is also described
  elsewhere with 21 CCBs. Only the parameter changes.
- **Time-sync pulse.** It lasts one GTU, and the CCBs sample it at mid-GTU.
- **Automatic Time-sync after dead time.** It can be switched off; the
  command input always works.
- **L2 handling.** The pattern window, the IDAQ pulse length, the busy
  timeout and the lost-trigger count.
- **GPS data.** GGA as the only sentence stored; 4800 baud 8N1; BCD storage
  with four decimals of minutes.
- **Timing thresholds.** The 900 ms PPS gate and the 1.5 s GPS-loss timeout.
  A UTC received after a PPS is taken to name the second that PPS began.
- **ISS time format.** The ISS/JEM time is taken as a 1 Hz strobe plus a
  seconds-of-day value.
- **Counter overflow.** Live/dead counters saturate with overflow flags. GTU
  counters wrap with a sticky flag.
- **Record.** The event-record layout, the valid/ack handshake and the
  overrun flag; the CCB header field widths.
- **Fan-out enable.** The per-line enable and its glitch-free switching.

## Not included

- **Clock sources and drivers.** The 40 MHz crystal oscillator (TCXO/OCXO),
  the LVDS drivers, the FPGA PLL/DLL clock network and the cable
  equalisation. The RTL drives single-ended lines, and the 40 MHz system
  clock is assumed to reach every board.
- **Local-oscillator variant.** The variant in which each CCB/PDM has its own
  40 MHz oscillator and only the GTU clock is distributed is not built.
  `ccb_gtu_tagger` already treats the GTU line as asynchronous data, which
  is what that variant would need.
- **IDAQ link.** The serial link to the IDAQ board, a SpaceWire-derived
  protocol, is replaced by the parallel record port.
- **L2 trigger logic.** The CCBs' own trigger logic is outside this design;
  L2 and L1 lines are inputs.
- **Per-CCB dead time.** Live and dead time are measured for the whole
  instrument. A mode in which only the triggered CCB stops would need one
  `live_dead_counter` per CCB.
- **GPS module and ISS time.** The GPS module itself and the ISS/JEM time
  source are outside the design; the testbenches use a behavioural GPS model.
