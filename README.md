# Multiboard trigger link synchronization

A soft X-ray plasma diagnostic reads one GEM detector through several FPGA
backplane boards, each digitizing 64 channels. For the data to be useful for
quality monitoring, every board must start recording an event on the same
clock, and all boards must stamp it with the same timestamp. The trigger
signals that make this happen travel over MLVDS cables, transceivers, level
translators and buffers, and each path has its own delay and its own phase
relative to the receiving clock. Left alone, the triggers arrive on
different clocks, or one clock early or late depending on where a metastable
input flip-flop happens to settle.

This RTL removes both errors in two training steps and then runs the trigger
logic with the learned settings:

1. **Link training** moves the sampling point of each trigger input to the
   middle of its data eye, using a pseudorandom stream and an input delay
   element (a Xilinx IDELAYE2).
2. **Loopback measurement** finds the delay of each trigger line in whole
   clocks by sending an edge to a board and timing its echo.
3. **Board-to-board loopback** does the same for the ExtTrg lines over
   which the boards tell each other that one of them saw an event.
4. **Trigger distribution** inside every board delays each incoming trigger
   so that all boards see it on the same clock.

The scheme (LFSR training with seed latching, bitskip monitoring, the tap
sweep and mid-window formula, the loopback round trip and its delay formula,
the three delay elements per board) follows the paper *Multiboard trigger
link synchronization and diagnostics for the soft X-ray plasma radiation
measurements*. Widths, depths, latencies, encodings, the mode control and the
handling of corner cases are this implementation's own; they are listed in
[Departures and own choices](#departures-and-own-choices).

## The network

```
 tokamak start/stop
        |
 +------v-------------+  line b (training stream / loopback edge / Algorithm Enable)
 | signal_dist_board  |------------ cable ----> IDELAYE2 --> backplane_board b
 |  (master)          |<----------- cable ----- return line (loopback echo)
 +--------------------+
                        backplane_board j --ExtTrg j--> IDELAYE2 --> every other board
```

`trig_sync_top` holds one `signal_dist_board` and `N_BOARDS` (default 2)
`backplane_board`s on one clock. Everything that is not logic stays outside
and appears as ports: cables and buffers (`m_line_o` to `b_line_i`,
`b_ret_o` to `m_ret_i`, `b_ext_o` to `b_ext_i`), the delay elements
(`b_tap_o`, `b_tap_ld_o` go to the one on the master line, its output is
`b_line_i`; `b_ext_tap_o`, `b_ext_tap_ld_o` go to the one on each ExtTrg
input, whose outputs are `b_ext_i`), the ADCs
(`adc_i`) and the host (mode, commands, `delay1`/`delay2`, readout).

The master drives one line per board and the line's meaning depends on
`mode` (`trig_pkg::link_mode_e`):

| mode            | master line carries          | board uses it for            |
|-----------------|------------------------------|------------------------------|
| `MODE_TRAIN`    | LFSR stream, 1 bit/clock     | tap search (`tap_trainer`); each board also sends its own LFSR stream on ExtTrg for the other boards' ExtTrg tap search |
| `MODE_LOOPBACK` | one rising edge              | echo on the return line      |
| `MODE_RUN`      | Algorithm Enable             | gating registration, timestamp restart |
| `MODE_EXTLB`    | 0                            | ExtTrg lines carry the board-to-board loopback |
| `MODE_IDLE`     | 0                            | nothing                      |

## Link training: finding the eye

The master's `lfsr_gen` runs a 16-bit Fibonacci LFSR
(x^16 + x^15 + x^13 + x^4 + 1, seed 0xACE1) and sends the newest bit each
clock. Because the bit on the line is the one shifted into the register, any
16 consecutive line bits *are* the transmitter's state. So the receiver
(`lfsr_checker`) does not need to know the seed: after a restart it collects
16 bits, loads them into its own LFSR, and from then on runs that LFSR
independently, comparing the last 16 received bits with the last 16 generated
bits every clock. The result is `correctTransmission`. A skipped or doubled
bit, or a random bit from a metastable sample, shifts the two streams apart
and the comparison keeps failing until the next restart; a stuck line gives
an all-zero seed, which the checker refuses.

`bitskip_monitor` watches `correctTransmission` for `T_CYCLES` (4096)
clocks and passes only if it was 1 on every one of them. Errors caused by a
marginal sampling point are rare, which is why the window is long.

`tap_trainer` ties these together. For tap 0 to `NTAPS-1` (32 taps) it loads
the tap, waits `SETTLE` clocks, restarts the checker, waits for the seed,
and runs the monitor. The verdicts go into `pass_map_o`. Consecutive good
taps form a window; the widest window gives `tapStart`/`tapEnd`, and the
trainer loads

    tapOptimal = tapStart + (tapEnd - tapStart) / 2      (rounded down)

A whole-clock shift of the stream is invisible to the checker (it re-seeds),
so the sweep finds the sampling margin only; the whole-clock part is the
loopback's job. A sweep takes NTAPS x (SETTLE + 16 + T_CYCLES + about 5)
clocks, about 132,000 clocks at the defaults. `link_ok_o` = 0 after a sweep
means no tap worked: the line is broken.

The ExtTrg inputs have delay elements of their own and are tuned in the same
sweep. In `MODE_TRAIN` every board puts the stream of its own `lfsr_gen` on
its ExtTrg output, and one more `tap_trainer` per ExtTrg input searches that
input's tap (`ext_tap_o`, `ext_link_ok_o`, `ext_train_done_o`). All
trainers start on the same `train_start` and finish together.

## Loopback: measuring each line in clocks

In `MODE_LOOPBACK` each of the master's `loopback_meter`s raises its line
and counts clocks. The board passes the line through two resync flip-flops
and an output register back onto its return line; the master passes the
return through two resync flip-flops and sets `loopbackDone`, freezing the
count `DelayReadout`. Each FPGA contributes `INTERNAL_DELAY` = 3 register
stages, so a loop with no wire delay reads 6, and

    TrgDelay = (DelayReadout - 2 * INTERNAL_DELAY) / 2     (rounded down)

is the one-way line delay in clocks, assuming equal delay in both
directions. A loop that does not answer within `TIMEOUT` (1000) clocks sets
`err_o`, which doubles as a line diagnostic. All boards are measured in
parallel.

`delay_comp` then finds the largest TrgDelay and gives each board
`Delay3 = max - TrgDelay`: the board on the longest line waits 0 clocks, the
others wait until the slowest has caught up. These values go straight to the
boards' Delay3 inputs.

## Trigger distribution in a board

`trig_dist` is the board's trigger combiner:

```
Algorithm Enable --resync-- Delay3 ---------------------------+
ExtTrg from board j --resync-- Delay2[j] --+                  AND --reg--> Data registration start
LocTrg ----------------------- Delay1 -----+-- OR ------------+
```

Registration starts when the delayed Algorithm Enable is high and any
delayed trigger (the board's own LocTrg or an ExtTrg from another board) is
high. Each delay is a `trig_delay`: a 64-stage shift register with a
selected tap, 0 meaning no delay. The delayed Algorithm Enable also restarts
the `timestamp_counter`, so aligned Algorithm Enable edges give aligned
timestamps.

The latencies that Delay1 and Delay2 must balance, in clocks:

| path                                          | latency |
|-----------------------------------------------|---------|
| LocTrg to own `trig_dist`                     | 0 + Delay1 |
| LocTrg of board j to `trig_dist` of board k   | 1 (ExtTrg output register) + wire(j to k) + 2 (resync) + Delay2 |
| master Algorithm Enable to `trig_dist`        | wire + delay element + 2 (resync) + Delay3 |

With D the largest ExtTrg wire delay, `Delay1 = D + 3` on every board and
`Delay2[j] = D - wire(j to k)` on board k make every board start on the
same clock, `D + 3` clocks after the triggering board's LocTrg. The next
section shows where the wire delays come from.

## Board-to-board loopback: Delay1 and Delay2

With more than two boards each ExtTrg line reaches each board with a
different delay, so each receiving board needs its own Delay2 per line. In
`MODE_EXTLB` the host picks one measuring board (`ext_lb_src`) and pulses
`lb_start`. The measuring board raises its ExtTrg output from a set of
`loopback_meter`s, one per partner board; every partner echoes the
measuring board's ExtTrg input on its own ExtTrg output (two resync
flip-flops and the output register, the same three stages as the master
loopback). Each meter therefore reads `6 + wire(j to k) + wire(k to j)`
and reports half the wire part as the one-way estimate (`ext_est_o`). The
host repeats this with every board as the measuring board.

`ext_delay_comp` takes the whole matrix of estimates, finds the largest,
and sets Delay1 and every Delay2 by the formulas above. The estimate is
exact only when both directions of a board pair have the same delay. For
lines where they differ, `ext_dly_manual = 1` makes the boards use the
host's `delay1`/`delay2` instead; `delay1_o`/`delay2_o` always show the
values in use.

## Local trigger and event registration

`threshold_trigger` raises LocTrg (registered) when any of the 64 samples
exceeds `threshold`. LocTrg is also sent out as the board's ExtTrg. On the
rising edge of Data registration start, `event_recorder` stores the
timestamp of that clock and `WINDOW` (8) consecutive clocks of all 64
samples, starting with that clock's samples, into a memory of `DEPTH` (16)
events. A start inside a window is part of that window; a start with the
memory full increments `dropped_o`; `clear` empties it. Read with
`rd_evt`/`rd_idx`; data and timestamp appear one clock later.

## Operating sequence

1. Reset. `mode = MODE_TRAIN`, pulse `train_start`, wait for every
   `train_done_o`; check `link_ok_o`.
2. `mode = MODE_LOOPBACK`, wait until the lines have settled (a few tens of
   clocks), pulse `lb_start`, wait for `lb_done_o` (or `lb_err_o`). Delay3
   is now set. Pulse `lb_clear` and wait for the lines to drain.
3. `mode = MODE_EXTLB`; for each board b: set `ext_lb_src = b`, wait a
   few tens of clocks, pulse `lb_start`, wait for `ext_lb_done_o[b]`
   (or `ext_lb_err_o[b]`), pulse `lb_clear`. Delay1/Delay2 are now set
   (or write `delay1`/`delay2` and set `ext_dly_manual`).
4. Set `mode = MODE_RUN`. A rising edge on `ext_start_i` turns Algorithm
   Enable on (three clocks later at the master), `ext_stop_i` turns it off.

## Line diagnostics

The two calibration steps double as a test of the hardware lines. A line
that is open, shorted or stuck gives no tap on which the LFSR comparison
holds: training ends with `link_ok_o = 0` and an empty pass map, and the
tap is left at 0. A stuck-at-0 line would otherwise agree with an LFSR
seeded with zero, so the checker refuses that seed. The same line gives no
echo in loopback, and the meter raises `lb_err_o` after `LB_TIMEOUT`
clocks instead of `lb_done_o`. The ExtTrg loopback reports
`ext_lb_err_o` in the same way. Good lines keep working alongside a bad
one: each board trains and measures on its own.

## Files

| file | role |
|------|------|
| `rtl/trig_pkg.sv` | LFSR constants and step function, delay type, mode enum |
| `rtl/trig_sync_top.sv` | master + boards |
| `rtl/signal_dist_board.sv` | master: Algorithm Enable, LFSR, loopback meters, compensation |
| `rtl/backplane_board.sv` | one board: training, echo, trigger distribution, registration |
| `rtl/tap_trainer.sv`, `lfsr_gen.sv`, `lfsr_checker.sv`, `bitskip_monitor.sv` | link training |
| `rtl/loopback_meter.sv`, `delay_comp.sv`, `ext_delay_comp.sv` | loopback and compensation |
| `rtl/trig_dist.sv`, `trig_delay.sv`, `sync_ff.sv` | trigger distribution |
| `rtl/threshold_trigger.sv`, `timestamp_counter.sv`, `event_recorder.sv` | registration |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_trig_sync_top3.sv` | the system with three boards |
| `tb/idelaye2_model.sv`, `tb/pcb_delay_line.sv` | behavioural models of the delay element and the lines |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_trig_sync_top \
    rtl/trig_pkg.sv tb/tb_trig_sync_top.sv -o sim
./obj_dir/sim
```

(the other files are found through `-I`). `tb_trig_sync_top` runs the
whole system at its default size: two boards with different cable delays
(3 and 7 clocks), different input phases, and a delay element on every
ExtTrg input. It checks the trained taps of master lines and ExtTrg inputs
against the delay model, TrgDelay and
Delay3, that Algorithm Enable reaches both boards on the same clock, that
hits on either board or both start registration on both boards on the same
clock with identical timestamps, the stored samples, the overflow count,
and that nothing registers after the stop signal. It then measures the ExtTrg
lines board to board and checks the derived Delay1/Delay2, and finally
switches to host-set delays on lines whose two directions differ (5 and 2
clocks) and checks that events still align. Last, it cuts the master line
to board 1 and repeats training and loopback: board 1 must report a failed
link and a loopback timeout, while board 0 still passes. It takes about
270,000 clocks, about a second. `tb_trig_sync_top3` repeats the
sequence, including the cut line, with three boards, three different ExtTrg
line delays and a shortened bitskip period.

The delay-element model (`idelaye2_model`) treats the clock period as 16
taps; within 2 taps of a data transition it returns random bits, and the
whole-period part of phase + tap adds clocks of delay. It is a stand-in for
checking the algorithm, not a timing model of the real primitive.

## Departures and own choices

- **One line per board.** The master has a separate trigger line and
  return line for every board. A single shared Algorithm Enable line would
  need a separate return path for the loopback anyway.
- **Board-to-board sequencing.** One board measures at a time, chosen by
  the host; the ExtTrg lines serve both as test lines and as echo lines.
- **Symmetric-delay assumption.** TrgDelay and the ExtTrg estimates are
  half a round trip; unequal directions need the host override. The delay
  element sits only on the outgoing path, so when it adds a whole clock on
  some boards and not on others, the rounding can leave those boards one
  clock apart. The test uses input phases for which the delay element adds
  the same whole clocks on both boards.
- **ExtTrg training at the same time.** The ExtTrg inputs are trained in the
  same sweep as the master line, each board acting as the stream source for
  its own ExtTrg line. Running the two together is a choice of this design.
- **Widest window.** If the sweep finds several good windows, the widest is
  used (earliest on a tie).
- **Sizes chosen here:** 16-bit LFSR, 32 taps, T = 4096 clocks, settle 8
  clocks, 8-bit delay values, 64-stage delay lines, 12-bit unsigned samples
  with one common threshold, 8-sample windows without pre-trigger samples,
  16-event memory, 32-bit timestamp, 1000-clock loopback timeout.
- **Resources.** The whole top (master plus two boards) uses about 1100
  flip-flops outside the sample memories, which are 2 x 16 x 8 x 768 bits:
  about 530 per board and 90 in the master.
