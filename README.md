# SOL40 clock path with measurable and adjustable phases

In the LHCb timing and fast control (TFC) system, the control cards (SOL40)
recover the 40 MHz LHC bunch clock from an optical TTC-PON stream. They then
send it on to the front-end electronics over GBT control links, one
transceiver bank per reference clock. On the way, the clock passes through an
FPGA-internal PLL (40 MHz to 2 x 240 MHz) and two external Si5345 jitter
cleaners (4 x 240 MHz each). The internal PLL does not keep its
input-to-output phase across a loss of lock. After every interruption of the
TFC clock, the eight GBT reference clocks therefore come back at a random
phase within the 4.16 ns period of 240 MHz. The front ends inherit that
random phase.

This design does not try to avoid the PLL. It **measures** the phase of each
GBT reference clock with a digital dual mixer time difference (DDMTD) meter
in the FPGA. Software then **moves** the clocks back to a fixed setpoint
through the phase-step controls of the PLLs:

* internal PLL steps of 104 ps, which move all four outputs of one Si5345;
* Si5345 per-output steps of 72 ps.

Each clock can then be brought to within half a step of each PLL,
52 + 36 = 88 ps, of the setpoint. The measured spread of this scheme on the
real card is about 220 ps, against 4.4 ns without it.

The repository holds the synthesizable firmware for the FPGA part. It also
holds behavioural models of the two PLL types, so that the whole clock path
can be simulated. The adjustment procedure is software; it appears here as
the end-to-end testbench.

## Clock path and block map

```
 TTC-PON Rx ──240 MHz rec. clk + header strobe──► tfc_clk_gen ──clk40──► fpll_model ──240──► si5345_model[0] ──4×240──┐
 (outside)                 │                        (sys clock)           (2 outputs) ──240──► si5345_model[1] ──4×240──┤
                           │                                                  ▲                      ▲                  │ gbt_refclk[7:0]
                           └──────────────► ddmtd_phase_monitor ◄─────────────┼──────────────────────┼──────────────────┤ (to GBT banks)
                              reference        (8 channels)                   │ 104 ps steps         │ 72 ps steps      │
                                                   │ phases                   │                      │                  │
                                             register file (clk40) ──► phase_shift_ctrl ─────────────┴──────────────────┘
                                                   ▲
                                            control software
```

| File | Kind | Role |
|---|---|---|
| `rtl/sol40_pkg.sv` | package | clock-tree sizes, step sizes, register map, command struct |
| `rtl/tfc_clk_gen.sv` | RTL | 40 MHz system clock: divide-by-6 of the recovered 240 MHz clock, restarted by the header strobe |
| `rtl/ddmtd_edge_detector.sv` | RTL | one DDMTD input: mixer flop, resynchroniser, deglitcher, time tag |
| `rtl/ddmtd_phase_monitor.sv` | RTL | 8-channel DDMTD meter with software reset/trigger and clock-domain crossing |
| `rtl/phase_shift_ctrl.sv` | RTL | executes "N steps up/down on target T" commands with a request/acknowledge handshake |
| `rtl/sol40_fw.sv` | RTL | FPGA part: the three blocks above plus the register file |
| `rtl/fpll_model.sv` | behavioural | internal PLL: random phase at each lock, 104 ps steps |
| `rtl/si5345_model.sv` | behavioural | Si5345: 4 outputs, per-output skew, 72 ps steps |
| `rtl/sol40_card.sv` | behavioural top | firmware + PLL models wired as on the card |

Only `sol40_fw` and what it contains are meant for synthesis. `sol40_card`
contains the PLL models, which use delays.

Outside this design:

* the TTC-PON receiver and transmitter cores;
* the GBT-FPGA link cores and the transceivers.

The recovered clock, header strobe and link-ready flag are inputs of the top.
The eight GBT reference clocks are its outputs.

## The 40 MHz system clock (`tfc_clk_gen`)

The TTC-PON receiver delivers a 240 MHz parallel clock. It also delivers a
one-cycle strobe aligned with the frame header, once every six cycles. A
3-bit counter counts 0 to 5. The strobe forces it to 0. `clk40` is a
registered output that is high in phases 0 to 2. It rises on the same
240 MHz edge that samples the strobe, so its phase is fixed to the header.

A strobe that arrives where it is not expected restarts the counter there and
is counted in `realign_cnt`. `aligned` rises after four strobes in a row
arrive where expected. It falls on a misplaced strobe, a missing strobe, or
when the link drops.

## DDMTD phase measurement (`ddmtd_phase_monitor`)

This is the part that takes the most thought.

**Principle.** Call the clock period T (here 4160 ps). Every input is sampled
as data by a helper clock of period T·(N+1)/N, which is slightly slower. The
sampling point then slides through the input waveform by T/N per sample. The
sampled signal is therefore a copy of the input slowed down N times, with one
"beat" per N helper cycles. Suppose a measured clock lags the reference by dt.
Its sampled rising edge then comes dt·N/T helper cycles after the reference's
sampled edge.

In the test setup, N = 4160 (helper period 4161 ps), so **one helper cycle is
one picosecond**, and a reading lies in [0, 4160). N is a property of the
helper clock only. The RTL counts helper cycles and does not need to know N.
The helper clock is an input of the top; on a card it would come from a
separate PLL.

**Reference choice.** The meter compares 240 MHz with 240 MHz. The reference
is the recovered 240 MHz parallel clock, not the 40 MHz system clock. The
recovered clock is aligned with the header, so its phase to the bunch clock
is fixed.

**Per input (`ddmtd_edge_detector`).** Each input passes through:

* a mixer flop;
* two resynchronising flops;
* a deglitcher. Near an edge the sampled value may flicker. A new level is
  accepted only after `DEGLITCH` (8) equal samples in a row. The edge is then
  stamped with the time tag of the first sample of that run, taken from a
  free-running 16-bit counter shared by all channels.

Every channel has the same latency, so the tags can be subtracted directly.

**Per channel.** A trigger arms the channel. It then:

1. waits for the next reference edge and keeps its tag;
2. waits for the next edge of its own clock;
3. stores the difference of the two tags.

The result is held until the next trigger or reset.

One measurement lasts between one and two beat periods (about 17 to 35 µs
with N = 4160). The software averages many of them; the card's software
uses 100.

**Clock-domain crossing.** The register side runs on `clk40`.

* Reset and trigger requests cross to the helper domain as toggles through
  three flops.
* `done` crosses back through two flops.
* The result words themselves are not resynchronised. A result is written
  once and then held still while its `done` is high, so reading it after
  seeing `done` is safe.
* A trigger also sets a local "pending" flag. The flag masks `done` until the
  helper domain acknowledges the trigger (another toggle). This way software
  never sees the previous measurement's `done` as the new one.

## Phase stepping (`phase_shift_ctrl`)

A command is {target, direction, number of steps}. Targets are numbered as
follows:

* 0 and 1: the two internal PLL outputs;
* 2 + 4·s + o: output o of Si5345 s.

The controller issues the steps one at a time. Each step is a four-phase
handshake with the device that owns the target: request up, wait for
acknowledge, request down, wait for acknowledge down. The acknowledges are
resynchronised, so the PLL side may be on any clock.

A step therefore costs at least six `clk40` cycles plus the device's own
response time. On a real Si5345 that response is a serial-port register
write, and the request/acknowledge pair stands for that write sequence.

A signed per-target counter records the net steps applied. The controller
ignores:

* commands given while busy;
* commands for a target above 9;
* commands with zero steps.

An assertion checks that a request is never withdrawn before it was
acknowledged.

## Register map (`sol40_pkg`, 32-bit, word addresses, bus on `clk40`)

| Addr | Access | Content |
|---|---|---|
| 0x00 | R | identifier `0x50140ADF` |
| 0x01 | W | bit 0: reset the DDMTD; bit 1: trigger a measurement |
| 0x02 | R | [7:0] DDMTD done per channel, [8] stepping busy, [9] TFC clock aligned, [10] internal PLL locked, [12:11] Si5345 locked, [15:13] clk40 phase |
| 0x03 | W | [3:0] target, [4] up, [15:8] number of steps |
| 0x04 | R | [15:0] header realignments |
| 0x10–0x17 | R | [31] valid (= done), [15:0] phase of GBT clock 0–7 in helper cycles |
| 0x20–0x29 | R | signed net steps applied to target 0–9 |

Bus protocol:

* A write is `reg_we` with address and data for one cycle.
* A read is `reg_re` with the address for one cycle. `reg_rdata` is valid,
  with `reg_rvalid`, one cycle later.

## The alignment procedure (software, in `tb/tb_sol40_card.sv`)

1. Average 100 DDMTD readings of all eight clocks. Unwrap each reading around
   the first one, so that values near 0/4160 average correctly. Subtract from
   each reading the routing offset of that clock (see below).
2. For each Si5345, step its internal PLL output by round((phase of its first
   output − setpoint) / 104 ps), in the opposite direction.
3. Measure again. Step each of the other three outputs of that Si5345 by
   round((its phase − first output's phase) / 72 ps).
4. Measure again. Accept if all eight clocks are within the margin (110 ps in
   the test) of the setpoint; otherwise repeat from step 1.

Step 2 aims the *first* output of each Si5345 at the setpoint. The card's
software also takes the average of the four outputs of each Si5345. How it
uses that average alongside the first-output alignment is not spelled out, so
the test procedure does not use it.

The worst residual is half an internal PLL step plus half a Si5345 step,
52 + 36 = 88 ps on either side of the setpoint. Over 100 simulated link
losses, the aligned clocks stay within about 170 ps in total. Before
alignment they are spread over the whole 4.16 ns period.

**Offset compensation.** The DDMTD sees each clock at its own sampler inside
the FPGA, not at the transceiver. Each reading is therefore late by that
clock's routing delay. On hardware the per-clock offsets come from the FPGA
timing analysis of each firmware build, and software subtracts them. In
`sol40_card` the parameter `DDMTD_PATH_PS` models these delays. Its defaults
(120 to 310 ps) are illustrative. The testbench holds its own copy of the
table, as software would, and checks the corrected readings against the
phase at the card's output pins.

One part of the procedure is left out here:

* **Setpoint choice.** On hardware the setpoint is the middle of the window
  in which the clock-domain crossing from the 40 MHz system clock to the GBT
  reference clocks works without errors, found by scanning. The test uses a
  fixed setpoint of 1000 ps.

## What the behavioural models assume

`fpll_model`:

* It locks 8 reference edges after reset.
* At each lock, each output draws its own phase, uniform over one 4160 ps
  period.
* It produces six output periods per 40 MHz input period.
* A step changes the output's delay by ±104 ps from the next reference edge.

`si5345_model`:

* Each output is the input delayed by 4160 ps plus a per-output skew, drawn
  uniformly in 0–500 ps at each lock, plus the steps applied to that output.
* It does not model jitter.
* It does not model zero-delay mode.

Both models:

* keep their delays positive, so that a phase step never creates or swallows
  a clock edge;
* answer a step request after 20 ns (internal PLL) or 50 ns (Si5345).

All of these numbers are modelling choices, except the 104 ps and 72 ps step
sizes and the fact that the internal PLL's phase is random after lock.

## Departures and limits

* **Timing.** The 240 MHz period is taken as exactly 4160 ps, and 40 MHz as
  6 × 4160 ps. The real LHC clock is 40.079 MHz (about 4158 ps at 240 MHz).
* **DDMTD reference.** The meter measures against the recovered 240 MHz clock,
  not the 40 MHz system clock. The method needs equal frequencies, and the
  240 MHz clock is fixed to the header.
* **Design choices.** The following are this design's own:
  * the register map and bus;
  * the handshake to the PLLs;
  * the deglitcher;
  * N = 4160 for the helper clock;
  * the alignment monitor in `tfc_clk_gen`;
  * the PLL reset on loss of the TFC link (`pll_rst` follows `rx_ready`
    through a synchroniser).
* **Status bits from clk240.** `tfc_aligned`, the clk40 phase and the
  realignment count reach the register file without resynchronisers. clk40 is
  generated from clk240 and has a fixed relation to it.
* **Lint warnings.** `verilator -Wall` reports a few warnings that are left on
  purpose:
  * unused package constants;
  * unused upper bits of the write data;
  * `ZERODLY` on the computed delays of the models;
  * `BLKSEQ` on the models' phase state, which is written from several
    processes;
  * `SYNCASYNCNET` on the synchronised reset, which is also the asynchronous
    reset of the PLL model.
* **Not built.** The two fixed-latency alternatives, which are not adopted
  here, are not built: routing the recovered clock straight to the
  transceivers, and running the Si5345s in zero-delay mode.
* **Jitter.** The simulation is jitter-free. The agreement between the DDMTD
  and the true phase (±3 ps in the tests) is therefore better than the
  hardware would give. The averaging over 100 readings is kept to show the
  procedure and its run time.

## Simulating

All files are SystemVerilog-2017. The models and testbenches need Verilator's
timing support. Example for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sol40_card \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sol40_pkg.sv tb/tb_sol40_card.sv
./obj_dir/Vtb_sol40_card
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks | Run time |
|---|---|---|
| `tb_tfc_clk_gen` | clk40 phase/level every cycle against a reference model, zero-latency alignment to the strobe, realignment count, aligned flag on moved/missing strobe and link loss | < 1 s |
| `tb_ddmtd_phase_monitor` | 3 sets of 8 known delays (incl. 0 ps and 4157 ps) read to ±2 ps, measurement time ≤ 2 beat periods, done masking, reset | < 1 s |
| `tb_phase_shift_ctrl` | steps reach the right device/output/direction, counters, ignored commands, minimum step time | < 1 s |
| `tb_fpll_model`, `tb_si5345_model` | lock, period, steady phase, exact step sizes on the selected output only, random phase after relock / input-follows | < 1 s |
| `tb_sol40_fw` | whole register interface: identifier, status, DDMTD via registers against known delays, stepping, realignment counter, PLL reset on link loss | < 1 s |
| `tb_sol40_card` | end to end at default parameters: three locks (two TFC link losses, the second with a moved header), full alignment after each, every DDMTD reading (after offset compensation) checked against edge time stamps, final phases checked independently; counts relocks at a new phase, PLL steps up and down, Si5345 steps, measurements and header realignments, and fails if any did not occur | about 2 min |
| `tb_sol40_card_resets` | 100 TFC link losses with alignment after each (2 readings averaged): phase before alignment must spread over > 2 ns, and all aligned phases must fall in a window of at most 220 ps; prints both (typically about 4.1 ns before, about 170 ps after) | about 70 s |

To change the helper clock ratio, change the helper period in the
testbenches; the RTL is independent of N as long as N < 2^`TS_W`.
