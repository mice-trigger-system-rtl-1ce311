# MICE trigger engine in SystemVerilog

MICE, the Muon Ionization Cooling Experiment, reads its detectors once per
beam spill. It does not read them event by event. The trigger engine is the
FPGA logic that makes this possible. It does two jobs:

1. It times the DAQ cycle. When the accelerator sends *Machine Start*, the
   engine sends *Start of Spill* and then opens a *Spill Gate* for a
   programmed window. When the gate closes it sends *DAQ Trigger*, which tells
   the readout computers to read everything digitised during the spill. It
   waits until they drop their busy signals and then sends *End of Spill*.
2. It makes the particle triggers. The time-of-flight hodoscopes TOF0, TOF1
   and TOF2, the GVA counter and an internal pulser together form a trigger
   condition. Each time the condition becomes true, the engine sends a
   Particle Trigger Request (PTR). A PTR that falls inside the Spill Gate and
   outside the vetoes becomes a Particle Trigger (PT), which starts the
   digitisers. Each PT is recorded with the TOF hit patterns and its time in
   the spill. The whole spill is then placed in a readout buffer, which is
   read over VME.

This RTL implements the user logic of that engine from the published
description of the MICE trigger system: its register map, its data format
and the behaviour of each register. The description gives what each register
does, but little of how the logic is built inside. Where it is silent, this
design makes its own choices. They are listed in
[Where this design fills gaps](#where-this-design-fills-gaps).

## The DAQ cycle

```
 Machine Start / software start (clock 0)
   Start of Spill      clocks 1 .. 10
   Spill Gate          clocks open_dly .. close_dly-1      (reset: 127 .. 254)
   DAQ Trigger         10 clocks from close_dly
   busy wait           16 clocks, then until every enabled busy is low
   End of Spill        10 clocks
   calibration trigger 10 clocks
 idle
```

One clock is 10 ns, which is the unit of every delay, veto and time register.
The gate delays count from Machine Start. With the reset values (0x7F and
0xFF), the gate therefore covers 1.27 us to 2.55 us after Machine Start. A
cycle can also be started by reading the *Software cycle start* register. A
start that arrives while a cycle is running is ignored.

The *Spill Gate Generator Control* register (0x1018) controls the cycle:

| bit   | meaning                                                        | reset |
|-------|----------------------------------------------------------------|-------|
| 0     | send Start of Spill                                            | 1     |
| 1     | send End of Spill                                              | 1     |
| 2     | open the Spill Gate and send DAQ Trigger                       | 1     |
| 3     | send the calibration trigger                                   | 1     |
| 4     | external gate mode: no internal cycle; the gate follows input G1 | 0   |
| 8-13  | wait for readout busy 0..5 before End of Spill                 | 0     |
| 28    | enable the external (tracker) veto                             | 0     |

With bit 4 set, the controller sits in its external state. It sends no
Start of Spill, DAQ Trigger or End of Spill, and the gate is whatever arrives
on the external input. Spill data is still built for every external gate.

## From PMT hits to a Particle Trigger

Each TOF station has 10 vertical and 10 horizontal slabs. Each slab has a
photomultiplier at both ends. The two ends arrive on separate 20-bit inputs:
`tof_sb` (South/Bottom) and `tof_nt` (North/Top). A slab is *hit* when both of
its PMTs are high in the same clock. In every 20-bit pattern, bits [9:0] are
the vertical plane and bits [19:10] the horizontal plane.

The pipeline has four clocks:

```
 PMT inputs -> 2-flop sync -> tof_station (register) -> pt_generator (register) -> ptr, pt
              clocks 1-2           clock 3                    clock 4
```

* **Station logic** (`tof_station`). The slab mask (0x101C/0x1020/0x1024,
  reset all ones) removes slabs from the condition. The station's 3-bit field
  in the *Particle Trigger Generator Control* register (0x1028) then selects
  the condition: `000` off, `001` vertical, `010` horizontal,
  `011` vertical OR horizontal, `111` vertical AND horizontal. The
  recorded pattern is the unmasked coincidence pattern.
* **Global condition** (`pt_generator`). The conditions of the enabled
  stations are ORed together. Bit 9 of 0x1028 also ORs in the GVA counter,
  and bit 10 ORs in the pulser. The reset value 0x18 means "TOF1, vertical
  OR horizontal".
* **PTR.** One PTR is sent on every rising edge of the global condition.
* **PT.** A PTR becomes a PT only if all of these hold:
  * the Spill Gate is open;
  * it is outside the veto that follows the last PT. PTRs in the `veto_len`
    clocks after a PT are rejected (0x100C, reset 30 = 300 ns);
  * the external veto is low, or it is not enabled;
  * the event builder has room for one more record.
* **Pulser** (`pulser`). Bits 11-13 of 0x1028 select the rate: 2, 5, 10, 20,
  50, 100, 200 or 500 kHz. This gives a period of P = 100 MHz / f clocks.
  Bit 14 gives a random start: the first pulse comes after a random delay of
  1..P clocks. Bit 15 gives a random period: each interval is random in
  P/2 .. 3P/2-1. The random numbers come from a 32-bit LFSR. For example,
  0xB400 means "pulser only, 200 kHz, random period".

| 0x1028 bits | field                             |
|-------------|-----------------------------------|
| 0-2         | TOF0 logic                        |
| 3-5         | TOF1 logic                        |
| 6-8         | TOF2 logic                        |
| 9-10        | global: bit 9 OR GVA, bit 10 OR pulser |
| 11-13       | pulser frequency                  |
| 14-15       | pulser randomness (14 start, 15 period) |

## Spill data format

A spill in the readout buffer looks like this:

```
 header   [31:28]=0x5  [27:21]=0  [20:16]=GEO  [15:0]=spill number
 record   3 words per PT (below), in PT order
 trailer  [31:28]=0xF  [27:16]=number of PTs   [15:0]=spill number
```

A particle event record holds 96 bits. These are the identifier 0xA (4
bits), the trigger number in the spill (10 bits), the PT time from the first
clock of the gate (22 bits, 10 ns, saturating at about 41.9 ms) and three
20-bit TOF patterns. Each word carries one pattern in its low 20 bits. The
36 remaining bits `{0xA, number, time}` are spread, most significant bits
first, over the top 12 bits of the three words:

```
 word 0  [31:20] = {0xA, number[9:2]}             [19:0] = TOF0 pattern
 word 1  [31:20] = {number[1:0], time[21:12]}     [19:0] = TOF1 pattern
 word 2  [31:20] = time[11:0]                     [19:0] = TOF2 pattern
```

The pattern in a record is the coincidence pattern from the clock of the PT
output. Because of the synchroniser and the station register, that is the PMT
inputs of three clocks earlier. Spills are numbered from 0 after reset. The
*Number of spills* register (0x103C) is therefore also the number of the next
spill, and it is the value that a software start returns.

## Readout buffer and flow control

`readout_fifo` is a 4096-word FIFO with two write pointers. The event
builder writes the header when the gate opens and each record as its PT
arrives. It writes the trailer when the gate closes, and in the same clock
it *commits* the spill. Until the commit, none of the spill's words are
visible to the reader. The `rdusedw` field of the status register counts
committed words only. So software always sees whole spills, even though the
words are written during the spill. Reading anywhere in the window
0x0000-0x0FFC pops one word, so a block transfer over the window drains the
buffer in order. Reading an empty buffer returns 0.

The event builder can refuse a PT through its `ready` output, which the PT
generator obeys. This keeps every PT sent to the digitisers matched by a
record. Records are refused when:

* a record is being written (3 clocks, so PTs are at least 4 clocks apart);
* 1024 PTs have been taken in the spill (the trigger number has 10 bits);
* the buffer cannot hold one more record plus the trailer.

A full 1024-trigger spill takes 3074 words. If the buffer cannot hold even a
header and a trailer when a gate opens, that spill is counted but not
recorded.

## Register map (offsets from the board base)

| offset        | access | register                                        | reset  |
|---------------|--------|-------------------------------------------------|--------|
| 0x0000-0x0FFC | R      | event readout buffer                            |        |
| 0x800A        | W      | module reset (any write)                        |        |
| 0x1008        | R      | firmware version: [7:4] board type 0, [3:0] release |    |
| 0x100C        | RW     | PT veto length, 10 ns                           | 0x1E   |
| 0x1010        | RW     | Spill Gate open delay, 10 ns                    | 0x7F   |
| 0x1014        | RW     | Spill Gate close delay, 10 ns                   | 0xFF   |
| 0x1018        | RW     | Spill Gate Generator Control                    | 0x0F   |
| 0x101C/20/24  | RW     | TOF0/1/2 slab mask                              | 0xFFFFF|
| 0x1028        | RW     | Particle Trigger Generator Control              | 0x18   |
| 0x102C        | RW     | GEO (5 bits)                                    | 0      |
| 0x1030        | R      | status: [31:16] readable words, [15:0] controller state | |
| 0x1034        | R      | PTs in the last spill                           |        |
| 0x1038        | R      | data words of the last spill                    |        |
| 0x103C        | R      | spills since reset                              |        |
| 0x1040        | R      | software cycle start; returns the next spill number |    |
| 0x1060/64/68  | R      | busy times {1,0}, {3,2}, {5,4}: 16 bits each, 3.2 us units, even process in [15:0] | |

The controller state codes are: 0 idle, 1 waiting for the gate, 2 gate
open, 3 DAQ Trigger, 4 busy wait, 5 End of Spill, 6 calibration trigger,
7 external gate mode.

A busy time is the length of the most recent busy period of that readout
process. The count restarts when busy rises and saturates at 0xFFFF
(about 210 ms).

## Local bus and timing

The VME slave logic of the board is not part of this RTL. The engine takes a
single-clock register bus instead:

* `bus_addr` is the 16-bit offset from the board base address.
* A write is one clock of `bus_wr` with `bus_wdata`.
* A read is one clock of `bus_rd`. `bus_rdata` is valid, with `bus_rvalid`,
  in the next clock.

Writing to 0x800A, or holding `rst_n` low, resets every block synchronously.
After that reset, all configuration registers are at their reset values and
the buffer is empty.

All outputs are active-high and come from registers. Start of Spill, DAQ
Trigger, End of Spill and the calibration trigger are 10-clock (100 ns)
pulses. `ptr` and `pt` are one-clock pulses.

## Where this design fills gaps

The following points are this design's own choices, not taken from the
source description:

* **Clock.** One clock per 10 ns unit (100 MHz). The pulser periods, the
  3.2 us busy unit (`BUSY_UNIT` = 320) and all delays assume it.
* **Bit positions.** The positions of GEO, spill number and trigger count in
  the header and trailer are assumed. So are the 12/12/12 split of
  `{0xA, number, time}` over the three record words, the status register
  halves and the busy register halves. The published layout of these words
  could not be read to the bit.
* **Station combination.** Stations combine with OR.
* **Coincidence window.** A coincidence means both PMTs high in the same
  clock. There is no pulse stretching or window.
* **Calibration trigger.** The source only says that it can be enabled. Here
  it is one pulse at the end of every cycle, after End of Spill.
* **End of Spill timing.** End of Spill waits a 16-clock guard
  (`BUSY_GUARD`) and then for all enabled busies to be low. With no busy
  enabled, it follows the DAQ Trigger after the guard.
* **Busy inputs.** There are six busy inputs (0..5), matching the six enable
  bits 8-13 and the three busy time registers.
* **Buffer rules.** The buffer depth of 4096 words, the commit mechanism,
  the 1024-PT limit, the refusal of PTs when the buffer is full, and the 0
  returned for an empty read are all choices of this design.
* **Undefined station codes.** Codes 100, 101 and 110 switch the station off.
* **Outputs.** All outputs are active-high. Connector assignment and signal
  levels (NIM, LVDS, ECL) are not modelled.

## Not included

* **Translator board.** This is the second V1495 board. It turns the
  engine's outputs into signals for the DAQ control, the TV scaler, the TDC
  (CAEN V1290) and the scaler (CAEN V830). Only its connectors are known, so
  it is not built. The `ptr`, `pt` and DAQ control outputs are the signals
  it would receive.
* **V977 I/O registers and the VME bridge.** These are commercial parts.
  Their side of the interface is the DAQ control outputs, the
  `readout_busy` inputs and the local register bus.

## Files

| file | content |
|------|---------|
| `rtl/mice_trig_pkg.sv` | offsets, reset values, control register structs, word formats, state codes |
| `rtl/mice_trigger_engine.sv` | top level |
| `rtl/vme_regs.sv` | register map and bus |
| `rtl/daq_cycle_ctrl.sv` | DAQ cycle state machine |
| `rtl/tof_station.sv` | slab coincidences, mask, station logic |
| `rtl/pulser.sv` | pulser trigger |
| `rtl/pt_generator.sv` | PTR, PT, vetoes |
| `rtl/event_builder.sv` | header, records, trailer, counters |
| `rtl/readout_fifo.sv` | readout buffer with commit |
| `rtl/busy_timer.sv` | readout busy length |
| `rtl/sync_2ff.sv` | input synchroniser |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_mice_trigger_engine.sv` | end-to-end test at default parameters |
| `tb/tb_spill_600.sv` | 600 triggers in a 1 ms spill, read back |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mice_trig_pkg.sv \
          tb/tb_mice_trigger_engine.sv --top-module tb_mice_trigger_engine
./obj_dir/Vtb_mice_trigger_engine
```

To run another test, replace the testbench file and the top module name. To
lint the design:
`verilator --lint-only -Wall -Irtl -y rtl rtl/mice_trig_pkg.sv rtl/mice_trigger_engine.sv`.

## How far it is verified

Each block has a testbench that checks it against values worked out
independently of the RTL:

* a reference model for the station logic, PTR/PT rules and buffer;
* exact cycle windows for the DAQ cycle;
* exact periods for every pulser rate.

The end-to-end test runs six spills at the default parameters. It exercises
Machine Start and software start, every DAQ signal, a busy-held End of
Spill, all four reasons a PTR is rejected, the trigger limit, a full buffer,
external gate mode, the pulser and module reset. It reads back and checks
every word. The 600-trigger test runs the stated design load of the DAQ (600
events in a 1 ms spill) at the default parameters.

Nothing here has been run on the real board. The timing of signals between
the engine and the outside world, such as pulse widths, polarities and
coincidence windows, should be checked against the hardware before this RTL
is used on it.
