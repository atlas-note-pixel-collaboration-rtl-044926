# FE-I3 pixel readout chip in SystemVerilog

FE-I3 is the front-end chip of the ATLAS pixel detector. Each chip reads out
2880 pixels of 50 x 400 um, arranged as 18 columns x 160 rows. The chip sees a
bunch crossing every 25 ns (40 MHz). It must keep every hit for about 3.2 us,
until the level-1 (L1) trigger decides whether that crossing is interesting.
Then it must send out only the hits the trigger selected, grouped by event.

The main idea: the chip stores only the time of a hit, never a copy of it per
bunch crossing. Every hit carries its leading-edge time stamp, so its age is
`now - LE`. A hit whose age reaches the L1 latency in the same clock as a
trigger belongs to that trigger. A hit that reaches the latency with no
trigger is thrown away. Pixels, columns and the chip-level readout all work
concurrently and without dead time.

This RTL models the chip's digital architecture completely, at its real size.
The analog pixel front end is a behavioural model that gives the digital logic
realistic discriminator pulses.

## Data flow

```
 sensor_q / strobe
      |
 [pixel_analog] -> disc -> [pixel_readout]  x 320 per column pair
                                  | priority bus (top row first)
                              [column_pair] --- 9 column pairs ---
                                  |
                               [ceu]  Gray->binary, ToT, filter, timewalk
                                  |
                           [eoc_buffer] 64 hits, age check, trigger tagging
                                  |            ^ trig, trig_id
 l1_trig -> [trigger_fifo] 16 pending --------'
                 | oldest L1 number
           [readout_ctrl] scan all pairs -> [serializer] -> dout
```

`timestamp_gen` provides the 8-bit time (binary and Gray) to all of these.
`config_if` receives the serial configuration. It holds the global register
and loads the pixel registers.

## Time stamps and the age of a hit

`timestamp_gen` counts 40 MHz clocks modulo 256. Pixels latch the Gray-coded
copy. Gray code changes one bit per step, so a pixel that samples it close to a
transition is off by at most one count. The CEU converts the latched values
back to binary.

Timing, as implemented and tested:

* A charge deposited in clock c0 (sensor_q non-zero while `cyc == c0-1`, seen
  at the edge that starts c0) gives LE = c0 mod 256.
* A trigger present on `l1_trig` while the time stamp reads `c0 + latency`
  selects that hit. Its end-of-event word reports that time stamp as the BCID.
* The latency is a global register field, default 128 clocks (3.2 us). It must
  stay below 256, because ages are computed modulo 256.

A hit must reach its end-of-column buffer before its age reaches the latency.
Otherwise it is deleted as soon as it is written. A transfer that is too slow
therefore loses hits; it never assigns them to the wrong trigger. For example,
at the 5 MHz transfer rate one column pair moves only about
(128 - ToT) / 8 hits inside the latency.

## Pixel: LE, TE and the busy cell

`pixel_readout` samples the discriminator on the 40 MHz clock. MASK gates the
discriminator off. The rising edge stores LE and the falling edge stores TE.
The hit then waits (`hit_ready`) until the column reads it. While it waits,
the pixel ignores new pulses. ToT is TE - LE, in clocks.

`pixel_ctrl_reg` holds the 14 pixel bits:

| latch index | bits |
|---|---|
| 0..2 | FDAC (feedback current trim, ToT gain) |
| 3..9 | TDAC (threshold trim) |
| 10 | MASK |
| 11 | EnHitBus (drive the wired-OR `hitbus` output) |
| 12 | Select (take part in strobe injection) |
| 13 | Shutdown (preamplifier off) |

Loading is bit-plane by bit-plane. Each pixel has one shift stage, and the
stages form a single chain through the whole matrix. A pixel frame shifts
2880 bits into the chain. When the frame ends, one chosen latch index of every
pixel is loaded from its stage. Writing all 14 bits therefore takes 14 frames.
The reset values are TDAC 64, FDAC 4 and all flags off.

## Column pair: the priority bus

In `column_pair`, cell p = 2*row + col. Every cell with a complete hit
requests the bus. A ripple chain grants the request with the highest p, so the
top row goes first, and inhibits every cell below it. The granted cell's row,
column, LE and TE appear on `bus` combinationally. A `read` pulse from the CEU
clears exactly that cell. On the next clock the next request owns the bus.
The loop in the RTL is the ripple chain; on silicon its delay is what limits
the transfer rate.

## CEU: transfer and formatting

`ceu` reads one hit every 8, 4 or 2 clocks (5, 10 or 20 MHz, set by
`ceu_speed`). It computes ToT = TE - LE modulo 256 and writes the hit
`{col, row, LE, ToT}` to the buffer one clock later. Two options apply:

* Digital threshold (`en_tot_filter`): a hit with ToT < `tot_min` is dropped.
* Timewalk correction (`en_timewalk`): a hit with ToT < `tw_thr` is written
  twice, with LE and with LE-1. Small signals cross the threshold late; the
  extra copy can be picked up by the trigger of the previous bunch crossing.

Buffer writes are at least 2 clocks apart (at most 20 MHz). A column pair
whose bit in `col_enable` is clear is never read.

## End-of-column buffers and trigger tagging

Each column pair has 64 entries (`eoc_buffer`). A hit is written to the lowest
free entry. If no entry is free, the hit is lost and the event is reported
through the overflow flag.

Every clock, each untriggered entry compares `now - LE` with the latency:

* equal, and an accepted trigger in this clock: the entry is tagged with the
  trigger's 4-bit L1 number;
* equal, and no trigger: the entry is deleted;
* larger (the hit arrived too late): the entry is deleted.

For readout, the L1 number being read is broadcast to the buffers. Each buffer
offers its lowest-numbered entry with that tag, and the acknowledge frees that
entry.

## Trigger FIFO and chip-level readout

`trigger_fifo` stores, for each accepted trigger, the BCID and two flags:

* buffer overflow since the previous trigger;
* a trigger was lost because the FIFO was full.

The FIFO holds 16 triggers. Its write pointer is the L1 number handed to the
buffers.

`readout_ctrl` is combinational; its state lives in the FIFO, the buffers and
the serializer. While a trigger is pending and the serializer is free, it
sends the matching hit of the lowest-numbered column pair. When no buffer
offers a hit any more, it sends the end-of-event word and pops the trigger.
Events therefore leave in trigger order. Each hit appears in exactly one event,
or in two adjacent events if it has a timewalk copy.

### Output words

`serializer` sends 23-bit words, MSB first, one bit per 40 MHz clock. The line
idles at 0 and there is at least one idle clock between words.

| word | bits 22..0 |
|---|---|
| hit | `1, 0, column[4:0] (0..17), row[7:0] (0..159), ToT[7:0]` |
| end of event | `1, 1, L1[3:0], BCID[7:0], flags[3:0], 00000` |

flags = `{0, 0, trigger lost, buffer overflow}`.

## Configuration port

The port has three pins: `cfg_din`, `cfg_clk` (5 MHz) and `cfg_load`. A frame
is the run of `cfg_clk` rising edges during which `cfg_load` is high. The
frame ends at the first edge with `cfg_load` low, so give at least one clock
edge after each frame.

| field | bits |
|---|---|
| chip address | 4, MSB first, compared with the `chip_addr` pins |
| command | 4: `0001` write global, `0010` read global, `0100` write pixel |
| write global | 231 data bits. They are applied when the frame ends, and only if exactly 231 arrived |
| read global | 231 data clocks. `cfg_dout` presents the register MSB first, one bit after each data edge |
| write pixel | 4-bit latch index, then 2880 bits. The first bit sent lands in the last pixel of the chain: column pair 8, row 159, right column |

Global register layout, MSB (first bit sent) to LSB, as `fei3_pkg::gcfg_t`:

| field | bits | reset value |
|---|---|---|
| 11 bias DAC codes | 88 | 128 each |
| VCal | 10 | 0 |
| global threshold | 5 | 16 |
| L1 latency | 8 | 128 |
| ToT minimum | 8 | 0 |
| timewalk threshold | 8 | 0 |
| ToT filter enable | 1 | 0 |
| timewalk enable | 1 | 0 |
| 9 column pair enables | 9 | all 1 |
| CEU speed | 2 | 2 (20 MHz) |
| hit bus enable | 1 | 1 |
| spare | 90 | 0 |

Only the total of 231 bits and the list of what the register contains are
given for the chip. The order of the fields, the width of the global
threshold, the spare bits and the reset values are this design's choices.

## Analog model

`pixel_analog` is behavioural: synthesizing it gives logic, not the analog
circuit. On each 40 MHz clock it takes the deposited charge: `sensor_q`, or
VCal x 25 e on a rising `strobe` when Select is set. It compares the charge
with the threshold `40*TDAC + 80*GTDAC + 160` e (4000 e at the mid codes). If
the charge is above threshold, it produces a pulse of
`q*12 / (500*(8+FDAC))` clocks: 40 clocks (1 us) for 20 000 e at FDAC 4.
The pulse length follows the constant-current feedback of the real
preamplifier, whose output falls back linearly. Noise, threshold dispersion,
rise time and leakage are not modelled, nor is the leakage-current
monitoring that EnHitBus also switches on in the real pixel. Charge that arrives during a pulse is
ignored. The bias DACs and the VCal DAC are analog; their codes are brought
out as `bias_dac` and `vcal_dac`.

## Parameters and files

`fei3_top` parameters (all defaults are the real chip's):

| parameter | default | meaning |
|---|---|---|
| `N_CP` | 9 | column pairs |
| `N_ROWS` | 160 | rows |
| `EOC_DEPTH` | 64 | buffer entries per column pair |
| `FIFO_DEPTH` | 16 | pending triggers |

The 4-bit L1 number assumes `FIFO_DEPTH` = 16. `fei3_pkg` holds the shared
widths, structs and word formats. `pixel_cell` wires one pixel's register,
analog model and readout logic together. Every module in `rtl/` has a
self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end.

Simulate a block, for example the whole chip:

```
verilator --binary --timing --assert -Irtl --top-module tb_fei3_top \
    rtl/fei3_pkg.sv tb/tb_fei3_top.sv
./obj_dir/Vtb_fei3_top
```

The chip-level test runs at full size (2880 pixels). It takes about a minute
to build and under a minute to run. It configures the chip through its serial
pins only, and then exercises each mechanism at least once:

* triggered readout, compared event by event with a reference model;
* deletion of untriggered hits;
* timewalk copies and the ToT filter;
* a masked pixel and strobe injection;
* the hit bus;
* 5 MHz transfers and a disabled column pair;
* a buffer overflow and the flag it raises;
* a full trigger FIFO and the lost-trigger flag;
* read-back of the global register.

## How far to trust it, and where it departs from the chip

The following come from the chip's description:

* the architecture and its sizes;
* the Gray-coded 8-bit time stamps, and LE, TE and 8-bit row transfer;
* top-row-first priority;
* the CEU rates, the ToT filter and the LE/LE-1 timewalk copies;
* the 64 buffers, 4-bit trigger numbers, the 16-deep FIFO and EoE words with
  error flags;
* the 14 pixel bits, the 231 global bits, and the 5 MHz three-pin port with a
  4-bit address.

The following are this design's own choices. Do not expect bit compatibility
with real FE-I3 data or configuration streams.

* every encoding: output words, configuration commands, the global field
  order, the pixel latch order and bit-plane loading;
* the order between the two columns of a row;
* the order between buffer entries and between column pairs;
* exact trigger matching at age == latency;
* dropping hits that arrive too late, and the behaviour when a buffer or the
  FIFO is full;
* the serial rate of one bit per clock;
* all analog numbers.

Known simplifications:

* The pixel edge strobes are clock-synchronous rather than asynchronous 1 ns
  pulses.
* Configuration runs on its own clock and is assumed static while data is
  taken.
* The global and pixel registers are ordinary flip-flops, with no protection
  against single-event upsets.
