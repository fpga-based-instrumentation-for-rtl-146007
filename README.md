# An FPGA framework for antiproton-source instrument modules

A family of NIM instrument modules shares one digital design: an FPGA with a
small microcontroller next to it, commodity converters around it, and a
network link on the microcontroller. Whatever the application, everything the
outside world may read or set lives on one register bus inside the FPGA,
modelled on a VME A16/D32 backplane: 16-bit word addresses and 32-bit data.
The microcontroller reaches that bus through a dozen pins, and the modules of a
crate reach each other's buses over four shared LVDS pairs, so one network
connection serves a whole crate. A controls client then needs nothing but
"write word at address" and "read word at address".

On top of this framework sit the signal-processing blocks of two boards:

* **BPM downconverter.** Each beam-position-monitor plate's 53 MHz signal is
  demodulated to baseband I/Q outside the FPGA and sampled by 10-bit ADCs at
  20 MSPS. The FPGA subtracts pedestals, forms the magnitude sqrt(I² + Q²)
  and integrates it over the 1.6 µs bunch train, for four plates: two
  complete BPMs per card.
* **RF DDS board.** Two RF inputs are sampled at 4/7 of the 53 MHz carrier.
  At that rate consecutive samples are alternately in-phase and quadrature
  values, and a divider and an arctangent table turn them into a phase. The
  measured phase of the Main Injector RF drives a *phase jump*: the
  free-running Debuncher RF synthesizer (an AD9953 DDS) is stepped into phase
  with the incoming beam 200 µs before transfer. The same board can ramp the
  DDS frequency and plays an orbit-synchronized waveform on its diagnostic DAC.

`ap_fpga_top` carries both personalities side by side, each with its own
pins. A given board wires up only the converters it has. The two also share
a front-panel trigger with a programmable delay, a 256-sample capture RAM and
the board's 32 MB SDRAM, which can also keep a log of BPM results.

```
 CPU pins ──► cpu_bus_bridge ─┐                 ┌─► trigger_delay ◄── tclk_decoder
                              ├► abus_arbiter ─►│   capture_buffer, abus_decoder (register map)
 crate LVDS ► lvds_bus_slave ─┘                 ├─► bpm_processor (4 × bpm_plate) ─► result_logger ─► sdram_ctrl
 crate LVDS ◄ lvds_bus_master ◄── registers     ├─► phase_meter ×2 ─► phase_jump ─┐
                                                ├─► freq_ramp ────────────────────┤► dds_ctrl ─► AD9953
                                                ├─► host DDS writes ──────────────┘
                                                ├─► awg ─► AD9751 DAC
                                                └─► sdram_ctrl ─► SDRAM
```

## Clocking and conventions

One clock runs everything: the board's 53.1 MHz VCXO clock, which the crate
bus also carries. ADC words enter as parallel words in this clock domain with
a one-clock `valid` strobe, so a converter may run slower than the clock
(20 MSPS for the BPM ADCs, 4/7 × 53.1 = 30.3 MSPS for the RF ADC). The pins
that really are asynchronous go through two-flip-flop synchronizers. These
are the CPU strobes, `trig_in`, `jump_trig` and `orbit_sync`, which act on
their rising edge, and the clock-event line `tclk`. Reset is synchronous and active high. Nothing in the design
uses a second clock. Transferring ADC data from the converters' own clocks is
left to the pins of a real board.

Handshakes between blocks follow one rule: a request stays high, with its
data, until the receiver's `ack`. The transfer happens in the clock where
both are high.

## The internal bus

`abus_if` is the bus: `req`, `we`, `addr[15:0]`, `wdata[31:0]` from the
master, `ack` and `rdata[31:0]` from the slave. `rdata` is valid in the ack
cycle. `abus_arbiter` shares the bus between the CPU port (first priority)
and the crate port. It grants an idle bus in one clock and holds the grant
until the access is done. `abus_decoder` answers every address with `ack` one
clock after `req`. Reads of the capture and waveform RAMs are addressed
straight from the bus, so they are ready by then too. Writes take effect in
the ack cycle. Unmapped addresses read 0 and ignore writes.

Register map (word addresses; `ap_pkg.sv` has the constants):

| Address | Access | Meaning |
|---|---|---|
| 0x0000 | R | identification word 0xA9B00001 |
| 0x0001 | R/W | bit 0 software start (self-clearing), bits 3:1 capture channel (0–3 BPM plate {Q,I}, 4/5 RF input A/B) |
| 0x0002 | R | status: 0 capture done, 1 BPM done, 2 ramp busy, 3 phase valid, 4 DDS busy, 5 remote busy, 6 remote error, 7 trigger delay running, 8 capture running, 9 jump missed, 10 waveform playing |
| 0x0010–0x0013 | R/W | pedestals of plate 0–3: Q in bits 25:16, I in bits 9:0 |
| 0x0020–0x0023 | R | integrated magnitude of plate 0–3 (16 bits) |
| 0x0030 | R | phase of RF input A (MI reference), 2^16 = one turn |
| 0x0031 | R/W | phase offset added at a jump |
| 0x0032 | R | phase sent at the last jump |
| 0x0033 | R | phase of RF input B (cavity fanback) |
| 0x0034 / 0x0035 | R | top 16 bits of the Q and I sums of input A / B |
| 0x0036 | R | {orbit markers seen, DDS writes made}, 16 bits each |
| 0x0040–0x0043 | R/W | ramp start word, end word, step, clocks per step |
| 0x0044 | W | start the ramp |
| 0x0045 | R | present ramp tuning word |
| 0x0048 / 0x0049 / 0x004A | W | send a tuning word / phase word (14 bits) / amplitude (14 bits) to the DDS |
| 0x0050 | R/W | waveform length in words (0 = 1024) |
| 0x0060–0x0062 | R/W | crate-bus master: {slot, address}, data, command (1 read, 2 write) and status {error, busy} |
| 0x0070–0x0072 | R/W | SDRAM pointer, data, command/status (see the SDRAM section) |
| 0x0073 | R/W | BPM result log: bit 31 enable, bits 23:0 log pointer (a write loads both) |
| 0x0074 | R | result log status: bit 8 busy, bits 7:0 records missed |
| 0x0080 | R/W | clock event that starts acquisition: bit 31 enable, bits 7:0 event code |
| 0x0081 | R | clock events: count in bits 31:16, parity errors in 15:8, last code in 7:0 |
| 0x0459 | R/W | trigger-to-acquisition delay in clocks |
| 0x0800–0x0BFF | R/W | waveform RAM, 10-bit words |
| 0x1000–0x10FF | R | capture RAM, 256 words |

Only 0x0459 and 0x1000–0x10FF are given by the original description. The
remaining addresses are this design's own.

## Reaching the bus

### The microcontroller's pin port (`cpu_bus_bridge`)

Twelve pins: eight data lines, a two-bit register select `cpu_a`, and read
and write strobes. An access is assembled a byte at a time, most significant
byte first:

| `cpu_a` | write | read |
|---|---|---|
| 0 | shift a byte into the 16-bit address | – |
| 1 | shift a byte into the 32-bit data register | top byte of the data register, then rotate |
| 2 | command: 1 = bus read, 2 = bus write | bit 0 = busy |
| 3 | – | 0xA5, a link check |

A bus write is two address bytes, four data bytes and command 2. A read is
two address bytes and command 1. The firmware then polls busy and reads four
data bytes. Strobes are synchronized, so each must last at least three
clocks, with `cpu_a` and `cpu_d_in` stable meanwhile. `cpu_d_oe` follows the
read strobe.

### The crate bus (`lvds_bus_slave`, `lvds_bus_master`)

The four LVDS pairs are the 53 MHz clock, Sync, Sdat and Spare. A command
frame on Sdat is 53 bits, one per clock, most significant first. Sync is high
with the first bit:

```
 we | slot[3:0] | addr[15:0] | data[31:0]
```

The module whose `slot_id` matches the frame performs the access on its own
bus. It then drives Spare with a start bit 1 followed by 32 bits, most
significant first: the read result, or the written word echoed. Other slots
ignore the frame. A frame that arrives while the slave is still busy is
dropped. The master side is loaded through registers 0x0060–0x0062. It sends
a frame, drives Sync and Sdat only while its access is in progress, and waits up to 255 clocks for the start bit. If none comes it sets the error flag. A remote
access takes 53 clocks of frame, the target's bus time (about 4 clocks) and
33 clocks of reply: about 1.7 µs.

Four slot bits address 16 modules, more than the 12 slots of a NIM bin.

## Trigger and capture

`trigger_delay` loads the 32-bit delay at 0x0459 on the rising edge of
`trig_in`. `start` pulses `delay + 4` clocks after the clock edge that first
samples the trigger high (two clocks of synchronizer, one of edge detection,
one of loading). At 18.8 ns per clock, the register covers 80 s. Triggers
during a running delay are ignored. `trig_out` repeats the start pulse, for
an oscilloscope.

### Accelerator clock events (`tclk_decoder`)

Every service building carries the site's timing events on one serial line.
This design assumes the usual format of such links. The line runs at 10 MHz
in biphase-mark code: the level changes at every bit-cell boundary, and a 1
has one more change in mid-cell. The line idles with 1s. An event is a start
bit 0, eight data bits (least significant first) and an odd parity bit. The
decoder measures the time between level changes in clocks, where one cell is
5.3 clocks. An interval under 4 clocks is half a cell, so two of them make a
1. An interval of 4 to 8 clocks is a whole cell, a 0. A longer gap abandons
the frame. A 0 after an unpaired half cell realigns the pairing. This can
happen only in the idle 1s, and every start bit fixes the alignment. Frames
with a wrong parity bit are counted and dropped. A good event is reported 4
clocks after the end of its parity cell. If its code matches register
0x0080, it acts like a pulse on `trig_in`, delay included.

### Capture

The start pulse, or a software start from 0x0001, opens the BPM integration
window. It also starts `capture_buffer`, which records the next 256 valid
samples of the selected channel from address 0. Then it sets "capture done"
and holds the record until the next start.

## BPM plates: magnitude and integration

`bpm_plate` handles one plate with a pipeline that takes one sample per clock.

1. **Pedestals.** ADC codes are offset binary (0–1023). The programmed
   pedestal code is subtracted from I and Q, giving signed 11-bit values.
2. **Power.** I² + Q² is at most 2·1023² and fits in 21 bits.
3. **Magnitude.** `isqrt` is a restoring digit-by-digit square root with one
   output bit per stage (11 stages). Each stage brings down two radicand
   bits, tries to subtract 4·root + 1 from the partial remainder and keeps
   the result if it is not negative. A new radicand enters every clock, and a
   tag travels with each one.
4. **Integration.** The window opens at `start` and covers the next
   `N_SAMPLES` = 32 valid samples: 1.6 µs at 20 MSPS. A magnitude belongs to
   the window if its *sample* arrived inside it, however late it leaves the
   pipeline. Thirty-two magnitudes of at most 1447 fit in the 16-bit sum.

`done` pulses 14 clocks (`ADC_W + 4`) after the last window sample is taken.
`bpm_processor` runs four plates from one strobe and one window. It latches
the four sums together and holds `done` until the next start.

## RF phase from samples at 4/7 of the carrier

This is the least obvious part of the design. Sample A·cos(ωt + φ) at
fs = 4/7·f. Between samples the carrier turns 7/4 of a cycle, which equals
−90°. Four consecutive samples are therefore

```
 s0 =  A cos φ,  s1 = A sin φ,  s2 = −A cos φ,  s3 = −A sin φ
```

`phase_meter` forms I = s0 − s2 and Q = s1 − s3 for each group of four. The
difference doubles the signal and cancels the ADC's offset. It sums
`ACC_CYCLES` = 16 groups (64 samples, 2.1 µs at 30.3 MSPS) to average noise,
and then evaluates φ = atan2(Q, I) without any multiplier:

* **Fold into one octant.** Take |I| and |Q|, and note their signs and which
  is larger (`swap`).
* **Divide.** `frac_divider`, a restoring divider with one quotient bit per
  clock, computes r = ⌊min·2⁸ / max⌋, a ratio between 0 and 1 with 8
  fractional bits. Equal magnitudes saturate to 255.
* **Look up.** A 256-entry table gives atan((r + 0.5)/256) as a fraction of a
  turn in 16 bits, between 0° and 45°. The table is computed with `$atan` by
  a constant function when the design is elaborated, so no data file is
  needed.
* **Unfold.** θ1 = 90° − θ if `swap`, otherwise θ. The signs of I and Q then
  give the quadrant: φ = θ1, 180° − θ1, 180° + θ1 or −θ1.

The result is an unsigned fraction of a turn (2^16 = 360°). Rounding the ratio to 8 bits limits the error to about ±0.1°. A new phase appears every 64 samples,
`LUT_BITS + 4` = 12 clocks after the last sample of its block, with
`phase_valid`. A `sync` pulse, in a clock without a sample, restarts the
grouping so that the next sample counts as s0. This pins the phase reference
to an external marker. Without `sync` the reference is the first sample after
reset. The summed I and Q are output too; the top 16 bits are readable on
the bus as a magnitude check.

The top has two meters, on input A (MI reference) and input B (cavity
fanback). Only input A feeds the phase jump.

## Phase jump, frequency ramp and the DDS serial port

**Phase jump** (`phase_jump`). The rising edge of `jump_trig` takes the most
recent phase of input A and adds the offset register. The top 14 bits of the
sum go as the AD9953 phase offset word. If no valid measurement exists yet,
the block sends nothing and sets "jump missed". From the trigger to the new
phase taking effect takes about 200 clocks (3.8 µs). Most of that is the
24-bit serial write. The trigger comes 200 µs before transfer, so there is
ample margin. The phase used is at most one measurement block, 2.1 µs, old.

**Frequency ramp** (`freq_ramp`). A start command loads the start tuning
word. Then every `interval` clocks the word moves by `step` toward the end
word, upward or downward, and lands exactly on it. Each new word is offered
to the DDS port. If the port is slower than the ramp, the pending request
simply carries the newest word, so words are skipped rather than queued.

**DDS port** (`dds_ctrl`). This block drives the AD9953 serial interface:
`sclk`, `sdio`, `cs_n` and `io_update`. A write is an instruction byte (bit 7
= 0, register number in bits 4:0) followed by the register's bytes, most
significant first. The registers used are FTW0 (0x04, 4 bytes), POW0 (0x05,
2 bytes) and ASF (0x02, 2 bytes). `sdio` changes while `sclk` is low and is
sampled by the chip on the rising edge. Each `sclk` half period lasts
`SCLK_DIV` = 4 clocks (6.6 MHz). After `cs_n` rises, `io_update` pulses for
4 clocks so that the value takes effect at once. The sources have fixed
priority: phase jump first, then ramp, then bus writes. The register layout
follows the AD9953 data sheet.

## Orbit-synchronized waveform (`awg`)

The host writes up to 1024 10-bit words at 0x0800–0x0BFF and sets the length
at 0x0050. Each rising edge of `orbit_sync` restarts playback from word 0,
one word per clock. Word 0 reaches `dac_data` 4 clocks after the marker is
first sampled. When the length runs out, the output holds mid-scale (0x200)
until the next marker. A marker during playback restarts it. At 53.1 MHz the
RAM holds 19 µs of waveform, against about 1.7 µs for one Debuncher turn.

## SDRAM (`sdram_ctrl`)

The board's 16M × 16 SDRAM (32 MB) is organized as 4 banks × 8192 rows × 512
columns, addressed by a 24-bit word address {bank, row, column}. After reset
the controller waits 100 µs, then issues PRECHARGE ALL, two AUTO REFRESH
commands and LOAD MODE (burst 1, CAS latency 2). It then raises `ready`. It
refreshes every 410 clocks (7.7 µs), ahead of any waiting access. Every
access opens the row, waits tRCD, and reads or writes with auto-precharge.
The bank is therefore closed again after each access, and every access costs
the same fixed time: a read delivers its word 6 clocks after `ack`. The timing
parameters are generic SDR SDRAM figures at 53.1 MHz. Change them for a
particular part.

On the bus, 0x0070 is a 24-bit word pointer. Writing 0x0071 stores a word at
the pointer. Writing 0x0072 fetches the word at the pointer into 0x0071. The
pointer advances after each access, so a block is moved by setting the
pointer once. 0x0072 reads {ready, busy}.

**Result log** (`result_logger`). With logging enabled, every completed BPM
acquisition writes its four plate sums to four consecutive SDRAM words at the
log pointer, which then moves past them. Pulse after pulse this builds a
history of intensity and position along the line: 4 million records fit in
the memory. The logger takes the SDRAM before any waiting host access. A
record takes about 30 clocks to write. An acquisition that completes while
the previous record is still being written is counted as missed, not
recorded. The pointer wraps at the top of the memory.

## Departures from the original description, and what is missing

* **Not in this RTL:** the microcontroller and its firmware (including the text command interface, e.g. `WR 0459 0000fab4` / `RD 1040`), the Ethernet
  daughter card, the configuration flash, the USB serial bridge, the VCXO
  lock loop, and all analog parts and converters.
* **Clock-event line format.** The original description only says the
  FPGA decodes the site's clock events. The rate, code and frame used by
  `tclk_decoder` are assumptions. Check them against the real line before
  relying on the decoder.
* **SDRAM use.** The SDRAM is used for word access from the bus and for
  the BPM result log. The original description says only that it captures
  diagnostic data. Streaming raw ADC samples into it is not built: the data,
  rate and trigger are not given, and 20–30 MSPS would need burst transfers,
  which this single-word controller does not make.
* **DAC rate.** The diagnostic DAC is an AD9751, good for 300 MSPS, but the
  waveform generator updates it once per 53.1 MHz clock.
* **Front panel.** Five TTL signals are used (`trig_in`, `trig_out`,
  `jump_trig`, `orbit_sync`, `tclk`) of the "about 8" available.
* **Own choices throughout:** the register map apart from 0x0459 and
  0x1000–0x10FF, the CPU pin protocol, the LVDS frame and reply format, the
  single wait state, the fixed priorities, the phase meter's accumulation
  length and table size, the linear ramp, and the waveform generator's
  playback rule. Each file's header states which parts follow the original
  description.

## Files

`rtl/`: `ap_pkg.sv` (types, register map, control and status structs),
`abus_if.sv`, `cpu_bus_bridge.sv`, `lvds_bus_slave.sv`, `lvds_bus_master.sv`,
`abus_arbiter.sv`, `abus_decoder.sv`, `trigger_delay.sv`,
`capture_buffer.sv`, `isqrt.sv`, `bpm_plate.sv`, `bpm_processor.sv`,
`frac_divider.sv`, `phase_meter.sv`, `phase_jump.sv`, `freq_ramp.sv`,
`dds_ctrl.sv`, `awg.sv`, `sdram_ctrl.sv`, `result_logger.sv`, `tclk_decoder.sv`, `ap_fpga_top.sv`.

`tb/`: one self-checking bench `tb_<module>.sv` per module, plus models of
the bus (`abus_master_model.sv`, `abus_mem_model.sv`) and of the SDRAM
(`sdram_model.sv`, which also checks command timing). Each bench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_ap_fpga_top` runs the whole FPGA at full size. It plays the
microcontroller, a crate neighbour, the BPM and RF ADCs, the DDS serial port,
the SDRAM and the timing inputs, and goes through the board's work:
configuration, a triggered BPM acquisition, phase measurement, jump, ramp,
waveform playback, remote accesses, SDRAM transfers, the result log and a clock-event trigger. It counts each
mechanism and fails any that never occurred.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ap_pkg.sv tb/tb_ap_fpga_top.sv --top-module tb_ap_fpga_top -Mdir obj
./obj/Vtb_ap_fpga_top
```

Replace `tb_ap_fpga_top` with any other bench name to run that bench. The full-size top bench finishes in well under a minute. Parameters default to the board's sizes. The benches for single
blocks override some of them, for example a shorter SDRAM power-up wait.
