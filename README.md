# Wire scanner motion control card

A wire scanner measures the transverse profile of a particle beam by moving a
thin wire through it and recording, at every instant, where the wire is and
how much signal the beam-wire interaction produces. This card does the
digital half of that job. It makes the motor follow a stored motion profile.
It reads the wire position from an optical ruler and a potentiometer. It
samples the secondary-emission signal and the card's own health signals.
Everything is stored in on-board SRAM for a VME crate controller to read
after the scan.

The key design idea is that a scan is a table look-up, not a control loop.
The motor set value is read from one of three 4096 x 12-bit profile ROMs.
The ROM address is stepped by a programmable clock divider. Scan speed, and
whether the wire makes a slow linear pass or a fast accelerated shot through
the beam, are therefore set by two register values: the divider and the
profile select. The analog PID loop and H-bridge close the position loop
outside the logic. Acquisition runs from a second, independent tick. That
tick comes from:

- the system clock divider,
- the accelerator's revolution frequency,
- an external clock, or
- in calibration mode, the optical ruler itself: one sample per micrometre
  of travel.

Each tick starts all three ADCs. Their results land in the SRAMs at a shared
sample address, next to the ruler position.

The logic is split over three FPGAs, as on the card:

| FPGA | module | role |
|---|---|---|
| master | `fpga1_master` | VME slave, board registers, DAC values, ADC conversion flow, SRAM write/read flow |
| slave 1 | `fpga2_slave1` | function generator (divider, address counter, profile ROMs), function check read-out, optical ruler decoder, acquisition clock |
| slave 2 | `fpga3_slave2` | error register with scan inhibit, 7-segment error display |

`wsmcc_top` connects the three FPGAs. All logic runs on one 40 MHz clock.

## VME interface and register map

The card is a VME slave that answers two kinds of access.

- **A16 control accesses** use AM 0x29 or 0x2D. The offset A[7:1] selects a
  register.
- **A24 memory reads** use AM 0x39 or 0x3D, or 0x3B / 0x3F for block
  transfer. They read the selected SRAM at word address A[18:1].

The card is addressed by A[23:20], which must equal the complement of a
4-bit hex switch (`ga_n`), so 16 cards fit in one crate.

`vme_slotsel_and_dtack` handles the bus protocol:

- It synchronises the strobes and latches the address when AS falls.
- It checks the address modifier and the slot.
- It raises DTACK 4 clocks after chip select. With the 2-clock synchroniser
  that is about 150 ns after the data strobe.
- In a block transfer, AS stays low and the latched address advances by 2
  after every data cycle.
- While `wait_req` is high, DTACK is held back. This happens during an ADC
  read that is still converting.
- An access LED stays lit for 2^22 clocks (0.1 s) after each acknowledge.

`vme_func_reg` decodes the offset. Offsets 0x00-0x1F go to slave 1 and
0x20-0x3F go to slave 2. They are forwarded over an on-card *local bus*
(`lbus_t` in `wsmcc_pkg`). The local bus carries:

- the offset,
- the data,
- a read flag and a write flag,
- a one-clock strobe in the DTACK cycle, in which writes take effect.

The master's own registers:

| offset | access | meaning |
|---|---|---|
| 0x40 | w | clear acquisition address counter |
| 0x42 | r/w | relays (4 bits) |
| 0x44 / 0x46 | r/w | I/O register, low / high byte |
| 0x48 | r/w | switch register (8 bits) |
| 0x4A | r/w | SRAM select for A24 read-out: 0 diagnostics ADC, 1 log amp ADC, 2 potentiometer ADC, 3 ruler |
| 0x4C | r | version |
| 0x80-0x86 | r/w | DAC00-DAC03 values (12 bits) |
| 0x90-0x94 | w | write strobe to ADC0-ADC2 (mode, shadow, offset registers) |
| 0x90-0x94 | r | start a conversion and return the result; DTACK waits for it |
| 0xFE | w | master reset of both slave FPGAs |

Slave 1 (`f2_control_unit`):

| offset | write | read |
|---|---|---|
| 0x00 / 0x02 | FGEN division value, low 16 / high 2 bits | same |
| 0x04 / 0x06 | 0x04: clear ruler reference | ruler reference, low / high |
| 0x08 / 0x0A | 0x08: clear ruler error counter | ruler error count, low / high |
| 0x0C | clear ruler position | |
| 0x0E | acquisition division value (16 bits) | same |
| 0x10 | clear function check read-out counter | |
| 0x12 | set FGEN address to 0xFFF | status buffer (10 bits) |
| 0x14 | clear FGEN address | next profile ROM word |
| 0x16 | FGEN end address (12 bits) | same |
| 0x18 | control register | same |
| 0x1A / 0x1C / 0x1E | start motion / motion reset / slave reset | |

The control register at 0x18:

| bits | meaning |
|---|---|
| D1-D0 | profile: 00 offset, 01 fast, 10 slow, 11 hold |
| D3-D2 | acquisition source: 00/01 40 MHz divider, 10 Frev, 11 external |
| D4 | calibration mode |
| D5 | use the acquisition gate |
| D6 | home mode |
| D7 | restrict the end address (slow profile only) |

Slave 2 (`f3_control_unit`): 0x20 reads error bits 15-0, and 0x22 reads
error bits 24-16. A write to 0x3E clears the held errors.

## Motion generation

`function_generator` is the core of slave 1:

1. A start command sets the active-scan flip-flop, unless slave 2 is
   inhibiting scans.
2. `fgen_clk_div` then emits a tick every `div` clocks. Values 0 and 1 stop
   it. With the 18-bit divider, the step rate ranges from 20 MHz down to
   153 Hz.
3. On each tick, `fgen_addr_counter` steps the ROM address. It counts up on
   an out-scan and down on an in-scan.
4. When it passes the end (the end address, or 0), it flips direction and
   pulses `scan_over`. That pulse clears the active-scan flip-flop. The next
   start therefore brings the wire back.

Commands 0x12 and 0x14 preset the address to 0xFFF or 0. This is how the
wire is moved between a profile's end and the start of another.

`profile_rom` holds the three profiles. They are computed from their
equations when the design is elaborated, so no initialisation file is
needed and the contents follow the `AW`/`DW` parameters:

- **Offset (00)**: a straight line from 0 to 5 % of full scale. It parks the
  wire away from the hard end stop.
- **Fast (01)**: parabolic acceleration, then a constant-speed linear part
  covering 25 % of the range around the middle (the beam crossing), then
  mirror-image parabolic deceleration. The whole profile is offset by 5 %
  so that overshoot does not hit the end stop. At 12 bits it runs from 205
  to 3890.
- **Slow (10)**: a straight line over the full range.

`fg_readout` is the function check. Software clears its counter (0x10) and
reads 0x14 repeatedly. Each read returns the next ROM word of the selected
profile, so the stored profile can be verified from the crate.

## Optical ruler

`orqdmux` decodes the ruler's two quadrature signals. With the digitiser's
10-fold interpolation, every phase change is 1 µm.

- A five-state machine (initialise plus the four phase states) counts an
  18-bit position up or down.
- A change of both phases at once means a state was missed. That increments
  an 18-bit error counter, and the decoder re-initialises.
- The rising edge of the mid-travel reference mark copies the position into
  a reference register.
- A multiplexer puts one of the three registers on the bus for VME reads.
  The position itself is also a separate output that feeds the ruler SRAM.

The ruler SRAM stores position bits [17:2].

At 40 MHz the decoder handles the digitiser's maximum of 2 M phase changes
per second (2 m/s) with a factor of 20 in hand. Forward (up-counting)
motion is taken as A leading B.

## Acquisition chain

`acq_clock_gen` produces the acquisition tick from the selected source:

- the 16-bit divider of the 40 MHz clock,
- the rising edges of Frev,
- the rising edges of the external clock, or
- in calibration mode, the ruler's count pulses.

Ticks pass only during an active scan. They can also be gated by the
acquisition-gate input, which is the wire inside a programmed position
window.

In the master, each tick starts the three ADC flows:

- **`adc_flow_ad7938`** (diagnostics ADC). This part needs CONVST low
  through the whole conversion. The tick pulls it low, and a one-shot on
  the falling edge of BUSY releases it.
- **`adc_flow_busy`** (potentiometer AD7677 and log amplifier AD7484).
  CONVST is a pulse, released when BUSY rises.

In both flows, BUSY falling opens a 4-clock chip-select window with the
converted data on the bus. A tick that arrives while a conversion is still
running is ignored. The ADC's conversion time plus 10 clocks of flow
overhead therefore sets the highest usable sample rate. The potentiometer
ADC needs 1 MSps. The flows synchronise BUSY and detect its edges in
the system clock. They do not clock flip-flops from BUSY.

The chip select going active triggers `sram_flow` for that ADC's SRAM:

1. WE_N goes low.
2. One clock later, CE_N is low for one clock. This is a chip-enable
   controlled write.
3. WE_N rises again.

A write takes 3 clocks. All SRAMs of one tick are written at the same
address, the acquisition counter value at the tick, so sample *k* of every
channel sits at word *k*. The counter is cleared by 0x40. 18 bits hold
262,144 samples: a 130 mm stroke at 1 µm needs 130,000.

In calibration mode the potentiometer SRAM is addressed by the ruler
position instead of the counter. A slow scan therefore fills a table of
potentiometer reading against true position, one entry per micrometre.

## Error surveillance

Slave 2 samples 25 comparator status lines (1 = fine) at 1 kHz into
`error_register`. Each bit is AND-ed with its own previous value, so an
error stays until it is cleared, by a write to 0x3E or a master reset. Any
held error raises `scan_inhibit`, and slave 1 then refuses new scan starts.

`sevenseg_display` shows the held errors one at a time on a common-anode
7-segment digit:

- It steps to the next error every 0.5 s.
- It shows an underscore (segment d) when there is none.
- Error bits 0-15 show as 0-9 and A-F. Bits 16-24 show as I J L M n o P r t.

## Timing summary (40 MHz clock)

| path | clocks |
|---|---|
| VME data strobe to DTACK | 6 (2 synchroniser + 4) |
| ruler phase edge to position count | 3 |
| one profile pass of 4096 steps | 4096 x `div` + 2 |
| BUSY falling to ADC chip select | 3, then 4 clocks low |
| ADC flow, added to the ADC's CONVST-to-BUSY-end time | 10 |
| SRAM write | 3 (plus 1 before the next) |
| error sampling | every 40,000 (1 ms) |
| display step | 20,000,000 (0.5 s) |

## Where this RTL makes its own choices

The structure, register maps, profiles, trigger chain and timings above
follow the original card. The points below are this implementation's
choices, or places where the original description is ambiguous or leaves
details open.

- **Local bus.** The signals between the master and slave FPGAs are this
  design's own.
- **Master read width.** Master register reads return 8 bits, with the
  upper byte 0.
- **Reset address of slave 2.** It is 0x3E. An odd address (0x3F) cannot be
  reached with word accesses.
- **Error lines.** There are 25 error lines. The slave-2 symbol draws 24,
  but the error list has 25 entries.
- **Function check counter.** It is cleared by 0x10, as the register map
  says. It is also cleared on a write to 0x14, which another description of
  the function check asks for.
- **Ruler multiplexer.** Select code 11 gives zero. The position output is
  separate from the multiplexer, so a VME read of the reference or error
  register never disturbs what is stored.
- **SRAM numbering.** It follows the register description (0 diagnostics,
  1 log amp, 2 potentiometer, 3 ruler). Another table of the card lists
  them in a different order.
- **Clocking.** The two 40 MHz sources, crystal and BOBR, are the same
  clock here. Frev, the external clock and the gate are synchronised inputs,
  not clocks.
- **Status buffer.** Bits D4-D8 (end-of-stroke, wire home, clock-present
  flags) are read from input pins.
- **ADC writes.** A write to an ADC's register only produces that ADC's
  write strobe. The data path to the ADC is board-level.
- **DAC values.** They are brought out as 12-bit words. The DAC chips'
  load timing is not part of this RTL.
- **Fastest acquisition.** An SRAM write cycle takes 4 clocks, so the
  acquisition division value must be at least 4 (10 MHz). Faster ticks
  would drop ruler samples. The ADC SRAMs are limited by the conversions
  anyway. The conversion flow adds 10 clocks to an ADC's own time from
  CONVST to the end of BUSY. At 1 MSps that leaves 30 clocks (750 ns) for
  the potentiometer ADC.
- **VME read during acquisition.** An A24 read-out of an SRAM is not
  arbitrated against acquisition writes to the same SRAM. Read the SRAMs
  after the scan has ended. The end-to-end test waits 100 clocks.

Not part of the RTL are the ADC, DAC and SRAM chips, the motor driver and
the PID loop, the analog front end, and FPGA configuration. The testbenches
contain small behavioural models of the ADCs (`tb/adc_model.sv`) and of the
SRAM (`tb/sram_model.sv`).

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one:

- drives the block,
- compares against values computed independently,
- checks the cycle counts above,
- prints `TB_RESULT checks=N failures=M`.

Build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/wsmcc_pkg.sv \
    tb/tb_wsmcc_top.sv --top-module tb_wsmcc_top -Mdir obj -o sim
obj/sim +verilator+rand+reset+2
```

`tb_wsmcc_top` runs the whole card at its default parameters (40 MHz, 0.5 s
display step) in about 25 s. It models the crate controller, the ADCs, the
SRAMs, and a motor and ruler whose wire follows the DAC word. It takes the
card through:

- identification, and rejection of other slots and address modifiers,
- the function check,
- a fast scan out and back in with every sample verified through single
  and block-transfer reads,
- ruler reference capture and error counting,
- a calibration scan,
- Frev-driven and gated acquisition,
- an ADC read with DTACK waiting,
- error capture, scan inhibit, display stepping and clearing,
- master reset and motion reset.

It counts each of these mechanisms and fails if one never happened.

`tb_wl_full_stroke` runs the card's main workload at default sizes in a
few seconds. It makes one calibration scan over a full 131 mm stroke at
1 µm and checks three things:

- one potentiometer sample was stored per micrometre, at its ruler
  address,
- the ruler SRAM holds every acquisition,
- all 131,040 stored words read back over VME.

`tb_wl_acq_rates` runs slow scans at each acquisition rate the card is
used at: 100 kSps, 400 kSps, 625 kSps, 1 MSps and 10 MHz. It checks that
every tick and every conversion is stored once, in order.

Some block testbenches shorten time bases through parameters, for example
`CLK_HZ` for the display and error sampling. The RTL defaults are the card's
values. Registers are not assumed to start at zero: run with random initial
values (`+verilator+rand+reset+2`) to keep that honest.
