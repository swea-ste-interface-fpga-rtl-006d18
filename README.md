# SIF – SWEA/STE interface FPGA in SystemVerilog

The SIF sits between an instrument processor (the IDPU) and the analog
electronics of two space-plasma sensors: SWEA, an electron analyser with 16
anodes and swept high-voltage deflection, and STE, a solid-state detector with
four pulse-height chains. It runs on a single 1 MHz spacecraft clock and does
the following:

- It takes serial commands and sends serial telemetry.
- It steps four sweep DACs through a table 1345 times every 2 s.
- It counts anode pulses and reports them 336 times per cycle.
- It converts STE events and bins them into a 256-bin energy histogram.
- It scans housekeeping channels.
- It drives heater, cover actuator and test-pulser outputs.
- It cuts the analog supply when the front end reports an overcurrent.

The original target is an Actel 54SX32S. This RTL is plain synthesizable
SystemVerilog with no vendor primitives.

The hard parts of the design are:

- Every 2 s cycle has a fixed timetable, and everything else hangs off it.
- Two shared resources must be divided among their users without anyone
  missing a deadline:
  - a 512K x 8 external SRAM;
  - an 8-bit DAC bus.

## Timetable of a cycle (`timcntl`)

The 1 s tick and the seconds bit come from the processor's time message (F0
command). A tick with an even seconds count starts a cycle (`CYCLECLK`).

| strobe | rule | per cycle |
|---|---|---|
| CYCLECLK | 1 s tick with SECS0 = 0 | 1 (every 2 s) |
| STEPCLK | with CYCLECLK, then every 1450 clocks; the 1345th interval runs to the next cycle (51.2 ms) | 1345 |
| SAMPLECLK / SAMPLECNT | every 4th STEPCLK among the first 1344 | 336 |
| TESTCYCLECLK | every 5th CYCLECLK; the first cycle after reset is a test cycle | 1 in 5 |
| HSKPMD | toggles each cycle; 0 = cycling, 1 = sweep housekeeping | |
| DOHSKP | every 125000 clocks from CYCLECLK | 16 |
| SYN100K/N | clock / 10, free running | |

All strobes are one clock wide and registered. Their spacings are parameters
of `timcntl`, and `sif_top` passes some of them through. The defaults are the
real values.

## Shared SRAM (`memcntl`)

### Memory map

One byte moves per clock. The map below is this design's own; the specification
only says that every area is double buffered.

| region | address | size per buffer |
|---|---|---|
| energy LUT | `{000, buf, a[14:0]}` with a = {0, chain[1:0], adc[11:0]} = 0x00000 / 0x08000 | 32 KB (15-bit pointer) |
| sweep LUT | `{001, buf, 00, a[12:0]}` = 0x10000 / 0x18000 | 8 KB (13-bit pointer) |
| accumulator | `{010, buf, 000000, a[8:0]}` = 0x20000 / 0x28000 | 256 x 16 bit |

`sif_pkg::sram_addr()` builds these addresses.

### Arbitration

There are four clients:

- sweep LUT reads;
- event processing: an energy-LUT read, then a read-modify-write of a 16-bit
  counter;
- telemetry: reading the finished histogram, then clearing it;
- LUT writes commanded through E8/E9 (sweep) and EA/EB (energy). The LUT
  pointers live in `memcntl`.

The arbiter is combinational round robin. A requesting client is served within
four clocks. It gets its `done` in the same clock, and read data is sampled at
the end of that clock. No grant is given during reset.

### Buffers

- **LUT writes** always go to the buffer that is not being read: high byte at
  the even address, then the pointer advances. The E0 command swaps the read
  buffers at the next CYCLECLK.
- **Accumulator buffers** swap at every CYCLECLK. Event processing fills one.
  Telemetry sends the other as the C2/C3 message and then clears it with 512
  byte writes, well before the next swap.

## Shared DAC bus (`dacwrcntl`)

Three controllers share the DAC bus:

- `dacsweep`: four sweep DACs, 8-bit values from the sweep LUT.
- `mcpdac`: MCP DAC upper byte, latched at the next CYCLECLK.
- `stetestpulse`: a 16-bit ramp, one step per 100 µs, with a 10 µs low test
  pulse before each step.

### Protocol

- Priority is fixed: sweep > MCP > STE pulser.
- A write takes two clocks: grant, then strobe.
- The client holds its request until `wrdn`.
- `DACWR[3:0]` select the sweep DACs (one-hot), `DACWR[4]` the MCP DAC and
  `DACWR[5]` the STE pulser DAC.
- `DACBSEL` = 1 selects the high byte.
- Each controller makes its own latch strobe: `SWDACLAT`, `DAC4LAT`, `DAC5LAT`.
- `DACCLR` is asserted during reset and while AFEPWR is off.

### Sweep

The sweep writes the values of step s+1 into the DAC holding registers during
interval s. `SWDACLAT` coincides with STEPCLK, so the new step appears exactly
on the step edge.

The table is flat: byte `(step*4 + dac)*SW_BYTES + byte`. With the default
`SW_BYTES = 1`, one cycle is 5380 bytes and fits the 8 KB buffer.
`SW_BYTES = 2` gives 16-bit sweep values, but a full 1345-step table then no
longer fits (see "Departures").

## Events and housekeeping on one ADC bus (`evproc`, `hskpr`)

### Event chains

Each of the four STE chains raises `ADCSOC` combinationally when
`CHENB & PEAK & LLD & ~ULD`. It holds `ADCSOC` until the ADC's busy line rises,
then waits for busy to fall. The chain is then pending; further peaks on that
chain are dropped until it has been read.

### ADC bus arbitration

A round robin over the four chains and the housekeeping ADC grants the shared
data bus. A chain is granted only when the binning engine is free. The
readout:

1. pulses `ADCREAD[i]` and takes `ADCDAT[11:0]`;
2. re-arms the chain with `PULSERST[i]`;
3. looks up `bin = LUT[chain, adc]`;
4. increments the 16-bit counter `bin`, which saturates.

### Housekeeping

`hskpr` runs in two modes:

- **Cycling mode:** one conversion per DOHSKP, channels 0..15 in turn. Each
  result goes out as a C4 message.
- **Sweep mode:** conversions at every SAMPLECLK on the commanded channel. The
  latest result is appended to every anode message (C1) and sent as C4 on each
  DOHSKP.

The digital housekeeping word is:

`{HSKPCH[3:0], HSKPMD, 000, STECOVSW[1:0], STECOVSTAT[1:0], SWEACOVSTAT, AFESHDN, AFEPWR, CMDPE}`

A parity error is reported once and then cleared.

## Anode counters (`acounters`)

The anode pulses are 250–300 ns long, shorter than a clock period. Each anode
input therefore clocks its own 14-bit counter, which saturates.

- At SAMPLECLK the counts are copied into holding registers in the 1 MHz
  domain.
- During the next clock the counters are cleared asynchronously.
- Pulses in that window are lost: about 1 µs per sample.

This is a deliberate second set of clock domains. Lint reports these counters
as extra clocks, and that is expected.

## Commands (`commandif`)

### Frame

The frame format is this design's own; the real one is defined in an external
interface document.

- CMDCLK and CMDDAT are synchronised to the 1 MHz clock.
- One bit is taken per rising CMDCLK edge: 25 bits, MSB first.
- The bits are `ID[7:0]`, `D[15:0]`, then a parity bit that makes the count of
  ones odd.
- A pause of 200 clocks aborts a partial frame.
- A bad frame is ignored and sets CMDPE.
- CMDCLK may run up to about 250 kHz.

### Command set

| ID | effect | when |
|---|---|---|
| E0 | sweep / energy read-buffer select | next CYCLECLK |
| E1 | MCP DAC upper byte | written at once, latched next CYCLECLK |
| E2 | telemetry enables, ADC reset, AFEPWR force on/off, test-pulser enables, chain enables, SWEA enable, NR/MCP HV enables | enables for telemetry, test pulsers and chains at next CYCLECLK; rest at once |
| E3 | SWEA cover, STE cover open/close, forced open/close | at once; ignored if more than one of D[3:0] is set; force bits need an arm |
| E4 | heater PWM 0..10 (illegal values give 0) | at once (from next 10 µs period) |
| E5 | threshold DAC A..D = D[5:0], selected by D[7:6] | next CYCLECLK |
| E6 | arm force close (D1) / force open (D0) | until used or next CYCLECLK |
| E7 | sweep housekeeping channel | next sweep-mode CYCLECLK |
| E8/E9 | sweep LUT pointer / data word | at once (inactive buffer) |
| EA/EB | energy LUT pointer / data word | at once (inactive buffer) |
| F0 | time message: 1 s tick, D[0] = SECS0 | at once |

## Telemetry (`tlmmngr`)

### Line format

This format is this design's own.

- TDAT idles low.
- A message is a single '1' start bit, then 16-bit words MSB first, one bit per
  clock.
- The first word is `{ID[5:0], length[9:0]}`.

### Messages

| msg | words | when |
|---|---|---|
| C0 / C1 | 17 / 18 | after each SAMPLECLK; C1 in sweep housekeeping mode adds the HK value |
| C2 / C3 | 257 | once per cycle, histogram of the previous cycle; C3 if that cycle was a test cycle |
| C4 | 3 | each HKPGDN: HK ADC value, digital HK word |

When several messages are waiting, the order is anode, then housekeeping, then
bins. The longest message is 4.1 ms, well inside the 5.8 ms between anode
messages.

## Power and reset (`latchupprot`, `sif_top`)

- `AFEPWR = ~forceoff & (~AFESHDN | forceon)`, registered and low in reset.
  AFESHDN is taken as active high and is not latched.
- HWRSTL (active low) passes through a two-flop synchroniser.
- While AFEPWR is low, these blocks are held in reset: anode counters, sweep,
  DAC bus, event processing, housekeeper, threshold DACs, both test pulsers and
  the MCP DAC. In the same state DACCLR and ADCRST are asserted.

## Other blocks

- `ophtrcntl`: heater PWM with a 10 µs period and 1 µs resolution.
- `tdacs`: four staged 6-bit threshold registers.
- `covercntl`: cover actuators.
  - The SWEA switch follows its command.
  - An STE open or close drive stays on until the status input reports the
    position reached, or until the command is cleared.
  - A force ignores the status.
  - Both directions at once drive neither.
- `atestpulse`: square wave with a half period of `div` clocks. `div` starts
  at 1 at CYCLECLK (0.5 MHz) and grows by one each SAMPLECLK. The output is low
  unless both SWEA and its test pulser are enabled.

## Departures from the specification and open points

- **Frames and protocols.** The command frame, the time message, the telemetry
  line format, the SRAM map and the DAC bus timing are this design's own. The
  specification refers to external documents for them.
- **Anode message rate.** The message table gives 336 anode messages per
  *second*, but the timing section gives one per SAMPLECLK, which is 336 per
  2 s *cycle*. The timing section is followed.
- **Sweep table width.** The text allows up to eight reads per step (16-bit
  values), but the 13-bit sweep pointer holds only 8 KB. 8-bit values are the
  default.
- **Anode test pulser.** The top frequency is 0.5 MHz (one of the two allowed
  options), and the frequency steps *down* through the cycle. The stepping-up
  variant discussed as open is not built.
- **Test cycle phase.** TESTCYCLECLK counts cycles from reset; the specification
  gives no phase. The STE test-pulser enable is staged to a CYCLECLK, so a ramp
  starts at the first test cycle after the enable, up to 10 s later.
- **Arm expiry.** The arm for a forced STE cover command expires at the next
  CYCLECLK. The specification says both "expires in 2 seconds" and "within the
  same 2 second period".
- **Not built** (open questions in the specification):
  - a latched AFESHDN;
  - SYN100K gating;
  - a split DAC clear;
  - the spare SRAM bit-18 buffer select;
  - an automatic actuator time-out;
  - using the SWEA cover status.
- **Event criterion.** The exact rule is in an external document; `PEAK & LLD &
  ~ULD` with the chain enable is an assumption.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb/tb_sif_top.sv` runs the whole FPGA at the real timing (no parameter
overrides). It covers nine 2 s cycles, about 19 M clocks, 25 s in Verilator.
The models around the FPGA are:

- a command sender;
- the SRAM;
- the DACs;
- four chains with ADCs, and the housekeeping ADC;
- sixteen anode inputs;
- cover switches;
- a telemetry receiver.

The test does the following:

- Loads the whole sweep table by command and checks every DAC step against it:
  more than 10000 steps.
- Checks the staged MCP and threshold values and the heater duty.
- Checks every anode message against the pulses sent, and every housekeeping
  message's channel order.
- Checks every histogram message against the events the ADC models produced.
- Checks a complete 65536-step STE ramp.
- Checks cover control with arm/force, a parity error reported exactly once,
  and an AFE shutdown with force-on recovery.
- Counts these mechanisms, each of which must occur at least once:
  - SRAM waits;
  - DAC bus contention;
  - dropped events;
  - ADC bus sharing;
  - messages waiting for the line;
  - buffer swaps;
  - both housekeeping modes.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sif_top \
  rtl/sif_pkg.sv $(ls rtl/*.sv | grep -v sif_pkg) tb/tb_sif_top.sv -o sim
./obj_dir/sim
```

Put `rtl/sif_pkg.sv` first; the other files can come in any order.
`tb/tb_check.svh` holds the check and watchdog macros. Synthesis with Yosys
gives about 1200 cells and about 1000 flip-flops for `sif_top`. The SRAM, the
ADCs and the DACs are external parts and exist only as testbench models.

What this verification does not cover:

- The command and telemetry formats are this design's own, so they have not
  been checked against the real processor interface.
- No timing analysis has been done on a real FPGA.
- The anode counter clock domains are simulated only as ideal edges.
