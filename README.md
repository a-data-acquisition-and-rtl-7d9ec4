# DARS: a front-panel-controlled 8008 data acquisition core

DARS is a small data acquisition and recording system built around an Intel
8008 microprocessor. An operator runs it from a front panel with a hex keypad
and a four-digit display. Measurements come in through an optically isolated
data acquisition (DAS) bus, and programs and data are kept on a cassette
tape.

The interesting part is the front panel. It has no datapath of its own for
reading or writing memory and processor registers. Instead, it takes control
of the processor by raising an interrupt. It then feeds the processor short
8008 instruction sequences, called miniprograms, from its own 256-byte
micromemory. While the processor runs them, a second, microcoded layer in
the panel steers the data on the busses. Every panel function is done this
way: halt, run, examine and deposit, load the program counter, single step,
and so on. The processor does the work and the panel decides what the work
is.

This repository holds synthesizable SystemVerilog for the digital core:

- the complete front panel unit
- the two I/O ports
- the ready-line delay of the isolation system
- the real-time clock (interval timer)
- the 16K byte memory with its ROM flag table
- the bus merging

It also holds self-checking testbenches, including an end-to-end test that
runs a behavioural 8008 against the whole core.

## System view

```
   8008 (behavioural model in tb/)         front panel keys, lamps, digits
         |  state, cycle, H-L, D                     |
   +-----+-------------------------------------------+-----------------+
   |  dars_bus (wired-AND D Bus, H-L Bus)                              |
   |    |            |              |                 |                |
   | dars_memory   fp_control <-> fp_data    fp_keyboard <-> fp_display_mux
   | 14K RAM +     (sequencing)   (micromemory,  (scan, lamps,  (display state,
   | 2K ROM                        registers)     digits)        key PROM, LOAD)
   |    |                                                              |
   | io_port (DAS) -- isolation -- DAS bus   io_port (cassette)   rtc   |
   +-------------------------------------------------------------------+
```

`dars_top` wires these together. These parts are outside the RTL and reach
it only through ports of `dars_top`:

- the processor
- the DAS interface modules
- the cassette interface and drive

### Timing model

- One clock period equals one 8008 timing state. The processor tells the
  core its state (T1, T1I, T2, WAIT, T3, T4, T5, STOP) in the 8008 three-bit
  code.
- In T2 it also gives the cycle type: instruction fetch, memory read, memory
  write or I/O.
- Registers update at the end of the state named in the text. "Loads in T3"
  means the flip-flop holds the new value from the following state on.
- The busses are idle-high wired-AND. A source that is not driving presents
  all ones, and the resolved bus is the AND of all sources.
- In an I/O cycle the port number is taken from H Bus bits 13..9 and the
  output data from the L Bus (the accumulator), as on the 8008. T3 of that
  cycle is the transfer strobe.

Port map (this design's own numbering, set by parameters):

| Port | Use |
|------|-----|
| INP 1 / OUT 9 / OUT 10 | DAS port: data in, data out, control byte |
| INP 2 / OUT 11 / OUT 12 | cassette port: data in, data out, control byte |
| INP 3 / OUT 13 / OUT 14 | real-time clock: status, interval count, control |
| OUT 16 (octal 20) | start a panel operation at the accumulator's address |
| OUT 17 | Priority Reset (re-enables lower interrupts after MCLR) |

## How a panel operation runs

The sequence below is the heart of the design. It is what most of
`fp_control` and `fp_data` implement.

1. **Start.** A start address is latched into the Micromemory Address
   Register (MAR) in one of three ways:
   - A keystroke: the display multiplexer turns the key code into an
     address through its key PROM and pulses LOAD.
   - The processor executes OUT 16 with the address in the accumulator.
     Address 0 is the conditional halt and starts only while MASK is set.
   - The single-step flip-flop is set and the processor reaches T1 of an
     ordinary instruction.

   Starting sets BUSY, which blocks a second start, and MASK, which removes
   interrupt priority from lower devices.
2. **Interrupt.** With priority in (PRIN) true, BUSY sets INT. The 8008
   answers with a T1I fetch. During an interrupt acknowledge the processor
   does not advance its program counter, and it takes its instruction from
   the bus. The panel holds INT for the whole operation, so every fetch of
   the miniprogram is such a "jammed" fetch. The interrupted program's PC is
   therefore untouched.
3. **Instruction bytes.** INSTRUCTION is set at the first T1I. From then on
   the MAR steps at every T1/T1I, and in T3 of each fetch (INSTENB) the
   micromemory byte is driven onto the D Bus as an 8008 instruction or
   operand byte.
4. **Microinstructions.** CONTROL is set at the start of the next cycle. In
   every non-fetch cycle after that (CONTENB) the micromemory byte at the
   MAR is decoded as a microinstruction instead. It can:
   - supply or capture the data of the memory read, write or I/O cycle the
     processor is performing
   - disconnect the processor's address (DMA)
   - strobe side effects
5. **End.** A microinstruction with LASTENB sets LAST:
   - In T2 of the next cycle INT drops, so the next fetch is a normal one.
   - In T3 of that cycle BUSY, INSTRUCTION and CONTROL clear.

   That final instruction must therefore be a one-cycle 8008 instruction.
   MASK stays set until the program executes MCLR and then OUT 17. This lets
   a halted processor stay undisturbed by lower-priority interrupts.

### Microinstruction word

```
 bit   7      6       5        4     3..0
      DENB  ADRENB  LASTENB   DMA   Control Field 1
```

Control Field 2 (bits 7..4) flags can be combined freely:

| Flag | Effect |
|------|--------|
| DENB | D Register <- D Bus in T3 |
| ADRENB | Address Register <- H-L Bus in T3 |
| LASTENB | end the operation (see above) |
| DMA | H-L Bus released to all ones |

Control Field 1 (bits 3..0) holds exactly one operation:

| Code | Name | Action |
|------|------|--------|
| 0 | G0 | drive 00h on the D Bus in T3 |
| 1 | G1 | drive 01h |
| 2 | GHS | drive Switch Register high byte |
| 3 | GLS | drive Switch Register low byte |
| 4 | LREG | Save Register <- Switch Register low byte |
| 5 | RSAV | Save Register <- D Bus in T3 |
| 6 | RRST | drive the Save Register |
| 7 | FSAV | Flag Register <- D Bus bits 3..0 in T4 (I/O cycle) |
| 8 | FRST | pull the H-L Bus down to 3FF0h + flags (used with DMA) |
| 9 | NOP | nothing |
| A | INSTP | set the single-step flip-flop |
| B | EXT11 | set the MSG lamp flip-flop |
| C–E | EXT12–14 | spare strobes, brought out unused |
| F | MCLR | arm MASK clearing by the next Priority Reset |

### Saving the accumulator and flags

The panel functions use the accumulator as scratch, so HALT and RUN
preserve the accumulator and flags:

- **HALT** ends with `HLT` after two data cycles:
  1. It executes `LMA` (store A to memory) with RSAV+DMA. The byte lands in
     the Save Register. Because DMA forces the address to 3FFFh, which is
     ROM, memory is not written.
  2. It executes `INP 0`. In T4 of an input cycle the 8008 puts its flags on
     the D Bus, and FSAV catches them.
- **RUN** restores the flags, then the accumulator:
  1. It executes `LAM` with FRST+DMA. The address becomes 3FF0h plus the
     saved flags.
  2. The top 16 ROM bytes hold, for each flag combination, a value x such
     that x + x sets exactly those flags (or the closest combination an
     addition can produce). `ADA` then recreates the flags.
  3. A final `LAI` with RRST reloads the accumulator from the Save Register.

`dars_memory` computes this table at elaboration time, so no data file is
needed.

### Miniprograms

The micromemory contents are listed in the opening comment of
`rtl/fp_rom_pkg.sv`. The programs are:

- HALT and RUN
- LDA: load the switch low byte into the Save Register
- DA: display the Save Register
- LHL and DHL: load or display an address through H and L
- LPC: load the program counter
- LNM and DNM: load or display the next memory byte
- MSG: message lamp
- MCLR
- STEP: single step
- LD: load the D Register

DPC (display program counter) has no program, because the program counter
is already shown in the Address Register: while the panel is idle, that
register follows every fetch address.

## Keyboard and display

`fp_keyboard` covers the keys and lamps:

- **Scanning.** A 5-bit Keyboard Bus counter scans the 16 numeric keys.
  - It stops with VALID true while the scanned key is down.
  - After a prefix key (I or II) it also requires bit 5 to match BIT FLAG.
  - A function key acts as a prefix plus a numeral. Its numeral line comes
    on one clock after its prefix pulse, so even a scan that is sitting on
    that numeral cannot take it for a numeric entry.
  - Releasing the numeral ends the sequence.
- **Special keys.** DX and CD become one-clock pulses. CLR acts only with the
  service switch closed.
- **Lamps.** The Cycle and Flag lamps light only with the service switch
  closed. The MSG lamp is a flip-flop set by EXT11 and cleared by START, the
  halt-to-run edge.
- **Digits.** It drives the four digits from the Display Bus through a
  hexadecimal seven-segment decoder.

`fp_display_mux` covers the display and function starts:

- **Keyboard Display Register.** This 16-bit register takes numeric entry a
  digit at a time, shifting left. It feeds the Switch Register one digit per
  display phase.
- **Function keystrokes.** A function keystroke is looked up in the key PROM.
  It is issued as LOAD once the panel is not BUSY.
- **Display states.** The Display State Indicator cycles
  KEY → D → ADR → BLANK on DX.
  - Numeric entry and CD force KEY.
  - Halt-to-run forces BLANK.
  - Run-to-halt forces ADR, so the halt address is shown.
  - In the D state only the two low digits are lit.

## I/O ports and isolation

Each `io_port` has a control, an output and an input section.

**Control byte:**

| Bit | Meaning |
|-----|---------|
| 7..4 | External Control lines |
| 3 | status enable |
| 2 | output interrupt enable |
| 1 | input interrupt enable |
| 0 | INIT |

**Output and input handshakes:**

- An OUT loads the data register and raises OUTRDY. A low pulse on OUTACC
  lowers it.
- An INPRDY pulse latches the input byte and sets INPACC. The processor's
  read clears INPACC.

**Status byte.** With status enable set, the next read returns the status
byte instead of data: `{ES7, ES6, ES5, INPACC, ES3, ES2, ES1, OUTRDY}`.

`isolation` passes data, control, sense, OUTACC and INPACC lines straight
through. It delays
the leading edge of each ready line by `DELAY` clocks and inverts its sense.
A trailing edge passes at the next clock. This models the one-shot that lets
the slow optical isolators settle. A ready pulse shorter than the delay
never reaches the other side.

## Real-time clock

`rtc` is an interval timer on the I/O bus:

- The program writes an interval count of 1 to 255 (OUT 13), then a control
  byte (OUT 14): `{run, 0, 0, 0, repeat, range[2:0]}`.
- The range selects 1 ms, 10 ms, 100 ms, 1 s or 10 s per count. Intervals
  therefore run from 1 ms to 255 × 10 s = 2550 s.
- At the end of an interval the clock raises its interrupt request. In
  repeat mode it starts the next interval on the same clock, so a series of
  intervals does not drift. Otherwise it stops.
- Reading the status byte (INP 3), `{done, running, 0, 0, repeat, range}`,
  clears the request. A control write restarts or stops the timer.

Inside are three counters:

- a prescaler of `CLKS_PER_MS` clocks (250 at one clock per 4 µs processor
  state)
- a decade divider
- the 8-bit interval counter

All three restart on the control write, so an interval is exactly
count × 10^range × `CLKS_PER_MS` clocks. The prescaler otherwise runs
freely, and its 1 ms tick leaves the top as `rtc_tick`, the time base for
other units.

## Where this design makes its own choices

Documented behaviour is followed wherever it is described. These points are
filled in or decided here:

- **Miniprograms and key PROM.** The miniprogram code, its addresses and the
  key-code-to-address PROM are written for this core. Function keys are
  assigned prefix I with numerals 0–9.
- **Port numbers and resets.** The port numbers, the Priority Reset port
  (OUT 17) and the effect of INIT are this design's own.
- **Isolation delay.** The delay length is a parameter, `DELAY = 8` clocks.
- **Real-time clock.** The count × decade-range encoding, its registers and
  ports, and deriving the 1 ms tick from the system clock are this design's
  own.
- **GLS versus LREG.** One description has GLS also loading the Save
  Register; the microinstruction table gives that job to a separate LREG
  code. The table is followed: GLS only gates.
- **Status byte bit 0.** This is OUTRDY, per the printed status format. Its
  accompanying description mentions OUTACC.
- **MAR stepping.** The MAR steps on T1 as well as T1I, so that operand bytes
  of multi-byte panel instructions come from consecutive micromemory bytes.
- **Flag table.** The flag bit order {S, Z, P, C} in the Flag Register and
  the position of the flag-restore table at 3FF0h are chosen here.
- **Display order.** The DX display order after KEY is chosen here.
- **Digit order.** M1 is the least significant digit.
- **Tick dividers.** The key scan and display multiplex rates (`SCAN_DIV`,
  `MUX_DIV`) are clock dividers chosen here.

Not built:

- the DAS interface modules (module addressing, the 8-channel A/D converter,
  the up/down counter)
- the cassette interface control and data circuits

Their register formats and protocols are not specified in enough detail to
design them. Interrupt vectoring for the I/O ports and the clock is also not
built: their request is brought out as `port_int_req` after the panel's priority gate.

## Files

- `rtl/dars_pkg.sv`: shared types (8008 states and cycles, microinstruction,
  control byte, display states)
- `rtl/fp_rom_pkg.sv`: key PROM and micromemory contents
- `rtl/fp_keyboard.sv`, `rtl/fp_display_mux.sv`: keyboard and display system
- `rtl/fp_control.sv`, `rtl/fp_data.sv`: panel control/data system
- `rtl/io_port.sv`, `rtl/isolation.sv`, `rtl/isolation_delay.sv`: I/O
- `rtl/rtc.sv`: real-time clock
- `rtl/dars_memory.sv`, `rtl/dars_bus.sv`: memory and busses
- `rtl/dars_top.sv`: the core
- `tb/cpu8008_model.sv`: behavioural 8008 bus model. It covers the subset
  the tests use: HLT, register and memory moves, immediate loads, INR, ADD,
  JMP, INP, OUT, and interrupt acknowledge with jammed instructions.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/dars_pkg.sv rtl/fp_rom_pkg.sv \
          tb/tb_dars_top.sv --top-module tb_dars_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_dars_top` with any other testbench name to run it.

`tb_dars_top` runs the core at its default parameters, about 33k clocks. It
plays a whole operator session and counts 19 mechanisms, failing any that
never occurred:

- numeric entry
- keyed functions
- two-key sequences
- panel operations started by the processor
- the conditional-halt refusal
- single step
- flag restore
- DMA
- MASK clearing
- the isolation delay
- output and input handshakes
- interrupt blocking by MASK
- DX
- MSG
- CD
- the CLR lock
- a real-time clock interval, timed to the clock
- overall panel operation count

The unit testbenches compare against values worked out in the testbench,
not read back from the design.
