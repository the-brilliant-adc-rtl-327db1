# BADC: a microprogrammed ADC controller for a CAMAC crate

The BADC (for "Brilliant ADC") is a small 16-bit computer that sits in a CAMAC crate full of
32-channel analog modules: time-to-amplitude converters and sample-and-hold modules. Those modules
hold each channel's signal on a capacitor and have no converters of their own. When an event
arrives, the BADC goes through every channel of the crate (608 in the reference setup), one at a
time:

- it selects the channel, samples it and digitises it;
- it drops the channel if it is below a per-channel threshold;
- it corrects the rest with a per-channel quadratic;
- it stores the result in its own memory, next to a label that names the channel.

The host computer then reads only the data worth keeping, already corrected. The BADC sets the
CAMAC LAM (look-at-me) line to tell the host that the data is ready.

The machine is horizontally microprogrammed. Each 48-bit microword directly drives the fields
below. There is no instruction set in between.

- A 16-bit ALU built from four Am2901 bit slices, each with 16 registers and a Q register.
- A shift-rotate multiplexor at the ends of the word.
- A 9-bit sequencer with a return stack.
- The data memory.
- The analog multiplexor.
- The CAMAC interface.

Most of the design's character comes from the CPU clock. It adapts to each instruction:

| Cycle | Length | Used for |
|-------|--------|----------|
| short | 200 ns | ordinary instructions |
| long  | 360 ns | conditional branches, so the ALU flags have time to settle |
| pause | open-ended | waits for the memory or the ADC to acknowledge, so the fetched word can go through the ALU in the same instruction |

The ADC side runs as a three-stage pipeline, with one channel in each stage at the same time:

1. the modules set up channel i+2;
2. the sample-and-hold and ADC digitise channel i+1;
3. the CPU processes channel i.

## Files

| File | Contents |
|------|----------|
| `rtl/badc_pkg.sv` | microword layout, field encodings, decoded-operation struct |
| `rtl/badc_ucode_pkg.sv` | microinstruction helper functions and the PROM program |
| `rtl/am2901.sv`, `rtl/badc_alu.sv`, `rtl/badc_shift_mux.sv` | bit slice, 16-bit ALU, shift-rotate multiplexor |
| `rtl/badc_sequencer.sv` | microprogram sequencer |
| `rtl/badc_clockgen.sv` | short/long/pause CPU clock, single step |
| `rtl/badc_control_store.sv` | PROM plus the plug-in debugging RAM |
| `rtl/badc_cpu.sv` | decoder, D-bus multiplexor, branch logic, breakpoint 1 |
| `rtl/badc_memory.sv` | data memory boards |
| `rtl/badc_camac_if.sv` | CAMAC slave station, forced branches, crate control |
| `rtl/badc_mux_ctrl.sv` | analog multiplexor and pipeline control (ADC-MUX board) |
| `rtl/shm60.sv`, `rtl/eh12b3.sv` | behavioural models of the sample-and-hold and the 12-bit ADC |
| `rtl/badc_panel.sv` | front-panel switches and LEDs |
| `rtl/badc_top.sv` | the whole unit |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_badc_top` |
| `tb/tb_module_bank.sv` | behavioural crate of TAC/SHAM modules driving the analog bus |
| `tb/tb_badc_pkg.sv` | reference arithmetic shared by the testbenches |

## The microword

The microword is 48 bits wide. The type `badc_pkg::uword_t` lays it out as follows. The first
row is the most significant bit.

| Bits | Field | Meaning |
|------|-------|---------|
| 47:44 | `opcode` | low four bits of the encoded operation |
| 43 | `ext` | fifth bit of the encoded operation |
| 42, 41 | `brk2_req`, `brk1_req` | the branch tests breakpoint 2 / 1 instead of a flag |
| 40 | `status_req` | pause this cycle until the device acknowledges |
| 39:38 | `srs` | shift-rotate mode: 0 zero fill, 1 one fill, 2 rotate, 3 arithmetic |
| 37 | `carry` | carry into the least significant slice |
| 36:33, 32:29 | `a`, `b` | ALU register addresses |
| 28:26, 25:23, 22:20 | `src`, `func`, `dest` | Am2901 I2:0, I5:3, I8:6 |
| 19:17 | `brcond` | 0 none, 1 always, 2 zero, 3 non-zero, 4 negative, 5 not negative, 6 overflow, 7 carry |
| 16 | `konst` | put `d` on the D bus |
| 15:0 | `d` | immediate constant, or a branch address |

**Branch address.** A branch address is `{d[7], d[15:8]}`. Bit 7 is the page bit, which selects
the second half of a 512-word PROM. A word can therefore hold a branch or an immediate constant,
but not both; an assertion in `badc_cpu` checks this.

**Branches on a breakpoint.** If either breakpoint request bit is set, any non-zero `brcond`
branches when the requested breakpoint is set, and the ALU flags are ignored.

**Cycle length.** Every conditional branch runs a long cycle. A breakpoint test counts as a
conditional branch.

**Encoded operations.** The five bits `{ext, opcode}` select one operation per cycle. They are
mutually exclusive.

| Code | Name | Action |
|------|------|--------|
| 01 / 02 | PUSH / POP | sequencer stack. PUSH combined with a branch is a call; POP is a return |
| 03 / 04 | CRATE_ON / CRATE_OFF | take or release control of the crate |
| 05 | CLR_HOST | clear the host-access error latch |
| 08 / 09 | SETBRK / CLRBRK | set or clear breakpoint 1 |
| 0A / 0D | RSTQ / SETQ | CAMAC Q response |
| 0B / 0C | SETL / RSTL | LAM request |
| 0F | MULT | multiply step |
| 11 | RMD | read memory onto the D bus. Pauses for the memory |
| 12 | WYM | write Y to memory |
| 13 | WYMA | write Y to the memory address register |
| 14 | CWD | CAMAC W buffer onto the D bus |
| 15 | WYMCWD | W buffer onto D and Y to memory in one instruction, so a CAMAC write costs one cycle |
| 16 | WTD | switch the ADC input to the test register |
| 18 / 19 | WMSA / WMSAI | load the multiplexor start address. WMSA without auto-increment (for continuous scanning), WMSAI with it |
| 1A | RAD | read the ADC result onto the D bus. Pauses for the converter |

**D bus.** The D bus carries one source at a time, in this order of priority:

1. immediate constant;
2. memory;
3. ADC;
4. W buffer;
5. zero, when nothing is selected.

**Multiply step.** A MULT cycle gives a conditional add-and-shift. If Q0 is 1, it turns the
Am2901 source `0,B` into `A,B`. The arithmetic right shift of B:Q then fills bit 15 with
F15 xor OVR, so an overflowing add still shifts in the correct sign. The subroutine at 0x090 does
15 such steps and then a subtract step for the sign bit of a two's complement multiplier.
Together with the return, a 16×16→32 multiply takes 17 short cycles, which is 3.4 µs.

## Clocking and the pause handshake

The RTL runs from one 25 MHz clock. `badc_clockgen` divides it into CPU cycles of 5 ticks
(200 ns) or 9 ticks (360 ns). On the last tick of a cycle it asserts `cpu_en`, and every CPU
register updates on that tick.

**Pause cycles.** A cycle with `status_req` set holds at phase 0 until `ack`. The cycle then
completes its normal length. The top level computes `ack` from the device that the encoded
operation addresses:

- the memory answers 6 ticks (240 ns) after the read starts, covering the 220 ns access time;
- the multiplexor answers once the ADC has a result, or at once if a result is already waiting.

**Forced branches.** A pending forced branch releases a pause, so a stuck device cannot lock out
CAMAC.

**Front panel.** The panel can stop the clock and advance it one CPU cycle per press of the step
switch.

## The analog pipeline (ADC-MUX board)

**Addressing.** `badc_mux_ctrl` addresses the modules with a 10-bit channel address:

| Address bits | Meaning | Goes to |
|--------------|---------|---------|
| 9:5 | station | N |
| 4 | channel bit 4 | F1 |
| 3:0 | channel bits 3:0 | subaddress A |

So the address is station × 32 + channel. The modules latch the address on an S1 strobe, then
take 200 ns to drive the analog bus.

**One conversion.** A conversion runs in three steps:

1. The sample-and-hold tracks the bus for 1 µs.
2. It holds. The ADC starts (2 µs). In the same step the address advances and the next channel
   is strobed into the modules.
3. When the conversion ends, the result is latched. The sample-and-hold goes back to tracking,
   and the next conversion begins unless a finished result is still waiting for the CPU.

**Reading results.** A RAD instruction hands over the waiting result. It returns `{4'b0, code}`
and releases the pipeline for the next channel. So while the CPU works on channel i, channel i+1
is being converted and channel i+2 is settling.

**Errors.** The ADC raises breakpoint 2 in two cases:

- a RAD with no scan started;
- a full-scale code (0xFFF).

The microprogram tests breakpoint 2 in the RAD instruction itself and takes an error exit.

**Test register.** A test register loaded over CAMAC (F19) can replace the ADC. It is selected
by that load or by the WTD operation, and a reset switches back to the ADC. Known data can then
be run through the algorithm.

**Models.** `shm60` and `eh12b3` are behavioural models, with voltages carried as integer
millivolts:

- the ADC covers 0 to 5.12 V, so 1.25 mV per code;
- each module output is 0 to +5 V.

## CAMAC interface and crate control

**Commands.** `badc_camac_if` acts on a command addressed to the BADC (N) on the rising edge of
S1. It answers X for every such command.

| Function | Effect |
|----------|--------|
| F0–F7 | read functions: the R buffer drives the R lines. The R buffer is reloaded by every memory read the CPU makes |
| F16–F23 | write functions: the W buffer is loaded from the W lines |
| F9 | resets the BADC |
| F19 | loads the ADC test register |
| F24 / F26 | disable / enable the LAM |
| any other, including F0 and F16 themselves | forces a branch to microprogram address 0x40 + F |

The front-panel NIM trigger forces a branch to 0x060. Forced branches are jumps, not interrupts:
nothing is pushed, and nothing returns from them.

**Host protocol.** The PROM program gives the host this protocol:

| Command | Effect |
|---------|--------|
| F18 with data P | set the write pointer to P |
| F16 | write a word at the write pointer and advance it (three CPU cycles, vector included) |
| F17 with data P | set the read pointer to P and prefetch that word into the R buffer |
| F0 | return the prefetched word, fetch the next one and advance |
| F25, or the NIM input | run one event |
| F10 | clear the LAM |
| F27 | start the diagnostic scan (see below) |

The microprogram drives Q: it is set when the BADC is idle and cleared while an event runs.

**Crate control.** During an event the BADC takes the crate:

- it raises `crate_enable` to the crate controller;
- it addresses the modules itself.

The host must leave the crate alone during that time. If `host_addr` shows that the host
addressed it anyway, an error latch is set. The latch drives breakpoint 2, so the program can
branch to an error exit, and CLR_HOST clears it.

## The event program and memory map

This is the data memory map:

| Address | Contents |
|---------|----------|
| 4k … 4k+3 | ε, δ, α, β of channel k (k < 608) |
| 0x980 … | output buffer: a corrected value, then its label, repeated |
| 0xFF0 | multiplexor start address |
| 0xFF1 | channel count |
| 0xFF2 | end of the output buffer, written by the program |

For each channel, the event routine at 0x060:

1. reads the ADC value Q, testing breakpoint 2 in the same instruction;
2. reads ε and skips the channel if Q < ε (signed);
3. otherwise computes x = Q − δ;
4. computes t = α + (β·x)[31:16], with the first multiply;
5. computes Q' = (t·x)[27:12], with the second multiply;
6. stores Q' and then the channel's address as its label.

In other words, Q' = α·x/2¹² + β·x²/2²⁸. The two scalings let α carry a gain near 1.0 with 12
fractional bits, and β a small quadratic term.

At the end the routine writes the end pointer, releases the crate and raises the LAM. A kept
channel takes about 60 cycles (two 17-cycle multiplies included), some 13 µs. The ADC sets the pace for skipped channels: 3 µs per conversion.
A full crate takes 3 to 10 ms, depending on how many channels are kept.

Reset runs from 0x000 and then waits in an idle loop at 0x003.

**Diagnostic scan.** CAMAC F27 starts a scan of the channel block named by 0xFF0/0xFF1. The
routine at 0x0B0 takes the crate and converts the block over and over, discarding the results,
so the analog bus can be watched on an oscilloscope. It runs until a CAMAC command forces a
branch elsewhere or F9 resets the unit.

## Microprogram storage

`badc_control_store` holds two stores:

- a 256-word PROM, built from `badc_ucode_pkg::prom_word` as a case table (this synthesises to
  ROM). With `PROM_WORDS=256` the page bit is ignored. Set it to 512 to use the page bit.
- a 512×48 debugging RAM that replaces the PROM when `dbg_sel` is high. It is loaded through a
  simple write port (`dbg_we`, `dbg_addr`, `dbg_wdata`).

New programs are written with the helper functions in `badc_ucode_pkg`. Each helper fills one
group of fields, and a microinstruction is the bitwise OR of the helpers for the operations it
performs, for example `u_alu(...) | u_op(OP_WYMA) | u_jmp(BR_NZ, addr)`.

## Front panel

`badc_panel` provides:

- the switches: reset, which is stretched and combined with power-on reset; run/stop; single
  step; breakpoint 2; and an input/output select for the data LEDs;
- LEDs for the microprogram address, branch code, condition flags, L/X/Q and the clock;
- 16 data LEDs showing the D bus or Y. All the LEDs are latched at the end of each CPU cycle.

## Where this RTL goes beyond its source, and what it leaves out

The block structure, the microword fields, the cycle times and the three clock modes are from
the original unit. So are the breakpoints, the forced-branch CAMAC mechanism with the R/W buffers
and F9/F24/F26, the pipeline and its parts, the memory size and access time, and the correction
algorithm. The following are this design's own choices:

- the bit order of the microword fields;
- the numbering of the branch conditions and shift modes;
- most encoded-operation codes;
- the vector addresses and the host protocol;
- the memory map;
- the fixed-point scaling of α and β;
- the label format;
- the ADC input range;
- the error conditions;
- all the microcode.

Not modelled:

- the external-clock switch;
- LAM grading in the crate controller cable;
- the open-collector drive of the dataway, which the top brings out as plain signals;
- the CAMAC side of the debugging-RAM module, which is replaced by a plain load port;
- the crate controller and the modules themselves. The testbench has a behavioural model of the
  modules.

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. To run the
whole unit with verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/badc_pkg.sv rtl/badc_ucode_pkg.sv tb/tb_badc_pkg.sv tb/tb_badc_top.sv \
        --top-module tb_badc_top
    ./obj_dir/Vtb_badc_top

`tb_badc_top` runs at the default parameters. It:

1. loads 608 channels of constants over CAMAC;
2. fires the NIM trigger and reads the buffer back, checking every word against a reference
   model (about 7 ms of simulated time);
3. provokes an ADC error exit, and a second one by having the host address the crate while the
   BADC holds it;
4. runs from the test register;
5. runs the diagnostic scan over three channels and stops it with F9;
6. single-steps;
7. runs from the debugging RAM.

It counts each mechanism (short, long and pause cycles; calls; multiply steps; forced branches;
skips; error exits; crate takeover; test-register reads; scan passes; host-access errors) and fails if any of them never happened.
The block testbenches (`tb_badc_alu`, `tb_badc_sequencer`, …) run the same way, with their own
file in place of `tb_badc_top.sv`. The shared packages must come first.
