# SAP-1 8-bit computer, and a digital frequency / time-period meter

The main design here is the SAP-1 ("simple as possible") computer: the
smallest machine that still shows every part of a stored-program processor.
One 8-bit bus connects a program counter, a memory address register, a 16-byte
memory, an instruction register, an accumulator, a B register, an
adder-subtracter and an output register. A controller-sequencer steps every
instruction through six clock cycles. In each cycle it raises the few control
lines that move one word across the bus.

The second design stands beside it and has nothing to do with it. It is a
small instrument that measures a pulse train and shows one of four readings on
seven-segment digits:

- the frequency, 1 to 99 Hz, within ±1 Hz;
- the period, the high time T_ON and the low time T_OFF, each from 1 µs to 1 s
  in 1 µs steps.

`system_top` holds both designs. Each has its own clock and its own ports, and
they share only the reset.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It is checked with
Verilator lint and with the slang front end of Yosys.

---

## Part 1: the SAP-1 computer

### The machine

```
          +-----+        W bus (8 bits, one driver at a time)
   Cp --->| PC  |--Ep-->-----------------------------------------+
          +-----+                                                |
          +-----+      +-----------+                             |
   Lm --->| MAR |----->| RAM 16x8  |--CE-->-----------------------+
          +-----+      +-----------+                             |
      (switches in                                               |
       program mode)                                             |
          +-----+                                                |
   Li --->| IR  |--Ei (address nibble)-->------------------------+
          +-----+                                                |
             | opcode nibble                                     |
             v                                                   |
     +----------------+      +-----+                             |
     | controller-    |  La->|  A  |--Ea-->-----------------------+
     | sequencer      |      +-----+                             |
     | (ring counter) |         |   +-----------------+          |
     +----------------+         +-->| adder-subtracter|--Eu-->---+
        12-bit control word     +-->|   (Su: A - B)   |          |
                                |   +-----------------+          |
          +-----+               |                                |
   Lb --->|  B  |---------------+                                |
          +-----+                                                |
          +-----+                                                |
   Lo --->| OUT |---> leds[7:0]  <--------------------------------+
          +-----+
```

Words are 8 bits and addresses 4 bits. Program and data share the one
16-byte memory. Memory reads are asynchronous: the word at the MAR's address
is on the RAM output at once, with no clock edge. The adder-subtracter is
combinational too. It always looks at A and B, and `Su` chooses A + B or
A − B. Subtraction is done in 2's complement, as A + ~B + 1. There is no carry
or flag register, so results wrap modulo 256.

### Instruction set

An instruction is one byte. The upper nibble is the opcode and the lower
nibble is a memory address.

| Mnemonic | Opcode | Effect                        |
|----------|--------|-------------------------------|
| LDA addr | 0000   | A ← M[addr]                   |
| ADD addr | 0001   | A ← A + M[addr]               |
| SUB addr | 0010   | A ← A − M[addr]               |
| OUT      | 1110   | OUT ← A (shown on the LEDs)   |
| HLT      | 1111   | stop                          |

Any other opcode runs as a no-operation, taking six clocks like the rest.
This is a choice of this implementation.

### Six T-states and the 12-bit control word

This is the heart of the design. Every instruction takes six clock cycles,
T1 to T6. Three fetch the instruction and three execute it. A one-hot ring
counter (`ring_counter`) holds the current T-state and moves on at each
**falling** clock edge. After T6 it returns to T1.

From the T-state and the opcode, the controller produces a 12-bit control
word. The word tells each register what to do at the next **rising** edge.
Because the two edges alternate, the control word has half a clock period to
settle before any register acts on it.

The control word is the `ctrl_word_t` struct in `sap1_pkg`. Its fields, from
the most significant bit, are:

| Bit | Meaning                                   |
|-----|-------------------------------------------|
| Cp  | increment the PC                          |
| Ep  | PC drives the bus                         |
| Lm  | load the MAR                              |
| CE  | RAM drives the bus                        |
| Li  | load the IR                               |
| Ei  | IR address nibble drives the bus          |
| La  | load A                                    |
| Ea  | A drives the bus                          |
| Su  | subtract                                  |
| Eu  | adder-subtracter drives the bus           |
| Lb  | load B                                    |
| Lo  | load OUT                                  |

All control bits are active high. In the classic discrete-logic SAP-1 several
of them are active low.

| State | LDA     | ADD     | SUB        | OUT     | HLT      |
|-------|---------|---------|------------|---------|----------|
| T1    | Ep Lm   | Ep Lm   | Ep Lm      | Ep Lm   | Ep Lm    |
| T2    | Cp      | Cp      | Cp         | Cp      | Cp       |
| T3    | CE Li   | CE Li   | CE Li      | CE Li   | CE Li    |
| T4    | Ei Lm   | Ei Lm   | Ei Lm      | Ea Lo   | (halt)   |
| T5    | CE La   | CE Lb   | CE Lb      | —       |          |
| T6    | —       | Eu La   | Su Eu La   | —       |          |

A dash is a no-operation state: the control word is all zero, and the cycle
is spent anyway. During the T6 of ADD and SUB the adder's output is on the bus
while A loads from the bus. This is safe because A changes only at the edge,
and the adder's input settles only after that edge.

**Halting.** At the rising edge of HLT's T4 the controller sets a `halted`
flag. The flag freezes the ring counter in T4 and forces the control word to
zero. Only a reset or program mode clears it. Halting after exactly four
clocks of HLT is part of the tests.

**Bus discipline.** In every state at most one of Ep, CE, Ei, Ea and Eu is
high. In the classic machine the bus is a set of tri-state drivers on one wire; `w_bus`
builds it as a one-hot AND-OR multiplexer instead, and an idle bus reads 0. A
concurrent assertion in `controller_sequencer` checks the one-driver rule and
the one-hot ring counter at every clock.

**Reset timing.** The ring counter and the registers use opposite edges.
Release `rst` (or `prog`) while `clk` is low, just after a falling edge. The
first rising edge then executes T1. If you release it while `clk` is high,
the first falling edge moves to T2 before T1 has acted.

### Loading and running a program

`sap1_top` has a program mode in place of the toggle switches of the
classic machine:

1. Hold `prog` high. This clears the PC, the registers and the sequencer. The
   RAM is now addressed by `sw_addr`. Each rising edge with `prog_we` high
   writes `sw_data` into it.
2. Bring `prog` low while `clk` is low. The program runs from address 0.
3. `leds` shows the last value sent by OUT, and `halted` rises when HLT runs.
   `tstate` shows the current one-hot T-state.

`rst` is an asynchronous, active-high clear of everything except the memory.
The memory keeps its contents across a reset.

A run of n instructions ending in HLT takes 6·n + 4 clocks. The classic
example program ends with OUT = 28 and halts 34 clocks after the start:

| Address | Byte | Instruction or data       |
|---------|------|---------------------------|
| 0       | 09   | LDA 9                     |
| 1       | 1A   | ADD A                     |
| 2       | 1B   | ADD B                     |
| 3       | 2C   | SUB C                     |
| 4       | E0   | OUT                       |
| 5       | F0   | HLT                       |
| 9–C     |      | data 16, 20, 24, 32       |

The program counter wraps from 15 to 0. A program without HLT therefore loops
over the whole memory, executing data bytes as instructions where they lie.

---

## Part 2: the frequency / time-period meter

`meter_top` runs from a 20 MHz crystal clock. It measures a logic-level
signal `sig_in`, which need not be synchronous to that clock.

- **`input_sync`** re-times `sig_in` with two flip-flops and makes one-clock
  rise and fall pulses. The two-clock delay is the same on both edges, so it
  does not bias any measured time.
- **`meter_timebase`** divides the clock by 20 to make a 1 µs `tick`. It
  counts 1,000,000 ticks to make a 1 s `gate`. Both are clock enables, not
  clocks.
- **`freq_counter`** counts rising edges from one gate to the next. The count
  is the frequency in Hz, with the ±1 count uncertainty of any gated counter,
  which is the ±1 Hz of the specification. An edge that falls in the gate
  clock is counted in the new window. The counter stops at 100, and anything
  above 99 is flagged as over range.
- **`pulse_timer`** counts ticks in three counters:
  - one while the signal is high, stored as T_ON at each falling edge;
  - one while the signal is low, stored as T_OFF at each rising edge;
  - one since the last rising edge, stored as the period.

  The counters stop at 1,000,001 ticks, and a stored value above 1,000,000 is
  over range. If the signal stops, the saturated count is stored too. The
  display then shows over range instead of a stale reading. Resolution is one
  tick, ±1 µs. A reading is marked valid only after the first complete
  phase.
- **`meter_display`** shows one reading on seven decimal digits:
  - Each press of `btn_mode` moves on through frequency, period, T_ON and
    T_OFF, then back to frequency.
  - The value is converted to BCD by the shift-and-add-3 method,
    combinationally, and each digit is encoded in the gfedcba order, active
    high, for an external segment driver.
  - An over-range reading shows dashes, and a reading not yet measured shows
    blanks.

  The button input must be debounced and synchronous to `clk`.

The binary readings and their over-range flags are also brought out as ports.

**Limits.** The input must stay high and low for at least two clocks (100 ns)
each, so inputs above about 5 MHz cannot be measured. The original
specification names two features without describing them, "auto ranging" and
"memory buttons"; neither is implemented. All readings use fixed units, Hz
and µs. In the original instrument a PIC16F877 microcontroller does the
measuring in firmware, which is not available. Here dedicated logic does the
same job to the same ranges, accuracy and clock. The crystal, the ULN2003
segment driver, the display, the buttons and the power supply are external
parts.

---

## What follows the source and what is chosen here

These points follow the original SAP-1 description:

- the 8-bit W bus;
- the 16-byte memory with asynchronous read;
- the 4-bit PC counting 0–15;
- the opcodes;
- six T-states from a ring counter stepping on the falling edge;
- registers acting on the rising edge;
- a 12-bit control word;
- the combinational 2's-complement adder-subtracter.

These are choices of this implementation:

- the meaning and order of the 12 control bits and the micro-operations of
  each state (taken from the classic SAP-1 machine);
- active-high control bits;
- the multiplexed bus;
- the halted flag;
- no-operation for unknown opcodes;
- the program-mode port and its clearing of the machine;
- asynchronous resets.

For the meter, these come from its specification:

- the 20 MHz clock;
- the 1 µs resolution;
- the 1 s and 99 Hz full-scale values;
- the ±1 Hz accuracy;
- the four readings.

These are chosen here:

- the gated-count method;
- the counter widths;
- the seven digits;
- the segment encoding;
- the mode order;
- the over-range behaviour.

## Files

| Module | Role |
|--------|------|
| `rtl/sap1_pkg.sv` | widths, opcodes, T-state and control-word types |
| `rtl/program_counter.sv`, `input_mar.sv`, `sap1_ram.sv`, `instruction_register.sv` | fetch path |
| `rtl/ring_counter.sv`, `controller_sequencer.sv` | T-states and control word |
| `rtl/accumulator.sv`, `b_register.sv`, `adder_subtracter.sv`, `output_register.sv` | execute path |
| `rtl/w_bus.sv` | the shared bus |
| `rtl/sap1_top.sv` | the SAP-1 computer |
| `rtl/meter_pkg.sv` | meter constants and display modes |
| `rtl/meter_timebase.sv`, `input_sync.sv`, `pulse_timer.sv`, `freq_counter.sv`, `meter_display.sv` | meter parts |
| `rtl/meter_top.sv` | the meter |
| `rtl/system_top.sv` | both designs side by side |

Every module (not the packages) has a testbench `tb/tb_<module>.sv`. Each testbench checks
against values it works out itself, not against the design, and ends with a
line `TB_RESULT checks=N failures=M`:

- **Unit testbenches** use random stimulus with a reference model.
- **`tb_controller_sequencer`** compares every control word with a written-out
  table and checks the six-clock instruction length.
- **`tb_sap1_top`** runs 62 programs, two fixed and 60 random. It compares
  them instruction by instruction with an instruction-level model of the
  machine. The run includes overflow, borrow, unknown opcodes, a wrapping PC
  and HLT timing.
- **`tb_meter_top`** runs the meter at a scaled-down clock: 1 "second" is
  10,000 clocks.
- **`tb_meter_ranges`** drives the meter at the ends of its ranges: 1 Hz with
  a one-tick pulse, 99 Hz, a full-scale period and a period just beyond it.
- **`tb_system_top`** runs both designs at full size, including the real
  20,000,000-clock gate. It takes about 1.5 minutes in Verilator.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sap1_pkg.sv rtl/meter_pkg.sv tb/tb_sap1_top.sv --top-module tb_sap1_top
./obj_dir/Vtb_sap1_top
```

Replace `sap1_top` with any other module name to run its testbench. The
testbenches release reset by themselves and need no plusargs. To change the
meter's scale, override `P_CLK_HZ`, `P_TICK_HZ`, `P_MAX_TICKS` and `P_MAX_HZ`
on `meter_top`. Widths are fixed in `meter_pkg`, sized for the defaults. The
SAP-1 widths live in `sap1_pkg`; the per-module `DATA_W` and `ADDR_W`
parameters have the same defaults, and `sap1_top` passes the package values
down.
