# An 8-bit teaching computer with every gate on the front panel

This is the RTL of a small 8-bit computer built to teach machine
organisation. Students can see and work every part of it. Every register,
the data bus, the store address, the instruction register and its decoder,
the ALU flags and the state of the microprogram are shown on lamps. Every
gate that moves a word from one place to another has its own push-button.
A student can move data and run instructions one gate at a time. They can
also step through the microprogram one state at a time, run one whole
instruction, or run a program at a chosen speed.

The original machine, from the mid-1970s, was not built from gates. An Intel 8008
microprocessor ran a program that imitated the computer. Its panel was
scanned and lit through a display board. This repository holds two things:

* **`edu_machine`**: the teaching computer itself, written directly as
  synchronous logic. It has the same registers, store, order code,
  eight-state microprogram, panel rules and modes.
* **`mp_board` and `mp_interface`**: the hardware of the original
  microprocessor system. That is the computer board around the 8008 (clock,
  state decoding, bus latches, ports, memory decoding, RAM) and the display
  and switch interface (a recirculating shift register that holds the lamp
  pattern, the LED scan and the switch matrix). The 8008 and its program
  PROMs are not part of the design. Their pins are ports of the top.

`edu_top` puts both side by side. They share the clock and reset and
nothing else.

## The machine as a programmer sees it

* **Word and store.** Words are 8 bits wide, and the store holds 256 words.
  The store is reached through a **store address register (SAR)**. Three
  gates can load the SAR: from the *input 0* toggle switches (by hand),
  from **register 5**, or from the **program counter**.
* **Registers.** Register 0 is the accumulator. Registers 1–4 are general
  purpose. Register 5 addresses the store. Register 6 is the program
  counter. Register number 7 means "the store word the SAR points at", so
  the store can appear wherever a register can.
* **Data bus.** One bus joins everything. Registers 0–6, the store and
  input 0 can drive it; at most one may do so at a time. With no driver it
  reads `377`.
* **ALU.** It combines the bus with the accumulator using ADD, SUBTRACT,
  AND or OR, and puts the answer in a result register. A separate gate
  copies the result into the accumulator.
  * The ALU remembers its last function; after reset it is ADD.
  * Three flags are kept: **C**, **N** and **Z**. After a subtraction, C is
    the borrow. AND and OR clear C.
* **Shifts.** These act on the accumulator.
  * Right: C goes into the MSB, the LSB is lost, and C is unchanged.
  * Left: 0 goes into the LSB and the MSB goes into C.

### Order code (octal)

| code | meaning |
|------|---------|
| `000`, `377` | halt |
| `0XY` (other) | no operation |
| `1XY` | copy register Y into register X (7 = store at register 5) |
| `20X` `21X` `22X` `23X` | clear, complement, increment, decrement X (X = 7 does nothing) |
| `24X` `25X` `26X` `27X` | accumulator := accumulator + − AND OR register X |
| `30X` | input 0 into register X |
| `31X`–`33X` | unused (no operation) |
| `34X` *n* | load register X with the next word |
| `35M` *a* | jump to *a* if any flag selected by M = C N Z is 1 |
| `36M` *a* | jump to *a* if any flag selected by M is 0 |
| `370`, `371` | shift right, shift left |

For example, `107` loads the accumulator from the store word addressed by
register 5. `351 a` jumps if the result was zero. `364 a` jumps if carry is
clear.

## The eight processor states

This is the heart of the design (`edu_control`). Each instruction takes up
to eight **processor states**. One state is done per *step*. The state
counter is one-hot: state *k* is bit 8−*k* of a byte, so state 8 is `001`,
state 4 is `020` and state 1 is `200`. A step rotates the bit one place
right.

States 5 to 8 are the same for every instruction:

| state | action |
|-------|--------|
| 5 | program counter → SAR |
| 6 | store → instruction register (the next instruction is fetched and decoded) |
| 7 | program counter + 1 |
| 8 | end of instruction; the panel is live; a halt instruction stops here |

States 1 to 4 depend on the instruction:

| instruction | 1 | 2 | 3 | 4 |
|-------------|---|---|---|---|
| copy `1XY` | reg 5 → SAR | – | Y → bus → X | – |
| ALU `24X`–`27X` | choose function, reg 5 → SAR, X → bus | X → bus → ALU | – | ALU → accumulator |
| input `30X` | reg 5 → SAR | – | input 0 → bus → X | – |
| load immediate `34X` | PC → SAR | PC + 1 | store → bus → X | – |
| jump, taken | PC → SAR | – | store → bus → PC | – |
| jump, not taken; `20X`–`23X`; shift; halt; no-op | do it (PC + 1 for an untaken jump), then **skip** to state 4 | | | |

**Skipping.** A "skip" loads the state counter with state 4 at once. These
instructions therefore go straight from state 8 to state 4. Their work is
done on that one step, and they then wait in state 4. On the real panel
this looked as if states 1–3 had flashed by. Only the copy, ALU, input,
load-immediate and taken-jump instructions ever reach states 2 and 3.

**Timing.** Gates are levels held for the whole state. Operations such as
increment, shift and loading the ALU function are one-cycle pulses issued
with the step. Everything changes on the clock edge of the step, so a state
can be read on the lamps between steps.

## Front panel (`edu_panel`)

In manual operation, and in state 8 between runs, the buttons drive the
same gates and pulses as the microprogram. `edu_machine` selects the panel
while the machine is stopped and the microprogram while it runs.

* **Debouncing.** A button counts only when two successive clock samples
  agree.
* **Only-one rule.** Some buttons form groups in which only one may be
  pressed at a time:
  * the bus sources (registers 0–7 and input 0);
  * the accumulator loads (bus → accumulator, ALU → accumulator, shift
    left, shift right);
  * the ALU functions;
  * the three SAR sources;
  * the two instruction register sources (store, input 0).

  If any group has two buttons pressed, nothing happens. The `alarm` output
  rises and the lamps of the pressed gate buttons flash. The flash
  half-period is 2^FLASH_LOG2 clocks.
* **Function buttons.** Pressing two of the clear, complement, increment
  and decrement buttons together is simply ignored.
* **Once per press.** Register operations, shifts and the ALU → accumulator
  transfer act once per press. Holding a function button while pressing a
  second register operates only on the new register.
* **Ordinary gates.** All other gates stay open for as long as their button
  is held.
* **Store address.** While a SAR gate is open, the store is addressed
  straight from that source. A store write made with both buttons held
  therefore goes to the new address.

Typical hand operations:

* Load a register: set the switches, then press *input 0 → bus* and
  *bus → register r*.
* Key in a word: press *reg 5 → SAR*; then press *input 0 → bus* and
  *bus → 7* together; then press *increment* with *register 5*. No step
  needs more than two buttons at once, because the SAR holds the address.
* Run one instruction from the switches: press *input 0 → instruction
  register*, then start in one-instruction mode.

## Modes and speed (`edu_mode`)

| mode | start button does |
|------|-------------------|
| manual | nothing; only the panel acts |
| one-bit | one state per press |
| one-instruction | the rest of the instruction at the chosen speed; holding *stop* freezes it between states |
| continuous | instruction after instruction until *stop* is held at the end of an instruction, or a halt is met |

* **Starting.** Start is taken on its rising edge, and only if the mode is
  not manual.
* **Returning to manual.** Every run returns to manual in state 8. This
  happens when one-bit or one-instruction mode reaches the end of the
  instruction, when a continuous run is stopped or halts, and when the
  selector is turned to manual.
* **Speed.** Between states the sequencer waits `DELAY_BASE >> speed`
  clocks for speed 0–6, and not at all at speed 7. With the default
  `DELAY_BASE` of 20 000 000 and a 10 MHz clock, speed 0 gives 2 s per
  state.
* **Halt.** A halt is seen only at state 8, once the halt word is in the
  instruction register. The program counter already points past it, so
  pressing start again carries on with the next instruction. A loader
  program uses this to wait for each word.

## The microprocessor board (`mp_board`, `cb_*`, `i8212`)

The 8008 has one multiplexed 8-bit bus and three state lines S2 S1 S0.
Each state lasts two periods of a two-phase clock, and *sync* marks the
halves. The second phi2 of a state, when sync is low, is called **phi22**.
One machine cycle runs:

* **T1:** the low address is put out.
* **T2:** the six-bit page and, in bits 7 and 6, the cycle type are put
  out. Bit 6 = 0 is a memory read; bits 7,6 = `01` is an input; `11` is a
  write.
* **WAIT:** any number of wait states, for as long as READY is low.
* **T3:** data moves.

What each part does:

* **`cb_clockgen`** makes phi1 and phi2 from the 10 MHz system clock:
  7 + 2 + 7 clocks of a 20-clock period, which is 2 µs. The original used
  monostables.
* **`cb_control`** works out the following signals.
  * **State decoding.** T1 = `010`, T2 = `100`, T3 = `001`, WAIT = `000`,
    STOPPED = `011`.
  * **Address latch strobes.** phi22 in T1 latches the low address; phi22
    in T2 latches the high address.
  * **T3A, the bridging state.** The 8008 samples input data early in T3,
    before T3 can be decoded. So T3A is set at the end of phi22 in T2 in
    every cycle except a write, and cleared in the first half of T3. T3A
    enables the memory port or the input port of the 8008's bus, chosen by
    the cycle type.
  * **Write strobe W/R.** It is set in the first phi2 of T3 in a write
    cycle, and cleared at the next phi22.
  * **READY.** With the *run/wait* switch at run, READY follows the
    interface. At wait, the *step* button gives a 5 µs (`STEP_W`) pulse, and
    READY is the interface's ready AND that pulse. This single-steps the
    processor one machine cycle at a time.
  * **Interrupt.** A press of the interrupt button is held, then passed to
    the 8008 at the next rising edge of sync. Both are cleared when the
    processor reaches T2. With `auto_start`, one interrupt is made after
    reset to start the program.
* **`i8212`** models the Intel 8212 latch. It is used five times: the
  output data buffer, the high and low address latches, the memory port and
  the input port.
* **`cb_mem_decode`** decodes the page. High address bits 1, 2 and 4 feed a
  3-to-8 decoder, and bit 3 is its active-low enable.
  * Pages 000–003 select the four PROM sockets.
  * Page 013 lands on output 7, the RAM (`cb_ram`: two 256 × 4 chips).
  * Page X77 disables the decoder and is taken by the display interface.

## The display interface (`mp_interface`, `if_*`)

The lamps are not wired to registers. The processor writes the lamp
patterns into a **32-word × 8-bit recirculating shift register**
(`if_shift_reg`). That register also scans the LED matrix:

* **Rotation.** The register shifts one word on every falling edge of
  sync, so once per processor state. A 5-bit position counter (`if_logic`)
  tracks which location is at the output.
* **Display.** When the location at the output is one that is displayed,
  its word drives the bit lines and its word line is switched on.
  `DISPLAY_MASK` marks 21 displayed locations. The word line stays blank
  for `BLANK` clocks after each shift (500 ns at 10 MHz), to let the word
  driver turn off. Locations that are not displayed also keep the bit lines
  at zero. The register and the counter change on the same clock edge, so
  the original's 300 ns offset between their clocks is not needed.
* **Processor access.** The processor reaches the shift register as page
  X77; the low five address bits name the location. A comparator holds
  READY low until the wanted word comes round to the output. Outside page
  X77, READY is given during phi2.
  * A read takes the output word.
  * A write (X77 and W/R) puts the new word in place of the one leaving.
  * An access can therefore wait for up to 32 states.
* **Switch matrix** (`if_switch_matrix`). The panel switches are read by
  input instructions. The low four address bits pick one of 16 groups of
  eight switches. Two of the codes (15 and 16 octal) have no switches and
  read 0.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `DELAY_BASE` | 20 000 000 | `edu_mode`, `edu_machine`, `edu_top` | clocks per state at speed 0 (2 s at 10 MHz) |
| `FLASH_LOG2` | 20 | `edu_panel`, `edu_machine`, `edu_top` | alarm flash half-period is 2^n clocks |
| `AW` | 8 | `edu_store`, `edu_machine`, `edu_top`, `cb_ram` | store address width (256 words) |
| `CLK_CYCLE` | 20 | `mp_board`, `edu_top` | system clocks per 8008 clock period |
| `STEP_W` | 50 | `cb_control`, `mp_board`, `edu_top` | step pulse length in clocks |
| `WORDS` | 32 | `if_shift_reg` | display shift register length |
| `DISPLAY_MASK` | `32'hFFD5_9555` | `if_logic`, `mp_interface` | which shift-register locations are lamps |
| `BLANK` | 5 | `if_logic`, `mp_interface` | word-line blanking after each shift |

Shared types and constants are in `edu_pkg`:

* the register numbers;
* the enums for ALU function, register operation, mode and gate sources;
* the `gates_t`, `pulses_t` and `decoded_t` structs;
* the one-hot state constants.

## Interpretations and departures

* **Built in logic, not software.** The teaching machine is built directly
  as logic. Its behaviour follows the original emulation, but the 8008
  program is not reproduced. The emulation also used shift-register
  locations to show decoded instruction types and the state counter. Here
  the same information is brought out as ports instead (`dec`, `state`,
  `gate_lamps`).
* **Direction of `1XY`.** This is read as "copy Y into X". That matches the
  written order code and the example programs (`107` loads the accumulator
  from store; `110` stores the accumulator in register 1). The original
  microprogram table names the gates the other way round.
* **Borrow and logic flags.** Carry after subtract is the borrow, and AND
  and OR clear carry. This is how the 8008 that ran the original behaves.
* **Stop in one-instruction mode.** Stop is sampled between states: a state
  already under way completes.
* **Alarm.** During an alarm, the lamps of every pressed gate button flash.
  That includes a button held in a group that is not at fault. The original
  flashed only the lamps of the offending group.
* **Store address while a gate is open.** A store write with an address
  gate held uses the new address (see *Front panel*).
* **Displayed locations.** The location table gives 21 displayed
  locations, but the word-driver list has 18 drivers; `DISPLAY_MASK`
  follows the location table.
* **Clocks and pulses.** The 8008 state codes come from the 8008 data sheet.
  The clock phase widths, the step pulse length, the blanking time and the
  flash rate are this design's own choices. In the original, monostables
  set them.
* **Top speed.** At speed 7 this machine does one state per clock, so
  it runs about a million times faster than the original at its top speed,
  where emulating each instruction took about a tenth of a second. Speeds
  0 to 6 keep the original's slow range: 2 s per state at speed 0, halving
  at each step down to 31 ms at speed 6.
* **One system clock.** Every flip-flop of the board is clocked by the fast
  system clock, and the phase edges are detected on it. So each board
  action happens on the first system clock after its phase edge.

## Not included

* The 8008 processor and the PROMs holding its program. Their pins are the
  `cpu_*` and `rom_*` ports of `edu_top`.
* The analog parts: the LED bit and word drive amplifiers and the power
  supply.

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb \
    rtl/edu_pkg.sv tb/tb_edu_machine.sv --top-module tb_edu_machine
./obj_dir/Vtb_edu_machine
```

What the main testbenches cover:

* **`tb_edu_machine`.**
  * It keys a four-word loader into the store using only panel buttons.
  * It runs the loader to key in three test programs, one start press per
    word.
  * It runs those programs with random operands: a repeated-addition
    multiply, a bit counter using shift left and jump-on-carry, and a mixed
    program. The mixed program stores subtract, AND, OR, add and
    shift-right results through register 5 and tests the sign.
* **`tb_edu_samples`** keys in and runs four typical demonstration
  programs, each with random data:
  * examining successive store words in the accumulator, one per halt;
  * pattern recognition: registers 1–4 flash while the switches match a
    stored pattern, and clear when they do not;
  * showing seven switch bits in the accumulator with an even-parity bit 8;
  * a 4-bit by 4-bit shift-and-add multiply.
* **`tb_edu_control`** steps every instruction class through its states
  against a table of the microprogram, with every flag combination for the
  jumps.
* **`i8008_bus_model`** (in `tb/`) is not a processor. It plays the 8008's
  side of the bus: T1, T2, WAIT states while READY is low, and T3 with the
  data sampled at the end of T3's first phi1. The board and interface
  testbenches use it.
* **`tb_mp_interface`** makes random reads and writes across the 32
  shift-register locations, each of which must wait for its word. It reads
  each switch group, and checks that a lit word line always shows its
  location's contents.
* **`tb_edu_top`** and **`tb_edu_top_full`** run both halves at once.
  * They count each mechanism and fail any that never happens. The
    mechanisms are: every mode, skipping, jump taken and not taken, halt,
    the stop freeze, stop at end of instruction, the alarm, a panel register
    operation, each ALU
    function, both shifts, store writes, instruction register and SAR
    loaded from the switches, the state delay, PROM/RAM/input/shift-register
    cycles, WAIT states, T3A, single step, interrupt and the display scan.
  * `tb_edu_top` shortens the state delay and the flash rate.
    `tb_edu_top_full` uses every default. It runs its programs at speed 7,
    then one instruction at speed 6, and checks that each state lasts
    `DELAY_BASE >> 6` = 312 500 clocks.
  * The delay length at every speed is checked cycle-exactly in
    `tb_edu_mode`.
