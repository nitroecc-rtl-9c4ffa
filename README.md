# NitroECC: a stack machine for secp256k1 field arithmetic

Elliptic-curve signatures, in Bitcoin and elsewhere, come down to long chains
of additions, subtractions and multiplications of 256-bit numbers modulo a
prime. NitroECC puts this arithmetic in hardware without building a
fixed-function point multiplier. It is a small processor whose only data type
is a 256-bit integer. Its only "registers" are the operand and result
registers of four arithmetic units. A program is a flat list of instructions,
with no branches and no loops. It pushes constants onto a stack, pops stack
words into a unit's operand registers, waits when the unit is a slow one, and
pushes the unit's result back onto the stack. A point double, a signature
step or a batch of them becomes a straight-line program. The host loads the
program, lets the core run to `halt`, and reads the results from the stack
memory.

Field arithmetic is modulo the secp256k1 prime
P = 2^256 − 2^32 − 977, which is `FFFFFFFF…FFFFFFFE FFFFFC2F`. P is a
parameter of every unit, so another prime above 2^255 can be used.

## Programming model

- **Instruction memory:** 64-bit words, read only by the core, executed from
  address 0.
  - An opcode word has the opcode in bits 7:0 and zeros above.
  - `OP_DATA` is followed by four data words, which form one 256-bit constant.
- **Stack:** 256-bit words kept in a separate 64-bit-wide stack memory, four
  memory words per stack word.
  - The most significant 64 bits come first, at the lowest address.
  - Stack word *e* therefore occupies memory addresses 4e … 4e+3.
- **Stack pointer `sp`:** the number of stack words in use.
  - **Pops copy.** A pop copies the top word into an operand register and
    leaves `sp` alone.
  - **Pushes grow the stack.** A push (or `OP_DATA`) writes at `sp` and
    increments it.
  - **`OP_DROP` / `OP_FORWARD`** move `sp` down or up without touching memory.
    A dropped word stays readable until something overwrites it, so a program
    can drop down to an older value, pop it, and forward back up.
  - **Consuming an operand.** The usual way is "pop, drop": pop the top word,
    then drop it.

| code | instruction | clocks | effect |
|------|-------------|-------:|--------|
| 00 | `OP_DATA` + 4 words | 6 | push the 256-bit constant that follows |
| 01 | `OP_HALT` | 3 | stop; `halt` rises |
| 02 / 03 | `OP_POPAA` / `OP_POPAB` | 6 | top → adder A / B |
| 04 / 05 | `OP_POPDA` / `OP_POPDB` | 6 | top → divider A (dividend) / B (divisor) |
| 06 / 07 | `OP_POPSA` / `OP_POPSB` | 6 | top → subtracter A / B (result A − B) |
| 08 / 09 | `OP_POPMA` / `OP_POPMB` | 6 | top → multiplier A / B |
| 0A | `OP_DROP` | 2 | `sp` − 1 |
| 0B | `OP_PUSHAO` | 6 | push (A + B) mod P |
| 0C / 0D | `OP_PUSHDQ` / `OP_PUSHDR` | 6 | push quotient / remainder of A / B |
| 0E | `OP_PUSHSO` | 6 | push (A − B) mod P |
| 0F | `OP_PUSHMO` | 6 | push (A · B) mod P |
| 10 | `OP_FORWARD` | 2 | `sp` + 1 |
| 11 | `OP_SWAP` | 18 | exchange the top two stack words |
| 12 | `OP_MUL` | 258 | start the multiplier, wait for its result |
| 13 | `OP_DIV` | 258 | start the divider, wait for its results |

Clock counts run from one fetch to the next and are exact.

**Arithmetic timing**
- The adder and subtracter results are ready one clock after their operands
  change, so a push can follow a pop directly.
- The multiplier and divider need an explicit `OP_MUL` / `OP_DIV`.
- Loading either operand register of the multiplier or divider invalidates
  its result until the next start.

**Halting.** The core halts on any of these:
- `OP_HALT`;
- a pop, drop or swap with too few words on the stack;
- a push, `OP_DATA` or forward onto a full stack;
- an opcode word that is not one of the codes above;
- running off the end of the instruction memory.

Only `reset` leaves the halt state.

**Reset and execute**
- After `reset` (synchronous, active high), the core starts at address 0
  with an empty stack as soon as `execute` is high.
- Dropping `execute` freezes every register and both memory enables in
  mid-instruction. Raising it again resumes exactly where the core stopped.

### Example: the point double

In Jacobian coordinates (X, Y, Z), doubling a point on y² = x³ + 7 is:

- S = 4·X·Y²
- M = 3·X² (the general formula adds a·Z⁴, and a = 0 for secp256k1)
- X' = M² − 2S
- Y' = M·(S − X') − 8·Y⁴
- Z' = 2·Y·Z

As a NitroECC program this is:
- 11 `OP_DATA` constants (X, Y, Z, and the small factors 2, 3, 4 and 8);
- 102 opcodes, 157 instruction words in all;
- at most 14 stack words.

The testbenches build the program with `prog_point_double` in
`tb/tb_nitroecc_pkg.sv`, run it on the generator G with Z = 1, and check that
X'/Z'² and Y'/Z'³ equal the affine coordinates of 2G. The basic arithmetic
and Schnorr-signature (s = k − m·a) programs are there as well.

A full stack memory holds 10,240 instruction words and 2,560 stack words. All
of these programs fit many times over.

## Inside the core (`bnvm`)

The core is an unpipelined state machine:
`BEGIN → FETCH → DECODE → (execute states) → FETCH …`.
Both memories have a one-clock registered read, and the 256-bit words go
through a 64-bit port. Most of the design's detail lies in fitting the
required clock counts to those two facts.

**Fetch and decode (2 clocks)**
- FETCH presents `instr_ptr` and advances it. DECODE sees the opcode word.
- `OP_DROP` and `OP_FORWARD` finish in DECODE.
- `OP_HALT` enters HALT from DECODE; `halt` is high in the third clock.

**Pop (6 clocks)**
- DECODE already puts the address of the top word's first memory word on the
  stack port.
- The four POP clocks each shift one returning 64-bit word into the selected
  operand register, most significant first. Each POP clock also addresses the
  next memory word.
- The state machine keeps the address combinational from `sp` and a 2-bit
  word counter, so no separate address register has to be kept in step.

**Push (6 clocks)**
- DECODE copies the chosen result register into a 256-bit shift register.
- Four PUSH clocks write its top 64 bits and shift.

**`OP_DATA` (6 clocks)**
- The four data words stream from the instruction memory into the stack
  memory, one per clock.
- The instruction pointer advances one word ahead of the data it is writing.

**`OP_SWAP` (18 clocks)**
- 8 clocks read both words into a 512-bit register.
- On the last read, the register is rotated so the former top word comes
  first.
- 8 clocks write the register back over the same eight memory words.

**`OP_MUL` / `OP_DIV` (258 clocks)**
- DECODE pulses the unit's `start`. The core then counts `MUL_DELAY`
  (`DIV_DELAY`) = 256 clocks.
- An assertion checks that the unit's result is valid when the wait ends.

**Pause and reset**
- The whole state machine is gated by `execute`. The memory enables are
  masked with it too, so a pause never loses a word in flight.
- `reset` also clears all operand registers.

## Arithmetic units

**`mod_add`, `mod_sub`**
- Each operand is first reduced below P (one conditional subtract).
- The units then add, or subtract, and conditionally subtract, or add back,
  P, and register the result.
- The result is exact for any 256-bit inputs, because P > 2^255.

**`mul_seq`**
- An interleaved modular multiplier, one multiplier bit per clock, most
  significant first:
  - r ← 2r + bᵢ·A;
  - then r is reduced by 0, P or 2P, so it stays below P.
- A is reduced below P at start.
- After 256 clocks r is A·B mod P. No 512-bit product is ever formed.
- Ports: `start`/`ready`/`busy`/`out_valid`, plus `invalidate`, which the core
  drives when an operand register is reloaded.

**`div_seq`**
- Plain (not modular) restoring division, one quotient bit per clock,
  256 clocks.
- Dividing by zero gives an all-ones quotient and remainder = dividend.
- Point arithmetic in Jacobian coordinates needs no division. The divider is
  there for programs that want integer quotient and remainder.

## Around the core

**`bram_sp`**
- A single-port synchronous RAM: 64 bits × 10,240 words, 14-bit address.
- Read-before-write; the output holds while `en` is low.
- The optional `INIT_FILE` is read with `$readmemh` and stands in for a
  memory initialisation file on an FPGA.

**`nitroecc_system`**
- The core with its instruction memory and stack memory.
- A **host port** (`host_sel`) takes over both memory ports, so a program can
  be written in and results read out.
- Use it only while the core is in reset, halted or not yet started.

**`labkit`** is the FPGA board top, clocked by SYSCLK at 15 MHz.
- **Switches**
  - SW[7] is reset and SW[6] is execute. SW[4:0] select what the eight LEDs
    show.
  - Each switch passes through a `debounce`: 1,000,000 steady clocks before
    the output follows.
  - The debouncers are themselves reset by the raw SW[7].
- **Execute latch**
  - Cleared by reset.
  - Set once the debounced execute switch is on.
  - Cleared again when the core halts.
- **LED selector (SW[4:0])**
  - 0–7: bytes of the stack memory read data.
  - 8–9: stack memory address.
  - 10–17: instruction memory read data.
  - 18–19: instruction memory address.
  - 20: {execute, halt}.
- **Brought out as ports**
  - The `nitroecc_system` host port.
  - Both sides of `axi_uart_manager`.

**`axi_uart_manager`**
- An AXI4-Lite master for a UART-Lite core, which is vendor IP and not part
  of this RTL. It uses the RX FIFO at 0x0, the TX FIFO at 0x4 and status at
  0x8 (bit 0: RX data, bit 3: TX full).
- **Receive:** polls status. When data is waiting, it reads a byte and pulses
  `rx_data`.
- **Transmit:** a `tx_data` pulse writes `tx_byte`. `tx_full` is high while
  the FIFO is full or a write is in flight.
- On the board it sits beside the core. Nothing connects it to program
  loading yet.

## Where this RTL departs from the original NitroECC description

- **Stack-pointer semantics.** One passage says push and pop "do not change
  the stack pointer". Every example program and its stack comments show
  pushes growing the stack. The examples are followed: pops copy, pushes
  grow. The example programs then run as written and give the expected
  results.
- **Word order.** 256-bit values are stored most-significant 64-bit word
  first, as the example listings do. One remark in the description calls the
  layout "little-endian".
- **Multiplier algorithm.** The original multiplier, described as a Booth
  multiplier, accumulated a 512-bit shift-and-add product over 256 clocks and
  reduced it modulo P at the end. This one is a bit-serial interleaved modular
  multiplier with the same latency and interface. It reduces every clock, so
  it needs no 512-bit modulo circuit. The Karatsuba/DSP multiplier the
  original experimented with and abandoned is not built.
- **Extra halts.** The core also halts on an unknown or malformed opcode
  word and on `OP_DATA` into a full stack. The original description does not
  say what happens in those cases.
- **Board top.**
  - **Execute latch.** It is set only while not halted. The core ignores
    `execute` when halted either way.
  - **Host port.** It replaces reloading an FPGA memory image for every new
    program.
  - **UART.** The UART core is outside the top and connected through ports.
- **Assumed details.** Reset style, the memories' read-during-write mode and
  division by zero are not specified by the original. They are documented
  where they are chosen.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

**Reference**
- `tb/tb_nitroecc_pkg.sv` contains an instruction-level model of the core. It
  gives the stack contents, `sp`, the clock count and whether the core halted
  on an error.
- It also contains modular arithmetic (`mulmod`, `invmod`, …) written
  independently of the RTL, and builders for the example programs.

**Unit and core testbenches**
- The units are checked against the model's arithmetic, including their
  latencies.
- `tb_bnvm` runs on small memories:
  - the example programs;
  - every halt case;
  - 200 random programs, half of them with random pauses on `execute`.
  It compares clock counts with the model, instruction by instruction.
- `tb_nitroecc_system` loads and reads everything through the host port, on
  full-size memories.

**Board-level testbench: `tb_labkit`**
- It runs the board top at its default parameters: 1,000,000-clock
  debouncers and full-size memories. This is about 12 million clocks, roughly
  10 s in Verilator.
- It loads programs through the host port and releases reset. It bounces the
  execute switch, which must not start the core, then switches it on and
  waits for halt.
- It compares the stack with the model, then walks the LED selector through
  every kind of display. Meanwhile UART traffic runs against a register-level
  UART-Lite model (`tb/axi_uartlite_model.sv`).
- It counts that every opcode, the error halt, bounce filtering, the automatic
  clearing of execute, each LED mode, and UART receive and transmit all
  occurred.

**Running a testbench** with plain Verilator (5.x), from the top of the tree:

```
verilator --binary --timing --assert --top-module tb_labkit \
  -y rtl -y tb +libext+.sv rtl/nitroecc_pkg.sv tb/tb_nitroecc_pkg.sv tb/tb_labkit.sv
./obj_dir/Vtb_labkit
```

Replace `tb_labkit` with any other testbench name. The testbenches read no
files.

**Sizing**
- The memory depths (`IMEM_DEPTH`, `STACK_DEPTH`) are parameters of `bnvm`
  and `nitroecc_system`; the address width is `ADDR_W`.
- The stack holds `STACK_DEPTH / 4` words.
- The core's wait counts, `MUL_DELAY` and `DIV_DELAY`, must be at least the
  units' 256-clock latency. An assertion enforces this.

## Files

| file | contents |
|------|----------|
| `rtl/nitroecc_pkg.sv` | widths, the prime, opcode and operand-register enums |
| `rtl/bnvm.sv` | the processor core |
| `rtl/mod_add.sv`, `rtl/mod_sub.sv` | one-clock modular adder and subtracter |
| `rtl/mul_seq.sv` | 256-clock modular multiplier |
| `rtl/div_seq.sv` | 256-clock integer divider |
| `rtl/bram_sp.sv` | single-port block RAM |
| `rtl/nitroecc_system.sv` | core, two memories and host port |
| `rtl/debounce.sv` | switch debouncer |
| `rtl/axi_uart_manager.sv` | AXI4-Lite master for a UART-Lite core |
| `rtl/labkit.sv` | FPGA board top |
| `tb/tb_*.sv` | one testbench per block, plus the shared reference package |
| `tb/axi_uartlite_model.sv` | simulation model of the UART-Lite registers |
