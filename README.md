# CHUMP: a 4-bit accumulator machine in a handful of TTL chips

CHUMP is a processor small enough to build on breadboards from fewer than ten
TTL chips. It has a 4-bit accumulator, a 16-word program ROM, a 16-word data RAM
and seven operations, each in an immediate and a memory form. Every instruction
takes one clock. There is no sequencer and no microcode: the control unit is a
ROM that maps the opcode straight to control signals. The machine is stepped by
hand with a toggle switch, debounced by a NAND latch.

This repository holds synthesizable SystemVerilog for the whole machine. There
is one module per chip-level part, plus self-checking testbenches.

## The machine at a glance

```
            +-------------+
  PC ------>| program ROM |---- opcode[7:4] ----> control ROM --> alu fn, acc_we, ram_we, jmp
  ^         |   16 x 8    |---- const[3:0] --+
  |         +-------------+                  v
  |                       RAM read data -> [mux 0/1] <- Op4 (opcode bit 4)
  |                                          |
  +--- load (NAND(jmp, Z) = 0) <-------------+------------+-------------+
                                             v            v             v
                               acc --> ALU A   ALU B   Addr reg      PC d-input
                                ^        |  \--> Z    {ram_we, addr}
                                +--------+              |
                                acc --> RAM write data  +--> RAM address / write
```

| Part | Module | TTL part it stands for |
|---|---|---|
| program counter and jump NAND | `chump_pc` | 74161 counter, 7400 NAND |
| operand multiplexer | `chump_mux2` | 74157 |
| ALU | `chump_alu` | simplified stand-in for a 74181 |
| accumulator | `chump_accum` | 74377 / 74173 |
| Addr register (5 bits) | `chump_addr_reg` | 74273 |
| control ROM (16 x 8) | `chump_control_rom` | AT28/AT27 EEPROM |
| program ROM (16 x 8) | `chump_program_rom` | AT28/AT27 EEPROM |
| data RAM (16 x 4) | `chump_ram` | HM61xx/HM62xx static RAM |
| manual clock | `chump_sr_latch` | two 7400 NAND gates |
| processor (the parts between the ROM and the RAM) | `chump_cpu` | |
| whole machine | `chump_top` | |

Shared types and constants are in `chump_pkg`: the opcode enum, the ALU
function codes, the control word struct, the control ROM table
(`control_word`) and the default program.

## Instruction format and instruction set

An instruction is one byte. Bits 7:5 hold the operation. Bit 4 (Op4) selects
the operand: 0 means the constant in bits 3:0, and 1 means the RAM word at the
address in the Addr register. In the memory forms the constant field is
ignored.

| Op7..Op5 | Name | Op4 = 0 (immediate) | Op4 = 1 (memory) |
|---|---|---|---|
| 000 | LOAD    | acc = k | acc = M[Addr] |
| 001 | ADD     | acc = acc + k | acc = acc + M[Addr] |
| 010 | SUB     | acc = acc - k | acc = acc - M[Addr] |
| 011 | STORETO | M[k] = acc (one clock later) | M[M[Addr]] = acc (one clock later) |
| 100 | READ    | Addr = k | Addr = M[Addr] |
| 101 | GOTO    | PC = k | PC = M[Addr] |
| 110 | IFZERO  | if acc == 0: PC = k | if acc == 0: PC = M[Addr] |
| 111 | (unused) | no operation | no operation |

All instructions except a taken jump also increment the PC. Arithmetic wraps
modulo 16 and there is no carry flag. Data, addresses and the PC are all 4 bits
wide, so a program has at most 16 instructions.

## The Addr register: where most surprises come from

The part of CHUMP that takes the most care is the Addr register. It has **no
enable**. Every clock edge loads it with the multiplexer output, whatever the
instruction is. The RAM is addressed only from this register. This has three
consequences.

1. **A memory operand uses the address left by the previous instruction.**
   `LOAD` (memory form) reads `M[Addr]`, where Addr is the operand of the
   instruction just before it. So a memory access is normally preceded by
   `READ n`, which does nothing but set Addr to n.
2. **Every instruction moves Addr.** `ADD 1` also sets Addr to 1, and a memory
   form sets Addr to the word it just read. Chained memory instructions
   therefore walk through memory: two `LOAD`s in a row read `M[a]` and then
   `M[M[a]]`.
3. **STORETO writes one clock late, at the address it names itself.** The
   fifth bit of the Addr register holds the RAM write signal from the control
   ROM. `STORETO 2` loads Addr with `{write=1, 2}` at its closing edge. The RAM
   then writes the accumulator into word 2 at the closing edge of the
   *following* instruction. No `READ` is needed before a `STORETO`. The data
   written is the accumulator during that following instruction. It is still
   the value the `STORETO` saw, because the accumulator only changes at the
   same edge. While the write is pending, the RAM read port still shows the
   old word.

The default program shows all three. It increments RAM word 2 forever:

```
0: 1000 0010   READ 2       Addr <- 2
1: 0001 0000   LOAD [Addr]  acc <- M[2],  Addr <- M[2]
2: 0010 0001   ADD 1        acc <- acc+1, Addr <- 1
3: 0110 0010   STORETO 2    Addr <- 2, write pending
4: 1010 0000   GOTO 0       M[2] <- acc at the end of this clock; PC <- 0
```

## Jumps without a branch unit

The PC is a loadable counter. Its active-low load input is the NAND of the
control ROM's `jmp` bit and the ALU's Z flag (Z = 1 when the ALU result is 0).
Both jump instructions set `jmp`, and they differ only in the ALU function the
control ROM selects:

* `GOTO` selects the constant 0, so Z is always 1 and the jump is always taken.
* `IFZERO` selects A, the accumulator, so Z is 1 exactly when acc == 0.

The jump target is the multiplexer output: the constant, or `M[Addr]` for the
memory forms.

## The ALU and the control ROM

The ALU computes all its operations in parallel, and a multiplexer picks one
with a 3-bit function code: `0` A, `1` B, `2` A+B, `3` A-B, `4` zero. Codes 5
to 7 are free and give 0 here. On a real 74181 the same roles are played by its
logic function "1" (for GOTO, with Z taken from its A=B output) and by "not A"
(for IFZERO). That chip is not modelled.

The control ROM has 16 words of 8 bits, addressed by the opcode, with fields
`{alu[4:0], acc_we, ram_we, jmp}`. The ALU field is 5 bits wide, the width the
74181 would need. The simplified ALU uses the low 3 bits, and the upper two
are 0, which an assertion in `chump_cpu` checks. Both forms of an operation
share one word:

| Op | ALU | acc_we | ram_we | jmp |
|---|---|---|---|---|
| LOAD | B | 1 | 0 | 0 |
| ADD | A+B | 1 | 0 | 0 |
| SUB | A-B | 1 | 0 | 0 |
| STORETO | A (result unused) | 0 | 1 | 0 |
| READ | A (result unused) | 0 | 0 | 0 |
| GOTO | 0 | 0 | 0 | 1 |
| IFZERO | A | 0 | 0 | 1 |
| unused | A | 0 | 0 | 0 |

## The hand clock

`chump_top` has no clock input. A two-way toggle switch grounds one of two
pulled-up inputs, `sw_s_n` or `sw_r_n`. These drive an RS latch made of two
cross-coupled NAND gates (`chump_sr_latch`). The latch's Q output is the
machine clock. A throw to the set side raises the clock once, however much the
contact bounces, because a contact that springs open leaves both inputs at 1,
and then the latch holds. Synthesis reports one latch bit for this module;
that latch is the circuit.

## Interfaces and timing

* `chump_top`: inputs `sw_s_n`, `sw_r_n` (switch contacts, active low) and
  `rst_n`. Outputs: `clk`/`clk_n` (the latch outputs), `pc`, `instr`, `acc`,
  `ram_addr`, `ram_we`, `z` and `jump`, for LEDs or a testbench. Parameter
  `PROGRAM` (`logic [15:0][7:0]`, word i = address i) sets the program ROM
  contents; it defaults to the program above.
* `chump_cpu`: a clock and reset, a program ROM port (`pc` out, `instr` in) and
  a RAM port (`ram_addr`, `ram_we`, `ram_wdata` out, `ram_rdata` in). Both
  memories are read without a clock. The RAM writes on the rising edge when
  `ram_we` is 1.
* Every register changes only on the rising clock edge. One instruction
  completes per clock.

## Choices this design makes where the original description is silent

* **Reset.** The description has none. `rst_n` is an asynchronous active-low
  clear of the PC, the accumulator and the Addr register, including its write
  bit. That is the kind of clear the 74161/74273/74173 chips offer. The data
  RAM is not reset, so it powers up with unknown contents, like a real SRAM.
* **The ALU is the simplified one**, not a 74181 model. The description
  accepts either.
* **RAM write timing.** The write is edge-triggered, at the rising edge at the
  end of the instruction after `STORETO`. The static RAM chip has a
  level-sensitive write strobe instead. The read data during that cycle is
  the old word.
* **Filler values.** ALU codes 5..7 give 0. Don't-care ALU fields in the
  control ROM select A. Opcodes `1110`/`1111` are no-ops.
* **Field order** inside the control word (`{alu, acc_we, ram_we, jmp}`).
* **No program-loading port.** The program ROM is a parameter; on the board
  it is an EEPROM programmed off the board.
* The 555 oscillator of a free-running build is not included; the clock is
  the hand switch only.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `chump_alu_tb` | all 16 x 16 operand pairs with all 8 function codes, result and Z |
| `chump_mux2_tb` | random select and data |
| `chump_pc_tb` | clear, increment and wrap, load only when jmp and Z are both 1, one step per clock |
| `chump_accum_tb`, `chump_addr_reg_tb` | enable (or the lack of one), reset |
| `chump_control_rom_tb` | all 16 words against the control table |
| `chump_program_rom_tb` | default program and an overridden one |
| `chump_ram_tb` | asynchronous read, write on the edge, old data during a write |
| `chump_sr_latch_tb` | set/reset/hold, and one clock edge per throw under bounce |
| `chump_cpu_tb` | 150 random programs on random RAM contents, 40 clocks each, against an instruction-level reference model (`tb/chump_ref_pkg.sv`); also requires that all 14 instructions ran and that jumps were taken and not taken |
| `chump_top_tb` | four complete machines with hand-written programs that cover every instruction, taken and untaken IFZERO, GOTO through RAM and late STOREs; switch bounce, reset in mid-run, state compared with the reference model after each throw |
| `chump_top_full_tb` | the machine with all defaults running the counter program for 40 loops: 5 clocks per increment, the new value appears exactly at the end of the GOTO, and the 4-bit word wraps |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/chump_pkg.sv tb/chump_ref_pkg.sv \
    tb/chump_top_tb.sv --top-module chump_top_tb
./obj_dir/Vchump_top_tb +verilator+rand+reset+2
```

The `+verilator+rand+reset+2` option starts unreset state (the RAM) at random
values. The reference model copies the RAM's power-up contents before it runs,
so the tests do not depend on them.

## Changing the design

* Give `chump_top` another program by overriding `PROGRAM`. Use
  `chump_pkg::make_instr(op, mem, k)` to build the words.
* To add an ALU operation, give it a free code (5..7) in `chump_alu` and
  point an opcode at it in `chump_pkg::control_word`. The unused opcode
  pair `111x` is free.
* The widths are package constants (`DATA_W`, `ADDR_W`). The modules are
  parameterized on them, but the 4-bit constant field of the instruction ties
  data and address width together.
