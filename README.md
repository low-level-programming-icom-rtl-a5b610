# Easy I — a 16-bit accumulator computer in SystemVerilog

Easy I is a teaching-sized von Neumann computer. It has one CPU and one memory,
and program and data share that memory. The CPU is an accumulator machine with
only eight instructions, yet it is universal given enough memory. Its interest
is in how it is built. A datapath of four registers and an ALU is steered by a
control unit. Every clock cycle the control unit sets one word of control
points. Each state of the control unit is one register-transfer step, and an
instruction is a short walk through those states. This RTL implements that
machine:

* the datapath;
* the 14-state hardwired control unit;
* an interchangeable micro-programmed control unit;
* the byte-addressed memory;
* the top level that joins them.

## Instruction set

An instruction is one 16-bit word:

```
 15 | 14 .. 10 | 9 .. 0
  I |  opcode  |   X
```

| Name  | Opcode | I = 0                   | I = 1                         |
|-------|--------|-------------------------|-------------------------------|
| Comp  | 00 000 | AC ← not AC             | same                          |
| ShR   | 00 001 | AC ← AC / 2             | same                          |
| BrN   | 00 010 | if AC < 0: PC ← X       | if AC < 0: PC ← MEM[X]        |
| Jump  | 00 011 | PC ← X                  | PC ← MEM[X]                   |
| Store | 00 100 | MEM[X] ← AC             | MEM[MEM[X]] ← AC              |
| Load  | 00 101 | AC ← MEM[X]             | AC ← MEM[MEM[X]]              |
| And   | 00 110 | AC ← AC and X           | AC ← AC and MEM[X]            |
| Add   | 00 111 | AC ← AC + X             | AC ← AC + MEM[X]              |

Notes on the table:

* The I = 0 forms of And and Add are immediates, written `andi` and `addi` in
  assembly.
* X is an unsigned 10-bit field. It is zero-extended when used as data.
* Memory is byte addressed, so X reaches 1 KiB. Words are at even addresses and
  the PC steps by 2.
* There is no subtract instruction. The programs compute `a - b` as
  `not b + 1 + a`.
* There is no halt instruction.

## Datapath

```
  memory rdata ──▶ DI ──▶ ABUS ─┬──▶ ALU A ─┐
                                ├──▶ AO (AO sel = 1) ──▶ memory address
                                └──▶ PC input (PC is = 0)
                   AC ──────────────▶ ALU B ─┤
                   ▲                         │
                   └──────── ALU result ◀────┘
  PC ──▶ AO (AO sel = 0)        PC ──▶ +2 ──▶ PC
  AC ──▶ memory wdata (EDB sel = 1)          AC[15] ──▶ control unit
```

The datapath has these registers:

* **DI** (16 bits) captures the memory data bus. It holds the instruction after
  fetch, and the loaded word after a read.
* **AC** (16 bits) is the accumulator. It is ALU operand B, and its bit 15 is
  the sign the control unit tests for BrN.
* **AO** (10 bits) drives the memory address. It loads either the PC or the X
  field.
* **PC** (10 bits) clears to 0, holds, or loads `(PC or X) + 2`. The last is
  selected by *PC is*.
* **IR** (6 bits) holds the I bit and opcode. See "Indirect operands" below for
  why it exists.

The **ALU** (`easy1_alu`) has five operations:

| Code | Operation | Result |
|------|-----------|--------|
| 000  | A         | A (copies a loaded word into AC) |
| 001  | NOTB      | not AC |
| 010  | AND       | A and AC |
| 011  | ADD       | A + AC |
| 100  | SHRB      | AC / 2 |

Operand A is the ABUS. The ABUS normally carries X zero-extended. It carries the
whole DI word when a loaded value goes to the ALU, which happens in load3 and in
indirect And/Add.

The control points are the fields of `easy1_pkg::ctrl_t`: ALU op, Mem op, PC
sel, PC is, DI le, AC le, AO sel, AO le and EDB sel. Two more are this design's
own: `abus_full` and `ir_le`.

## Control unit

### The fetch invariant

Everything hinges on one rule. **At the start of fetch, AO holds the address of
the instruction and PC already points to the one after it.**

Fetch itself is one cycle. The memory is read at AO and DI captures the word.
In the same cycle the control unit decodes the opcode and picks the next state.

Every instruction's last cycle restores the invariant with `PC → AO, PC + 2 →
PC`. A jump sets up the invariant directly with `X → AO, X + 2 → PC`. Because of
this, no instruction needs a separate cycle to advance the PC.

### States

The control unit is a state machine with a 4-bit state register. One state is
one clock cycle.

| State  | Code | Register transfers                          | Next              |
|--------|------|---------------------------------------------|-------------------|
| reset1 | 0000 | 0 → PC                                      | reset2            |
| reset2 | 0001 | PC → AO, PC + 2 → PC                        | fetch             |
| fetch  | 0010 | AO → EAB, RD, EDB → DI                      | by opcode         |
| aopr   | 0011 | AC ← ABUS and/+ AC, restore                 | fetch             |
| sopr   | 0100 | AC ← not AC or AC / 2, restore              | fetch             |
| store1 | 0101 | X → AO                                      | store2            |
| store2 | 0110 | AC → EDB, WR, restore                       | fetch             |
| store3 | 0111 | code reserved, never entered                | fetch             |
| load1  | 1000 | X → AO                                      | load2             |
| load2  | 1001 | RD, EDB → DI                                | load3             |
| load3  | 1010 | DI → AC (ALU op A), restore                 | fetch             |
| brn1   | 1011 | restore                                     | brn2 if AC15 else fetch |
| brn2   | 1100 | X → AO, X + 2 → PC                          | fetch             |
| jump   | 1101 | X → AO, X + 2 → PC                          | fetch             |
| ind1   | 1110 | X → AO (indirect operand, this design's)    | ind2              |
| ind2   | 1111 | RD, EDB → DI (this design's)                | by opcode         |

Cycles per instruction, counting fetch:

| Instruction                | Cycles |
|----------------------------|--------|
| And, Add, Comp, ShR        | 2      |
| Jump                       | 2      |
| BrN, not taken             | 2      |
| BrN, taken                 | 3      |
| Store                      | 3      |
| Load                       | 4      |
| any indirect (I = 1) form  | 2 more |

A taken BrN first restores the invariant in brn1 and then overwrites it in brn2.
That costs its extra cycle.

### Where the opcode comes from

In fetch, the instruction is still on the memory data bus. DI only captures it
at the edge that ends the cycle. So during fetch the control unit decodes bits
15..10 of the bus itself. In later states it decodes the IR latch.

For this reason memory reads are combinational (see Timing). Only opcode bits
2..0 are decoded, because the two high bits of every defined opcode are 00.

### Indirect operands

The original Easy I control unit ignores the I bit. Its tables describe only
the I = 0 forms. The instruction set does define the I = 1 forms, and the
example division program uses one (an indirect Add).

With `INDIRECT = 1`, the default, an I = 1 instruction other than Comp/ShR
takes two extra states, the two state codes left free:

* **ind1** sends X to AO.
* **ind2** reads MEM[X] into DI.

Then the normal I = 0 sequence of the opcode runs on that word:

* Load, Store, BrN and Jump take it as their address.
* And and Add take the whole word as the operand (`abus_full`).

Since DI is overwritten, the I bit and opcode are kept in IR.

With `INDIRECT = 0` the I bit is ignored, and the unit is exactly the original
14-state machine.

### Hardwired or micro-programmed

`easy1_cu` is the hardwired unit. It is next-state and output logic written as
one `case` over the state.

`easy1_ucu` builds the same machine the other way. It treats the state
transition table as a program:

* Each table row is written once as data: state, a pattern over {I, opcode} and
  AC15 with don't-care masks, next state, and control word.
* At elaboration the rows are expanded into a 512-word control store addressed
  by `{state, I, opcode[2:0], AC15}`.
* The hardware is then just that ROM and the state register.

The two units behave identically cycle for cycle. `easy1_cpu` and `easy1_top`
choose between them with `MICROPROGRAMMED`, which defaults to 0 (hardwired).

## Timing

There is a single clock. All registers load on the rising edge when their enable
is set. The control word of a state is valid during that state's cycle.

The memory reads combinationally from AO, and DI captures the word at the end of
the cycle. A memory write (store2) happens at the edge that ends its cycle.

`rst` is synchronous and active high:

* It puts the control unit in reset1.
* It clears DI, AC, AO and IR.
* While it is held, the control unit drives an idle control word: no memory
  operation and no register loads.

The first fetch, of address 0, comes two cycles after `rst` falls.

## Using the top level

`easy1_top` has these interfaces:

* `clk`, `rst`.
* A load port (`ld_we`, `ld_addr`, `ld_wdata`). It writes one word per cycle at
  a byte address, and takes precedence over a CPU write.
* An inspection port (`dbg_addr` → `dbg_rdata`). It reads combinationally at any
  time.
* Status outputs: `state`, `pc`, `ac`, `mem_addr` and `mem_op`. Their codes are
  `easy1_pkg::state_e` and `mem_op_e`.

To run a program:

1. Hold `rst` high.
2. Write the program and its data through the load port.
3. Release `rst`.
4. Since the machine never halts, watch `mem_addr` while `state` is fetch to see
   when the program reaches its exit label.

The memory has no initial contents, so load every word the program will read.

### Example: integer division

The reference program computes `12 / 4` by repeated subtraction:

* It stores a = 12 at byte 1000, b = 4 at 1004 and result = 0 at 1008.
* It exits if `a - b < 0`.
* Otherwise it loops. Each pass tests a, sets `a = a - b` and increments the
  result.
* Each `a - b` is `not b`, `+ 1`, then an indirect Add of MEM[1000].

The loop only leaves when a becomes negative, so it runs one pass more than the
C-style `while (a > 0)` suggests. The machine ends with a = -4 (0xFFFC) and
result = 4, after 59 instructions. The program is 24 words at bytes 0..47 and
its exit is at 48.

## Departures and interpretations

These are the places where the original description was silent or
contradicted itself, and what this RTL does:

* **Fetch always reads memory.** One table row shows no memory operation for a
  Comp/ShR fetch, but the opcode cannot be known before the word is read. The
  fetch flowchart reads unconditionally, and so does this design.
* **store2 returns to fetch.** The table sends store2 to a state store3, but
  gives no row for store3. The flowchart goes straight to fetch, and store2
  already restores the fetch invariant. Code 0111 is kept reserved.
* **load3 uses ALU op A with the whole DI word on the ABUS.** The table leaves
  the ALU op of load3 unspecified.
* **The PC's inner structure is inferred.** It is built as mux, +2 and register,
  from the PC sel / PC is columns of the table. PC sel 00, which is unused,
  holds.
* **These details were unspecified and are chosen here:**
  * ShR is a logical shift.
  * ALU codes 101..111 give 0.
  * X is zero-extended.
  * Address bit 0 is ignored.
  * The memory is 512 words, the full reach of a 10-bit byte address.
* **Additions of this design:**
  * IR, `abus_full`, the ind1/ind2 states and the `INDIRECT` switch.
  * The load and inspection ports.
  * The idle control word during reset.
  * The split of the bidirectional data bus into `mem_wdata`/`mem_rdata`.
* **The memory presents the addressed word whether or not RD is asserted.**
  Gating the read with RD would create a combinational loop through the fetch
  decode.
* **MIPS is not covered.** The same material also introduces the MIPS
  architecture for assembly programming. No MIPS hardware is included here.

## Files

| File | Contents |
|------|----------|
| `rtl/easy1_pkg.sv` | widths, opcodes, state/ALU/memory-op encodings, `ctrl_t` |
| `rtl/easy1_alu.sv` | ALU |
| `rtl/easy1_pc.sv` | program counter |
| `rtl/easy1_datapath.sv` | DI, AC, AO, IR, ABUS, ALU and PC |
| `rtl/easy1_cu.sv` | hardwired control unit |
| `rtl/easy1_ucu.sv` | micro-programmed control unit |
| `rtl/easy1_cpu.sv` | datapath plus control unit, with bus-rule assertions |
| `rtl/easy1_memory.sv` | 1 KiB byte-addressed memory of 16-bit words |
| `rtl/easy1_top.sv` | CPU plus memory |
| `tb/easy1_ref_pkg.sv` | instruction-level reference model, with expected cycle counts |
| `tb/easy1_cpu_harness.sv` | random-program checker used by `tb_easy1_cpu` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
They need `--timing`, and `--assert` enables the bus-rule assertions. For
example, for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/easy1_pkg.sv tb/easy1_ref_pkg.sv tb/tb_easy1_top.sv --top-module tb_easy1_top
./obj_dir/Vtb_easy1_top
```

What each testbench covers:

* **`tb_easy1_top`** runs at the default parameters. It runs three programs:
  * the division program above;
  * the same program without the loop's `add`, which stops after one pass with
    result 1;
  * 3000 random instructions.

  For every instruction it compares the fetch address, PC, AC and cycle count
  with the reference model, and it compares the full memory afterwards. It
  counts each opcode, indirect operands, taken and untaken branches, memory
  writes and reset sequences, and fails if any of them never happened.
* **`tb_easy1_cpu`** runs four CPUs on random programs: hardwired and
  micro-programmed, each with `INDIRECT` 1 and 0.
* **`tb_easy1_cu` and `tb_easy1_ucu`** check every cycle's control points and
  next state against a transcription of the state transition table.
* **The remaining testbenches** check the ALU, PC, memory and datapath against
  their register-transfer rules, with random stimulus.

## How far to trust it

What is verified:

* All RTL passes Verilator lint and an independent SystemVerilog front end.
* Every testbench passes.
* Each testbench was shown to fail on a deliberately broken copy of its module.
* The cycle counts match the state sequences above exactly.

What was never checked: the design has not been synthesized for a real target
or timed.

The memory is an asynchronous-read array. On an FPGA it maps to distributed RAM,
and block RAM would need a registered read. That change would add a cycle to
fetch and to load2.
