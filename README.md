# A double-issue Java bytecode processor

Java bytecode is a stack machine code. Nearly every instruction pops its
operands from the top of the operand stack and pushes its result back, so a
naive hardware implementation runs one bytecode per cycle at best and spends
most of its memory bandwidth on the stack. This design executes **two
instructions per cycle** on such a stack machine. It rests on three ideas:

* **Translation into microcodes.** Bytecodes are translated on the fly into
  8-bit microcodes. Simple bytecodes map to one microcode. Complex ones
  expand into a short sequence read from a ROM, or are handed to a host
  processor.
* **A two-level stack cache.** The three top stack entries live in registers
  A, B and C. The rest of the stack, including the local variables of the
  running method, lives in an on-chip stack RAM.
* **A stack RAM split into two banks** by the least significant bit of the
  word address. Two stack words can then be read, and two written, in one
  cycle. The only pairs that would collide on a bank are two local-variable
  loads, or two local-variable stores, to addresses of the same parity. The
  decoder refuses to pair those.

The processor is a coprocessor. A host CPU loads the bytecode and starts a
method. It also serves the bytecodes this core does not execute itself:
division, remainder, array creation and array access, plus method
invocation. For `invoke` and `getstatic` the core itself walks the class
runtime image to resolve the constant-pool reference. It pushes a static
field's value on its own.

The RAM sizes are parameters of the top module `java_cpu`:

| parameter | default | meaning |
|---|---|---|
| `CODE_BYTES` | 1024 | size of the method area |
| `STACK_WORDS` | 128 | stack RAM size, in 32-bit words |

## Pipeline

```
 code_mem ──► TR ──► IF ──► ID ──► EX ──► A B C
 (bytes)     │      │      │  └─► stack_ram (2 banks) ◄─┘  spill / fill / locals
            JPC   Instr1  SP,VP
                  Instr2  pairing
```

**TR, `translate_stage`**
* Every cycle it reads the aligned byte pair at the Java program counter
  (JPC) and advances JPC by two.
* The type manager tags each byte as a bytecode or as an operand byte. It
  counts how many operand bytes the last bytecode still owes.
* For each bytecode, the translation ROM (`trans_rom`) gives one of two
  things: the microcode, or the start address of a sequence in the
  one-to-many ROM. It also gives the operand count.
* Operand bytes pass through untranslated.
* Each item carries its own byte address. That address is the "trigger"
  address a branch offset is added to.

**IF, `fetch_stage`**
* It assembles two complete microcode instructions, each with its operand
  bytes attached, into the registers Instr1 and Instr2.
* Translated items queue in an eight-entry buffer. An instruction can leave
  the buffer only when all of its operand bytes have arrived.
* A one-to-many bytecode switches the mode register to one-to-many mode.
  Microcodes are then read from `o2m_rom`, two per cycle, until a word
  marked *last* is read. Every microcode of the sequence carries the operand
  bytes of the complex bytecode.
* When the decoder raises `fetch_one`, only Instr1 was issued: Instr2 moves
  into Instr1 and one new instruction is fetched.

**ID, `decode_stage`**
* It decides whether Instr1 and Instr2 can issue together. The rules are
  listed below.
* It keeps the stack pointer SP and the variable pointer VP. SP is the
  address of the top element, the one held in A. VP is the address of
  local variable 0.
* It computes the stack RAM read addresses without a register, so the RAM
  data is ready at the start of the execute cycle. These are
  local-variable addresses, or the two fill words `stack[SP-3]` and
  `stack[SP-4]` when the pair shrinks the stack.
* Two small immediate ROMs (`imm_rom`), one per slot, supply constants such
  as -1, 0x7FFF and 1.0f.
* It computes branch targets: the trigger address plus the signed 16-bit
  offset.

**EX, `execute_stage`**
* It applies the pair to the stack registers, spills to or fills from the
  RAM, writes local variables, and resolves branches.
* It asks the host for service through the interrupt generator (`irq_gen`).
* Multiplication takes two cycles. In the first, the product is
  registered and the stage stalls. In the second, the ALU passes the
  registered product on.

### Pairing rules

Instr1 and Instr2 issue together unless one of these rules forbids it. In
that case Instr1 issues with a nop in slot 2, and `fetch_one` is raised.

| rule | reason |
|---|---|
| a special instruction (class 11) pairs only with nop | specials need the whole data path |
| ALU+ALU and load+ALU are not paired | one ALU; the ALU would need the value being loaded |
| two local loads, or two local stores, to the same bank are not paired | one port per bank |
| only one instruction of the pair may use operand bytes | one operand path |
| stsp/stvp never has a second instruction, and is followed by one bubble | the next pair must see the new SP/VP (this design's own rule) |

A store followed by an ALU operation *is* paired. The ALU then takes B and
C as its operands, because the store consumes A in the same cycle. A nop in
Instr1 is dropped and Instr2 issues alone from slot 1. This keeps specials,
branches and iinc in slot 1.

## The stack window: spill and fill

This is the part that takes the most care. A pair can change SP by -4 to +2.
The execute stage does not switch A, B and C through a mux tree written out
by hand. Instead it applies the two slots one after the other to a small
window:

```
W = { A, B, C, F1 = stack[SP-3], F2 = stack[SP-4] }
```

F1 and F2 are the two words the RAM delivers this cycle. A push shifts the
window down. A pop shifts it up. Synthesis turns the two steps into the
same muxes a hand-built data path would need. After the pair:

| net SP change | RAM traffic |
|---|---|
| +1 | old C is spilled to the new `SP-3` (the old `SP-2`) |
| +2 | old B and old C are spilled to the old `SP-1` and `SP-2` |
| 0 | none (apart from local-variable stores) |
| -1, -2 | C, or B and C, are refilled from F1/F2, read from the old `SP-3`/`SP-4` |

The two banks have opposite parity, so two spill words never hit the same
bank. The same holds for two fill words. An assertion checks that no pair
writes one bank twice.

The stack RAM reads synchronously and is write-first. A word written in one
cycle can be read back, correctly, in the same cycle. The execute stage
needs this when a spill is followed immediately by a fill of the same word.
While execute stalls for a multiply or a host service, the decoder presents
the stalled pair's read addresses again, so the fill data is still there
when the pair completes.

**Local variables and the registers.** Local variables are read from and
written to the RAM directly. They are never looked up in A, B or C. This is
only correct if no local variable's RAM word is still waiting inside the
register window. The host must therefore start a method with

```
SP = VP + max_locals + 2
```

This places the initial (empty) stack above two guard words, so the first
three pushes spill above the locals.

## Branches

A conditional branch or `goto` is decoded like any other instruction. Its
target is the trigger address plus the offset, and it is resolved in EX.

When a branch is taken:
1. TR, IF and ID are flushed. The pairs in them become nops.
2. JPC is reloaded with the target rounded down to an even address.
3. If the target is odd, the byte at the even address is replaced by a nop,
   so the two-byte fetch stays aligned.

The cost of a taken branch is three cycles.

`stjpc` jumps to the address in A.

## Host services

The host serves these microcodes:
* `idiv`, `irem`, `newarray`, `iaload` and `iastore`;
* `invoke` and `getstatic`;
* `return`.

The handshake:
1. Execute holds the pair and raises `irq`.
2. `irq_code` carries the microcode.
3. The top three stack entries are visible on `tos_a/b/c`.
4. The host answers with `host_result` and a one-cycle `host_ack`.
5. The result replaces B. For the -1 group (`idiv`, `irem`, `newarray`,
   `iaload`, `iastore`) the stack then shrinks by one, which leaves the
   result in A.
6. `invoke` leaves the stack as it is. `getstatic` pushes the static
   value that the resolver read; the host only acknowledges it, and its
   `host_result` is ignored.

`iastore` is the `iastore` service followed by two `pop` microcodes. The
three words it needs (array, index, value) are therefore all in A, B and C
when the host is asked.

After `return` is acknowledged the processor stops, and `running` drops.

### Resolving `invoke` and `getstatic`

The method area holds the bytecode and also the class runtime image that
the class loader prepares. While an `invoke` or `getstatic` waits for the
host, the constant-pool resolver (`cp_resolver`) walks that image. It uses
its own byte-wide read port on `code_mem` and reads one byte per cycle.

| step | bytes read | address | what it finds |
|---|---|---|---|
| 1 | 2 | `cp_base + 8 + 2*index` | a table-of-contents entry: the offset of the constant-pool item |
| 2 | 1 | `cp_base + offset` | the item's tag (0x0A for a method reference) |
| 3 | 2 | `cp_base + offset + 5` | the 16-bit direct address, stored by the loader after the class-file fields |
| 4 | 8 | `cp_base + direct` | for methods (tags 0x0A, 0x0B): the method header (access flag, argument count, max stack, max locals). The bytecodes follow it at `direct + 8` |
| 4 | 4 | `cp_base + direct + 8` | for fields (tag 0x09): the static value, in the data space of the 16-byte field entry |

All 16-bit fields are big-endian. All addresses are relative to `cp_base`.

The results appear on `res_*`, and `res_done` rises after 14 cycles for a
method, 10 cycles for a field or 6 cycles for anything else. They stay
valid until the host acknowledges. The host should wait for `res_done`
before it answers. For `getstatic` the processor pushes `res_field` itself
when the host acknowledges.

The frame switch itself is not built. It would save JPC, VP and SP, turn
the arguments into locals and jump to the code. It is left to the host
(see *Limits*).

While `running` is low, the host has the following access:
* it writes the method area through `code_we/code_waddr/code_wdata`;
* it reads and writes the stack RAM through `stk_*`; read data comes one
  cycle after the address.

A `start` pulse loads JPC, VP and SP from `init_jpc/init_vp/init_sp` and
starts execution.

## Microcode set

Bits [7:6] give the class. Stack change: load +1, store -1, ALU -1.

| code | name | effect |
|---|---|---|
| `00 00 0nnn` | ldimm_n | push n |
| `00 00 1nnn` | ldimm_n+8 | push immediate ROM entry n (1.0f, 2.0f, 1.875f as bits, 0x7FFF, -1, 31, 0, 0) |
| `00 01 1nnn` | ldval_n | push local n |
| `00 10 0000` | ldopd | push signed 8-bit operand (bipush) |
| `00 10 1000` | ldopd2 | push signed 16-bit operand (sipush) |
| `00 10 0100` | ldval | push local `opd` (iload, aload) |
| `00 11 0000..0011` | ldjpc, ldvp, ldsp, ldbc | push this bytecode's address, VP, SP, the bytecode itself |
| `00 11 1000` | dup | push A |
| `01 01 1nnn` | stval_n | pop into local n |
| `01 10 0001` | stval | pop into local `opd` (istore, astore) |
| `01 11 0001/0010` | stvp, stsp | pop into VP or SP |
| `01 11 1000` | pop | pop |
| `10 00 0001..0101` | or, xor, and, add, sub | B op A (sub is B - A) |
| `10 00 1001` | mul | B × A, two cycles |
| `10 00 1100/1101/1110` | ushr, shr, shl | B shifted by A[4:0] |
| `11 000 ccc` | if_cmp<cond> | compare B with A, pop 2 |
| `11 001 ccc` | if<cond> | compare A with 0, pop 1 |
| `11 010 000` / `11 100 000` | iinc1 / iinc2 | push increment and local / write their sum back |
| `11 011 110` | goto | jump |
| `11 101 000..100` | idiv, newarray, iastore, iaload, irem | host service, pop 1 |
| `11 110 000` | swap | exchange A and B |
| `11 110 001` | return | host service, then stop |
| `11 111 000..010` | invoke, getstatic, stjpc | resolve, then host; resolve, then push the static value at the host's acknowledge; jump to A |
| `11 111 111` | nop | |

The conditions `ccc` are 0 eq, 1 ne, 2 lt, 3 ge, 4 gt, 5 le.

Two tables are built into the RTL:
* `trans_rom` maps an integer subset of the JVM bytecodes onto these
  microcodes: constants, loads and stores, stack operations, integer
  arithmetic and shifts, iinc, all conditional branches, goto, arrays,
  return, invokestatic and getstatic. Anything else becomes a nop.
* `o2m_rom` holds three sequences:

| bytecode | sequence |
|---|---|
| newarray | ldopd, newarray |
| iinc | iinc1, iinc2 |
| iastore | iastore, pop, pop |

## Where this design makes its own choices

The architecture follows a published design: the pipeline, stack cache,
banking, pairing rules, microcode encoding, immediate ROM values and the
branch mechanism. The description leaves a number of points open. Here they
are filled in as follows:

* The contents of the translation and one-to-many ROMs, shown above. They
  are derived from the JVM specification.
* The three shift codes. The source gives contradicting operator symbols
  for them. Here the names decide: `1100` is the logical right shift,
  `1101` the arithmetic right shift and `1110` the left shift.
* `goto` is unconditional, although its description reads like `ifeq`.
* `stjpc` leaves SP unchanged, as the special-group table says.
* The 8-entry buffer between TR and IF. Operands are attached to their
  instruction rather than fetched separately.
* The handshakes between the stages (`ready`/`push`), and the write-first
  RAM bypass.
* The re-presented read addresses during a stall.
* The stsp/stvp bubble.
* The host interface and its protocol.
* The `SP = VP + max_locals + 2` rule.
* Asynchronous active-low reset.
* A method area read combinationally.
* The 1024-byte method area. The 128-word stack RAM matches the data memory
  size the description assumes.
* `ldjpc` pushes the address of its own bytecode.
* For the runtime image: big-endian 16-bit fields, a direct address relative
  to the image base, and the argument count in the second header field.
  The field entry's first four 16-bit fields are access flag, name index,
  descriptor index and heap offset. The static value is the 32-bit word at
  entry offset 8, the start of the data space.

## Limits and how far to trust it

* **Not built:**
  * the host CPU and its bus attachment;
  * external memories;
  * the class loader that builds the runtime image;
  * the part of `invoke` that follows resolution: the frame switch.

  A program therefore runs as one method that does not call other methods.
  `invoke` is resolved and then reaches the host as a service request.
  The host interface cannot switch the processor's frame.
* Long, float and double bytecodes, object creation, `putstatic`, instance
  fields and exceptions are not translated.
* There is no stack overflow check. SP must stay inside `STACK_WORDS`.
* Verification is by simulation only:
  * unit benches for every module;
  * an end-to-end bench with a loop, an array, multiply, divide,
    remainder, shifts, iinc and swap. It checks the results and counts every
    pipeline mechanism (dual issue, fetch_one, one-to-many mode, spill,
    fill, multiply stall, taken branch, odd branch target, bank split, RAM
    bypass). Its program ends with a `getstatic` and an `invokestatic` through a
    small runtime image. The bench checks what the resolver finds, and it
    checks that the static value reaches a local;
  * a resolver bench on a hand-built image;
  * a pi program.

  `tb_pi_demo` computes 32 decimal digits of pi with the integer spigot
  algorithm. It has two changes: the initialisation method is inlined,
  and output goes to an array. The static field is read with `getstatic`
  through a runtime image. The bench checks all eight four-digit groups
  and the count of each host service. It runs 18699 bytecodes in 20230
  cycles outside the host and resolver waits, which is 1.082 cycles per
  bytecode.
* The stsp bubble, `ldsp`, `ldvp`, `ldjpc`, `ldbc` and the hold after
  `stvp` are checked only in the decode unit bench. No JVM bytecode
  translates to them in the current ROMs, so no full-processor run uses
  them.

## Simulating

Each testbench is a self-checking top in `tb/`. It prints
`TB_RESULT checks=N failures=M` at the end.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
  rtl/jp_pkg.sv tb/tb_pi_demo.sv --top-module tb_pi_demo
./obj_dir/Vtb_pi_demo            # add +trace for a per-cycle pipeline trace
```

`tb_java_cpu` and `tb_pi_demo` run the top at its default parameters. They
both take about a second. The programs are written byte by byte in the
benches, with labels resolved in a second pass, so new test programs are
easy to add. The bench's host model (`irq` handler) is also the reference
for what the host software has to do.
