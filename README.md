# JAIP: a Java bytecode accelerator that sits beside a RISC host

Interpreting Java bytecode on a small embedded CPU is slow, and a JIT needs
memory that such systems do not have. This design solves that with a bytecode
engine in hardware that works next to an ordinary RISC processor, without
replacing it. The hardware does the frequent work:

- fetching bytecode;
- running the operand stack;
- executing up to two bytecodes per clock;
- resolving method and field references at run time.

The host's software does the rare and complicated work: loading and parsing
class files, allocating objects, native library calls. The two sides talk
through an interrupt-driven mailbox.

Four ideas carry the design:

1. **Whole classes are cached, not cache lines.** The class loader converts
   each class into a compact *runtime image*. The accelerator copies an image
   into an on-chip circular buffer of 2 KB blocks the first time the class
   runs. After that, every bytecode fetch and constant-pool lookup is on-chip.
   Branches inside a method are relative, so the cache changes only when
   execution moves to another class.
2. **Pairs of bytecodes per clock.** A four-stage pipeline classifies two
   bytes per cycle and issues them as a pair when they do not conflict. The
   top of the Java stack lives in registers, over a stack memory with four
   ports.
3. **Symbol resolution in hardware, with help.** The class loader rewrites
   the constant pool into two tables that a state machine can follow: a
   symbol table in the image, and a cross reference table in external memory.
   Invocation, field access and `new` are resolved by that state machine. It
   calls the host only when a class has not been parsed yet, or for work the
   host must do.
4. **A thin hardware/software boundary.** The mailbox holds:
   - five argument registers;
   - a service number;
   - a done flag;
   - a status word.

   Everything the host does for the core is a numbered service routine.

The RTL covers the accelerator itself. The host CPU, its bus interface, the
DRAM and the class loader software are outside it. The top module exposes
plain ports where they would connect.

## Block map

```
jaip_top
 ├─ mamu            method area manager: class image cache and its tables
 │   ├─ macb        method area circular buffer, 32 x 2 KB, 16-bit words
 │   └─ instr_buffer  three 16-bit cells of bytecode at the Java PC
 ├─ jpcc            Java PC controller
 ├─ bee             bytecode execution engine (four stages)
 │   ├─ translate_stage  bytecode -> micro-operation lookup
 │   ├─ fetch_stage      S/C/O classification, pairing, microcode ROM
 │   ├─ decode_stage     control decode, branch targets, stack preload
 │   └─ execute_stage    A/B/C registers, LV0-3, ALU, frame engine
 │       └─ stack_mem4p  stack memory, two reads + two writes per cycle
 ├─ dsru            dynamic symbol resolution unit
 ├─ ipc_mailbox     host mailbox and interrupt
 └─ ext_mem_ctrl    one external memory master shared by DSRU and MAMU
jaip_pkg            shared types, micro-operation codes, translate and
                    microcode tables
```

### Top-level ports (`jaip_top`)

| Group | Signals | Use |
|---|---|---|
| host control | `start`, `boot_class`, `boot_moff` | start running the method at image offset `boot_moff` of class `boot_class` |
| class table | `cit_we`, `cit_id`, `cit_addr`, `cit_size` | host writes where each class image lies in external memory |
| mailbox | `h_we`, `h_addr[4:0]`, `h_wdata`, `h_rdata`, `irq` | host register port and service interrupt |
| status | `halted` | program reached its end bytecode |
| memory | `m_req`, `m_we`, `m_addr`, `m_wdata`, `m_ack`, `m_rdata` | single-beat 32-bit master. `m_req` is held until `m_ack`. Byte addresses, big-endian words. |
| counters | `ev[12:0]` | one-cycle pulses (list below) |

The `ev` bits, from bit 0 up:

| Bit | Event |
|---|---|
| 0 | dual issue |
| 1 | split pair |
| 2 | complex bytecode |
| 3 | taken branch |
| 4 | class-cache hit |
| 5 | class-cache miss |
| 6 | invocation |
| 7 | native call |
| 8 | parse-on-demand |
| 9 | field access |
| 10 | interface-list hop |
| 11 | return |
| 12 | local variable in stack memory |

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_BLOCKS` | 32 | class-cache blocks |
| `BLOCK_BYTES` | 2048 | bytes per block |
| `CIT_DEPTH` | 256 | class IDs in the Class Information Table |
| `STACK_DEPTH` | 1024 | 32-bit words of stack memory |

### Starting a program

1. The host writes one Class Information Table entry per class: the image's
   external address and its size in bytes.
2. The host pulses `start` with the boot class and the offset of its boot
   method.
3. The core loads the image, builds a frame and runs.
4. Bytecode `0xFF` ends the program. It sets `halted` and status bit 1.

After a reset the execute stage accepts no instructions until `start`. The class
cache keeps its contents across a reset, so without this the pipeline could run
left-over bytecode from the previous program before the new boot method.

## The class runtime image and the cross reference table

The hardware reads only these structures. The class loader on the host
produces them.

| Where | Content |
|---|---|
| image + 0x0000 | header word `0x4D4D4553` |
| image + 0x0004 + 2*i | Class Symbol Table entry *i* (16 bits): image offset of the 32-bit reference information of constant *i* |
| reference information | a pointer to a cross reference table entry (method and field references), a pointer to an interface list (interface methods), or a class information word (class references, handed to the host) |
| method header | four 16-bit words: reserved, argument count, max stack, local count. The bytecode starts 8 bytes later. |

A cross reference table entry (32 bits in external memory) holds one of:

- `{class ID[15:0], method offset[15:0]}` for a method;
- a field's byte offset inside the object;
- `{8'hFF, argument count, return-value count, service ID}` for a native
  method.

A method offset of 0 means "not parsed yet". The hardware then asks the host
to parse the class (service 1). The host answers with
`{class ID, offset}` in mailbox register 5.

An interface list is a chain of nodes of three 32-bit words each:

1. the implementing class ID;
2. `{class ID, method offset}`;
3. a pointer to the next node.

An object's first word is its class ID. Fields are addressed as object
reference + field offset.

## Method area: MAMU, MACB and the instruction buffer

The **MACB** is 32 blocks of 2 KB, organised as 16-bit words. A class image
takes as many consecutive blocks as its size needs, wrapping modulo 32.

- **Address calculation.** The Java PC is an offset inside the current class
  image. The top bits of its word address are added to the current block
  pointer to find the block. The low bits give the word inside the block.
- **Tables.** The MAMU keeps two tables:
  - the **Class Information Table**, indexed by class ID: image address,
    size, and the first MACB block holding the image, or `0xFFFF` if the
    image is not cached;
  - the **Circular Buffer Allocation Table**: which class owns each block.
- **Class switch.** On a hit, the block pointer just moves: 2 cycles. On a
  miss, blocks are overwritten from a FIFO pointer. Each overwritten block's
  previous owner is marked not cached, and the image is copied from external
  memory one 32-bit word at a time. A miss costs 2 cycles per evicted block,
  plus 2 cycles and one memory read per image word.
- **Staleness check.** This design adds one check. A block's table entry is
  trusted only if the block still lies inside its owner's cached image. This
  covers owners that were reloaded elsewhere and left stale entries.

The **instruction buffer** holds three 16-bit cells starting at the Java PC.
Bytecode is variable length, so the next opcode may be the high or the low
byte of the oldest cell. The buffer shows the fetch stage a six-byte window
that always starts at the opcode, and refills one word at a time from the
MACB. A flush to an odd address drops the first byte of the first word read.
The symbol resolution unit borrows the MACB read port while it works, and
fetch waits meanwhile.

## The bytecode execution engine

This is the core of the design and the part worth reading closely.

### Translate

Each of the two bytes at the head of the buffer is looked up in a 256-entry
table (`translate_rom` in `jaip_pkg`). The table gives:

- how many operand bytes follow (`nopd`);
- whether the bytecode is *complex*;
- for a simple bytecode, its micro-operation; for a complex one, an address
  in the microcode ROM.

The lookup is registered. The index is shifted by the number of bytes fetch
consumes in the same cycle, so the result lines up with the window one cycle
later.

### Fetch: classification and pairing

Each of the two bytes is either:

- **S**: a simple opcode;
- **C**: a complex opcode;
- **O**: an operand byte of an earlier instruction, counted with a down
  counter.

| bytes | issued | consumed |
|---|---|---|
| S S | both, if they do not conflict; otherwise the first alone | 2 or 1 |
| S O | S (its operands travel with it) | 2 |
| O S | S | 2 |
| O O | nothing | 2 |
| S C | S | 1 |
| C x | enter complex mode | 1 |
| O C | nothing | 1 |

Two simple micro-operations conflict in three cases:

- either is *special* (branch, invoke, field access, return, `new`, halt);
- both use the ALU;
- both address a local variable by an index operand. Both of those would
  need stack-memory port 1.

An instruction is issued only when all of its operand bytes are in the
window. The slot carries the opcode, up to four operand bytes and its own
bytecode address.

**Complex bytecodes.** These run from a microcode ROM that supplies two
micro-operations per cycle until a word marked last. For example, `iinc` is:

1. load local; push increment;
2. add; store local.

The invoke forms, field access, `new`, `swap` and the returns are one-word
sequences that hand a special micro-operation to execute.

### Decode and preload

Decode turns each micro-operation into a *kind* of stack action:

- push immediate;
- push from an LV register;
- push from stack memory;
- dup;
- pop;
- store to an LV register;
- store to stack memory;
- ALU;
- special.

It also produces:

- the immediate (`iconst` value, sign-extended `bipush`/`sipush` and
  `iinc` operands);
- the ALU operation and branch condition;
- the branch target (opcode address + signed 16-bit offset);
- the next PC and the constant-pool index.

The stack memory reads in one cycle. Decode therefore drives its read
addresses one cycle early, from the SP and VP that execute *will* have.

- Port 2 always reads M[SP-2].
- Port 1 reads M[VP+index] when the pair loads a local variable beyond the
  four cached ones, and M[SP-1] otherwise.

A pair enters the D/E register only when execute will be free next cycle, so
preloaded data is never stale.

### Execute: the two-level stack

Logically the stack is `M[0..SP-1], C, B, A`, with A on top. Registers
A, B and C are always the top three items. The local variables of the
current frame sit in stack memory at VP+i. The first four are cached in
registers LV0-LV3.

A pair executes in one cycle on a window `{A, B, C, M[SP-1], M[SP-2]}`. Each
operation:

- pushes, by shifting the window down;
- pops, by shifting it up;
- or, for an ALU operation, combines the top two entries.

The result's top three words become A/B/C. The pair's *net push count*
decides the memory traffic:

| net | memory action |
|---|---|
| +2 | C and B spill to M[SP], M[SP+1] |
| +1 | C spills to M[SP] |
| 0 | none |
| -1, -2 | refill from the preloaded words |

A store to a local variable beyond LV3 uses write port 1. That port is never
needed for a spill in the same pair, since a store makes the net push count
≤ 0.

**Stack memory.** It is two interleaved dual-port banks, split by address
bit 0. Two reads and two writes of adjacent words always land in different
banks. A read of a word written in the same cycle is forwarded.

**Branches** resolve here. A taken branch flushes the translate, fetch and
decode stages and reloads the Java PC.

### Frames, invocation and return: the frame engine

The frame layout is this design's own. The source design names the steps
but not their contents. A frame record of three words sits just above the
callee's locals:

```
        ... caller operand stack (arguments popped)
VP ->   local 0 (= first argument) ... local nlocals-1
FP ->   F0 = {caller class ID, return PC}
        F1 = caller VP
        F2 = caller FP
        callee operand stack ...
```

Right after an invocation, registers C/B/A hold F0/F1/F2 and SP = FP =
VP + nlocals. When the operand stack grows, they spill to FP, FP+1, FP+2 like
any other item.

**Invoke (6 cycles)** runs when the resolution unit sends `X_INVOKE` with the
argument count, the local count and F0:

| Cycle | Action |
|---|---|
| 1-2 | spill C, B, A |
| 3-4 | write LV0-3 back to the caller's frame, but only those that are real locals |
| 4 | compute the new VP = (SP + 3) − nargs. The arguments, already on the stack, become locals 0..nargs-1. Start reading them. |
| 5-6 | load LV0-3 of the new frame; set A/B/C, VP, FP and SP |

**Return (about 9 cycles):**

1. Spill the stack.
2. Read F0-F2 at FP.
3. Restore the caller's VP, FP and LV0-3.
4. Drop the callee's frame and the caller's arguments.
5. For `ireturn`/`areturn`, push the returned value.
6. Ask the resolution unit to switch the class cache back to F0's class and
   jump to F0's PC.

**Other frame-engine commands:**

| Command | Effect | Cycles |
|---|---|---|
| `X_FIELD_LD` | replaces A with the field value | 1 |
| `X_FIELD_ST` | pops value and reference | 2 |
| `X_PUSH` | pushes a value returned by the host | 1 |
| `X_NATIVE` | copies the top *n* ≤ 5 stack items to mailbox registers 1..n (first argument into register 1), then pops them | 8 |

## Dynamic symbol resolution (DSRU)

All requests from execute run one state machine. Execute waits in a hold
state until the DSRU releases it.

**Normal invoke:**

1. Read the Class Symbol Table entry (2 cycles).
2. Read the 32-bit reference information (2 cycles).
3. Read the cross reference table entry from external memory.
4. Branch on the entry:
   - a native entry → native call (below);
   - offset 0 → *parse-on-demand*: service 1 with the reference pointer in
     register 1. The host returns `{class, offset}` in register 5.
   - otherwise go on.
5. Switch the class cache to the target class.
6. Read the method header's argument and local counts (2 MACB reads).
7. Run the 6-cycle frame build.
8. Redirect the Java PC to offset + 8.

**Interface invoke:**

1. Take the object reference from A, B or C, depending on the argument
   count. Only counts up to 3 are supported.
2. Read the object's class ID.
3. Walk the interface list until a node's class ID matches.
4. Take that node's `{class, offset}` and continue as a normal invoke.

**Native call:**

1. Export the arguments (`X_NATIVE`).
2. Raise the native method's service number.
3. Wait for done.
4. Push register 5 if the method returns a value.

**Field access:** address = object reference + field offset.

- `getfield` reads it.
- `putfield` writes A to B + offset.

**`new`:**

1. The class information word goes to register 1, with service 2.
2. The object reference comes back in register 5 and is pushed.

**Return:** switch the class cache back to the caller, then redirect.

**Boot:** a switch to the boot class, then an invoke of the boot method with
an empty caller.

## Host mailbox

| Address | Register | Host access |
|---|---|---|
| 0x00-0x10 | arguments 1-5 | read. Register 5 is also writable: it carries return values. |
| 0x14 | service number | read |
| 0x18 | done | write: clears `irq` and releases the waiting unit |
| 0x1C | status | read: bit 0 = service pending, bit 1 = halted |

Only the resolution unit raises the interrupt. An assertion checks that no
second request is raised while one is pending.

## External memory controller

There is a single master port. The resolution unit has priority over the
class cache. A request keeps the port until it is acknowledged, and the
address and data are held stable until then.

## What the engine executes

The engine implements this bytecode subset:

- constants: `iconst_*`, `bipush`, `sipush`, `aconst_null`;
- int and reference local loads and stores (`*load`, `*load_n`, `*store`,
  `*store_n`);
- stack: `pop`, `dup`, `swap`;
- arithmetic and logic: `iadd`, `isub`, `imul`, `iand`, `ior`, `ixor`,
  `ishl`, `ishr`, `iushr`, `iinc`;
- branches: all `if*`, `if_icmp*`, `if_acmp*`, `goto`;
- calls: `invokevirtual`, `invokespecial`, `invokestatic`,
  `invokeinterface`;
- returns: `return`, `ireturn`, `areturn`;
- objects: `getfield`, `putfield`, `new`.

Bytecode `0xFF` ends the program.

Anything else translates to a one-byte no-operation. In particular, none of
these are built:

- arrays;
- `ldc`;
- `idiv`/`irem`;
- long, float and double;
- switches and exceptions;
- static fields.

The source system handles some of these through host service routines whose
microcode and services are not specified. Because of these gaps:

- The loop-control part of Fibonacci and the logic, method-call and
  class-chain benchmarks fall inside this subset.
- The sieve, string and π programs do not: they need arrays, string
  constants or division.

## Where this RTL departs from the source design

The RTL follows the source design for:

- the block structure;
- the class cache geometry (32 × 2 KB, FIFO, tables with `0xFFFF` = not
  cached);
- the three-cell instruction buffer;
- the S/C/O pairing tables;
- the decode-stage preload;
- the register/memory split of the stack (A, B, C, LV0-3 and a four-port
  memory);
- the resolution sequences and their stage latencies (reference
  information in 2 cycles, stack initialisation in 6);
- the mailbox with five arguments and a service register.

The following are this design's own choices:

- the image header word order and the interface list node layout;
- the object header;
- the service numbers;
- the frame record and all frame-engine sequences other than the 6-cycle
  stack initialisation;
- the MACB read-port sharing;
- the operand-waiting rule in fetch;
- the hazard list;
- the host register map;
- the `0xFF` program end.

One behaviour differs from the source design:

- In the source system, the decode stage raises the host interrupt itself
  for bytecodes that need a host service, such as `new`. It does this
  through microcode that writes the service register, and the resolution
  unit raises only the parse request.
- Here every host request, whether `new`, native or parse, goes through the
  resolution unit. Its state machine already waits for the answer, so
  execute needs no second handshake.
- The host sees the same registers either way.

The following are simplified:

- Native calls return at most one word.
- `invokeinterface` finds the object reference only in the top three stack
  items.
- There is no fast on-chip Java heap: heap accesses go to the external port.
- There is no bus interface IP: the ports are plain signals.

Warnings the tools report and that are deliberate:

- some unused bits of shared structs;
- `instr_buffer` is the only module with an asynchronous reset.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/jaip_pkg.sv \
    $(ls rtl/*.sv | grep -v jaip_pkg) tb/jaip_top_tb.sv \
    --top-module jaip_top_tb -o sim && ./obj_dir/sim
```

Replace the testbench file and the `--top-module` for any other block.

| Testbench | What it checks |
|---|---|
| `jaip_top_tb` | Whole design at default sizes. Three classes in external memory, a cross reference table, an interface list and modelled host services. It checks the values the program writes into a heap object. Every `ev` mechanism must occur, plus the stack-memory bypass. It checks the 6-cycle stack initialisation and the 2-cycle reference information fetch. About 52,000 cycles. |
| `chain_tb` | Whole design at default sizes running the two class-chain workloads in three rounds each instead of 1000. A chain of 40 classes (more than the 32 cache blocks) and a chain of 28 classes (fewer) call each other 100 levels deep and return. It checks the result, the invoke/return counts (303 each), and the class-cache misses against a FIFO model. It also checks that the 40-class chain misses on nearly every switch while the 28-class chain misses only on first load (29 misses). A reset between the runs checks that the core stays idle until the new start. |
| `mamu_tb` | Four classes of different sizes against a FIFO/table model. Hits take ≤ 3 cycles. Checks MACB and instruction buffer read-back. |
| `macb_tb`, `stack_mem4p_tb`, `instr_buffer_tb` | Random traffic against array models: block offset addressing, bank split and forwarding, and byte windows across flushes to odd addresses. |
| `translate_stage_tb`, `fetch_stage_tb`, `decode_stage_tb` | An independent table of operand counts, in-order issue with correct operands, no forbidden pair, `iinc` expansion, and field-by-field decode of random pairs. |
| `execute_stage_tb` | Decode + execute against a reference Java stack model over 3,000 random pairs, one pair per clock in straight-line runs. Also invoke (6 cycles), `ireturn` and native argument export. |
| `bee_tb` | A counted loop through the four stages: result, stack contents, taken branches, dual issue, microcode use. |
| `dsru_tb` | Boot, invoke, return, `getfield`, `putfield`, native, parse-on-demand, a two-node interface list and `new`, against models of the cache, memory, frame engine and host. |
| `jpcc_tb`, `ipc_mailbox_tb`, `ext_mem_ctrl_tb` | PC selection, the register map and handshake, and arbitration priority with stable requests. |

To change a size, override the top's parameters. The stack and class cache
are plain arrays sized by them.
