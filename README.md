# Fetch and decode front end for a pipelined 8051

An 8051 instruction is one to three bytes long, and its first byte alone
decides what the instruction is. A pipelined 8051 therefore has to turn a
byte-wide program memory into a steady stream of whole, decoded instructions.
It also has to follow jumps without waiting on a slow ROM for every byte. This
design does that with two small prefetch buffers in front of the ROM and a
decoder split into two halves. The first half reads and classifies the opcode
byte. The second half gathers the operand bytes and resolves control flow.

The pipeline has the stages IF (fetch), ID (decode), OF (operand fetch), EXE
(execute) and WB (write back). This RTL covers IF and ID. The later stages sit
outside the top module: the decoded instruction leaves on the `of_*` channel,
and branch outcomes come back on the `jmp_*` channel.

The design was conceived as an asynchronous, handshake-driven circuit. It is
written here as synchronous logic on a single clock. Each handshake channel of
the original becomes a valid/ready pair, and each block keeps the order of
actions of its original flow chart. Cycle counts are therefore properties of
this implementation, not of the asynchronous original.

```
            +------------------------ if_stage ------------------------+   +------- id_stage -------+
 ROM <----> | if_mem_interface <--> if_buffer[0] <--> if_fetcher_ctrl | <-> | id1_stage <-> id2_stage | --> of_*
            |                  <--> if_buffer[1] <-->                  |   |                   ^     |
            +----------------------------------------------------------+   +-------------------|-----+
                                                                                             jmp_*
```

## The fetch stage and its buffer policy

The IF stage answers one request at a time: "give me the byte at address
*pc*". It has three parts.

- **`if_buffer`** holds a window of `BYTES` (default 32) consecutive program
  bytes. The window can start at any address; it need not be aligned. A
  *write* action makes the buffer load a new window, one ROM byte at a time,
  starting at the given address. A *read* action returns one byte of the
  window in the next cycle. A buffer does one action at a time, so a read that
  arrives during a fill waits until the fill is done.
- **`if_mem_interface`** owns the single ROM port. When several buffers want
  a ROM byte at the same moment, the lowest-numbered buffer wins (fixed
  priority). The interface remembers which buffer it granted and hands the
  returned byte to that buffer only. One ROM access is in flight at a time.
- **`if_fetcher_ctrl`** keeps the window base of every buffer and decides
  what to do for each address:
  - **Hit:** the first buffer, in index order, whose window holds *pc* gets a
    read. The byte goes to ID.
  - **Miss:** every buffer is flushed and refilled. Buffer *k* loads from
    `pc + k*BYTES`, so the buffers together cover `NBUF*BYTES` consecutive
    bytes from the missing address. The byte is then read from buffer 0,
    which is filled first because it has priority at the ROM.
  - **Last byte:** when a read returns the last byte of a window, that buffer
    is given a write for the window that follows all the others
    (`base + NBUF*BYTES`).

The last-byte rule is what makes two buffers better than one. In straight-line
code, execution leaves buffer 0 for buffer 1 just as buffer 0 starts loading
the window after buffer 1. The fill then overlaps with execution instead of
stalling it. With a single buffer, the refill starts only when the window has
been used up, and the next byte waits for the whole refill. The fetcher's
window bookkeeping changes when a write is *issued*. A read that hits a window
still being filled simply waits inside that buffer.

Hit latency, with the buffer idle, is three cycles from the accepting edge of
`pc_valid` to `byte_valid`. A fill costs `BYTES` ROM round trips.

## The decode stage: ID1, ID2 and the enclosure

**`id1_stage`** owns the program counter, which starts at 0000h after reset.
It sends the PC to IF, receives the opcode byte and decodes it in one cycle.
Opcodes whose low nibble is 6 to F are *regular*: the low bits name R0..R7 or
@R0/@R1, and the high nibble alone picks the operation (INC, DEC, ADD, ADDC,
ORL, ANL, XRL, MOV, SUBB, CJNE, XCH, XCHD/DJNZ). All other opcodes, 96 of them,
go through a full case statement. This split keeps the large decode
multiplexer small. The decode result is one bundle, `id_ctrl_t`, with four
parts:

| field | meaning |
|---|---|
| `act` (ActionCtrl) | remained bytes (0 to 2), what each byte means (`fmt_e`), branch kind (`br_e`) |
| `rd` (ReadOut) | up to two source locations (`loc_e`: A, B, C, Rn, @Ri, direct, #data, bit, /bit, DPTR, @DPTR, @Ri external, code, stack) |
| `wr` (WriteOut) | up to two destination locations |
| `op` (OpcodeOut) | the mnemonic (`op_e`) |

The reserved opcode A5h decodes as a one-byte `OP_RSVD` that reads and writes
nothing.

**`id2_stage`** takes the bundle and branches on the remained-byte count. It
fetches the remained bytes from `pc+1` and `pc+2` through the same IF port.
It then builds the `of_req_t` word: direct and bit addresses, immediate data,
`#data16`, the branch target, and the fall-through address (which is also the
return address of calls).

ID2 acknowledges ID1 only once it knows the address of the next instruction.
The acknowledge carries that address, and ID1 loads it into the PC. This
*enclosure* has two effects. ID1 never fetches a new opcode while ID2 still
needs the fetch port. And no instruction from a wrong path is ever fetched, so
nothing needs to be flushed. `id_stage` gives the fetch port to ID2 while ID2
holds an instruction, and to ID1 otherwise.

How the next address is found depends on the kind of branch:

| kind | instructions | next PC |
|---|---|---|
| `BR_NONE` | everything else | `pc + length` |
| `BR_REL` | SJMP | `pc + length + rel`, applied at once |
| `BR_ABS11` | AJMP, ACALL | `{next_pc[15:11], opcode[7:5], byte2}`, at once |
| `BR_ABS16` | LJMP, LCALL | `{byte2, byte3}`, at once |
| `BR_COND` | JC, JNC, JZ, JNZ, JB, JNB, JBC, CJNE, DJNZ | target or fall-through, selected by `jmp_taken` |
| `BR_IND` | JMP @A+DPTR, RET, RETI | `jmp_addr` |

Conditional and indirect branches depend on registers or flags that only the
later stages read. For these, ID2 first hands the instruction to OF. It then
holds `jmp_ready` high until the later stages answer with `jmp_valid`. Until
then the front end stalls.

## Interfaces and timing

All channels are valid/ready: a transfer happens on a rising edge where both
are high, and the sender keeps its data steady while waiting. Assertions in
the RTL check this stability rule. The flops reset synchronously while `rst_n`
is low.

| port group of `pa8051_decoder` | direction | notes |
|---|---|---|
| `rom_req_valid/ready`, `rom_addr[15:0]` | request out | one outstanding access |
| `rom_resp_valid`, `rom_resp_data[7:0]` | response in | one-cycle pulse, any latency |
| `of_valid/ready`, `of_req` (`of_req_t`) | to OF | one decoded instruction per transfer |
| `jmp_valid/ready`, `jmp_taken`, `jmp_addr[15:0]` | from the later stages | expected once after each `BR_COND` / `BR_IND` instruction |
| `ev_*` | out | one-cycle strobes: hit, miss, prefetch, ROM conflict, fill in progress, regular opcode, PC redirect, waiting for `jmp` |

Parameters: `NBUF` (number of buffers, default 2) and `BYTES` (buffer size,
default 32, a power of two). `NBUF = 0` builds an unbuffered IF stage. There,
every byte request goes straight to the ROM and the fetcher, buffers and
arbiter are left out. The program address space is the
full 64 KB.

Shared types live in `rtl/a8051_pkg.sv`. One module per file: `if_mem_interface`,
`if_buffer`, `if_fetcher_ctrl`, `if_stage`, `id1_stage`, `id2_stage`,
`id_stage`, `pa8051_decoder` (top).

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference predictions come from
`tb/tb_ref_pkg.sv`, an opcode map written independently of the RTL: lengths,
byte roles and branch kinds.

- `tb_if_buffer`: fills from random unaligned bases, then reads back in
  random order. It checks the fill addresses, the number of fills, that a
  read is held off during a fill, and that a fill takes at least two cycles
  per byte.
- `tb_if_mem_interface`: two random requesters share a ROM with random
  latency. It checks that each byte reaches the right requester and that
  buffer 0 has priority.
- `tb_if_fetcher_ctrl`: runs against model buffers. A reference predicts the
  exact sequence of buffer actions for every PC (hit, miss refill, last-byte
  prefetch).
- `tb_if_stage`: the whole IF stage on a random address stream. It checks
  every byte and the three-cycle hit latency.
- `tb_id1_stage`: all 256 opcodes. It checks the mnemonic, remained bytes,
  branch kind, the regular count (160) and that the next PC is honoured.
- `tb_id2_stage`: all 256 opcodes, four rounds. It checks the operand bytes
  fetched, the operands, targets, the next PC and the wait for `jmp`.
- `tb_id_stage` and `tb_pa8051_decoder`: end to end on a random 4 KB program,
  with random back-pressure and random branch outcomes. Every decoded
  instruction is checked against the reference walk. The run fails if any
  mechanism never occurred: hits, misses, prefetches, ROM conflicts, reads
  waiting on a fill, 0/1/2 remained bytes, regular and irregular opcodes, each
  branch kind, taken and not-taken branches, waits for `jmp`, OF
  back-pressure. `tb_pa8051_decoder` uses the default parameters.
- `tb_workload_additions` (with `tb/add_bench.sv`): a straight-line program
  of 256 `ADD A,#data` instructions on seven configurations side by side.
  The ROM latency is 4 cycles and OF is always ready:

  | buffers x bytes | cycles | relative to 2 x 32 |
  |---|---|---|
  | 1 x 32 | 6852 | 1.70 |
  | 2 x 32 | 4032 | 1.00 |
  | 3 x 32 | 4320 | 1.07 |
  | 2 x 8  | 3888 | 0.96 |
  | 2 x 16 | 3936 | 0.98 |
  | 2 x 64 | 4224 | 1.05 |
  | none   | 5375 | 1.33 |

  Two buffers beat one buffer and beat none, and a third buffer does not
  help. In this model every ROM byte costs the same, so a single buffer adds
  its refill stall without any burst advantage. It is therefore slower here
  than direct access. The original asynchronous memory made unbuffered
  fetching far more expensive (about 20 times slower than two buffers). In
  this clocked
  version, smaller buffers are slightly *faster* on this program, because the
  first miss refill is shorter. The asynchronous original was reported as
  slightly faster with larger buffers.

To run a testbench with plain Verilator (5.x), from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/a8051_pkg.sv tb/tb_ref_pkg.sv tb/tb_pa8051_decoder.sv \
  --top-module tb_pa8051_decoder -o sim
./obj_dir/sim
```

Replace the testbench file and top name to run the others.
`tb/rom_model.sv` is the behavioural ROM that the testbenches use. It has a
12-bit address by default, and configurable latency and jitter.

## Where this design departs from, or adds to, its source

- **Clocked, not asynchronous.** The handshake channels are valid/ready
  pairs. Simultaneous buffer requests, which the original settles with an
  arbiter element, are settled by a fixed priority.
- **Buffer fill addresses are this design's reading.** The source says that a
  miss refills all buffers and that the last byte triggers a refill. The start
  addresses (`pc + k*BYTES` and `base + NBUF*BYTES`) are chosen here.
- **Which opcodes count as regular** (low nibble 6 to F) is this design's
  choice, as are all field encodings (`op_e`, `loc_e`, `fmt_e`, `br_e`, the
  layout of `of_req_t`).
- **The `jmp` channel** (a taken bit or a target address from the later
  stages) is this design's protocol for resolving conditional and indirect
  branches.
- **Not built:** the OF, EXE and WB stages, the RAM interface and its read
  arbiter, and the RAM. The source names them but does not describe them.
  The pipeline drawing also shows the RAM interface feeding the decode
  stage. What the decoder would read there is not described, so `id_stage`
  has no RAM port. The 8051's peripherals (timers, UART, interrupts, I/O
  ports) belong to the processor, not to this front end.
- **The unbuffered configuration** (`NBUF = 0`) is the simplest direct
  path. The source only reports how it performs.
- **Not reproduced:** the FPGA area and delay figures and the comparison with
  a single-cycle 8051. These depend on the asynchronous gate-level
  implementation and on the whole processor.
