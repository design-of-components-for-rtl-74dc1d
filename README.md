# Generic 16-bit microprocessor components

Replacing an obsolete 16-bit microprocessor usually means reverse-engineering
one chip at a time. This design takes the opposite route: it builds a small
set of generic parts that recur in almost every 8- and 16-bit CISC processor
(8085, 6800, Z80, 8051 family, 8086, Z8000 and others), so that a replacement
for a particular processor can be assembled from them and a
processor-specific instruction decoder and microprogram. The parts are:

- a **register file** of four dual-port 8x8 memories, used as 16 word registers
  or 16 byte registers;
- an **effective address calculator**, a five-stage state machine that
  covers the eight addressing modes found across these processors;
- a **barrel shifter** that shifts or rotates 16 bits by any count in one step;
- a **priority encoder** that turns reset, interrupt and control pins into the
  next CPU state;
- a **shift-and-add multiplier**. It uses the barrel shifter to form one
  partial product per clock, so a 16x16 multiply needs at most 16 clocks.

A top level, `generic_cpu`, wires them into a working microprogrammed core
with a simple ALU. The instruction decoder is left outside, because it is
different for each target processor.

All sources are SystemVerilog-2017: synthesizable RTL in `rtl/` and
self-checking testbenches in `tb/`.

## Architecture

```
             ctrl_req[7:0] ──► priority_encoder ──► request select ──► PC
                                                          │
 mem_rdata ──► ir ──► (external decoder) ──► dec ──► ea_calc (5-stage FSM)
                                                   │  ext / ea / operand
                         ┌─────────────────────────┘
                         ▼
        reg_file  port S ──► source mux (reg / immediate / memory) ──┬──► alu ───────────┐
                  port D ──────────────────────────────────────────┴──►(barrel_shifter) ├─► result
                                                                   └──► shift_add_mul ──┘     │
                  write at adr_D ◄─────────────────────────────────────────────────────────────┘
```

The datapath is a two-read, one-write register file that feeds the ALU. Port
S supplies the source operand and port D the destination operand. The result
goes back to the register at the D address, or to memory at the effective
address. The control path is the effective address state machine, plus a
small amount of glue in `generic_cpu`: the program counter, the instruction
register, write-back control and request handling. The microprogram ROM,
instruction decoder, return-address stack and bus interface unit of a full
processor are not part of this RTL. Their signals appear as ports instead
(see "Limits").

## The effective address state machine (`ea_calc`)

This block is the part that is hardest to read from the code alone.

Every instruction takes **exactly five clocks**, whatever its addressing
mode. The one exception is a multiply, which holds stage 5 (see below). The
five stages are:

| stage | work |
|---|---|
| 1 | fetch the instruction at PC |
| 2 | fetch the extension word (address, displacement or immediate data) at PC |
| 3 | add: form the effective address |
| 4 | fetch the operand at EA |
| 5 | execute and write back |

A stage that a mode does not need is spent in a `SKIP` state. The state
graph is:

```
FETCH_INST ──mode=00x──► SKIP ◄──┐ (self loop)
     │                    │  └───┘
     └─other──► FETCH_EXT ──01x──► SKIP
                    │              ├─ mode 0x0, stage 4 ──► EXECUTE
                    └─1xx──► ADD   └─ other,   stage 3 ──► FETCH_OPND
                              └──────────────────────────► FETCH_OPND ──► EXECUTE ──► FETCH_INST
```

A stage counter (1..5) decides how long `SKIP` lasts. This gives the
following stage table (Rn is read on register port S, D16 is the extension
word):

| mode | name | 2 | 3 | 4 | EA / data |
|---|---|---|---|---|---|
| 000 | register | skip | skip | skip | operand is register Rn |
| 001 | indirect | skip | EA=[Rn] | fetch @EA | [Rn] |
| 010 | immediate | fetch D16 | skip | skip | data = D16 |
| 011 | direct | fetch D16 | EA=D16 | fetch @EA | D16 |
| 100 | indexed | fetch D16 | add | fetch @EA | [Rn] + D16 |
| 101 | base | fetch D16 | add | fetch @EA | D16 + [Rn] |
| 110 | relative | fetch D16 | add | fetch @EA | PC + D16 |
| 111 | base indexed | read [Rn2] | add | fetch @EA | [Rn1] + [Rn2] |

Points to note:

- **The decoder must decode in stage 1.** The machine is Mealy-type: the
  branch out of `FETCH_INST` depends on the mode of the instruction being
  fetched. For this reason `generic_cpu` presents the memory data bus on its
  `ir` output during stage 1, and the registered instruction afterwards. The
  external decoder must return `dec` combinationally from `ir`.
- **Relative mode** adds the PC after it has stepped past the displacement
  word. In other words, the PC is the address of the next instruction.
- **Base-indexed mode** uses stage 2 for a register read of the index (Rn2;
  `reg_sel_rx` switches port S to it) instead of a memory fetch. Only this
  mode does not step the PC in stage 2.
- **Indirect mode** latches EA=[Rn] in its stage 3 `SKIP` state, and direct
  mode latches EA=D16 there. Neither accesses memory in that stage.

## Register file (`reg_file`, `dp_ram`)

There are two memory blocks. The lower block holds register addresses 0-7
and the upper block holds 8-15. Each block is a pair of dual-port 8x8
memories: an LSB memory for bits 7-0 and an MSB memory for bits 15-8. Every
memory has read addresses S and D and is written at address D.

- **Word mode** (`mode=1`): both memories of the addressed block take part.
  Register *n* is a 16-bit word.
- **Byte mode** (`mode=0`): only the LSB memories are used. There are 16 byte
  registers, and byte register *n* is the low byte of word register *n*. A
  byte write leaves the MSB memory untouched. A byte read appears in bits 7-0,
  with bits 15-8 either zero (`repl=0`) or a copy of the byte (`repl=1`).
- Reads are combinational. The write takes place at the rising edge when
  `we=1`, at `adr_d`. The data written is `data_in`.
- Double and quadruple words take two or four word accesses, sequenced by
  the controller. This gives eight double-word or four quad-word registers.
- `BLOCK_DEPTH` (default 8) enlarges the file, for example to 32 words. An
  accumulator-style processor can fix one of the addresses at a constant.

The memories have no reset. Software, or a testbench, must write a register
before it reads it.

## Barrel shifter (`barrel_shifter`)

This is combinational logic with inputs `d[15:0]`, `s_r` (0 shift,
1 rotate), `l_r` (0 left, 1 right) and `n_shift[3:0]`. Shifts fill with
zeros. A rotate ORs the shifted word with the bits that fall out, brought in
from the other end. For example, with `d = 1001001011010101`:

- left-shift 3 gives `1001011010101000`;
- left-rotate 5 gives `0101101010110010`;
- right-shift 7 gives `0000000100100101`.

Inside the core, the shifter is built into the ALU. It works on the
destination operand, with the count taken from the decoded instruction.

## Shift-and-add multiplier (`shift_add_mul`)

This is a sequential, unsigned 16x16 → 32-bit multiplier. A one-clock
`start` captures the operands `a` and `b`.

In each of the following clocks, step *i* adds `a << i` to the product if
bit *i* of `b` is set. The 32-bit shifted multiplicand comes from two barrel
shifters: one shifts left by *i* to give the low half, and the other shifts
right by 16−*i* to give the high half (zero when *i* = 0).

The loop stops after the highest set bit of `b`. A multiply therefore takes
max(1, msb(b)+1) add/shift clocks, followed by a one-clock `done` strobe with
the product on `p`. The worst case is 16 clocks, where a one-bit-per-clock
shifter would need up to 256. `cancel` drops a multiply in progress.

In the core, `MUL rd, src` holds the execute stage until `done` arrives. The
instruction then takes 6 + max(1, msb(src)+1) clocks. The low product word
is written to `rd`, and the high word is shown on `prod_hi`.

## Priority encoder (`priority_encoder`)

This is a combinational 8-to-3 encoder. `i[7]` has the highest priority.
When `ei=1`, output `a` is the index of the highest input that is high, and
every lower input is masked. `eo` is high only when `ei=1` and no input is
high. Feeding `eo` into the `ei` of a second encoder cascades the two into a
16-input encoder. With `ei=0`, both `a` and `eo` are 0.

The masking is real priority encoding. A cheaper form, which ORs each output
bit from a fixed set of inputs (for example a2 = i7|i6|i5|i4), gives the same
answer only when a single input is high. For `00010011` it would produce
`101` instead of `100`.

## Top level (`generic_cpu`)

**Memory bus.** `mem_addr`, `mem_rd`, `mem_wr`, `mem_wdata` and `mem_rdata`.
One 16-bit word is transferred per access. Read data must be valid in the
same cycle as `mem_rd`, and a write takes place at the clock edge.
Addresses count words, and the PC steps by `WORD_STEP` (default 1) for each
fetched word.

**Decoder.** `ir` is the instruction word. `dec` (`gmp_pkg::decoded_t`)
returns the decoded fields:

- the addressing mode;
- `rs` (the source or pointer register, Rn1);
- `rx` (Rn2);
- `rd` (the destination, read on port D and written back);
- the operation and the shift count;
- byte/word mode and byte replication;
- `dst_mem`, which sends the result to memory at EA instead of to `rd`. It
  is ignored in register and immediate modes.

**Operations** (`alu_op_e`): MOV, ADD, SUB, AND, OR, XOR, INC, DEC, CLR, CMP
(flags only), SHL, SHR, ROL, ROR, MUL and JMP. For MUL, carry means the high
product word is non-zero. JMP loads the PC with the immediate
word in immediate mode, or with EA in the other modes. The carry and zero
flags are updated by every operation except JMP.

**Source operand.** In register mode the source is port S. In immediate mode
it is the extension word. In all other modes it is the operand fetched from
memory. Addresses are always read from registers as words. The instruction's
byte/word mode applies only in the execute stage.

**Requests.** `ctrl_req[7:0]` drives the priority encoder, and `int_en` is
its enable. The highest pending request is taken at the end of an execute
stage. When that happens, the PC is loaded from `VEC_TABLE[code]` and
`req_ack` pulses with `req_code`. `ctrl_req[7]` is the reset request, which
loads `RESET_ADDR`. With `RESET_ABORTS=1` (the default), a reset request
takes effect at once: the instruction in flight is abandoned with no
register or memory write, and fetching restarts. With `RESET_ABORTS=0`, the
reset request waits for the end of the current instruction like any other
request. Requests are levels, so a requester must drop its pin after
`req_ack`. No return address is saved. While a multiply holds the execute
stage, only a reset request is taken; it cancels the multiply.

**Latched requests.** With `LATCH_REQUESTS=1`, each rising edge on a request
pin sets a pending latch. The encoder then looks at the latches instead of
the pins, and an acknowledge clears the latch it served. A one-clock pulse is
therefore never lost: it waits until every higher-priority request has been
served. A pin that stays high is served only once. With the default of 0, the
encoder looks at the pins directly.

**Parameters.**

| parameter | default | meaning |
|---|---|---|
| `RESET_ADDR` | 0000h | start address |
| `VEC_TABLE` | 0000h, 0100h, …, 0600h, 0000h | PC for request code 0..7 |
| `WORD_STEP` | 1 | PC step per word |
| `RESET_ABORTS` | 1 | reset request aborts the current instruction |
| `LATCH_REQUESTS` | 0 | store request edges in pending latches |
| `RF_BLOCK_DEPTH` | 8 | registers per register-file block |

`rst_n` is an asynchronous active-low reset of the state machine, PC,
instruction register and flags.

## Where this RTL goes beyond, or departs from, its source description

The four components follow the published description. The register file's
organisation and byte/word behaviour, the barrel shifter's function and
encodings, the priority encoder's truth table and the state machine's states,
transitions and stage table all come from it. The following are this
design's own choices:

- all clocking and bus timing: one clock per stage, combinational reads, and
  memory data in the same cycle;
- the `repl` pin, which selects zero fill or replication;
- the relative-mode PC value;
- in indirect mode, latching EA in stage 3 (the published stage table shows a
  skip there, while its worked examples compute EA in that stage);
- following the truth table rather than a gate-level OR form for the
  priority encoder;
- the whole ALU: its operation set, encoding and flags. The source names the
  ALU only as a part still to be designed;
- the multiplier's sequencing, early stop and handshake. Only its principle
  and the 16-cycle bound are given;
- edge-triggered setting of the optional request latches;
- the instruction-execution glue in `generic_cpu`: vector table values,
  request timing, the decoded-field interface and memory destinations.

The fixed propagation delays of the original simulation models are not
modelled.

## Limits

- There is no divider. The multiplier is unsigned, and only the low product
  word is written back.
- There is no micro-code ROM, instruction decoder, return-address stack,
  interrupt/trap controller beyond the priority encoder, CPU run/wait state
  machine, or bus interface unit. These are processor-specific or
  undescribed, so the core exposes the memory bus and the decoder interface
  directly.
- Multi-word (32/64-bit) operands need microprogram sequencing. The core
  does not issue it.
- In byte mode, only the low byte of each word is addressable. Processors
  whose byte registers include high halves (for example the Z8000 RH0-RH7)
  need address mapping in their decoder.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gmp_pkg.sv tb/tb_generic_cpu.sv \
          --top tb_generic_cpu -Mdir obj -o sim && obj/sim
```

Replace the testbench and top name for the others:

| testbench | what it checks |
|---|---|
| `tb_barrel_shifter` | all counts and operations against a bit-level reference, plus the worked examples above |
| `tb_priority_encoder` | all 256 inputs, enabled and disabled; two encoders cascaded into 16 inputs |
| `tb_dp_ram` | random writes and reads on both ports |
| `tb_reg_file` | random byte/word traffic against a word model; high byte kept in byte writes; zero fill and replication |
| `tb_alu` | every operation with random and corner operands; flags and write-back |
| `tb_ea_calc` | for all 8 modes: state of each stage, 5-clock length, EA, operand, immediate, PC advance, hold, restart |
| `tb_shift_add_mul` | products against the built-in multiply; clocks per multiply; cancel |
| `tb_regfile_instructions` | register-file reads and writes of 21 common instructions of the same processors, in byte or word mode |
| `tb_reset_request` | reset request aborting an instruction (`RESET_ABORTS=1`) versus waiting for its end (`RESET_ABORTS=0`) |
| `tb_latched_requests` | pulses served late and in priority order with `LATCH_REQUESTS=1`, lost without it; a held pin served once |
| `tb_generic_cpu` | end to end, against an instruction-level reference model, at default parameters: all modes, ops, byte/word/replicate, memory destination, jumps, interrupts, priority masking, disabled requests, multiplies holding the execute stage, and a reset request aborting a rotate (the sequence `ADD CX,[BX]; ROL CX` with reset) |
| `tb_mode_examples` | 21 addressing-mode examples from 8085, 6800, Z80, 8051, 8086, Z8002, 8048, 8031, Z8000, 8748, 8751 and 8035 programs, with register names mapped onto R0-R15, checked result by result and stage by stage |

Each testbench completes in well under a second.
