# A single-bus, microprogrammed MIPS-subset computer

This is the kind of processor that could be wired from a pile of TTL parts.
All registers hang on **one 32-bit bus**. The control unit is a **state
machine written as a list of named control signals per state**. Each
instruction takes several clocks, and the clocks are easy to count. The
machine runs four MIPS instructions: `add`, `and`, `lw` and `sw`. It comes
with a main memory. The memory answers reads after a fixed latency and
signals completion with **MFC** ("memory fetch complete").

The design is built for teaching, not speed. Every register transfer
is visible: in each clock, exactly one source drives the bus, any number of
registers latch it at the clock edge, and the ALU always computes
`op(Y, bus)`.

## The machine

```
             +---------+   MFC  <------------------------------+
             | control |   read/~write, strobe  -------------+ |
             +---------+                                     v |
                  ^ IR                                    +--------+
 IR  <-in/out->  |B|  <-in/out-> MAR  ------ address ---->|        |
 PC  <-in/out->  |U|  <-in/out-> MDR  <----- data ------->| memory |
 Y   <-in/out->  |S|  <-in/out-> register file (32 x 32)  +--------+
 Y ----+          |
       v          v
      [     ALU     ]  (Y, bus)
             |
             v in
             Z  ---out---> bus
```

| module (`rtl/`) | role |
|---|---|
| `simple_mips_system` | top: processor + memory + bidirectional data link |
| `processor` | control unit + datapath + memory-request flops |
| `control_unit` | microprogram sequencer (state register, UNTILmfc wait, JUMP, JUMPop, HALT) |
| `op_decoder` | "when mask match label" dispatch table for JUMPop |
| `datapath` | IR, PC, MAR, MDR, Y, Z, register file, ALU, bus |
| `system_bus` | the shared bus: tri-state drivers modelled as AND-OR, conflict flag |
| `alu` | add, and, xor, or, shift left, set-less-than, shift right, subtract |
| `reg_file` | 32 registers, one bus port, register chosen by IR's rs/rt/rd field |
| `dff_reg` | D flip-flop register with load enable (IR, PC, MAR, MDR, Y, Z) |
| `memory` | strobe/rnotw/MFC protocol, read latency counter |
| `sram_array` | decoder + one register per word + decoder-selected read |
| `data_link` | one set of data wires shared by both directions |
| `mips_pkg` | types, the control word, the microprogram, the decode table |

## Control signals

One clock equals one *state*. A state is a set of named signals. This is
`mips_pkg::ctrl_word_t`:

* **Bus drivers** (at most one per state): `PCout`, `MARout`, `MDRout`,
  `Yout`, `Zout`, `REGout`, `IRimmedout` (IR[15:0] sign-extended),
  `IRoffsetout` (IR[15:0] sign-extended, shifted left 2, for branches),
  `IRaddout` (`{PC[31:26], IR[25:0]}`, the jump field with the top six PC
  bits) and `CONST(value)`.
* **Register loads**: each loads from the bus at the end of the clock.
  `IRin`, `PCin`, `PCinif0` (load PC only if Z holds zero), `MARin`,
  `MDRin`, `Yin`, `REGin` and `Zin`. `Zin` is the exception: it loads the
  ALU output.
* **Register-file select**: `SELrs`, `SELrt` or `SELrd` decides which IR
  field addresses the register file for `REGout` and `REGin`.
* **ALU**: `ALUadd`, `ALUand`, `ALUxor`, `ALUor`, `ALUsl` (bus << Y),
  `ALUslt` (Y < bus, signed), `ALUsrl` (bus >> Y) and `ALUsub` (Y − bus).
  Shifts use Y[4:0].
* **Memory**: `MEMread` and `MEMwrite`. Both use MAR as the address;
  `MEMwrite` writes MDR.
* **Sequencing**: `JUMP(label)`, `JUMPop` (dispatch on the instruction),
  `UNTILmfc` (repeat this state until the memory raises MFC) and `HALT`.

The datapath supports the whole signal set. The microprogram uses only part
of it. The table also defines `IRaddout`, `IRoffsetout`, `PCinif0`, the
other ALU operations, `Yout` and `MARout`. These exist for branches, jumps
and other instructions, and `tb_datapath` exercises them directly.

## The microprogram and where the clocks go

The program below is in `mips_pkg::microcode`. A state without a jump
continues with the next one.

```
Start:    PCout, MARin, MEMread, Yin         fetch: MAR = Y = PC, start read
          CONST(4), ALUadd, Zin, UNTILmfc    Z = PC + 4, wait for the word
          MDRout, IRin                       IR = fetched word
          JUMPop, Zout, PCin                 PC = PC + 4, dispatch on IR
          HALT                               reached only if nothing matched
Add:      SELrs, REGout, Yin
          SELrt, REGout, ALUadd, Zin
          Zout, SELrd, REGin, JUMP(Start)
And:      (as Add with ALUand)
Lw:       SELrs, REGout, Yin
          IRimmedout, ALUadd, Zin            Z = rs + imm
          Zout, MARin, MEMread
          UNTILmfc
          MDRout, SELrt, REGin, JUMP(Start)
Sw:       SELrt, REGout, MDRin
          SELrs, REGout, Yin
          IRimmedout, ALUadd, Zin
          Zout, MARin, MEMwrite, JUMP(Start) no wait for the write
```

**Dispatch.** `op_decoder` holds entries of the form *when mask match
label*. In the `JUMPop` state the first entry with `(IR & mask) == match`
gives the next state. The entries use the standard MIPS encodings:

| instruction | opcode | funct |
|---|---|---|
| `add` | 0 | 0x20 |
| `and` | 0 | 0x24 |
| `lw` | 0x23 | — |
| `sw` | 0x2b | — |

For `add` and `and`, the mask also requires shamt = 0. A word that matches
no entry falls through to `HALT`.

**Memory timing.** `MEMread` and `MARin` are in the same state, so the
memory request must wait for the new MAR. The processor therefore
registers the request: `strobe` is high for the one clock after the
`MEMread` or `MEMwrite` state, and `rnotw` says which kind of request it
is. The memory raises `mfc` in the `LATENCY`-th clock of the access,
counting the strobe clock as the first. In that same clock, MDR latches the
read data and the `UNTILmfc` state may move on. With the default
`LATENCY = 2`, every `UNTILmfc` state runs twice.

The resulting clock counts are:

| sequence | clocks (LATENCY = L) | L = 2 |
|---|---|---|
| fetch + dispatch | L + 3 | 5 |
| add, and | + 3 | 8 |
| lw | + L + 4 | 11 |
| sw | + 4 | 9 |
| illegal word | + 1, then `halt` | 6 |

A store is not waited on. Its one-clock write happens during the next
`Start` state, before that state's own read request is issued.

**Halting.** `halt` rises at the clock edge that ends the HALT state. After
that the control word is forced to "no signals" and the state holds until
reset.

## Memory side

`memory` puts the request protocol in front of `sram_array`:

* A **write** (`strobe` with `rnotw = 0`) is done at the end of the strobe
  clock and gives no reply.
* A **read** captures the addressed word into `dread` at the end of the
  strobe clock and raises `mfc` for one clock, `LATENCY − 1` clocks later.
* Only one read may be outstanding. An assertion checks this.
* Requests are ignored while `reset` is high.

`sram_array` is a decoder, one register per word and a read path selected
by the decoder. A word is written when its decoder line, `strobe` and
"not read" are all on. The drawn circuit uses tri-state drivers for the
read path; this version uses an AND-OR. It also uses a synchronous write
enable instead of clocking each word with the gated strobe.

The processor and memory share **one set of data wires** (`data_link`).
During a read the memory drives them; during a write the processor's MDR
drives them. Both sides read the same wires.

In the system, memory is word-organised. The word index is
`MAR[MEM_ABITS+1:2]`, so byte addresses step by 4 as PC does. Higher MAR
bits are not decoded, so addresses alias every 4 KiB with the default size.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `simple_mips_system` | `MEM_ABITS` | 10 | memory has 2^10 32-bit words (own choice) |
| `simple_mips_system` | `MEM_LATENCY` | 2 | read latency in clocks, at least 2 |
| `memory`, `sram_array` | `ABITS`, `DBITS` | 8, 16 | stand-alone defaults (256 × 16 bits) |
| `reg_file` | `NREGS` | 32 | registers |
| `system_bus` | `N`, `W` | 10, 32 | sources, width |

## Departures and own choices

* **Tri-state buses.** These are built as AND-OR selection in
  `system_bus`, `sram_array` and `data_link`. An undriven bus reads 0. The
  design never enables two drivers at once, and an assertion checks this.
* **Clocked memory.** The memory runs on the system clock. It is not
  triggered by the strobe's edge and has no delays.
* **MFC is a one-clock pulse.** It does not stay high until the next
  request. Because the request is registered, a held MFC would still be
  high in the first clock of the next `UNTILmfc` wait and end it early.
* **Registered request, latency counting and reset.** The registered
  memory request and the way latency is counted (above) are this design's
  own. So is the synchronous reset, which clears every register, sets PC
  to 0 and starts at `Start`.
* **`IRaddout` uses the top six PC bits**, as the signal is defined. Real
  MIPS uses four bits and shifts the field left by 2.
* **`ALUslt` is signed.** Register 0 reads zero and ignores writes, as in
  MIPS.
* **Not built:**
  * the transistor-level parts: the tri-state and open-collector output
    stages and the one-transistor DRAM cell;
  * the clock-period trade-off. It is an argument about path delays, and
    this design has no delay model.
* **Instruction set.** Only add, and, lw and sw have microcode. The control
  signals for branches (`IRoffsetout`, `PCinif0`), jumps (`IRaddout`) and
  the other ALU operations are all in the datapath. Adding an instruction
  takes three edits: write its states in `microcode`, extend `ustate_t`, and
  add a `DECODE` entry.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`:

* `tb_alu`, `tb_reg_file`, `tb_system_bus`, `tb_op_decoder`,
  `tb_sram_array`, `tb_data_link` and `tb_dff_reg` test against reference
  expressions, using random and corner-case stimulus.
* `tb_memory` checks the MFC clock for latencies 2 and 5, and runs a
  65536 × 8-bit memory with the same timing.
* `tb_control_unit` follows the state trace of every instruction. It covers
  memory waits of 1 to 3 clocks and checks the clock counts in the table
  above.
* `tb_datapath` drives hand-made control words through every bus source,
  every register and every ALU operation, and through `PCinif0`.
* `tb_processor` runs random add/and/lw/sw programs on a behavioural memory
  (`tb_mem_model`) with latencies 2, 3 and 6. It compares the memory and the
  clocks to halt against an instruction-level reference model
  (`mips_ref_pkg`).
* `tb_simple_mips_system` runs the whole machine at its default size. The
  program is about 300 random instructions plus a register dump; it runs in
  roughly 2,800 clocks. The test checks:
  * the clock count and all 1024 memory words against the reference model;
  * that each mechanism happened at least once: memory waits, dispatch to
    each instruction, reads, writes, writes to register 0 and the
    illegal-instruction halt.

Simulate any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/mips_ref_pkg.sv \
  tb/tb_simple_mips_system.sv --top-module tb_simple_mips_system -o sim
./obj_dir/sim
```

Testbenches load programs by writing the memory array hierarchically
(`dut.u_mem.u_array.mem[w]`) before releasing reset. The helpers in
`mips_asm_pkg` encode instructions.
