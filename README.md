# A microprogrammable 8-bit teaching machine

This is a small 8-bit accumulator computer with an Intel 8080-like register
set. It has no fixed instruction set. All of its control comes from a 31-bit
*horizontal* microinstruction: each bit drives one control line. A bit either
puts a register on the data bus, clocks a register from the bus, increments a
counter or starts a memory cycle. The user supplies three tables:

1. the **microprogram** (up to 512 words of 31 bits);
2. the **instruction decoder** table, which maps each 8-bit op code to the
   microprogram address where that instruction's microcode starts;
3. the **machine program** in the 64 KB memory.

Together the three tables define an instruction set and run a program on it.
The machine can also run with a two-stage (fetch / execute) or three-stage
(fetch / decode / execute) instruction pipeline. That shows how overlap
changes both the microcode and the cycle count.

This RTL follows a published description of a teaching simulator for such a
machine. That description gives the register set, the bus structure, the
meaning of every microinstruction bit and the pipeline register placement.
Where it leaves a point open or contradicts itself, this design makes a
choice. Those choices are listed in "Choices made in this design" near the
end of this file.

## The machine at a glance

| Part | Size | Notes |
|---|---|---|
| Internal data bus | 8 bits | One source per microinstruction. It reads 0 when nothing drives it. |
| Accumulator A, registers B C D E H L | 8 bits each | Read and written through the IR's register fields. |
| T (temporary) | 8 bits | For microcode only. It feeds the ALU and cannot be read back onto the bus. |
| ALU | 8 bits, 16 functions | Operands are A and T. The result goes to A. |
| Flags | C Z S P | The ALU loads them. The microcode can test them. |
| PC, SP | 16 bits | Loaded and read one byte at a time. The PC can also increment. |
| MAR | 16 bits | Loaded from PC, SP, H:L or zero. It drives the address bus. |
| MBR | 8 bits | Connects the internal data bus to the external data bus. |
| IR | 8 bits | Bits 2:0 select the source register. Bits 5:3 select the destination. |
| Microprogram counter | 9 bits | Addresses the 512 x 31 control store. |
| Program/data memory | 64K x 8 | Memory cycles have bit 30 = 1. |
| Input port | 8 switches | Read in an I/O cycle with address bit 15 set. |
| Output port | 8 bits, two BCD digits | Written in an I/O cycle with address bit 14 set. It drives two 7-segment displays. |

Module tree:

```
mp_system                 whole machine (top)
├── mp_cpu                CPU
│   ├── control_store     512 x 31 microprogram memory
│   ├── upc_logic         microprogram counter + 8:1 reset-condition mux
│   ├── ir_pipeline       IR and the pipeline registers
│   │   └── reg_decoder   3:8 read (source) and write (destination) decoders
│   ├── instr_decoder     256 x 9 op code -> microcode address table
│   ├── gp_regfile        A B C D E H L
│   ├── byte_reg          T
│   ├── alu, flag_reg     16-function ALU and C Z S P
│   ├── program_counter, stack_pointer
│   ├── mar_unit          4:1 address mux + MAR
│   └── mem_buffer        MBR
├── prog_mem              64K x 8
└── io_ports              input port, output port
    └── bcd_7seg          (two of them)
```

`mpsim_pkg` holds the shared types. These are the microinstruction struct
`uinstr_t`, the ALU function, condition, MAR-source and pipeline-mode enums,
and `flags_t`.

## The microinstruction word

Every clock in which the machine runs executes one word. All bits are active
high. In a field of several bits, the lowest bit number is the least
significant bit.

| Bit(s) | Field in `uinstr_t` | Action |
|---|---|---|
| 0 | `upc_inc` | Increment the microprogram counter. |
| 1 | `upc_load` | Load the microprogram counter from the instruction decoder. This is the dispatch, and it also advances the instruction pipeline. |
| 2 | `ir_clk` | Clock the data bus into the IR. In a pipelined mode it goes into the register in front of the IR instead. |
| 3 | `carry_fwd` | Forward the carry flag into the ALU. |
| 6:4 | `cond_sel` | Reset condition: 0 never, 1 always, 2 carry, 3 zero, 4 sign, 5 parity, 6 and 7 never. |
| 10:7 | `alu_fn` | ALU function (table below). |
| 11 | `t_clk` | Clock the bus into T. |
| 12 | `mbr_ext_oe` | The MBR drives the external data bus with the internal bus. This is the write data. |
| 13 | `mbr_int_oe` | The MBR drives the internal bus with the external bus. This is the read data. |
| 14 | `rdec_en` | Put the register named by the source field of the IR on the bus. |
| 15 | `wdec_en` | Clock the bus into the register named by the destination field of the IR. |
| 16 / 17 | `sph_oe` / `spl_oe` | Put the SP high or low byte on the bus. |
| 18 / 19 | `sph_clk` / `spl_clk` | Clock the bus into the SP high or low byte. |
| 20 / 21 | `pch_oe` / `pcl_oe` | Put the PC high or low byte on the bus. |
| 22 / 23 | `pch_clk` / `pcl_clk` | Clock the bus into the PC high or low byte. |
| 24 | `pc_inc` | Increment the PC. |
| 26:25 | `mar_sel` | MAR source: 0 zero, 1 PC, 2 SP, 3 H:L. |
| 27 | `mar_clk` | Clock the selected source into the MAR. |
| 28 | `mem_rd` | Read cycle. |
| 29 | `mem_wr` | Write cycle. |
| 30 | `io_m_n` | 1 = memory cycle, 0 = I/O cycle. |

### Timing within a word

The original simulator animates each microinstruction in three phases. In the
read phase the enables act, in the write phase the clocks act, and then it
pauses. In this RTL a microinstruction takes one clock period:

- All enables are combinational in that period, and the bus settles.
- Every clock bit acts on the rising edge that ends the period.

So one word can read a register and write another, which is a full
register-to-register move. Memory reads are asynchronous, so one word can
also read a memory byte and clock it into a register.

### Sequencing

Every edge, the microprogram counter does one of four things, in this order
of priority:

1. It resets to 0 if the input chosen by `cond_sel` is 1.
2. It loads the decoder output if `upc_load` is set.
3. It increments if `upc_inc` is set.
4. Otherwise it holds.

A word with none of these bits set therefore stops the machine. This is how
a HLT instruction is written.

Conditional reset is the only branch. It is enough for two jobs:

- **Ending an instruction.** The instruction fetch lives at address 0, so
  every routine ends by resetting the counter.
- **Conditional instructions.** A routine can return early when a flag is set.

The usual fetch is two words:

```
0: MAR <- PC, PC <- PC + 1, uPC <- uPC + 1      (bits 0, 24, 25, 27)
1: read memory, MBR -> bus, bus -> IR, dispatch  (bits 1, 2, 13, 28, 30)
```

In the non-pipelined mode the decoder sees the byte on the bus during word 1,
so word 1 can fetch the op code and dispatch on it.

## Register fields and the two decoders

The IR is split as `ii DDD SSS`:

- `SSS` (bits 2:0) feeds the *read decoder*. Bit 14 puts that register on the
  bus.
- `DDD` (bits 5:3) feeds the *write decoder*. Bit 15 clocks that register.

The register codes are 000 B, 001 C, 010 D, 011 E, 100 H, 101 L and 111 A.
Code 110 selects nothing. A microprogram can use 110 to mean "memory at
H:L", as the 8080 does: it sets the MAR from H:L and reads or writes memory.

With this layout, `01 DDD SSS` is an 8080-style MOV that takes one word, and
`10000 SSS` is an ADD that names only its source. The accumulator is the
implied operand.

## The ALU loop

The ALU always works on A and T. No microinstruction bit clocks A from the
ALU. Instead, every ALU function other than 0 writes its result to A and
loads all four flags in the same edge. CMP is the exception: it loads only
the flags.

A two-operand operation therefore takes two words:

1. The source register goes to T (bits 14 and 11).
2. The ALU function is applied.

The function codes are this design's own. The original description names a
16-function ALU but does not list the functions.

| Code | Function | A gets | C gets |
|---|---|---|---|
| 0 | none | unchanged | unchanged (flags not loaded) |
| 1 | ADD | A + T + cin | carry out |
| 2 | SUB | A − T − cin | borrow |
| 3, 4, 5 | AND, OR, XOR | A op T | 0 |
| 6 | NOT | ~A | 0 |
| 7, 8 | INC, DEC | A ± 1 | carry / borrow |
| 9 | rotate left | {A[6:0], in} | A[7] |
| 10 | rotate right | {in, A[7:1]} | A[0] |
| 11 | PASS | T | 0 |
| 12 | CMP | unchanged | borrow of A − T (flags only) |
| 13 | NEG | −A | 1 unless A = 0 |
| 14 | CLR | 0 | 0 |
| 15 | SWAP | nibbles of A swapped | 0 |

In this table:

- `cin` is the carry flag when bit 3 is set, and 0 otherwise. ADD and SUB with
  bit 3 set give ADC and SBB.
- For the rotates, `in` is the carry flag when bit 3 is set. Otherwise it is
  the bit rotated out, which gives a plain 8-bit rotate.
- Z is 1 when the result is zero. S is result bit 7. P is 1 for even parity.

## The pipeline modes

The `mode` input selects the pipeline mode (value 3 acts as 2). Change it
only while `rst` is held. The modes differ only in `ir_pipeline`, which holds the four extra
registers: one in front of the IR, one after the instruction decoder, and
one after each register decoder. Microcode uses the same two bits in every
mode:

- bit 2 captures a fetched byte;
- bit 1 dispatches the next instruction.

What changes is how far ahead of the executing instruction the fetched
bytes run.

**Mode 0: no pipeline.** Bit 2 loads the IR directly. The IR is the
instruction being executed, so microcode must not fetch the next op code
until it has finished using the register fields.

**Mode 1: fetch / execute.** Bit 2 loads a pipeline register in front of the
IR, and the IR keeps the instruction being executed. Bit 1 then does three
things in one edge:

- moves the pipeline register into the IR;
- has the decoder translate the new op code;
- loads the microprogram counter with its address.

If bits 1 and 2 are set in the same word, the bus goes straight through. A
routine can therefore fetch its successor early and then use its own
register fields. Here is ADD in four words, with no separate fetch:

```
MAR <- PC, PC++ | read next op code into the pipe | src -> T | ALU add, dispatch
```

The same two bits give a **delayed branch**. The branch reads its target
into PCL while it points the MAR at the byte after the operand. It then
reads that byte, the delay slot, and dispatches it with bits 1 and 2
together. The slot instruction runs next and fetches its own successor from
the target, so a taken branch costs no extra fetch. A branch that leaves
through the fetch at microaddress 0 instead throws away what it prefetched
and refills the pipe, which costs the two fetch cycles every time. Both
kinds are microcode only; the hardware is the same.

**Mode 2: fetch / decode / execute.** The execute stage uses the registers
after the register decoders. The IR holds the *next* instruction, and it is
decoded while the current one runs:

- The decoded-address register samples the decoder output for the IR in
  every cycle the machine runs.
- On bit 1, the microprogram counter loads from the decoded-address register,
  the register selects of the IR are latched for the execute stage, and the
  pipeline register (or the bus) moves into the IR.

Two consequences follow:

- An instruction must spend at least one cycle in the IR before it is
  dispatched. Any routine of two or more words ensures this, and an
  assertion in `ir_pipeline` reports a dispatch that follows another
  directly.
- At start-up the registers are zero, so the first dispatch goes to the
  decoder entry for op code 0. Give op code 0 (NOP) address 0, the fetch,
  and the pipe then fills itself.

Multi-byte instructions are the programmer's problem in mode 2. When an
instruction executes, the byte after it has already been fetched into the IR
as if it were an op code. The same holds for branches in modes 1 and 2. The
pipe must be refilled after a jump, and the cost of that is visible in the
cycle count. This is the effect the machine is meant to teach.

A flush is possible. A word with bits 1 and 2 and `cond_sel` = 1 (always),
with nothing on the bus, loads op code 0 into the IR. The reset wins over the
dispatch.

## External bus, memory and I/O

The MAR drives the 16-bit address bus. In a memory cycle (bit 30 = 1):

- a read puts `mem[MAR]` on the external data bus;
- a write with bit 12 stores the internal bus value there.

The MBR captures the external bus in every read cycle. Bit 13 passes the
read byte straight through to the internal bus in the same cycle, or shows
the held byte in a later cycle.

In an I/O cycle (bit 30 = 0):

- a write with address bit 14 set loads the output port;
- a read with address bit 15 set returns the switch inputs.

The output port's high and low nibbles drive two 7-segment digits, with
segments a..g in bits 0..6, active high. Nibbles 10–15 blank their digit.

## Using `mp_system`

| Port | Use |
|---|---|
| `clk`, `rst` | Rising-edge clock. Synchronous reset clears every register. The tables and memory are not cleared. |
| `mode` | 0, 1 or 2, as above. |
| `run`, `step` | With `run` high, one microinstruction executes every clock. With `run` low, a one-clock pulse on `step` executes exactly one. While paused the word is forced to zero, so nothing changes. |
| `ld_we`, `ld_target`, `ld_addr`, `ld_data` | Loader. `ld_target` 0 writes a program byte, 1 writes a control-store word, and 2 writes a decoder entry (`ld_addr[7:0]` = op code, `ld_data[8:0]` = address). Use it while paused. |
| `in_switches` | The input port. |
| `out_port`, `seg_hi`, `seg_lo` | The output port and its two digits. |
| `upc`, `uword`, `ureset`, `ir`, `pc`, `sp`, `acc`, `t_reg`, `data_bus`, `flags`, `regs` | Status, as a front panel shows it. `regs[code]` is register `code`. |
| `ld_rdata` | The memory byte at `ld_addr`. |

The decoder file of the original tool allows don't-care bits in op codes, for
example `01xxxxxx`. The decoder here is a plain 256-entry table, so the loader
writes every op code a pattern covers.

A bus assertion in `mp_cpu` reports any word that enables more than one bus
source.

## Choices made in this design

These points are not fixed by the machine's description, or that description
contradicts itself on them.

- **Which decoder reads and which writes.** One passage of the description
  says the decoder on bits 2:0 *clocks* its register and the one on bits 5:3
  *enables* its register onto the bus. The instruction-format text says the
  opposite: bits 2:0 are the source, bits 5:3 the destination, the format is
  `01 DDD SSS`, and `10000 010` means "add D". This design follows the
  instruction format. With it, both MOV and ADD encode as described.
- **Accumulator writes and flag loading.** No bit clocks A from the ALU or
  loads the flags. Here every ALU function except 0 (and CMP, which sets only
  the flags) does both.
- **The ALU function list** (above) is this design's.
- **Field bit order.** The lowest bit is the least significant. The MAR
  source codes come from the printed fetch word, which sets bit 25 and clears
  bit 26 to select the PC.
- **Fetch word 1.** The machine's screen picture shows fetch word 1 with bit
  14 set, where the bit table requires bit 13 to bring memory data onto the
  bus. The bit table is followed.
- **Priorities.** On the microprogram counter, reset wins over load and load
  wins over increment. On the PC, a byte load wins over the increment for
  that byte. For A, an ALU result wins over a bus write.
- **Buses.** An undriven bus reads 0. Microcode uses this to clear a
  register.
- **Port decoding.** Memory is read asynchronously. I/O is decoded on address
  bits 14 and 15 only, following the labels in the screen picture.
- **User-interface features.** The simulator's run speed setting, animation
  and editors are not hardware and are not modelled. Run and single-step are
  modelled as a cycle enable.

## Simulating

Each module's file is `rtl/<name>.sv`. Each testbench is `tb/tb_<name>.sv`,
and each testbench prints `TB_RESULT checks=N failures=M` before it finishes.
To run the whole-machine test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/mpsim_pkg.sv tb/tb_ucode_pkg.sv tb/tb_mp_system.sv \
  --top-module tb_mp_system -o sim
obj_dir/sim
```

`tb/tb_ucode_pkg.sv` contains a complete example that shows how to program
the machine. It defines a small 8080-like instruction set as a microprogram
and a decoder table. The set has MVI, MOV, MOV M,A, MOV A,M, ADD, ADC, SUB,
INR, DCR, rotates, CMA, CLR, IN, OUT, JNZ, JNZD (two-stage table only), LDSP,
STSP and HLT. The package also holds the programs:

- **Program A** multiplies 7 by 5 with a counted loop. It then writes the
  output port, reads the input port, stores through H:L and through SP, and
  adds with carry.
- **Program B** uses only single-byte instructions, so it also runs in the
  three-stage mode.

`tb_mp_system` runs these programs at the machine's full size. It checks
every register, the memory writes, the port and the digits against values
worked out by hand. It also checks the exact number of microinstructions
executed:

| Program and mode | Microinstructions |
|---|---|
| A, no pipeline | 198 |
| A, two-stage, with fetch overlapped in MOV and ADD | 178 |
| B, no pipeline or two-stage | 63 |
| B, three-stage (one extra start-up fetch) | 65 |
| B, single-stepped | 63 steps |

The test also confirms that the machine holds between single steps. It
counts every mechanism at least once: dispatch, unconditional and conditional
reset, overlapped fetch, decode-ahead dispatch, I/O in and out, memory write,
MAR from SP and H:L, and carry forwarding.

`tb_pipe_branch` measures branch cost in the two-stage mode. Programs C
and D run the same five-pass 7 x 5 loop. C closes it with JNZ, which refills
the pipe on every pass. D closes it with the delayed JNZD and puts the
loop's last instruction in the delay slot. C takes 107 microinstructions and
D takes 99. The 8 cycles saved are 2 per taken branch.
It also pauses program C inside its loop, replaces its HLT through the load
port and continues without a reset. This shows that the tables and memory
can be edited while the machine is paused.

Each unit also has its own testbench, which compares it with an independent
reference model.

## Limits

- There is no interrupt, no stack push or pop hardware (SP changes only
  through the bus) and no hardware support for multi-byte instructions in
  the three-stage mode. The machine's description lists none of these.
- The control store, decoder table and memory are plain arrays with
  asynchronous reads. An FPGA maps them to distributed RAM. A version with
  block RAM would need a microinstruction register and a different timing.
