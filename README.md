# TTA offload accelerator for an ARM + FPGA platform

A host processor hands part of a program, for example the inverse MDCT of an
audio decoder, to a small processor built on the FPGA for that one job. The host
does not copy any data itself. Its DMA controller moves an input block into
on-chip memory. The FPGA processor runs and then locks itself. The DMA
controller then moves the results back, and the host gets an interrupt. While
all this happens, the operating system can run other tasks on the host.

The processor is a *transport-triggered architecture* (TTA). Its instructions
do not name operations. They name data transports between units, and an
operation starts as a side effect of moving a value into a unit's trigger
port. The processor is assembled from a set of function units, and the set can
grow or shrink. This lets one design trade area for speed. This repository
holds that processor, in a small and a large configuration, together with the
adapter logic that ties it to the host's AMBA AHB bus and DMA request lines.

## System view

```
             AHB (32-bit)                        DMA request lines
                 |                               (channel 0 in, 1 out)
   +-------------+------------------------------------+-----------+
   | ahb_decoder -> HSEL   ahb_mux <- slave responses |           |
   |      |            |             |                | dma_module|
   |  imem_ahb      dmem_ahb     cycle_counter        |  (DMAM)   |
   | (asym. ports) (dual port)                        |           |
   |      | 130 b      | 32 b                         |           |
   |      +---- tta_core ----------- TTA_START / TTA_COMPLETE ----+
   +--------------------------------------------------------------+
                            fpga_accel_top
```

The AHB address map is selected by `HADDR[17:16]`:

| region | slave | contents |
|---|---|---|
| 0 | `dmem_ahb` | 8192 x 32-bit data memory, byte address = 4 x word address |
| 1 | `imem_ahb` | program; word *k* of instruction *i* at byte offset (8*i* + *k*) x 4 |
| 2 | `cycle_counter` | 0x0 CTRL (write: bit0 start, bit1 stop, bit2 clear; read: bit0 running), 0x4 COUNT |
| 3 | none | OKAY response, zero data |

All slaves answer with no wait states and accept only 32-bit transfers.

## One offload, cycle by cycle

`dma_module` is a six-state machine. It makes the DMA controller, the data
memory and the processor take turns:

1. **LOAD**: the processor is locked. `dma_breq[0]` is high, so the DMA
   controller may write input bursts into the data memory. The controller
   marks the last beat of each burst with `dma_clr[0]`. It also raises
   `dma_tc[0]` on the last burst of the block.
2. **ACK**: `dma_breq` drops for one cycle. This is the burst acknowledge.
   After the last burst the machine goes on to START, and otherwise it goes
   back to LOAD.
3. **START**: a one-cycle `tta_start` pulse. The processor fetches address 0.
4. **RUN**: no request line is raised. The host may already have armed the
   read channel, but that transfer waits here.
5. The program ends with a HALT move. The processor stops fetching, locks, and
   raises `tta_complete`. **UNLOAD** then requests output bursts on channel 1,
   with the same acknowledge cycles. After the last one the machine returns to
   LOAD.

Locked means that no instruction executes, so nothing touches the data
memory. The host can read results safely, and the idle processor does not
poll.

The host's DMA controller sets the transfer rate, not this logic. The
controller's burst pattern is NONSEQ BUSY SEQ BUSY SEQ BUSY SEQ followed by 11
IDLE cycles. That is 18 cycles for 4 words, so a 1024-word block takes 4608
cycles each way, or 9216 for a whole offload. Single transfers are NONSEQ plus
5 IDLE, which is 6 cycles per word. The slaves here accept one word per cycle,
so they never add to these figures. The system testbench reproduces both
patterns and checks these cycle counts exactly.

## The processor (`tta_core`)

### Units and buses

Default (small) configuration, in unit-id order:

| id | unit | sockets | opcodes (trigger index bits 3:0) |
|---|---|---|---|
| 1, 2 | ALU | O1, T | 0 ADD, 1 SUB, 2 EQ, 3 GT, 4 GTU, 5 MAX, 6 MIN, 7 MAXU, 8 MINU |
| 3 | LOGIC | O1, T | 0 AND, 1 IOR, 2 XOR |
| 4 | MUL | O1, T | 0 MUL (low 32 bits) |
| 5 | SHIFT | O1 = value, T = amount | 0 SHL, 1 SHR (arithmetic), 2 SHRU |
| 6, 7 | LSU | O1 = store data, T = word address | 0 LDW, 1 STW |
| 8 | IO_SFU | T | 0 output word on `io_data` with `io_valid` |
| 9, 10 | RF 32 x 32 | 1 write, 2 read; index = register, source bit 5 = read socket | one write per instruction |
| 11 | BOOL 2 x 1 | 1 write, 1 read; register 0/1 | guards moves |
| 12 | GCU | T | 0 JUMP, 1 CALL, 2 HALT; source index 0 = return address |

Ids are assigned in the order ALU x `N_ALU`, LOGIC, MUL x `N_MUL`, SHIFT x
`N_SHIFT`, LSU x 2, IO, RF x `N_RF`, BOOL, GCU. Parameters `N_BUS`, `N_ALU`,
`N_MUL`, `N_SHIFT` and `N_RF` resize the machine. The large configuration is
`N_BUS=17, N_ALU=5, N_MUL=3, N_SHIFT=3, N_RF=4`, and it runs the same
programs once they are rebuilt with its unit ids. Every socket connects to
every bus. A hand-optimised machine would keep only the connections its
program uses.

### Move encoding

An instruction is `N_BUS` moves of 26 bits each, with bus 0 in the low bits.
The small machine therefore has 130-bit instructions. The fields of one move,
from MSB to LSB:

```
[25:23] guard    0 always, 1 if B0, 2 if !B0, 3 if B1, 4 if !B1
[22]    src_imm  1: [21:11] is a signed 11-bit immediate
[21:11] source   else {unit[4:0], index[5:0]}; unit 0 reads zero
[10:6]  dst unit 0 = no move on this bus
[5:0]   dst idx  FU: bit5=1 trigger with opcode [3:0], 0 = operand O1
                 RF/BOOL: register number
                 (as a source, RF index bit5 picks read socket 0 or 1)
```

`tta_pkg` defines this layout as the struct `move_t`, together with helpers to
build moves.

### Timing rules the program must follow

The compiler, or whoever writes the program, is responsible for scheduling.
No hardware interlocks exist:

- One instruction issues per cycle. A move reads its source at the start of
  the cycle and writes its destination at the end of it.
- O1 may be written in the same instruction as the trigger. The unit then uses
  the value on the bus. Otherwise the latched O1 is used.
- The ALU, LOGIC, MUL and SHIFT results can be read from the next instruction
  on. A load result can be read from the second instruction after the trigger.
  A result stays in place until the unit is triggered again.
- Each register file takes one write per instruction. It has two read
  sockets, so one instruction can read at most two different registers of it.
  Any number of buses may read the same register through the same socket.
  Two different registers read through one socket is an error, whatever the
  guards say. The higher-numbered bus wins, and an assertion reports it.
- Both LSUs share the single data-memory port. Do not trigger both in one
  instruction; an assertion checks this.
- A jump or call takes effect on the very next instruction. There are no delay
  slots. CALL stores pc+1 in the GCU's return-address source.
- Two moves to the same socket in one instruction are an error. The
  higher-numbered bus wins, and an assertion reports it.

The test kernel in `tb/tta_asm_pkg.sv` works through an array in place. It
sets `x = mem[i]; sum += x; mem[i] = ((x*181) >>> 7) ^ x`, outputs the sum and
halts. Its loop body takes 6 instructions, so N words take 6N+4 cycles from
`tta_start` to `tta_complete`. It is a small worked example of bypassing
values directly between units.

### Instruction memory

The host writes 32-bit words, but the processor fetches 130 bits per cycle.
`imem_ahb` keeps an assembly register. Each written word lands in its slot,
and writing the last word (word 4) stores the whole instruction at once. The
words of an instruction must therefore be written in order, with the last one
written last. The three parameters are the ones a program image determines:
`MEM_SIZE` (instructions), `MEM_WIDTH` (instruction bits) and `WORD_WIDTH`
(host word). The host side cannot read the program back.

## Sizes

| parameter | default | note |
|---|---|---|
| buses / ALU / MUL / SHIFT / RF | 5 / 2 / 1 / 1 / 2 | small configuration |
| instruction memory | 1024 x 130 bit | chosen here |
| data memory | 8192 x 32 bit | chosen here; a 1024-word block fits many times |
| cycle counter | 32 bit | |

On-chip memory comes to about 49 kB for the small configuration: 16.6 kB of program, 32 kB of data and the register files. The large configuration needs about 89 kB, because its program memory is 442 bits wide.

The one 32 x 32 multiplier, which keeps the low word, maps onto three 18 x 18
FPGA multipliers. The large configuration, with three such multipliers, needs
nine.

## Files

- `rtl/tta_pkg.sv`, `rtl/ahb_pkg.sv`: shared types (move format, opcodes, HTRANS codes, address map).
- `rtl/tta_core.sv`: the processor. It is built from `tta_interconnect`, `tta_gcu`, `tta_alu`, `tta_logic`, `tta_mul`, `tta_shift`, `tta_lsu`, `tta_io_sfu` and `tta_rf`.
- `rtl/imem_ahb.sv`, `rtl/dmem_ahb.sv`, `rtl/dma_module.sv`, `rtl/cycle_counter.sv`, `rtl/ahb_decoder.sv`, `rtl/ahb_mux.sv`: the adapter blocks.
- `rtl/fpga_accel_top.sv`: the top level.
- `tb/*_tb.sv`: one self-checking testbench per module. `tb/tta_core_fast_tb.sv` runs the large configuration. `tb/fpga_accel_top_tb.sv` is the end-to-end test at full default size: it loads a program, runs a 1024-word offload in burst mode and a 64-word offload in single mode, and checks data, cycle counts and every handshake.
- `tb/fpga_accel_top_fast_tb.sv`: the same end-to-end test with the whole subsystem built around the large configuration. Its 442-bit instructions are written as 14 host words each, at a stride of 16 words.

Running a testbench with Verilator (the example is the system test):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tta_pkg.sv rtl/ahb_pkg.sv tb/tta_asm_pkg.sv tb/fpga_accel_top_tb.sv \
  --top-module fpga_accel_top_tb -Mdir obj && ./obj/Vfpga_accel_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/tta_pkg.sv rtl/ahb_pkg.sv rtl/<module>.sv`.

## Where this RTL departs from, or goes beyond, the reference design

The reference flow generates the processor, its instruction encoding and its
program with a TTA co-design toolset. This RTL is written by hand instead,
and some things differ:

- **Instruction encoding, opcode sets and latencies are this design's own.**
  A program compiled for the original processors will not run here. No long
  immediates exist (11-bit short immediates only), and no instruction
  compression is implemented.
- **The socket connection pattern is not reproduced.** The original machines
  connect each socket to a subset of buses. Here every socket connects to
  every bus, which costs more multiplexers and makes a longer critical path.
- **Register-file read sockets are addressed explicitly.** Each file has the drawn socket count: one write and two reads (one read for BOOL). A move names the read socket in source index bit 5. The socket's register address comes from the moves that read through it.
- **IO_SFU** is an output port with a strobe, because the reference only names
  the unit.
- **DMA handshake details**: the one-cycle acknowledge, the channel numbering
  (0 in, 1 out), and the strict load–run–unload order are choices made here. In
  that order, new input is not accepted before the results have been read out.
- **The processor restarts at address 0 on every start.** HALT is a GCU opcode.
- **The large configuration uses 4 register files**, following its written
  description. Its drawing shows five.
- **Not included**: the host CPU, the DMA controller, the SDRAM and its
  controller, the Linux driver, and the tri-state bus driver of the board. The
  system testbench models the host's and the DMA controller's bus activity.
- **Not verified**: the MDCT kernel itself. It needs a compiler for this
  encoding, so its cycle count (68315 on the small and 50639 on the large
  original processor) is not reproduced here.
