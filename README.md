# Stream coprocessor for a data stream management system

A data stream management system runs continuous queries over unbounded
streams of tuples: filter the sensor readings above a threshold, scale them,
sum a window, and so on. This design moves that work off the host CPU and
into a coprocessor. The host leaves commands and tuple streams in its own
memory. A small controller inside the coprocessor, a MicroBlaze soft CPU,
fetches them and loads a *kernel* (a short program) into a VLIW execution
unit. The unit then pulls tuples from input pipes, computes, and pushes
results into output pipes. When the kernel ends, the controller reads back
how long it ran and how many tuples each output stream received, then
answers the host.

The datapath is also the test bed for five low-power techniques. Each one
has its own module:

| Technique | Module | What it saves |
|---|---|---|
| AND-type clock gate with enable latch | `acg` | clock to idle operand registers |
| OR-type clock gate with hold latch | `ocg` | clock to the idle serial divider |
| power-of-two shift path in the multiplier/divider | `dword_muldiv` | XOR-heavy multiply/divide logic |
| MSB-first ("sequential") comparator | `seq_comparator` | toggling in the lower comparator bits |
| operand isolation registers | `operand_isolation` | glitching of functional units on late operand bits |

The RTL is SystemVerilog 2017 and synthesizable. There is one module per file
in `rtl/`, and the shared types are in `rtl/scu_pkg.sv`. Each block has a
self-checking testbench in `tb/`.

## Block structure

```
 host memory ─ DISP_* ─┐                                ┌─ AXI4-Lite x4, 2 IRQs ─ MicroBlaze
                      dispatch_unit ── read client 0 ─▶ command FIFO ─▶ crfifo_if
                       │  ▲            read client 1 ─▶ rsp_* (read stripe pipe)
                       │  └─────────── write client 0 ◀ response FIFO ◀ crfifo_if
                       │               write client 1 ◀ wsp_* (write stripe pipe)
                       │
 srf_ipf_* ─▶ IPF0, IPF1 ─▶ execution_unit ─▶ OPF0..OPF2 ─▶ srf_opf_*
                           │   ├ bsu           ▲
                           │   ├ eu_regfile    │ fetch port
                           │   └ eu_fu x2      imem ◀── imem_if ◀── MicroBlaze
                           │      ├ operand_isolation (acg)
                           │      ├ seq_comparator
                           │      └ dword_muldiv (ocg)
                           └── run/done ── krm ◀─ transactions ─ krm_if ◀── MicroBlaze
```

`scu_top` joins the two halves:

- **Stream processing unit:** `execution_unit`, `imem`, `bsu`, and two input
  and three output `stream_fifo` pipes.
- **Stream management unit:** `dispatch_unit`, the command and response
  FIFOs, and three MicroBlaze-facing interfaces:
  - `crfifo_if` for host commands and responses;
  - `imem_if` for loading kernels;
  - `krm_if` for kernel configuration and launch.
- **Kernel run monitor:** `krm` sits between `krm_if` and the execution
  unit.

Some parts of the full system are not in this RTL: the MicroBlaze, its bus
fabric and peripherals, the PCIe endpoint, the stream register file (SRF)
and the stripe pipes. The signals they would drive are ports of `scu_top`.
- `axi_du_*`, `axi_crf_*`, `axi_imem_*`, `axi_krm_*` are the four AXI4-Lite
  slaves. `cmd_irq_o` and `krm_irq_o` are the two interrupts.
- `disp_*` is the host memory interface.
- `rsp_*` and `wsp_*` are the stripe-pipe ends of the dispatch unit.
- `srf_ipf_*` and `srf_opf_*` are the SRF ends of the pipes.
- `kdr_o`, `amem_o`, `sdr_*_o` and `orf_o` carry the kernel configuration
  for the SRF side.

There is one clock and one asynchronous active-low reset, `rst_ni`. All FIFOs
are first-word-fall-through: data shows the head, and you may pop only while
not empty and push only while not full. Assertions catch violations.

## One command, end to end

This is the sequence that `tb/tb_scu_top.sv` runs, with the MicroBlaze
played by testbench tasks:

1. **Load the kernel.** The MicroBlaze loads kernel code through `imem_if`.
   Each 64-bit instruction word is one transaction to `imem`:
   - SETADDR, then a run of WRITE requests;
   - each request carries an 8-bit ID and an 8-bit command;
   - every request gets a response with the same ID, which waits until
     RD_EN takes it.
2. **Fetch the command.** The dispatch unit reads the command word from host
   memory into the command FIFO (`RD_CTRL` with CLIENT=0). `crfifo_if`
   raises CMD Interrupt while a command waits. The MicroBlaze sets RD_FIFO
   and reads the 64-bit command as two 32-bit words.
3. **Fetch the tuples.** The dispatch unit reads the tuple stream to read
   client 1. In the top this is the `rsp_*` port toward the stripe pipes.
   The SRF side feeds the tuples into IPF0/IPF1 through `srf_ipf_*`.
4. **Configure and launch.** The MicroBlaze writes the kernel descriptor
   (KDR), argument word (AMEM), the five stream descriptors (SDR) and the
   five offset registers (ORF) into `krm_if` memory, then writes RUN_KERNEL.
   The `krm_if` state machine sends one transaction per step, each acked by
   `krm` with the same ID, in this order: KDR, AMEM, SDR in 1, in 2, out 1,
   out 2, out 3, ORF 0..4, RUN.
5. **Run.** `krm` starts the execution unit at the address in the KDR and
   counts clock cycles and pushes to each output pipe. When the unit halts,
   `krm` raises KRM_INT.
6. **Read back.** Because of KRM_INT, `krm_if` runs its read-back sequence:
   - execution time;
   - the three output SDRs (length field = tuples produced);
   - release of the unit.

   It then sets RESULT and raises KRM Interrupt.
7. **Respond.** The MicroBlaze writes a two-word response through
   `crfifo_if` into the response FIFO. The dispatch unit writes it to host
   memory (write client 0), along with result tuples (write client 1).

## Execution unit

### Instruction words

An instruction word is 64 bits and holds two 32-bit slots. Slot 0 is bits
31:0. Each slot has this layout:

```
 31     27 26  23 22  19 18  15 14            0
 [  op   ][  rd ][ rs1 ][ rs2 ][     imm      ]     16 registers, 15-bit signed imm
```

| Group | Operations |
|---|---|
| ALU | ADD SUB AND OR XOR SHL SHR ADDI LI |
| compare | CEQ CLT CLTU MAX MIN (all through `seq_comparator`) |
| multiply/divide | MUL DIV REM (through `dword_muldiv`, unsigned division) |
| pipes | POP (`rd` = head of input pipe `imm[0]`), PUSH (output pipe `imm[1:0]` gets `rs1`) |
| control | BNZ, BZ (test `rs1`), JMP (to `imm`), HALT, NOP |

The register file has 16 × 64-bit registers. Both slots read it in the
same cycle, and both slots can write it at retirement. If both slots write
the same register, slot 1 wins. The opcodes and encodings are this design's
own; the package lists them.

### Sequencing

Words are not pipelined. Each word goes through three steps:

1. **FETCH.** Read the word from `imem`. Data arrives the next cycle.
2. **ISSUE.** The branch and stall unit (`bsu`) holds the word while any
   input pipe it pops is empty or any output pipe it pushes is full. When
   the word can go:
   - each active slot loads its operands into its `operand_isolation`
     registers, and the popped pipes advance;
   - an idle slot keeps its operand registers unclocked, so its functional
     unit does not switch.
3. **EXEC.** The functional units compute:
   - MUL/DIV/REM start the multiplier/divider, and the word waits until
     every slot has finished;
   - results are then written back and pushes happen;
   - `bsu` picks the next PC: the lowest slot with a taken branch wins,
     otherwise PC+1;
   - HALT ends the kernel.

A word with no multiply/divide takes 3 cycles plus any stall. A product or a
power-of-two division adds one cycle. Any other division adds 65 cycles.
`perf_o` counts retired words, pipe stall cycles, shift-path operations and
serial divisions, and `krm` clears the counters at each run.

## The low-power blocks

These five blocks are the core of the design.

**`acg`: AND-type clock gate.** A latch is transparent while the clock is
low, and its output is ANDed with the clock. The enable can only change the
gate during the low phase, so every clock pulse that gets through is a whole
pulse. Behaviourally it is the same as a flop with a clock enable. In the
design it clocks the operand isolation registers.

**`ocg`: OR-type clock gate.** A latch is transparent while the clock is
high, and its output is ORed with the clock. A high `hold_i` parks the gated
clock high, which suppresses the next rising edge. The input is a hold, not
an enable, because that is the polarity an OR gate needs. `hold_i` must come
from rising-edge flops, because the latch closes at the falling edge. In the
design it stops the serial divider's registers whenever no division is in
progress.

**`dword_muldiv`: shift path.** Multiplying or dividing by 2^k is a shift by
k. The unit checks whether the second operand has exactly one bit set:
- if it does, the result comes from a 64-bit shifter in one cycle;
- if not, a parallel multiplier (one cycle) or a restoring divider
  (W+1 cycles) computes it.

`shift_o` reports which path was used. A divisor of 1 also takes the shift
path. Division by zero returns all ones, and the remainder is then the
dividend.

**`seq_comparator`: MSB first.** The MSB pair is XORed first. If the MSBs
differ:
- that bit is ORed into every lower bit of both operands, forcing them to
  ones, so the lower XORs see equal constant inputs and do not toggle;
- the final OR still reports "not equal".

Only operands with equal MSBs exercise the lower bits. This design adds a
less-than output, signed or unsigned, which reuses the same blocking: when
the MSBs differ they decide the order.

**`operand_isolation`: operand registers.** Operands reach a functional unit
at different times. Fed directly, the unit would evaluate every
intermediate value. Instead both operands are registered and released
together, only in cycles where the slot has work. This costs one cycle of
latency. The registers are clocked through an `acg`, so on idle cycles
neither the registers nor the unit behind them switch.

The end-to-end test counts each mechanism and fails if any of them never
fires:
- the ACG holding its clock low on a busy cycle;
- the OCG holding the divider clock;
- shift-path and serial operations;
- pipe stalls;
- full input and output pipes;
- host wait states;
- both interrupts.

## Management-side register maps

Every interface is a 32-bit AXI4-Lite slave with a 12-bit address. The
complete field lists are in each file's header comment. In summary:

- **`crfifo_if`:**
  - 0x00/0x04: command, low/high word.
  - 0x08/0x0C: response, low/high word.
  - 0x10: FIFO-CNFG-STAT. [0] RD_FIFO, [1] FIFO_WR_EN, [2] INT_EN,
    [24] FIFO_CAN_ACPT.
- **`imem_if`:**
  - 0x00: IMEM-REQ-CNTRL. [0] TXVALID, [1] RD_EN, [15:8] TXID, [23:16] TXCMD.
  - 0x04/0x08: request data.
  - 0x0C: IMEM-RESP-STAT. [0] REQ_FULL, [1] RESP_FULL, [2] TXACK,
    [15:8] response ID.
  - 0x10/0x14: response data.
  - Write RD_EN with byte strobe 0 only, so that a pending request's ID and
    command are not overwritten.
- **`krm_if`:**
  - 0x000: CTRL. [0] RUN_KERNEL, [1] INT_EN, [15:8] KERNEL_ID.
  - 0x004: STATUS. FSM state, busy, RESULT (write 1 to clear), KRM_STATE.
  - 0x008/0x00C: execution time.
  - 0x010+8k: output SDR k as read back.
  - Memory: 0x100 KDR[16], 0x180 AMEM[16], 0x200 SDR[5], 0x240 ORF[5].
  - Entries are 64-bit, low word first.
  - A stream descriptor is {base[63:32], length[31:0]}.
  - The KDR holds the kernel's start address.
- **`dispatch_unit`:**
  - 0x00 RD_ADDR, 0x04 RD_CTRL ([15:0] LEN, [16] CLIENT, [31] START/busy),
    0x08 RD_MASK.
  - 0x10/0x14/0x18: the same three registers for writes.
  - 0x20/0x24: word counters.
  - Host addresses are 25-bit word addresses.

Transaction links (`imem` and `krm`) carry 8-bit ID, 8-bit command and
64-bit data. Every request is answered by an ack with the same ID. Command
codes are in `scu_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/scu_pkg.sv tb/tb_scu_top.sv --top-module tb_scu_top -o sim
./obj_dir/sim
```

Replace `tb_scu_top` with any other `tb/tb_<block>` to test that block.

`tb_scu_top` runs the whole coprocessor at its default parameters:
- instruction memory: 256 words;
- pipes and FIFOs: 16 deep;
- 16 kernels.

It loads a selection kernel at two addresses and runs three host commands.
The kernel behaves as follows:
- tuples below 100 are multiplied by 4 (shift path) and sent to OPF0;
- other tuples are divided by 3 (serial divider) and sent to OPF1;
- a running sum goes to OPF2;
- the second input pipe gives the tuple count.

The test checks:
- every result tuple, response word and counted tuple against a model;
- execution time against the cycle count.

It runs in well under a second.

## How far to trust it, and where it departs from the source architecture

What the source architecture fixes:
- the block partition and the names of the interfaces;
- 64-bit data words and transaction data, 8-bit IDs and commands;
- two input pipes and three output pipes;
- the KDR/SDR/ORF register files and the order of the `krm_if` launch and
  read-back states;
- the bit positions of IMEM-REQ-CNTRL, IMEM-RESP-STAT and FIFO-CNFG-STAT;
- the structure of the five low-power blocks: latch plus AND, latch plus
  OR, MSB XOR ORed into the lower bits, operand registers, and the
  power-of-two shift test;
- 32-bit default widths for the comparator and operand registers, 64 bits
  for the multiplier/divider.

What is this design's own:
- **Execution unit internals.** The source describes a SIMD-VLIW unit but
  not its instruction set, slot count, lane width, register file or
  pipeline. The two-slot, single-lane, unpipelined unit here is a minimal
  one that carries the low-power blocks. In the unit, the comparator and
  operand registers are 64 bits wide.
- **Dispatch unit internals.** Only its signals and parts are known (read
  and write engines, stream router). The engines here are simple
  MicroBlaze-programmed transfers with one read outstanding. Exposing SPU
  memory to the MicroBlaze is not built.
- **Register offsets, command codes, descriptor formats, FIFO and memory
  depths.**
- **One `krm_if` port.** A single AXI4-Lite port serves both registers and
  descriptor memory.
- **Writable command field.** The IMEM-REQ-CNTRL command field is writable,
  although the source register drawing shows it as read-only. The
  MicroBlaze has to supply the command somehow.
- **Clock gates.** The `acg`/`ocg` latches are written as behavioural
  latches. A production flow would map them to library clock-gating cells.
- **Clock period.** The source reports a clock period after netlist timing
  work (buffering, resizing, threshold-voltage swaps). Those steps have no
  RTL counterpart, and no timing target is built in.
