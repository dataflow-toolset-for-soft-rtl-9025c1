# IPPro: a small DSP-based soft processor and a streaming multi-core FIR array

IPPro is a compact 16-bit RISC soft processor meant to be replicated many
times on an FPGA, so that an image-processing algorithm written as a dataflow
network can run with one processor per actor and FIFO channels between them.
Each core is built around one DSP48E1-style multiply-add unit, one block RAM
for its program and small distributed memories for registers, coefficients
and data. Reprogramming the cores changes the function without a new FPGA
build.

This repository holds synthesizable SystemVerilog for:

* one IPPro core (`ippro_core`) with its five-stage pipeline, memories,
  DSP unit and branch controller;
* the FIFO channel (`ippro_fifo`) used for core-to-core communication;
* a seven-core array (`ippro_fir_array`, the top) wired as the streaming FIR
  filter: four multiplier cores, two adder cores, one final adder core.

The architecture (stages, memories, operation names, flags, the 4-2-1 FIR
arrangement) follows the published IPPro description. The binary encoding,
the hazard rules, the stream-port mechanism and the host loading port are
not specified there and are this design's own; they are listed under
"Where this design fills gaps".

## The core pipeline

```
 FETCH            DECODE                   EXE1          EXE2                WRITE
 PC, +1,          fields, controls,        multiplier    add/sub/logic,      register write,
 branch handler,  register file (3 reads), (M register)  flags, branch       data memory LD/ST,
 instr. memory    kernel memory, imm,                    decision            kernel STK,
 (sync read)      stream pops (R30/R31)                  (P register)        stream push (R31)
```

| Stage  | Module(s)                         | What happens |
|--------|-----------------------------------|--------------|
| FETCH  | `ippro_fetch`, `ippro_imem`       | PC reads the 512 x 36 instruction RAM; the RAM's read register is the FETCH/DECODE register. |
| DECODE | `ippro_decode`, `ippro_regfile`, `ippro_kmem` | Fields split; operands read from registers, kernel memory, immediate, or an input stream. |
| EXE1   | `ippro_alu` (first half)          | Signed 16 x 16 multiply into the M register; operands registered beside it. |
| EXE2   | `ippro_alu` (second half), `ippro_branch_ctrl` | Add/sub/logic/shift/min/max on M and operands; compare flags; branch taken or not. |
| WRITE  | `ippro_dmem`, register file port, kernel memory port | Result written; LD reads and ST writes the data memory; STK writes the kernel memory; R31 pushes the output stream. |

Memories per core (defaults):

| Memory | Size | Read | Notes |
|--------|------|------|-------|
| instruction | 512 x 36 (`IMEM_DEPTH`) | synchronous | one block RAM |
| register file | 32 x 16 | asynchronous, 3 ports, write-through | R30/R31 are stream ports |
| kernel | 32 x 16 | asynchronous, write-through | coefficients for R-K instructions; STK writes it |
| data | 256 x 16 (`DMEM_DEPTH`) | asynchronous (core), 1-clock (host) | LD/ST in WRITE |

## Pipeline rules a program must respect

These are the parts most likely to surprise someone writing code for the
core. The core has **no forwarding and no register interlock**; the program
is expected to be scheduled by the compiler or by hand.

* **Register results.** An instruction reads its registers in DECODE and the
  producer writes in WRITE, three stages later. Because the register file is
  write-through, the *third* instruction after a producer sees the new
  value. The two instructions in between must not depend on it. Put NOPs or
  independent work there. An instruction one or two slots later reads the
  old value. This is defined, and the FIR test uses it once on purpose.
  The kernel memory follows the same rule for coefficients written by STK.
* **Branches.** Branches resolve in EXE2. A taken branch (JMP, or a
  conditional one whose condition holds) cancels the three instructions
  behind it, so a taken branch costs 3 extra clocks. A branch not taken
  costs nothing. No delay slots exist: the cancelled instructions have no
  effect.
* **Flags.** CMP sets GT (signed a > b), EQ and Z (a == b). Every other ALU
  instruction sets only Z, from its 16-bit result. LD, ST, STK, NOP and
  branches leave the flags alone. Flags are written at the end of EXE2, so a
  branch right after a CMP already sees them.
* **Accumulator.** MULACC adds a*b to P, the 48-bit result of the last ALU
  instruction. CMP, LD, ST and branches do not change P. To start a sum, use
  MUL (P = a*b); each following MULACC adds one product.
* **Stream words.** As a source, R30 pops input stream 0 and R31 pops input
  stream 1. An instruction naming R30 twice pops once and uses the word
  twice. If a needed stream is empty, the instruction waits in DECODE and
  bubbles enter EXE1. As a destination, R31 pushes the result on the output
  stream in WRITE. If the consumer is not ready, the whole pipeline freezes
  until it is. Writes to R30 are discarded.
* **Throughput.** With no stalls, one instruction retires per clock. The
  first one retires 4 clocks after fetching starts.

## Instruction set and encoding

36-bit words (helper encoders `enc_rr`, `enc_rk`, `enc_ri`, `enc_misc` in
`ippro_pkg`):

| Bits    | R-R | R-K | R-I | Misc |
|---------|-----|-----|-----|------|
| [35:34] | 0 | 1 | 2 | 3 |
| [33:29] | ALU op | ALU op or STK | ALU op | misc op |
| [28:24] | dest | dest | dest | dest (LD) |
| [23:19] | src1 | src1 | src1 | src1 (LD/ST base, CMP a) |
| [18:14] | src2 | kernel address | imm[15:0] in [15:0] | src2 (ST data, CMP b) |
| [13:9]  | src3 (MULADD/MULSUB) | src3 | | imm[13:0], sign-extended |

ALU operations, available as R-R (`op src1, src2`), R-K (`op src1,
K[k]`) and R-I (`op src1, imm16`):

| Op | Result | Op | Result |
|----|--------|----|--------|
| ADD | a + b | LXOR, LXNR | a ^ b, ~(a ^ b) |
| SUB | a - b | LOR, LNOR | a \| b, ~(a \| b) |
| MUL | a * b | LAND, LNAND | a & b, ~(a & b) |
| MULADD | a * b + c | LSL, LSR | a << b[3:0], a >> b[3:0] (logical) |
| MULSUB | a * b - c | MIN, MAX | signed minimum / maximum |
| MULACC | P + a * b | STK (R-K only) | K[k] = src1 |

`c` is register src3 in R-R and R-K forms and zero in R-I form. Results
keep the low 16 bits.

Misc: `NOP`; `LD d, imm(s1)`: d = D[s1 + imm]; `ST s2, imm(s1)`: D[s1 + imm]
= s2; `CMP s1, s2`; `JMP imm`; `BZF`, `BEQF`, `BGTF imm` branch when Z, EQ or
GT is set; `BSF imm` branches when neither GT nor EQ is set ("smaller").

## Streaming FIR array (top: `ippro_fir_array`)

```
 in_* (broadcast to four input FIFOs)
   |
   +--FIFO--> core0: c0*x[n]   --FIFO--> core4 port 0 \
   +--FIFO--> core1: c1*x[n-1] --FIFO--> core4 port 1  +-- core4: sum --FIFO--> core6 port 0 \
   +--FIFO--> core2: c2*x[n-2] --FIFO--> core5 port 0 \                                      +-- core6: sum --> out_*
   +--FIFO--> core3: c3*x[n-3] --FIFO--> core5 port 1  +-- core5: sum --FIFO--> core6 port 1 /
```

Each input sample is accepted only when all four input FIFOs have room,
and is then copied into all four. Multiplier core k keeps its own delay line
in registers and emits `c_k * x[n-k]`. The adder tree sums the four products.
With `c3 = 0` this is the 3-tap filter. The wiring is fixed, and the programs
decide the function. Every channel is a 16-word FIFO with valid/ready, so
back-pressure reaches the source through the stalls described above.

The test programs are 8 instructions for a multiplier core (shift the delay
line, pop, two NOPs, `MULK R31, R(1+k), K[0]`, `JMP 0`) and 2 for an adder
core (`ADD R31, R30, R31`, `JMP 0`). In steady state the array delivers one
output every 11 clocks: the 8-instruction loop plus the 3 clocks a taken
jump costs.

Ports: clock, synchronous active-high `rst`, `run`, the host request
(`ippro_pkg::host_req_t`: `we`, `sel` = instruction/kernel/data memory,
`addr`, `wdata`) with `host_core` selecting the core, `host_rdata`
(data memory of the selected core, one clock after the address), the input
and output streams (`*_valid`, `*_ready`, 16-bit `*_data`), and per-core
status bits `retire`, `stall_in`, `stall_out`, `branch_taken`.

Loading: hold `run` low and write programs, coefficients and data one word per
clock through the host port. Then raise `run`; every core starts at address 0.
Memories are not cleared by reset. Registers, flags, P and the pipeline are.

## Where this design fills gaps

The published description names the blocks and the operations but leaves
these points open. Each has a choice made here:

* instruction width, field layout and opcode numbers (36-bit words, chosen to
  fit one 512 x 36 block RAM);
* memory sizes: 512 instructions, 32 registers, 32 kernel words, 256 data words;
* exact meaning of MULSUB (a*b - c), MULACC (P + a*b), BSF (branch if smaller),
  which instructions set which flag, signed MIN/MAX/CMP, shift amount b[3:0];
* the hazard policy (no forwarding or interlock; results usable three
  instructions later) and the branch penalty (3 cancelled slots);
* the stream mechanism: R30/R31 as FIFO ports, in place of LD/ST when
  streaming;
* the FIR mapping: four taps with the fourth coefficient zero, so that the
  4-2-1 core arrangement forms a balanced adder tree; one FIFO per channel;
  input broadcast;
* finite FIFOs (16 words) with back-pressure; the dataflow model assumes
  unbounded channels;
* the host loading port.

Also not reproduced: clock rates (526 MHz for one core, 404 MHz in the case
studies) and resource figures are properties of a placed FPGA design. For
comparison, the core here has about 340 flip-flop bits, and the published
figure is 330 slice registers per processor.

## Workloads and measured behaviour

* **Single-core 3-tap FIR** (samples in data memory, LD / MULK / MULADDK / ST
  loop closed by CMP/BSF): the loop body is 15 instructions, 18 clocks per
  output with the taken branch.
* **Seven-core streaming FIR**: 11 clocks per output in steady state, with
  results checked under random input gaps and output back-pressure.
* **HOG gradient and magnitude on one core** (`tb_ippro_hog_gm`): an 8 x 8
  cell with a one-pixel border, `gx`, `gy` streamed out, `|gx| + |gy|` stored
  (the L1 magnitude, since the core has no square root). It takes 24 clocks
  per pixel within a row, 24.8 on average. At 404 MHz and 1920 x 1280 that is
  about 6.6 frames/s for this stage, against 7.4 frames/s reported for a
  hand-optimised single-core version.
* A 16-core or 48-core HOG array is not provided: it would need its own top
  with its own channel wiring.

## Files

| File | Contents |
|------|----------|
| `rtl/ippro_pkg.sv` | widths, enums, control word, host request type, instruction encoders |
| `rtl/ippro_fetch.sv` | program counter and branch handler |
| `rtl/ippro_imem.sv` | instruction RAM with synchronous read |
| `rtl/ippro_decode.sv` | instruction decoder |
| `rtl/ippro_regfile.sv` | 32 x 16 register file, 3 read ports, write-through |
| `rtl/ippro_kmem.sv` | kernel (coefficient) memory |
| `rtl/ippro_alu.sv` | two-stage DSP48E1-style multiply-add unit with P accumulator |
| `rtl/ippro_branch_ctrl.sv` | GT/EQ/Z flags and branch decision |
| `rtl/ippro_dmem.sv` | data memory, core port and host port |
| `rtl/ippro_core.sv` | one IPPro core |
| `rtl/ippro_fifo.sv` | valid/ready FIFO channel |
| `rtl/ippro_fir_array.sv` | seven-core streaming FIR array (top) |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_ippro_hog_gm.sv` | HOG gradient/magnitude workload on one core |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ippro_fir_array \
    -y rtl -y tb +libext+.sv -Irtl rtl/ippro_pkg.sv tb/tb_ippro_fir_array.sv
./obj_dir/Vtb_ippro_fir_array
```

Replace the top-module and testbench file for any other test. The
array testbench runs the top at its default parameters. It streams 300
samples through the 3-tap filter with random gaps and back-pressure. It
checks that input FIFOs fill, cores wait on empty inputs, cores freeze on
full outputs and branches are taken. Then it streams 60 samples through
four random taps and checks the 11-clock rate. `tb_ippro_core` covers every
ALU operation in all three operand forms, the single-core FIR, all branch
kinds, streaming with stalls, and pipeline latency and throughput.

To write new programs, build them in a testbench with the `enc_*` functions
of `ippro_pkg` and load them through the host port, as the testbenches do.
Keep dependent instructions three slots apart.
