# XEM: an outer-product floating-point matrix engine

XEM is a tensor accelerator that sits next to a small RISC-V control core
and multiplies matrices by accumulating **outer products**. Each step takes
one 256-bit slice of matrix A (a column segment) and one 256-bit slice of
matrix B (a row segment). It multiplies every element of one by every
element of the other, and adds the products into a tile of accumulators
held next to the arithmetic units.

Four FP64 numbers from each side give a 4x4 tile. Eight FP32 numbers from
each side give an 8x8 tile. An outer product needs only 2N operands for N²
results, so each arithmetic unit is fed by a few broadcast wires. A systolic
array would instead pass operands from neighbour to neighbour, and an inner-product
array would need a dot-product tree.

This repository holds synthesizable SystemVerilog for the following parts:

- the XEM itself: 16 floating-point cells, accumulators, control registers, reduction and transfer sequencers;
- the decoder for its five custom RISC-V instructions;
- the 256 KB operand scratchpad (AXSP);
- a top level (`xem_node`) that joins them into an instruction-driven unit.

The RISC-V core that issues the instructions is not included.

## The grid and the operand broadcast

The XEM holds 16 cells, called AFPUs, in a 4x4 grid. Cell `n = 4r + c` sits in row `r` and
column `c`. An XMM instruction delivers two 256-bit operands, each cut into four
64-bit lanes:

- A lane `c` is broadcast down column `c`. `A[63:0]` reaches cells 0, 4, 8 and 12.
- B lane `r` is broadcast along row `r`. `B[255:192]` reaches cells 12 to 15.

A 64-bit lane is either one FP64 number or two FP32 numbers `{hi, lo}`.
Each cell therefore receives one 64-bit `a` and one 64-bit `b` per cycle. It
computes either one FP64 product or the 2x2 outer product of two FP32 pairs.
Per XMM, the XEM does 16 FP64 or 64 FP32 operations. The operations are ADD, SUB, MUL and MAC (`XACC += A*B`).

Three modifiers change where the operands come from. They can be combined.

| modifier | effect |
|---|---|
| RO (register operand) | B is a scalar from a core register, replicated to every lane. An FP32 scalar is replicated eight times. |
| AO (accumulator operand) | Each element uses its own accumulator as A. This makes element-wise work such as `y = a*x + y` possible. |
| MSK (masking) | Only the elements whose bit is set in the issuing thread's XMSK register are computed. The others keep their contents. |

## Inside a cell (AFPU)

Each cell holds the following:

- four 32-bit accumulators, XACC0..3;
- a double-precision FPU (DFPU);
- a single-precision FPU (SFPU).

```
             FP64 mode                         FP32 mode (2x2 block)
  DFPU:  a*b -> {XACC3, XACC0}       DFPU:  a.lo*b.lo -> XACC0   a.hi*b.hi -> XACC3
  SFPU:  idle, XACC1/2 unchanged     SFPU:  a.lo*b.hi -> XACC2   a.hi*b.lo -> XACC1
```

The SFPU receives B with its halves swapped, which gives it the two cross
products. Within a cell, XACC`k` is element (row `k/2`, column `k%2`) of the
cell's 2x2 block. Rows follow B and columns follow A.

Both FPUs use the same fused multiply-add core (`fp_fma`), set up for
FP64 or FP32:

- ADD is computed as `a*1 + b` and SUB as `a*1 - b`.
- MUL drops the addend, so that signed zeros come out right.
- MAC rounds once.

The core supports full IEEE 754 with subnormals and the five RISC-V rounding
modes. It raises the NV, OF, UF and NX flags; the XEM has no divide, so there is no DZ flag.

## Back-to-back MACs: pipeline registers and ELPR

The FPUs have four stages. An operation issued in cycle `t` is seen in its
destination register in cycle `t+4`. Three of the stages are registers in `fpu_lane`; the fourth is the write into XACC or PREG.

If a MAC wrote straight into XACC, the next MAC to the same element would
have to wait four cycles for it. Instead, each XACC has **four pipeline
registers (PREG0..3)**.

- A pointer advances every cycle, 0, 1, 2, 3, 0, ... It runs freely, whether or not a MAC is issued.
- A MAC issued in the cycle the pointer shows `i` reads PREG`i` as its addend.
- Four cycles later it writes the sum back to PREG`i`, just before the pointer comes back to that register.

A MAC can therefore issue every cycle with no hazard and no forwarding.
Over a loop, the products are spread over four partial sums. These are
typically of similar size, which also reduces the loss of small addends.

When a MAC loop ends, the core signals **ELPR** (end-loop pipeline
reduction). The XEM then takes these steps:

1. It waits until no FPU result is in flight.
2. It issues `XACC = XACC + PREG0`, then `+ PREG1`, `+ PREG2`, `+ PREG3`, four cycles apart. Each step must see the previous result.
3. It clears all PREGs.

```
cycle   0    4    8    12   16
        +P0  +P1  +P2  +P3  clear     (ELPR_CNT counts 0 .. 16)
```

ELPR takes `4*STAGES+1 = 17` cycles once the pipeline has drained. Only
elements that a MAC has touched since the last ELPR take part; a per-element
dirty bit tracks this. Masked elements therefore keep their accumulator bit for bit.
MACs do not wait for each other. ADD, SUB and MUL write XACC directly, and
every other command waits until they have finished.

## Element numbering and masks

ALS, AAS and the masks all number the results in raster order of the
result tile.

- **FP64**: element `n` is cell `n` (4x4 tile). The diagonal is 0, 5, 10, 15. The value sits in `{XACC3, XACC0}`.
- **FP32**: element `8*row + col` of an 8x8 tile, where `row = 2r + k/2` and `col = 2c + k%2` for XACC`k` of cell `4r+c`. The diagonal is 0, 9, 18, ..., 63.

There are two 64-bit XMSK registers, one for each of the core's two hardware
threads. Bit `e` enables element `e`; FP64 uses only bits 15:0. Both reset to
all ones.

- The indirect MSK instruction loads all 64 bits from a register.
- The immediate MSK instruction writes a 16-bit group `g`, meaning bits `[16g+15:16g]`.

## Instructions

All five instructions use the RISC-V custom opcode space (`[1:0] = 11`).

| instr | opcode [6:2] | fields |
|---|---|---|
| XMM | 00010 | `[31:30]` OP (00 add, 01 sub, 10 mul, 11 MAC), `[29]` AM, `[28]` RO, `[27]` AO, `[26]` MSK, `[24:20]` rs2, `[19:15]` rs1, `[14:12]` DT (000 FP64, 001 FP32), `[11:7]` rs3 |
| ALS | 11010 | `[31]` LS, `[30:28]` SDT, `[27:25]` DDT, `[19:15]` rs1 (element index), `[14:12]` RM, `[11:7]` rd |
| AAS | 11101 | `[31]` 1, `[30]` DI (diagonal), `[29:28]` LSS (00 load, 01 store, 10 set), `[27:25]` DT, `[19:15]` rs1 (address), `[11:7]` rd |
| XFRCSR/XFSCSR | 11110 | `[14]` 1, `[13]` RS (0 read into rd, 1 store rs1[6:0]), `[12]` 0 |
| MSK | 01010 | funct3 001: whole XMSK from rs1. funct3 011: `[31:16]` mask, `[8:7]` group |

**XMM addressing.** XMM fetches both operands from the scratchpad.

- With AM = 0, rs1 and rs2 hold the addresses of A and B.
- With AM = 1, A is at `rs1 + rs3[31:0]` and B is at `rs2 + rs3[63:32]`. A loop then only has to step rs3.

**ALS** moves one element between XACC and a floating-point register. It converts between FP32 and FP64 with rounding mode RM; `fp_cvt` does the conversion.

**AAS** moves all of XACC, or only its diagonal, in one instruction:

- FP64: one element per 64-bit word, which makes 16 words.
- FP32: two consecutive elements per word, with the lower index in bits 31:0. This makes 32 words.
- Diagonal mode: 4 words in both cases.

Load and store use consecutive scratchpad words. Set writes one value to every element.

**XFCSR** has these bits: 3:0 hold the sticky flags `{NV, OF, UF, NX}`, and 6:4 hold the RISC-V rounding mode used by XMM.

**XDT** records the type last written into XACC.

## The node: issue path and scratchpad

`xem_node` stands in for the part of a compute module between the RISC-V
core and the XEM:

```
 instr + register values ──► xem_decode ──► AXSP ports A/B (256-bit lines)
                                   │                 │ 1 cycle
                                   └──────► command ─┴──► xem ──► XACC
 ELPR (is_elpr) ──────────────────────────────────────┘
 AAS load/store ◄──► AXSP port C (64-bit, one word/cycle) ◄──► xem beats
 ALS load / XFCSR read ──► wb_valid, wb_rd, wb_fp, wb_data
 host fill/read ──► ext_* ──► AXSP port C when no AAS transfer runs
```

An instruction is accepted (`instr_valid && instr_ready`) and decoded in one
cycle, and the AXSP line reads start in that same cycle. One cycle later the
command goes to the XEM. The instruction port stalls whenever the XEM holds
a command back, so the behaviour is as follows:

- A stream of MACs runs at one per cycle.
- An XMM ADD, SUB or MUL blocks the next instruction for the FPU latency.
- ELPR blocks the next instruction for the reduction.
- AAS blocks the next instruction for its transfer.

An instruction that is not an XEM instruction is refused with `illegal`. ELPR is offered on the same port with `is_elpr`
set.

AXSP is 256 KB, organised as 8192 lines of 256 bits. It has two line-read
ports (A and B), so both XMM operands are read in the same cycle. It has one
64-bit read/write port (C). All reads are synchronous. Operands are
aligned to 32-byte lines.

## Parameters

| parameter | default | where |
|---|---|---|
| `STAGES` | 4 | FPU latency; also the number of PREGs that hazard-free MACs require (`xem_node`, `xem`, `afpu`, `dfpu`, `sfpu`) |
| `AXSP_BYTES` / `SIZE_BYTES` | 262144 | scratchpad size (`xem_node`, `axsp`) |
| `GRID`, `N_XACC`, `N_PREG`, `N_THREADS` | 4, 4, 4, 2 | package constants in `xem_pkg` |

The sizes match the published XEM configuration: 4x4 cells, 4-cycle FPUs, 256 bytes of XACC and
a 256 KB scratchpad.

## Files

| file | contents |
|---|---|
| `rtl/xem_pkg.sv` | encodings, command and decode structures |
| `rtl/fp_fma.sv` | IEEE fused multiply-add (combinational) |
| `rtl/fpu_lane.sv` | operation mapping and pipeline registers around `fp_fma` |
| `rtl/dfpu.sv`, `rtl/sfpu.sv` | the two FPUs of a cell |
| `rtl/afpu.sv` | cell: XACC, PREG, MAC/ELPR/mask/AO logic |
| `rtl/fp_cvt.sv` | FP32/FP64 conversion for ALS |
| `rtl/xem.sv` | the accelerator: grid, CSRs, sequencers |
| `rtl/xem_decode.sv` | instruction decoder |
| `rtl/axsp.sv` | scratchpad |
| `rtl/xem_node.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_fp_pkg` holds the shared real/bit-pattern helpers |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/xem_pkg.sv tb/tb_fp_pkg.sv tb/tb_xem_node.sv -y rtl -y tb \
    --top-module tb_xem_node
./obj_dir/Vtb_xem_node
```

Replace `tb_xem_node` with any other testbench. `tb_xem_node` runs the
complete design at its default sizes and runs the following workloads:

- an FP64 4x16x4 GEMM with relative addressing;
- an FP32 8x16x8 GEMM with masked MACs;
- a GEMV-style loop with a register scalar;
- an AXPY-style update on the diagonal.

It counts each mechanism it exercises and fails if any count is zero. The mechanisms are back-to-back MAC,
ELPR, stall after ADD, AAS load, store, set and diagonal mode, RO, AO, masking,
ALS with conversion, XFCSR access, flags and illegal instruction.

The block testbenches use operands that are small integers, or IEEE doubles
formed by the simulator. This keeps every reference exact and independent of
the hardware's order of summation. The FPU testbenches also check that every result arrives exactly `STAGES-1`
register stages after issue.

## Where this design makes its own choices

The following follow the published XEM architecture:

- the grid and broadcast;
- the FP64/FP32 placement in XACC0/3 and XACC1/2;
- the swapped B in the SFPU;
- four PREGs per XACC with a round-robin pointer;
- ELPR and the clearing of the PREGs;
- the blocking rule;
- the CSRs, the instruction fields and the relative addressing formula.

The following are choices made here, and are the places to look when
matching another implementation:

- **Bit positions.** The order of the XMM flag bits is AM, RO, AO, MSK from bit 29 down. The MSK-immediate mask sits in `[31:16]` and the group in `[8:7]`. XFCSR RS = 1 means store.
- **Conversion and registers.** ALS treats rs1 as the element index and rd as the data register. AAS set takes its value from rd.
- **Data layout.** These are local choices: which FP64 half is in XACC0, the FP32 pairing of XACC1 and XACC2, the raster numbering inside a cell, the mask groups and the AAS word packing.
- **ELPR.** The order of the steps and the cycle count (17 at four stages) are local choices, as is the dirty-bit rule.
- **Reset values.** XMSK resets to all ones, XFCSR to 0 (round to nearest even), XDT to FP64, and XACC and PREG to zero.
- **Pipeline.** Each FPU is one combinational fused core followed by three registers. A synthesis flow must retime the core across the stages to reach a high clock rate. The split of work over the stages is not taken from any published design.
- **Scratchpad.** Two 256-bit read ports and a 64-bit port, one-cycle latency, and line-aligned operands.
- **Issue path.** In a full processor, four compute modules share one scratchpad; here one node owns it. The host port (`ext_*`) stands in for whatever fills the scratchpad.

Not included: the RISC-V control core, its instruction and data
caches, the grouping of four compute modules around a shared scratchpad,
and the on-chip network and host processor of the full chip.
