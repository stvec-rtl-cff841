# StVEC: a vector register file that reads unaligned operands

Stencil loops such as `A[i] += B[i-1] * B[i]` are hard to vectorize: the
vector `B[i-1..i+2]` straddles two aligned vectors. Ordinary SIMD code needs
either an unaligned load or a shuffle (`palignr`) for every such operand.
StVEC removes both. A register-register vector instruction may name its
second source as **two aligned registers plus an offset**. The register file
assembles the shifted vector while it reads the operands.

This repository holds synthesizable SystemVerilog for that idea:

* the modified vector register file (StVRF);
* a packed single-precision SIMD execution unit;
* a small datapath around them that executes aligned and StVEC instructions.

The main configuration has 128 registers of 128 bits, each split into four
32-bit lanes.

## The StVEC operand

An StVEC instruction has the form

    stOPps offset, base, extension, dst        e.g.  stmulps $1, VR1, VR2, VR3

Its second source is

    src2 = base{offset : W-offset} extension{0 : offset}

where `X{s : n}` means the n words of register X starting at word s, and W = 4
is the number of lanes. Word k of the operand is:

| offset | w0 | w1 | w2 | w3 |
|---|---|---|---|---|
| 0 | base[0] | base[1] | base[2] | base[3] |
| 1 | base[1] | base[2] | base[3] | ext[0] |
| 2 | base[2] | base[3] | ext[0] | ext[1] |
| 3 | base[3] | ext[0] | ext[1] | ext[2] |

Offset 0 is the ordinary aligned instruction. The destination doubles as the
first source, as in SSE, so `stmulps $1, VR1, VR2, VR3` computes
`VR3 = VR1{1:3}VR2{0:1} * VR3`.

For the running example, keep `B[i-4..i-1]` in `prev` and `B[i..i+3]` in
`cur`. Then `stmulps $3, prev, cur, t` multiplies `t` by `B[i-1..i+2]`, with
no extra memory access and no shuffle.

## How the register file builds the operand (`stvrf`)

Word j of every register is stored in **bank j** (`stvrf_bank`). So a register
file with four lanes has four banks, and each bank is 32 bits wide. Two changes
to a conventional banked register file produce the StVEC operand:

1. **One register address per bank** (`bank_addr_gen`). Bank j reads the base
   register when `j >= offset`, and the extension register otherwise. With
   offset 1, base VR1 and extension VR2, bank 0 reads VR2 and banks 1..3 read
   VR1.
2. **Vector register adjustment** (`vra`). Bank j now holds the operand word
   that belongs in lane `(j - offset) mod W`. The adjustment therefore rotates
   the bank outputs by the offset: `w_k = bank[(k + offset) mod W]`. It is
   built as a logarithmic rotator, with one level of 2:1 multiplexers per
   offset bit.

   In the offset-1 example the banks 3..0 deliver `C, B, A, D`. The rotation
   turns them into operand words w3..w0 = `D, C, B, A`.

The rotation sits after the bank read, so the register-file access time grows
by the delay of the rotator:

    T(StVRF) ≈ T(banked register file) + T(adjustment)

That delay is why the datapath has the two timing modes described below.

Besides the StVEC read port (src2), `stvrf` has three more ports:

* an aligned read port for src1, with all banks at one address;
* one full-vector write port, which writes on the rising edge;
* combinational reads, which see the old contents during a write cycle.

## The datapath (`stvec_vpu`, top)

The instruction interface is valid/ready. An instruction is accepted in a
cycle with `in_valid && in_ready`. It has these fields:

* `in_op` (`stvec_pkg::op_e`)
* `in_offset` (2 bits)
* `in_base` and `in_ext` (7 bits each): src2
* `in_dst` (7 bits): src1 and destination

| op | effect |
|---|---|
| `OP_LD`  | `dst <- ld_data` (vector from memory, sampled with the instruction) |
| `OP_ST`  | `st_data <- dst` (old value), `st_valid` high one cycle later |
| `OP_MOV` | `dst <- src2` |
| `OP_ADD` | `dst <- src2 + dst` |
| `OP_SUB` | `dst <- dst - src2` |
| `OP_MUL` | `dst <- src2 * dst` |
| `OP_NOP` | nothing |

Memory is not part of this design. Loads and stores are the two vector ports
through which a processor's load/store unit would connect.

### Timing: `READ_CYCLES`

* **1 (default).** The register read, the adjustment, the execution and the
  write-back all complete in the issue cycle. `in_ready` is always high. One
  instruction retires per cycle, and a dependent instruction may follow
  immediately. This mode assumes the StVRF access fits in one clock period.
  At 45 nm the StVEC register file of this size was estimated at about
  0.30 ns, against 0.24 ns for the unmodified file.
* **2.** For a clock faster than the StVRF access. An instruction with a
  non-zero offset registers its adjusted operand in its first cycle and
  executes in its second. `in_ready` is low during that extra cycle, so the
  instruction costs two cycles. Aligned instructions still take one cycle.
  This corresponds to the pessimistic estimate, in which an StVEC instruction
  costs as much as two dependent SIMD instructions. That is the likely case
  for 256-bit, 8-bank register files, estimated at 0.50 ns.

The instruction must stay unchanged while it waits for `in_ready`. An
assertion in `stvec_vpu` checks this.

## Arithmetic (`simd_fu`, `fp32_mul`, `fp32_add`)

Each lane has one binary32 multiplier and one binary32 adder/subtractor. Both
round to nearest, ties to even. This design makes the following choices:

* subnormal inputs are read as zero;
* results below the normal range are flushed to a signed zero, the SSE
  DAZ/FTZ behaviour (the flush is decided after rounding);
* overflow gives infinity;
* every NaN result is `0x7FC00000`;
* no exception flags are produced.

Only the packed-single operations MOV, ADD, SUB and MUL exist. The unit stands
in for a processor's existing SIMD unit; StVEC does not change it.

## Writing stencil code for it

For a 1-D stencil over aligned blocks of 4 points, keep the previous, current
and next input blocks in three registers, `P`, `C` and `N`:

* a tap at distance `r < 0` is an StVEC multiply with `offset = 4 + r`,
  base `P`, extension `C`;
* a tap at `r > 0` uses `offset = r`, base `C`, extension `N`.

After each output block, move `C` to `P` and `N` to `C`, then load the next
`N`. Radii up to 3 fit the 2-bit offset. In 2-D and 3-D, neighbours in y and z
are aligned blocks of other rows; only the unit-stride dimension needs StVEC
operands. `tb/tb_stencil1d.sv` and `tb/tb_stencil_nd.sv` contain complete
instruction sequences.

## Files

| file | contents |
|---|---|
| `rtl/stvec_pkg.sv` | lane width, operation enum, canonical NaN |
| `rtl/stvrf_bank.sv` | one 32-bit bank: 2 read ports, 1 write port |
| `rtl/bank_addr_gen.sv` | per-bank register addresses from offset/base/extension |
| `rtl/vra.sv` | vector register adjustment (rotator) |
| `rtl/stvrf.sv` | StVEC register file: banks + address logic + adjustment |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | one binary32 lane |
| `rtl/simd_fu.sv` | packed single-precision unit |
| `rtl/stvec_vpu.sv` | top: datapath with instruction, load and store ports |
| `tb/fp_ref_pkg.sv` | reference binary32 arithmetic (computed in double, rounded once) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the workloads |

Parameters of the top: `NUM_REGS` (128), `LANES` (4), `READ_CYCLES` (1). The
whole datapath is generic in `LANES`. The testbenches also run a
256-register, 8-bank configuration, the size of a 256-bit register file.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/stvec_pkg.sv tb/fp_ref_pkg.sv tb/tb_stencil1d.sv --top-module tb_stencil1d
    ./obj_dir/Vtb_stencil1d

Replace `tb_stencil1d` with any other testbench name. Each testbench ends by
printing `TB_RESULT checks=N failures=M`, and stops itself after a fixed
number of cycles if something hangs.

* `tb_stencil1d` runs at the default size. It covers the `A[i] += B[i-1]*B[i]`
  example and 1-D Jacobi stencils with 2, 3, 5 and 7 points. It checks every
  result and that each kernel runs at one instruction per cycle.
* `tb_stencil_nd` runs 2-D Jacobi 5- and 9-point, 3-D Jacobi 27-point and a
  7-point 3-D heat stencil.
* `tb_stvec_vpu` drives a random instruction stream through both timing modes
  at once and compares every store with an instruction-level model. It also
  checks that READ_CYCLES = 2 stalls exactly once per StVEC instruction and
  that READ_CYCLES = 1 never stalls. `tb_stvec_vpu_wide` repeats this with
  256 registers of 8 lanes, so offsets 0..7 are exercised.
* The block testbenches (`tb_stvrf`, `tb_vra`, `tb_bank_addr_gen`,
  `tb_stvrf_bank`, `tb_simd_fu`) check each part against its definition and
  against the offset-1/2/3 examples above.

Floating-point results are checked bit-exactly. The reference computes in
double precision and rounds once to binary32. For a single +, - or * this
always gives the correctly rounded binary32 result.

## Limits and departures

* **Design choices, not fixed by the StVEC idea:**
  * the instruction encoding and the valid/ready interface;
  * the load/store ports;
  * the src1 read port and the write port of the register file;
  * the reset (synchronous, active low, control state only; register contents
    are not reset);
  * the SSE convention `dst - src2` for subtraction;
  * all floating-point details.
* **Not built:**
  * double-precision lanes;
  * division, square root and other operations (a stencil needing them, such
    as Rician denoising, does not run here);
  * the memory hierarchy and the processor front end.
* **READ_CYCLES = 2** is one reading of "an StVEC instruction costs two
  dependent SIMD instructions". It charges the extra cycle only to
  instructions with a non-zero offset.
* **No circuit-level timing.** The register-file access times quoted above
  come from circuit-level estimates; this RTL neither reproduces nor checks
  them.
