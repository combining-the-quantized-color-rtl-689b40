# QCPX: a color-packed SIMD execution cluster for YCbCr video

Most SIMD extensions for general-purpose processors split a 32-bit word into
four equal 8-bit lanes. That suits RGBA pixels, but wastes space on the alpha
lane, and it gives no help to video code that works on luminance and
chrominance together. QCPX (Quantized Color Pack eXtension) uses lanes of
unequal width instead. Chrominance can be quantized more coarsely than
luminance without visible loss, so a pixel takes 16 bits: 8 bits of Y and
4 bits each of Cb and Cr. A 32-bit register then holds **two whole YCbCr
pixels**, and one instruction works on six color components at once. A
128-bit **color-packed accumulator** keeps full-precision sums of products and
of absolute differences. With it, filters, transforms and block matching run
without unpacking, widening or saturation fix-ups in the inner loop.

This repository holds synthesizable SystemVerilog for the QCPX execution
hardware:

- the function units for the three instruction groups;
- the accumulator;
- a register file with operand forwarding;
- a top level, `qcpx_unit`, with four QCPX ALUs and one QCPX multiply unit.
  This is the mix of units QCPX was evaluated with, inside a 4-wide
  out-of-order superscalar core.

The host core itself is not part of this RTL: fetch, rename, scheduling,
caches and load/store. `qcpx_unit` exposes issue slots and a register write
port from memory for such a core to drive.

## The packed pixel word

```
 31    28 27    24 23          16 15    12 11     8 7           0
+--------+--------+--------------+--------+--------+-------------+
|  Cr1   |  Cb1   |      Y1      |  Cr0   |  Cb0   |     Y0      |
+--------+--------+--------------+--------+--------+-------------+
 pixel 1                          pixel 0
```

`qcpx_pkg` defines this word as `qword_t`, a packed array of two `ycc_t`
structs. Fields never interact: no carry, borrow or shift crosses a field
boundary. Each operation is applied six times, to widths 8, 4, 4, 8, 4, 4.

Which two pixels share a word is up to the software, and the kernels below
use three arrangements:

- **Neighbours in one vector** (VQ). After the block-matching loop is
  unrolled by two, pixels *i* and *i+1* of a 16-pixel vector share a word.
- **Two windows** (EDGE, SMF, VMF). Pixel (x, y) of the left half of the
  image is paired with pixel (x + W/2, y) of the right half. Every
  neighbourhood access is then word-aligned, and two output pixels come out
  of each instruction sequence.
- **Two blocks** (DCT, ME). Rows *r* and *r+4* of an 8x8 block, or the same
  pixel of two adjacent 16x16 macroblocks, share a word.

## Instructions

All opcodes are in `qcpx_op_t` (`rtl/qcpx_pkg.sv`). In the tables, *w* is the
field width (8 or 4).

**Parallel arithmetic and logical group** (`qcpx_arith`, on the ALUs)

| op | per field |
|---|---|
| `OP_ADD`, `OP_SUB` | modulo 2^w |
| `OP_ADDS`, `OP_SUBS` | field read as two's complement, result clamped to [-2^(w-1), 2^(w-1)-1] |
| `OP_ADDUS`, `OP_SUBUS` | unsigned, result clamped to [0, 2^w-1] |
| `OP_AVG` | floor((a+b)/2) |
| `OP_BCAST` | a[7:0] into every Y field, a[3:0] into every Cb/Cr field |
| `OP_SLL`, `OP_SRL` | logical shift by b[3:0]; a shift of w or more gives 0 |

**Parallel compare group** (`qcpx_cmp`, on the ALUs; all fields unsigned)

| op | per field |
|---|---|
| `OP_CMPEQ`, `OP_CMPGT`, `OP_CMPLT` | all ones if a = b, a > b or a < b holds, else zero; used as masks instead of branches |
| `OP_MIN`, `OP_MAX` | the smaller or larger field, chosen separately for each field |

**Multiply and divide** (`qcpx_muldiv`, on the MULT unit)

| op | per field |
|---|---|
| `OP_MUL` | low *w* bits of the unsigned product (a truncating multiply) |
| `OP_DIV` | unsigned quotient; all ones for a zero divisor |

**Special-purpose group** (`qcpx_special`, on the MULT unit; see the next section)

| op | effect |
|---|---|
| `OP_MACC` | acc.f += a.f (unsigned pixel) × b.f (signed coefficient) |
| `OP_ADACC` | acc.f += \|a.f − b.f\| |
| `OP_ZACC` | acc = 0 |
| `OP_RACC` | rd = acc field number `sel` (0 Y0, 1 Cb0, 2 Cr0, 3 Y1, 4 Cb1, 5 Cr1), sign-extended to 32 bits |

## The color-packed accumulator

The accumulator (`qcpx_acc_rf`, one entry of 128 bits by default) holds one
signed running sum per color component per pixel:

```
127                                                    64 63                                                     0
| Cr1 sum (20) | Cb1 sum (20) |      Y1 sum (24)        | Cr0 sum (20) | Cb0 sum (20) |      Y0 sum (24)        |
```

The published proposal gives the 128-bit total but not this split. The widths
were chosen so that no sum in the six video kernels below can overflow:

| kernel | largest Y sum | largest Cb/Cr sum |
|---|---|---|
| 16x16 motion-estimation SAD | 256 × 255 = 65,280 | 256 × 15 = 3,840 |
| 8-tap DCT row with 4-bit coefficients | 8 × 255 × 7 = 14,280 | 8 × 15 × 7 = 840 |
| 3x3 Laplacian | ±2,040 | ±120 |

Sums that do exceed the width wrap around.

How the accumulator is used:

- **MACC** reads its first operand as unsigned pixels and its second as signed
  coefficients. Both filter masks and cosine tables have negative entries. A
  coefficient from −8 to 7 is loaded as a sign-extended byte and spread to all
  six fields with `OP_BCAST`. It then has the same value in the 8-bit and the
  4-bit fields.
- **ADACC** computes the distance measure of vector quantization, motion
  estimation and the vector median filter: six sums of absolute differences
  in one instruction.
- **RACC** is this design's addition. The proposal describes no instruction
  that moves a sum back to a general register, but the accumulator output
  feeds the operand path. A distance is then the sum of three `OP_RACC`
  results, added by the host's integer ALU. This happens once per codeword,
  candidate or window, not once per pixel.

The accumulator belongs to the single MULT unit, so two instructions can never
update it in the same cycle. Its read-modify-write completes in the issue
cycle. MACC or ADACC can therefore issue every cycle, and an `OP_RACC` in the
next cycle already reads the new sum.

## The execution cluster (`qcpx_unit`)

```
             alu_instr[0..3]          mul_instr        ld_valid/ld_rd/ld_data
                   |                      |                    |
        +----------v----------------------v---------+          |
        | register file  32 x 32, 10 read ports,    |<---------+  (highest priority)
        |                6 write ports              |<---------------------+
        +----------+----------------------+---------+                      |
                   | rs1/rs2 per slot     |                                |
            [bypass mux] x 10  <---- wb_data / wb_rd / wb_valid ---+       |
                   |                      |                        |       |
   +-------+-------+-------+-------+   +--v-----------+            |       |
   | ALU 0 | ALU 1 | ALU 2 | ALU 3 |   | MULT unit    |            |       |
   +---+---+---+---+---+---+---+---+   |  muldiv      |            |       |
       |       |       |       |       |  special <-> acc_rf       |       |
       |       |       |       |       +------+-------+            |       |
       +-------+-------+-------+--------------+--> write-back regs-+-------+
```

**Timing.** Each issue slot takes one instruction per cycle; the cluster
never stalls.

- **Cycle *t*:** an instruction reads its operands (register file or bypass)
  and executes. Accumulator updates land at the end of the cycle.
- **Cycle *t+1*:** its result sits in the write-back registers. It shows on
  `wb_valid/wb_rd/wb_data` and is forwarded to any instruction of this cycle
  that names the same register. At the end of the cycle it is written into
  the register file.

A dependent instruction can therefore follow in the very next cycle.
`fwd_hit` shows, per slot and operand, when the bypass supplied the value.

**Issue rules.** The host's scheduler must keep these rules; assertions check
them in simulation.

1. ALU slots carry only ALU-group opcodes. The MULT slot carries only
   `OP_MUL` to `OP_RACC`.
2. Slot order is program order: ALU slot 0 is the oldest, the MULT slot the
   newest.
3. No instruction may read a register that an older instruction of the same
   cycle writes. Both source fields are checked, so an unused source field
   must not name such a register either.
4. A load (`ld_valid`) counts as older than that cycle's instructions, and
   none of them may read the register being loaded. The loaded value is
   visible from the next cycle.
5. Two slots may write the same register in one cycle; the newer slot wins
   in both the register file and the bypass. A load in cycle *t* overrides
   a write-back to the same register in cycle *t*, because that write-back
   belongs to an older instruction.

Under these rules the cluster computes the same results as executing the
instructions one at a time in program order. The end-to-end testbench checks
exactly that.

**Parameters.**

| parameter | default | meaning |
|---|---|---|
| `N_ALU` | 4 | QCPX ALUs (as evaluated) |
| `NREGS` | 32 | registers |
| `NACC` | 1 | accumulators |

## The video kernels on this hardware

Each kernel has a testbench that drives `qcpx_unit` with the QCPX instruction
sequence of its inner loop. The testbenches use 176x144 three-component
images, the QCIF frame size. They compare every result with plain integer
arithmetic.

| kernel | instructions per step | measured on the full image |
|---|---|---|
| EDGE, 3x3 Laplacian (center −8, neighbours +1) | ZACC, 9 × MACC (BCAST coefficient registers), 6 × RACC per two outputs | 195,394 instructions, 195,396 cycles |
| SMF, 3x3 scalar median | 19 compare-exchanges (MIN + MAX each), two per cycle on four ALUs where independent | 476,268 instructions, 256,452 cycles |
| VMF, 3x3 vector median, L1 norm | per candidate pixel: ZACC, 8 × ADACC, 6 × RACC | 1,648,620 instructions, 1,758,528 cycles |
| VQ, 4x4 vectors, 256 codewords | per codeword: ZACC, 8 × ADACC, 6 × RACC | 6,082,560 instructions, 6,095,232 cycles (all 1,584 blocks × 256 codewords) |
| DCT, 8-point 1-D on 8x8 blocks | per output: ZACC, 8 × (BCAST + MACC), 6 × RACC | 291,456 instructions, 304,128 cycles |
| ME, 16x16 macroblocks, search −15..+16 | per candidate: ZACC, 256 × ADACC, 6 × RACC | one macroblock pair, all 1,024 candidates: 269,312 instructions, 531,456 cycles |

Loads share the cycle with an instruction where the kernel allows it. ME needs
two loads per ADACC, so the single load port bounds it at one ADACC every two
cycles. The cycle counts cover only this cluster, one load per cycle and the
instruction order shown. They are not whole-processor timings.

## Choices made in this design

The published proposal defines the pixel format, the instruction list, the
128-bit accumulator and the unit counts. The following are this design's own
choices:

- The accumulator split (24/20/20 bits per pixel) and wrap-around on overflow.
- MACC operand signedness: unsigned pixels, signed coefficients.
- The `OP_RACC` read-out instruction.
- `OP_BCAST` source bits: the low byte goes to Y, the low nibble to Cb/Cr.
- Shift amounts taken from `b[3:0]`.
- AVERAGE truncates.
- MULTIPLY keeps the low bits of each product.
- DIVIDE returns all ones for a zero divisor.
- Compares are unsigned.
- MULTIPLY, DIVIDE and all accumulator instructions run on the MULT unit;
  everything else runs on the ALUs.
- 32 registers, with no hard-wired zero register. The register file has two
  read ports per slot, one write port per unit plus a memory port, and a
  synchronous reset.
- The two-stage EX/WB timing, newest-wins forwarding, and the issue rules
  above.
- The binary encoding of the opcodes, and the `qcpx_instr_t` issue-slot
  format (op, rd, rs1, rs2, sel, acc).

Not built: the superscalar host core and its memory hierarchy. These are
4-wide fetch/decode/issue/commit, a 16-entry RUU, an 8-entry load/store
queue, baseline integer and floating-point units, a combined branch
predictor, 16 KB L1 instruction and data caches, a 256 KB L2 cache and TLBs.
Instruction encoding, decode and store data paths belong to that core.

## Files

| file | content |
|---|---|
| `rtl/qcpx_pkg.sv` | types (`ycc_t`, `qword_t`, `acc_t`, `qcpx_instr_t`), opcodes, per-field arithmetic functions |
| `rtl/qcpx_arith.sv`, `rtl/qcpx_cmp.sv` | arithmetic/logical and compare groups (combinational) |
| `rtl/qcpx_alu.sv` | one QCPX ALU = arith + cmp |
| `rtl/qcpx_muldiv.sv` | MULTIPLY / DIVIDE |
| `rtl/qcpx_special.sv` | MACC / ADACC / ZACC / RACC datapath |
| `rtl/qcpx_acc_rf.sv` | accumulator register file |
| `rtl/qcpx_mult_fu.sv` | MULT unit = muldiv + special + acc_rf |
| `rtl/qcpx_rf.sv` | multi-port register file |
| `rtl/qcpx_bypass.sv` | operand forwarding mux |
| `rtl/qcpx_unit.sv` | top level: the cluster |
| `tb/qcpx_ref_pkg.sv` | reference model, written separately from the RTL |
| `tb/tb_<module>.sv` | unit testbench per module |
| `tb/tb_qcpx_unit.sv` | end-to-end random test at default parameters |
| `tb/tb_qcpx_wl_*.sv` | the six video kernels |

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qcpx_unit \
    -y rtl -y tb +libext+.sv rtl/qcpx_pkg.sv tb/qcpx_ref_pkg.sv tb/tb_qcpx_unit.sv
./obj_dir/Vtb_qcpx_unit
```

Replace `tb_qcpx_unit` with any other testbench name. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung run
as a failure.

- **Unit testbenches:** finish in well under a second.
- **End-to-end test:** 20,000 cycles of random five-wide issue. It counts
  every forwarding, same-cycle double write, load-over-write-back,
  saturation, divide by zero and accumulator instruction, and fails if any
  of them never occurs. It runs in seconds.
- **Kernel testbenches:** take roughly 5 to 30 seconds each.

## How far to trust it

- Every module has a self-checking testbench against the independent
  reference model.
- Every testbench has been shown to fail on a deliberately broken copy of its
  module. Examples: reversed forwarding priority, an unsigned MACC
  coefficient, a divider with swapped operands.
- The end-to-end test runs 20,000 cycles of random five-wide issue. It checks
  every write-back result, about 100,000 slot results, against a
  program-order model, then reads back every register.
- All RTL passes Verilator lint and elaborates in Yosys with the slang front
  end.
- Not verified: timing closure and area on any technology. The proposal
  assumed a 0.18 µm process at 600 MHz. The 8-bit and 4-bit dividers and
  multipliers here are single-cycle and untimed.
