# Affine transformation and sparse matrix-vector kernels for an FPGA accelerator card

This RTL implements, as plain SystemVerilog, the kernels you get when you take
GPU-style vector expressions written with the VexCL C++ library and port them
to a PCIe FPGA accelerator card. It covers two applications:

* **Affine transformation**, `t = y + A x`, for a dense `m x n` matrix. The
  kernel is the one VexCL generates for `reshape`/`reduce` expressions. It
  keeps VexCL's general index arithmetic, so one piece of hardware serves any
  set of reshape/reduce arguments the host passes.
* **Sparse matrix-vector product with an element-wise prologue**:
  `t = A * phi(u1, u2, u3)`, where
  `phi = (u1 - u2 + ln²(u3)·sin(u1)) / (u1·u2)` and `A` is held in the hybrid
  ELL/CSR ("HELL") format. This takes two kernels, `phi` and `spmat`. They
  communicate only through a buffer in external memory.

Each kernel has its own AXI4-Lite control slave, which holds its scalar
arguments and buffer addresses, and its own set of memory ports. The host
(PCIe, DMA, driver) and the DDR4 banks are outside this RTL. The testbenches
stand in for both.

```
                 +--------------------------------------------------------+
 host  AXI4-Lite | kernel_ctrl -> affinetrans   ports 0..2 -> memory (t | y,A | x)
 ------------->  | kernel_ctrl -> phi          ports 0..3 -> memory (u1 | u2 | u3 | out)
                 | kernel_ctrl -> spmat        ports 0..3 -> memory (see below)
                 +--------------------------------------------------------+
                            vexcl_fpga_top
```

## Files

| file | contents |
|---|---|
| `rtl/vexcl_pkg.sv` | widths, memory-port and AXI4-Lite structs, default number formats |
| `rtl/vexcl_fpga_top.sv` | the three kernels with their control slaves, side by side |
| `rtl/kernel_ctrl.sv` | AXI4-Lite slave: argument registers, start/done/idle |
| `rtl/affinetrans.sv` | affine kernel |
| `rtl/phi.sv` | element-wise kernel; uses `fx_log`, `fx_sin`, `udiv_seq`, `fx_quant` |
| `rtl/spmat.sv` | HELL sparse matrix-vector kernel |
| `rtl/fx_quant.sv` | fixed-point format conversion (round/truncate, saturate/wrap) |
| `rtl/fx_log.sv` | natural logarithm, fixed point |
| `rtl/fx_sin.sv` | sine, fixed point (CORDIC) |
| `rtl/udiv_seq.sv` | sequential restoring divider |
| `rtl/mem_port.sv` | one memory master with one access outstanding |
| `tb/ddr_model.sv` | behavioural multi-port memory with random stalls and latency |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus two for the top |
| `tb/top_tb_body.svh` | shared host sequence and reference models of the two top-level tests |

## Memory ports and control

**Memory port.** A kernel port is a simple request/response channel
(`mem_req_t`/`mem_rsp_t` in the package). It is not a full AXI4 master.
* A request carries `valid`, `we`, a 32-bit **word** address and 64-bit write
  data. It is held until `ready`.
* A read answers with `rvalid` and `rdata` some cycles later.
* Each port has at most one access outstanding. `mem_port` runs this
  handshake, and an assertion checks that a request stays stable while it
  stalls.

To put the kernels on an AXI4 interconnect, place a bridge at each port. Every
buffer element occupies one 64-bit word. A fixed-point value is sign-extended
in the low bits of its word. Column indices and row pointers are unsigned
words whose low 32 bits are used as addresses.

**Control.** Register map of `kernel_ctrl`, with byte offsets:

| offset | meaning |
|---|---|
| `0x00` | bit 0 start: write 1 to start; reads 1 while running |
| | bit 1 done: set at the end; cleared when `0x00` is read |
| | bit 2 idle |
| `0x10 + 4*i` | argument `i` (32 bits) |

A write completes in one cycle when AWVALID and WVALID are both high. WSTRB
is ignored. The kernel samples its arguments at start. `irq` mirrors the done
bit.

The argument order of each kernel:

| kernel | arguments 0, 1, 2, ... |
|---|---|
| affinetrans | n, t, y, A, x, slice1, slice2, slice3, slice4, start, length0, stride0, length1, stride1 |
| phi | n, out, u1, u2, u3 |
| spmat | n, scale, ell_w, ell_pitch, ell_col, ell_val, csr_row, csr_col, csr_val, in, out |

## The affine kernel and its index arithmetic

The VexCL kernel does not know that `A` is an `m x n` matrix. It receives a
reduction described by a start offset and two (length, stride) pairs, and a
"slice" transform that tells it which element of `x` goes with each matrix
element. For output element `idx`:

```
ptr1 = start + (idx mod length0) * stride0
for i1 in 0 .. length1-1:
    ptr2 = ptr1 + i1 * stride1                 -- element of A
    k    = slice1 * (((slice2 + ptr2) / slice3) mod slice4)   -- element of x
    sum  = sum + A[ptr2] * x[k]
t[idx] = y[idx] + sum
```

For a row-major `m x n` matrix, the host passes `n = m`, `slice = (1, 0, 1, n)`
and `reduce = (start 0, length0 m, stride0 n, length1 n, stride1 1)`. Other
argument sets give other strided reductions, for example `Aᵀx`. The testbench
uses a column-major layout to check this.

The datapath is a sequential state machine.
* It computes `ptr1` once per row. The modulo in that step uses the shared
  32-cycle restoring divider.
* For each element it runs a division and a modulo, again on the divider.
* It then issues the `A` read on port 1 and the `x` read on port 2 together,
  and adds the product to the sum.
* At the end of the row it reads `y` (port 1) and writes `t` (port 0).

This costs about 75 cycles per matrix element with the memory model's
latency. The port assignment (t / y,A / x) puts the two reads that are needed
together on different ports.

### Fixed-point formats

Numbers follow `ap_fixed<W, I, Q, O>` conventions:
* `W` is the total number of bits and `I` the number of integer bits, sign
  included.
* Q is `RND` (round to nearest, with ties toward +∞) or `TRN` (floor).
* O is `SAT` (clamp to the largest or smallest value) or `WRAP` (keep the low
  bits).

`fx_quant` does every conversion in the design.

| quantity | format | parameters |
|---|---|---|
| A, x, y | `<18,7>` RND SAT (11 fraction bits) | `FW`, `FI` |
| row sum, t | `<64,54>` RND SAT (10 fraction bits) | `LW`, `LI` |

Each product is added to the sum at full precision. The result is then rounded
and saturated back to the sum format, as an assignment to a variable of that
type would do. Because the sum has one fraction bit less than the inputs,
products are rounded on every addition. A narrower sum, such as `<44,33>`, is
one parameter change. The top brings these parameters out as `AFF_LW` and
`AFF_LI`.

## phi: element-wise functional units

For each element, `phi` does the following:
1. Reads u1, u2 and u3 on ports 0 to 2 at once.
2. Starts `fx_log(u3)` and `fx_sin(u1)`.
3. Forms `ln²`, `u1·u2` and `ln²·sin`. Each step is truncated and wrapped to
   `<VW,VI>`, which defaults to `<32,16>`.
4. Divides on a `VW+VF` bit signed-magnitude sequential divider, with the
   quotient floored.
5. Writes the result on port 3.

Two cases have no ordinary answer:
* A zero divisor gives the largest value of the numerator's sign, and
  `ev_div0` pulses.
* The log of a non-positive value gives the most negative value.

**Logarithm (`fx_log`).** The unit normalises `x` to `m·2^e` with `1 ≤ m < 2`
by finding the leading one. `e` is the integer part of `log2 x`. It then makes
`F+4` squaring steps. Each step squares `m`. When the square reaches 2 or more,
the unit halves it and emits a 1 bit of the fraction of `log2 m`. The result is
`(e + fraction) · ln 2`. Latency: `F+5` cycles from `start` to `done`.

**Sine (`fx_sin`).** The unit reduces the argument modulo 2π, using a
multiplication by 1/(2π) in place of a division. It folds the result into
[-π/2, π/2]. It then runs `ITER` CORDIC rotation steps, starting from the
vector `(K, 0)`. `K` is the CORDIC gain constant, so no final scaling is
needed. The angle table holds `round(atan(2^-i) · 2^30)`. Latency: `ITER+1`
cycles.

Each element takes roughly `VW+VF+F+10` cycles plus memory time, about
92 cycles in the full-size test.

## spmat: the HELL format

The matrix is split into an ELL part and an optional CSR part.

**ELL part.** It consists of two dense `pitch x ell_w` column-major arrays,
`ell_col` and `ell_val`. Row `i` has its `j`-th entry at `i + j*pitch`. Rows
with fewer than `ell_w` entries are padded with a column index of all ones,
and the kernel skips those entries. `ev_pad` pulses for each one.

**CSR part.** It holds the rows' remaining entries as usual: `csr_row[i] ..
csr_row[i+1]-1` index `csr_col`/`csr_val`. A `csr_row` argument of 0 means
that there is no CSR part.

**Per entry.** The kernel reads the column index and the value together, on
two ports, then reads `in[col]`, and accumulates. At the end of the row it
writes `out[i] = scale * sum`.

Port use:

| port | buffers |
|---|---|
| 0 | ell_col, csr_row |
| 1 | ell_val, csr_col |
| 2 | csr_val, out |
| 3 | in |

Values, `scale` and `in` are `<32,16>`. The sum is `<64,48>`. Both truncate
and wrap.

For the full application, the host runs `phi` into a temporary buffer. It
then runs `spmat` with that buffer as `in` and `scale = 1`.

## Where this design departs from the design it is modelled on

* **Number format of the SpMV application.** The original `phi` and `spmat`
  kernels compute in IEEE double precision and use the vendor's maths
  library. Here both are fixed point, and the log, sine and divider are this
  design's own. The formats of these two kernels are this design's choice.
  Results differ from double precision by the quantization (about 2^-12
  absolute in the tests) and at the limits of the range.
* **Memory interface.** The memory ports are the simple word-addressed
  channel described above, not AXI4 masters with bursts. Burst reads and
  structs packed to the 512-bit bus width were tried in the original work and
  found not to help; they are not built.
* **Throughput.** The kernels are sequential state machines that handle one
  element at a time, not pipelined loops. The affine kernel needs about
  75 cycles per matrix element. A pipelined high-level-synthesis kernel with
  the same interfaces was measured at roughly 10 cycles per element on
  `10⁴ x 10⁴`. Pipelining the loop body is the obvious next step.
* **Interpretation choices.**
  * Rounding ties go toward +∞.
  * Division and modulo in the index arithmetic are unsigned.
  * Arguments are 32 bits wide.
  * Addresses count words, not bytes.
  * Reset is asynchronous and active low.
  * The register map is this design's own.

## Verification

Every block has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed independently in the testbench: real arithmetic for log, sine and
phi, and integer models for the quantizer and the kernels.

| testbench | what it checks |
|---|---|
| `tb_fx_quant` | exhaustive and random conversions, all four mode combinations, rounding carry into saturation |
| `tb_fx_log`, `tb_fx_sin` | accuracy over the range, latency in cycles |
| `tb_kernel_ctrl` | register reads and writes, start pulse, done clearing, back-pressure on B and R |
| `tb_affinetrans` | row- and column-major argument sets, saturation of sum and result |
| `tb_phi` | random vectors against a real-valued reference, zero divisor |
| `tb_spmat` | random HELL matrices with and without a CSR part |
| `tb_vexcl_fpga_top` | both applications end to end through the AXI4-Lite slaves, with a narrowed affine sum; fails if any of stall, saturation, padding skip, CSR entry or zero divisor never occurred |
| `tb_vexcl_fpga_full` | the top at default parameters: a 256 x 256 affine transformation (about 4.9 M cycles) and a 512 x 512 SpMV at density 0.01 |
| `tb_vexcl_fpga_wl` | the top at default parameters: a 32 x 32 affine transformation and a 5000 x 5000 SpMV at density 0.01 (about 250,000 non-zeros; phi 0.46 M cycles, spmat 4.0 M cycles) |

The larger sizes the kernels were evaluated at (up to 10⁴ x 10⁴ dense and
10⁸ non-zeros sparse) fit the 32-bit word addressing, but were not simulated.
At about 75 cycles per element, a 10⁴ x 10⁴ affine run would take
7.5·10⁹ cycles.

The memory model (`tb/ddr_model.sv`) withholds `ready` at random and returns
reads after a random latency, so every kernel meets stalls. It is behavioural
only.

Simulating with Verilator 5, for example the full-size test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_vexcl_fpga_full \
    rtl/vexcl_pkg.sv rtl/*.sv tb/ddr_model.sv tb/tb_vexcl_fpga_full.sv
./obj_dir/Vtb_vexcl_fpga_full
```

For another testbench, replace the top module and the last file. Block
testbenches need only the package, the block, its helpers and, for the
kernels, `tb/ddr_model.sv`.

## Changing the design

* **Affine number formats:** `affinetrans #(FW, FI, LW, LI)`, or the `AFF_*`
  parameters on the top.
* **SpMV number formats:** `SPMV_VW`/`SPMV_VI` on the top, or `VW, VI, AW, AI`
  on `spmat` and `VW, VI` on `phi`. The log, sine and divider follow `VW`/`VI`.
* **CORDIC precision:** `fx_sin #(ITER)`.
* **Number of control arguments:** `kernel_ctrl #(NARGS)`.
* **Memory width:** `DATA_W` and `ADDR_W` in the package.
