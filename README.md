# A red-black Gauss-Seidel preconditioner for an FPGA-assisted CG solver

A conjugate-gradient (CG) solver for the 2-D Poisson equation spends much of
each iteration applying its preconditioner, z = M⁻¹r. With a symmetric
successive over-relaxation (SSOR) preconditioner at ω = 1 (one symmetric
Gauss-Seidel step) and a red-black ordering of the grid, all points of one
colour depend only on points of the other colour. That makes the
preconditioner a streaming, data-parallel job that can be handed to an FPGA
while the host CPU keeps running CG.

This RTL is the FPGA side of such a system:

* `sgs_precond` applies the red-black symmetric Gauss-Seidel preconditioner
  to a residual that the host has copied into the accelerator board's memory,
  and streams z back.
* `bench_proc` processes measure what single-precision arithmetic costs on
  the FPGA. Each one repeats +, × or ÷ (or an integer addition) n times with
  a dependency chain. Up to eight adders run side by side to show parallel
  speed-up.
* `rpu_top` holds both, with every external connection as a plain port.

The host CPU, its CG loop, the CPU–FPGA link and the board's DRAM are not part
of this RTL. The testbenches play the host, and `tb/rldram_model.sv` stands in
for the memory.

All arithmetic is IEEE-754 single precision (binary32).

## The preconditioner step

Take an n × n interior grid, five-point Poisson stencil (centre 4, neighbours
−1). One preconditioner application is two passes:

| pass | points | update |
|---|---|---|
| 1, red | (row + col) odd | z = (r + (r₊ₓ + r₋ₓ + r₊ᵧ + r₋ᵧ)/4) / 4 |
| 2, black | (row + col) even | z = r + (z₊ₓ + z₋ₓ + z₊ᵧ + z₋ᵧ)/4 |

The red pass reads only residual values, and the black pass reads the fresh
red results. A red point therefore costs 4 additions and 2 divisions, a black
point 4 additions and 1 division.

### Stencil coefficients

The unit does not hard-wire the Poisson stencil. Before the first
application, the host streams five coefficients, in this order: centre c,
then +x, −x, +y, −y neighbours wₖ. The general form used is

    S(v)   = Σₖ (−wₖ)·vₖ                       over the four neighbours
    red:   z = (r + S(r)/c) / c
    black: z = r + S(z)/c

With (4, −1, −1, −1, −1), which is also the reset value, this is exactly the
table above. The products by −wₖ are exact for the Poisson stencil. They are
this design's way to make the coefficients programmable.

### Memory layout and the halo

The residual sits in memory as an (n+2) × (n+2) row-major grid at
`base_addr`. The outer ring (the halo) holds zeros, written by the host. The
four neighbour addresses of a point are therefore always valid (centre ± 1,
centre ± (n+2)), and no boundary test exists anywhere in the datapath.
Colours are defined in these halo coordinates: the corner cell and interior
cell (1,1) are black.

Each finished z overwrites its r in place. This is safe, because points of one
colour never read each other. It is also how the black pass finds the red
results. After an application, the interior of the grid holds z.

### Output order

z is streamed out in this order: every red point row by row, then every black
point row by row. `z_last` marks the final word. The host must scatter the
stream back into its own ordering.

### Datapath and timing

One instance each of the three arithmetic units is shared by a sequential
state machine:

    SCAN → READ (5 requests) → MUL (4 products, pipelined)
         → ADD1 (2 partial sums) → ADD2 (sum) → DIV1 (÷c) → ADD3 (+r)
         → [DIV2 (÷c), red only] → WRITE (z to memory) → EMIT (z to stream)

The adder and the multiplier take 5 cycles each. The divider takes 29 cycles
and is not pipelined, so it dominates.

With memory read latency L, no memory stalls and no stream back-pressure:

* a red point takes 96 + L cycles;
* a black point takes 66 + L cycles;
* each row of each pass adds 1 cycle, and the pass change and the end add 1
  cycle each.

One application on an n × n grid therefore takes about n²/2·(162 + 2L) + 2n + 2
cycles. For 500 × 500 and L = 4, that is 21,251,002 cycles, or 0.21 s at
100 MHz (simulated). For 4000 × 4000 it is about 1.4·10⁹ cycles, or 13.6 s
(not simulated).

The design makes no attempt to overlap points. A faster design would pipeline
the stencil and issue one point every 29 cycles, the divider's initiation
interval. That needs two dividers for red points, or pipelined dividers. Such
a design would take about n²·290 ns. It is not what is built here.

### Interfaces (`sgs_precond`, also on `rpu_top` with an `sgs_` prefix for control)

| group | signals | protocol |
|---|---|---|
| coefficients | `coef_valid/ready/data` | valid/ready; accepted only while idle; five words, then the index wraps |
| control | `start`, `grid_n`, `base_addr`, `busy`, `done` | `start` is a one-cycle pulse while idle; n and base are latched then; `done` pulses once at the end |
| memory | `mem_req/ready/we/addr/wdata`, `mem_rvalid/rdata` | a request is taken when `mem_ready` is high; read data return in request order after any latency |
| result | `z_valid/ready/data/last` | valid/ready |

Addresses count 32-bit words; ADDR_W = 27 bits covers 512 MB. DIM_W = 12
bits covers n up to 4095. The largest grid this design targets is
4000 × 4000, which needs 64 MB.

## Floating-point units

| unit | latency | throughput | method |
|---|---|---|---|
| `fp_add` | 5 | 1/cycle | combinational add/subtract, then a 5-stage delay line |
| `fp_mul` | 5 | 1/cycle | combinational 24×24 product, then a 5-stage delay line |
| `fp_div` | 29 | 1 per 29 cycles | restoring division, 1 quotient bit per cycle; `in_ready` low while busy |

The 5- and 29-cycle figures are the worst-case operation times of the
100 MHz FPGA fabric the design targets. The delay-line structure is a
modelling convenience: a real implementation would spread the logic over
those stages.

Number handling is the same in all three units, and it is simpler than full
IEEE-754:

* rounding is to nearest, ties to even;
* subnormal inputs count as zero, and subnormal results are flushed to
  signed zero;
* overflow gives ±∞;
* every invalid operation gives the quiet NaN 0x7FC00000.

Latency convention: for the pipelined units, operands are sampled on one edge
and the result is valid in the cycle after the LATth register. Back-to-back
dependent operations therefore start every LAT cycles, and the divider
follows the same rule.

## Benchmark processes

`bench_proc` accepts a request {s, n} on its input stream. It sets
sol = 0 (for +) or 1 (for × and ÷), performs sol = sol ∘ s n times, and
returns sol. Each operation is issued in the same cycle the previous result
appears, so a request takes exactly n·LAT + 1 cycles:

* 0.050 µs per addition or multiplication at 100 MHz;
* 0.290 µs per division.

In `rpu_top`, processes 0…N_ADD−1 (N_ADD = 8) repeat an addition, process
N_ADD a multiplication, process N_ADD+1 a division, and process N_ADD+2 an
integer addition. The integer variant treats s and sol as 32-bit
two's-complement integers. One loop step takes 2 cycles: the addition
overlaps the loop bookkeeping, so sol = n·s mod 2³² after 2n + 1 cycles. Each has its own
request and reply streams, so k adders given the same request finish
together. Aggregate throughput thus scales as k: 0.0125 µs per addition for
4 adders and 0.00625 µs for 8 (simulated).

The start value of sol and the compile-time choice of operation are this
design's choices.

## Files

| file | content |
|---|---|
| `rtl/fp32_pkg.sv` | binary32 type, constants, latencies, benchmark op enum, rounding helper |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | arithmetic units |
| `rtl/bench_proc.sv` | repeated-operation benchmark process |
| `rtl/sgs_precond.sv` | red-black symmetric Gauss-Seidel preconditioner |
| `rtl/rpu_top.sv` | top level |
| `tb/fp_ref_pkg.sv` | binary32 reference (double-precision op, one rounding) |
| `tb/rldram_model.sv` | behavioural memory model: fixed read latency, random stalls |
| `tb/tb_<unit>.sv` | one self-checking testbench per module |
| `tb/tb_bench_sweep.sv` | benchmark runs with n = 100, 10⁴ and 10⁶, for 1, 4 and 8 adders |
| `tb/tb_sgs_grid500.sv` | one full application on a 500 × 500 grid |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at default parameters:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rpu_top \
      rtl/fp32_pkg.sv tb/fp_ref_pkg.sv rtl/fp_add.sv rtl/fp_mul.sv rtl/fp_div.sv \
      rtl/sgs_precond.sv rtl/bench_proc.sv rtl/rpu_top.sv tb/rldram_model.sv \
      tb/tb_rpu_top.sv
    obj_dir/Vtb_rpu_top

`tb_rpu_top` runs one preconditioner application on a 6 × 6 grid, with random
memory stalls and stream back-pressure. In parallel, it runs all eleven
benchmark processes. It counts each mechanism (coefficient load, red and
black updates, divisions, memory stalls, back-pressure, parallel adders,
multiply, divide and integer-add benchmarks) and fails if one never happens.

The two workload benches take about 20 s (`tb_sgs_grid500`) and about 80 s
(`tb_bench_sweep`).

The arithmetic is checked against a reference that widens the operands to
double precision, applies the operation, and rounds once to binary32. For
+, −, × and ÷ this gives the correctly rounded single-precision result. The
preconditioner reference follows the hardware's order of operations exactly:
((+x)+(−x)) + ((+y)+(−y)). The comparisons are therefore bit-exact.

## Limits and departures

* The host side is not RTL: the CG loop, the software process that copies r
  and sends start, the CPU–FPGA link (HyperTransport on the target board) and
  the DRAM. Their connections are the ports of `rpu_top`.
* The preconditioner is a sequential state machine, not the fully pipelined
  one-point-per-29-cycles datapath a hand-optimised design would use. It is
  roughly 3× slower than that pipelined ideal.
* The four coefficient multiplications per point are not needed for the
  Poisson stencil. They exist only to make the stencil programmable.
* Only one pipeline is built. Several pipelines on disjoint rows would be the
  natural next step, but the board has two memory interfaces, so at most two
  such pipelines could read memory at the same time.
* Not simulated: 10⁸ benchmark operations (5·10⁸ cycles) and grids above
  500 × 500. Their cycle counts follow from the formulas above.
* Subnormals are flushed to zero. The Poisson preconditioner never produces
  them for reasonable residuals, but the units are not fully IEEE-754
  compliant.
