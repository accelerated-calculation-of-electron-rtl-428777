# Rys-quadrature ERI quartet kernel

Hybrid density functional calculations spend a large part of their time on
electron repulsion integrals (ERIs): six-dimensional integrals over four
Cartesian Gaussian functions,

    [ab|cd] = ∫∫ g_a(r) g_b(r) 1/|r - r'| g_c(r') g_d(r') dr dr'

They come in *quartets*: for shells of angular momenta (la, lb, lc, ld) all
n_a·n_b·n_c·n_d integrals over their Cartesian components are computed
together, where a shell of momentum l has n(l) = (l+1)(l+2)/2 components.
An [ss|ss] quartet is one integral; an [ff|ff] quartet is 10 000.

This RTL is an FPGA kernel for one quartet type, chosen by parameters, that
computes quartets by Rys quadrature in single precision and streams them to
global memory. It follows the structure of the oneAPI kernel presented in
*Accelerated Calculation of Electron Repulsion Integrals on FPGAs using oneAPI*
(Paderborn Center for Parallel Computing, Intel Stratix 10 GX 2800 on a
BittWare 520N card): three loops — setup, compute and copy — connected by
on-chip stores with a custom banked layout, each loop fully unrolled so that
it advances one step per clock cycle. The default configuration is [ff|ff].

## What a quartet costs

The kernel's throughput follows a simple cycle model. For one quartet

| loop    | cycles            | [ff|ff] |
|---------|-------------------|---------|
| setup   | 3 · n_Rys · (ld+1) | 84      |
| compute | n_c · n_d          | 100     |
| copy    | ⌈n_ERI / 16⌉       | 625     |

and since the three loops work on different quartets at the same time, a
quartet leaves every max(setup, compute, copy) cycles. Cycles per integral is
that maximum divided by n_ERI; integrals per second is f_clk divided by it.
For large quartets the copy loop, limited by one 512-bit memory word per
cycle, sets the rate: 0.0625 cycles per integral for [ff|ff].

Measured in simulation (steady-state interval between finished quartets):

| quartet | n_ERI | model | measured | bound by |
|---------|-------|-------|----------|----------|
| [ss|ss] | 1     | 3     | 4        | setup    |
| [pp|ss] | 9     | 6     | 6        | setup    |
| [ps|pp] | 27    | 12    | 12       | setup    |
| [pp|pp] | 81    | 18    | 18       | setup    |
| [ss|dd] | 36    | 36    | 38       | compute  |
| [ff|ff] | 10000 | 625   | 628      | copy     |

The few extra cycles are the hand-over between loops (see *Slots and
hand-over*).

## The arithmetic

Rys quadrature writes each integral as a sum over n_Rys roots of a product of
three one-dimensional ("2-D") integrals, one per direction:

    [ab|cd] = Σ_ν  Ix_ν(ax,bx,cx,dx) · Iy_ν(ay,by,cy,dy) · Iz_ν(az,bz,cz,dz)

with n_Rys = ⌊(la+lb+lc+ld)/2⌋ + 1 (7 for [ff|ff]) and the Rys weight and
Gaussian prefactor folded into Iz. For one direction and one root the 2-D
integrals follow from five coefficients by two-index recurrences:

    G(0,0)   = I00
    G(n+1,0) = C00  G(n,0) + n B10 G(n-1,0)
    G(n,m+1) = C00' G(n,m) + m B01 G(n,m-1) + n B00 G(n-1,m)      (vertical)
    I(a,b+1,·) = I(a+1,b,·) + (A-B) I(a,b,·)                         (bra transfer)
    I(·,c,d+1) = I(·,c+1,d) + (C-D) I(·,c,d)                         (ket transfer)

The kernel receives these coefficients — not atomic coordinates — as a stream
of records (`eri_pkg::rys_coef_t`: C00, C00', B00, B10, B01, A−B, C−D, I00,
eight FP32 words), 3·n_Rys records per quartet in the order x roots 0..n−1,
then y, then z. Computing the Rys roots and weights, and from them the
coefficients, is outside this RTL.

All arithmetic is IEEE-754 single precision with round-to-nearest-even
(`eri_pkg::fp_mul`, `fp_add`, each one combinational operator; a DSP block of
the target holds one of each). Subnormals are flushed to zero and NaN is never
produced; an overflow gives infinity. Multiplies and adds are rounded
separately, not fused.

Cartesian components are ordered with the x power descending, then the y
power descending: p = (x, y, z); d = (xx, xy, xz, yy, yz, zz); f = (xxx, xxy,
xxz, xyy, xyz, xzz, yyy, yyz, yzz, zzz).

## The three loops

**Setup loop** (`rys_setup_loop`). Per record, a fully unrolled datapath
evaluates the vertical recurrence for G(n,m), n ≤ la+lb, m ≤ lc+ld, and the
bra transfer, and keeps the resulting array K(a,b,t), t ≤ lc+ld, in registers
(448 bytes for [ff|ff]). K(a,b,c) for c ≤ lc is the d = 0 slice of I(a,b,c,d).
In each of the next ld cycles one ket-transfer step is applied to K, giving
slice d = 1..ld. Each slice — I(a,b,c,d) for all a, b, c of one direction,
root and d — is written to the 2-D store in one cycle. That is ld+1 cycles
per record and 3·n_Rys·(ld+1) per quartet, with no gap between records.

**Compute loop** (`eri_compute_loop`). Walks through the n_c·n_d ket
component pairs (c, d), one per cycle. For the current pair it reads, for
every direction μ, root ν and bra powers (a, b), the value
I_μ,ν(a, b, c_μ, d_μ) and forms all n_a·n_b integrals of that column in
parallel: n_a·n_b sum-of-products units, each with 2·n_Rys multipliers and
n_Rys−1 adders (2100 operators for [ff|ff]). The column is written one word
per bank into the quartet store.

**Copy loop** (`eri_copy_loop`). Reads 16 integrals per cycle from arbitrary
banks and addresses of the quartet store and emits one 512-bit word. This
re-packing is why the loop exists: a column of n_a·n_b integrals is in
general not a multiple of the 16 lanes of a memory word.

## The two stores

**2-D integral store** (`i2d_buffer`). Logically the 6-D array
I_μ,ν(a,b,c,d). It is split into banks indexed by (μ, ν, a, b, c), each
ld+1 words deep and addressed by d. The setup loop's slice write touches one
word in each bank of one (μ, ν); the compute loop's read takes one word from
bank c = c_μ of each (μ, ν, a, b). One write and one read port per bank
suffice, so no bank needs a replicated copy. For [ff|ff]: 3·7·4·4·4 = 1344
banks of 4 words per slot.

**Quartet store** (`eri_buffer`). The 4-D quartet as a 2-D array: n_a·n_b
banks (one per bra pair), n_c·n_d words deep (addressed by the ket pair).
The compute loop writes one word per bank per cycle. The copy loop's 16 reads
may hit the same bank several times; written as an array with a
combinational read, the store leaves replication or a register
implementation to synthesis.

Both stores are written as plain arrays with combinational reads, so that
synthesis can choose registers, MLAB or (with an added read register) block
RAM.

## Slots and hand-over

Both stores have two slots so that the loops overlap on successive
quartets. Each slot has a *full* flag in `eri_kernel`:

* The setup loop takes the first record of a quartet only when the slot that
  quartet will use is empty; it alternates between slots 0 and 1. Its last
  slice sets the slot full.
* The compute loop starts when its input slot is full and its output slot is
  empty. When it has written its last column it empties the input slot, fills
  the output slot, and both of its slot pointers flip.
* The copy loop starts when its slot is full and empties it once its last word
  has been accepted by memory.

Each hand-over costs a cycle or two: the compute loop can start again two
cycles after its last read and the copy loop three cycles after its last
word. This is visible only when that loop sets the rate (628 instead of 625
cycles for [ff|ff], 38 instead of 36 for [ss|dd]).

Back-pressure propagates backwards: when memory stops accepting words, the
copy loop holds its word, the compute loop waits for an empty output slot,
and the setup loop stops taking records once both 2-D slots are full. The
`stall_setup`, `stall_compute` and `stall_copy` outputs show each of these.

## Global memory format

Quartet q (counting from 0 after reset) occupies word addresses
q·NW … q·NW+NW−1 with NW = ⌈n_ERI/16⌉, 64 bytes per word. Integral
i = (ia·n_b + ib)·n_c·n_d + ic·n_d + id is in word ⌊i/16⌋, lane i mod 16
(bits 32·lane+31 … 32·lane). Lanes past the end of the quartet are zero.
The store stream (`mem_valid`, `mem_ready`, `mem_addr`, `mem_data`) holds a
word until it is accepted; spreading words over the memory channels is left
to the memory system.

## Top-level interface (`eri_kernel`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low (control state only) |
| coef_valid, coef_ready | in, out | 1 | record handshake |
| coef | in | 256 | `rys_coef_t` record |
| mem_valid, mem_ready | out, in | 1 | store handshake |
| mem_addr | out | AW (32) | word address |
| mem_data | out | 512 | 16 FP32 integrals |
| quartets_done | out | 32 | quartets fully stored |
| stall_setup / stall_compute / stall_copy | out | 1 | status, see above |

Parameters: `LA`, `LB`, `LC`, `LD` (0..3 tested; default 3) and `AW`.
Every quartet type is its own instance, as one compiled kernel per variant
serves the 256 types [ss|ss] … [ff|ff].

## Departures and limits

* The recurrences and the Rys sums are single-cycle combinational logic. The
  schedule and cycle counts are those of a deeply pipelined datapath, but to
  reach a useful clock frequency pipeline registers have to be added inside
  `rys_setup_loop` and `eri_compute_loop` (adding latency, not cycles per
  quartet). As written the critical path is long.
* The compute loop produces n_a·n_b integrals per cycle over n_c·n_d cycles,
  matching the cycle model and the bank layout of the quartet store. (For the
  symmetric [ff|ff] default the other reading, n_c·n_d per cycle, gives the
  same numbers.)
* Double buffering of both stores is this design's way of letting the three
  loops overlap as the max() cycle model requires.
* The record format, record order, handshakes, reset, integral order in
  memory, the store banking dimensions and the FP32 corner-case handling are
  this design's choices.
* Rys roots and weights, the DDR4 memory controllers and the host link are
  not part of the RTL.

## Files

`rtl/`:
`eri_pkg.sv` (types, FP32 operators, Cartesian helpers),
`rys_setup_loop.sv`, `i2d_buffer.sv`, `eri_compute_loop.sv`,
`eri_buffer.sv`, `eri_copy_loop.sv`, and the top `eri_kernel.sv`.

`tb/`: one self-checking testbench per block (`tb_<module>.sv`),
`tb_fp32_ops.sv` (operators bit-exact against double precision),
`eri_kernel_harness.sv` (stimulus, memory model and reference for whole
kernels), `tb_eri_kernel.sv` ([ps|pp]), `tb_eri_kernel_variants.sv`
(four quartet types side by side), `tb_eri_kernel_full.sv` ([ff|ff] at the
default parameters) and `fp_ref_pkg.sv` (FP32 ↔ real helpers).

The reference model in the testbenches computes the 2-D integrals in double
precision with the binomial form of the transfer relations,
I(a,b,c,d) = Σ_i Σ_j C(b,i)(A−B)^(b−i) C(d,j)(C−D)^(d−j) G(a+i, c+j),
independently of the RTL's step-by-step transfer. Integrals are compared with
a relative tolerance of 1e-3 and an absolute floor of 1e-4 of the largest
integral in the quartet; the largest error seen is about 2.5e-7 of that.
Coefficients are random, so the tests check the datapath and dataflow, not
chemistry.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/eri_pkg.sv tb/fp_ref_pkg.sv tb/tb_eri_kernel.sv --top-module tb_eri_kernel
    ./obj_dir/Vtb_eri_kernel

Replace `tb_eri_kernel` by any other testbench name. Each prints a
`TB_RESULT checks=N failures=M` line; the kernel testbenches also print the
measured cycles per quartet against the model and how often each stall
happened. The [ff|ff] testbench takes about five minutes to compile (the
compute loop alone is 2100 FP32 operators) and under a second to run.
