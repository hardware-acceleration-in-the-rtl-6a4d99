# Extended information filter accelerator for vehicle motion estimation

A truck's motion-control software has to know its own state (longitudinal
speed and its rate of change, yaw rate and yaw acceleration) every control
period, but it only sees noisy wheel-speed, IMU and other sensor signals. A
state-estimation filter turns 13 sensor inputs into that state vector. The
filter is an extended Kalman filter in *information form*: instead of the
covariance P it carries the information matrix I = P^-1 and the information
vector i = I x. Every step is small dense matrix arithmetic, including four
matrix inverses per iteration. Those inverses dominate the run time on a
processor.

This RTL is a fixed-point hardware version of that filter. It is sized for
the four-state filter and also parameterised for 8 and 16 states. It follows
the structure of an FPGA filter IP from a study of offloading this filter to
an FPGA. That study's IP was generated by high-level synthesis. The
equations, the matrix patterns, the choice of inversion methods and the
latency budgets come from that source. The micro-architecture below is this
design's own.

## What one iteration computes

State between iterations: the N-element information vector `i` and the
N x N information matrix `I`. A reset branch reloads them from an
initialisation vector. Otherwise each iteration continues from the previous
result.

| step | equation | hardware |
|---|---|---|
| matrix formation | F, G, Q, H, R from the step time T, noise vectors, sensor values | combinational, latched at start |
| 1 | F^-1, Q^-1 | Gauss-Jordan (N x N), 2 x 2 formula (N/2) |
| 2 | i_h = F^-1 i | multiply |
| 3 | I_h = F^-T I F^-1 | 2 multiplies |
| 4 | X = I_h G (G^T I_h G + Q^-1)^-1 G^T | 4 multiplies, fused add, N/2 inverse |
| 5 | i_p = i_h - X i_h, I_p = I_h - X I_h | multiplies with fused subtract |
| 6 | P = I_p^-1 | Gauss-Jordan (N x N) |
| 7 | x = P i_p (the output) | multiply |
| 8 | i = i_p + H^T R y | 2 multiplies, fused add |
| 9 | I = I_p + H^T R H | 2 multiplies, fused add |

`y` holds the 13 measurements. Step 8 is where the extended filter would use
its non-linear measurement model: i = i_p + H^T R (y - h(x) + H x). That
model is not available. This design takes h(x) = H x, so the bracket reduces
to y. This is the largest functional departure: the hardware is exact for a
linear measurement model. A non-linear h(x) needs one more unit between
steps 7 and 8.

### The matrices

For four states, with T the step time:

```
F = [1 T 0 0; 0 1 0 0; 0 0 1 T; 0 0 0 1]      (N x N)
G = [T/2 0; 0 0; 0 T/2; 0 T]                   (N x N/2)
Q = diag(q_diag)                               (N/2 x N/2)
R = diag(r_diag)                               (13 x 13)
```

H is a fixed 13 x 4 pattern of ones and zeros. Five entries instead take a
sensor-derived value, supplied on the `h_var` port (one value per row; the
pattern is printed in the header of `rtl/eif_filter.sv`). For 8 and 16
states, F and G repeat the four-state blocks along the diagonal and H repeats
its pattern for every group of four columns. The source gives only the four-state matrices, so
this extension is an assumption.

## Architecture

```
           command                 shared memory (64-bit words)
              |                            ^ |
        +-----v----------------------------|-v------+
        | eif_dma   read block -> start -> write back|
        +-----+----------------------------^---------+
              | inputs (parallel)          | x_out, info_vec, singular
        +-----v----------------------------+---------+
        | eif_filter                                  |
        |   matrix formation -> register file (24 slots)|
        |   phase sequencer --> mat_mul               |
        |                   --> gj_inverse (shared)   |
        |                   --> inv2x2 (N = 4)        |
        |                   gj_inverse --> fx_div     |
        |                   inv2x2     --> fx_div     |
        +---------------------------------------------+
```

### The filter core (`eif_filter`)

Every matrix lives in a register file of 24 slots of MAXD x MAXD words
(MAXD = max(N, 13)). The slots are F, G, Q, H, R, y, the persistent `I` and
`i`, and one slot per intermediate result. A phase sequencer walks through 18
phases in a fixed order. The `op_of` function describes each phase: which
unit runs, the source slots, the destination slot, the sizes, the transpose
flags, and an optional fused add or subtract. Only one unit runs at a time.
The iteration is a strict dependency chain, so overlapping the phases would
gain little. The source design found the same for task-level pipelining.

- Multiplies go to `mat_mul`. It unrolls the inner loop (MAXD multipliers)
  and streams out one result element per clock. The sequencer writes each
  element into its destination slot. It can first add the element to a third
  slot or subtract it from one, which makes I_h - X I_h, G^T T2 + Q^-1 and
  the two update sums free.
- Both N x N inverses (F and I_p) share one `gj_inverse` instance.
- For N = 4 the two N/2 x N/2 inverses (Q and G^T I_h G + Q^-1) go to
  `inv2x2`, which uses the closed-form 2 x 2 formula. For larger N they reuse
  the Gauss-Jordan unit.

With `filt_init` high at `start`, the core loads `i = init_vec` and
`I = diag(init_diag)` in the same clock as it latches the formed matrices.

### Inverses

`gj_inverse` works on the augmented matrix [A | I]. For each column it:

1. finds the largest-magnitude pivot at or below the diagonal and swaps that
   row up,
2. computes the reciprocal of the pivot with the shared sequential divider,
3. scales the pivot row,
4. clears the column in the other rows, one row per clock.

The divider dominates: DW+FW+2 = 74 clocks per column, against n clocks for
the elimination. A zero pivot sets `singular`.

`inv2x2` forms the determinant, divides once, and multiplies.

### Number format

All values are 48-bit two's complement with 24 fraction bits. That gives a
range of about ±8.4 million and a resolution of 6e-8. The original filter
ran in double precision, so the format is an assumption. Products are
truncated. Dot products are summed at full precision and rounded once. The
divider saturates on overflow. The testbenches accept 1e-3 absolute plus
1e-3 relative error against a double-precision model.

The format has a limit. Each iteration adds H^T R H to `I`, so `I` grows
over many iterations without re-initialisation. Its entries must stay below
about 8e6, and the inverse P must keep enough fraction bits. For long runs
or badly conditioned inputs, widen `DW`/`FW`. Every unit is parameterised.

## Timing

Clocks per filter iteration, measured in simulation, against the latency of
the reference FPGA IP (after its optimisation, at 100 MHz):

| states | this design | reference IP |
|---|---|---|
| 4 | 1,018 | 1,360 |
| 8 | 2,594 | 3,826 |
| 16 | 6,258 | 8,014 |

For N = 4 most of the time goes to the two 4 x 4 inverses: 325 clocks each,
1 + n (n + DW + FW + 5) in general. The two 2 x 2 inverses take 77 clocks
each. The multiplies take about 200 clocks in all. A faster divider, such as
a radix-4 divider or a Newton-Raphson reciprocal, is the first thing to
change for speed.

The block mover reads 50 words and writes 9 per command for N = 4. With a
memory of 1 to 3 clocks of read latency that takes about 230 clocks. The
reference gives 854 cycles for its transfer straight from DDR.

## The accelerator top (`eif_accel`) and its memory block

The processor writes an input block to shared memory and issues a command
(`cmd_start`, `cmd_init`, `in_base`, `out_base`). The filter can only start
once all its inputs are present, so `eif_dma` reads the whole block first.
It then runs one iteration and writes the results to `out_base`. Addresses
count 64-bit words. Each value sits in the low 48 bits of its word.

```
in_base:  step_t | q_diag[N/2] | r_diag[13] | h_var[13] | y[13] | init_vec[N] | init_diag[N]
out_base: x_out[N] | info_vec[N] | status (bit 0 = singular)
```

The memory port is a plain request/grant port:

- A request is accepted in a clock where `mem_req` and `mem_gnt` are both
  high.
- Read data returns in order on `mem_rvalid`, after any delay.
- Only one request is in flight.

This port is not AXI. The original moved its data over AXI with a
vendor-generated zero-copy data mover. Connecting this design to an AXI
interconnect needs a small adapter.

## Where this departs from the source

- The measurement model h(x) is taken as linear (see above).
- The number format is fixed point; the source used floating point.
- The micro-architecture (register file, phase sequencer, one element per
  clock, shared divider) is this design's own. The source IP came out of
  high-level synthesis, unrolled its loops wherever it could, and was
  optimised for latency with no regard for area.
- The source inverted even the 4 x 4 matrices of the four-state filter by
  determinant and adjoint. Here they go through the shared Gauss-Jordan
  unit, which serves every size.
- The 4 x 2 matrix used as G was printed as "Q" in the source. From its
  shape it is the noise-to-state matrix G.
- The matrices for 8 and 16 states are extrapolated from the four-state
  ones.
- The memory port is request/grant instead of AXI.

## Files

`rtl/`:

- `eif_pkg.sv`: default sizes and the phase enumeration.
- `eif_accel.sv`: top; block mover plus filter.
- `eif_dma.sv`: reads the input block, starts the filter, writes the results.
- `eif_filter.sv`: the filter core, with matrix formation, register file and
  phase sequencer.
- `mat_mul.sv`: the matrix multiplier.
- `gj_inverse.sv`: the Gauss-Jordan inverse.
- `inv2x2.sv`: the 2 x 2 formula inverse.
- `fx_div.sv`: the fixed-point divider.

`tb/`:

- `eif_ref_pkg.sv`: double-precision reference model of one iteration.
- `tb_eif_accel.sv`: the whole accelerator at default size, with a stalling
  memory model.
- `tb_eif_filter.sv`, `tb_eif_filter_n8.sv`, `tb_eif_filter_n16.sv`: the
  filter core at 4, 8 and 16 states.
- One testbench per unit.

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. The end-to-end tests also check the
clock budgets above. They count the mechanisms that must occur: initialising
and continuing iterations, memory stalls, both inverse methods, and pivot
row swaps.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/eif_pkg.sv tb/eif_ref_pkg.sv tb/tb_eif_accel.sv \
  rtl/eif_accel.sv rtl/eif_dma.sv rtl/eif_filter.sv \
  rtl/mat_mul.sv rtl/gj_inverse.sv rtl/inv2x2.sv rtl/fx_div.sv \
  --top-module tb_eif_accel
./obj_dir/Vtb_eif_accel
```

Use the same pattern for the other testbenches. A unit test needs only its
unit, `fx_div.sv` for the inverses, and `tb/eif_ref_pkg.sv` where it is
imported. Each end-to-end run finishes in well under a second.

To change the size, set `N` (a multiple of 4) on `eif_accel` or
`eif_filter`. Set `DW`/`FW` for the number format; the testbenches' real
conversion helpers assume 48/24.
