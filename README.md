# ILU0-preconditioned BiCGStab solver for an HBM FPGA

This design is a sparse linear solver in hardware. It solves `A x = b` with the
stabilized bi-conjugate gradient method (BiCGStab) and a zero-fill incomplete
LU preconditioner (ILU0), all in double precision. Once the host has placed
the data in memory, the solver runs with no host help until it converges or
hits an iteration limit. The target is a card with DDR4 and an HBM stack,
such as an Alveo U280:

- The matrices (A and the two ILU0 factors L and U) stream from two DDR4 read ports.
- All vectors live in HBM.
- One vector at a time is held on chip, in a large URAM buffer.

The central idea is that one pipeline does three jobs:

- the sparse matrix-vector product (SpMV);
- the forward substitution of the preconditioner;
- the backward substitution of the preconditioner.

Substitution is normally sequential: row i needs the rows before it. The
host therefore *colors* the matrix. A color is a group of rows that never
refer to each other. Rows are renumbered color by color. Within a color every
row depends only on earlier colors, so the rows of a color can run through an
SpMV-style pipeline like independent dot products. The same coloring also
splits the multiplied vector into per-color *partitions* that fit in small,
heavily ported on-chip memories.

## Matrix format: new row offsets (CSRO)

A CSR row pointer array would need a variable number of pointers per cycle.
This design instead gives every non-zero a *new row offset*:

- 0 means "same row as the previous value".
- k > 0 means "this value starts a row that is k rows further on".
- k − 1 rows in between were empty.

The first value of a color is measured from row −1 of that color. Data arrive
as 512-bit lines of eight entries each:

- **Value lines:** eight doubles, on DDR read port 0.
- **Index lines:** eight 32-bit column indices in bits 255:0 and the eight
  matching new row offsets in bits 511:256, on DDR read port 1.
- **Padding:** a lane whose offset is all ones is padding.
- **Column indices:** positions *inside the color's vector partition*, not
  global column numbers.

For each color, the host also writes two things to DDR read port 1:

- **A color table entry:** first global row, number of partition indices,
  number of rows, number of lines.
- **The partition index list:** sixteen 32-bit global indices per line.

These record types are defined in `rtl/solver_pkg.sv`.

## The SpMV pipeline (`spmv_pipeline`)

Per cycle the pipeline takes one value line and one index line:

1. **Vector partition memories.** Eight lookups read `x[col]` from four
   dual-ported copies of the current partition (`vector_partition_mem`, one
   copy per two multipliers). Every copy holds the whole partition.
2. **Multipliers.** Eight `fp_mul` units form the products.
3. **Control unit.** `spmv_control_unit` turns the new row offsets into:
   segment starts for the adder tree, the global row of each segment, and
   flags for rows that began in an earlier line or run into the next one.
   It also counts skipped empty rows.
4. **Selective adder tree.** `selective_adder_tree` is a segmented prefix sum
   over three levels of adders. At every lane that ends a row it gives the sum
   of that row's values within this line.
5. **Reduce unit.** `reduce_unit` joins the pieces of a row that spans lines.
   It keeps one open row in an accumulator and adds each continuing piece to
   it. Its adder takes one cycle, so rows that continue over consecutive
   lines need no hazard logic. It emits at most one finished row per line.
6. **Merge unit.** `merge_unit` collects up to nine finished rows per cycle
   (eight lanes plus the reduce unit) into a 128-entry buffer and drains it
   over two output ports.
7. **Back-pressure.** The merge unit's free count stops new lines entering
   the pipeline. This is the pipeline's *stall*: a run of one-entry rows
   produces eight results per line but only two can leave per cycle.

Results leave out of row order. The write unit (`write_unit`) holds one
result and one valid bit per row of the color. It releases rows strictly in
order, so no result is sent before its row is complete. When a color is
drained, empty rows are released as 0. Each valid bit is cleared as its row
is released, and once for all rows by a sweep after reset.

## The matrix operation unit (`matrix_op_unit`)

This unit wraps the pipeline and processes one color at a time:

1. `external_read_unit` fetches the color table entry and the partition index
   list, and then streams the matrix lines.
2. `internal_read_unit` reads the vector values at the partition indices from
   the URAM vector memory (`uram_vector_mem`, 262,144 doubles) and writes them
   into all partition copies.
3. The matrix lines run through the pipeline, and the write unit orders the
   results.
4. The results go out in one of three modes:
   - **SpMV:** `line_packer` packs results into lines for an HBM write port.
     Partial lines use per-lane write enables.
   - **Forward substitution (L):** `ilu0_unit` computes `p[i] -= s_i` in URAM.
   - **Backward substitution (U):** `ilu0_unit` computes
     `p[i] = (p[i] - s_i) / d[i]`, fetching the diagonal `d` from HBM. It
     writes URAM and the HBM result vector.

Backward substitution runs bottom-up. The host therefore stores U with its
colors listed last-first. The substitution updates `p` in place in URAM. Each
color loads its partition after the previous color has written its results,
so the values it reads are always current.

## The vector and scalar side

- **`dot_axpy`: one lane-parallel vector unit.** It has eight multipliers and
  eight adders.
  - *axpy mode:* computes `a + alpha * b` for one line per cycle.
  - *dot mode:* sends the products through an adder tree into a pipelined
    final adder, which adds each new tree output to its own earlier outputs.
    After the last line, a reduction step pairs the outstanding partial sums
    (tree output, adder output, a hold register) until one value is left.
- **`vector_ops_unit`: two `dot_axpy` units on two HBM read streams.** It
  writes through a small output buffer. Its commands are axpy, dot, and a
  double dot that produces `t·r` and `t·t` in one pass for the omega step.
- **`fp_scalar_ops`: the scalar work.** It does add, subtract, multiply,
  divide, square root and move. Latencies are:
  - 2 cycles for add, subtract, multiply and move;
  - 60 cycles for divide and square root (iterative radix-2 units).
- **`variable_regs`: the scalar registers.** They hold alpha, beta, omega,
  rho, rho_new, the convergence threshold, the current norm and two
  temporaries.

All floating point is IEEE-754 binary64, rounded to nearest even. Subnormal
inputs and results are flushed to zero (`fp_add`, `fp_mul`, `fp_div`,
`fp_sqrt`).

## The solver sequencer (`bicgstab_solver`)

The top level is a step-by-step program. Each step starts one operation:

- SpMV with A;
- a fill of URAM from an HBM vector;
- an ILU0 forward or backward pass;
- a vector command;
- a scalar operation.

The program is the standard right-preconditioned BiCGStab:

```
r = b - A x ; r̂ = r ; p = v = 0 ; rho = alpha = omega = 1 ; thr = rel_tol·|r|
loop
  rho_new = r̂·r ;  beta = (rho_new/rho)(alpha/omega)
  p = r + beta (p - omega v) ;  y = M⁻¹ p ;  v = A y
  alpha = rho_new / (r̂·v) ;  rho = rho_new
  x += alpha y ;  r -= alpha v ;  stop if |r| ≤ thr
  z = M⁻¹ r ;  t = A z ;  omega = (t·r)/(t·t)
  x += omega z ;  r -= omega t ;  stop if |r| ≤ thr or iterations = max_iter
```

Applying the preconditioner `M⁻¹ q` takes three steps:

1. Fill URAM with `q`.
2. Run the forward pass with L.
3. Run the backward pass with U and the diagonal; this writes the result to HBM.

### Vectors in HBM

Vectors sit in HBM *slots* at line address `vec_base + slot·vec_stride`:

| Slot | Vector |
|---|---|
| 0 | b |
| 1, 2 | x (two copies) |
| 3, 4 | r (two copies) |
| 5, 6 | p (two copies) |
| 7 | r̂ |
| 8 | v |
| 9 | t |
| 10 | y / z |
| 11 | scratch |

x, r and p are kept twice. An update reads the copy written last and writes
the other copy, then the two swap roles. Because of this, no HBM port ever
reads and writes the same vector at the same time.

### Port use

| Port | Memory | Use |
|---|---|---|
| `ddr_rd_req/rsp[0]` | DDR | matrix values |
| `ddr_rd_req/rsp[1]` | DDR | color tables, partition indices, index lines |
| `hbm_rd_req/rsp[0]` | HBM | first vector operand |
| `hbm_rd_req/rsp[1]` | HBM | second vector operand |
| `hbm_rd_req/rsp[2]` | HBM | URAM fills and diagonal fetches |
| `hbm_wr[0]` | HBM | vector results for the first copy |
| `hbm_wr[1]` | HBM | vector results for the second copy |
| `hbm_wr[2]` | HBM | matrix-unit results |

Every port carries a 512-bit line per beat with valid/ready. Read responses
return in request order.

### Start and finish

1. Put the initial guess in slot 1.
2. Give the configuration (`solver_cfg_t`) and pulse `start`. The
   configuration holds:
   - the vector length in lines;
   - the slot base and stride;
   - the three matrix commands (A, L, U), each with its color count and base
     addresses;
   - `rel_tol`;
   - `max_iter`.
3. When `done` pulses, read the outputs:
   - `converged`;
   - `iterations` (a finished half iteration counts as one);
   - `res_norm`;
   - `x_addr`, the line address of the copy of x that holds the solution.

The `ev_*` outputs pulse once per event (stall, color, mode switch, ping-pong
swap, fill, double dot, iteration) for monitoring.

## Sizes

Defaults are the full-size values:

| Size | Default | Limits |
|---|---|---|
| URAM vector memory | 262,144 doubles | vector length and the number of columns |
| Vector partition memories | 65,536 doubles each | number of partition indices per color |
| Write unit result memory | 65,536 rows | rows per color |
| Merge buffer | 128 entries | |

The solver top's parameters are `URAM_DEPTH`, `VP_DEPTH` and `ROWS_MAX`.

Every matrix in the reference test set fits the 262,144-entry vector memory.
The largest solver case has 133,293 rows and 1.3 million non-zeros in A.
Whether a matrix also fits the 65,536 rows per color depends on its coloring;
realistic reservoir matrices need several colors anyway.

## Where this design departs from the reference architecture

- **No look-ahead between colors.** The reference reads the next color's
  partition indices and vector values while the current color is in the
  pipeline. It also forwards ILU0 results straight into the partition
  memories. Here every color reads its indices, loads its partition, runs and
  drains before the next one starts. Results are identical; the run is slower.
- **Scalar diagonal.** The reference divides by 3×3 diagonal blocks of the
  block matrix in the backward substitution. Here the division is by one
  diagonal value per row; the host would have to supply an unblocked
  diagonal.
- **Beta formula.** The reference's listing writes beta as
  `(rho·alpha)/(rho_new·omega)` with rho starting at 0. This design uses the
  standard `(rho_new/rho)(alpha/omega)` with rho, alpha and omega starting at
  1. It still uses two multiplications and one division.
- **Own choices.** The reference does not specify:
  - the memory layout of the color table and index lines;
  - the port handshakes;
  - the number of merge unit outputs;
  - the adder and divider latencies;
  - the slot layout;
  - the iteration limit.

  All of these are this design's own.
- **No vendor interfaces.** The reference runs on vendor AXI interfaces with
  256-bit HBM ports widened by the tools, and on vendor floating-point cores.
  Here the ports are plain line streams and the floating point is written out.
- **Not included.** There are no models of the DRAM or HBM devices, the AXI
  interconnect or the host software; the testbenches play those parts.

## Files

`rtl/` holds one module or package per file:

| Group | Files |
|---|---|
| Packages | `fp64_pkg`, `solver_pkg` |
| Floating point | `fp_add`, `fp_mul`, `fp_div`, `fp_sqrt`, `fp_scalar_ops` |
| SpMV pipeline | `vector_partition_mem`, `spmv_control_unit`, `selective_adder_tree`, `reduce_unit`, `merge_unit`, `spmv_pipeline` |
| Matrix unit | `line_reader`, `external_read_unit`, `internal_read_unit`, `write_unit`, `line_packer`, `ilu0_unit`, `uram_vector_mem`, `matrix_op_unit` |
| Vector side | `dot_axpy`, `vector_ops_unit`, `variable_regs` |
| Top | `bicgstab_solver` |

`tb/` holds one self-checking testbench per unit. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_spmv_pipeline` exercises the control unit and the reduce unit.
- `tb_matrix_op_unit` runs SpMV and both ILU0 passes on a small colored grid.
  It also exercises the read units, the ILU0 unit and the line packer.
- `tb_bicgstab_solver` is the end-to-end test, with all parameters at their
  defaults. It builds a 512-unknown non-symmetric system, colors it, computes
  the ILU0 factors and lays everything out in the memory format above. It
  then models the DDR and HBM ports with latency and random back-pressure.
  The test checks:
  - the solution against the known `x`;
  - the iteration count against a real-arithmetic run of the same algorithm;
  - that every mechanism happened at least once: stall, color change, mode
    switch, swap, fill, double dot, back-pressure, partial-line write and
    empty rows.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing -j 4 --top-module tb_bicgstab_solver \
    rtl/fp64_pkg.sv rtl/solver_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
    tb/tb_bicgstab_solver.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run another test. The
end-to-end test takes a few seconds of simulation time. The full-size URAM
and partition memories make its build and memory footprint the largest.
