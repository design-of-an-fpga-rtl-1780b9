# FDTD accelerator: 2-D electromagnetic field solver in single-precision float

This design accelerates the finite-difference time-domain (FDTD) method for a
two-dimensional TMz wave problem. The grid is n × n, and its cells hold one
electric component `Ez` and two magnetic components `Hx` and `Hy`. Each time
step updates `Ez` from the curl of `H`, forces `Ez = 0` on the perfectly
conducting outer wall, and drives the source cell at the grid centre. It then
updates `H` from the differences of the new `Ez`.

The accelerator works like an OpenCL device. A host loads the arrays into the
board's global memory (DDR3). The host counts the time steps and launches four
hardware kernels in turn. All kernels read and write global memory and nothing
else. The whole grid therefore streams through the external memory port every
step, so memory latency and bandwidth, not arithmetic, set the speed.

## The update equations

With coefficient arrays `Px, Py, Qx, Qy` (permittivity, permeability, cell size
and time step folded together, supplied by the host), the kernels compute in
IEEE 754 binary32:

```
efield:   Ez(i,j) = Ez(i,j) - Py(i,j)*(Hx(i,j) - Hx(i,j-1)) + Px(i,j)*(Hy(i,j) - Hy(i-1,j))     i>=1, j>=1
hfield:   Hx(i,j) = Hx(i,j) - Qy(i,j)*(Ez(i,j+1) - Ez(i,j))                                    j<=n-2
          Hy(i,j) = Hy(i,j) - Qx(i,j)*(Ez(i+1,j) - Ez(i,j))                                    i<=n-2
boundary: Ez = 0 on row 0, row n-1, column 0, column n-1
excite:   Ez(n/2, n/2) = source value of this step (from the host)
```

`Hx(i,j)` stands for the staggered value at (i, j+½) and `Hy(i,j)` for the one at
(i+½, j). Both H updates subtract their term. The physical sign of the `Hy` term
is therefore carried by `Qx`, which the host sets to −Δt/(μΔx) (the testbenches
use `Qx = −0.5`, `Qy = +0.5`). The E update is evaluated left to right, as
written above: `(Ez − Py·dHx) + Px·dHy`. A reference model that rounds every
operation to binary32 in that order matches the hardware bit for bit.

## One time step

| order | kernel            | launch value  | work per step (n = 512)         | cycles, n = 512 |
|-------|-------------------|---------------|---------------------------------|-----------------|
| 1     | `efield_kernel`   | –             | 511 × 32 vectors, 7 reads + 1 write each | ≈ 407 000 |
| 2     | `boundary_kernel` | –             | 2·32 + 2·510 masked writes      | ≈ 1 200         |
| 3     | `excite_kernel`   | source value  | 1 masked write                  | 3               |
| 4     | `hfield_kernel`   | –             | 512 × 32 vectors, 7 reads + 2 writes each | ≈ 410 000 |

The cycle counts were measured with a memory model of 10-cycle read latency that
stalls 10 % of cycles at random. The host's order within a step (efield,
boundary, excite, hfield) is the one the testbenches use. The hardware does not
enforce it. At about 820 000 cycles per step, 1000 steps on a 512 × 512 grid take
8.2·10⁸ cycles, or about 4 s at 200 MHz. That clock is an example, not a
measured one.

## Vectorised kernels

The E and H kernels are vectorised 16 wide (`LANES = 16`). One global-memory
word holds 16 consecutive cells of a row (16 × 32 = 512 bits), and each kernel
has 16 copies of its lane datapath. A kernel visits the vectors row by row.
For each vector it:

1. issues seven word reads back to back (held while `waitrequest` is high);
2. collects the seven in-order replies into operand registers;
3. starts all lanes at once (`efield_pe`: 4 pipeline stages, `hfield_pe`: 3);
4. writes the result word(s) with per-lane enables.

It works on one vector at a time, so a vector costs about 7 + memory latency +
pipeline depth + writes, which is about 24 cycles with the model above. This
simple schedule keeps the kernel correct under any memory latency and
back-pressure. It is also where speed could be gained by overlapping vectors.

**Neighbours across a word boundary.** The E update of lane 0 needs `Hy(i−1)`,
which lives in the previous word. The H update of lane 15 needs `Ez(i+1)`, which
lives in the next word. Each kernel reads that neighbouring word as its seventh
operand and takes the single lane it needs. At the grid edge the address is
clamped to the current word, and the lane that would use it is masked anyway:
lane 0 of vector 0 is not updated by `efield`, and the last column of `Hy` is
not written by `hfield`. The row neighbours (`Hx(j−1)`, `Ez(j+1)`) are plain
words of the adjacent row, clamped at the last row.

**Which cells are left alone.** `efield` skips row 0 and column 0, as the
original kernel's guard `(i>=1)&&(j>=1)` does. It updates the last row and
column, and the boundary kernel then zeroes them. `hfield` leaves `Hx` of the
last row and `Hy` of the last column unchanged, because they have no `Ez`
neighbour. It skips the whole `Hx` write on the last row.

## Global-memory layout

Every array sits in its own region with a fixed row stride of
`N_MAX/LANES = 32` words. One build therefore serves any grid size
n ≤ 512 that is a multiple of 16. n is a run-time input (`cfg_n`). The word
address is

```
addr[16:0] = { array[2:0], row j[8:0], vector v[4:0] }     cell (i, j) is lane i%16 of vector i/16
array: 0 Ez, 1 Hx, 2 Hy, 3 Px, 4 Py, 5 Qx, 6 Qy
```

The host writes and reads the arrays through the host data port in this layout.
The seven arrays of a 512 × 512 grid take 7 MiB.

## Interfaces of `fdtd_accel`

All memory-side ports follow Avalon-MM conventions:
- a request is taken in a cycle where `read` or `write` is high and
  `waitrequest` is low, and it is held unchanged until then;
- read data return in request order with `rvalid`;
- `be` has one enable per 32-bit lane.

| port group | direction | meaning |
|---|---|---|
| `cfg_n[9:0]` | in | grid size n |
| `launch_valid`, `launch_kernel`, `launch_value`, `launch_ready` | in/in/in/out | start a kernel. It is taken when valid and ready. `launch_value` is the source value for `K_EXCITE`. |
| `kernel_done` | out | one-cycle pulse when the running kernel's last write has been accepted by memory |
| `h_*` | slave | host data port (the DMA path from PCIe) into global memory |
| `g_*` | master | global-memory port towards the DDR3 controller |

`launch_ready` is low from a launch until the cycle of `kernel_done`. Only one
kernel runs at a time, and an assertion checks it. The host data port may be
used while a kernel runs. It then competes for memory in the arbiter.

## Global-memory arbiter

`gmem_arbiter` shares the single memory port among five masters: the four
kernels and the host port.
- It picks a master round-robin each cycle and passes the request through
  combinationally.
- It moves its pointer past a master once that master's request is taken.
- A 32-entry FIFO records the master number of every read in flight. Each
  in-order reply goes to the master at the head of the FIFO. Read data are
  broadcast, and only the owner sees `rvalid`.
- A full FIFO holds back further reads.

## Floating point

`fp_add` and `fp_mul` are combinational binary32 units. The lane pipelines put
registers between them.
- Rounding is to nearest, ties to even.
- Subnormal inputs are read as zero, and subnormal results are flushed to
  signed zero. This is the usual choice for FPGA floating-point cores, and
  here it matters only for fields that have decayed below about 1e-38.
- Infinities and NaNs follow IEEE 754. A generated NaN is `0x7FC00000`.

Each lane has four multipliers: two in `efield_pe` and two in `hfield_pe`.
That makes 64 for the 16-lane build.

## Files

| file | contents |
|---|---|
| `rtl/fdtd_pkg.sv` | sizes (`LANES = 16`, `N_MAX = 512`), `float_t`, array and kernel enums |
| `rtl/fdtd_accel.sv` | top: launch control, four kernels, arbiter |
| `rtl/efield_kernel.sv`, `rtl/hfield_kernel.sv` | vectorised field kernels |
| `rtl/boundary_kernel.sv`, `rtl/excite_kernel.sv` | boundary and source kernels |
| `rtl/efield_pe.sv`, `rtl/hfield_pe.sv` | lane datapaths |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | binary32 arithmetic |
| `rtl/gmem_arbiter.sv` | global-memory interconnect |
| `tb/fp_ref_pkg.sv` | binary32 reference arithmetic, computed in double and rounded once |
| `tb/gmem_model.sv` | behavioural global memory: fixed latency, random `waitrequest` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fdtd_accel_full` |

The DDR3 memory and its controller, the PCI Express link and the host computer
are outside this RTL. `g_*` and `h_*`/`launch_*` are where they connect.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Build one with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdtd_pkg.sv tb/fp_ref_pkg.sv \
          -y rtl -y tb tb/tb_fdtd_accel.sv --top tb_fdtd_accel
./obj_dir/Vtb_fdtd_accel
```

- `tb_fp_add`, `tb_fp_mul`: random operands over wide and narrow exponent
  ranges, cancellation, exact ties, zeros, infinities, NaN and overflow.
- `tb_efield_pe`, `tb_hfield_pe`: a random stream with gaps; checks every
  result and the exact pipeline latency (4 and 3 cycles).
- `tb_efield_kernel`, `tb_hfield_kernel`, `tb_boundary_kernel`,
  `tb_excite_kernel`: random grids of 16, 32 and 48 cells per side under
  random back-pressure; checks every cell of every array afterwards.
- `tb_gmem_arbiter`: five random masters on private regions; checks every
  read reply and its routing, that no master starves, and that the reply
  FIFO fills.
- `tb_fdtd_accel`: the whole accelerator on a 32 × 32 grid for 24 time steps,
  against the reference FDTD model. It also counts each kernel launch, the host
  transfers in both directions, memory stalls and arbitration conflicts, and
  fails if any of them never happened.
- `tb_fdtd_accel_full`: the same at 512 × 512 for 16 steps (about a minute).
- `tb_fdtd_accel_n128`: the same at 128 × 128 for 200 steps, long enough for
  the wave to fill the grid and reflect from the wall (about 40 s).
- `tb_fdtd_accel_lanes4`: the whole accelerator built 4 lanes wide
  (`LANES_P = 4`) on a 32 × 32 grid for 12 steps.

Apart from `tb_fdtd_accel_lanes4` and the arbiter test, all testbenches use the
default parameters. The arbiter test uses a 4-entry reply FIFO so that the FIFO
fills. Grid size and step count are testbench constants (`NN`, `STEPS`).

## How far to trust it, and where it is this design's own

The following follow the accelerator's description: the kernel set, the update
equations and their evaluation order, single precision, the perfect-conductor
boundary, the centre source fed by the host each step, host-controlled time
stepping, and 16-wide vectorisation. The following are choices made here:
- the memory layout and the Avalon-MM style ports;
- the one-vector-at-a-time kernel schedule and the pipeline depths;
- the launch handshake and the round-robin arbiter;
- which edge cells the H kernel leaves alone;
- replacing rather than adding to the source value;
- flush-to-zero arithmetic.

The original accelerator was also built with 1 and 4 processing units, which
are replicated kernel pipelines, not wider vectors. This RTL has only one kind
of parallelism, the vector width, so those variants are stood in for by
`LANES_P = 4` and the like.

The H-update signs follow the printed equations (both minus). The vectorisation
width is the parameter `LANES_P` (default `fdtd_pkg::LANES`). Widths 16 and 4
have been simulated end to end. Other powers of two of at least 2 should work
but are untested, and a width of 1 is not supported. The design has been
simulated and lint-checked, not synthesised for a particular FPGA, so no clock
rate is claimed.
