# Position-based fluid accelerator in SystemVerilog

This is a hardware implementation of one time step of a position-based fluid
(PBF) simulation for 512 particles. It targets an FPGA next to a host
processor. The host writes the simulation constants over AXI4-Lite and starts
the kernel. The kernel fetches the particles from DRAM in AXI4 bursts and keeps
them in block RAM. It runs the whole time step on chip (prediction, neighbour
search, density solver, collision response, vorticity confinement and
viscosity), then writes the particles back to DRAM and raises an interrupt.

The original accelerator was built with high-level synthesis for a Xilinx
Ultra96 (Zynq UltraScale+) board. It names its parts: a CPU core, an FPGA
fabric controller, AXI burst transfers to and from DRAM, block-RAM particle
memory, and a kernel made of a "Step 1", "Steps 2 & 3", "Step 4" and "Step 5"
pipeline. It also fixes these facts:

- positions in 12.6 fixed point;
- 512 particles;
- constants in LUT-RAM;
- a bounded 4 x 4 x 8 voxel space for the neighbour search;
- particles that leave that space are dropped.

Everything else in this RTL is this design's own choice: the arithmetic inside
each step, widths, handshakes, the register map and the DRAM layout. Those
choices are listed at the end.

## The simulation step

One start of the kernel runs one frame of the usual PBF loop:

| phase | unit | work |
|---|---|---|
| LOAD (optional) | `axi_burst_dma` | DRAM → particle store: x, v; p = x; alive = 1 |
| STEP1 | `step1_predict` | v ← v + dt·g ; p ← x + dt·v |
| STEP5 | `step5_grid_build` | clear the voxel lists, insert every live particle by its predicted position p, drop particles outside the space or in a full voxel |
| SOLVE × ITERS | `step23_solver` | λ pass, Δp + collision pass, p ← p + Δp pass |
| STEP4 | `step4_vort_visc` | v ← (p − x)/dt, x ← p; vorticity ω and XSPH; confinement force |
| STORE | `axi_burst_dma` | particle store → DRAM: alive, x, v |

`fabric_ctrl` walks through these phases. Its phase signal also decides which
unit drives the ports of the single particle store and the voxel grid. Exactly
one unit runs at a time. An assertion in the top checks that no unit is busy
outside its phase.

The voxel rebuild (step 5) runs right after the prediction, so neighbours are
found around the predicted positions. It builds the grid once per frame; the
solver iterations reuse it.

### Formulas

The kernel is poly6, used for both the density and the gradient:

    W(r)  = c_w (h² − r²)³           for r < h
    ∇W(d) = c_g (h² − r²)² d         d = p_i − p_j, c_g = −6 c_w

The gradient does not need |d|, so pair evaluation has no square root. The
host supplies c_w with the particle mass folded in.

Solver (`step23_solver`, three passes per iteration):

    ρ_i = Σ_j W_ij,  C_i = ρ_i/ρ0 − 1
    λ_i = −C_i / ((Σ_j |∇W_ij|² + |Σ_j ∇W_ij|²)/ρ0² + ε)
    Δp_i = (1/ρ0) Σ_j (λ_i + λ_j + s_corr) ∇W_ij,  s_corr = −k (W_ij / W(Δq))⁴
    collision: if q = p_i + Δp_i is inside sphere (c, R):  q ← c + R (q − c)/|q − c|
    p_i ← p_i + Δp_i     (separate pass, so each sweep reads only old values)

Velocity, vorticity and viscosity (`step4_vort_visc`, three passes):

    v_i = (p_i − x_i)/dt,  x_i ← p_i
    ω_i = Σ_j (v_j − v_i) × ∇W_ij,   vt_i = v_i + c Σ_j (v_j − v_i) W_ij
    η_i = Σ_j |ω_j| ∇W_ij,  N_i = η_i/|η_i|,  v_i ← vt_i + dt · ε (N_i × ω_i)

The sum over j includes i itself, which supplies the self term of the density.
A particle with no neighbours therefore keeps its predicted motion exactly.

## Neighbour search in a bounded voxel space

The simulation space is a grid of GX × GY × GZ voxels (4 × 4 × 8 by default).
Each voxel is one simulation unit on a side, which is 64 LSB of the 12.6
format. Its lower corner is the host-set ORIGIN. A particle's voxel is just the
integer part of (p − origin), so it costs no arithmetic.

`voxel_grid` stores, for each voxel:

- a fill counter, kept in flip-flops;
- a list of up to CAP particle ids (32 by default), kept in a RAM.

`nbr_iter` drives one particle through the 27 voxels around its own voxel. It
first reads the particle's record on port A. For each voxel inside the grid it
then reads the count and every id in the list. It fetches each candidate's
record on port B and presents it to the owner with `j_valid`. Finally it raises
`fin_req` and waits for `fin_ack`, so the owner can spend as many cycles as it
needs on the particle. The solver and step 4 each contain a copy.

The candidate loop is pipelined. A list slot is issued each cycle, its id
comes back from the voxel grid one cycle later and addresses port B, and the
record arrives one cycle after that with `j_valid`. Candidates therefore stream
at one per cycle, and the owner accumulates one pair per cycle. Candidates
beyond h are filtered by `sph_pair`, which is combinational. Particle i costs
`2 + 27 + candidates + 2 + finish` cycles.

Two limits follow from the bounded space, and both are deliberate:

- A particle whose predicted position leaves the space is dropped. Its alive
  flag is cleared, it stays in memory, and it is stored with alive = 0.
- A particle whose voxel already holds CAP ids is also dropped, because the
  lists have a fixed size.

`DROPPED` reports how many were dropped in the last step. At the rest spacing
of the test scenes (0.5 units), a voxel holds about 8 particles.

## Number formats

| quantity | format |
|---|---|
| x, p, v, vt (stored) | signed 12.6, 18 bits (`fx_t`), three per `vec_t` |
| λ, Δp, ω, \|ω\|, constants | signed Q16.16, 32 bits (`acc_t`) |
| products | 64 bits, rounded (round half up) and saturated on narrowing |

The helpers `rshr`, `qmul`, `fx2q`, `q2fx`, `sat_fx` and `sat_acc` are in
`pbf_pkg`.

Storing velocity in 12.6 has a visible consequence. Step 4 recomputes v from
two 12.6 positions, so velocities come in steps of 1/(64·dt). At dt = 1/60
that is 0.94 units/s. A displacement smaller than half an LSB in one frame is
lost: a particle at rest under gravity alone does not start to fall. Raise dt,
or scale the scene up, if this matters.

Division and square root are sequential and shared inside each unit:

- `seq_div`: 64-bit, 65 cycles, used for λ, 1/|q − c| and 1/|η|;
- `seq_sqrt`: 33 cycles, used for |q − c|, |ω| and |η|.

## Host interface

All registers are 32 bits on the AXI4-Lite slave (`axil_ctrl_regs`). Q16
means signed 16.16; 12.6 values sit in the low 18 bits.

| addr | name | addr | name |
|---|---|---|---|
| 0x00 | CTRL: bit0 start, bit1 done (clears on read), bit2 idle, bit4 load | 0x04 | N_PART |
| 0x08 | ITERS (solver iterations) | 0x0C / 0x10 | SRC_ADDR / DST_ADDR (bytes) |
| 0x14 | DT (Q16) | 0x18 | INV_DT (Q16) |
| 0x1C–0x24 | GRAV x, y, z (Q16) | 0x28 | H (12.6) |
| 0x2C / 0x30 | C_W / C_G (Q16) | 0x34 | INV_RHO0 (Q16) |
| 0x38 | EPS_LAM, ε of λ (Q16) | 0x3C / 0x40 | K_CORR / INV_WDQ = 1/W(Δq) (Q16) |
| 0x44 | C_XSPH (Q16) | 0x48 | EPS_VORT (Q16) |
| 0x4C–0x54 | ORIGIN x, y, z (12.6) | 0x58 | N_SPHERES (0–4) |
| 0x5C | DROPPED (read only) | 0x60 | COLLISIONS, last iteration (read only) |
| 0x80 + 16k | sphere k: centre x, y, z, radius (12.6) | | |

The sphere radius should include the particle radius. Writing CTRL with start
set begins a step; with load set, the step first fetches the scene from
SRC_ADDR. Without load, the step continues from the particles already on chip,
so a sequence of frames needs only one load. The `irq` output pulses for one
cycle at the end of every step. The done bit stays set until CTRL is read.

### DRAM layout

N_PART position beats come first, then N_PART velocity beats. Each beat is
64 bits.

    position beat: {alive, 9'b0, z, y, x}    x in [17:0], y in [35:18], z in [53:36]
    velocity beat: {10'b0,       z, y, x}

The transfers are INCR bursts of up to 16 beats, one burst in flight at a time.
Base addresses must be 128-byte aligned, so that no burst crosses a 4 KiB
boundary. A 512-particle frame is 8 KiB in each direction.

## Timing

Everything is synchronous to one clock with an active-low asynchronous reset.
Particle-store reads take one cycle. Per frame, roughly:

- load and store: 2·N beats each, plus one cycle per stored beat;
- step 1 and step 5: 2 cycles per particle;
- each neighbour pass: 1 cycle per candidate pair, plus 32 per particle.

The finishing work per particle takes 66 cycles for λ, and 33 + 66 per sphere
contact. Step 4 adds 33 cycles per particle in the vorticity pass and
33 + 66 in the confinement pass.

The 512-particle test scene with 2 solver iterations takes 566,000 cycles
per frame. Within a unit, particles are handled one after another: one pair per
cycle, then the per-particle finishing work.

## Differences from the original accelerator

- **Less parallel.** The original relied on HLS loop pipelining and
  unrolling. Here only the loop over neighbours is pipelined, at one pair per
  cycle. The per-particle work (division, square root) is sequential, particles
  do not overlap, and nothing is unrolled. The block split and the data
  movement are the same, but the cycle counts are not comparable.
- **Formulas.** The original names the PBF steps but not the kernel or the
  constraint formulas. The ones above are the standard PBF formulation with a
  poly6 kernel.
- **Vorticity sign.** The original describes "subtracting the vorticity term".
  Here the confinement force ε (N × ω) is added as usual. A negative EPS_VORT
  gives the subtracting form.
- **Step 5 position.** The original times "update particle structure" as a
  separate fifth step. Here it runs after step 1 in every frame, so that
  neighbours are searched around the predicted positions.
- **Voxel lists have a fixed capacity** (CAP). Overflowing particles are
  dropped like escaping ones.
- **Not built:** the host software (scene loading, rendering, output files) and
  the DRAM itself. The testbenches model both.

## Files and simulation

`rtl/`:

- `pbf_pkg.sv` – types and fixed-point helpers
- `fluid_accel_top.sv` – top module
- `axil_ctrl_regs.sv`, `fabric_ctrl.sv`, `axi_burst_dma.sv` – control and data movement
- `particle_mem.sv`, `voxel_grid.sv` – storage
- `nbr_iter.sv`, `sph_pair.sv`, `seq_div.sv`, `seq_sqrt.sv` – neighbour walk and arithmetic
- `step1_predict.sv`, `step5_grid_build.sv`, `step23_solver.sv`, `step4_vort_visc.sv` – the step units

Each file begins with a description of its interface and timing.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. There are also the
following:

- `axi_mem_model.sv`, a DRAM model with random wait states.
- `tb_fluid_accel_top.sv`, an end-to-end run at a reduced size: 64 particles,
  4 × 4 × 4 voxels, CAP 8, two frames.
- `tb_fluid_accel_top_full.sv`, the same scene type at the default size: 512
  particles, one frame, about 10 s of simulation.
- `tb_scene_sphere.sv`, a 512-particle block that overlaps a sphere collider
  from the start, run for three frames from one load. It checks that no live
  particle remains inside the sphere after any frame.
- The scene and checks shared by the two top testbenches, in `tb_top_*.svh`.

The end-to-end scene contains a swirling block of fluid around a sphere
collider, an over-full voxel, particles outside the space, and one isolated
falling particle. The falling particle is checked exactly against integer
arithmetic. The testbench compares the DRAM image with the on-chip store and
the statistics registers with its own counts. It also fails if any of these
never happened: load, store, solver iteration, collision, outside drop,
overflow drop, vorticity, AXI stall or interrupt.

Build and run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/pbf_pkg.sv tb/tb_fluid_accel_top.sv --top-module tb_fluid_accel_top
    ./obj_dir/Vtb_fluid_accel_top

The testbenches assume that uninitialised state is random, so run them with
`+verilator+rand+reset+2` to mimic hardware. The sizes N, GX, GY, GZ, CAP and
BURST are parameters of the top. The sphere count and the number formats are
in `pbf_pkg`.
