// tb_top_body.svh: shared body of the end-to-end testbenches of
// fluid_accel_top.  The including module declares N, GX, GY, GZ, CAP, the
// scene sizes (NB_X, NB_Y, NB_Z: fluid block, NC: overflow cluster, NL:
// filler line), ITERS, STEPS and instantiates the accelerator as dut with
// the signals declared here, next to an axi_mem_model named dram.
//
// The host side is modelled by AXI4-Lite tasks.  The scene is written to
// DRAM, the constants are set, and the kernel is started with the load flag
// for the first step (later steps run on the particles kept on chip).  The
// scene contains
//   - a block of fluid on a 0.5 grid with a swirling velocity field
//     (neighbour search, density solve, vorticity, viscosity),
//   - a sphere collider inside the block (collision response),
//   - a tight cluster of NC particles in one voxel, more than CAP
//     (voxel list overflow, the extra particles are dropped),
//   - two particles outside the voxel space (dropped),
//   - one isolated falling particle, checked exactly against integer
//     arithmetic (gravity, prediction, velocity update),
//   - a line of filler particles.
// After every step the testbench compares the stored DRAM image with the
// on-chip store, checks the statistics registers against its own counts,
// and finally fails if one of the mechanisms (load, store, solver
// iteration, collision, outside drop, overflow drop, vorticity, DMA stall,
// interrupt) never happened.

  import pbf_pkg::*;
  localparam int NFLUID = NB_X * NB_Y * NB_Z;
  localparam int I_FREE = NFLUID + NC;          // isolated particle
  localparam int I_OUT  = I_FREE + 1;           // two particles outside
  localparam int NP     = I_OUT + 2 + NL;       // particles in use
  localparam int SRC    = 0;
  localparam int DST    = 16 * 1024;            // bytes
  localparam int WORDS  = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic awvalid = 0, wvalid = 0, arvalid = 0, awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] m_araddr, m_awaddr;
  logic [7:0]  m_arlen, m_awlen, m_wstrb;
  logic [2:0]  m_arsize, m_awsize;
  logic [1:0]  m_arburst, m_awburst, m_rresp, m_bresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready, m_awvalid, m_awready;
  logic m_wlast, m_wvalid, m_wready, m_bvalid, m_bready, irq;
  logic [63:0] m_rdata, m_wdata;

  axi_mem_model #(.WORDS(WORDS), .STALL(1)) dram (
    .clk, .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));

  int checks = 0, failures = 0;
  int n_irq = 0, n_stall = 0, n_solve = 0, n_full_drop = 0, n_out_drop = 0;
  int n_collide = 0, n_vort = 0, n_load = 0, n_store = 0;

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(negedge clk) if (rst_n) begin
    if (irq) n_irq++;
    if ((m_arvalid && !m_arready) || (m_rready && !m_rvalid) || (m_wvalid && !m_wready)) n_stall++;
    if (dut.s23_done) n_solve++;
    if (dut.u_s5.chk && !dut.u_s5.keep) begin
      if (dut.u_s5.in_box) n_full_drop++;
      else n_out_drop++;
    end
  end

  `include "tb_top_host.svh"

  `include "tb_top_scene.svh"

  // exact model of the isolated particle: same rounding as the datapath
  // (round half up at every conversion to the 12.6 storage format)
  task automatic check_free(input int step);
    int x0, v0, v1, p1, v2, gdt;
    x0 = int'(signed'(f6(pz[I_FREE])));
    v0 = int'(signed'(f6(vz[I_FREE])));
    gdt = rnd(1092.0 * q16(G) / 65536.0);                      // Q16
    v1 = rnd((v0 * 1024.0 + gdt) / 1024.0);                    // 12.6
    p1 = x0 + rnd(1092.0 * v1 / 65536.0);
    v2 = (p1 - x0) * 60;
    check(int'(dut.u_mem.m_x[I_FREE].z) == p1, $sformatf("free fall z %0d want %0d", dut.u_mem.m_x[I_FREE].z, p1));
    check(int'(dut.u_mem.m_v[I_FREE].z) == v2, $sformatf("free fall vz %0d want %0d", dut.u_mem.m_v[I_FREE].z, v2));
    check(dut.u_mem.m_v[I_FREE].x == 0 && dut.u_mem.m_v[I_FREE].y == 0, "free fall sideways");
    pz[I_FREE] = real'(p1) / 64.0; vz[I_FREE] = real'(v2) / 64.0;
  endtask

  task automatic run_step(input int step);
    logic [31:0] d;
    int before_irq, alive_before, alive_after, dropped, coll;
    int fd0, od0;
    longint t0;
    alive_before = 0;
    for (int k = 0; k < NP; k++) alive_before += (step == 0) ? 1 : int'(dut.u_mem.m_alive[k]);
    before_irq = n_irq; fd0 = n_full_drop; od0 = n_out_drop;
    t0 = $time;
    axw('h00, (step == 0) ? 32'h11 : 32'h01);
    axr('h00, d);
    check(d[0] == 1'b1, "CTRL shows running");
    do axr('h00, d); while (!d[1]);
    check(n_irq == before_irq + 1, "one interrupt per step");
    check(d[2] == 1'b1, "idle after done");
    axr('h5C, d); dropped = int'(d);
    axr('h60, d); coll = int'(d);
    n_collide += coll;
    alive_after = 0;
    for (int k = 0; k < NP; k++) alive_after += int'(dut.u_mem.m_alive[k]);
    check(alive_before - alive_after == dropped, $sformatf("dropped %0d vs alive %0d -> %0d", dropped, alive_before, alive_after));
    check(dropped == (n_full_drop - fd0) + (n_out_drop - od0), "drop statistics");
    if (step == 0) begin
      check(n_full_drop - fd0 == NC - CAP, $sformatf("overflow drops %0d", n_full_drop - fd0));
      check(n_out_drop - od0 == 2, $sformatf("outside drops %0d", n_out_drop - od0));
      for (int k = 0; k < NC; k++) check(dut.u_mem.m_alive[NFLUID + k] == (k < CAP), "cluster survivors");
      check(!dut.u_mem.m_alive[I_OUT] && !dut.u_mem.m_alive[I_OUT + 1], "outside particles dead");
      check(dut.solve_runs == 8'(ITERS), "solver iterations");
    end
    if (dut.u_mem.m_alive[I_FREE]) check_free(step);
    // DRAM image written back = on-chip store; nothing written past it
    for (int k = 0; k < NP; k++) begin
      check(dram.mem[DST / 8 + k] == {dut.u_mem.m_alive[k], 9'd0, dut.u_mem.m_x[k]}, $sformatf("stored position %0d", k));
      check(dram.mem[DST / 8 + NP + k] == {10'd0, dut.u_mem.m_v[k]}, $sformatf("stored velocity %0d", k));
    end
    check(dram.mem[DST / 8 + 2 * NP] == (64'hDEAD_BEEF_0000_0000 | 64'(DST / 8 + 2 * NP)), "no write past the particles");
    // live particles stay finite and inside a sane range; swirl shows up as vorticity
    for (int k = 0; k < NP; k++) if (dut.u_mem.m_alive[k]) begin
      check(dut.u_mem.m_x[k].x > -64 * 4 && dut.u_mem.m_x[k].x < 64 * (GX + 4), $sformatf("x range %0d", k));
      if (dut.u_mem.m_wmag[k] != 0) n_vort++;
    end
    $display("step %0d: dropped %0d collisions %0d alive %0d, %0d cycles", step, dropped, coll, alive_after, ($time - t0) / 10);
  endtask

  initial begin
    build_scene();
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_constants();
    for (int s = 0; s < STEPS; s++) run_step(s);
    n_load = dram.rd_bursts;
    n_store = dram.wr_bursts;
    check(dram.protocol_errors == 0, "AXI write bursts well formed");
    check(n_load == (2 * NP + 15) / 16, $sformatf("load bursts %0d", n_load));
    check(n_store == STEPS * ((2 * NP + 15) / 16), $sformatf("store bursts %0d", n_store));
    $display("mechanisms: load %0d store %0d solve %0d collide %0d out_drop %0d full_drop %0d vort %0d stall %0d irq %0d",
             n_load, n_store, n_solve, n_collide, n_out_drop, n_full_drop, n_vort, n_stall, n_irq);
    check(n_load > 0, "mechanism: load");
    check(n_store > 0, "mechanism: store");
    check(n_solve == STEPS * ITERS && n_solve > 0, "mechanism: solver iterations");
    check(n_collide > 0, "mechanism: collision");
    check(n_out_drop > 0, "mechanism: outside drop");
    check(n_full_drop > 0, "mechanism: voxel overflow");
    check(n_vort > 0, "mechanism: vorticity");
    check(n_stall > 0, "mechanism: DMA stall");
    check(n_irq == STEPS, "mechanism: interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
