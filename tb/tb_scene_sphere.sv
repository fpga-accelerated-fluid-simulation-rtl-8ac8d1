// tb_scene_sphere: a 512-particle scene in which the fluid and a sphere
// collider overlap from the start, run for several frames at the default
// size.  A block of 8 x 8 x 8 particles on a 0.5 grid fills the lower half
// of the 4 x 4 x 8 voxel space, and a sphere of radius 1 sits in its middle,
// so 32 particles start inside it.  The scene is loaded once; the
// following frames run on the particles kept on chip.  After every frame
// the testbench checks that
//   - no live particle is inside the sphere (collision response projects
//     each one to the surface, up to rounding),
//   - the DROPPED register matches the change in live particles,
//   - the stored DRAM image equals the on-chip store,
// and at the end that collisions happened and most of the fluid is kept.
module tb_scene_sphere;
  import pbf_pkg::*;
  localparam int NP = 512, FRAMES = 3, ITERS = 3;
  localparam int SRC = 0, DST = 16 * 1024, WORDS = 4096;
  localparam real CX = 2.0, CY = 2.0, CZ = 2.0, R = 1.0;

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

  int checks = 0, failures = 0, n_coll = 0, n_irq = 0;

  initial begin
    repeat (30_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (irq) n_irq++;

  `include "tb_top_host.svh"

  function automatic logic [17:0] f6(real v); return 18'($rtoi($floor(v * 64.0 + 0.5))); endfunction
  function automatic int q16(real v); return $rtoi($floor(v * 65536.0 + 0.5)); endfunction

  initial begin
    logic [31:0] d;
    int k, alive_prev, alive_now, n_in;
    real cw, dx, dy, dz;
    for (int w = 0; w < WORDS; w++) dram.mem[w] = '0;
    k = 0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) for (int c = 0; c < 8; c++) begin
      dram.mem[SRC / 8 + k]      = {1'b1, 9'd0, f6(0.25 + 0.5 * c), f6(0.25 + 0.5 * b), f6(0.25 + 0.5 * a)};
      dram.mem[SRC / 8 + NP + k] = '0;
      k++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cw = 315.0 / (64.0 * 3.14159265);
    axw('h04, NP); axw('h08, ITERS); axw('h0C, SRC); axw('h10, DST);
    axw('h14, 1092); axw('h18, 60 * 65536);
    axw('h1C, 0); axw('h20, 0); axw('h24, q16(-9.8));
    axw('h28, 64); axw('h2C, q16(cw)); axw('h30, -6 * q16(cw));
    axw('h34, q16(1.0 / 8.078)); axw('h38, q16(10.0)); axw('h3C, q16(0.1));
    axw('h40, q16(1.0 / (cw * 0.96 * 0.96 * 0.96))); axw('h44, q16(0.01)); axw('h48, q16(0.05));
    axw('h4C, 0); axw('h50, 0); axw('h54, 0); axw('h58, 1);
    axw('h80, f6(CX)); axw('h84, f6(CY)); axw('h88, f6(CZ)); axw('h8C, f6(R));
    alive_prev = NP;
    for (int f = 0; f < FRAMES; f++) begin
      axw('h00, (f == 0) ? 32'h11 : 32'h01);
      do axr('h00, d); while (!d[1]);
      axr('h60, d); n_coll += int'(d);
      axr('h5C, d);
      alive_now = 0; n_in = 0;
      for (int i = 0; i < NP; i++) if (dut.u_mem.m_alive[i]) begin
        vec_t x;
        alive_now++;
        x = dut.u_mem.m_x[i];
        dx = real'(x.x) / 64.0 - CX; dy = real'(x.y) / 64.0 - CY; dz = real'(x.z) / 64.0 - CZ;
        if (dx * dx + dy * dy + dz * dz < (R - 2.0 / 64.0) * (R - 2.0 / 64.0)) n_in++;
      end
      check(n_in == 0, $sformatf("frame %0d: %0d particles inside the sphere", f, n_in));
      check(alive_prev - alive_now == int'(d), $sformatf("frame %0d: dropped %0d, live %0d -> %0d", f, d, alive_prev, alive_now));
      for (int i = 0; i < NP; i++) begin
        check(dram.mem[DST / 8 + i] == {dut.u_mem.m_alive[i], 9'd0, dut.u_mem.m_x[i]}, $sformatf("stored position %0d", i));
        check(dram.mem[DST / 8 + NP + i] == {10'd0, dut.u_mem.m_v[i]}, $sformatf("stored velocity %0d", i));
      end
      $display("frame %0d: live %0d, inside %0d, collisions %0d", f, alive_now, n_in, n_coll);
      alive_prev = alive_now;
    end
    check(n_coll > 0, "collisions happened");
    check(n_irq == FRAMES, "one interrupt per frame");
    check(alive_prev > NP * 9 / 10, "most of the fluid stays in the voxel space");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fluid_accel_top dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(1'b1),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
    .m_axi_araddr(m_araddr), .m_axi_arlen(m_arlen), .m_axi_arsize(m_arsize), .m_axi_arburst(m_arburst),
    .m_axi_arvalid(m_arvalid), .m_axi_arready(m_arready), .m_axi_rdata(m_rdata), .m_axi_rresp(m_rresp),
    .m_axi_rlast(m_rlast), .m_axi_rvalid(m_rvalid), .m_axi_rready(m_rready),
    .m_axi_awaddr(m_awaddr), .m_axi_awlen(m_awlen), .m_axi_awsize(m_awsize), .m_axi_awburst(m_awburst),
    .m_axi_awvalid(m_awvalid), .m_axi_awready(m_awready), .m_axi_wdata(m_wdata), .m_axi_wstrb(m_wstrb),
    .m_axi_wlast(m_wlast), .m_axi_wvalid(m_wvalid), .m_axi_wready(m_wready),
    .m_axi_bresp(m_bresp), .m_axi_bvalid(m_bvalid), .m_axi_bready(m_bready), .irq);
endmodule
