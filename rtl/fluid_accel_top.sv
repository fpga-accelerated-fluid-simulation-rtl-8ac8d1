// fluid_accel_top: position-based fluid simulation accelerator.
//
// A host processor writes the scene constants over AXI4-Lite and starts the
// kernel; the kernel (optionally) bursts the particles from DRAM into block
// RAM, runs one simulation time step entirely on chip, and bursts the
// updated particles back.  axil_ctrl_regs holds the constants, fabric_ctrl
// sequences load, steps 1, 5, 2+3 (x iters), 4 and store, axi_burst_dma
// moves the data, particle_mem and voxel_grid hold particles and voxel lists.
// Only one unit runs at a time; the controller's phase selects which one
// drives the particle store's ports and the voxel grid.
//
// Ports: s_axil_* is the 32-bit AXI4-Lite control slave (8-bit addresses),
// m_axi_* the 64-bit AXI4 data master towards DRAM (no ID, cache or
// protection signals), irq a one-cycle pulse at the end of each time step.
//
// The split into a host-driven controller, burst transfers, a block-RAM
// particle store, a voxel-space neighbour search and the step units follows
// the accelerator's system diagram; the single shared store and the
// one-unit-at-a-time schedule are this design's choices.
module fluid_accel_top
  import pbf_pkg::*;
#(
  parameter int N     = N_PART_DEF,
  parameter int GX    = GX_DEF,
  parameter int GY    = GY_DEF,
  parameter int GZ    = GZ_DEF,
  parameter int CAP   = CAP_DEF,
  parameter int BURST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control slave
  input  logic [7:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4 master to DRAM
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [63:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [63:0] m_axi_wdata,
  output logic [7:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  output logic        irq
);

  localparam int NV = GX * GY * GZ;
  localparam int VW = $clog2(NV);
  localparam int CW = $clog2(CAP + 1);
  localparam int SW = $clog2(CAP);
  localparam int AW = $clog2(N);

  // ---- control
  consts_t     cst;
  logic [31:0] src_addr, dst_addr;
  logic        load_en, start_pulse, k_done, k_idle;
  logic [15:0] dropped, collisions;
  phase_t      phase;
  logic        ld_start, st_start, dma_done, s1_start, s1_done, s5_start, s5_done;
  logic        s23_start, s23_done, s4_start, s4_done;
  logic [7:0]  solve_runs;

  axil_ctrl_regs #(.AW(8)) u_regs (
    .clk, .rst_n,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .cst, .src_addr, .dst_addr, .load_en, .start_pulse,
    .kernel_done(k_done), .kernel_idle(k_idle),
    .stat_dropped(dropped), .stat_collisions(collisions)
  );

  fabric_ctrl u_ctrl (
    .clk, .rst_n, .start(start_pulse), .load_en, .iters(cst.iters), .phase,
    .load_start(ld_start), .load_done(dma_done && phase == PH_LOAD),
    .s1_start, .s1_done, .s5_start, .s5_done, .s23_start, .s23_done,
    .s4_start, .s4_done,
    .store_start(st_start), .store_done(dma_done && phase == PH_STORE),
    .solve_runs, .idle(k_idle), .done(k_done)
  );

  assign irq = k_done;

  // ---- storage
  logic [AW-1:0] pm_a_addr, pm_b_addr, pm_wr_addr;
  prec_t         pm_a_data, pm_b_data, pm_wr_data;
  logic          pm_wr_en;
  pmask_t        pm_wr_mask;

  particle_mem #(.N(N)) u_mem (
    .clk, .a_addr(pm_a_addr), .a_data(pm_a_data), .b_addr(pm_b_addr),
    .b_data(pm_b_data), .wr_en(pm_wr_en), .wr_addr(pm_wr_addr),
    .wr_mask(pm_wr_mask), .wr_data(pm_wr_data)
  );

  logic          g_clear, g_ins_en, g_ins_full;
  logic [VW-1:0] g_ins_vox, g_q_vox, g_rd_vox;
  logic [AW-1:0] g_ins_id, g_rd_id;
  logic [CW-1:0] g_q_cnt;
  logic [SW-1:0] g_rd_slot;

  voxel_grid #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_grid (
    .clk, .rst_n, .clear(g_clear), .ins_en(g_ins_en), .ins_vox(g_ins_vox),
    .ins_id(g_ins_id), .ins_full(g_ins_full), .q_vox(g_q_vox), .q_cnt(g_q_cnt),
    .rd_vox(g_rd_vox), .rd_slot(g_rd_slot), .rd_id(g_rd_id)
  );

  // ---- units
  // per-unit store ports
  logic [AW-1:0] dm_a, s1_a, s5_a, s23_a, s4_a, s23_b, s4_b;
  logic          dm_we, s1_we, s5_we, s23_we, s4_we;
  logic [AW-1:0] dm_wa, s1_wa, s5_wa, s23_wa, s4_wa;
  pmask_t        dm_wm, s1_wm, s5_wm, s23_wm, s4_wm;
  prec_t         dm_wd, s1_wd, s5_wd, s23_wd, s4_wd;
  logic [VW-1:0] s23_qv, s4_qv, s23_rv, s4_rv;
  logic [SW-1:0] s23_rs, s4_rs;
  logic          dma_busy, dma_err, s1_busy, s5_busy, s23_busy, s4_busy;

  axi_burst_dma #(.N(N), .BURST(BURST)) u_dma (
    .clk, .rst_n, .load_start(ld_start), .store_start(st_start), .n_part(cst.n_part),
    .src_addr, .dst_addr, .a_addr(dm_a), .a_data(pm_a_data), .wr_en(dm_we),
    .wr_addr(dm_wa), .wr_mask(dm_wm), .wr_data(dm_wd),
    .m_araddr(m_axi_araddr), .m_arlen(m_axi_arlen), .m_arsize(m_axi_arsize),
    .m_arburst(m_axi_arburst), .m_arvalid(m_axi_arvalid), .m_arready(m_axi_arready),
    .m_rdata(m_axi_rdata), .m_rresp(m_axi_rresp), .m_rlast(m_axi_rlast),
    .m_rvalid(m_axi_rvalid), .m_rready(m_axi_rready),
    .m_awaddr(m_axi_awaddr), .m_awlen(m_axi_awlen), .m_awsize(m_axi_awsize),
    .m_awburst(m_axi_awburst), .m_awvalid(m_axi_awvalid), .m_awready(m_axi_awready),
    .m_wdata(m_axi_wdata), .m_wstrb(m_axi_wstrb), .m_wlast(m_axi_wlast),
    .m_wvalid(m_axi_wvalid), .m_wready(m_axi_wready), .m_bresp(m_axi_bresp),
    .m_bvalid(m_axi_bvalid), .m_bready(m_axi_bready),
    .busy(dma_busy), .err(dma_err), .done(dma_done)
  );

  step1_predict #(.N(N)) u_s1 (
    .clk, .rst_n, .start(s1_start), .n_part(cst.n_part), .dt(cst.dt), .grav(cst.grav),
    .a_addr(s1_a), .a_data(pm_a_data), .wr_en(s1_we), .wr_addr(s1_wa),
    .wr_mask(s1_wm), .wr_data(s1_wd), .busy(s1_busy), .done(s1_done)
  );

  step5_grid_build #(.N(N), .GX(GX), .GY(GY), .GZ(GZ)) u_s5 (
    .clk, .rst_n, .start(s5_start), .n_part(cst.n_part), .origin(cst.origin),
    .a_addr(s5_a), .a_data(pm_a_data), .wr_en(s5_we), .wr_addr(s5_wa),
    .wr_mask(s5_wm), .wr_data(s5_wd), .g_clear, .g_ins_en, .g_ins_vox,
    .g_ins_id, .g_ins_full, .dropped, .busy(s5_busy), .done(s5_done)
  );

  step23_solver #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_s23 (
    .clk, .rst_n, .start(s23_start), .cst, .a_addr(s23_a), .a_data(pm_a_data),
    .b_addr(s23_b), .b_data(pm_b_data), .wr_en(s23_we), .wr_addr(s23_wa),
    .wr_mask(s23_wm), .wr_data(s23_wd), .q_vox(s23_qv), .q_cnt(g_q_cnt),
    .rd_vox(s23_rv), .rd_slot(s23_rs), .rd_id(g_rd_id), .collisions,
    .busy(s23_busy), .done(s23_done)
  );

  step4_vort_visc #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_s4 (
    .clk, .rst_n, .start(s4_start), .cst, .a_addr(s4_a), .a_data(pm_a_data),
    .b_addr(s4_b), .b_data(pm_b_data), .wr_en(s4_we), .wr_addr(s4_wa),
    .wr_mask(s4_wm), .wr_data(s4_wd), .q_vox(s4_qv), .q_cnt(g_q_cnt),
    .rd_vox(s4_rv), .rd_slot(s4_rs), .rd_id(g_rd_id),
    .busy(s4_busy), .done(s4_done)
  );

  // ---- port ownership
  always_comb begin
    pm_a_addr = '0; pm_b_addr = '0; pm_wr_en = 1'b0; pm_wr_addr = '0;
    pm_wr_mask = MASK_NONE; pm_wr_data = '0;
    g_q_vox = '0; g_rd_vox = '0; g_rd_slot = '0;
    unique case (phase)
      PH_LOAD, PH_STORE: begin
        pm_a_addr = dm_a;
        pm_wr_en = dm_we; pm_wr_addr = dm_wa; pm_wr_mask = dm_wm; pm_wr_data = dm_wd;
      end
      PH_STEP1: begin
        pm_a_addr = s1_a;
        pm_wr_en = s1_we; pm_wr_addr = s1_wa; pm_wr_mask = s1_wm; pm_wr_data = s1_wd;
      end
      PH_STEP5: begin
        pm_a_addr = s5_a;
        pm_wr_en = s5_we; pm_wr_addr = s5_wa; pm_wr_mask = s5_wm; pm_wr_data = s5_wd;
      end
      PH_SOLVE: begin
        pm_a_addr = s23_a; pm_b_addr = s23_b;
        pm_wr_en = s23_we; pm_wr_addr = s23_wa; pm_wr_mask = s23_wm; pm_wr_data = s23_wd;
        g_q_vox = s23_qv; g_rd_vox = s23_rv; g_rd_slot = s23_rs;
      end
      PH_STEP4: begin
        pm_a_addr = s4_a; pm_b_addr = s4_b;
        pm_wr_en = s4_we; pm_wr_addr = s4_wa; pm_wr_mask = s4_wm; pm_wr_data = s4_wd;
        g_q_vox = s4_qv; g_rd_vox = s4_rv; g_rd_slot = s4_rs;
      end
      default: ;
    endcase
  end

  // A unit may only be busy in its own phase.
  assert property (@(posedge clk) disable iff (!rst_n)
    (s23_busy |-> phase == PH_SOLVE) and (s4_busy |-> phase == PH_STEP4) and
    (s1_busy |-> phase == PH_STEP1) and (s5_busy |-> phase == PH_STEP5));

endmodule
