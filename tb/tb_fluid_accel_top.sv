// tb_fluid_accel_top: end-to-end test of the accelerator at a reduced size
// (64 particles, 4 x 4 x 4 voxels, 8 ids per voxel) over two time steps,
// the first loading the scene from DRAM and the second running on the
// particles kept on chip.  The scene and all checks are in tb_top_body.svh.
module tb_fluid_accel_top;
  localparam int N = 64, GX = 4, GY = 4, GZ = 4, CAP = 8;
  localparam int NB_X = 3, NB_Y = 3, NB_Z = 3, NC = 12, NL = 5;
  localparam int ITERS = 2, STEPS = 2;
  `include "tb_top_body.svh"
  fluid_accel_top #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) dut (
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
