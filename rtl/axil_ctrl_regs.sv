// axil_ctrl_regs: AXI4-Lite control interface and constant registers.
//
// The host dispatcher starts the kernel and sets the simulation constants
// through this 32-bit AXI4-Lite slave.  The constants (gravity, time step,
// kernel coefficients, sphere colliders, ...) sit in a small register file,
// the kind of storage an FPGA builds from LUT-RAM.
//
// Register map (byte addresses; all registers 32 bits, read/write unless
// noted; Q16 = signed 16.16, 12.6 values sit in the low 18 bits):
//   0x00 CTRL      bit0 start (write 1; reads 1 until the kernel finishes)
//                  bit1 done  (read only, cleared by reading CTRL)
//                  bit2 idle  (read only)
//                  bit4 load  (1: fetch the particles from DRAM first)
//   0x04 N_PART    0x08 ITERS     0x0C SRC_ADDR  0x10 DST_ADDR
//   0x14 DT        0x18 INV_DT    0x1C GRAV_X    0x20 GRAV_Y    0x24 GRAV_Z
//   0x28 H (12.6)  0x2C C_W       0x30 C_G       0x34 INV_RHO0  0x38 EPS_LAM
//   0x3C K_CORR    0x40 INV_WDQ   0x44 C_XSPH    0x48 EPS_VORT
//   0x4C ORIGIN_X  0x50 ORIGIN_Y  0x54 ORIGIN_Z (12.6)          0x58 N_SPHERES
//   0x5C DROPPED   0x60 COLLISIONS (read only statistics)
//   0x80 + 16k     sphere k: centre x, y, z and radius (12.6), k = 0..3
//
// Protocol: a write is taken when AWVALID and WVALID are both high (both
// ready for one cycle), answered with BVALID/OKAY; a read answers one cycle
// after ARVALID.  One transaction of each kind at a time; WSTRB is ignored
// (full-word writes only).  start_pulse is one cycle wide.
//
// An AXI control interface for dispatching the kernel follows the
// accelerator; the register map and the start/done/idle handshake (in the
// style of HLS-generated control blocks) are this design's choices.
module axil_ctrl_regs
  import pbf_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0] s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic [3:0]    s_wstrb,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [AW-1:0] s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // to the kernel
  output consts_t       cst,
  output logic [31:0]   src_addr,
  output logic [31:0]   dst_addr,
  output logic          load_en,
  output logic          start_pulse,
  input  logic          kernel_done,
  input  logic          kernel_idle,
  input  logic [15:0]   stat_dropped,
  input  logic [15:0]   stat_collisions
);

  localparam int NREG = 2 ** (AW - 2);
  logic [31:0] regs [NREG];
  logic        start_pend, done_flag;

  wire wr_fire = s_awvalid && s_wvalid && !s_bvalid;
  wire rd_fire = s_arvalid && !s_rvalid;
  wire [AW-3:0] wr_idx = s_awaddr[AW-1:2];
  wire [AW-3:0] rd_idx = s_araddr[AW-1:2];

  assign s_awready = wr_fire;
  assign s_wready  = wr_fire;
  assign s_arready = rd_fire;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NREG; k++) regs[k] <= '0;
      s_bvalid    <= 1'b0;
      s_rvalid    <= 1'b0;
      s_rdata     <= '0;
      start_pend  <= 1'b0;
      done_flag   <= 1'b0;
      start_pulse <= 1'b0;
    end else begin
      start_pulse <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (kernel_done) begin
        start_pend <= 1'b0;
        done_flag  <= 1'b1;
      end
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        if (wr_idx == '0) begin
          regs[0] <= s_wdata;
          if (s_wdata[0] && !start_pend) begin
            start_pend  <= 1'b1;
            start_pulse <= 1'b1;
            done_flag   <= 1'b0;
          end
        end else if (wr_idx != (AW-2)'(23) && wr_idx != (AW-2)'(24)) begin
          regs[wr_idx] <= s_wdata;
        end
      end
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        unique case (rd_idx)
          (AW-2)'(0):  begin
            s_rdata <= {27'd0, regs[0][4], 1'b0, kernel_idle && !start_pend, done_flag, start_pend};
            if (!kernel_done) done_flag <= 1'b0;
          end
          (AW-2)'(23): s_rdata <= {16'd0, stat_dropped};
          (AW-2)'(24): s_rdata <= {16'd0, stat_collisions};
          default:     s_rdata <= regs[rd_idx];
        endcase
      end
    end
  end

  // register file -> constants
  always_comb begin
    cst.n_part    = regs[1][15:0];
    cst.iters     = regs[2][7:0];
    cst.dt        = regs[5];
    cst.inv_dt    = regs[6];
    cst.grav.x    = regs[7];
    cst.grav.y    = regs[8];
    cst.grav.z    = regs[9];
    cst.h         = regs[10][POS_W-1:0];
    cst.c_w       = regs[11];
    cst.c_g       = regs[12];
    cst.inv_rho0  = regs[13];
    cst.eps_lam   = regs[14];
    cst.k_corr    = regs[15];
    cst.inv_wdq   = regs[16];
    cst.c_xsph    = regs[17];
    cst.eps_vort  = regs[18];
    cst.origin.x  = regs[19][POS_W-1:0];
    cst.origin.y  = regs[20][POS_W-1:0];
    cst.origin.z  = regs[21][POS_W-1:0];
    cst.n_spheres = regs[22][2:0];
    for (int k = 0; k < MAX_SPHERES; k++) begin
      cst.sph[k].c.x = regs[32 + 4*k][POS_W-1:0];
      cst.sph[k].c.y = regs[33 + 4*k][POS_W-1:0];
      cst.sph[k].c.z = regs[34 + 4*k][POS_W-1:0];
      cst.sph[k].r   = regs[35 + 4*k][POS_W-1:0];
    end
  end

  assign src_addr = regs[3];
  assign dst_addr = regs[4];
  assign load_en  = regs[0][4];

endmodule
