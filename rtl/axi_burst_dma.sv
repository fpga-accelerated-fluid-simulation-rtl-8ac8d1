// axi_burst_dma: AXI4 burst transfers between DRAM and the particle store.
//
// DRAM is touched only twice per time step: to fetch the scene's particles at
// the start and to return the updated particles at the end.  Both use AXI4
// INCR bursts of up to BURST beats of 64 bits, one beat per particle vector:
//   beats 0 .. n-1     positions  {alive, 9'b0, z, y, x}  (12.6 each)
//   beats n .. 2n-1    velocities {10'b0,       z, y, x}
// starting at src_addr (load) or dst_addr (store).  The base addresses must
// be aligned to BURST*8 bytes so that no burst crosses a 4 KiB page.
// A load writes x and p (p = x) and marks every loaded particle alive; a
// store writes the alive flag in bit 63 of the position beat.
//
// Interface: pulse load_start or store_start; done pulses at the end.  One
// burst is outstanding at a time.  A load stores each R beat in the cycle
// it arrives; a store reads one particle (one cycle) and then offers the
// W beat, so it moves at most one beat every two cycles.  err is set by a
// non-OKAY response and cleared by the next start.
//
// Burst transfers between DRAM and block RAM follow the accelerator; the
// beat layout, width and burst length are this design's choices.
module axi_burst_dma
  import pbf_pkg::*;
#(
  parameter int N     = N_PART_DEF,
  parameter int AW    = $clog2(N),
  parameter int BURST = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_start,
  input  logic          store_start,
  input  logic [15:0]   n_part,
  input  logic [31:0]   src_addr,
  input  logic [31:0]   dst_addr,
  // particle store
  output logic [AW-1:0] a_addr,
  input  prec_t         a_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pmask_t        wr_mask,
  output prec_t         wr_data,
  // AXI4 master, read
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  input  logic [63:0]   m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready,
  // AXI4 master, write
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  output logic [63:0]   m_wdata,
  output logic [7:0]    m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  output logic          busy,
  output logic          err,
  output logic          done
);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_RD, S_W, S_B} state_t;
  state_t state;

  logic [16:0] k;       // beat index 0 .. 2n-1
  logic [16:0] total;   // 2n
  logic [8:0]  blen;    // beats in the current burst
  logic [8:0]  bcnt;    // beats done in the current burst
  logic [31:0] base;

  logic [16:0] n_eff;
  assign n_eff = (17'(n_part) > 17'(N)) ? 17'(N) : 17'(n_part);

  logic [16:0] remain;
  logic [8:0]  next_len;
  always_comb begin
    remain   = total - k;
    next_len = (remain > 17'(BURST)) ? 9'(BURST) : remain[8:0];
  end

  // particle index and half (position or velocity) of beat k
  logic          is_vel;
  logic [AW-1:0] pidx;
  always_comb begin
    is_vel = (k >= n_eff);
    pidx   = is_vel ? AW'(k - n_eff) : AW'(k);
  end

  assign m_araddr  = base + {k[15:0], 3'b000};
  assign m_awaddr  = base + {k[15:0], 3'b000};
  assign m_arlen   = 8'(next_len - 1'b1);
  assign m_awlen   = 8'(next_len - 1'b1);
  assign m_arsize  = 3'b011;
  assign m_awsize  = 3'b011;
  assign m_arburst = 2'b01;
  assign m_awburst = 2'b01;
  assign m_arvalid = (state == S_AR);
  assign m_awvalid = (state == S_AW);
  assign m_rready  = (state == S_R);
  assign m_wvalid  = (state == S_W);
  assign m_wstrb   = 8'hFF;
  assign m_wlast   = (bcnt + 1'b1 == blen);
  assign m_bready  = (state == S_B);
  assign busy      = (state != S_IDLE);

  assign a_addr  = pidx;
  assign wr_addr = pidx;
  assign wr_en   = (state == S_R) && m_rvalid;
  always_comb begin
    wr_data       = '0;
    wr_mask       = MASK_NONE;
    wr_data.alive = 1'b1;
    wr_data.x     = m_rdata[53:0];
    wr_data.p     = m_rdata[53:0];
    wr_data.v     = m_rdata[53:0];
    if (is_vel) begin
      wr_mask.v = 1'b1;
    end else begin
      wr_mask.alive = 1'b1;
      wr_mask.x     = 1'b1;
      wr_mask.p     = 1'b1;
    end
    m_wdata = is_vel ? {10'd0, a_data.v} : {a_data.alive, 9'd0, a_data.x};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; total <= '0; blen <= '0; bcnt <= '0; base <= '0;
      err <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (load_start || store_start) begin
            k     <= '0;
            total <= {n_eff[15:0], 1'b0};
            base  <= load_start ? src_addr : dst_addr;
            err   <= 1'b0;
            if (n_eff == '0) done <= 1'b1;
            else state <= load_start ? S_AR : S_AW;
          end
        end
        S_AR: if (m_arready) begin blen <= next_len; bcnt <= '0; state <= S_R; end
        S_R: if (m_rvalid) begin
          if (m_rresp != 2'b00) err <= 1'b1;
          k    <= k + 1'b1;
          bcnt <= bcnt + 1'b1;
          if (m_rlast || bcnt + 1'b1 == blen) begin
            if (k + 1'b1 == total) begin done <= 1'b1; state <= S_IDLE; end
            else state <= S_AR;
          end
        end
        S_AW: if (m_awready) begin blen <= next_len; bcnt <= '0; state <= S_RD; end
        S_RD: state <= S_W;
        S_W: if (m_wready) begin
          k    <= k + 1'b1;
          bcnt <= bcnt + 1'b1;
          state <= m_wlast ? S_B : S_RD;
        end
        S_B: if (m_bvalid) begin
          if (m_bresp != 2'b00) err <= 1'b1;
          if (k == total) begin done <= 1'b1; state <= S_IDLE; end
          else state <= S_AW;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
