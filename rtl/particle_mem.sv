// particle_mem: on-chip particle store (block RAM), updated in place by the
// simulation steps.
//
// Each particle field lives in its own RAM array so that a step can write
// only the fields it produces (wr_mask selects them) without a
// read-modify-write.  Two synchronous read ports serve the particle being
// updated (port A, "i") and the neighbour being visited (port B, "j"); one
// write port serves whichever unit owns the store.  All reads have one cycle
// of latency and are read-first: a read and a write to the same address in
// the same cycle return the old contents.
//
// Keeping all particle state in block RAM for the whole time step, and
// touching DRAM only to load and write back, follows the accelerator's
// memory plan.  The field split and the port count are this design's choice.
module particle_mem
  import pbf_pkg::*;
#(
  parameter int N  = N_PART_DEF,
  parameter int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output prec_t         a_data,
  input  logic [AW-1:0] b_addr,
  output prec_t         b_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pmask_t        wr_mask,
  input  prec_t         wr_data
);

  logic  m_alive [N];
  vec_t  m_x     [N];
  vec_t  m_p     [N];
  vec_t  m_v     [N];
  vec_t  m_vt    [N];
  acc_t  m_lam   [N];
  avec_t m_dp    [N];
  avec_t m_w     [N];
  acc_t  m_wmag  [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_mask.alive) m_alive[wr_addr] <= wr_data.alive;
      if (wr_mask.x)     m_x[wr_addr]     <= wr_data.x;
      if (wr_mask.p)     m_p[wr_addr]     <= wr_data.p;
      if (wr_mask.v)     m_v[wr_addr]     <= wr_data.v;
      if (wr_mask.vt)    m_vt[wr_addr]    <= wr_data.vt;
      if (wr_mask.lam)   m_lam[wr_addr]   <= wr_data.lam;
      if (wr_mask.dp)    m_dp[wr_addr]    <= wr_data.dp;
      if (wr_mask.w)     m_w[wr_addr]     <= wr_data.w;
      if (wr_mask.wmag)  m_wmag[wr_addr]  <= wr_data.wmag;
    end
  end

  always_ff @(posedge clk) begin
    a_data.alive <= m_alive[a_addr];
    a_data.x     <= m_x[a_addr];
    a_data.p     <= m_p[a_addr];
    a_data.v     <= m_v[a_addr];
    a_data.vt    <= m_vt[a_addr];
    a_data.lam   <= m_lam[a_addr];
    a_data.dp    <= m_dp[a_addr];
    a_data.w     <= m_w[a_addr];
    a_data.wmag  <= m_wmag[a_addr];
  end

  always_ff @(posedge clk) begin
    b_data.alive <= m_alive[b_addr];
    b_data.x     <= m_x[b_addr];
    b_data.p     <= m_p[b_addr];
    b_data.v     <= m_v[b_addr];
    b_data.vt    <= m_vt[b_addr];
    b_data.lam   <= m_lam[b_addr];
    b_data.dp    <= m_dp[b_addr];
    b_data.w     <= m_w[b_addr];
    b_data.wmag  <= m_wmag[b_addr];
  end

endmodule
