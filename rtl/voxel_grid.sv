// voxel_grid: the bounded voxel space used for nearest-neighbour lookup.
//
// The simulation volume is cut into GX x GY x GZ cubic voxels (4 x 4 x 8 by
// default).  Each voxel keeps a fill count and a list of up to CAP particle
// ids.  Instead of a hash map, a particle's neighbours are found by reading
// the lists of the voxels around it (see nbr_iter).
//
// Interface and timing:
//   clear              one cycle; empties every voxel (counts are flip-flops)
//   ins_en/vox/id      appends id to voxel vox at the clock edge; ignored
//                      when that voxel is full.  ins_full tells, in the same
//                      cycle, whether the voxel addressed by ins_vox is full.
//   q_vox -> q_cnt     combinational fill count of one voxel
//   rd_vox,rd_slot     synchronous read of one list entry, rd_id valid on
//                      the next cycle (block RAM of GX*GY*GZ*CAP entries)
//
// The voxel space and its 4 x 4 x 8 size follow the accelerator; the fixed
// per-voxel capacity and the flat list layout are this design's choices.
module voxel_grid
  import pbf_pkg::*;
#(
  parameter int N   = N_PART_DEF,
  parameter int GX  = GX_DEF,
  parameter int GY  = GY_DEF,
  parameter int GZ  = GZ_DEF,
  parameter int CAP = CAP_DEF,
  parameter int NV  = GX * GY * GZ,
  parameter int VW  = $clog2(NV),
  parameter int CW  = $clog2(CAP + 1),
  parameter int SW  = $clog2(CAP),
  parameter int AW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          ins_en,
  input  logic [VW-1:0] ins_vox,
  input  logic [AW-1:0] ins_id,
  output logic          ins_full,
  input  logic [VW-1:0] q_vox,
  output logic [CW-1:0] q_cnt,
  input  logic [VW-1:0] rd_vox,
  input  logic [SW-1:0] rd_slot,
  output logic [AW-1:0] rd_id
);

  logic [CW-1:0] cnt [NV];
  logic [AW-1:0] ids [NV*CAP];

  assign ins_full = (cnt[ins_vox] == CW'(CAP));
  assign q_cnt    = cnt[q_vox];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NV; v++) cnt[v] <= '0;
    end else if (clear) begin
      for (int v = 0; v < NV; v++) cnt[v] <= '0;
    end else if (ins_en && !ins_full) begin
      cnt[ins_vox] <= cnt[ins_vox] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && ins_en && !ins_full)
      ids[int'(ins_vox) * CAP + int'(cnt[ins_vox])] <= ins_id;
    rd_id <= ids[int'(rd_vox) * CAP + int'(rd_slot)];
  end

endmodule
