// nbr_iter: particle loop with nearest-neighbour lookup.
//
// Walks particles i = 0 .. n_part-1, skipping dropped ones.  For each live
// particle it reads the record (port A of the particle store), finds the
// voxel holding the predicted position p, then visits the 3 x 3 x 3 block of
// voxels around it and streams every particle id listed there as a candidate
// neighbour j (port B of the particle store).  Every particle in those voxels
// counts as a neighbour candidate, the particle itself included; the caller
// filters by distance.  With nbr_en low the neighbour walk is skipped and the
// loop only visits each particle once (used by the per-particle passes).
//
// Handshake with the owning step:
//   i_begin   one cycle; a_data holds particle i (index i_idx) and stays valid
//             until fin_ack
//   j_valid   one cycle per candidate; b_data holds particle j, j_idx its
//             index; candidates may arrive on consecutive cycles
//   fin_req   high once all candidates of i were sent; the owner does its
//             per-particle work (possibly many cycles), writes back, and
//             pulses fin_ack; the loop then moves to the next particle
//   done      one cycle after the last particle
// Timing: the candidate loop is pipelined with one candidate per cycle:
// a slot of the voxel list is issued (cycle t), its id comes back from the
// voxel grid (t+1) and addresses port B, and the record is on b_data with
// j_valid (t+2).  Per live particle: 2 cycles to read it, 1 per voxel looked
// at (27), 1 per candidate, 2 to drain the pipeline, then fin_req until
// fin_ack (at least 1 cycle).  A dropped particle takes 2 cycles.
//
// Looking at the voxel of the particle and all voxels next to it follows the
// accelerator's neighbour search, and pipelining the loop over neighbours
// follows its use of loop pipelining; the state machine and cycle counts are
// this design's own.
module nbr_iter
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
  input  logic          start,
  input  logic          nbr_en,
  input  logic [15:0]   n_part,
  input  vec_t          origin,
  // particle store
  output logic [AW-1:0] a_addr,
  input  prec_t         a_data,
  output logic [AW-1:0] b_addr,
  // voxel grid
  output logic [VW-1:0] q_vox,
  input  logic [CW-1:0] q_cnt,
  output logic [VW-1:0] rd_vox,
  output logic [SW-1:0] rd_slot,
  input  logic [AW-1:0] rd_id,
  // owner handshake
  output logic          i_begin,
  output logic          j_valid,
  output logic [AW-1:0] j_idx,
  output logic          fin_req,
  input  logic          fin_ack,
  output logic [AW-1:0] i_idx,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {S_IDLE, S_RDI, S_CHKI, S_VOX, S_ID, S_DRN1, S_DRN2, S_FIN} state_t;
  state_t state;

  logic [AW:0]    i_q;
  logic [AW-1:0]  j_q;
  logic signed [POS_W-VOX_SHIFT:0] cx, cy, cz;   // centre voxel
  logic [1:0]     ox, oy, oz;                    // offsets 0..2 -> -1..+1
  logic [VW-1:0]  vox_q;
  logic [SW-1:0]  slot_q;
  logic [CW-1:0]  cnt_q;
  logic           p1, p2;                        // candidate pipeline valid bits

  // neighbour voxel for the current offset
  logic signed [POS_W-VOX_SHIFT+1:0] nx, ny, nz;
  logic nvox_ok;
  logic [VW-1:0] nvox;
  always_comb begin
    nx = cx + $signed({1'b0, ox}) - 1;
    ny = cy + $signed({1'b0, oy}) - 1;
    nz = cz + $signed({1'b0, oz}) - 1;
    nvox_ok = (nx >= 0) && (nx < GX) && (ny >= 0) && (ny < GY) && (nz >= 0) && (nz < GZ);
    nvox = VW'((int'(nz) * GY + int'(ny)) * GX + int'(nx));
  end

  // centre voxel of the particle just read
  logic signed [POS_W:0] rel_x, rel_y, rel_z;
  always_comb begin
    rel_x = a_data.p.x - origin.x;
    rel_y = a_data.p.y - origin.y;
    rel_z = a_data.p.z - origin.z;
  end

  wire last_off = (ox == 2'd2) && (oy == 2'd2) && (oz == 2'd2);
  wire last_i   = (i_q + 1 >= (AW+1)'(n_part)) || (i_q + 1 >= (AW+1)'(N));

  assign a_addr  = i_q[AW-1:0];
  assign i_idx   = i_q[AW-1:0];
  assign b_addr  = p1 ? rd_id : j_q;
  assign q_vox   = nvox;
  assign rd_vox  = vox_q;
  assign rd_slot = slot_q;
  assign fin_req = (state == S_FIN);
  assign busy    = (state != S_IDLE);
  assign i_begin = (state == S_CHKI) && a_data.alive;
  assign j_valid = p2;
  assign j_idx   = j_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i_q     <= '0;
      j_q     <= '0;
      cx      <= '0; cy <= '0; cz <= '0;
      ox      <= '0; oy <= '0; oz <= '0;
      vox_q   <= '0;
      slot_q  <= '0;
      cnt_q   <= '0;
      p1      <= 1'b0;
      p2      <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      // candidate pipeline: slot issued -> id read -> record read
      p1      <= (state == S_ID);
      p2      <= p1;
      if (p1) j_q <= rd_id;
      unique case (state)
        S_IDLE: if (start) begin
          i_q <= '0;
          if (n_part == 16'd0) done <= 1'b1;
          else                 state <= S_RDI;
        end
        S_RDI: state <= S_CHKI;
        S_CHKI: begin
          if (!a_data.alive) begin
            if (last_i) begin done <= 1'b1; state <= S_IDLE; end
            else begin i_q <= i_q + 1'b1; state <= S_RDI; end
          end else begin
            cx <= rel_x[POS_W:VOX_SHIFT];
            cy <= rel_y[POS_W:VOX_SHIFT];
            cz <= rel_z[POS_W:VOX_SHIFT];
            ox <= '0; oy <= '0; oz <= '0;
            state   <= nbr_en ? S_VOX : S_FIN;
          end
        end
        S_VOX: begin
          if (nvox_ok && q_cnt != '0) begin
            vox_q  <= nvox;
            cnt_q  <= q_cnt;
            slot_q <= '0;
            state  <= S_ID;
          end else if (last_off) begin
            state <= S_DRN1;
          end else begin
            if (ox != 2'd2) ox <= ox + 1'b1;
            else begin
              ox <= '0;
              if (oy != 2'd2) oy <= oy + 1'b1;
              else begin oy <= '0; oz <= oz + 1'b1; end
            end
          end
        end
        // issue one slot per cycle; after the last one move to the next voxel
        S_ID: begin
          if (CW'(slot_q) + 1'b1 < cnt_q) begin
            slot_q <= slot_q + 1'b1;
          end else if (last_off) begin
            state <= S_DRN1;
          end else begin
            state <= S_VOX;
            if (ox != 2'd2) ox <= ox + 1'b1;
            else begin
              ox <= '0;
              if (oy != 2'd2) oy <= oy + 1'b1;
              else begin oy <= '0; oz <= oz + 1'b1; end
            end
          end
        end
        S_DRN1: state <= S_DRN2;
        S_DRN2: state <= S_FIN;
        S_FIN: if (fin_ack) begin
          if (last_i) begin done <= 1'b1; state <= S_IDLE; end
          else begin i_q <= i_q + 1'b1; state <= S_RDI; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
