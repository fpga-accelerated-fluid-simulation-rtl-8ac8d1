// step5_grid_build: step 5, "update particle structure".
//
// Rebuilds the voxel space from the predicted positions p.  The grid is
// emptied in one cycle, then every live particle is appended to the list of
// the voxel that holds it:
//   voxel = floor((p - origin) / voxel_edge),  voxel_edge = 2^VOX_SHIFT LSB
// A particle outside the bounded voxel space, or whose voxel list is already
// full, is dropped from the scene: its alive flag is cleared and it takes no
// further part in the simulation.
//
// Interface: pulse start; done pulses after the last particle.  dropped
// counts the particles dropped by the last pass (for the host's statistics).
// Timing: 1 cycle to clear, then 2 cycles per particle.
//
// Dropping particles that leave the bounded space follows the accelerator;
// dropping on a full voxel list is this design's consequence of giving each
// voxel a fixed capacity.
module step5_grid_build
  import pbf_pkg::*;
#(
  parameter int N   = N_PART_DEF,
  parameter int GX  = GX_DEF,
  parameter int GY  = GY_DEF,
  parameter int GZ  = GZ_DEF,
  parameter int NV  = GX * GY * GZ,
  parameter int VW  = $clog2(NV),
  parameter int AW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_part,
  input  vec_t          origin,
  output logic [AW-1:0] a_addr,
  input  prec_t         a_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pmask_t        wr_mask,
  output prec_t         wr_data,
  output logic          g_clear,
  output logic          g_ins_en,
  output logic [VW-1:0] g_ins_vox,
  output logic [AW-1:0] g_ins_id,
  input  logic          g_ins_full,
  output logic [15:0]   dropped,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_RD, S_CHK} state_t;
  state_t state;
  logic [AW:0] i_q;

  logic signed [POS_W:0] rx, ry, rz;
  logic signed [POS_W-VOX_SHIFT:0] vx, vy, vz;
  logic in_box;
  always_comb begin
    rx = a_data.p.x - origin.x;
    ry = a_data.p.y - origin.y;
    rz = a_data.p.z - origin.z;
    vx = rx[POS_W:VOX_SHIFT];
    vy = ry[POS_W:VOX_SHIFT];
    vz = rz[POS_W:VOX_SHIFT];
    in_box = (vx >= 0) && (int'(vx) < GX) && (vy >= 0) && (int'(vy) < GY) &&
             (vz >= 0) && (int'(vz) < GZ);
  end

  wire chk   = (state == S_CHK) && a_data.alive;
  wire keep  = in_box && !g_ins_full;

  assign a_addr    = i_q[AW-1:0];
  assign wr_addr   = i_q[AW-1:0];
  assign g_clear   = (state == S_CLR);
  assign g_ins_vox = VW'((int'(vz) * GY + int'(vy)) * GX + int'(vx));
  assign g_ins_id  = i_q[AW-1:0];
  assign g_ins_en  = chk && in_box;
  assign wr_en     = chk && !keep;
  always_comb begin
    wr_data       = a_data;
    wr_data.alive = 1'b0;
    wr_mask       = MASK_NONE;
    wr_mask.alive = 1'b1;
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i_q     <= '0;
      dropped <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_q     <= '0;
          dropped <= '0;
          state   <= S_CLR;
        end
        S_CLR: begin
          if (n_part == 16'd0) begin done <= 1'b1; state <= S_IDLE; end
          else state <= S_RD;
        end
        S_RD: state <= S_CHK;
        S_CHK: begin
          if (chk && !keep) dropped <= dropped + 1'b1;
          if ((i_q + 1 >= (AW+1)'(n_part)) || (i_q + 1 >= (AW+1)'(N))) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            i_q   <= i_q + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
