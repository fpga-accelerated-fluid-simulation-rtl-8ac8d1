// step4_vort_visc: step 4 of the simulation loop, velocity update with
// vorticity confinement and XSPH viscosity, and position commit.
//
// One start runs three passes over the particles:
//   VEL   (per particle)    v_i <- (p_i - x_i) / dt   (multiplied by 1/dt),
//                           x_i <- p_i
//   VORT  (neighbour pass)  omega_i = sum_j v_ij x grad_pj W_ij
//                                   = sum_j gradW_ij x v_ij,   v_ij = v_j - v_i
//                           xsph_i  = sum_j v_ij W_ij
//                           |omega_i| by square root;
//                           vt_i = v_i + c * xsph_i    (XSPH viscosity)
//   CONF  (neighbour pass)  eta_i = sum_j |omega_j| gradW_ij,
//                           N_i = eta_i / |eta_i|,
//                           f_i = eps (N_i x omega_i)  (vorticity confinement)
//                           v_i <- vt_i + dt f_i
// The passes are separate because each needs the previous result of its
// neighbours.  Square roots and the reciprocal of |eta| use one sequential
// root and one sequential divider.
//
// Interface: pulse start; done pulses after the CONF pass.  The unit owns the
// particle store and the read side of the voxel grid while busy.
// Timing: as nbr_iter per pass, plus 33 cycles per particle in VORT and
// 33 + 66 cycles per particle in CONF.
//
// That step 4 updates the velocity from the position change, applies
// vorticity confinement and XSPH viscosity, and then commits x <- p follows
// the simulation loop; the formulas are the standard ones of position-based
// fluids; the pass split, the position commit ahead of the neighbour passes
// (they read the new positions) and the arithmetic are this design's choices.
module step4_vort_visc
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
  input  consts_t       cst,
  output logic [AW-1:0] a_addr,
  input  prec_t         a_data,
  output logic [AW-1:0] b_addr,
  input  prec_t         b_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pmask_t        wr_mask,
  output prec_t         wr_data,
  output logic [VW-1:0] q_vox,
  input  logic [CW-1:0] q_cnt,
  output logic [VW-1:0] rd_vox,
  output logic [SW-1:0] rd_slot,
  input  logic [AW-1:0] rd_id,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {P_IDLE, P_VEL, P_VORT, P_CONF} pass_t;
  typedef enum logic [1:0] {F_IDLE, F_SQW, F_DVW} fin_t;
  pass_t pass;
  fin_t  fs;

  logic it_start, i_begin, j_valid, fin_req, fin_ack, it_done, it_busy;
  logic [AW-1:0] i_idx;

  nbr_iter #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_iter (
    .clk, .rst_n, .start(it_start), .nbr_en(pass != P_VEL), .n_part(cst.n_part),
    .origin(cst.origin), .a_addr, .a_data, .b_addr, .q_vox, .q_cnt, .rd_vox,
    .rd_slot, .rd_id, .i_begin, .j_valid, .j_idx(), .fin_req, .fin_ack, .i_idx,
    .busy(it_busy), .done(it_done)
  );

  prec_t ri;
  logic  pr_in;
  acc_t  pr_w;
  avec_t pr_g;
  sph_pair u_pair (
    .pi(ri.p), .pj(b_data.p), .h(cst.h), .c_w(cst.c_w), .c_g(cst.c_g),
    .in_range(pr_in), .w(pr_w), .gw(pr_g)
  );

  logic        sq_start, sq_done, sq_busy;
  logic [63:0] sq_in;
  logic [31:0] sq_root;
  seq_sqrt #(.W(64)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(sq_in), .busy(sq_busy),
    .done(sq_done), .root(sq_root)
  );

  logic  div_start, div_done, div_busy;
  wide_t div_q;
  seq_div #(.W(64)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(wide_t'(1) <<< (2 * ACC_FRAC)),
    .divisor(wide_t'({32'd0, sq_root})), .busy(div_busy), .done(div_done),
    .quotient(div_q)
  );

  // accumulators (Q16)
  wide_t wx, wy, wz, xsx, xsy, xsz, ex, ey, ez;

  // per-pair terms
  wide_t vijx, vijy, vijz, gx, gy, gz;
  always_comb begin
    vijx = fx2q(b_data.v.x) - fx2q(ri.v.x);
    vijy = fx2q(b_data.v.y) - fx2q(ri.v.y);
    vijz = fx2q(b_data.v.z) - fx2q(ri.v.z);
    gx   = wide_t'(pr_g.x);
    gy   = wide_t'(pr_g.y);
    gz   = wide_t'(pr_g.z);
  end

  // vorticity confinement force from eta (accumulated) and 1/|eta| (div_q)
  wide_t nx, ny, nz, fx, fy, fz;
  always_comb begin
    nx = qmul(ex, div_q);
    ny = qmul(ey, div_q);
    nz = qmul(ez, div_q);
    fx = qmul(wide_t'(cst.eps_vort), qmul(ny, wide_t'(ri.w.z)) - qmul(nz, wide_t'(ri.w.y)));
    fy = qmul(wide_t'(cst.eps_vort), qmul(nz, wide_t'(ri.w.x)) - qmul(nx, wide_t'(ri.w.z)));
    fz = qmul(wide_t'(cst.eps_vort), qmul(nx, wide_t'(ri.w.y)) - qmul(ny, wide_t'(ri.w.x)));
  end

  assign busy = (pass != P_IDLE);

  always_comb begin
    fin_ack   = 1'b0;
    wr_en     = 1'b0;
    wr_addr   = i_idx;
    wr_mask   = MASK_NONE;
    wr_data   = ri;
    sq_start  = 1'b0;
    div_start = 1'b0;
    sq_in     = (pass == P_VORT) ? 64'(wx * wx + wy * wy + wz * wz)
                                 : 64'(ex * ex + ey * ey + ez * ez);
    if (fs == F_IDLE && fin_req) begin
      if (pass == P_VEL) begin
        wr_en     = 1'b1;
        wr_mask.x = 1'b1;
        wr_mask.v = 1'b1;
        wr_data.x = ri.p;
        wr_data.v.x = q2fx(qmul(fx2q(ri.p.x) - fx2q(ri.x.x), wide_t'(cst.inv_dt)));
        wr_data.v.y = q2fx(qmul(fx2q(ri.p.y) - fx2q(ri.x.y), wide_t'(cst.inv_dt)));
        wr_data.v.z = q2fx(qmul(fx2q(ri.p.z) - fx2q(ri.x.z), wide_t'(cst.inv_dt)));
        fin_ack   = 1'b1;
      end else begin
        sq_start = 1'b1;
      end
    end
    if (fs == F_SQW && sq_done) begin
      if (pass == P_VORT) begin
        wr_en        = 1'b1;
        wr_mask.w    = 1'b1;
        wr_mask.wmag = 1'b1;
        wr_mask.vt   = 1'b1;
        wr_data.w.x  = sat_acc(wx);
        wr_data.w.y  = sat_acc(wy);
        wr_data.w.z  = sat_acc(wz);
        wr_data.wmag = sat_acc(wide_t'({32'd0, sq_root}));
        wr_data.vt.x = q2fx(fx2q(ri.v.x) + qmul(wide_t'(cst.c_xsph), xsx));
        wr_data.vt.y = q2fx(fx2q(ri.v.y) + qmul(wide_t'(cst.c_xsph), xsy));
        wr_data.vt.z = q2fx(fx2q(ri.v.z) + qmul(wide_t'(cst.c_xsph), xsz));
        fin_ack      = 1'b1;
      end else if (sq_root == '0) begin
        wr_en     = 1'b1;
        wr_mask.v = 1'b1;
        wr_data.v = ri.vt;
        fin_ack   = 1'b1;
      end else begin
        div_start = 1'b1;
      end
    end
    if (fs == F_DVW && div_done) begin
      wr_en       = 1'b1;
      wr_mask.v   = 1'b1;
      wr_data.v.x = q2fx(fx2q(ri.vt.x) + qmul(wide_t'(cst.dt), fx));
      wr_data.v.y = q2fx(fx2q(ri.vt.y) + qmul(wide_t'(cst.dt), fy));
      wr_data.v.z = q2fx(fx2q(ri.vt.z) + qmul(wide_t'(cst.dt), fz));
      fin_ack     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass <= P_IDLE; fs <= F_IDLE; it_start <= 1'b0; done <= 1'b0; ri <= '0;
      wx <= '0; wy <= '0; wz <= '0; xsx <= '0; xsy <= '0; xsz <= '0;
      ex <= '0; ey <= '0; ez <= '0;
    end else begin
      it_start <= 1'b0;
      done     <= 1'b0;

      unique case (pass)
        P_IDLE: if (start) begin pass <= P_VEL; it_start <= 1'b1; end
        P_VEL:  if (it_done) begin pass <= P_VORT; it_start <= 1'b1; end
        P_VORT: if (it_done) begin pass <= P_CONF; it_start <= 1'b1; end
        P_CONF: if (it_done) begin pass <= P_IDLE; done <= 1'b1; end
        default: pass <= P_IDLE;
      endcase

      if (i_begin) begin
        ri <= a_data;
        wx <= '0; wy <= '0; wz <= '0; xsx <= '0; xsy <= '0; xsz <= '0;
        ex <= '0; ey <= '0; ez <= '0;
      end
      if (j_valid && pr_in) begin
        if (pass == P_VORT) begin
          wx  <= wx + qmul(gy, vijz) - qmul(gz, vijy);
          wy  <= wy + qmul(gz, vijx) - qmul(gx, vijz);
          wz  <= wz + qmul(gx, vijy) - qmul(gy, vijx);
          xsx <= xsx + qmul(vijx, wide_t'(pr_w));
          xsy <= xsy + qmul(vijy, wide_t'(pr_w));
          xsz <= xsz + qmul(vijz, wide_t'(pr_w));
        end else begin
          ex <= ex + qmul(wide_t'(b_data.wmag), gx);
          ey <= ey + qmul(wide_t'(b_data.wmag), gy);
          ez <= ez + qmul(wide_t'(b_data.wmag), gz);
        end
      end

      unique case (fs)
        F_IDLE: if (fin_req && pass != P_VEL) fs <= F_SQW;
        F_SQW:  if (sq_done) fs <= (pass == P_VORT || sq_root == '0) ? F_IDLE : F_DVW;
        F_DVW:  if (div_done) fs <= F_IDLE;
        default: fs <= F_IDLE;
      endcase
    end
  end

endmodule
