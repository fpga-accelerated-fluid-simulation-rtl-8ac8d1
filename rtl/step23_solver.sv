// step23_solver: steps 2 and 3 of the simulation loop, one iteration of the
// density-constraint solver.
//
// One start runs three passes over the particles, each a Jacobi sweep that
// reads only values the previous pass produced:
//   LAMBDA  (neighbour pass)  rho_i = sum_j W_ij,  C_i = rho_i/rho0 - 1,
//           lambda_i = -C_i / ( (sum_j |gradW_ij|^2 + |sum_j gradW_ij|^2)/rho0^2
//                               + eps )
//   DELTA   (neighbour pass)  dp_i = 1/rho0 sum_j (lambda_i + lambda_j + s_corr) gradW_ij
//           with the artificial pressure s_corr = -k (W_ij / W(dq))^4; then
//           collision detection and response against the sphere colliders:
//           if q = p_i + dp_i lies inside sphere k (centre c, radius R),
//           q <- c + R (q - c)/|q - c|; dp_i is stored as q - p_i.
//   UPDATE  (per particle)    p_i <- p_i + dp_i
// Kernel values come from sph_pair.  lambda and the collision scale factor
// use a shared sequential divider; the distance to a sphere centre uses a
// sequential square root.
//
// Interface: pulse start; done pulses after the UPDATE pass.  The unit owns
// both read ports and the write port of the particle store and the read side
// of the voxel grid while busy.  collisions counts collision responses
// applied in the last run.
// Timing: per pass as nbr_iter (one cycle per candidate neighbour), plus
// 66 cycles for lambda and 33 + 66 cycles per sphere contact.
//
// The three-pass structure (lambda for all, correction with collision for
// all, then position update for all) follows the simulation loop; the
// formulas are those of position-based fluids.  Kernel shape, the s_corr
// exponent of 4, the Q16 widths and the sequential divider and root are this
// design's choices.
module step23_solver
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
  output logic [15:0]   collisions,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {P_IDLE, P_LAM, P_DP, P_UPD} pass_t;
  typedef enum logic [2:0] {F_IDLE, F_LDIV, F_SPH, F_SQW, F_DVW} fin_t;
  pass_t pass;
  fin_t  fs;

  // ---- particle loop -------------------------------------------------------
  logic it_start, i_begin, j_valid, fin_req, fin_ack, it_done, it_busy;
  logic [AW-1:0] i_idx;

  nbr_iter #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_iter (
    .clk, .rst_n, .start(it_start), .nbr_en(pass != P_UPD), .n_part(cst.n_part),
    .origin(cst.origin), .a_addr, .a_data, .b_addr, .q_vox, .q_cnt, .rd_vox,
    .rd_slot, .rd_id, .i_begin, .j_valid, .j_idx(), .fin_req, .fin_ack, .i_idx,
    .busy(it_busy), .done(it_done)
  );

  // ---- pair kernel -----------------------------------------------------------
  prec_t ri;
  logic  pr_in;
  acc_t  pr_w;
  avec_t pr_g;
  sph_pair u_pair (
    .pi(ri.p), .pj(b_data.p), .h(cst.h), .c_w(cst.c_w), .c_g(cst.c_g),
    .in_range(pr_in), .w(pr_w), .gw(pr_g)
  );

  // ---- divider and square root -----------------------------------------------
  logic  div_start, div_done, div_busy;
  wide_t div_a, div_b, div_q;
  seq_div #(.W(64)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );
  logic        sq_start, sq_done, sq_busy;
  logic [63:0] sq_in;
  logic [31:0] sq_root;
  seq_sqrt #(.W(64)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(sq_in), .busy(sq_busy),
    .done(sq_done), .root(sq_root)
  );

  // ---- accumulators ----------------------------------------------------------
  wide_t rho, gsx, gsy, gsz, gsq, dpx, dpy, dpz;

  // s_corr and the per-pair correction term
  wide_t ratio, r2, r4, scorr, coef;
  always_comb begin
    ratio = qmul(wide_t'(pr_w), wide_t'(cst.inv_wdq));
    r2    = qmul(ratio, ratio);
    r4    = qmul(r2, r2);
    scorr = -qmul(wide_t'(cst.k_corr), r4);
    coef  = wide_t'(ri.lam) + wide_t'(b_data.lam) + scorr;
  end

  // lambda operands
  wide_t cdens, gsq_all, den;
  always_comb begin
    cdens   = qmul(rho, wide_t'(cst.inv_rho0)) - (wide_t'(1) <<< ACC_FRAC);
    gsq_all = gsq + qmul(gsx, gsx) + qmul(gsy, gsy) + qmul(gsz, gsz);
    den     = qmul(qmul(gsq_all, wide_t'(cst.inv_rho0)), wide_t'(cst.inv_rho0)) +
              wide_t'(cst.eps_lam);
  end

  // collision state: corrected position q (Q16), current sphere, offset
  wide_t qx, qy, qz, ox, oy, oz;
  logic [2:0] sk;
  wide_t sdx, sdy, sdz, sd2, srad, srad2;
  always_comb begin
    sdx   = qx - fx2q(cst.sph[sk[1:0]].c.x);
    sdy   = qy - fx2q(cst.sph[sk[1:0]].c.y);
    sdz   = qz - fx2q(cst.sph[sk[1:0]].c.z);
    sd2   = sdx * sdx + sdy * sdy + sdz * sdz;        // Q32
    srad  = fx2q(cst.sph[sk[1:0]].r);                 // Q16
    srad2 = srad * srad;                               // Q32
  end

  // ---- control ---------------------------------------------------------------
  assign busy = (pass != P_IDLE);

  always_comb begin
    fin_ack   = 1'b0;
    wr_en     = 1'b0;
    wr_addr   = i_idx;
    wr_mask   = MASK_NONE;
    wr_data   = ri;
    div_start = 1'b0;
    div_a     = -(cdens <<< ACC_FRAC);
    div_b     = den;
    sq_start  = 1'b0;
    sq_in     = 64'(sd2);
    if (fs == F_IDLE && fin_req && pass == P_LAM) begin
      div_start = 1'b1;
    end
    if (fs == F_LDIV && div_done) begin
      wr_en       = 1'b1;
      wr_mask.lam = 1'b1;
      wr_data.lam = sat_acc(div_q);
      fin_ack     = 1'b1;
    end
    if (fs == F_SPH) begin
      if (sk >= cst.n_spheres || sk >= 3'(MAX_SPHERES)) begin
        wr_en      = 1'b1;
        wr_mask.dp = 1'b1;
        wr_data.dp.x = sat_acc(qx - fx2q(ri.p.x));
        wr_data.dp.y = sat_acc(qy - fx2q(ri.p.y));
        wr_data.dp.z = sat_acc(qz - fx2q(ri.p.z));
        fin_ack    = 1'b1;
      end else if (sd2 < srad2 && sd2 != '0) begin
        sq_start = 1'b1;
      end
    end
    if (fs == F_SQW && sq_done) begin
      div_start = 1'b1;
      div_a     = (wide_t'(srad) <<< ACC_FRAC);
      div_b     = wide_t'({32'd0, sq_root});
    end
    if (fs == F_IDLE && fin_req && pass == P_UPD) begin
      wr_en      = 1'b1;
      wr_mask.p  = 1'b1;
      wr_data.p.x = q2fx(fx2q(ri.p.x) + wide_t'(ri.dp.x));
      wr_data.p.y = q2fx(fx2q(ri.p.y) + wide_t'(ri.dp.y));
      wr_data.p.z = q2fx(fx2q(ri.p.z) + wide_t'(ri.dp.z));
      fin_ack    = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass <= P_IDLE; fs <= F_IDLE; it_start <= 1'b0; done <= 1'b0;
      ri <= '0; rho <= '0; gsx <= '0; gsy <= '0; gsz <= '0; gsq <= '0;
      dpx <= '0; dpy <= '0; dpz <= '0; qx <= '0; qy <= '0; qz <= '0;
      ox <= '0; oy <= '0; oz <= '0; sk <= '0; collisions <= '0;
    end else begin
      it_start <= 1'b0;
      done     <= 1'b0;

      // pass sequencing
      unique case (pass)
        P_IDLE: if (start) begin pass <= P_LAM; it_start <= 1'b1; collisions <= '0; end
        P_LAM:  if (it_done) begin pass <= P_DP;  it_start <= 1'b1; end
        P_DP:   if (it_done) begin pass <= P_UPD; it_start <= 1'b1; end
        P_UPD:  if (it_done) begin pass <= P_IDLE; done <= 1'b1; end
        default: pass <= P_IDLE;
      endcase

      // neighbour accumulation
      if (i_begin) begin
        ri  <= a_data;
        rho <= '0; gsx <= '0; gsy <= '0; gsz <= '0; gsq <= '0;
        dpx <= '0; dpy <= '0; dpz <= '0;
      end
      if (j_valid && pr_in) begin
        if (pass == P_LAM) begin
          rho <= rho + wide_t'(pr_w);
          gsx <= gsx + wide_t'(pr_g.x);
          gsy <= gsy + wide_t'(pr_g.y);
          gsz <= gsz + wide_t'(pr_g.z);
          gsq <= gsq + qmul(wide_t'(pr_g.x), wide_t'(pr_g.x)) +
                       qmul(wide_t'(pr_g.y), wide_t'(pr_g.y)) +
                       qmul(wide_t'(pr_g.z), wide_t'(pr_g.z));
        end else begin
          dpx <= dpx + qmul(coef, wide_t'(pr_g.x));
          dpy <= dpy + qmul(coef, wide_t'(pr_g.y));
          dpz <= dpz + qmul(coef, wide_t'(pr_g.z));
        end
      end

      // per-particle finishing work
      unique case (fs)
        F_IDLE: if (fin_req && pass == P_LAM) fs <= F_LDIV;
                else if (fin_req && pass == P_DP) begin
                  qx <= fx2q(ri.p.x) + qmul(dpx, wide_t'(cst.inv_rho0));
                  qy <= fx2q(ri.p.y) + qmul(dpy, wide_t'(cst.inv_rho0));
                  qz <= fx2q(ri.p.z) + qmul(dpz, wide_t'(cst.inv_rho0));
                  sk <= '0;
                  fs <= F_SPH;
                end
        F_LDIV: if (div_done) fs <= F_IDLE;
        F_SPH: begin
          if (sk >= cst.n_spheres || sk >= 3'(MAX_SPHERES)) fs <= F_IDLE;
          else if (sd2 < srad2 && sd2 != '0) begin
            ox <= sdx; oy <= sdy; oz <= sdz;
            fs <= F_SQW;
          end else sk <= sk + 1'b1;
        end
        F_SQW: if (sq_done) fs <= F_DVW;
        F_DVW: if (div_done) begin
          qx <= fx2q(cst.sph[sk[1:0]].c.x) + qmul(ox, div_q);
          qy <= fx2q(cst.sph[sk[1:0]].c.y) + qmul(oy, div_q);
          qz <= fx2q(cst.sph[sk[1:0]].c.z) + qmul(oz, div_q);
          collisions <= collisions + 1'b1;
          sk <= sk + 1'b1;
          fs <= F_SPH;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

endmodule
