// tb_step23_solver: a small cluster of particles, one of them inside a
// sphere collider, through one solver iteration.  A floating-point model of
// the same equations (brute-force neighbour search) gives the expected
// lambda of every particle and the expected corrected positions; the test
// checks both within the precision of the fixed-point formats, checks that
// the particle inside the sphere ends on its surface, and that exactly one
// collision response was counted.
module tb_step23_solver;
  import pbf_pkg::*;
  localparam int N = 16, GX = 4, GY = 2, GZ = 2, CAP = 16, NV = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] a_addr, b_addr, wr_addr, tb_addr, s_wr_addr, ins_id, rd_id;
  prec_t a_data, b_data, wr_data, tb_data, s_wr_data;
  logic wr_en, tb_we = 0, s_wr_en, busy, done, ins_en = 0, ins_full;
  pmask_t s_wr_mask;
  logic [3:0] ins_vox, q_vox, rd_vox, rd_slot;
  logic [4:0] q_cnt;
  logic [15:0] collisions;
  consts_t cst;
  int checks = 0, failures = 0;

  assign wr_en   = tb_we | s_wr_en;
  assign wr_addr = tb_we ? tb_addr : s_wr_addr;
  assign wr_data = tb_we ? tb_data : s_wr_data;
  particle_mem #(.N(N)) u_mem (.clk, .a_addr, .a_data, .b_addr, .b_data, .wr_en, .wr_addr,
                               .wr_mask(tb_we ? pmask_t'('1) : s_wr_mask), .wr_data);
  voxel_grid #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_grid (
    .clk, .rst_n, .clear(1'b0), .ins_en, .ins_vox, .ins_id, .ins_full, .q_vox, .q_cnt,
    .rd_vox, .rd_slot, .rd_id);
  step23_solver #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) dut (
    .clk, .rst_n, .start, .cst, .a_addr, .a_data, .b_addr, .b_data, .wr_en(s_wr_en),
    .wr_addr(s_wr_addr), .wr_mask(s_wr_mask), .wr_data(s_wr_data), .q_vox, .q_cnt, .rd_vox,
    .rd_slot, .rd_id, .collisions, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q(acc_t v); return real'(v) / 65536.0; endfunction
  task automatic near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++; $display("%s: got %f want %f", what, got, want);
    end
  endtask

  real px [N], py [N], pz [N], lam [N], dpx [N], dpy [N], dpz [N];

  initial begin
    real cw, cg, ir, h;
    cst = '0;
    cst.n_part   = 16'(N);
    cst.h        = fx_t'(64);
    cst.c_w      = acc_t'(102943);
    cst.c_g      = -acc_t'(6 * 102943);
    cst.inv_rho0 = acc_t'(21845);       // rest density 3
    cst.eps_lam  = acc_t'(6554);        // 0.1
    cst.k_corr   = acc_t'(6554);        // 0.1
    cst.inv_wdq  = acc_t'(47186);
    cst.n_spheres = 3'd1;
    cst.sph[0].c.x = fx_t'(224); cst.sph[0].c.y = fx_t'(64); cst.sph[0].c.z = fx_t'(64);  // (3.5, 1, 1)
    cst.sph[0].r   = fx_t'(64);
    cw = q(cst.c_w); cg = q(cst.c_g); ir = q(cst.inv_rho0); h = 1.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prec_t r;
      int ix, iy, iz;
      r = '0;
      r.alive = 1;
      ix = i % 3; iy = (i / 3) % 2; iz = (i / 6) % 2;
      r.p.x = fx_t'(48 + ix * 24 + $urandom % 8);
      r.p.y = fx_t'(40 + iy * 24 + $urandom % 8);
      r.p.z = fx_t'(40 + iz * 24 + $urandom % 8);
      if (i == N - 1) begin r.p.x = fx_t'(176); r.p.y = fx_t'(70); r.p.z = fx_t'(60); end  // inside the sphere
      r.x = r.p;
      px[i] = real'(r.p.x) / 64.0; py[i] = real'(r.p.y) / 64.0; pz[i] = real'(r.p.z) / 64.0;
      @(negedge clk);
      tb_we = 1; tb_addr = 4'(i); tb_data = r;
      ins_en = 1; ins_id = 4'(i);
      ins_vox = 4'((int'(r.p.z) / 64 * GY + int'(r.p.y) / 64) * GX + int'(r.p.x) / 64);
    end
    @(negedge clk); tb_we = 0; ins_en = 0;
    // floating-point model
    for (int i = 0; i < N; i++) begin
      real rho, gx, gy, gz, gsq;
      rho = 0; gx = 0; gy = 0; gz = 0; gsq = 0;
      for (int j = 0; j < N; j++) begin
        real dx, dy, dz, r2, s;
        dx = px[i] - px[j]; dy = py[i] - py[j]; dz = pz[i] - pz[j];
        r2 = dx * dx + dy * dy + dz * dz;
        if (r2 < h * h) begin
          s = h * h - r2;
          rho += cw * s * s * s;
          gx += cg * s * s * dx; gy += cg * s * s * dy; gz += cg * s * s * dz;
          gsq += (cg * s * s) * (cg * s * s) * r2;
        end
      end
      lam[i] = -(rho * ir - 1.0) / ((gsq + gx * gx + gy * gy + gz * gz) * ir * ir + q(cst.eps_lam));
    end
    for (int i = 0; i < N; i++) begin
      real ax, ay, az, qx, qy, qz, ox, oy, oz, dd, cx, cy, cz, rr;
      ax = 0; ay = 0; az = 0;
      for (int j = 0; j < N; j++) begin
        real dx, dy, dz, r2, s, w, sc, c;
        dx = px[i] - px[j]; dy = py[i] - py[j]; dz = pz[i] - pz[j];
        r2 = dx * dx + dy * dy + dz * dz;
        if (r2 < h * h) begin
          s = h * h - r2;
          w = cw * s * s * s * q(cst.inv_wdq);
          sc = -q(cst.k_corr) * w * w * w * w;
          c = lam[i] + lam[j] + sc;
          ax += c * cg * s * s * dx; ay += c * cg * s * s * dy; az += c * cg * s * s * dz;
        end
      end
      qx = px[i] + ax * ir; qy = py[i] + ay * ir; qz = pz[i] + az * ir;
      cx = 3.5; cy = 1.0; cz = 1.0; rr = 1.0;
      ox = qx - cx; oy = qy - cy; oz = qz - cz;
      dd = $sqrt(ox * ox + oy * oy + oz * oz);
      if (dd < rr && dd > 0) begin qx = cx + ox * rr / dd; qy = cy + oy * rr / dd; qz = cz + oz * rr / dd; end
      dpx[i] = qx; dpy[i] = qy; dpz[i] = qz;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i += 5)
      $display("particle %0d: lambda %f (model %f), p.x %f -> %f", i, q(u_mem.m_lam[i]), lam[i], px[i], real'(u_mem.m_p[i].x) / 64.0);
    for (int i = 0; i < N; i++) begin
      near(q(u_mem.m_lam[i]), lam[i], 0.02 + 0.03 * (lam[i] < 0 ? -lam[i] : lam[i]), $sformatf("lambda %0d", i));
      near(real'(u_mem.m_p[i].x) / 64.0, dpx[i], 2.5 / 64.0, $sformatf("px %0d", i));
      near(real'(u_mem.m_p[i].y) / 64.0, dpy[i], 2.5 / 64.0, $sformatf("py %0d", i));
      near(real'(u_mem.m_p[i].z) / 64.0, dpz[i], 2.5 / 64.0, $sformatf("pz %0d", i));
    end
    begin
      real ex, ey, ez;
      ex = real'(u_mem.m_p[N-1].x) / 64.0 - 3.5;
      ey = real'(u_mem.m_p[N-1].y) / 64.0 - 1.0;
      ez = real'(u_mem.m_p[N-1].z) / 64.0 - 1.0;
      near($sqrt(ex * ex + ey * ey + ez * ez), 1.0, 2.0 / 64.0, "distance to sphere centre");
    end
    checks++;
    if (collisions != 16'd1) begin failures++; $display("collisions %0d, want 1", collisions); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
