// tb_step4_vort_visc: a small cluster with random position changes through
// step 4.  A floating-point model (brute-force neighbours, velocities
// rounded to the 12.6 storage format where the hardware stores them) gives
// the expected velocity after the position-change update, XSPH viscosity and
// vorticity confinement; the test checks it, checks x <- p, and checks that
// the vorticity and confinement terms were not negligible in this scene.
module tb_step4_vort_visc;
  import pbf_pkg::*;
  localparam int N = 16, GX = 4, GY = 2, GZ = 2, CAP = 16, NV = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] a_addr, b_addr, wr_addr, tb_addr, s_wr_addr, ins_id, rd_id;
  prec_t a_data, b_data, wr_data, tb_data, s_wr_data;
  logic wr_en, tb_we = 0, s_wr_en, busy, done, ins_en = 0, ins_full;
  pmask_t s_wr_mask;
  logic [3:0] ins_vox, q_vox, rd_vox, rd_slot;
  logic [4:0] q_cnt;
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
  step4_vort_visc #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) dut (
    .clk, .rst_n, .start, .cst, .a_addr, .a_data, .b_addr, .b_data, .wr_en(s_wr_en),
    .wr_addr(s_wr_addr), .wr_mask(s_wr_mask), .wr_data(s_wr_data), .q_vox, .q_cnt, .rd_vox,
    .rd_slot, .rd_id, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q(acc_t v); return real'(v) / 65536.0; endfunction
  function automatic real r6(real v); return $floor(v * 64.0 + 0.5) / 64.0; endfunction
  task automatic near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++; $display("%s: got %f want %f", what, got, want);
    end
  endtask

  real px [N], py [N], pz [N], vx [N], vy [N], vz [N], tx [N], ty [N], tz [N];
  real wx [N], wy [N], wz [N], wm [N], fx [N], fy [N], fz [N];
  prec_t init [N];

  initial begin
    real cw, cg, h, dt, big_w, big_f;
    cst = '0;
    cst.n_part   = 16'(N);
    cst.h        = fx_t'(64);
    cst.c_w      = acc_t'(102943);
    cst.c_g      = -acc_t'(6 * 102943);
    cst.dt       = acc_t'(1092);
    cst.inv_dt   = acc_t'(60 * 65536);
    cst.c_xsph   = acc_t'(6554);          // 0.1
    cst.eps_vort = acc_t'(32768);         // 0.5
    cw = q(cst.c_w); cg = q(cst.c_g); h = 1.0; dt = q(cst.dt);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prec_t r;
      int ix, iy, iz;
      r = '0;
      r.alive = 1;
      ix = i % 3; iy = (i / 3) % 2; iz = (i / 6) % 3;
      r.p.x = fx_t'(48 + ix * 24 + $urandom % 8);
      r.p.y = fx_t'(40 + iy * 24 + $urandom % 8);
      r.p.z = fx_t'(40 + iz * 24 + $urandom % 8);
      r.x.x = r.p.x - fx_t'($signed($urandom % 5) - 2);
      r.x.y = r.p.y - fx_t'($signed($urandom % 5) - 2);
      r.x.z = r.p.z - fx_t'($signed($urandom % 5) - 2);
      init[i] = r;
      px[i] = real'(r.p.x) / 64.0; py[i] = real'(r.p.y) / 64.0; pz[i] = real'(r.p.z) / 64.0;
      vx[i] = r6((px[i] - real'(r.x.x) / 64.0) * 60.0);
      vy[i] = r6((py[i] - real'(r.x.y) / 64.0) * 60.0);
      vz[i] = r6((pz[i] - real'(r.x.z) / 64.0) * 60.0);
      @(negedge clk);
      tb_we = 1; tb_addr = 4'(i); tb_data = r;
      ins_en = 1; ins_id = 4'(i);
      ins_vox = 4'((int'(r.p.z) / 64 * GY + int'(r.p.y) / 64) * GX + int'(r.p.x) / 64);
    end
    @(negedge clk); tb_we = 0; ins_en = 0;
    big_w = 0; big_f = 0;
    for (int i = 0; i < N; i++) begin
      real sx, sy, sz;
      wx[i] = 0; wy[i] = 0; wz[i] = 0; sx = 0; sy = 0; sz = 0;
      for (int j = 0; j < N; j++) begin
        real dx, dy, dz, r2, s, w, gx, gy, gz, ux, uy, uz;
        dx = px[i] - px[j]; dy = py[i] - py[j]; dz = pz[i] - pz[j];
        r2 = dx * dx + dy * dy + dz * dz;
        if (r2 < h * h) begin
          s = h * h - r2;
          w = cw * s * s * s;
          gx = cg * s * s * dx; gy = cg * s * s * dy; gz = cg * s * s * dz;
          ux = vx[j] - vx[i]; uy = vy[j] - vy[i]; uz = vz[j] - vz[i];
          wx[i] += gy * uz - gz * uy; wy[i] += gz * ux - gx * uz; wz[i] += gx * uy - gy * ux;
          sx += ux * w; sy += uy * w; sz += uz * w;
        end
      end
      wm[i] = $sqrt(wx[i] * wx[i] + wy[i] * wy[i] + wz[i] * wz[i]);
      if (wm[i] > big_w) big_w = wm[i];
      tx[i] = r6(vx[i] + q(cst.c_xsph) * sx);
      ty[i] = r6(vy[i] + q(cst.c_xsph) * sy);
      tz[i] = r6(vz[i] + q(cst.c_xsph) * sz);
    end
    for (int i = 0; i < N; i++) begin
      real ex, ey, ez, en, nx, ny, nz;
      ex = 0; ey = 0; ez = 0;
      for (int j = 0; j < N; j++) begin
        real dx, dy, dz, r2, s;
        dx = px[i] - px[j]; dy = py[i] - py[j]; dz = pz[i] - pz[j];
        r2 = dx * dx + dy * dy + dz * dz;
        if (r2 < h * h) begin
          s = h * h - r2;
          ex += wm[j] * cg * s * s * dx; ey += wm[j] * cg * s * s * dy; ez += wm[j] * cg * s * s * dz;
        end
      end
      en = $sqrt(ex * ex + ey * ey + ez * ez);
      fx[i] = 0; fy[i] = 0; fz[i] = 0;
      if (en > 0) begin
        nx = ex / en; ny = ey / en; nz = ez / en;
        fx[i] = q(cst.eps_vort) * (ny * wz[i] - nz * wy[i]);
        fy[i] = q(cst.eps_vort) * (nz * wx[i] - nx * wz[i]);
        fz[i] = q(cst.eps_vort) * (nx * wy[i] - ny * wx[i]);
      end
      if ($sqrt(fx[i] * fx[i] + fy[i] * fy[i] + fz[i] * fz[i]) * dt > big_f)
        big_f = $sqrt(fx[i] * fx[i] + fy[i] * fy[i] + fz[i] * fz[i]) * dt;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_mem.m_x[i] !== init[i].p) begin failures++; $display("x %0d not committed", i); end
      near(q(u_mem.m_wmag[i]), wm[i], 0.01 + 0.02 * wm[i], $sformatf("|omega| %0d", i));
      near(real'(u_mem.m_v[i].x) / 64.0, tx[i] + dt * fx[i], 2.5 / 64.0, $sformatf("vx %0d", i));
      near(real'(u_mem.m_v[i].y) / 64.0, ty[i] + dt * fy[i], 2.5 / 64.0, $sformatf("vy %0d", i));
      near(real'(u_mem.m_v[i].z) / 64.0, tz[i] + dt * fz[i], 2.5 / 64.0, $sformatf("vz %0d", i));
    end
    $display("largest |omega| %f, largest dt*|f| %f", big_w, big_f);
    checks++;
    if (big_w < 0.1) begin failures++; $display("scene has no vorticity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
