// tb_step5_grid_build: particles inside and outside the voxel space and one
// over-filled voxel; checks that every kept particle is listed in the voxel
// holding it, that particles outside the space or beyond a voxel's capacity
// are dropped (alive cleared, counted), that already dropped particles stay
// out, and the 1 + 2-per-particle schedule.
module tb_step5_grid_build;
  import pbf_pkg::*;
  localparam int N = 32, GX = 2, GY = 2, GZ = 4, CAP = 4, NV = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] a_addr, wr_addr, tb_addr, s_wr_addr, ins_id, rd_id;
  prec_t a_data, wr_data, tb_data, s_wr_data;
  logic wr_en, tb_we = 0, s_wr_en, busy, done, g_clear, ins_en, ins_full;
  pmask_t s_wr_mask;
  logic [3:0] ins_vox, q_vox = 0, rd_vox = 0;
  logic [2:0] q_cnt;
  logic [1:0] rd_slot = 0;
  logic [15:0] dropped;
  vec_t origin;
  int checks = 0, failures = 0;

  assign wr_en   = tb_we | s_wr_en;
  assign wr_addr = tb_we ? tb_addr : s_wr_addr;
  assign wr_data = tb_we ? tb_data : s_wr_data;
  particle_mem #(.N(N)) u_mem (.clk, .a_addr, .a_data, .b_addr(5'd0), .b_data(), .wr_en, .wr_addr,
                               .wr_mask(tb_we ? pmask_t'('1) : s_wr_mask), .wr_data);
  voxel_grid #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_grid (
    .clk, .rst_n, .clear(g_clear), .ins_en, .ins_vox, .ins_id, .ins_full, .q_vox, .q_cnt,
    .rd_vox, .rd_slot, .rd_id);
  step5_grid_build #(.N(N), .GX(GX), .GY(GY), .GZ(GZ)) dut (
    .clk, .rst_n, .start, .n_part(16'(N)), .origin, .a_addr, .a_data, .wr_en(s_wr_en),
    .wr_addr(s_wr_addr), .wr_mask(s_wr_mask), .wr_data(s_wr_data), .g_clear, .g_ins_en(ins_en),
    .g_ins_vox(ins_vox), .g_ins_id(ins_id), .g_ins_full(ins_full), .dropped, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt_m [NV];
  int ids_m [NV][CAP];
  bit keep [N];

  initial begin
    int cyc, ndrop, noutside, nfull;
    origin.x = fx_t'(-32); origin.y = fx_t'(16); origin.z = '0;
    foreach (cnt_m[v]) cnt_m[v] = 0;
    ndrop = 0; noutside = 0; nfull = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prec_t r;
      int ux, uy, uz, v;
      r = '0;
      r.alive = (i != 7);
      if (i < 6) begin                       // six particles in one voxel: two overflow
        ux = 1; uy = 0; uz = 2;
      end else begin
        ux = $urandom % 3; uy = $urandom % 3; uz = $signed($urandom % 6) - 1;
      end
      r.p.x = fx_t'(origin.x + ux * 64 + $urandom % 64);
      r.p.y = fx_t'(origin.y + uy * 64 + $urandom % 64);
      r.p.z = fx_t'(origin.z + uz * 64 + $urandom % 64);
      keep[i] = 0;
      if (r.alive) begin
        if (ux >= GX || uy >= GY || uz < 0 || uz >= GZ) begin ndrop++; noutside++; end
        else begin
          v = (uz * GY + uy) * GX + ux;
          if (cnt_m[v] < CAP) begin ids_m[v][cnt_m[v]] = i; cnt_m[v]++; keep[i] = 1; end
          else begin ndrop++; nfull++; end
        end
      end
      @(negedge clk); tb_we = 1; tb_addr = 5'(i); tb_data = r;
    end
    @(negedge clk); tb_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * N + 2) begin failures++; $display("took %0d cycles, want %0d", cyc, 2 * N + 2); end
    checks++;
    if (int'(dropped) != ndrop || noutside == 0 || nfull == 0) begin
      failures++; $display("dropped %0d want %0d (outside %0d, full %0d)", dropped, ndrop, noutside, nfull);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_mem.m_alive[i] !== keep[i]) begin failures++; $display("particle %0d alive=%0d", i, u_mem.m_alive[i]); end
    end
    for (int v = 0; v < NV; v++) begin
      @(negedge clk); q_vox = 4'(v);
      #1 checks++;
      if (int'(q_cnt) != cnt_m[v]) begin failures++; $display("voxel %0d holds %0d want %0d", v, q_cnt, cnt_m[v]); end
      for (int s = 0; s < cnt_m[v]; s++) begin
        @(negedge clk); rd_vox = 4'(v); rd_slot = 2'(s);
        @(negedge clk);
        checks++;
        if (int'(rd_id) != ids_m[v][s]) begin failures++; $display("voxel %0d slot %0d", v, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
