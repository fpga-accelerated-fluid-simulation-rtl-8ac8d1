// tb_nbr_iter: fills a particle store and a voxel grid with random particles
// (some dropped), runs the neighbour walk with an owner that acknowledges
// each particle at once, and checks for every live particle that the candidates streamed are
// exactly the live particles of the 27 surrounding voxels (count, id sum and
// id square sum), that dropped particles are skipped, and that the loop
// takes 2 + 27 + candidates + 2 + finish cycles per live particle (one
// candidate per cycle).
module tb_nbr_iter;
  import pbf_pkg::*;
  localparam int N = 32, GX = 2, GY = 2, GZ = 4, CAP = 16;
  logic clk = 0, rst_n = 0, start = 0, fin_ack = 0;
  logic [4:0] a_addr, b_addr, wr_addr, ins_id, rd_id, i_idx;
  prec_t a_data, b_data, wr_data;
  logic wr_en = 0;
  logic [3:0] q_vox, rd_vox, ins_vox;
  logic [4:0] q_cnt;
  logic [3:0] rd_slot;
  logic ins_en = 0, ins_full, i_begin, j_valid, fin_req, busy, done;
  logic [4:0] j_idx;
  vec_t origin;
  int checks = 0, failures = 0;

  particle_mem #(.N(N)) u_mem (.clk, .a_addr, .a_data, .b_addr, .b_data, .wr_en, .wr_addr,
                               .wr_mask(pmask_t'('1)), .wr_data);
  voxel_grid #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) u_grid (
    .clk, .rst_n, .clear(1'b0), .ins_en, .ins_vox, .ins_id, .ins_full, .q_vox, .q_cnt,
    .rd_vox, .rd_slot, .rd_id);
  nbr_iter #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) dut (
    .clk, .rst_n, .start, .nbr_en(1'b1), .n_part(16'(N)), .origin, .a_addr, .a_data, .b_addr,
    .q_vox, .q_cnt, .rd_vox, .rd_slot, .rd_id, .i_begin, .j_valid, .j_idx, .fin_req,
    .fin_ack, .i_idx, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near1(int a, int b);
    return (a - b >= -1) && (a - b <= 1);
  endfunction

  int vx [N], vy [N], vz [N];
  bit alive [N];
  int got_cnt [N], got_sum [N], got_sq [N], visited [N];
  int cur, fin_wait_total, busy_cycles;

  // owner: collect candidates (sampled mid-cycle, when everything is
  // settled), acknowledge each finish request at once
  always @(negedge clk) begin
    if (busy) busy_cycles++;
    if (i_begin) begin
      cur = int'(i_idx);
      visited[cur]++;
      if (a_data.p !== u_mem.m_p[cur]) begin failures++; $display("a_data not particle %0d", cur); end
    end
    if (j_valid) begin
      int j;
      j = int'(j_idx);
      if (b_data.p !== u_mem.m_p[j]) begin failures++; $display("b_data not particle %0d", j); end
      got_cnt[cur]++; got_sum[cur] += j; got_sq[cur] += j * j;
    end
  end
  initial begin
    forever begin
      @(negedge clk);
      fin_ack = 0;
      if (fin_req) begin
        int d;
        d = 0;
        repeat (d) @(negedge clk);
        fin_wait_total += d;
        fin_ack = 1;
      end
    end
  end

  initial begin
    origin = '0;
    fin_wait_total = 0; busy_cycles = 0;
    foreach (got_cnt[i]) begin got_cnt[i] = 0; got_sum[i] = 0; got_sq[i] = 0; visited[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prec_t r;
      r = '0;
      r.p.x = fx_t'($urandom % (GX * 64));
      r.p.y = fx_t'($urandom % (GY * 64));
      r.p.z = fx_t'($urandom % (GZ * 64));
      r.alive = ($urandom % 5) != 0;
      alive[i] = r.alive;
      vx[i] = int'(r.p.x) / 64; vy[i] = int'(r.p.y) / 64; vz[i] = int'(r.p.z) / 64;
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(i); wr_data = r;
      ins_en = r.alive; ins_vox = 4'((vz[i] * GY + vy[i]) * GX + vx[i]); ins_id = 5'(i);
    end
    @(negedge clk); wr_en = 0; ins_en = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    begin
      int exp_cycles;
      exp_cycles = 0;
      for (int i = 0; i < N; i++) begin
        int ec, es, eq;
        ec = 0; es = 0; eq = 0;
        exp_cycles += 2;
        for (int j = 0; j < N; j++)
          if (alive[j] && near1(vx[j], vx[i]) && near1(vy[j], vy[i]) && near1(vz[j], vz[i])) begin
            ec++; es += j; eq += j * j;
          end
        if (alive[i]) begin
          exp_cycles += 27 + ec + 2 + 1;
          checks++;
          if (visited[i] != 1 || got_cnt[i] != ec || got_sum[i] != es || got_sq[i] != eq) begin
            failures++;
            $display("particle %0d: visited %0d, %0d candidates (want %0d)", i, visited[i], got_cnt[i], ec);
          end
        end else begin
          checks++;
          if (visited[i] != 0) begin failures++; $display("dropped particle %0d visited", i); end
        end
      end
      exp_cycles += fin_wait_total;
      checks++;
      if (busy_cycles != exp_cycles) begin
        failures++; $display("busy %0d cycles, want %0d", busy_cycles, exp_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
