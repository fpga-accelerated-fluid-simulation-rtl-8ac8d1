// tb_step1_predict: random particles (some dropped) through the force and
// prediction step; checks v + dt*g and x + dt*v against floating point to
// within the rounding of the 12.6 format, that dropped particles are left
// alone, and the 2-cycles-per-particle schedule.
module tb_step1_predict;
  import pbf_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] a_addr, wr_addr, tb_addr, s_wr_addr;
  prec_t a_data, wr_data, tb_data, s_wr_data;
  logic wr_en, tb_we = 0, s_wr_en, busy, done;
  pmask_t s_wr_mask;
  acc_t dt;
  avec_t grav;
  prec_t init [N];
  int checks = 0, failures = 0;

  assign wr_en   = tb_we | s_wr_en;
  assign wr_addr = tb_we ? tb_addr : s_wr_addr;
  assign wr_data = tb_we ? tb_data : s_wr_data;
  particle_mem #(.N(N)) u_mem (.clk, .a_addr, .a_data, .b_addr(4'd0), .b_data(), .wr_en, .wr_addr,
                               .wr_mask(tb_we ? pmask_t'('1) : s_wr_mask), .wr_data);
  step1_predict #(.N(N)) dut (.clk, .rst_n, .start, .n_part(16'(N)), .dt, .grav, .a_addr, .a_data,
                              .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_mask(s_wr_mask),
                              .wr_data(s_wr_data), .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r6(fx_t v);  return real'(v) / 64.0; endfunction
  task automatic near(input real got, input real want, input string what);
    checks++;
    if (got - want > 1.6 / 64.0 || want - got > 1.6 / 64.0) begin
      failures++; $display("%s: got %f want %f", what, got, want);
    end
  endtask

  initial begin
    int cyc;
    dt = acc_t'(1092);              // 1/60 s
    grav.x = acc_t'(65536); grav.y = '0; grav.z = -acc_t'(642253);   // (1, 0, -9.8)
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prec_t r;
      r = '0;
      r.alive = (i % 5) != 3;
      r.x.x = fx_t'($signed($urandom % 2000) - 1000);
      r.x.y = fx_t'($signed($urandom % 2000) - 1000);
      r.x.z = fx_t'($signed($urandom % 2000) - 1000);
      r.v.x = fx_t'($signed($urandom % 800) - 400);
      r.v.y = fx_t'($signed($urandom % 800) - 400);
      r.v.z = fx_t'($signed($urandom % 800) - 400);
      r.p   = r.x;
      init[i] = r;
      @(negedge clk); tb_we = 1; tb_addr = 4'(i); tb_data = r;
    end
    @(negedge clk); tb_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * N + 1) begin failures++; $display("took %0d cycles, want %0d", cyc, 2 * N + 1); end
    for (int i = 0; i < N; i++) begin
      prec_t r;
      real d, vx, vy, vz;
      r = u_mem.m_alive[i] ? init[i] : init[i];
      d = real'(dt) / 65536.0;
      if (init[i].alive) begin
        vx = r6(init[i].v.x) + d * 1.0;
        vy = r6(init[i].v.y);
        vz = r6(init[i].v.z) - d * 9.8;
        near(r6(u_mem.m_v[i].x), vx, "vx");
        near(r6(u_mem.m_v[i].y), vy, "vy");
        near(r6(u_mem.m_v[i].z), vz, "vz");
        near(r6(u_mem.m_p[i].x), r6(init[i].x.x) + d * vx, "px");
        near(r6(u_mem.m_p[i].y), r6(init[i].x.y) + d * vy, "py");
        near(r6(u_mem.m_p[i].z), r6(init[i].x.z) + d * vz, "pz");
      end else begin
        checks++;
        if (u_mem.m_v[i] !== init[i].v || u_mem.m_p[i] !== init[i].p) begin
          failures++; $display("dropped particle %0d changed", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
