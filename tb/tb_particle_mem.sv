// tb_particle_mem: writes particle records field by field through the write
// mask and checks that both read ports return them one cycle later, that
// unmasked fields are kept, and that a read of the address being written
// returns the old value.
module tb_particle_mem;
  import pbf_pkg::*;
  localparam int N = 64;
  logic clk = 0;
  logic [5:0] a_addr, b_addr, wr_addr;
  prec_t a_data, b_data, wr_data;
  logic wr_en;
  pmask_t wr_mask;
  prec_t model [N];
  int checks = 0, failures = 0;

  particle_mem #(.N(N)) dut (.clk, .a_addr, .a_data, .b_addr, .b_data, .wr_en, .wr_addr, .wr_mask, .wr_data);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic prec_t rnd_rec();
    logic [511:0] r;
    for (int k = 0; k < 16; k++) r[k*32 +: 32] = $urandom;
    return prec_t'(r[$bits(prec_t)-1:0]);
  endfunction

  task automatic wr(input int a, input pmask_t m, input prec_t d);
    @(negedge clk);
    wr_en = 1; wr_addr = 6'(a); wr_mask = m; wr_data = d;
    @(negedge clk);
    wr_en = 0;
    if (m.alive) model[a].alive = d.alive;
    if (m.x)     model[a].x     = d.x;
    if (m.p)     model[a].p     = d.p;
    if (m.v)     model[a].v     = d.v;
    if (m.vt)    model[a].vt    = d.vt;
    if (m.lam)   model[a].lam   = d.lam;
    if (m.dp)    model[a].dp    = d.dp;
    if (m.w)     model[a].w     = d.w;
    if (m.wmag)  model[a].wmag  = d.wmag;
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_mask = '0; wr_data = '0; a_addr = 0; b_addr = 0;
    for (int a = 0; a < N; a++) begin
      prec_t d;
      d = rnd_rec();
      wr(a, pmask_t'('1), d);
    end
    for (int k = 0; k < 400; k++) wr($urandom % N, pmask_t'($urandom), rnd_rec());
    for (int k = 0; k < 300; k++) begin
      int ia, ib;
      ia = $urandom % N; ib = $urandom % N;
      @(negedge clk); a_addr = 6'(ia); b_addr = 6'(ib);
      @(negedge clk);
      checks++;
      if (a_data !== model[ia]) begin failures++; $display("port A addr %0d wrong", ia); end
      checks++;
      if (b_data !== model[ib]) begin failures++; $display("port B addr %0d wrong", ib); end
    end
    // read-first on a colliding write
    @(negedge clk);
    a_addr = 6'd5; wr_en = 1; wr_addr = 6'd5; wr_mask = pmask_t'('1); wr_data = rnd_rec();
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (a_data !== model[5]) begin failures++; $display("read-first violated"); end
    model[5] = wr_data;
    @(negedge clk);
    checks++;
    if (a_data !== model[5]) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
