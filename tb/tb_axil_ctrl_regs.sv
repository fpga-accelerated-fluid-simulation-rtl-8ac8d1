// tb_axil_ctrl_regs: writes every constant register over AXI4-Lite and
// checks the read-back and the decoded constants, the start pulse (one
// cycle, only when not already running), the done flag set by the kernel
// and cleared by reading CTRL, the idle bit and the statistics registers.
module tb_axil_ctrl_regs;
  import pbf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = 0, rdata, src_addr, dst_addr;
  logic [1:0] bresp, rresp;
  consts_t cst;
  logic load_en, start_pulse, kernel_done = 0, kernel_idle = 1;
  int checks = 0, failures = 0, pulses = 0;

  axil_ctrl_regs dut (
    .clk, .rst_n, .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(4'hF), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid),
    .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .cst, .src_addr, .dst_addr, .load_en, .start_pulse, .kernel_done, .kernel_idle,
    .stat_dropped(16'd7), .stat_collisions(16'd9));
  always #5 clk = ~clk;
  always @(negedge clk) if (start_pulse) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axw(input int a, input logic [31:0] d);
    @(negedge clk); awaddr = 8'(a); wdata = d; awvalid = 1; wvalid = 1;
    @(posedge clk); while (!(awready && wready)) @(posedge clk);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask
  task automatic axr(input int a, output logic [31:0] d);
    @(negedge clk); araddr = 8'(a); arvalid = 1;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask
  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  logic [31:0] vals [64];
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 1; r < 64; r++) begin
      vals[r] = $urandom;
      if (r != 23 && r != 24) axw(4 * r, vals[r]);
    end
    for (int r = 1; r < 64; r++) begin
      axr(4 * r, d);
      if (r == 23)      expect_eq(d, 32'd7, "DROPPED");
      else if (r == 24) expect_eq(d, 32'd9, "COLLISIONS");
      else              expect_eq(d, vals[r], $sformatf("reg %0d", r));
    end
    expect_eq(32'(cst.n_part), vals[1] & 32'hFFFF, "n_part");
    expect_eq(32'(cst.iters), vals[2] & 32'hFF, "iters");
    expect_eq(src_addr, vals[3], "src"); expect_eq(dst_addr, vals[4], "dst");
    expect_eq(cst.dt, vals[5], "dt"); expect_eq(cst.grav.z, vals[9], "grav z");
    expect_eq(32'(unsigned'(cst.h)), vals[10] & 32'h3FFFF, "h");
    expect_eq(cst.eps_vort, vals[18], "eps_vort");
    expect_eq(32'(unsigned'(cst.origin.y)), vals[20] & 32'h3FFFF, "origin y");
    expect_eq(32'(cst.n_spheres), vals[22] & 7, "n_spheres");
    expect_eq(32'(unsigned'(cst.sph[2].c.z)), vals[42] & 32'h3FFFF, "sphere 2 z");
    expect_eq(32'(unsigned'(cst.sph[3].r)), vals[47] & 32'h3FFFF, "sphere 3 r");
    // start / done / idle
    axr(0, d); expect_eq(d & 7, 32'b100, "CTRL at rest");
    axw(0, 32'h11);
    kernel_idle = 0;
    @(negedge clk);
    expect_eq(32'(pulses), 1, "one start pulse");
    expect_eq(32'(load_en), 1, "load_en");
    axw(0, 32'h11);
    expect_eq(32'(pulses), 1, "no second start while running");
    axr(0, d); expect_eq(d & 7, 32'b001, "CTRL running");
    @(negedge clk); kernel_done = 1; kernel_idle = 1;
    @(negedge clk); kernel_done = 0;
    axr(0, d); expect_eq(d & 7, 32'b110, "CTRL done");
    axr(0, d); expect_eq(d & 7, 32'b100, "done cleared on read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
