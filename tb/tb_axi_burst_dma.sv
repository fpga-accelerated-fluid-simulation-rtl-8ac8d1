// tb_axi_burst_dma: loads N particles (positions then velocities) from a
// stalling AXI memory model into the particle store, checks every loaded
// field and the alive flag, marks some particles dropped, stores everything
// back to a second address and checks the written beats, the burst counts
// (ceil(2N/BURST) each way) and WLAST placement.
module tb_axi_burst_dma;
  import pbf_pkg::*;
  localparam int N = 40, BURST = 16;
  logic clk = 0, rst_n = 0, load_start = 0, store_start = 0;
  logic [5:0] a_addr, wr_addr, tb_addr, d_wr_addr;
  prec_t a_data, wr_data, tb_data, d_wr_data;
  logic wr_en, tb_we = 0, d_wr_en, busy, err, done;
  pmask_t d_wr_mask, tb_mask;
  logic [31:0] araddr, awaddr;
  logic [7:0] arlen, awlen, wstrb;
  logic [2:0] arsize, awsize;
  logic [1:0] arburst, awburst, rresp, bresp;
  logic arvalid, arready, rlast, rvalid, rready, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [63:0] rdata, wdata;
  int checks = 0, failures = 0;

  assign wr_en   = tb_we | d_wr_en;
  assign wr_addr = tb_we ? tb_addr : d_wr_addr;
  assign wr_data = tb_we ? tb_data : d_wr_data;
  particle_mem #(.N(64)) u_mem (.clk, .a_addr, .a_data, .b_addr(6'd0), .b_data(), .wr_en, .wr_addr,
                                .wr_mask(tb_we ? tb_mask : d_wr_mask), .wr_data);
  axi_burst_dma #(.N(64), .BURST(BURST)) dut (
    .clk, .rst_n, .load_start, .store_start, .n_part(16'(N)), .src_addr(32'h100),
    .dst_addr(32'h1000), .a_addr, .a_data, .wr_en(d_wr_en), .wr_addr(d_wr_addr),
    .wr_mask(d_wr_mask), .wr_data(d_wr_data),
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst), .m_arvalid(arvalid),
    .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid),
    .m_rready(rready), .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast),
    .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .busy, .err, .done);
  axi_mem_model #(.WORDS(1024)) u_dram (
    .clk, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready,
    .awaddr, .awlen, .awvalid, .awready, .wdata, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [53:0] pos [N], vel [N];
  initial begin
    tb_mask = '0; tb_mask.alive = 1;
    for (int i = 0; i < N; i++) begin
      pos[i] = {$urandom, $urandom} & 54'h3F_FFFF_FFFF_FFFF;
      vel[i] = {$urandom, $urandom} & 54'h3F_FFFF_FFFF_FFFF;
      u_dram.mem[32 + i]     = {10'd0, pos[i]};
      u_dram.mem[32 + N + i] = {10'd0, vel[i]};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_mem.m_x[i] !== pos[i] || u_mem.m_p[i] !== pos[i] || u_mem.m_v[i] !== vel[i] || u_mem.m_alive[i] !== 1'b1) begin
        failures++; $display("particle %0d not loaded", i);
      end
    end
    checks++;
    if (u_dram.rd_bursts != (2 * N + BURST - 1) / BURST) begin failures++; $display("%0d read bursts", u_dram.rd_bursts); end
    for (int i = 0; i < N; i += 3) begin
      @(negedge clk); tb_we = 1; tb_addr = 6'(i); tb_data = '0;
    end
    @(negedge clk); tb_we = 0;
    @(negedge clk); store_start = 1;
    @(negedge clk); store_start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_dram.mem[512 + i] !== {(i % 3) != 0, 9'd0, pos[i]} || u_dram.mem[512 + N + i] !== {10'd0, vel[i]}) begin
        failures++; $display("particle %0d not stored", i);
      end
    end
    checks++;
    if (u_dram.wr_bursts != (2 * N + BURST - 1) / BURST || u_dram.protocol_errors != 0 || err) begin
      failures++; $display("%0d write bursts, %0d wlast errors", u_dram.wr_bursts, u_dram.protocol_errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
