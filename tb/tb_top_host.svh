// tb_top_host.svh: host-side helpers for the end-to-end testbenches,
// included by tb_top_body.svh.  check() counts a check and reports a
// failure; axw() and axr() are a minimal AXI4-Lite master: one write or
// one read at a time, driven on the falling clock edge, each returning
// once the response (BVALID or RVALID) is seen.
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

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

