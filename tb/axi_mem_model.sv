// axi_mem_model: behavioural DRAM with a 64-bit AXI4 slave port, for
// testbenches only.  It serves one read burst and one write burst at a time
// (INCR bursts of 8-byte beats), inserts random wait states on every channel
// when STALL is set, and counts the bursts it served.  mem is indexed by
// byte address / 8 and may be read and written by the testbench directly.
module axi_mem_model #(
  parameter int WORDS = 4096,
  parameter bit STALL = 1
) (
  input  logic        clk,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [63:0] mem [WORDS];
  int rd_bursts = 0, wr_bursts = 0, protocol_errors = 0;

  initial begin
    arready = 0; rvalid = 0; rlast = 0; rdata = 0; rresp = 0;
    awready = 0; wready = 0; bvalid = 0; bresp = 0;
  end

  function automatic bit go();
    return !STALL || ($urandom % 3 != 0);
  endfunction

  // read side
  initial begin
    forever begin
      int a, n;
      @(negedge clk);
      arready = 0;
      if (arvalid && go()) begin
        arready = 1;
        a = int'(araddr) / 8; n = int'(arlen) + 1;
        @(negedge clk);
        arready = 0;
        rd_bursts++;
        for (int k = 0; k < n; k++) begin
          while (!go()) @(negedge clk);
          rvalid = 1; rdata = mem[(a + k) % WORDS]; rlast = (k == n - 1);
          @(posedge clk);
          while (!rready) @(posedge clk);
          @(negedge clk);
          rvalid = 0; rlast = 0;
        end
      end
    end
  end

  // write side
  initial begin
    forever begin
      int a, n;
      @(negedge clk);
      awready = 0;
      if (awvalid && go()) begin
        awready = 1;
        a = int'(awaddr) / 8; n = int'(awlen) + 1;
        @(negedge clk);
        awready = 0;
        wr_bursts++;
        for (int k = 0; k < n; k++) begin
          while (!go()) @(negedge clk);
          wready = 1;
          @(posedge clk);
          while (!wvalid) @(posedge clk);
          mem[(a + k) % WORDS] = wdata;
          if (wlast != (k == n - 1)) protocol_errors++;
          @(negedge clk);
          wready = 0;
        end
        while (!go()) @(negedge clk);
        bvalid = 1;
        @(posedge clk);
        while (!bready) @(posedge clk);
        @(negedge clk);
        bvalid = 0;
      end
    end
  end
endmodule
