// tb_seq_sqrt: checks seq_sqrt on squares, neighbours of squares and random
// radicands (floor(sqrt) verified by r*r <= x < (r+1)*(r+1)), and its
// latency (W/2+1 clock edges after the edge that samples start).
module tb_seq_sqrt;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] x;
  logic [W/2-1:0] r;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_sqrt #(.W(W)) dut (.clk, .rst_n, .start, .radicand(x), .busy, .done, .root(r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] v);
    int cyc;
    logic [W+1:0] lo, hi;
    x = v;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    lo = (W+2)'(r) * (W+2)'(r);
    hi = ((W+2)'(r) + 1) * ((W+2)'(r) + 1);
    checks++;
    if (!(lo <= (W+2)'(v) && (W+2)'(v) < hi)) begin
      failures++; $display("sqrt(%0d) = %0d wrong", v, r);
    end
    checks++;
    if (cyc != W / 2 + 2) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(15); run(16); run(17);
    run(64'hFFFF_FFFF_FFFF_FFFF); run(64'd1 << 62); run((64'd1 << 32) - 1);
    for (int k = 0; k < 100; k++) begin
      logic [31:0] s;
      s = $urandom;
      run(64'(s) * 64'(s)); run(64'(s) * 64'(s) - 1); run(64'(s) * 64'(s) + 1);
    end
    for (int k = 0; k < 200; k++) run({$urandom, $urandom} >> ($urandom % 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
