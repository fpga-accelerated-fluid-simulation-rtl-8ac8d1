// tb_seq_div: checks seq_div against the language's own signed division on
// corner cases and random operands, the divide-by-zero result and the
// latency (done is seen W+2 negedges after start is driven, i.e. W+1
// clock edges after the edge that samples start).
module tb_seq_div;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] a, b, q;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_div #(.W(W)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b), .busy, .done, .quotient(q));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    logic signed [W-1:0] exp;
    int cyc;
    a = x; b = y;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (y == 0) exp = x < 0 ? -(64'sh7FFF_FFFF_FFFF_FFFF) : 64'sh7FFF_FFFF_FFFF_FFFF;
    else        exp = x / y;
    checks++;
    if (q !== exp) begin failures++; $display("div %0d / %0d = %0d, want %0d", x, y, q, exp); end
    checks++;
    if (cyc != W + 2) begin failures++; $display("latency %0d, want %0d", cyc, W + 2); end
  endtask

  initial begin
    a = 0; b = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(100, 7); run(-100, 7); run(100, -7); run(-100, -7); run(0, 5); run(5, 0); run(-5, 0);
    run(64'sd1 <<< 40, 3); run(1, 64'sd1 <<< 40);
    for (int k = 0; k < 300; k++) begin
      logic signed [W-1:0] x, y;
      x = $signed({$urandom, $urandom}) >>> ($urandom % 30);
      y = $signed({$urandom, $urandom}) >>> (20 + $urandom % 43);
      if (y == 0) y = 3;
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
