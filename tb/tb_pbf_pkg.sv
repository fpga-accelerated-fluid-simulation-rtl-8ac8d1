// tb_pbf_pkg: checks the fixed-point helpers of pbf_pkg against real-valued
// arithmetic: rounding right shift (round half up, also for negative
// values), saturation to 12.6 and to Q16, the Q16 product, and the
// conversions between 12.6 and Q16, on edge cases and random operands.
module tb_pbf_pkg;
  import pbf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  // reference: round half up of a / 2^n
  function automatic longint ref_rshr(longint a, int n);
    return longint'($floor(real'(a) / (2.0 ** n) + 0.5));
  endfunction

  initial begin
    // fixed cases
    expect_eq(rshr(64'sd3, 1), 2, "rshr 1.5");
    expect_eq(rshr(-64'sd3, 1), -1, "rshr -1.5");
    expect_eq(rshr(-64'sd5, 2), -1, "rshr -1.25");
    expect_eq(rshr(64'sd7, 0), 7, "rshr by 0");
    expect_eq(longint'(sat_fx(64'sd200000)), 131071, "sat_fx high");
    expect_eq(longint'(sat_fx(-64'sd200000)), -131072, "sat_fx low");
    expect_eq(longint'(sat_fx(-64'sd5)), -5, "sat_fx pass");
    expect_eq(longint'(sat_acc(64'sh1_0000_0000)), 64'sh7FFF_FFFF, "sat_acc high");
    expect_eq(longint'(sat_acc(-64'sh1_0000_0000)), -64'sh8000_0000, "sat_acc low");
    expect_eq(qmul(64'sd65536, 64'sd65536), 65536, "1 * 1");
    expect_eq(qmul(-64'sd98304, 64'sd32768), -49152, "-1.5 * 0.5");
    expect_eq(fx2q(fx_t'(-64)), -65536, "fx2q -1.0");
    expect_eq(longint'(q2fx(64'sd65536)), 64, "q2fx 1.0");
    expect_eq(longint'(q2fx(64'sd512)), 1, "q2fx half LSB rounds up");
    expect_eq(longint'(q2fx(64'sd511)), 0, "q2fx below half LSB");
    expect_eq(longint'(q2fx(64'sh7FFF_0000_0000)), 131071, "q2fx saturates");
    // random
    for (int k = 0; k < 500; k++) begin
      longint a, b;
      int n;
      fx_t f;
      a = longint'($signed($urandom)) * longint'($urandom % 1024) - 64'sd12345;
      b = longint'($signed($urandom)) >>> ($urandom % 16);
      n = $urandom % 20;
      expect_eq(rshr(a, n), ref_rshr(a, n), "rshr random");
      a = longint'($signed($urandom)) >>> 8;
      expect_eq(qmul(a, b), ref_rshr(a * b, 16), "qmul random");
      f = fx_t'($urandom);
      expect_eq(longint'(q2fx(fx2q(f))), f, "12.6 round trip");
      expect_eq(longint'(sat_fx(a)), (a > 131071) ? 131071 : (a < -131072) ? -131072 : a, "sat_fx random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
