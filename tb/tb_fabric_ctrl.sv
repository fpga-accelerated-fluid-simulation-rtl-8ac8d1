// tb_fabric_ctrl: drives the controller with stand-in units that answer
// each start with done after a random delay, and checks the order of the
// phases (with and without the DRAM load), that the solver runs exactly
// iters times (also for iters = 0), that each unit only starts in its own
// phase, and the single done pulse at the end.
module tb_fabric_ctrl;
  import pbf_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, load_en = 0;
  logic [7:0] iters = 0, solve_runs;
  phase_t phase;
  logic load_start, s1_start, s5_start, s23_start, s4_start, store_start, idle, done;
  logic load_done = 0, s1_done = 0, s5_done = 0, s23_done = 0, s4_done = 0, store_done = 0;
  int checks = 0, failures = 0;
  string trace;

  fabric_ctrl dut (.clk, .rst_n, .start, .load_en, .iters, .phase, .load_start, .load_done,
    .s1_start, .s1_done, .s5_start, .s5_done, .s23_start, .s23_done, .s4_start, .s4_done,
    .store_start, .store_done, .solve_runs, .idle, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in units
  task automatic unit(ref logic st, ref logic dn, input string tag, input phase_t ph);
    forever begin
      @(negedge clk);
      dn = 0;
      if (st) begin
        trace = {trace, tag};
        if (phase != ph) begin failures++; $display("%s started in phase %s", tag, phase.name()); end
        repeat ($urandom % 5) @(negedge clk);
        dn = 1;
      end
    end
  endtask
  initial unit(load_start, load_done, "L", PH_LOAD);
  initial unit(s1_start, s1_done, "1", PH_STEP1);
  initial unit(s5_start, s5_done, "5", PH_STEP5);
  initial unit(s23_start, s23_done, "S", PH_SOLVE);
  initial unit(s4_start, s4_done, "4", PH_STEP4);
  initial unit(store_start, store_done, "W", PH_STORE);

  task automatic run(input bit ld, input int it, input string want);
    int dones;
    trace = ""; load_en = ld; iters = 8'(it); dones = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (10) begin @(negedge clk); if (done) dones++; end
    checks++;
    if (trace != want) begin failures++; $display("order %s, want %s", trace, want); end
    checks++;
    if (int'(solve_runs) != it || !idle || dones != 0) begin failures++; $display("solve_runs %0d idle %0d", solve_runs, idle); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 3, "L15SSS4W");
    run(0, 1, "15S4W");
    run(0, 0, "154W");
    run(1, 5, "L15SSSSS4W");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
