// tb_voxel_grid: fills voxels with ids, checks counts, list contents (read
// one cycle after the address), the full flag at capacity with the extra
// insert ignored, and the one-cycle clear.
module tb_voxel_grid;
  import pbf_pkg::*;
  localparam int N = 64, GX = 2, GY = 2, GZ = 4, CAP = 4, NV = 16;
  logic clk = 0, rst_n = 0, clear = 0, ins_en = 0, ins_full;
  logic [3:0] ins_vox = 0, q_vox = 0, rd_vox = 0;
  logic [5:0] ins_id = 0, rd_id;
  logic [2:0] q_cnt;
  logic [1:0] rd_slot = 0;
  int cnt_m [NV];
  int ids_m [NV][CAP];
  int checks = 0, failures = 0;

  voxel_grid #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .CAP(CAP)) dut (
    .clk, .rst_n, .clear, .ins_en, .ins_vox, .ins_id, .ins_full, .q_vox, .q_cnt, .rd_vox, .rd_slot, .rd_id);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify();
    for (int v = 0; v < NV; v++) begin
      @(negedge clk); q_vox = 4'(v);
      #1 checks++;
      if (int'(q_cnt) != cnt_m[v]) begin failures++; $display("vox %0d count %0d want %0d", v, q_cnt, cnt_m[v]); end
      for (int s = 0; s < cnt_m[v]; s++) begin
        @(negedge clk); rd_vox = 4'(v); rd_slot = 2'(s);
        @(negedge clk);
        checks++;
        if (int'(rd_id) != ids_m[v][s]) begin failures++; $display("vox %0d slot %0d id %0d want %0d", v, s, rd_id, ids_m[v][s]); end
      end
    end
  endtask

  int fulls;
  initial begin
    fulls = 0;
    foreach (cnt_m[v]) cnt_m[v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      int v, id;
      v = $urandom % 8; id = $urandom % N;
      @(negedge clk); ins_en = 1; ins_vox = 4'(v); ins_id = 6'(id);
      #1 checks++;
      if (ins_full !== (cnt_m[v] == CAP)) begin failures++; $display("full flag wrong"); end
      if (cnt_m[v] < CAP) begin ids_m[v][cnt_m[v]] = id; cnt_m[v]++; end
      else fulls++;
    end
    @(negedge clk); ins_en = 0;
    checks++;
    if (fulls == 0) begin failures++; $display("no voxel reached capacity"); end
    verify();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (cnt_m[v]) cnt_m[v] = 0;
    for (int k = 0; k < 10; k++) begin
      int v, id;
      v = 8 + $urandom % 8; id = $urandom % N;
      @(negedge clk); ins_en = 1; ins_vox = 4'(v); ins_id = 6'(id);
      if (cnt_m[v] < CAP) begin ids_m[v][cnt_m[v]] = id; cnt_m[v]++; end
    end
    @(negedge clk); ins_en = 0;
    verify();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
