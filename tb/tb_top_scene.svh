// tb_top_scene.svh: scene and constants of the end-to-end testbenches,
// included by tb_top_body.svh.  build_scene() places the particles (see
// tb_top_body.svh for the list) in 12.6 format in the DRAM model and marks
// every other DRAM word with a pattern; set_constants() writes the
// simulation constants over AXI4-Lite: dt = 1/60 s, gravity -9.8 in z,
// h = 1, the poly6 coefficient 315/(64 pi h^9), rest density 8.078 (the
// density of a 0.5-spaced lattice), relaxation 10, artificial pressure
// k = 0.1 at dq = 0.2h, XSPH c = 0.01, vorticity strength 0.05 and one
// sphere collider.
  function automatic logic [17:0] f6(real v); return 18'($rtoi($floor(v * 64.0 + 0.5))); endfunction
  function automatic int q16(real v); return $rtoi($floor(v * 65536.0 + 0.5)); endfunction
  function automatic int rnd(real v); return $rtoi($floor(v + 0.5)); endfunction

  real px [NP], py [NP], pz [NP], vx [NP], vy [NP], vz [NP];
  localparam real DT = 1092.0 / 65536.0, G = -9.8;

  task automatic build_scene();
    int i = 0;
    for (int a = 0; a < NB_X; a++) for (int b = 0; b < NB_Y; b++) for (int c = 0; c < NB_Z; c++) begin
      px[i] = 0.25 + 0.5 * a; py[i] = 0.25 + 0.5 * b; pz[i] = 0.25 + 0.5 * c;
      vx[i] = -(py[i] - 0.25 * NB_Y); vy[i] = px[i] - 0.25 * NB_X; vz[i] = 0.0;
      i++;
    end
    for (int k = 0; k < NC; k++) begin   // cluster in the top corner voxel, 0.2 apart
      px[i] = GX - 0.9 + 0.2 * (k % 4); py[i] = GY - 0.9 + 0.2 * ((k / 4) % 4); pz[i] = GZ - 0.9 + 0.2 * (k / 16);
      vx[i] = 0; vy[i] = 0; vz[i] = 0; i++;
    end
    px[i] = 0.5; py[i] = GY - 0.5; pz[i] = GZ - 0.5; vx[i] = 0.0; vy[i] = 0.0; vz[i] = -2.0; i++;
    px[i] = -2.0; py[i] = 1.0; pz[i] = 1.0; vx[i] = 0; vy[i] = 0; vz[i] = 0; i++;
    px[i] = 1.0; py[i] = 1.0; pz[i] = GZ + 3.0; vx[i] = 0; vy[i] = 0; vz[i] = 0; i++;
    for (int k = 0; k < NL; k++) begin   // filler line at mid height along y = 0.25
      px[i] = 0.25 + (GX - 0.5) * k / (NL > 1 ? NL - 1 : 1); py[i] = 0.25; pz[i] = NB_Z * 0.5 + 0.75;
      vx[i] = 0.0; vy[i] = 0.5; vz[i] = 0.0; i++;
    end
    for (int w = 0; w < WORDS; w++) dram.mem[w] = 64'hDEAD_BEEF_0000_0000 | 64'(w);
    for (int k = 0; k < NP; k++) begin
      dram.mem[SRC / 8 + k]      = {1'b1, 9'd0, f6(pz[k]), f6(py[k]), f6(px[k])};
      dram.mem[SRC / 8 + NP + k] = {10'd0, f6(vz[k]), f6(vy[k]), f6(vx[k])};
    end
  endtask

  task automatic set_constants();
    real cw, s;
    cw = 315.0 / (64.0 * 3.14159265);
    axw('h04, NP); axw('h08, ITERS); axw('h0C, SRC); axw('h10, DST);
    axw('h14, 1092); axw('h18, 60 * 65536);
    axw('h1C, 0); axw('h20, 0); axw('h24, q16(G));
    axw('h28, 64); axw('h2C, q16(cw)); axw('h30, -6 * q16(cw));
    axw('h34, q16(1.0 / 8.078)); axw('h38, q16(10.0)); axw('h3C, q16(0.1));
    axw('h40, q16(1.0 / (cw * 0.96 * 0.96 * 0.96))); axw('h44, q16(0.01)); axw('h48, q16(0.05));
    axw('h4C, 0); axw('h50, 0); axw('h54, 0); axw('h58, 1);
    // sphere collider (radius incl. particle radius) in the fluid block
    axw('h80, f6(0.25 * NB_X)); axw('h84, f6(0.25 * NB_Y)); axw('h88, f6(0.25 * NB_Z));
    axw('h8C, f6(0.55));
  endtask

