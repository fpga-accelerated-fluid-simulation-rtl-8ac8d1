// tb_sph_pair: compares the fixed-point kernel value and gradient with the
// same formulas evaluated in floating point, for random pairs n_in and
// outside the kernel radius.
module tb_sph_pair;
  import pbf_pkg::*;
  vec_t pi, pj;
  fx_t h;
  acc_t c_w, c_g;
  logic in_range;
  acc_t w;
  avec_t gw;
  int checks = 0, failures = 0, n_in = 0;

  sph_pair dut (.pi, .pj, .h, .c_w, .c_g, .in_range, .w, .gw);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real tofx(fx_t v);  return real'(v) / 64.0;    endfunction
  function automatic real toq(acc_t v);  return real'(v) / 65536.0; endfunction

  task automatic near(input real got, input real want, input string what);
    checks++;
    if ((got - want) > 0.002 + 0.002 * (want < 0 ? -want : want) ||
        (want - got) > 0.002 + 0.002 * (want < 0 ? -want : want)) begin
      failures++;
      $display("%s: got %f want %f", what, got, want);
    end
  endtask

  initial begin
    h   = fx_t'(64);                 // 1.0
    c_w = acc_t'(102943);            // 315/(64 pi) ~ 1.5708
    c_g = -acc_t'(6 * 102943);
    for (int k = 0; k < 500; k++) begin
      real dx, dy, dz, r2, s, ww, hh;
      pi.x = fx_t'($signed($urandom % 400) + 100);
      pi.y = fx_t'($signed($urandom % 400) + 100);
      pi.z = fx_t'($signed($urandom % 400) + 100);
      pj.x = pi.x + fx_t'($signed($urandom % 100) - 50);
      pj.y = pi.y + fx_t'($signed($urandom % 100) - 50);
      pj.z = pi.z + fx_t'($signed($urandom % 100) - 50);
      #1;
      dx = tofx(pi.x) - tofx(pj.x);
      dy = tofx(pi.y) - tofx(pj.y);
      dz = tofx(pi.z) - tofx(pj.z);
      r2 = dx * dx + dy * dy + dz * dz;
      hh = tofx(h) * tofx(h);
      checks++;
      if (in_range !== (r2 < hh)) begin failures++; $display("in_range wrong r2=%f", r2); end
      s  = (r2 < hh) ? hh - r2 : 0.0;
      if (r2 < hh) n_in++;
      ww = toq(c_w) * s * s * s;
      near(toq(w), ww, "W");
      near(toq(gw.x), toq(c_g) * s * s * dx, "gx");
      near(toq(gw.y), toq(c_g) * s * s * dy, "gy");
      near(toq(gw.z), toq(c_g) * s * s * dz, "gz");
    end
    checks++;
    if (n_in < 50) begin failures++; $display("too few pairs n_in the kernel: %0d", n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
