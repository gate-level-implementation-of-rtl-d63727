// tb_lod_calc: random perspective planes and pixel positions; the level of
// detail must be within 0.15 (in log2 units) of log2 of the largest exact
// texel-space derivative, computed in reals.
module tb_lod_calc;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  float_t z, u, v;
  plane_t pq, pu, pv;
  logic [3:0] log2w, log2h;
  logic signed [15:0] lod;
  int checks = 0, failures = 0;
  lod_calc dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rnd(real lo, real hi); return lo + (hi - lo) * ($urandom % 100000) / 100000.0; endfunction
  function automatic real absr(real a); return a < 0 ? -a : a; endfunction

  initial begin
    int n = 0;
    while (n < 5000) begin
      real qa, qb, qc, ua, ub, uc, va, vb, vc, x, y, q, zr, ur, vr, d [4], m, e;
      qa = rnd(-1e-4, 1e-4); qb = rnd(-1e-4, 1e-4); qc = rnd(0.02, 1.0);
      ua = rnd(-0.02, 0.02); ub = rnd(-0.02, 0.02); uc = rnd(-1.0, 1.0);
      va = rnd(-0.02, 0.02); vb = rnd(-0.02, 0.02); vc = rnd(-1.0, 1.0);
      x = $urandom % 1024; y = $urandom % 1024;
      q = qa * x + qb * y + qc;
      if (q < 0.01) continue;
      zr = 1.0 / q;
      ur = (ua * x + ub * y + uc) * zr; vr = (va * x + vb * y + vc) * zr;
      log2w = 4'($urandom % 11); log2h = 4'($urandom % 11);
      d[0] = zr * (ua - ur * qa) * (1 << log2w);
      d[1] = zr * (va - vr * qa) * (1 << log2h);
      d[2] = zr * (ub - ur * qb) * (1 << log2w);
      d[3] = zr * (vb - vr * qb) * (1 << log2h);
      m = 0;
      for (int i = 0; i < 4; i++) if (absr(d[i]) > m) m = absr(d[i]);
      if (m < 1e-3 || m > 1e3) continue;
      e = $ln(m) / $ln(2.0);
      z = r2f(zr); u = r2f(ur); v = r2f(vr);
      pq = '{a: r2f(qa), b: r2f(qb), c: r2f(qc)};
      pu = '{a: r2f(ua), b: r2f(ub), c: r2f(uc)};
      pv = '{a: r2f(va), b: r2f(vb), c: r2f(vc)};
      #1;
      n++; checks++;
      if (absr(lod / 256.0 - e) > 0.15) begin
        failures++; if (failures < 10) $display("FAIL lod %f exp %f", lod / 256.0, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
