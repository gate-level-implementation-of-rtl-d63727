// tb_plane_eval: evaluates random planes at random pixel positions and
// compares with A*x + B*y + C computed in real arithmetic.
module tb_plane_eval;
  import accel_pkg::*;
  plane_t pl;
  float_t x, y, p;
  int checks = 0, failures = 0;
  plane_eval dut (.pl(pl), .x(x), .y(y), .p(p));

  function automatic float_t rf();
    return tb_fp_pkg::r2f(real'(($urandom % 20001) - 10000) / 1000.0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, rc, rx, ry, ref_v, tol, got;
    for (int i = 0; i < 3000; i++) begin
      pl.a = rf(); pl.b = rf(); pl.c = rf();
      x = tb_fp_pkg::r2f(real'($urandom % 1024));
      y = tb_fp_pkg::r2f(real'($urandom % 1024));
      #1;
      ra = tb_fp_pkg::f2r(pl.a); rb = tb_fp_pkg::f2r(pl.b); rc = tb_fp_pkg::f2r(pl.c);
      rx = tb_fp_pkg::f2r(x);    ry = tb_fp_pkg::f2r(y);
      ref_v = ra * rx + rb * ry + rc;
      tol = ((ra * rx < 0 ? -ra * rx : ra * rx) + (rb * ry < 0 ? -rb * ry : rb * ry)
             + (rc < 0 ? -rc : rc)) * 1.0e-6 + 1.0e-30;
      got = tb_fp_pkg::f2r(p);
      checks++;
      if (got - ref_v > tol || ref_v - got > tol) begin
        failures++;
        if (failures < 10) $display("FAIL plane got %g expected %g", got, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
