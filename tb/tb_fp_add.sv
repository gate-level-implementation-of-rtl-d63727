// tb_fp_add: checks the float adder against real arithmetic.
// Exact cases are compared bit for bit; random operands (same and opposite
// signs, many exponent gaps) must agree to within a few units in the last
// place of the larger operand, since the adder truncates.
module tb_fp_add;
  import accel_pkg::*;
  float_t a, b, y;
  logic   sub;
  int checks = 0, failures = 0;
  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic float_t rnd_float(int emin, int emax);
    return {1'($urandom), 8'(emin + ($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  task automatic exact(float_t x, float_t z, logic s, float_t exp_y);
    a = x; b = z; sub = s; #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL exact %h %s %h = %h, expected %h", x, s ? "-" : "+", z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, ry, ref_v, tol;
    exact(32'h3F80_0000, 32'h3F80_0000, 0, 32'h4000_0000);  // 1+1=2
    exact(32'h3FC0_0000, 32'h3F00_0000, 1, 32'h3F80_0000);  // 1.5-0.5=1
    exact(32'h4040_0000, 32'h4040_0000, 1, 32'h0000_0000);  // 3-3=0
    exact(32'h4120_0000, 32'hC0A0_0000, 0, 32'h40A0_0000);  // 10+(-5)=5
    exact(32'h0000_0000, 32'h4120_0000, 1, 32'hC120_0000);  // 0-10=-10
    exact(32'h3F80_0000, 32'h3380_0000, 0, 32'h3F80_0000);  // 1+2^-24 truncates
    for (int i = 0; i < 4000; i++) begin
      a = rnd_float(100, 150);
      b = (i % 4 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rnd_float(100, 150);
      sub = 1'($urandom);
      #1;
      ra = tb_fp_pkg::f2r(a); rb = tb_fp_pkg::f2r(b);
      ref_v = sub ? ra - rb : ra + rb;
      ry = tb_fp_pkg::f2r(y);
      tol = ((ra < 0 ? -ra : ra) + (rb < 0 ? -rb : rb)) * 3.0e-7;
      checks++;
      if ((ry - ref_v > tol) || (ref_v - ry > tol)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %s %h = %h (%g), expected %g", a, sub ? "-" : "+", b, y, ry, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
