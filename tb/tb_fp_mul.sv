// tb_fp_mul: checks the float multiplier against real arithmetic: exact
// products bit for bit, random products to a relative error of 2^-22.
module tb_fp_mul;
  import accel_pkg::*;
  float_t a, b, y;
  int checks = 0, failures = 0;
  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic exact(float_t x, float_t z, float_t exp_y);
    a = x; b = z; #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL exact %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, ry, err;
    exact(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);  // 2*3=6
    exact(32'hBFC0_0000, 32'h4000_0000, 32'hC040_0000);  // -1.5*2=-3
    exact(32'h0000_0000, 32'h4040_0000, 32'h0000_0000);  // 0*3=0
    exact(32'h3FC0_0000, 32'h3FC0_0000, 32'h4010_0000);  // 1.5*1.5=2.25
    for (int i = 0; i < 4000; i++) begin
      a = {1'($urandom), 8'(100 + $urandom % 56), 23'($urandom)};
      b = {1'($urandom), 8'(100 + $urandom % 56), 23'($urandom)};
      #1;
      ref_v = real'(tb_fp_pkg::f2r(a)) * real'(tb_fp_pkg::f2r(b));
      ry = tb_fp_pkg::f2r(y);
      err = (ry - ref_v) / ref_v;
      checks++;
      if (err > 2.5e-7 || err < -2.5e-7) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h = %h, expected %g", a, b, y, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
