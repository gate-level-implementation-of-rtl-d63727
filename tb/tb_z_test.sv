// tb_z_test: random positive depths against random stored depths, with the
// test on and off; the reference compares the depths as reals.
module tb_z_test;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  float_t z;
  logic [23:0] zbuf, z24;
  logic ztest_en, pass;
  int checks = 0, failures = 0;
  z_test dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      real zr, br;
      logic exp_pass;
      zr = (1.0 + ($urandom % 100000)) / 997.0;
      z = r2f(zr);
      if (k % 3 == 0) zbuf = z[30:7] + 24'($urandom % 3) - 24'd1;
      else zbuf = 24'(r2f((1.0 + ($urandom % 100000)) / 997.0) >> 7);
      ztest_en = (k % 7) != 0;
      #1;
      br = f2r({1'b0, zbuf, 7'd0});
      exp_pass = !ztest_en || (f2r({1'b0, z[30:7], 7'd0}) < br);
      checks++;
      if (pass !== exp_pass || z24 !== z[30:7]) begin
        failures++; if (failures < 10) $display("FAIL z=%f zbuf=%h pass=%b", zr, zbuf, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
