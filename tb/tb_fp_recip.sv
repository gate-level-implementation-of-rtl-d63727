// tb_fp_recip: checks the table-plus-Newton reciprocal: powers of two must
// be exact, random inputs within a relative error of 2^-21.
module tb_fp_recip;
  import accel_pkg::*;
  float_t a, y;
  int checks = 0, failures = 0;
  fp_recip dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, ry, err;
    a = 32'h4000_0000; #1; checks++;                    // 1/2 = 0.5
    if (y !== 32'h3F00_0000) begin failures++; $display("FAIL 1/2 = %h", y); end
    a = 32'hBE80_0000; #1; checks++;                    // 1/-0.25 = -4
    if (y !== 32'hC080_0000) begin failures++; $display("FAIL 1/-0.25 = %h", y); end
    for (int i = 0; i < 4000; i++) begin
      a = {1'($urandom), 8'(60 + $urandom % 130), 23'($urandom)};
      if (i < 64) a[22:17] = 6'(i);   // every seed entry at least once
      #1;
      ref_v = 1.0 / real'(tb_fp_pkg::f2r(a));
      ry = tb_fp_pkg::f2r(y);
      err = (ry - ref_v) / ref_v;
      checks++;
      if (err > 4.8e-7 || err < -4.8e-7) begin
        failures++;
        if (failures < 10) $display("FAIL 1/%h = %h (%g), expected %g", a, y, ry, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
