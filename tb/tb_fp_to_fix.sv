// tb_fp_to_fix: checks floor(a * 2^FRAC) with FRAC = 16 against real
// arithmetic, including negative values (floor, not truncation) and
// saturation of values too large for 32 bits.
module tb_fp_to_fix;
  import accel_pkg::*;
  float_t a;
  logic signed [31:0] y;
  int checks = 0, failures = 0;
  fp_to_fix #(.FRAC(16), .OUT_W(32)) dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(float_t x, logic signed [31:0] e);
    a = x; #1; checks++;
    if (y !== e) begin failures++; $display("FAIL %h -> %h, expected %h", x, y, e); end
  endtask

  initial begin
    real r;
    longint ref_v;
    chk(32'h3F80_0000, 32'h0001_0000);   // 1.0
    chk(32'hBF80_0000, 32'hFFFF_0000);   // -1.0
    chk(32'hBF40_0000, 32'hFFFF_4000);   // -0.75
    chk(32'h5000_0000, 32'h7FFF_FFFF);   // 2^33 saturates
    chk(32'hD000_0000, 32'h8000_0000);   // -2^33 saturates
    chk(32'h0000_0000, 32'h0000_0000);
    for (int i = 0; i < 4000; i++) begin
      a = {1'($urandom), 8'(100 + $urandom % 40), 23'($urandom)};
      #1;
      r = real'(tb_fp_pkg::f2r(a)) * 65536.0;
      ref_v = longint'($floor(r));
      checks++;
      if (longint'(y) != ref_v) begin
        failures++;
        if (failures < 10) $display("FAIL %h -> %h, expected %0d", a, y, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
