// tb_int_to_fp: converts every 16-bit integer in steps and compares with
// the real value; values up to 2^24 are exact in single precision.
module tb_int_to_fp;
  import accel_pkg::*;
  logic signed [15:0] i;
  float_t y;
  int checks = 0, failures = 0;
  int_to_fp #(.IN_W(16)) dut (.i(i), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -32768; k < 32768; k += 7) begin
      i = 16'(k); #1;
      checks++;
      if (tb_fp_pkg::f2r(y) != real'(k)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h", k, y);
      end
    end
    i = 16'sd1; #1; checks++;
    if (y !== 32'h3F80_0000) begin failures++; $display("FAIL 1 -> %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
