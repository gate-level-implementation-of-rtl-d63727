// tb_color_blend: random colours through every mode combination against a
// real-valued model of modulate, add specular, composite; each channel may
// differ from the exact value by the 8-bit rounding of the hardware.
module tb_color_blend;
  logic [31:0] tex, diff, dst, rgba;
  logic [23:0] spec;
  logic tex_en, blend_en;
  int checks = 0, failures = 0;
  color_blend dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      real base [4], a, e;
      tex = $urandom; diff = $urandom; dst = $urandom;
      spec = (k % 4 == 0) ? 24'h0 : 24'($urandom);
      tex_en = k[0]; blend_en = k[1];
      #1;
      for (int c = 0; c < 4; c++) begin
        int t8, d8;
        t8 = int'(tex[8*c +: 8]); d8 = int'(diff[8*c +: 8]);
        if (tex_en) base[c] = (t8 * d8) / 255.0;
        else base[c] = d8;
      end
      for (int c = 1; c < 4; c++) begin
        int s8;
        s8 = int'(spec[8*(c-1) +: 8]);
        base[c] = base[c] + s8;
        if (base[c] > 255.0) base[c] = 255.0;
      end
      a = base[0] / 255.0;
      for (int c = 0; c < 4; c++) begin
        int b8;
        b8 = int'(dst[8*c +: 8]);
        if (blend_en && c != 0) e = base[c] * a + b8 * (1.0 - a);
        else e = base[c];
        checks++;
        if (rgba[8*c +: 8] > e + 2.5 || rgba[8*c +: 8] < e - 3.5) begin
          failures++; if (failures < 10) $display("FAIL ch %0d got %0d exp %f", c, rgba[8*c +: 8], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
