// tb_tex_filter: random texels and weights against a real-valued trilinear
// model; also checks that zero weights return texel 0 of the first level
// exactly.
module tb_tex_filter;
  logic [7:0][31:0] texel;
  logic [1:0][7:0] fu, fv;
  logic [7:0] flod;
  logic [31:0] rgba;
  int checks = 0, failures = 0;
  tex_filter dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real lerp(real a, real b, int f); return a + (b - a) * f / 256.0; endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < 8; i++) texel[i] = $urandom;
      if (k % 10 == 0) begin fu = '0; fv = '0; flod = '0; end
      else begin fu = 16'($urandom); fv = 16'($urandom); flod = 8'($urandom); end
      #1;
      for (int c = 0; c < 4; c++) begin
        real lv [2], e;
        for (int l = 0; l < 2; l++)
          lv[l] = lerp(lerp(texel[4*l][8*c +: 8], texel[4*l+1][8*c +: 8], fu[l]),
                       lerp(texel[4*l+2][8*c +: 8], texel[4*l+3][8*c +: 8], fu[l]), fv[l]);
        e = lerp(lv[0], lv[1], flod);
        checks++;
        if (k % 10 == 0 ? rgba[8*c +: 8] != texel[0][8*c +: 8]
                        : (rgba[8*c +: 8] > e + 1.0 || rgba[8*c +: 8] < e - 4.0)) begin
          failures++; if (failures < 10) $display("FAIL ch %0d got %0d exp %f", c, rgba[8*c +: 8], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
