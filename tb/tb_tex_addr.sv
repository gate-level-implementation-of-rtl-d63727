// tb_tex_addr: random texture sizes, level counts, coordinates and levels
// of detail against a model of the mip layout: level choice, blend weight
// between levels, the eight texel addresses (with wrap-around) and the
// bilinear fractions.
module tb_tex_addr;
  import accel_pkg::*;
  logic [15:0] u16, v16;
  logic signed [15:0] lod;
  polymode_t mode;
  logic [7:0][20:0] addr;
  logic [1:0][7:0] fu, fv;
  logic [7:0] flod;
  int checks = 0, failures = 0;
  tex_addr #(.TEX_AW(21)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int dimw(int lw, int k); return (lw > k) ? (1 << (lw - k)) : 1; endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int lw, lh, levels, l0, l1, ef;
      lw = $urandom % 11; lh = $urandom % 11; levels = $urandom % 11;
      mode = '0;
      mode.log2w = 4'(lw); mode.log2h = 4'(lh); mode.levels = 4'(levels);
      mode.tex_base = 21'($urandom % 100000);
      u16 = 16'($urandom); v16 = 16'($urandom);
      lod = 16'(int'($urandom % 4096) - 1024);
      #1;
      if (lod < 0) begin l0 = 0; ef = 0; end
      else if ((lod >>> 8) >= levels) begin l0 = levels; ef = 0; end
      else begin l0 = lod >>> 8; ef = lod & 255; end
      l1 = (l0 == levels) ? l0 : l0 + 1;
      checks++;
      if (int'(flod) != ef) begin failures++; $display("FAIL flod"); end
      for (int s = 0; s < 2; s++) begin
        int lv, w, h, off, tu, tv, iu, iv;
        lv = s ? l1 : l0;
        w = dimw(lw, lv); h = dimw(lh, lv);
        off = 0;
        for (int j = 0; j < lv; j++) off += dimw(lw, j) * dimw(lh, j);
        tu = int'(u16) * w - 32768; tv = int'(v16) * h - 32768;
        iu = (tu >>> 16) & (w - 1); iv = (tv >>> 16) & (h - 1);
        for (int t = 0; t < 4; t++) begin
          int a;
          a = int'(mode.tex_base) + off + ((iv + t / 2) & (h - 1)) * w + ((iu + t % 2) & (w - 1));
          checks++;
          if (int'(addr[4*s+t]) != (a & 32'h1F_FFFF)) begin
            failures++; if (failures < 10) $display("FAIL addr lw=%0d lh=%0d lv=%0d t=%0d got %0d exp %0d", lw, lh, lv, t, addr[4*s+t], a);
          end
        end
        checks++;
        if (int'(fu[s]) != ((tu >> 8) & 255) || int'(fv[s]) != ((tv >> 8) & 255)) begin
          failures++; if (failures < 10) $display("FAIL fractions");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
