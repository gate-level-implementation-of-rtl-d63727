// tb_pixel_pipe: pixels with random perspective-correct colour gradients,
// random depths and random stored pixels through one pipeline. The front
// stages are stalled at random (adv_front low) while the back stages keep
// moving, as in the pixel processor; a shadow of the stage registers tells
// which pixel leaves stage 6 each clock. Checks colour (textured by a
// constant texel, modulated), the depth written and the depth-test result.
module tb_pixel_pipe;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic adv_front;
  logic [CW-1:0] x, y;
  plane_t [NPLANES-1:0] pl1, pl3;
  polymode_t mode3, mode4, mode6;
  logic [7:0][20:0] tex_addr_o;
  logic [63:0] fb_rd, fb_wr;
  logic [7:0][31:0] tex_data;
  logic pass;
  int checks = 0, failures = 0;
  pixel_pipe #(.TEX_AW(21)) dut (.*);

  typedef struct { int valid; int col [4]; logic [31:0] tex; logic [63:0] old; real z; } px_t;
  px_t s1, r2, r3, r4, r5, r6;
  real pa [10], pb [10], pc [10];

  function automatic real rnd(real lo, real hi); return lo + (hi - lo) * ($urandom % 100000) / 100000.0; endfunction
  function automatic int c8(real v);
    real s;
    s = $floor(v * 256.0);
    if (s < 0) return 0;
    if (s > 255) return 255;
    return int'(s);
  endfunction

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // planes: 1/z and four diffuse channels over z; no specular, u = v = 0
  task automatic new_planes();
    real qa, qb, qc;
    qa = rnd(-2e-4, 2e-4); qb = rnd(-2e-4, 2e-4); qc = rnd(0.3, 1.0);
    pa[0] = qa; pb[0] = qb; pc[0] = qc;
    for (int i = 1; i < 10; i++) begin pa[i] = 0; pb[i] = 0; pc[i] = 0; end
    for (int c = 0; c < 4; c++) begin
      real a0, ax, ay;
      // colour = a0 + ax*x + ay*y in screen space of the "world", times q
      a0 = rnd(0.1, 0.9); ax = rnd(-3e-4, 3e-4); ay = rnd(-3e-4, 3e-4);
      pa[3 + c] = a0 * qa + ax * qc; pb[3 + c] = a0 * qb + ay * qc; pc[3 + c] = a0 * qc;
    end
    for (int i = 0; i < 10; i++) begin
      pl1[i] = '{a: r2f(pa[i]), b: r2f(pb[i]), c: r2f(pc[i])};
    end
    pl3 = pl1;
  endtask

  int n_out = 0, n_pass = 0, n_fail = 0;

  always @(posedge clk) begin
    // check what stage 6 holds now
    if (r6.valid) begin
      pixel_t o, w;
      logic [23:0] ez;
      logic ep;
      o = pixel_t'(r6.old); w = pixel_t'(fb_wr);
      ez = r2f(r6.z) >> 7;
      ep = ez < o.z;
      checks++; n_out++;
      if (ep) n_pass++; else n_fail++;
      if ((w.z > ez + 1) || (w.z + 1 < ez) || (pass != ep && (o.z > ez + 1 || o.z + 1 < ez))) begin
        failures++; if (failures < 10) $display("FAIL depth z24 %h exp %h pass %b", w.z, ez, pass);
      end
      for (int c = 0; c < 4; c++) begin
        int e, g;
        e = (int'(r6.tex[8*(3-c) +: 8]) * (r6.col[c] + 1)) >> 8;
        g = int'(w.rgba[8*(3-c) +: 8]);
        checks++;
        if (g > e + 2 || g < e - 2) begin
          failures++; if (failures < 10) $display("FAIL colour %0d got %0d exp %0d", c, g, e);
        end
      end
    end
    // shadow of the stage registers
    r6 <= r5; r5 <= r4; r4 <= r3;
    if (adv_front) begin r3 <= r2; r2 <= s1; end
  end

  // stage 4 and 5 inputs follow the shadow
  always @(negedge clk) begin
    fb_rd = r4.old;
    for (int i = 0; i < 8; i++) tex_data[i] = r5.tex;
  end

  initial begin
    mode3 = '0; mode3.tex_en = 1'b1; mode3.ztest_en = 1'b1; mode3.zwrite_en = 1'b1;
    mode3.log2w = 4'd4; mode3.log2h = 4'd4;
    mode4 = mode3; mode6 = mode3;
    s1.valid = 0; r2.valid = 0; r3.valid = 0; r4.valid = 0; r5.valid = 0; r6.valid = 0;
    new_planes();
    for (int k = 0; k < 3000; k++) begin
      int xi, yi;
      real q;
      @(negedge clk);
      adv_front = (k < 1000) || ($urandom % 3 != 0);
      if (k % 500 == 0) new_planes();
      if (adv_front) begin
        xi = $urandom % 1024; yi = $urandom % 1024;
        x = CW'(xi); y = CW'(yi);
        q = f2r(pl1[0].a) * xi + f2r(pl1[0].b) * yi + f2r(pl1[0].c);
        s1.valid = 1;
        s1.z = 1.0 / q;
        for (int c = 0; c < 4; c++)
          s1.col[c] = c8((f2r(pl1[3 + c].a) * xi + f2r(pl1[3 + c].b) * yi + f2r(pl1[3 + c].c)) / q);
        s1.tex = $urandom;
        s1.old = {8'h00, 24'(r2f(s1.z * rnd(0.5, 1.5)) >> 7), $urandom};
      end
    end
    repeat (8) @(negedge clk);
    checks++;
    if (n_pass == 0 || n_fail == 0) begin failures++; $display("FAIL depth test outcomes %0d/%0d", n_pass, n_fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
