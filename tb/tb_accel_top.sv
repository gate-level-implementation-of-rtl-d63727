// tb_accel_top: end-to-end test of the accelerator at its default sizes.
//
// Builds a display list of polygons in a 96 x 96 pixel window, loads a
// 64 x 64 mip-mapped texture (all seven levels, computed from a formula),
// clears the window through the host port, renders, reads the window back
// and compares every pixel with a reference computed in the testbench from
// the specification: coverage from exact edge equations, attributes as
// (plane value) / (1/z plane value), level of detail from the analytic
// derivatives, trilinear filtering, texture x diffuse + specular,
// compositing and the 24-bit float depth test, applied polygon by polygon
// in display-list order. Colour channels may differ by a few steps and the
// stored depth by one step, since the reference works in real arithmetic
// and the hardware in truncated single precision.
// Counts and requires: bank-conflict stalls, read-after-write stalls,
// overlap of two polygons in the double-buffered rasterizer, textured,
// blended, depth-rejected, magnified and minified (trilinear) pixels, and
// an empty polygon; checks that a large polygon streams close to one quad
// (four pixels) per clock.
module tb_accel_top;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 96;
  localparam int TW = 64;          // texture size, levels 0..6

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy;
  logic        dl_ld_we = 0, tex_ld_we = 0;
  logic [15:0] dl_ld_addr;
  logic [31:0] dl_ld_data, tex_ld_data;
  logic [20:0] tex_ld_addr;
  logic        host_req = 0, host_we = 0, host_gnt;
  logic [9:0]  host_x, host_y;
  logic [63:0] host_wdata, host_rdata;
  logic        quad_fire, stall_conflict, stall_hazard;

  accel_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // scene description
  typedef struct {
    int   nv;
    int   vx[8], vy[8];
    real  pa[10], pb[10], pc[10];
    logic tex_en, blend_en, ztest_en, zwrite_en;
  } tpoly_t;

  tpoly_t polys[$];
  logic [31:0] dl[$];

  // reference frame buffer: rgba and z24
  logic [31:0] ref_c [N][N];
  logic [23:0] ref_z [N][N];

  // texture: level l, texel (i, j)
  function automatic logic [31:0] texel(int l, int i, int j);
    int w;
    w = TW >> l;
    return {8'(i * 256 / w), 8'(j * 256 / w), 8'(l * 40), 8'(255 - 8 * i * 32 / w)};
  endfunction

  function automatic int tex_off(int l);
    int o = 0;
    for (int k = 0; k < l; k++) o += (TW >> k) * (TW >> k);
    return o;
  endfunction

  localparam int TBASE = 1000;

  // plane p: value = a*x + b*y + c, stored as floats (truncated)
  task automatic set_plane(ref tpoly_t p, input int i, input real a, input real b, input real c);
    p.pa[i] = f2r(r2f(a)); p.pb[i] = f2r(r2f(b)); p.pc[i] = f2r(r2f(c));
  endtask

  // constant attributes at constant depth z
  task automatic flat(ref tpoly_t p, input real z, input real r, input real g, input real b, input real a,
                      input real sr, input real sg, input real sb);
    real q;
    q = 1.0 / z;
    set_plane(p, 0, 0, 0, q);
    set_plane(p, 1, 0, 0, 0); set_plane(p, 2, 0, 0, 0);
    set_plane(p, 3, 0, 0, r * q); set_plane(p, 4, 0, 0, g * q);
    set_plane(p, 5, 0, 0, b * q); set_plane(p, 6, 0, 0, a * q);
    set_plane(p, 7, 0, 0, sr * q); set_plane(p, 8, 0, 0, sg * q);
    set_plane(p, 9, 0, 0, sb * q);
  endtask

  task automatic rect(ref tpoly_t p, input int x0, input int y0, input int x1, input int y1);
    p.nv = 4;
    p.vx[0] = x0; p.vy[0] = y0; p.vx[1] = x1; p.vy[1] = y0;
    p.vx[2] = x1; p.vy[2] = y1; p.vx[3] = x0; p.vy[3] = y1;
  endtask

  task automatic mk_tri(ref tpoly_t p, input int x0, input int y0, input int x1, input int y1, input int x2, input int y2);
    p.nv = 3;
    p.vx[0] = x0; p.vy[0] = y0; p.vx[1] = x1; p.vy[1] = y1; p.vx[2] = x2; p.vy[2] = y2;
  endtask

  task automatic emit(tpoly_t p);
    dl.push_back({8'd0, p.zwrite_en, p.ztest_en, p.blend_en, p.tex_en,
                  4'd6, 4'd6, 4'd6, 8'(p.nv)});
    dl.push_back(32'(TBASE));
    for (int i = 0; i < 10; i++) begin
      dl.push_back(r2f(p.pa[i])); dl.push_back(r2f(p.pb[i])); dl.push_back(r2f(p.pc[i]));
    end
    for (int i = 0; i < p.nv; i++) dl.push_back({16'(p.vy[i]), 16'(p.vx[i])});
    polys.push_back(p);
  endtask

  // ------------------------------------------------------------------
  // reference model
  int n_tex = 0, n_blend = 0, n_zfail = 0, n_mag = 0, n_tri = 0;

  function automatic int c8(real v);
    real s;
    s = $floor(v * 256.0);
    if (s < 0) return 0;
    if (s > 255) return 255;
    return int'(s);
  endfunction

  function automatic int log2_88(real d);
    int e;
    real a;
    if (d == 0.0) return -32768;
    a = (d < 0) ? -d : d;
    e = 0;
    while (a >= 2.0) begin a /= 2.0; e++; end
    while (a < 1.0)  begin a *= 2.0; e--; end
    return e * 256 + int'($floor((a - 1.0) * 256.0));
  endfunction

  function automatic int lerp(int a, int b, int f);
    return a + (((b - a) * f) >>> 8);
  endfunction

  function automatic logic is_inside(tpoly_t p, int px, int py);
    logic inl = 0, inr = 0;
    for (int e = 0; e < p.nv; e++) begin
      int x0, y0, x1, y1;
      x0 = p.vx[e]; y0 = p.vy[e]; x1 = p.vx[(e+1)%p.nv]; y1 = p.vy[(e+1)%p.nv];
      if (y1 > y0 && py >= y0 && py < y1) inr = (px - x0) * (y1 - y0) < (py - y0) * (x1 - x0);
      if (y1 < y0 && py >= y1 && py < y0) inl = (px - x1) * (y0 - y1) >= (py - y1) * (x0 - x1);
    end
    return inl && inr;
  endfunction

  task automatic shade(tpoly_t p, int px, int py);
    real val[10], z, u, v, d[4];
    int lod, l0, l1, fl, lodv[4];
    int rgba[4], tx[4], sp[3], base[4], out[4], dst[4];
    int a9;
    logic [23:0] z24;
    logic pass;
    for (int i = 0; i < 10; i++) val[i] = p.pa[i] * px + p.pb[i] * py + p.pc[i];
    z = 1.0 / val[0];
    for (int i = 1; i < 10; i++) val[i] = val[i] * z;
    u = val[1]; v = val[2];
    d[0] = z * (p.pa[1] - u * p.pa[0]); d[1] = z * (p.pa[2] - v * p.pa[0]);
    d[2] = z * (p.pb[1] - u * p.pb[0]); d[3] = z * (p.pb[2] - v * p.pb[0]);
    lod = -100000;
    for (int i = 0; i < 4; i++) begin
      lodv[i] = log2_88(d[i]) + 6 * 256;
      if (lodv[i] > lod) lod = lodv[i];
    end
    if (lod < 0) begin l0 = 0; fl = 0; end
    else if ((lod >> 8) >= 6) begin l0 = 6; fl = 0; end
    else begin l0 = lod >> 8; fl = lod & 255; end
    l1 = (l0 == 6) ? 6 : l0 + 1;
    for (int c = 0; c < 4; c++) tx[c] = 0;
    if (p.tex_en) begin
      int lv[2][4];
      int u16, v16;
      u16 = int'(longint'($floor(u * 65536.0)) & 65535);
      v16 = int'(longint'($floor(v * 65536.0)) & 65535);
      for (int k = 0; k < 2; k++) begin
        int l, w, tu, tv, iu, iv, fu, fv;
        logic [31:0] t00, t10, t01, t11;
        l  = k ? l1 : l0;
        w  = TW >> l;
        tu = (u16 * w) - 32768; tv = (v16 * w) - 32768;
        iu = (tu >>> 16) & (w - 1); iv = (tv >>> 16) & (w - 1);
        fu = (tu >> 8) & 255;       fv = (tv >> 8) & 255;
        t00 = texel(l, iu, iv);           t10 = texel(l, (iu + 1) % w, iv);
        t01 = texel(l, iu, (iv + 1) % w); t11 = texel(l, (iu + 1) % w, (iv + 1) % w);
        for (int c = 0; c < 4; c++) begin
          int top, bot;
          top = lerp(t00[8*c +: 8], t10[8*c +: 8], fu);
          bot = lerp(t01[8*c +: 8], t11[8*c +: 8], fu);
          lv[k][c] = lerp(top, bot, fv);
        end
      end
      for (int c = 0; c < 4; c++) tx[c] = lerp(lv[0][c], lv[1][c], fl);
      n_tex++;
      if (lod < 0) n_mag++;
      if (fl != 0) n_tri++;
    end
    // channel c: 3 R, 2 G, 1 B, 0 A
    rgba[3] = c8(val[3]); rgba[2] = c8(val[4]); rgba[1] = c8(val[5]); rgba[0] = c8(val[6]);
    sp[2] = c8(val[7]); sp[1] = c8(val[8]); sp[0] = c8(val[9]);
    for (int c = 0; c < 4; c++) base[c] = p.tex_en ? (tx[c] * (rgba[c] + 1)) >> 8 : rgba[c];
    for (int c = 1; c < 4; c++) begin
      base[c] += sp[c-1];
      if (base[c] > 255) base[c] = 255;
    end
    for (int c = 0; c < 4; c++) dst[c] = ref_c[py][px][8*c +: 8];
    a9 = base[0] + (base[0] >> 7);
    out[0] = base[0];
    for (int c = 1; c < 4; c++)
      out[c] = p.blend_en ? ((base[c] * a9 + dst[c] * (256 - a9)) >> 8) & 255 : base[c];
    if (p.blend_en) n_blend++;
    z24 = r2f(z) >> 7;
    pass = !p.ztest_en || (z24 < ref_z[py][px]);
    if (!pass) n_zfail++;
    if (pass) begin
      ref_c[py][px] = {8'(out[3]), 8'(out[2]), 8'(out[1]), 8'(out[0])};
      if (p.zwrite_en) ref_z[py][px] = z24;
    end
  endtask

  // ------------------------------------------------------------------
  task automatic build_scene();
    tpoly_t p;
    p.tex_en = 0; p.blend_en = 0; p.ztest_en = 1; p.zwrite_en = 1;
    // 0: background, far, grey
    rect(p, 0, 0, 96, 96);
    flat(p, 16.0, 0.25, 0.5, 0.75, 1.0, 0, 0, 0);
    emit(p);
    // 1: textured quad in perspective, near level 0..1
    rect(p, 8, 8, 60, 56);
    p.tex_en = 1;
    flat(p, 2.0, 1.0, 1.0, 1.0, 1.0, 0.125, 0, 0);
    set_plane(p, 0, 1.0 / 512, 1.0 / 1024, 0.25);         // 1/z
    set_plane(p, 1, 1.0 / 64 * 0.25, 0, 0.01);            // u/z
    set_plane(p, 2, 0, 1.0 / 64 * 0.25, 0.02);            // v/z
    emit(p);
    // 2: minified texture with a fractional level (trilinear)
    mk_tri(p, 62, 4, 94, 40, 62, 40);
    flat(p, 4.0, 1.0, 0.75, 1.0, 1.0, 0, 0, 0.25);
    set_plane(p, 0, 0, 0, 0.25);
    set_plane(p, 1, 3.0 / 64 * 0.25, 0, 0);
    set_plane(p, 2, 0, 5.0 / 64 * 0.25, 0);
    emit(p);
    // 3: magnified texture
    rect(p, 64, 44, 92, 92);
    flat(p, 4.0, 1.0, 1.0, 1.0, 1.0, 0, 0, 0);
    set_plane(p, 1, 1.0 / 256 * 0.25, 0, 0.1);
    set_plane(p, 2, 0, 1.0 / 512 * 0.25, 0.3);
    emit(p);
    // 4: far triangle behind the textured quad (partly depth-rejected)
    p.tex_en = 0;
    mk_tri(p, 20, 30, 50, 70, 4, 70);
    flat(p, 8.0, 1.0, 0.0, 0.0, 1.0, 0, 0, 0);
    emit(p);
    // 5: half-transparent blended triangle, no depth write
    mk_tri(p, 30, 20, 80, 60, 10, 80);
    p.blend_en = 1; p.zwrite_en = 0;
    flat(p, 1.0, 0.0, 0.5, 1.0, 0.5, 0.0, 0.25, 0.0);
    emit(p);
    // 6: zero-area polygon
    p.blend_en = 0; p.zwrite_en = 1;
    mk_tri(p, 10, 90, 40, 90, 70, 90);
    emit(p);
    // 7..14: small squares stacked on one spot, each nearer than the last
    for (int k = 0; k < 8; k++) begin
      rect(p, 40 + k % 2, 82, 46, 88);
      flat(p, 0.9 - 0.05 * k, 0.1 * k, 0.05 * k, 1.0 - 0.1 * k, 1.0, 0, 0, 0);
      emit(p);
    end
    // 15: large square, then 16: one quad on its last quad (read-after-write)
    rect(p, 48, 48, 80, 64);
    flat(p, 0.5, 0.5, 0.5, 0.0, 1.0, 0, 0, 0);
    emit(p);
    rect(p, 78, 62, 80, 64);
    flat(p, 0.25, 0.0, 1.0, 0.0, 1.0, 0, 0, 0);
    emit(p);
    dl.push_back(32'd0);   // end of list
  endtask

  // ------------------------------------------------------------------
  int n_empty = 0;
  always @(posedge clk) if (rst_n)
    if (dut.u_rast.u_walk.state == 2'd0 && dut.u_rast.w_start && dut.u_rast.s_ymin >= dut.u_rast.s_ymax) n_empty++;

  int cyc = 0, both_busy = 0, n_conf = 0, n_haz = 0, quads = 0;
  int p0_first = -1, p0_last = -1, p0_quads = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (stall_conflict) n_conf++;
    if (stall_hazard) n_haz++;
    if (dut.slot_free == 2'b00) both_busy++;
    if (quad_fire) begin
      quads++;
      if (quads <= 48 * 48) begin   // the background's quads come first
        if (p0_first < 0) p0_first = cyc;
        p0_last = cyc; p0_quads++;
      end
    end
  end

  task automatic host_write(int x, int y, logic [63:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_x = 10'(x); host_y = 10'(y); host_wdata = d;
    while (!host_gnt) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic host_read(int x, int y, output logic [63:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_x = 10'(x); host_y = 10'(y);
    while (!host_gnt) @(negedge clk);
    @(negedge clk);
    host_req = 0;
    d = host_rdata;
  endtask

  initial begin
    logic [63:0] w;
    int t0, t1;
    build_scene();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load display list
    foreach (dl[i]) begin
      @(negedge clk); dl_ld_we = 1; dl_ld_addr = 16'(i); dl_ld_data = dl[i];
    end
    // load texture levels
    for (int l = 0; l <= 6; l++)
      for (int j = 0; j < (TW >> l); j++)
        for (int i = 0; i < (TW >> l); i++) begin
          @(negedge clk); dl_ld_we = 0;
          tex_ld_we = 1; tex_ld_addr = 21'(TBASE + tex_off(l) + j * (TW >> l) + i);
          tex_ld_data = texel(l, i, j);
        end
    @(negedge clk); tex_ld_we = 0; dl_ld_we = 0;
    // clear the window: black, farthest depth
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        host_write(x, y, {8'h00, 24'hFF_FFFF, 32'h0});
        ref_c[y][x] = 32'h0; ref_z[y][x] = 24'hFF_FFFF;
      end
    // reference image
    foreach (polys[k])
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++)
          if (is_inside(polys[k], x, y)) shade(polys[k], x, y);
    // render
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    while (busy) @(negedge clk);
    t1 = cyc;
    $display("rendered %0d polygons, %0d quads in %0d clocks; stalls: conflict %0d, hazard %0d; both slots busy %0d clocks",
             polys.size(), quads, t1 - t0, n_conf, n_haz, both_busy);
    // compare
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        logic bad;
        host_read(x, y, w);
        bad = 0;
        for (int c = 0; c < 4; c++) begin
          int dc;
          dc = int'(w[8*c +: 8]) - int'(ref_c[y][x][8*c +: 8]);
          if (dc > 4 || dc < -4) bad = 1;
        end
        if (int'(w[55:32]) - int'(ref_z[y][x]) > 1 || int'(ref_z[y][x]) - int'(w[55:32]) > 1) bad = 1;
        checks++;
        if (bad) begin
          failures++;
          if (failures < 12) $display("FAIL pixel %0d,%0d: got %h z %h, expected %h z %h", x, y, w[31:0], w[55:32], ref_c[y][x], ref_z[y][x]);
        end
      end
    // mechanisms
    begin
      string nm [10] = '{"bank-conflict stall", "read-after-write stall", "two polygons in flight",
                         "textured pixel", "blended pixel", "depth-rejected pixel", "magnified texel",
                         "trilinear blend", "empty polygon", "quads"};
      int cnt [10];
      cnt = '{n_conf, n_haz, both_busy, n_tex, n_blend, n_zfail, n_mag, n_tri, n_empty, quads};
      for (int i = 0; i < 10; i++) begin
        $display("  %-24s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[i]); end
      end
    end
    // rate: the 96x96 background is 48*48 quads
    $display("background: %0d quads over %0d clocks", p0_quads, p0_last - p0_first + 1);
    checks++;
    if (p0_quads != 48 * 48 || (p0_last - p0_first + 1) * 8 > p0_quads * 10) begin
      failures++; $display("FAIL background rate below 0.8 quads per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
