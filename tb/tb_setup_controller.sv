// tb_setup_controller: a display list of polygons with 3 to 16 vertices
// (and one with no covered area) ending in a zero header. The slots are
// freed at random. Checks that each polygon's data is written once, to
// alternating slots, only while its slot is free, with the right mode
// fields, texture base and planes, and that its outline segments follow,
// closed and with the last one marked.
module tb_setup_controller;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, poly_we, poly_slot, seg_valid, seg_ready;
  logic [15:0] dl_addr;
  logic [31:0] dl_data;
  logic [1:0] slot_free;
  poly_t poly;
  seg_t seg;
  int checks = 0, failures = 0;
  setup_controller #(.AW(16), .MAXV(16)) dut (.*);

  logic [31:0] dl [4096];
  typedef struct { logic [31:0] hdr, base; logic [31:0] pw [30]; int n; int vx [16], vy [16]; } rec_t;
  rec_t recs [$];
  int npoly = 0, cur = -1, si = 0;

  always @(posedge clk) dl_data <= dl[dl_addr[11:0]];

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s (polygon %0d)", m, cur); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (poly_we) begin
      rec_t r;
      chk(si == 0 || cur < 0, "data written before segments finished");
      cur++; si = 0;
      r = recs[cur];
      chk(slot_free[poly_slot], "slot not free");
      chk(poly_slot == 1'(cur), "slot order");
      chk(poly.mode.levels == r.hdr[11:8] && poly.mode.log2h == r.hdr[15:12] &&
          poly.mode.log2w == r.hdr[19:16] && poly.mode.tex_en == r.hdr[20] &&
          poly.mode.blend_en == r.hdr[21] && poly.mode.ztest_en == r.hdr[22] &&
          poly.mode.zwrite_en == r.hdr[23] && poly.mode.tex_base == r.base[20:0], "mode");
      for (int p = 0; p < NPLANES; p++)
        chk(poly.pl[p].a == r.pw[3*p] && poly.pl[p].b == r.pw[3*p+1] && poly.pl[p].c == r.pw[3*p+2], "plane");
    end
    if (seg_valid && seg_ready) begin
      rec_t r;
      int j;
      r = recs[cur];
      j = (si + 1) % r.n;
      chk(int'(seg.x0) == r.vx[si] && int'(seg.y0) == r.vy[si] && int'(seg.x1) == r.vx[j] &&
          int'(seg.y1) == r.vy[j] && seg.slot == 1'(cur) && seg.last == (si == r.n - 1), "segment");
      si++;
      if (si == r.n) begin si = 0; npoly++; end
    end
  end

  always @(negedge clk) begin
    seg_ready = ($urandom % 3) != 0;
    if ($urandom % 20 == 0) slot_free = 2'($urandom);
  end

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a = 0;
    for (int k = 0; k < 30; k++) begin
      rec_t r;
      r.n = 3 + k % 14;
      r.hdr = {8'd0, 4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 8'(r.n)};
      r.base = $urandom;
      dl[a++] = r.hdr; dl[a++] = r.base;
      for (int i = 0; i < 30; i++) begin r.pw[i] = $urandom; dl[a++] = r.pw[i]; end
      for (int i = 0; i < r.n; i++) begin
        r.vx[i] = (k == 5) ? 7 : $urandom % 1025; r.vy[i] = (k == 5) ? 9 : $urandom % 1025;
        dl[a++] = {16'(r.vy[i]), 16'(r.vx[i])};
      end
      recs.push_back(r);
    end
    dl[a] = 32'h0;
    slot_free = 2'b11;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    chk(npoly == 30, "polygon count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
