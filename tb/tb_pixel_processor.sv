// tb_pixel_processor: random quads of two flat-shaded polygons (different
// colours and depths, depth test and write on) over a small area, against
// a frame-buffer model that applies each accepted quad in order. The
// memory model answers reads one clock later, applies writes at once and
// raises `conflict` when the read and the write hit the same bank pair, as
// the memory controller does. Checks the final frame buffer (colour within
// one step, depth within one unit), that only masked pixels change, and
// that both kinds of stall (bank conflict, read-after-write) occurred.
module tb_pixel_processor;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic quad_valid = 0, quad_ready, poly_we = 0, poly_slot;
  quad_t quad;
  poly_t poly;
  logic [P*8-1:0][20:0] tex_addr;
  logic [P*8-1:0][31:0] tex_data;
  logic rd_en, wr_en, conflict, busy, stall_conflict, stall_hazard;
  logic [QW-1:0] rd_qx, rd_qy, wr_qx, wr_qy;
  logic [P*64-1:0] rd_data, wr_data;
  logic [P-1:0] wr_pmask;
  int checks = 0, failures = 0;
  pixel_processor #(.PIPES(P), .TEX_AW(21)) dut (.*);

  localparam int W = 16;           // pixels
  logic [63:0] mem [W][W];
  logic [31:0] mcol [W][W];
  logic [23:0] mz [W][W];
  int col [2][4];
  real zz [2];
  int n_conf = 0, n_haz = 0;

  assign tex_data = '0;
  assign conflict = rd_en && wr_en && (rd_qx[1:0] == wr_qx[1:0]);

  always @(posedge clk) begin
    if (rd_en && !conflict)
      for (int p = 0; p < 4; p++) rd_data[64*p +: 64] <= mem[2*rd_qy + p/2][2*rd_qx + p%2];
    if (wr_en)
      for (int p = 0; p < 4; p++) if (wr_pmask[p]) mem[2*wr_qy + p/2][2*wr_qx + p%2] = wr_data[64*p +: 64];
    if (stall_conflict) n_conf++;
    if (stall_hazard) n_haz++;
    // reference: quads in acceptance order
    if (rst_n && quad_valid && quad_ready)
      for (int p = 0; p < 4; p++) if (quad.mask[p]) begin
        int px, py, s;
        logic [23:0] z24;
        px = 2*quad.qx + p%2; py = 2*quad.qy + p/2; s = quad.slot;
        z24 = r2f(zz[s]) >> 7;
        if (z24 < mz[py][px]) begin
          mz[py][px] = z24;
          mcol[py][px] = {8'(col[s][0]), 8'(col[s][1]), 8'(col[s][2]), 8'(col[s][3])};
        end
      end
  end

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load_poly(int s, real z);
    real q;
    q = 1.0 / z;
    poly = '0;
    poly.mode.ztest_en = 1'b1; poly.mode.zwrite_en = 1'b1;
    zz[s] = z;
    poly.pl[PL_Q] = '{a: 32'h0, b: 32'h0, c: r2f(q)};
    for (int c = 0; c < 4; c++) begin
      col[s][c] = 16 + $urandom % 224;
      // colour c/256 + half a step, so truncation lands on the same step
      poly.pl[PL_DR + c] = '{a: 32'h0, b: 32'h0, c: r2f((col[s][c] + 0.5) / 256.0 * q)};
    end
    @(negedge clk); poly_we = 1; poly_slot = 1'(s);
    @(negedge clk); poly_we = 0;
  endtask

  initial begin
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
      mcol[y][x] = $urandom; mz[y][x] = 24'(r2f(2.0 + ($urandom % 1000) / 100.0) >> 7);
      mem[y][x] = {8'h00, mz[y][x], mcol[y][x]};
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      load_poly(0, 1.0 + round * 2.0);
      load_poly(1, 12.0 - round * 2.0);
      for (int k = 0; k < 400; k++) begin
        @(negedge clk);
        quad_valid = ($urandom % 5) != 0;
        quad.qx = QW'($urandom % (W / 2)); quad.qy = QW'($urandom % (W / 2));
        quad.mask = 4'($urandom) | 4'(k % 2); quad.slot = 1'($urandom);
        @(posedge clk);
        while (quad_valid && !quad_ready) @(posedge clk);
      end
      @(negedge clk); quad_valid = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
      pixel_t g;
      g = pixel_t'(mem[y][x]);
      checks++;
      if (g.z > mz[y][x] + 1 || g.z + 1 < mz[y][x]) begin failures++; if (failures < 10) $display("FAIL z at %0d,%0d", x, y); end
      for (int c = 0; c < 4; c++) begin
        int a, b;
        a = g.rgba[8*c +: 8]; b = mcol[y][x][8*c +: 8];
        checks++;
        if (a > b + 1 || a + 1 < b) begin failures++; if (failures < 10) $display("FAIL colour at %0d,%0d: %h vs %h", x, y, g.rgba, mcol[y][x]); end
      end
    end
    checks++;
    if (n_conf == 0 || n_haz == 0) begin failures++; $display("FAIL stalls: conflict %0d hazard %0d", n_conf, n_haz); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
