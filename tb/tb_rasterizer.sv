// tb_rasterizer: draws random convex polygons (and some degenerate ones)
// through the rasterizer and compares every covered pixel with a reference
// coverage worked out in the testbench from the edge equations: pixel
// (px,py) is inside when py lies in [y0,y1) of a downward (right) edge and
// an upward (left) edge with xl <= px < xr, evaluated exactly in integers.
// Also checks that quads of a polygon arrive in tile order and that a
// large polygon streams one quad per clock.
module tb_rasterizer;
  import accel_pkg::*;
  localparam int N = 96;          // test area N x N pixels
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic seg_valid, seg_ready, quad_valid, quad_ready, busy;
  seg_t seg;
  quad_t quad;
  logic [1:0] slot_free;
  int checks = 0, failures = 0;

  rasterizer dut (.clk, .rst_n, .seg_valid, .seg_ready, .seg, .quad_valid,
                  .quad_ready, .quad, .slot_free, .busy);

  int hits [N][N];
  int refc [N][N];
  int vx [8], vy [8];
  int nv;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference coverage of polygon vx/vy (clockwise, y down)
  task automatic ref_poly();
    for (int py = 0; py < N; py++)
      for (int px = 0; px < N; px++) begin
        logic inl, inr;
        inl = 0; inr = 0;
        for (int e = 0; e < nv; e++) begin
          int x0, y0, x1, y1;
          x0 = vx[e]; y0 = vy[e]; x1 = vx[(e+1)%nv]; y1 = vy[(e+1)%nv];
          if (y1 > y0 && py >= y0 && py < y1)        // right edge: px < x(py)
            inr = (px - x0) * (y1 - y0) < (py - y0) * (x1 - x0);
          if (y1 < y0 && py >= y1 && py < y0)        // left edge: px >= x(py)
            inl = (px - x1) * (y0 - y1) >= (py - y1) * (x0 - x1);
        end
        if (inl && inr) refc[py][px]++;
      end
  endtask

  // random convex polygon: points on an ellipse in clockwise (y-down) order
  function automatic logic convex();
    for (int e = 0; e < nv; e++) begin
      int ax, ay, bx, by;
      ax = vx[(e+1)%nv] - vx[e];       ay = vy[(e+1)%nv] - vy[e];
      bx = vx[(e+2)%nv] - vx[(e+1)%nv]; by = vy[(e+2)%nv] - vy[(e+1)%nv];
      if (ax * by - ay * bx < 0) return 0;
    end
    return 1;
  endfunction

  task automatic make_poly(int k);
    do make_poly1(k); while (!convex());
  endtask

  task automatic make_poly1(int k);
    int cx, cy, rx, ry, n;
    real a0;
    cx = 20 + $urandom % 56; cy = 20 + $urandom % 56;
    rx = 1 + $urandom % 19;  ry = 1 + $urandom % 19;
    n  = 3 + $urandom % 5;
    a0 = real'($urandom % 100) / 100.0;
    nv = 0;
    for (int i = 0; i < n; i++) begin
      int x, y;
      x = cx + int'($floor(rx * $cos(a0 + 6.2831853 * i / n) + 0.5));
      y = cy + int'($floor(ry * $sin(a0 + 6.2831853 * i / n) + 0.5));
      if (nv == 0 || x != vx[nv-1] || y != vy[nv-1]) begin
        vx[nv] = x; vy[nv] = y; nv++;
      end
    end
    if (k == 0) begin          // a large square for the rate check
      nv = 4; vx[0] = 2; vy[0] = 2; vx[1] = 90; vy[1] = 2; vx[2] = 90; vy[2] = 90; vx[3] = 2; vy[3] = 90;
    end
  endtask

  int first_q = -1, last_q = -1, nq0 = 0, cyc = 0;
  int last_tile [2];
  always @(posedge clk) cyc++;

  // quad sink (occasionally stalls)
  always @(posedge clk) begin
    quad_ready <= ($urandom % 8) != 0 || poly_idx == 1;
    if (rst_n && quad_valid && quad_ready) begin
      int t;
      for (int p = 0; p < 4; p++)
        if (quad.mask[p]) begin
          int px, py;
          px = 2 * quad.qx + p % 2; py = 2 * quad.qy + p / 2;
          if (px < N && py < N) hits[py][px]++;
          else begin failures++; $display("FAIL pixel outside area %0d %0d", px, py); end
        end
      t = (quad.qy / 4) * 1024 + quad.qx / 4;
      checks++;
      if (t < last_tile[quad.slot]) begin
        failures++; $display("FAIL quads not in tile order");
      end
      last_tile[quad.slot] = t;
      if (poly_idx == 1) begin
        if (first_q < 0) first_q = cyc;
        last_q = cyc; nq0++;
      end
    end
  end

  int poly_idx = 0;

  initial begin
    int slot;
    seg_valid = 0; quad_ready = 1; seg = '0;
    last_tile[0] = -1; last_tile[1] = -1;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin hits[y][x] = 0; refc[y][x] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    slot = 0;
    for (int k = 0; k < 40; k++) begin
      make_poly(k);
      if (k == 5) begin nv = 3; vx[0] = 10; vy[0] = 10; vx[1] = 30; vy[1] = 10; vx[2] = 20; vy[2] = 10; end // zero area
      ref_poly();
      while (!slot_free[slot]) @(posedge clk);
      // wait until the other slot's quads have all been seen, so that the
      // tile-order tracker can reset per polygon
      last_tile[slot] = -1;
      poly_idx = k + 1;
      for (int e = 0; e < nv; e++) begin
        @(negedge clk);
        seg.x0 = CW'(vx[e]); seg.y0 = CW'(vy[e]);
        seg.x1 = CW'(vx[(e+1)%nv]); seg.y1 = CW'(vy[(e+1)%nv]);
        seg.slot = 1'(slot); seg.last = (e == nv - 1);
        seg_valid = 1;
        while (!seg_ready) @(negedge clk);
      end
      @(negedge clk);
      seg_valid = 0;
      if (k == 0) begin
        while (busy) @(posedge clk);
      end
      slot ^= 1;
    end
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      checks++;
      if (hits[y][x] != refc[y][x]) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d,%0d drawn %0d times, expected %0d", x, y, hits[y][x], refc[y][x]);
      end
    end
    // 88x88 square = 44*44 quads; stream at one quad per clock plus at most
    // 3 clocks per tile row of 8 scan lines
    checks++;
    if (nq0 != 44 * 44 || (last_q - first_q + 1) > nq0 + 3 * 12) begin
      failures++;
      $display("FAIL rate: %0d quads in %0d clocks", nq0, last_q - first_q + 1);
    end
    $display("square: %0d quads in %0d clocks", nq0, last_q - first_q + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
