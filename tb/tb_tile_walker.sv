// tb_tile_walker: gives the walker random per-line spans (through a model
// of the synchronous edge buffer) and checks that the tiles it emits cover
// exactly the pixels inside the spans, each once, in tile-row order, that
// only the final tile is marked last, and that an empty polygon yields one
// empty last tile. tile_ready is driven randomly.
module tb_tile_walker;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, slot, busy, r_slot, tile_valid, tile_ready, tile_slot, tile_last;
  logic [CW-1:0] ymin, ymax, r_ty, tile_tx, tile_ty;
  logic [7:0][CW-1:0] l_x, r_x, tile_sl, tile_sr;
  int checks = 0, failures = 0;
  tile_walker #(.TILE_W(8), .TILE_H(8)) dut (.*);

  int ml [2][1024], mr [2][1024];
  bit cov [1024][1024];
  int ntiles, nlast, prev_key;

  always @(posedge clk)
    for (int i = 0; i < 8; i++) begin
      int y;
      y = 8 * int'(r_ty) + i;
      l_x[i] <= CW'(y < 1024 ? ml[r_slot][y] : 0);
      r_x[i] <= CW'(y < 1024 ? mr[r_slot][y] : 0);
    end

  always @(posedge clk) if (rst_n && tile_valid && tile_ready) begin
    int key;
    ntiles++;
    key = int'(tile_ty) * 4096 + int'(tile_tx);
    if (key <= prev_key && !(ntiles == 1)) begin failures++; $display("FAIL tile order"); end
    prev_key = key;
    if (tile_last) nlast++;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        int px, py;
        px = 8 * int'(tile_tx) + i; py = 8 * int'(tile_ty) + j;
        if (px >= int'(tile_sl[j]) && px < int'(tile_sr[j])) begin
          checks++;
          if (!cov[py][px]) begin failures++; if (failures < 10) $display("FAIL extra/duplicate pixel %0d,%0d", px, py); end
          cov[py][px] = 0;
        end
      end
  end

  always @(negedge clk) tile_ready = ($urandom % 4) != 0;

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      int y0, y1, s, left;
      s = p % 2;
      y0 = $urandom % 1000; y1 = (p % 10 == 9) ? y0 : y0 + 1 + $urandom % 70;
      if (y1 > 1024) y1 = 1024;
      for (int y = 0; y < 1024; y++) begin
        // lines outside [y0,y1) hold stale data that must be ignored
        ml[s][y] = $urandom % 1025; mr[s][y] = $urandom % 1025;
      end
      left = 0;
      for (int y = y0; y < y1; y++) begin
        int a, b;
        a = $urandom % 1000; b = a + ($urandom % 4 == 0 ? -($urandom % 3) : $urandom % 90);
        if (b > 1024) b = 1024;
        ml[s][y] = a; mr[s][y] = b;
        for (int x = a; x < b; x++) begin cov[y][x] = 1; left++; end
      end
      ntiles = 0; nlast = 0; prev_key = -1;
      @(negedge clk); start = 1; slot = 1'(s); ymin = CW'(y0); ymax = CW'(y1);
      @(negedge clk); start = 0;
      while (busy) @(negedge clk);
      checks++;
      if (nlast != 1) begin failures++; $display("FAIL polygon %0d: %0d last tiles", p, nlast); end
      checks++;
      if (y1 == y0 && ntiles != 1) begin failures++; $display("FAIL empty polygon gave %0d tiles", ntiles); end
      for (int y = y0; y < y1; y++)
        for (int x = 0; x < 1024; x++) if (cov[y][x]) begin
          checks++; failures++; cov[y][x] = 0;
          if (failures < 10) $display("FAIL pixel %0d,%0d not covered", x, y);
        end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
