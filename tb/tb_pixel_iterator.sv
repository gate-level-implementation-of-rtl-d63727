// tb_pixel_iterator: feeds random tiles (random spans, some full, some
// empty) and checks that the quads cover exactly the tiles' pixels, each
// once, never with an empty mask, that each polygon's slot is released
// once after its last tile, and that full tiles stream at one quad per
// clock.
module tb_pixel_iterator;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tile_valid = 0, tile_ready, tile_slot, tile_last;
  logic [CW-1:0] tile_tx, tile_ty;
  logic [7:0][CW-1:0] tile_sl, tile_sr;
  logic quad_valid, quad_ready, release_slot_valid, release_slot, busy;
  quad_t quad;
  int checks = 0, failures = 0;
  pixel_iterator #(.TILE_W(8), .TILE_H(8)) dut (.*);

  bit cov [128][128];
  int rel [$];
  int nq = 0, nrel = 0;
  bit rdy_random = 1;

  always @(negedge clk) quad_ready = rdy_random ? (($urandom % 4) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (quad_valid && quad_ready) begin
      nq++;
      checks++;
      if (quad.mask == 0) begin failures++; $display("FAIL empty quad"); end
      for (int p = 0; p < 4; p++) if (quad.mask[p]) begin
        int px, py;
        px = 2 * int'(quad.qx) + p % 2; py = 2 * int'(quad.qy) + p / 2;
        if (px >= 128 || py >= 128 || !cov[py][px]) begin
          failures++; if (failures < 10) $display("FAIL pixel %0d,%0d", px, py);
        end else cov[py][px] = 0;
      end
    end
    if (release_slot_valid) begin
      int e;
      checks++; nrel++;
      e = rel.pop_front();
      if (int'(release_slot) != e) begin failures++; $display("FAIL release slot"); end
    end
  end

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(int tx, int ty, int s, bit last, int kind);
    @(negedge clk);
    tile_valid = 1; tile_tx = CW'(tx); tile_ty = CW'(ty); tile_slot = 1'(s); tile_last = last;
    for (int j = 0; j < 8; j++) begin
      int a, b;
      if (kind == 0) begin a = 8 * tx; b = 8 * tx + 8; end
      else if (kind == 1) begin a = 0; b = 0; end
      else begin a = 8 * tx - 3 + $urandom % 12; b = a + int'($urandom % 12) - 2; if (a < 0) a = 0; if (b < 0) b = 0; end
      tile_sl[j] = CW'(a); tile_sr[j] = CW'(b);
      for (int x = 8 * tx; x < 8 * tx + 8; x++) if (x >= a && x < b) cov[8 * ty + j][x] = 1;
    end
    if (last) rel.push_back(s);
    @(posedge clk);
    while (!tile_ready) @(posedge clk);
    #1 tile_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int ty = 0; ty < 16; ty++)
        for (int tx = 0; tx < 16; tx++) begin
          send(tx, ty, (ty / 2) % 2, (ty % 2 == 1) && (tx == 15), (tx * 7 + ty * 3 + r) % 3);
          if (tx == 15 && ty % 2 == 1) begin
            while (busy) @(negedge clk);
            repeat (3) @(negedge clk);
            for (int y = 0; y < 128; y++) for (int x = 0; x < 128; x++) if (cov[y][x]) begin
              checks++; failures++; cov[y][x] = 0;
              if (failures < 10) $display("FAIL pixel %0d,%0d missed", x, y);
            end
            checks++;
          end
        end
    // rate: 16 full tiles with quad_ready held high
    rdy_random = 0;
    @(negedge clk);
    t0 = nq;
    fork
      for (int tx = 0; tx < 16; tx++) send(tx, 0, 0, tx == 15, 0);
    join_none
    repeat (16 * 16 + 2) @(negedge clk);
    checks++;
    if (nq - t0 < 16 * 16) begin failures++; $display("FAIL rate: %0d quads in %0d clocks", nq - t0, 16 * 16 + 2); end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (rel.size() != 0) begin failures++; $display("FAIL %0d releases missing", rel.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
