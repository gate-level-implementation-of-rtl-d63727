// tb_edge_rasterizer: feeds random edges, grouped into polygons, through a
// model queue and checks every edge-buffer write (row and ceil(x) for each
// scan line, one per clock) and every end-of-polygon report (slot and
// covered rows), including polygons with no edge on this side.
module tb_edge_rasterizer;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic q_empty, q_pop, we, w_slot, done, done_slot;
  logic [CW-1:0] w_y, w_x, ymin, ymax;
  edge_t ent;
  int checks = 0, failures = 0;
  edge_rasterizer dut (.*);

  typedef struct { int y, x, slot; } wr_t;
  typedef struct { int slot, ymin, ymax; } dn_t;
  edge_t q [$];
  wr_t   ew [$];
  dn_t   ed [$];
  int    nwr = 0, cycles = 0;

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (we) begin
      wr_t e;
      checks++; nwr++;
      e = ew.pop_front();
      if (int'(w_y) != e.y || int'(w_x) != e.x || int'(w_slot) != e.slot) begin
        failures++;
        if (failures < 10) $display("FAIL write y=%0d x=%0d (exp y=%0d x=%0d)", w_y, w_x, e.y, e.x);
      end
    end
    if (done) begin
      dn_t d;
      checks++;
      d = ed.pop_front();
      if (int'(done_slot) != d.slot || int'(ymin) != d.ymin || int'(ymax) != d.ymax) begin
        failures++; $display("FAIL done slot=%0d %0d..%0d exp %0d..%0d", done_slot, ymin, ymax, d.ymin, d.ymax);
      end
    end
    if (q_pop) void'(q.pop_front());
  end

  always @(negedge clk) begin
    q_empty = (q.size() == 0) || ($urandom % 10 == 0);
    ent     = (q.size() != 0) ? q[0] : '0;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int ne, mn, mx;
      logic marker;
      ne = $urandom % 4;
      marker = (ne == 0) || ($urandom % 2);
      mn = 2047; mx = 0;
      for (int e = 0; e < ne; e++) begin
        int x0, x1, y0, y1;
        edge_t en;
        x0 = $urandom % 1025; x1 = $urandom % 1025;
        y0 = $urandom % 1000; y1 = y0 + 1 + $urandom % ((p % 3 == 0) ? 3 : 60);
        en = '{is_edge: 1'b1, last: (e == ne - 1) && !marker, slot: 1'(p),
               x0: CW'(x0), y0: CW'(y0), x1: CW'(x1), y1: CW'(y1)};
        q.push_back(en);
        for (int y = y0; y < y1; y++) begin
          int num;
          num = x0 * (y1 - y0) + (x1 - x0) * (y - y0);
          ew.push_back('{y: y, x: (num + (y1 - y0) - 1) / (y1 - y0), slot: p % 2});
        end
        if (y0 < mn) mn = y0;
        if (y1 > mx) mx = y1;
      end
      if (marker) q.push_back('{is_edge: 1'b0, last: 1'b1, slot: 1'(p), default: '0});
      ed.push_back('{slot: p % 2, ymin: mn, ymax: mx});
    end
    begin
      int exp_wr;
      exp_wr = ew.size();
      while (ed.size() != 0 && cycles < 500000) @(negedge clk);
      repeat (5) @(negedge clk);
      checks++;
      if (ew.size() != 0 || ed.size() != 0) begin failures++; $display("FAIL missing %0d writes %0d dones", ew.size(), ed.size()); end
      checks++;
      // one row per clock: allow the 10% queue-empty bubbles plus one clock per edge
      if (cycles > exp_wr * 13 / 10 + 1000) begin failures++; $display("FAIL rate %0d writes in %0d clocks", exp_wr, cycles); end
      $display("rate: %0d rows in %0d clocks", exp_wr, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
