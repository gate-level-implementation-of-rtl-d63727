// tb_lr_arbiter: checks the side chosen for downward, upward and horizontal
// segments, the normalisation of left edges, the end markers and the
// back-pressure from full queues.
module tb_lr_arbiter;
  import accel_pkg::*;
  logic in_valid, in_ready, l_push, r_push, l_full, r_full;
  seg_t seg;
  edge_t l_ent, r_ent;
  int checks = 0, failures = 0;
  lr_arbiter dut (.*);

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int x0, y0, x1, y1;
      logic last;
      x0 = $urandom % 1025; x1 = $urandom % 1025;
      y0 = $urandom % 1025; y1 = (k % 5 == 0) ? y0 : $urandom % 1025;
      last = ($urandom % 3 == 0);
      seg = '{x0: CW'(x0), y0: CW'(y0), x1: CW'(x1), y1: CW'(y1), slot: 1'(k), last: last};
      in_valid = ($urandom % 8) != 0;
      l_full = ($urandom % 6) == 0; r_full = ($urandom % 6) == 0;
      #1;
      chk(in_ready == (!l_full && !r_full), "ready");
      if (in_valid && in_ready) begin
        chk(r_push == ((y1 > y0) || last), "right push");
        chk(l_push == ((y1 < y0) || last), "left push");
        if (y1 > y0) chk(r_ent.is_edge && r_ent.x0 == CW'(x0) && r_ent.y0 == CW'(y0) && r_ent.x1 == CW'(x1) && r_ent.y1 == CW'(y1) && r_ent.last == last && r_ent.slot == 1'(k), "right edge");
        if (y1 < y0) chk(l_ent.is_edge && l_ent.x0 == CW'(x1) && l_ent.y0 == CW'(y1) && l_ent.x1 == CW'(x0) && l_ent.y1 == CW'(y0) && l_ent.last == last, "left edge reversed");
        if (last && y1 >= y0) chk(!l_ent.is_edge && l_ent.last && l_ent.slot == 1'(k), "left marker");
        if (last && y1 <= y0) chk(!r_ent.is_edge && r_ent.last, "right marker");
      end else begin
        chk(!l_push && !r_push, "no push");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
