// edge_rasterizer: scan converts one edge, one scan line per clock.
//
// Used twice, for the left and the right edges. An edge from (x0,y0) down to
// (x1,y1) covers rows y0 <= y < y1 with pixel centres at integer
// coordinates. For each row it writes ceil(x(y)) into the edge buffer, so a
// pixel px of row y is inside the polygon when left <= px < right; the same
// rule on both sides of a shared edge leaves neither gaps nor overlaps.
// x(y) is stepped exactly: q = floor(dx/dy) and r = dx - q*dy are formed
// once per edge, then each row adds q and carries the remainder. A new edge
// is taken from the queue in the clock its predecessor's last row is
// written. At the end-of-polygon mark it pulses `done` with the polygon's
// slot and the rows its edges covered [ymin, ymax).
module edge_rasterizer
  import accel_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          q_empty,
  output logic          q_pop,
  input  edge_t         ent,
  output logic          we,
  output logic          w_slot,
  output logic [CW-1:0] w_y,
  output logic [CW-1:0] w_x,
  output logic          done,
  output logic          done_slot,
  output logic [CW-1:0] ymin,
  output logic [CW-1:0] ymax
);
  logic                 walking, last, slot;
  logic signed [CW+1:0] x, q;
  logic [CW-1:0]        y, y1, r, dy, acc;
  logic [CW-1:0]        pmin, pmax;
  logic                 finishing, take;

  // per-edge step computed from the queue head
  logic [CW-1:0]        n_dy, adx, qa, ra;
  logic signed [CW+1:0] n_q, dx;
  logic [CW-1:0]        n_r;

  always_comb begin
    dx   = $signed({2'b00, ent.x1}) - $signed({2'b00, ent.x0});
    n_dy = ent.y1 - ent.y0;
    adx  = dx[CW+1] ? CW'(-dx) : CW'(dx);
    qa   = (n_dy == '0) ? '0 : adx / n_dy;
    ra   = (n_dy == '0) ? '0 : adx % n_dy;
    if (!dx[CW+1])      begin n_q = $signed({2'b00, qa});          n_r = ra;        end
    else if (ra == '0)  begin n_q = -$signed({2'b00, qa});         n_r = '0;        end
    else                begin n_q = -$signed({2'b00, qa}) - (CW+2)'(1); n_r = n_dy - ra; end
  end

  assign finishing = walking && (y + 1'b1 == y1);
  assign take      = (!walking || finishing) && !(finishing && last);
  assign q_pop     = take && !q_empty;
  assign we        = walking;
  assign w_slot    = slot;
  assign w_y       = y;
  assign w_x       = CW'(x + ((acc != '0) ? 1 : 0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walking <= 1'b0; last <= 1'b0; slot <= 1'b0;
      x <= '0; q <= '0; y <= '0; y1 <= '0; r <= '0; dy <= '0; acc <= '0;
      pmin <= '1; pmax <= '0;
      done <= 1'b0; done_slot <= 1'b0; ymin <= '0; ymax <= '0;
    end else begin
      done <= 1'b0;
      if (walking) begin
        y <= y + 1'b1;
        if (acc + r >= dy) begin acc <= acc + r - dy; x <= x + q + (CW+2)'(1); end
        else               begin acc <= acc + r;      x <= x + q;         end
        if (finishing) begin
          walking <= 1'b0;
          if (last) begin
            done <= 1'b1; done_slot <= slot; ymin <= pmin; ymax <= pmax;
            pmin <= '1; pmax <= '0; last <= 1'b0;
          end
        end
      end
      if (q_pop) begin
        slot <= ent.slot;
        if (ent.is_edge) begin
          walking <= 1'b1;
          last <= ent.last;
          x <= $signed({2'b00, ent.x0}); q <= n_q; r <= n_r; dy <= n_dy; acc <= '0;
          y <= ent.y0; y1 <= ent.y1;
          if (ent.y0 < pmin) pmin <= ent.y0;
          if (ent.y1 > pmax) pmax <= ent.y1;
        end else begin
          done <= 1'b1; done_slot <= ent.slot; ymin <= pmin; ymax <= pmax;
          pmin <= '1; pmax <= '0;
        end
      end
    end
  end
endmodule
