// lr_arbiter: sorts a polygon's line segments into left and right edges.
//
// As in the document, the orientation of a segment decides its side. For a
// convex polygon wound clockwise on a y-down screen (this design's
// convention) a segment running downward (y1 > y0) is a right edge and one
// running upward a left edge; left edges are stored reversed so that every
// queued edge runs downward. Horizontal segments cover no scan line and are
// dropped. The last segment of a polygon also sends an end-of-polygon
// marker: carried on the edge itself for the side it goes to, as a bare
// marker for the other side. One segment per clock when neither queue is
// full.
module lr_arbiter
  import accel_pkg::*;
(
  input  logic  in_valid,
  output logic  in_ready,
  input  seg_t  seg,
  output logic  l_push,
  output edge_t l_ent,
  input  logic  l_full,
  output logic  r_push,
  output edge_t r_ent,
  input  logic  r_full
);
  logic down, up;
  edge_t e_down, e_up, marker;

  always_comb begin
    in_ready = !l_full && !r_full;
    down = seg.y1 > seg.y0;
    up   = seg.y1 < seg.y0;
    e_down = '{is_edge: 1'b1, last: seg.last, slot: seg.slot,
               x0: seg.x0, y0: seg.y0, x1: seg.x1, y1: seg.y1};
    e_up   = '{is_edge: 1'b1, last: seg.last, slot: seg.slot,
               x0: seg.x1, y0: seg.y1, x1: seg.x0, y1: seg.y0};
    marker = '{is_edge: 1'b0, last: 1'b1, slot: seg.slot, default: '0};
    l_ent  = up ? e_up : marker;
    r_ent  = down ? e_down : marker;
    l_push = in_valid && in_ready && (up || seg.last);
    r_push = in_valid && in_ready && (down || seg.last);
  end
endmodule
