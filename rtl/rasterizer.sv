// rasterizer: double-buffered convex polygon rasterizer.
//
// Line segments from the setup controller are sorted into left and right
// edges (lr_arbiter), queued (edge_queue), and scan converted one row of a
// left edge and one row of a right edge per clock (edge_rasterizer) into
// double-buffered per-row edge stores (edge_buffer). When both sides of a
// polygon are done, the tile walker steps through its tiles and the pixel
// iterator emits covered 2x2 quads, so a polygon's edges are rasterized
// while the previous polygon's pixels are being drawn.
//
// Slots: each polygon occupies one of two slots, carried on its segments.
// slot_free[s] drops when a segment of slot s is accepted and rises when
// the pixel iterator has emitted the polygon's last quad. Polygons must be
// sent in alternating slots; the walker takes them in that order.
module rasterizer
  import accel_pkg::*;
#(
  parameter int unsigned TILE_W = 8,
  parameter int unsigned TILE_H = 8,
  parameter int unsigned QDEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       seg_valid,
  output logic       seg_ready,
  input  seg_t       seg,
  output logic       quad_valid,
  input  logic       quad_ready,
  output quad_t      quad,
  output logic [1:0] slot_free,
  output logic       busy
);
  logic  l_push, r_push, l_full, r_full, l_empty, r_empty, l_pop, r_pop;
  edge_t l_in, r_in, l_head, r_head;

  lr_arbiter u_arb (
    .in_valid(seg_valid), .in_ready(seg_ready), .seg,
    .l_push, .l_ent(l_in), .l_full, .r_push, .r_ent(r_in), .r_full
  );

  edge_queue #(.DEPTH(QDEPTH)) u_lq (
    .clk, .rst_n, .push(l_push), .din(l_in), .full(l_full),
    .pop(l_pop), .dout(l_head), .empty(l_empty)
  );
  edge_queue #(.DEPTH(QDEPTH)) u_rq (
    .clk, .rst_n, .push(r_push), .din(r_in), .full(r_full),
    .pop(r_pop), .dout(r_head), .empty(r_empty)
  );

  logic          l_we, r_we, l_wslot, r_wslot, l_done, r_done, l_dslot, r_dslot;
  logic [CW-1:0] l_wy, l_wx, r_wy, r_wx, l_ymin, l_ymax, r_ymin, r_ymax;

  edge_rasterizer u_lr (
    .clk, .rst_n, .q_empty(l_empty), .q_pop(l_pop), .ent(l_head),
    .we(l_we), .w_slot(l_wslot), .w_y(l_wy), .w_x(l_wx),
    .done(l_done), .done_slot(l_dslot), .ymin(l_ymin), .ymax(l_ymax)
  );
  edge_rasterizer u_rr (
    .clk, .rst_n, .q_empty(r_empty), .q_pop(r_pop), .ent(r_head),
    .we(r_we), .w_slot(r_wslot), .w_y(r_wy), .w_x(r_wx),
    .done(r_done), .done_slot(r_dslot), .ymin(r_ymin), .ymax(r_ymax)
  );

  logic                      rd_slot;
  logic [CW-1:0]             rd_ty;
  logic [TILE_H-1:0][CW-1:0] lb_x, rb_x;

  edge_buffer #(.ROWS(SCREEN_H), .TILE_H(TILE_H)) u_lbuf (
    .clk, .we(l_we), .w_slot(l_wslot), .w_y(l_wy), .w_x(l_wx),
    .r_slot(rd_slot), .r_ty(rd_ty), .r_x(lb_x)
  );
  edge_buffer #(.ROWS(SCREEN_H), .TILE_H(TILE_H)) u_rbuf (
    .clk, .we(r_we), .w_slot(r_wslot), .w_y(r_wy), .w_x(r_wx),
    .r_slot(rd_slot), .r_ty(rd_ty), .r_x(rb_x)
  );

  // polygon hand-over between the edge stage and the tile stage
  logic [1:0]          ldone, rdone, free;
  logic [1:0][CW-1:0]  lmin, lmax, rmin, rmax;
  logic                next_slot, w_busy, w_start;
  logic [CW-1:0]       s_ymin, s_ymax;

  always_comb begin
    s_ymin  = (lmin[next_slot] > rmin[next_slot]) ? lmin[next_slot] : rmin[next_slot];
    s_ymax  = (lmax[next_slot] < rmax[next_slot]) ? lmax[next_slot] : rmax[next_slot];
    w_start = !w_busy && ldone[next_slot] && rdone[next_slot];
  end

  logic                      t_valid, t_ready, t_slot, t_last;
  logic [CW-1:0]             t_tx, t_ty;
  logic [TILE_H-1:0][CW-1:0] t_sl, t_sr;
  logic                      rel_valid, rel_slot, pi_busy;

  tile_walker #(.TILE_W(TILE_W), .TILE_H(TILE_H)) u_walk (
    .clk, .rst_n, .start(w_start), .slot(next_slot), .ymin(s_ymin), .ymax(s_ymax),
    .busy(w_busy), .r_slot(rd_slot), .r_ty(rd_ty), .l_x(lb_x), .r_x(rb_x),
    .tile_valid(t_valid), .tile_ready(t_ready), .tile_tx(t_tx), .tile_ty(t_ty),
    .tile_sl(t_sl), .tile_sr(t_sr), .tile_slot(t_slot), .tile_last(t_last)
  );

  pixel_iterator #(.TILE_W(TILE_W), .TILE_H(TILE_H)) u_pix (
    .clk, .rst_n, .tile_valid(t_valid), .tile_ready(t_ready), .tile_tx(t_tx),
    .tile_ty(t_ty), .tile_sl(t_sl), .tile_sr(t_sr), .tile_slot(t_slot),
    .tile_last(t_last), .quad_valid, .quad_ready, .quad,
    .release_slot_valid(rel_valid), .release_slot(rel_slot), .busy(pi_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ldone <= '0; rdone <= '0; free <= 2'b11; next_slot <= 1'b0;
      lmin <= '0; lmax <= '0; rmin <= '0; rmax <= '0;
    end else begin
      if (l_done) begin
        ldone[l_dslot] <= 1'b1; lmin[l_dslot] <= l_ymin; lmax[l_dslot] <= l_ymax;
      end
      if (r_done) begin
        rdone[r_dslot] <= 1'b1; rmin[r_dslot] <= r_ymin; rmax[r_dslot] <= r_ymax;
      end
      if (w_start) begin
        ldone[next_slot] <= 1'b0; rdone[next_slot] <= 1'b0;
        next_slot <= ~next_slot;
      end
      if (rel_valid) free[rel_slot] <= 1'b1;
      if (seg_valid && seg_ready) free[seg.slot] <= 1'b0;
    end
  end

  assign slot_free = free;
  assign busy      = (free != 2'b11);
endmodule
