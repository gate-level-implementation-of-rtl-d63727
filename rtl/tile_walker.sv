// tile_walker: vertical tile iterator, vertical tile coverage, temporary
// edges and horizontal tile iterator of the rasterizer.
//
// Once both edge rasterizers have finished a polygon, the walker steps
// through the tile rows the polygon covers (TILE_H scan lines each). For a
// tile row it reads the left and right edges of all TILE_H lines at once,
// keeps the lines' spans in temporary registers (empty outside the polygon
// or where left >= right), and takes the leftmost left and rightmost right
// edge as the row's coverage. It then hands the tiles of that coverage,
// left to right, to the pixel iterator, one per clock while it is ready, so
// pixels leave in tile order as the document describes. A tile row costs
// two clocks of reading (synchronous edge buffer) plus one clock per tile.
// A polygon that covers no scan line still produces one empty tile marked
// last, so the end of every polygon reaches the pixel iterator.
module tile_walker
  import accel_pkg::*;
#(
  parameter int unsigned TILE_W = 8,
  parameter int unsigned TILE_H = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      slot,
  input  logic [CW-1:0]             ymin,
  input  logic [CW-1:0]             ymax,
  output logic                      busy,
  // edge buffer read
  output logic                      r_slot,
  output logic [CW-1:0]             r_ty,
  input  logic [TILE_H-1:0][CW-1:0] l_x,
  input  logic [TILE_H-1:0][CW-1:0] r_x,
  // tiles to the pixel iterator
  output logic                      tile_valid,
  input  logic                      tile_ready,
  output logic [CW-1:0]             tile_tx,
  output logic [CW-1:0]             tile_ty,
  output logic [TILE_H-1:0][CW-1:0] tile_sl,
  output logic [TILE_H-1:0][CW-1:0] tile_sr,
  output logic                      tile_slot,
  output logic                      tile_last
);
  localparam int unsigned WB = $clog2(TILE_W);
  localparam int unsigned HB = $clog2(TILE_H);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_COV, S_HORIZ} state_t;
  state_t state;

  logic [CW-1:0]             ty, ty_end, tx, tx_end, y0, y1;
  logic [TILE_H-1:0][CW-1:0] tmp_l, tmp_r;   // temporary edges

  // vertical tile coverage of the tile row just read
  logic [TILE_H-1:0][CW-1:0] c_l, c_r;
  logic [CW-1:0]             c_xmin, c_xmax;
  logic                      c_any;

  always_comb begin
    c_any  = 1'b0;
    c_xmin = '1;
    c_xmax = '0;
    for (int i = 0; i < TILE_H; i++) begin
      logic [CW-1:0] yy;
      yy = CW'((ty << HB) + CW'(i));
      if (yy >= y0 && yy < y1 && l_x[i] < r_x[i]) begin
        c_l[i] = l_x[i];
        c_r[i] = r_x[i];
        c_any  = 1'b1;
        if (l_x[i] < c_xmin) c_xmin = l_x[i];
        if (r_x[i] > c_xmax) c_xmax = r_x[i];
      end else begin
        c_l[i] = '0;
        c_r[i] = '0;
      end
    end
  end

  assign busy       = (state != S_IDLE);
  assign r_ty       = ty;
  assign tile_valid = (state == S_HORIZ);
  assign tile_tx    = tx;
  assign tile_ty    = ty;
  assign tile_sl    = tmp_l;
  assign tile_sr    = tmp_r;
  assign tile_last  = (tx == tx_end) && (ty == ty_end);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ty <= '0; ty_end <= '0; tx <= '0; tx_end <= '0;
      y0 <= '0; y1 <= '0; r_slot <= 1'b0; tile_slot <= 1'b0;
      tmp_l <= '0; tmp_r <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          r_slot <= slot; tile_slot <= slot;
          y0 <= ymin; y1 <= ymax;
          if (ymin < ymax) begin
            ty     <= ymin >> HB;
            ty_end <= (ymax - 1'b1) >> HB;
            state  <= S_RD;
          end else begin
            // nothing to draw: one empty last tile
            ty <= '0; ty_end <= '0; tx <= '0; tx_end <= '0;
            tmp_l <= '0; tmp_r <= '0;
            state <= S_HORIZ;
          end
        end
        S_RD: state <= S_COV;
        S_COV: begin
          tmp_l <= c_l;
          tmp_r <= c_r;
          if (c_any) begin
            tx     <= c_xmin >> WB;
            tx_end <= (c_xmax - 1'b1) >> WB;
            state  <= S_HORIZ;
          end else if (ty == ty_end) begin
            tx <= '0; tx_end <= '0;      // empty last tile closes the polygon
            state <= S_HORIZ;
          end else begin
            ty    <= ty + 1'b1;
            state <= S_RD;
          end
        end
        S_HORIZ: if (tile_ready) begin
          if (tx != tx_end) tx <= tx + 1'b1;
          else if (ty == ty_end) state <= S_IDLE;
          else begin
            ty    <= ty + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
