// edge_buffer: double-buffered store of one side's edge position per row.
//
// Holds the x value written by an edge rasterizer for every scan line, for
// two polygons (slots) so that one polygon can be rasterized while the
// previous one is drawn, as the document's double-buffered rasterizer
// does. The rows of a tile row sit in TILE_H separate banks (bank = y mod
// TILE_H), so the tile walker reads the TILE_H edges of a whole tile row in
// one access. One write per clock; the read is synchronous (r_x is valid
// one clock after r_slot/r_ty).
module edge_buffer
  import accel_pkg::*;
#(
  parameter int unsigned ROWS   = 1024,
  parameter int unsigned TILE_H = 8
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic                          w_slot,
  input  logic [CW-1:0]                 w_y,
  input  logic [CW-1:0]                 w_x,
  input  logic                          r_slot,
  input  logic [CW-1:0]                 r_ty,
  output logic [TILE_H-1:0][CW-1:0]     r_x
);
  localparam int unsigned DEPTH = ROWS / TILE_H;
  localparam int unsigned BW    = $clog2(TILE_H);
  localparam int unsigned IW    = $clog2(DEPTH);

  for (genvar b = 0; b < TILE_H; b++) begin : g_bank
    logic [CW-1:0] mem [2][DEPTH];
    always_ff @(posedge clk) begin
      if (we && w_y[BW-1:0] == BW'(b)) mem[w_slot][IW'(w_y >> BW)] <= w_x;
      r_x[b] <= mem[r_slot][IW'(r_ty)];
    end
  end
endmodule
