// pixel_iterator: turns a tile into 2x2 pixel quads, one quad per clock.
//
// A tile of TILE_W x TILE_H pixels holds (TILE_W/2)*(TILE_H/2) quads. When
// a tile is accepted the coverage mask of every quad is formed from the
// tile's per-line spans (pixel px of line j is covered when
// sl[j] <= px < sr[j]); quads with no covered pixel are skipped, so the
// pixel processor receives four pixel positions per clock whenever the
// tile has work. Quads leave in row-major order inside the tile. The next
// tile is accepted in the same clock as the current tile's last quad.
// When the tile marked last of a polygon is finished, `release` frees the
// polygon's double-buffer slot.
module pixel_iterator
  import accel_pkg::*;
#(
  parameter int unsigned TILE_W = 8,
  parameter int unsigned TILE_H = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tile_valid,
  output logic                      tile_ready,
  input  logic [CW-1:0]             tile_tx,
  input  logic [CW-1:0]             tile_ty,
  input  logic [TILE_H-1:0][CW-1:0] tile_sl,
  input  logic [TILE_H-1:0][CW-1:0] tile_sr,
  input  logic                      tile_slot,
  input  logic                      tile_last,
  output logic                      quad_valid,
  input  logic                      quad_ready,
  output quad_t                     quad,
  output logic                      release_slot_valid,
  output logic                      release_slot,
  output logic                      busy
);
  localparam int unsigned QX = TILE_W / 2;
  localparam int unsigned QY = TILE_H / 2;
  localparam int unsigned NQ = QX * QY;
  localparam int unsigned WB = $clog2(TILE_W);
  localparam int unsigned HB = $clog2(TILE_H);

  logic                  have, last, slot;
  logic [CW-1:0]         tx, ty;
  logic [NQ-1:0]         rem;
  logic [NQ-1:0][3:0]    qmask, in_mask;
  logic [NQ-1:0]         in_nz;
  logic [$clog2(NQ)-1:0] sel;
  logic [NQ-1:0]         rem_next;
  logic                  finishing;

  // coverage of every quad of the incoming tile
  always_comb begin
    for (int qi = 0; qi < NQ; qi++) begin
      for (int p = 0; p < 4; p++) begin
        logic [CW-1:0] px;
        int            line;
        px   = CW'((tile_tx << WB) + CW'(2 * (qi % QX) + (p % 2)));
        line = 2 * (qi / QX) + (p / 2);
        in_mask[qi][p] = (px >= tile_sl[line]) && (px < tile_sr[line]);
      end
      in_nz[qi] = |in_mask[qi];
    end
  end

  always_comb begin
    sel = '0;
    for (int qi = NQ - 1; qi >= 0; qi--)
      if (rem[qi]) sel = ($clog2(NQ))'(qi);
    rem_next = rem & ~(NQ'(1) << sel);
  end

  assign quad_valid = have && (rem != '0);
  assign quad.qx    = QW'((tx << (WB - 1)) + CW'(sel % QX));
  assign quad.qy    = QW'((ty << (HB - 1)) + CW'(sel / QX));
  assign quad.mask  = qmask[sel];
  assign quad.slot  = slot;
  assign finishing  = have && ((rem == '0) || (quad_ready && rem_next == '0));
  assign tile_ready = !have || finishing;
  assign busy       = have;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0; last <= 1'b0; slot <= 1'b0; tx <= '0; ty <= '0;
      rem <= '0; qmask <= '0;
      release_slot_valid <= 1'b0; release_slot <= 1'b0;
    end else begin
      release_slot_valid <= finishing && last;
      release_slot       <= slot;
      if (quad_valid && quad_ready) rem <= rem_next;
      if (finishing) have <= 1'b0;
      if (tile_valid && tile_ready) begin
        have <= 1'b1; last <= tile_last; slot <= tile_slot;
        tx <= tile_tx; ty <= tile_ty;
        rem <= in_nz; qmask <= in_mask;
      end
    end
  end
endmodule
