// accel_top: display-list-driven 3D accelerator with a quad-pixel
// pipeline.
//
// Data flow, as in the document's system diagram: the setup controller
// reads polygon records from the display list ROM, loads each polygon's
// plane equations and texture/mode fields into the pixel processor and
// sends the polygon outline as line segments to the rasterizer. The
// double-buffered rasterizer produces covered 2x2 quads in tile order. The
// pixel processor shades four pixels per clock (perspective-correct
// diffuse and specular colour, trilinear mip-mapped texture from the
// texture ROM, alpha compositing, 24-bit floating-point Z test) and reads
// and writes the frame buffer through the memory controller, 2 x 128 bits
// each way per clock over eight eDRAM banks.
//
// Use: load the display list (dl_ld_*) and textures (tex_ld_*), clear the
// frame buffer through the host port, pulse `start`, wait for `busy` to
// fall, read the frame buffer back through the host port. The host port is
// granted only to banks the pixel pipeline does not use that clock.
// stall_conflict and stall_hazard pulse for each clock the pixel pipeline's
// front stages hold.
module accel_top
  import accel_pkg::*;
#(
  parameter int unsigned DL_AW   = 16,
  parameter int unsigned TEX_AW  = 21,
  parameter int unsigned BANK_AW = 16,
  parameter int unsigned TILE_W  = 8,
  parameter int unsigned TILE_H  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  // display list preload
  input  logic              dl_ld_we,
  input  logic [DL_AW-1:0]  dl_ld_addr,
  input  logic [31:0]       dl_ld_data,
  // texture preload
  input  logic              tex_ld_we,
  input  logic [TEX_AW-1:0] tex_ld_addr,
  input  logic [31:0]       tex_ld_data,
  // frame buffer host port
  input  logic              host_req,
  input  logic              host_we,
  input  logic [CW-2:0]     host_x,
  input  logic [CW-2:0]     host_y,
  input  logic [63:0]       host_wdata,
  output logic              host_gnt,
  output logic [63:0]       host_rdata,
  // activity
  output logic              quad_fire,
  output logic              stall_conflict,
  output logic              stall_hazard
);
  localparam int unsigned PIPES = 4;

  logic [DL_AW-1:0] dl_addr;
  logic [31:0]      dl_data;

  display_list_rom #(.AW(DL_AW)) u_dl (
    .clk, .rd_addr(dl_addr), .rd_data(dl_data),
    .ld_we(dl_ld_we), .ld_addr(dl_ld_addr), .ld_data(dl_ld_data)
  );

  logic       su_busy, poly_we, poly_slot, seg_valid, seg_ready;
  poly_t      poly;
  seg_t       seg;
  logic [1:0] slot_free;

  setup_controller #(.AW(DL_AW)) u_setup (
    .clk, .rst_n, .start, .busy(su_busy), .dl_addr, .dl_data, .slot_free,
    .poly_we, .poly_slot, .poly, .seg_valid, .seg_ready, .seg
  );

  logic  quad_valid, quad_ready, ra_busy;
  quad_t quad;

  rasterizer #(.TILE_W(TILE_W), .TILE_H(TILE_H)) u_rast (
    .clk, .rst_n, .seg_valid, .seg_ready, .seg, .quad_valid, .quad_ready,
    .quad, .slot_free, .busy(ra_busy)
  );

  logic [PIPES*8-1:0][TEX_AW-1:0] tex_addr;
  logic [PIPES*8-1:0][31:0]       tex_data;
  logic                           rd_en, wr_en, conflict, pp_busy;
  logic [QW-1:0]                  rd_qx, rd_qy, wr_qx, wr_qy;
  logic [PIPES*64-1:0]            rd_data, wr_data;
  logic [PIPES-1:0]               wr_pmask;

  pixel_processor #(.PIPES(PIPES), .TEX_AW(TEX_AW)) u_pp (
    .clk, .rst_n, .quad_valid, .quad_ready, .quad, .poly_we, .poly_slot, .poly,
    .tex_addr, .tex_data, .rd_en, .rd_qx, .rd_qy, .rd_data, .conflict,
    .wr_en, .wr_qx, .wr_qy, .wr_data, .wr_pmask, .busy(pp_busy),
    .stall_conflict, .stall_hazard
  );

  texture_rom #(.AW(TEX_AW), .PORTS(PIPES * 8)) u_tex (
    .clk, .rd_en(1'b1), .rd_addr(tex_addr), .rd_data(tex_data),
    .ld_we(tex_ld_we), .ld_addr(tex_ld_addr), .ld_data(tex_ld_data)
  );

  memory_controller #(.BANK_AW(BANK_AW)) u_mc (
    .clk, .rst_n, .rd_en, .rd_qx, .rd_qy, .rd_data, .conflict,
    .wr_en, .wr_qx, .wr_qy, .wr_data, .wr_pmask,
    .host_req, .host_we, .host_x, .host_y, .host_wdata, .host_gnt, .host_rdata
  );

  assign busy      = su_busy || ra_busy || pp_busy;
  assign quad_fire = quad_valid && quad_ready;
endmodule
