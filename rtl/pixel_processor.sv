// pixel_processor: the quad-pixel pipeline.
//
// Four pixel_pipe instances work in lock step on one 2x2 quad per clock,
// the document's peak of four pixels per clock. The processor keeps the
// polygon data of both rasterizer slots (written by the setup controller),
// attaches it to each quad as it enters, and carries it, the quad position
// and the coverage mask down the six stages.
//
// Frame buffer: the quad in stage 3 reads its four old pixels (256 bits);
// the quad in stage 6 writes its four new pixels (256 bits) with a write
// enable per pixel that is the coverage mask ANDed with the depth test.
// Stages 1-3 hold, and a bubble enters stage 4, when
//   * the memory controller reports a bank conflict between this read and
//     the write in stage 6 (the write goes ahead), or
//   * the quad in stage 3 is still in stage 4, 5 or 6 from an earlier
//     polygon and not yet written (read-after-write hazard).
// The document names such stalls but not the policy; this is this design's.
// Texture reads come from stage 4 and are never stalled, as the document's
// idealised texture store allows.
// An assertion checks that no frame-buffer read is issued during a
// read-after-write hazard; being disabled in reset, it makes the lint tool
// report rst_n as both asynchronous reset and clocked signal. It is not
// logic, so that note stands.
module pixel_processor
  import accel_pkg::*;
#(
  parameter int unsigned PIPES  = 4,
  parameter int unsigned TEX_AW = 21
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // quads from the rasterizer
  input  logic                               quad_valid,
  output logic                               quad_ready,
  input  quad_t                              quad,
  // polygon data from the setup controller
  input  logic                               poly_we,
  input  logic                               poly_slot,
  input  poly_t                              poly,
  // texture store
  output logic [PIPES*8-1:0][TEX_AW-1:0]     tex_addr,
  input  logic [PIPES*8-1:0][31:0]           tex_data,
  // frame buffer
  output logic                               rd_en,
  output logic [QW-1:0]                      rd_qx,
  output logic [QW-1:0]                      rd_qy,
  input  logic [PIPES*64-1:0]                rd_data,
  input  logic                               conflict,
  output logic                               wr_en,
  output logic [QW-1:0]                      wr_qx,
  output logic [QW-1:0]                      wr_qy,
  output logic [PIPES*64-1:0]                wr_data,
  output logic [PIPES-1:0]                   wr_pmask,
  // status
  output logic                               busy,
  output logic                               stall_conflict,
  output logic                               stall_hazard
);
  typedef struct packed {
    logic [QW-1:0] qx, qy;
    logic [3:0]    mask;
    poly_t         poly;
  } stage_t;

  poly_t  slots [2];
  stage_t s1, s2, s3, s4, s5, s6;   // register feeding stage n
  logic   v1, v2, v3, v4, v5, v6;   // their valid bits
  logic   adv_front, hazard;

  always_ff @(posedge clk) begin
    if (poly_we) slots[poly_slot] <= poly;
  end

  always_comb begin
    hazard         = (v4 && s4.qx == s3.qx && s4.qy == s3.qy)
                  || (v5 && s5.qx == s3.qx && s5.qy == s3.qy)
                  || (v6 && s6.qx == s3.qx && s6.qy == s3.qy);
    rd_en          = v3 && !hazard;
    rd_qx          = s3.qx;
    rd_qy          = s3.qy;
    stall_hazard   = v3 && hazard;
    stall_conflict = rd_en && conflict;
    adv_front      = !(stall_hazard || stall_conflict);
    quad_ready     = adv_front;
    busy           = v1 || v2 || v3 || v4 || v5 || v6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0; v6 <= 1'b0;
    end else begin
      if (adv_front) begin
        v1 <= quad_valid;
        v2 <= v1;
        v3 <= v2;
      end
      v4 <= v3 && adv_front;
      v5 <= v4;
      v6 <= v5;
    end
  end

  always_ff @(posedge clk) begin
    if (adv_front) begin
      s1.qx <= quad.qx; s1.qy <= quad.qy; s1.mask <= quad.mask;
      s1.poly <= slots[quad.slot];
      s2 <= s1;
      s3 <= s2;
    end
    s4 <= s3;
    s5 <= s4;
    s6 <= s5;
  end

  logic [PIPES-1:0] pass;

  for (genvar i = 0; i < PIPES; i++) begin : g_pipe
    pixel_pipe #(.TEX_AW(TEX_AW)) u_pipe (
      .clk, .adv_front,
      .x(CW'({s1.qx, 1'b0}) + CW'(i % 2)), .y(CW'({s1.qy, 1'b0}) + CW'(i / 2)),
      .pl1(s1.poly.pl), .pl3(s3.poly.pl), .mode3(s3.poly.mode), .mode4(s4.poly.mode),
      .tex_addr_o(tex_addr[8*i +: 8]), .fb_rd(rd_data[64*i +: 64]),
      .tex_data(tex_data[8*i +: 8]), .mode6(s6.poly.mode),
      .fb_wr(wr_data[64*i +: 64]), .pass(pass[i])
    );
  end

  assign wr_en    = v6;
  assign wr_qx    = s6.qx;
  assign wr_qy    = s6.qy;
  assign wr_pmask = s6.mask & pass;

  // the frame-buffer read of a quad must never overtake its pending write
  a_no_raw: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !hazard);
endmodule
