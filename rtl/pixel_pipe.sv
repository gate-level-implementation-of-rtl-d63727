// pixel_pipe: one of the four pixel pipelines (the document's fig.
// "pixel rendering pipeline", one pixel of a quad).
//
// Stages, one clock each, register names R2..R6 after the stage they feed:
//  1  1/z eval   : pixel x, y to float; ten plane evaluators give 1/z,
//                  u/z, v/z, diffuse RGBA/z and specular RGB/z      -> R2
//  2  divide     : z = 1/(1/z) with the table-and-iteration reciprocal -> R3
//  3  LOD / diffuse-specular eval : attributes = (attribute/z) * z,
//                  level of detail from the analytic derivatives;
//                  the quad's frame-buffer read is issued here        -> R4
//  4  texture mip & address : u, v to fixed point, eight texel
//                  addresses to the texture store, colours to 8 bits;
//                  the frame-buffer pixel arrives here                -> R5
//  5  texture filtering : trilinear blend of the eight texels          -> R6
//  6  colour blending / Z test : final colour and depth test; the
//                  quad's write leaves from here
// The stage order is the document's. Stages 1-3 (R2, R3) advance only with
// adv_front, so the pixel processor can hold a quad whose frame-buffer read
// cannot go ahead; R4..R6 advance every clock. Polygon data for each stage
// comes from the pixel processor, which carries it alongside the quad.
module pixel_pipe
  import accel_pkg::*;
#(
  parameter int unsigned TEX_AW = 21
) (
  input  logic                     clk,
  input  logic                     adv_front,
  // stage 1 inputs
  input  logic [CW-1:0]            x,
  input  logic [CW-1:0]            y,
  input  plane_t [NPLANES-1:0]     pl1,
  // stage 3 inputs
  input  plane_t [NPLANES-1:0]     pl3,
  input  polymode_t                mode3,
  // stage 4
  input  polymode_t                mode4,
  output logic [7:0][TEX_AW-1:0]   tex_addr_o,
  input  logic [63:0]              fb_rd,        // old pixel, during stage 4
  // stage 5
  input  logic [7:0][31:0]         tex_data,     // texels, during stage 5
  // stage 6
  input  polymode_t                mode6,
  output logic [63:0]              fb_wr,
  output logic                     pass
);
  // ---------------- stage 1: plane evaluation
  float_t                 fx, fy;
  float_t [NPLANES-1:0]   val1;
  int_to_fp #(.IN_W(CW+1)) u_fx (.i(signed'({1'b0, x})), .y(fx));
  int_to_fp #(.IN_W(CW+1)) u_fy (.i(signed'({1'b0, y})), .y(fy));
  for (genvar p = 0; p < NPLANES; p++) begin : g_plane
    plane_eval u_pe (.pl(pl1[p]), .x(fx), .y(fy), .p(val1[p]));
  end

  float_t [NPLANES-1:0] r2_val;
  always_ff @(posedge clk) if (adv_front) r2_val <= val1;

  // ---------------- stage 2: divide
  float_t z2;
  fp_recip u_div (.a(r2_val[PL_Q]), .y(z2));

  float_t [NPLANES-1:0] r3_val;
  float_t               r3_z;
  always_ff @(posedge clk) if (adv_front) begin
    r3_val <= r2_val;
    r3_z   <= z2;
  end

  // ---------------- stage 3: attributes and level of detail
  float_t [NPLANES-1:0] attr3;
  logic signed [15:0]   lod3;
  assign attr3[PL_Q] = r3_z;
  for (genvar p = 1; p < NPLANES; p++) begin : g_attr
    fp_mul u_m (.a(r3_val[p]), .b(r3_z), .y(attr3[p]));
  end
  lod_calc u_lod (
    .z(r3_z), .u(attr3[PL_U]), .v(attr3[PL_V]), .pq(pl3[PL_Q]), .pu(pl3[PL_U]),
    .pv(pl3[PL_V]), .log2w(mode3.log2w), .log2h(mode3.log2h), .lod(lod3)
  );

  float_t [NPLANES-1:0] r4_attr;
  logic signed [15:0]   r4_lod;
  always_ff @(posedge clk) begin
    r4_attr <= attr3;
    r4_lod  <= lod3;
  end

  // ---------------- stage 4: texture address, colour conversion
  logic signed [31:0] u_fix, v_fix;
  logic [1:0][7:0]    fu4, fv4;
  logic [7:0]         flod4;
  logic [6:0][7:0]    col4;     // diffuse R,G,B,A then specular R,G,B
  fp_to_fix #(.FRAC(16), .OUT_W(32)) u_cu (.a(r4_attr[PL_U]), .y(u_fix));
  fp_to_fix #(.FRAC(16), .OUT_W(32)) u_cv (.a(r4_attr[PL_V]), .y(v_fix));
  tex_addr #(.TEX_AW(TEX_AW)) u_ta (
    .u16(u_fix[15:0]), .v16(v_fix[15:0]), .lod(r4_lod), .mode(mode4),
    .addr(tex_addr_o), .fu(fu4), .fv(fv4), .flod(flod4)
  );
  for (genvar c = 0; c < 7; c++) begin : g_col
    logic signed [15:0] cf;
    fp_to_fix #(.FRAC(8), .OUT_W(16)) u_cc (.a(r4_attr[PL_DR + c]), .y(cf));
    assign col4[c] = (cf < 0) ? 8'd0 : (cf > 16'sd255) ? 8'd255 : cf[7:0];
  end

  logic [1:0][7:0] r5_fu, r5_fv;
  logic [7:0]      r5_flod;
  logic [6:0][7:0] r5_col;
  float_t          r5_z;
  logic [63:0]     r5_old;
  always_ff @(posedge clk) begin
    r5_fu <= fu4; r5_fv <= fv4; r5_flod <= flod4;
    r5_col <= col4; r5_z <= r4_attr[PL_Q]; r5_old <= fb_rd;
  end

  // ---------------- stage 5: texture filtering
  logic [31:0] tex5;
  tex_filter u_tf (.texel(tex_data), .fu(r5_fu), .fv(r5_fv), .flod(r5_flod), .rgba(tex5));

  logic [31:0]     r6_tex;
  logic [6:0][7:0] r6_col;
  float_t          r6_z;
  logic [63:0]     r6_old;
  always_ff @(posedge clk) begin
    r6_tex <= tex5; r6_col <= r5_col; r6_z <= r5_z; r6_old <= r5_old;
  end

  // ---------------- stage 6: colour blending and Z test
  pixel_t      old6;
  logic [31:0] rgba6;
  logic [23:0] z24;
  assign old6 = pixel_t'(r6_old);
  color_blend u_cb (
    .tex(r6_tex), .diff({r6_col[0], r6_col[1], r6_col[2], r6_col[3]}),
    .spec({r6_col[4], r6_col[5], r6_col[6]}), .dst(old6.rgba),
    .tex_en(mode6.tex_en), .blend_en(mode6.blend_en), .rgba(rgba6)
  );
  z_test u_zt (.z(r6_z), .zbuf(old6.z), .ztest_en(mode6.ztest_en), .z24(z24), .pass(pass));
  assign fb_wr = {8'h00, mode6.zwrite_en ? z24 : old6.z, rgba6};
endmodule
