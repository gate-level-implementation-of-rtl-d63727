// tex_addr: mip level selection and texel addressing for one pixel.
//
// The level of detail (signed 8.8) picks the two adjacent mip levels
// L0 = clamp(floor(lod), 0, levels) and L1 = min(L0 + 1, levels), with the
// fraction of lod as the weight between them (0 when magnifying or beyond
// the last level). Level k of a 2^lw x 2^lh texture is (2^lw >> k) x
// (2^lh >> k) texels (at least 1), stored row by row right after level
// k-1, starting at tex_base. For each level the sample point, given as the
// 16-bit fraction of u and v (the texture repeats), is scaled to texels and
// moved half a texel so that the four texels around it are (iu,iv),
// (iu+1,iv), (iu,iv+1), (iu+1,iv+1), wrapped at the level's edges; the
// 8-bit fractions fu, fv weight them. Output order: texel 4*l + k for level
// l in {L0, L1}, k as listed. The memory layout and the addressing are this
// design's choices; the document gives the function.
module tex_addr
  import accel_pkg::*;
#(
  parameter int unsigned TEX_AW = 21
) (
  input  logic [15:0]              u16,
  input  logic [15:0]              v16,
  input  logic signed [15:0]       lod,
  input  polymode_t                mode,
  output logic [7:0][TEX_AW-1:0]   addr,
  output logic [1:0][7:0]          fu,
  output logic [1:0][7:0]          fv,
  output logic [7:0]               flod
);
  logic [3:0] lvl [2];
  logic [3:0]         lw, lh, kw, kh;
  logic [TEX_AW-1:0]  off;
  logic signed [31:0] tu, tv;
  logic [15:0]        iu, iv, iu1, iv1, mw, mh;

  always_comb begin
    kw = '0; kh = '0;
    if (lod < 0) begin
      lvl[0] = 4'd0; flod = 8'd0;
    end else if (lod[15:8] >= {4'd0, mode.levels}) begin
      lvl[0] = mode.levels; flod = 8'd0;
    end else begin
      lvl[0] = lod[11:8]; flod = lod[7:0];
    end
    lvl[1] = (lvl[0] == mode.levels) ? lvl[0] : lvl[0] + 4'd1;

    for (int l = 0; l < 2; l++) begin
      off = '0;
      for (int k = 0; k < 15; k++)
        if (4'(k) < lvl[l]) begin
          kw = (mode.log2w > 4'(k)) ? mode.log2w - 4'(k) : 4'd0;
          kh = (mode.log2h > 4'(k)) ? mode.log2h - 4'(k) : 4'd0;
          off = off + (TEX_AW'(1) << (5'(kw) + 5'(kh)));
        end
      lw  = (mode.log2w > lvl[l]) ? mode.log2w - lvl[l] : 4'd0;
      lh  = (mode.log2h > lvl[l]) ? mode.log2h - lvl[l] : 4'd0;
      tu  = signed'(32'({16'd0, u16}) << lw) - 32'sh8000;
      tv  = signed'(32'({16'd0, v16}) << lh) - 32'sh8000;
      mw  = (16'd1 << lw) - 16'd1;
      mh  = (16'd1 << lh) - 16'd1;
      iu  = tu[31:16] & mw;
      iv  = tv[31:16] & mh;
      iu1 = (iu + 16'd1) & mw;
      iv1 = (iv + 16'd1) & mh;
      fu[l] = tu[15:8];
      fv[l] = tv[15:8];
      addr[4*l+0] = mode.tex_base + off + TEX_AW'((32'(iv)  << lw) + 32'(iu));
      addr[4*l+1] = mode.tex_base + off + TEX_AW'((32'(iv)  << lw) + 32'(iu1));
      addr[4*l+2] = mode.tex_base + off + TEX_AW'((32'(iv1) << lw) + 32'(iu));
      addr[4*l+3] = mode.tex_base + off + TEX_AW'((32'(iv1) << lw) + 32'(iu1));
    end
  end
endmodule
