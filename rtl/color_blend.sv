// color_blend: final colour of one pixel.
//
// The diffuse colour is modulated by the filtered texture (when texturing
// is on), the specular colour is added on top with saturation, and with
// blending on the result is composited over the frame-buffer colour using
// its alpha: out = src * A + dst * (1 - A), A = alpha/255 approximated as
// (alpha + alpha[7]) / 256. Modulation is a * (b + 1) / 256. The order
// (texture times diffuse, then specular, then compositing) follows the
// document; the arithmetic is this design's. Colours are 8-bit RGBA with R
// in the top byte. Combinational.
module color_blend (
  input  logic [31:0] tex,
  input  logic [31:0] diff,
  input  logic [23:0] spec,
  input  logic [31:0] dst,
  input  logic        tex_en,
  input  logic        blend_en,
  output logic [31:0] rgba
);
  always_comb begin
    logic [7:0] base [4];
    logic [8:0] a9;
    for (int c = 0; c < 4; c++) begin
      logic [15:0] m;
      m = 16'(tex[8*c +: 8]) * (16'(diff[8*c +: 8]) + 16'd1);
      base[c] = tex_en ? m[15:8] : diff[8*c +: 8];
    end
    // specular on R, G, B (bytes 3..1)
    for (int c = 1; c < 4; c++) begin
      logic [8:0] s;
      s = 9'(base[c]) + 9'(spec[8*(c-1) +: 8]);
      base[c] = s[8] ? 8'hFF : s[7:0];
    end
    a9 = 9'(base[0]) + 9'(base[0][7]);
    rgba[7:0] = base[0];
    for (int c = 1; c < 4; c++) begin
      logic [16:0] b;
      b = 17'(base[c]) * 17'(a9) + 17'(dst[8*c +: 8]) * (17'd256 - 17'(a9));
      rgba[8*c +: 8] = blend_en ? b[15:8] : base[c];
    end
  end
endmodule
