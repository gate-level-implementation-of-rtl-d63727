// tex_filter: trilinear texture filter for one pixel.
//
// Per 8-bit channel of the RGBA texels: a bilinear blend of the four
// texels of each mip level (weights fu across, fv down), then a linear
// blend of the two levels with weight flod. Every blend is
// lerp(a, b, f) = a + ((b - a) * f) / 256 with an 8-bit fraction f.
// Texel order as produced by tex_addr. Combinational.
module tex_filter (
  input  logic [7:0][31:0] texel,
  input  logic [1:0][7:0]  fu,
  input  logic [1:0][7:0]  fv,
  input  logic [7:0]       flod,
  output logic [31:0]      rgba
);
  function automatic logic [7:0] lerp(input logic [7:0] a, input logic [7:0] b,
                                      input logic [7:0] f);
    logic signed [17:0] d;
    d = (signed'({10'd0, b}) - signed'({10'd0, a})) * signed'({10'd0, f});
    return 8'(signed'({10'd0, a}) + (d >>> 8));
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] lv [2];
      for (int l = 0; l < 2; l++) begin
        logic [7:0] top, bot;
        top   = lerp(texel[4*l+0][8*c +: 8], texel[4*l+1][8*c +: 8], fu[l]);
        bot   = lerp(texel[4*l+2][8*c +: 8], texel[4*l+3][8*c +: 8], fu[l]);
        lv[l] = lerp(top, bot, fv[l]);
      end
      rgba[8*c +: 8] = lerp(lv[0], lv[1], flod);
    end
  end
endmodule
