// accel_pkg: types and constants shared by the 3D accelerator.
//
// Numbers inside the pixel datapath are 32-bit floats in the IEEE-754
// single-precision layout (sign, 8-bit exponent, 23-bit fraction) without
// denormals, infinities or NaNs. Screen coordinates are integer pixels on a
// 1024 x 1024 frame buffer of 64-bit pixels {8 unused, Z24, R, G, B, A}.
// A polygon record carries ten planes (A*x + B*y + C): 1/z, u/z, v/z,
// diffuse R,G,B,A divided by z and specular R,G,B divided by z, so that the
// pixel pipes interpolate every attribute in a perspective-correct way.
package accel_pkg;

  localparam int unsigned CW        = 11;   // coordinate width, 0..1024
  localparam int unsigned SCREEN_W  = 1024;
  localparam int unsigned SCREEN_H  = 1024;
  localparam int unsigned QW        = 9;    // quad coordinate width (512 quads)
  localparam int unsigned NPLANES   = 10;

  typedef logic [31:0] float_t;

  // Plane indices
  localparam int unsigned PL_Q  = 0;  // 1/z
  localparam int unsigned PL_U  = 1;  // u/z
  localparam int unsigned PL_V  = 2;  // v/z
  localparam int unsigned PL_DR = 3;  // diffuse R,G,B,A /z: 3..6
  localparam int unsigned PL_SR = 7;  // specular R,G,B /z: 7..9

  typedef struct packed {
    float_t a;
    float_t b;
    float_t c;
  } plane_t;

  typedef struct packed {
    logic        tex_en;
    logic        blend_en;
    logic        ztest_en;
    logic        zwrite_en;
    logic [3:0]  log2w;     // texture width  = 2^log2w (level 0)
    logic [3:0]  log2h;     // texture height = 2^log2h
    logic [3:0]  levels;    // highest mip level present
    logic [20:0] tex_base;  // texel address of level 0
  } polymode_t;

  typedef struct packed {
    polymode_t            mode;
    plane_t [NPLANES-1:0] pl;
  } poly_t;

  // Line segment from the setup controller to the rasterizer
  typedef struct packed {
    logic [CW-1:0] x0, y0, x1, y1;
    logic          slot;   // double-buffer slot of the polygon
    logic          last;   // last segment of the polygon
  } seg_t;

  // Entry of an edge queue: an edge normalised to run downward, or a bare
  // end-of-polygon marker.
  typedef struct packed {
    logic          is_edge;
    logic          last;
    logic          slot;
    logic [CW-1:0] x0, y0, x1, y1;
  } edge_t;

  // 2x2 pixel quad handed to the pixel processor; mask bit i is pixel
  // (2*qx + i%2, 2*qy + i/2).
  typedef struct packed {
    logic [QW-1:0] qx, qy;
    logic [3:0]    mask;
    logic          slot;
  } quad_t;

  // Pixel word in the frame buffer
  typedef struct packed {
    logic [7:0]  unused;
    logic [23:0] z;
    logic [31:0] rgba;
  } pixel_t;

  localparam float_t FP_ONE  = 32'h3F80_0000;
  localparam float_t FP_ZERO = 32'h0000_0000;

  // log2 approximation of |f| in signed 8.8 fixed point: exponent plus the
  // top fraction bits read as a linear mantissa.
  function automatic logic signed [15:0] fp_log2_88(input float_t f);
    logic signed [15:0] r;
    if (f[30:23] == 8'd0) r = -16'sd32768;
    else r = signed'({8'(f[30:23] - 8'd127), f[22:15]});
    return r;
  endfunction

endpackage
