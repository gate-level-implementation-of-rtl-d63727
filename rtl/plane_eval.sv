// plane_eval: floating-point plane evaluator p = A*x + B*y + C.
//
// The document interpolates every shading parameter (and 1/z) with such
// evaluators. Two multipliers and two adders, all combinational, so a pixel
// pipe evaluates one plane per pixel per clock. The coefficients come
// ready-made from the polygon record.
module plane_eval
  import accel_pkg::*;
(
  input  plane_t pl,
  input  float_t x,
  input  float_t y,
  output float_t p
);
  float_t ax, by, s;
  fp_mul u_ax (.a(pl.a), .b(x), .y(ax));
  fp_mul u_by (.a(pl.b), .b(y), .y(by));
  fp_add u_s1 (.a(ax), .b(by), .sub(1'b0), .y(s));
  fp_add u_s2 (.a(s), .b(pl.c), .sub(1'b0), .y(p));
endmodule
