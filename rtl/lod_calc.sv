// lod_calc: base-2 level of detail of one pixel.
//
// With perspective-correct interpolation u = (u/z) / (1/z), so the screen
// derivatives follow directly from the planes of 1/z (q), u/z and v/z:
// du/dx = z * (A_u - u * A_q), du/dy = z * (B_u - u * B_q), and likewise
// for v. Each derivative is scaled to texels of level 0 by adding log2 of
// the texture size, and the level of detail is the largest of the four
// log2 values. log2 of a float is read off its exponent, with the top eight
// fraction bits taken as a linear approximation of the mantissa's log.
// The document states that the level of detail is computed per pixel as a
// base-2 log; the formula here is this design's.
// Output: signed 8.8 fixed point; combinational.
module lod_calc
  import accel_pkg::*;
(
  input  float_t                   z,
  input  float_t                   u,
  input  float_t                   v,
  input  plane_t                   pq,
  input  plane_t                   pu,
  input  plane_t                   pv,
  input  logic [3:0]               log2w,
  input  logic [3:0]               log2h,
  output logic signed [15:0]       lod
);
  float_t ua, va, ub, vb;          // u*A_q, v*A_q, u*B_q, v*B_q
  float_t dux0, dvx0, duy0, dvy0;  // before scaling by z
  float_t dux, dvx, duy, dvy;

  fp_mul m0 (.a(u), .b(pq.a), .y(ua));
  fp_mul m1 (.a(v), .b(pq.a), .y(va));
  fp_mul m2 (.a(u), .b(pq.b), .y(ub));
  fp_mul m3 (.a(v), .b(pq.b), .y(vb));
  fp_add a0 (.a(pu.a), .b(ua), .sub(1'b1), .y(dux0));
  fp_add a1 (.a(pv.a), .b(va), .sub(1'b1), .y(dvx0));
  fp_add a2 (.a(pu.b), .b(ub), .sub(1'b1), .y(duy0));
  fp_add a3 (.a(pv.b), .b(vb), .sub(1'b1), .y(dvy0));
  fp_mul m4 (.a(z), .b(dux0), .y(dux));
  fp_mul m5 (.a(z), .b(dvx0), .y(dvx));
  fp_mul m6 (.a(z), .b(duy0), .y(duy));
  fp_mul m7 (.a(z), .b(dvy0), .y(dvy));

  always_comb begin
    logic signed [15:0] l [4];
    l[0] = fp_log2_88(dux) + signed'({4'd0, log2w, 8'd0});
    l[1] = fp_log2_88(dvx) + signed'({4'd0, log2h, 8'd0});
    l[2] = fp_log2_88(duy) + signed'({4'd0, log2w, 8'd0});
    l[3] = fp_log2_88(dvy) + signed'({4'd0, log2h, 8'd0});
    lod = l[0];
    for (int i = 1; i < 4; i++)
      if (l[i] > lod) lod = l[i];
  end
endmodule
