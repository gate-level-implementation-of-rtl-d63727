// fp_mul: combinational floating-point multiplier.
//
// y = a * b on 32-bit floats in the single-precision layout. The 24-bit
// mantissas are multiplied, the 48-bit product is normalised by at most one
// place, and the exponents are added with the bias removed. Truncating
// rounding; underflow gives +0, overflow saturates. The document asks for a
// combinational float multiplier; the details are this design's choices.
module fp_mul
  import accel_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);
  logic [47:0]       m;
  logic signed [9:0] e;
  logic              s;

  always_comb begin
    s = a[31] ^ b[31];
    m = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({2'b00, a[30:23]}) + $signed({2'b00, b[30:23]}) - 10'sd127;
    if (m[47]) e = e + 10'sd1;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || e <= 0)
      y = FP_ZERO;
    else if (e >= 10'sd255)
      y = {s, 8'hFE, 23'h7F_FFFF};
    else if (m[47])
      y = {s, e[7:0], m[46:24]};
    else
      y = {s, e[7:0], m[45:23]};
  end
endmodule
