// fp_add: combinational floating-point adder / subtractor.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1) on 32-bit floats in
// the single-precision layout. The larger magnitude is found first, the
// smaller operand is aligned to it with three guard bits, the mantissas are
// added or subtracted, and a leading-zero count renormalises the result.
// Rounding is by truncation; results below the normal range become +0 and
// results above it saturate to the largest exponent. The document specifies
// a combinational float adder; the format, the rounding and the
// internal structure are this design's choices.
module fp_add
  import accel_pkg::*;
(
  input  float_t a,
  input  float_t b,
  input  logic   sub,
  output float_t y
);
  logic        sb;
  logic        big_a;
  float_t      p, q;          // |p| >= |q|
  logic [7:0]  ep, eq;
  logic [26:0] mp, mq, mqs;   // 1.23 mantissa with 3 guard bits
  logic [7:0]  d;
  logic [27:0] s;
  logic [4:0]  lz;
  logic signed [9:0] e;
  logic [27:0] n;

  always_comb begin
    sb    = b[31] ^ sub;
    big_a = (a[30:0] >= b[30:0]);
    p     = big_a ? a : {sb, b[30:0]};
    q     = big_a ? {sb, b[30:0]} : a;
    ep    = p[30:23];
    eq    = q[30:23];
    mp    = (ep == 8'd0) ? 27'd0 : {1'b1, p[22:0], 3'b000};
    mq    = (eq == 8'd0) ? 27'd0 : {1'b1, q[22:0], 3'b000};
    d     = ep - eq;
    mqs   = (d > 8'd26) ? 27'd0 : (mq >> d);
    if (p[31] == q[31]) s = {1'b0, mp} + {1'b0, mqs};
    else                s = {1'b0, mp} - {1'b0, mqs};
    // leading zeros below bit 27
    lz = 5'd0;
    for (int i = 0; i <= 27; i++)
      if (s[i]) lz = 5'(27 - i);
    e = $signed({2'b00, ep}) + 10'sd1 - $signed({5'b0, lz});
    n = s << lz;              // bit 27 now holds the leading one
    if (s == 28'd0 || ep == 8'd0 || e <= 0)
      y = FP_ZERO;
    else if (e >= 10'sd255)
      y = {p[31], 8'hFE, 23'h7F_FFFF};
    else
      y = {p[31], e[7:0], n[26:4]};
  end
endmodule
