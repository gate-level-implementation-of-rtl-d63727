// fp_to_fix: combinational float to signed fixed-point conversion.
//
// y = floor(a * 2^FRAC) as an OUT_W-bit two's-complement number, saturated
// to the representable range. Rounding toward minus infinity keeps texture
// coordinates wrapping correctly for negative values. The mantissa is
// shifted left or right by (exponent - 150 + FRAC); for a negative input any
// bit shifted out makes the magnitude one larger before negation.
module fp_to_fix
  import accel_pkg::*;
#(
  parameter int unsigned FRAC  = 8,
  parameter int unsigned OUT_W = 32
) (
  input  float_t                  a,
  output logic signed [OUT_W-1:0] y
);
  localparam int MAXSH = OUT_W;
  logic [23:0]       m;
  int                sh;
  logic [OUT_W+23:0] big;
  logic [OUT_W:0]    mag;
  logic              lost;
  logic              ovf;

  always_comb begin
    m    = {1'b1, a[22:0]};
    sh   = int'(a[30:23]) - 150 + int'(FRAC);
    lost = 1'b0;
    ovf  = 1'b0;
    big  = '0;
    if (a[30:23] == 8'd0) begin
      mag = '0;
    end else if (sh >= 0) begin
      if (sh >= MAXSH) begin
        ovf = 1'b1;
        big = '0;
      end else begin
        big = (OUT_W+24)'(m) << sh;
      end
      ovf = ovf || (big[OUT_W+23:OUT_W-1] != '0);
      mag = big[OUT_W:0];
    end else if (sh > -25) begin
      mag  = (OUT_W+1)'(m >> (-sh));
      lost = (m & ((24'd1 << (-sh)) - 24'd1)) != 24'd0;
    end else begin
      mag  = '0;
      lost = 1'b1;
    end
    if (a[31] && lost) mag = mag + 1'b1;
    if (ovf || mag[OUT_W:OUT_W-1] != 2'b00)
      y = a[31] ? {1'b1, {(OUT_W-1){1'b0}}} : {1'b0, {(OUT_W-1){1'b1}}};
    else
      y = a[31] ? -$signed(mag[OUT_W-1:0]) : $signed(mag[OUT_W-1:0]);
  end
endmodule
