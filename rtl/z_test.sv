// z_test: depth test against the 24-bit floating-point Z-buffer.
//
// The pixel's depth (a positive float) is stored as 24 bits: the 8-bit
// exponent and the top 16 fraction bits, which keeps the float's wide
// range and its coarser steps far away, as the document intends for its
// floating-point Z-buffer. Positive floats compare like unsigned integers,
// so the test is an integer compare: the pixel passes when it is nearer
// (smaller) than the stored depth, or always when the test is off.
// Combinational.
module z_test
  import accel_pkg::*;
(
  input  float_t      z,
  input  logic [23:0] zbuf,
  input  logic        ztest_en,
  output logic [23:0] z24,
  output logic        pass
);
  assign z24  = z[30:7];
  assign pass = !ztest_en || (z24 < zbuf);
endmodule
