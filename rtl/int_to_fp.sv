// int_to_fp: combinational signed-integer to float conversion.
//
// Takes the magnitude of the IN_W-bit two's-complement input, finds its
// leading one and places the next 23 bits in the fraction (truncating).
// Used to turn pixel coordinates into floats for the plane evaluators.
// The document lists integer conversion in its float library; the structure
// is this design's choice.
module int_to_fp
  import accel_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0] i,
  output float_t                 y
);
  logic [IN_W-1:0] mag;
  logic [IN_W+22:0] sh;
  int unsigned     msb;

  always_comb begin
    mag = i[IN_W-1] ? IN_W'(-i) : IN_W'(i);
    msb = 0;
    for (int k = 0; k < IN_W; k++)
      if (mag[k]) msb = k;
    sh = {mag, 23'd0} >> msb;   // leading one lands at bit 23
    if (mag == '0) y = FP_ZERO;
    else y = {i[IN_W-1], 8'(127 + msb), sh[22:0]};
  end
endmodule
