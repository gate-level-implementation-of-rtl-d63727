// fp_recip: combinational floating-point reciprocal, the divider of the
// pixel pipes.
//
// y = 1/a. As the document describes, division uses a small table and an
// iteration: the top SEED_BITS fraction bits of the mantissa m in [1,2)
// select a seed close to 1/m (the table is computed at elaboration as
// 2^37 / (2^(SEED_BITS+1) + 2i + 1) scaled to the table size), and ITERS
// Newton-Raphson steps r <- r * (2 - m*r) in Q2.30 fixed point refine it.
// The exponent is 253 - e (or 254 - e when m = 1). A quotient a/b is formed
// as a * (1/b) with fp_mul. Zero input saturates to the largest value with
// the input's sign. Table size and iteration count are this design's choice.
module fp_recip
  import accel_pkg::*;
#(
  parameter int unsigned SEED_BITS = 6,
  parameter int unsigned ITERS     = 2
) (
  input  float_t a,
  output float_t y
);
  localparam int unsigned TSIZE = 1 << SEED_BITS;

  typedef logic [31:0] seed_tab_t [TSIZE];

  // seed[i] = 2^30 / (1 + (i + 0.5)/TSIZE) in Q2.30
  function automatic seed_tab_t make_seeds();
    seed_tab_t t;
    for (int i = 0; i < TSIZE; i++)
      t[i] = 32'((64'd1 << (31 + SEED_BITS)) / 64'(2 * TSIZE + 2 * i + 1));
    return t;
  endfunction

  localparam seed_tab_t SEEDS = make_seeds();

  logic [31:0] m;     // Q2.30
  logic [31:0] r;     // Q2.30
  logic [63:0] t1, t2;
  logic [31:0] corr;
  logic [8:0]  e;

  always_comb begin
    e = '0;
    m = {2'b01, a[22:0], 7'b0};
    r = SEEDS[a[22:23-SEED_BITS]];
    for (int k = 0; k < ITERS; k++) begin
      t1   = (64'(m) * 64'(r)) >> 30;
      corr = 32'h8000_0000 - t1[31:0];
      t2   = (64'(r) * 64'(corr)) >> 30;
      r    = t2[31:0];
    end
    if (a[30:23] == 8'd0 || a[30:23] == 8'd254 || a[30:23] == 8'd255)
      y = (a[30:23] == 8'd0) ? {a[31], 8'hFE, 23'h7F_FFFF} : FP_ZERO;
    else if (a[22:0] == 23'd0)
      y = {a[31], 8'(9'd254 - {1'b0, a[30:23]}), 23'd0};
    else begin
      e = 9'd253 - {1'b0, a[30:23]};
      // r in (0.5, 1): leading one at bit 29
      y = {a[31], e[7:0], r[28:6]};
    end
  end
endmodule
