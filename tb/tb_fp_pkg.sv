// tb_fp_pkg: conversions between 32-bit float bit patterns and real numbers
// for the testbenches, written out from the format definition (normal
// numbers only, zero for a zero exponent) so that reference values do not
// depend on the design.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int k = 0; k < int'(f[30:23]) - 127; k++) m = m * 2.0;
    for (int k = 0; k < 127 - int'(f[30:23]); k++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  // nearest-below float for a real value (truncation), normal range only
  function automatic logic [31:0] r2f(input real r);
    logic s;
    int   e;
    real  a;
    if (r == 0.0) return 32'd0;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return {s, 8'(e + 127), 23'(longint'($floor((a - 1.0) * 8388608.0)))};
  endfunction
endpackage
