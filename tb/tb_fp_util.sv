`timescale 1ns/1ps
// tb_fp_util: real-number reference helpers for the floating-point
// testbenches (conversions between IEEE single-precision bit patterns and
// real, computed by repeated scaling, independent of the design).
package tb_fp_util;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real bits_to_real(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return (f[31] ? -1.0 : 1.0) * (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
  endfunction

  // nearest-below single-precision pattern of r (truncated mantissa)
  function automatic logic [31:0] real_to_bits(input real r);
    logic s;
    int   e;
    real  m;
    logic [31:0] frac;
    if (r == 0.0) return 32'd0;
    s = (r < 0.0);
    m = s ? -r : r;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    frac = 32'($floor((m - 1.0) * 8388608.0));
    return {s, 8'(e + 127), frac[22:0]};
  endfunction

endpackage
