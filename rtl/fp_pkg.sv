`timescale 1ns/1ps
// fp_pkg: single-precision floating-point format and the integer
// conversions used by the secondary-synchronization arithmetic.
//
// Numbers are IEEE 754 single precision: sign, 8-bit exponent with bias
// 127, 23 stored mantissa bits with a hidden leading one. As in the
// document's units, exponent 0 is read as zero (no subnormals), exponent
// 255 is not given special meaning, results are truncated rather than
// rounded, and results too large for the format saturate to the largest
// finite value of the right sign.
//
// u32_to_fp: the exponent is the index p of the most significant one plus
// 127, and the bits below it fill the mantissa from the top (bits that do
// not fit are dropped; missing ones are zero).
// fp_to_u32: the sign is ignored (magnitude is converted), the unbiased
// exponent gives the index of the leading one, and the mantissa fills the
// bits below it. Exponents above 31 saturate to 2^32-1; values below 1
// give 0, which is what truncation of the fraction gives.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam fp32_t FP_ZERO    = '{sign: 1'b0, exp: 8'd0,   man: 23'd0};
  localparam logic [7:0]  EXP_MAX = 8'd254;

  function automatic fp32_t u32_to_fp(input logic [31:0] u);
    fp32_t r;
    int    p;
    logic [31:0] sh;
    r = FP_ZERO;
    p = -1;
    for (int i = 0; i < 32; i++) if (u[i]) p = i;
    if (p >= 0) begin
      sh    = u << (31 - p);          // leading one moved to bit 31
      r.exp = 8'(p + 127);
      r.man = sh[30:8];
    end
    return r;
  endfunction

  function automatic logic [31:0] fp_to_u32(input fp32_t f);
    int          e;
    logic [55:0] full;
    e = int'(f.exp) - 127;
    if (f.exp == 8'd0 || e < 0) return 32'd0;
    if (e > 31)                 return 32'hFFFF_FFFF;
    full = {32'd0, 1'b1, f.man} << e;   // leading one at bit 23 + e
    return full[54:23];
  endfunction

  // keep only the top (bits-1) fraction bits of a mantissa
  function automatic logic [22:0] trunc_man(input logic [22:0] man, input int unsigned bits);
    logic [22:0] mask;
    mask = (bits >= 24) ? '1 : ~((23'd1 << (24 - bits)) - 23'd1);
    return man & mask;
  endfunction

endpackage
