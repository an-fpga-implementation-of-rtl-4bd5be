`timescale 1ns/1ps
// fp_recip: single-cycle estimate of the multiplicative inverse 1/x of a
// single-precision number, used in place of a divider.
//
// For x = 2^e * m with m in [1,2), 1/x = 2^(-e-1) * (2/m), and 2/m lies in
// (1,2]. The function y(m) = 2/m - 1 is approximated piecewise linearly
// over 16 segments: the 4 most significant mantissa bits pick a segment,
// the next 7 bits interpolate between its end points. The table holds
// y at m = 1 + i/16, i = 0..16, as 12-bit fractions,
//   P[i] = round(4096 * (16 - i) / (16 + i)),
// and each segment is lowered by half of its largest chord error,
//   B[i] = round(131072 / (33 + 2i)^3),
// so that the error is balanced around zero. The table is computed when
// the design is elaborated. The result keeps 11 mantissa bits; its
// relative error is about 0.1 %.
//
// Exponent: 253 - exp(x) (254 - exp(x) when m = 1, where 2/m = 2). A zero
// input gives the largest finite number; results below the normal range
// give zero. Output registered: the estimate is ready one clock after the
// operand (a latency of 1).
//
// The segment count, index and interpolation widths, the 11 result bits
// and the single-cycle timing follow the document; the table formulas and
// the error balancing are this design's.
module fp_recip
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t op_a,
  output fp32_t result
);
  localparam int unsigned OUT_BITS = 11;   // result mantissa bits kept

  function automatic int point(input int i);
    return (4096 * (16 - i) * 2 + (16 + i)) / (2 * (16 + i));
  endfunction

  function automatic int bias(input int i);
    int c;
    c = (33 + 2 * i) * (33 + 2 * i) * (33 + 2 * i);
    return (131072 * 2 + c) / (2 * c);
  endfunction

  logic [3:0]  seg;
  logic [6:0]  t;
  int          p0, p1, y;
  logic [12:0] yv;

  always_comb begin
    seg = op_a.man[22:19];
    t   = op_a.man[18:12];
    p0  = point(int'(seg));
    p1  = point(int'(seg) + 1);
    y   = p0 - (((p0 - p1) * int'(t)) >>> 7) - bias(int'(seg));
    if (seg == 4'd0 && t == 7'd0) y = 4096;   // m = 1 exactly: 2/m = 2
    if (y < 0) y = 0;
    yv  = 13'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= FP_ZERO;
    else if (op_a.exp == 8'd0)
      result <= '{sign: op_a.sign, exp: EXP_MAX, man: '1};
    else if (yv[12]) begin
      // 2/m = 2: one more in the exponent, zero mantissa
      if (op_a.exp > 8'd253) result <= FP_ZERO;
      else result <= '{sign: op_a.sign, exp: 8'(9'd254 - 9'(op_a.exp)), man: '0};
    end else begin
      if (op_a.exp > 8'd252) result <= FP_ZERO;
      else result <= '{sign: op_a.sign, exp: 8'(9'd253 - 9'(op_a.exp)),
                       man: {yv[11:12-OUT_BITS], {(23-OUT_BITS){1'b0}}}};
    end
  end

endmodule
