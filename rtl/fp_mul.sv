`timescale 1ns/1ps
// fp_mul: three-stage single-precision floating-point multiplication.
//
// Sign, exponent and mantissa are independent: the sign is the XOR of the
// operand signs, the mantissas (hidden one included) are multiplied and
// the exponents are added minus the bias 127. The product of two mantissas
// in [1,2) lies in [1,4); when it is 2 or more it is shifted right once and
// the exponent incremented. Exponent overflow saturates to the largest
// finite value, underflow (or a zero operand) gives zero. Rounding is
// truncation.
//
// Timing: input register, multiplier register, output register; operands
// applied before clock edge 1 give the result after edge 3 (a latency of 3),
// one operation per cycle. MANT_BITS keeps that many significant bits of
// the operands; the document truncates to 18 (its default, one 18x18
// hardware multiplier) and also reports a 24-bit version.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned MANT_BITS = 18
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t op_a,
  input  fp32_t op_b,
  output fp32_t result
);
  localparam int unsigned MW = MANT_BITS;

  // ---- stage 1: input registers
  fp32_t a1, b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin a1 <= FP_ZERO; b1 <= FP_ZERO; end
    else begin a1 <= op_a; b1 <= op_b; end
  end

  // ---- stage 2: multiply mantissas, XOR signs, add exponents
  logic              s2_sign, s2_zero;
  logic signed [10:0] s2_exp;
  logic [2*MW-1:0]   s2_prod;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_sign <= 1'b0; s2_zero <= 1'b1; s2_exp <= '0; s2_prod <= '0;
    end else begin
      logic [23:0] ma, mb;
      ma = {1'b1, a1.man};
      mb = {1'b1, b1.man};
      s2_sign <= a1.sign ^ b1.sign;
      s2_zero <= (a1.exp == 8'd0) || (b1.exp == 8'd0);
      s2_exp  <= 11'(a1.exp) + 11'(b1.exp) - 11'sd127;
      s2_prod <= ma[23 -: MW] * mb[23 -: MW];
    end
  end

  // ---- stage 3: normalize, check overflow and underflow
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= FP_ZERO;
    else begin
      logic signed [10:0] e;
      logic [2*MW-1:0]    p;
      logic [22:0]        frac;
      if (s2_prod[2*MW-1]) begin
        e = s2_exp + 11'sd1;
        p = s2_prod;
      end else begin
        e = s2_exp;
        p = s2_prod << 1;
      end
      // leading one now at bit 2*MW-1; take the next MW-1 bits
      frac = 23'({p[2*MW-2 -: MW-1]}) << (24 - MW);
      if (s2_zero || e < 11'sd1)
        result <= FP_ZERO;
      else if (e > 11'(EXP_MAX))
        result <= '{sign: s2_sign, exp: EXP_MAX, man: '1};
      else
        result <= '{sign: s2_sign, exp: e[7:0], man: frac};
    end
  end

endmodule
