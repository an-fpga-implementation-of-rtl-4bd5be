`timescale 1ns/1ps
// fp_sub: pipelined single-precision floating-point subtraction, a - b.
//
// Steps (one register after each): the operands are registered and b's
// sign is inverted; the larger magnitude is found from the exponents and
// mantissas, the exponent difference, the result sign, the operation
// (add or subtract the magnitudes) and the exact-zero case are
// determined; the smaller mantissa is shifted right by the exponent
// difference; the mantissas are added or subtracted; the sum is normalized
// (a carry shifts right and increments the exponent, leading zeros shift
// left and decrement it). Rounding is truncation. An exponent overflow
// saturates to the largest finite value, an underflow gives zero.
//
// Timing: operands applied before clock edge 1 give the result after edge
// 5 (a latency of 5: input register plus four pipeline registers); a new
// operation can start every cycle. MANT_BITS keeps only that many
// significant bits (hidden one included) of the operands; the document
// gives 24 (its default) and 18.
//
// Steps, latency and truncation follow the document; the exact placement
// of the registers between the steps is this design's.
module fp_sub
  import fp_pkg::*;
#(
  parameter int unsigned MANT_BITS = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t op_a,
  input  fp32_t op_b,
  output fp32_t result
);

  // ---- stage 1: input registers, b negated
  fp32_t a1, b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin a1 <= FP_ZERO; b1 <= FP_ZERO; end
    else begin
      a1     <= '{sign: op_a.sign,  exp: op_a.exp, man: trunc_man(op_a.man, MANT_BITS)};
      b1     <= '{sign: ~op_b.sign, exp: op_b.exp, man: trunc_man(op_b.man, MANT_BITS)};
    end
  end

  // ---- stage 2: larger operand, sign, operation, shift amount
  logic        s2_sign, s2_sub, s2_zero;
  logic [7:0]  s2_exp, s2_shift;
  logic [23:0] s2_big, s2_small;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_sign <= 1'b0; s2_sub <= 1'b0; s2_zero <= 1'b1;
      s2_exp <= '0; s2_shift <= '0; s2_big <= '0; s2_small <= '0;
    end else begin
      logic az, bz, a_big;
      logic [23:0] ma, mb;
      az = (a1.exp == 8'd0);
      bz = (b1.exp == 8'd0);
      ma = az ? 24'd0 : {1'b1, a1.man};
      mb = bz ? 24'd0 : {1'b1, b1.man};
      a_big = ({a1.exp, ma} >= {b1.exp, mb});
      s2_sub   <= a1.sign ^ b1.sign;
      s2_sign  <= a_big ? a1.sign : b1.sign;
      s2_exp   <= a_big ? a1.exp : b1.exp;
      s2_big   <= a_big ? ma : mb;
      s2_small <= a_big ? mb : ma;
      s2_shift <= a_big ? (a1.exp - b1.exp) : (b1.exp - a1.exp);
      // both zero, or equal magnitudes subtracted
      s2_zero  <= (az && bz) || ((a1.sign ^ b1.sign) && ({a1.exp, ma} == {b1.exp, mb}));
    end
  end

  // ---- stage 3: align the smaller mantissa
  logic        s3_sign, s3_sub, s3_zero;
  logic [7:0]  s3_exp;
  logic [23:0] s3_big, s3_small;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_sign <= 1'b0; s3_sub <= 1'b0; s3_zero <= 1'b1;
      s3_exp <= '0; s3_big <= '0; s3_small <= '0;
    end else begin
      s3_sign  <= s2_sign;
      s3_sub   <= s2_sub;
      s3_zero  <= s2_zero;
      s3_exp   <= s2_exp;
      s3_big   <= s2_big;
      s3_small <= (s2_shift > 8'd24) ? 24'd0 : (s2_small >> s2_shift);
    end
  end

  // ---- stage 4: add or subtract the magnitudes
  logic        s4_sign, s4_zero;
  logic [7:0]  s4_exp;
  logic [24:0] s4_sum;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_sign <= 1'b0; s4_zero <= 1'b1; s4_exp <= '0; s4_sum <= '0;
    end else begin
      s4_sign <= s3_sign;
      s4_zero <= s3_zero;
      s4_exp  <= s3_exp;
      s4_sum  <= s3_sub ? ({1'b0, s3_big} - {1'b0, s3_small})
                        : ({1'b0, s3_big} + {1'b0, s3_small});
    end
  end

  // ---- stage 5: normalize, saturate, truncate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= FP_ZERO;
    else begin
      int          lead, e;
      logic [24:0] norm;
      lead = -1;
      for (int i = 0; i < 25; i++) if (s4_sum[i]) lead = i;
      if (s4_zero || lead < 0) begin
        result <= FP_ZERO;
      end else begin
        // bring the leading one to bit 23
        e = int'(s4_exp) + lead - 23;
        norm = (lead > 23) ? (s4_sum >> (lead - 23)) : (s4_sum << (23 - lead));
        if (e > int'(EXP_MAX))
          result <= '{sign: s4_sign, exp: EXP_MAX, man: '1};
        else if (e < 1)
          result <= FP_ZERO;
        else
          result <= '{sign: s4_sign, exp: 8'(e), man: trunc_man(norm[22:0], MANT_BITS)};
      end
    end
  end

endmodule
