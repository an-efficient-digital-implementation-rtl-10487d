// sqrt_exp_unit: operand preparation for the floating-point square root.
//
// Splits an IEEE-754 operand into sign, exponent and fraction and prepares
// the two independent halves of the job: the exponent of the result and the
// fixed-point radicand whose integer square root is the result mantissa.
//
// How it works (purely combinational):
//  * The unbiased exponent u = E - bias is formed. If u is odd, one is taken
//    from it and the mantissa is shifted up by one, so that u/2 is exact and
//    the result exponent is u/2 + bias.
//  * The true mantissa (n+1 bits, hidden one included) is padded with zeros
//    at the bottom to a 2(n+1)-bit radicand. The upward shift for an odd
//    exponent moves the mantissa into the padding, so no bit is lost and the
//    root of the radicand has exactly n+1 bits with its top bit set.
//  * Special operands are classified: +-0 returns itself, +inf returns +inf,
//    a NaN or any negative non-zero operand returns the quiet NaN.
//  * Subnormal operands are normalised with a leading-zero count before the
//    steps above, so they go through the root like normal numbers.
//
// Interface: x_i is the packed operand {sign, exponent, fraction}. radicand_o,
// res_exp_o and the class/special value are valid in the same cycle.
//
// Following the algorithm description: the exponent halving and the odd
// exponent handling (decrement the exponent, shift the mantissa up), the
// zero padding to 2(n+1) bits and the quiet NaN for negative operands.
// This design's own choices: the result for zero, infinity and NaN inputs,
// the canonical quiet NaN pattern (sign 0, fraction MSB 1) and the support
// of subnormal inputs.
module sqrt_exp_unit
  import fsqrt_pkg::*;
#(
  parameter int unsigned EXP_W = 8,   // exponent field width
  parameter int unsigned MAN_W = 23,  // stored fraction width (n)
  localparam int unsigned W  = 1 + EXP_W + MAN_W,
  localparam int unsigned DW = 2 * (MAN_W + 1)
) (
  input  logic [W-1:0]     x_i,
  output logic [DW-1:0]    radicand_o,   // padded, aligned true mantissa
  output logic [EXP_W-1:0] res_exp_o,    // biased exponent of the result
  output fp_class_e        class_o,      // operand class
  output logic [W-1:0]     special_o     // result to use when class_o != FP_FINITE
);

  localparam int unsigned SW = EXP_W + 2;  // signed exponent arithmetic width
  localparam logic signed [SW-1:0] BIAS = SW'((1 << (EXP_W - 1)) - 1);

  logic                 sign;
  logic [EXP_W-1:0]     exp_f;
  logic [MAN_W-1:0]     frac;
  logic                 exp_zero, exp_ones, frac_zero;

  assign sign      = x_i[W-1];
  assign exp_f     = x_i[MAN_W +: EXP_W];
  assign frac      = x_i[MAN_W-1:0];
  assign exp_zero  = (exp_f == '0);
  assign exp_ones  = (exp_f == '1);
  assign frac_zero = (frac == '0);

  // Leading zeros of the fraction, used only for subnormal operands.
  logic [$clog2(MAN_W+1)-1:0] lz;
  always_comb begin
    lz = '0;
    for (int i = 0; i < MAN_W; i++) begin
      if (frac[i]) lz = ($clog2(MAN_W+1))'(MAN_W - 1 - i);
    end
  end

  logic [MAN_W:0]        mant;     // normalised true mantissa, MSB set
  logic signed [SW-1:0]  unb_exp;  // unbiased exponent of mant
  logic signed [SW-1:0]  even_exp;
  logic                  odd;

  always_comb begin
    if (exp_zero) begin
      // subnormal: value = frac * 2^(1 - bias - n); shift the first one up
      // to the hidden-bit position
      mant    = {1'b0, frac} << (lz + 1);
      unb_exp = -BIAS - SW'(lz);
    end else begin
      mant    = {1'b1, frac};
      unb_exp = SW'(exp_f) - BIAS;
    end
    odd = unb_exp[0];
    if (odd) begin
      even_exp   = unb_exp - 1;
      radicand_o = {mant, {(MAN_W+1){1'b0}}};         // M << 1 into the padding
    end else begin
      even_exp   = unb_exp;
      radicand_o = {1'b0, mant, {MAN_W{1'b0}}};
    end
    res_exp_o = EXP_W'((even_exp >>> 1) + BIAS);
  end

  localparam logic [W-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
  localparam logic [W-1:0] PINF = {1'b0, {EXP_W{1'b1}}, {MAN_W{1'b0}}};

  always_comb begin
    if (exp_ones && !frac_zero) begin
      class_o   = FP_NAN;
      special_o = QNAN;
    end else if (exp_zero && frac_zero) begin
      class_o   = FP_ZERO;
      special_o = x_i;                 // sqrt(+-0) = +-0
    end else if (sign) begin
      class_o   = FP_NEGATIVE;
      special_o = QNAN;
    end else if (exp_ones) begin
      class_o   = FP_INF;
      special_o = PINF;
    end else begin
      class_o   = FP_FINITE;
      special_o = '0;
    end
  end

endmodule
