// fp_mul_path: sign, exponent and significand path of the binary64
// multiplier.
//
// The operands are split into sign, exponent and fraction. The sign of the
// product is the XOR of the signs. Each significand gets its hidden bit
// (1 for normal numbers, 0 for denormals, whose exponent then counts as 1)
// and is handed, zero-extended to 64 bits, to the shared Booth multiplier;
// its 128-bit product comes back on `prod` and the low 106 bits are the
// exact significand product, two integer bits followed by 104 fraction bits.
// The exponent is ea + eb - 1023: both biased exponents are added and one
// bias is removed, so the result is again biased. Nothing is rounded here;
// leading zeros (denormal operands) are removed later by fp_normalize.
// Combinational.
module fp_mul_path
  import fpmac_pkg::*;
(
  input  fp64_t               a,
  input  fp64_t               b,
  output logic [63:0]         mant_a,   // to the shared multiplier
  output logic [63:0]         mant_b,
  input  logic [127:0]        prod,     // from the shared multiplier
  output logic                sign,
  output logic signed [13:0]  exp,      // biased, point after two integer bits
  output logic [105:0]        sig       // exact significand product
);

  logic [10:0] ea, eb;

  assign ea     = (a.exp == '0) ? 11'd1 : a.exp;
  assign eb     = (b.exp == '0) ? 11'd1 : b.exp;
  assign mant_a = {11'd0, (a.exp != '0), a.frac};
  assign mant_b = {11'd0, (b.exp != '0), b.frac};

  assign sign = a.sign ^ b.sign;
  assign exp  = 14'(signed'({3'b000, ea})) + 14'(signed'({3'b000, eb})) - 14'sd1023;
  assign sig  = prod[105:0];

endmodule
