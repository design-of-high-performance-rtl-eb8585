// fp_add_path: alignment and addition/subtraction of two unrounded floating
// point operands.
//
// Each operand is a sign, a biased exponent and a W-bit significand with two
// integer bits (value = sig / 2^(W-2) * 2^(exp-1023)). The operand with the
// larger exponent becomes the "large" one (exponent_large / mantissa_large),
// the other is shifted right by the exponent difference. One bit is appended
// below the significands; every bit that the shift pushes into or below it
// is ORed there (a sticky bit), so the bits above stay exact and the final
// rounding still sees that something was lost. The effective operation
// (add, or subtract when the signs differ) is done by a Kogge-Stone adder;
// if a subtraction goes negative (possible when the large operand has
// leading zeros) a second Kogge-Stone adder negates it and the sign flips.
// A zero operand never decides the alignment. An exact zero result is +0,
// or -0 when rounding toward -infinity, unless both operands had the same
// sign. The output has W+2 bits, three integer bits (room for the carry),
// and goes to fp_normalize. Combinational.
module fp_add_path
  import fpmac_pkg::*;
#(
  parameter int unsigned W = 106
) (
  input  logic               x_sign,
  input  logic signed [13:0] x_exp,
  input  logic [W-1:0]       x_sig,
  input  logic               y_sign,
  input  logic signed [13:0] y_exp,
  input  logic [W-1:0]       y_sig,
  input  rmode_e             rmode,
  output logic               sign,
  output logic signed [13:0] exp,
  output logic [W+1:0]       sig
);

  localparam int unsigned XW = W + 1;     // significand plus sticky bit

  logic               x_large;
  logic               l_sign, s_sign;
  logic signed [13:0] l_exp, s_exp;
  logic [W-1:0]       l_sig, s_sig;
  logic [13:0]        diff;
  logic [XW-1:0]      l_ext, s_ext, s_shift, s_mask;
  logic               sticky;
  logic               eff_sub;

  always_comb begin
    if (y_sig == '0)      x_large = 1'b1;
    else if (x_sig == '0) x_large = 1'b0;
    else                  x_large = (x_exp >= y_exp);
    l_sign = x_large ? x_sign : y_sign;
    l_exp  = x_large ? x_exp  : y_exp;
    l_sig  = x_large ? x_sig  : y_sig;
    s_sign = x_large ? y_sign : x_sign;
    s_exp  = x_large ? y_exp  : x_exp;
    s_sig  = x_large ? y_sig  : x_sig;
    diff   = (s_sig == '0) ? 14'd0 : 14'(l_exp - s_exp);
    eff_sub = l_sign ^ s_sign;

    s_mask = '0;
    l_ext = {l_sig, 1'b0};
    s_ext = {s_sig, 1'b0};
    if (diff >= 14'(XW)) begin
      s_shift = '0;
      sticky  = (s_sig != '0);
    end else begin
      s_shift = s_ext >> diff;
      // bits that land in or below the sticky position
      s_mask  = (XW'(1) << (diff + 14'd1)) - XW'(1);
      sticky  = |(s_ext & s_mask);
    end
    s_shift[0] = sticky;
  end

  // large +/- small, one bit wider for the carry or the borrow
  logic [XW:0] sum_raw, sum_neg;
  logic        c_unused0, c_unused1;

  ks_adder #(.W(XW+1)) u_addsub (
    .a({1'b0, l_ext}),
    .b(eff_sub ? ~{1'b0, s_shift} : {1'b0, s_shift}),
    .cin(eff_sub),
    .sum(sum_raw),
    .cout(c_unused0)
  );

  ks_adder #(.W(XW+1)) u_negate (
    .a(~sum_raw), .b('0), .cin(1'b1), .sum(sum_neg), .cout(c_unused1)
  );

  logic negative;
  assign negative = eff_sub & sum_raw[XW];

  always_comb begin
    exp = l_exp;
    sig = negative ? sum_neg : sum_raw;
    if (sig == '0)
      sign = eff_sub ? (rmode == RM_NEGINF) : l_sign;
    else
      sign = negative ? s_sign : l_sign;
  end

endmodule
