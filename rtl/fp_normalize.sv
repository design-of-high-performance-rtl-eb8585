// fp_normalize: post-normalization of a wide significand into the 56-bit
// rounding format with a 12-bit biased exponent.
//
// Input value = sig * 2^(exp - 1023 - FB), FB being the number of fraction
// bits of `sig`. The leading zeros of `sig` are counted and shifted out, and
// the exponent is reduced by the same amount, so the leading one becomes the
// hidden bit. If the exponent would fall below 1 the significand is instead
// shifted right by the shortfall and the exponent set to 0 (a denormal
// result); a shift past all bits leaves only the sticky bit. Output layout:
//   m[55] 0 (room for the rounding carry), m[54] hidden bit, m[53:2]
//   fraction, m[1] round bit, m[0] sticky (OR of every lower bit).
// Exponents above 4095 saturate; fp_round treats 2047 and above as overflow.
// Combinational. Needs W >= 56.
module fp_normalize #(
  parameter int unsigned W  = 108,
  parameter int unsigned FB = 105
) (
  input  logic signed [13:0] exp,
  input  logic [W-1:0]       sig,
  output logic [55:0]        mant,
  output logic [11:0]        exp_out,
  output logic               is_zero
);

  logic [$clog2(W+1)-1:0] lz;
  logic signed [15:0]     en;
  logic [W-1:0]           left, right, mask;
  logic [15:0]            rs;
  logic                   lost;

  always_comb begin
    lz = '0;
    for (int i = 0; i < W; i++)
      if (sig[i]) lz = $bits(lz)'(W - 1 - i);
    is_zero = (sig == '0);
    left = sig << lz;
    // exponent of the leading one, biased
    en = 16'(exp) + 16'(W - 1 - FB) - 16'(lz);

    mask = '0;
    rs = (en < 16'sd1) ? 16'(16'sd1 - en) : 16'd0;
    if (rs >= 16'(W)) begin
      right = '0;
      lost  = (left != '0);
    end else begin
      right = left >> rs;
      mask  = (W'(1) << rs) - W'(1);
      lost  = |(left & mask);
    end

    mant = {1'b0, right[W-1 -: 54], (|right[W-55:0]) | lost};
    if (is_zero || en < 16'sd1) exp_out = 12'd0;
    else if (en > 16'sd4095)     exp_out = 12'hFFF;
    else                         exp_out = en[11:0];
  end

endmodule
