// fp_round: rounding of a normalized result to IEEE-754 binary64.
//
// Input: sign, a 56-bit mantissa ([55] overflow bit, [54] hidden bit,
// [53:2] fraction, [1] round bit, [0] sticky) and a 12-bit biased exponent,
// whose extra top bit lets an exponent above 2046 be seen. If [55] is set
// the mantissa is first shifted right one place. The fraction is then
// incremented according to the rounding mode:
//   nearest (ties to even), toward zero, toward +infinity, toward -infinity.
// A carry out of the hidden bit moves the exponent up by one; a denormal that
// rounds up into the hidden bit becomes the smallest normal number. An
// exponent of 2047 or more is an overflow and returns infinity with the
// operand's sign in every rounding mode. Underflow is raised for a denormal
// (exponent 0) result that is inexact. Combinational.
module fp_round
  import fpmac_pkg::*;
(
  input  logic        sign,
  input  logic [55:0] mant,
  input  logic [11:0] exp,
  input  rmode_e      rmode,
  output fp64_t       result,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact
);

  logic [54:0] m;       // hidden bit, fraction, round, sticky
  logic [12:0] e;
  logic        guard, sticky, lsb, inc;
  logic [53:0] r;
  logic [12:0] e_r;

  always_comb begin
    if (mant[55]) begin
      m = {mant[55:2], mant[1] | mant[0]};
      e = {1'b0, exp} + 13'd1;
    end else begin
      m = mant[54:0];
      e = {1'b0, exp};
    end
    lsb    = m[2];
    guard  = m[1];
    sticky = m[0];
    unique case (rmode)
      RM_NEAREST: inc = guard & (sticky | lsb);
      RM_ZERO:    inc = 1'b0;
      RM_POSINF:  inc = ~sign & (guard | sticky);
      default:    inc = sign & (guard | sticky);   // RM_NEGINF
    endcase

    r = {1'b0, m[54:2]} + 54'(inc);
    if (r[53]) begin
      e_r = e + 13'd1;
      result.frac = r[52:1];
    end else begin
      e_r = (e == 13'd0 && r[52]) ? 13'd1 : e;
      result.frac = r[51:0];
    end
    result.sign = sign;
    result.exp  = e_r[10:0];

    overflow  = (e_r >= 13'(EMAX));
    underflow = (e == 13'd0) && (guard | sticky);
    inexact   = guard | sticky | overflow;
    if (overflow) begin
      result.exp  = '1;
      result.frac = '0;
    end
  end

endmodule
