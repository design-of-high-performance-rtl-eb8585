// fp_sp_round: rounds a binary64 result to IEEE-754 binary32.
//
// Single precision results leave the unit through this block. The shared
// datapath has already rounded the result to binary64 in the same rounding
// mode. For add, subtract, multiply and divide of binary32 operands, rounding
// first to binary64 and then to binary32 gives the correctly rounded binary32
// result, because 53 >= 2*24 + 2.
// How it works:
//   - The 53-bit significand is cut after 24 bits. The guard bit and the
//     sticky OR of the bits below it decide the increment, per mode:
//       nearest-even   guard & (sticky | lsb)
//       toward zero    never
//       toward +inf    positive & (guard | sticky)
//       toward -inf    negative & (guard | sticky)
//   - Values below the binary32 normal range are first shifted right, so they
//     round as denormals. A denormal that rounds up into the normal range
//     carries into the exponent field by itself.
//   - A value at or beyond 2^128 after rounding overflows to infinity in every
//     mode, the same policy the binary64 rounder follows.
//   - Zero, infinity and NaN pass through. The top 23 bits of a NaN's fraction
//     are kept, so the unit's signaling and quiet NaN patterns map to 7FA00000
//     and 7FC00000.
// Interface: `d` is the binary64 value and `rmode` the rounding mode. `s` is
// the binary32 word. `overflow`, `underflow` (tiny before rounding, and
// inexact) and `inexact` are the flags of this step. The block is purely
// combinational.
// The document names the four rounding modes and single precision. This
// two-step rounding is this design's own choice.
module fp_sp_round
  import fpmac_pkg::*;
(
  input  fp64_t       d,
  input  rmode_e      rmode,
  output logic [31:0] s,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact
);

  logic signed [12:0] es;        // binary32 biased exponent before rounding
  logic [52:0]        m;         // binary64 significand with hidden bit
  logic [5:0]         sh;        // right shift for binary32 denormals
  logic [85:0]        v;
  logic [23:0]        kept;
  logic               guard, sticky, inc, tiny;
  logic [30:0]        packed_mag;
  logic [7:0]         e_field;

  assign es = 13'(signed'({2'b00, d.exp})) - 13'sd896;
  assign m  = {1'b1, d.frac};

  always_comb begin
    tiny = (es < 13'sd1);
    sh   = '0;
    if (tiny) sh = ((13'sd1 - es) > 13'sd30) ? 6'd30 : 6'(13'sd1 - es);
    v      = {m, 33'd0} >> sh;
    kept   = v[85:62];
    guard  = v[61];
    sticky = |v[60:0];
    // more than 25 places below the smallest denormal: only sticky is left
    if (tiny && (13'sd1 - es) > 13'sd25) begin
      kept   = '0;
      guard  = 1'b0;
      sticky = 1'b1;
    end
    unique case (rmode)
      RM_NEAREST: inc = guard & (sticky | kept[0]);
      RM_ZERO:    inc = 1'b0;
      RM_POSINF:  inc = ~d.sign & (guard | sticky);
      default:    inc = d.sign & (guard | sticky);
    endcase
    e_field    = tiny ? 8'd0 : es[7:0];
    packed_mag = {e_field, kept[22:0]} + 31'(inc);
  end

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    inexact   = 1'b0;
    if (d.exp == 11'h7FF) begin
      s = {d.sign, 8'hFF, d.frac[51:29]};
    end else if (d.exp == '0) begin
      // binary64 zero, or a binary64 denormal far below binary32 range
      if (d.frac == '0) begin
        s = {d.sign, 31'd0};
      end else begin
        inexact   = 1'b1;
        underflow = 1'b1;
        s = {d.sign, 30'd0, (rmode == RM_POSINF && !d.sign) ||
                            (rmode == RM_NEGINF &&  d.sign)};
      end
    end else if (es > 13'sd254 || packed_mag[30:23] == 8'hFF) begin
      overflow = 1'b1;
      inexact  = 1'b1;
      s = {d.sign, 8'hFF, 23'd0};
    end else begin
      inexact   = guard | sticky;
      underflow = tiny & (guard | sticky);
      s = {d.sign, packed_mag};
    end
  end

endmodule
