// fp_sp_widen: converts an IEEE-754 binary32 operand to binary64, exactly.
//
// Single precision operands enter the unit through this block, and from there
// the unit works on them as binary64 values. Every binary32 value, denormals
// included, is representable in binary64, so the conversion never rounds.
//   - Normal numbers: the exponent is re-biased (+896 = 1023 - 127), and the
//     23-bit fraction moves to the top of the 52-bit fraction.
//   - Denormals: a leading-zero count `lz` of the fraction shifts the leading
//     one out into the hidden position. The exponent becomes 896 - lz.
//   - Zero, infinity and NaN keep their class and sign. A NaN keeps its
//     fraction bits, so a signaling NaN stays signaling.
// Interface: `s` is the binary32 word and `d` the binary64 value. The block is
// purely combinational.
// The document lists single precision next to double precision for the unit
// but does not say how the two share hardware. Converting single operands to
// double at the input is this design's own choice.
module fp_sp_widen
  import fpmac_pkg::*;
(
  input  logic [31:0] s,
  output fp64_t       d
);

  logic [7:0]  e8;
  logic [22:0] f23;
  logic [4:0]  lz;
  logic [22:0] f_norm;

  assign e8  = s[30:23];
  assign f23 = s[22:0];

  // position of the leading one of a denormal fraction
  always_comb begin
    lz = 5'd0;
    for (int i = 0; i < 23; i++)
      if (f23[i]) lz = 5'(22 - i);
  end

  // the leading one shifts out of the 23-bit field, leaving the fraction
  assign f_norm = f23 << (lz + 5'd1);

  always_comb begin
    d.sign = s[31];
    if (e8 == 8'hFF) begin
      d.exp  = 11'h7FF;
      d.frac = {f23, 29'd0};
    end else if (e8 == 8'h00) begin
      if (f23 == '0) begin
        d.exp  = '0;
        d.frac = '0;
      end else begin
        d.exp  = 11'(11'd896 - 11'(lz));
        d.frac = {f_norm, 29'd0};
      end
    end else begin
      d.exp  = 11'(e8) + 11'd896;
      d.frac = {f23, 29'd0};
    end
  end

endmodule
