// fp_exception: special-case handling of the floating point operations.
//
// The operands are classified (zero, infinity, quiet NaN, signalling NaN)
// and, where a special case applies, the rounded result is replaced:
//   NaN operand            -> quiet NaN (a signalling NaN also raises invalid)
//   inf - inf, 0 * inf     -> signalling NaN pattern, invalid
//   0 / 0, inf / inf       -> signalling NaN pattern, invalid
//   x / 0                  -> infinity, sign from the operands (divide by zero)
//   x / inf                -> zero, sign from the operands, underflow
//   inf op finite          -> infinity with the proper sign
// For a multiply-accumulate (acc + a*b) the product's class is formed first
// and then combined with the accumulator as an addition. In every other case
// the rounded result and its overflow, underflow and inexact flags pass
// through. `exception` is the OR of overflow, underflow, invalid and divide
// by zero. Combinational.
module fp_exception
  import fpmac_pkg::*;
(
  input  op_e       op,
  input  fp64_t     a,
  input  fp64_t     b,
  input  fp64_t     acc,
  input  fp64_t     rounded,
  input  logic      r_overflow,
  input  logic      r_underflow,
  input  logic      r_inexact,
  output fp64_t     result,
  output fp_flags_t flags
);

  fp_class_t ca, cb, cc;
  logic      any_snan, any_qnan, dbz;
  logic      bs, ps, p_inf, p_zero;
  logic      f_ov, f_un, f_inv, f_inx;

  always_comb begin
    ca = classify(a.exp, a.frac);
    cb = classify(b.exp, b.frac);
    cc = classify(acc.exp, acc.frac);
    any_snan = ca.snan | cb.snan | ((op == OP_MAC) & cc.snan);
    any_qnan = ca.qnan | cb.qnan | ((op == OP_MAC) & cc.qnan);
    bs     = b.sign ^ (op == OP_SUB);
    ps     = a.sign ^ b.sign;
    p_inf  = ca.inf | cb.inf;
    p_zero = ca.zero | cb.zero;
    dbz    = 1'b0;

    result          = rounded;
    f_ov  = r_overflow;
    f_un  = r_underflow;
    f_inx = r_inexact;
    f_inv = 1'b0;

    if (any_snan || any_qnan) begin
      result = QNAN;
      {f_ov, f_un, f_inx} = '0;
      f_inv = any_snan;
    end else begin
      unique case (op)
        OP_ADD, OP_SUB: begin
          if (ca.inf && cb.inf && (a.sign != bs)) begin
            result = SNAN; {f_ov, f_un, f_inx} = '0; f_inv = 1'b1;
          end else if (ca.inf) begin
            result = a; {f_ov, f_un, f_inx} = '0;
          end else if (cb.inf) begin
            result = '{sign: bs, exp: '1, frac: '0}; {f_ov, f_un, f_inx} = '0;
          end
        end
        OP_MUL: begin
          if (p_inf && p_zero) begin
            result = SNAN; {f_ov, f_un, f_inx} = '0; f_inv = 1'b1;
          end else if (p_inf) begin
            result = '{sign: ps, exp: '1, frac: '0}; {f_ov, f_un, f_inx} = '0;
          end
        end
        OP_DIV: begin
          if ((ca.zero && cb.zero) || (ca.inf && cb.inf)) begin
            result = SNAN; {f_ov, f_un, f_inx} = '0; f_inv = 1'b1;
          end else if (ca.inf) begin
            result = '{sign: ps, exp: '1, frac: '0}; {f_ov, f_un, f_inx} = '0;
          end else if (cb.inf) begin
            result = '{sign: ps, exp: '0, frac: '0}; {f_ov, f_inx} = '0; f_un = 1'b1;
          end else if (cb.zero) begin
            result = '{sign: ps, exp: '1, frac: '0}; {f_ov, f_un, f_inx} = '0; dbz = 1'b1;
          end else if (ca.zero) begin
            result = '{sign: ps, exp: '0, frac: '0}; {f_ov, f_un, f_inx} = '0;
          end
        end
        OP_MAC: begin
          if (p_inf && p_zero) begin
            result = SNAN; {f_ov, f_un, f_inx} = '0; f_inv = 1'b1;
          end else if (p_inf && cc.inf && (ps != acc.sign)) begin
            result = SNAN; {f_ov, f_un, f_inx} = '0; f_inv = 1'b1;
          end else if (p_inf) begin
            result = '{sign: ps, exp: '1, frac: '0}; {f_ov, f_un, f_inx} = '0;
          end else if (cc.inf) begin
            result = acc; {f_ov, f_un, f_inx} = '0;
          end
        end
        default: ;
      endcase
    end
  end

  assign flags = '{overflow: f_ov, underflow: f_un, invalid: f_inv, inexact: f_inx,
                   exception: f_ov | f_un | f_inv | dbz};

endmodule
