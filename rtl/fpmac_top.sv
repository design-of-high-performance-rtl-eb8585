// fpmac_top: 64-bit fixed and floating point multiply-add unit.
//
// One 64 x 64 radix-4 Booth multiplier with Kogge-Stone row addition serves
// both number systems: integer operands go in directly (signed or unsigned),
// binary64 operands go in as their 53-bit significands. Around it:
//   fixed point   add / subtract (64-bit Kogge-Stone adder, exact 65-bit
//                 result), multiply (exact 128-bit product), multiply-
//                 accumulate into a 128-bit accumulator (wraps modulo 2^128);
//   floating point add / subtract, multiply, divide and multiply-accumulate
//                 in IEEE-754 binary64 with four rounding modes. Add,
//                 subtract, multiply and accumulate share one alignment
//                 adder, one normalizer, one rounder and one exception
//                 stage; a multiply is the product plus a zero of the same
//                 sign. The accumulate is fused: acc + a*b is formed from
//                 the exact 106-bit product and rounded once.
// With `is_double` low, the floating point operations work on IEEE-754
// binary32 operands in a[31:0], b[31:0] and acc[31:0]. They are widened to
// binary64 exactly, go through the same datapath, and the binary64 result is
// rounded once more to binary32 in the same mode. For add, subtract, multiply
// and divide this gives the correctly rounded binary32 result. For the fused
// multiply-accumulate the two rounding steps can differ from a single
// rounding in the last place when the binary64 result lies exactly halfway
// between two binary32 values.
// The accumulator sits behind the adder and feeds it back, so a multiply-
// accumulate completes in one clock cycle.
//
// Interface: `start` with `op`, `is_float`, `is_double`, `is_signed`,
// `rmode`, `a`, `b` is
// taken at a rising clock edge. Single-cycle operations raise `done` for one
// cycle after that edge with `result` and `flags`; OP_MAC, OP_LDACC and
// OP_CLR also update `acc`. OP_DIV (floating point only) runs the sequential
// divider: `busy` is high while it works and `done` follows 57 edges after
// the start edge. A start while busy is ignored. A fixed point OP_DIV returns
// 0 with the invalid flag. Binary64 values occupy result[63:0] and
// acc[63:0], binary32 values result[31:0] and acc[31:0], the bits above being
// zero. Fixed point add/subtract results are
// the exact 65-bit sum sign-extended (signed) or zero-extended (unsigned).
// Opcode and rounding-mode codes, the accumulator load/clear operations and
// the handling of a start while busy are this design's own choices. So is
// sharing the binary64 datapath for binary32; the document only states that
// the unit handles both precisions.
module fpmac_top
  import fpmac_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  op_e            op,
  input  logic           is_float,
  input  logic           is_double,
  input  logic           is_signed,
  input  rmode_e         rmode,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] result,
  output logic [2*W-1:0] acc,
  output fp_flags_t      flags,
  output logic           done,
  output logic           busy
);

  // ---------------------------------------------------------------- operands
  // Binary32 operands are widened to binary64 exactly.
  fp64_t fa, fb, facc;
  fp64_t wa, wb, wacc;

  fp_sp_widen u_wa   (.s(a[31:0]),   .d(wa));
  fp_sp_widen u_wb   (.s(b[31:0]),   .d(wb));
  fp_sp_widen u_wacc (.s(acc[31:0]), .d(wacc));

  assign fa   = is_double ? fp64_t'(a[63:0])   : wa;
  assign fb   = is_double ? fp64_t'(b[63:0])   : wb;
  assign facc = is_double ? fp64_t'(acc[63:0]) : wacc;

  // ------------------------------------------------- shared Booth multiplier
  logic [63:0]  mant_a, mant_b;
  logic [W-1:0] mul_a, mul_b;
  logic [2*W-1:0] prod;

  assign mul_a = is_float ? W'(mant_a) : a;
  assign mul_b = is_float ? W'(mant_b) : b;

  booth_multiplier #(.N(W)) u_mul (
    .a(mul_a), .b(mul_b), .is_signed(is_signed & ~is_float), .prod(prod)
  );

  // ------------------------------------------------------------ fixed point
  logic [W-1:0]   fx_sum;
  logic           fx_cout, fx_top;
  logic           fx_sub;
  logic [2*W-1:0] fx_addsub, fx_mac;
  logic           fx_mac_cout;

  assign fx_sub = (op == OP_SUB);

  ks_adder #(.W(W)) u_fx_add (
    .a(a), .b(fx_sub ? ~b : b), .cin(fx_sub), .sum(fx_sum), .cout(fx_cout)
  );
  // bit W of the exact sum of the (W+1)-bit extended operands
  assign fx_top    = (is_signed & a[W-1]) ^ ((is_signed & b[W-1]) ^ fx_sub) ^ fx_cout;
  assign fx_addsub = {{(W-1){fx_top & (is_signed | fx_sub)}}, fx_top, fx_sum};

  ks_adder #(.W(2*W)) u_fx_mac (
    .a(acc), .b(prod), .cin(1'b0), .sum(fx_mac), .cout(fx_mac_cout)
  );

  // --------------------------------------------------------- floating point
  logic               m_sign;
  logic signed [13:0] m_exp;
  logic [105:0]       m_sig;

  fp_mul_path u_fmul (
    .a(fa), .b(fb), .mant_a(mant_a), .mant_b(mant_b), .prod(prod[127:0]),
    .sign(m_sign), .exp(m_exp), .sig(m_sig)
  );

  // Alignment adder operands: product or a, and zero, acc or b.
  logic               x_sign, y_sign;
  logic signed [13:0] x_exp, y_exp;
  logic [105:0]       x_sig, y_sig;

  function automatic logic [105:0] widen(input fp64_t v);
    return {1'b0, (v.exp != '0), v.frac, 52'd0};
  endfunction
  function automatic logic signed [13:0] eff_exp(input fp64_t v);
    return (v.exp == '0) ? 14'sd1 : 14'(signed'({3'b000, v.exp}));
  endfunction

  always_comb begin
    if (op == OP_MUL || op == OP_MAC) begin
      x_sign = m_sign;  x_exp = m_exp;  x_sig = m_sig;
    end else begin
      x_sign = fa.sign; x_exp = eff_exp(fa); x_sig = widen(fa);
    end
    unique case (op)
      OP_MUL: begin y_sign = m_sign;             y_exp = 14'sd1;        y_sig = '0;          end
      OP_MAC: begin y_sign = facc.sign;          y_exp = eff_exp(facc); y_sig = widen(facc); end
      OP_SUB: begin y_sign = ~fb.sign;           y_exp = eff_exp(fb);   y_sig = widen(fb);   end
      default: begin y_sign = fb.sign;           y_exp = eff_exp(fb);   y_sig = widen(fb);   end
    endcase
  end

  logic               s_sign;
  logic signed [13:0] s_exp;
  logic [107:0]       s_sig;

  fp_add_path #(.W(106)) u_fadd (
    .x_sign(x_sign), .x_exp(x_exp), .x_sig(x_sig),
    .y_sign(y_sign), .y_exp(y_exp), .y_sig(y_sig),
    .rmode(rmode), .sign(s_sign), .exp(s_exp), .sig(s_sig)
  );

  // Sequential divider
  logic               d_busy, d_done, d_sign;
  logic signed [13:0] d_exp;
  logic [56:0]        d_sig;
  logic               div_go;
  fp64_t              div_a, div_b;   // operands held for the exception stage
  logic               div_sp;         // precision held for the result

  assign div_go = start & !d_busy & !d_done & is_float & (op == OP_DIV);

  fp_divider #(.QW(56)) u_fdiv (
    .clk(clk), .rst_n(rst_n), .start(div_go), .a(fa), .b(fb),
    .busy(d_busy), .done(d_done), .sign(d_sign), .exp(d_exp), .sig(d_sig)
  );

  // Normalizer input: adder output (108 bits, 105 fraction bits) or the
  // quotient (57 bits, 56 fraction bits) placed at the same binary point.
  logic               n_sign;
  logic signed [13:0] n_exp;
  logic [107:0]       n_sig;
  logic [55:0]        n_mant;
  logic [11:0]        n_e;
  logic               n_zero;

  always_comb begin
    if (d_done) begin
      n_sign = d_sign; n_exp = d_exp; n_sig = {2'b00, d_sig, 49'd0};
    end else begin
      n_sign = s_sign; n_exp = s_exp; n_sig = s_sig;
    end
  end

  fp_normalize #(.W(108), .FB(105)) u_norm (
    .exp(n_exp), .sig(n_sig), .mant(n_mant), .exp_out(n_e), .is_zero(n_zero)
  );

  fp64_t r_res;
  logic  r_ov, r_un, r_inx;

  fp_round u_round (
    .sign(n_sign), .mant(n_mant), .exp(n_e), .rmode(rmode),
    .result(r_res), .overflow(r_ov), .underflow(r_un), .inexact(r_inx)
  );

  fp64_t     x_res;
  fp_flags_t x_flags;
  op_e       x_op;

  assign x_op = d_done ? OP_DIV : op;

  fp_exception u_exc (
    .op(x_op), .a(d_done ? div_a : fa), .b(d_done ? div_b : fb), .acc(facc),
    .rounded(r_res), .r_overflow(r_ov), .r_underflow(r_un), .r_inexact(r_inx),
    .result(x_res), .flags(x_flags)
  );

  // Binary32 results: the binary64 result rounded once more.
  logic        sp_sel;
  logic [31:0] sp_res;
  logic        sp_ov, sp_un, sp_inx;
  fp_flags_t   sp_flags;
  logic [2*W-1:0] f_res;
  fp_flags_t   f_flags;

  assign sp_sel = d_done ? div_sp : ~is_double;

  fp_sp_round u_sp_round (
    .d(x_res), .rmode(rmode), .s(sp_res),
    .overflow(sp_ov), .underflow(sp_un), .inexact(sp_inx)
  );

  assign sp_flags = '{overflow:  x_flags.overflow  | sp_ov,
                      underflow: x_flags.underflow | sp_un,
                      invalid:   x_flags.invalid,
                      inexact:   x_flags.inexact   | sp_inx,
                      exception: x_flags.exception | sp_ov | sp_un};
  assign f_res   = sp_sel ? {{(2*W-32){1'b0}}, sp_res} : {{W{1'b0}}, x_res};
  assign f_flags = sp_sel ? sp_flags : x_flags;

  // ----------------------------------------------------- result / accumulator
  logic fire;
  assign fire = start & !d_busy & !d_done & !(is_float & (op == OP_DIV));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      acc    <= '0;
      flags  <= '0;
      done   <= 1'b0;
      div_a  <= '0;
      div_b  <= '0;
      div_sp <= 1'b0;
    end else begin
      done <= 1'b0;
      if (div_go) begin
        div_a <= fa;
        div_b  <= fb;
        div_sp <= ~is_double;
      end
      if (d_done) begin
        result <= f_res;
        flags  <= f_flags;
        done   <= 1'b1;
      end else if (fire) begin
        done  <= 1'b1;
        flags <= '0;
        if (is_float) begin
          unique case (op)
            OP_LDACC: begin acc <= {{W{1'b0}}, a}; result <= {{W{1'b0}}, a}; end
            OP_CLR:   begin acc <= '0;             result <= '0;             end
            default: begin
              result <= f_res;
              flags  <= f_flags;
              if (op == OP_MAC) acc <= f_res;
            end
          endcase
        end else begin
          unique case (op)
            OP_ADD, OP_SUB: result <= fx_addsub;
            OP_MUL:         result <= prod;
            OP_MAC:   begin acc <= fx_mac; result <= fx_mac; end
            OP_LDACC: begin
              acc    <= {{W{is_signed & a[W-1]}}, a};
              result <= {{W{is_signed & a[W-1]}}, a};
            end
            OP_CLR:   begin acc <= '0; result <= '0; end
            default: begin   // OP_DIV has no fixed point form
              result <= '0;
              flags  <= '{overflow: 1'b0, underflow: 1'b0, invalid: 1'b1,
                          inexact: 1'b0, exception: 1'b1};
            end
          endcase
        end
      end
    end
  end

  assign busy = d_busy;

endmodule
