// fp_divider: sequential binary64 significand divider, one quotient bit per
// clock cycle.
//
// On `start` the dividend and divisor significands (hidden bit restored) are
// normalized so that their leading one is at bit 52, which makes denormal
// operands ordinary, and the exponent difference ea - eb + 1023 is formed.
// Then, once per cycle, the divisor is subtracted from the partial remainder
// by a Kogge-Stone adder; the carry out tells whether the remainder was at
// least the divisor, that bit enters the quotient, the remainder keeps the
// difference or itself and shifts left. After QW = 56 cycles the quotient
// holds 56 bits (one integer bit, 55 fraction bits) and a last bit, set when
// the remainder is not zero, is appended as sticky information for
// rounding. Output value = sig * 2^(exp - 1023 - 56).
// Timing: `start` is taken at a clock edge while idle; `done` is high for one
// cycle, 56 edges later, with the result on sign/exp/sig (held until the next
// start). Zero, infinite and NaN operands still run; fp_exception replaces
// their result.
module fp_divider
  import fpmac_pkg::*;
#(
  parameter int unsigned QW = 56
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  fp64_t              a,
  input  fp64_t              b,
  output logic               busy,
  output logic               done,
  output logic               sign,
  output logic signed [13:0] exp,
  output logic [QW:0]        sig
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [52:0] ma, mb, na, nb;
  logic [5:0]  lza, lzb;
  logic [10:0] ea, eb;

  always_comb begin
    ma  = {(a.exp != '0), a.frac};
    mb  = {(b.exp != '0), b.frac};
    ea  = (a.exp == '0) ? 11'd1 : a.exp;
    eb  = (b.exp == '0) ? 11'd1 : b.exp;
    lza = '0;
    lzb = '0;
    for (int i = 0; i < 53; i++) begin
      if (ma[i]) lza = 6'(52 - i);
      if (mb[i]) lzb = 6'(52 - i);
    end
    na = ma << lza;
    nb = mb << lzb;
  end

  logic [54:0]        rem, dvs;
  logic [QW-1:0]      quo;
  logic [$clog2(QW)-1:0] cnt;
  logic [55:0]        diff;
  logic               ge;

  ks_adder #(.W(56)) u_sub (
    .a({1'b0, rem}), .b(~{1'b0, dvs}), .cin(1'b1), .sum(diff), .cout(ge)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rem   <= '0;
      dvs   <= '0;
      quo   <= '0;
      cnt   <= '0;
      sign  <= 1'b0;
      exp   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_RUN;
            rem   <= {2'b00, na};
            dvs   <= {2'b00, nb};
            quo   <= '0;
            cnt   <= '0;
            sign  <= a.sign ^ b.sign;
            exp   <= 14'(signed'({3'b000, ea})) - 14'(signed'({8'd0, lza}))
                   - 14'(signed'({3'b000, eb})) + 14'(signed'({8'd0, lzb})) + 14'sd1023;
          end else begin
            state <= S_IDLE;
          end
        end
        default: begin  // S_RUN
          quo <= {quo[QW-2:0], ge};
          rem <= (ge ? diff[54:0] : rem) << 1;
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(QW - 1)) state <= S_DONE;
        end
      endcase
    end
  end

  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);
  assign sig  = {quo, (rem != '0)};

endmodule
