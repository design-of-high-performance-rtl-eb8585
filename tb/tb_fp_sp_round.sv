// tb_fp_sp_round: self-checking testbench of the binary64 to binary32
// rounder. Inputs are random binary64 values whose exponents span the
// binary32 denormal range, the normal range and overflow. Exact binary32
// values, exact ties, signed zeros, infinities and NaNs are added. For every
// value all four rounding modes are applied and checked:
//   - nearest against a reference worked out with real arithmetic;
//   - the directed modes by bracketing. The result and its binary32
//     neighbour must enclose the input, on the side the mode asks for;
//   - inexact against (result != input), underflow against tiny and inexact,
//     and overflow against the result becoming infinity.
// The block is combinational; vectors are one time unit apart, and a watchdog
// ends the run.
`timescale 1ns/1ps
module tb_fp_sp_round;
  import fpmac_pkg::*;
  import tb_fp_pkg::*;

  fp64_t       d;
  rmode_e      rmode;
  logic [31:0] s;
  logic        ov, un, ix;
  int checks = 0, failures = 0;
  int n_tie = 0, n_ovf = 0, n_den = 0, n_exact = 0;

  fp_sp_round dut (.d(d), .rmode(rmode), .s(s), .overflow(ov), .underflow(un),
                   .inexact(ix));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s: d=%h mode=%0d -> %h ov=%b un=%b ix=%b", what, d, rmode, s, ov, un, ix);
  endtask

  task automatic check_finite(input logic [63:0] v);
    real x, ax, ar, nxt, prv, ref_rn;
    bit  ref_ovf, away;
    d = v;
    x = $bitstoreal(v);
    ax = (x < 0.0) ? -x : x;
    for (int m = 0; m < 4; m++) begin
      rmode = rmode_e'(m);
      #1;
      checks++;
      away = (m == 2 && !v[63]) || (m == 3 && v[63]);
      if (s[31] != v[63]) fail("sign");
      if (s[30:23] == 8'hFF) begin
        if (s[22:0] != 0) fail("nan");
        if (!ov) fail("overflow flag");
        // the mode's own rounding must reach 2^128
        if (m == 0 && ax < pow2(128) - pow2(103)) fail("early overflow rn");
        if (m != 0 && !away && ax < pow2(128)) fail("early overflow rz");
        if (away && ax <= sp_value(32'h7F7F_FFFF)) fail("early overflow away");
        n_ovf++;
        continue;
      end
      ar  = sp_value({1'b0, s[30:0]});
      nxt = sp_value({1'b0, s[30:0] + 31'd1});
      prv = (s[30:0] == 0) ? 0.0 : sp_value({1'b0, s[30:0] - 31'd1});
      if (ov) fail("overflow flag");
      if (ix != (ar != ax)) fail("inexact flag");
      if (un != ((ax < pow2(-126)) && ar != ax)) fail("underflow flag");
      if (m == 0) begin
        ref_rn = sp_rne(ax, ref_ovf);
        if (ref_ovf || ar != ref_rn) fail("nearest");
        if (ar != ax && (ax - ar == nxt - ax || ar - ax == ax - prv)) n_tie++;
      end else if (away) begin
        if (!(prv < ax && ax <= ar)) fail("directed away from zero");
      end else begin
        if (!(ar <= ax && ax < nxt)) fail("directed toward zero");
      end
      if (ar != ax && ar < pow2(-126)) n_den++;
      if (ar == ax) n_exact++;
    end
  endtask

  task automatic check_special(input logic [63:0] v, input logic [31:0] want);
    d = v;
    for (int m = 0; m < 4; m++) begin
      rmode = rmode_e'(m);
      #1;
      checks++;
      if (s !== want || ov || un || ix) fail("special");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_special(64'h0000_0000_0000_0000, 32'h0000_0000);
    check_special(64'h8000_0000_0000_0000, 32'h8000_0000);
    check_special(64'h7FF0_0000_0000_0000, 32'h7F80_0000);
    check_special(64'hFFF0_0000_0000_0000, 32'hFF80_0000);
    check_special(64'h7FF8_0000_0000_0000, 32'h7FC0_0000);
    check_special(64'h7FF4_0000_0000_0000, 32'h7FA0_0000);
    check_finite(64'h47EF_FFFF_F000_0000);   // halfway above the largest finite
    check_finite(64'h47EF_FFFF_E000_0000);   // largest finite
    check_finite(64'h3690_0000_0000_0000);   // 2^-150, half the smallest denormal
    check_finite(64'h3690_0000_0000_0001);
    check_finite(64'h0000_0000_0000_0001);   // binary64 denormal
    check_finite(64'h8000_0000_0000_0001);
    for (int i = 0; i < 4000; i++) begin
      automatic logic [63:0] v = rand_fp(866, 1160);
      unique case (i % 4)
        1: v[28:0] = '0;                          // exact binary32 fraction
        2: v[28:0] = 29'h1000_0000;               // exact tie in the normal range
        3: v = rand_fp(866, 900);                 // around the denormal range
        default: ;
      endcase
      check_finite(v);
    end
    if (n_tie == 0 || n_ovf == 0 || n_den == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL coverage tie=%0d ovf=%0d den=%0d exact=%0d", n_tie, n_ovf, n_den, n_exact);
    end
    $display("ties %0d, overflows %0d, denormals %0d, exact %0d", n_tie, n_ovf, n_den, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
