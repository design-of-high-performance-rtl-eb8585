// tb_fp_add_path: the add path with the normalizer and four rounders.
// Sums and differences under round-to-nearest are compared bit for bit with
// the simulator's IEEE double arithmetic, the other modes for consistency,
// and the inexact flag with the error term of an exact two-sum.
// Operands with equal or close exponents exercise cancellation and the
// left normalization shift, distant ones the sticky bit.
module tb_fp_add_path
  import fpmac_pkg::*;
  import tb_fp_pkg::*;
;
  int checks = 0, failures = 0;

  fp64_t a, b;
  logic  sub;
  rmode_e zmode;
  logic sign;
  logic signed [13:0] e;
  logic [107:0] sig;
  logic [55:0] mant;
  logic [11:0] ne;
  logic nz;
  fp64_t r [4];
  logic ov [4], un [4], ix [4];

  function automatic logic [105:0] widen(input fp64_t v);
    return {1'b0, (v.exp != '0), v.frac, 52'd0};
  endfunction
  function automatic logic signed [13:0] eexp(input fp64_t v);
    return (v.exp == '0) ? 14'sd1 : 14'(signed'({3'b000, v.exp}));
  endfunction

  fp_add_path #(.W(106)) dut (
    .x_sign(a.sign), .x_exp(eexp(a)), .x_sig(widen(a)),
    .y_sign(b.sign ^ sub), .y_exp(eexp(b)), .y_sig(widen(b)),
    .rmode(zmode), .sign(sign), .exp(e), .sig(sig));
  fp_normalize #(.W(108), .FB(105)) u_n (.exp(e), .sig(sig), .mant(mant), .exp_out(ne), .is_zero(nz));
  for (genvar m = 0; m < 4; m++) begin : g_r
    fp_round u_r (.sign(sign), .mant(mant), .exp(ne), .rmode(rmode_e'(m)),
                  .result(r[m]), .overflow(ov[m]), .underflow(un[m]), .inexact(ix[m]));
  end

  int n_cancel = 0, n_sticky = 0;

  task automatic check(input logic [63:0] x, input logic [63:0] y, input bit s);
    logic [63:0] ref_v;
    a = x; b = y; sub = s; zmode = RM_NEAREST;
    #1;
    ref_v = s ? $realtobits($bitstoreal(x) - $bitstoreal(y))
              : $realtobits($bitstoreal(x) + $bitstoreal(y));
    checks++;
    if (r[0] !== ref_v) begin
      failures++;
      $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", y, r[0], ref_v);
    end
    checks++;
    if (mode_check(r[0], r[1], r[2], r[3], ix[0], ov[0]) != 0) begin
      failures++;
      $display("FAIL modes %h %s %h: %h %h %h %h", x, s ? "-" : "+", y, r[0], r[1], r[2], r[3]);
    end
    // inexact flag against the error term of the TwoSum transformation,
    // which is exact in round-to-nearest when nothing overflows
    if (!ov[0]) begin
      real xs, ys, sr, bv, err;
      xs = $bitstoreal(x);
      ys = s ? -$bitstoreal(y) : $bitstoreal(y);
      sr = xs + ys;
      bv = sr - xs;
      err = (xs - (sr - bv)) + (ys - bv);
      checks++;
      if (ix[0] !== (err != 0.0)) begin
        failures++;
        $display("FAIL inexact %h %s %h: flag %b", x, s ? "-" : "+", y, ix[0]);
      end
    end
    if (ref_v[62:52] + 11'd5 < x[62:52] && ref_v[62:0] != 0) n_cancel++;
    if (ix[0]) n_sticky++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x;
    check(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 0);   // 1 + 1
    check(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1);   // 1 - 1 = +0
    // -0 from x - x when rounding toward -infinity
    a = 64'h3FF0_0000_0000_0000; b = a; sub = 1; zmode = RM_NEGINF; #1;
    checks++;
    if (sign !== 1'b1 || sig != 0) begin failures++; $display("FAIL -0 rule"); end
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 0);   // overflow
    check(64'h0010_0000_0000_0000, 64'h000F_FFFF_FFFF_FFFF, 1);   // to denormal
    check(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0001, 0);   // just above half ulp
    check(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000, 0);   // tie to even
    for (int i = 0; i < 5000; i++) begin
      automatic bit s = 1'($urandom);
      case (i % 4)
        0: begin x = rand_fp(1000, 1050); check(x, {x[63:52] ^ 12'($urandom % 2), 52'($urandom)}, s); end
        1: check(rand_fp(1000, 1060), rand_fp(1000, 1060), s);
        2: check(rand_fp(0, 2), rand_fp(0, 2), s);
        default: check(rand_fp(1, 2046), rand_fp(1, 2046), s);
      endcase
    end
    checks++;
    if (n_cancel == 0 || n_sticky == 0) begin
      failures++;
      $display("FAIL coverage cancel=%0d sticky=%0d", n_cancel, n_sticky);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
