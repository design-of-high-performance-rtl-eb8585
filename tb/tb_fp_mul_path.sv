// tb_fp_mul_path: the multiply path together with the shared Booth
// multiplier, the normalizer and four rounders (one per rounding mode).
// Round-to-nearest results are compared bit for bit with the simulator's
// IEEE double product; the other three modes are checked against it for
// consistency (bracketing, one unit apart). Operands cover normal,
// denormal, overflowing and underflowing products.
module tb_fp_mul_path
  import fpmac_pkg::*;
  import tb_fp_pkg::*;
;
  int checks = 0, failures = 0;

  fp64_t a, b;
  logic [63:0] ma, mb;
  logic [127:0] prod;
  logic sign;
  logic signed [13:0] e;
  logic [105:0] sig;
  logic [55:0] mant;
  logic [11:0] ne;
  logic nz;
  fp64_t r [4];
  logic ov [4], un [4], ix [4];

  booth_multiplier #(.N(64)) u_mul (.a(ma), .b(mb), .is_signed(1'b0), .prod(prod));
  fp_mul_path dut (.a(a), .b(b), .mant_a(ma), .mant_b(mb), .prod(prod),
                   .sign(sign), .exp(e), .sig(sig));
  fp_normalize #(.W(106), .FB(104)) u_n (.exp(e), .sig(sig), .mant(mant), .exp_out(ne), .is_zero(nz));
  for (genvar m = 0; m < 4; m++) begin : g_r
    fp_round u_r (.sign(sign), .mant(mant), .exp(ne), .rmode(rmode_e'(m)),
                  .result(r[m]), .overflow(ov[m]), .underflow(un[m]), .inexact(ix[m]));
  end

  int n_denorm = 0, n_ovf = 0, n_unf = 0;

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] ref_v;
    a = x; b = y;
    #1;
    ref_v = $realtobits($bitstoreal(x) * $bitstoreal(y));
    checks++;
    if (r[0] !== ref_v) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, r[0], ref_v);
    end
    checks++;
    if (mode_check(r[0], r[1], r[2], r[3], ix[0], ov[0]) != 0) begin
      failures++;
      $display("FAIL modes %h * %h: %h %h %h %h", x, y, r[0], r[1], r[2], r[3]);
    end
    if (ref_v[62:52] == 0 && ref_v[51:0] != 0) n_denorm++;
    if (ov[0]) n_ovf++;
    if (un[0]) n_unf++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h3FF0_0000_0000_0000, 64'h4000_0000_0000_0000);   // 1 * 2
    check(64'h3FF8_0000_0000_0000, 64'hC008_0000_0000_0000);   // 1.5 * -3
    check(64'h0000_0000_0000_0000, 64'hC008_0000_0000_0000);   // 0 * -3
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h4000_0000_0000_0000);   // overflow
    check(64'h0000_0000_0000_0001, 64'h3FE0_0000_0000_0000);   // tiny * 0.5
    check(64'h0008_0000_0000_0000, 64'h4330_0000_0000_0000);   // denormal * 2^52
    for (int i = 0; i < 4000; i++) begin
      case (i % 5)
        0: check(rand_fp(900, 1150), rand_fp(900, 1150));
        1: check(rand_fp(1, 2046), rand_fp(1, 2046));
        2: check(rand_fp(0, 3), rand_fp(900, 1200));
        3: check(rand_fp(400, 600), rand_fp(400, 600));
        default: check(rand_fp(1500, 2046), rand_fp(900, 1100));
      endcase
    end
    checks++;
    if (n_denorm == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL coverage denorm=%0d ovf=%0d unf=%0d", n_denorm, n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
