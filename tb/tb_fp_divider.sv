// tb_fp_divider: the sequential divider with the normalizer and four
// rounders. Quotients under round-to-nearest are compared bit for bit with
// the simulator's IEEE double division, the other modes for consistency.
// Also checks the latency: done exactly 56 clock edges after the start edge,
// one quotient bit per cycle, and busy high in between.
module tb_fp_divider
  import fpmac_pkg::*;
  import tb_fp_pkg::*;
;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  fp64_t a, b;
  logic busy, done, sign;
  logic signed [13:0] e;
  logic [56:0] sig;
  logic [55:0] mant;
  logic [11:0] ne;
  logic nz;
  fp64_t r [4];
  logic ov [4], un [4], ix [4];

  always #5 clk = ~clk;

  fp_divider #(.QW(56)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                             .busy(busy), .done(done), .sign(sign), .exp(e), .sig(sig));
  fp_normalize #(.W(57), .FB(56)) u_n (.exp(e), .sig(sig), .mant(mant), .exp_out(ne), .is_zero(nz));
  for (genvar m = 0; m < 4; m++) begin : g_r
    fp_round u_r (.sign(sign), .mant(mant), .exp(ne), .rmode(rmode_e'(m)),
                  .result(r[m]), .overflow(ov[m]), .underflow(un[m]), .inexact(ix[m]));
  end

  task automatic div(input logic [63:0] x, input logic [63:0] y);
    int lat;
    logic [63:0] ref_v;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(posedge clk);
    #1;
    start = 0;
    checks++;
    if (!busy) failures++;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!done);
    ref_v = $realtobits($bitstoreal(x) / $bitstoreal(y));
    checks += 3;
    if (lat != 56) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    if (r[0] !== ref_v) begin
      failures++;
      $display("FAIL %h / %h = %h, expected %h", x, y, r[0], ref_v);
    end
    if (mode_check(r[0], r[1], r[2], r[3], ix[0], ov[0]) != 0) begin
      failures++;
      $display("FAIL modes %h / %h: %h %h %h %h", x, y, r[0], r[1], r[2], r[3]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    div(64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000);   // 1/3
    div(64'h4024_0000_0000_0000, 64'hC004_0000_0000_0000);   // 10/-2.5
    div(64'h0000_0000_0000_0003, 64'h4000_0000_0000_0000);   // denormal / 2
    div(64'h3FF0_0000_0000_0000, 64'h0000_0000_0000_0001);   // overflow
    div(64'h0010_0000_0000_0000, 64'h4340_0000_0000_0000);   // underflow
    for (int i = 0; i < 1500; i++) begin
      case (i % 3)
        0: div(rand_fp(900, 1150), rand_fp(900, 1150));
        1: div(rand_fp(0, 2046), rand_fp(0, 2046));
        default: div(rand_fp(1, 100), rand_fp(1000, 1100));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
