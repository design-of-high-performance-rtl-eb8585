// tb_fp_round: directed cases for the rounder, each worked out by hand for
// all four rounding modes: ties to even, sticky-only rounding in both signs,
// a rounding carry into the exponent, overflow to infinity, a denormal
// rounding up to the smallest normal number, an input with the overflow bit
// set, and an exact value.
module tb_fp_round
  import fpmac_pkg::*;
;
  int checks = 0, failures = 0;

  logic        sign;
  logic [55:0] mant;
  logic [11:0] e;
  rmode_e      rm;
  fp64_t       res;
  logic        ov, un, ix;

  fp_round dut (.sign(sign), .mant(mant), .exp(e), .rmode(rm), .result(res),
                .overflow(ov), .underflow(un), .inexact(ix));

  // mantissa from hidden bit, fraction, round bit, sticky bit
  function automatic logic [55:0] mk(input logic h, input logic [51:0] f, input logic g, input logic st);
    return {1'b0, h, f, g, st};
  endfunction

  task automatic chk(input logic s, input logic [55:0] m, input logic [11:0] ei,
                     input logic [63:0] exp_rn, input logic [63:0] exp_rz,
                     input logic [63:0] exp_ru, input logic [63:0] exp_rd,
                     input logic exp_ov, input logic exp_un, input logic exp_ix);
    logic [63:0] expv [4];
    expv = '{exp_rn, exp_rz, exp_ru, exp_rd};
    sign = s; mant = m; e = ei;
    for (int k = 0; k < 4; k++) begin
      rm = rmode_e'(k);
      #1;
      checks++;
      if (res !== expv[k] || (k == 0 && (ov !== exp_ov || un !== exp_un || ix !== exp_ix))) begin
        failures++;
        $display("FAIL mode %0d: s=%b m=%h e=%0d -> %h (ov%b un%b ix%b), expected %h",
                 k, s, m, ei, res, ov, un, ix, expv[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // tie, odd lsb: nearest rounds up
    chk(0, mk(1, 52'd1, 1, 0), 12'd1023,
        64'h3FF0_0000_0000_0002, 64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0002, 64'h3FF0_0000_0000_0001, 0, 0, 1);
    // tie, even lsb: nearest stays
    chk(0, mk(1, 52'd2, 1, 0), 12'd1023,
        64'h3FF0_0000_0000_0002, 64'h3FF0_0000_0000_0002, 64'h3FF0_0000_0000_0003, 64'h3FF0_0000_0000_0002, 0, 0, 1);
    // negative, sticky only
    chk(1, mk(1, 52'd5, 0, 1), 12'd1023,
        64'hBFF0_0000_0000_0005, 64'hBFF0_0000_0000_0005, 64'hBFF0_0000_0000_0005, 64'hBFF0_0000_0000_0006, 0, 0, 1);
    // carry into the exponent
    chk(0, mk(1, '1, 1, 1), 12'd1023,
        64'h4000_0000_0000_0000, 64'h3FFF_FFFF_FFFF_FFFF, 64'h4000_0000_0000_0000, 64'h3FFF_FFFF_FFFF_FFFF, 0, 0, 1);
    // overflow through rounding (nearest), infinity in every mode that rounds up;
    // toward zero keeps the largest finite number
    chk(0, mk(1, '1, 1, 0), 12'd2046,
        64'h7FF0_0000_0000_0000, 64'h7FEF_FFFF_FFFF_FFFF, 64'h7FF0_0000_0000_0000, 64'h7FEF_FFFF_FFFF_FFFF, 1, 0, 1);
    // exponent already too large: infinity in every mode
    chk(1, mk(1, 52'd7, 0, 0), 12'd2050,
        64'hFFF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 1, 0, 1);
    // largest denormal rounding up to the smallest normal number
    chk(0, mk(0, '1, 1, 0), 12'd0,
        64'h0010_0000_0000_0000, 64'h000F_FFFF_FFFF_FFFF, 64'h0010_0000_0000_0000, 64'h000F_FFFF_FFFF_FFFF, 0, 1, 1);
    // overflow bit set: value 2.5 with exponent 1023 -> 5.0
    chk(0, {1'b1, 1'b0, 1'b1, 51'd0, 2'b00}, 12'd1023,
        64'h4004_0000_0000_0000, 64'h4004_0000_0000_0000, 64'h4004_0000_0000_0000, 64'h4004_0000_0000_0000, 0, 0, 0);
    // exact
    chk(1, mk(1, 52'h8_0000_0000_0000, 0, 0), 12'd1024,
        64'hC008_0000_0000_0000, 64'hC008_0000_0000_0000, 64'hC008_0000_0000_0000, 64'hC008_0000_0000_0000, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
