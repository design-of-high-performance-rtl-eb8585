// booth_ppgen: partial product generator for one radix-4 Booth digit.
//
// From the N-bit two's complement multiplicand and the digit's one-hot
// control it forms the multiple 0, A or 2A, sign-extends it to PW bits and
// shifts it left by SH (twice the digit index). For a negative digit the
// whole shifted row is inverted and `neg` is raised: the adder that takes the
// row adds `neg` as its carry-in, completing the two's complement
// (-(M << SH) = ~(M << SH) + 1). Combinational.
module booth_ppgen #(
  parameter int unsigned N  = 66,
  parameter int unsigned PW = 128,
  parameter int unsigned SH = 0
) (
  input  logic [N-1:0]  mcand,
  input  logic [4:0]    ctrl,   // [0] zero, [1] +A, [2] +2A, [3] -A, [4] -2A
  output logic [PW-1:0] row,
  output logic          neg
);

  logic signed [PW-1:0] a_ext;
  logic        [PW-1:0] mult;

  assign a_ext = PW'(signed'(mcand));
  assign neg   = ctrl[3] | ctrl[4];

  always_comb begin
    mult = '0;
    if (ctrl[1] || ctrl[3]) mult = a_ext;
    if (ctrl[2] || ctrl[4]) mult = a_ext << 1;
    mult = mult << SH;
    row  = neg ? ~mult : mult;
  end

endmodule
