// booth_multiplier: N x N radix-4 Booth multiplier with Kogge-Stone row
// addition, shared by the fixed point and floating point paths.
//
// Both operands are extended by one bit (sign or zero, chosen by is_signed)
// and by one more bit so the multiplier has an even width N+2; the Booth
// encoder turns it into (N+2)/2 digits, one partial product row each. The
// rows are summed one after another by a chain of 2N-bit Kogge-Stone adders,
// each adding its row's two's complement correction bit as carry-in. All
// arithmetic is modulo 2^(2N), which holds the exact product of two N-bit
// signed or unsigned numbers. Combinational: the product settles in the same
// cycle.
module booth_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  input  logic           is_signed,
  output logic [2*N-1:0] prod
);

  localparam int unsigned NE = N + 2;      // padded operand width (even)
  localparam int unsigned D  = NE / 2;     // number of Booth digits
  localparam int unsigned PW = 2 * N;

  logic [NE-1:0] a_ext, b_ext;
  assign a_ext = {{2{is_signed & a[N-1]}}, a};
  assign b_ext = {{2{is_signed & b[N-1]}}, b};

  logic [D-1:0][4:0] ctrl;
  booth_encoder #(.N(NE)) u_enc (.mplr(b_ext), .ctrl(ctrl));

  logic [PW-1:0] psum [D+1];
  assign psum[0] = '0;

  for (genvar i = 0; i < D; i++) begin : g_row
    logic [PW-1:0] row;
    logic          neg;
    logic          cout_unused;
    booth_ppgen #(.N(NE), .PW(PW), .SH(2*i)) u_pp (
      .mcand(a_ext), .ctrl(ctrl[i]), .row(row), .neg(neg)
    );
    ks_adder #(.W(PW)) u_add (
      .a(psum[i]), .b(row), .cin(neg), .sum(psum[i+1]), .cout(cout_unused)
    );
  end

  assign prod = psum[D];

endmodule
