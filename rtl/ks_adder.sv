// ks_adder: W-bit Kogge-Stone parallel prefix adder.
//
// Three stages, as in the design's adder description:
//   pre-processing   P_i = a_i XOR b_i, G_i = a_i AND b_i (carry-in folded in
//                    as generate of bit -1),
//   prefix network   log2(W) levels of the associative operator
//                    (G, P) o (G', P') = (G OR (P AND G'), P AND P'),
//                    span doubling every level (1, 2, 4, ...),
//   post-processing  S_i = P_i XOR C_{i-1}.
// Purely combinational; the carry-in lets a caller form a - b as a + ~b + 1.
module ks_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W + 1);

  // Bit 0 of the prefix arrays is the carry-in; bit i+1 belongs to operand bit i.
  logic [W:0] g [LEVELS+1];
  logic [W:0] p [LEVELS+1];
  logic [W-1:0] p_bit;

  assign p_bit = a ^ b;
  assign g[0]  = {a & b, cin};
  assign p[0]  = {p_bit, 1'b0};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << l;
    for (genvar i = 0; i <= W; i++) begin : g_node
      if (i >= SPAN) begin : g_black
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-SPAN]);
        assign p[l+1][i] = p[l][i] & p[l][i-SPAN];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // g[LEVELS][i] is the carry out of operand bit i-1 into bit i.
  assign sum  = p_bit ^ g[LEVELS][W-1:0];
  assign cout = g[LEVELS][W];

endmodule
