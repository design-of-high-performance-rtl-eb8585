// booth_encoder: radix-4 (modified) Booth recoder.
//
// The padded multiplier is scanned three bits at a time: two bits of the
// current pair plus the high bit of the next lower pair (a zero is padded
// below the LSB). Each group becomes one of five one-hot control signals
// selecting the partial product 0, +A, +2A, -A or -2A:
//   b[2i+1] b[2i] b[2i-1] : 000,111 -> 0   001,010 -> +A   011 -> +2A
//                           100 -> -2A     101,110 -> -A
// The caller pads the multiplier to an even width N (sign or zero
// extension), so N/2 digits cover it. Combinational.
module booth_encoder #(
  parameter int unsigned N = 66
) (
  input  logic [N-1:0]     mplr,
  output logic [N/2-1:0][4:0] ctrl   // [0] zero, [1] +A, [2] +2A, [3] -A, [4] -2A
);

  localparam int unsigned D = N / 2;

  logic [N:0] padded;
  assign padded = {mplr, 1'b0};

  always_comb begin
    for (int i = 0; i < D; i++) begin
      unique case (padded[2*i +: 3])
        3'b000, 3'b111: ctrl[i] = 5'b00001;
        3'b001, 3'b010: ctrl[i] = 5'b00010;
        3'b011:         ctrl[i] = 5'b00100;
        3'b101, 3'b110: ctrl[i] = 5'b01000;
        default:        ctrl[i] = 5'b10000;  // 3'b100
      endcase
    end
  end

endmodule
