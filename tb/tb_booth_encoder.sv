// tb_booth_encoder: checks that every digit's control is one-hot and that
// the digits, weighted by 4^i, add up to the multiplier read as a signed
// number; also checks the recoding table on single groups.
module tb_booth_encoder;
  int checks = 0, failures = 0;
  localparam int N = 66;

  logic [N-1:0] m;
  logic [N/2-1:0][4:0] ctrl;

  booth_encoder #(.N(N)) dut (.mplr(m), .ctrl(ctrl));

  function automatic int digit(input logic [4:0] c);
    case (c)
      5'b00001: return 0;
      5'b00010: return 1;
      5'b00100: return 2;
      5'b01000: return -1;
      5'b10000: return -2;
      default:  return 99;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // group table: digit 1 sees bits m[3:1]
    int expect_d [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
    for (int g = 0; g < 8; g++) begin
      m = '0;
      m[3:1] = 3'(g);
      #1;
      checks++;
      if (digit(ctrl[1]) != expect_d[g]) begin
        failures++;
        $display("FAIL group %b -> %0d", 3'(g), digit(ctrl[1]));
      end
    end
    for (int i = 0; i < 2000; i++) begin
      logic signed [140:0] sum, ref_v;
      m = {2'($urandom), $urandom, $urandom};
      if (i == 0) m = '1;
      if (i == 1) m = {1'b0, {(N-1){1'b1}}};
      #1;
      sum = 0;
      for (int d = 0; d < N/2; d++) begin
        if (digit(ctrl[d]) == 99) failures++;
        sum += 141'(signed'(digit(ctrl[d]))) <<< (2*d);
      end
      ref_v = 141'(signed'(m));
      checks++;
      if (sum != ref_v) begin
        failures++;
        $display("FAIL reconstruct %h", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
