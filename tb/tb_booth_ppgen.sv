// tb_booth_ppgen: for every control value, checks that row + neg equals the
// selected multiple (0, +A, +2A, -A, -2A) of the signed multiplicand shifted
// left by SH, modulo 2^PW; at shift 0 and at shift 10.
module tb_booth_ppgen;
  int checks = 0, failures = 0;
  localparam int N = 66, PW = 128;

  logic [N-1:0] mc;
  logic [4:0]   ctrl;
  logic [PW-1:0] row0, row10;
  logic          neg0, neg10;

  booth_ppgen #(.N(N), .PW(PW), .SH(0))  dut0  (.mcand(mc), .ctrl(ctrl), .row(row0),  .neg(neg0));
  booth_ppgen #(.N(N), .PW(PW), .SH(10)) dut10 (.mcand(mc), .ctrl(ctrl), .row(row10), .neg(neg10));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mult [5] = '{0, 1, 2, -1, -2};
    for (int i = 0; i < 1000; i++) begin
      mc = {2'($urandom), $urandom, $urandom};
      for (int c = 0; c < 5; c++) begin
        logic signed [PW-1:0] e0, e10;
        ctrl = 5'b1 << c;
        #1;
        e0  = PW'(signed'(mc)) * PW'(mult[c]);
        e10 = e0 <<< 10;
        checks += 2;
        if (row0 + PW'(neg0) != e0) begin
          failures++;
          $display("FAIL sh0 mc=%h c=%0d", mc, c);
        end
        if (row10 + PW'(neg10) != e10) begin
          failures++;
          $display("FAIL sh10 mc=%h c=%0d", mc, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
