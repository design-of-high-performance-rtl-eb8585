// tb_booth_multiplier: compares the 64 x 64 Booth multiplier with the
// behavioural product, unsigned and signed, on corner values and random
// operands (including 53-bit significand-sized ones).
module tb_booth_multiplier;
  int checks = 0, failures = 0;

  logic [63:0]  a, b;
  logic         sgn;
  logic [127:0] p;

  booth_multiplier #(.N(64)) dut (.a(a), .b(b), .is_signed(sgn), .prod(p));

  task automatic check();
    logic [127:0] e;
    #1;
    if (sgn) e = 128'(signed'(a)) * 128'(signed'(b));
    else     e = {64'd0, a} * {64'd0, b};
    checks++;
    if (p !== e) begin
      failures++;
      $display("FAIL %s %h * %h = %h, expected %h", sgn ? "s" : "u", a, b, p, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] corner [6] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000,
                                64'h7FFF_FFFF_FFFF_FFFF, 64'h001F_FFFF_FFFF_FFFF};
    for (int s = 0; s < 2; s++)
      foreach (corner[i])
        foreach (corner[j]) begin
          sgn = 1'(s); a = corner[i]; b = corner[j]; check();
        end
    for (int i = 0; i < 3000; i++) begin
      sgn = 1'($urandom);
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i % 4 == 0) begin
        a = a & 64'h001F_FFFF_FFFF_FFFF;
        b = b & 64'h001F_FFFF_FFFF_FFFF;
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
