// tb_ks_adder: checks the Kogge-Stone adder at 64 bits (the design's width)
// and at an odd width against the behavioural sum a + b + cin, on corner
// cases and random operands.
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [63:0] a, b, s;
  logic        cin, co;
  logic [12:0] a2, b2, s2;
  logic        c2, co2;

  ks_adder #(.W(64)) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  ks_adder #(.W(13)) dut13 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  task automatic check64();
    logic [64:0] exp_v;
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + 65'(cin);
    checks++;
    if ({co, s} !== exp_v) begin
      failures++;
      $display("FAIL 64: %h + %h + %0d = %h, expected %h", a, b, cin, {co, s}, exp_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = 64'd1; cin = 0; check64();
    a = '1; b = '0; cin = 1; check64();
    a = '1; b = '1; cin = 1; check64();
    a = 64'h5555_5555_5555_5555; b = 64'hAAAA_AAAA_AAAA_AAAA; cin = 1; check64();
    a = 0; b = 0; cin = 0; check64();
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (i % 3 == 0) b = ~a;     // long carry chains
      check64();
    end
    for (int i = 0; i < 2000; i++) begin
      logic [13:0] e13;
      a2 = 13'($urandom); b2 = 13'($urandom); c2 = 1'($urandom);
      #1;
      e13 = {1'b0, a2} + {1'b0, b2} + 14'(c2);
      checks++;
      if ({co2, s2} !== e13) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
