// tb_fp_normalize: checks the normalizer against an independent formulation:
// the 54 kept bits must equal sig * 2^(exp - FB - eo + 53), where eo is the
// output exponent (at least 1), with every discarded bit ORed into the
// sticky bit; plus directed cases (1.0, 4.0, zero, deep denormal, a value
// shifted completely out).
module tb_fp_normalize;
  int checks = 0, failures = 0;
  localparam int W = 108, FB = 105;

  logic signed [13:0] e;
  logic [W-1:0] s;
  logic [55:0] mant;
  logic [11:0] eo;
  logic z;

  fp_normalize #(.W(W), .FB(FB)) dut (.exp(e), .sig(s), .mant(mant), .exp_out(eo), .is_zero(z));

  task automatic directed(input logic signed [13:0] ei, input logic [W-1:0] si,
                          input logic [55:0] me, input logic [11:0] ee);
    e = ei; s = si; #1;
    checks++;
    if (mant !== me || eo !== ee) begin
      failures++;
      $display("FAIL directed exp=%0d sig=%h -> %h/%0d expected %h/%0d", ei, si, mant, eo, me, ee);
    end
  endtask

  task automatic rnd(input logic signed [13:0] ei, input logic [W-1:0] si);
    int p, en, eref, t;
    logic [511:0] v, lostm;
    logic [53:0] mref;
    logic st;
    e = ei; s = si; #1;
    p = -1;
    for (int i = 0; i < W; i++) if (si[i]) p = i;
    checks++;
    if (p < 0) begin
      if (mant != 0 || eo != 0 || !z) failures++;
      return;
    end
    en = int'(ei) + (p - FB);
    eref = (en < 1) ? 1 : en;
    t = int'(ei) - FB - eref + 53;
    v = 512'(si);
    st = 1'b0;
    if (t >= 0) v = v << t;
    else begin
      lostm = (512'(1) << (-t)) - 1;
      st = |(v & lostm);
      v = v >> (-t);
    end
    mref = v[53:0];
    if (v[511:54] != 0 || mant !== {1'b0, mref, st} || eo !== ((en < 1) ? 12'd0 : 12'(en))) begin
      failures++;
      $display("FAIL random exp=%0d sig=%h -> %h/%0d expected %h/%0d", ei, si, mant, eo, {1'b0, mref, st}, en);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    directed(14'sd1023, W'(1) << 105, 56'h40_0000_0000_0000, 12'd1023);   // 1.0
    directed(14'sd1023, W'(1) << 107, 56'h40_0000_0000_0000, 12'd1025);   // 4.0
    directed(14'sd1023, '0,           56'h0,                 12'd0);      // zero
    directed(14'sd1,    W'(1) << 104, 56'h20_0000_0000_0000, 12'd0);      // 0.5 * 2^-1022, denormal
    directed(-14'sd500, W'(1) << 105, 56'h00_0000_0000_0001, 12'd0);      // all in sticky
    for (int i = 0; i < 4000; i++) begin
      logic [W-1:0] r;
      r = {$urandom, $urandom, $urandom, $urandom};
      r = r >> ($urandom % W);
      rnd(14'(int'($urandom % 2400) - 200), r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
