// tb_fpmac_top: end-to-end test of the multiply-add unit at its default
// (64-bit) size. It drives every operation through the ports and checks:
//   fixed point   add/subtract (signed and unsigned, exact 65-bit results),
//                 multiply (signed and unsigned 128-bit products) and a
//                 multiply-accumulate sequence, against behavioural integer
//                 arithmetic;
//   floating point add, subtract, multiply and divide in all four rounding
//                 modes against the simulator's double arithmetic (nearest)
//                 and the mode-consistency rule; multiply-accumulate chains
//                 with exact products against double arithmetic, and one
//                 case that only a single-rounding (fused) accumulate gets
//                 right; special cases (overflow, underflow, invalid,
//                 division by zero, NaN);
//   binary32      add, subtract, multiply and divide of random binary32
//                 words in all four modes: nearest against double arithmetic
//                 rounded to binary32 by a real-arithmetic reference, the
//                 directed modes by the mode-consistency rule; a binary32
//                 accumulate chain;
//   timing        done right after the start edge (57 edges later for a
//                 divide), busy
//                 during a divide and a start during it ignored.
// Each mechanism is counted and one that never happened is a failure.
module tb_fpmac_top
  import fpmac_pkg::*;
  import tb_fp_pkg::*;
;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  op_e op;
  logic is_float, is_signed;
  logic is_double = 1'b1;
  rmode_e rmode;
  logic [63:0] a, b;
  logic [127:0] result, acc;
  fp_flags_t flags;
  logic done, busy;

  always #5 clk = ~clk;

  fpmac_top dut (.clk(clk), .rst_n(rst_n), .start(start), .op(op), .is_float(is_float),
                 .is_double(is_double), .is_signed(is_signed), .rmode(rmode), .a(a), .b(b), .result(result),
                 .acc(acc), .flags(flags), .done(done), .busy(busy));

  typedef enum int {M_FX_ADD, M_FX_SUB, M_FX_MUL_S, M_FX_MUL_U, M_FX_MAC, M_FP_ADD, M_FP_SUB,
                    M_FP_MUL, M_FP_DIV, M_FP_MAC, M_FUSED, M_RN, M_RZ, M_RU, M_RD,
                    M_OVERFLOW, M_UNDERFLOW, M_DENORM, M_INVALID, M_DIVZERO, M_NAN,
                    M_CANCEL, M_BUSY_IGNORED, M_LDACC, M_CLR,
                    M_SP_ADD, M_SP_SUB, M_SP_MUL, M_SP_DIV, M_SP_MAC, M_SP_DENORM, M_NUM} mech_e;
  int mech [M_NUM];

  // Runs one operation; returns the number of rising edges, counting the
  // one that takes `start`, until done is seen.
  task automatic run(input op_e o, input logic fl, input logic sg, input rmode_e rm,
                     input logic [63:0] x, input logic [63:0] y, output int lat);
    @(negedge clk);
    op = o; is_float = fl; is_signed = sg; rmode = rm; a = x; b = y; start = 1;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
      start = 0;
      if (lat == 3 && busy) begin
        // a start while the divider works must be ignored
        logic [127:0] acc_before;
        acc_before = acc;
        op = OP_CLR; is_float = 1; start = 1;
        @(posedge clk);
        #1;
        lat++;
        start = 0; op = o; is_float = fl;
        checks++;
        if (acc !== acc_before || done) failures++;
        mech[M_BUSY_IGNORED]++;
      end
    end while (!done && lat < 100);
    checks++;
    if (lat != ((fl && o == OP_DIV) ? 58 : 1)) begin
      failures++;
      $display("FAIL latency %0d for op %s", lat, o.name());
    end
  endtask

  function automatic logic [63:0] fref(input op_e o, input logic [63:0] x, input logic [63:0] y);
    case (o)
      OP_ADD: return $realtobits($bitstoreal(x) + $bitstoreal(y));
      OP_SUB: return $realtobits($bitstoreal(x) - $bitstoreal(y));
      OP_MUL: return $realtobits($bitstoreal(x) * $bitstoreal(y));
      default: return $realtobits($bitstoreal(x) / $bitstoreal(y));
    endcase
  endfunction

  task automatic fp_op(input op_e o, input logic [63:0] x, input logic [63:0] y);
    logic [63:0] r [4];
    fp_flags_t   f [4];
    logic [63:0] ref_v;
    int lat;
    for (int m = 0; m < 4; m++) begin
      run(o, 1, 0, rmode_e'(m), x, y, lat);
      r[m] = result[63:0];
      f[m] = flags;
    end
    ref_v = fref(o, x, y);
    checks += 2;
    if (is_nan(ref_v) ? !is_nan(r[0]) : (r[0] !== ref_v)) begin
      failures++;
      $display("FAIL %s %h %h = %h, expected %h", o.name(), x, y, r[0], ref_v);
    end
    if (!is_nan(ref_v) && mode_check(r[0], r[1], r[2], r[3], f[0].inexact, f[0].overflow) != 0) begin
      failures++;
      $display("FAIL modes %s %h %h: %h %h %h %h", o.name(), x, y, r[0], r[1], r[2], r[3]);
    end
    mech[M_RN]++; mech[M_RZ]++; mech[M_RU]++; mech[M_RD]++;
    case (o)
      OP_ADD: mech[M_FP_ADD]++;
      OP_SUB: mech[M_FP_SUB]++;
      OP_MUL: mech[M_FP_MUL]++;
      default: mech[M_FP_DIV]++;
    endcase
    if (f[0].overflow) mech[M_OVERFLOW]++;
    if (f[0].underflow) mech[M_UNDERFLOW]++;
    if (f[0].invalid) mech[M_INVALID]++;
    if (ref_v[62:52] == 0 && ref_v[51:0] != 0) mech[M_DENORM]++;
    if ((o == OP_ADD || o == OP_SUB) && ref_v[62:0] != 0 && ref_v[62:52] + 11'd10 < x[62:52]) mech[M_CANCEL]++;
    if (o == OP_DIV && f[0].exception && !f[0].invalid && !f[0].overflow && !f[0].underflow) mech[M_DIVZERO]++;
    if (is_nan(r[0])) mech[M_NAN]++;
  endtask

  // binary32 word placed for mode_check: sign at bit 63, magnitude below
  function automatic logic [63:0] sp_key(input logic [31:0] v);
    return {v[31], 32'd0, v[30:0]};
  endfunction

  task automatic sp_op(input op_e o, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] r [4];
    fp_flags_t   f [4];
    real xd, yd, rd, want;
    bit  ovf;
    int  lat;
    is_double = 0;
    for (int m = 0; m < 4; m++) begin
      run(o, 1, 0, rmode_e'(m), {32'd0, x}, {32'd0, y}, lat);
      r[m] = result[31:0];
      f[m] = flags;
      checks++;
      if (result[127:32] != 0) begin
        failures++;
        $display("FAIL binary32 upper bits %h", result);
      end
    end
    is_double = 1;
    xd = sp_value(x);
    yd = sp_value(y);
    case (o)
      OP_ADD:  rd = xd + yd;
      OP_SUB:  rd = xd - yd;
      OP_MUL:  rd = xd * yd;
      default: rd = xd / yd;
    endcase
    checks += 2;
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF || (o == OP_DIV && y[30:0] == 0)) begin
      // special operands: only the class of the result is checked here
      if ((r[0][30:23] != 8'hFF) && !(o == OP_DIV && x[30:0] == 0 && y[30:0] != 0)) begin
        failures++;
        $display("FAIL binary32 special %s %h %h = %h", o.name(), x, y, r[0]);
      end
    end else begin
      want = sp_rne(rd, ovf);
      if (ovf ? (r[0][30:0] != 31'h7F80_0000 || r[0][31] != (rd < 0.0))
              : (sp_value(r[0]) != want || (want == 0.0 && r[0][31] != (x[31] ^ y[31] ^ (o == OP_SUB)) && o != OP_ADD && o != OP_SUB))) begin
        failures++;
        $display("FAIL binary32 %s %h %h = %h, expected %g", o.name(), x, y, r[0], want);
      end
      if (mode_check(sp_key(r[0]), sp_key(r[1]), sp_key(r[2]), sp_key(r[3]),
                     f[0].inexact, f[0].overflow) != 0) begin
        failures++;
        $display("FAIL binary32 modes %s %h %h: %h %h %h %h", o.name(), x, y, r[0], r[1], r[2], r[3]);
      end
      if (r[0][30:23] == 0 && r[0][22:0] != 0) mech[M_SP_DENORM]++;
    end
    case (o)
      OP_ADD: mech[M_SP_ADD]++;
      OP_SUB: mech[M_SP_SUB]++;
      OP_MUL: mech[M_SP_MUL]++;
      default: mech[M_SP_DIV]++;
    endcase
  endtask

  task automatic fx_check(input op_e o, input logic sg, input logic [63:0] x, input logic [63:0] y);
    logic [127:0] e;
    int lat;
    run(o, 0, sg, RM_NEAREST, x, y, lat);
    case (o)
      OP_ADD: e = sg ? 128'(signed'(x)) + 128'(signed'(y)) : {64'd0, x} + {64'd0, y};
      OP_SUB: e = sg ? 128'(signed'(x)) - 128'(signed'(y)) : {64'd0, x} - {64'd0, y};
      default: e = sg ? 128'(signed'(x)) * 128'(signed'(y)) : {64'd0, x} * {64'd0, y};
    endcase
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL fixed %s s=%b %h %h = %h, expected %h", o.name(), sg, x, y, result, e);
    end
    case (o)
      OP_ADD: mech[M_FX_ADD]++;
      OP_SUB: mech[M_FX_SUB]++;
      default: if (sg) mech[M_FX_MUL_S]++; else mech[M_FX_MUL_U]++;
    endcase
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [127:0] fx_acc;
    real racc;
    op = OP_CLR; is_float = 0; is_signed = 0; rmode = RM_NEAREST; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- fixed point
    fx_check(OP_ADD, 0, '1, 64'd1);
    fx_check(OP_SUB, 0, 64'd1, 64'd2);
    fx_check(OP_SUB, 1, 64'h8000_0000_0000_0000, 64'd1);
    fx_check(OP_MUL, 1, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    fx_check(OP_MUL, 0, '1, '1);
    for (int i = 0; i < 200; i++)
      fx_check(op_e'($urandom % 3), 1'($urandom), {$urandom, $urandom}, {$urandom, $urandom});
    run(OP_CLR, 0, 0, RM_NEAREST, 0, 0, lat);
    mech[M_CLR]++;
    checks++;
    if (acc !== 0) failures++;
    run(OP_LDACC, 0, 1, RM_NEAREST, 64'hFFFF_FFFF_FFFF_FFF0, 0, lat);   // -16
    mech[M_LDACC]++;
    fx_acc = -128'sd16;
    checks++;
    if (acc !== fx_acc) failures++;
    for (int i = 0; i < 50; i++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      run(OP_MAC, 0, 1, RM_NEAREST, x, y, lat);
      fx_acc = fx_acc + 128'(signed'(x)) * 128'(signed'(y));
      checks++;
      if (acc !== fx_acc) begin
        failures++;
        $display("FAIL fixed mac %0d: %h expected %h", i, acc, fx_acc);
      end
      mech[M_FX_MAC]++;
    end

    // ---------------- floating point, directed
    fp_op(OP_ADD, 64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0001);
    fp_op(OP_SUB, 64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0000);   // cancellation
    fp_op(OP_MUL, 64'h7FEF_FFFF_FFFF_FFFF, 64'h4000_0000_0000_0000);   // overflow
    fp_op(OP_MUL, 64'h0010_0000_0000_0001, 64'h3FD0_0000_0000_0000);   // denormal, underflow
    fp_op(OP_MUL, 64'h0000_0000_0000_0000, 64'h7FF0_0000_0000_0000);   // 0 * inf, invalid
    fp_op(OP_DIV, 64'h4000_0000_0000_0000, 64'h0000_0000_0000_0000);   // divide by zero
    fp_op(OP_DIV, 64'h4000_0000_0000_0000, 64'h4008_0000_0000_0000);   // 2/3
    fp_op(OP_ADD, 64'h7FF8_0000_0000_0000, 64'h4008_0000_0000_0000);   // NaN operand
    // ---------------- floating point, random
    for (int i = 0; i < 300; i++) begin
      op_e o;
      o = op_e'($urandom % 4);
      if (i % 3 == 0) fp_op(o, rand_fp(1000, 1050), rand_fp(1000, 1050));
      else            fp_op(o, rand_fp(0, 2046), rand_fp(0, 2046));
    end

    // ---------------- floating point multiply-accumulate
    run(OP_CLR, 1, 0, RM_NEAREST, 0, 0, lat);
    mech[M_CLR]++;
    racc = 0.0;
    for (int i = 0; i < 200; i++) begin
      logic [63:0] x, y;
      // products of 26-bit significands are exact, so acc + a*b rounds once
      x = rand_fp(1000, 1046) & 64'hFFFF_FFFF_F800_0000;
      y = rand_fp(1000, 1046) & 64'hFFFF_FFFF_F800_0000;
      run(OP_MAC, 1, 0, RM_NEAREST, x, y, lat);
      racc = racc + $bitstoreal(x) * $bitstoreal(y);
      checks++;
      if (acc[63:0] !== $realtobits(racc) || result[63:0] !== acc[63:0]) begin
        failures++;
        $display("FAIL fp mac %0d: %h expected %h", i, acc[63:0], $realtobits(racc));
      end
      racc = $bitstoreal(acc[63:0]);   // keep following the unit after a failure
      mech[M_FP_MAC]++;
    end
    // single rounding: (1 + 2^-30)(1 - 2^-30) - 1 = -2^-60; rounding the
    // product first would give 0
    run(OP_LDACC, 1, 0, RM_NEAREST, 64'hBFF0_0000_0000_0000, 0, lat);
    mech[M_LDACC]++;
    run(OP_MAC, 1, 0, RM_NEAREST, 64'h3FF0_0000_0040_0000, 64'h3FEF_FFFF_FF80_0000, lat);
    checks++;
    if (acc[63:0] !== 64'hBC30_0000_0000_0000) begin
      failures++;
      $display("FAIL fused mac: %h", acc[63:0]);
    end else mech[M_FUSED]++;

    // ---------------- binary32
    sp_op(OP_ADD, 32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24, a tie
    sp_op(OP_MUL, 32'h7F7F_FFFF, 32'h4000_0000);   // overflow
    sp_op(OP_MUL, 32'h0080_0001, 32'h3E80_0000);   // denormal result
    sp_op(OP_DIV, 32'h3F80_0000, 32'h4040_0000);   // 1/3
    sp_op(OP_SUB, 32'h3F80_0001, 32'h3F80_0000);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 3 == 0) begin x[30:23] = 8'd100 + 8'($urandom % 50); y[30:23] = 8'd100 + 8'($urandom % 50); end
      if (i % 5 == 0) y[30:23] = x[30:23];
      if (x[30:23] == 8'hFF) x[30] = 1'b0;
      if (y[30:23] == 8'hFF) y[30] = 1'b0;
      sp_op(op_e'(i % 4), x, y);
    end
    // binary32 accumulate chain with exact products of short significands
    is_double = 0;
    run(OP_LDACC, 1, 0, RM_NEAREST, 64'h0000_0000_3F80_0000, 0, lat);   // 1.0
    racc = 1.0;
    for (int i = 0; i < 30; i++) begin
      logic [31:0] x, y;
      bit ovf;
      x = {1'($urandom), 8'd120 + 8'($urandom % 14), 7'($urandom), 16'd0};
      y = {1'($urandom), 8'd120 + 8'($urandom % 14), 7'($urandom), 16'd0};
      run(OP_MAC, 1, 0, RM_NEAREST, {32'd0, x}, {32'd0, y}, lat);
      racc = sp_rne(racc + sp_value(x) * sp_value(y), ovf);
      checks++;
      if (sp_value(acc[31:0]) != racc || acc[127:32] != 0) begin
        failures++;
        $display("FAIL binary32 mac %0d: %h expected %g", i, acc, racc);
      end
      mech[M_SP_MAC]++;
    end
    is_double = 1;

    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(i));
      end
    end
    $display("mechanism counts:");
    foreach (mech[i]) $display("  %-16s %0d", mech_e'(i), mech[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
