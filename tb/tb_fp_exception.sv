// tb_fp_exception: one directed case per row of the special-case table
// (NaN operands, invalid operations, division by zero and by infinity,
// infinite operands) for each operation, plus pass-through of an ordinary
// rounded result and its flags.
module tb_fp_exception
  import fpmac_pkg::*;
;
  int checks = 0, failures = 0;

  op_e       op;
  fp64_t     a, b, c, rnd;
  logic      rov, run, rix;
  fp64_t     res;
  fp_flags_t fl;

  fp_exception dut (.op(op), .a(a), .b(b), .acc(c), .rounded(rnd),
                    .r_overflow(rov), .r_underflow(run), .r_inexact(rix),
                    .result(res), .flags(fl));

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000, NINF = 64'hFFF0_0000_0000_0000;
  localparam logic [63:0] PZ = 64'h0, NZ = 64'h8000_0000_0000_0000;
  localparam logic [63:0] ONE = 64'h3FF0_0000_0000_0000, MTWO = 64'hC000_0000_0000_0000;
  localparam logic [63:0] SIG_NAN = 64'h7FF0_0000_0000_0001, Q_NAN = 64'hFFF8_0000_0000_0123;
  localparam logic [63:0] MARK = 64'h4045_0000_0000_0000;   // stands for the rounded result

  // flags order: overflow, underflow, invalid, inexact, exception
  task automatic chk(input op_e o, input logic [63:0] x, input logic [63:0] y, input logic [63:0] z,
                     input logic [63:0] exp_r, input logic [4:0] exp_f, input string what);
    op = o; a = x; b = y; c = z;
    #1;
    checks++;
    if (res !== exp_r || fl !== exp_f) begin
      failures++;
      $display("FAIL %s: %h flags %b, expected %h flags %b", what, res, fl, exp_r, exp_f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rnd = MARK; rov = 0; run = 0; rix = 1;
    chk(OP_DIV, ONE,  PZ,   PZ, PINF,    5'b00001, "1/0");
    chk(OP_DIV, MTWO, PZ,   PZ, NINF,    5'b00001, "-2/0");
    chk(OP_DIV, PZ,   NZ,   PZ, SNAN,    5'b00101, "0/0");
    chk(OP_DIV, PINF, NINF, PZ, SNAN,    5'b00101, "inf/inf");
    chk(OP_DIV, MTWO, PINF, PZ, NZ,      5'b01001, "-2/inf");
    chk(OP_DIV, NINF, MTWO, PZ, PINF,    5'b00000, "-inf/-2");
    chk(OP_DIV, PZ,   MTWO, PZ, NZ,      5'b00000, "0/-2");
    chk(OP_MUL, PZ,   NINF, PZ, SNAN,    5'b00101, "0*inf");
    chk(OP_MUL, MTWO, PINF, PZ, NINF,    5'b00000, "-2*inf");
    chk(OP_ADD, PINF, NINF, PZ, SNAN,    5'b00101, "inf+-inf");
    chk(OP_SUB, PINF, PINF, PZ, SNAN,    5'b00101, "inf-inf");
    chk(OP_SUB, NINF, NINF, PZ, SNAN,    5'b00101, "-inf--inf");
    chk(OP_SUB, PINF, NINF, PZ, PINF,    5'b00000, "inf--inf");
    chk(OP_SUB, ONE,  PINF, PZ, NINF,    5'b00000, "1-inf");
    chk(OP_ADD, Q_NAN, ONE, PZ, QNAN,    5'b00000, "qnan+1");
    chk(OP_MUL, ONE, SIG_NAN, PZ, QNAN,  5'b00101, "1*snan");
    chk(OP_MAC, ONE,  ONE, SIG_NAN, QNAN, 5'b00101, "acc snan");
    chk(OP_MAC, PZ,   PINF, ONE, SNAN,   5'b00101, "acc+0*inf");
    chk(OP_MAC, ONE,  PINF, NINF, SNAN,  5'b00101, "-inf+1*inf");
    chk(OP_MAC, ONE,  MTWO, PINF, PINF,  5'b00000, "inf+1*-2");
    chk(OP_MAC, ONE,  ONE, PZ, MARK,     5'b00010, "ordinary mac");
    rov = 1; run = 0; rix = 1; rnd = PINF;
    chk(OP_MUL, 64'h7FE0_0000_0000_0000, 64'h4010_0000_0000_0000, PZ, PINF, 5'b10011, "overflow passes");
    rov = 0; run = 1; rix = 1; rnd = 64'h1;
    chk(OP_ADD, 64'h1, 64'h1, PZ, 64'h1, 5'b01011, "underflow passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
