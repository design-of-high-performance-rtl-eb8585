// fpmac_pkg: types and constants shared by the multiply-add unit.
//
// The unit works on IEEE-754 binary64 numbers (1 sign bit, 11 exponent bits
// with a bias of 1023, 52 stored fraction bits) and on 64-bit integers.
// Internally a floating point result travels to the rounding stage as a sign,
// a 12-bit biased exponent and a 56-bit mantissa laid out as
//   [55] overflow bit, [54] leading (hidden) bit, [53:2] fraction,
//   [1] round bit, [0] sticky bit,
// which is the rounding-stage format of the design. The rounding-mode and
// opcode encodings are this design's own choice.
package fpmac_pkg;

  localparam int unsigned EXP_W  = 11;
  localparam int unsigned FRAC_W = 52;
  localparam int unsigned BIAS   = 1023;
  localparam int unsigned EMAX   = 2047;   // all-ones exponent field

  // Default NaN patterns. Invalid operations return the signalling pattern,
  // NaN operands give the quiet one.
  localparam logic [63:0] SNAN = 64'h7FF4_0000_0000_0000;
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  typedef enum logic [1:0] {
    RM_NEAREST = 2'b00,   // round to nearest, ties to even
    RM_ZERO    = 2'b01,   // round toward zero
    RM_POSINF  = 2'b10,   // round toward +infinity
    RM_NEGINF  = 2'b11    // round toward -infinity
  } rmode_e;

  typedef enum logic [2:0] {
    OP_ADD   = 3'd0,      // a + b
    OP_SUB   = 3'd1,      // a - b
    OP_MUL   = 3'd2,      // a * b
    OP_DIV   = 3'd3,      // a / b (floating point only)
    OP_MAC   = 3'd4,      // acc <= acc + a * b
    OP_LDACC = 3'd5,      // acc <= a
    OP_CLR   = 3'd6       // acc <= 0
  } op_e;

  // Operand class, decoded from the exponent and fraction fields.
  typedef struct packed {
    logic zero;
    logic inf;
    logic qnan;
    logic snan;
    logic denorm;
  } fp_class_t;

  // Status flags of a floating point result.
  typedef struct packed {
    logic overflow;
    logic underflow;
    logic invalid;
    logic inexact;
    logic exception;      // overflow | underflow | invalid | divide by zero
  } fp_flags_t;

  function automatic fp_class_t classify(input logic [EXP_W-1:0] e, input logic [FRAC_W-1:0] f);
    fp_class_t c;
    c.zero   = (e == '0) && (f == '0);
    c.denorm = (e == '0) && (f != '0);
    c.inf    = (e == '1) && (f == '0);
    c.qnan   = (e == '1) && f[FRAC_W-1];
    c.snan   = (e == '1) && !f[FRAC_W-1] && (f != '0);
    return c;
  endfunction

endpackage
