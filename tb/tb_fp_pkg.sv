// tb_fp_pkg: helpers shared by the floating point testbenches: random
// binary64 operands in a chosen exponent range, and a consistency check of
// the four rounding modes against each other and against the reference
// round-to-nearest result. For binary32: the value of a binary32 word, and a
// reference round-to-nearest-even of a real to binary32 worked out with real
// arithmetic (scale to a 24-bit integer, round, scale back).
package tb_fp_pkg;

  // 2^k for k in the binary64 normal range
  function automatic real pow2(input int k);
    return $bitstoreal({1'b0, 11'(k + 1023), 52'd0});
  endfunction

  // Value of a finite binary32 word; an infinity gives +-2^128.
  function automatic real sp_value(input logic [31:0] s);
    real v;
    if (s[30:23] == 8'hFF)      v = pow2(128);
    else if (s[30:23] == 8'h00) v = real'(s[22:0]) * pow2(-149);
    else                        v = (1.0 + real'(s[22:0]) * pow2(-23)) * pow2(int'(s[30:23]) - 127);
    return s[31] ? -v : v;
  endfunction

  // Round-to-nearest-even of a finite binary64 value to binary32. Returns the
  // rounded value; `ovf` is set when it reaches 2^128.
  function automatic real sp_rne(input real x, output bit ovf);
    real ax, scale, q, t, fr;
    int  ex;
    ovf = 0;
    ax  = (x < 0.0) ? -x : x;
    if (ax == 0.0) return x;
    ex    = int'($realtobits(ax) >> 52) - 1023;
    scale = pow2(((ex < -126) ? -126 : ex) - 23);
    q     = ax / scale;
    t     = $floor(q);
    fr    = q - t;
    if (fr > 0.5 || (fr == 0.5 && ($rtoi(t) % 2) == 1)) t = t + 1.0;
    t = t * scale;
    if (t >= pow2(128)) ovf = 1;
    return (x < 0.0) ? -t : t;
  endfunction

  // Random finite binary64 with biased exponent field in [emin, emax]
  // (0 gives a denormal or zero).
  function automatic logic [63:0] rand_fp(input int emin, input int emax);
    logic [51:0] f;
    logic [10:0] e;
    f = {$urandom, $urandom} & 52'hF_FFFF_FFFF_FFFF;
    // sometimes short significands, which make products and sums exact
    if (($urandom % 4) == 0) f = f & 52'hF_FFF0_0000_0000;
    e = 11'(emin + int'($urandom % (emax - emin + 1)));
    return {1'($urandom), e, f};
  endfunction

  function automatic bit is_nan(input logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
  endfunction

  // Checks that results under the four rounding modes (nearest, zero, +inf,
  // -inf) fit together: directed results bracket the exact value one unit
  // apart when inexact, toward-zero equals the one of smaller magnitude,
  // nearest is one of the two. Returns the number of violations.
  function automatic int mode_check(input logic [63:0] rn, input logic [63:0] rz,
                                    input logic [63:0] ru, input logic [63:0] rd,
                                    input bit inexact, input bit overflow);
    int bad = 0;
    logic [63:0] lo, hi;
    if (overflow) return 0;
    if (!inexact) begin
      if (!(rn == rz && rn == ru && rn == rd)) bad++;
      return bad;
    end
    // magnitude-smaller and magnitude-larger candidates
    lo = rn[63] ? ru : rd;
    hi = rn[63] ? rd : ru;
    if (rz != lo) bad++;
    if (hi[62:0] != lo[62:0] + 63'd1 && !(lo[62:0] == 0 && hi[62:0] == 1)) bad++;
    if (rn != lo && rn != hi) bad++;
    return bad;
  endfunction

endpackage
