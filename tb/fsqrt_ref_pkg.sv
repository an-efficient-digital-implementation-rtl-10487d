// fsqrt_ref_pkg: reference models for the square-root testbenches.
//
// The models are written independently of the RTL: the integer root is found
// by binary search on q*q, subnormal operands are normalised by a shift loop,
// and the result exponent is derived from the value m * 2^e of the operand.
// Widths are run-time arguments so one model serves half, single and double
// precision (operands up to 64 bits, radicands up to 128 bits).
package fsqrt_ref_pkg;

  // floor(sqrt(v)) by binary search
  function automatic logic [63:0] isqrt(logic [127:0] v);
    logic [63:0]  lo, hi, mid;
    logic [127:0] sq;
    lo = 0;
    hi = 64'h7FFF_FFFF_FFFF_FFFF;  // roots of up to 126-bit values
    while (lo < hi) begin
      mid = lo + ((hi - lo + 1) >> 1);
      sq  = 128'(mid) * 128'(mid);
      if (sq <= v) lo = mid;
      else         hi = mid - 1;
    end
    return lo;
  endfunction

  // Operand preparation: for a finite positive operand, m * 2^s is the
  // radicand whose root has mw+1 bits and exp the biased result exponent.
  // special is set (with its result in sval) for every other operand.
  function automatic void prep(input logic [63:0] x, input int ew, input int mw,
                               output logic [127:0] radicand, output int exp_b,
                               output bit special, output logic [63:0] sval);
    logic        sign;
    longint      ef, bias, e, s;
    logic [63:0] frac, m, allones, qnan, pinf;
    sign    = x[ew+mw];
    ef      = longint'((x >> mw) & ((64'd1 << ew) - 1));
    frac    = x & ((64'd1 << mw) - 1);
    bias    = (longint'(1) << (ew - 1)) - 1;
    allones = (64'd1 << ew) - 1;
    qnan    = (allones << mw) | (64'd1 << (mw - 1));
    pinf    = allones << mw;
    radicand = '0;
    exp_b    = 0;
    special  = 1;
    sval     = '0;
    if (ef == longint'(allones) && frac != 0)      sval = qnan;
    else if (ef == 0 && frac == 0)                 sval = x;
    else if (sign)                                 sval = qnan;
    else if (ef == longint'(allones))              sval = pinf;
    else begin
      special = 0;
      if (ef == 0) begin
        m = frac;
        e = 1 - bias - mw;
        while (m[mw] == 1'b0) begin
          m = m << 1;
          e = e - 1;
        end
      end else begin
        m = frac | (64'd1 << mw);
        e = ef - bias - mw;
      end
      // value = m * 2^e; sqrt = sqrt(m * 2^s) * 2^((e-s)/2) with e-s even
      s = ((e - mw) % 2 == 0) ? mw : mw + 1;
      radicand = 128'(m) << s;
      exp_b    = int'((e - s) / 2 + mw + bias);
    end
  endfunction

  // Expected square root, root truncated.
  function automatic logic [63:0] fp_sqrt(logic [63:0] x, int ew, int mw);
    logic [127:0] rad;
    int           exp_b;
    bit           special;
    logic [63:0]  sval, q;
    prep(x, ew, mw, rad, exp_b, special, sval);
    if (special) return sval;
    q = isqrt(rad);
    return (64'(exp_b) << mw) | (q & ((64'd1 << mw) - 1));
  endfunction

  // 32-bit maximal-length Fibonacci LFSR step (taps 32, 22, 2, 1)
  function automatic logic [31:0] lfsr32(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

endpackage
