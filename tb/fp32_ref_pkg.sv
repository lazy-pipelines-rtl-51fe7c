// fp32_ref_pkg: reference conversions for checking binary32 arithmetic.
//
// f2r turns binary32 bits into a real exactly (every binary32 value is a
// binary64 value). r2f rounds a real to the nearest binary32 value, ties to
// even, working on the binary64 bit pattern with integer operations, and
// handles subnormal results and overflow to infinity. The sum of two
// binary32 values formed in binary64 and then rounded by r2f equals the
// correctly rounded binary32 sum, because binary64 has more than twice the
// precision of binary32 plus two bits. fadd_ref gives the expected result
// of the adder: IEEE-754 binary32 a + b (or a - b), round to nearest even,
// with every NaN result replaced by the quiet NaN 0x7FC00000. fmul_ref and
// fdiv_ref do the same for a * b and a / b: a binary32 product is exact in
// binary64, and a binary64 quotient rounded again to binary32 is still the
// correctly rounded binary32 quotient for the same precision reason.
package fp32_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, f[22:0] != 0 ? 52'h8_0000_0000_0000 : 52'd0};
      return $bitstoreal(d);
    end
    if (f[30:23] == 0) begin
      real v;
      v = real'(f[22:0]);
      for (int i = 0; i < 149; i++) v = v / 2.0;
      return f[31] ? -v : v;
    end
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        s;
    int          e, sh;
    logic [53:0] m;
    logic [53:0] q, rem, half;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:0] == 0) return {s, 31'd0};
    // binary32 subnormals are far above binary64 subnormals, so the input
    // is a normal binary64 value here
    e = int'(d[62:52]) - 1023;
    m = {2'b01, d[51:0]};
    sh = (e >= -126) ? 29 : 29 + (-126 - e);
    if (sh > 53) return {s, 31'd0};
    q    = m >> sh;
    rem  = m - (q << sh);
    half = 54'd1 << (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (e < -126) begin
      // subnormal range: q is the fraction; q = 2^23 is the smallest normal
      return {s, (q[23] ? 8'd1 : 8'd0), q[22:0]};
    end
    if (q[24]) begin q = q >> 1; e = e + 1; end
    if (e > 127) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), q[22:0]};
  endfunction

  function automatic logic [31:0] fadd_ref(logic [31:0] x, logic [31:0] z,
                                           logic s);
    logic [31:0] r;
    logic x_nan, z_nan;
    x_nan = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    z_nan = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    if (x_nan || z_nan) return 32'h7FC0_0000;
    if (s) z[31] = ~z[31];
    if (x[30:0] == 0 && z[30:0] == 0) return {x[31] & z[31], 31'd0};
    if (x[30:23] == 8'hFF && z[30:23] == 8'hFF && x[31] != z[31])
      return 32'h7FC0_0000;
    if (x[30:23] == 8'hFF) return x;
    if (z[30:23] == 8'hFF) return z;
    r = r2f(f2r(x) + f2r(z));
    if (r[30:0] == 0) return 32'h0000_0000;  // exact cancellation: +0
    return r;
  endfunction

  function automatic logic [31:0] fmul_ref(logic [31:0] x, logic [31:0] z);
    logic x_nan, z_nan, x_inf, z_inf, x_zero, z_zero, s;
    x_nan  = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    z_nan  = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    x_inf  = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    z_inf  = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    x_zero = (x[30:0] == 0);
    z_zero = (z[30:0] == 0);
    s = x[31] ^ z[31];
    if (x_nan || z_nan || (x_inf && z_zero) || (z_inf && x_zero))
      return 32'h7FC0_0000;
    if (x_inf || z_inf) return {s, 8'hFF, 23'd0};
    if (x_zero || z_zero) return {s, 31'd0};
    return r2f(f2r(x) * f2r(z));
  endfunction

  function automatic logic [31:0] fdiv_ref(logic [31:0] x, logic [31:0] z);
    logic x_nan, z_nan, x_inf, z_inf, x_zero, z_zero, s;
    x_nan  = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    z_nan  = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    x_inf  = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    z_inf  = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    x_zero = (x[30:0] == 0);
    z_zero = (z[30:0] == 0);
    s = x[31] ^ z[31];
    if (x_nan || z_nan || (x_zero && z_zero) || (x_inf && z_inf))
      return 32'h7FC0_0000;
    if (x_inf || z_zero) return {s, 8'hFF, 23'd0};
    if (x_zero || z_inf) return {s, 31'd0};
    return r2f(f2r(x) / f2r(z));
  endfunction

endpackage
