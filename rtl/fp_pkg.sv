// fp_pkg: shared rounding step of the feedback-free floating-point units.
//
// The binary32 multiplier and divider of the core both end with the same
// step: a wide significand and an exponent are normalised, shifted into the
// subnormal range when the exponent is too small, rounded to nearest even
// and packed, with overflow going to infinity. round_pack does this as pure
// combinational logic (a leading-zero count, two shifters and an
// incrementer).
//
// Interface of round_pack: sign s; significand m (48 bits, not zero);
// biased exponent e (signed) such that the value is
// (m / 2^47) * 2^(e - 127), i.e. e is the exponent the result would have
// if the leading one of m were at bit 47. The format, the rounding mode and
// the split into this package are this design's choices; the document names
// the units but not their insides.
package fp_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] round_pack(logic s, logic [47:0] m,
                                             logic signed [11:0] e);
    logic [5:0]         lz;
    logic [47:0]        mn, ms, lost_mask;
    logic signed [11:0] en;
    logic [11:0]        sh;
    logic [23:0]        keep;
    logic               g, st, rnd;
    logic [24:0]        r;
    logic [8:0]         eo;

    lz = 6'd0;
    for (int i = 0; i < 48; i++) if (m[i]) lz = 6'(47 - i);
    mn = m << lz;
    en = e - 12'(lz);
    if (en >= 12'sd1) begin
      ms = mn;
      st = 1'b0;
      eo = 9'(en);
      if (en > 12'sd254) eo = 9'd255;
    end else begin
      // subnormal result: shift right by 1 - en, keep what falls out as sticky
      sh = 12'(12'sd1 - en);
      if (sh > 12'd26) begin
        ms = '0;
        st = 1'b1;
      end else begin
        lost_mask = (48'd1 << sh[5:0]) - 48'd1;
        ms = mn >> sh[5:0];
        st = (mn & lost_mask) != '0;
      end
      eo = 9'd0;
    end
    keep = ms[47:24];
    g    = ms[23];
    st   = st | (ms[22:0] != '0);
    rnd  = g & (st | keep[0]);
    r    = {1'b0, keep} + 25'(rnd);
    if (eo == 9'd0) begin
      // a subnormal that rounds up to 2^-126 becomes the smallest normal
      if (r[23]) eo = 9'd1;
    end else if (r[24]) begin
      r  = r >> 1;
      eo = eo + 9'd1;
    end
    if (eo >= 9'd255) return {s, 8'hFF, 23'd0};
    return {s, eo[7:0], r[22:0]};
  endfunction

endpackage
