// fp_div: binary32 floating-point divider without feedback.
//
// Like the multiplier, the document's divider is a unit with feedback that
// cannot use slack; it is replaced by a feedback-free circuit of the same
// function run as a multi-cycle path (clock division), so an imprecise
// divider can keep settling during slack cycles.
//
// How it works: both significands are normalised so their leading one is
// at bit 23 (subnormal inputs are shifted up and their exponent lowered),
// the dividend significand, shifted left by 26, is divided by the divisor
// significand in one combinational divider (26 or 27 quotient bits, the
// remainder becomes the sticky bit), and fp_pkg::round_pack normalises,
// rounds to nearest even and packs. Special operands: any NaN, 0/0 and
// inf/inf give the quiet NaN 0x7FC00000; x/0 and inf/x give a signed
// infinity; 0/x and x/inf give a signed zero. No flags.
//
// Interface: y = a / b, purely combinational. The format, the algorithm
// and the special-value policy are this design's choices.
module fp_div
  import lp_pkg::*;
  import fp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    logic               s, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [23:0]        ma, mb;
    logic [4:0]         la, lb;
    logic signed [11:0] ea, eb, e;
    logic [49:0]        num, q, rem;
    logic [47:0]        m;

    s      = a[31] ^ b[31];
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_zero = (a[30:0] == '0);
    b_zero = (b[30:0] == '0);
    ma = {(a[30:23] != '0), a[22:0]};
    mb = {(b[30:23] != '0), b[22:0]};
    ea = (a[30:23] == '0) ? 12'sd1 : 12'(a[30:23]);
    eb = (b[30:23] == '0) ? 12'sd1 : 12'(b[30:23]);
    // normalise subnormal significands (leading one to bit 23)
    la = '0;
    lb = '0;
    for (int i = 0; i < 24; i++) begin
      if (ma[i]) la = 5'(23 - i);
      if (mb[i]) lb = 5'(23 - i);
    end
    ma = ma << la;
    mb = mb << lb;
    ea = ea - 12'(la);
    eb = eb - 12'(lb);
    // ma / mb lies in (1/2, 2); q = ma * 2^26 / mb has 26 or 27 bits
    num = {ma, 26'd0};
    q   = num / {26'd0, mb};
    rem = num - q * {26'd0, mb};
    // m / 2^47 = q / 2^26, with the remainder jammed into the lowest bit
    m   = {q[26:0], 21'd0} | {47'd0, (rem != '0)};
    e   = ea - eb + 12'sd127;

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) y = QNAN;
    else if (a_inf || b_zero)                                     y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_inf)                                     y = {s, 31'd0};
    else                                                          y = round_pack(s, m, e);
  end

endmodule
