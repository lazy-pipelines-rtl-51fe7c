// fp_mul: binary32 floating-point multiplier without feedback.
//
// The document's floating-point multiplier is a pipelined unit with
// feedback, whose output is only usable in the cycle it is due; such a unit
// cannot use slack. It is replaced by a feedback-free circuit of the same
// function run as a multi-cycle path (clock division): the controller gives
// it its nominal latency in cycles and, in the imprecise set, further slack
// cycles in which the output keeps settling towards the correct product.
//
// How it works: unpack (subnormal inputs get exponent 1 and no hidden bit),
// a 24 x 24 significand product, the sum of the exponents, then
// fp_pkg::round_pack (normalise, subnormal shift, round to nearest even).
// Special operands: any NaN, or infinity times zero, gives the quiet NaN
// 0x7FC00000; infinity times non-zero gives a signed infinity; a zero
// operand gives a signed zero. No flags.
//
// Interface: y = a * b, purely combinational (output depends only on the
// current inputs). The format and the special-value policy are this
// design's choices.
module fp_mul
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
    logic [8:0]         ea, eb;
    logic [47:0]        p;
    logic signed [11:0] e;

    s      = a[31] ^ b[31];
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_zero = (a[30:0] == '0);
    b_zero = (b[30:0] == '0);
    ma = {(a[30:23] != '0), a[22:0]};
    mb = {(b[30:23] != '0), b[22:0]};
    ea = (a[30:23] == '0) ? 9'd1 : {1'b0, a[30:23]};
    eb = (b[30:23] == '0) ? 9'd1 : {1'b0, b[30:23]};
    p  = ma * mb;
    // value = p * 2^(ea + eb - 254 - 46); a leading one at bit 47 means
    // exponent ea + eb - 253, biased ea + eb - 126
    e  = 12'(ea) + 12'(eb) - 12'sd126;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) y = QNAN;
    else if (a_inf || b_inf)                                       y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero)                                     y = {s, 31'd0};
    else                                                           y = round_pack(s, p, e);
  end

endmodule
