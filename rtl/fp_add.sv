// fp_add: pipelined single-precision floating-point adder without feedback.
//
// The second kind of unit a Lazy Pipeline can exploit is a multi-stage
// pipeline whose stages feed only forward: with its inputs held constant by
// the operand buffer, every stage settles in turn, so given enough cycles
// the output becomes error-free even when the supply is over-scaled. This
// adder is such a pipeline, with four stages separated by three registers:
//   1. unpack, order the operands by magnitude, align the smaller one
//      (guard, round and sticky bits kept);
//   2. add or subtract the significands;
//   3. normalise (leading-zero shift, subnormal results handled);
//   4. round to nearest even, pack, and select special results.
// It computes a + b, or a - b when sub = 1, on IEEE-754 binary32 values,
// including subnormals, signed zeros and infinities; any NaN result is the
// quiet NaN 0x7FC00000. Flags are not produced.
//
// Timing: registers advance every cycle (no enable, no valid bit); the
// result for inputs held stable is on y three clock edges after they are
// applied, so a unit built from it has a nominal latency of four cycles
// counting the cycle of its operand buffer. The stage split, the format
// (binary32, matching the 32-bit registers) and the NaN policy are this
// design's choices; the document gives only the kind of unit.
module fp_add
  import lp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sub,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  localparam word_t QNAN = 32'h7FC0_0000;

  // ---------------- stage 1: unpack, swap, align ----------------
  typedef struct packed {
    logic        special;   // result is fixed (NaN, infinity)
    word_t       special_y;
    logic        sign;      // sign of the larger operand
    logic        eff_sub;   // magnitudes are subtracted
    logic        zero_sign; // sign of an exact zero result
    logic [8:0]  exp;       // biased exponent of the larger operand (>= 1)
    logic [26:0] ma;        // larger significand, with 3 spare low bits
    logic [26:0] mb;        // aligned smaller significand + guard/round/sticky
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    logic        sa, sb, a_nan, b_nan, a_inf, b_inf, swap;
    logic [7:0]  ea, eb;
    logic [22:0] fa, fb;
    logic [8:0]  eA, eB, d;
    logic [23:0] mA, mB;
    logic [49:0] shifted;
    logic        sticky;

    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23]; fa = a[22:0];
    eb = b[30:23]; fb = b[22:0];
    a_nan = (ea == 8'hFF) && (fa != '0);
    b_nan = (eb == 8'hFF) && (fb != '0);
    a_inf = (ea == 8'hFF) && (fa == '0);
    b_inf = (eb == 8'hFF) && (fb == '0);

    s1_d = '0;
    s1_d.eff_sub   = sa ^ sb;
    s1_d.zero_sign = sa & sb;
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      s1_d.special   = 1'b1;
      s1_d.special_y = QNAN;
    end else if (a_inf) begin
      s1_d.special   = 1'b1;
      s1_d.special_y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      s1_d.special   = 1'b1;
      s1_d.special_y = {sb, 8'hFF, 23'd0};
    end

    swap = (b[30:0] > a[30:0]);
    // subnormals use exponent 1 and no hidden bit
    eA = {1'b0, swap ? eb : ea};
    eB = {1'b0, swap ? ea : eb};
    mA = {(eA != 0), swap ? fb : fa};
    mB = {(eB != 0), swap ? fa : fb};
    if (eA == 0) eA = 9'd1;
    if (eB == 0) eB = 9'd1;
    s1_d.sign = swap ? sb : sa;
    s1_d.exp  = eA;
    s1_d.ma   = {mA, 3'b000};

    d = eA - eB;
    // shift the smaller significand right by d, collecting a sticky bit
    shifted = {mB, 26'd0} >> ((d > 9'd26) ? 9'd26 : d);
    if (d > 9'd26) begin
      sticky     = (mB != '0);
      s1_d.mb    = {26'd0, sticky};
    end else begin
      sticky     = (shifted[23:0] != '0);
      s1_d.mb    = {shifted[49:24], sticky};
    end
  end

  // ---------------- stage 2: add / subtract ----------------
  typedef struct packed {
    logic        special;
    word_t       special_y;
    logic        sign;
    logic        zero_sign;
    logic [8:0]  exp;
    logic [27:0] sum;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    s2_d.special   = s1_q.special;
    s2_d.special_y = s1_q.special_y;
    s2_d.sign      = s1_q.sign;
    s2_d.zero_sign = s1_q.zero_sign;
    s2_d.exp       = s1_q.exp;
    s2_d.sum       = s1_q.eff_sub ? ({1'b0, s1_q.ma} - {1'b0, s1_q.mb})
                                  : ({1'b0, s1_q.ma} + {1'b0, s1_q.mb});
  end

  // ---------------- stage 3: normalise ----------------
  typedef struct packed {
    logic        special;
    word_t       special_y;
    logic        is_zero;
    logic        sign;
    logic [8:0]  exp;      // biased; 1 with n[26] = 0 means subnormal
    logic [26:0] n;        // 1.xxx (23 bits) guard round sticky
  } s3_t;

  s3_t s3_d, s3_q;

  always_comb begin
    logic [4:0]  lz;
    logic [8:0]  sh;
    logic [26:0] v;

    v  = s2_q.sum[26:0];
    lz = 5'd27;
    sh = '0;
    s3_d.special   = s2_q.special;
    s3_d.special_y = s2_q.special_y;
    s3_d.is_zero   = (s2_q.sum == '0);
    s3_d.sign      = (s2_q.sum == '0) ? s2_q.zero_sign : s2_q.sign;

    if (s2_q.sum[27]) begin
      s3_d.n   = {s2_q.sum[27:2], s2_q.sum[1] | s2_q.sum[0]};
      s3_d.exp = s2_q.exp + 9'd1;
    end else begin
      for (int i = 0; i <= 26; i++) if (v[i]) lz = 5'(26 - i);
      sh = ({4'd0, lz} < s2_q.exp) ? {4'd0, lz} : (s2_q.exp - 9'd1);
      s3_d.n   = v << sh;
      s3_d.exp = s2_q.exp - sh;
    end
  end

  // ---------------- stage 4: round and pack ----------------
  always_comb begin
    logic [24:0] m;
    logic        rnd;
    logic [8:0]  e;

    rnd = s3_q.n[2] & (s3_q.n[1] | s3_q.n[0] | s3_q.n[3]);
    m   = {1'b0, s3_q.n[26:3]} + 25'(rnd);
    e   = s3_q.n[26] ? s3_q.exp : 9'd0;
    if (m[24]) begin
      m = m >> 1;
      e = e + 9'd1;
    end else if (e == 0 && m[23]) begin
      e = 9'd1;  // a subnormal rounded up to the smallest normal
    end

    if (s3_q.special)       y = s3_q.special_y;
    else if (s3_q.is_zero)  y = {s3_q.sign, 31'd0};
    else if (e >= 9'd255)   y = {s3_q.sign, 8'hFF, 23'd0};
    else                    y = {s3_q.sign, e[7:0], m[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
    end else begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      s3_q <= s3_d;
    end
  end

endmodule
