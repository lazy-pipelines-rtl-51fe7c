// tb_fp_mul: checks the feedback-free binary32 multiplier fp_mul.
//
// The block is combinational, so each operand pair is applied, given a
// moment to settle and compared with the reference a * b formed in binary64
// and rounded to binary32 (fp32_ref_pkg::fmul_ref). Operands: every pair
// of a list of special values (zeros, infinities, NaN, one, the smallest
// subnormal, the largest subnormal and the largest normal), random bit
// patterns, random values of moderate size, values near the overflow and
// underflow limits (results that overflow, become subnormal or round up to
// the smallest normal), subnormal operands and exact cases (powers of two
// and small integers).
module tb_fp_mul;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  word_t a, b, y;

  fp_mul dut (.*);

  function automatic word_t rnd_operand(int kind);
    word_t v;
    case (kind)
      0: v = $urandom;
      1: v = {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
      2: v = {1'($urandom), 8'd0, 23'($urandom)};                   // subnormal
      3: v = {1'($urandom), 8'($urandom_range(1, 40)), 23'($urandom)};   // tiny
      4: v = {1'($urandom), 8'($urandom_range(200, 254)), 23'($urandom)}; // huge
      5: v = {1'($urandom), 8'($urandom_range(120, 134)), 23'd0};    // power of two
      default: v = {1'($urandom), 8'($urandom_range(127, 131)),
                    3'($urandom), 20'd0};                             // short integer
    endcase
    return v;
  endfunction

  task automatic chk(string what);
    word_t e;
    #1;
    e = fmul_ref(a, b);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s %h * %h: got %h expected %h", what, a, b, y, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static word_t special [12] = '{32'h0000_0000, 32'h8000_0000, 32'h7F80_0000,
                            32'hFF80_0000, 32'h7FC0_0000, 32'h3F80_0000,
                            32'hBF80_0000, 32'h0000_0001, 32'h807F_FFFF,
                            32'h7F7F_FFFF, 32'h4040_0000, 32'h0080_0000};
    foreach (special[i]) foreach (special[j]) begin
      a = special[i]; b = special[j];
      chk("special");
    end
    for (int n = 0; n < 6000; n++) begin
      a = rnd_operand($urandom_range(0, 6));
      b = rnd_operand($urandom_range(0, 6));
      chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
