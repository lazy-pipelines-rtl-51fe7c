// tb_fp_add: checks the pipelined binary32 adder.
//
// Part 1 holds each operand pair constant, as the operand buffer of a unit
// does, and checks the result three edges later against a reference sum
// formed in binary64 and rounded to binary32 (fp32_ref_pkg::fadd_ref).
// Operands are random bit patterns, random values of nearby exponents (for cancellation
// and alignment), subnormals, zeros, infinities and NaNs, for both add and
// subtract. Part 2 streams a new pair every cycle and checks that the
// stages feed only forward: each result appears exactly three edges after
// its operands.
module tb_fp_add;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  sub;
  word_t a, b, y;

  fp_add dut (.*);

  function automatic word_t rnd_operand(int kind, word_t near);
    word_t v;
    case (kind)
      0: v = $urandom;
      1: v = {1'($urandom), near[30:23] + 8'($urandom_range(0, 2)) - 8'd1,
              23'($urandom)};
      2: v = {1'($urandom), 8'd0, 23'($urandom)};               // subnormal
      3: v = {1'($urandom), 8'($urandom_range(1, 3)), 23'($urandom)};
      4: v = {1'($urandom), 8'hFE, 23'($urandom)};              // huge
      default: v = {1'($urandom), 8'($urandom_range(100, 150)), 23'($urandom)};
    endcase
    return v;
  endfunction

  task automatic chk(string what, word_t x, word_t z, logic s, word_t got);
    word_t e;
    e = fadd_ref(x, z, s);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s %h %s %h: got %h expected %h", what, x,
                 s ? "-" : "+", z, got, e);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static word_t special [10] = '{32'h0000_0000, 32'h8000_0000, 32'h7F80_0000,
                            32'hFF80_0000, 32'h7FC0_0000, 32'h3F80_0000,
                            32'hBF80_0000, 32'h0000_0001, 32'h807F_FFFF,
                            32'h7F7F_FFFF};
    word_t qa [$], qb [$];
    logic  qs [$];
    sub = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // part 1: operands held constant
    foreach (special[i]) foreach (special[j]) for (int s = 0; s < 2; s++) begin
      a = special[i]; b = special[j]; sub = s[0];
      repeat (3) @(negedge clk);
      chk("special", a, b, sub, y);
    end
    for (int n = 0; n < 3000; n++) begin
      a = rnd_operand($urandom_range(0, 5), '0);
      b = rnd_operand($urandom_range(0, 5), a);
      sub = 1'($urandom);
      repeat (3) @(negedge clk);
      chk("random", a, b, sub, y);
    end
    // part 2: a new pair every cycle, results three edges later
    for (int n = 0; n < 500; n++) begin
      a = rnd_operand($urandom_range(0, 5), '0);
      b = rnd_operand($urandom_range(0, 5), a);
      sub = 1'($urandom);
      qa.push_back(a); qb.push_back(b); qs.push_back(sub);
      @(negedge clk);
      if (n >= 2) begin
        // result of the pair applied two cycles before this one's
        // predecessor: three edges have passed since it was applied
        chk("stream", qa[0], qb[0], qs[0], y);
        void'(qa.pop_front()); void'(qb.pop_front()); void'(qs.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
