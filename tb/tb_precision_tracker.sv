// tb_precision_tracker: checks the decode-stage precision register.
//
// Sends a stream modelled on a marked code fragment (startImprecise with
// level 0b111, a multiply and an add, startPrecise, an add, startImprecise
// again with another level, a shift, a no-op) with random stalls on the
// output side. Checks that marking instructions are swallowed, that every
// arithmetic instruction leaves with the level of its region, that no-ops
// leave with level 0, that order and fields are kept, and that the output
// register adds exactly one cycle when nothing stalls.
module tb_precision_tracker;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready;
  instr_t in_instr, out_instr;
  prec_t  cur_prec;

  precision_tracker dut (.*);

  instr_t prog [10];
  instr_t exp_q [$];
  prec_t  exp_prec [$];

  function automatic instr_t mk(kind_e k, alu_op_e op, int rd, int rs1,
                                int rs2, int p);
    instr_t i;
    i = '0;
    i.kind = k; i.op = op; i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1);
    i.rs2 = reg_idx_t'(rs2); i.prec = prec_t'(p); i.imm = word_t'(rd * 7);
    return i;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog[0] = mk(K_START_IMP, OP_ADD, 0, 0, 0, 7);
    prog[1] = mk(K_MUL,       OP_ADD, 8, 12, 8, 0);
    prog[2] = mk(K_ALU,       OP_ADD, 1, 2, 3, 0);
    prog[3] = mk(K_START_PRE, OP_ADD, 0, 0, 0, 5);  // field ignored
    prog[4] = mk(K_ALU,       OP_SUB, 2, 2, 1, 3);  // stray field: precise
    prog[5] = mk(K_START_IMP, OP_ADD, 0, 0, 0, 3);
    prog[6] = mk(K_ALU,       OP_LSL, 6, 8, 0, 0);
    prog[7] = mk(K_NOP,       OP_ADD, 0, 0, 0, 6);
    prog[8] = mk(K_ALU,       OP_RSB, 6, 2, 3, 0);
    prog[9] = mk(K_START_PRE, OP_ADD, 0, 0, 0, 0);
    // expected outputs with the level each must carry
    exp_prec = '{3'd7, 3'd7, 3'd0, 3'd3, 3'd0, 3'd3};
    foreach (prog[i]) if (!(prog[i].kind inside {K_START_IMP, K_START_PRE}))
      exp_q.push_back(prog[i]);
  end

  // output side: random ready, check each accepted output
  int got_n = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    instr_t e;
    e = exp_q[got_n];
    e.prec = exp_prec[got_n];
    checks++;
    if (out_instr !== e) begin
      failures++;
      $display("FAIL output %0d: got %h expected %h", got_n, out_instr, e);
    end
    got_n++;
  end

  initial begin
    in_valid = 1'b0; in_instr = '0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    chk("reset level", int'(cur_prec), 0);
    // pass 1: random output stalls
    for (int i = 0; i < 10; i++) begin
      in_valid = 1'b1; in_instr = prog[i];
      forever begin
        logic acc;
        out_ready = ($urandom_range(0, 2) != 0);
        #1 acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      if (i == 0) chk("level after startImprecise", int'(cur_prec), 7);
      if (i == 3) chk("level after startPrecise", int'(cur_prec), 0);
      if (i == 5) chk("level after second mark", int'(cur_prec), 3);
    end
    in_valid = 1'b0;
    out_ready = 1'b1;
    repeat (4) @(posedge clk);
    chk("outputs seen", got_n, 6);
    chk("final level", int'(cur_prec), 0);
    // pass 2: latency of one cycle with the output always ready
    @(negedge clk);
    got_n = 0;
    exp_q.delete();
    exp_prec = '{3'd0};
    exp_q.push_back(prog[2]);
    in_valid = 1'b1; in_instr = prog[2];
    @(negedge clk);
    in_valid = 1'b0;
    chk("one-cycle latency valid", int'(out_valid), 1);
    @(negedge clk);
    chk("one-cycle latency count", got_n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
