// tb_lazy_pipeline_full: the core at its default parameters on marked
// kernels.
//
// Runs three pieces of straight-line code through lazy_pipeline_top with no
// parameter changed:
//  1. the marked fragment of the precision-marking example: an imprecise
//     region (level 0b111) with mul and add, a precise region, an imprecise
//     region with lsl and rsb, and a precise add (its compare and store are
//     replaced by no-ops, as the core has no flags and no memory);
//  2. the even part of a JPEG-style 8-point integer IDCT (libjpeg's
//     islow constants 4433, 6270 and -15137, scale shift 13) in an
//     imprecise region, with a precise loop-counter update in between;
//  3. an SOR-style update in binary32 in imprecise regions: the sum of
//     four neighbours, its precise negation, then omega/4 times the sum
//     plus (1 - omega) times the centre and a division by a neighbour
//     (floating-point add, multiply and divide units).
// The registers are set up by precise moves. The final register file is
// compared with a sequential reference interpreter, the core must fall idle
// within the largest slack limit after the last instruction, and Lazy
// Forwarding and Lazy Writeback must both have occurred.
module tb_lazy_pipeline_full;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic      in_valid, in_ready, idle;
  instr_t    in_instr;
  reg_idx_t  dbg_raddr;
  word_t     dbg_rdata;
  prec_t     cur_prec;
  fu_state_e fu_state [NFU];
  logic      ev_issue, ev_issue_imp, ev_stall_fu, ev_stall_raw;
  logic [1:0] ev_fwd_nominal, ev_fwd_lazy;
  slack_t    ev_fwd_slack;
  logic      ev_wb [NFU];
  slack_t    ev_wb_slack [NFU];
  logic      ev_wb_masked [NFU];
  logic      ev_evict_issue [NFU];
  logic      ev_evict_limit [NFU];
  logic [NFU-1:0] ev_stale_wb;

  lazy_pipeline_top dut (.*);

  instr_t prog [$];
  word_t  ref_regs [NREGS];

  function automatic instr_t op3(kind_e k, alu_op_e o, int rd, int rs1,
                                 int rs2);
    instr_t i;
    i = '0; i.kind = k; i.op = o;
    i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1); i.rs2 = reg_idx_t'(rs2);
    return i;
  endfunction

  function automatic instr_t opi(kind_e k, alu_op_e o, int rd, int rs1,
                                 word_t imm);
    instr_t i;
    i = op3(k, o, rd, rs1, 0);
    i.use_imm = 1'b1; i.imm = imm;
    return i;
  endfunction

  function automatic instr_t mark(bit imp, int lvl);
    instr_t i;
    i = '0;
    i.kind = imp ? K_START_IMP : K_START_PRE;
    i.prec = prec_t'(lvl);
    return i;
  endfunction

  function automatic instr_t nop();
    instr_t i;
    i = '0; i.kind = K_NOP;
    return i;
  endfunction

  function automatic word_t alu_ref(alu_op_e o, word_t x, word_t z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_RSB: return z - x;
      OP_AND: return x & z;
      OP_ORR: return x | z;
      OP_EOR: return x ^ z;
      OP_MOV: return z;
      OP_LSL: return x << z[4:0];
      OP_LSR: return x >> z[4:0];
      default: return '0;
    endcase
  endfunction

  task automatic interpret();
    foreach (ref_regs[r]) ref_regs[r] = '0;
    foreach (prog[n]) begin
      instr_t i;
      word_t  b;
      i = prog[n];
      b = i.use_imm ? i.imm : ref_regs[i.rs2];
      case (i.kind)
        K_ALU:  ref_regs[i.rd] = alu_ref(i.op, ref_regs[i.rs1], b);
        K_MUL:  ref_regs[i.rd] = ref_regs[i.rs1] * b;
        K_FADD: ref_regs[i.rd] = fadd_ref(ref_regs[i.rs1], b, i.op == OP_SUB);
        K_FMUL: ref_regs[i.rd] = fmul_ref(ref_regs[i.rs1], b);
        K_FDIV: ref_regs[i.rd] = fdiv_ref(ref_regs[i.rs1], b);
        default: ;
      endcase
    end
  endtask

  task automatic build();
    // register set-up (precise)
    prog.push_back(opi(K_ALU, OP_MOV, 12, 0, 32'd3));     // ip
    prog.push_back(opi(K_ALU, OP_MOV, 8, 0, 32'd25));
    prog.push_back(opi(K_ALU, OP_MOV, 2, 0, 32'd16));
    prog.push_back(opi(K_ALU, OP_MOV, 3, 0, 32'd1000));
    prog.push_back(opi(K_ALU, OP_MOV, 0, 0, 32'd64));
    // 1. marked fragment
    prog.push_back(mark(1, 7));
    prog.push_back(op3(K_MUL, OP_ADD, 8, 12, 8));          // mul r8, ip, r8
    prog.push_back(op3(K_ALU, OP_ADD, 1, 2, 3));           // add r1, r2, r3
    prog.push_back(mark(0, 0));
    prog.push_back(nop());                                 // cmp r2, #16
    prog.push_back(mark(1, 7));
    prog.push_back(opi(K_ALU, OP_LSL, 6, 8, 32'd2));       // lsl r6, r8, #2
    prog.push_back(nop());                                 // str r6, [r3]
    prog.push_back(op3(K_ALU, OP_RSB, 6, 2, 3));           // rsb r6, r2, r3
    prog.push_back(mark(0, 0));
    prog.push_back(opi(K_ALU, OP_ADD, 0, 0, 32'd4));       // add r0, r0, #4
    // 2. IDCT even part: inputs in0 r1, in2 r2, in4 r3, in6 r4
    prog.push_back(opi(K_ALU, OP_MOV, 1, 0, 32'd812));
    prog.push_back(opi(K_ALU, OP_MOV, 2, 0, 32'hFFFF_FF9C)); // -100
    prog.push_back(opi(K_ALU, OP_MOV, 3, 0, 32'd37));
    prog.push_back(opi(K_ALU, OP_MOV, 4, 0, 32'd11));
    prog.push_back(mark(1, 5));
    prog.push_back(op3(K_ALU, OP_ADD, 5, 2, 4));           // z2 + z3
    prog.push_back(opi(K_MUL, OP_ADD, 5, 5, 32'd4433));    // z1
    prog.push_back(opi(K_MUL, OP_ADD, 6, 4, -32'sd15137)); // z3 * -15137
    prog.push_back(op3(K_ALU, OP_ADD, 6, 5, 6));           // tmp2
    prog.push_back(opi(K_MUL, OP_ADD, 7, 2, 32'd6270));    // z2 * 6270
    prog.push_back(op3(K_ALU, OP_ADD, 7, 5, 7));           // tmp3
    prog.push_back(op3(K_ALU, OP_ADD, 9, 1, 3));           // in0 + in4
    prog.push_back(opi(K_ALU, OP_LSL, 9, 9, 32'd13));      // tmp0
    prog.push_back(op3(K_ALU, OP_SUB, 10, 1, 3));          // in0 - in4
    prog.push_back(opi(K_ALU, OP_LSL, 10, 10, 32'd13));    // tmp1
    prog.push_back(mark(0, 0));
    prog.push_back(opi(K_ALU, OP_SUB, 0, 0, 32'd1));       // loop counter
    prog.push_back(mark(1, 5));
    prog.push_back(op3(K_ALU, OP_ADD, 11, 9, 7));          // tmp10
    prog.push_back(op3(K_ALU, OP_SUB, 12, 9, 7));          // tmp13
    prog.push_back(op3(K_ALU, OP_ADD, 13, 10, 6));         // tmp11
    prog.push_back(op3(K_ALU, OP_SUB, 14, 10, 6));         // tmp12
    prog.push_back(mark(0, 0));
    // 3. SOR-style neighbour sum in binary32
    prog.push_back(opi(K_ALU, OP_MOV, 1, 0, 32'h3FC0_0000)); // 1.5
    prog.push_back(opi(K_ALU, OP_MOV, 2, 0, 32'h4020_0000)); // 2.5
    prog.push_back(opi(K_ALU, OP_MOV, 3, 0, 32'hBF00_0000)); // -0.5
    prog.push_back(opi(K_ALU, OP_MOV, 4, 0, 32'h3DCC_CCCD)); // 0.1
    prog.push_back(mark(1, 3));
    prog.push_back(op3(K_FADD, OP_ADD, 5, 1, 2));
    prog.push_back(op3(K_FADD, OP_ADD, 6, 3, 4));
    prog.push_back(op3(K_FADD, OP_ADD, 5, 5, 6));
    prog.push_back(op3(K_FADD, OP_SUB, 15, 5, 1));
    prog.push_back(mark(0, 0));
    prog.push_back(opi(K_ALU, OP_EOR, 3, 15, 32'h8000_0000)); // negate
    // SOR update: omega/4 * sum + (1 - omega) * centre, omega = 1.25,
    // then the ratio of the new value to a neighbour
    prog.push_back(opi(K_ALU, OP_MOV, 7, 0, 32'h3EA0_0000)); // 0.3125
    prog.push_back(opi(K_ALU, OP_MOV, 8, 0, 32'hBE80_0000)); // -0.25
    prog.push_back(mark(1, 3));
    prog.push_back(op3(K_FMUL, OP_ADD, 9, 5, 7));
    prog.push_back(op3(K_FMUL, OP_ADD, 10, 1, 8));
    prog.push_back(op3(K_FADD, OP_ADD, 11, 9, 10));
    prog.push_back(op3(K_FDIV, OP_ADD, 12, 11, 2));
    prog.push_back(mark(0, 0));
  endtask

  int n_lfw = 0, n_lwb = 0, n_imp = 0;
  always @(posedge clk) if (rst_n) begin
    n_lfw += $countones(ev_fwd_lazy);
    if (ev_issue_imp) n_imp++;
    for (int f = 1; f < NFU; f += 2)
      if (ev_wb[f] && ev_wb_slack[f] != 0) n_lwb++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idle_after;
    in_valid = 1'b0; in_instr = '0; dbg_raddr = '0;
    build();
    interpret();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (prog[n]) begin
      in_valid = 1'b1;
      in_instr = prog[n];
      // a gap after each region boundary leaves the units some slack
      forever begin
        logic acc;
        #1 acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      if (prog[n].kind == K_START_PRE) begin
        in_valid = 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    in_valid = 1'b0;
    idle_after = 0;
    while (!idle && idle_after < 100) begin
      @(negedge clk);
      idle_after++;
    end
    // the last operation leaves after at most the largest latency plus the
    // largest limit
    checks++;
    if (idle_after > 8 + 9 + 2) begin
      failures++;
      $display("FAIL core busy %0d cycles after the last instruction", idle_after);
    end
    for (int r = 0; r < NREGS; r++) begin
      dbg_raddr = reg_idx_t'(r);
      #1 chk($sformatf("r%0d", r), dbg_rdata, ref_regs[r]);
    end
    chk("SOR sum: 1.5 + 2.5 + (-0.5 + 0.1) - 1.5", dbg_rdata, 32'h4006_6666);
    checks++;
    if (n_lfw == 0 || n_lwb == 0 || n_imp == 0) begin
      failures++;
      $display("FAIL lazy forwards %0d, lazy write-backs %0d, imprecise %0d",
               n_lfw, n_lwb, n_imp);
    end
    $display("lazy forwards %0d, lazy write-backs %0d, imprecise issues %0d",
             n_lfw, n_lwb, n_imp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
