// tb_issue_logic: directed checks of steering, stalls, forwarding and the
// write-back filter, with the functional units and the register file
// replaced by signals the testbench drives.
//
// Sequence: a precise add issues to the precise ALU with register-file
// operands; an imprecise add that needs its result stalls until the
// producer reaches its nominal end and then takes it by forwarding; an
// imprecise multiply waits for the busy imprecise multiplier and then takes
// both operands by Lazy Forwarding from a unit with two slack cycles; a
// younger producer of a register makes the older unit's late write-back
// stale; a no-op is consumed without issuing; and a register whose
// write-back has landed is read from the register file again.
module tb_issue_logic;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic      in_valid, in_ready;
  instr_t    in_instr;
  logic      fu_issue_ready  [NFU];
  logic      fu_result_valid [NFU];
  word_t     fu_result       [NFU];
  slack_t    fu_slack        [NFU];
  logic      fu_wb_en        [NFU];
  reg_idx_t  fu_rd           [NFU];
  logic      fu_issue        [NFU];
  alu_op_e   iss_op;
  word_t     iss_a, iss_b;
  reg_idx_t  iss_rd;
  reg_idx_t  rf_raddr1, rf_raddr2;
  word_t     rf_rdata1, rf_rdata2;
  logic      rf_we [NFU];
  logic      ev_issue, ev_issue_imp, ev_stall_fu, ev_stall_raw;
  logic [1:0] ev_fwd_nominal, ev_fwd_lazy;
  slack_t    ev_fwd_slack;
  logic [NFU-1:0] ev_stale_wb;

  issue_logic dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic instr_t mk(kind_e k, alu_op_e op, int rd, int rs1,
                                int rs2, bit ui, int imm, int p);
    instr_t i;
    i = '0;
    i.kind = k; i.op = op; i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1);
    i.rs2 = reg_idx_t'(rs2); i.use_imm = ui; i.imm = word_t'(imm);
    i.prec = prec_t'(p);
    return i;
  endfunction

  function automatic int issued_to();
    for (int f = 0; f < NFU; f++) if (fu_issue[f]) return f;
    return -1;
  endfunction

  task automatic idle_fus();
    for (int f = 0; f < NFU; f++) begin
      fu_issue_ready[f] = 1'b1; fu_result_valid[f] = 1'b0;
      fu_result[f] = '0; fu_slack[f] = '0; fu_wb_en[f] = 1'b0; fu_rd[f] = '0;
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_instr = '0; rf_rdata1 = '0; rf_rdata2 = '0;
    idle_fus();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. precise add r1 = r2 + r3 from the register file
    in_valid = 1'b1;
    in_instr = mk(K_ALU, OP_ADD, 1, 2, 3, 0, 0, 0);
    rf_rdata1 = 32'd10; rf_rdata2 = 32'd20;
    #1;
    chk("1 raddr1", rf_raddr1, 2);
    chk("1 raddr2", rf_raddr2, 3);
    chk("1 ready", in_ready, 1);
    chk("1 unit", issued_to(), int'(FU_ALU_PRE));
    chk("1 a", iss_a, 10);
    chk("1 b", iss_b, 20);
    chk("1 rd", iss_rd, 1);
    chk("1 no forward", ev_fwd_nominal | ev_fwd_lazy, 0);
    @(negedge clk);

    // 2. imprecise add r4 = r1 + 5 waits for r1, then forwards it
    in_instr = mk(K_ALU, OP_ADD, 4, 1, 0, 1, 5, 7);
    rf_rdata1 = 32'hDEAD;
    #1;
    chk("2 raw stall", ev_stall_raw, 1);
    chk("2 not ready", in_ready, 0);
    chk("2 no issue", issued_to(), -1);
    @(negedge clk);
    fu_result_valid[0] = 1'b1; fu_result[0] = 32'd30; fu_wb_en[0] = 1'b1;
    fu_rd[0] = 4'd1;
    #1;
    chk("2 unit", issued_to(), int'(FU_ALU_IMP));
    chk("2 imprecise", ev_issue_imp, 1);
    chk("2 forwarded a", iss_a, 30);
    chk("2 imm b", iss_b, 5);
    chk("2 nominal forward", ev_fwd_nominal, 2'b01);
    chk("2 write r1", rf_we[0], 1);
    @(negedge clk);
    idle_fus();

    // 3. imprecise mul r5 = r4 * r4: unit busy, then Lazy Forwarding
    in_instr = mk(K_MUL, OP_ADD, 5, 4, 4, 0, 0, 3);
    fu_result_valid[1] = 1'b1; fu_result[1] = 32'd35; fu_slack[1] = 4'd2;
    fu_rd[1] = 4'd4;
    fu_issue_ready[FU_MUL_IMP] = 1'b0;
    #1;
    chk("3 unit stall", ev_stall_fu, 1);
    chk("3 no raw stall", ev_stall_raw, 0);
    chk("3 no issue", issued_to(), -1);
    @(negedge clk);
    fu_issue_ready[FU_MUL_IMP] = 1'b1;
    #1;
    chk("3 unit", issued_to(), int'(FU_MUL_IMP));
    chk("3 a", iss_a, 35);
    chk("3 b", iss_b, 35);
    chk("3 lazy forward", ev_fwd_lazy, 2'b11);
    chk("3 lazy slack", ev_fwd_slack, 2);
    @(negedge clk);

    // 4. precise r4 = r6 + r7 makes the lingering r4 of unit 1 stale
    in_instr = mk(K_ALU, OP_ORR, 4, 6, 7, 0, 0, 0);
    #1;
    chk("4 unit", issued_to(), int'(FU_ALU_PRE));
    @(negedge clk);
    in_valid = 1'b0;
    fu_wb_en[1] = 1'b1;
    #1;
    chk("4 stale write dropped", rf_we[1], 0);
    chk("4 stale event", ev_stale_wb[1], 1);
    @(negedge clk);
    idle_fus();

    // 5. a no-op is consumed without issue
    in_valid = 1'b1;
    in_instr = mk(K_NOP, OP_ADD, 9, 1, 1, 0, 0, 0);
    #1;
    chk("5 nop ready", in_ready, 1);
    chk("5 nop no issue", issued_to(), -1);
    @(negedge clk);

    // 6. r1 was written back in step 2: now read from the register file
    in_instr = mk(K_ALU, OP_MOV, 8, 0, 1, 0, 0, 0);
    rf_rdata2 = 32'd77;
    fu_result_valid[0] = 1'b1; fu_result[0] = 32'd1;
    #1;
    chk("6 issue", issued_to(), int'(FU_ALU_PRE));
    chk("6 from register file", iss_b, 77);
    // r4 is still pending on the precise ALU: a reader must wait
    @(negedge clk);
    idle_fus();
    in_instr = mk(K_ALU, OP_ADD, 9, 4, 4, 0, 0, 0);
    #1;
    chk("6 r4 pending", ev_stall_raw, 1);
    @(negedge clk);
    in_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
