// tb_lazy_pipeline_top: end-to-end test of the Lazy Pipelines core.
//
// Random programs made of precise and imprecise regions (marking
// instructions with random levels; ALU, integer multiply, floating-point
// add, subtract, multiply and divide operations on a few registers so that
// dependences are frequent; no-ops, and random bubbles in
// the instruction supply) are run on two cores: the lazy core with its
// default parameters and a conventional core, the same RTL with every slack
// limit at 0, so that every unit writes back at its nominal end.
// Checks:
//  * both cores end with the register values of a sequential reference
//    interpreter (the units are functionally exact in simulation);
//  * every arithmetic instruction issues in the same cycle on both cores:
//    the lazy mode uses slack without changing issue times;
//  * each write-back of the lazy core carries a slack no larger than the
//    limit of its unit, and the conventional core never uses slack;
//  * each mechanism happened at least once on the lazy core: precise and
//    imprecise issue, precision switches, a stall on a busy unit, a stall on
//    a producer, ordinary forwarding, Lazy Forwarding, Lazy Writeback by
//    eviction and by slack limit, masked write enables and a dropped stale
//    write-back.
module tb_lazy_pipeline_top;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  localparam int NPROG  = 6;     // programs
  localparam int NINSTR = 400;   // instructions per program
  localparam int NR     = 6;     // registers the programs use

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // two cores: 0 = lazy (defaults), 1 = conventional (no slack)
  logic      in_valid [2];
  logic      in_ready [2];
  instr_t    in_instr [2];
  reg_idx_t  dbg_raddr [2];
  word_t     dbg_rdata [2];
  logic      idle [2];
  prec_t     cur_prec [2];
  fu_state_e fu_state [2][NFU];
  logic      ev_issue [2], ev_issue_imp [2], ev_stall_fu [2], ev_stall_raw [2];
  logic [1:0] ev_fwd_nominal [2], ev_fwd_lazy [2];
  slack_t    ev_fwd_slack [2];
  logic      ev_wb [2][NFU];
  slack_t    ev_wb_slack [2][NFU];
  logic      ev_wb_masked [2][NFU];
  logic      ev_evict_issue [2][NFU];
  logic      ev_evict_limit [2][NFU];
  logic [NFU-1:0] ev_stale_wb [2];

  lazy_pipeline_top u_lazy (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_instr(in_instr[0]), .dbg_raddr(dbg_raddr[0]), .dbg_rdata(dbg_rdata[0]),
    .idle(idle[0]), .cur_prec(cur_prec[0]), .fu_state(fu_state[0]),
    .ev_issue(ev_issue[0]), .ev_issue_imp(ev_issue_imp[0]),
    .ev_stall_fu(ev_stall_fu[0]), .ev_stall_raw(ev_stall_raw[0]),
    .ev_fwd_nominal(ev_fwd_nominal[0]), .ev_fwd_lazy(ev_fwd_lazy[0]),
    .ev_fwd_slack(ev_fwd_slack[0]), .ev_wb(ev_wb[0]),
    .ev_wb_slack(ev_wb_slack[0]), .ev_wb_masked(ev_wb_masked[0]),
    .ev_evict_issue(ev_evict_issue[0]), .ev_evict_limit(ev_evict_limit[0]),
    .ev_stale_wb(ev_stale_wb[0]));

  lazy_pipeline_top #(.LOGIC_SLACK(0), .ALU_SLACK(0), .MUL_SLACK(0),
                     .FADD_SLACK(0), .FMUL_SLACK(0),
                     .FDIV_SLACK(0)) u_base (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_instr(in_instr[1]), .dbg_raddr(dbg_raddr[1]), .dbg_rdata(dbg_rdata[1]),
    .idle(idle[1]), .cur_prec(cur_prec[1]), .fu_state(fu_state[1]),
    .ev_issue(ev_issue[1]), .ev_issue_imp(ev_issue_imp[1]),
    .ev_stall_fu(ev_stall_fu[1]), .ev_stall_raw(ev_stall_raw[1]),
    .ev_fwd_nominal(ev_fwd_nominal[1]), .ev_fwd_lazy(ev_fwd_lazy[1]),
    .ev_fwd_slack(ev_fwd_slack[1]), .ev_wb(ev_wb[1]),
    .ev_wb_slack(ev_wb_slack[1]), .ev_wb_masked(ev_wb_masked[1]),
    .ev_evict_issue(ev_evict_issue[1]), .ev_evict_limit(ev_evict_limit[1]),
    .ev_stale_wb(ev_stale_wb[1]));

  instr_t prog [NINSTR];
  int     bubble [NINSTR];
  longint issue_cyc [2][$];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- program generation and reference interpreter ----
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

  word_t ref_regs [NREGS];

  task automatic gen_prog(int seed_mode);
    int region_left = 0;
    bit imp = 0;
    int n = 0;
    foreach (ref_regs[r]) ref_regs[r] = '0;
    while (n < NINSTR) begin
      instr_t i;
      i = '0;
      if (region_left == 0) begin
        // precision switch, as in a marked region boundary
        imp = !imp;
        region_left = $urandom_range(1, 12);
        i.kind = imp ? K_START_IMP : K_START_PRE;
        i.prec = imp ? prec_t'($urandom_range(1, 7)) : '0;
      end else begin
        int r;
        region_left--;
        r = $urandom_range(0, 19);
        i.rd  = reg_idx_t'($urandom_range(0, NR - 1));
        i.rs1 = reg_idx_t'($urandom_range(0, NR - 1));
        i.rs2 = reg_idx_t'($urandom_range(0, NR - 1));
        i.use_imm = ($urandom_range(0, 3) == 0);
        i.imm = $urandom_range(0, 300);
        if (r == 0)      i.kind = K_NOP;
        else if (r < 5)  i.kind = K_MUL;
        else if (r < 8) begin
          i.kind = K_FADD;
          i.op = ($urandom_range(0, 1) == 1) ? OP_SUB : OP_ADD;
        end
        else if (r < 10) i.kind = K_FMUL;
        else if (r < 11) i.kind = K_FDIV;
        else begin
          i.kind = K_ALU;
          i.op = alu_op_e'($urandom_range(0, 8));
        end
        if (i.kind == K_ALU) begin
          ref_regs[i.rd] = alu_ref(i.op, ref_regs[i.rs1],
                                   i.use_imm ? i.imm : ref_regs[i.rs2]);
        end else if (i.kind == K_FADD) begin
          ref_regs[i.rd] = fadd_ref(ref_regs[i.rs1],
                                    i.use_imm ? i.imm : ref_regs[i.rs2],
                                    i.op == OP_SUB);
        end else if (i.kind == K_FMUL) begin
          ref_regs[i.rd] = fmul_ref(ref_regs[i.rs1],
                                    i.use_imm ? i.imm : ref_regs[i.rs2]);
        end else if (i.kind == K_FDIV) begin
          ref_regs[i.rd] = fdiv_ref(ref_regs[i.rs1],
                                    i.use_imm ? i.imm : ref_regs[i.rs2]);
        end else if (i.kind == K_MUL) begin
          ref_regs[i.rd] = ref_regs[i.rs1] *
                           (i.use_imm ? i.imm : ref_regs[i.rs2]);
        end
      end
      prog[n] = i;
      // bubbles in the supply create slack; seed_mode varies the density
      bubble[n] = ($urandom_range(0, 9) < 2 + seed_mode) ?
                  $urandom_range(1, 8) : 0;
      n++;
    end
  endtask

  task automatic feed(int k);
    for (int n = 0; n < NINSTR; n++) begin
      in_valid[k] = 1'b0;
      repeat (bubble[n]) @(negedge clk);
      in_valid[k] = 1'b1;
      in_instr[k] = prog[n];
      forever begin
        logic acc;
        #1 acc = in_ready[k];
        @(negedge clk);
        if (acc) break;
      end
    end
    in_valid[k] = 1'b0;
  endtask

  // ---- event counters ----
  int n_pre, n_imp, n_switch, n_stall_fu, n_stall_raw, n_fwd_nom, n_fwd_lazy;
  int n_lwb_evict, n_lwb_limit, n_masked, n_stale, n_base_slack;
  prec_t last_prec = '0;

  always @(posedge clk) if (rst_n) begin
    if (ev_issue[0]) issue_cyc[0].push_back(cycle);
    if (ev_issue[1]) issue_cyc[1].push_back(cycle);
    if (ev_issue[0] && !ev_issue_imp[0]) n_pre++;
    if (ev_issue_imp[0]) n_imp++;
    if (cur_prec[0] != last_prec) n_switch++;
    last_prec <= cur_prec[0];
    if (ev_stall_fu[0]) n_stall_fu++;
    if (ev_stall_raw[0]) n_stall_raw++;
    n_fwd_nom  += $countones(ev_fwd_nominal[0]);
    n_fwd_lazy += $countones(ev_fwd_lazy[0]);
    for (int f = 0; f < NFU; f++) begin
      int lim;
      lim = (f >= 6) ? 6 : (f >= 4) ? 9 : (f >= 2) ? 7 : 4;
      if (ev_evict_issue[0][f] && ev_wb_slack[0][f] != 0) n_lwb_evict++;
      if (ev_evict_limit[0][f]) n_lwb_limit++;
      if (ev_wb_masked[0][f]) n_masked++;
      if (ev_wb[0][f]) begin
        checks++;
        if (int'(ev_wb_slack[0][f]) > lim) begin
          failures++;
          $display("FAIL unit %0d wrote back with slack %0d", f, ev_wb_slack[0][f]);
        end
        if (f % 2 == 0 && ev_wb_slack[0][f] != 0) begin
          failures++;
          $display("FAIL precise unit %0d used slack", f);
        end
      end
      if (ev_wb[1][f] && ev_wb_slack[1][f] != 0) n_base_slack++;
      if (ev_wb_masked[1][f]) n_base_slack++;
    end
    n_stale += $countones(ev_stale_wb[0]);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      in_valid[k] = 1'b0; in_instr[k] = '0; dbg_raddr[k] = '0;
    end
    for (int p = 0; p < NPROG; p++) begin
      rst_n = 1'b0;
      gen_prog(p % 4);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      issue_cyc[0].delete();
      issue_cyc[1].delete();
      fork
        feed(0);
        feed(1);
      join
      // drain: every unit returns to FREE once its slack limit passes
      repeat (20) @(negedge clk);
      chk("lazy core idle", idle[0], 1);
      chk("base core idle", idle[1], 1);
      for (int r = 0; r < NREGS; r++) begin
        dbg_raddr[0] = reg_idx_t'(r);
        dbg_raddr[1] = reg_idx_t'(r);
        #1;
        chk($sformatf("prog %0d lazy r%0d", p, r), dbg_rdata[0], ref_regs[r]);
        chk($sformatf("prog %0d base r%0d", p, r), dbg_rdata[1], ref_regs[r]);
      end
      chk("issue count", issue_cyc[0].size(), issue_cyc[1].size());
      foreach (issue_cyc[0][n])
        if (n < issue_cyc[1].size())
          chk($sformatf("prog %0d issue cycle of op %0d", p, n),
              issue_cyc[0][n], issue_cyc[1][n]);
      @(negedge clk);
    end
    $display("events: precise=%0d imprecise=%0d switches=%0d stall_fu=%0d stall_raw=%0d",
             n_pre, n_imp, n_switch, n_stall_fu, n_stall_raw);
    $display("events: fwd_nominal=%0d lfw=%0d lwb_evict=%0d lwb_limit=%0d masked=%0d stale=%0d",
             n_fwd_nom, n_fwd_lazy, n_lwb_evict, n_lwb_limit, n_masked, n_stale);
    chk("base core used no slack", n_base_slack, 0);
    checks += 11;
    if (n_pre == 0)       begin failures++; $display("FAIL no precise issue"); end
    if (n_imp == 0)       begin failures++; $display("FAIL no imprecise issue"); end
    if (n_switch == 0)    begin failures++; $display("FAIL no precision switch"); end
    if (n_stall_fu == 0)  begin failures++; $display("FAIL no busy-unit stall"); end
    if (n_stall_raw == 0) begin failures++; $display("FAIL no producer stall"); end
    if (n_fwd_nom == 0)   begin failures++; $display("FAIL no nominal forward"); end
    if (n_fwd_lazy == 0)  begin failures++; $display("FAIL no lazy forward"); end
    if (n_lwb_evict == 0) begin failures++; $display("FAIL no LWB by eviction"); end
    if (n_lwb_limit == 0) begin failures++; $display("FAIL no LWB by limit"); end
    if (n_masked == 0)    begin failures++; $display("FAIL no masked write enable"); end
    if (n_stale == 0)     begin failures++; $display("FAIL no stale write-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
