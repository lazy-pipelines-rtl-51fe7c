// tb_lazy_fu_ctrl: cycle-exact check of the lazy functional-unit controller.
//
// Walks one imprecise unit (nominal latency 3) and one precise unit
// (latency 1) through a scripted sequence that mirrors the lazy timeline:
// an operation that lingers until its slack limit (Lazy Writeback by
// limit), one evicted after two slack cycles by a new issue, one evicted in
// its nominal-end cycle by a back-to-back issue, one with a zero slack
// limit, and the precise unit writing back at its nominal end. Every cycle
// the status, forwarding window, slack count and write enables are compared
// with a hand-written table.
module tb_lazy_fu_ctrl;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // imprecise unit, LAT = 3
  logic      iss;
  slack_t    lim;
  logic      rdy, rv, wb, wbm, ebi, ebl;
  fu_state_e st;
  slack_t    sl;

  lazy_fu_ctrl #(.LAT(3), .LAZY(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .issue(iss), .slack_limit_in(lim),
    .issue_ready(rdy), .state(st), .result_valid(rv), .slack(sl),
    .wb_en(wb), .wb_masked(wbm), .evict_by_issue(ebi), .evict_by_limit(ebl));

  // precise unit, LAT = 1
  logic      p_iss;
  logic      p_rdy, p_rv, p_wb, p_wbm, p_ebi, p_ebl;
  fu_state_e p_st;
  slack_t    p_sl;

  lazy_fu_ctrl #(.LAT(1), .LAZY(1'b0)) dut_p (
    .clk(clk), .rst_n(rst_n), .issue(p_iss), .slack_limit_in(slack_t'(5)),
    .issue_ready(p_rdy), .state(p_st), .result_valid(p_rv), .slack(p_sl),
    .wb_en(p_wb), .wb_masked(p_wbm), .evict_by_issue(p_ebi),
    .evict_by_limit(p_ebl));

  typedef struct {
    bit        issue;
    int        limit;
    fu_state_e st;
    bit        rdy, rv, wb, ebi, ebl;
    int        slack;
  } step_t;

  localparam int N = 22;
  step_t s [N];

  task automatic set(int c, bit i, int l, fu_state_e e, bit r, bit v,
                     int k, bit w, bit bi, bit bl);
    s[c] = '{issue: i, limit: l, st: e, rdy: r, rv: v, wb: w, ebi: bi,
             ebl: bl, slack: k};
  endtask

  task automatic chk(string what, int got, int exp, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", c, what, got, exp);
    end
  endtask

  initial begin
    //      c  iss lim state              rdy rv slk wb ebi ebl
    set( 0, 1, 4, FU_FREE,            1, 0, 0, 0, 0, 0);
    set( 1, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set( 2, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set( 3, 0, 0, FU_OCCUPIED,        1, 1, 0, 0, 0, 0); // nominal end, masked
    set( 4, 0, 0, FU_FREE_ON_DEMAND,  1, 1, 1, 0, 0, 0);
    set( 5, 0, 0, FU_FREE_ON_DEMAND,  1, 1, 2, 0, 0, 0);
    set( 6, 0, 0, FU_FREE_ON_DEMAND,  1, 1, 3, 0, 0, 0);
    set( 7, 0, 0, FU_FREE_ON_DEMAND,  1, 1, 4, 1, 0, 1); // LWB at limit
    set( 8, 1, 4, FU_FREE,            1, 0, 0, 0, 0, 0);
    set( 9, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(10, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(11, 0, 0, FU_OCCUPIED,        1, 1, 0, 0, 0, 0);
    set(12, 0, 0, FU_FREE_ON_DEMAND,  1, 1, 1, 0, 0, 0);
    set(13, 1, 2, FU_FREE_ON_DEMAND,  1, 1, 2, 1, 1, 0); // LWB by eviction
    set(14, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(15, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(16, 1, 0, FU_OCCUPIED,        1, 1, 0, 1, 1, 0); // back-to-back
    set(17, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(18, 0, 0, FU_OCCUPIED,        0, 0, 0, 0, 0, 0);
    set(19, 0, 0, FU_OCCUPIED,        1, 1, 0, 1, 0, 0); // limit 0: no slack
    set(20, 0, 0, FU_FREE,            1, 0, 0, 0, 0, 0);
    set(21, 0, 0, FU_FREE,            1, 0, 0, 0, 0, 0);
  end

  // watchdog
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss = 1'b0; lim = '0; p_iss = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < N; c++) begin
      iss = s[c].issue;
      lim = slack_t'(s[c].limit);
      // precise unit: issue at cycles 0 and 1 (back-to-back) and 5
      p_iss = (c == 0) || (c == 1) || (c == 5);
      #1;
      chk("state", int'(st), int'(s[c].st), c);
      chk("issue_ready", int'(rdy), int'(s[c].rdy), c);
      chk("result_valid", int'(rv), int'(s[c].rv), c);
      chk("slack", int'(sl), s[c].slack, c);
      chk("wb_en", int'(wb), int'(s[c].wb), c);
      chk("wb_masked", int'(wbm), int'(s[c].rv && !s[c].wb), c);
      chk("evict_by_issue", int'(ebi), int'(s[c].ebi), c);
      chk("evict_by_limit", int'(ebl), int'(s[c].ebl), c);
      // precise unit writes back exactly one cycle after each issue
      chk("p_wb_en", int'(p_wb), int'(c == 1 || c == 2 || c == 6), c);
      chk("p_result_valid", int'(p_rv), int'(c == 1 || c == 2 || c == 6), c);
      chk("p_masked", int'(p_wbm), 0, c);
      chk("p_ready", int'(p_rdy), 1, c);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
