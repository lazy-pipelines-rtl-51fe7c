// tb_fu_slot: checks imprecise ALU, multiplier and floating-point adder slots.
//
// Each operation is issued with random operands while the issue buses then
// carry new random values every cycle. The test checks that the result is
// the right one for the buffered operands in every cycle the result is
// valid, that the destination register travels with it, and that the
// write-back comes after the nominal latency plus the slack limit chosen
// for the operation: 1 slack cycle for logic operations, ARITH_SLACK for
// the others (ARITH_SLACK = 4 for the ALU, 7 for the multiplier, 9 for the
// adder, whose nominal latency is 4). It also evicts a lingering operation
// by issuing a new one.
module tb_fu_slot;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // shared issue buses
  alu_op_e  op_in;
  word_t    a_in, b_in;
  reg_idx_t rd_in;

  logic      a_iss, a_rdy, a_rv, a_wb, a_wbm, a_ebi, a_ebl;
  fu_state_e a_st;
  word_t     a_res;
  reg_idx_t  a_rd;
  slack_t    a_sl;

  logic      m_iss, m_rdy, m_rv, m_wb, m_wbm, m_ebi, m_ebl;
  fu_state_e m_st;
  word_t     m_res;
  reg_idx_t  m_rd;
  slack_t    m_sl;

  fu_slot #(.FTYPE(FT_ALU), .LAT(1), .LAZY(1'b1), .LOGIC_SLACK(1),
            .ARITH_SLACK(4)) dut_alu (
    .clk(clk), .rst_n(rst_n), .issue(a_iss), .op_in(op_in), .a_in(a_in),
    .b_in(b_in), .rd_in(rd_in), .issue_ready(a_rdy), .state(a_st),
    .result(a_res), .rd(a_rd), .result_valid(a_rv), .slack(a_sl),
    .wb_en(a_wb), .wb_masked(a_wbm), .evict_by_issue(a_ebi),
    .evict_by_limit(a_ebl));

  fu_slot #(.FTYPE(FT_MUL), .LAT(3), .LAZY(1'b1), .LOGIC_SLACK(1),
            .ARITH_SLACK(7)) dut_mul (
    .clk(clk), .rst_n(rst_n), .issue(m_iss), .op_in(op_in), .a_in(a_in),
    .b_in(b_in), .rd_in(rd_in), .issue_ready(m_rdy), .state(m_st),
    .result(m_res), .rd(m_rd), .result_valid(m_rv), .slack(m_sl),
    .wb_en(m_wb), .wb_masked(m_wbm), .evict_by_issue(m_ebi),
    .evict_by_limit(m_ebl));

  logic      f_iss, f_rdy, f_rv, f_wb, f_wbm, f_ebi, f_ebl;
  fu_state_e f_st;
  word_t     f_res;
  reg_idx_t  f_rd;
  slack_t    f_sl;

  fu_slot #(.FTYPE(FT_FADD), .LAT(4), .LAZY(1'b1), .LOGIC_SLACK(1),
            .ARITH_SLACK(9)) dut_fadd (
    .clk(clk), .rst_n(rst_n), .issue(f_iss), .op_in(op_in), .a_in(a_in),
    .b_in(b_in), .rd_in(rd_in), .issue_ready(f_rdy), .state(f_st),
    .result(f_res), .rd(f_rd), .result_valid(f_rv), .slack(f_sl),
    .wb_en(f_wb), .wb_masked(f_wbm), .evict_by_issue(f_ebi),
    .evict_by_limit(f_ebl));

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic word_t alu_ref(alu_op_e o, word_t x, word_t z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_AND: return x & z;
      OP_EOR: return x ^ z;
      default: return '0;
    endcase
  endfunction

  // Issue one operation to one slot and follow it until write-back.
  // Returns the number of cycles from the issuing edge to the write-back
  // cycle (inclusive).
  task automatic run_op(int u, alu_op_e o, output int cyc);
    word_t x, z, e;
    reg_idx_t r;
    x = $urandom; z = $urandom; r = reg_idx_t'($urandom);
    if (u == 2) begin
      // finite operands of similar size
      x = {1'($urandom), 8'($urandom_range(120, 135)), 23'($urandom)};
      z = {1'($urandom), 8'($urandom_range(120, 135)), 23'($urandom)};
      e = r2f(f2r(x) + (o == OP_SUB ? -f2r(z) : f2r(z)));
      if (e[30:0] == 0) e = '0;
    end else begin
      e = (u == 1) ? x * z : alu_ref(o, x, z);
    end
    op_in = o; a_in = x; b_in = z; rd_in = r;
    a_iss = (u == 0); m_iss = (u == 1); f_iss = (u == 2);
    @(negedge clk);
    a_iss = 1'b0; m_iss = 1'b0; f_iss = 1'b0;
    cyc = 0;
    forever begin
      logic rv, wb;
      op_in = alu_op_e'($urandom_range(0, 8));
      a_in = $urandom; b_in = $urandom; rd_in = reg_idx_t'($urandom);
      cyc++;
      #1;
      rv = (u == 2) ? f_rv : (u == 1) ? m_rv : a_rv;
      wb = (u == 2) ? f_wb : (u == 1) ? m_wb : a_wb;
      if (rv) begin
        chk("result", (u == 2) ? f_res : (u == 1) ? m_res : a_res, e);
        chk("rd", (u == 2) ? f_rd : (u == 1) ? m_rd : a_rd, r);
      end
      @(negedge clk);
      if (wb) break;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    a_iss = 1'b0; m_iss = 1'b0; f_iss = 1'b0; op_in = OP_ADD; a_in = '0; b_in = '0;
    rd_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) begin
      run_op(0, OP_ADD, c); chk("add: 1 + 4 slack cycles", c, 5);
      run_op(0, OP_AND, c); chk("and: 1 + 1 slack cycle", c, 2);
      run_op(0, OP_EOR, c); chk("eor: 1 + 1 slack cycle", c, 2);
      run_op(0, OP_SUB, c); chk("sub: 1 + 4 slack cycles", c, 5);
      run_op(1, OP_ADD, c); chk("mul: 3 + 7 slack cycles", c, 10);
      run_op(2, OP_ADD, c); chk("fadd: 4 + 9 slack cycles", c, 13);
      run_op(2, OP_SUB, c); chk("fsub: 4 + 9 slack cycles", c, 13);
    end
    // eviction: an add lingering in the ALU is written back when a new
    // operation arrives two cycles after its nominal end
    op_in = OP_ADD; a_in = 32'd40; b_in = 32'd2; rd_in = 4'd5; a_iss = 1'b1;
    @(negedge clk);
    a_iss = 1'b0; a_in = '0; b_in = '0;
    @(negedge clk);
    chk("evict: slack 1", a_sl, 1);
    op_in = OP_SUB; a_in = 32'd9; b_in = 32'd4; rd_in = 4'd6; a_iss = 1'b1;
    #1;
    chk("evict: wb_en", a_wb, 1);
    chk("evict: by issue", a_ebi, 1);
    chk("evict: value", a_res, 42);
    chk("evict: rd", a_rd, 5);
    @(negedge clk);
    a_iss = 1'b0;
    chk("new op value", a_res, 5);
    chk("new op rd", a_rd, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
