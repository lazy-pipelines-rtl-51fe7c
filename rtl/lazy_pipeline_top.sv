// lazy_pipeline_top: execution core with Lazy Forwarding and Lazy Writeback.
//
// The core pairs every functional unit with a second, voltage-over-scaled
// copy: a precise and an imprecise integer ALU, integer multiplier,
// binary32 floating-point adder, multiplier and divider. Marking instructions set the precision
// level of the code that follows (precision_tracker, in decode); the issue
// logic sends each arithmetic instruction to the unit of its level. An
// imprecise unit does not write back at the end of its nominal latency: it
// keeps its operands stable and goes on settling, using the cycles in which
// nobody needs it (slack), until a new operation is issued to it or its
// slack limit is reached (Lazy Writeback). Consumers that read its result
// before then receive the unit's current output through the forwarding
// path (Lazy Forwarding). Issue times are the same as without the lazy mode.
//
// Pipeline: decoded instruction -> precision_tracker (register) ->
// issue_logic (operand read, forwarding, scoreboard) -> fu_slot x10 ->
// regfile (one write port per unit).
//
// Interface: valid/ready input of decoded instructions (lp_pkg::instr_t),
// a debug read port on the register file, `idle` when nothing is in flight,
// and per-cycle event outputs (issues, stalls, forwards, write-backs and
// their slack) for statistics. ev_wb_masked of the precise units (even
// indices) is constant 0 by construction, since a precise unit never holds
// a finished result back. Timing of each unit: see lazy_fu_ctrl.
//
// The unit pairing, the precision marking, the FU status states and the
// LWB/LFW rules follow the document. Latencies and slack limits are
// parameters: the ALU's single cycle and the one-cycle limit of logic
// operations come from the document; the other latencies are this
// design's choices, and the other limits are the largest slack the
// document plots for the unit (4 for the integer add, 7 for the integer
// multiplier, 9 for the floating-point add, 6 for the floating-point
// multiplier; the divider, which the document does not plot, borrows the
// floating-point multiplier's 6). The supply voltages of the two sets
// are set outside the logic and do not appear here.
module lazy_pipeline_top
  import lp_pkg::*;
#(
  parameter int unsigned ALU_LAT     = 1,
  parameter int unsigned MUL_LAT     = 3,
  parameter int unsigned LOGIC_SLACK = 1,
  parameter int unsigned ALU_SLACK   = 4,
  parameter int unsigned MUL_SLACK   = 7,
  parameter int unsigned FADD_LAT    = 4,
  parameter int unsigned FADD_SLACK  = 9,
  parameter int unsigned FMUL_LAT    = 4,
  parameter int unsigned FMUL_SLACK  = 6,
  parameter int unsigned FDIV_LAT    = 8,
  parameter int unsigned FDIV_SLACK  = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  instr_t    in_instr,
  input  reg_idx_t  dbg_raddr,
  output word_t     dbg_rdata,
  output logic      idle,
  output prec_t     cur_prec,
  output fu_state_e fu_state [NFU],
  // events, one cycle each
  output logic      ev_issue,
  output logic      ev_issue_imp,
  output logic      ev_stall_fu,
  output logic      ev_stall_raw,
  output logic [1:0] ev_fwd_nominal,
  output logic [1:0] ev_fwd_lazy,
  output slack_t    ev_fwd_slack,
  output logic      ev_wb     [NFU],  // unit writes back (after the filter)
  output slack_t    ev_wb_slack [NFU],// slack of that write-back
  output logic      ev_wb_masked [NFU], // result ready, write enable masked
  output logic      ev_evict_issue [NFU],
  output logic      ev_evict_limit [NFU],
  output logic [NFU-1:0] ev_stale_wb
);

  logic   dec_valid, dec_ready;
  instr_t dec_instr;

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

  precision_tracker u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_instr (in_instr),
    .out_valid(dec_valid),
    .out_ready(dec_ready),
    .out_instr(dec_instr),
    .cur_prec (cur_prec)
  );

  issue_logic u_iss (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (dec_valid),
    .in_ready       (dec_ready),
    .in_instr       (dec_instr),
    .fu_issue_ready (fu_issue_ready),
    .fu_result_valid(fu_result_valid),
    .fu_result      (fu_result),
    .fu_slack       (fu_slack),
    .fu_wb_en       (fu_wb_en),
    .fu_rd          (fu_rd),
    .fu_issue       (fu_issue),
    .iss_op         (iss_op),
    .iss_a          (iss_a),
    .iss_b          (iss_b),
    .iss_rd         (iss_rd),
    .rf_raddr1      (rf_raddr1),
    .rf_rdata1      (rf_rdata1),
    .rf_raddr2      (rf_raddr2),
    .rf_rdata2      (rf_rdata2),
    .rf_we          (rf_we),
    .ev_issue       (ev_issue),
    .ev_issue_imp   (ev_issue_imp),
    .ev_stall_fu    (ev_stall_fu),
    .ev_stall_raw   (ev_stall_raw),
    .ev_fwd_nominal (ev_fwd_nominal),
    .ev_fwd_lazy    (ev_fwd_lazy),
    .ev_fwd_slack   (ev_fwd_slack),
    .ev_stale_wb    (ev_stale_wb)
  );

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    localparam fu_type_e    FTYPE  = fu_type_e'(f / 2);
    localparam bit          IMP    = (f % 2 == 1);
    localparam int unsigned LAT    = (FTYPE == FT_MUL)  ? MUL_LAT :
                                     (FTYPE == FT_FADD) ? FADD_LAT :
                                     (FTYPE == FT_FMUL) ? FMUL_LAT :
                                     (FTYPE == FT_FDIV) ? FDIV_LAT : ALU_LAT;
    localparam int unsigned ASLACK = (FTYPE == FT_MUL)  ? MUL_SLACK :
                                     (FTYPE == FT_FADD) ? FADD_SLACK :
                                     (FTYPE == FT_FMUL) ? FMUL_SLACK :
                                     (FTYPE == FT_FDIV) ? FDIV_SLACK : ALU_SLACK;

    fu_slot #(
      .FTYPE      (FTYPE),
      .LAT        (LAT),
      .LAZY       (IMP),
      .LOGIC_SLACK(LOGIC_SLACK),
      .ARITH_SLACK(ASLACK)
    ) u_slot (
      .clk           (clk),
      .rst_n         (rst_n),
      .issue         (fu_issue[f]),
      .op_in         (iss_op),
      .a_in          (iss_a),
      .b_in          (iss_b),
      .rd_in         (iss_rd),
      .issue_ready   (fu_issue_ready[f]),
      .state         (fu_state[f]),
      .result        (fu_result[f]),
      .rd            (fu_rd[f]),
      .result_valid  (fu_result_valid[f]),
      .slack         (fu_slack[f]),
      .wb_en         (fu_wb_en[f]),
      .wb_masked     (ev_wb_masked[f]),
      .evict_by_issue(ev_evict_issue[f]),
      .evict_by_limit(ev_evict_limit[f])
    );

    assign ev_wb[f]       = rf_we[f];
    assign ev_wb_slack[f] = fu_slack[f];
  end

  regfile #(.NWP(NFU)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (rf_we),
    .waddr    (fu_rd),
    .wdata    (fu_result),
    .raddr1   (rf_raddr1),
    .rdata1   (rf_rdata1),
    .raddr2   (rf_raddr2),
    .rdata2   (rf_rdata2),
    .dbg_raddr(dbg_raddr),
    .dbg_rdata(dbg_rdata)
  );

  always_comb begin
    idle = !dec_valid && !in_valid;
    for (int f = 0; f < NFU; f++) idle &= (fu_state[f] == FU_FREE);
  end

endmodule
