// fu_slot: one functional unit of a Lazy Pipelines core with its buffers.
//
// A slot is what the issue logic sees as one unit: the operand buffer that
// keeps the inputs stable, the datapath (integer ALU, integer multiplier or
// pipelined floating-point adder, floating-point multiplier or divider,
// chosen by FTYPE), the destination register held with the operation, and
// the lazy_fu_ctrl status machine that decides when the result may be forwarded
// and when it is written back. An imprecise slot (LAZY = 1) runs from the
// over-scaled supply and lets its operation use slack; a precise slot
// (LAZY = 0) behaves as a conventional unit.
//
// The slack an operation may use before it is evicted anyway is chosen at
// issue: LOGIC_SLACK for logic and move ALU operations, ARITH_SLACK for
// all others. LAT must cover the datapath: 1 for the ALU, at least 1 for
// the multipliers and the divider (multi-cycle paths), 4 for the
// three-register adder. The result port shows the datapath output every
// cycle; it is
// meaningful while result_valid is high, and the write-back port (wb_en,
// wb_rd, result) carries it at eviction.
//
// Timing: as lazy_fu_ctrl; inputs are captured at the issuing clock edge.
module fu_slot
  import lp_pkg::*;
#(
  parameter fu_type_e    FTYPE       = FT_ALU,
  parameter int unsigned LAT         = 1,
  parameter bit          LAZY        = 1'b1,
  parameter int unsigned LOGIC_SLACK = 1,
  parameter int unsigned ARITH_SLACK = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      issue,
  input  alu_op_e   op_in,
  input  word_t     a_in,
  input  word_t     b_in,
  input  reg_idx_t  rd_in,
  output logic      issue_ready,
  output fu_state_e state,
  output word_t     result,
  output reg_idx_t  rd,
  output logic      result_valid,
  output slack_t    slack,
  output logic      wb_en,
  output logic      wb_masked,
  output logic      evict_by_issue,
  output logic      evict_by_limit
);

  localparam int unsigned CTRL_W = $bits(alu_op_e) + RADDR_W;

  word_t             a_q, b_q;
  logic [CTRL_W-1:0] ctrl_q;
  slack_t            limit_in;

  assign limit_in = (FTYPE == FT_ALU && is_logic_op(op_in)) ? slack_t'(LOGIC_SLACK)
                                                    : slack_t'(ARITH_SLACK);

  operand_buffer #(.CTRL_W(CTRL_W)) u_buf (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (issue),
    .a_in   (a_in),
    .b_in   (b_in),
    .ctrl_in({op_in, rd_in}),
    .a_q    (a_q),
    .b_q    (b_q),
    .ctrl_q (ctrl_q)
  );

  assign rd   = ctrl_q[RADDR_W-1:0];

  // Multipliers and the divider have a single operation; their opcode bits
  // stay unused.
  if (FTYPE == FT_MUL) begin : g_mul
    int_mul u_mul (.a(a_q), .b(b_q), .y(result));
  end else if (FTYPE == FT_FMUL) begin : g_fmul
    fp_mul u_fmul (.a(a_q), .b(b_q), .y(result));
  end else if (FTYPE == FT_FDIV) begin : g_fdiv
    fp_div u_fdiv (.a(a_q), .b(b_q), .y(result));
  end else if (FTYPE == FT_FADD) begin : g_fadd
    logic sub_q;
    assign sub_q = (alu_op_e'(ctrl_q[CTRL_W-1:RADDR_W]) == OP_SUB);
    fp_add u_fadd (.clk(clk), .rst_n(rst_n), .sub(sub_q), .a(a_q), .b(b_q),
                   .y(result));
  end else begin : g_alu
    alu_op_e op_q;
    assign op_q = alu_op_e'(ctrl_q[CTRL_W-1:RADDR_W]);
    int_alu u_alu (.op(op_q), .a(a_q), .b(b_q), .y(result));
  end

  lazy_fu_ctrl #(.LAT(LAT), .LAZY(LAZY)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .issue         (issue),
    .slack_limit_in(limit_in),
    .issue_ready   (issue_ready),
    .state         (state),
    .result_valid  (result_valid),
    .slack         (slack),
    .wb_en         (wb_en),
    .wb_masked     (wb_masked),
    .evict_by_issue(evict_by_issue),
    .evict_by_limit(evict_by_limit)
  );

endmodule
