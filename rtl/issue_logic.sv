// issue_logic: issue, operand selection and scoreboard of a Lazy Pipelines core.
//
// For every functional unit type the core has a precise and an imprecise
// unit. The issue logic steers an instruction by its precision tag: level 0
// goes to the precise unit, any other level to the imprecise one, so that
// finely interleaved precise and imprecise code never has to change a
// unit's supply. An instruction issues when its unit can take it and its
// source operands are available; the lazy mode never delays an issue, it
// only evicts the operation that is lingering in the unit.
//
// Operands come from the register file or, when the register is still
// owned by a unit, from that unit's output as soon as the producer has
// reached its nominal end (result_valid). A value taken after the nominal
// end, while the producer is FREE_ON_DEMAND, is a Lazy Forward and has had
// `slack` extra cycles; one taken in the nominal-end cycle is an ordinary
// forward. A scoreboard records, per register, whether a write is pending
// and which unit will produce it. A unit's write-back reaches the register
// file only if that unit is still the register's newest producer, so that a
// lazily delayed write-back can never overwrite a younger result.
//
// Interface: valid/ready instruction input (one per cycle), shared issue
// buses to the units plus one issue strobe per unit, two register-file read
// ports, one register-file write enable per unit, and event outputs for
// statistics. The issue buses carry the instruction's opcode and
// destination fields unchanged (they are shared by all units; the strobe
// selects the unit) and the rs1/rs2 fields drive the read addresses. Timing: all decisions are combinational within the issue
// cycle; the scoreboard updates at the rising edge.
// Precision steering, lazy forwarding from FREE_ON_DEMAND units and lazy
// write-back follow the document; the in-order single issue and the
// scoreboard are this design's own, standing in for the out-of-order
// machinery the document assumes.
module issue_logic
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // instruction from decode
  input  logic      in_valid,
  output logic      in_ready,
  input  instr_t    in_instr,
  // functional units
  input  logic      fu_issue_ready  [NFU],
  input  logic      fu_result_valid [NFU],
  input  word_t     fu_result       [NFU],
  input  slack_t    fu_slack        [NFU],
  input  logic      fu_wb_en        [NFU],
  input  reg_idx_t  fu_rd           [NFU],
  output logic      fu_issue        [NFU],
  output alu_op_e   iss_op,
  output word_t     iss_a,
  output word_t     iss_b,
  output reg_idx_t  iss_rd,
  // register file
  output reg_idx_t  rf_raddr1,
  input  word_t     rf_rdata1,
  output reg_idx_t  rf_raddr2,
  input  word_t     rf_rdata2,
  output logic      rf_we [NFU],
  // events
  output logic      ev_issue,        // an arithmetic instruction issued
  output logic      ev_issue_imp,    // ... to an imprecise unit
  output logic      ev_stall_fu,     // waiting for an occupied unit
  output logic      ev_stall_raw,    // waiting for a producer's nominal end
  output logic [1:0] ev_fwd_nominal, // operands forwarded with slack 0
  output logic [1:0] ev_fwd_lazy,    // operands lazily forwarded (slack > 0)
  output slack_t    ev_fwd_slack,    // largest slack of a lazy forward now
  output logic [NFU-1:0] ev_stale_wb // write-back dropped: younger producer
);

  logic   pending_q  [NREGS];
  fu_id_t producer_q [NREGS];

  logic   is_arith, uses_rs1, uses_rs2;
  fu_id_t target;
  logic   src_ok [2];
  word_t  src_val [2];
  logic   src_fwd [2];
  slack_t src_slack [2];
  reg_idx_t src_idx [2];
  word_t  rf_val [2];
  logic   fire;

  assign is_arith = is_arith_kind(in_instr.kind);
  assign uses_rs1 = (in_instr.kind != K_ALU) || (in_instr.op != OP_MOV);
  assign uses_rs2 = !in_instr.use_imm;
  assign target   = fu_id_t'({kind_to_type(in_instr.kind),
                              in_instr.prec != PREC_PRECISE});

  assign rf_raddr1 = in_instr.rs1;
  assign rf_raddr2 = in_instr.rs2;
  assign src_idx[0] = in_instr.rs1;
  assign src_idx[1] = in_instr.rs2;
  assign rf_val[0]  = rf_rdata1;
  assign rf_val[1]  = rf_rdata2;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      fu_id_t p;
      p            = producer_q[src_idx[s]];
      src_fwd[s]   = pending_q[src_idx[s]];
      src_ok[s]    = !pending_q[src_idx[s]] || fu_result_valid[p];
      src_val[s]   = pending_q[src_idx[s]] ? fu_result[p] : rf_val[s];
      src_slack[s] = fu_slack[p];
    end
  end

  logic need_ok;
  assign need_ok = (!uses_rs1 || src_ok[0]) && (!uses_rs2 || src_ok[1]);
  assign in_ready = !is_arith || (need_ok && fu_issue_ready[target]);
  assign fire     = in_valid && is_arith && in_ready;

  assign iss_op = in_instr.op;
  assign iss_a  = src_val[0];
  assign iss_b  = in_instr.use_imm ? in_instr.imm : src_val[1];
  assign iss_rd = in_instr.rd;

  always_comb begin
    for (int f = 0; f < NFU; f++) fu_issue[f] = fire && (target == fu_id_t'(f));
  end

  // Write-back filter: only the newest producer of a register writes it.
  always_comb begin
    for (int f = 0; f < NFU; f++) begin
      rf_we[f]       = fu_wb_en[f] && pending_q[fu_rd[f]] &&
                       (producer_q[fu_rd[f]] == fu_id_t'(f));
      ev_stale_wb[f] = fu_wb_en[f] && !rf_we[f];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) begin
        pending_q[r]  <= 1'b0;
        producer_q[r] <= '0;
      end
    end else begin
      for (int f = 0; f < NFU; f++) begin
        if (rf_we[f]) pending_q[fu_rd[f]] <= 1'b0;
      end
      if (fire) begin
        pending_q[in_instr.rd]  <= 1'b1;
        producer_q[in_instr.rd] <= target;
      end
    end
  end

  // events
  assign ev_issue     = fire;
  assign ev_issue_imp = fire && target[0];
  assign ev_stall_fu  = in_valid && is_arith && need_ok && !fu_issue_ready[target];
  assign ev_stall_raw = in_valid && is_arith && !need_ok;

  always_comb begin
    logic used [2];
    used[0]        = uses_rs1;
    used[1]        = uses_rs2;
    ev_fwd_nominal = '0;
    ev_fwd_lazy    = '0;
    ev_fwd_slack   = '0;
    for (int s = 0; s < 2; s++) begin
      if (fire && used[s] && src_fwd[s]) begin
        if (src_slack[s] == '0) begin
          ev_fwd_nominal[s] = 1'b1;
        end else begin
          ev_fwd_lazy[s] = 1'b1;
          if (src_slack[s] > ev_fwd_slack) ev_fwd_slack = src_slack[s];
        end
      end
    end
  end

  // A unit never receives an operation it cannot take.
  a_issue_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                  fire |-> fu_issue_ready[target]);

endmodule
