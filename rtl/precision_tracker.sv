// precision_tracker: decode-stage precision register of a Lazy Pipelines core.
//
// Precision is marked in the instruction stream by marking instructions
// (startImprecise / startPrecise) that set the level of all arithmetic
// instructions that follow them, instead of by imprecise variants of each
// opcode. This block keeps the current level in a PREC_W-bit register, which
// a marking instruction overwrites, and copies it into the decode->issue
// pipeline register beside every arithmetic instruction. Non-arithmetic
// instructions always carry the precise level. Marking instructions are
// consumed here and do not travel further. The level is precise after reset.
//
// Interface: a valid/ready input of decoded instructions and a valid/ready
// output of tagged instructions, one per cycle. The output register adds
// one cycle of latency; a full register that is not taken stalls the input.
// The register and the tagging follow the document; the handshake, the
// reset value and the single-entry register are this design's choices.
module precision_tracker
  import lp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   out_valid,
  input  logic   out_ready,
  output instr_t out_instr,
  output prec_t  cur_prec    // current level of the precision register
);

  prec_t  prec_q;
  logic   accept;
  logic   is_mark;
  logic   is_arith;
  instr_t tag_instr;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;
  assign is_mark  = in_instr.kind inside {K_START_IMP, K_START_PRE};
  assign is_arith = is_arith_kind(in_instr.kind);
  assign cur_prec = prec_q;

  always_comb begin
    tag_instr      = in_instr;
    tag_instr.prec = is_arith ? prec_q : PREC_PRECISE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec_q <= PREC_PRECISE;
    end else if (accept && is_mark) begin
      // startPrecise always returns to level 0 whatever its field holds.
      prec_q <= (in_instr.kind == K_START_PRE) ? PREC_PRECISE : in_instr.prec;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_instr <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid && !is_mark;
      if (in_valid && !is_mark) out_instr <= tag_instr;
    end
  end

endmodule
