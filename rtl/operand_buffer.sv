// operand_buffer: input buffer of one functional unit.
//
// To gain anything from slack, a unit's inputs must stay constant for the
// whole life of an operation, including the cycles after its nominal end.
// The buffer therefore captures both operands and the operation's control
// field only in the cycle a new operation is issued to the unit (load = 1)
// and holds them otherwise, whatever the issue stage's operand buses carry.
//
// Timing: values presented with load = 1 appear on the outputs after the
// next rising clock edge. Reset clears the buffer. The buffer follows the
// document; the control field that travels with the operands (opcode,
// destination, precision) is this design's choice.
module operand_buffer
  import lp_pkg::*;
#(
  parameter int unsigned CTRL_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  word_t             a_in,
  input  word_t             b_in,
  input  logic [CTRL_W-1:0] ctrl_in,
  output word_t             a_q,
  output word_t             b_q,
  output logic [CTRL_W-1:0] ctrl_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      ctrl_q <= '0;
    end else if (load) begin
      a_q    <= a_in;
      b_q    <= b_in;
      ctrl_q <= ctrl_in;
    end
  end

endmodule
