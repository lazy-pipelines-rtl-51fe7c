// int_alu: single-cycle combinational integer ALU.
//
// The integer ALU of a Lazy Pipelines core is purely combinational, the most
// favourable kind of unit for slack: every extra cycle with stable inputs
// applies to the whole computation. The same circuit serves as the precise
// unit (nominal supply) and as the imprecise unit (over-scaled supply); in
// logic the two are identical, the difference is electrical.
//
// Operations: add, sub, rsb (reverse subtract), and, orr, eor, mov (b
// passes), lsl and lsr by b[4:0]. The operation set follows the ARM
// instructions the document's examples use (add, rsb, lsl, logic and move);
// the encoding and the shift-amount width are this design's choices.
// Timing: output depends only on the current inputs.
module int_alu
  import lp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_RSB:  y = b - a;
      OP_AND:  y = a & b;
      OP_ORR:  y = a | b;
      OP_EOR:  y = a ^ b;
      OP_MOV:  y = b;
      OP_LSL:  y = a << b[4:0];
      OP_LSR:  y = a >> b[4:0];
      default: y = '0;
    endcase
  end

endmodule
