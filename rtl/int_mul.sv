// int_mul: integer multiplier without internal feedback.
//
// Multipliers whose current output depends on their previous output cannot
// use slack: their result is only meaningful in the exact cycle it is due.
// A Lazy Pipelines core therefore uses a multiplier whose output is a pure
// function of its (buffered) inputs, run as a multi-cycle path: the unit is
// given its nominal latency in cycles (clock division) and, in the imprecise
// set, may keep settling for further slack cycles. This block is that
// feedback-free datapath: the low XLEN bits of a * b, like ARM mul. The
// number of cycles it is allowed is set by its controller, not here.
// Timing: output depends only on the current inputs.
module int_mul
  import lp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  // The product is truncated to XLEN bits by the width of y.
  assign y = a * b;

endmodule
