// tb_operand_buffer: checks that a unit's input buffer holds its operands.
//
// Drives new random operand and control values on the inputs every cycle
// and raises load only now and then. The outputs must show the values of
// the last loading cycle, from the edge after it, and ignore the inputs in
// every other cycle. Also checks the reset value.
module tb_operand_buffer;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       load;
  word_t      a_in, b_in, a_q, b_q;
  logic [7:0] ctrl_in, ctrl_q;

  operand_buffer #(.CTRL_W(8)) dut (.*);

  word_t      ea, eb;
  logic [7:0] ec;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; a_in = '1; b_in = '1; ctrl_in = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk("reset a", a_q, 0);
    chk("reset ctrl", ctrl_q, 0);
    rst_n = 1'b1;
    ea = '0; eb = '0; ec = '0;
    for (int i = 0; i < 300; i++) begin
      load    = ($urandom_range(0, 4) == 0);
      a_in    = $urandom;
      b_in    = $urandom;
      ctrl_in = 8'($urandom);
      @(posedge clk);
      if (load) begin ea = a_in; eb = b_in; ec = ctrl_in; end
      @(negedge clk);
      chk("a", a_q, ea);
      chk("b", b_q, eb);
      chk("ctrl", ctrl_q, ec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
