// tb_int_mul: checks the multiplier's low 32 bits against a product formed
// by shift-and-add in 64-bit arithmetic, on corner cases and random operands.
module tb_int_mul;
  import lp_pkg::*;

  int checks = 0;
  int failures = 0;

  word_t a, b, y;

  int_mul dut (.*);

  function automatic word_t ref_y(word_t x, word_t z);
    longint unsigned acc = 0;
    for (int i = 0; i < 32; i++) if (z[i]) acc += longint'(x) << i;
    return acc[31:0];
  endfunction

  task automatic try(word_t x, word_t z);
    a = x; b = z;
    #1;
    checks++;
    if (y !== ref_y(x, z)) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, z, y, ref_y(x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h10};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 1000; n++) try($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
