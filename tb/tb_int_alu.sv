// tb_int_alu: checks every ALU operation against independently computed
// values, on random operands and on corner cases (zero, all ones, the sign
// bit, shift amounts 0 and 31, and shift operands whose upper bits must be
// ignored).
module tb_int_alu;
  import lp_pkg::*;

  int checks = 0;
  int failures = 0;

  alu_op_e op;
  word_t   a, b, y;

  int_alu dut (.*);

  function automatic word_t ref_y(alu_op_e o, word_t x, word_t z);
    longint unsigned lx, lz;
    lx = x; lz = z;
    case (o)
      OP_ADD: return word_t'((lx + lz) % 64'h1_0000_0000);
      OP_SUB: return word_t'((lx + 64'h1_0000_0000 - lz) % 64'h1_0000_0000);
      OP_RSB: return word_t'((lz + 64'h1_0000_0000 - lx) % 64'h1_0000_0000);
      OP_AND: return ~(~x | ~z);
      OP_ORR: return ~(~x & ~z);
      OP_EOR: return (x | z) & ~(x & z);
      OP_MOV: return z;
      OP_LSL: return word_t'((lx * (64'd1 << (z % 32))) % 64'h1_0000_0000);
      OP_LSR: return word_t'(lx / (64'd1 << (z % 32)));
      default: return '0;
    endcase
  endfunction

  task automatic try(alu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ref_y(o, x, z)) begin
      failures++;
      $display("FAIL %s %h %h: got %h expected %h", o.name(), x, z, y,
               ref_y(o, x, z));
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
    alu_op_e ops [9] = '{OP_ADD, OP_SUB, OP_RSB, OP_AND, OP_ORR, OP_EOR,
                         OP_MOV, OP_LSL, OP_LSR};
    word_t corner [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h1,
                          32'h7FFF_FFFF, 32'h0000_003F};
    foreach (ops[k]) begin
      foreach (corner[i]) foreach (corner[j]) try(ops[k], corner[i], corner[j]);
      for (int n = 0; n < 200; n++) try(ops[k], $urandom, $urandom);
    end
    try(OP_LSL, 32'h1, 32'd31);
    try(OP_LSR, 32'h8000_0000, 32'd31);
    try(OP_LSL, 32'h1234_5678, 32'h0000_0120);  // only b[4:0] counts
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
