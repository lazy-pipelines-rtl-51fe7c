// tb_regfile: checks the multi-port register file against a shadow array.
//
// Every cycle each of the four write ports writes with some probability, to
// distinct registers (the rule the issue logic keeps); all three read ports
// read random registers. Reads must return the value before the clock edge.
// Also checks the reset value of every register.
module tb_regfile;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic     we    [NFU];
  reg_idx_t waddr [NFU];
  word_t    wdata [NFU];
  reg_idx_t raddr1, raddr2, dbg_raddr;
  word_t    rdata1, rdata2, dbg_rdata;

  regfile #(.NWP(NFU)) dut (.*);

  word_t shadow [NREGS];

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (we[p]) begin we[p] = 1'b0; waddr[p] = '0; wdata[p] = '0; end
    raddr1 = '0; raddr2 = '0; dbg_raddr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < NREGS; r++) begin
      shadow[r] = '0;
      dbg_raddr = reg_idx_t'(r);
      #1 chk("reset", dbg_rdata, '0);
    end
    for (int i = 0; i < 500; i++) begin
      logic [NREGS-1:0] used;
      used = '0;
      foreach (we[p]) begin
        reg_idx_t r;
        r = reg_idx_t'($urandom);
        we[p] = ($urandom_range(0, 1) == 1) && !used[r];
        if (we[p]) used[r] = 1'b1;
        waddr[p] = r;
        wdata[p] = $urandom;
      end
      raddr1 = reg_idx_t'($urandom);
      raddr2 = reg_idx_t'($urandom);
      dbg_raddr = reg_idx_t'($urandom);
      #1;
      chk("rdata1", rdata1, shadow[raddr1]);
      chk("rdata2", rdata2, shadow[raddr2]);
      chk("dbg", dbg_rdata, shadow[dbg_raddr]);
      @(posedge clk);
      foreach (we[p]) if (we[p]) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
