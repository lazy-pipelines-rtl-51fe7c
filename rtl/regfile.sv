// regfile: architectural register file with one write port per unit.
//
// In a Lazy Pipelines core several units may reach their (lazy) write-back
// in the same cycle, since each write-back is delayed until its operation is
// evicted. Instead of arbitrating, this register file gives every unit its
// own write port. The issue logic guarantees that at most one port writes a
// given register in a cycle (only the newest producer of a register may
// write it); an assertion checks that rule. Two read ports serve the issue
// stage and a third lets a host or testbench observe the state.
//
// Timing: writes land at the rising edge; reads are combinational and show
// the value before a same-cycle write (the issue logic forwards such values
// from the units). Reset clears every register. The port structure is this
// design's choice; the document leaves write-back conflicts to the
// surrounding out-of-order machinery.
module regfile
  import lp_pkg::*;
#(
  parameter int unsigned NWP = NFU
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     we    [NWP],
  input  reg_idx_t waddr [NWP],
  input  word_t    wdata [NWP],
  input  reg_idx_t raddr1,
  output word_t    rdata1,
  input  reg_idx_t raddr2,
  output word_t    rdata2,
  input  reg_idx_t dbg_raddr,
  output word_t    dbg_rdata
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NWP; p++) begin
        if (we[p]) regs[waddr[p]] <= wdata[p];
      end
    end
  end

  assign rdata1    = regs[raddr1];
  assign rdata2    = regs[raddr2];
  assign dbg_rdata = regs[dbg_raddr];

  // No two ports write the same register in one cycle.
  for (genvar p = 0; p < NWP; p++) begin : g_chk
    for (genvar q = p + 1; q < NWP; q++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(we[p] && we[q] && waddr[p] == waddr[q]));
    end
  end

endmodule
