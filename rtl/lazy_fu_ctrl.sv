// lazy_fu_ctrl: status register and write-back control of one functional unit.
//
// Each unit has a two-bit status: FREE (holds nothing), OCCUPIED (an
// operation is before its nominal end) and FREE_ON_DEMAND (the nominal end
// has passed; the unit keeps its inputs and goes on settling, but gives way
// as soon as another operation wants it). In FREE_ON_DEMAND the write enable
// of the unit is masked: the result is written back only when the operation
// is evicted (Lazy Writeback), either because a new operation is issued to
// the unit or because the slack limit of the operation is reached, after
// which more cycles would not improve it. From the nominal-end cycle until
// eviction the result may be forwarded (Lazy Forwarding), and `slack` tells
// how many cycles past the nominal end the value on the unit's output has
// had. With LAZY = 0 (a precise unit) or a slack limit of 0 the unit writes
// back in its nominal-end cycle, as in a conventional pipeline.
//
// Timing: `issue` is sampled at a rising edge; the operation's nominal-end
// cycle is the LAT-th cycle after that edge (cnt = LAT), in which
// `result_valid` is high with slack 0. `wb_en` marks the cycle whose
// result is written back at the closing edge. A new operation can be issued
// when the unit is FREE or FREE_ON_DEMAND, or in the nominal-end cycle of the
// current operation; issue time is never delayed by the lazy mode.
// The states, the mask and the eviction rules follow the document; the
// per-operation slack limit input, the counters and the one-operation-
// at-a-time occupancy are this design's choices.
module lazy_fu_ctrl
  import lp_pkg::*;
#(
  parameter int unsigned LAT  = 1,    // nominal latency in cycles, >= 1
  parameter bit          LAZY = 1'b1  // 1: imprecise unit with LWB/LFW
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      issue,          // new operation enters the unit
  input  slack_t    slack_limit_in, // slack allowed for that operation
  output logic      issue_ready,    // unit can accept an operation now
  output fu_state_e state,
  output logic      result_valid,   // output may be forwarded this cycle
  output slack_t    slack,          // slack cycles of the current output
  output logic      wb_en,          // write back at the closing edge
  output logic      wb_masked,      // result ready but write enable masked
  output logic      evict_by_issue, // wb_en because of a new issue
  output logic      evict_by_limit  // wb_en because the slack limit is hit
);

  localparam int unsigned CNT_W = (LAT < 2) ? 1 : $clog2(LAT + 1);

  fu_state_e        state_q, state_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;
  slack_t           slack_q, slack_d;
  slack_t           limit_q, limit_d;
  logic             nominal_end;

  assign state       = state_q;
  assign nominal_end = (state_q == FU_OCCUPIED) && (cnt_q == CNT_W'(LAT));
  assign issue_ready = (state_q != FU_OCCUPIED) || nominal_end;

  always_comb begin
    state_d        = state_q;
    cnt_d          = cnt_q;
    slack_d        = slack_q;
    limit_d        = limit_q;
    result_valid   = 1'b0;
    slack          = '0;
    wb_en          = 1'b0;
    evict_by_issue = 1'b0;
    evict_by_limit = 1'b0;

    unique case (state_q)
      FU_FREE: ;
      FU_OCCUPIED: begin
        if (!nominal_end) begin
          cnt_d = cnt_q + 1'b1;
        end else begin
          result_valid = 1'b1;
          if (issue || !LAZY || limit_q == '0) begin
            wb_en          = 1'b1;
            evict_by_issue = issue && LAZY && (limit_q != '0);
            state_d        = FU_FREE;
          end else begin
            state_d = FU_FREE_ON_DEMAND;
            slack_d = slack_t'(1);
          end
        end
      end
      FU_FREE_ON_DEMAND: begin
        result_valid = 1'b1;
        slack        = slack_q;
        if (issue || slack_q >= limit_q) begin
          wb_en          = 1'b1;
          evict_by_issue = issue;
          evict_by_limit = !issue;
          state_d        = FU_FREE;
        end else begin
          slack_d = slack_q + 1'b1;
        end
      end
      default: state_d = FU_FREE;
    endcase

    if (issue) begin
      state_d = FU_OCCUPIED;
      cnt_d   = CNT_W'(1);
      limit_d = LAZY ? slack_limit_in : slack_t'(0);
      slack_d = '0;
    end
  end

  assign wb_masked = result_valid && !wb_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= FU_FREE;
      cnt_q   <= '0;
      slack_q <= '0;
      limit_q <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      slack_q <= slack_d;
      limit_q <= limit_d;
    end
  end

  // An operation may only be issued to a unit that can take it.
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                  issue |-> issue_ready);
  // The write enable is never raised twice for one operation: after a
  // write-back without a new issue the unit is free.
  a_free_after_wb: assert property (@(posedge clk) disable iff (!rst_n)
                                    (wb_en && !issue) |=> (state_q == FU_FREE));

endmodule
