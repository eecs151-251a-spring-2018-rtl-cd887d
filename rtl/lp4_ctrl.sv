// Controller of list processor architecture 4.
//
// States: INIT clears SUM, X and NEXT and sets NUMA to 1. The loop then runs
// STEP2 (NEXT <- Memory[NEXT], SUM <- SUM + X) and STEP1 (X <- Memory[NUMA],
// NUMA <- NEXT + 1) alternately. Entering the loop at STEP2 leaves the
// registers at x=0, numa=1, sum=0, next=memory[0] when the first STEP1
// begins. When STEP1 finds NEXT_ZERO, its fetch of X was the last number:
// LAST adds it (SUM <- SUM + X) and DONE holds the result until the next
// START. START=1 sends the machine to INIT from any state. A k-node list
// takes 2k+2 cycles from the START edge to DONE. The loop steps come from
// the original lecture design; the exact placement of the exit test and the
// finishing states are this implementation's reading of its description.
module lp4_ctrl
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      start,
  input  logic      next_zero,
  output lp4_ctrl_t ctl
);
  typedef enum logic [2:0] {
    INIT  = 3'd0,
    STEP2 = 3'd1,
    STEP1 = 3'd2,
    LAST  = 3'd3,
    DONE  = 3'd4
  } state_t;

  state_t s, s_n;

  always_comb begin
    if (start) s_n = INIT;
    else
      unique case (s)
        INIT:    s_n = STEP2;
        STEP2:   s_n = STEP1;
        STEP1:   s_n = next_zero ? LAST : STEP2;
        LAST:    s_n = DONE;
        default: s_n = DONE;
      endcase
  end

  always_ff @(posedge clk) s <= s_n;

  always_comb begin
    ctl = '0;
    unique case (s)
      INIT: begin
        ctl.ld_next = 1'b1;  ctl.ld_numa = 1'b1;   // NEXT <- 0, NUMA <- 1
        ctl.ld_sum  = 1'b1;  ctl.ld_x    = 1'b1;   // SUM <- 0,  X <- 0
      end
      STEP2: begin
        ctl.a_sel    = 1'b0;
        ctl.ld_next  = 1'b1; ctl.next_sel = 1'b1;  // NEXT <- Memory[NEXT]
        ctl.ld_sum   = 1'b1; ctl.sum_sel  = 1'b1;  // SUM <- SUM + X
        ctl.add_sel1 = 1'b1; ctl.add_sel2 = 1'b1;
      end
      STEP1: begin
        ctl.a_sel    = 1'b1;
        ctl.ld_x     = 1'b1; ctl.x_sel    = 1'b1;  // X <- Memory[NUMA]
        ctl.ld_numa  = 1'b1; ctl.next_sel = 1'b1;  // NUMA <- NEXT + 1
      end
      LAST: begin
        ctl.ld_sum   = 1'b1; ctl.sum_sel  = 1'b1;  // SUM <- SUM + X
        ctl.add_sel1 = 1'b1; ctl.add_sel2 = 1'b1;
      end
      default: ctl.done = 1'b1;
    endcase
  end
endmodule
