// List processor, architecture 4: the pipelined version.
//
// Same job and interface as architectures 1-3 (sum of the 8-bit numbers in
// a linked list starting at address 0 of a single-ported, asynchronously
// read memory), rescheduled so that each cycle holds either a memory read
// followed by a register load or an add, never both in series:
//   step 1: X <- Memory[NUMA], NUMA <- NEXT + 1;
//   step 2: NEXT <- Memory[NEXT], SUM <- SUM + X;
// Three list iterations are in flight at once (pointer fetch of one, number
// fetch of the one before, add of the one before that), 2 cycles per node,
// one shared adder. Timing: START sampled 1 on edge e0; DONE rises after
// edge e0+2k+2 for k nodes and stays high, with R holding the sum, until the
// next START. R is the SUM register; START is the only reset.
module list_proc4
  import lp_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              done,
  output logic [SUM_W-1:0]  r
);
  lp4_ctrl_t ctl;
  logic      next_zero;

  lp4_ctrl     u_ctrl (.clk, .start, .next_zero, .ctl);
  lp4_datapath u_dp   (.clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r));

  assign done = ctl.done;
endmodule
