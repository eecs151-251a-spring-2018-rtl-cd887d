// List processor, architecture 1: direct implementation of
//   if (START) NEXT<-0, SUM<-0;
//   repeat { SUM<-SUM+Memory[NEXT+1]; NEXT<-Memory[NEXT]; } until (NEXT==0);
//   R<-SUM, DONE<-1;
//
// Sums the 8-bit two's-complement numbers of a linked list that starts at
// address 0 of a single-ported, asynchronously read memory (mem_a/mem_d).
// Timing: START is sampled on a rising edge; with START=1 on edge e0 and 0
// afterwards, DONE rises after edge e0+2k+1 for a k-node list (one START
// cycle, then COMPUTE_SUM and GET_NEXT per node) and stays high, with R
// holding the sum, until the next START. R is the SUM register. There is no
// reset other than START.
module list_proc1
  import lp_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              done,
  output logic [SUM_W-1:0]  r
);
  lp_ctrl_t ctl;
  logic     next_zero;

  lp_ctrl      u_ctrl (.clk, .start, .next_zero, .ctl);
  lp1_datapath u_dp   (.clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r));

  assign done = ctl.done;
endmodule
