// List processor, architecture 2:
//   if (START) NEXT<-0, SUM<-0, NUMA<-1;
//   repeat { SUM<-SUM+Memory[NUMA]; NUMA<-Memory[NEXT]+1, NEXT<-Memory[NEXT]; }
//   until (NEXT==0);  R<-SUM, DONE<-1;
//
// Same interface, controller and cycle count as architecture 1 (DONE after
// edge e0+2k+1 for k nodes, START sampled 1 on e0); the added NUMA register
// moves the 8-bit address add into the pointer-fetch cycle, which shortens
// the clock period. R is the SUM register; START is the only reset.
module list_proc2
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
  lp2_datapath u_dp   (.clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r));

  assign done = ctl.done;
endmodule
