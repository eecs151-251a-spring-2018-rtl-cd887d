// List processor, architecture 3: the RT program and timing of
// architecture 2 (DONE after edge e0+2k+1 for k nodes, START sampled 1 on
// e0) on a datapath with a single shared adder, steered by the ADD_SEL
// output of the controller. R is the SUM register; START is the only reset.
module list_proc3
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
  lp3_datapath u_dp   (.clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r));

  assign done = ctl.done;
endmodule
