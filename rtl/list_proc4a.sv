// List processor, architecture 4 with nodes aligned to even addresses.
//
// Same interface, controller (lp4_ctrl) and timing as architecture 4: START
// sampled 1 on edge e0, DONE after edge e0+2k+2 for k nodes, 2 cycles per
// node, R is the SUM register. Because every node is at an even address the
// NUMA register is loaded with NEXT instead of NEXT+1 and the low address
// bit comes from the controller (see lp4a_datapath), which removes the
// address add; the single adder only accumulates. Lists with a node at an
// odd address give wrong results.
module list_proc4a
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

  lp4_ctrl      u_ctrl (.clk, .start, .next_zero, .ctl);
  lp4a_datapath u_dp   (.clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r));

  assign done = ctl.done;
endmodule
