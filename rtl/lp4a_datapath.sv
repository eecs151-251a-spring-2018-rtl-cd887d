// Datapath of list processor architecture 4 for nodes aligned to even
// addresses.
//
// When every node starts at an even address, the pointer of a node is at
// {p[7:1], 0} and its number at {p[7:1], 1}, so the address of the number
// needs no add: the controller supplies the low address bit (0 when NEXT
// addresses the memory, 1 when NUMA does) and NUMA becomes a plain copy of
// NEXT. The loop of architecture 4 becomes
//   step 1: X <- Memory[{NUMA[7:1],1}], NUMA <- NEXT      (A_SEL=1)
//   step 2: NEXT <- Memory[{NEXT[7:1],0}], SUM <- SUM + X  (A_SEL=0)
// and the adder only ever computes SUM + X. It is driven by the same
// controller as architecture 4 (lp4_ctrl_t); ADD_SEL1/ADD_SEL2 are not needed
// here. NUMA loads 0 at INIT (NEXT_SEL=0), which addresses the number of the
// first node at 1. The elimination of the NUMA add and the controller-supplied
// low bit come from the original lecture design; the rest is carried over from
// architecture 4.
module lp4a_datapath
  import lp_pkg::*;
(
  input  logic              clk,
  input  lp4_ctrl_t         ctl,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              next_zero,
  output logic [SUM_W-1:0]  sum
);
  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d;
  logic [DATA_W-1:0] x_q, x_d;
  logic [SUM_W-1:0]  sum_d;

  assign x_d = ctl.x_sel ? mem_d : '0;
  ce_reg #(.W(DATA_W)) u_x (.clk, .ce(ctl.ld_x), .d(x_d), .q(x_q));

  assign next_d = ctl.next_sel ? mem_d : '0;
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));
  assign next_zero = (next_q == '0);

  assign numa_d = ctl.next_sel ? next_q : '0;
  ce_reg #(.W(ADDR_W)) u_numa (.clk, .ce(ctl.ld_numa), .d(numa_d), .q(numa_q));

  assign sum_d = ctl.sum_sel ? sum + SUM_W'($signed(x_q)) : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum));

  assign mem_a = ctl.a_sel ? {numa_q[ADDR_W-1:1], 1'b1} : {next_q[ADDR_W-1:1], 1'b0};
endmodule
