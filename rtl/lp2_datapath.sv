// Datapath of list processor architecture 2.
//
// Architecture 1 plus a register NUMA that holds the address of the number
// in the current node. NUMA and NEXT share the enable LD_NEXT and the select
// NEXT_SEL: in the pointer-fetch cycle NEXT loads Memory[NEXT] and NUMA
// loads Memory[NEXT]+1 from an 8-bit adder; in the START cycle NEXT loads 0
// and NUMA loads 1. The number-fetch cycle then addresses the memory
// directly from NUMA (A_SEL=1), so the 8-bit add has moved out of the long
// path of that cycle. SUM and NEXT_ZERO work as in architecture 1. The
// structure follows the datapath drawing of the original lecture design.
module lp2_datapath
  import lp_pkg::*;
(
  input  logic              clk,
  input  lp_ctrl_t          ctl,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              next_zero,
  output logic [SUM_W-1:0]  sum
);
  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d;
  logic [SUM_W-1:0]  sum_d, sum_add;

  assign next_d    = ctl.next_sel ? mem_d : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  assign numa_d = ctl.next_sel ? mem_d + ADDR_W'(1) : ADDR_W'(1);
  ce_reg #(.W(ADDR_W)) u_numa (.clk, .ce(ctl.ld_next), .d(numa_d), .q(numa_q));

  assign mem_a = ctl.a_sel ? numa_q : next_q;

  assign sum_add = sum + SUM_W'($signed(mem_d));
  assign sum_d   = ctl.sum_sel ? sum_add : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum));
endmodule
