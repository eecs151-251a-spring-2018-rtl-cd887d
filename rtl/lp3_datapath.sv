// Datapath of list processor architecture 3.
//
// Architecture 2 with its two adders merged. In every cycle of the loop the
// design adds exactly once, so one adder serves both: its inputs are the
// memory data (sign-extended) and a multiplexer controlled by ADD_SEL that
// offers SUM (ADD_SEL=1, number-fetch cycle: SUM <- SUM + Memory[NUMA]) or
// the constant 1 (ADD_SEL=0, pointer-fetch cycle: NUMA <- Memory[NEXT]+1).
// The adder is SUM_W bits wide; NUMA keeps its low 8 bits, which equal the
// 8-bit sum D+1. Registers, muxes and select names follow the
// datapath drawing of the original lecture design.
module lp3_datapath
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
  logic [SUM_W-1:0]  add_a, add_y, sum_d;

  assign next_d    = ctl.next_sel ? mem_d : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  assign add_a = ctl.add_sel ? sum : SUM_W'(1);
  assign add_y = add_a + SUM_W'($signed(mem_d));

  assign numa_d = ctl.next_sel ? add_y[ADDR_W-1:0] : ADDR_W'(1);
  ce_reg #(.W(ADDR_W)) u_numa (.clk, .ce(ctl.ld_next), .d(numa_d), .q(numa_q));

  assign mem_a = ctl.a_sel ? numa_q : next_q;

  assign sum_d = ctl.sum_sel ? add_y : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum));
endmodule
