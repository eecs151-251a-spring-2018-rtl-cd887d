// Datapath of list processor architecture 4 (pipelined).
//
// Registers NEXT, NUMA, X and SUM, all with clock enables, and a single
// SUM_W-bit adder whose operands are picked by ADD_SEL1 (SUM or the constant
// 1) and ADD_SEL2 (X, sign-extended, or NEXT, zero-extended). X holds the
// number fetched in the previous cycle and NUMA the address of the number
// to fetch next, so they act as pipeline registers: no cycle contains both
// a memory read and an add. The two loop cycles are
//   step 1: X <- Memory[NUMA], NUMA <- NEXT + 1      (A_SEL=1)
//   step 2: NEXT <- Memory[NEXT], SUM <- SUM + X     (A_SEL=0)
// NEXT_SEL drives both the NEXT mux (memory data or 0) and the NUMA mux
// (adder or 1). NEXT_ZERO tests the NEXT register output. The registers,
// muxes, their input order and the select names follow the
// original lecture design's datapath drawing; operand extension is this
// implementation's choice.
module lp4_datapath
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
  logic [SUM_W-1:0]  add_a, add_b, add_y, sum_d;

  assign x_d = ctl.x_sel ? mem_d : '0;
  ce_reg #(.W(DATA_W)) u_x (.clk, .ce(ctl.ld_x), .d(x_d), .q(x_q));

  assign next_d = ctl.next_sel ? mem_d : '0;
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));
  assign next_zero = (next_q == '0);

  assign add_a = ctl.add_sel1 ? sum : SUM_W'(1);
  assign add_b = ctl.add_sel2 ? SUM_W'($signed(x_q)) : SUM_W'(next_q);
  assign add_y = add_a + add_b;

  assign sum_d = ctl.sum_sel ? add_y : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum));

  assign numa_d = ctl.next_sel ? add_y[ADDR_W-1:0] : ADDR_W'(1);
  ce_reg #(.W(ADDR_W)) u_numa (.clk, .ce(ctl.ld_numa), .d(numa_d), .q(numa_q));

  assign mem_a = ctl.a_sel ? numa_q : next_q;
endmodule
