// Datapath of list processor architecture 1.
//
// Two registers with clock enable: NEXT (pointer to the current node) and
// SUM. NEXT loads zero or the memory data (NEXT_SEL); NEXT_ZERO tests the
// value presented to NEXT, i.e. the pointer just read. The memory address is
// NEXT (A_SEL=0, pointer fetch) or NEXT+1 from a dedicated 8-bit adder
// (A_SEL=1, number fetch). SUM loads zero or SUM plus the sign-extended
// memory data (SUM_SEL). All paths are combinational between registers, so
// the number-fetch cycle holds the 8-bit add, the memory read and the
// 15-bit add in series. The structure follows the datapath drawing of
// the original lecture design; the SUM width and sign extension are
// explained in lp_pkg.
module lp1_datapath
  import lp_pkg::*;
(
  input  logic              clk,
  input  lp_ctrl_t          ctl,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              next_zero,
  output logic [SUM_W-1:0]  sum
);
  logic [ADDR_W-1:0] next_q, next_d, next_inc;
  logic [SUM_W-1:0]  sum_d, sum_add;

  assign next_d    = ctl.next_sel ? mem_d : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  assign next_inc = next_q + ADDR_W'(1);
  assign mem_a    = ctl.a_sel ? next_inc : next_q;

  assign sum_add = sum + SUM_W'($signed(mem_d));
  assign sum_d   = ctl.sum_sel ? sum_add : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum));
endmodule
