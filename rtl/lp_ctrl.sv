// Controller of list processor architectures 1, 2 and 3.
//
// A one-hot state machine with four flip-flops, one per state: START,
// COMPUTE_SUM, GET_NEXT and DONE. START=1 sends the machine to START from
// any state (the START flip-flop simply samples the START input), so START
// also serves as the reset. From START the machine alternates COMPUTE_SUM
// and GET_NEXT, two cycles per list node, until NEXT_ZERO is seen in
// GET_NEXT, and then stays in DONE until the next START.
//
// Outputs are Moore outputs decoded from the state flip-flops:
//   START       LD_SUM=1 SUM_SEL=0 LD_NEXT=1 NEXT_SEL=0   (clear SUM and NEXT)
//   COMPUTE_SUM LD_SUM=1 SUM_SEL=1 A_SEL=1   ADD_SEL=1    (SUM <- SUM + number)
//   GET_NEXT    LD_NEXT=1 NEXT_SEL=1 A_SEL=0 ADD_SEL=0    (NEXT <- pointer)
//   DONE        DONE=1
// The states, transitions and output values follow the state diagram of
// the original lecture design. Holding DONE while START=0 and the ADD_SEL
// output, which only architecture 3 uses, are this implementation's
// choices.
module lp_ctrl
  import lp_pkg::*;
(
  input  logic     clk,
  input  logic     start,
  input  logic     next_zero,
  output lp_ctrl_t ctl
);
  typedef struct packed {
    logic start;
    logic compute_sum;
    logic get_next;
    logic done;
  } onehot_t;

  onehot_t s, s_n;

  always_comb begin
    s_n.start       = start;
    s_n.compute_sum = !start && (s.start || (s.get_next && !next_zero));
    s_n.get_next    = !start && s.compute_sum;
    s_n.done        = !start && ((s.get_next && next_zero) || s.done);
  end

  always_ff @(posedge clk) s <= s_n;

  always_comb begin
    ctl.ld_sum   = s.start || s.compute_sum;
    ctl.sum_sel  = s.compute_sum;
    ctl.ld_next  = s.start || s.get_next;
    ctl.next_sel = s.get_next;
    ctl.a_sel    = s.compute_sum;
    ctl.add_sel  = s.compute_sum;
    ctl.done     = s.done;
  end

  // Once one-hot, the state stays one-hot.
  a_onehot: assert property (@(posedge clk) $onehot(s) |=> $onehot(s));
endmodule
