// Shared types and constants of the list processors.
//
// The list lives in a byte memory: a node at address p holds the pointer to
// the next node at p and a two's-complement number at p+1; the last node's
// pointer is 0 and the list always starts at address 0. Integers and
// pointers are 8 bits wide. The running sum is 15 bits wide, the width of
// the sum adder in the timing analysis of the original lecture design, which is wide enough
// for the at most 128 nodes an 8-bit address space can hold.
//
// lp_ctrl_t bundles the control signals that the architecture 1-3 controller
// sends to its datapath; add_sel is used by architecture 3 only. lp4_ctrl_t
// does the same for the pipelined architecture 4.
package lp_pkg;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned SUM_W  = 15;

  typedef struct packed {
    logic ld_sum;    // SUM register clock enable
    logic sum_sel;   // SUM mux: 1 = adder, 0 = zero
    logic ld_next;   // NEXT (and NUMA) register clock enable
    logic next_sel;  // NEXT mux: 1 = memory data, 0 = zero
    logic a_sel;     // address mux: 0 = NEXT, 1 = number address
    logic add_sel;   // shared adder operand: 1 = SUM, 0 = constant 1
    logic done;      // DONE output
  } lp_ctrl_t;

  typedef struct packed {
    logic ld_x;      // X register clock enable
    logic x_sel;     // X mux: 1 = memory data, 0 = zero
    logic ld_next;   // NEXT register clock enable
    logic next_sel;  // NEXT mux (1 = memory data, 0 = zero) and NUMA mux (1 = adder, 0 = one)
    logic ld_numa;   // NUMA register clock enable
    logic ld_sum;    // SUM register clock enable
    logic sum_sel;   // SUM mux: 1 = adder, 0 = zero
    logic add_sel1;  // adder operand 1: 1 = SUM, 0 = constant 1
    logic add_sel2;  // adder operand 2: 1 = X, 0 = NEXT
    logic a_sel;     // address mux: 0 = NEXT, 1 = NUMA
    logic done;      // DONE output
  } lp4_ctrl_t;
endpackage
