// List processor with aligned nodes and a 16-bit memory.
//
// If every node starts at an even byte address, the pointer and the number
// of a node form one 16-bit word and a memory with a 16-bit data port reads
// a whole node in one cycle. The NUMA register and its adder disappear and
// the loop body becomes a single cycle:
//   {NEXT, X} <- Memory[NEXT], SUM <- SUM + X;
// X is a pipeline register: the number fetched in one cycle is added in the
// next. States: INIT (NEXT <- 0, X <- 0, SUM <- 0), LOOP (the line above,
// repeated until the pointer being read is 0), LAST (SUM <- SUM + X for the
// final number) and DONE, held until the next START. START=1 sends the
// machine to INIT from any state.
//
// Memory interface: mem_a is the word address, the byte address NEXT
// without its low bit; mem_d[7:0] is the even byte (pointer) and
// mem_d[15:8] the odd byte (number). Timing: START sampled 1 on edge e0;
// DONE rises after edge e0+k+2 for k nodes. The loop body is the lecture design's;
// the word layout, the zero test on the word being read and the INIT/LAST
// states are this implementation's choices.
module list_proc5
  import lp_pkg::*;
(
  input  logic                clk,
  input  logic                start,
  output logic [ADDR_W-2:0]   mem_a,
  input  logic [2*DATA_W-1:0] mem_d,
  output logic                done,
  output logic [SUM_W-1:0]    r
);
  typedef enum logic [1:0] {
    INIT = 2'd0,
    LOOP = 2'd1,
    LAST = 2'd2,
    DONE = 2'd3
  } state_t;

  state_t            s, s_n;
  logic              ld_node, node_sel, ld_sum, sum_sel, ptr_zero;
  logic [ADDR_W-1:0] next_q, next_d;
  logic [DATA_W-1:0] x_q, x_d;
  logic [SUM_W-1:0]  sum_d;

  // Controller
  always_comb begin
    if (start) s_n = INIT;
    else
      unique case (s)
        INIT:    s_n = LOOP;
        LOOP:    s_n = ptr_zero ? LAST : LOOP;
        LAST:    s_n = DONE;
        default: s_n = DONE;
      endcase
  end

  always_ff @(posedge clk) s <= s_n;

  assign ld_node  = (s == INIT) || (s == LOOP);
  assign node_sel = (s == LOOP);
  assign ld_sum   = (s == INIT) || (s == LOOP) || (s == LAST);
  assign sum_sel  = (s == LOOP) || (s == LAST);
  assign done     = (s == DONE);

  // Datapath
  assign mem_a    = next_q[ADDR_W-1:1];
  assign ptr_zero = (mem_d[DATA_W-1:0] == '0);

  assign next_d = node_sel ? mem_d[DATA_W-1:0] : '0;
  assign x_d    = node_sel ? mem_d[2*DATA_W-1:DATA_W] : '0;
  ce_reg #(.W(ADDR_W)) u_next (.clk, .ce(ld_node), .d(next_d), .q(next_q));
  ce_reg #(.W(DATA_W)) u_x    (.clk, .ce(ld_node), .d(x_d),    .q(x_q));

  assign sum_d = sum_sel ? r + SUM_W'($signed(x_q)) : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ld_sum), .d(sum_d), .q(r));
endmodule
