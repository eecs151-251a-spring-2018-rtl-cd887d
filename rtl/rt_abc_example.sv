// Register-transfer example: datapath and controller derived from
//   regA <- IN; regB <- IN; regC <- regA + regB; regB <- regC;
//
// Reading the four transfers gives the datapath: IN fans out to regA and
// regB, regA and regB feed an adder, the adder feeds regC, and regB takes
// its input from a 2:1 mux selecting IN or regC. Each register has a clock
// enable. The controller is a five-state machine: IDLE, then one state per
// transfer, one cycle each, back to IDLE. IN is sampled in the first two
// cycles after start.
//
// Interface: rst (synchronous) returns to IDLE; start=1 in IDLE begins the
// sequence on the next edge; done is 1 in IDLE. The datapath is the one the
// four transfers imply; the start/done/rst handshake and the 8-bit default
// width are this implementation's choices.
module rt_abc_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] in,
  output logic [W-1:0] rega,
  output logic [W-1:0] regb,
  output logic [W-1:0] regc,
  output logic         done
);
  typedef enum logic [2:0] {
    IDLE    = 3'd0,
    LD_A    = 3'd1,
    LD_B    = 3'd2,
    ADD_C   = 3'd3,
    C_TO_B  = 3'd4
  } state_t;

  state_t s;
  logic   ld_a, ld_b, ld_c, b_sel;

  always_ff @(posedge clk)
    if (rst) s <= IDLE;
    else
      unique case (s)
        IDLE:    s <= start ? LD_A : IDLE;
        LD_A:    s <= LD_B;
        LD_B:    s <= ADD_C;
        ADD_C:   s <= C_TO_B;
        default: s <= IDLE;
      endcase

  assign ld_a  = (s == LD_A);
  assign ld_b  = (s == LD_B) || (s == C_TO_B);
  assign b_sel = (s == C_TO_B);        // 1: regC, 0: IN
  assign ld_c  = (s == ADD_C);
  assign done  = (s == IDLE);

  ce_reg #(.W(W)) u_a (.clk, .ce(ld_a), .d(in),                 .q(rega));
  ce_reg #(.W(W)) u_b (.clk, .ce(ld_b), .d(b_sel ? regc : in),  .q(regb));
  ce_reg #(.W(W)) u_c (.clk, .ce(ld_c), .d(rega + regb),        .q(regc));
endmodule
