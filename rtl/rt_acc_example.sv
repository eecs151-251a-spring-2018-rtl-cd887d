// Register-transfer example: ACC, R0 and R1 sequenced by a small controller.
//
// The controller steps through three register transfers, one per cycle,
// and then starts over:
//   step 0: ACC <- ACC + R0, R1 <- R0;
//   step 1: ACC <- ACC + R1, R0 <- R1;
//   step 2: R0 <- ACC;
// The datapath has no enables on R0 and R1: each is fed by a 2:1 mux that
// either recirculates the register (select 1) or takes a shared bus
// (select 0). The bus is mux S3 (0: output of S2, 1: ACC); mux S2 (0: R0,
// 1: R1) also feeds the adder, whose other input is ACC. The controller
// drives S0..S3 and the ACC enable from its step counter.
//
// Interface: load=1 loads r0_init, r1_init and acc_init and restarts at
// step 0; otherwise run=1 performs the current step on the rising edge and
// advances, run=0 holds everything. The datapath wiring follows the
// original lecture drawing; the ACC enable (so that ACC holds during step
// 2), the load port, run, the repetition and the 8-bit default width are
// this implementation's choices.
module rt_acc_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         load,
  input  logic         run,
  input  logic [W-1:0] r0_init,
  input  logic [W-1:0] r1_init,
  input  logic [W-1:0] acc_init,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc,
  output logic [1:0]   step
);
  logic         s0, s1, s2, s3, ld_acc;
  logic [W-1:0] s2_y, bus, r0_d, r1_d, acc_d;

  // Controller: three-step counter and its decode.
  always_ff @(posedge clk)
    if (load)     step <= 2'd0;
    else if (run) step <= (step == 2'd2) ? 2'd0 : step + 2'd1;

  always_comb begin
    s0 = 1'b1; s1 = 1'b1; s2 = 1'b0; s3 = 1'b0; ld_acc = 1'b0;
    if (run)
      unique case (step)
        2'd0:    begin s2 = 1'b0; s3 = 1'b0; s1 = 1'b0; ld_acc = 1'b1; end
        2'd1:    begin s2 = 1'b1; s3 = 1'b0; s0 = 1'b0; ld_acc = 1'b1; end
        default: begin s3 = 1'b1; s0 = 1'b0; end
      endcase
  end

  // Datapath
  assign s2_y = s2 ? r1 : r0;
  assign bus  = s3 ? acc : s2_y;
  assign r0_d  = load ? r0_init  : (s0 ? r0 : bus);
  assign r1_d  = load ? r1_init  : (s1 ? r1 : bus);
  assign acc_d = load ? acc_init : acc + s2_y;

  always_ff @(posedge clk) begin
    r0 <= r0_d;
    r1 <= r1_d;
    if (load || ld_acc) acc <= acc_d;
  end
endmodule
