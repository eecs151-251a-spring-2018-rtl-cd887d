// Register with clock enable.
//
// On a rising clock edge the register takes d when ce is 1 and keeps its
// value when ce is 0, the behaviour of a 2:1 multiplexer feeding a plain
// register from either the new input or its own output. As in the design it
// belongs to there is no reset: whoever uses it must load it before reading
// it. Width W is a parameter; its default of 8 is this implementation's
// choice.
module ce_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk)
    if (ce) q <= d;
endmodule
