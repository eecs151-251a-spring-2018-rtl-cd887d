// Single-ported list memory with asynchronous read.
//
// One address port a serves reads and writes. Reads are combinational: d
// shows the word at a in the same cycle, as the list processors expect of a
// memory with an asynchronous read. Writes happen on the rising clock edge
// when we is 1, per byte lane as enabled by be, and exist only so that a
// host can place a list in the memory; the list processors only read.
// Defaults: 8-bit data, 8-bit address (256 bytes), as in the list processor
// specification. The contents are not initialised.
module list_mem #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic                clk,
  input  logic [ADDR_W-1:0]   a,
  output logic [DATA_W-1:0]   d,
  input  logic                we,
  input  logic [DATA_W/8-1:0] be,
  input  logic [DATA_W-1:0]   wd
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  assign d = mem[a];

  always_ff @(posedge clk)
    if (we)
      for (int i = 0; i < DATA_W/8; i++)
        if (be[i]) mem[a][8*i +: 8] <= wd[8*i +: 8];
endmodule
