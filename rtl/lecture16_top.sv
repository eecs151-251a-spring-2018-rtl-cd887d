// Top level: six list processors and two register-transfer examples side
// by side.
//
// List processors. Each of the six versions sums the 8-bit two's-
// complement numbers of a linked list that starts at byte address 0 and ends
// at the node whose pointer is 0. Each has its own single-ported memory with
// asynchronous read, so all six run at once on the same list:
//   r[0] / done[0]  architecture 1, direct implementation, 2 cycles per node
//   r[1] / done[1]  architecture 2, adds the NUMA register, 2 cycles per node
//   r[2] / done[2]  architecture 3, one shared adder, 2 cycles per node
//   r[3] / done[3]  architecture 4, pipelined with X and NUMA, 2 cycles per node
//   r[4] / done[4]  aligned nodes in a 16-bit memory, 1 cycle per node
//   r[5] / done[5]  architecture 4 with aligned nodes, no address add, 2 cycles per node
// The last two require every node at an even address. start is the START
// input of all six: sampled on the rising edge, it restarts them, and
// done[i] stays high with r[i] valid until the next start.
//
// Loading. While load_we=1 the byte load_data is written at load_addr into
// every memory (into the matching byte lane of the 16-bit memory); the
// address multiplexer in front of each memory's single port gives the load
// priority, so load only while the processors are idle or done.
//
// The two register-transfer examples (rt_acc_example, rt_abc_example) have
// their own ports, prefixed acc_ and abc_, and do not interact with the
// list processors.
module lecture16_top
  import lp_pkg::*;
#(
  parameter int unsigned RT_W = 8
) (
  input  logic              clk,
  input  logic              start,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data,
  output logic [5:0]        done,
  output logic [SUM_W-1:0]  r [6],

  input  logic              acc_load,
  input  logic              acc_run,
  input  logic [RT_W-1:0]   acc_r0_init,
  input  logic [RT_W-1:0]   acc_r1_init,
  input  logic [RT_W-1:0]   acc_acc_init,
  output logic [RT_W-1:0]   acc_r0,
  output logic [RT_W-1:0]   acc_r1,
  output logic [RT_W-1:0]   acc_acc,
  output logic [1:0]        acc_step,

  input  logic              abc_rst,
  input  logic              abc_start,
  input  logic [RT_W-1:0]   abc_in,
  output logic [RT_W-1:0]   abc_rega,
  output logic [RT_W-1:0]   abc_regb,
  output logic [RT_W-1:0]   abc_regc,
  output logic              abc_done
);
  // ---- architectures 1-4 and 4a, byte-wide memories ----
  logic [ADDR_W-1:0] pa [5];   // processor address
  logic [ADDR_W-1:0] ma [5];   // memory address after the load mux
  logic [DATA_W-1:0] md [5];   // memory read data

  for (genvar i = 0; i < 5; i++) begin : g_mem8
    assign ma[i] = load_we ? load_addr : pa[i];
    list_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
      .clk, .a(ma[i]), .d(md[i]), .we(load_we), .be(1'b1), .wd(load_data));
  end

  list_proc1 u_arch1 (.clk, .start, .mem_a(pa[0]), .mem_d(md[0]), .done(done[0]), .r(r[0]));
  list_proc2 u_arch2 (.clk, .start, .mem_a(pa[1]), .mem_d(md[1]), .done(done[1]), .r(r[1]));
  list_proc3 u_arch3 (.clk, .start, .mem_a(pa[2]), .mem_d(md[2]), .done(done[2]), .r(r[2]));
  list_proc4 u_arch4 (.clk, .start, .mem_a(pa[3]), .mem_d(md[3]), .done(done[3]), .r(r[3]));
  list_proc4a u_arch4a (.clk, .start, .mem_a(pa[4]), .mem_d(md[4]), .done(done[5]), .r(r[5]));

  // ---- aligned variant, 16-bit memory ----
  logic [ADDR_W-2:0]   pa5, ma5;
  logic [2*DATA_W-1:0] md5;

  assign ma5 = load_we ? load_addr[ADDR_W-1:1] : pa5;
  list_mem #(.DATA_W(2*DATA_W), .ADDR_W(ADDR_W-1)) u_mem16 (
    .clk, .a(ma5), .d(md5), .we(load_we),
    .be(load_addr[0] ? 2'b10 : 2'b01), .wd({load_data, load_data}));

  list_proc5 u_arch5 (.clk, .start, .mem_a(pa5), .mem_d(md5), .done(done[4]), .r(r[4]));

  // ---- register-transfer examples ----
  rt_acc_example #(.W(RT_W)) u_acc (
    .clk, .load(acc_load), .run(acc_run), .r0_init(acc_r0_init), .r1_init(acc_r1_init),
    .acc_init(acc_acc_init), .r0(acc_r0), .r1(acc_r1), .acc(acc_acc), .step(acc_step));

  rt_abc_example #(.W(RT_W)) u_abc (
    .clk, .rst(abc_rst), .start(abc_start), .in(abc_in),
    .rega(abc_rega), .regb(abc_regb), .regc(abc_regc), .done(abc_done));
endmodule
