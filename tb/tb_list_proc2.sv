// Testbench of list processor architecture 2: runs the shared list
// processor harness (lp_harness) on list_proc2. See lp_harness for what is
// checked.
module tb_list_proc2;
  lp_harness #(.ARCH(2)) u_harness ();
endmodule
