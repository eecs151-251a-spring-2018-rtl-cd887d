// Testbench of list processor architecture 1: runs the shared list
// processor harness (lp_harness) on list_proc1. See lp_harness for what is
// checked.
module tb_list_proc1;
  lp_harness #(.ARCH(1)) u_harness ();
endmodule
