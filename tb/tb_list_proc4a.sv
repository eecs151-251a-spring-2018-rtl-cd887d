// Testbench of list processor architecture 4 with aligned nodes: runs the
// shared list processor harness (lp_harness) on list_proc4a with lists at
// even addresses. See lp_harness for what is checked.
module tb_list_proc4a;
  lp_harness #(.ARCH(6)) u_harness ();
endmodule
