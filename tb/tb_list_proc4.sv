// Testbench of list processor architecture 4: runs the shared list
// processor harness (lp_harness) on list_proc4. See lp_harness for what is
// checked.
module tb_list_proc4;
  lp_harness #(.ARCH(4)) u_harness ();
endmodule
