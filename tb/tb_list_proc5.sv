// Testbench of list processor architecture 5: runs the shared list
// processor harness (lp_harness) on list_proc5. See lp_harness for what is
// checked.
module tb_list_proc5;
  lp_harness #(.ARCH(5)) u_harness ();
endmodule
