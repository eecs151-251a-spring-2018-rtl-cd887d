// Testbench of list processor architecture 3: runs the shared list
// processor harness (lp_harness) on list_proc3. See lp_harness for what is
// checked.
module tb_list_proc3;
  lp_harness #(.ARCH(3)) u_harness ();
endmodule
