// Self-checking test harness for one list processor architecture.
//
// ARCH selects the processor under test: 1-4 are list_proc1..4, 5 is the
// 16-bit aligned list_proc5 and 6 the aligned architecture 4, list_proc4a. The harness owns a 256-byte
// memory model with asynchronous read (presented 16 bits wide, even byte low,
// to architecture 5), builds random linked lists in it, pulses START and
// checks, for every run:
//   - R against a sum computed here from the list as it was built,
//   - the number of cycles from the START edge to DONE (2k+1 for
//     architectures 1-3, 2k+2 for architecture 4 and 4a, k+2 for architecture 5),
//   - that DONE and R then hold until the next START.
// Lists include a single node, random lengths and placements (even
// addresses only for architecture 5), and the two 128-node lists that fill
// every even address with -128 and with +127, the extremes of the 15-bit
// sum. Some runs are restarted by a second START in mid-run, and some hold
// START high for several cycles. A watchdog ends the run as a failure.
module lp_harness #(
  parameter int ARCH   = 1,
  parameter int N_RUNS = 60
) ();
  import lp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                start = 1'b0;
  logic [7:0]          mem [256];
  logic [ADDR_W-1:0]   a8;
  logic [ADDR_W-2:0]   a7;
  logic [DATA_W-1:0]   d8;
  logic [2*DATA_W-1:0] d16;
  logic                done;
  logic [SUM_W-1:0]    r;

  assign d8  = mem[a8];
  assign d16 = {mem[{a7, 1'b1}], mem[{a7, 1'b0}]};

  if (ARCH == 1) begin : g_dut
    list_proc1 dut (.clk, .start, .mem_a(a8), .mem_d(d8), .done, .r);
    assign a7 = '0;
  end else if (ARCH == 2) begin : g_dut
    list_proc2 dut (.clk, .start, .mem_a(a8), .mem_d(d8), .done, .r);
    assign a7 = '0;
  end else if (ARCH == 3) begin : g_dut
    list_proc3 dut (.clk, .start, .mem_a(a8), .mem_d(d8), .done, .r);
    assign a7 = '0;
  end else if (ARCH == 4) begin : g_dut
    list_proc4 dut (.clk, .start, .mem_a(a8), .mem_d(d8), .done, .r);
    assign a7 = '0;
  end else if (ARCH == 6) begin : g_dut
    list_proc4a dut (.clk, .start, .mem_a(a8), .mem_d(d8), .done, .r);
    assign a7 = '0;
  end else begin : g_dut
    list_proc5 dut (.clk, .start, .mem_a(a7), .mem_d(d16), .done, .r);
    assign a8 = '0;
  end

  int checks = 0, failures = 0;
  int n_single = 0, n_full = 0, n_restart = 0, n_long_start = 0, n_neg = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL arch%0d: %s", ARCH, what);
    end
  endtask

  function automatic int expected_cycles(int k);
    if (ARCH <= 3) return 2*k + 1;
    if (ARCH == 4 || ARCH == 6) return 2*k + 2;
    return k + 2;
  endfunction

  // Build a k-node list at random places; returns the sum (wrapped to SUM_W).
  // fill: 0 random numbers, 1 all -128, 2 all +127.
  function automatic logic [SUM_W-1:0] build_list(int k, bit aligned, int fill);
    bit used [256];
    int prev, p, tries, sum;
    for (int i = 0; i < 256; i++) begin
      mem[i]  = 8'($urandom);
      used[i] = 1'b0;
    end
    used[0] = 1'b1; used[1] = 1'b1;
    prev = 0;
    for (int n = 0; n < k; n++) begin
      if (n > 0) begin
        tries = 0;
        do begin
          p = $urandom_range(254, 2);
          if (aligned) p = p & ~1;
          tries++;
        end while ((used[p] || used[p+1]) && tries < 2000);
        if (used[p] || used[p+1])
          for (p = 2; p < 255; p += (aligned ? 2 : 1))
            if (!used[p] && !used[p+1]) break;
        used[p] = 1'b1; used[p+1] = 1'b1;
        mem[prev] = 8'(p);
        prev = p;
      end
      if (fill == 1) mem[prev+1] = 8'h80;
      if (fill == 2) mem[prev+1] = 8'h7f;
    end
    mem[prev] = 8'h00;
    // sum by walking the list
    sum = 0; p = 0;
    do begin
      sum += int'($signed(mem[p+1]));
      p = int'(mem[p]);
    end while (p != 0);
    if (sum < 0) n_neg++;
    return SUM_W'(sum);
  endfunction

  // Pulse START for start_len cycles; optionally restart after restart_at
  // cycles; then wait for DONE and check cycle count, R and hold.
  task automatic run_list(int k, logic [SUM_W-1:0] exp, int start_len, int restart_at);
    int n;
    logic [SUM_W-1:0] r_hold;
    @(negedge clk) start = 1'b1;
    repeat (start_len) @(negedge clk);
    start = 1'b0;
    if (restart_at > 0) begin
      repeat (restart_at) @(negedge clk);
      check(!done, "DONE early before restart");
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      n_restart++;
    end
    check(!done, "DONE right after START");
    n = 0;
    while (!done && n < 1000) begin
      @(posedge clk); n++; #1;
    end
    check(n == expected_cycles(k),
          $sformatf("k=%0d cycles %0d, expected %0d", k, n, expected_cycles(k)));
    check(r == exp, $sformatf("k=%0d R=%0d expected %0d", k, $signed(r), $signed(exp)));
    r_hold = r;
    repeat (3) @(negedge clk);
    check(done && r == r_hold, "DONE/R not held");
  endtask

  initial begin
    int k;
    logic [SUM_W-1:0] exp;
    bit aligned;
    aligned = (ARCH >= 5);
    // single node
    exp = build_list(1, aligned, 0);
    run_list(1, exp, 1, 0); n_single++;
    // full memory of aligned nodes, extreme values
    exp = build_list(128, 1'b1, 1);
    run_list(128, exp, 1, 0); n_full++;
    check(exp == SUM_W'(-16384), "reference sum of 128 x -128");
    exp = build_list(128, 1'b1, 2);
    run_list(128, exp, 2, 0); n_full++;
    // random lists
    for (int t = 0; t < N_RUNS; t++) begin
      k = $urandom_range(40, 1);
      exp = build_list(k, aligned, 0);
      if (t % 5 == 1) begin
        run_list(k, exp, 1, $urandom_range(expected_cycles(k) - 1, 1));
      end else if (t % 5 == 2) begin
        run_list(k, exp, $urandom_range(4, 2), 0); n_long_start++;
      end else begin
        run_list(k, exp, 1, 0);
      end
    end
    check(n_single > 0 && n_full > 0 && n_restart > 0 && n_long_start > 0 && n_neg > 0,
          "a test case never happened");
    $display("arch%0d: single=%0d full=%0d restart=%0d long_start=%0d negative=%0d",
             ARCH, n_single, n_full, n_restart, n_long_start, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL arch%0d: watchdog", ARCH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
