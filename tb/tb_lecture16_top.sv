// End-to-end testbench of lecture16_top at its default parameters.
//
// For each test list the testbench writes the whole 256-byte image through
// the load port, pulses start, and then checks each of the six list
// processors: its DONE must rise exactly at its own cycle count (2k+1 for
// architectures 1-3, 2k+2 for 4 and 4a, k+2 for the aligned 16-bit variant)
// and its R must equal the sum computed here. Lists with nodes at odd
// addresses are checked on architectures 1-4 only, as the two aligned
// variants require even addresses. Lists cover one node, random lengths, the full memory
// (128 nodes of -128, the most negative 15-bit sum), negative sums, START
// held for several cycles and a restart in mid-run. Afterwards the two
// register-transfer examples are run through their sequences. Every
// mechanism is counted and a failure is counted for one that never happened.
module tb_lecture16_top;
  import lp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              start = 0, load_we = 0;
  logic [7:0]        load_addr, load_data;
  logic [5:0]        done;
  logic [SUM_W-1:0]  r [6];
  logic              acc_load = 0, acc_run = 0;
  logic [7:0]        acc_r0_init, acc_r1_init, acc_acc_init, acc_r0, acc_r1, acc_acc;
  logic [1:0]        acc_step;
  logic              abc_rst = 1, abc_start = 0;
  logic [7:0]        abc_in = 0, abc_rega, abc_regb, abc_regc;
  logic              abc_done;

  lecture16_top dut (.*);

  logic [7:0] img [256];
  int checks = 0, failures = 0;
  int n_single = 0, n_full = 0, n_neg = 0, n_restart = 0, n_long_start = 0, n_unaligned = 0;
  int n_acc_steps = 0, n_abc_runs = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int lat(int arch, int k);
    return (arch <= 3) ? 2*k + 1 : (arch == 5) ? k + 2 : 2*k + 2;
  endfunction

  // Random k-node list in img; returns the 15-bit sum. fill 1: all -128.
  function automatic logic [SUM_W-1:0] build(int k, bit aligned, int fill);
    bit used [256];
    int prev = 0, p, tries, sum = 0;
    for (int i = 0; i < 256; i++) begin img[i] = 8'($urandom); used[i] = 0; end
    used[0] = 1; used[1] = 1;
    for (int n = 0; n < k; n++) begin
      if (n > 0) begin
        tries = 0;
        do begin
          p = $urandom_range(254, 2);
          if (aligned) p = p & ~1;
          tries++;
        end while ((used[p] || used[p+1]) && tries < 2000);
        if (used[p] || used[p+1])
          for (p = 2; p < 255; p += (aligned ? 2 : 1)) if (!used[p] && !used[p+1]) break;
        used[p] = 1; used[p+1] = 1;
        img[prev] = 8'(p);
        prev = p;
      end
      if (fill == 1) img[prev+1] = 8'h80;
      sum += int'($signed(img[prev+1]));
    end
    img[prev] = 8'h00;
    if (sum < 0) n_neg++;
    return SUM_W'(sum);
  endfunction

  task automatic load_image();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = img[i];
    end
    @(negedge clk) load_we = 0;
  endtask

  // Run all six on the current image; check_mask selects which to check.
  task automatic run(int k, logic [SUM_W-1:0] exp, logic [5:0] check_mask,
                     int start_len, int restart_at);
    int n;
    int seen [6];
    for (int i = 0; i < 6; i++) seen[i] = -1;
    @(negedge clk) start = 1;
    repeat (start_len) @(negedge clk);
    start = 0;
    if (restart_at > 0) begin
      repeat (restart_at) @(negedge clk);
      start = 1;
      @(negedge clk) start = 0;
      n_restart++;
    end
    n = 0;
    while (n < 600 && (done & check_mask) != check_mask) begin
      @(posedge clk); n++; #1;
      for (int i = 0; i < 6; i++) if (done[i] && seen[i] < 0) seen[i] = n;
    end
    for (int i = 0; i < 6; i++)
      if (check_mask[i]) begin
        check(seen[i] == lat(i + 1, k),
              $sformatf("arch%0d k=%0d DONE after %0d cycles, expected %0d", i + 1, k, seen[i], lat(i + 1, k)));
        check(r[i] == exp,
              $sformatf("arch%0d k=%0d R=%0d expected %0d", i + 1, k, $signed(r[i]), $signed(exp)));
      end
  endtask

  initial begin
    logic [SUM_W-1:0] exp;
    int k;
    // list processors
    exp = build(1, 1, 0);   load_image(); run(1, exp, 6'b111111, 1, 0); n_single++;
    exp = build(128, 1, 1); load_image(); run(128, exp, 6'b111111, 1, 0); n_full++;
    check(exp == SUM_W'(-16384), "reference sum of the full list");
    for (int t = 0; t < 12; t++) begin
      k = $urandom_range(60, 2);
      if (t % 3 == 0) begin
        exp = build(k, 0, 0); load_image(); run(k, exp, 6'b001111, 1, 0); n_unaligned++;
      end else if (t % 3 == 1) begin
        exp = build(k, 1, 0); load_image(); run(k, exp, 6'b111111, 1, $urandom_range(k, 1));
      end else begin
        exp = build(k, 1, 0); load_image(); run(k, exp, 6'b111111, 3, 0); n_long_start++;
      end
    end

    // ACC / R0 / R1 example: load 1, 2, 3 and run one full round
    @(negedge clk);
    acc_load = 1; acc_r0_init = 8'd1; acc_r1_init = 8'd2; acc_acc_init = 8'd3;
    @(negedge clk) acc_load = 0; acc_run = 1;
    @(negedge clk) n_acc_steps++;   // ACC=3+1=4, R1=1
    check(acc_acc == 8'd4 && acc_r1 == 8'd1 && acc_r0 == 8'd1, "acc step 0");
    @(negedge clk) n_acc_steps++;   // ACC=4+1=5, R0=1
    check(acc_acc == 8'd5 && acc_r0 == 8'd1, "acc step 1");
    @(negedge clk) n_acc_steps++;   // R0=5
    check(acc_r0 == 8'd5 && acc_acc == 8'd5 && acc_step == 2'd0, "acc step 2");
    acc_run = 0;

    // regA / regB / regC example: IN = 20 then 22
    @(negedge clk) abc_rst = 0;
    abc_start = 1;
    @(negedge clk) abc_start = 0; abc_in = 8'd20;
    @(negedge clk) abc_in = 8'd22;
    repeat (3) @(negedge clk);
    check(abc_done && abc_rega == 8'd20 && abc_regc == 8'd42 && abc_regb == 8'd42, "abc sequence");
    n_abc_runs++;

    check(n_single > 0, "single-node list never run");
    check(n_full > 0, "full-memory list never run");
    check(n_neg > 0, "negative sum never seen");
    check(n_restart > 0, "restart never happened");
    check(n_long_start > 0, "long START never happened");
    check(n_unaligned > 0, "unaligned list never run");
    check(n_acc_steps == 3 && n_abc_runs > 0, "RT examples not run");
    $display("single=%0d full=%0d negative=%0d restart=%0d long_start=%0d unaligned=%0d acc_steps=%0d abc_runs=%0d",
             n_single, n_full, n_neg, n_restart, n_long_start, n_unaligned, n_acc_steps, n_abc_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
