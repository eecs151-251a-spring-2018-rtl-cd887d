// Testbench of rt_abc_example. Runs the sequence
//   regA<-IN; regB<-IN; regC<-regA+regB; regB<-regC;
// many times with a new random IN every cycle, and checks that it takes
// exactly four cycles from the start edge to done, that regA and regB
// captured IN in the first and second cycles, and that regC and the final
// regB equal their sum.
module tb_rt_abc_example;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, start, done;
  logic [7:0] in, rega, regb, regc, in1, in2;
  int checks = 0, failures = 0, n_runs = 0;

  rt_abc_example dut (.clk, .rst, .start, .in, .rega, .regb, .regc, .done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    rst = 1; start = 0; in = 0;
    @(negedge clk) rst = 0;
    check(done, "idle after reset");
    for (int t = 0; t < 200; t++) begin
      repeat ($urandom_range(3, 0)) @(negedge clk);
      start = 1; in = 8'($urandom);
      @(negedge clk) start = 0;
      in1 = 8'($urandom); in = in1;    // sampled by regA<-IN
      @(negedge clk);
      in2 = 8'($urandom); in = in2;    // sampled by regB<-IN
      n = 0;
      do begin @(negedge clk); in = 8'($urandom); n++; end while (!done && n < 20);
      check(n == 3, $sformatf("sequence took %0d cycles after regB<-IN", n + 1));
      check(rega == in1, "regA");
      check(regc == 8'(in1 + in2), "regC = regA + regB");
      check(regb == regc, "regB <- regC");
      n_runs++;
    end
    check(n_runs > 0, "no run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
