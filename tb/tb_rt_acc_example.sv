// Testbench of rt_acc_example. Loads random initial values, runs the
// three-step sequence with run toggled at random, and checks R0, R1, ACC
// and the step number after every edge against the transfers
//   ACC<-ACC+R0, R1<-R0;  ACC<-ACC+R1, R0<-R1;  R0<-ACC;
// computed here. Counts each step and each hold and fails if one never
// happened.
module tb_rt_acc_example;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       load, run;
  logic [7:0] r0_init, r1_init, acc_init, r0, r1, acc;
  logic [1:0] step;
  logic [7:0] m_r0, m_r1, m_acc;
  int         m_step;
  int checks = 0, failures = 0;
  int n_step [3];
  int n_hold = 0, n_load = 0;

  rt_acc_example dut (.clk, .load, .run, .r0_init, .r1_init, .acc_init, .r0, .r1, .acc, .step);

  initial begin
    load = 0; run = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = (i == 0) || ($urandom_range(40, 0) == 0);
      run  = ($urandom_range(3, 0) != 0);
      r0_init = 8'($urandom); r1_init = 8'($urandom); acc_init = 8'($urandom);
      @(posedge clk); #1;
      if (load) begin
        m_r0 = r0_init; m_r1 = r1_init; m_acc = acc_init; m_step = 0; n_load++;
      end else if (run) begin
        n_step[m_step]++;
        case (m_step)
          0: begin m_acc = m_acc + m_r0; m_r1 = m_r0; end
          1: begin m_acc = m_acc + m_r1; m_r0 = m_r1; end
          2: m_r0 = m_acc;
        endcase
        m_step = (m_step + 1) % 3;
      end else n_hold++;
      checks++;
      if (r0 !== m_r0 || r1 !== m_r1 || acc !== m_acc || step !== 2'(m_step)) begin
        failures++;
        $display("FAIL cycle %0d: r0=%h r1=%h acc=%h step=%0d expected %h %h %h %0d",
                 i, r0, r1, acc, step, m_r0, m_r1, m_acc, m_step);
      end
    end
    checks++;
    if (n_step[0] == 0 || n_step[1] == 0 || n_step[2] == 0 || n_hold == 0 || n_load < 2) failures++;
    $display("steps %0d %0d %0d holds %0d loads %0d", n_step[0], n_step[1], n_step[2], n_hold, n_load);
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
