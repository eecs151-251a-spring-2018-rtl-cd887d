// Testbench of lp_ctrl, the one-hot controller of architectures 1-3.
//
// Drives START and NEXT_ZERO with random values (START rare, so that runs
// reach DONE) and compares every control output, every cycle, with a
// reference state machine written here from the state table:
//   START: LD_SUM, LD_NEXT        COMPUTE_SUM: LD_SUM, SUM_SEL, A_SEL, ADD_SEL
//   GET_NEXT: LD_NEXT, NEXT_SEL   DONE: DONE
// Counts how often each state and each transition kind was visited and
// fails if one never happened.
module tb_lp_ctrl;
  import lp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     start, next_zero;
  lp_ctrl_t ctl;

  lp_ctrl dut (.clk, .start, .next_zero, .ctl);

  typedef enum {M_START, M_COMP, M_GET, M_DONE} mstate_t;
  mstate_t m;
  int checks = 0, failures = 0;
  int visits [4];
  int n_restart = 0;

  function automatic lp_ctrl_t expect_ctl(mstate_t st);
    lp_ctrl_t c = '0;
    case (st)
      M_START: begin c.ld_sum = 1; c.ld_next = 1; end
      M_COMP:  begin c.ld_sum = 1; c.sum_sel = 1; c.a_sel = 1; c.add_sel = 1; end
      M_GET:   begin c.ld_next = 1; c.next_sel = 1; end
      M_DONE:  c.done = 1;
    endcase
    return c;
  endfunction

  initial begin
    start = 1'b1; next_zero = 1'b0;
    @(posedge clk); #1;
    m = M_START;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (ctl !== expect_ctl(m)) begin
        failures++;
        $display("FAIL cycle %0d state %s ctl %b expected %b", i, m.name(), ctl, expect_ctl(m));
      end
      visits[m]++;
      @(negedge clk);
      start     = ($urandom_range(29, 0) == 0);
      next_zero = ($urandom_range(3, 0) == 0);
      @(posedge clk); #1;
      if (start) begin
        if (m != M_START && m != M_DONE) n_restart++;
        m = M_START;
      end else
        case (m)
          M_START: m = M_COMP;
          M_COMP:  m = M_GET;
          M_GET:   m = next_zero ? M_DONE : M_COMP;
          M_DONE:  m = M_DONE;
        endcase
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    checks++;
    if (n_restart == 0) begin failures++; $display("FAIL no restart in mid-run"); end
    $display("visits START=%0d COMPUTE_SUM=%0d GET_NEXT=%0d DONE=%0d restarts=%0d",
             visits[0], visits[1], visits[2], visits[3], n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
