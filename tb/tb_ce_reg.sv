// Testbench of ce_reg: random data and clock enables; the register must
// take d on an edge with ce=1 and keep its value on an edge with ce=0.
module tb_ce_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        ce;
  logic [11:0] d, q, model;
  int checks = 0, failures = 0, n_load = 0, n_hold = 0;

  ce_reg #(.W(12)) dut (.clk, .ce, .d, .q);

  initial begin
    ce = 1'b1; d = '0;
    @(posedge clk); #1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce = 1'($urandom);
      d  = 12'($urandom);
      @(posedge clk); #1;
      if (ce) begin model = d; n_load++; end else n_hold++;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d ce=%b q=%h expected %h", i, ce, q, model);
      end
    end
    checks++;
    if (n_load == 0 || n_hold == 0) failures++;
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
