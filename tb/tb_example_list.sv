// Runs the four-node example list on lecture16_top at its default
// parameters. The list starts at 0 and continues at 0x05, 0x0E and 0x0A,
// whose pointer is 0:
//   Mem[0x00]=0x05 Mem[0x01]=X0   Mem[0x05]=0x0E Mem[0x06]=X1
//   Mem[0x0E]=0x0A Mem[0x0F]=X2   Mem[0x0A]=0x00 Mem[0x0B]=X3
// with X0..X3 = 7, -3, 100, -50 (sum 54); every other byte is random.
// Architectures 1-4 must return 54, after 9 cycles (1-3) and 10 cycles (4).
// The aligned variants are not checked: node 0x05 is at an odd address.
module tb_example_list;
  import lp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              start = 0, load_we = 0;
  logic [7:0]        load_addr, load_data;
  logic [5:0]        done;
  logic [SUM_W-1:0]  r [6];
  logic [7:0]        acc_r0, acc_r1, acc_acc, abc_rega, abc_regb, abc_regc;
  logic [1:0]        acc_step;
  logic              abc_done;

  lecture16_top dut (
    .clk, .start, .load_we, .load_addr, .load_data, .done, .r,
    .acc_load(1'b0), .acc_run(1'b0), .acc_r0_init(8'd0), .acc_r1_init(8'd0), .acc_acc_init(8'd0),
    .acc_r0, .acc_r1, .acc_acc, .acc_step,
    .abc_rst(1'b1), .abc_start(1'b0), .abc_in(8'd0),
    .abc_rega, .abc_regb, .abc_regc, .abc_done);

  logic [7:0] img [256];
  int checks = 0, failures = 0;
  int seen [4];
  int n;

  initial begin
    for (int i = 0; i < 256; i++) img[i] = 8'($urandom);
    img[8'h00] = 8'h05; img[8'h01] = 8'd7;
    img[8'h05] = 8'h0E; img[8'h06] = 8'($signed(-3));
    img[8'h0E] = 8'h0A; img[8'h0F] = 8'd100;
    img[8'h0A] = 8'h00; img[8'h0B] = 8'($signed(-50));
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) load_we = 1; load_addr = 8'(i); load_data = img[i];
    end
    @(negedge clk) load_we = 0; start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 4; i++) seen[i] = -1;
    n = 0;
    while (n < 100 && done[3:0] != 4'b1111) begin
      @(posedge clk); n++; #1;
      for (int i = 0; i < 4; i++) if (done[i] && seen[i] < 0) seen[i] = n;
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (r[i] != SUM_W'(54)) begin
        failures++; $display("FAIL arch%0d R=%0d expected 54", i + 1, $signed(r[i]));
      end
      if (seen[i] != ((i == 3) ? 10 : 9)) begin
        failures++; $display("FAIL arch%0d DONE after %0d cycles", i + 1, seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
