// Testbench of list_mem: an 8-bit x 256 instance and a 16-bit x 128 instance
// with byte enables. Random writes are mirrored in a model; random reads
// check that the read data appears combinationally, in the same cycle as
// the address, and that disabled byte lanes are left unchanged.
module tb_list_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, d8, wd8;
  logic        we8;
  logic [6:0]  a16;
  logic [15:0] d16, wd16;
  logic [1:0]  be16;
  logic        we16;
  logic [7:0]  m8  [256];
  logic [15:0] m16 [128];
  int checks = 0, failures = 0;

  list_mem #(.DATA_W(8),  .ADDR_W(8)) u8  (.clk, .a(a8),  .d(d8),  .we(we8),  .be(1'b1), .wd(wd8));
  list_mem #(.DATA_W(16), .ADDR_W(7)) u16 (.clk, .a(a16), .d(d16), .we(we16), .be(be16), .wd(wd16));

  initial begin
    we8 = 0; we16 = 0;
    // fill everything once
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we8 = 1; a8 = 8'(i); wd8 = 8'($urandom); m8[i] = wd8;
      we16 = (i < 128); a16 = 7'(i); be16 = 2'b11; wd16 = 16'($urandom);
      if (i < 128) m16[i] = wd16;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we8 = 1'($urandom); a8 = 8'($urandom); wd8 = 8'($urandom);
      we16 = 1'($urandom); a16 = 7'($urandom); be16 = 2'($urandom); wd16 = 16'($urandom);
      #1;
      checks += 2;
      if (d8 !== m8[a8])   begin failures++; $display("FAIL 8-bit read %h", a8); end
      if (d16 !== m16[a16]) begin failures++; $display("FAIL 16-bit read %h", a16); end
      @(posedge clk);
      if (we8) m8[a8] = wd8;
      if (we16) begin
        if (be16[0]) m16[a16][7:0]  = wd16[7:0];
        if (be16[1]) m16[a16][15:8] = wd16[15:8];
      end
    end
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
