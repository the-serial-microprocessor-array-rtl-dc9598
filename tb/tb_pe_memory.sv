// Test of the PE bit memory: fills all 2048 cells with a random pattern,
// reads every cell back, then mixes random single-bit writes and reads
// against a shadow copy.
module tb_pe_memory;
  logic clk = 1'b0, we = 1'b0, wdata = 1'b0, rdata;
  logic [10:0] addr = '0;
  logic shadow [2048];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pe_memory dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      addr = 11'(i); wdata = 1'($urandom); we = 1'b1; shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      addr = 11'(i);
      #1;
      checks++;
      if (rdata != shadow[i]) failures++;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      addr = 11'($urandom);
      we = 1'($urandom);
      wdata = 1'($urandom);
      #1;
      checks++;
      if (rdata != shadow[addr]) failures++;
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
