// Test of the asynchronous FIFO buffer with unrelated write and read
// clocks (10 ns and 7.3 ns): 500 random words pushed and popped with random
// gaps on both sides must come out complete and in order; the FIFO must
// report full at least once (the reader pauses) and never accept a write
// when full.
module tb_afb;
  localparam int W = 54;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  always #5 wclk = ~wclk;
  always #3.65 rclk = ~rclk;
  logic wr = 1'b0, rd = 1'b0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, nfull = 0, got = 0;

  afb dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : writer
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    for (int k = 0; k < 500; ) begin
      @(negedge wclk);
      if (full) nfull++;
      if (!full && $urandom_range(3) != 0) begin
        wr = 1'b1; wdata = {22'($urandom), 32'($urandom)};
        sent.push_back(wdata);
        k++;
      end else wr = 1'b0;
    end
    @(negedge wclk); wr = 1'b0;
  end

  initial begin : reader
    @(posedge rrst_n);
    while (got < 500) begin
      @(negedge rclk);
      if (!empty && $urandom_range(2) != 0) begin
        rd = 1'b1;
        checks++;
        if (sent.size() == 0 || rdata != sent[0]) begin
          failures++;
          $display("FAIL word %0d", got);
        end
        if (sent.size() > 0) void'(sent.pop_front());
        got++;
      end else rd = 1'b0;
      // pause now and then so that the FIFO fills up
      if (got > 100 && got < 110) begin
        @(negedge rclk); rd = 1'b0;
        repeat (40) @(negedge rclk);
      end
    end
    @(negedge rclk); rd = 1'b0;
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
