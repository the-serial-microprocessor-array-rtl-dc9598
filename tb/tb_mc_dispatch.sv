// Test of the Master Computer dispatch stage: random array instructions
// and register values, random back-pressure; every AFB word that comes out
// is compared field by field with addresses computed here
// (Y + X*R1 + R0 modulo 128, N1/N3 passed for the N-format opcodes).
module tb_mc_dispatch;
  import sma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  instr_t instr = '0;
  logic [15:0] r0 = '0, r1 = '0, r2 = '0, r3 = '0, r4 = '0;
  afb_word_t out_word;
  afb_word_t expq [$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  mc_dispatch dut (.*);

  function automatic afb_word_t expect_word();
    afb_word_t w;
    w.op = instr.op; w.t = instr.t;
    w.f1 = 7'((int'(instr.y1) + (instr.x1 ? int'(r1) : 0) + int'(r0)) % 128);
    if (op_uses_n(instr.op)) w.f2 = {instr.x2, instr.y2};
    else w.f2 = {1'b0, 7'((int'(instr.y2) + (instr.x2 ? int'(r1) : 0) + int'(r0)) % 128)};
    w.f3 = 7'((int'(instr.y3) + (instr.x3 ? int'(r1) : 0) + int'(r0)) % 128);
    w.co = r2; w.l1 = r3[3:0]; w.l2 = r4[3:0];
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  opcode_e ops [] = '{OP_ADD, OP_SB, OP_SHL, OP_TQ, OP_ANDB, OP_MSBD3, OP_IN, OP_TST};

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin expq.push_back(expect_word()); sent++; end
    if (out_valid && out_ready) begin
      checks++; got++;
      if (expq.size() == 0 || out_word != expq[0]) begin
        failures++;
        $display("FAIL got %h", out_word);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      out_ready = 1'($urandom);
      if (!in_valid || in_ready) begin
        // the previous instruction (if any) was taken at the last edge
        instr = instr_t'($urandom);
        instr.op = ops[$urandom_range(ops.size() - 1)];
        r0 = 16'($urandom); r1 = 16'($urandom); r2 = 16'($urandom);
        r3 = 16'($urandom); r4 = 16'($urandom);
        in_valid = 1'($urandom);
      end
    end
    @(negedge clk); in_valid = 1'b0; out_ready = 1'b1;
    repeat (4) @(posedge clk);
    checks++;
    if (got != sent || got < 50) begin
      failures++;
      $display("FAIL sent %0d got %0d", sent, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
