// Test of one Processing Element driven with hand-built microorders:
// serial input of words into memory, read-back through X and the ALU
// output, a bit-serial addition and subtraction of two words, KN
// neighbour selection, loading Y and Z, and the TAG logic (a PE with
// TAG = 0 ignores microorders unless the T bit is set).
module tb_pe;
  import sma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pe_ctrl_t ctrl = PE_CTRL_NOP;
  logic x_dn1 = 0, x_up1 = 0, x_dn3 = 0, x_up3 = 0, in_bit = 0;
  logic x_out, out_bit, tag;
  int checks = 0, failures = 0;

  pe dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(pe_ctrl_t c);
    @(negedge clk);
    ctrl = c;
    @(posedge clk);
    #1;
  endtask

  function automatic pe_ctrl_t nop(bit all = 1'b1);
    pe_ctrl_t c = PE_CTRL_NOP;
    c.all_en = all;
    return c;
  endfunction

  task automatic write_word(int f, logic [15:0] v, bit all = 1'b1);
    pe_ctrl_t c;
    for (int i = 15; i >= 0; i--) begin
      c = nop(all); c.a_op = A_IN; in_bit = v[15 - i];
      step(c);
      c = nop(all); c.rw = 1'b1; c.mar = 11'({7'(f), 4'(i)});
      step(c);
    end
  endtask

  task automatic read_word(int f, output logic [15:0] v);
    pe_ctrl_t c;
    c = nop(); c.y_op = Y_1; c.z_op = Z_0; c.r_op = R_0; step(c);
    for (int i = 0; i < 16; i++) begin
      c = nop(); c.mar = 11'({7'(f), 4'(i)}); c.mem_to_x = 1'b1; step(c);
      c = nop(); c.alu_l_zero = 1'b1;
      ctrl = c; #1;
      v[15 - i] = out_bit;
      check(x_out == out_bit, "X seen by neighbours");
    end
  endtask

  // dst = a op b, serially, least significant bit first
  task automatic arith(int fa, int fb, int fd, bit sub);
    pe_ctrl_t c;
    c = nop(); c.y_op = Y_1; c.z_op = sub ? Z_1 : Z_0; c.r_op = sub ? R_1 : R_0; step(c);
    for (int i = 15; i >= 0; i--) begin
      c = nop(); c.mar = 11'({7'(fa), 4'(i)}); c.mem_to_l = 1'b1; step(c);
      c = nop(); c.mar = 11'({7'(fb), 4'(i)}); c.mem_to_x = 1'b1; step(c);
      c = nop(); c.a_op = A_ALU; c.r_op = R_CARRY; step(c);
      c = nop(); c.rw = 1'b1; c.mar = 11'({7'(fd), 4'(i)}); step(c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, v;
    pe_ctrl_t c;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(tag == 1'b1, "TAG after reset");
    for (int k = 0; k < 10; k++) begin
      a = 16'($urandom); b = 16'($urandom);
      write_word(5, a); write_word(6, b);
      read_word(5, v); check(v == a, $sformatf("read back %h exp %h", v, a));
      arith(5, 6, 7, 1'b0); read_word(7, v); check(v == a + b, $sformatf("add %h exp %h", v, a + b));
      arith(5, 6, 8, 1'b1); read_word(8, v); check(v == a - b, $sformatf("sub %h exp %h", v, a - b));
    end
    // KN neighbour selection with Y = 1, Z = 0, R = 0, L = 0
    for (int s = 0; s < 6; s++)
      for (int k = 0; k < 8; k++) begin
        {x_dn1, x_up1, x_dn3} = 3'(k); x_up3 = ~x_dn1;
        c = nop(); c.alu_l_zero = 1'b1; c.kn_sel = kn_sel_e'(s); c.src = k[0];
        ctrl = c; #1;
        case (s)
          1: check(out_bit == k[0], "KN src");
          2: check(out_bit == x_dn1, "KN n-1");
          3: check(out_bit == x_up1, "KN n+1");
          4: check(out_bit == x_dn3, "KN n-3");
          5: check(out_bit == x_up3, "KN n+3");
          default: ;
        endcase
      end
    // Y from L: L = 0 makes the KN operand zero
    write_word(9, 16'h8000);
    c = nop(); c.mar = 11'({7'd9, 4'd1}); c.mem_to_l = 1'b1; c.mem_to_x = 1'b1; step(c);
    c = nop(); c.y_op = Y_L; step(c);
    c = nop(); c.alu_l_zero = 1'b1; ctrl = c; #1;
    check(out_bit == 1'b0, "Y from L = 0 gates X");
    // TAG: ALU result 0 -> TAG, then microorders without T are ignored
    c = nop(); c.alu_l_zero = 1'b1; c.tag_op = T_ALU; step(c);
    check(tag == 1'b0, "TAG loaded from ALU");
    write_word(10, 16'h1234);
    write_word(10, 16'hFFFF, 1'b0);          // ignored: TAG = 0, T = 0
    read_word(10, v); check(v == 16'h1234, "disabled PE did not write");
    c = nop(1'b0); c.tag_op = T_CPL; step(c);
    check(tag == 1'b0, "disabled PE keeps TAG");
    c = nop(1'b1); c.tag_op = T_CPL; step(c);
    check(tag == 1'b1, "T = 1 complements TAG");
    write_word(10, 16'h00FF, 1'b0);          // enabled now
    read_word(10, v); check(v == 16'h00FF, "enabled PE wrote");
    // Z loaded from ALU output (used by division)
    c = nop(); c.mar = 11'({7'd10, 4'd15}); c.mem_to_x = 1'b1; c.y_op = Y_1; c.r_op = R_0; c.z_op = Z_0; step(c);
    c = nop(); c.alu_l_zero = 1'b1; c.z_op = Z_ALU; step(c);
    c = nop(); c.alu_l_zero = 1'b1; ctrl = c; #1;
    check(out_bit == 1'b0, "Z = 1 from ALU inverts the operand");
    // R loaded from the ALU output (per-PE carry-in preset, division).
    // X = 1 here.  With Y = 1, Z = 1, R = 0 the sum is 0 and goes to R;
    // with Y = 0, Z = 0 the output then shows R.  Again with Z = 0: sum 1.
    c = nop(); c.z_op = Z_1; c.r_op = R_0; step(c);
    c = nop(); c.alu_l_zero = 1'b1; c.r_op = R_SUM; step(c);
    c = nop(); c.y_op = Y_0; c.z_op = Z_0; step(c);
    c = nop(); c.alu_l_zero = 1'b1; ctrl = c; #1;
    check(out_bit == 1'b0, "R from ALU = 0");
    c = nop(); c.y_op = Y_1; step(c);
    c = nop(); c.alu_l_zero = 1'b1; c.r_op = R_SUM; step(c);
    c = nop(); c.y_op = Y_0; step(c);
    c = nop(); c.alu_l_zero = 1'b1; ctrl = c; #1;
    check(out_bit == 1'b1, "R from ALU = 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
