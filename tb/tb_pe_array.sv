// Test of the PE array wiring: every PE stores its own Parallel Input bit,
// loads it into X, and the Parallel Output is then checked for each KN
// source (own X, n-1, n+1, n-3, n+3; zero beyond the array ends).  The
// TAG of every PE is then loaded from its bit and a write without the T
// bit must reach only the PEs with TAG = 1.
module tb_pe_array;
  import sma_pkg::*;
  localparam int N = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pe_ctrl_t ctrl = PE_CTRL_NOP;
  logic [N-1:0] par_in = '0, par_out, tags;
  int checks = 0, failures = 0;

  pe_array #(.N_PE(N)) dut (.*);

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

  function automatic logic nb(logic [N-1:0] p, int n);
    return (n >= 0 && n < N) ? p[n] : 1'b0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] p, q;
    pe_ctrl_t c;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      p = N'($urandom);
      par_in = p;
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.a_op = A_IN; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.rw = 1'b1; c.mar = 11'd3; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.mar = 11'd3; c.mem_to_x = 1'b1;
      c.y_op = Y_1; c.z_op = Z_0; c.r_op = R_0; step(c);
      for (int s = 0; s < 6; s++) begin
        if (s == 1) continue;
        c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; c.kn_sel = kn_sel_e'(s);
        ctrl = c; #1;
        for (int n = 0; n < N; n++)
          case (s)
            0: check(par_out[n] == p[n], $sformatf("own pe%0d", n));
            2: check(par_out[n] == nb(p, n - 1), $sformatf("n-1 pe%0d", n));
            3: check(par_out[n] == nb(p, n + 1), $sformatf("n+1 pe%0d", n));
            4: check(par_out[n] == nb(p, n - 3), $sformatf("n-3 pe%0d", n));
            default: check(par_out[n] == nb(p, n + 3), $sformatf("n+3 pe%0d", n));
          endcase
      end
      // TAG <- own bit, then a T = 0 write of the new input reaches tagged PEs only
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; c.tag_op = T_ALU; step(c);
      check(tags == p, "tags loaded");
      q = N'($urandom);
      par_in = q;
      c = PE_CTRL_NOP; c.a_op = A_IN; step(c);
      c = PE_CTRL_NOP; c.rw = 1'b1; c.mar = 11'd3; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.mar = 11'd3; c.mem_to_x = 1'b1; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; ctrl = c; #1;
      for (int n = 0; n < N; n++)
        check(par_out[n] == (p[n] ? q[n] : p[n]), $sformatf("gated write pe%0d", n));
      // make every PE enabled again
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; c.y_op = Y_0; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; c.z_op = Z_1; step(c);
      c = PE_CTRL_NOP; c.all_en = 1'b1; c.alu_l_zero = 1'b1; c.tag_op = T_ALU; step(c);
      check(tags == '1, "tags set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
