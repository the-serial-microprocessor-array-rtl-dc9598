// Exhaustive test of the one-bit adder/subtractor: all 16 input
// combinations against the arithmetic sum a + (b xor z) + cin, and a
// 12-bit serial subtraction driven bit by bit, LSB first, with the carry
// fed back as register R does.
module tb_pe_alu;
  logic a, b, z, cin, sum, cout;
  int checks = 0, failures = 0;

  pe_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] x, y, d;
    logic        r;
    int          s;
    for (int k = 0; k < 16; k++) begin
      {a, b, z, cin} = 4'(k);
      #1;
      s = int'(a) + int'(b ^ z) + int'(cin);
      checks++;
      if ({cout, sum} != 2'(s)) begin
        failures++;
        $display("FAIL a=%b b=%b z=%b c=%b -> %b%b", a, b, z, cin, cout, sum);
      end
    end
    for (int t = 0; t < 50; t++) begin
      x = 12'($urandom); y = 12'($urandom);
      z = 1'b1; r = 1'b1;
      for (int i = 0; i < 12; i++) begin
        a = x[i]; b = y[i]; cin = r;
        #1;
        d[i] = sum; r = cout;
      end
      checks++;
      if (d != 12'(x - y)) begin
        failures++;
        $display("FAIL serial %h - %h = %h", x, y, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
