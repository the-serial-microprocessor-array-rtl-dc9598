// Exhaustive test of the KN select network: every source selection with
// every combination of the seven data inputs, Y and the zero-L control.
module tb_pe_kn;
  import sma_pkg::*;
  kn_sel_e sel;
  logic l_zero, l, x, src, x_dn1, x_up1, x_dn3, x_up3, y, op_a, op_b;
  int checks = 0, failures = 0;

  pe_kn dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] v;
    logic       e;
    for (int s = 0; s < 6; s++)
      for (int k = 0; k < 512; k++) begin
        sel = kn_sel_e'(s);
        v = 9'(k);
        {l_zero, l, x, src, x_dn1, x_up1, x_dn3, x_up3, y} = v;
        #1;
        case (s)
          0: e = x;   1: e = src;   2: e = x_dn1;
          3: e = x_up1; 4: e = x_dn3; default: e = x_up3;
        endcase
        checks++;
        if (op_b != (e & y) || op_a != (l & ~l_zero)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d v=%b a=%b b=%b", s, v, op_a, op_b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
