// KN select network of a Processing Element.
//
// Picks the second ALU operand from six sources: the PE's own X register,
// the constant bit SRC broadcast by the ACU, or the X register of PE n-1,
// n+1, n-3 or n+3, and ANDs it with register Y.  Y is 1 for ordinary
// arithmetic and carries the current multiplier bit during multiplication,
// so a 0 in Y turns the operand into zero.  The first ALU operand is L,
// or 0 when the microorder names 0 as the first operand.
//
// Combinational.  The list of sources is taken from the PE block diagram;
// the encoding of the select is this design's own.
module pe_kn
  import sma_pkg::*;
(
  input  kn_sel_e sel,
  input  logic    l_zero,  // use 0 instead of L
  input  logic    l,
  input  logic    x,
  input  logic    src,
  input  logic    x_dn1,
  input  logic    x_up1,
  input  logic    x_dn3,
  input  logic    x_up3,
  input  logic    y,
  output logic    op_a,    // to ALU operand a
  output logic    op_b     // to ALU operand b
);
  logic pick;
  always_comb begin
    unique case (sel)
      KN_OWN:  pick = x;
      KN_SRC:  pick = src;
      KN_DN1:  pick = x_dn1;
      KN_UP1:  pick = x_up1;
      KN_DN3:  pick = x_dn3;
      KN_UP3:  pick = x_up3;
      default: pick = 1'b0;
    endcase
    op_b = pick & y;
    op_a = l_zero ? 1'b0 : l;
  end
endmodule
