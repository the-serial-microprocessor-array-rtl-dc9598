// One-bit serial full adder/subtractor of a Processing Element.
//
// Computes  a * b  where * is addition when z = 0 and subtraction when
// z = 1.  Subtraction is done in two's complement by inverting b and
// relying on the carry register R having been preset to 1 before the
// least significant bit; the carry out goes back into R for the next bit.
// The operands reach the ALU through the KN network: a is L (or 0) and b is
// the AND of a selected X bit with register Y, so with Y = 0 the ALU adds
// zero (this is how the multiply steps skip a partial product).
//
// Purely combinational; sum and carry are valid in the same clock as the
// inputs.  Add/subtract control by Z and the carry register follow the
// published PE description; the inverted-b form of subtraction is this
// design's reading of it.
module pe_alu (
  input  logic a,      // first operand (L or 0)
  input  logic b,      // second operand (X AND Y from KN)
  input  logic z,      // 0: add, 1: subtract
  input  logic cin,    // register R
  output logic sum,    // result bit, goes to A, Z, TAG and Output
  output logic cout    // carry r, goes to R
);
  logic bb;
  always_comb begin
    bb   = b ^ z;
    sum  = a ^ bb ^ cin;
    cout = (a & bb) | (a & cin) | (bb & cin);
  end
endmodule
