// Local bit-addressed memory M of a Processing Element.
//
// BITS one-bit cells addressed by the ACU's memory address register MAR,
// seen by the microprograms as BITS/16 words of 16 bits: address =
// {word, bit index}.  The memory has the same cycle time as the serial
// unit: every clock it either reads the addressed bit (rdata, valid during
// the clock in which addr is presented, latched into X or L at its end) or,
// when we is high, writes wdata (register A) at the clock edge.
//
// The 2048-bit size is the published maximum.  Asynchronous read from a
// registered address is this design's model of "one access per clock";
// contents are not reset.
module pe_memory #(
  parameter int unsigned BITS = 2048,
  parameter int unsigned AW   = $clog2(BITS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic          wdata,
  output logic          rdata
);
  logic mem [BITS];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
