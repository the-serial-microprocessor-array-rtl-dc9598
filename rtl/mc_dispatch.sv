// Array-instruction dispatch stage of the Master Computer.
//
// For every array instruction the Master Computer computes the physical
// operand addresses and packs everything the ACU needs into one AFB word:
//   logical address  = Yi            when Xi = 0
//                    = Yi + R1       when Xi = 1   (R1: index register)
//   physical address = logical + R0                (R0: base register)
// all modulo 128 words, so a working area that slides by advancing R0
// wraps around the PE memory.  CO is R2 (constant for all PEs), L1 and L2
// are the rightmost four bits of R3 and R4 (operand length minus one).
// For SHL, SHR, TQ, TCQ, LOT, ANDB, ORB and CMB the F2 field carries N1 and
// N3 unchanged instead of an address; input/output instructions use only
// F1 (F2 and F3 are passed as computed but unused).
//
// Interface: one instruction is accepted when in_valid and in_ready are
// both high; the AFB word is held in an output register (out_valid) until
// out_ready (AFB not full).  One instruction per clock at full rate.
// The address arithmetic and register roles follow the published system;
// the handshake and the register stage are this design's.
module mc_dispatch
  import sma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  instr_t      instr,
  input  logic [15:0] r0,      // base register
  input  logic [15:0] r1,      // index register
  input  logic [15:0] r2,      // common operand CO
  input  logic [15:0] r3,      // L1 in bits [3:0]
  input  logic [15:0] r4,      // L2 in bits [3:0]
  output logic        out_valid,
  input  logic        out_ready,
  output afb_word_t   out_word
);
  afb_word_t w;

  function automatic logic [6:0] phys(input logic x, input logic [6:0] y,
                                      input logic [15:0] base, input logic [15:0] index);
    return y + (x ? index[6:0] : 7'd0) + base[6:0];
  endfunction

  always_comb begin
    w.op = instr.op;
    w.t  = instr.t;
    w.f1 = phys(instr.x1, instr.y1, r0, r1);
    if (op_uses_n(instr.op)) w.f2 = {instr.x2, instr.y2};        // N1, N3
    else                     w.f2 = {1'b0, phys(instr.x2, instr.y2, r0, r1)};
    w.f3 = phys(instr.x3, instr.y3, r0, r1);
    w.co = r2;
    w.l1 = r3[3:0];
    w.l2 = r4[3:0];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_word <= w;
    end
  end
endmodule
