// Array Control Unit (ACU) of the Serial Microprocessor Array.
//
// The ACU takes one 54-bit AFB word at a time, keeps its fields in the
// registers SOP, ST, SF1, SF2, SF3, SCO, SL1 and SL2, and then runs the
// microprogram for the opcode.  Each clock it broadcasts one bundle of
// microorders (pe_ctrl_t) to all PEs, updates its own registers I, J
// (bit counters), MAR (11-bit memory address {word, bit}), RW (1 = write
// next clock) and SRC (the constant bit for the KN network), and picks the
// next microinstruction out of two alternatives.
//
// Microinstruction semantics: every transfer in one microinstruction reads
// the values registers had at the start of the clock, so "(SF1,I) -> MAR"
// and "I-1 -> I" in the same word use the old I, and a jump condition tests
// the old I or J.  A memory read in a clock uses the MAR loaded by the
// previous microinstruction; a memory write in a clock happens when RW was
// set by a previous microinstruction.  Address 0 of the control store is hC:
// it waits for the AFB to be non-empty, pops one word and jumps to the
// entry point of the opcode.  An instruction therefore takes one fetch
// clock plus its microprogram; the add loop takes three clocks per bit.
//
// Follows the published microprogram for AD (shared here by SB, ADC, SBC,
// ADU1, SBU1, ADD1, SBD1) and TST/TRT (with R preset to 0 so that equality
// counts as "greater or equal").  MUL/MULC keep the published scheme
// (shift-and-add of F1 into a partial product in the working word IR, one
// pass per multiplier bit, the sign bit subtracted last) but preset the
// carry for that last subtraction, so the result is exactly
// floor(F1 * F2 / 2^L2); the multiplier is first copied into IL so that
// MUL and MULC share one loop.  DIV keeps the published non-restoring
// scheme (Z loaded per PE from a sign comparison, remainder in IL) in this
// design's own microcode; its quotient is within one unit of F1/F2 when
// |F1| < |F2|.  The other microprograms, the counter width (sign and
// overflow bit added to the 4-bit I and J), the SRC mechanism, the IR/IL
// word addresses (126/127) and the I/O strobe are this design's own.
// Unknown opcodes are dropped at fetch.
module acu
  import sma_pkg::*;
#(
  parameter logic [WADDR_W-1:0] IR_WORD = 7'd126,  // microprogram work word IR
  parameter logic [WADDR_W-1:0] IL_WORD = 7'd127   // microprogram work word IL
) (
  input  logic       clk,
  input  logic       rst_n,
  // AFB read side (first-word-fall-through)
  input  logic       afb_empty,
  input  afb_word_t  afb_rdata,
  output logic       afb_rd,
  // broadcast to the PE array
  output pe_ctrl_t   ctrl,
  // serial I/O timing: high in the clock in which PEs take (IN) or present
  // (OUT) bit io_idx of the addressed word
  output logic       io_strobe,
  output logic [3:0] io_idx,
  output logic       idle,        // in hC with nothing to fetch
  output logic       fetch        // an AFB word is taken this clock
);

  // -------------------------------------------------------- control store
  function automatic uinstr_t ucode(input logic [UADDR_W-1:0] a);
    uinstr_t u;
    u = '{i_op: I_HOLD, i_delta: 3'sd0, j_op: J_HOLD, j_delta: 3'sd0,
          mar_base: MB_HOLD, mar_idx: MI_I, rw_op: RW_HOLD, mem_to_l: 1'b0,
          mem_to_x: 1'b0, y_op: Y_HOLD, z_op: Z_HOLD, r_op: R_HOLD,
          a_op: A_HOLD, alu_l_zero: 1'b0, kn_opc: 1'b0, tag_op: T_HOLD,
          io_strobe: 1'b0, cond: C_ALWAYS, next_t: a + 8'd1, next_f: a + 8'd1};
    case (a)
      // ---- AD family: F1 * src(F2) -> F3, three clocks per bit
      UA_ADD+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_OPC; u.r_op = R_OPC; end
      UA_ADD+1: begin u.mar_base = MB_SF1; end
      UA_ADD+2: begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.mar_base = MB_SF2; u.mem_to_l = 1'b1; end
      UA_ADD+3: begin u.i_op = I_ADD; u.i_delta = 3'sd1;  u.mar_base = MB_SF1; u.mem_to_x = 1'b1; end
      UA_ADD+4: begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.rw_op = RW_1; u.mar_base = MB_SF3;
                      u.mem_to_l = 1'b1; u.a_op = A_ALU; u.r_op = R_CARRY; u.kn_opc = 1'b1; end
      UA_ADD+5: begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.rw_op = RW_0; u.mar_base = MB_SF2;
                      u.cond = C_I_GE0; u.next_t = UA_ADD+3; u.next_f = UA_FETCH; end
      // ---- move-and-add family, two passes so that the carry of the
      //      addition is never disturbed by the move:
      //      pass 1: F2 * nbr(F1) -> F2 ;  pass 2: nbr(F1) -> F3
      UA_M3+0:  begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_OPC; u.r_op = R_OPC; end
      UA_M3+1:  begin u.mar_base = MB_SF2; end
      UA_M3+2:  begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.mar_base = MB_SF1; u.mem_to_l = 1'b1; end
      UA_M3+3:  begin u.i_op = I_ADD; u.i_delta = 3'sd1;  u.mar_base = MB_SF2; u.mem_to_x = 1'b1; end
      UA_M3+4:  begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.rw_op = RW_1; u.mar_base = MB_SF2;
                      u.mem_to_l = 1'b1; u.a_op = A_ALU; u.r_op = R_CARRY; u.kn_opc = 1'b1; end
      UA_M3+5:  begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.rw_op = RW_0; u.mar_base = MB_SF1;
                      u.cond = C_I_GE0; u.next_t = UA_M3+3; u.next_f = UA_M3+6; end
      UA_M3+6:  begin u.i_op = I_SL1; u.z_op = Z_0; u.r_op = R_0; end
      UA_M3+7:  begin u.mar_base = MB_SF1; end
      UA_M3+8:  begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_M3+9:  begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; u.kn_opc = 1'b1; end
      UA_M3+10: begin u.rw_op = RW_0; u.mar_base = MB_SF1; u.cond = C_I_GE0;
                      u.next_t = UA_M3+8; u.next_f = UA_FETCH; end
      // ---- TRAN: F1 -> F3
      UA_TRAN+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_TRAN+1: begin u.mar_base = MB_SF1; end
      UA_TRAN+2: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_TRAN+3: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_TRAN+4: begin u.rw_op = RW_0; u.mar_base = MB_SF1; u.cond = C_I_GE0;
                       u.next_t = UA_TRAN+2; u.next_f = UA_FETCH; end
      // ---- SHL: dst[j] = src[j+N1] (j+N1 <= L1), zeros below; I reads, J writes
      UA_SHL+0: begin u.i_op = I_N1; u.j_op = J_ZERO; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_SHL+1: begin u.mar_base = MB_SF1; u.cond = C_I_LE_SL1; u.next_t = UA_SHL+2; u.next_f = UA_SHL+5; end
      UA_SHL+2: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.mar_idx = MI_J;
                      u.i_op = I_ADD; u.i_delta = 3'sd1; end
      UA_SHL+3: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_SHL+4: begin u.rw_op = RW_0; u.j_op = J_ADD; u.j_delta = 3'sd1; u.mar_base = MB_SF1;
                      u.cond = C_I_LE_SL1; u.next_t = UA_SHL+2; u.next_f = UA_SHL+5; end
      UA_SHL+5: begin u.y_op = Y_0; u.cond = C_J_LE_SL1; u.next_t = UA_SHL+6; u.next_f = UA_FETCH; end
      UA_SHL+6: begin u.mar_base = MB_SF3; u.mar_idx = MI_J; u.rw_op = RW_1; u.j_op = J_ADD;
                      u.j_delta = 3'sd1; u.alu_l_zero = 1'b1; u.a_op = A_ALU; end
      UA_SHL+7: begin u.rw_op = RW_0; u.cond = C_J_LE_SL1; u.next_t = UA_SHL+6; u.next_f = UA_FETCH; end
      // ---- SHR: dst[j] = src[max(j-N1,0)]; J writes from L1 down, I reads
      UA_SHR+0: begin u.i_op = I_SL1_MN1; u.j_op = J_SL1; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_SHR+1: begin u.mar_base = MB_SF1; u.mar_idx = MI_ICLAMP; end
      UA_SHR+2: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.mar_idx = MI_J;
                      u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_SHR+3: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_SHR+4: begin u.rw_op = RW_0; u.j_op = J_ADD; u.j_delta = -3'sd1; u.mar_base = MB_SF1;
                      u.mar_idx = MI_ICLAMP; u.cond = C_J_GT0; u.next_t = UA_SHR+2; u.next_f = UA_FETCH; end
      // ---- TST / TRT: L = F2, X = F1, ALU = F2 - F1 - 1, sign -> TAG
      UA_TST+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_1; u.r_op = R_0; end
      UA_TST+1: begin u.mar_base = MB_SF2; end
      UA_TST+2: begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.mar_base = MB_SF1; u.mem_to_l = 1'b1; end
      UA_TST+3: begin u.mar_base = MB_SF2; u.mem_to_x = 1'b1; u.cond = C_I_GE0;
                      u.next_t = UA_TST+4; u.next_f = UA_TST+5; end
      UA_TST+4: begin u.i_op = I_ADD; u.i_delta = -3'sd1; u.mar_base = MB_SF1; u.mem_to_l = 1'b1;
                      u.a_op = A_ALU; u.r_op = R_CARRY; u.next_t = UA_TST+3; u.next_f = UA_TST+3; end
      UA_TST+5: begin u.tag_op = T_OPC; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- TCST / TCRT: L = F1, SRC = CO, ALU = F1 - CO, sign -> TAG
      UA_TCST+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_1; u.r_op = R_1; end
      UA_TCST+1: begin u.mar_base = MB_SF1; end
      UA_TCST+2: begin u.mem_to_l = 1'b1; u.mem_to_x = 1'b1; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_TCST+3: begin u.mar_base = MB_SF1; u.cond = C_I_GE0; u.next_t = UA_TCST+4; u.next_f = UA_TCST+5; end
      UA_TCST+4: begin u.r_op = R_CARRY; u.kn_opc = 1'b1; u.next_t = UA_TCST+2; u.next_f = UA_TCST+2; end
      UA_TCST+5: begin u.tag_op = T_OPC; u.kn_opc = 1'b1; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- LOT: bit N1 of F1 -> TAG
      UA_LOT+0: begin u.mar_base = MB_SF1; u.mar_idx = MI_N1; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_LOT+1: begin u.mem_to_x = 1'b1; end
      UA_LOT+2: begin u.alu_l_zero = 1'b1; u.tag_op = T_OPC; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- COT: complement TAG
      UA_COT+0: begin u.tag_op = T_CPL; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- IN: serial Input -> F1, least significant bit first
      UA_IN+0: begin u.i_op = I_SL1; end
      UA_IN+1: begin u.mar_base = MB_SF1; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_IN+2: begin u.a_op = A_IN; u.rw_op = RW_1; u.io_strobe = 1'b1; end
      UA_IN+3: begin u.rw_op = RW_0; u.cond = C_I_GE0; u.next_t = UA_IN+1; u.next_f = UA_FETCH; end
      // ---- OUT: F1 -> Output line, least significant bit first
      UA_OUT+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_OUT+1: begin u.mar_base = MB_SF1; end
      UA_OUT+2: begin u.mem_to_x = 1'b1; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_OUT+3: begin u.alu_l_zero = 1'b1; u.io_strobe = 1'b1; u.mar_base = MB_SF1; u.cond = C_I_GE0;
                      u.next_t = UA_OUT+2; u.next_f = UA_FETCH; end
      // ---- TQ / TCQ: (F1 >= F3 or CO) -> bit N3 of F3.  The last bit is
      //      added instead of subtracted, which yields the inverted sign.
      UA_TQ+0: begin u.i_op = I_SL1; u.y_op = Y_1; u.z_op = Z_1; u.r_op = R_1; end
      UA_TQ+1: begin u.mar_base = MB_SF3; end
      UA_TQ+2: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF1; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_TQ+3: begin u.mem_to_l = 1'b1; u.mar_base = MB_SF3; u.cond = C_I_GE0;
                     u.next_t = UA_TQ+4; u.next_f = UA_TQ+5; end
      UA_TQ+4: begin u.r_op = R_CARRY; u.kn_opc = 1'b1; u.next_t = UA_TQ+2; u.next_f = UA_TQ+2; end
      UA_TQ+5: begin u.z_op = Z_0; u.mar_base = MB_SF3; u.mar_idx = MI_N3; end
      UA_TQ+6: begin u.a_op = A_ALU; u.kn_opc = 1'b1; u.rw_op = RW_1; end
      UA_TQ+7: begin u.rw_op = RW_0; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- ANDB: bit N1 of F1 AND bit N3 of F3 -> bit N3 of F3
      UA_ANDB+0: begin u.mar_base = MB_SF3; u.mar_idx = MI_N3; u.z_op = Z_0; u.r_op = R_0; end
      UA_ANDB+1: begin u.mem_to_l = 1'b1; u.mar_base = MB_SF1; u.mar_idx = MI_N1; end
      UA_ANDB+2: begin u.mem_to_x = 1'b1; u.y_op = Y_L; u.mar_base = MB_SF3; u.mar_idx = MI_N3; end
      UA_ANDB+3: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_ANDB+4: begin u.rw_op = RW_0; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- ORB: a|b = a ^ b ^ (a&b): first pass leaves a&b in R
      UA_ORB+0: begin u.mar_base = MB_SF3; u.mar_idx = MI_N3; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_ORB+1: begin u.mem_to_l = 1'b1; u.mar_base = MB_SF1; u.mar_idx = MI_N1; end
      UA_ORB+2: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.mar_idx = MI_N3; end
      UA_ORB+3: begin u.r_op = R_CARRY; end
      UA_ORB+4: begin u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_ORB+5: begin u.rw_op = RW_0; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- CMB: NOT bit N1 of F1 -> bit N3 of F3
      UA_CMB+0: begin u.mar_base = MB_SF1; u.mar_idx = MI_N1; u.y_op = Y_1; u.z_op = Z_1; u.r_op = R_0; end
      UA_CMB+1: begin u.mem_to_x = 1'b1; u.mar_base = MB_SF3; u.mar_idx = MI_N3; end
      UA_CMB+2: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_CMB+3: begin u.rw_op = RW_0; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      // ---- MUL / MULC: F1 * F2 (or CO) -> F3, floor(F1 * F2 / 2^L2).
      //      1) copy the multiplier (F2, or CO through SRC) into word IL;
      //      2) clear the partial product P in word IR;
      //      3) for j = L2 .. 1: P <- (P + F1 * y_j) / 2, one bit per three
      //         clocks, the sum of bit i written back at bit i+1, then the
      //         sign bit extended into bit 0;
      //      4) F3 <- P - F1 * y_0 (the multiplier's sign bit has weight -1).
      UA_MUL+0:  begin u.j_op = J_SL2; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_MUL+1:  begin u.mar_base = MB_SF2; u.mar_idx = MI_J; end
      UA_MUL+2:  begin u.mem_to_x = 1'b1; u.mar_base = MB_IL; u.mar_idx = MI_J;
                       u.j_op = J_ADD; u.j_delta = -3'sd1; end
      UA_MUL+3:  begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.kn_opc = 1'b1; u.rw_op = RW_1; end
      UA_MUL+4:  begin u.rw_op = RW_0; u.mar_base = MB_SF2; u.mar_idx = MI_J; u.cond = C_J_GE0;
                       u.next_t = UA_MUL+2; u.next_f = UA_MUL+5; end
      UA_MUL+5:  begin u.i_op = I_SL1; u.j_op = J_SL2; u.y_op = Y_0; end
      UA_MUL+6:  begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.mar_base = MB_IR;
                       u.i_op = I_ADD; u.i_delta = -3'sd1; u.rw_op = RW_1; end
      UA_MUL+7:  begin u.mar_base = MB_IR; u.i_op = I_ADD; u.i_delta = -3'sd1; u.cond = C_I_GT0;
                       u.next_t = UA_MUL+7; u.next_f = UA_MUL+8; end
      UA_MUL+8:  begin u.rw_op = RW_0; u.cond = C_J_GT0; u.next_t = UA_MUL+9; u.next_f = UA_MUL+19; end
      UA_MUL+9:  begin u.mar_base = MB_IL; u.mar_idx = MI_J; u.i_op = I_SL1; u.z_op = Z_0; u.r_op = R_0; end
      UA_MUL+10: begin u.mem_to_l = 1'b1; u.mar_base = MB_IR; end
      UA_MUL+11: begin u.y_op = Y_L; u.mem_to_l = 1'b1; u.mar_base = MB_SF1;
                       u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_MUL+12: begin u.mem_to_x = 1'b1; u.mar_base = MB_IR; u.i_op = I_ADD; u.i_delta = 3'sd2; end
      UA_MUL+13: begin u.a_op = A_ALU; u.r_op = R_CARRY; u.rw_op = RW_1; u.mem_to_l = 1'b1;
                       u.mar_base = MB_IR; u.mar_idx = MI_ISAT; u.i_op = I_ADD; u.i_delta = -3'sd2; end
      UA_MUL+14: begin u.rw_op = RW_0; u.mar_base = MB_SF1; u.i_op = I_ADD; u.i_delta = -3'sd1;
                       u.cond = C_I_GE0; u.next_t = UA_MUL+12; u.next_f = UA_MUL+15; end
      UA_MUL+15: begin u.mar_base = MB_IR; u.mar_idx = MI_ZERO; u.j_op = J_ADD; u.j_delta = -3'sd1; end
      UA_MUL+16: begin u.mem_to_l = 1'b1; end
      UA_MUL+17: begin u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_MUL+18: begin u.rw_op = RW_0; u.cond = C_J_GT0; u.next_t = UA_MUL+9; u.next_f = UA_MUL+19; end
      UA_MUL+19: begin u.mar_base = MB_IL; u.mar_idx = MI_J; u.i_op = I_SL1; u.z_op = Z_1; u.r_op = R_1; end
      UA_MUL+20: begin u.mem_to_l = 1'b1; u.mar_base = MB_IR; end
      UA_MUL+21: begin u.y_op = Y_L; u.mem_to_l = 1'b1; u.mar_base = MB_SF1;
                       u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_MUL+22: begin u.mem_to_x = 1'b1; u.mar_base = MB_IR; u.i_op = I_ADD; u.i_delta = 3'sd1; end
      UA_MUL+23: begin u.a_op = A_ALU; u.r_op = R_CARRY; u.rw_op = RW_1; u.mem_to_l = 1'b1;
                       u.mar_base = MB_SF3; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_MUL+24: begin u.rw_op = RW_0; u.mar_base = MB_SF1; u.i_op = I_ADD; u.i_delta = -3'sd1;
                       u.cond = C_I_GE0; u.next_t = UA_MUL+22; u.next_f = UA_FETCH; end
      // ---- DIV: F1 / F2 -> F3, non-restoring, quotient of L2+1 bits.
      //      The partial remainder P (start: F1) lives in word IL.  Each
      //      step compares the signs of P and F2 in every PE, keeps the
      //      result in Z (1: subtract) and writes it as the next quotient
      //      digit, then forms P <- 2P - F2 or 2P + F2 in place.  At the end
      //      the first digit is complemented and a 1 is put in the last
      //      quotient bit, which turns the +1/-1 digits into two's
      //      complement.  F3 must not be F2.
      UA_DIV+0:  begin u.i_op = I_SL1; u.j_op = J_ZERO; u.y_op = Y_1; u.z_op = Z_0; u.r_op = R_0; end
      UA_DIV+1:  begin u.mar_base = MB_SF1; end
      UA_DIV+2:  begin u.mem_to_x = 1'b1; u.mar_base = MB_IL; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_DIV+3:  begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_DIV+4:  begin u.rw_op = RW_0; u.mar_base = MB_SF1; u.cond = C_I_GE0;
                       u.next_t = UA_DIV+2; u.next_f = UA_DIV+5; end
      UA_DIV+5:  begin u.mar_base = MB_IL; u.mar_idx = MI_ZERO; u.i_op = I_SL1; u.z_op = Z_1; u.r_op = R_0; end
      UA_DIV+6:  begin u.mem_to_l = 1'b1; u.mar_base = MB_SF2; u.mar_idx = MI_ZERO; end
      UA_DIV+7:  begin u.mem_to_x = 1'b1; end
      UA_DIV+8:  begin u.a_op = A_ALU; u.z_op = Z_ALU; u.r_op = R_SUM; u.rw_op = RW_1;
                       u.mar_base = MB_SF3; u.mar_idx = MI_J; end
      UA_DIV+9:  begin u.rw_op = RW_0; u.mar_base = MB_SF2; end
      UA_DIV+10: begin u.mem_to_x = 1'b1; u.mar_base = MB_IL; end
      UA_DIV+11: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.r_op = R_CARRY; u.mem_to_l = 1'b1;
                       u.rw_op = RW_1; u.mar_base = MB_IL; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_DIV+12: begin u.rw_op = RW_0; u.mar_base = MB_SF2; u.cond = C_I_GE0;
                       u.next_t = UA_DIV+13; u.next_f = UA_DIV+16; end
      UA_DIV+13: begin u.mem_to_x = 1'b1; u.mar_base = MB_IL; end
      UA_DIV+14: begin u.a_op = A_ALU; u.r_op = R_CARRY; u.mem_to_l = 1'b1;
                       u.rw_op = RW_1; u.mar_base = MB_IL; u.i_op = I_ADD; u.i_delta = -3'sd1; end
      UA_DIV+15: begin u.rw_op = RW_0; u.mar_base = MB_SF2; u.cond = C_I_GE0;
                       u.next_t = UA_DIV+13; u.next_f = UA_DIV+16; end
      UA_DIV+16: begin u.j_op = J_ADD; u.j_delta = 3'sd1; u.cond = C_J_GE_SL2M1;
                       u.next_t = UA_DIV+17; u.next_f = UA_DIV+5; end
      UA_DIV+17: begin u.mar_base = MB_SF3; u.mar_idx = MI_ZERO; u.y_op = Y_1; u.z_op = Z_1; u.r_op = R_0; end
      UA_DIV+18: begin u.mem_to_x = 1'b1; end
      UA_DIV+19: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_DIV+20: begin u.rw_op = RW_0; u.mar_base = MB_SF3; u.mar_idx = MI_SL2; u.y_op = Y_0; end
      UA_DIV+21: begin u.alu_l_zero = 1'b1; u.a_op = A_ALU; u.rw_op = RW_1; end
      UA_DIV+22: begin u.rw_op = RW_0; u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
      default:  begin u.next_t = UA_FETCH; u.next_f = UA_FETCH; end
    endcase
    return u;
  endfunction

  // ------------------------------------------------------------ registers
  logic [UADDR_W-1:0]     upc;
  logic                   st_q;
  logic [6:0]             sf1_q, sf3_q;
  logic [7:0]             sf2_q;
  logic [15:0]            sco_q;
  logic [3:0]             sl1_q, sl2_q;
  op_info_t               info_q;
  logic signed [CNT_W-1:0] i_q, j_q;
  logic [MAR_W-1:0]       mar_q;
  logic                   rw_q, src_q;

  uinstr_t                 u;
  op_info_t                dec;
  logic                    in_fetch, take, cond_ok;
  logic [3:0]              n1, n3, idx;
  logic [WADDR_W-1:0]      base;
  logic signed [CNT_W-1:0] sl1_s, sl2_s, n1_s, i_d, j_d;

  always_comb begin
    u        = ucode(upc);
    dec      = decode_op(afb_rdata.op);
    in_fetch = (upc == UA_FETCH);
    take     = in_fetch && !afb_empty;
    n1       = sf2_q[7:4];
    n3       = sf2_q[3:0];
    sl1_s    = signed'({2'b00, sl1_q});
    sl2_s    = signed'({2'b00, sl2_q});
    n1_s     = signed'({2'b00, n1});

    unique case (u.mar_idx)
      MI_I:      idx = i_q[3:0];
      MI_J:      idx = j_q[3:0];
      MI_ZERO:   idx = 4'd0;
      MI_N1:     idx = n1;
      MI_N3:     idx = n3;
      MI_ICLAMP: idx = (i_q < 0) ? 4'd0 : i_q[3:0];
      MI_ISAT:   idx = (i_q > 15) ? 4'd15 : i_q[3:0];
      MI_SL2:    idx = sl2_q;
      default:   idx = 4'd0;
    endcase
    unique case (u.mar_base)
      MB_SF1:  base = sf1_q;
      MB_SF2:  base = sf2_q[6:0];
      MB_SF3:  base = sf3_q;
      MB_IR:   base = IR_WORD;
      MB_IL:   base = IL_WORD;
      default: base = mar_q[MAR_W-1:4];
    endcase
    unique case (u.i_op)
      I_SL1:     i_d = sl1_s;
      I_ZERO:    i_d = '0;
      I_ADD:     i_d = i_q + CNT_W'(u.i_delta);
      I_N1:      i_d = n1_s;
      I_SL1_MN1: i_d = sl1_s - n1_s;
      default:   i_d = i_q;
    endcase
    unique case (u.j_op)
      J_SL2:   j_d = sl2_s;
      J_ZERO:  j_d = '0;
      J_ADD:   j_d = j_q + CNT_W'(u.j_delta);
      J_SL1:   j_d = sl1_s;
      default: j_d = j_q;
    endcase
    unique case (u.cond)
      C_I_GE0:      cond_ok = (i_q >= 0);
      C_I_GT0:      cond_ok = (i_q > 0);
      C_J_GT0:      cond_ok = (j_q > 0);
      C_J_GE_SL2M1: cond_ok = (j_q >= sl2_s - 1);
      C_I_LE_SL1:   cond_ok = (i_q <= sl1_s);
      C_J_LE_SL1:   cond_ok = (j_q <= sl1_s);
      C_J_GE0:      cond_ok = (j_q >= 0);
      default:      cond_ok = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= UA_FETCH;
      st_q <= 1'b0; sf1_q <= '0; sf2_q <= '0; sf3_q <= '0; sco_q <= '0;
      sl1_q <= '0; sl2_q <= '0;
      info_q <= '{valid: 1'b0, start: UA_FETCH, kn: KN_OWN, sub: 1'b0, rinit: 1'b0, tag_inv: 1'b0};
      i_q <= '0; j_q <= '0; mar_q <= '0; rw_q <= 1'b0; src_q <= 1'b0;
    end else if (in_fetch) begin
      if (take) begin
        st_q   <= afb_rdata.t;
        sf1_q  <= afb_rdata.f1;
        sf2_q  <= afb_rdata.f2;
        sf3_q  <= afb_rdata.f3;
        sco_q  <= afb_rdata.co;
        sl1_q  <= afb_rdata.l1;
        sl2_q  <= afb_rdata.l2;
        info_q <= dec;
        upc    <= dec.valid ? dec.start : UA_FETCH;
      end
    end else begin
      i_q   <= i_d;
      j_q   <= j_d;
      mar_q <= {base, (u.mar_base == MB_HOLD) ? mar_q[3:0] : idx};
      unique case (u.rw_op)
        RW_0:    rw_q <= 1'b0;
        RW_1:    rw_q <= 1'b1;
        default: ;
      endcase
      // SRC follows the constant bit at the bit position being read
      if (u.mem_to_x) src_q <= sco_q[4'd15 - mar_q[3:0]];
      upc <= cond_ok ? u.next_t : u.next_f;
    end
  end

  // ------------------------------------------------------------- outputs
  always_comb begin
    ctrl        = PE_CTRL_NOP;
    ctrl.mar    = mar_q;
    ctrl.rw     = rw_q;
    ctrl.src    = src_q;
    ctrl.all_en = st_q;
    if (!in_fetch) begin
      ctrl.mem_to_l   = u.mem_to_l;
      ctrl.mem_to_x   = u.mem_to_x;
      ctrl.y_op       = u.y_op;
      ctrl.z_op       = (u.z_op == Z_OPC) ? (info_q.sub ? Z_1 : Z_0) : u.z_op;
      ctrl.r_op       = (u.r_op == R_OPC) ? (info_q.rinit ? R_1 : R_0) : u.r_op;
      ctrl.a_op       = u.a_op;
      ctrl.alu_l_zero = u.alu_l_zero;
      ctrl.kn_sel     = u.kn_opc ? info_q.kn : KN_OWN;
      ctrl.tag_op     = (u.tag_op == T_OPC) ? (info_q.tag_inv ? T_ALU_N : T_ALU) : u.tag_op;
    end
    io_strobe = !in_fetch && u.io_strobe;
    io_idx    = mar_q[3:0];
    idle      = in_fetch && afb_empty;
    fetch     = take;
    afb_rd    = take;
  end

  // RW must never be left set when an instruction ends
  assert property (@(posedge clk) disable iff (!rst_n) in_fetch |-> !rw_q);
endmodule
