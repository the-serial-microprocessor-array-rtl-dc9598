// Shared types and constants of the Serial Microprocessor Array (SMA).
//
// The SMA is a bit-serial SIMD array: a Master Computer relocates the
// operand addresses of each array instruction, packs them into a 54-bit
// word and posts it through an asynchronous FIFO (the AFB) to a
// microprogrammed Array Control Unit (ACU).  The ACU broadcasts one
// microorder bundle per clock to every Processing Element (PE); each PE
// holds a 2048-bit memory seen as 128 words of 16 bits and processes one
// bit per clock.
//
// Bit numbering follows the instruction formats: bit 0 is the leftmost
// (most significant, sign) bit.  A PE memory address is {word, bit}, 7+4
// bits, so bit index 0 of a word is its sign bit and index L1 is the least
// significant bit of an (L1+1)-bit operand.  Packed fields below are
// declared so that the leftmost field holds format bit 0.
//
// Field widths and positions of the instruction and AFB word come from the
// published formats.  Opcode values, the microinstruction layout and the
// control-store addresses are this design's own choices.
package sma_pkg;

  localparam int unsigned WORD_BITS  = 16;   // PE memory word width
  localparam int unsigned MEM_WORDS  = 128;  // 2048 bits / 16
  localparam int unsigned PE_MEM_BITS = 2048; // PE memory size in bits
  localparam int unsigned MAR_W      = 11;   // ACU memory address register
  localparam int unsigned WADDR_W    = 7;    // word part of an address
  localparam int unsigned CNT_W      = 6;    // I and J counters (4 bits + sign/overflow)

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [6:0] {
    OP_NOP   = 7'd0,
    // arithmetic
    OP_ADD   = 7'd1,  OP_SB    = 7'd2,  OP_ADC   = 7'd3,  OP_SBC   = 7'd4,
    OP_ADU1  = 7'd5,  OP_SBU1  = 7'd6,  OP_ADD1  = 7'd7,  OP_SBD1  = 7'd8,
    OP_MADU3 = 7'd9,  OP_MSBU3 = 7'd10, OP_MADD3 = 7'd11, OP_MSBD3 = 7'd12,
    OP_MUL   = 7'd13, OP_MULC  = 7'd14, OP_DIV   = 7'd15, OP_TRAN  = 7'd16,
    // logical and test
    OP_SHL   = 7'd32, OP_SHR   = 7'd33, OP_TQ    = 7'd34, OP_TCQ   = 7'd35,
    OP_TST   = 7'd36, OP_TRT   = 7'd37, OP_TCST  = 7'd38, OP_TCRT  = 7'd39,
    OP_LOT   = 7'd40, OP_COT   = 7'd41, OP_ANDB  = 7'd42, OP_ORB   = 7'd43,
    OP_CMB   = 7'd44,
    // input/output
    OP_IN    = 7'd64, OP_OUT   = 7'd65
  } opcode_e;

  // 32-bit array instruction (Fig. 2a); formats b and c reuse the bits.
  typedef struct packed {
    logic [6:0] op;   // bits 0-6
    logic       t;    // bit 7
    logic       x1;   // bit 8
    logic [6:0] y1;   // bits 9-15
    logic       x2;   // bit 16   (format b: N1 = bits 16-19)
    logic [6:0] y2;   // bits 17-23 (format b: N3 = bits 20-23)
    logic       x3;   // bit 24
    logic [6:0] y3;   // bits 25-31
  } instr_t;

  // 54-bit AFB word (Fig. 3).  F2 is eight bits wide so that it can carry
  // N1 (upper nibble) and N3 (lower nibble) instead of an address.
  typedef struct packed {
    logic [6:0]  op;  // bits 0-6
    logic        t;   // bit 7
    logic [6:0]  f1;  // bits 8-14
    logic [7:0]  f2;  // bits 15-22
    logic [6:0]  f3;  // bits 23-29
    logic [15:0] co;  // bits 30-45
    logic [3:0]  l1;  // bits 46-49
    logic [3:0]  l2;  // bits 50-53
  } afb_word_t;

  localparam int unsigned AFB_W = $bits(afb_word_t);

  // Operand source of the KN select network (second ALU operand).
  typedef enum logic [2:0] {
    KN_OWN = 3'd0,  // own X register
    KN_SRC = 3'd1,  // broadcast constant bit from the ACU
    KN_DN1 = 3'd2,  // X of PE n-1
    KN_UP1 = 3'd3,  // X of PE n+1
    KN_DN3 = 3'd4,  // X of PE n-3
    KN_UP3 = 3'd5   // X of PE n+3
  } kn_sel_e;

  // ------------------------------------------------------ microorder fields
  typedef enum logic [2:0] {I_HOLD, I_SL1, I_ZERO, I_ADD, I_N1, I_SL1_MN1} i_op_e;
  typedef enum logic [2:0] {J_HOLD, J_SL2, J_ZERO, J_ADD, J_SL1} j_op_e;
  typedef enum logic [2:0] {MB_HOLD, MB_SF1, MB_SF2, MB_SF3, MB_IR, MB_IL} mar_base_e;
  typedef enum logic [2:0] {MI_I, MI_J, MI_ZERO, MI_N1, MI_N3, MI_ICLAMP, MI_ISAT, MI_SL2} mar_idx_e;
  typedef enum logic [1:0] {RW_HOLD, RW_0, RW_1} rw_op_e;
  typedef enum logic [1:0] {Y_HOLD, Y_1, Y_0, Y_L} y_op_e;
  typedef enum logic [2:0] {Z_HOLD, Z_0, Z_1, Z_ALU, Z_OPC} z_op_e;
  typedef enum logic [2:0] {R_HOLD, R_0, R_1, R_CARRY, R_OPC, R_SUM} r_op_e;
  typedef enum logic [1:0] {A_HOLD, A_ALU, A_IN} a_op_e;
  typedef enum logic [2:0] {T_HOLD, T_ALU, T_ALU_N, T_CPL, T_OPC} tag_op_e;
  typedef enum logic [2:0] {
    C_ALWAYS, C_I_GE0, C_I_GT0, C_J_GT0, C_J_GE_SL2M1, C_I_LE_SL1, C_J_LE_SL1, C_J_GE0
  } cond_e;

  localparam int unsigned UADDR_W = 8;

  // One microinstruction: operation words plus one jump word with two
  // alternative successors (next_t when cond holds, next_f otherwise).
  typedef struct packed {
    i_op_e                i_op;
    logic signed [2:0]    i_delta;
    j_op_e                j_op;
    logic signed [2:0]    j_delta;
    mar_base_e            mar_base;
    mar_idx_e             mar_idx;
    rw_op_e               rw_op;
    logic                 mem_to_l;
    logic                 mem_to_x;
    y_op_e                y_op;
    z_op_e                z_op;
    r_op_e                r_op;
    a_op_e                a_op;
    logic                 alu_l_zero;  // first ALU operand is 0 instead of L
    logic                 kn_opc;      // KN source chosen by the opcode
    tag_op_e              tag_op;
    logic                 io_strobe;
    cond_e                cond;
    logic [UADDR_W-1:0]   next_t;
    logic [UADDR_W-1:0]   next_f;
  } uinstr_t;

  // Microorders broadcast from the ACU to every PE in one clock.
  // Only the concrete codes are sent: *_OPC values are resolved in the ACU.
  typedef struct packed {
    logic               all_en;     // T bit: execute regardless of TAG
    logic [MAR_W-1:0]   mar;
    logic               rw;         // 1: write A into M(MAR) this clock
    logic               mem_to_l;
    logic               mem_to_x;
    y_op_e              y_op;
    z_op_e              z_op;
    r_op_e              r_op;
    a_op_e              a_op;
    logic               alu_l_zero;
    kn_sel_e            kn_sel;
    tag_op_e            tag_op;
    logic               src;        // broadcast constant bit (SRC)
  } pe_ctrl_t;

  localparam pe_ctrl_t PE_CTRL_NOP = '{
    all_en: 1'b0, mar: '0, rw: 1'b0, mem_to_l: 1'b0, mem_to_x: 1'b0,
    y_op: Y_HOLD, z_op: Z_HOLD, r_op: R_HOLD, a_op: A_HOLD, alu_l_zero: 1'b0,
    kn_sel: KN_OWN, tag_op: T_HOLD, src: 1'b0};

  // Control-store entry points.  Address 0 is hC, the fetch microinstruction.
  localparam logic [UADDR_W-1:0] UA_FETCH = 8'd0;
  localparam logic [UADDR_W-1:0] UA_ADD   = 8'd1;
  localparam logic [UADDR_W-1:0] UA_M3    = 8'd8;
  localparam logic [UADDR_W-1:0] UA_TRAN  = 8'd20;
  localparam logic [UADDR_W-1:0] UA_SHL   = 8'd26;
  localparam logic [UADDR_W-1:0] UA_SHR   = 8'd34;
  localparam logic [UADDR_W-1:0] UA_TST   = 8'd40;
  localparam logic [UADDR_W-1:0] UA_TCST  = 8'd48;
  localparam logic [UADDR_W-1:0] UA_LOT   = 8'd56;
  localparam logic [UADDR_W-1:0] UA_COT   = 8'd60;
  localparam logic [UADDR_W-1:0] UA_IN    = 8'd64;
  localparam logic [UADDR_W-1:0] UA_OUT   = 8'd72;
  localparam logic [UADDR_W-1:0] UA_TQ    = 8'd80;
  localparam logic [UADDR_W-1:0] UA_ANDB  = 8'd90;
  localparam logic [UADDR_W-1:0] UA_ORB   = 8'd96;
  localparam logic [UADDR_W-1:0] UA_CMB   = 8'd104;
  localparam logic [UADDR_W-1:0] UA_MUL   = 8'd112;
  localparam logic [UADDR_W-1:0] UA_DIV   = 8'd140;

  // What the ACU needs to know about an opcode when it is fetched.
  typedef struct packed {
    logic               valid;
    logic [UADDR_W-1:0] start;
    kn_sel_e            kn;       // KN source for microorders with kn_opc
    logic               sub;      // value of Z for Z_OPC (1 = subtract)
    logic               rinit;    // value of R for R_OPC
    logic               tag_inv;  // T_OPC loads the ALU output inverted
  } op_info_t;

  function automatic op_info_t decode_op(input logic [6:0] op);
    op_info_t d;
    d = '{valid: 1'b1, start: UA_FETCH, kn: KN_OWN, sub: 1'b0, rinit: 1'b0, tag_inv: 1'b0};
    case (op)
      OP_ADD:   d.start = UA_ADD;
      OP_SB:    begin d.start = UA_ADD; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_ADC:   begin d.start = UA_ADD; d.kn = KN_SRC; end
      OP_SBC:   begin d.start = UA_ADD; d.kn = KN_SRC; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_ADU1:  begin d.start = UA_ADD; d.kn = KN_UP1; end
      OP_SBU1:  begin d.start = UA_ADD; d.kn = KN_UP1; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_ADD1:  begin d.start = UA_ADD; d.kn = KN_DN1; end
      OP_SBD1:  begin d.start = UA_ADD; d.kn = KN_DN1; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_MADU3: begin d.start = UA_M3;  d.kn = KN_UP3; end
      OP_MSBU3: begin d.start = UA_M3;  d.kn = KN_UP3; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_MADD3: begin d.start = UA_M3;  d.kn = KN_DN3; end
      OP_MSBD3: begin d.start = UA_M3;  d.kn = KN_DN3; d.sub = 1'b1; d.rinit = 1'b1; end
      OP_MUL:   d.start = UA_MUL;
      OP_MULC:  begin d.start = UA_MUL; d.kn = KN_SRC; end
      OP_DIV:   d.start = UA_DIV;
      OP_TRAN:  d.start = UA_TRAN;
      OP_SHL:   d.start = UA_SHL;
      OP_SHR:   d.start = UA_SHR;
      OP_TQ:    d.start = UA_TQ;
      OP_TCQ:   begin d.start = UA_TQ; d.kn = KN_SRC; end
      OP_TST:   d.start = UA_TST;
      OP_TRT:   begin d.start = UA_TST; d.tag_inv = 1'b1; end
      OP_TCST:  begin d.start = UA_TCST; d.kn = KN_SRC; d.tag_inv = 1'b1; end
      OP_TCRT:  begin d.start = UA_TCST; d.kn = KN_SRC; end
      OP_LOT:   d.start = UA_LOT;
      OP_COT:   d.start = UA_COT;
      OP_ANDB:  d.start = UA_ANDB;
      OP_ORB:   d.start = UA_ORB;
      OP_CMB:   d.start = UA_CMB;
      OP_IN:    d.start = UA_IN;
      OP_OUT:   d.start = UA_OUT;
      default:  d.valid = 1'b0;   // unknown opcode: dropped at fetch
    endcase
    return d;
  endfunction

  // Instructions whose F2 field carries N1 and N3 rather than an address.
  function automatic logic op_uses_n(input logic [6:0] op);
    case (op)
      OP_SHL, OP_SHR, OP_TQ, OP_TCQ, OP_LOT, OP_ANDB, OP_ORB, OP_CMB: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
