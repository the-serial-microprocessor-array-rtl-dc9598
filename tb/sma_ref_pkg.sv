// Instruction-level reference model of the SMA array, used by the
// testbenches to work out expected PE memory contents and TAG values
// independently of the microprograms.  Words are 16 bits with bit 0 (the
// sign) leftmost, i.e. word[15]; an operand of length L uses the leftmost
// L+1 bits and leaves the rest of the destination word unchanged.
package sma_ref_pkg;
  import sma_pkg::*;

  localparam int IR_W = 126;  // scratch words of the multiply microprogram
  localparam int IL_W = 127;

  class sma_model;
    int          n_pe;
    logic [15:0] mem [][];
    bit          tag [];

    function new(int n);
      n_pe = n;
      mem  = new[n];
      foreach (mem[i]) begin
        mem[i] = new[128];
        foreach (mem[i][k]) mem[i][k] = '0;
      end
      tag = new[n];
      foreach (tag[i]) tag[i] = 1'b1;
    endfunction

    // signed value of the leftmost l+1 bits
    static function longint fget(logic [15:0] w, int l);
      longint v;
      v = longint'(w >> (15 - l));
      if (v >= (longint'(1) << l)) v -= (longint'(1) << (l + 1));
      return v;
    endfunction

    static function logic [15:0] fput(logic [15:0] w, int l, longint v);
      logic [15:0] mask, nv;
      mask = 16'(((longint'(1) << (l + 1)) - 1) << (15 - l));
      nv   = 16'(v << (15 - l));
      return (w & ~mask) | (nv & mask);
    endfunction

    // floor(v / 2^k) for signed v
    static function longint floor_div(longint v, int k);
      return v >>> k;
    endfunction

    function logic [15:0] peek(logic [15:0] snap [][], int n, int f);
      if (n < 0 || n >= n_pe) return '0;
      return snap[n][f];
    endfunction

    // Execute one AFB word.  inw: serial input word of each PE (IN).
    function void exec(afb_word_t w, logic [15:0] inw []);
      logic [15:0] snap [][];
      int l1, l2, f1, f2, f3, n1, n3, d;
      longint a, b, co, p, bu;
      logic [15:0] mw;
      bit en;
      snap = new[n_pe];
      foreach (snap[i]) snap[i] = mem[i];
      l1 = int'(w.l1);
      l2 = int'(w.l2);
      f1 = int'(w.f1); f2 = int'(w.f2[6:0]); f3 = int'(w.f3);
      n1 = int'(w.f2[7:4]); n3 = int'(w.f2[3:0]);
      co = fget(w.co, l1);
      for (int n = 0; n < n_pe; n++) begin
        en = w.t || tag[n];
        if (!en) continue;
        a = fget(snap[n][f1], l1);
        case (opcode_e'(w.op))
          OP_ADD:  mem[n][f3] = fput(mem[n][f3], l1, a + fget(snap[n][f2], l1));
          OP_SB:   mem[n][f3] = fput(mem[n][f3], l1, a - fget(snap[n][f2], l1));
          OP_ADC:  mem[n][f3] = fput(mem[n][f3], l1, a + co);
          OP_SBC:  mem[n][f3] = fput(mem[n][f3], l1, a - co);
          OP_ADU1: mem[n][f3] = fput(mem[n][f3], l1, a + fget(peek(snap, n+1, f2), l1));
          OP_SBU1: mem[n][f3] = fput(mem[n][f3], l1, a - fget(peek(snap, n+1, f2), l1));
          OP_ADD1: mem[n][f3] = fput(mem[n][f3], l1, a + fget(peek(snap, n-1, f2), l1));
          OP_SBD1: mem[n][f3] = fput(mem[n][f3], l1, a - fget(peek(snap, n-1, f2), l1));
          OP_MADU3, OP_MSBU3, OP_MADD3, OP_MSBD3: begin
            d = (w.op == OP_MADU3 || w.op == OP_MSBU3) ? 3 : -3;
            b = fget(peek(snap, n+d, f1), l1);
            mem[n][f3] = fput(mem[n][f3], l1, b);
            if (w.op == OP_MADU3 || w.op == OP_MADD3)
              mem[n][f2] = fput(mem[n][f2], l1, fget(mem[n][f2], l1) + b);
            else
              mem[n][f2] = fput(mem[n][f2], l1, fget(mem[n][f2], l1) - b);
          end
          OP_MUL, OP_MULC: begin
            // result: floor(a * b / 2^L2) in L1+1 bits; the scratch words
            // IR (partial product) and IL (copy of the multiplier) keep
            // the values the microprogram leaves in them
            mw = (w.op == OP_MUL) ? snap[n][f2] : w.co;
            b  = fget(mw, l2);
            p  = floor_div(a * b, l2);
            mem[n][IL_W] = fput(mem[n][IL_W], l2, fget(mw, l2));
            if (l1 == 0) mem[n][IR_W][0] = 1'b0;
            if (l2 == 0) mem[n][IR_W] = fput(mem[n][IR_W], l1, 0);
            else begin
              bu = b & ((longint'(1) << l2) - 1);
              mem[n][IR_W] = fput(mem[n][IR_W], l1, floor_div(a * bu, l2));
              if (l1 < 15)
                mem[n][IR_W][14 - l1] = 1'((floor_div(a * (bu & ((longint'(1) << (l2 - 1)) - 1)), l2 - 1)
                                           + a * ((bu >> (l2 - 1)) & 1)) & 1);
            end
            mem[n][f3] = fput(mem[n][f3], l1, p);
          end
          OP_DIV: begin
            // non-restoring division: remainder r starts at a; each step
            // digit p = (sign r == sign d), r <- 2r -/+ d; quotient bits are
            // {~p1, p2 .. pL2, 1}; r is left in scratch word IL
            d  = int'(fget(snap[n][f2], l1));
            p  = a;
            for (int k = 1; k <= ((l2 > 0) ? l2 : 1); k++) begin
              bit pk;
              pk = ((p < 0) == (d < 0));
              p  = fget(fput(16'h0, l1, pk ? 2 * p - d : 2 * p + d), l1);
              if (k == 1)       mem[n][f3][15] = ~pk;
              else if (k <= l2) mem[n][f3][16 - k] = pk;
            end
            mem[n][f3][15 - l2] = 1'b1;
            mem[n][IL_W] = fput(mem[n][IL_W], l1, p);
          end
          OP_TRAN: mem[n][f3] = fput(mem[n][f3], l1, a);
          OP_SHL:  mem[n][f3] = fput(mem[n][f3], l1, a << n1);
          OP_SHR:  mem[n][f3] = fput(mem[n][f3], l1, a >>> n1);
          OP_TQ:   mem[n][f3][15-n3] = (a >= fget(snap[n][f3], l1));
          OP_TCQ:  mem[n][f3][15-n3] = (a >= co);
          OP_TST:  tag[n] = (a >= fget(snap[n][f2], l1));
          OP_TRT:  tag[n] = !(a >= fget(snap[n][f2], l1));
          OP_TCST: tag[n] = (a >= co);
          OP_TCRT: tag[n] = !(a >= co);
          OP_LOT:  tag[n] = snap[n][f1][15-n1];
          OP_COT:  tag[n] = !tag[n];
          OP_ANDB: mem[n][f3][15-n3] = snap[n][f1][15-n1] & snap[n][f3][15-n3];
          OP_ORB:  mem[n][f3][15-n3] = snap[n][f1][15-n1] | snap[n][f3][15-n3];
          OP_CMB:  mem[n][f3][15-n3] = ~snap[n][f1][15-n1];
          OP_IN:   mem[n][f1] = fput(mem[n][f1], l1, fget(inw[n], l1));
          default: ;
        endcase
      end
    endfunction
  endclass

  // Build an AFB word directly (testbenches below the dispatch stage).
  function automatic afb_word_t mk_word(opcode_e op, bit t, int f1, int f2, int f3,
                                        logic [15:0] co, int l1, int l2 = 0);
    afb_word_t w;
    w.op = op; w.t = t; w.f1 = 7'(f1); w.f2 = 8'(f2); w.f3 = 7'(f3);
    w.co = co; w.l1 = 4'(l1); w.l2 = 4'(l2);
    return w;
  endfunction

  // Build a 32-bit array instruction.  For N-format opcodes pass
  // x2y2 = {N1, N3} as an 8-bit value in a2 and set x2 = 0.
  function automatic instr_t mk_instr(opcode_e op, bit t, bit x1, int y1,
                                      bit x2, int y2, bit x3, int y3);
    instr_t i;
    i.op = op; i.t = t; i.x1 = x1; i.y1 = 7'(y1);
    {i.x2, i.y2} = op_uses_n(op) ? 8'(y2) : {x2, 7'(y2)};
    i.x3 = x3; i.y3 = 7'(y3);
    return i;
  endfunction
endpackage
