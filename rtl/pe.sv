// Processing Element PE_n of the Serial Microprocessor Array.
//
// A PE is a bit-serial processor: a local memory M (MEM_BITS one-bit cells)
// plus six one-bit registers around a one-bit full adder/subtractor.
//   X, L  hold bits read from M; X is also seen by PEs n-1, n+1, n-3, n+3.
//   A     holds the bit to be written back to M; it is loaded through the
//         K mux either from the ALU output or from the serial Input line.
//   Y     gates the KN operand (1 normally, multiplier bit in MUL).
//   Z     selects add (0) or subtract (1); loadable from the ALU (DIV).
//   R     carry between successive bits; loadable from the ALU (DIV:
//         per-PE carry-in for add or subtract, this design's own).
//   TAG   result of a test; when TAG = 0 and the instruction's T bit is 0
//         the PE ignores the microorders (the original machine gates the PE clock; here
//         the same is done with a clock enable, which is equivalent for a
//         synchronous design and keeps one clock tree).
// Every clock the ACU broadcasts one pe_ctrl_t bundle (see sma_pkg).  All
// register transfers named in it happen at the same rising edge and read the
// values from before the edge.  The ALU output is also the PE's Output.
//
// Timing: memory address and RW come from the ACU registers MAR and RW of
// the current clock; a read bit is captured in X/L at the end of the clock,
// a write stores the current A at the end of the clock.
// Reset (this design's choice): all registers 0 except TAG, which resets to
// 1 so that every PE is enabled after reset.  Memory is not reset.
module pe
  import sma_pkg::*;
#(
  parameter int unsigned MEM_BITS = PE_MEM_BITS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  input  logic     x_dn1,     // X of PE n-1
  input  logic     x_up1,     // X of PE n+1
  input  logic     x_dn3,     // X of PE n-3
  input  logic     x_up3,     // X of PE n+3
  input  logic     in_bit,    // serial Input line
  output logic     x_out,     // own X, to the neighbours
  output logic     out_bit,   // ALU output (Output line)
  output logic     tag        // TAG register
);
  localparam int unsigned AW = $clog2(MEM_BITS);

  logic x_q, l_q, a_q, y_q, z_q, r_q, tag_q;
  logic en, mem_rd, op_a, op_b, sum, carry;

  // Tag logic: the PE works when the instruction is for all PEs or TAG = 1.
  assign en = ctrl.all_en | tag_q;

  pe_memory #(.BITS(MEM_BITS)) u_mem (
    .clk   (clk),
    .we    (en & ctrl.rw),
    .addr  (ctrl.mar[AW-1:0]),
    .wdata (a_q),
    .rdata (mem_rd)
  );

  pe_kn u_kn (
    .sel    (ctrl.kn_sel),
    .l_zero (ctrl.alu_l_zero),
    .l      (l_q),
    .x      (x_q),
    .src    (ctrl.src),
    .x_dn1  (x_dn1),
    .x_up1  (x_up1),
    .x_dn3  (x_dn3),
    .x_up3  (x_up3),
    .y      (y_q),
    .op_a   (op_a),
    .op_b   (op_b)
  );

  pe_alu u_alu (
    .a    (op_a),
    .b    (op_b),
    .z    (z_q),
    .cin  (r_q),
    .sum  (sum),
    .cout (carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= 1'b0; l_q <= 1'b0; a_q <= 1'b0;
      y_q <= 1'b0; z_q <= 1'b0; r_q <= 1'b0;
      tag_q <= 1'b1;
    end else if (en) begin
      if (ctrl.mem_to_x) x_q <= mem_rd;
      if (ctrl.mem_to_l) l_q <= mem_rd;
      unique case (ctrl.y_op)
        Y_1:     y_q <= 1'b1;
        Y_0:     y_q <= 1'b0;
        Y_L:     y_q <= l_q;
        default: ;
      endcase
      unique case (ctrl.z_op)
        Z_0:     z_q <= 1'b0;
        Z_1:     z_q <= 1'b1;
        Z_ALU:   z_q <= sum;
        default: ;
      endcase
      unique case (ctrl.r_op)
        R_0:     r_q <= 1'b0;
        R_1:     r_q <= 1'b1;
        R_CARRY: r_q <= carry;
        R_SUM:   r_q <= sum;
        default: ;
      endcase
      // K mux in front of A: ALU result or serial input
      unique case (ctrl.a_op)
        A_ALU:   a_q <= sum;
        A_IN:    a_q <= in_bit;
        default: ;
      endcase
      unique case (ctrl.tag_op)
        T_ALU:   tag_q <= sum;
        T_ALU_N: tag_q <= ~sum;
        T_CPL:   tag_q <= ~tag_q;
        default: ;
      endcase
    end
  end

  assign x_out   = x_q;
  assign out_bit = sum;
  assign tag     = tag_q;
endmodule
