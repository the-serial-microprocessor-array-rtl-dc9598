// Serial Microprocessor Array: Slave Computer with its Master Computer
// dispatch stage.
//
// Data path of one array instruction:
//   Master Computer registers R0..R4 + 32-bit array instruction
//     -> mc_dispatch (address relocation, AFB word packing, mc_clk domain)
//     -> afb (asynchronous FIFO, mc_clk -> sc_clk)
//     -> acu (microprogrammed control, one microorder bundle per sc_clk)
//     -> pe_array (N_PE bit-serial PEs with 2048-bit memories)
// The Master Computer's CPU and main memory (program flow, register
// loading) are outside this module: whatever drives instr/r0..r4 plays
// their role.  The PEs' serial Input and Output lines are the Parallel
// Input and Parallel Output ports; io_strobe/io_idx say in which sc_clk an
// IN instruction takes, or an OUT instruction shows, bit io_idx.
//
// Defaults: N_PE = 1024 PEs, 2048 bits per PE, AFB depth 8 (assumed).
module sma_top
  import sma_pkg::*;
#(
  parameter int unsigned N_PE      = 1024,
  parameter int unsigned MEM_BITS  = PE_MEM_BITS,
  parameter int unsigned AFB_DEPTH = 8
) (
  // Master Computer side
  input  logic            mc_clk,
  input  logic            mc_rst_n,
  input  logic            instr_valid,
  output logic            instr_ready,
  input  instr_t          instr,
  input  logic [15:0]     r0,
  input  logic [15:0]     r1,
  input  logic [15:0]     r2,
  input  logic [15:0]     r3,
  input  logic [15:0]     r4,
  // Slave Computer side
  input  logic            sc_clk,
  input  logic            sc_rst_n,
  input  logic [N_PE-1:0] par_in,
  output logic [N_PE-1:0] par_out,
  output logic            io_strobe,
  output logic [3:0]      io_idx,
  output logic [N_PE-1:0] tags,
  output logic            sc_idle,    // ACU waiting and AFB empty
  output logic            sc_fetch    // ACU takes an instruction this clock
);
  logic       d_valid, d_ready, afb_full, afb_empty, afb_rd;
  afb_word_t  d_word, afb_word;
  pe_ctrl_t   ctrl;

  mc_dispatch u_disp (
    .clk       (mc_clk),
    .rst_n     (mc_rst_n),
    .in_valid  (instr_valid),
    .in_ready  (instr_ready),
    .instr     (instr),
    .r0        (r0),
    .r1        (r1),
    .r2        (r2),
    .r3        (r3),
    .r4        (r4),
    .out_valid (d_valid),
    .out_ready (d_ready),
    .out_word  (d_word)
  );

  assign d_ready = !afb_full;

  afb #(.DEPTH(AFB_DEPTH)) u_afb (
    .wclk   (mc_clk),
    .wrst_n (mc_rst_n),
    .wr     (d_valid && !afb_full),
    .wdata  (d_word),
    .full   (afb_full),
    .rclk   (sc_clk),
    .rrst_n (sc_rst_n),
    .rd     (afb_rd),
    .rdata  (afb_word),
    .empty  (afb_empty)
  );

  acu u_acu (
    .clk       (sc_clk),
    .rst_n     (sc_rst_n),
    .afb_empty (afb_empty),
    .afb_rdata (afb_word),
    .afb_rd    (afb_rd),
    .ctrl      (ctrl),
    .io_strobe (io_strobe),
    .io_idx    (io_idx),
    .idle      (sc_idle),
    .fetch     (sc_fetch)
  );

  pe_array #(.N_PE(N_PE), .MEM_BITS(MEM_BITS)) u_array (
    .clk     (sc_clk),
    .rst_n   (sc_rst_n),
    .ctrl    (ctrl),
    .par_in  (par_in),
    .par_out (par_out),
    .tags    (tags)
  );
endmodule
