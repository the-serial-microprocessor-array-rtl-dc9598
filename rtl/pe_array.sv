// Array of N_PE Processing Elements (the PE side of the Slave Computer).
//
// All PEs receive the same microorder bundle from the ACU.  Each PE's X
// register is wired to its neighbours at distance 1 and 3 (PE n sees the X
// of n-1, n+1, n-3 and n+3).  The array is open at both ends: a neighbour
// that does not exist reads as 0 (the wrap-around at the ends is not
// described, so none is assumed).  Each PE has its own serial Input bit
// (Parallel Input) and Output bit (Parallel Output, the ALU output).
//
// N_PE defaults to 1024 ("typically one thousand or more" PEs); memory per
// PE is 2048 bits.  No timing beyond that of a single PE.
module pe_array
  import sma_pkg::*;
#(
  parameter int unsigned N_PE     = 1024,
  parameter int unsigned MEM_BITS = PE_MEM_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pe_ctrl_t        ctrl,
  input  logic [N_PE-1:0] par_in,
  output logic [N_PE-1:0] par_out,
  output logic [N_PE-1:0] tags
);
  logic [N_PE-1:0] x;

  for (genvar n = 0; n < N_PE; n++) begin : g_pe
    pe #(.MEM_BITS(MEM_BITS)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .ctrl    (ctrl),
      .x_dn1   ((n >= 1)        ? x[(n >= 1) ? n-1 : 0] : 1'b0),
      .x_up1   ((n + 1 < N_PE)  ? x[(n + 1 < N_PE) ? n+1 : 0] : 1'b0),
      .x_dn3   ((n >= 3)        ? x[(n >= 3) ? n-3 : 0] : 1'b0),
      .x_up3   ((n + 3 < N_PE)  ? x[(n + 3 < N_PE) ? n+3 : 0] : 1'b0),
      .in_bit  (par_in[n]),
      .x_out   (x[n]),
      .out_bit (par_out[n]),
      .tag     (tags[n])
    );
  end
endmodule
