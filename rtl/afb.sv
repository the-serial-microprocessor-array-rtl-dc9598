// Asynchronous FIFO Buffer (AFB) between the Master Computer and the ACU.
//
// The Master Computer writes packed array instructions (AFB words) in its
// own clock domain; the ACU reads them in the array clock domain, so the
// two computers run decoupled and the Master Computer can prepare the next
// instructions while the array works.  This is a standard dual-clock FIFO:
// binary read and write pointers one bit wider than the address, passed to
// the other domain as Gray code through two flip-flops.  Flags are
// conservative (full and empty may stay set for two clocks of the other
// domain after the condition ends).
//
// The read side is first-word-fall-through: rdata shows the oldest word
// whenever empty is low, and rd pops it.  Writing when full or reading when
// empty is ignored (and flagged by an assertion).
//
// The AFB's existence and word format come from the published system; the
// depth (DEPTH, default 8) and the Gray-pointer construction are this
// design's choice.
module afb
  import sma_pkg::*;
#(
  parameter int unsigned DEPTH = 8,                 // power of two
  parameter int unsigned W     = AFB_W
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;  // read pointer seen in write domain
  logic [AW:0]  wgray_r1, wgray_r2;  // write pointer seen in read domain
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------------------------------------------------- write side
  assign wbin_n = (wr && !full) ? wbin + 1'b1 : wbin;
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk)
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ----------------------------------------------------------- read side
  assign rbin_n = (rd && !empty) ? rbin + 1'b1 : rbin;
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr && full))
    else $error("AFB written while full");
  assert property (@(posedge rclk) disable iff (!rrst_n) !(rd && empty))
    else $error("AFB read while empty");
endmodule
