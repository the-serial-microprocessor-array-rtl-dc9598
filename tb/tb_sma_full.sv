// Full-size run of the SMA (default parameters: 1024 PEs, 2048-bit PE
// memories): loads two complex samples into every PE through the Parallel
// Input, runs one MTI double-canceller step (SHL, SB, ADD on the real
// parts, T = 1) and one neighbour instruction (ADU1), reads the results
// back through the Parallel Output and checks them in every PE.
module tb_sma_full;
  import sma_pkg::*;
  import sma_ref_pkg::*;

  localparam int N = 1024;

  logic mc_clk = 1'b0, sc_clk = 1'b0, mc_rst_n = 1'b0, sc_rst_n = 1'b0;
  always #5 mc_clk = ~mc_clk;
  always #3.5 sc_clk = ~sc_clk;

  logic        instr_valid = 1'b0, instr_ready;
  instr_t      instr = '0;
  logic [15:0] r0 = '0, r1 = '0, r2 = '0, r3 = 16'd15, r4 = '0;
  logic [N-1:0] par_in = '0, par_out, tags;
  logic        io_strobe, sc_idle, sc_fetch;
  logic [3:0]  io_idx;

  sma_top dut (.*);

  logic [15:0] inw [N];
  logic [15:0] outcap [N];
  logic [15:0] x0 [N], x1 [N], x2 [N];
  int checks = 0, failures = 0;

  always @(negedge sc_clk)
    for (int n = 0; n < N; n++) par_in[n] <= inw[n][4'd15 - io_idx];
  always @(posedge sc_clk)
    if (io_strobe) for (int n = 0; n < N; n++) outcap[n][4'd15 - io_idx] <= par_out[n];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic send(instr_t i);
    @(negedge mc_clk);
    instr <= i;
    instr_valid <= 1'b1;
    #1;
    while (!instr_ready) @(negedge mc_clk);
    @(posedge mc_clk);
    instr_valid <= 1'b0;
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 12) begin
      @(posedge sc_clk);
      quiet = sc_idle ? quiet + 1 : 0;
    end
  endtask

  function automatic logic [15:0] rnd12();
    return 16'($signed(16'($urandom)) >>> 3);
  endfunction

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    foreach (inw[i]) inw[i] = '0;
    repeat (4) @(posedge mc_clk);
    mc_rst_n = 1'b1; sc_rst_n = 1'b1;
    repeat (4) @(posedge mc_clk);
    for (int n = 0; n < N; n++) begin x0[n] = rnd12(); x1[n] = rnd12(); x2[n] = rnd12(); end
    foreach (inw[n]) inw[n] = x2[n];
    send(mk_instr(OP_IN, 1'b1, 1'b0, 124, 1'b0, 0, 1'b0, 0)); wait_idle();
    foreach (inw[n]) inw[n] = x1[n];
    send(mk_instr(OP_IN, 1'b1, 1'b0, 126, 1'b0, 0, 1'b0, 0)); wait_idle();
    foreach (inw[n]) inw[n] = x0[n];
    send(mk_instr(OP_IN, 1'b1, 1'b0, 0, 1'b0, 0, 1'b0, 0)); wait_idle();
    send(mk_instr(OP_SHL, 1'b1, 1'b0, 126, 1'b0, 8'h10, 1'b0, 122));
    send(mk_instr(OP_SB,  1'b1, 1'b0, 124, 1'b0, 122, 1'b0, 124));
    send(mk_instr(OP_ADD, 1'b1, 1'b0, 124, 1'b0, 0,   1'b0, 124));
    send(mk_instr(OP_ADU1, 1'b1, 1'b0, 0, 1'b0, 0, 1'b0, 10));
    send(mk_instr(OP_OUT, 1'b1, 1'b0, 124, 1'b0, 0, 1'b0, 0));
    wait_idle();
    for (int n = 0; n < N; n++) begin
      e = int'($signed(x2[n])) - 2 * int'($signed(x1[n])) + int'($signed(x0[n]));
      check(outcap[n] == 16'(e), $sformatf("MTI pe%0d: %h exp %h", n, outcap[n], 16'(e)));
    end
    send(mk_instr(OP_OUT, 1'b1, 1'b0, 10, 1'b0, 0, 1'b0, 0));
    wait_idle();
    for (int n = 0; n < N; n++) begin
      e = int'($signed(x0[n])) + ((n + 1 < N) ? int'($signed(x0[n+1])) : 0);
      check(outcap[n] == 16'(e), $sformatf("ADU1 pe%0d: %h exp %h", n, outcap[n], 16'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
