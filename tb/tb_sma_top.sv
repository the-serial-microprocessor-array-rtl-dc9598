// End-to-end testbench of the SMA with a 16-PE array.
//
// The testbench plays the Master Computer: it issues 32-bit array
// instructions with the register values R0..R4, feeds the Parallel Input
// and captures the Parallel Output.  It runs
//   * the MTI double canceller (six instructions, TAG-gated with T = 0) for
//     eight radar sweeps, sliding the working area by advancing R0 by 2
//     and wrapping around the 128-word memory, checking
//     y = x(j-2) - 2 x(j-1) + x(j) in the enabled PEs and "unchanged" in
//     the disabled ones;
//   * the 13-element Barker pulse-compression filter (24 instructions,
//     T = 1, neighbour links at distance 1 and 3), checked against the
//     weighted sum of the 13 neighbouring inputs;
//   * indexed addressing (X = 1 with R1), constants (R2), a burst that
//     fills the AFB, and one MUL, MULC and DIV each.
// Every memory word read back is also compared with an instruction-level
// model.  Each mechanism is counted and must occur at least once.
module tb_sma_top;
  import sma_pkg::*;
  import sma_ref_pkg::*;

  localparam int N = 16;

  logic mc_clk = 1'b0, sc_clk = 1'b0, mc_rst_n = 1'b0, sc_rst_n = 1'b0;
  always #5 mc_clk = ~mc_clk;
  always #3.5 sc_clk = ~sc_clk;

  logic        instr_valid = 1'b0, instr_ready;
  instr_t      instr = '0;
  logic [15:0] r0 = '0, r1 = '0, r2 = '0, r3 = '0, r4 = '0;
  logic [N-1:0] par_in = '0, par_out, tags;
  logic        io_strobe, sc_idle, sc_fetch;
  logic [3:0]  io_idx;

  sma_top #(.N_PE(N)) dut (.*);

  logic [15:0] inw [N];
  logic [15:0] outcap [N];
  sma_model    model;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_gated = 0, n_all = 0, n_nbr1 = 0, n_nbr3 = 0, n_const = 0, n_reloc = 0,
      n_index = 0, n_wrap = 0, n_backpressure = 0, n_in = 0, n_out = 0, n_test = 0,
      n_mul = 0, n_div = 0;

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

  function automatic logic [6:0] phys(bit x, logic [6:0] y);
    return 7'(int'(y) + (x ? int'(r1) : 0) + int'(r0));
  endfunction

  // issue one instruction with the current R0..R4; the model follows it
  task automatic send(instr_t i);
    afb_word_t w;
    logic [15:0] dyn [];
    bit wraps;
    w.op = i.op; w.t = i.t; w.f1 = phys(i.x1, i.y1);
    w.f2 = op_uses_n(i.op) ? {i.x2, i.y2} : {1'b0, phys(i.x2, i.y2)};
    w.f3 = phys(i.x3, i.y3); w.co = r2; w.l1 = r3[3:0]; w.l2 = r4[3:0];
    dyn = new[N];
    foreach (dyn[k]) dyn[k] = inw[k];
    if (i.t) n_all++;
    else for (int n = 0; n < N; n++) if (!model.tag[n]) begin n_gated++; break; end
    if (i.op inside {OP_ADU1, OP_SBU1, OP_ADD1, OP_SBD1}) n_nbr1++;
    if (i.op inside {OP_MADU3, OP_MSBU3, OP_MADD3, OP_MSBD3}) n_nbr3++;
    if (i.op inside {OP_ADC, OP_SBC, OP_TCST, OP_TCRT, OP_TCQ}) n_const++;
    if (i.op inside {OP_TST, OP_TRT, OP_TCST, OP_TCRT, OP_LOT}) n_test++;
    if (i.op inside {OP_MUL, OP_MULC}) n_mul++;
    if (i.op == OP_DIV) n_div++;
    if (r0 != 0) n_reloc++;
    if (i.x1 || (i.x2 && !op_uses_n(i.op)) || i.x3) n_index++;
    wraps = (int'(i.y1) + int'(r0[6:0]) > 127) || (int'(i.y3) + int'(r0[6:0]) > 127);
    if (wraps) n_wrap++;
    model.exec(w, dyn);
    @(negedge mc_clk);
    instr <= i;
    instr_valid <= 1'b1;
    #1;
    while (!instr_ready) begin
      n_backpressure++;
      @(negedge mc_clk);
    end
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

  // read one word of every PE through OUT (T = 1, 16 bits)
  task automatic read_word(logic [6:0] logical, output logic [15:0] v [N]);
    logic [15:0] s3;
    s3 = r3; r3 = 16'd15;
    send(mk_instr(OP_OUT, 1'b1, 1'b0, int'(logical), 1'b0, 0, 1'b0, 0));
    wait_idle();
    n_out++;
    r3 = s3;
    for (int n = 0; n < N; n++) v[n] = outcap[n];
  endtask

  task automatic load_word(logic [6:0] logical);
    logic [15:0] s3;
    s3 = r3; r3 = 16'd15;
    send(mk_instr(OP_IN, 1'b1, 1'b0, int'(logical), 1'b0, 0, 1'b0, 0));
    wait_idle();
    n_in++;
    r3 = s3;
  endtask

  task automatic check_model(logic [6:0] logical, string what);
    logic [15:0] v [N];
    read_word(logical, v);
    for (int n = 0; n < N; n++)
      check(v[n] == model.mem[n][phys(1'b0, logical)],
            $sformatf("%s word %0d pe%0d: %h exp %h", what, logical, n, v[n],
                      model.mem[n][phys(1'b0, logical)]));
  endtask

  function automatic logic [15:0] rnd(int bits);  // signed, |v| < 2^bits
    return 16'($signed(16'($urandom)) >>> (15 - bits));
  endfunction

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Barker weights W_s, s = -6..6; the filter output is sum W_s x(n+s)
  int W [13] = '{-1, 1, -1, 1, -1, -1, 1, 1, -1, -1, -1, -1, -1};  // s = +6 .. -6

  initial begin
    logic [15:0] hist_re [N][$], hist_im [N][$];
    logic [15:0] v_re [N], v_im [N];
    logic [15:0] tagpat;
    int exp_re, exp_im;
    model = new(N);
    foreach (inw[i]) inw[i] = '0;
    repeat (4) @(posedge mc_clk);
    mc_rst_n = 1'b1; sc_rst_n = 1'b1;
    repeat (4) @(posedge mc_clk);
    r3 = 16'd15;

    // ---------------- TAG pattern: PEs with n % 3 == 0 stay disabled
    r0 = 16'd0;
    for (int n = 0; n < N; n++) inw[n] = (n % 3 != 0) ? 16'h8000 : 16'h0000;
    load_word(7'd64);
    send(mk_instr(OP_LOT, 1'b1, 1'b0, 64, 1'b0, 8'h00, 1'b0, 0));
    wait_idle();
    for (int n = 0; n < N; n++)
      check(tags[n] == (n % 3 != 0), $sformatf("LOT tag pe%0d", n));

    // ---------------- MTI double canceller, working area sliding from R0 = 118
    r0 = 16'd118;
    for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_re[n].push_back(inw[n]); end
    load_word(7'd124);
    for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_im[n].push_back(inw[n]); end
    load_word(7'd125);
    for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_re[n].push_back(inw[n]); end
    load_word(7'd126);
    for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_im[n].push_back(inw[n]); end
    load_word(7'd127);
    for (int j = 0; j < 8; j++) begin
      for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_re[n].push_back(inw[n]); end
      load_word(7'd0);
      for (int n = 0; n < N; n++) begin inw[n] = rnd(12); hist_im[n].push_back(inw[n]); end
      load_word(7'd1);
      // program of the MTI double canceller (T = 0: enabled PEs only)
      send(mk_instr(OP_SHL, 1'b0, 1'b0, 126, 1'b0, 8'h10, 1'b0, 122));
      send(mk_instr(OP_SHL, 1'b0, 1'b0, 127, 1'b0, 8'h10, 1'b0, 123));
      send(mk_instr(OP_SB,  1'b0, 1'b0, 124, 1'b0, 122, 1'b0, 124));
      send(mk_instr(OP_SB,  1'b0, 1'b0, 125, 1'b0, 123, 1'b0, 125));
      send(mk_instr(OP_ADD, 1'b0, 1'b0, 124, 1'b0, 0,   1'b0, 124));
      send(mk_instr(OP_ADD, 1'b0, 1'b0, 125, 1'b0, 1,   1'b0, 125));
      wait_idle();
      read_word(7'd124, v_re);
      read_word(7'd125, v_im);
      for (int n = 0; n < N; n++) begin
        if (n % 3 != 0) begin
          exp_re = int'($signed(hist_re[n][j])) - 2 * int'($signed(hist_re[n][j+1]))
                 + int'($signed(hist_re[n][j+2]));
          exp_im = int'($signed(hist_im[n][j])) - 2 * int'($signed(hist_im[n][j+1]))
                 + int'($signed(hist_im[n][j+2]));
          check(v_re[n] == 16'(exp_re), $sformatf("MTI re pe%0d j%0d: %h exp %h", n, j, v_re[n], 16'(exp_re)));
          check(v_im[n] == 16'(exp_im), $sformatf("MTI im pe%0d j%0d: %h exp %h", n, j, v_im[n], 16'(exp_im)));
        end else begin
          check(v_re[n] == hist_re[n][j], $sformatf("MTI gated pe%0d", n));
        end
        check(v_re[n] == model.mem[n][phys(1'b0, 7'd124)], $sformatf("MTI model re pe%0d", n));
        check(v_im[n] == model.mem[n][phys(1'b0, 7'd125)], $sformatf("MTI model im pe%0d", n));
      end
      r0 = 16'((r0 + 2) % 128);
    end

    // ---------------- Barker-13 pulse compression, all PEs (T = 1)
    r0 = 16'd0;
    for (int n = 0; n < N; n++) begin inw[n] = rnd(11); hist_re[n][0] = inw[n]; end
    load_word(7'd124);
    for (int n = 0; n < N; n++) begin inw[n] = rnd(11); hist_im[n][0] = inw[n]; end
    load_word(7'd125);
    begin
      int p [12][4] = '{'{OP_ADD1, 124, 124, 122}, '{OP_MSBD3, 124, 122, 120},
                        '{OP_SBU1, 122, 120, 122}, '{OP_SBD1, 122, 120, 122},
                        '{OP_MSBD3, 120, 122, 120}, '{OP_SBU1, 122, 120, 122},
                        '{OP_SBU1, 122, 124, 122}, '{OP_MADU3, 124, 122, 120},
                        '{OP_SBD1, 122, 120, 122}, '{OP_SBU1, 122, 120, 122},
                        '{OP_MSBU3, 120, 122, 120}, '{OP_ADD1, 122, 120, 122}};
      for (int k = 0; k < 12; k++)
        for (int c = 0; c < 2; c++)
          send(mk_instr(opcode_e'(p[k][0]), 1'b1, 1'b0, p[k][1] + c, 1'b0, p[k][2] + c,
                        1'b0, p[k][3] + c));
    end
    wait_idle();
    read_word(7'd122, v_re);
    read_word(7'd123, v_im);
    for (int n = 0; n < N; n++) begin
      exp_re = 0; exp_im = 0;
      for (int s = -6; s <= 6; s++)
        if (n + s >= 0 && n + s < N) begin
          exp_re += W[6 - s] * int'($signed(hist_re[n+s][0]));
          exp_im += W[6 - s] * int'($signed(hist_im[n+s][0]));
        end
      // the closed formula holds where all 13 taps exist; the array ends
      // see zeros through the recursive neighbour chain instead
      if (n >= 6 && n < N - 6) begin
      check(v_re[n] == 16'(exp_re), $sformatf("Barker re pe%0d: %h exp %h", n, v_re[n], 16'(exp_re)));
      check(v_im[n] == 16'(exp_im), $sformatf("Barker im pe%0d: %h exp %h", n, v_im[n], 16'(exp_im)));
      end
      check(v_re[n] == model.mem[n][122], $sformatf("Barker model pe%0d", n));
      check(v_im[n] == model.mem[n][123], $sformatf("Barker model im pe%0d", n));
    end

    // ---------------- indexed addressing, constant operand, AFB burst
    r0 = 16'd3; r1 = 16'd7; r2 = 16'h0123;
    send(mk_instr(OP_ADC, 1'b1, 1'b1, 110, 1'b0, 0, 1'b1, 100));   // F1 = 120, F3 = 110
    send(mk_instr(OP_TCST, 1'b1, 1'b1, 110, 1'b0, 0, 1'b0, 0));
    wait_idle();
    for (int n = 0; n < N; n++)
      check(tags[n] == model.tag[n], $sformatf("TCST tag pe%0d", n));
    r0 = 16'd0;
    check_model(7'd110, "ADC indexed");
    for (int k = 20; k < 45; k++) begin
      for (int n = 0; n < N; n++) inw[n] = 16'($urandom);
      load_word(7'(k));
    end
    r3 = 16'd7;
    for (int k = 0; k < 24; k++)
      send(mk_instr(OP_TRAN, 1'b1, 1'b0, 20 + k, 1'b0, 0, 1'b0, 21 + k));
    wait_idle();
    for (int k = 0; k < 25; k += 6) check_model(7'(20 + k), "burst");

    // ---------------- multiply, multiply by constant, divide
    r3 = 16'd7; r4 = 16'd5; r2 = 16'hB400;
    send(mk_instr(OP_MUL,  1'b1, 1'b0, 20, 1'b0, 21, 1'b0, 40));
    send(mk_instr(OP_MULC, 1'b1, 1'b0, 22, 1'b0, 0,  1'b0, 41));
    // Registers are sampled when a queued instruction is dispatched, so the
    // controller must let the queue drain before it changes them.
    wait_idle();
    r3 = 16'd9; r4 = 16'd6;
    send(mk_instr(OP_DIV,  1'b1, 1'b0, 23, 1'b0, 24, 1'b0, 42));
    wait_idle();
    check_model(7'd40, "MUL");
    check_model(7'd41, "MULC");
    check_model(7'd42, "DIV");

    check(n_gated > 0, "no TAG-gated instruction");
    check(n_all > 0, "no all-PE instruction");
    check(n_nbr1 > 0, "no distance-1 neighbour operand");
    check(n_nbr3 > 0, "no distance-3 neighbour operand");
    check(n_const > 0, "no broadcast constant");
    check(n_reloc > 0, "no relocation by R0");
    check(n_index > 0, "no indexing by R1");
    check(n_wrap > 0, "no wrap of the working area");
    check(n_backpressure > 0, "AFB never full");
    check(n_in > 0 && n_out > 0, "no serial I/O");
    check(n_test > 0, "no TAG test");
    check(n_mul > 0, "no multiplication");
    check(n_div > 0, "no division");
    $display("mechanisms: gated=%0d all=%0d nbr1=%0d nbr3=%0d const=%0d reloc=%0d index=%0d wrap=%0d afb_full_cycles=%0d in=%0d out=%0d tests=%0d mul=%0d div=%0d",
             n_gated, n_all, n_nbr1, n_nbr3, n_const, n_reloc, n_index, n_wrap,
             n_backpressure, n_in, n_out, n_test, n_mul, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
