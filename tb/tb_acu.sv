// Testbench of the Array Control Unit: the ACU drives a small PE array and
// executes random array instructions of every implemented opcode; after
// each one the TAG registers are compared with an instruction-level model,
// and memory words are read back through OUT instructions and compared.
// MUL, MULC and DIV are also checked on the scratch words 126/127 they
// use, and DIV once more on its accuracy for operands with |F1| < |F2|.
// Also checks the cycle counts of ADD (three clocks per operand bit), MUL
// and DIV.
module tb_acu;
  import sma_pkg::*;
  import sma_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  afb_word_t q [$];
  logic      afb_empty, afb_rd, io_strobe, idle, fetch;
  afb_word_t afb_rdata;
  logic [3:0] io_idx;
  pe_ctrl_t  ctrl;
  logic [N-1:0] par_in, par_out, tags;
  logic [15:0] inw [N];
  logic [15:0] outcap [N];

  int checks = 0, failures = 0;
  int ncycles = 0;
  sma_model model;

  acu dut (.clk, .rst_n, .afb_empty, .afb_rdata, .afb_rd, .ctrl,
           .io_strobe, .io_idx, .idle, .fetch);
  pe_array #(.N_PE(N)) u_arr (.clk, .rst_n, .ctrl, .par_in, .par_out, .tags);

  // FIFO model and serial input, refreshed between rising edges
  always @(negedge clk) begin
    afb_empty = (q.size() == 0);
    afb_rdata = afb_empty ? '0 : q[0];
    for (int n = 0; n < N; n++) par_in[n] = inw[n][4'd15 - io_idx];
  end

  always @(posedge clk) begin
    ncycles <= ncycles + 1;
    if (afb_rd && q.size() > 0) void'(q.pop_front());
    if (io_strobe)
      for (int n = 0; n < N; n++) outcap[n][4'd15 - io_idx] <= par_out[n];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // run one AFB word to completion, return clocks from fetch to idle
  task automatic run(afb_word_t w, output int clocks);
    logic [15:0] dyn [];
    int t0;
    dyn = new[N];
    foreach (dyn[i]) dyn[i] = inw[i];
    q.push_back(w);
    @(posedge clk iff fetch);
    t0 = ncycles;
    @(posedge clk iff idle);
    clocks = ncycles - t0;
    model.exec(w, dyn);
    for (int n = 0; n < N; n++)
      check(tags[n] == model.tag[n],
            $sformatf("TAG pe%0d op %0d: %b exp %b", n, w.op, tags[n], model.tag[n]));
  endtask

  task automatic check_word(int f);
    int c;
    run(mk_word(OP_OUT, 1'b1, f, 0, 0, 16'h0, 15), c);
    for (int n = 0; n < N; n++)
      check(outcap[n] == model.mem[n][f],
            $sformatf("word %0d pe%0d: %h exp %h", f, n, outcap[n], model.mem[n][f]));
  endtask

  function automatic logic [15:0] small_rand();
    logic [15:0] v;
    v = 16'($urandom);
    v[14] = v[15];            // top two bits equal: no overflow in compares
    return v;
  endfunction

  opcode_e ops [] = '{OP_ADD, OP_SB, OP_ADC, OP_SBC, OP_ADU1, OP_SBU1, OP_ADD1, OP_SBD1,
                      OP_MADU3, OP_MSBU3, OP_MADD3, OP_MSBD3, OP_MUL, OP_MULC, OP_DIV, OP_TRAN, OP_SHL, OP_SHR,
                      OP_TQ, OP_TCQ, OP_TST, OP_TRT, OP_TCST, OP_TCRT, OP_LOT, OP_COT,
                      OP_ANDB, OP_ORB, OP_CMB, OP_IN, OP_OUT};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, l1, f1, f2, f3;
    bit t;
    opcode_e op;
    afb_word_t w;
    model = new(N);
    foreach (inw[i]) inw[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // load words 0..15, and the multiply scratch words 126 and 127, of
    // every PE through the serial input
    for (int f = 0; f < 18; f++) begin
      for (int n = 0; n < N; n++) inw[n] = small_rand();
      run(mk_word(OP_IN, 1'b1, (f < 16) ? f : f + 110, 0, 0, 16'h0, 15), c);
    end
    for (int f = 0; f < 16; f++) check_word(f);

    // cycle count of ADD: fetch + 3 set-up clocks + 3 clocks per bit
    for (int l = 0; l < 16; l += 5) begin
      run(mk_word(OP_ADD, 1'b1, 1, 2, 9, 16'h0, l), c);
      check(c == 4 + 3 * (l + 1), $sformatf("ADD L1=%0d took %0d clocks", l, c));
    end

    // cycle counts of MUL and DIV (formulas of their microprograms)
    for (int l = 0; l < 16; l += 7)
      for (int m = 0; m < 16; m += 5) begin
        run(mk_word(OP_MUL, 1'b1, 1, 2, 10, 16'h0, l, m), c);
        check(c == 9 + 3 * (m + 1) + ((l > 0) ? l : 1) + m * (3 * l + 10) + 3 * (l + 1),
              $sformatf("MUL L1=%0d L2=%0d took %0d clocks", l, m, c));
        run(mk_word(OP_DIV, 1'b1, 1, 2, 10, 16'h0, l, m), c);
        check(c == 9 + 3 * (l + 1) + ((m > 0) ? m : 1) * (3 * (l + 1) + 6),
              $sformatf("DIV L1=%0d L2=%0d took %0d clocks", l, m, c));
      end
    for (int f = 0; f < 16; f++) check_word(f);

    for (int k = 0; k < 400; k++) begin
      op = ops[$urandom_range(ops.size() - 1)];
      l1 = $urandom_range(15, 1);
      t  = 1'($urandom);
      f1 = $urandom_range(7);
      f2 = $urandom_range(7);
      f3 = $urandom_range(15, 8);
      case (op)
        OP_ADU1, OP_SBU1, OP_ADD1, OP_SBD1, OP_MADU3, OP_MSBU3, OP_MADD3, OP_MSBD3: begin
          t = 1'b1;  // neighbours must all be running
          if (op inside {OP_MADU3, OP_MSBU3, OP_MADD3, OP_MSBD3}) f2 = $urandom_range(15, 8);
          while (f3 == f2) f3 = $urandom_range(15, 8);
        end
        OP_SHL, OP_SHR, OP_LOT, OP_ANDB, OP_ORB, OP_CMB:
          f2 = {$urandom_range(15), 4'($urandom_range(15))};
        OP_TQ, OP_TCQ: begin
          f2 = {4'd0, 4'($urandom_range(15, 2))};
          f3 = $urandom_range(7);
        end
        OP_IN: begin
          f1 = $urandom_range(15, 8);
          for (int n = 0; n < N; n++) inw[n] = 16'($urandom);
        end
        default: ;
      endcase
      w = mk_word(op, t, f1, f2, f3, small_rand(), l1, $urandom_range(15));
      run(w, c);
      if (op == OP_OUT)
        for (int n = 0; n < N; n++)
          if (t || model.tag[n])
            check((outcap[n] >> (15 - l1)) == (model.mem[n][f1] >> (15 - l1)),
                  $sformatf("OUT pe%0d", n));
      if (failures == 0) begin
        check_word(f3); check_word(f1);
        if (!op_uses_n(op)) check_word(f2[6:0]);
        if (op inside {OP_MUL, OP_MULC, OP_DIV}) begin check_word(126); check_word(127); end
        if (failures != 0) $display("after %s t=%0d l1=%0d f1=%0d f2=%0h f3=%0d", op.name(), t, l1, f1, f2, f3);
      end
      if (k % 20 == 19) for (int f = 0; f < 16; f++) check_word(f);
    end
    for (int f = 0; f < 16; f++) check_word(f);

    // division accuracy, independent of the model: for |F1| < |F2| the
    // quotient is within one unit of F1 * 2^L2 / F2
    for (int k = 0; k < 40; k++) begin
      int dl1, dl2;
      longint av [N], dv [N], qv;
      real ex;
      logic [15:0] wa [N], wd [N];
      dl1 = $urandom_range(15, 2);
      dl2 = $urandom_range(15, 1);
      for (int n = 0; n < N; n++) begin
        do dv[n] = longint'($urandom_range((1 << (dl1 + 1)) - 1)) - (longint'(1) << dl1);
        while (dv[n] == 0 || dv[n] == -(longint'(1) << dl1));
        av[n] = longint'($urandom_range(2 * ((dv[n] < 0) ? -dv[n] : dv[n]) - 2))
                - (((dv[n] < 0) ? -dv[n] : dv[n]) - 1);
        wa[n] = sma_model::fput(16'h0, dl1, av[n]);
        wd[n] = sma_model::fput(16'h0, dl1, dv[n]);
      end
      foreach (inw[n]) inw[n] = wa[n];
      run(mk_word(OP_IN, 1'b1, 0, 0, 0, 16'h0, 15), c);
      foreach (inw[n]) inw[n] = wd[n];
      run(mk_word(OP_IN, 1'b1, 1, 0, 0, 16'h0, 15), c);
      run(mk_word(OP_DIV, 1'b1, 0, 1, 9, 16'h0, dl1, dl2), c);
      check_word(9);
      for (int n = 0; n < N; n++) begin
        qv = sma_model::fget(outcap[n], dl2);
        ex = real'(av[n]) * real'(longint'(1) << dl2) / real'(dv[n]);
        check(real'(qv) - ex <= 1.0 && ex - real'(qv) <= 1.0,
              $sformatf("DIV %0d/%0d L1=%0d L2=%0d gave %0d, exact %f", av[n], dv[n], dl1, dl2, qv, ex));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
