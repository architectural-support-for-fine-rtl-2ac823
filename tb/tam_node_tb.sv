// tam_node_tb: end-to-end run of a small TAM-style code-block on tam_node at its default
// sizes.
//
// The program builds a frame (fp), an LCV (lcv, r_lcv) and a code-block base (cbbase), then:
//   T0 pushes T1 and T2 onto the LCV with std and stops (cdbp pop path);
//   T2 adds frame slot b into an accumulator and fails to synchronise on T3 (count 2 -> 1),
//      so control goes to T1 and the next continuation is popped into r_lcv;
//   T1 adds slot a and succeeds (count 1 -> 0), branching to T3 with the delay slot annulled;
//   T3 stores the sum and pushes synchronising thread T4 twice (first attempt fails, second
//      succeeds and pushes with std), then stops, which runs T4;
//   T4 stores a marker and leaves with a register-indirect jmpl to the LCV bottom (DONE).
// Checked: memory results, the register state of the LCV, the order in which threads ran,
// the cycle costs of the two synchronising branches (12 cycles for load-add plus an
// unsuccessful branch, 8 for load-add plus a successful one), and that each mechanism
// (cdbp branch, cdbp pop, std push, annulled slot, stall, both bypasses, jmpl, taken and
// untaken Bicc, load, store) happened at least once.
module tam_node_tb;
  import tam_pkg::*;
  import sparc_asm_pkg::*;

  localparam int FP = 24, T1R = 8, ACC = 9, TMP = 10, LCV = 16, CBB = 17, RLCV = 18;
  localparam int CB = 'h10;
  localparam int T0_W = 5, T1_W = 16, T2_W = 28, T3_W = 40, T4_W = 60, DONE_W = 80;
  localparam int A_VAL = 'h1234, B_VAL = 'h0F0F;

  function automatic int off(int w);
    return w * 4 - CB;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_we = 0, host_we = 0;
  word_t ld_addr = 0, ld_data = 0, host_waddr = 0, host_wdata = 0, host_addr = 0, host_rdata;
  logic dbg_start;
  word_t dbg_pc;
  icc_t icc;
  events_t ev;

  tam_node dut (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_data, .host_we, .host_waddr, .host_wdata,
    .host_addr, .host_rdata, .dbg_ex_start(dbg_start), .dbg_ex_pc(dbg_pc), .dbg_icc(icc), .ev
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int first_cyc [int];
  int n_cdbp_thr, n_cdbp_pop, n_std, n_annul, n_stall, n_bype, n_bypw, n_jmpl, n_bt, n_bu,
      n_ld, n_st;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dbg_start && !first_cyc.exists(int'(dbg_pc))) first_cyc[int'(dbg_pc)] = cyc;
      n_cdbp_thr += int'(ev.cdbp_thr);
      n_cdbp_pop += int'(ev.cdbp_pop);
      n_std      += int'(ev.std_push);
      n_annul    += int'(ev.annul);
      n_stall    += int'(ev.ex_stall);
      n_bype     += int'(ev.bypass_e);
      n_bypw     += int'(ev.bypass_w);
      n_jmpl     += int'(ev.jmpl);
      n_bt       += int'(ev.br_taken);
      n_bu       += int'(ev.br_untaken);
      n_ld       += int'(ev.load);
      n_st       += int'(ev.store);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  word_t prog [128];

  task automatic load_word(int w, word_t d);
    @(negedge clk);
    ld_we = 1; ld_addr = w * 4; ld_data = d;
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic host_write(int a, word_t d);
    @(negedge clk);
    host_we = 1; host_waddr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic word_t mem_word(int a);
    host_addr = a;
    return dut.u_dmem.mem[a / 4];
  endfunction

  initial begin
    foreach (prog[i]) prog[i] = nop();
    // prologue
    prog[0] = ori(FP, 0, 'h100);
    prog[1] = ori(LCV, 0, 'h400);
    prog[2] = ori(CBB, 0, CB);
    prog[3] = ori(RLCV, 0, off(DONE_W));
    prog[4] = ori(ACC, 0, 0);
    // T0: push T1, push T2, stop
    prog[5]  = stdec(RLCV, LCV);
    prog[6]  = ori(RLCV, 0, off(T1_W));
    prog[7]  = stdec(RLCV, LCV);
    prog[8]  = ori(RLCV, 0, off(T2_W));
    prog[9]  = orcc(0, 0, 0);
    prog[10] = cdbp(COND_NE, 0);
    prog[11] = nop();
    // T1: acc += a ; synchronising branch to T3
    prog[16] = ld(TMP, FP, 8);
    prog[17] = add(ACC, ACC, TMP);
    prog[18] = ldub(T1R, FP, 0);
    prog[19] = subcci(T1R, T1R, 1);
    prog[20] = cdbp(COND_E, T3_W - 20);
    prog[21] = stb(T1R, FP, 0);
    // T2: acc += b ; synchronising branch to T3
    prog[28] = ld(TMP, FP, 12);
    prog[29] = add(ACC, ACC, TMP);
    prog[30] = ldub(T1R, FP, 0);
    prog[31] = subcci(T1R, T1R, 1);
    prog[32] = cdbp(COND_E, T3_W - 32);
    prog[33] = stb(T1R, FP, 0);
    // T3: store sum, push synchronising T4 twice, stop
    prog[40] = st(ACC, FP, 16);
    for (int k = 0; k < 2; k++) begin
      int b;
      b = 41 + 6 * k;
      prog[b]     = ldub(T1R, FP, 1);
      prog[b + 1] = subcci(T1R, T1R, 1);
      prog[b + 2] = bicc(COND_NE, 1, 4);
      prog[b + 3] = stb(T1R, FP, 1);
      prog[b + 4] = stdec(RLCV, LCV);
      prog[b + 5] = ori(RLCV, 0, off(T4_W));
    end
    prog[53] = orcc(0, 0, 0);
    prog[54] = cdbp(COND_NE, 0);
    prog[55] = nop();
    // T4: marker, then register-indirect jump to the LCV bottom
    prog[60] = ori(11, 0, 'h5A);
    prog[61] = st(11, FP, 20);
    prog[62] = jmpl(0, RLCV, CBB);
    prog[63] = ori(12, 0, 7);          // delay slot: executes
    prog[64] = ori(13, 0, 'hBAD);      // must never execute
    // DONE: idle loop
    prog[DONE_W] = bicc(COND_A, 0, 0);

    rst_n = 0;
    foreach (prog[i]) load_word(i, prog[i]);
    host_write('h100, 32'h0202_0000);  // entry counts of T3 and T4
    host_write('h108, A_VAL);
    host_write('h10C, B_VAL);
    host_write('h110, 0);
    host_write('h114, 0);
    @(negedge clk);
    rst_n = 1;

    wait (first_cyc.exists(DONE_W * 4));
    repeat (10) @(posedge clk);

    // results
    check("sum stored", mem_word('h110), A_VAL + B_VAL);
    check("T4 marker", mem_word('h114), 'h5A);
    check("T3 count after failed then successful sync", mem_word('h100) >> 24, 1);
    check("T4 count stored once", (mem_word('h100) >> 16) & 'hFF, 1);
    check("jmpl delay slot executed", dut.u_core.u_rf.regs[12], 7);
    check("instruction after delay slot squashed", dut.u_core.u_rf.regs[13], 0);
    check("lcv back at bottom", dut.u_core.u_rf.regs[LCV], 'h400);
    check("r_lcv holds bottom continuation", dut.u_core.u_rf.regs[RLCV], off(DONE_W));
    check("LCV bottom slot", mem_word('h400) >> 16, off(DONE_W));
    check("host read port", host_rdata, mem_word('h400));

    // thread order T0 < T2 < T1 < T3 < T4 < DONE
    check("T2 after T0", first_cyc[T2_W * 4] > first_cyc[T0_W * 4], 1);
    check("T1 after T2", first_cyc[T1_W * 4] > first_cyc[T2_W * 4], 1);
    check("T3 after T1", first_cyc[T3_W * 4] > first_cyc[T1_W * 4], 1);
    check("T4 after T3", first_cyc[T4_W * 4] > first_cyc[T3_W * 4], 1);
    check("cdbp target skipped on pop", first_cyc.exists(64 * 4), 0);
    // ld 2 + add 1 + ldub 2 + subcc 1 + cdbp 3 + stb 3
    check("T2 -> T1 cycles", first_cyc[T1_W * 4] - first_cyc[T2_W * 4], 12);
    // ld 2 + add 1 + ldub 2 + subcc 1 + cdbp 2
    check("T1 -> T3 cycles", first_cyc[T3_W * 4] - first_cyc[T1_W * 4], 8);

    // every mechanism happened
    check("cdbp branch to thread seen", n_cdbp_thr > 0, 1);
    check("cdbp pop seen", n_cdbp_pop > 0, 1);
    check("std push seen", n_std > 0, 1);
    check("annulled delay slot seen", n_annul > 0, 1);
    check("execute stall seen", n_stall > 0, 1);
    check("bypass from execute seen", n_bype > 0, 1);
    check("bypass from write-back seen", n_bypw > 0, 1);
    check("jmpl seen", n_jmpl > 0, 1);
    check("taken branch seen", n_bt > 0, 1);
    check("untaken branch seen", n_bu > 0, 1);
    check("load seen", n_ld > 0, 1);
    check("store seen", n_st > 0, 1);
    check("cdbp pops", n_cdbp_pop, 3);
    check("std pushes", n_std, 3);
    $display("events: cdbp_thr=%0d cdbp_pop=%0d std=%0d annul=%0d stall=%0d byp_e=%0d byp_w=%0d jmpl=%0d bt=%0d bu=%0d ld=%0d st=%0d",
             n_cdbp_thr, n_cdbp_pop, n_std, n_annul, n_stall, n_bype, n_bypw, n_jmpl, n_bt,
             n_bu, n_ld, n_st);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
