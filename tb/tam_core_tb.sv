// tam_core_tb: runs the thread-synchronisation and scheduling sequences of the modified
// instruction set on tam_core and checks their cycle costs and their effects.
//
// Each sequence is placed after a short prologue (fp, lcv, cbbase, r_lcv, Z flag) and run
// from reset. The cost of a sequence is the number of cycles from the first execute cycle of
// its first instruction to the first execute cycle of the instruction control reaches next.
// Expected costs: 1 (unsynchronising branch), 5 / 9 (synchronising branch, successful /
// unsuccessful, the latter including the pop), 4 / 9 / 7 (push unsynchronising, successful,
// unsuccessful), 4 (stop) and the same plus 2 for every SWITCH variant, whose leading
// conditional branch is an annulling branch that falls through. The weighted averages over
// the two benchmark instruction mixes must then be 6.01 and 7.14 cycles.
// The stock SPARC sequences (sth/sub push, lduh/jmp/add stop, be-based synchronisation) are
// also run to show that unmodified code still works: push 5, stop 5, successful branch 4,
// failed push 7; the failed branch and the successful push cost 7 and 9, one cycle less than
// the stock cost model, because a non-annulling untaken branch costs 1 cycle here.
// Memories are simple models inside this testbench.
module tam_core_tb;
  import tam_pkg::*;
  import sparc_asm_pkg::*;

  localparam int FP = 24, T1 = 8, LCV = 16, CBB = 17, RLCV = 18;
  localparam int CB_BASE = 'h40;
  localparam int X_W = 100, Y_W = 120, Z_W = 140, FAR_W = 200;   // thread word addresses
  localparam int OFF_Y = Y_W * 4 - CB_BASE;
  localparam int OFF_Z = Z_W * 4 - CB_BASE;
  localparam int OFF_N = 'h123;   // thread offset pushed by the push sequences
  localparam int S_W = 6;         // first word of the sequence under test

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t imem_m [1024];
  logic [7:0] dmem_m [4096];

  word_t im_addr, im_rdata, dm_addr, dm_wdata, dm_rdata, dbg_pc;
  logic [3:0] dm_be;
  logic dm_we, dbg_start;
  icc_t icc;
  events_t ev;

  tam_core dut (
    .clk, .rst_n, .im_addr, .im_rdata, .dm_addr, .dm_wdata, .dm_be, .dm_we, .dm_rdata,
    .dbg_ex_start(dbg_start), .dbg_ex_pc(dbg_pc), .dbg_icc(icc), .ev
  );

  assign im_rdata = imem_m[im_addr[11:2]];
  assign dm_rdata = {dmem_m[{dm_addr[11:2], 2'd0}], dmem_m[{dm_addr[11:2], 2'd1}],
                     dmem_m[{dm_addr[11:2], 2'd2}], dmem_m[{dm_addr[11:2], 2'd3}]};
  always_ff @(posedge clk)
    if (dm_we)
      for (int i = 0; i < 4; i++)
        if (dm_be[3-i]) dmem_m[{dm_addr[11:2], 2'(i)}] <= dm_wdata[31-8*i -: 8];

  int cyc = 0;
  int first_cyc [int];
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dbg_start && !first_cyc.exists(int'(dbg_pc))) first_cyc[int'(dbg_pc)] = cyc;
  end

  int checks = 0, failures = 0;
  int wp;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic put(word_t w);
    imem_m[wp] = w;
    wp++;
  endtask

  // Program image: prologue, then the sequence is placed from S_W by the caller
  task automatic new_prog(int count);
    for (int i = 0; i < 1024; i++) imem_m[i] = nop();
    for (int i = 0; i < 4096; i++) dmem_m[i] = 8'h00;
    // thread entry points: idle loops
    foreach (imem_m[i]) if (i == X_W || i == Y_W || i == Z_W || i == FAR_W) begin
      imem_m[i] = bicc(COND_A, 0, 0);
    end
    wp = 0;
    put(ori(FP, 0, 'h100));
    put(ori(LCV, 0, 'h400));
    put(ori(CBB, 0, CB_BASE));
    put(ori(RLCV, 0, OFF_Y));
    put(orcc(0, 0, 0));          // Z = 1
    put(nop());
    dmem_m['h100] = 8'(count);   // entry count of the thread
    dmem_m['h402] = 8'(OFF_Z >> 8);
    dmem_m['h403] = 8'(OFF_Z);
  endtask

  task automatic run();
    first_cyc.delete();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (60) @(posedge clk);
  endtask

  function automatic int cost(int from_w, int to_w);
    if (!first_cyc.exists(from_w * 4) || !first_cyc.exists(to_w * 4)) return -1;
    return first_cyc[to_w * 4] - first_cyc[from_w * 4];
  endfunction

  // SWITCH prefix: annulling conditional branch that is not taken (Z is set)
  task automatic switch_prefix(bit sw);
    if (sw) begin
      put(bicc(COND_NE, 1, FAR_W - wp));
      put(nop());                // annulled delay slot
    end
  endtask

  function automatic word_t reg_val(int r);
    return dut.u_rf.regs[r];
  endfunction

  function automatic int half(int a);
    return {dmem_m[a], dmem_m[a+1]};
  endfunction

  // measured costs, by Table 3 row
  int c_br_unsync[2], c_br_succ[2], c_br_unsucc[2], c_push_unsync[2], c_push_succ[2],
      c_push_unsucc[2], c_stop;

  initial begin
    int end_w;
    for (int sw = 0; sw < 2; sw++) begin
      string tag;
      tag = sw ? "SWITCH " : "FORK ";

      // Branch to unsynchronising thread: ba thr ; delay slot
      new_prog(1); wp = S_W; switch_prefix(sw);
      put(bicc(COND_A, 0, X_W - wp)); end_w = wp; put(nop());
      run();
      c_br_unsync[sw] = cost(S_W, end_w);
      check({tag, "branch unsync"}, c_br_unsync[sw], 1 + 2 * sw);
      check({tag, "branch unsync reaches thread"}, first_cyc.exists(X_W * 4), 1);

      // Branch to synchronising thread, successful: count 1 -> 0
      new_prog(1); wp = S_W; switch_prefix(sw);
      put(ldub(T1, FP, 0)); put(subcci(T1, T1, 1));
      put(cdbp(COND_E, X_W - wp)); put(stb(T1, FP, 0));
      run();
      c_br_succ[sw] = cost(S_W, X_W);
      check({tag, "branch sync successful"}, c_br_succ[sw], 5 + 2 * sw);
      check({tag, "annulled store left count"}, dmem_m['h100], 1);
      check({tag, "r_lcv kept"}, reg_val(RLCV), OFF_Y);
      check({tag, "lcv kept"}, reg_val(LCV), 'h400);

      // Branch to synchronising thread, unsuccessful: count 2 -> 1, pop
      new_prog(2); wp = S_W; switch_prefix(sw);
      put(ldub(T1, FP, 0)); put(subcci(T1, T1, 1));
      put(cdbp(COND_E, X_W - wp)); put(stb(T1, FP, 0));
      run();
      c_br_unsucc[sw] = cost(S_W, Y_W);
      check({tag, "branch sync unsuccessful"}, c_br_unsucc[sw], 9 + 2 * sw);
      check({tag, "count stored back"}, dmem_m['h100], 1);
      check({tag, "r_lcv popped"}, reg_val(RLCV), OFF_Z);
      check({tag, "lcv incremented"}, reg_val(LCV), 'h402);
      check({tag, "thr_addr not executed"}, first_cyc.exists(X_W * 4), 0);

      // Push unsynchronising thread: std r_lcv,[lcv] ; set off, r_lcv
      new_prog(1); wp = S_W; switch_prefix(sw);
      put(stdec(RLCV, LCV)); put(ori(RLCV, 0, OFF_N)); end_w = wp; put(nop());
      run();
      c_push_unsync[sw] = cost(S_W, end_w);
      check({tag, "push unsync"}, c_push_unsync[sw], 4 + 2 * sw);
      check({tag, "old top pushed"}, half('h400), OFF_Y);
      check({tag, "lcv decremented"}, reg_val(LCV), 'h3FE);
      check({tag, "new top in r_lcv"}, reg_val(RLCV), OFF_N);

      // Push synchronising thread, successful (count 1) and unsuccessful (count 2)
      for (int cnt = 1; cnt <= 2; cnt++) begin
        int cont_w;
        new_prog(cnt); wp = S_W; switch_prefix(sw);
        cont_w = wp + 7;
        put(ldub(T1, FP, 0)); put(subcci(T1, T1, 1));
        put(bicc(COND_NE, 1, cont_w - wp)); put(stb(T1, FP, 0));
        put(stdec(RLCV, LCV)); put(ori(RLCV, 0, OFF_N));
        put(nop()); // cont_w - 1: skipped by the push path? no: executed, then continue
        run();
        if (cnt == 1) begin
          c_push_succ[sw] = cost(S_W, cont_w - 1);
          check({tag, "push sync successful"}, c_push_succ[sw], 9 + 2 * sw);
          check({tag, "push succ: pushed"}, half('h400), OFF_Y);
          check({tag, "push succ: r_lcv"}, reg_val(RLCV), OFF_N);
          check({tag, "push succ: count not stored"}, dmem_m['h100], 1);
        end else begin
          c_push_unsucc[sw] = cost(S_W, cont_w);
          check({tag, "push sync unsuccessful"}, c_push_unsucc[sw], 7 + 2 * sw);
          check({tag, "push unsucc: count stored"}, dmem_m['h100], 1);
          check({tag, "push unsucc: nothing pushed"}, reg_val(LCV), 'h400);
          check({tag, "push unsucc: skipped push"}, first_cyc.exists((cont_w - 3) * 4), 0);
        end
      end
    end

    // STOP: orcc g0,g0,g0 ; cdbp,ne nowhere ; delay slot
    new_prog(1); wp = S_W;
    put(orcc(0, 0, 0)); put(cdbp(COND_NE, FAR_W - wp)); end_w = wp; put(nop());
    run();
    c_stop = cost(S_W, end_w);
    check("STOP", c_stop, 4);
    check("STOP lands on r_lcv thread", first_cyc.exists(Y_W * 4), 1);
    check("STOP does not take thr_addr", first_cyc.exists(FAR_W * 4), 0);
    check("STOP pops", reg_val(RLCV), OFF_Z);

    // ---- unmodified instruction sequences still run ----
    // push unsynchronising: set off, tmp ; sth tmp,[lcv] ; sub lcv,2,lcv
    new_prog(1); wp = S_W;
    put(ori(9, 0, OFF_N)); put(sth(9, LCV, 0)); put(subi(LCV, LCV, 2)); end_w = wp; put(nop());
    run();
    check("stock push unsync", cost(S_W, end_w), 5);
    check("stock push stored", half('h400), OFF_N);
    check("stock push lcv", reg_val(LCV), 'h3FE);

    // stop: lduh [lcv+2],tmp ; jmp tmp+cbbase ; add lcv,2,lcv (delay slot)
    new_prog(1); wp = S_W;
    put(lduh(9, LCV, 2)); put(jmpl(0, 9, CBB)); end_w = wp; put(addi(LCV, LCV, 2));
    put(ori(13, 0, 'h77));   // squashed: must not run
    run();
    check("stock stop up to its delay slot", cost(S_W, end_w), 3);
    check("stock stop reaches thread", cost(S_W, Z_W), 5);
    check("stock stop pointer", reg_val(LCV), 'h402);
    check("stock stop squash", reg_val(13), 0);

    // synchronising branch: ldub ; subcc ; be,a thr (successful) / be thr ; stb (failed)
    for (int cnt = 1; cnt <= 2; cnt++) begin
      new_prog(cnt); wp = S_W;
      put(ldub(T1, FP, 0)); put(subcci(T1, T1, 1));
      if (cnt == 1) begin
        // annulling branch with the thread's first instruction in the slot
        put(bicc(COND_E, 1, X_W - wp)); end_w = wp; put(ori(13, 0, 5));
        run();
        check("stock sync branch successful", cost(S_W, end_w), 4);
        check("stock sync slot ran", reg_val(13), 5);
        check("stock sync thread reached", first_cyc.exists(X_W * 4), 1);
      end else begin
        put(bicc(COND_E, 0, X_W - wp)); put(stb(T1, FP, 0)); end_w = wp; put(nop());
        run();
        check("stock sync branch failed (before stop)", cost(S_W, end_w), 7);
      end
      check("stock sync count", dmem_m['h100], 1);
    end

    // push synchronising: ldub ; subcc ; bne cont ; set off,tmp (slot) ; sth ; sub / cont
    for (int cnt = 1; cnt <= 2; cnt++) begin
      int cont_w;
      new_prog(cnt); wp = S_W;
      cont_w = wp + 7;
      put(ldub(T1, FP, 0)); put(subcci(T1, T1, 1));
      if (cnt == 1) begin
        put(bicc(COND_NE, 0, cont_w - wp)); put(ori(9, 0, OFF_N));
        put(sth(9, LCV, 0)); put(subi(LCV, LCV, 2)); put(nop());
        run();
        check("stock push sync successful", cost(S_W, cont_w - 1), 9);
        check("stock push sync pushed", half('h400), OFF_N);
      end else begin
        put(bicc(COND_NE, 1, cont_w - wp)); put(stb(T1, FP, 0));
        put(sth(9, LCV, 0)); put(subi(LCV, LCV, 2)); put(nop());
        run();
        check("stock push sync failed", cost(S_W, cont_w), 7);
        check("stock push sync count", dmem_m['h100], 1);
      end
    end

    // Weighted average cycle cost over the control-instruction mixes (percent x100)
    begin
      int par[13] = '{409, 1000, 763, 2794, 0, 737, 1343, 743, 33, 29, 1409, 0, 0};
      int gam[13] = '{360, 295, 762, 1998, 13, 1527, 1212, 480, 416, 734, 500, 176, 715};
      int cst[13];
      longint sp, sg;
      cst = '{0, c_br_unsync[0], c_br_succ[0], c_br_unsucc[0], c_push_unsync[0],
              c_push_succ[0], c_push_unsucc[0], c_br_unsync[1], c_br_succ[1],
              c_br_unsucc[1], c_push_unsync[1], c_push_succ[1], c_push_unsucc[1]};
      sp = 738 * c_stop;
      sg = 810 * c_stop;
      for (int i = 0; i < 13; i++) begin
        sp += par[i] * cst[i];
        sg += gam[i] * cst[i];
      end
      $display("average cost x10000: Paraffins %0d Gamteb %0d", sp, sg);
      check("Paraffins average 6.01", sp / 100, 601);
      check("Gamteb average 7.14", sg / 100, 714);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
