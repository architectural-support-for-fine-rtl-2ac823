// exec_ctrl_tb: drives the execute stage directly with hand-built instructions and checks,
// cycle by cycle, the hold/done occupancy (load 2, store 3, std 3, cdbp pop 3, others 1),
// the cdbp micro-steps (redirect to r_lcv+cbbase in the first cycle, lcv+2 written in the
// second, halfword at lcv+2 read into r_lcv in the third), the annulled-slot cdbp path,
// Bicc fetch selection and annulment, the std store and decrement, load extraction and
// condition-code update. A small data-memory model answers reads.
module exec_ctrl_tb;
  import tam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ex_t ex;
  logic hold, done, fetch_sel, redirect, annul_d, dm_we;
  word_t fetch_pc, redirect_pc, dm_addr, dm_wdata, dm_rdata;
  logic [3:0] dm_be;
  wb_t wb;
  icc_t icc;
  events_t ev;
  int checks = 0, failures = 0;

  exec_ctrl dut (.clk, .rst_n, .ex, .hold, .done, .fetch_sel, .fetch_pc, .redirect,
                 .redirect_pc, .annul_d, .wb, .dm_addr, .dm_wdata, .dm_be, .dm_we,
                 .dm_rdata, .icc, .ev);

  // memory model: word at address a holds {a[15:0] ^ 16'hA5A5, a[15:0] + 16'h0101}
  assign dm_rdata = {dm_addr[15:0] & 16'hFFFC ^ 16'hA5A5, (dm_addr[15:0] & 16'hFFFC) + 16'h0101};

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic ex_t mk(iclass_e cls);
    ex_t e;
    e = '0;
    e.valid = 1; e.pc = 32'h200; e.dec.cls = cls; e.dec.msize = MS_WORD;
    e.target = 32'h300;
    return e;
  endfunction

  // present e, then count cycles until done; returns the occupancy
  task automatic issue(ex_t e, output int n);
    ex = e;
    n = 0;
    forever begin
      #1;
      n++;
      if (done) break;
      @(posedge clk) #2;
    end
    @(posedge clk) #2;
    ex = '0;
  endtask

  task automatic set_flags(word_t a, word_t b);
    ex_t e;
    int n;
    e = mk(IC_ALU); e.dec.alu_op = ALU_SUB; e.dec.setcc = 1; e.a = a; e.b = b;
    issue(e, n);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex_t e;
    int n;
    ex = '0;
    #12 rst_n = 1;
    @(posedge clk) #2;

    // ALU with cc: subcc 5-5 -> Z
    e = mk(IC_ALU); e.dec.alu_op = ALU_SUB; e.dec.setcc = 1; e.a = 5; e.b = 5;
    e.dec.wr_en = 1; e.dec.wr_reg = 9;
    ex = e; #1;
    check("alu 1 cycle", done, 1);
    check("alu wb", {wb.we, wb.rd, wb.data}, {1'b1, 5'd9, 32'd0});
    @(posedge clk) #2; ex = '0; #1;
    check("subcc set Z", icc.z, 1);

    // load byte, 2 cycles, big-endian extraction at offset 1
    e = mk(IC_LOAD); e.dec.msize = MS_BYTE; e.a = 32'h100; e.dec.use_imm = 1; e.dec.imm = 1;
    e.dec.wr_en = 1; e.dec.wr_reg = 8;
    ex = e; #1;
    check("load holds first cycle", hold, 1);
    check("load no write first cycle", wb.we, 0);
    @(posedge clk) #2; #1;
    check("load done second cycle", done, 1);
    check("load address", dm_addr, 32'h101);
    check("load byte", wb.data, ((16'h0100 ^ 16'hA5A5) & 16'h00FF));
    @(posedge clk) #2; ex = '0;

    // store halfword, 3 cycles, written in the last
    e = mk(IC_STORE); e.dec.msize = MS_HALF; e.a = 32'h102; e.c = 32'hBEEF_1234;
    issue(e, n);
    check("store occupancy", n, 3);
    e = mk(IC_STORE); e.dec.msize = MS_HALF; e.a = 32'h102; e.c = 32'hBEEF_1234;
    ex = e; #1;
    check("store not written early", dm_we, 0);
    @(posedge clk) #2; @(posedge clk) #2; #1;
    check("store write strobe", dm_we, 1);
    check("store lanes", dm_be, 4'b0011);
    check("store data", dm_wdata[15:0], 16'h1234);
    @(posedge clk) #2; ex = '0;

    // std: store r_lcv at [lcv], lcv -= 2, 3 cycles
    e = mk(IC_STDEC); e.dec.msize = MS_HALF; e.a = 32'h400; e.c = 32'h0000_0ABC;
    e.dec.rs1 = 16; e.dec.wr_en = 1; e.dec.wr_reg = 16;
    ex = e; #1;
    check("std holds", hold, 1);
    @(posedge clk) #2; @(posedge clk) #2; #1;
    check("std done third cycle", done, 1);
    check("std store", {dm_we, dm_be, dm_addr, dm_wdata[31:16]}, {1'b1, 4'b1100, 32'h400, 16'h0ABC});
    check("std decrement", {wb.we, wb.rd, wb.data}, {1'b1, 5'd16, 32'h3FE});
    check("std event", ev.std_push, 1);
    @(posedge clk) #2; ex = '0;

    // cdbp with condition true (Z set, cond = E): branch, annul, 1 cycle
    set_flags(3, 3);
    e = mk(IC_CDBP); e.dec.cond = COND_E; e.a = 32'h3FC; e.b = 32'h40; e.c = 32'h1A0;
    e.dec.rs1 = 16; e.dec.rs2 = 17; e.dec.rs3 = 18;
    ex = e; #1;
    check("cdbp true done at once", done, 1);
    check("cdbp true fetch select", {fetch_sel, fetch_pc}, {1'b1, 32'h300});
    check("cdbp true annul", annul_d, 1);
    check("cdbp true no redirect", redirect, 0);
    check("cdbp true no write", wb.we, 0);
    @(posedge clk) #2; ex = '0;

    // cdbp with condition false (Z set, cond = NE): pop, 3 cycles
    e.dec.cond = COND_NE;
    ex = e; #1;
    check("pop E1 redirect", {redirect, redirect_pc}, {1'b1, 32'h1E0});
    check("pop E1 keeps delay slot", annul_d, 0);
    check("pop E1 holds", hold, 1);
    check("pop E1 no write", wb.we, 0);
    @(posedge clk) #2; #1;
    check("pop E2 no redirect", redirect, 0);
    check("pop E2 lcv+2", {wb.we, wb.rd, wb.data}, {1'b1, 5'd16, 32'h3FE});
    check("pop E2 holds", hold, 1);
    @(posedge clk) #2; #1;
    check("pop E3 done", done, 1);
    check("pop E3 bus address", dm_addr, 32'h3FE);
    check("pop E3 r_lcv", {wb.we, wb.rd, wb.data},
          {1'b1, 5'd18, 16'h0, 16'(16'h03FC + 16'h0101)});
    check("pop E3 no store", dm_we, 0);
    @(posedge clk) #2; ex = '0;

    // Bicc: flags from 1-2 (N, C set)
    set_flags(1, 2);
    e = mk(IC_BICC); e.dec.cond = COND_L; e.dec.annul = 1;
    ex = e; #1;
    check("bl taken", {fetch_sel, fetch_pc, annul_d}, {1'b1, 32'h300, 1'b0});
    e.dec.cond = COND_GE; ex = e; #1;
    check("bge,a untaken annuls", {fetch_sel, fetch_pc, annul_d}, {1'b1, 32'h208, 1'b1});
    e.dec.annul = 0; ex = e; #1;
    check("bge untaken keeps slot", annul_d, 0);
    e.dec.cond = COND_A; e.dec.annul = 1; ex = e; #1;
    check("ba,a annuls", {fetch_pc, annul_d}, {32'h300, 1'b1});
    @(posedge clk) #2; ex = '0;

    // jmpl: registered redirect to a+imm, link written
    e = mk(IC_JMPL); e.a = 32'h1000; e.dec.use_imm = 1; e.dec.imm = 8;
    e.dec.wr_en = 1; e.dec.wr_reg = 15;
    ex = e; #1;
    check("jmpl redirect", {redirect, redirect_pc, fetch_sel}, {1'b1, 32'h1008, 1'b0});
    check("jmpl link", {wb.we, wb.rd, wb.data}, {1'b1, 5'd15, 32'h200});
    @(posedge clk) #2; ex = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
