// inst_decode_tb: encodes instructions of every supported kind with random register fields
// and checks the decoded class, register ports, write destination, immediate, memory size,
// condition, annul bit and displacement. cdbp must read lcv/cbbase/r_lcv on ports A/B/C;
// std must write back its address register.
module inst_decode_tb;
  import tam_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  word_t instr;
  dec_t d;
  int checks = 0, failures = 0;

  inst_decode dut (.instr, .dec(d));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (instr %h): got %0h expected %0h", what, instr, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      int rd, rs1, rs2, imm, disp, cond;
      bit a;
      rd = $urandom_range(1, 31); rs1 = $urandom_range(1, 31); rs2 = $urandom_range(31);
      imm = $urandom_range(8191) - 4096; disp = $urandom_range(4000) - 2000;
      cond = $urandom_range(15); a = 1'($urandom);

      instr = add(rd, rs1, rs2); @(posedge clk);
      check("add cls", d.cls, IC_ALU); check("add op", d.alu_op, ALU_ADD);
      check("add rs1", d.rs1, rs1); check("add rs2", d.rs2, rs2);
      check("add wr", d.wr_reg, rd); check("add we", d.wr_en, 1);
      check("add imm sel", d.use_imm, 0); check("add cc", d.setcc, 0);

      instr = subcci(rd, rs1, imm); @(posedge clk);
      check("subcc op", d.alu_op, ALU_SUB); check("subcc cc", d.setcc, 1);
      check("subcc imm", d.imm, word_t'(imm)); check("subcc imm sel", d.use_imm, 1);

      instr = ldub(rd, rs1, imm); @(posedge clk);
      check("ldub cls", d.cls, IC_LOAD); check("ldub size", d.msize, MS_BYTE);
      check("ldub signed", d.msigned, 0); check("ldub wr", d.wr_reg, rd);

      instr = ldsb(rd, rs1, imm); @(posedge clk);
      check("ldsb signed", d.msigned, 1);

      instr = lduh(rd, rs1, imm); @(posedge clk);
      check("lduh size", d.msize, MS_HALF);

      instr = stb(rd, rs1, imm); @(posedge clk);
      check("stb cls", d.cls, IC_STORE); check("stb data port", d.rs3, rd);
      check("stb no write", d.wr_en, 0); check("stb size", d.msize, MS_BYTE);

      instr = st(rd, rs1, imm); @(posedge clk);
      check("st size", d.msize, MS_WORD);

      instr = stdec(rd, rs1); @(posedge clk);
      check("std cls", d.cls, IC_STDEC); check("std data port", d.rs3, rd);
      check("std addr port", d.rs1, rs1); check("std writes rs1", d.wr_reg, rs1);
      check("std we", d.wr_en, 1); check("std size", d.msize, MS_HALF);

      instr = jmpl(rd, rs1, rs2); @(posedge clk);
      check("jmpl cls", d.cls, IC_JMPL); check("jmpl wr", d.wr_reg, rd);

      instr = sethi(rd, 22'(disp)); @(posedge clk);
      check("sethi cls", d.cls, IC_SETHI);
      check("sethi value", d.imm, {22'(disp), 10'b0});

      instr = bicc(cond, a, disp); @(posedge clk);
      check("bicc cls", d.cls, IC_BICC); check("bicc cond", d.cond, cond);
      check("bicc annul", d.annul, a); check("bicc disp", d.disp, word_t'(disp * 4));
      check("bicc no write", d.wr_en, 0);

      instr = cdbp(cond, disp); @(posedge clk);
      check("cdbp cls", d.cls, IC_CDBP); check("cdbp cond", d.cond, cond);
      check("cdbp disp", d.disp, word_t'(disp * 4));
      check("cdbp port A = lcv", d.rs1, 16); check("cdbp port B = cbbase", d.rs2, 17);
      check("cdbp port C = r_lcv", d.rs3, 18);
    end
    instr = 32'h4000_0010; @(posedge clk);   // CALL: outside the subset
    check("call illegal", d.cls, IC_ILLEGAL);
    instr = {2'b00, 5'd0, 3'd0, 22'd0}; @(posedge clk);  // UNIMP
    check("unimp illegal", d.cls, IC_ILLEGAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
