// sparc_asm_pkg: instruction encoders used by the testbenches to build programs.
//
// Each function returns one 32-bit instruction word in SPARC V8 encoding, written from the
// architecture's field layout (op 31:30, rd 29:25, op3 24:19, rs1 18:14, i 13, simm13 12:0;
// format 2: a 29, cond 28:25, op2 24:22, disp22 21:0), plus the two extensions:
// cdbp (format 2, op2=3) and std (op=3, op3=0x0E). Displacements are in instructions.
package sparc_asm_pkg;

  function automatic logic [31:0] f3(logic [1:0] op, logic [5:0] op3, int rd, int rs1,
                                     int rs2);
    return {op, 5'(rd), op3, 5'(rs1), 1'b0, 8'b0, 5'(rs2)};
  endfunction

  function automatic logic [31:0] f3i(logic [1:0] op, logic [5:0] op3, int rd, int rs1,
                                      int imm);
    return {op, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction

  function automatic logic [31:0] add  (int rd, int rs1, int rs2); return f3 (2'b10, 6'h00, rd, rs1, rs2); endfunction
  function automatic logic [31:0] addi (int rd, int rs1, int imm); return f3i(2'b10, 6'h00, rd, rs1, imm); endfunction
  function automatic logic [31:0] subi (int rd, int rs1, int imm); return f3i(2'b10, 6'h04, rd, rs1, imm); endfunction
  function automatic logic [31:0] sub  (int rd, int rs1, int rs2); return f3 (2'b10, 6'h04, rd, rs1, rs2); endfunction
  function automatic logic [31:0] subcci(int rd, int rs1, int imm); return f3i(2'b10, 6'h14, rd, rs1, imm); endfunction
  function automatic logic [31:0] addcc(int rd, int rs1, int rs2); return f3 (2'b10, 6'h10, rd, rs1, rs2); endfunction
  function automatic logic [31:0] orcc (int rd, int rs1, int rs2); return f3 (2'b10, 6'h12, rd, rs1, rs2); endfunction
  function automatic logic [31:0] ori  (int rd, int rs1, int imm); return f3i(2'b10, 6'h02, rd, rs1, imm); endfunction
  function automatic logic [31:0] xorr (int rd, int rs1, int rs2); return f3 (2'b10, 6'h03, rd, rs1, rs2); endfunction
  function automatic logic [31:0] andi (int rd, int rs1, int imm); return f3i(2'b10, 6'h01, rd, rs1, imm); endfunction
  function automatic logic [31:0] slli (int rd, int rs1, int imm); return f3i(2'b10, 6'h25, rd, rs1, imm); endfunction
  function automatic logic [31:0] jmpl (int rd, int rs1, int rs2); return f3 (2'b10, 6'h38, rd, rs1, rs2); endfunction
  function automatic logic [31:0] ldub (int rd, int rs1, int imm); return f3i(2'b11, 6'h01, rd, rs1, imm); endfunction
  function automatic logic [31:0] lduh (int rd, int rs1, int imm); return f3i(2'b11, 6'h02, rd, rs1, imm); endfunction
  function automatic logic [31:0] ldsb (int rd, int rs1, int imm); return f3i(2'b11, 6'h09, rd, rs1, imm); endfunction
  function automatic logic [31:0] ld   (int rd, int rs1, int imm); return f3i(2'b11, 6'h00, rd, rs1, imm); endfunction
  function automatic logic [31:0] stb  (int rd, int rs1, int imm); return f3i(2'b11, 6'h05, rd, rs1, imm); endfunction
  function automatic logic [31:0] sth  (int rd, int rs1, int imm); return f3i(2'b11, 6'h06, rd, rs1, imm); endfunction
  function automatic logic [31:0] st   (int rd, int rs1, int imm); return f3i(2'b11, 6'h04, rd, rs1, imm); endfunction
  // std rd, [rs1]: store halfword and decrement rs1 by 2
  function automatic logic [31:0] stdec(int rd, int rs1);          return f3i(2'b11, 6'h0E, rd, rs1, 0); endfunction

  function automatic logic [31:0] sethi(int rd, int imm22);
    return {2'b00, 5'(rd), 3'd4, 22'(imm22)};
  endfunction
  function automatic logic [31:0] nop();
    return sethi(0, 0);
  endfunction
  function automatic logic [31:0] bicc(int cond, bit a, int disp);
    return {2'b00, a, 4'(cond), 3'd2, 22'(disp)};
  endfunction
  function automatic logic [31:0] cdbp(int cond, int disp);
    return {2'b00, 1'b0, 4'(cond), 3'd3, 22'(disp)};
  endfunction

endpackage
