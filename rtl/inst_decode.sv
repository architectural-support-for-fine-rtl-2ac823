// inst_decode: instruction decoder of the decode stage.
//
// Combinational. Splits a 32-bit SPARC V8 instruction into a dec_t. Format 2 uses the fields
// op (31:30), a (29), cond (28:25), op2 (24:22) and disp22 (21:0); op2=2 is Bicc, op2=4 is
// SETHI and the otherwise unimplemented op2=3 is cdbp. For cdbp the three register ports are
// pointed at the implied operands: port A = lcv, port B = cbbase, port C = r_lcv. Format 3
// (op=2, op=3) provides add/sub/and/or/xor with and without cc, shifts, jmpl, the byte,
// halfword and word loads and stores, and std (op3=0x0E): a halfword store whose single
// register result is rs1-2. CALL, traps, window and coprocessor instructions are outside
// this subset and decode to IC_ILLEGAL, which the execute stage treats as a no-op.
module inst_decode
  import tam_pkg::*;
#(
  parameter reg_t LCV_R    = LCV_REG,
  parameter reg_t CBBASE_R = CBBASE_REG,
  parameter reg_t RLCV_R   = RLCV_REG
) (
  input  word_t instr,
  output dec_t  dec
);

  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  reg_t       rd, rs1, rs2;
  logic       i_bit;
  word_t      simm13;

  assign op     = instr[31:30];
  assign op2    = instr[24:22];
  assign op3    = instr[24:19];
  assign rd     = instr[29:25];
  assign rs1    = instr[18:14];
  assign rs2    = instr[4:0];
  assign i_bit  = instr[13];
  assign simm13 = {{19{instr[12]}}, instr[12:0]};

  always_comb begin
    dec         = '0;
    dec.cls     = IC_ILLEGAL;
    dec.alu_op  = ALU_ADD;
    dec.msize   = MS_WORD;
    dec.rs1     = rs1;
    dec.rs2     = rs2;
    dec.rs3     = rd;
    dec.use_imm = i_bit;
    dec.imm     = simm13;
    dec.cond    = instr[28:25];
    dec.annul   = instr[29];
    dec.disp    = {{8{instr[21]}}, instr[21:0], 2'b00};
    unique case (op)
      OP_FMT2: begin
        dec.rs1 = '0;
        dec.rs2 = '0;
        dec.rs3 = '0;
        unique case (op2)
          OP2_SETHI: begin
            dec.cls     = IC_SETHI;
            dec.imm     = {instr[21:0], 10'b0};
            dec.use_imm = 1'b1;
            dec.wr_en   = (rd != '0);
            dec.wr_reg  = rd;
          end
          OP2_BICC: dec.cls = IC_BICC;
          OP2_CDBP: begin
            dec.cls = IC_CDBP;
            dec.rs1 = LCV_R;
            dec.rs2 = CBBASE_R;
            dec.rs3 = RLCV_R;
          end
          default: dec.cls = IC_ILLEGAL;
        endcase
      end
      OP_ARITH: begin
        dec.rs3    = '0;
        dec.wr_en  = (rd != '0);
        dec.wr_reg = rd;
        dec.cls    = IC_ALU;
        unique case (op3)
          OP3_ADD:   dec.alu_op = ALU_ADD;
          OP3_AND:   dec.alu_op = ALU_AND;
          OP3_OR:    dec.alu_op = ALU_OR;
          OP3_XOR:   dec.alu_op = ALU_XOR;
          OP3_SUB:   dec.alu_op = ALU_SUB;
          OP3_ADDCC: begin dec.alu_op = ALU_ADD; dec.setcc = 1'b1; end
          OP3_ANDCC: begin dec.alu_op = ALU_AND; dec.setcc = 1'b1; end
          OP3_ORCC:  begin dec.alu_op = ALU_OR;  dec.setcc = 1'b1; end
          OP3_XORCC: begin dec.alu_op = ALU_XOR; dec.setcc = 1'b1; end
          OP3_SUBCC: begin dec.alu_op = ALU_SUB; dec.setcc = 1'b1; end
          OP3_SLL:   dec.alu_op = ALU_SLL;
          OP3_SRL:   dec.alu_op = ALU_SRL;
          OP3_SRA:   dec.alu_op = ALU_SRA;
          OP3_JMPL:  dec.cls = IC_JMPL;
          default: begin
            dec.cls   = IC_ILLEGAL;
            dec.wr_en = 1'b0;
          end
        endcase
      end
      OP_MEM: begin
        unique case (op3)
          OP3_LD, OP3_LDUB, OP3_LDUH, OP3_LDSB, OP3_LDSH: begin
            dec.cls     = IC_LOAD;
            dec.rs3     = '0;
            dec.wr_en   = (rd != '0);
            dec.wr_reg  = rd;
            dec.msize   = (op3 == OP3_LD) ? MS_WORD :
                          (op3 == OP3_LDUH || op3 == OP3_LDSH) ? MS_HALF : MS_BYTE;
            dec.msigned = (op3 == OP3_LDSB || op3 == OP3_LDSH);
          end
          OP3_ST:  dec.cls = IC_STORE;
          OP3_STB: begin dec.cls = IC_STORE; dec.msize = MS_BYTE; end
          OP3_STH: begin dec.cls = IC_STORE; dec.msize = MS_HALF; end
          OP3_STDEC: begin
            dec.cls    = IC_STDEC;
            dec.msize  = MS_HALF;
            dec.wr_en  = (rs1 != '0);
            dec.wr_reg = rs1;
          end
          default: dec.cls = IC_ILLEGAL;
        endcase
      end
      default: dec.cls = IC_ILLEGAL;  // CALL is not part of this subset
    endcase
  end

endmodule
