// tam_pkg: types and constants shared by the fine-grain multithreading node.
//
// The node is a SPARC V8 integer-unit subset, one register window, extended with two
// instructions that make TAM-style thread scheduling cheaper:
//   cdbp  "conditional double branch and pop": format 2 (op=0) with op2=3. If the
//         condition holds it branches PC-relative to the thread address and annuls the
//         delay slot; otherwise it jumps to r_lcv+cbbase, executes the delay slot and pops
//         the next continuation from the memory LCV into r_lcv.
//   std   store halfword rd to [rs1+op2] and decrement rs1 by 2 (push onto the LCV).
// The op2=3 code point for cdbp and the cycle costs follow the description; the opcode of
// std (op=3, op3=0x0E, a code point unused in SPARC V8), the register numbers of the implied
// operands and the memory sizes are choices of this design.
package tam_pkg;

  typedef logic [31:0] word_t;
  typedef logic [4:0]  reg_t;

  // Instruction formats (SPARC V8 op field, bits 31:30)
  localparam logic [1:0] OP_FMT2  = 2'b00;
  localparam logic [1:0] OP_CALL  = 2'b01;
  localparam logic [1:0] OP_ARITH = 2'b10;
  localparam logic [1:0] OP_MEM   = 2'b11;

  // Format 2 op2 field (bits 24:22)
  localparam logic [2:0] OP2_BICC  = 3'd2;
  localparam logic [2:0] OP2_CDBP  = 3'd3;  // unimplemented in SPARC V8, used for cdbp
  localparam logic [2:0] OP2_SETHI = 3'd4;

  // Format 3, op=2
  localparam logic [5:0] OP3_ADD   = 6'h00;
  localparam logic [5:0] OP3_AND   = 6'h01;
  localparam logic [5:0] OP3_OR    = 6'h02;
  localparam logic [5:0] OP3_XOR   = 6'h03;
  localparam logic [5:0] OP3_SUB   = 6'h04;
  localparam logic [5:0] OP3_ADDCC = 6'h10;
  localparam logic [5:0] OP3_ANDCC = 6'h11;
  localparam logic [5:0] OP3_ORCC  = 6'h12;
  localparam logic [5:0] OP3_XORCC = 6'h13;
  localparam logic [5:0] OP3_SUBCC = 6'h14;
  localparam logic [5:0] OP3_SLL   = 6'h25;
  localparam logic [5:0] OP3_SRL   = 6'h26;
  localparam logic [5:0] OP3_SRA   = 6'h27;
  localparam logic [5:0] OP3_JMPL  = 6'h38;

  // Format 3, op=3
  localparam logic [5:0] OP3_LD    = 6'h00;
  localparam logic [5:0] OP3_LDUB  = 6'h01;
  localparam logic [5:0] OP3_LDUH  = 6'h02;
  localparam logic [5:0] OP3_ST    = 6'h04;
  localparam logic [5:0] OP3_STB   = 6'h05;
  localparam logic [5:0] OP3_STH   = 6'h06;
  localparam logic [5:0] OP3_LDSB  = 6'h09;
  localparam logic [5:0] OP3_LDSH  = 6'h0A;
  localparam logic [5:0] OP3_STDEC = 6'h0E;  // the "std" store-and-decrement

  // Integer condition codes (cond field, bits 28:25)
  localparam logic [3:0] COND_N   = 4'h0;
  localparam logic [3:0] COND_E   = 4'h1;
  localparam logic [3:0] COND_LE  = 4'h2;
  localparam logic [3:0] COND_L   = 4'h3;
  localparam logic [3:0] COND_LEU = 4'h4;
  localparam logic [3:0] COND_CS  = 4'h5;
  localparam logic [3:0] COND_NEG = 4'h6;
  localparam logic [3:0] COND_VS  = 4'h7;
  localparam logic [3:0] COND_A   = 4'h8;
  localparam logic [3:0] COND_NE  = 4'h9;
  localparam logic [3:0] COND_G   = 4'hA;
  localparam logic [3:0] COND_GE  = 4'hB;
  localparam logic [3:0] COND_GU  = 4'hC;
  localparam logic [3:0] COND_CC  = 4'hD;
  localparam logic [3:0] COND_POS = 4'hE;
  localparam logic [3:0] COND_VC  = 4'hF;

  // Implied operands of cdbp (special-function registers of the single window)
  localparam reg_t LCV_REG    = 5'd16;  // %l0: pointer to the next free LCV slot
  localparam reg_t CBBASE_REG = 5'd17;  // %l1: base of the current code-block
  localparam reg_t RLCV_REG   = 5'd18;  // %l2: r_lcv, the top of the LCV

  localparam int unsigned LCV_STEP = 2;  // LCV entries are 16-bit code-block offsets

  typedef enum logic [3:0] {
    IC_NOP, IC_ALU, IC_SETHI, IC_BICC, IC_CDBP, IC_JMPL,
    IC_LOAD, IC_STORE, IC_STDEC, IC_ILLEGAL
  } iclass_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  typedef enum logic [1:0] {MS_BYTE, MS_HALF, MS_WORD} msize_e;

  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

  typedef struct packed {
    iclass_e    cls;
    alu_op_e    alu_op;
    logic       setcc;    // update icc
    logic       use_imm;  // second operand is imm, not the rs2 port
    word_t      imm;      // sign-extended simm13, or sethi value
    reg_t       rs1;      // read port A
    reg_t       rs2;      // read port B
    reg_t       rs3;      // read port C (store data, r_lcv for cdbp)
    logic       wr_en;    // single register result
    reg_t       wr_reg;
    msize_e     msize;
    logic       msigned;
    logic [3:0] cond;
    logic       annul;
    word_t      disp;     // byte displacement of a branch
  } dec_t;

  // Instruction held in the execute stage
  typedef struct packed {
    logic  valid;
    word_t pc;
    dec_t  dec;
    word_t a;       // port A value
    word_t b;       // port B value
    word_t c;       // port C value
    word_t target;  // pc + disp, computed in decode
  } ex_t;

  // Register write produced by the execute stage, written back one cycle later
  typedef struct packed {
    logic  we;
    reg_t  rd;
    word_t data;
  } wb_t;

  // One-cycle event strobes, for observation and performance counting
  typedef struct packed {
    logic cdbp_thr;    // cdbp condition true: branch to thr_addr
    logic cdbp_pop;    // cdbp condition false: jump to r_lcv and pop
    logic std_push;    // std stored and decremented its pointer
    logic annul;       // a delay slot was annulled
    logic ex_stall;    // execute stage held for a multi-cycle instruction
    logic bypass_e;    // operand taken from the execute stage result
    logic bypass_w;    // operand taken from the write-back stage
    logic jmpl;        // register-indirect jump
    logic br_taken;    // Bicc taken
    logic br_untaken;  // Bicc not taken
    logic load;
    logic store;
  } events_t;

endpackage
