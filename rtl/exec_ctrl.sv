// exec_ctrl: execute stage and its control, the part of the integer unit that the cdbp and
// std extensions change.
//
// An instruction stays in this stage for a number of cycles given by its class; `hold` keeps
// the decode and fetch stages frozen meanwhile and `done` marks its last cycle. Occupancies
// follow the SPARC cycle costs used for the thread-scheduling sequences: loads LD_CYCLES
// (2), stores ST_CYCLES (3), std STDEC_CYCLES (3), everything else 1. Memory is accessed in
// the last cycle; read data is captured into the write-back register in that same edge.
//
// Control transfers (all have one delay slot, which is in decode while the transfer is
// here):
//   Bicc   condition evaluated here against icc, which the previous instruction has already
//          written. The fetch address of this same cycle is chosen from the outcome
//          (fetch_sel/fetch_pc): target if taken, pc+8 if not. With a=1 the delay slot is
//          annulled when not taken, and always for "ba,a".
//          Cost: 1 cycle taken, 2 cycles not taken with a=1, 1 cycle not taken with a=0.
//   cdbp   condition true: like an annulling taken branch to pc+disp (2 cycles with the
//          annulled slot). Condition false, three cycles:
//            E1  PC <- r_lcv + cbbase (registered redirect), delay slot kept
//            E2  lcv <- lcv + 2 (sent to write-back)
//            E3  halfword at [lcv+2] read and sent to write-back as the new r_lcv
//   std    last cycle: halfword c -> [a + op2], rs1 <- a - 2.
//   jmpl   redirect to a + op2 (registered), rd <- pc; the next fetch is squashed, so it
//          costs 2 cycles.
// The cdbp micro-steps and cycle counts follow the description; the ordering of the two
// register writes and the exact cost model of Bicc are this design's choices.
//
// Interface: `ex` is the held execute-stage instruction (valid, pc, decoded fields, three
// operand values after bypassing, branch target). `wb` is one register write per cycle.
// The data memory port (dm_*) reads asynchronously and writes on the clock edge.
module exec_ctrl
  import tam_pkg::*;
#(
  parameter int unsigned LD_CYCLES    = 2,
  parameter int unsigned ST_CYCLES    = 3,
  parameter int unsigned STDEC_CYCLES = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ex_t     ex,
  output logic    hold,
  output logic    done,
  output logic    fetch_sel,
  output word_t   fetch_pc,
  output logic    redirect,
  output word_t   redirect_pc,
  output logic    annul_d,
  output wb_t     wb,
  output word_t   dm_addr,
  output word_t   dm_wdata,
  output logic [3:0] dm_be,
  output logic    dm_we,
  input  word_t   dm_rdata,
  output icc_t    icc,
  output events_t ev
);

  localparam int unsigned CDBP_POP_CYCLES = 3;

  logic [1:0] ecnt;
  logic [1:0] last;
  logic       first;
  logic       cond_true;
  word_t      op2v;
  word_t      alu_y;
  icc_t       alu_flags;
  word_t      ea;
  word_t      ld_val;
  logic [7:0] ld_byte;
  logic [15:0] ld_half;

  cond_eval u_cond (.cond(ex.dec.cond), .icc(icc), .taken(cond_true));

  assign op2v = ex.dec.use_imm ? ex.dec.imm : ex.b;

  alu u_alu (.op(ex.dec.alu_op), .a(ex.a), .b(op2v), .y(alu_y), .flags(alu_flags));

  // Last cycle index of the instruction in this stage
  always_comb begin
    unique case (ex.dec.cls)
      IC_LOAD:  last = 2'(LD_CYCLES - 1);
      IC_STORE: last = 2'(ST_CYCLES - 1);
      IC_STDEC: last = 2'(STDEC_CYCLES - 1);
      IC_CDBP:  last = cond_true ? 2'd0 : 2'(CDBP_POP_CYCLES - 1);
      default:  last = 2'd0;
    endcase
  end

  assign first = ex.valid && (ecnt == 2'd0);
  assign hold  = ex.valid && (ecnt != last);
  assign done  = ex.valid && (ecnt == last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ecnt <= '0;
    else if (hold) ecnt <= ecnt + 2'd1;
    else           ecnt <= '0;
  end

  // Effective address: cdbp reads the LCV slot above the current pointer
  assign ea = (ex.dec.cls == IC_CDBP) ? ex.a + word_t'(LCV_STEP) : ex.a + op2v;

  // Big-endian load extraction
  always_comb begin
    unique case (ea[1:0])
      2'd0:    ld_byte = dm_rdata[31:24];
      2'd1:    ld_byte = dm_rdata[23:16];
      2'd2:    ld_byte = dm_rdata[15:8];
      default: ld_byte = dm_rdata[7:0];
    endcase
  end
  assign ld_half = ea[1] ? dm_rdata[15:0] : dm_rdata[31:16];

  always_comb begin
    unique case (ex.dec.msize)
      MS_BYTE: ld_val = ex.dec.msigned ? {{24{ld_byte[7]}}, ld_byte} : {24'b0, ld_byte};
      MS_HALF: ld_val = ex.dec.msigned ? {{16{ld_half[15]}}, ld_half} : {16'b0, ld_half};
      default: ld_val = dm_rdata;
    endcase
  end

  always_comb begin
    fetch_sel   = 1'b0;
    fetch_pc    = ex.target;
    redirect    = 1'b0;
    redirect_pc = ex.c + ex.b;
    annul_d     = 1'b0;
    wb          = '0;
    dm_addr     = ea;
    dm_wdata    = '0;
    dm_be       = '0;
    dm_we       = 1'b0;
    ev          = '0;
    ev.ex_stall = hold;

    if (ex.valid) begin
      unique case (ex.dec.cls)
        IC_ALU: begin
          wb = '{we: ex.dec.wr_en, rd: ex.dec.wr_reg, data: alu_y};
        end
        IC_SETHI: begin
          wb = '{we: ex.dec.wr_en, rd: ex.dec.wr_reg, data: ex.dec.imm};
        end
        IC_BICC: begin
          fetch_sel     = 1'b1;
          fetch_pc      = cond_true ? ex.target : ex.pc + 32'd8;
          annul_d       = ex.dec.annul && (!cond_true || ex.dec.cond == COND_A);
          ev.br_taken   = cond_true;
          ev.br_untaken = !cond_true;
        end
        IC_CDBP: begin
          if (cond_true) begin
            fetch_sel   = 1'b1;
            fetch_pc    = ex.target;
            annul_d     = 1'b1;
            ev.cdbp_thr = 1'b1;
          end else begin
            unique case (ecnt)
              2'd0: begin
                redirect    = 1'b1;
                redirect_pc = ex.c + ex.b;
                ev.cdbp_pop = 1'b1;
              end
              2'd1: wb = '{we: 1'b1, rd: ex.dec.rs1, data: ea};
              default: begin
                dm_addr = ea;
                wb      = '{we: 1'b1, rd: ex.dec.rs3, data: {16'b0, ld_half}};
              end
            endcase
          end
        end
        IC_JMPL: begin
          if (first) begin
            redirect    = 1'b1;
            redirect_pc = ex.a + op2v;
            ev.jmpl     = 1'b1;
          end
          wb = '{we: ex.dec.wr_en, rd: ex.dec.wr_reg, data: ex.pc};
        end
        IC_LOAD: begin
          if (done) begin
            wb      = '{we: ex.dec.wr_en, rd: ex.dec.wr_reg, data: ld_val};
            ev.load = 1'b1;
          end
        end
        IC_STORE, IC_STDEC: begin
          if (done) begin
            dm_we = 1'b1;
            unique case (ex.dec.msize)
              MS_BYTE: begin
                dm_wdata = {4{ex.c[7:0]}};
                dm_be    = 4'b1000 >> ea[1:0];
              end
              MS_HALF: begin
                dm_wdata = {2{ex.c[15:0]}};
                dm_be    = ea[1] ? 4'b0011 : 4'b1100;
              end
              default: begin
                dm_wdata = ex.c;
                dm_be    = 4'b1111;
              end
            endcase
            ev.store = 1'b1;
            if (ex.dec.cls == IC_STDEC) begin
              wb          = '{we: ex.dec.wr_en, rd: ex.dec.wr_reg,
                              data: ex.a - word_t'(LCV_STEP)};
              ev.std_push = 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
    ev.annul = annul_d;
  end

  // Condition codes are written in the last cycle of a cc instruction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) icc <= '0;
    else if (done && ex.dec.cls == IC_ALU && ex.dec.setcc) icc <= alu_flags;
  end

  // A transfer of control is resolved in a single cycle
  a_ctl_single: assert property (@(posedge clk) disable iff (!rst_n)
    ex.valid && (ex.dec.cls == IC_BICC || ex.dec.cls == IC_JMPL) |-> !hold)
    else $error("control transfer held in execute");

endmodule
