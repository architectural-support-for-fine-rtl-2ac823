// tam_core: four-stage SPARC-subset integer unit with hardware support for TAM thread
// scheduling (the cdbp and std instructions and the r_lcv register convention).
//
// Stages:
//   F  fetch. The fetch address is pc_q, except in a cycle where the execute stage resolves
//      a Bicc or a successful cdbp: then it is the resolved address (taken target or pc+8).
//      Register-indirect transfers (jmpl, the pop path of cdbp) load pc_q instead, one cycle
//      later, and squash the instruction fetched meanwhile.
//   D  decode. Decodes, reads the three register ports and computes pc+disp. Operands are
//      bypassed from the register write the execute stage is producing this cycle and from
//      the write-back stage, so no interlock is needed: a multi-cycle instruction in E
//      freezes D, and D re-reads its operands every cycle until it moves on.
//   E  execute (exec_ctrl): ALU, branch resolution, data memory, multi-cycle sequencing.
//   W  write-back: one register write per cycle into the register file.
// The stages, the place of the pc+disp adder and the cdbp micro-operations follow the
// description; the bypass network and fetch-redirect mechanism are this design's choices.
//
// Interface: instruction memory read port (im_*), data memory port (dm_*), both
// asynchronous-read. dbg_ex_start pulses in the first execute cycle of every valid
// instruction, with its pc on dbg_ex_pc; ev carries the event strobes.
// Unsupported: CALL, traps, register windows, a control transfer in a delay slot.
module tam_core
  import tam_pkg::*;
#(
  parameter word_t       RESET_PC     = 32'h0,
  parameter int unsigned LD_CYCLES    = 2,
  parameter int unsigned ST_CYCLES    = 3,
  parameter int unsigned STDEC_CYCLES = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  output word_t      im_addr,
  input  word_t      im_rdata,
  output word_t      dm_addr,
  output word_t      dm_wdata,
  output logic [3:0] dm_be,
  output logic       dm_we,
  input  word_t      dm_rdata,
  output logic       dbg_ex_start,
  output word_t      dbg_ex_pc,
  output icc_t       dbg_icc,
  output events_t    ev
);

  // ---------------- fetch ----------------
  word_t pc_q;
  word_t fetch_addr;
  logic  fd_valid;
  word_t fd_pc;
  word_t fd_instr;

  // ---------------- execute-stage signals ----------------
  ex_t     ex_q;
  logic    ex_hold;
  logic    ex_done;
  logic    ex_fetch_sel;
  word_t   ex_fetch_pc;
  logic    ex_redirect;
  word_t   ex_redirect_pc;
  logic    ex_annul_d;
  wb_t     ex_wb;
  wb_t     wb_q;
  events_t ex_ev;
  logic    ex_started;  // the E instruction has already had its first cycle

  logic d_adv;
  assign d_adv = !ex_hold;

  assign fetch_addr = ex_fetch_sel ? ex_fetch_pc : pc_q;
  assign im_addr    = fetch_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= RESET_PC;
      fd_valid <= 1'b0;
      fd_pc    <= '0;
      fd_instr <= '0;
    end else if (ex_redirect) begin
      pc_q <= ex_redirect_pc;
      if (d_adv) fd_valid <= 1'b0;
    end else if (d_adv) begin
      fd_valid <= 1'b1;
      fd_pc    <= fetch_addr;
      fd_instr <= im_rdata;
      pc_q     <= fetch_addr + 32'd4;
    end
  end

  // ---------------- decode ----------------
  dec_t  d_dec;
  word_t rf_a, rf_b, rf_c;
  word_t d_a, d_b, d_c;
  logic  byp_e, byp_w;

  inst_decode u_dec (.instr(fd_instr), .dec(d_dec));

  regfile u_rf (
    .clk, .rst_n,
    .ra(d_dec.rs1), .rb(d_dec.rs2), .rc(d_dec.rs3),
    .da(rf_a), .db(rf_b), .dc(rf_c),
    .we(wb_q.we), .wr(wb_q.rd), .wd(wb_q.data)
  );

  function automatic word_t bypass(reg_t r, word_t rf_val, wb_t e, wb_t w);
    if (r == '0)                return '0;
    else if (e.we && e.rd == r) return e.data;
    else if (w.we && w.rd == r) return w.data;
    else                        return rf_val;
  endfunction

  function automatic logic hit(reg_t r, wb_t x);
    return (r != '0) && x.we && (x.rd == r);
  endfunction

  assign d_a = bypass(d_dec.rs1, rf_a, ex_wb, wb_q);
  assign d_b = bypass(d_dec.rs2, rf_b, ex_wb, wb_q);
  assign d_c = bypass(d_dec.rs3, rf_c, ex_wb, wb_q);

  assign byp_e = fd_valid && d_adv &&
                 (hit(d_dec.rs1, ex_wb) || hit(d_dec.rs2, ex_wb) || hit(d_dec.rs3, ex_wb));
  assign byp_w = fd_valid && d_adv && !byp_e &&
                 (hit(d_dec.rs1, wb_q) || hit(d_dec.rs2, wb_q) || hit(d_dec.rs3, wb_q));

  // ---------------- decode -> execute ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q       <= '0;
      ex_started <= 1'b0;
    end else if (d_adv) begin
      ex_q.valid  <= fd_valid && !ex_annul_d;
      ex_q.pc     <= fd_pc;
      ex_q.dec    <= d_dec;
      ex_q.a      <= d_a;
      ex_q.b      <= d_b;
      ex_q.c      <= d_c;
      ex_q.target <= fd_pc + d_dec.disp;
      ex_started  <= 1'b0;
    end else begin
      ex_started  <= 1'b1;
    end
  end

  // ---------------- execute ----------------
  exec_ctrl #(
    .LD_CYCLES(LD_CYCLES), .ST_CYCLES(ST_CYCLES), .STDEC_CYCLES(STDEC_CYCLES)
  ) u_ex (
    .clk, .rst_n,
    .ex(ex_q),
    .hold(ex_hold), .done(ex_done),
    .fetch_sel(ex_fetch_sel), .fetch_pc(ex_fetch_pc),
    .redirect(ex_redirect), .redirect_pc(ex_redirect_pc),
    .annul_d(ex_annul_d),
    .wb(ex_wb),
    .dm_addr, .dm_wdata, .dm_be, .dm_we, .dm_rdata,
    .icc(dbg_icc),
    .ev(ex_ev)
  );

  // ---------------- write-back ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_q <= '0;
    else        wb_q <= ex_wb;
  end

  assign dbg_ex_start = ex_q.valid && !ex_started;
  assign dbg_ex_pc    = ex_q.pc;

  always_comb begin
    ev          = ex_ev;
    ev.annul    = ex_annul_d && fd_valid;
    ev.bypass_e = byp_e;
    ev.bypass_w = byp_w;
  end

  // A register-indirect redirect and a same-cycle fetch selection never coincide
  // An instruction in execute either holds or completes, never both
  a_hold_done: assert property (@(posedge clk) disable iff (!rst_n) !(ex_hold && ex_done))
    else $error("hold and done together");

  a_one_redirect: assert property (@(posedge clk) disable iff (!rst_n)
    !(ex_redirect && ex_fetch_sel))
    else $error("two redirects at once");

endmodule
