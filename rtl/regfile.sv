// regfile: one SPARC register window, 32 registers of 32 bits.
//
// Three asynchronous read ports (A, B, C) and one synchronous write port. Register 0 reads as
// zero and ignores writes. Port C exists so that stores can read their data register and
// cdbp can read its three implied operands (lcv, cbbase, r_lcv) in one decode cycle. The
// register file has no write-through; the pipeline bypasses the value being written.
// All registers clear on reset. The window layout (special-function, thread and inlet
// registers) is a software convention; only lcv, cbbase and r_lcv are fixed in hardware.
module regfile
  import tam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  reg_t  ra,
  input  reg_t  rb,
  input  reg_t  rc,
  output word_t da,
  output word_t db,
  output word_t dc,
  input  logic  we,
  input  reg_t  wr,
  input  word_t wd
);

  word_t regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wr != '0) begin
      regs[wr] <= wd;
    end
  end

  assign da = (ra == '0) ? '0 : regs[ra];
  assign db = (rb == '0) ? '0 : regs[rb];
  assign dc = (rc == '0) ? '0 : regs[rc];

endmodule
