// tam_node: one processing node of a fine-grain multithreaded machine: the tam_core integer
// unit with its instruction memory (code-blocks) and data memory (activation frames, entry
// counters, local continuation vector).
//
// Loading: ld_we/ld_addr/ld_data write a word into instruction memory at any time. While
// host_we is high the host owns the data memory write port (word writes, intended for use
// while rst_n holds the core in reset); host_addr/host_rdata is an independent read port.
// After rst_n rises the core fetches from address RESET_PC (0). Observation: dbg_ex_start,
// dbg_ex_pc, dbg_icc and the event strobes ev. Memory sizes are this design's choices.
module tam_node
  import tam_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_BYTES = 4096
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ld_we,
  input  word_t   ld_addr,
  input  word_t   ld_data,
  input  logic    host_we,
  input  word_t   host_waddr,
  input  word_t   host_wdata,
  input  word_t   host_addr,
  output word_t   host_rdata,
  output logic    dbg_ex_start,
  output word_t   dbg_ex_pc,
  output icc_t    dbg_icc,
  output events_t ev
);

  word_t      im_addr, im_rdata;
  word_t      c_addr, c_wdata, dm_rdata;
  logic [3:0] c_be;
  logic       c_we;

  tam_core u_core (
    .clk, .rst_n,
    .im_addr, .im_rdata,
    .dm_addr(c_addr), .dm_wdata(c_wdata), .dm_be(c_be), .dm_we(c_we), .dm_rdata,
    .dbg_ex_start, .dbg_ex_pc, .dbg_icc, .ev
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(im_addr), .rdata(im_rdata),
    .we(ld_we), .waddr(ld_addr), .wdata(ld_data)
  );

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk,
    .addr (host_we ? host_waddr : c_addr),
    .wdata(host_we ? host_wdata : c_wdata),
    .be   (host_we ? 4'b1111    : c_be),
    .we   (host_we | c_we),
    .rdata(dm_rdata),
    .addr_b(host_addr), .rdata_b(host_rdata)
  );

endmodule
