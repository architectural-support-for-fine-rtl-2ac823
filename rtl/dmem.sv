// dmem: data memory holding activation frames, entry counters and the LCV.
//
// BYTES bytes as 32-bit words, big-endian as on SPARC: byte address a&~3 is bits 31:24.
// Port A, used by the processor, reads asynchronously within the execute cycle (the value
// is captured by the pipeline's write-back register, the "temporary buffer") and writes at
// the clock edge under a 4-bit byte enable, be[3] being bits 31:24. Port B is a second
// asynchronous read port for observation. Addresses wrap modulo BYTES. Size and
// port arrangement are this design's choices.
module dmem #(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  input  logic        we,
  output logic [31:0] rdata,
  input  logic [31:0] addr_b,
  output logic [31:0] rdata_b
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[addr[AW+1:2]][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  assign rdata   = mem[addr[AW+1:2]];
  assign rdata_b = mem[addr_b[AW+1:2]];

endmodule
