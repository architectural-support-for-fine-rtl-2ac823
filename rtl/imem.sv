// imem: instruction memory holding the code-blocks (threads and inlets).
//
// WORDS 32-bit words, addressed by byte address (bits 1:0 ignored, upper bits wrap).
// Asynchronous read for the fetch stage; one synchronous write port used to load programs.
// The size is this design's choice.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];

endmodule
