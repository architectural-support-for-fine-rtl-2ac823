// cond_eval: evaluates a SPARC V8 integer branch condition (cond field, bits 28:25) against
// the icc flags.
//
// Combinational. Both Bicc and cdbp use it in the execute stage, where the condition code
// written by the previous instruction is already available. The encoding table is the
// standard SPARC V8 one; cdbp reuses it unchanged.
module cond_eval
  import tam_pkg::*;
(
  input  logic [3:0] cond,
  input  icc_t       icc,
  output logic       taken
);

  logic base;

  // cond[3] inverts the sense of the eight base tests
  always_comb begin
    unique case (cond[2:0])
      3'd0: base = 1'b0;                                // never
      3'd1: base = icc.z;                               // equal
      3'd2: base = icc.z | (icc.n ^ icc.v);             // less or equal
      3'd3: base = icc.n ^ icc.v;                       // less
      3'd4: base = icc.c | icc.z;                       // less or equal, unsigned
      3'd5: base = icc.c;                               // carry set
      3'd6: base = icc.n;                               // negative
      default: base = icc.v;                            // overflow set
    endcase
    taken = base ^ cond[3];
  end

endmodule
