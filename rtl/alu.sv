// alu: 32-bit integer ALU of the SPARC-subset integer unit, with icc flag generation.
//
// Combinational. Add and subtract produce N, Z, V and C as SPARC V8 defines them (C is the
// borrow for subtract); the logic operations clear V and C. Shifts use b[4:0] and their flags
// are never written because this subset has no shift-with-cc. The operations needed are
// those the thread-scheduling code sequences use (add, sub, subcc, orcc); the rest of the set
// and the flag rules are those of the stock SPARC integer unit.
module alu
  import tam_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output icc_t    flags
);

  logic [32:0] sum;

  always_comb begin
    sum = '0;
    flags = '0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        y = sum[31:0];
        flags.c = sum[32];
        flags.v = (a[31] == b[31]) && (y[31] != a[31]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} - {1'b0, b};
        y = sum[31:0];
        flags.c = sum[32];
        flags.v = (a[31] != b[31]) && (y[31] != a[31]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLL: y = a << b[4:0];
      ALU_SRL: y = a >> b[4:0];
      ALU_SRA: y = word_t'($signed(a) >>> b[4:0]);
      default: y = '0;
    endcase
    flags.n = y[31];
    flags.z = (y == '0);
  end

endmodule
