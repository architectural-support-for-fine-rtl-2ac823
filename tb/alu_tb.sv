// alu_tb: random and corner-case operands through every ALU operation; results and N/Z/V/C
// are compared with a reference computed here in 64-bit arithmetic.
module alu_tb;
  import tam_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e op;
  word_t a, b, y;
  icc_t f;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .flags(f));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(alu_op_e o, word_t x, word_t z);
    longint unsigned wide;
    longint sa, sb, ss;
    word_t ey;
    icc_t ef;
    op = o; a = x; b = z;
    #1;
    sa = longint'($signed(x));
    sb = longint'($signed(z));
    ef = '0;
    case (o)
      ALU_ADD: begin
        wide = {32'b0, x} + {32'b0, z}; ey = wide[31:0]; ef.c = wide[32];
        ss = sa + sb; ef.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_SUB: begin
        ey = x - z; ef.c = (x < z);
        ss = sa - sb; ef.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      ALU_XOR: ey = x ^ z;
      ALU_SLL: ey = x << (z % 32);
      ALU_SRL: ey = x >> (z % 32);
      default: ey = word_t'(sa >>> (z % 32));
    endcase
    ef.n = ey[31];
    ef.z = (ey == 0);
    checks++;
    if (y !== ey || f !== ef) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h f=%b/%b", o.name(), x, z, y, ey, f, ef);
    end
  endtask

  initial begin
    word_t corner[6] = '{0, 1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int o = 0; o < 8; o++) begin
      foreach (corner[i]) foreach (corner[j]) one(alu_op_e'(o), corner[i], corner[j]);
      repeat (300) one(alu_op_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
