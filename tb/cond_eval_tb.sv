// cond_eval_tb: all 16 branch conditions against all 16 flag combinations, compared with
// the SPARC V8 condition table written out here case by case.
module cond_eval_tb;
  import tam_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] cond;
  icc_t icc;
  logic taken;
  int checks = 0, failures = 0;

  cond_eval dut (.cond, .icc, .taken);

  function automatic logic ref_cond(logic [3:0] c, icc_t f);
    case (c)
      4'h0: return 0;
      4'h1: return f.z;
      4'h2: return f.z || (f.n != f.v);
      4'h3: return f.n != f.v;
      4'h4: return f.c || f.z;
      4'h5: return f.c;
      4'h6: return f.n;
      4'h7: return f.v;
      4'h8: return 1;
      4'h9: return !f.z;
      4'hA: return !f.z && (f.n == f.v);
      4'hB: return f.n == f.v;
      4'hC: return !f.c && !f.z;
      4'hD: return !f.c;
      4'hE: return !f.n;
      default: return !f.v;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        cond = 4'(c); icc = icc_t'(4'(f));
        @(posedge clk);
        checks++;
        if (taken !== ref_cond(cond, icc)) begin
          failures++;
          $display("FAIL cond=%h icc=%b taken=%b", cond, icc, taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
