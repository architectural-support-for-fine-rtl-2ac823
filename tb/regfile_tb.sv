// regfile_tb: random writes and three-port reads against a model array; checks reset to
// zero, that register 0 stays zero and that a write is visible from the next cycle.
module regfile_tb;
  import tam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_t ra, rb, rc, wr;
  word_t da, db, dc, wd;
  logic we;
  word_t model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra, .rb, .rc, .da, .db, .dc, .we, .wr, .wd);

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr = 0; wd = 0; ra = 0; rb = 0; rc = 0;
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1 check("reset value", da, 0);
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom); wr = 5'($urandom); wd = $urandom;
      ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      #1;
      check("port A", da, model[ra]);
      check("port B", db, model[rb]);
      check("port C", dc, model[rc]);
      @(posedge clk);
      if (we && wr != 0) model[wr] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
