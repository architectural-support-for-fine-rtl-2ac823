// imem_tb: fills the instruction memory through the loader port with a pattern, reads
// every word back through the fetch port, and checks a rewrite of random words.
module imem_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int WORDS = 1024;
  logic [31:0] raddr, rdata, waddr, wdata;
  logic we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = i * 4; wdata = 32'h9E37_79B9 * i; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    repeat (500) begin
      int k;
      k = $urandom_range(WORDS - 1);
      @(negedge clk);
      we = 1; waddr = k * 4; wdata = $urandom; model[k] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < WORDS; i++) begin
      raddr = i * 4 + 32'($urandom_range(3));
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL word %0d: %h expected %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
