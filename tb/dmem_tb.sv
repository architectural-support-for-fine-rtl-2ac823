// dmem_tb: random byte-enabled writes to the data memory against a byte-array model
// (big-endian: byte enable bit 3 is the lowest address), read back through both ports.
module dmem_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int BYTES = 4096;
  logic [31:0] addr, wdata, rdata, addr_b, rdata_b;
  logic [3:0] be;
  logic we;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  dmem #(.BYTES(BYTES)) dut (.clk, .addr, .wdata, .be, .we, .rdata, .addr_b, .rdata_b);

  function automatic logic [31:0] ref_word(int a);
    a = a & ~3;
    return {model[a], model[a+1], model[a+2], model[a+3]};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; be = 0; addr = 0; wdata = 0; addr_b = 0;
    for (int i = 0; i < BYTES / 4; i++) begin
      @(negedge clk);
      we = 1; be = 4'hF; addr = i * 4; wdata = 0;
    end
    foreach (model[i]) model[i] = 0;
    repeat (3000) begin
      @(negedge clk);
      we = 1; be = 4'($urandom); addr = $urandom_range(BYTES - 1); wdata = $urandom;
      addr_b = $urandom_range(BYTES - 1);
      #1;
      checks++;
      if (rdata_b !== ref_word(addr_b)) begin
        failures++;
        $display("FAIL port B %h: %h expected %h", addr_b, rdata_b, ref_word(addr_b));
      end
      @(posedge clk);
      for (int k = 0; k < 4; k++)
        if (be[3-k]) model[(addr & ~3) + k] = wdata[31-8*k -: 8];
      #1;
      checks++;
      if (rdata !== ref_word(addr)) begin
        failures++;
        $display("FAIL port A %h: %h expected %h", addr, rdata, ref_word(addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
