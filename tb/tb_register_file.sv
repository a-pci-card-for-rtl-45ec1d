// Testbench of register_file: fills all 16 words, reads them back, and checks
// that a read in the cycle of a write shows the old word, the new one after.
module tb_register_file;
  localparam int M = 191;

  logic         clk = 0;
  logic [3:0]   addr;
  logic         we;
  logic [M-1:0] wdata, rdata;
  logic [M-1:0] model [16];
  int checks = 0, failures = 0;

  register_file #(.M(M), .NREGS(16)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    return M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    we = 0; addr = 0; wdata = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      addr = 4'(i); we = 1; wdata = rnd(); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 15; i >= 0; i--) begin
      addr = 4'(i); #1;
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL read %0d", i); end
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addr = 4'($urandom); we = 1'($urandom); wdata = rnd();
      #1;
      checks++;
      if (rdata != model[addr]) begin failures++; $display("FAIL old word at %0d", addr); end
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1;
      checks++;
      if (rdata != model[addr]) begin failures++; $display("FAIL new word at %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
