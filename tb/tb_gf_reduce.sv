// Testbench of gf_reduce: the default trinomial field x^191 + x^9 + 1 with a
// 199-bit adder input, and a pentanomial field x^163 + x^7 + x^6 + x^3 + 1,
// both against long division by f(x).
module tb_gf_reduce;
  import gf_ref_pkg::*;

  localparam int M1 = 191, IW1 = 199;
  localparam logic [M1-1:0] F1 = M1'((1 << 9) | 1);
  localparam int M2 = 163, IW2 = 171;
  localparam logic [M2-1:0] F2 = M2'((1 << 7) | (1 << 6) | (1 << 3) | 1);

  logic [IW1-1:0] x1, y1;
  logic [M1-1:0]  c1;
  logic [IW2-1:0] x2, y2;
  logic [M2-1:0]  c2;
  int checks = 0, failures = 0;

  gf_reduce #(.M(M1), .F_LOW(F1), .IW(IW1)) dut1 (.x(x1), .y(y1), .c(c1));
  gf_reduce #(.M(M2), .F_LOW(F2), .IW(IW2)) dut2 (.x(x2), .y(y2), .c(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    fe_t r;
    for (int n = 0; n < 600; n++) begin
      x1 = IW1'(rnd()); y1 = IW1'(rnd());
      x2 = IW2'(rnd()); y2 = IW2'(rnd());
      if (n == 0) begin x1 = '1; y1 = '0; x2 = '1; y2 = '0; end
      if (n == 1) begin x1 = IW1'(1) << (IW1 - 1); y1 = '0; end
      #1;
      r = pmod(wide_t'(x1 ^ y1), M1, fe_t'(F1));
      checks++;
      if (fe_t'(c1) != r) begin failures++; $display("FAIL m=191 x=%h y=%h c=%h ref=%h", x1, y1, c1, r); end
      r = pmod(wide_t'(x2 ^ y2), M2, fe_t'(F2));
      checks++;
      if (fe_t'(c2) != r) begin failures++; $display("FAIL m=163 x=%h y=%h c=%h ref=%h", x2, y2, c2, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
