// Testbench of gf_square: the output, once reduced by long division, must be
// a*a mod f(x), and must fit the adder input. Checked for the default field
// and digit and for a pentanomial field with a 4-bit digit, where the square
// unit has to fold part of its result itself.
module tb_gf_square;
  import gf_ref_pkg::*;

  localparam int M1 = 191, OW1 = 199;
  localparam logic [M1-1:0] F1 = M1'((1 << 9) | 1);
  localparam int M2 = 163, OW2 = 167;
  localparam logic [M2-1:0] F2 = M2'((1 << 7) | (1 << 6) | (1 << 3) | 1);

  logic [M1-1:0]  a1;
  logic [OW1-1:0] s1;
  logic [M2-1:0]  a2;
  logic [OW2-1:0] s2;
  int checks = 0, failures = 0;

  gf_square #(.M(M1), .F_LOW(F1), .OW(OW1)) dut1 (.a(a1), .s(s1));
  gf_square #(.M(M2), .F_LOW(F2), .OW(OW2)) dut2 (.a(a2), .s(s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t r, e;
    for (int n = 0; n < 400; n++) begin
      a1 = M1'(rand_fe(M1));
      a2 = M2'(rand_fe(M2));
      if (n == 0) begin a1 = '1; a2 = '1; end
      if (n == 1) begin a1 = M1'(1) << (M1 - 1); a2 = M2'(1) << (M2 - 1); end
      #1;
      r = pmod(wide_t'(s1), M1, fe_t'(F1));
      e = fsq(fe_t'(a1), M1, fe_t'(F1));
      checks++;
      if (r != e) begin failures++; $display("FAIL m=191 a=%h s=%h", a1, s1); end
      r = pmod(wide_t'(s2), M2, fe_t'(F2));
      e = fsq(fe_t'(a2), M2, fe_t'(F2));
      checks++;
      if (r != e) begin failures++; $display("FAIL m=163 a=%h s=%h", a2, s2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
