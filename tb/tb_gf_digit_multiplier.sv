// Testbench of gf_digit_multiplier: random and corner operands at the default
// size (m = 191, 8-bit digit) against a shift-and-XOR reference product.
module tb_gf_digit_multiplier;
  import gf_ref_pkg::*;

  localparam int M = 191;
  localparam int W = 8;

  logic [M-1:0]   a;
  logic [W-1:0]   mi;
  logic [M+W-2:0] p;
  int checks = 0, failures = 0;

  gf_digit_multiplier #(.M(M), .W(W)) dut (.a, .mi, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [M-1:0] ta, logic [W-1:0] tm);
    wide_t ref_p;
    a = ta; mi = tm;
    #1;
    ref_p = clmul(fe_t'(ta), fe_t'(tm));
    checks++;
    if (wide_t'(p) != ref_p) begin
      failures++;
      $display("FAIL a=%h mi=%h p=%h ref=%h", ta, tm, p, ref_p);
    end
  endtask

  initial begin
    check_one('0, '1);
    check_one('1, '0);
    check_one('1, '1);
    check_one({1'b1, {(M-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    for (int t = 0; t < W; t++) check_one('1, W'(1) << t);
    for (int n = 0; n < 500; n++) check_one(M'(rand_fe(M)), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
