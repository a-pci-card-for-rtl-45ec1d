// Testbench of arith_unit at the default size (m = 191, w = 8, d = 32).
// Every operation is applied with random operands and the new value of C is
// compared with the reference arithmetic; a multiplication must take exactly
// 25 cycles (1 + 191/8 rounded up) with busy low only in its last cycle.
// dout must show the top 32 bits of C.
module tb_arith_unit;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int M = 191, W = 8, D = 32;
  localparam fe_t F = fe_t'((1 << 9) | 1);

  logic         clk = 0, rst_n = 0;
  au_op_e       op;
  logic [M-1:0] a, c;
  logic [D-1:0] din, dout;
  logic         busy;
  int checks = 0, failures = 0;

  arith_unit #(.M(M), .W(W), .D(D)) dut (
    .clk, .rst_n, .op, .a, .b(c), .din, .c, .dout, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_c(fe_t e, string what);
    checks++;
    if (fe_t'(c) != e) begin
      failures++;
      $display("FAIL %s: c=%h expected %h", what, c, e);
    end
  endtask

  // apply one single-cycle operation
  task automatic do_op(au_op_e o, logic [M-1:0] av, logic [D-1:0] dv);
    @(negedge clk);
    op = o; a = av; din = dv;
    @(posedge clk);
    #1;
    op = AU_HOLD;
  endtask

  // a multiplication: op stays MUL until busy is low in a cycle
  task automatic do_mul(logic [M-1:0] av, output int cycles);
    logic last;
    cycles = 0;
    @(negedge clk);
    op = AU_MUL; a = av;
    #1;
    forever begin
      last = !busy;
      @(posedge clk);
      cycles++;
      if (last) break;
      @(negedge clk);
    end
    #1;
    op = AU_HOLD;
  endtask

  initial begin
    fe_t cv, av, e;
    int cyc;
    op = AU_HOLD; a = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_c('0, "reset");
    for (int n = 0; n < 40; n++) begin
      av = rand_fe(M);
      do_op(AU_LOAD, M'(av), '0);
      expect_c(av, "load");
      cv = av;
      do_op(AU_HOLD, M'(rand_fe(M)), '0);
      expect_c(cv, "hold");
      av = rand_fe(M);
      do_op(AU_ADD, M'(av), '0);
      e = cv ^ av;
      expect_c(e, "add");
      cv = e;
      do_op(AU_SQR, M'(rand_fe(M)), '0);
      e = fsq(cv, M, F);
      expect_c(e, "square");
      cv = e;
      checks++;
      if (dout != c[M-1 -: D]) begin failures++; $display("FAIL dout"); end
      begin
        logic [D-1:0] dv = D'($urandom);
        do_op(AU_IO, '0, dv);
        e = ((cv << D) | fe_t'(dv)) & ((fe_t'(1) << M) - 1);
        expect_c(e, "io shift");
        cv = e;
      end
      av = rand_fe(M);
      do_mul(M'(av), cyc);
      e = fmul(av, cv, M, F);
      expect_c(e, "multiply");
      checks++;
      if (cyc != 25) begin failures++; $display("FAIL multiply took %0d cycles", cyc); end
      cv = e;
    end
    // multiply by one and by zero
    do_op(AU_LOAD, M'(rand_fe(M)), '0);
    cv = fe_t'(c);
    do_mul(M'(1), cyc);
    expect_c(cv, "multiply by 1");
    do_mul('0, cyc);
    expect_c('0, "multiply by 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
