// Testbench of ecc_control_unit with a stand-in for the arithmetic unit that
// keeps busy high for 24 of the 25 cycles of a multiplication. It checks the
// sequence of routines the state machine starts: for MULT with scalar k,
// (leading zeros of k) preshift steps, INITP, one DBL per bit after the top
// one, one ADD per further 1 bit in the right order, INVINIT, m-1 INVITER
// and AFFINE; for the ADD command INITQ, ADD, INVINIT, INVITER, AFFINE; for
// READ, WRITE and data transfers a single routine with the command address.
// The cycles busy must equal the sum of the routine lengths. Uses a small
// field size (m = 13) to keep the sequences short, and m = 191 once.
module tb_ecc_control_unit;
  import ecc_pkg::*;

  localparam int M = 13;

  logic         clk = 0, rst_n = 0;
  logic         cmd_valid = 0, io_req = 0;
  logic [6:0]   cmd = '0;
  logic [M-1:0] c_in = '0;
  logic         au_busy;
  logic [3:0]   rf_addr;
  logic         rf_we;
  au_op_e       au_op;
  logic         busy, done;
  int           mcnt;
  int checks = 0, failures = 0;

  ecc_control_unit #(.M(M)) dut (.clk, .rst_n, .cmd_valid, .cmd, .io_req, .c_in,
                                 .au_busy, .rf_addr, .rf_we, .au_op, .busy, .done);

  // full-size instance, driven with the same command stream
  logic [190:0] c_in_big = '0;
  logic         busy_big, done_big, au_busy_big;
  au_op_e       au_op_big;
  int           mcnt_big;
  ecc_control_unit #(.M(191)) dut_big (.clk, .rst_n, .cmd_valid, .cmd, .io_req,
      .c_in(c_in_big), .au_busy(au_busy_big), .rf_addr(), .rf_we(), .au_op(au_op_big),
      .busy(busy_big), .done(done_big));

  always #5 clk = ~clk;

  assign au_busy = (au_op == AU_MUL) && (mcnt != 24);
  always_ff @(posedge clk) mcnt <= (au_op == AU_MUL && mcnt != 24) ? mcnt + 1 : 0;
  assign au_busy_big = (au_op_big == AU_MUL) && (mcnt_big != 24);
  always_ff @(posedge clk) mcnt_big <= (au_op_big == AU_MUL && mcnt_big != 24) ? mcnt_big + 1 : 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // log of routine starts of the small instance
  logic [6:0] log_q [$];
  int busy_cycles, preshift_cycles;
  always @(posedge clk) if (rst_n) begin
    if (dut.up_start) log_q.push_back(dut.up_addr);
    if (busy) busy_cycles++;
    if (busy && !dut.up_running) preshift_cycles++;
  end

  function automatic int routine_cycles(logic [6:0] e);
    case (e)
      UP_READ, UP_WRITE, UP_IO: return 1;
      UP_INITP, UP_INITQ: return 6;
      UP_DBL: return 25 + 5 * 24;
      UP_ADD: return 40 + 10 * 24;
      UP_INVINIT: return 4;
      UP_INVITER: return 5 + 24;
      UP_AFFINE: return 7 + 2 * 24;
      default: return -1000000;
    endcase
  endfunction

  task automatic issue(logic [6:0] c, logic [M-1:0] k, bit io);
    log_q.delete();
    busy_cycles = 0;
    preshift_cycles = 0;
    @(negedge clk);
    c_in = k;
    if (io) io_req = 1; else begin cmd_valid = 1; cmd = c; end
    @(posedge clk); #1;
    io_req = 0; cmd_valid = 0;
    while (busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  task automatic expect_log(logic [6:0] exp [$], string what);
    int sum = 0;
    chk(log_q.size() == exp.size(), $sformatf("%s: %0d routines, expected %0d", what, log_q.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < log_q.size(); i++) begin
      chk(log_q[i] == exp[i], $sformatf("%s: routine %0d is %0d, expected %0d", what, i, log_q[i], exp[i]));
      sum += routine_cycles(exp[i]);
    end
    chk(busy_cycles == sum + preshift_cycles,
        $sformatf("%s: busy %0d cycles, expected %0d", what, busy_cycles, sum + preshift_cycles));
  endtask

  task automatic check_mult(logic [M-1:0] k);
    logic [6:0] exp [$];
    int top = -1;
    for (int i = M - 1; i >= 0; i--) if (k[i] && top < 0) top = i;
    issue({CMD_MULT, 4'b0}, k, 0);
    exp.push_back(UP_INITP);
    for (int i = top - 1; i >= 0; i--) begin
      exp.push_back(UP_DBL);
      if (k[i]) exp.push_back(UP_ADD);
    end
    exp.push_back(UP_INVINIT);
    for (int i = 0; i < M - 1; i++) exp.push_back(UP_INVITER);
    exp.push_back(UP_AFFINE);
    expect_log(exp, $sformatf("MULT k=%b", k));
    chk(preshift_cycles == M - top, $sformatf("preshift %0d cycles for k=%b", preshift_cycles, k));
  endtask

  initial begin
    logic [6:0] exp [$];
    int big_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    issue({CMD_READ, 4'd9}, '0, 0);
    exp = '{UP_READ};
    expect_log(exp, "READ");
    issue({CMD_WRITE, 4'd4}, '0, 0);
    exp = '{UP_WRITE};
    expect_log(exp, "WRITE");
    issue('0, '0, 1);
    exp = '{UP_IO};
    expect_log(exp, "IO");
    // the READ/WRITE address reaches the register file
    @(negedge clk); cmd_valid = 1; cmd = {CMD_WRITE, 4'd12};
    @(posedge clk); #1; cmd_valid = 0;
    @(negedge clk);
    chk(rf_addr == 4'd12 && rf_we, "WRITE drives the command address with write enable");
    @(posedge clk); #1;

    check_mult(13'b1);
    check_mult(13'b1_0110_1001_0111);
    check_mult(13'b0_0001_0000_0001);
    for (int n = 0; n < 6; n++) check_mult(M'($urandom) | 1);

    issue({CMD_MULT, 4'b0}, '0, 0);
    chk(log_q.size() == 0 && busy_cycles == 1, "k = 0 ends after one preshift cycle");

    issue({CMD_ADD, 4'b0}, '0, 0);
    exp = '{UP_INITQ, UP_ADD, UP_INVINIT};
    for (int i = 0; i < M - 1; i++) exp.push_back(UP_INVITER);
    exp.push_back(UP_AFFINE);
    expect_log(exp, "ADD command");

    // full size, k with all 191 bits set (the big instance also received the
    // commands above; let it finish first)
    while (busy_big) @(posedge clk);
    @(negedge clk);
    c_in_big = '1; cmd_valid = 1; cmd = {CMD_MULT, 4'b0};
    @(posedge clk); #1; cmd_valid = 0;
    big_cycles = 0;
    while (busy_big) begin @(posedge clk); #1; big_cycles++; end
    chk(big_cycles == 1 + 6 + 190 * 145 + 190 * 280 + 4 + 190 * 29 + 55,
        $sformatf("m=191, k all ones: %0d cycles", big_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
