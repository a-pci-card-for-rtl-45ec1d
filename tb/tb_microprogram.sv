// Testbench of microprogram. A stand-in for the arithmetic unit holds busy
// for the first 24 of the 25 cycles of each MUL. Each routine is started at
// its entry address and its words are tallied by operation; the counts are
// those of the formulas (doubling: 5 multiplications, 5 squarings,
// 4 additions), the routine must end with done exactly when its last word
// completes, and a routine started in the done cycle of another must follow
// it without an idle cycle. READ and WRITE must use the command address.
module tb_microprogram;
  import ecc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start;
  logic [6:0] start_addr;
  logic [3:0] ext_addr;
  logic       stall;
  logic [3:0] rf_addr;
  logic       rf_we;
  au_op_e     au_op;
  logic       running, done;
  int         mcnt;
  int checks = 0, failures = 0;

  microprogram dut (.clk, .rst_n, .start, .start_addr, .ext_addr, .stall,
                    .rf_addr, .rf_we, .au_op, .running, .done);

  always #5 clk = ~clk;

  // arithmetic-unit stand-in: 25-cycle multiplication
  assign stall = (au_op == AU_MUL) && (mcnt != 24);
  always_ff @(posedge clk) mcnt <= (au_op == AU_MUL && mcnt != 24) ? mcnt + 1 : 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct {
    int words, cycles, muls, sqrs, adds, loads, writes, ios;
    logic [3:0] last_addr;
  } tally_t;

  // start a routine and tally it until done; the start pulse is given at the
  // current negedge
  task automatic run(logic [6:0] entry, logic [3:0] ext, output tally_t t);
    t = '{default: 0};
    start = 1; start_addr = entry; ext_addr = ext;
    @(posedge clk); #1;
    start = 0;
    forever begin
      @(negedge clk);
      t.cycles++;
      if (!stall) begin
        t.words++;
        case (au_op)
          AU_MUL: t.muls++;
          AU_SQR: t.sqrs++;
          AU_ADD: t.adds++;
          AU_LOAD: t.loads++;
          AU_IO: t.ios++;
          default: ;
        endcase
        if (rf_we) t.writes++;
        t.last_addr = rf_addr;
      end
      if (done) break;
    end
  endtask

  task automatic expect_routine(string name, logic [6:0] entry, int words, int muls,
                                int sqrs, int adds);
    tally_t t;
    run(entry, 4'd0, t);
    chk(t.words == words, $sformatf("%s: %0d words", name, t.words));
    chk(t.muls == muls, $sformatf("%s: %0d multiplications", name, t.muls));
    chk(t.sqrs == sqrs, $sformatf("%s: %0d squarings", name, t.sqrs));
    chk(t.adds == adds, $sformatf("%s: %0d additions", name, t.adds));
    chk(t.cycles == words + 24 * muls, $sformatf("%s: %0d cycles", name, t.cycles));
    @(posedge clk); #1;
    chk(!running, $sformatf("%s: stopped after done", name));
  endtask

  initial begin
    tally_t t, t2;
    start = 0; start_addr = '0; ext_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(au_op == AU_HOLD && !rf_we && !running, "idle outputs");

    run(UP_READ, 4'd11, t);
    chk(t.words == 1 && t.loads == 1 && t.writes == 0 && t.last_addr == 4'd11, "READ");
    @(negedge clk);
    run(UP_WRITE, 4'd6, t);
    chk(t.words == 1 && t.writes == 1 && t.last_addr == 4'd6, "WRITE");
    @(negedge clk);
    run(UP_IO, 4'd3, t);
    chk(t.words == 1 && t.ios == 1 && t.writes == 0, "IO");
    @(negedge clk);
    run(UP_INITP, 4'd0, t);
    chk(t.words == 6 && t.writes == 3 && t.loads == 3, "INITP");
    @(negedge clk);
    run(UP_INITQ, 4'd0, t);
    chk(t.words == 6 && t.writes == 3 && t.loads == 3, "INITQ");
    @(negedge clk);
    expect_routine("DBL", UP_DBL, 25, 5, 5, 4);
    @(negedge clk);
    expect_routine("ADD", UP_ADD, 40, 10, 4, 8);
    @(negedge clk);
    expect_routine("INVINIT", UP_INVINIT, 4, 0, 0, 0);
    @(negedge clk);
    expect_routine("INVITER", UP_INVITER, 5, 1, 1, 0);
    @(negedge clk);
    expect_routine("AFFINE", UP_AFFINE, 7, 2, 1, 0);

    // back-to-back: DBL then, in its done cycle, INVITER
    @(negedge clk);
    start = 1; start_addr = UP_DBL;
    @(posedge clk); #1;
    start = 0;
    t = '{default: 0};
    forever begin
      @(negedge clk);
      t.cycles++;
      if (done) break;
    end
    start = 1; start_addr = UP_INVITER;   // given in the done cycle
    @(posedge clk); #1;
    start = 0;
    t2 = '{default: 0};
    forever begin
      @(negedge clk);
      t2.cycles++;
      chk(running, "no idle cycle between routines");
      if (done) break;
    end
    chk(t.cycles == 25 + 5 * 24 && t2.cycles == 5 + 24, "back-to-back cycle counts");
    @(posedge clk); #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
