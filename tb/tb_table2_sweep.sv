// Multiplier-width sweep: one scalar multiplication over GF(2^191) on three
// processors built with 8-, 16- and 32-bit multiplier digits (the three
// configurations of the results table). All three share the host bus
// inputs and receive the same command stream; each result is checked
// against affine reference arithmetic, and each processor's busy cycles for
// MULT are compared with the cycle counts reported for the original design
// (62,296, 36,905 and 24,205). Those include host I/O, which is not counted
// here, so each count must be at most the reported one and within 15% of it.
module tb_table2_sweep;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int M = 191;
  localparam int D = 32;
  localparam int NW = (M + D - 1) / D;
  localparam int NP = 3;
  localparam int WS [NP] = '{8, 16, 32};
  localparam int TABLE_CYCLES [NP] = '{62296, 36905, 24205};
  localparam fe_t F = fe_t'((1 << 9) | 1);

  logic         clk = 0, rst_n = 0;
  logic         bus_sel = 0, bus_wr = 0, bus_addr = 0;
  logic [D-1:0] bus_wdata = '0;
  logic [D-1:0] rdata [NP];
  logic         irq [NP];
  logic         busy [NP];
  int           cycles [NP];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NP; g++) begin : g_dut
    ecc_processor #(.W(WS[g])) u (.clk, .rst_n, .bus_sel, .bus_wr, .bus_addr,
        .bus_wdata, .bus_rdata(rdata[g]), .irq(irq[g]));
    assign busy[g] = u.u_ctrl.busy;
    always @(posedge clk) if (busy[g]) cycles[g]++;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_acc(logic wr, logic adr, logic [D-1:0] data);
    @(negedge clk);
    bus_sel = 1; bus_wr = wr; bus_addr = adr; bus_wdata = data;
    @(posedge clk); #1;
    bus_sel = 0; bus_wr = 0;
  endtask

  // poll the status of all three until none is busy
  task automatic wait_idle();
    logic any;
    do begin
      bus_acc(0, 1, '0);
      any = 0;
      for (int g = 0; g < NP; g++) any |= rdata[g][0];
    end while (any);
  endtask

  task automatic store(logic [3:0] r, fe_t v);
    logic [NW*D-1:0] words = (NW*D)'(v);
    for (int i = NW - 1; i >= 0; i--) begin
      bus_acc(1, 0, words[i*D +: D]);
      wait_idle();
    end
    if (r != 4'hf) begin
      bus_acc(1, 1, D'({4'b0010, r}));
      wait_idle();
    end
  endtask

  task automatic fetch(logic [3:0] r, output fe_t v [NP]);
    logic [NW*D-1:0] words [NP];
    bus_acc(1, 1, D'({4'b0000, r}));
    wait_idle();
    for (int i = NW - 1; i >= 0; i--) begin
      bus_acc(0, 0, '0);
      for (int g = 0; g < NP; g++) words[g][i*D +: D] = rdata[g];
      wait_idle();
    end
    for (int g = 0; g < NP; g++) v[g] = fe_t'(words[g] >> (NW * D - M));
  endtask

  initial begin
    fe_t a, b, px, py, k;
    fe_t qx [NP], qy [NP];
    pt_t p, q;
    real dev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    a  = rand_fe(M);
    px = rand_fe(M);
    py = rand_fe(M);
    b  = curve_b(px, py, a, M, F);
    store(R_A, a);
    store(R_B, b);
    store(R_ONE, fe_t'(1));
    store(R_PX, px);
    store(R_PY, py);
    // k: full length, half of its bits set on average
    k = rand_fe(M) | (fe_t'(1) << (M - 1));
    store(4'hf, k);     // into C only
    for (int g = 0; g < NP; g++) cycles[g] = 0;
    bus_acc(1, 1, D'({1'b0, CMD_MULT, 4'b0}));
    wait_idle();
    fetch(R_QX, qx);
    fetch(R_QY, qy);
    p.x = px; p.y = py; p.inf = 0;
    q = pt_mul(k, p, a, M, F);
    for (int g = 0; g < NP; g++) begin
      chk(qx[g] == q.x && qy[g] == q.y, $sformatf("w=%0d: k*P", WS[g]));
      dev = (real'(cycles[g]) - real'(TABLE_CYCLES[g])) / real'(TABLE_CYCLES[g]);
      $display("w=%0d: k*P in %0d cycles (reported %0d, %0.1f%%), %0.1f per second at 66 MHz",
               WS[g], cycles[g], TABLE_CYCLES[g], 100.0 * dev, 66.0e6 / real'(cycles[g]));
      chk(dev <= 0.0 && dev > -0.15,
          $sformatf("w=%0d: cycle count at most the reported one (which includes I/O) and within 15%%", WS[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
