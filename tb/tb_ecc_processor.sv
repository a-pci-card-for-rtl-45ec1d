// End-to-end testbench of ecc_processor at its default size: GF(2^191),
// 8-bit multiplier digit, 32-bit host words. Everything goes through the host
// bus, as driver software would use it.
//
// A random curve is made by choosing a, a point P = (x, y) and solving the
// curve equation for b. After loading A, B, ONE, PX and PY, the testbench
// runs MULT for k = 1, 3, a full-length random k and k = 0, then the ADD
// command Q = Q + P, and checks every result against affine reference
// arithmetic. The cycles each command keeps the processor busy are compared
// with a count built from the routine lengths (multiplication 25 cycles).
// Mechanisms counted and required at least once: preshift of leading zero
// bits, point doubling, point addition, inversion steps, multiplier stalls,
// IO shifts, READ and WRITE commands, the ADD command, the interrupt, and an
// access rejected while busy (overrun flag).
module tb_ecc_processor;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int M = 191;
  localparam int D = 32;
  localparam int NW = (M + D - 1) / D;    // host words per value
  localparam fe_t F = fe_t'((1 << 9) | 1);

  logic         clk = 0, rst_n = 0;
  logic         bus_sel = 0, bus_wr = 0, bus_addr = 0;
  logic [D-1:0] bus_wdata = '0, bus_rdata;
  logic         irq;
  int checks = 0, failures = 0;
  fe_t k_list [4];

  ecc_processor dut (.clk, .rst_n, .bus_sel, .bus_wr, .bus_addr, .bus_wdata,
                     .bus_rdata, .irq);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_preshift, n_dbl, n_add, n_inviter, n_stall, n_io, n_read, n_write,
      n_addcmd, n_irq, n_overrun, busy_cycles;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.busy) busy_cycles++;
    // a preshift step: busy, no routine running, top bit of k still 0
    if (dut.u_ctrl.busy && !dut.u_ctrl.u_up.running && !dut.u_ctrl.k_q[M-1]
        && dut.u_ctrl.k_q != '0) n_preshift++;
    if (dut.u_ctrl.up_start) begin
      case (dut.u_ctrl.up_addr)
        UP_DBL:     n_dbl++;
        UP_ADD:     n_add++;
        UP_INVITER: n_inviter++;
        UP_IO:      n_io++;
        UP_READ:    n_read++;
        UP_WRITE:   n_write++;
        UP_INITQ:   n_addcmd++;
        default: ;
      endcase
    end
    if (dut.au_busy) n_stall++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- bus access ----
  task automatic bus_write(logic adr, logic [D-1:0] data);
    @(negedge clk);
    bus_sel = 1; bus_wr = 1; bus_addr = adr; bus_wdata = data;
    @(posedge clk); #1;
    bus_sel = 0; bus_wr = 0;
  endtask

  task automatic bus_read(logic adr, output logic [D-1:0] data);
    @(negedge clk);
    bus_sel = 1; bus_wr = 0; bus_addr = adr;
    @(posedge clk); #1;
    bus_sel = 0;
    data = bus_rdata;
  endtask

  logic [D-1:0] last_status;

  task automatic wait_idle();
    logic [D-1:0] s;
    do begin
      bus_read(1'b1, s);
      if (s[1]) n_irq++;
      if (s[2]) n_overrun++;
    end while (s[0]);
    last_status = s;
  endtask

  // shift a value into C, most significant word first
  task automatic put_c(fe_t v);
    logic [NW*D-1:0] words = (NW*D)'(v);
    for (int i = NW - 1; i >= 0; i--) begin
      bus_write(1'b0, words[i*D +: D]);
      wait_idle();
    end
  endtask

  task automatic command(logic [7:0] c);
    bus_write(1'b1, D'(c));
  endtask

  task automatic store(logic [3:0] r, fe_t v);
    put_c(v);
    command({4'b0010, r});
    wait_idle();
  endtask

  task automatic fetch(logic [3:0] r, output fe_t v);
    logic [NW*D-1:0] words;
    logic [D-1:0] w;
    command({4'b0000, r});
    wait_idle();
    for (int i = NW - 1; i >= 0; i--) begin
      bus_read(1'b0, w);
      words[i*D +: D] = w;
      wait_idle();
    end
    v = fe_t'(words >> (NW * D - M));
  endtask

  // run a point command with the I flag and wait for the interrupt
  task automatic run_point_cmd(logic [2:0] opc, output int cycles);
    int c0 = busy_cycles;
    int guard = 0;
    command({1'b1, opc, 4'b0000});
    while (!irq && guard < 300000) begin
      @(posedge clk);
      guard++;
    end
    chk(irq, "interrupt raised at the end of the command");
    cycles = busy_cycles - c0;
    wait_idle();
    chk(!irq, "interrupt cleared by the status read");
  endtask

  function automatic int bitlen(fe_t k);
    for (int i = 255; i >= 0; i--) if (k[i]) return i + 1;
    return 0;
  endfunction

  function automatic int popcnt(fe_t k);
    int n = 0;
    for (int i = 0; i < 256; i++) n += int'(k[i]);
    return n;
  endfunction

  // busy cycles of MULT: preshift + INITP + routines back to back (the
  // cycle that accepts the command is not yet busy)
  function automatic int mult_cycles(fe_t k);
    int l = bitlen(k);
    return (M - l + 1) + 6 + (l - 1) * (25 + 5 * 24) + (popcnt(k) - 1) * (40 + 10 * 24)
           + 4 + (M - 1) * (5 + 24) + (7 + 2 * 24);
  endfunction

  localparam int ADD_CYCLES = 6 + (40 + 10 * 24) + 4 + (M - 1) * (5 + 24) + (7 + 2 * 24);

  initial begin
    fe_t a, b, px, py, k, qx, qy, v;
    pt_t p, q, r;
    int cyc;

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // random curve through a random point
    a  = rand_fe(M);
    px = rand_fe(M);
    py = rand_fe(M);
    b  = curve_b(px, py, a, M, F);
    p.x = px; p.y = py; p.inf = 0;

    store(R_A, a);
    store(R_B, b);
    store(R_ONE, fe_t'(1));
    store(R_PX, px);
    store(R_PY, py);
    fetch(R_PX, v);
    chk(v == px, "register round trip through WRITE, READ and IO");

    k_list = '{fe_t'(1), fe_t'(3), '0, '0};
    foreach (k_list[i]) begin
      k = k_list[i];
      if (i == 2) k = rand_fe(M) | (fe_t'(1) << (M - 1));
      if (i == 3) k = rand_fe(M) >> 5;  // leading zero bits to preshift
      put_c(k);
      run_point_cmd(CMD_MULT, cyc);
      chk(cyc == mult_cycles(k), $sformatf("MULT busy %0d cycles, expected %0d", cyc, mult_cycles(k)));
      $display("k = %h: %0d cycles", k, cyc);
      fetch(R_QX, qx);
      fetch(R_QY, qy);
      q = pt_mul(k, p, a, M, F);
      chk(!q.inf && qx == q.x && qy == q.y, $sformatf("k*P for k = %h", k));
      if (i == 2) begin
        // an access while busy is rejected and flagged
        put_c(k);
        command({1'b0, CMD_MULT, 4'b0000});
        repeat (100) @(posedge clk);
        bus_write(1'b0, 32'hdeadbeef);
        wait_idle();
        chk(last_status[2] || n_overrun > 0, "overrun flagged");
        fetch(R_QX, v);
        chk(v == q.x, "result unaffected by rejected access");
      end
    end

    // k = 0: nothing computed, QX unchanged
    fetch(R_QX, qx);
    put_c('0);
    command({1'b0, CMD_MULT, 4'b0000});
    wait_idle();
    fetch(R_QX, v);
    chk(v == qx, "k = 0 leaves Q unchanged");

    // ADD command: Q = Q + P
    fetch(R_QY, qy);
    q.x = qx; q.y = qy; q.inf = 0;
    run_point_cmd(CMD_ADD, cyc);
    chk(cyc == ADD_CYCLES, $sformatf("ADD busy %0d cycles, expected %0d", cyc, ADD_CYCLES));
    r = pt_add(q, p, a, M, F);
    fetch(R_QX, qx);
    fetch(R_QY, qy);
    chk(qx == r.x && qy == r.y, "point addition Q + P");

    $display("mechanisms: preshift=%0d dbl=%0d add=%0d inviter=%0d stall=%0d io=%0d read=%0d write=%0d addcmd=%0d irq=%0d overrun=%0d",
             n_preshift, n_dbl, n_add, n_inviter, n_stall, n_io, n_read, n_write, n_addcmd, n_irq, n_overrun);
    chk(n_preshift > 0, "preshift happened");
    chk(n_dbl > 0, "point doubling happened");
    chk(n_add > 0, "point addition happened");
    chk(n_inviter > 0, "inversion happened");
    chk(n_stall > 0, "multiplier stall happened");
    chk(n_io > 0, "IO shift happened");
    chk(n_read > 0, "READ happened");
    chk(n_write > 0, "WRITE happened");
    chk(n_addcmd > 0, "ADD command happened");
    chk(n_irq > 0, "interrupt happened");
    chk(n_overrun > 0, "overrun happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
