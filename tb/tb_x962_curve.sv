// Known-answer test on the standard 191-bit binary curve of ANSI X9.62
// (c2pnb191v1, over GF(2) modulo x^191 + x^9 + 1), default processor size.
// The generator G has prime order n, so (n-1)*G must equal -G = (Gx, Gx + Gy)
// with no reference arithmetic involved; a random k*G is also compared with
// the affine reference model, and the ADD command computes 2G + G = 3G.
module tb_x962_curve;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int M = 191;
  localparam int D = 32;
  localparam int NW = (M + D - 1) / D;
  localparam fe_t F = fe_t'((1 << 9) | 1);

  localparam fe_t CURVE_A = fe_t'(192'h2866537B676752636A68F56554E12640276B649EF7526267);
  localparam fe_t CURVE_B = fe_t'(192'h2E45EF571F00786F67B0081B9495A3D95462F5DE0AA185EC);
  localparam fe_t GX      = fe_t'(192'h36B3DAF8A23206F9C4F299D7B21A9C369137F2C84AE1AA0D);
  localparam fe_t GY      = fe_t'(192'h765BE73433B3F95E332932E70EA245CA2418EA0EF98018FB);
  localparam fe_t ORDER_N = fe_t'(192'h40000000000000000000000004A20E90C39067C893BBB9A5);

  logic         clk = 0, rst_n = 0;
  logic         bus_sel = 0, bus_wr = 0, bus_addr = 0;
  logic [D-1:0] bus_wdata = '0, bus_rdata;
  logic         irq;
  int checks = 0, failures = 0;

  ecc_processor dut (.clk, .rst_n, .bus_sel, .bus_wr, .bus_addr, .bus_wdata,
                     .bus_rdata, .irq);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  task automatic wait_idle();
    do bus_acc(0, 1, '0); while (bus_rdata[0]);
  endtask

  // shift a value into C, most significant word first
  task automatic put(fe_t v);
    logic [NW*D-1:0] words = (NW*D)'(v);
    for (int i = NW - 1; i >= 0; i--) begin
      bus_acc(1, 0, words[i*D +: D]);
      wait_idle();
    end
  endtask

  task automatic store(logic [3:0] r, fe_t v);
    put(v);
    bus_acc(1, 1, D'({4'b0010, r}));
    wait_idle();
  endtask

  task automatic fetch(logic [3:0] r, output fe_t v);
    logic [NW*D-1:0] words;
    bus_acc(1, 1, D'({4'b0000, r}));
    wait_idle();
    for (int i = NW - 1; i >= 0; i--) begin
      bus_acc(0, 0, '0);
      words[i*D +: D] = bus_rdata;
      wait_idle();
    end
    v = fe_t'(words >> (NW * D - M));
  endtask

  task automatic mult(fe_t k, output fe_t qx, output fe_t qy);
    put(k);
    bus_acc(1, 1, D'({1'b0, CMD_MULT, 4'b0}));
    wait_idle();
    fetch(R_QX, qx);
    fetch(R_QY, qy);
  endtask

  initial begin
    fe_t qx, qy, k;
    pt_t g, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk(curve_b(GX, GY, CURVE_A, M, F) == CURVE_B, "generator lies on the curve");
    store(R_A, CURVE_A);
    store(R_B, CURVE_B);
    store(R_ONE, fe_t'(1));
    store(R_PX, GX);
    store(R_PY, GY);
    g.x = GX; g.y = GY; g.inf = 0;

    mult(ORDER_N - 1, qx, qy);
    chk(qx == GX && qy == (GX ^ GY), "(n-1)*G = -G");

    k = rand_fe(M) % ORDER_N;
    mult(k, qx, qy);
    r = pt_mul(k, g, CURVE_A, M, F);
    chk(qx == r.x && qy == r.y, "random k*G");

    mult(fe_t'(2), qx, qy);
    bus_acc(1, 1, D'({1'b0, CMD_ADD, 4'b0}));
    wait_idle();
    fetch(R_QX, qx);
    fetch(R_QY, qy);
    r = pt_mul(fe_t'(3), g, CURVE_A, M, F);
    chk(qx == r.x && qy == r.y, "2G + G = 3G with the ADD command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
