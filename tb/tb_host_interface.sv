// Testbench of host_interface with a stand-in core that stays busy for a
// few cycles after each request. Checks: a data write gives one io_req with
// the written word on din; a data read returns the top word of C one cycle
// later and requests a shift with zeros; a command write gives one cmd_valid
// with the command; the status shows busy while a request is pending or the
// core works; accesses while busy are dropped and flag an overrun; the I
// flag raises irq at the end of the command until the status is read.
// The stand-in core keeps a six-word model of register C, so a closing random
// run of data writes, data reads and commands (with and without the I flag)
// checks every word read against a model of the shift register.
module tb_host_interface;
  localparam int D = 32;

  logic         clk = 0, rst_n = 0;
  logic         bus_sel = 0, bus_wr = 0, bus_addr = 0;
  logic [D-1:0] bus_wdata = '0, bus_rdata;
  logic         irq;
  logic         cmd_valid, io_req;
  logic [6:0]   cmd;
  logic [D-1:0] din, dout;
  logic [6*D-1:0] cm = {32'h0, 32'h1234_5678, 128'h0};  // model of register C

  assign dout = cm[6*D-1 -: D];
  logic         core_busy = 0, core_done = 0;
  int n_io = 0, n_cmd = 0, core_cnt = 0;
  logic [D-1:0] last_din;
  logic [6:0]   last_cmd;
  int checks = 0, failures = 0;

  host_interface #(.D(D)) dut (.clk, .rst_n, .bus_sel, .bus_wr, .bus_addr, .bus_wdata,
      .bus_rdata, .irq, .cmd_valid, .cmd, .io_req, .din, .dout, .core_busy, .core_done);

  always #5 clk = ~clk;

  // core stand-in: busy for 5 cycles after a request, done in the last
  always_ff @(posedge clk) begin
    core_done <= 1'b0;
    if (cmd_valid || io_req) begin
      core_cnt  <= 5;
      core_busy <= 1'b1;
      if (io_req) begin
        n_io <= n_io + 1;
        last_din <= din;
        cm <= {cm[5*D-1:0], din};
      end
      if (cmd_valid) begin n_cmd <= n_cmd + 1; last_cmd <= cmd; end
    end else if (core_cnt > 0) begin
      core_cnt <= core_cnt - 1;
      if (core_cnt == 1) begin core_busy <= 1'b0; core_done <= 1'b1; end
    end
  end

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

  task automatic acc(logic wr, logic adr, logic [D-1:0] data, output logic [D-1:0] rd);
    @(negedge clk);
    bus_sel = 1; bus_wr = wr; bus_addr = adr; bus_wdata = data;
    @(posedge clk); #1;
    bus_sel = 0;
    rd = bus_rdata;
  endtask

  task automatic wait_idle();
    logic [D-1:0] s;
    do acc(0, 1, '0, s); while (s[0]);
  endtask

  initial begin
    logic [D-1:0] r;
    int io0, cmd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    acc(0, 1, '0, r);
    chk(r == 0, "status after reset");

    // data write
    io0 = n_io;
    acc(1, 0, 32'hcafe_f00d, r);
    acc(0, 1, '0, r);
    chk(r[0], "busy right after a data write");
    wait_idle();
    chk(n_io == io0 + 1 && last_din == 32'hcafe_f00d, "data write: one shift with the word");

    // data read
    io0 = n_io;
    acc(0, 0, '0, r);
    chk(r == 32'h1234_5678, "data read returns the top word of C");
    wait_idle();
    chk(n_io == io0 + 1 && last_din == '0, "data read: one shift with zeros");

    // command without I flag
    cmd0 = n_cmd;
    acc(1, 1, 32'h0000_0025, r);
    wait_idle();
    chk(n_cmd == cmd0 + 1 && last_cmd == 7'h25 && !irq, "WRITE command passed, no irq");

    // command with I flag
    acc(1, 1, 32'h0000_00c0, r);
    repeat (10) @(posedge clk);
    #1;
    chk(irq && last_cmd == 7'h40, "MULT with I flag raises irq");
    acc(0, 1, '0, r);
    chk(r[1], "status shows the pending interrupt");
    #1;
    chk(!irq, "status read clears irq");

    // accesses while busy are dropped and flagged
    io0 = n_io;
    cmd0 = n_cmd;
    acc(1, 0, 32'h1111_1111, r);
    acc(1, 0, 32'h2222_2222, r);
    acc(1, 1, 32'h0000_0040, r);
    acc(0, 1, '0, r);
    chk(r[2] && r[0], "overrun and busy flagged");
    wait_idle();
    chk(n_io == io0 + 1 && last_din == 32'h1111_1111 && n_cmd == cmd0, "accesses while busy dropped");
    acc(0, 1, '0, r);
    chk(r == 0, "overrun cleared by the status read");

    // random run against a model of the shift register C
    begin
      logic [6*D-1:0] tm = cm;
      logic [D-1:0] w;
      logic [7:0] c;
      for (int i = 0; i < 60; i++) begin
        case ($urandom_range(2))
          0: begin
            w = $urandom;
            acc(1, 0, w, r);
            tm = {tm[5*D-1:0], w};
          end
          1: begin
            acc(0, 0, '0, r);
            chk(r == tm[6*D-1 -: D], $sformatf("random run: read %0d", i));
            tm = {tm[5*D-1:0], D'(0)};
          end
          default: begin
            c = 8'($urandom);
            acc(1, 1, D'(c), r);
            repeat (10) @(posedge clk);
            #1;
            chk(last_cmd == c[6:0] && irq == c[7], $sformatf("random run: command %0d", i));
            acc(0, 1, '0, r);
            chk(r[1] == c[7] && !r[0] && !irq, $sformatf("random run: status after command %0d", i));
          end
        endcase
        wait_idle();
      end
      chk(cm == tm, "random run: final content of C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
