// Elliptic-curve processor for GF(2^m): the logic of the accelerator FPGA.
//
// It computes the scalar multiplication Q = k*P and the point addition
// Q = Q + P on a curve y^2 + xy = x^3 + a x^2 + b over GF(2^191). Points go
// in and out in affine coordinates; inside, the working point is kept in
// Lopez-Dahab projective coordinates so that only one field inversion is needed
// per command. Four units make it up:
//   host_interface    local-bus port of the PCI bridge (data, command, status)
//   ecc_control_unit  state machine and microprogram
//   register_file     16 words of 191 bits, one shared address
//   arith_unit        register C, digit-serial multiplier, squarer, adder
// The arithmetic unit's output c(x) is both the register file's write data
// and the feedback b(x) of the arithmetic unit; the register file's read
// data is the operand a(x).
//
// Host protocol: a value is loaded by writing ceil(m/d) data words, most
// significant first (C keeps the low m bits of the words), and stored with a
// WRITE command. Before MULT the registers A (a), B (b), ONE (1),
// PX and PY must hold their values and k must be in C, shifted in last.
// After the command the result is in QX, QY; READ moves a register into C,
// and ceil(m/d) data reads return it most significant bits first. Commands
// are accepted only while the status busy flag is clear.
//
// The unit structure and the connections follow the described architecture;
// the bus protocol and the register map are this design's own.
module ecc_processor
  import ecc_pkg::*;
#(
  parameter int unsigned M = FIELD_M,
  parameter logic [M-1:0] F_LOW = FIELD_LOW,
  parameter int unsigned W = DIGIT_W,
  parameter int unsigned D = IO_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_sel,
  input  logic         bus_wr,
  input  logic         bus_addr,
  input  logic [D-1:0] bus_wdata,
  output logic [D-1:0] bus_rdata,
  output logic         irq
);

  logic         cmd_valid, io_req, core_busy, core_done, au_busy, rf_we;
  logic [6:0]   cmd;
  logic [D-1:0] din, dout;
  logic [3:0]   rf_addr;
  au_op_e       au_op;
  logic [M-1:0] c, a;

  host_interface #(.D(D)) u_if (
    .clk, .rst_n,
    .bus_sel, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .cmd_valid, .cmd, .io_req, .din, .dout,
    .core_busy, .core_done
  );

  ecc_control_unit #(.M(M)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd, .io_req,
    .c_in(c), .au_busy,
    .rf_addr, .rf_we, .au_op,
    .busy(core_busy), .done(core_done)
  );

  register_file #(.M(M), .NREGS(NREGS)) u_rf (
    .clk, .addr(rf_addr), .we(rf_we), .wdata(c), .rdata(a)
  );

  arith_unit #(.M(M), .F_LOW(F_LOW), .W(W), .D(D)) u_au (
    .clk, .rst_n, .op(au_op), .a, .b(c), .din, .c, .dout, .busy(au_busy)
  );

endmodule
