// Register file: NREGS words of M bits for curve parameters and intermediate results.
//
// One address serves both ports, as in the described register file whose read
// and write ports share an address decoder. The read port is always active:
// rdata shows the addressed word combinationally (an FPGA distributed RAM).
// When we is high the word at addr is replaced by wdata at the rising clock
// edge; rdata shows the old word until then. The contents are not reset.
//
// 16 words of 191 bits follow the description; the array form is meant to map
// onto 16x1-bit LUT memories, one per bit.
module register_file #(
  parameter int unsigned M = ecc_pkg::FIELD_M,
  parameter int unsigned NREGS = ecc_pkg::NREGS,
  parameter int unsigned AW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [M-1:0]  wdata,
  output logic [M-1:0]  rdata
);

  logic [M-1:0] mem [NREGS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
