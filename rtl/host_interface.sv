// Interface unit between the PCI bridge's local bus and the EC processor.
//
// The bridge side is a simple synchronous register port: a one-cycle strobe
// bus_sel with bus_wr (1 write, 0 read), a one-bit address and D-bit data.
// Address 0 is the data port, address 1 the command/status port:
//   write data    din <= wdata, then C is shifted left by D bits with din in
//                 its lowest bits (one IO operation)
//   read data     rdata <= top D bits of C, then C is shifted left by D bits
//                 with zeros entering
//   write command bits 6:0 go to the control unit as a command, bit 7 (I)
//                 enables the interrupt for it
//   read status   rdata <= {.., overrun, irq pending, busy}; clears the
//                 irq-pending and overrun flags
// bus_rdata is valid from the cycle after the read strobe. Data and command
// accesses while busy is set are dropped and set the overrun flag. When a
// command that had its I flag (bit 7) set ends, irq-pending is set and
// drives irq until the status register is read.
//
// Separate addresses for data and commands, shifting on both data reads and
// writes, the busy flag and the I flag follow the description; the bus
// protocol, the status layout, the overrun flag and the zeros shifted in on
// reads are this design's own, since the bridge's local bus is not specified.
module host_interface #(
  parameter int unsigned D = ecc_pkg::IO_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // local bus of the PCI bridge
  input  logic         bus_sel,
  input  logic         bus_wr,
  input  logic         bus_addr,
  input  logic [D-1:0] bus_wdata,
  output logic [D-1:0] bus_rdata,
  output logic         irq,
  // processor side
  output logic         cmd_valid,
  output logic [6:0]   cmd,        // command byte without the I flag
  output logic         io_req,
  output logic [D-1:0] din,
  input  logic [D-1:0] dout,
  input  logic         core_busy,
  input  logic         core_done
);

  localparam logic ADDR_DATA = 1'b0;
  localparam logic ADDR_CTRL = 1'b1;

  logic         cmd_valid_q, io_req_q;
  logic [6:0]   cmd_q;
  logic [D-1:0] din_q, rdata_q;
  logic         irq_en_q, irq_q, overrun_q;
  logic         busy;

  assign busy = core_busy || cmd_valid_q || io_req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid_q <= 1'b0;
      io_req_q    <= 1'b0;
      cmd_q       <= '0;
      din_q       <= '0;
      rdata_q     <= '0;
      irq_en_q    <= 1'b0;
      irq_q       <= 1'b0;
      overrun_q   <= 1'b0;
    end else begin
      cmd_valid_q <= 1'b0;
      io_req_q    <= 1'b0;
      if (core_done && irq_en_q) irq_q <= 1'b1;
      if (bus_sel) begin
        if (bus_addr == ADDR_CTRL && !bus_wr) begin
          rdata_q   <= D'({overrun_q, irq_q, busy});
          irq_q     <= 1'b0;
          overrun_q <= 1'b0;
        end else if (busy) begin
          overrun_q <= 1'b1;
        end else if (bus_addr == ADDR_CTRL) begin
          cmd_q       <= bus_wdata[6:0];
          irq_en_q    <= bus_wdata[7];
          cmd_valid_q <= 1'b1;
        end else if (bus_addr == ADDR_DATA) begin
          if (bus_wr) din_q <= bus_wdata;
          else begin
            din_q   <= '0;
            rdata_q <= dout;
          end
          io_req_q <= 1'b1;
        end
      end
    end
  end

  assign cmd_valid = cmd_valid_q;
  assign cmd       = cmd_q;
  assign io_req    = io_req_q;
  assign din       = din_q;
  assign bus_rdata = rdata_q;
  assign irq       = irq_q;

endmodule
