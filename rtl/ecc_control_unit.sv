// ECC control unit: state machine plus microprogram that sequence all commands.
//
// The state machine handles the major phases; the microprogram (ROM and
// address counter) produces the register-file address, write enable and
// arithmetic-unit operation cycle by cycle. The critical path therefore never
// runs through wide decoding logic.
//
// Commands (cmd[6:4]): READ and WRITE run one microcode word with the register
// address cmd[3:0]. MULT computes Q = k*P: k is taken from register C of the
// arithmetic unit when the command arrives, then
//   PRESHIFT  k is shifted left until its top bit is 1 (one bit per cycle),
//   INIT      the working point is set to P,
//   DBL/ADD   for each remaining bit the point is doubled and, for a 1 bit,
//             P is added (double-and-add, most significant bit first),
//   INVINIT/INVITER  1/Z by exponentiation: m-1 steps of square and multiply,
//   AFFINE    Q = (X/Z, Y/Z^2) written to QX, QY.
// ADD computes Q = Q + P from the affine points in QX, QY and PX, PY with one
// ADD routine followed by the same conversion to affine coordinates.
// A data-transfer request io_req runs the IO word, shifting host data into C.
// A request is accepted only while busy is low; done pulses for one cycle
// when a command ends. k = 0 ends MULT after the preshift with QX, QY unchanged.
// Point additions that hit the doubling or the point at infinity (Q = +-P)
// are not detected.
//
// The split into state machine and microprogram, the preshift and the phase
// order follow the description; the states, the handling of the ADD command
// and of k = 0 are this design's own.
module ecc_control_unit
  import ecc_pkg::*;
#(
  parameter int unsigned M = FIELD_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  logic [6:0]   cmd,       // command byte without the I flag
  input  logic         io_req,
  input  logic [M-1:0] c_in,      // register C of the arithmetic unit (scalar k)
  input  logic         au_busy,
  output logic [3:0]   rf_addr,
  output logic         rf_we,
  output au_op_e       au_op,
  output logic         busy,
  output logic         done
);

  typedef enum logic [3:0] {
    S_IDLE, S_XFER, S_PRESHIFT, S_INIT, S_DBL, S_ADD,
    S_INVINIT, S_INVITER, S_AFFINE
  } state_e;

  localparam int unsigned CW = $clog2(M + 1);

  state_e       state_q, state_d;
  logic [M-1:0] k_q, k_d;
  logic [CW-1:0] cnt_q, cnt_d;
  logic         mode_add_q, mode_add_d;
  logic [3:0]   addr_q, addr_d;
  logic         up_start, up_done, up_running;
  logic [6:0]   up_addr;

  microprogram u_up (
    .clk, .rst_n,
    .start(up_start), .start_addr(up_addr), .ext_addr(addr_q),
    .stall(au_busy),
    .rf_addr, .rf_we, .au_op,
    .running(up_running), .done(up_done)
  );

  always_comb begin
    state_d    = state_q;
    k_d        = k_q;
    cnt_d      = cnt_q;
    mode_add_d = mode_add_q;
    addr_d     = addr_q;
    up_start   = 1'b0;
    up_addr    = UP_IO;
    done       = 1'b0;

    unique case (state_q)
      S_IDLE:
        if (cmd_valid) begin
          addr_d = cmd[3:0];
          unique case (cmd[6:4])
            CMD_READ:  begin up_start = 1'b1; up_addr = UP_READ;  state_d = S_XFER; end
            CMD_WRITE: begin up_start = 1'b1; up_addr = UP_WRITE; state_d = S_XFER; end
            CMD_MULT: begin
              k_d        = c_in;
              cnt_d      = CW'(M - 1);
              mode_add_d = 1'b0;
              state_d    = S_PRESHIFT;
            end
            CMD_ADD: begin
              mode_add_d = 1'b1;
              up_start   = 1'b1;
              up_addr    = UP_INITQ;
              state_d    = S_INIT;
            end
            default: done = 1'b1;  // unused opcode: nothing to do
          endcase
        end else if (io_req) begin
          up_start = 1'b1;
          up_addr  = UP_IO;
          state_d  = S_XFER;
        end

      S_XFER:
        if (up_done) begin
          state_d = S_IDLE;
          done    = 1'b1;
        end

      S_PRESHIFT:
        if (k_q == '0) begin
          state_d = S_IDLE;
          done    = 1'b1;
        end else if (k_q[M-1]) begin
          up_start = 1'b1;
          up_addr  = UP_INITP;
          state_d  = S_INIT;
        end else begin
          k_d   = k_q << 1;
          cnt_d = cnt_q - 1'b1;
        end

      S_INIT, S_DBL, S_ADD:
        if (up_done) begin
          up_start = 1'b1;
          if (mode_add_q && state_q == S_INIT) begin
            up_addr = UP_ADD;
            state_d = S_ADD;
          end else if (state_q == S_DBL && k_q[M-1]) begin
            up_addr = UP_ADD;
            state_d = S_ADD;
          end else if (cnt_q == '0 || mode_add_q) begin
            up_addr = UP_INVINIT;
            state_d = S_INVINIT;
          end else begin
            k_d     = k_q << 1;
            cnt_d   = cnt_q - 1'b1;
            up_addr = UP_DBL;
            state_d = S_DBL;
          end
        end

      S_INVINIT:
        if (up_done) begin
          up_start = 1'b1;
          up_addr  = UP_INVITER;
          cnt_d    = CW'(M - 2);
          state_d  = S_INVITER;
        end

      S_INVITER:
        if (up_done) begin
          up_start = 1'b1;
          if (cnt_q == '0) begin
            up_addr = UP_AFFINE;
            state_d = S_AFFINE;
          end else begin
            up_addr = UP_INVITER;
            cnt_d   = cnt_q - 1'b1;
          end
        end

      S_AFFINE:
        if (up_done) begin
          state_d = S_IDLE;
          done    = 1'b1;
        end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      k_q        <= '0;
      cnt_q      <= '0;
      mode_add_q <= 1'b0;
      addr_q     <= '0;
    end else begin
      state_q    <= state_d;
      k_q        <= k_d;
      cnt_q      <= cnt_d;
      mode_add_q <= mode_add_d;
      addr_q     <= addr_d;
    end
  end

  assign busy = (state_q != S_IDLE);

  // Outside the preshift and the idle state a routine is always running.
  a_routine_running: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != S_IDLE && state_q != S_PRESHIFT) |-> up_running);

endmodule
