// Microprogram: control ROM and address counter of the ECC control unit.
//
// The ROM holds 128 words of 10 bits: 2 bits of sequence control, a 4-bit
// register-file address, a register-file write enable and a 3-bit
// arithmetic-unit operation. A 7-bit address counter steps through a routine.
// The state machine starts a routine by pulsing start with its entry address;
// from the next cycle on one word is executed per cycle. While the arithmetic
// unit reports busy (a multiplication in progress) the counter holds, so a MUL
// word is applied for the whole multiplication. The last word of a routine
// carries SEQ_END or SEQ_EXT (SEQ_EXT takes the register address from the
// host command instead of the ROM); done is high in the cycle that word
// completes, and a new start may be given in that same cycle, so routines
// follow each other without idle cycles. When no routine runs the outputs
// request HOLD with no write.
//
// In a cycle with we set, the register addressed receives the value C has at
// the start of that cycle while the arithmetic unit performs its operation on
// the same (shared) address.
//
// Routines (projective coordinates x = X/Z, y = Y/Z^2 after Lopez and Dahab,
// curve y^2 + xy = x^3 + a x^2 + b):
//   READ    C <= reg[cmd]                    WRITE  reg[cmd] <= C
//   IO      shift host data into C
//   INITP   (X,Y,Z) <= (PX,PY,1)             INITQ  (X,Y,Z) <= (QX,QY,1)
//   DBL     (X,Y,Z) <= 2(X,Y,Z)              5 MUL, 5 SQR, 4 ADD
//           Z2 = X^2 Z^2, X2 = X^4 + b Z^4,
//           Y2 = b Z^4 Z2 + X2 (a Z2 + Y^2 + b Z^4)
//   ADD     (X,Y,Z) <= (X,Y,Z) + (PX,PY)     10 MUL, 4 SQR, 8 ADD
//           R = PY Z^2 + Y, B = PX Z + X, L = Z B, D = B^2 (L + a Z^2),
//           Z2 = L^2, E = R L, X2 = R^2 + D + E,
//           Y2 = E (X2 + PX Z2) + Z2 (X2 + PY Z2)
//   INVINIT T1 <= 1, T0 <= Z                 INVITER T0 <= T0^2, T1 <= T1 T0
//   AFFINE  QX <= X T1, QY <= Y T1^2         2 MUL, 1 SQR
// The operation counts of DBL, ADD and AFFINE are the published ones.
// Sequencing by a ROM and an address counter, the word layout and the field
// widths follow the description; the routines, their formulas, the register
// map and the field encodings are this design's own.
module microprogram
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] start_addr,
  input  logic [3:0] ext_addr,   // register address from the host command
  input  logic       stall,      // arithmetic unit busy
  output logic [3:0] rf_addr,
  output logic       rf_we,
  output au_op_e     au_op,
  output logic       running,
  output logic       done
);

  logic [6:0] pc_q;
  logic       run_q;
  uword_t     word;

  function automatic uword_t uw(seq_e s, logic [3:0] r, logic we, au_op_e o);
    return '{seq: s, addr: r, we: we, op: o};
  endfunction

  // control ROM
  always_comb begin
    unique case (pc_q)
      // host transfers
      7'd0:  word = uw(SEQ_EXT,  4'd0,  1'b0, AU_LOAD);
      7'd1:  word = uw(SEQ_EXT,  4'd0,  1'b1, AU_HOLD);
      7'd2:  word = uw(SEQ_END,  4'd0,  1'b0, AU_IO);
      // INITP
      7'd3:  word = uw(SEQ_NEXT, R_PX,  1'b0, AU_LOAD);
      7'd4:  word = uw(SEQ_NEXT, R_X,   1'b1, AU_HOLD);
      7'd5:  word = uw(SEQ_NEXT, R_PY,  1'b0, AU_LOAD);
      7'd6:  word = uw(SEQ_NEXT, R_Y,   1'b1, AU_HOLD);
      7'd7:  word = uw(SEQ_NEXT, R_ONE, 1'b0, AU_LOAD);
      7'd8:  word = uw(SEQ_END,  R_Z,   1'b1, AU_HOLD);
      // INITQ
      7'd9:  word = uw(SEQ_NEXT, R_QX,  1'b0, AU_LOAD);
      7'd10: word = uw(SEQ_NEXT, R_X,   1'b1, AU_HOLD);
      7'd11: word = uw(SEQ_NEXT, R_QY,  1'b0, AU_LOAD);
      7'd12: word = uw(SEQ_NEXT, R_Y,   1'b1, AU_HOLD);
      7'd13: word = uw(SEQ_NEXT, R_ONE, 1'b0, AU_LOAD);
      7'd14: word = uw(SEQ_END,  R_Z,   1'b1, AU_HOLD);
      // DBL: point doubling
      7'd15: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_LOAD);  // Z
      7'd16: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_SQR);   // Z^2
      7'd17: word = uw(SEQ_NEXT, R_T0,  1'b1, AU_SQR);   // T0 = Z^2, C = Z^4
      7'd18: word = uw(SEQ_NEXT, R_B,   1'b0, AU_MUL);   // b Z^4
      7'd19: word = uw(SEQ_NEXT, R_T1,  1'b1, AU_HOLD);  // T1 = b Z^4
      7'd20: word = uw(SEQ_NEXT, R_X,   1'b0, AU_LOAD);  // X
      7'd21: word = uw(SEQ_NEXT, R_X,   1'b0, AU_SQR);   // X^2
      7'd22: word = uw(SEQ_NEXT, R_T2,  1'b1, AU_SQR);   // T2 = X^2, C = X^4
      7'd23: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_ADD);   // X2 = X^4 + b Z^4
      7'd24: word = uw(SEQ_NEXT, R_X,   1'b1, AU_HOLD);  // X = X2
      7'd25: word = uw(SEQ_NEXT, R_T2,  1'b0, AU_LOAD);  // X^2
      7'd26: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_MUL);   // Z2 = X^2 Z^2
      7'd27: word = uw(SEQ_NEXT, R_Z,   1'b1, AU_HOLD);  // Z = Z2
      7'd28: word = uw(SEQ_NEXT, R_A,   1'b0, AU_MUL);   // a Z2
      7'd29: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_ADD);   // a Z2 + b Z^4
      7'd30: word = uw(SEQ_NEXT, R_T0,  1'b1, AU_HOLD);  // T0
      7'd31: word = uw(SEQ_NEXT, R_Y,   1'b0, AU_LOAD);  // Y
      7'd32: word = uw(SEQ_NEXT, R_Y,   1'b0, AU_SQR);   // Y^2
      7'd33: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_ADD);   // U = Y^2 + a Z2 + b Z^4
      7'd34: word = uw(SEQ_NEXT, R_X,   1'b0, AU_MUL);   // X2 U
      7'd35: word = uw(SEQ_NEXT, R_T0,  1'b1, AU_HOLD);  // T0 = X2 U
      7'd36: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_LOAD);  // b Z^4
      7'd37: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_MUL);   // b Z^4 Z2
      7'd38: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_ADD);   // Y2
      7'd39: word = uw(SEQ_END,  R_Y,   1'b1, AU_HOLD);  // Y = Y2
      // ADD: mixed point addition with affine P
      7'd40: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_LOAD);  // Z
      7'd41: word = uw(SEQ_NEXT, R_PX,  1'b0, AU_MUL);   // PX Z
      7'd42: word = uw(SEQ_NEXT, R_X,   1'b0, AU_ADD);   // B = PX Z + X
      7'd43: word = uw(SEQ_NEXT, R_T0,  1'b1, AU_HOLD);  // T0 = B
      7'd44: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_MUL);   // L = Z B
      7'd45: word = uw(SEQ_NEXT, R_T1,  1'b1, AU_HOLD);  // T1 = L
      7'd46: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_LOAD);  // Z
      7'd47: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_SQR);   // Z^2
      7'd48: word = uw(SEQ_NEXT, R_T2,  1'b1, AU_HOLD);  // T2 = Z^2
      7'd49: word = uw(SEQ_NEXT, R_A,   1'b0, AU_MUL);   // a Z^2
      7'd50: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_ADD);   // L + a Z^2
      7'd51: word = uw(SEQ_NEXT, R_T3,  1'b1, AU_HOLD);  // T3
      7'd52: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_LOAD);  // B
      7'd53: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_SQR);   // B^2
      7'd54: word = uw(SEQ_NEXT, R_T3,  1'b0, AU_MUL);   // D = B^2 (L + a Z^2)
      7'd55: word = uw(SEQ_NEXT, R_T3,  1'b1, AU_HOLD);  // T3 = D
      7'd56: word = uw(SEQ_NEXT, R_T2,  1'b0, AU_LOAD);  // Z^2
      7'd57: word = uw(SEQ_NEXT, R_PY,  1'b0, AU_MUL);   // PY Z^2
      7'd58: word = uw(SEQ_NEXT, R_Y,   1'b0, AU_ADD);   // R = PY Z^2 + Y
      7'd59: word = uw(SEQ_NEXT, R_T2,  1'b1, AU_HOLD);  // T2 = R
      7'd60: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_MUL);   // E = R L
      7'd61: word = uw(SEQ_NEXT, R_T4,  1'b1, AU_HOLD);  // T4 = E
      7'd62: word = uw(SEQ_NEXT, R_T2,  1'b0, AU_LOAD);  // R
      7'd63: word = uw(SEQ_NEXT, R_T2,  1'b0, AU_SQR);   // R^2
      7'd64: word = uw(SEQ_NEXT, R_T3,  1'b0, AU_ADD);   // + D
      7'd65: word = uw(SEQ_NEXT, R_T4,  1'b0, AU_ADD);   // X2 = R^2 + D + E
      7'd66: word = uw(SEQ_NEXT, R_X,   1'b1, AU_HOLD);  // X = X2
      7'd67: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_LOAD);  // L
      7'd68: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_SQR);   // Z2 = L^2
      7'd69: word = uw(SEQ_NEXT, R_Z,   1'b1, AU_HOLD);  // Z = Z2
      7'd70: word = uw(SEQ_NEXT, R_PX,  1'b0, AU_MUL);   // PX Z2
      7'd71: word = uw(SEQ_NEXT, R_X,   1'b0, AU_ADD);   // F = X2 + PX Z2
      7'd72: word = uw(SEQ_NEXT, R_T4,  1'b0, AU_MUL);   // E F
      7'd73: word = uw(SEQ_NEXT, R_T4,  1'b1, AU_HOLD);  // T4 = E F
      7'd74: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_LOAD);  // Z2
      7'd75: word = uw(SEQ_NEXT, R_PY,  1'b0, AU_MUL);   // PY Z2
      7'd76: word = uw(SEQ_NEXT, R_X,   1'b0, AU_ADD);   // G = X2 + PY Z2
      7'd77: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_MUL);   // Z2 G
      7'd78: word = uw(SEQ_NEXT, R_T4,  1'b0, AU_ADD);   // Y2 = E F + Z2 G
      7'd79: word = uw(SEQ_END,  R_Y,   1'b1, AU_HOLD);  // Y = Y2
      // INVINIT
      7'd80: word = uw(SEQ_NEXT, R_ONE, 1'b0, AU_LOAD);
      7'd81: word = uw(SEQ_NEXT, R_T1,  1'b1, AU_HOLD);  // T1 = 1
      7'd82: word = uw(SEQ_NEXT, R_Z,   1'b0, AU_LOAD);
      7'd83: word = uw(SEQ_END,  R_T0,  1'b1, AU_HOLD);  // T0 = Z
      // INVITER: one step of inversion by exponentiation
      7'd84: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_LOAD);
      7'd85: word = uw(SEQ_NEXT, R_T0,  1'b0, AU_SQR);
      7'd86: word = uw(SEQ_NEXT, R_T0,  1'b1, AU_HOLD);  // T0 = T0^2
      7'd87: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_MUL);
      7'd88: word = uw(SEQ_END,  R_T1,  1'b1, AU_HOLD);  // T1 = T1 T0
      // AFFINE: T1 = 1/Z
      7'd89: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_LOAD);
      7'd90: word = uw(SEQ_NEXT, R_X,   1'b0, AU_MUL);   // x = X / Z
      7'd91: word = uw(SEQ_NEXT, R_QX,  1'b1, AU_HOLD);
      7'd92: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_LOAD);
      7'd93: word = uw(SEQ_NEXT, R_T1,  1'b0, AU_SQR);   // 1 / Z^2
      7'd94: word = uw(SEQ_NEXT, R_Y,   1'b0, AU_MUL);   // y = Y / Z^2
      7'd95: word = uw(SEQ_END,  R_QY,  1'b1, AU_HOLD);
      default: word = uw(SEQ_END, 4'd0, 1'b0, AU_HOLD);
    endcase
  end

  assign running = run_q;
  assign done    = run_q && !stall && (word.seq != SEQ_NEXT);
  assign rf_addr = !run_q ? 4'd0 : (word.seq == SEQ_EXT) ? ext_addr : word.addr;
  assign rf_we   = run_q && word.we;
  assign au_op   = run_q ? word.op : AU_HOLD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      run_q <= 1'b0;
    end else if (start) begin
      pc_q  <= start_addr;
      run_q <= 1'b1;
    end else if (run_q && !stall) begin
      if (word.seq == SEQ_NEXT) pc_q <= pc_q + 7'd1;
      else                      run_q <= 1'b0;
    end
  end

  // A routine may only be started when none runs or the current one ends.
  a_start_free: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (!run_q || done));
  // The register file is never written during a multiplication.
  a_no_write_in_mul: assert property (@(posedge clk) disable iff (!rst_n)
    (run_q && word.op == AU_MUL) |-> !word.we);

endmodule
