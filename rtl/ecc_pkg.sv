// Shared constants and types of the GF(2^m) elliptic-curve processor.
//
// The field is GF(2^191) in polynomial basis with the irreducible trinomial
// f(x) = x^191 + x^9 + 1. FIELD_M is the degree m, FIELD_LOW holds the terms of
// f(x) below x^m as a bit vector (bit t set means x^t is a term). The
// multiplier digit is 8 bits wide (radix 256), host data moves in 32-bit words.
//
// The 10-bit microcode word follows the split of the control ROM: 2 bits of
// sequence control, a 4-bit register-file address, a write enable and a 3-bit
// arithmetic-unit operation. The encodings of these fields, the register map
// and the command byte layout below are this design's own choices; the
// command opcodes (READ 000, WRITE 010, MULT 100, ADD 110 in bits 6:4, the
// I flag in bit 7, the register address in bits 3:0) follow the command table.
package ecc_pkg;

  localparam int unsigned FIELD_M = 191;
  localparam logic [FIELD_M-1:0] FIELD_LOW = FIELD_M'((1 << 9) | 1);
  localparam int unsigned DIGIT_W = 8;
  localparam int unsigned IO_W = 32;
  localparam int unsigned NREGS = 16;

  // Arithmetic-unit operations (3-bit field of the microcode word).
  typedef enum logic [2:0] {
    AU_HOLD = 3'd0,  // C <= C
    AU_LOAD = 3'd1,  // C <= a(x)
    AU_ADD  = 3'd2,  // C <= a(x) + C
    AU_SQR  = 3'd3,  // C <= C^2 mod f
    AU_MUL  = 3'd4,  // C <= a(x) * C mod f, 1 + ceil(m/w) cycles
    AU_IO   = 3'd5   // C <= {C << d, din}
  } au_op_e;

  // Sequence control (2-bit field of the microcode word).
  typedef enum logic [1:0] {
    SEQ_NEXT = 2'd0,  // continue with the next word
    SEQ_END  = 2'd1,  // last word of the routine
    SEQ_EXT  = 2'd2   // last word, register address taken from the command
  } seq_e;

  typedef struct packed {
    seq_e       seq;
    logic [3:0] addr;
    logic       we;
    au_op_e     op;
  } uword_t;

  // Register-file map used by the microcode.
  localparam logic [3:0] R_A   = 4'd0;   // curve coefficient a
  localparam logic [3:0] R_B   = 4'd1;   // curve coefficient b
  localparam logic [3:0] R_ONE = 4'd2;   // the constant 1
  localparam logic [3:0] R_PX  = 4'd3;   // input point P, affine
  localparam logic [3:0] R_PY  = 4'd4;
  localparam logic [3:0] R_QX  = 4'd5;   // result point Q, affine
  localparam logic [3:0] R_QY  = 4'd6;
  localparam logic [3:0] R_X   = 4'd7;   // working point, projective (X/Z, Y/Z^2)
  localparam logic [3:0] R_Y   = 4'd8;
  localparam logic [3:0] R_Z   = 4'd9;
  localparam logic [3:0] R_T0  = 4'd10;  // temporaries
  localparam logic [3:0] R_T1  = 4'd11;
  localparam logic [3:0] R_T2  = 4'd12;
  localparam logic [3:0] R_T3  = 4'd13;
  localparam logic [3:0] R_T4  = 4'd14;
  localparam logic [3:0] R_T5  = 4'd15;  // free: not used by the routines

  // Microprogram entry points (7-bit ROM addresses).
  localparam logic [6:0] UP_READ    = 7'd0;
  localparam logic [6:0] UP_WRITE   = 7'd1;
  localparam logic [6:0] UP_IO      = 7'd2;
  localparam logic [6:0] UP_INITP   = 7'd3;
  localparam logic [6:0] UP_INITQ   = 7'd9;
  localparam logic [6:0] UP_DBL     = 7'd15;
  localparam logic [6:0] UP_ADD     = 7'd40;
  localparam logic [6:0] UP_INVINIT = 7'd80;
  localparam logic [6:0] UP_INVITER = 7'd84;
  localparam logic [6:0] UP_AFFINE  = 7'd89;

  // Command opcodes, bits 6:4 of the command byte.
  typedef enum logic [2:0] {
    CMD_READ  = 3'b000,
    CMD_WRITE = 3'b010,
    CMD_MULT  = 3'b100,
    CMD_ADD   = 3'b110
  } cmd_e;

endpackage
