// Arithmetic unit: all GF(2^m) operations of the processor on the accumulator C.
//
// Two registers: C holds the running result and drives c(x); M holds the
// multiplier m(x) during a multiplication. The result of C is fed back outside
// the unit and enters again as b(x); a(x) comes from the register file. Each
// cycle the adder forms a(x)*m_i(x) + muxb(b) and reduces it modulo f(x):
//
//   op       m_i(x)            muxb             C next              cycles
//   HOLD     0                 b                c                   1
//   LOAD     1                 0                a                   1
//   ADD      1                 b                a + c               1
//   SQR      0                 b^2              c^2 mod f           1
//   IO       0                 {b<<d, din}      shift in d bits     1
//   MUL      digits of M       0, then b<<w     a * c mod f         1 + ND
//
// A multiplication takes 1 + ND cycles with ND = ceil(M/W), 25 for m = 191 and
// w = 8: the first cycle copies C into M and clears C, then each of the next
// ND cycles feeds the top digit of M to the digit multiplier,
// shifts M left by W and accumulates C <= C*x^W + a*m_i mod f, most
// significant digit first. The op input must stay MUL for all these cycles;
// busy is high during all but the last, so a sequencer advances when busy is
// low. dout shows the top d bits of C for reading data out.
//
// The register set, the three multiplexers, the two shifters, the square unit
// and the operation list follow the described arithmetic unit. The operation
// encoding, the digit counter and the busy output are this design's own.
module arith_unit
  import ecc_pkg::*;
#(
  parameter int unsigned M = FIELD_M,
  parameter logic [M-1:0] F_LOW = FIELD_LOW,
  parameter int unsigned W = DIGIT_W,
  parameter int unsigned D = IO_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  au_op_e       op,
  input  logic [M-1:0] a,      // multiplicand / operand from the register file
  input  logic [M-1:0] b,      // external feedback of c
  input  logic [D-1:0] din,
  output logic [M-1:0] c,
  output logic [D-1:0] dout,
  output logic         busy
);

  localparam int unsigned ND = (M + W - 1) / W;  // digits of the multiplier
  localparam int unsigned MRW = ND * W;          // width of register M
  localparam int unsigned IW = M + W;            // adder input width
  localparam int unsigned CW = $clog2(ND + 1);

  typedef enum logic [1:0] {MI_ZERO, MI_ONE, MI_DIGIT} mi_sel_e;
  typedef enum logic [2:0] {B_ZERO, B_FEED, B_SHIFT, B_SQUARE, B_IO} b_sel_e;

  logic [M-1:0]   c_q;
  logic [MRW-1:0] m_q;
  logic [CW-1:0]  cnt_q;

  mi_sel_e        mi_sel;
  b_sel_e         b_sel;
  logic           m_load, m_shift;
  logic [W-1:0]   mi;
  logic [M+W-2:0] prod;
  logic [IW-1:0]  sq;
  logic [IW-1:0]  bsel;
  logic [M-1:0]   c_next;

  // operation decode
  always_comb begin
    mi_sel  = MI_ZERO;
    b_sel   = B_FEED;
    m_load  = 1'b0;
    m_shift = 1'b0;
    unique case (op)
      AU_HOLD: ;
      AU_LOAD: begin mi_sel = MI_ONE; b_sel = B_ZERO; end
      AU_ADD:  mi_sel = MI_ONE;
      AU_SQR:  b_sel = B_SQUARE;
      AU_IO:   b_sel = B_IO;
      AU_MUL:
        if (cnt_q == '0) begin
          b_sel  = B_ZERO;           // first cycle: C <= 0, M <= C
          m_load = 1'b1;
        end else begin
          mi_sel  = MI_DIGIT;
          b_sel   = B_SHIFT;
          m_shift = 1'b1;
        end
      default: ;
    endcase
  end

  // multiplexer muxmi: digit input of the multiplier
  always_comb begin
    unique case (mi_sel)
      MI_ONE:   mi = W'(1);
      MI_DIGIT: mi = m_q[MRW-1 -: W];
      default:  mi = '0;
    endcase
  end

  gf_digit_multiplier #(.M(M), .W(W)) u_mul (.a(a), .mi(mi), .p(prod));

  gf_square #(.M(M), .F_LOW(F_LOW), .OW(IW)) u_sq (.a(b), .s(sq));

  // multiplexer muxb: feedback path
  always_comb begin
    unique case (b_sel)
      B_FEED:   bsel = IW'(b);
      B_SHIFT:  bsel = IW'(b) << W;
      B_SQUARE: bsel = sq;
      B_IO:     bsel = IW'({b[M-D-1:0], din});
      default:  bsel = '0;
    endcase
  end

  gf_reduce #(.M(M), .F_LOW(F_LOW), .IW(IW)) u_add (
    .x(IW'(prod)), .y(bsel), .c(c_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q   <= '0;
      m_q   <= '0;
      cnt_q <= '0;
    end else begin
      c_q <= c_next;
      // multiplexer muxm: load from C or shift by one digit
      if (m_load)       m_q <= MRW'(c_q);
      else if (m_shift) m_q <= m_q << W;
      if (m_load)       cnt_q <= CW'(ND);
      else if (m_shift) cnt_q <= cnt_q - 1'b1;
    end
  end

  assign c    = c_q;
  assign dout = c_q[M-1 -: D];
  assign busy = (op == AU_MUL) && (cnt_q != CW'(1));

  // A multiplication, once started, must not be interrupted.
  a_mul_held: assert property (@(posedge clk) disable iff (!rst_n)
    (cnt_q != '0) |-> (op == AU_MUL));

endmodule
