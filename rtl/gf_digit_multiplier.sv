// Digit multiplier of the arithmetic unit: p(x) = a(x) * m_i(x) without reduction.
//
// a(x) is a full field element of M bits, m_i(x) one W-bit digit of the
// multiplier. Each digit bit m_i[t] masks a(x) with AND gates, giving a basic
// partial product shifted t places; the W basic partial products are summed
// by XOR gates arranged as a balanced binary tree, so the logic depth grows
// with log2(W). The product has M+W-1 bits and is reduced later by the adder's
// reduction stage. Purely combinational.
//
// The masking and the tree of XOR gates follow the described multiplier
// (shown there for a radix-4 digit); the heap-ordered tree layout is this
// design's own.
module gf_digit_multiplier #(
  parameter int unsigned M = ecc_pkg::FIELD_M,
  parameter int unsigned W = ecc_pkg::DIGIT_W
) (
  input  logic [M-1:0]   a,
  input  logic [W-1:0]   mi,
  output logic [M+W-2:0] p
);

  localparam int unsigned PW = M + W - 1;

  // Node n of the tree has children 2n+1 and 2n+2; leaves are W-1 .. 2W-2.
  logic [PW-1:0] node [2*W-1];

  for (genvar t = 0; t < W; t++) begin : g_leaf
    assign node[W-1+t] = PW'(a & {M{mi[t]}}) << t;
  end

  for (genvar n = 0; n < W - 1; n++) begin : g_tree
    assign node[n] = node[2*n+1] ^ node[2*n+2];
  end

  assign p = node[0];

endmodule
