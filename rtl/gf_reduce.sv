// Field adder with integrated modular reduction: c(x) = (x(x) + y(x)) mod f(x).
//
// The two operands are XORed bit by bit (addition in GF(2^m) has no carries)
// and the sum, up to IW bits wide, is folded back to M bits: each bit at
// position M+s is removed and added to the positions of the low terms of f(x)
// shifted by s. The folds run from the highest bit down, so a fold that lands
// above M-1 is folded again. With f(x) = x^191 + x^9 + 1 and an 8-bit digit
// every excess bit needs one fold, two XOR gates per output bit at most.
// Purely combinational.
//
// Parameters: M and the low terms F_LOW of f(x) select the field, so any
// trinomial or pentanomial can be used, as the described reduction unit
// allows. IW is the operand width, M+W for the default digit of W bits.
module gf_reduce #(
  parameter int unsigned M = ecc_pkg::FIELD_M,
  parameter logic [M-1:0] F_LOW = ecc_pkg::FIELD_LOW,
  parameter int unsigned IW = ecc_pkg::FIELD_M + ecc_pkg::DIGIT_W
) (
  input  logic [IW-1:0] x,
  input  logic [IW-1:0] y,
  output logic [M-1:0]  c
);

  logic [IW-1:0] v;

  always_comb begin
    v = x ^ y;
    for (int i = IW - 1; i >= int'(M); i--) begin
      // x^i = x^(i-M) * x^M = x^(i-M) * F_LOW  (mod f)
      v = v ^ ({IW{v[i]}} & ((IW'(F_LOW) << (i - M)) | (IW'(1) << i)));
    end
    c = v[M-1:0];
  end

endmodule
