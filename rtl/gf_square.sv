// Square unit: s(x) = a(x)^2, partially reduced so that it fits the adder input.
//
// a(x) is split into a low half a_l = a[H-1:0] and a high half a_h = a[M-1:H]
// with H = (M+1)/2 (96 for m = 191). Squaring in GF(2^m) is linear, so each
// half is squared by inserting a 0 after every bit. Only the high half needs
// reduction: a_h^2 * x^(2H) = a_h^2 * x^(M+1), and x^(M+1) = x * F_LOW mod f,
// so a_h^2 is added once for every low term x^t of f(x), shifted by t+1
// places. For f(x) = x^191 + x^9 + 1 this is a_l^2 + a_h^2 * (x^10 + x), the
// sum of the expanded halves with two shifted copies. The result has at most
// OW bits and is fully reduced by the reduction stage that follows it in the
// arithmetic unit. If a field and a digit width ever give a wider result, the
// bits above OW are folded here first. Purely combinational.
//
// The split into halves, the squarers and the shifted additions follow the
// described square unit; the generic shift amounts derived from F_LOW are
// this design's own formulation.
module gf_square #(
  parameter int unsigned M = ecc_pkg::FIELD_M,
  parameter logic [M-1:0] F_LOW = ecc_pkg::FIELD_LOW,
  parameter int unsigned OW = ecc_pkg::FIELD_M + ecc_pkg::DIGIT_W
) (
  input  logic [M-1:0]  a,
  output logic [OW-1:0] s
);

  localparam int unsigned H = (M + 1) / 2;
  localparam int unsigned SW = 2 * M + 1;  // wide enough for every shifted copy

  logic [2*H-1:0]   lo_sq;
  logic [2*(M-H)-1:0] hi_sq;
  logic [SW-1:0]    v;

  always_comb begin
    lo_sq = '0;
    hi_sq = '0;
    for (int i = 0; i < int'(H); i++) lo_sq[2*i] = a[i];
    for (int i = 0; i < int'(M - H); i++) hi_sq[2*i] = a[H+i];
    v = SW'(lo_sq);
    for (int t = 0; t < int'(M); t++) begin
      if (F_LOW[t]) v = v ^ (SW'(hi_sq) << (t + 1));
    end
    // fold anything above OW-1 (nothing for the default field and digit)
    for (int i = SW - 1; i >= int'(OW); i--) begin
      v = v ^ ({SW{v[i]}} & ((SW'(F_LOW) << (i - M)) | (SW'(1) << i)));
    end
    s = v[OW-1:0];
  end

endmodule
