// onb_fold: the XOR row between the accumulator (or S register) and the
// inverse permutation.
//
// The accumulator holds a product in the redundant basis {1, alpha, ...,
// alpha^M}, i.e. modulo x^(M+1) + 1. Because 1 + alpha + ... + alpha^M = 0,
// the alpha^0 term equals alpha + ... + alpha^M, so it is removed by XORing
// bit 0 into every other bit: out[k] = in[k] ^ in[0], k = 1..M. These are the
// M two-input XOR gates drawn above the inverse permutation. Combinational.
module onb_fold #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic [M:0] red_in,  // redundant form, bit k = coefficient of alpha^k
  output logic [M:1] ssb_out  // coefficients of alpha^1..alpha^M
);
  assign ssb_out = red_in[M:1] ^ {M{red_in[0]}};
endmodule
