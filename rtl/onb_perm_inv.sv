// onb_perm_inv: inverse permutation P^-1, from the shifted standard basis
// back to the normal basis.
//
// Normal basis coefficient i is taken from position j = 2^i mod (M+1) of the
// input, which carries the coefficients of alpha^1..alpha^M (after the
// redundant alpha^0 term has been folded away by onb_fold). Pure wiring.
// This is P3 of the multiplier and P2 of the inverter in the published figures.
module onb_perm_inv #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic [M:1]   ssb_in,  // coefficients of alpha^1..alpha^M
  output logic [M-1:0] nb_out   // normal basis coefficients c_0..c_{M-1}
);
  for (genvar i = 0; i < M; i++) begin : g_out
    localparam int unsigned SRC = gf_onb_pkg::pow2_mod(i, M + 1);
    assign nb_out[i] = ssb_in[SRC];
  end

  if (!gf_onb_pkg::is_type1_onb(M)) begin : g_bad_m
    $error("onb_perm_inv: GF(2^%0d) has no Type-I optimal normal basis", M);
  end
endmodule
