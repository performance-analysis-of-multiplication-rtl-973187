// onb_perm_fwd: permutation P, from the normal basis to the shifted standard
// basis {alpha, alpha^2, ..., alpha^m}.
//
// Normal basis coefficient i moves to position j = 2^i mod (M+1), which runs
// over 1..M exactly once for a Type-I ONB. The output has M+1 bits: bit 0 is
// the coefficient of alpha^0 = 1 and is always 0, which is the 0 that the
// multiplier and the inverter feed into the first D and S flip-flops.
// Pure wiring, no gates, no clock. The index map follows the published design; giving
// the output the extra constant bit 0 is this design's way of drawing the
// "0" input of D_0 and S_0.
module onb_perm_fwd #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic [M-1:0] nb_in,   // normal basis coefficients a_0..a_{M-1}
  output logic [M:0]   ssb_out  // shifted standard basis a'_0..a'_M, a'_0 = 0
);
  assign ssb_out[0] = 1'b0;
  for (genvar j = 1; j <= M; j++) begin : g_out
    // The source index i with 2^i mod (M+1) = j.
    localparam int unsigned SRC = src_index(j);
    assign ssb_out[j] = nb_in[SRC];
  end

  function automatic int unsigned src_index(input int unsigned j);
    for (int unsigned i = 0; i < M; i++)
      if (gf_onb_pkg::pow2_mod(i, M + 1) == j) return i;
    return 0;
  endfunction

  if (!gf_onb_pkg::is_type1_onb(M)) begin : g_bad_m
    $error("onb_perm_fwd: GF(2^%0d) has no Type-I optimal normal basis", M);
  end
endmodule
