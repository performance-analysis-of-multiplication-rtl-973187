// gf_onb_top: GF(2^M) arithmetic unit with a Type-I optimal normal basis
// multiplier and a multiplicative inverter.
//
// The two units run independently, each with its own start/busy/done
// handshake, so an inversion and a multiplication can overlap. Division
// A/B is done by the user as an inversion of B followed by a multiplication
// by A. Multiplication: done M+2 clocks after start. Inversion: done
// 5 + (M-2)*(M+4) clocks after start. All operands and results are in the
// normal basis, where bit i is the coefficient of alpha^(2^i).
// Pairing the two units follows the published design, which builds both; the
// port set is this design's own choice.
module gf_onb_top #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // multiplier
  input  logic         mul_start,
  input  logic [M-1:0] mul_a,
  input  logic [M-1:0] mul_b,
  output logic         mul_busy,
  output logic         mul_done,
  output logic [M-1:0] mul_c,
  // inverter
  input  logic         inv_start,
  input  logic [M-1:0] inv_b,
  output logic         inv_busy,
  output logic         inv_done,
  output logic [M-1:0] inv_result
);
  onb_mult #(.M(M)) u_mult (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
    .busy(mul_busy), .done(mul_done), .c(mul_c));

  onb_inv #(.M(M)) u_inv (
    .clk, .rst_n, .start(inv_start), .b(inv_b),
    .busy(inv_busy), .done(inv_done), .binv(inv_result));
endmodule
