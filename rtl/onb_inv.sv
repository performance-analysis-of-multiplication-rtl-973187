// onb_inv: multiplicative inverter over GF(2^M) in a Type-I optimal normal
// basis, built around the same AND-XOR cell array as onb_mult.
//
// By Fermat, B^-1 = B^(2^M - 2) = B^2 * B^4 * ... * B^(2^(M-1)). Squaring in
// a normal basis is a cyclic shift, so register T (loaded with B) is rotated
// by one place to produce each next power. Each power is moved through P into
// register D (bit 0 = 0). The running product lives in S in the redundant
// basis {1, alpha, ..., alpha^M}; it is never reduced between products,
// because the cell array computes modulo x^(M+1)+1, a multiple of the field
// polynomial 1 + x + ... + x^M. Only the final S is folded (onb_fold) and sent
// back through P^-1.
//
// Sequence (one state per line):
//   start  : T <= B, U <= 0
//   SHIFT  : T <= T rotated (next square)
//   LOAD_D : D <= P(T); on the first pass also S <= 1 (only S_0 set)
//   SQ1    : first pass only: one accumulate clock with D held, U <= D = B^2
//   MUL    : M+1 clocks, U accumulates S_0 & D while S and D rotate
//   STORE  : S <= U, U <= 0; then SHIFT again, or finish after M-2 products
// Timing: done is a one-clock pulse 5 + (M-2)*(M+4) clocks after the start
// clock (117 for M = 10); result stays valid until the next start; start
// while busy is ignored. B = 0 gives 0.
// The register set, the squaring by shifting T, deriving B^2 through a unit S
// with D held, and the M-2 products of M+1 clocks each follow the published design.
// The state encoding, the handshake, the separate SHIFT and LOAD_D clocks and
// the default M = 10 are this design's choices.
module onb_inv #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] b,       // normal basis operand B
  output logic         busy,
  output logic         done,    // one-clock pulse, binv valid from here on
  output logic [M-1:0] binv     // normal basis B^-1 (0 for B = 0)
);
  localparam int unsigned CW = $clog2(M + 2);
  localparam int unsigned NMUL = M - 2;  // products after B^2
  localparam int unsigned RW = $clog2(M + 1);

  typedef enum logic [2:0] {
    ST_IDLE, ST_SHIFT, ST_LOAD_D, ST_SQ1, ST_MUL, ST_STORE
  } state_e;

  state_e        state;
  logic [CW-1:0] cnt;      // accumulate clocks within one product
  logic [RW-1:0] nmul;     // products finished
  logic          first;    // first pass derives B^2

  logic [M-1:0] t_q;
  logic [M:0]   t_ssb, s_q, d_q, u_q, s_load_val;
  logic [M:1]   folded;
  logic         t_load, t_rot, d_load, s_load, sd_rot, u_clr, u_acc;

  assign busy   = (state != ST_IDLE);
  assign t_load = (state == ST_IDLE) && start;
  assign t_rot  = (state == ST_SHIFT);
  assign d_load = (state == ST_LOAD_D);
  assign sd_rot = (state == ST_MUL);
  assign s_load = (state == ST_STORE) || (state == ST_LOAD_D && first);
  assign s_load_val = (state == ST_STORE) ? u_q : (M + 1)'(1);
  assign u_clr  = t_load || (state == ST_STORE);
  assign u_acc  = (state == ST_SQ1) || (state == ST_MUL);

  // T: squaring register, a normal basis left rotation b_i <= b_(i-1).
  onb_rot_reg #(.WIDTH(M), .UP(1'b1)) u_t (
    .clk, .rst_n, .load(t_load), .load_val(b), .rot(t_rot), .q(t_q));

  onb_perm_fwd #(.M(M)) u_p1 (.nb_in(t_q), .ssb_out(t_ssb));

  onb_rot_reg #(.WIDTH(M + 1), .UP(1'b1)) u_d (
    .clk, .rst_n, .load(d_load), .load_val(t_ssb), .rot(sd_rot), .q(d_q));
  onb_rot_reg #(.WIDTH(M + 1), .UP(1'b0)) u_s (
    .clk, .rst_n, .load(s_load), .load_val(s_load_val), .rot(sd_rot), .q(s_q));

  for (genvar k = 0; k <= M; k++) begin : g_u
    onb_u_cell u_cell (
      .clk, .rst_n, .clr(u_clr), .acc_en(u_acc),
      .s_bit(s_q[0]), .d_bit(d_q[k]), .u(u_q[k]));
  end

  onb_fold     #(.M(M)) u_fold (.red_in(s_q), .ssb_out(folded));
  onb_perm_inv #(.M(M)) u_p2   (.ssb_in(folded), .nb_out(binv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      nmul  <= '0;
      first <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_SHIFT;
          first <= 1'b1;
          nmul  <= '0;
        end
        ST_SHIFT:  state <= ST_LOAD_D;
        ST_LOAD_D: begin
          state <= first ? ST_SQ1 : ST_MUL;
          cnt   <= '0;
        end
        ST_SQ1:    state <= ST_STORE;
        ST_MUL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(M)) state <= ST_STORE;
        end
        ST_STORE: begin
          first <= 1'b0;
          if (!first) nmul <= nmul + 1'b1;
          if ((first && NMUL == 0) || (!first && nmul == RW'(NMUL - 1))) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            state <= ST_SHIFT;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("onb_inv: done longer than one clock");
endmodule
