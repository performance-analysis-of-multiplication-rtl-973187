// onb_mult: sequential semi-systolic multiplier over GF(2^M) in a Type-I
// optimal normal basis.
//
// Both operands are moved by the permutation P into the redundant basis
// {1, alpha, ..., alpha^M} (with alpha^(M+1) = 1), where multiplication is a
// cyclic convolution of length M+1: c'_k = sum_t a'_t b'_((k-t) mod (M+1)).
// The S register holds A' and presents one coefficient a'_t per clock on its
// bit 0, broadcast to all M+1 cells U_k. The D register holds B' and rotates
// by one place per clock, so cell k sees b'_(k-t) and accumulates a'_t*b'_(k-t).
// After M+1 accumulate clocks U holds c'. The XOR row (onb_fold) removes the
// alpha^0 term and P^-1 returns the normal basis product.
// Hardware: M+1 AND, 2M+1 XOR and 3M+3 flip-flops in the datapath, plus a
// small counter.
//
// Interface and timing: a start pulse while idle loads A and B (one clock);
// M+1 accumulate clocks follow; done is high for one clock after that, i.e.
// M+2 clocks after the start clock, and c stays valid until the next start.
// start while busy is ignored.
// The datapath follows the published design. The start/done handshake, the counter,
// running M+1 rather than M accumulate clocks (the a'_0 term is zero here but
// the same loop serves the inverter) and the default M = 10 are this design's
// own choices.
module onb_mult #(
  parameter int unsigned M = gf_onb_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,      // normal basis operand A
  input  logic [M-1:0] b,      // normal basis operand B
  output logic         busy,
  output logic         done,   // one-clock pulse, c valid from here on
  output logic [M-1:0] c       // normal basis product A*B
);
  localparam int unsigned CW = $clog2(M + 2);

  typedef enum logic [0:0] {ST_IDLE, ST_ACC} state_e;
  state_e        state;
  logic [CW-1:0] cnt;

  logic [M:0] a_ssb, b_ssb;   // P2 and P1 outputs
  logic [M:0] s_q, d_q, u_q;
  logic [M:1] folded;
  logic       load, acc;

  assign load = (state == ST_IDLE) && start;
  assign acc  = (state == ST_ACC);
  assign busy = (state == ST_ACC);

  onb_perm_fwd #(.M(M)) u_p2 (.nb_in(a), .ssb_out(a_ssb));
  onb_perm_fwd #(.M(M)) u_p1 (.nb_in(b), .ssb_out(b_ssb));

  // S: shifts toward bit 0, which is broadcast to the cells.
  onb_rot_reg #(.WIDTH(M + 1), .UP(1'b0)) u_s (
    .clk, .rst_n, .load, .load_val(a_ssb), .rot(acc), .q(s_q));
  // D: rotates upward, D_k <= D_(k-1), D_0 <= D_M.
  onb_rot_reg #(.WIDTH(M + 1), .UP(1'b1)) u_d (
    .clk, .rst_n, .load, .load_val(b_ssb), .rot(acc), .q(d_q));

  for (genvar k = 0; k <= M; k++) begin : g_u
    onb_u_cell u_cell (
      .clk, .rst_n, .clr(load), .acc_en(acc),
      .s_bit(s_q[0]), .d_bit(d_q[k]), .u(u_q[k]));
  end

  onb_fold     #(.M(M)) u_fold (.red_in(u_q), .ssb_out(folded));
  onb_perm_inv #(.M(M)) u_p3   (.ssb_in(folded), .nb_out(c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_ACC;
          cnt   <= '0;
        end
        ST_ACC: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(M)) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("onb_mult: done longer than one clock");
endmodule
