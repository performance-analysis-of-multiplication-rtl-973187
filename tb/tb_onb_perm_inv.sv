// tb_onb_perm_inv: checks the inverse permutation P^-1 at M = 10. Output bit
// i must come from input bit 2^i mod (M+1), computed here by doubling, and a
// round trip through P (onb_perm_fwd) must return the input unchanged.
module tb_onb_perm_inv;
  localparam int M = 10;
  int checks = 0, failures = 0;

  logic [M:1]   ssb;
  logic [M-1:0] nb, nb_rt, src;
  logic [M:0]   fwd;

  onb_perm_inv dut (.ssb_in(ssb), .nb_out(nb));
  onb_perm_fwd u_fwd (.nb_in(src), .ssb_out(fwd));
  onb_perm_inv dut_rt (.ssb_in(fwd[M:1]), .nb_out(nb_rt));

  function automatic logic [M-1:0] ref_inv(input logic [M:1] v);
    logic [M-1:0] r; int j = 1;
    for (int i = 0; i < M; i++) begin
      r[i] = v[j];
      j = (2 * j) % (M + 1);
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 1; j <= M; j++) begin
      ssb = '0; ssb[j] = 1'b1; src = '0; #1;
      checks++;
      if (nb !== ref_inv(ssb)) begin failures++; $display("FAIL one-hot %0d: %b", j, nb); end
    end
    for (int n = 0; n < 200; n++) begin
      ssb = M'($urandom); src = M'($urandom); #1;
      checks++;
      if (nb !== ref_inv(ssb)) begin failures++; $display("FAIL %b -> %b", ssb, nb); end
      checks++;
      if (nb_rt !== src) begin failures++; $display("FAIL round trip %b -> %b", src, nb_rt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
