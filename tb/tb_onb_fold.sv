// tb_onb_fold: checks the XOR row at M = 10: out[k] = in[k] ^ in[0]. Also
// checks that the redundant vector and the folded one stand for the same
// field element, using the polynomial reference (x^0 = 1 is expanded as
// x + ... + x^M, which equals 1 modulo the all-one polynomial).
module tb_onb_fold;
  import gf_ref_pkg::*;
  localparam int M = 10;
  int checks = 0, failures = 0;

  logic [M:0] red;
  logic [M:1] f;

  onb_fold dut (.red_in(red), .ssb_out(f));

  // Value of sum_k v_k x^k reduced mod G, computed by multiplying powers of x.
  function automatic word_t val(input logic [M:0] v);
    word_t r = '0, e = word_t'(1);
    for (int k = 0; k <= M; k++) begin
      if (v[k]) r ^= e;
      e = poly_mulmod(e, word_t'(2), M);
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
    for (int n = 0; n < 300; n++) begin
      red = (M + 1)'($urandom);
      if (n == 0) red = (M + 1)'(1);
      #1;
      for (int k = 1; k <= M; k++) begin
        checks++;
        if (f[k] !== (red[k] ^ red[0])) begin failures++; $display("FAIL bit %0d of %b", k, red); end
      end
      checks++;
      if (val({f, 1'b0}) !== val(red)) begin failures++; $display("FAIL value %b", red); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
