// tb_onb_perm_fwd: checks the permutation P at M = 10 and M = 4. Each
// one-hot input must land on bit 2^i mod (M+1), computed here by doubling,
// bit 0 must stay 0, and random inputs must move as the sum of their bits.
module tb_onb_perm_fwd;
  localparam int M = 10;
  localparam int M4 = 4;
  int checks = 0, failures = 0;

  logic [M-1:0] nb;  logic [M:0]  ssb;
  logic [M4-1:0] nb4; logic [M4:0] ssb4;

  onb_perm_fwd dut (.nb_in(nb), .ssb_out(ssb));
  onb_perm_fwd #(.M(M4)) dut4 (.nb_in(nb4), .ssb_out(ssb4));

  function automatic logic [M:0] ref10(input logic [M-1:0] v);
    logic [M:0] r = '0; int j = 1;
    for (int i = 0; i < M; i++) begin
      r[j] = v[i];
      j = (2 * j) % (M + 1);
    end
    return r;
  endfunction

  function automatic logic [M4:0] ref4(input logic [M4-1:0] v);
    logic [M4:0] r = '0; int j = 1;
    for (int i = 0; i < M4; i++) begin
      r[j] = v[i];
      j = (2 * j) % (M4 + 1);
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
    for (int i = 0; i < M; i++) begin
      nb = '0; nb[i] = 1'b1; #1;
      checks++;
      if (ssb !== ref10(nb) || ssb[0] !== 1'b0) begin
        failures++; $display("FAIL M=10 bit %0d: %b", i, ssb);
      end
    end
    for (int n = 0; n < 200; n++) begin
      nb = M'($urandom); #1;
      checks++;
      if (ssb !== ref10(nb)) begin failures++; $display("FAIL M=10 %b -> %b", nb, ssb); end
    end
    for (int v = 0; v < 16; v++) begin
      nb4 = M4'(v); #1;
      checks++;
      if (ssb4 !== ref4(nb4)) begin failures++; $display("FAIL M=4 %b -> %b", nb4, ssb4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
