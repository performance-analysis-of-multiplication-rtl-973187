// tb_onb_inv: self-checking test of the normal basis inverter.
// M = 10 (the default): all 1024 elements; for B != 0 the product B * B^-1
// must be 1 in the polynomial reference, B = 0 must give 0, and every
// inversion must take exactly 5 + (M-2)*(M+4) clocks from start to done.
// M = 4 and M = 2 (where no product follows B^2): all elements.
module tb_onb_inv;
  import gf_ref_pkg::*;
  localparam int M = 10;
  localparam int M4 = 4;
  localparam int M2 = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [M-1:0] b = '0, r;
  logic start4 = 0, busy4, done4;
  logic [M4-1:0] b4 = '0, r4;
  logic start2 = 0, busy2, done2;
  logic [M2-1:0] b2 = '0, r2;

  onb_inv dut (.clk, .rst_n, .start, .b, .busy, .done, .binv(r));
  onb_inv #(.M(M4)) dut4 (.clk, .rst_n, .start(start4), .b(b4), .busy(busy4), .done(done4), .binv(r4));
  onb_inv #(.M(M2)) dut2 (.clk, .rst_n, .start(start2), .b(b2), .busy(busy2), .done(done2), .binv(r2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic bit inverse_ok(input word_t x, input word_t y, input int m);
    if (x == 0) return y == 0;
    return poly_mulmod(nb_to_poly(x, m), nb_to_poly(y, m), m) == word_t'(1);
  endfunction

  task automatic run10(input logic [M-1:0] x);
    int lat;
    @(negedge clk);
    b = x; start = 1;
    @(negedge clk);
    start = 0; b = M'($urandom);
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 5 + (M - 2) * (M + 4)) begin
      failures++; $display("FAIL latency %0d, expected %0d", lat, 5 + (M - 2) * (M + 4));
    end
    checks++;
    if (!inverse_ok(word_t'(x), word_t'(r), M)) begin failures++; $display("FAIL M=10 inv(%b) = %b", x, r); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < (1 << M); x++) run10(M'(x));
    for (int x = 0; x < (1 << M4); x++) begin
      @(negedge clk); b4 = M4'(x); start4 = 1;
      @(negedge clk); start4 = 0;
      while (!done4) @(negedge clk);
      checks++;
      if (!inverse_ok(word_t'(x), word_t'(r4), M4)) begin failures++; $display("FAIL M=4 inv(%b) = %b", x, r4); end
    end
    for (int x = 0; x < (1 << M2); x++) begin
      @(negedge clk); b2 = M2'(x); start2 = 1;
      @(negedge clk); start2 = 0;
      while (!done2) @(negedge clk);
      checks++;
      if (!inverse_ok(word_t'(x), word_t'(r2), M2)) begin failures++; $display("FAIL M=2 inv(%b) = %b", x, r2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
