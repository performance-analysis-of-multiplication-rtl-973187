// tb_onb_mult: self-checking test of the normal basis multiplier.
// M = 10 (the default): corner operands (0, 1 = all ones, single basis
// elements) and random pairs, checked in the polynomial domain, plus the
// exact start-to-done latency of M+2 clocks. M = 4: all 256 operand pairs,
// checked bit for bit against a product found by search over the field.
module tb_onb_mult;
  import gf_ref_pkg::*;
  localparam int M = 10;
  localparam int M4 = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [M-1:0] a = '0, b = '0, c;
  logic start4 = 0, busy4, done4;
  logic [M4-1:0] a4 = '0, b4 = '0, c4;

  onb_mult dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);
  onb_mult #(.M(M4)) dut4 (.clk, .rst_n, .start(start4), .a(a4), .b(b4),
                           .busy(busy4), .done(done4), .c(c4));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic run10(input logic [M-1:0] x, input logic [M-1:0] y);
    int lat = 0;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = M'($urandom); b = M'($urandom);  // operands need only be held at start
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != M + 2) begin failures++; $display("FAIL latency %0d, expected %0d", lat, M + 2); end
    checks++;
    if (nb_to_poly(word_t'(c), M) !== poly_mulmod(nb_to_poly(word_t'(x), M), nb_to_poly(word_t'(y), M), M)) begin
      failures++; $display("FAIL M=10 %b * %b = %b", x, y, c);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  task automatic run4(input logic [M4-1:0] x, input logic [M4-1:0] y);
    word_t expect_c;
    @(negedge clk);
    a4 = x; b4 = y; start4 = 1;
    @(negedge clk);
    start4 = 0;
    while (!done4) @(negedge clk);
    expect_c = nb_mul_search(word_t'(x), word_t'(y), M4);
    checks++;
    if (word_t'(c4) !== expect_c) begin
      failures++; $display("FAIL M=4 %b * %b = %b, expected %b", x, y, c4, expect_c[M4-1:0]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run10('0, M'($urandom));
    run10('1, '1);                       // 1 * 1 = 1 (all ones is the unit)
    for (int i = 0; i < M; i++) run10(M'(1) << i, '1);
    for (int i = 0; i < M; i++) run10(M'(1) << i, M'(1) << ((i * 3) % M));
    for (int n = 0; n < 300; n++) run10(M'($urandom), M'($urandom));
    // start while busy must be ignored
    @(negedge clk); a = M'(5); b = M'(9); start = 1;
    @(negedge clk); a = M'(123); b = M'(77);
    repeat (3) @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nb_to_poly(word_t'(c), M) !== poly_mulmod(nb_to_poly(word_t'(5), M), nb_to_poly(word_t'(9), M), M)) begin
      failures++; $display("FAIL start while busy changed the product");
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) run4(M4'(x), M4'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
