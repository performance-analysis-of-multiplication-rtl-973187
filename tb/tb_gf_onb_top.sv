// tb_gf_onb_top: end-to-end test of the arithmetic unit at its default
// size (M = 10), with no parameter override.
// It performs field divisions Q = A / B as an inversion of B followed by a
// multiplication A * B^-1, and checks Q * B = A in the polynomial reference
// (Q = 0 for B = 0). Meanwhile independent multiplications are started on the
// multiplier while the inverter is busy, so both units run at once.
// It counts how often each mechanism happened: multiplications, inversions,
// the B^2 step with D held, squarings of T, accumulate passes of M+1 clocks,
// a start ignored while busy, overlapped operation, zero operands. Each must
// happen at least once. Latencies are checked as in the unit testbenches.
module tb_gf_onb_top;
  import gf_ref_pkg::*;
  localparam int M = gf_onb_pkg::M_DEFAULT;
  localparam int LAT_MUL = M + 2;
  localparam int LAT_INV = 5 + (M - 2) * (M + 4);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic mul_start = 0, mul_busy, mul_done, inv_start = 0, inv_busy, inv_done;
  logic [M-1:0] mul_a = '0, mul_b = '0, mul_c, inv_b = '0, inv_result;

  gf_onb_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_mul = 0, n_inv = 0, n_sq1 = 0, n_tsq = 0, n_accpass = 0;
  int n_ignored = 0, n_overlap = 0, n_zero = 0;

  always @(posedge clk) if (rst_n) begin
    if (mul_done) n_mul++;
    if (inv_done) n_inv++;
    if (dut.u_inv.u_acc && !dut.u_inv.sd_rot) n_sq1++;
    if (dut.u_inv.t_rot) n_tsq++;
    if (dut.u_inv.u_clr && !dut.u_inv.t_load && !dut.u_inv.first) n_accpass++;
    if (mul_busy && inv_busy) n_overlap++;
    if (mul_start && mul_busy) n_ignored++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // Side traffic: multiplications launched while an inversion runs.
  logic [M-1:0] side_a, side_b;
  task automatic side_mul();
    int lat = 0;
    side_a = M'($urandom); side_b = M'($urandom);
    @(negedge clk);
    mul_a = side_a; mul_b = side_b; mul_start = 1;
    @(negedge clk);
    mul_a = M'($urandom);        // start held one more clock: must be ignored
    lat = 1;
    @(negedge clk);
    mul_start = 0; lat++;
    while (!mul_done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT_MUL) begin failures++; $display("FAIL mul latency %0d", lat); end
    checks++;
    if (nb_to_poly(word_t'(mul_c), M) !== poly_mulmod(nb_to_poly(word_t'(side_a), M), nb_to_poly(word_t'(side_b), M), M)) begin
      failures++; $display("FAIL side product %b * %b = %b", side_a, side_b, mul_c);
    end
  endtask

  task automatic divide(input logic [M-1:0] x, input logic [M-1:0] y);
    int lat = 0;
    logic [M-1:0] yinv;
    if (x == 0 || y == 0) n_zero++;
    @(negedge clk);
    inv_b = y; inv_start = 1;
    @(negedge clk);
    inv_start = 0; lat = 1;
    fork
      side_mul();
      begin
        while (!inv_done) begin @(negedge clk); lat++; end
      end
    join
    checks++;
    if (lat != LAT_INV) begin failures++; $display("FAIL inv latency %0d", lat); end
    yinv = inv_result;
    @(negedge clk);
    mul_a = x; mul_b = yinv; mul_start = 1;
    @(negedge clk);
    mul_start = 0;
    while (!mul_done) @(negedge clk);
    checks++;
    if (y == 0) begin
      if (mul_c !== '0) begin failures++; $display("FAIL %b / 0 = %b", x, mul_c); end
    end else if (poly_mulmod(nb_to_poly(word_t'(mul_c), M), nb_to_poly(word_t'(y), M), M) !== nb_to_poly(word_t'(x), M)) begin
      failures++; $display("FAIL %b / %b = %b", x, y, mul_c);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    divide(M'(0), M'($urandom) | M'(1));
    divide(M'($urandom), M'(0));
    divide('1, '1);
    for (int n = 0; n < 40; n++) divide(M'($urandom), M'($urandom));
    repeat (2) @(posedge clk);
    $display("mechanisms: mul=%0d inv=%0d b2_step=%0d t_squarings=%0d acc_passes=%0d ignored_start=%0d overlap_clocks=%0d zero_operands=%0d",
             n_mul, n_inv, n_sq1, n_tsq, n_accpass, n_ignored, n_overlap, n_zero);
    checks++; if (n_mul == 0)     begin failures++; $display("FAIL no multiplication"); end
    checks++; if (n_inv == 0)     begin failures++; $display("FAIL no inversion"); end
    checks++; if (n_sq1 == 0)     begin failures++; $display("FAIL no B^2 step"); end
    checks++; if (n_tsq == 0)     begin failures++; $display("FAIL no squaring of T"); end
    checks++; if (n_accpass == 0) begin failures++; $display("FAIL no accumulate pass"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlap"); end
    checks++; if (n_zero == 0)    begin failures++; $display("FAIL no zero operand"); end
    // every inversion squares T M-1 times and runs M-2 accumulate passes
    checks++; if (n_tsq != n_inv * (M - 1)) begin failures++; $display("FAIL squarings per inversion"); end
    checks++; if (n_accpass != n_inv * (M - 2)) begin failures++; $display("FAIL passes per inversion"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
