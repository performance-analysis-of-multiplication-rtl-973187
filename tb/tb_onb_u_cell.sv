// tb_onb_u_cell: drives one accumulate cell with random clear, enable and
// operand bits and compares it each clock with a model u ^= s & d.
module tb_onb_u_cell;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0, s_bit = 0, d_bit = 0, u;
  logic model;

  onb_u_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (u !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      clr = ($urandom % 8) == 0;
      acc_en = $urandom % 2;
      s_bit = $urandom % 2;
      d_bit = $urandom % 2;
      @(posedge clk);
      if (clr) model = 0;
      else if (acc_en) model = model ^ (s_bit & d_bit);
      #1;
      checks++;
      if (u !== model) begin failures++; $display("FAIL step %0d: u=%b model=%b", n, u, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
