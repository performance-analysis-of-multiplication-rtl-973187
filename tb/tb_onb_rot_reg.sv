// tb_onb_rot_reg: checks load priority and both rotation directions of the
// cyclic shift register (11 bits, as for D and S at M = 10) against a model.
module tb_onb_rot_reg;
  localparam int W = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, rot = 0;
  logic [W-1:0] load_val = '0, q_up, q_dn, m_up, m_dn;

  onb_rot_reg #(.WIDTH(W), .UP(1'b1)) dut_up (.clk, .rst_n, .load, .load_val, .rot, .q(q_up));
  onb_rot_reg #(.WIDTH(W), .UP(1'b0)) dut_dn (.clk, .rst_n, .load, .load_val, .rot, .q(q_dn));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_up = '0; m_dn = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      load = ($urandom % 6) == 0;
      rot = $urandom % 2;
      load_val = W'($urandom);
      @(posedge clk);
      if (load) begin
        m_up = load_val; m_dn = load_val;
      end else if (rot) begin
        m_up = (m_up << 1) | (m_up >> (W - 1));
        m_dn = (m_dn >> 1) | (m_dn << (W - 1));
      end
      #1;
      checks += 2;
      if (q_up !== m_up) begin failures++; $display("FAIL up %b vs %b", q_up, m_up); end
      if (q_dn !== m_dn) begin failures++; $display("FAIL down %b vs %b", q_dn, m_dn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
