// onb_rot_reg: parallel-load cyclic shift register, used for the D, S and T
// registers of the multiplier and the inverter.
//
// load (priority) copies load_val in; otherwise rot moves every bit one place
// cyclically. With UP = 1 bit i takes bit i-1 and the top bit wraps to bit 0
// (D, and T whose rotation squares a normal basis element); with UP = 0 bit i
// takes bit i+1 and bit 0 wraps to the top (S, whose bit 0 is broadcast).
// One clock per load or shift; asynchronous active-low reset to zero.
// Rotation as the register's operation follows the published design; the direction
// of each register and the reset are this design's choice.
module onb_rot_reg #(
  parameter int unsigned WIDTH = gf_onb_pkg::M_DEFAULT + 1,
  parameter bit          UP    = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_val,
  input  logic             rot,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_val;
    else if (rot)   q <= UP ? {q[WIDTH-2:0], q[WIDTH-1]} : {q[0], q[WIDTH-1:1]};
  end
endmodule
