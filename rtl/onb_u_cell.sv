// onb_u_cell: one accumulate cell U_i of the multiplier and the inverter.
//
// Each cell has one 2-input AND, one 2-input XOR and one flip-flop: when
// acc_en is high it adds (XORs) the product of the broadcast operand bit and
// its own D bit into its latch, u <= u ^ (s_bit & d_bit). clr empties the
// latch (step 1 of the inversion algorithm; also before every product) and
// wins over acc_en. Result u is valid the cycle after the last accumulate.
// The cell's gates follow the published gate count; the synchronous clear,
// the enable and the asynchronous active-low reset are this design's choice.
module onb_u_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,     // synchronous clear of the latch
  input  logic acc_en,  // accumulate this cycle
  input  logic s_bit,   // broadcast bit of the first operand
  input  logic d_bit,   // this cell's bit of the rotating second operand
  output logic u        // accumulated coefficient
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      u <= 1'b0;
    else if (clr)    u <= 1'b0;
    else if (acc_en) u <= u ^ (s_bit & d_bit);
  end
endmodule
