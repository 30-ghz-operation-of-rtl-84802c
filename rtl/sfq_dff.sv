// Clocked delay flip-flop (SFQ DFF).
//
// Stores a pulse that arrives between two clock pulses and releases it on the next
// clock: a one-cycle delay of `d_i`. `rst_n` (synchronous, active low) clears it.
// In the ALU it delays the carry by one bit period so that the carry out of bit i
// meets the propagate bit of bit i+1 in the third-stage XOR.
module sfq_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d_i,
  output logic q_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) q_o <= 1'b0;
    else        q_o <= d_i;
  end

endmodule
